`timescale 1ps/10fs
// error_detector: measures either the high time of Ref_Clk or the phase error
// between Ref_Clk and the divided DCO clock, in picoseconds.
//
// The frequency divider derives Div_Clk from the DCO clock. The phase detector
// turns the Ref_Clk/Div_Clk edge difference into a pulse and reports which
// clock leads. `detect_mode` selects what the TDC measures: 0 selects Ref_Clk
// itself (its high phase, half of the reference period, for frequency
// detection), 1 selects the phase-error pulse. The one-pulse lock / pulse
// amplifier lets only the first selected pulse after `error_set` through, and
// the TDC converts its width to `error_value` with 1 ps resolution, raising
// `error_valid` when done.
// Handshake: the memory controller raises `error_set` to clear the TDC and
// rearm the one-pulse lock, lowers it, and waits for `error_valid`.
// `error_value`, `lead` and `lag` are stable while `error_valid` is high.
// Structure follows the document; the divider width is this design's choice.
module error_detector #(
  parameter int unsigned DIV_W = 16
) (
  input  logic             ref_clk,
  input  logic             dco_clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] div_value,
  input  logic             detect_mode,
  input  logic             error_set,
  output logic             div_clk,
  output logic             error_valid,
  output logic [31:0]      error_value,
  output logic             lead,
  output logic             lag
);

  logic phase_error;
  logic select_pulse;
  logic pulse;

  freq_divider #(.DIV_W(DIV_W)) u_div (
    .dco_clk   (dco_clk),
    .rst_n     (rst_n),
    .div_value (div_value),
    .div_clk   (div_clk)
  );

  phase_detector u_pd (
    .ref_clk     (ref_clk),
    .div_clk     (div_clk),
    .rst_n       (rst_n),
    .clear       (error_set),
    .phase_error (phase_error),
    .lead        (lead),
    .lag         (lag)
  );

  assign select_pulse = detect_mode ? phase_error : ref_clk;

  opl_pa u_opl_pa (
    .input_pulse  (select_pulse),
    .error_set    (error_set),
    .output_pulse (pulse)
  );

  tdc u_tdc (
    .pulse       (pulse),
    .error_set   (error_set),
    .tdc_out     (error_value),
    .error_valid (error_valid)
  );

endmodule
