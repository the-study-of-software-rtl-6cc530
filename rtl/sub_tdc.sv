`timescale 1ps/10fs
// sub_tdc: one EVEN (ESTDC) or ODD (OSTDC) sub-TDC of the differential delay TDC.
//
// Like the gate-delay TDC, but the ring has only 21 stages (a switch and twenty
// 10 ps inverters) and its start and latch are driven by different pulses: the
// ring is started by the pulse delayed by k*11 ps (`work_pulse`) while the latch
// chain buffer is held open by the undelayed pulse (`latch_pulse`). The latched
// front position is therefore floor((T - 11k)/10) modulo 21 for a pulse of width
// T: the "diminished pulse" of the document. An odd sub-TDC receives an inverted
// delayed pulse and its switch input inverts it back (ODD = 1).
// `error_set` (active high, asynchronous) clears the latches.
// The modulo-21 range is this design's reading of the 20-inverter chain
// together with the differential decoder's "2 or 19" comparison.
// The latch chain buffer is intentionally a set of level-sensitive latches.
module sub_tdc
  import sdpll_pkg::*;
#(
  parameter bit          ODD      = 1'b0,
  parameter int unsigned STAGES   = 21,
  parameter real         STAGE_PS = 10.0,
  localparam int unsigned POS_W   = $clog2(STAGES)
) (
  input  logic             work_pulse,
  input  logic             latch_pulse,
  input  logic             error_set,
  output logic [POS_W-1:0] value
);

  localparam logic [255:0] REST_W = ring_rest(STAGES);
  localparam logic [STAGES-1:0] REST = REST_W[STAGES-1:0];

  logic              work;
  logic [STAGES-1:0] taps;
  logic [STAGES-1:0] snap;
  logic              middle_unused;

  assign work = ODD ? ~work_pulse : work_pulse;

  tdc_chain #(.STAGES(STAGES), .STAGE_PS(STAGE_PS), .INVERT_FB(1'b1)) u_chain (
    .work (work),
    .taps (taps)
  );

  always_latch begin
    if (error_set)        snap = REST;
    else if (latch_pulse) snap = taps;
  end

  tdc_decoder #(.STAGES(STAGES)) u_dec (
    .snap   (snap),
    .middle (middle_unused),
    .pos    (value)
  );

endmodule
