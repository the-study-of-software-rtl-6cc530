`timescale 1ps/10fs
// gate_delay_tdc: the 10 ps "Gate delay TDC".
//
// A 256-stage gated ring (an AND switch and 255 inverters of 10 ps) runs while
// `pulse` is high. A latch chain buffer, transparent while `pulse` is high,
// freezes the ring state when the pulse falls; the TDC decoder turns that
// snapshot into the position in the current ring period (bits [8:0]). A counter
// clocked by the last inverter counts completed ring periods (bits [31:9]); a
// multiplexer in front of it keeps the count unchanged once `pulse` is low, so
// the edges the ring still produces while it relaxes are not counted.
// The result is floor(T / 10 ps) for a pulse of width T (STAGES must be a
// power of two for the bit fields to concatenate).
//
// Timing: `value` is valid from the falling edge of `pulse` until `error_set`
// rises. `error_set` (active high, asynchronous) clears the counter and the
// latches; the next pulse must start after it has fallen.
// Ring length, 10 ps stage, counter mux and output bit split follow the
// document; clearing the latches with `error_set` is this design's reading of
// "keeps the storing information until Error_Set rises".
// The latch chain buffer is intentionally a set of level-sensitive latches.
module gate_delay_tdc
  import sdpll_pkg::*;
#(
  parameter int unsigned STAGES   = 256,
  parameter real         STAGE_PS = 10.0,
  localparam int unsigned POS_W   = $clog2(STAGES)
) (
  input  logic        pulse,
  input  logic        error_set,
  output logic [31:0] value
);

  localparam logic [255:0] REST_W = ring_rest(STAGES);
  localparam logic [STAGES-1:0] REST = REST_W[STAGES-1:0];
  localparam int unsigned CNT_W = 32 - POS_W - 1;

  logic [STAGES-1:0] taps;
  logic [STAGES-1:0] snap;
  logic [CNT_W-1:0]  laps;
  logic              middle;
  logic [POS_W-1:0]  pos;

  tdc_chain #(.STAGES(STAGES), .STAGE_PS(STAGE_PS), .INVERT_FB(1'b0)) u_chain (
    .work (pulse),
    .taps (taps)
  );

  // Latch chain buffer: follows the ring while the pulse is high.
  always_latch begin
    if (error_set)  snap = REST;
    else if (pulse) snap = taps;
  end

  // Ring-period counter, clocked by the last inverter.
  always_ff @(posedge taps[STAGES-1] or posedge error_set) begin
    if (error_set) laps <= '0;
    else           laps <= pulse ? laps + 1'b1 : laps;
  end

  tdc_decoder #(.STAGES(STAGES)) u_dec (
    .snap   (snap),
    .middle (middle),
    .pos    (pos)
  );

  assign value = {laps, middle, pos};

endmodule
