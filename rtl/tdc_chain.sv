`timescale 1ps/10fs
// tdc_chain: behavioural model of a gated inverter delay ring (the "TDC CHAIN").
// This is a behavioural model, not synthesizable logic: the real part is a row of
// standard-cell inverters whose propagation delay sets the TDC resolution.
//
// Structure (as in the document): an AND-type switch drives the first of
// STAGES-1 inverters and the last inverter feeds back into the switch. While
// `work` is high a transition front runs around the ring, one stage per
// STAGE_PS picoseconds; while `work` is low the ring relaxes to its rest pattern
// (stage 0 low, odd stages high). `taps[i]` is the output of stage i
// (stage 0 = switch).
//
// For the main 256-stage ring (255 inverters) the loop already has an odd number
// of inversions. The 21-stage ring of a sub-TDC (20 inverters plus the switch)
// has an even number, so INVERT_FB inverts the fed-back signal so that it keeps
// running; that inversion is this model's own choice.
//
// Timing model: all stages advance together on a STAGE_PS grid that starts at
// the rising edge of `work`. After `work` has been high for T ps exactly
// floor(T/STAGE_PS) stages have changed, which is what a uniform delay line gives.
module tdc_chain
  import sdpll_pkg::*;
#(
  parameter int unsigned STAGES    = 256,
  parameter real         STAGE_PS  = 10.0,
  parameter bit          INVERT_FB = 1'b0
) (
  input  logic              work,
  output logic [STAGES-1:0] taps
);

  localparam logic [255:0] REST_W = ring_rest(STAGES);
  localparam logic [STAGES-1:0] REST = REST_W[STAGES-1:0];

  logic [STAGES-1:0] state;
  logic              fb;

  initial state = REST;

  assign taps = state;
  assign fb   = INVERT_FB ? ~state[STAGES-1] : state[STAGES-1];

  always begin
    if (!work && state == REST) begin
      @(posedge work);
    end
    #(STAGE_PS);
    state = {~state[STAGES-2:0], work & fb};
  end

endmodule
