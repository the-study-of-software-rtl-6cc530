`timescale 1ps/10fs
// tdc_decoder: finds how far the transition front has travelled in a latched
// snapshot of a gated inverter ring.
//
// The snapshot is compared with the ring's rest pattern. During the first pass
// of the front the changed stages form a run of ones from stage 0; during the
// second pass the ring changes back, so the run is of zeros. `middle` is the
// changed state of the last stage and tells the two passes apart, and `pos` is
// the length of the run, found with a priority encoder. Together
// {middle, pos} count the stage delays since the start of the current ring period.
// For the 256-stage ring this is TDC_OUT[8] and TDC_OUT[7:0] of the document.
// The document splits the search into odd- and even-stage priority encoders
// whose results are inverted and offset; this module does the same search on
// the rest-normalised snapshot in one encoder, which gives the same number.
// Purely combinational.
module tdc_decoder
  import sdpll_pkg::*;
#(
  parameter int unsigned STAGES = 256,
  localparam int unsigned POS_W = $clog2(STAGES)
) (
  input  logic [STAGES-1:0] snap,
  output logic              middle,
  output logic [POS_W-1:0]  pos
);

  localparam logic [255:0] REST_W = ring_rest(STAGES);
  localparam logic [STAGES-1:0] REST = REST_W[STAGES-1:0];

  logic [STAGES-1:0] changed;
  logic [STAGES-1:0] run;

  assign changed = snap ^ REST;
  assign middle  = changed[STAGES-1];
  assign run     = middle ? ~changed : changed;

  // Index of the first stage that is not part of the run.
  always_comb begin
    pos = '0;
    for (int i = STAGES - 1; i >= 0; i--) begin
      if (!run[i]) pos = POS_W'(i);
    end
  end

endmodule
