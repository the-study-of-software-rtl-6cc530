`timescale 1ps/10fs
// phase_detector: turns the time between the rising edges of Ref_Clk and
// Div_Clk into a pulse and tells which clock leads.
//
// Two edge-triggered flip-flops are set by the rising edges of the two clocks
// and both are cleared as soon as both are set, as in a classic phase-frequency
// detector. `phase_error` (their OR) is therefore high from the earlier rising
// edge to the later one. At every Ref_Clk rising edge `lead` records whether
// Ref_Clk came first (the Div_Clk flip-flop was not yet set) and `lag` the
// opposite. Reset is asynchronous, active low.
// `clear` (active high, driven by Error_Set) also holds both flip-flops clear, so
// that after a measurement is armed the pairing of edges starts afresh: the
// first rising edge after `clear` falls opens the pulse and the other clock's
// next rising edge closes it. Without this, a free-running detector keeps
// whatever pairing it started with.
// The document gives only the function; this circuit and the clear input are
// this design's choices.
// The clear path is an intentional asynchronous feedback from the two
// flip-flops to their own resets.
module phase_detector (
  input  logic ref_clk,
  input  logic div_clk,
  input  logic rst_n,
  input  logic clear,
  output logic phase_error,
  output logic lead,
  output logic lag
);

  logic up, dn, clr, lag_q;

  assign clr = !rst_n || clear || (up && dn);

  // Reset also has an edge of its own here, so the flip-flops are cleared
  // even if both start set (clr would then already be high, with no edge).
  always_ff @(posedge ref_clk or posedge clr or negedge rst_n) begin
    if (!rst_n || clr) up <= 1'b0;
    else     up <= 1'b1;
  end

  always_ff @(posedge div_clk or posedge clr or negedge rst_n) begin
    if (!rst_n || clr) dn <= 1'b0;
    else     dn <= 1'b1;
  end

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) lag_q <= 1'b0;
    else        lag_q <= dn;
  end

  assign phase_error = up | dn;
  assign lag         = lag_q;
  assign lead        = !lag_q;

endmodule
