`timescale 1ps/10fs
// freq_divider: divides the DCO clock by `div_value` to give Div_Clk.
//
// A counter driven by the DCO clock counts 0 .. div_value-1; the divided clock
// is high for the first half of the count (floor(div_value/2) DCO cycles), so
// its rising edge coincides with a DCO rising edge. A `div_value` of 0 or 1
// passes the DCO clock through unchanged. Reset (`rst_n`, asynchronous, active
// low) restarts the count. The counter core follows the document; the
// duty-cycle rule and the bypass for 1 are this design's choice.
module freq_divider #(
  parameter int unsigned DIV_W = 16
) (
  input  logic             dco_clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] div_value,
  output logic             div_clk
);

  logic [DIV_W-1:0] cnt;
  logic             div_q;
  logic             bypass;

  assign bypass = (div_value <= DIV_W'(1));

  always_ff @(posedge dco_clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      div_q <= 1'b0;
    end else if (bypass) begin
      cnt   <= '0;
      div_q <= 1'b0;
    end else begin
      cnt   <= (cnt >= div_value - 1'b1) ? '0 : cnt + 1'b1;
      // High while the next count is in the first half of the period.
      div_q <= ((cnt >= div_value - 1'b1) ? '0 : cnt + 1'b1) < (div_value >> 1);
    end
  end

  assign div_clk = bypass ? dco_clk : div_q;

endmodule
