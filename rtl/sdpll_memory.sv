`timescale 1ps/10fs
// sdpll_memory: the 256 x 32-bit program memory.
//
// Single-port synchronous RAM. With chip enable `ce` high, `we` writes `wdata`
// to `addr` at the rising clock edge, and `oe` reads `addr` so that `rdata`
// holds the word from the next edge on (one cycle read latency; `rdata` keeps
// its value otherwise). The size follows the document; the polarity of the
// controls and the read latency are this design's choice.
module sdpll_memory #(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned WIDTH  = 32,
  localparam int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              ce,
  input  logic              oe,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ce && we) mem[addr] <= wdata;
    if (ce && oe) rdata <= mem[addr];
  end

endmodule
