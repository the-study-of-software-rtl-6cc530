`timescale 1ps/10fs
// state_controller: decodes the CPU's output message into the mode signals of
// the other blocks.
//
// The PLL program reports with a store instruction whose address carries the
// "Infor" field in bits [10:8] and 0x04 in bits [7:0]. On every acknowledged
// Wishbone write (`dwb_cyc`, `dwb_stb`, `dwb_we`, `dwb_ack` all high) with
// address bits [7:0] equal to 0x04, bits [10:8] are registered:
//   [0] dco_mode      0 frequency lock operation, 1 phase lock operation
//   [1] detect_mode   0 frequency detection,      1 phase error detection
//   [2] tracking_mode 0 coarse tracking,          1 fine tracking
// The outputs change at the clock edge that completes the store. Reset
// (asynchronous, active low) selects frequency detection and frequency lock.
// The bit assignment follows the document; checking bits [7:0] and the reset
// values are this design's choices.
module state_controller
  import sdpll_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        dwb_cyc,
  input  logic        dwb_stb,
  input  logic        dwb_we,
  input  logic        dwb_ack,
  input  logic [31:0] cpu_address,
  output logic        dco_mode,
  output logic        detect_mode,
  output logic        tracking_mode
);

  infor_t infor_q;
  logic   wr;

  assign wr = dwb_cyc && dwb_stb && dwb_we && dwb_ack && (cpu_address[7:0] == 8'h04);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  infor_q <= '0;
    else if (wr) infor_q <= infor_t'(cpu_address[10:8]);
  end

  assign dco_mode      = infor_q.dco_mode;
  assign detect_mode   = infor_q.detect_mode;
  assign tracking_mode = infor_q.tracking_mode;

endmodule
