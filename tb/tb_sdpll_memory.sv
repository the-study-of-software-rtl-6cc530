`timescale 1ps/10fs
// tb_sdpll_memory: self-checking testbench for the 256 x 32 program memory.
// Writes a random word to every address, then reads all addresses back in a
// shuffled order and checks the data one clock after the read. Also checks
// that a write without ce, and a read without oe, change nothing.
module tb_sdpll_memory;
  logic        clk = 1'b0;
  logic        ce = 1'b0, oe = 1'b0, we = 1'b0;
  logic [7:0]  addr = '0;
  logic [31:0] wdata = '0;
  logic [31:0] rdata;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  sdpll_memory dut (.clk(clk), .ce(ce), .oe(oe), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5000 clk = ~clk;

  task automatic wr(input logic [7:0] a, input logic [31:0] d, input logic en);
    @(negedge clk);
    ce = en; we = 1'b1; oe = 1'b0; addr = a; wdata = d;
    @(negedge clk);
    ce = 1'b0; we = 1'b0;
  endtask

  task automatic rd_check(input logic [7:0] a);
    @(negedge clk);
    ce = 1'b1; oe = 1'b1; we = 1'b0; addr = a;
    @(negedge clk);
    ce = 1'b0; oe = 1'b0;
    checks++;
    if (rdata != model[a]) begin
      failures++;
      $display("FAIL addr=%0d got %h want %h", a, rdata, model[a]);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] held;
    for (int a = 0; a < 256; a++) begin
      model[a] = $urandom;
      wr(8'(a), model[a], 1'b1);
    end
    for (int i = 0; i < 256; i++) rd_check(8'((i * 97 + 13) % 256));
    wr(8'd5, ~model[5], 1'b0);
    rd_check(8'd5);
    held = rdata;
    @(negedge clk);
    ce = 1'b1; oe = 1'b0; addr = 8'd6;
    @(negedge clk);
    ce = 1'b0;
    checks++;
    if (rdata != held) begin
      failures++;
      $display("FAIL read without oe changed rdata");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
