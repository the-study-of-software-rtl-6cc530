`timescale 1ps/10fs
// tb_state_controller: self-checking testbench for the state controller.
// Issues data-bus writes with every Infor value in address bits [10:8] and
// checks that the three mode outputs follow after an acknowledged write to
// offset 0x04. Writes that are not acknowledged, are reads, or go to another
// offset must leave the modes unchanged.
module tb_state_controller;
  logic        clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset
  logic        dwb_cyc = 1'b0, dwb_stb = 1'b0, dwb_we = 1'b0, dwb_ack = 1'b0;
  logic [31:0] cpu_address = '0;
  logic        dco_mode, detect_mode, tracking_mode;
  int checks = 0, failures = 0;

  state_controller dut (.*);

  always #5000 clk = ~clk;

  task automatic access(input logic [2:0] infor, input logic [7:0] off, input logic we, input logic ack);
    @(negedge clk);
    dwb_cyc = 1'b1; dwb_stb = 1'b1; dwb_we = we; dwb_ack = ack;
    cpu_address = {$urandom, 11'h0} | {21'h0, infor, off};
    @(negedge clk);
    dwb_cyc = 1'b0; dwb_stb = 1'b0; dwb_we = 1'b0; dwb_ack = 1'b0;
  endtask

  task automatic expect_modes(input logic [2:0] want, input string msg);
    checks++;
    if ({tracking_mode, detect_mode, dco_mode} != want) begin
      failures++;
      $display("FAIL %s: got %b want %b", msg, {tracking_mode, detect_mode, dco_mode}, want);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12000 rst_n = 1'b1;
    expect_modes(3'b000, "reset");
    for (int i = 0; i < 8; i++) begin
      access(3'(i), 8'h04, 1'b1, 1'b1);
      expect_modes(3'(i), $sformatf("write infor %0d", i));
      access(3'(~i), 8'h04, 1'b1, 1'b0);
      expect_modes(3'(i), "write without ack ignored");
      access(3'(~i), 8'h08, 1'b1, 1'b1);
      expect_modes(3'(i), "other offset ignored");
      access(3'(~i), 8'h04, 1'b0, 1'b1);
      expect_modes(3'(i), "read ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
