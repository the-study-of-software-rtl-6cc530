`timescale 1ps/10fs
// tb_dco_interface: self-checking testbench for the DCO interface.
// CPU clock 10 MHz, DCO clock about 333 MHz (unrelated). Checks the bus
// handshake (one ack per write, err for reads, rty never), that a frequency
// word written with dco_mode = 0 reaches ctw and stays there, and that a phase
// word written with dco_mode = 1 walks the FSM COARSE_FREQ -> COARSE_PHASE ->
// COARSE_TRANS -> COARSE_FREQ with ctw equal to the phase word for exactly one
// DCO cycle before the frequency word returns.
module tb_dco_interface;
  import sdpll_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset
  logic        dwb_cyc = 1'b0, dwb_stb = 1'b0, dwb_we = 1'b0;
  logic [31:0] cpu_data = '0;
  logic        dwb_ack, dwb_err, dwb_rty;
  logic        dco_mode = 1'b0;
  logic        dco_clk = 1'b0;
  logic [31:0] ctw;
  dco_state_t  dco_state;
  int checks = 0, failures = 0;
  int n_ack, n_phase_cycles, n_trans;
  logic [31:0] phase_seen;

  dco_interface dut (.*);

  always #50000 clk = ~clk;
  always #1501.5 dco_clk = ~dco_clk;

  always @(posedge clk) if (dwb_ack) n_ack++;
  always @(posedge dco_clk) begin
    if (dco_state == DCO_COARSE_PHASE) begin
      n_phase_cycles++;
      phase_seen = ctw;
    end
    if (dco_state == DCO_COARSE_TRANS) n_trans++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic bus_write(input logic [31:0] d);
    @(negedge clk);
    dwb_cyc = 1'b1; dwb_stb = 1'b1; dwb_we = 1'b1; cpu_data = d;
    do @(posedge clk); while (!dwb_ack);
    @(negedge clk);
    dwb_cyc = 1'b0; dwb_stb = 1'b0; dwb_we = 1'b0;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] f;
    #120000 rst_n = 1'b1;
    check(ctw == 0 && dco_state == DCO_COARSE_FREQ, "reset values");
    for (int i = 0; i < 5; i++) begin
      f = 32'd1_000_000 + $urandom % 1_000_000;
      n_ack = 0;
      dco_mode = 1'b0;
      bus_write(f);
      repeat (3) @(posedge clk);
      check(n_ack == 1, "one ack per write");
      check(ctw == f && dco_state == DCO_COARSE_FREQ, $sformatf("frequency word %0d reached ctw", f));

      n_phase_cycles = 0; n_trans = 0;
      dco_mode = 1'b1;
      bus_write(f - 32'd5000);
      repeat (3) @(posedge clk);
      check(n_phase_cycles == 1, $sformatf("one COARSE_PHASE cycle (%0d)", n_phase_cycles));
      check(phase_seen == f - 32'd5000, "phase word applied during COARSE_PHASE");
      check(n_trans == 1, "COARSE_TRANS visited once");
      check(ctw == f && dco_state == DCO_COARSE_FREQ, "frequency word restored");
    end
    @(negedge clk);
    dwb_cyc = 1'b1; dwb_stb = 1'b1; dwb_we = 1'b0;
    @(posedge clk); #1;
    check(dwb_err && !dwb_ack, "read answered with err");
    @(negedge clk);
    dwb_cyc = 1'b0; dwb_stb = 1'b0;
    check(!dwb_rty, "rty never raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
