`timescale 1ps/10fs
// tb_memory_controller: self-checking testbench for the memory controller FSM.
// The controller is connected to a program memory. A short program is loaded
// through the load port, then two algorithm passes are run, the first with the
// reference leading and the second lagging. A simple bus master keeps an
// instruction request open and records every acknowledged word. Checks:
// state sequence Initial -> Load -> Transition -> Algorithm -> Transition,
// loaded memory contents, error_set held during loading, error-bus responses
// (err while loading, rty while waiting), the two input instructions patched
// with the halves of the error value, the block jump following lead/lag, and
// the pass ending on a zero word.
module tb_memory_controller;
  import sdpll_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset
  logic        load = 1'b0;
  logic [31:0] load_instruction = '0;
  logic        error_set, error_valid = 1'b0, lead = 1'b0, lag = 1'b0;
  logic [31:0] error_value = '0;
  logic        mem_we, mem_oe, mem_ce;
  logic [31:0] to_mem_instruction, from_mem_instruction;
  logic [7:0]  to_mem_address;
  logic        iwb_cyc = 1'b0, iwb_stb = 1'b0;
  logic [31:0] cpu_instruction;
  logic        iwb_ack, iwb_err, iwb_rty;
  mc_state_t   state;
  logic        pass_done;
  int checks = 0, failures = 0;

  logic [31:0] prog [40];
  logic [31:0] seen [$];
  int          n_err, n_rty, n_done;

  memory_controller dut (.*);
  sdpll_memory u_mem (.clk(clk), .ce(mem_ce), .oe(mem_oe), .we(mem_we), .addr(to_mem_address),
                      .wdata(to_mem_instruction), .rdata(from_mem_instruction));

  always #5000 clk = ~clk;

  // Error detector stand-in: a result appears a few clocks after error_set falls.
  int wait_cnt;
  always @(posedge clk) begin
    if (error_set) begin
      error_valid <= 1'b0;
      wait_cnt    <= 0;
    end else begin
      wait_cnt <= wait_cnt + 1;
      if (wait_cnt == 3) error_valid <= 1'b1;
    end
  end

  always @(posedge clk) begin
    if (iwb_ack) seen.push_back(cpu_instruction);
    if (iwb_err) n_err++;
    if (iwb_rty) n_rty++;
    if (pass_done) n_done++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  function automatic logic [31:0] jump(input logic [3:0] lag_blk, input logic [3:0] lead_blk);
    return {OPC_BLOCK_JUMP, 18'h0, lag_blk, lead_blk};
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 40; i++) prog[i] = 32'h0;
    prog[0]  = 32'h1560_000a;
    prog[1]  = INSTR_IN_HI;
    prog[2]  = INSTR_IN_LO;
    prog[3]  = jump(4'd2, 4'd1);
    prog[16] = 32'h1560_0010;
    prog[17] = 32'h0;
    prog[18] = jump(4'd2, 4'd1);
    prog[32] = 32'h1560_0020;
    prog[33] = 32'h0;

    #20000 rst_n = 1'b1;
    @(negedge clk);
    check(state == MC_INIT, "reset state is Initial");
    iwb_cyc = 1'b1; iwb_stb = 1'b1;
    for (int i = 0; i < 40; i++) begin
      load = 1'b1;
      load_instruction = prog[i];
      @(negedge clk);
      if (i == 1) check(state == MC_LOAD, "Load state while loading");
      check(error_set, "error_set held while loading");
    end
    load = 1'b0;
    check(n_err > 30, "instruction requests refused with err while loading");
    @(negedge clk);
    check(state == MC_TRANS, "Transition state after loading");
    for (int i = 0; i < 40; i++) check(u_mem.mem[i] == prog[i], $sformatf("memory word %0d", i));

    // Pass 1: reference leads.
    error_value = 32'h1234_5678;
    lead = 1'b1; lag = 1'b0;
    n_rty = 0;
    wait (state == MC_ALGO);
    check(n_rty > 0, "requests answered with rty while waiting for the error");
    wait (pass_done);
    @(posedge clk);
    #1;
    check(state == MC_TRANS, "back in Transition after a zero word");
    check(seen.size() == 4, $sformatf("pass 1 word count %0d", seen.size()));
    if (seen.size() == 4) begin
      check(seen[0] == prog[0], "plain word passed through");
      check(seen[1] == 32'h1980_1234, "l.movhi patched with error[31:16]");
      check(seen[2] == 32'ha98c_5678, "l.ori patched with error[15:0]");
      check(seen[3] == prog[16], "lead jump to block 1");
    end

    // Pass 2: reference lags.
    seen.delete();
    error_value = 32'h0000_00ff;
    lead = 1'b0; lag = 1'b1;
    wait (pass_done);
    @(posedge clk);
    #1;
    check(seen.size() == 1 && seen[0] == prog[32], "lag jump to block 2");
    check(n_done == 2, "two passes completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
