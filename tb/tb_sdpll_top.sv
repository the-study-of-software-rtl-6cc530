`timescale 1ps/10fs
// tb_sdpll_top: end-to-end test of the software-defined PLL.
//
// A small ORBIS32 model plays the CPU. The PLL program (below) is loaded
// through the load port, then the loop runs against a reference clock:
//   pass 1 (frequency): the TDC measures the high half H of Ref_Clk in ps; the
//           program computes the DCO word 200*H (period in 10 fs steps) and
//           stores it with Infor = {fine=0, phase detect=1, phase lock=0};
//   pass 2 (phase):     the TDC measures the phase error E; the block jump picks
//           the lead block (Ref first: period A - E) or the lag block
//           (Div first: A + E); the word is stored with Infor = 3'b111, so the
//           DCO interface applies it for one DCO period;
//   later passes only read the error (monitoring).
// The test runs several times with different reference periods and phases,
// checks the frequency word against the reference, checks that Div_Clk rising
// edges end up within a few ps of Ref_Clk rising edges, counts the lock time in
// reference cycles, and counts how often each mechanism occurred (loading,
// both input instructions, lead and lag block jumps, every DCO-interface state,
// pulse widening, bus retries). A mechanism that never occurs is a failure.
module tb_sdpll_top;
  import sdpll_pkg::*;

  localparam logic [31:0] INSTR_NOP = 32'h1500_0000;  // l.nop used as padding
  localparam int RUNS = 6;
  localparam int PADS [6] = '{0, 8, 16, 24, 32, 40};

  logic        ref_clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        load = 1'b0;
  logic [31:0] load_instruction = '0;
  logic [4:0]  m_cycle = 5'd31;
  logic [1:0]  n_mode = 2'd0;
  logic        burst_mode = 1'b0;
  logic [15:0] div_value = 16'd1;

  logic        embed_clk;
  logic        iwb_cyc, iwb_stb, iwb_ack, iwb_err, iwb_rty;
  logic [31:0] cpu_instruction;
  logic        dwb_cyc, dwb_stb, dwb_we, dwb_ack, dwb_err, dwb_rty;
  logic [31:0] cpu_address, cpu_data;
  logic        dco_clk, div_clk;
  logic [31:0] ctw;
  logic        dco_mode, detect_mode, tracking_mode;
  logic        error_valid, lead, pass_done;
  logic [31:0] error_value;
  mc_state_t   mc_state;
  dco_state_t  dco_state;
  int          n_exec, n_store;
  logic [31:0] last_r12;

  sdpll_top dut (.*);

  or_cpu_model cpu (
    .clk(embed_clk), .rst_n(rst_n),
    .iwb_cyc(iwb_cyc), .iwb_stb(iwb_stb), .iwb_dat(cpu_instruction), .iwb_ack(iwb_ack),
    .dwb_cyc(dwb_cyc), .dwb_stb(dwb_stb), .dwb_we(dwb_we), .dwb_adr(cpu_address),
    .dwb_dat(cpu_data), .dwb_ack(dwb_ack),
    .n_exec(n_exec), .n_store(n_store), .last_r12(last_r12)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- program assembly ----------------
  function automatic logic [31:0] slli(input int d, a, sh);
    return {6'h2e, 5'(d), 5'(a), 8'h0, 2'b00, 6'(sh)};
  endfunction
  function automatic logic [31:0] add(input int d, a, b);
    return {6'h38, 5'(d), 5'(a), 5'(b), 7'h0, 4'h0};
  endfunction
  function automatic logic [31:0] sub(input int d, a, b);
    return {6'h38, 5'(d), 5'(a), 5'(b), 7'h0, 4'h2};
  endfunction
  function automatic logic [31:0] addi(input int d, a, k);
    return {6'h27, 5'(d), 5'(a), 16'(k)};
  endfunction
  function automatic logic [31:0] sw_infor(input int b, input logic [2:0] infor);
    return {OPC_SW, 5'h0, 5'h0, 5'(b), infor, 8'h04};
  endfunction
  function automatic logic [31:0] jump(input int lag_blk, lead_blk);
    return {OPC_BLOCK_JUMP, 18'h0, 4'(lag_blk), 4'(lead_blk)};
  endfunction

  logic [31:0] prog [256];

  // The frequency word is A/div in 10 fs steps = (200/div)*H. With no divide
  // instruction the factor is built from three shifts: 200 = 128+64+8 for
  // div 1, 25 = 16+8+1 for div 8.
  task automatic build_program(input int div, input int pad);
    int p;
    int s1, s2, s3;
    if (div == 8) begin s1 = 4; s2 = 3; s3 = 0; end
    else          begin s1 = 7; s2 = 6; s3 = 3; end
    for (int i = 0; i < 256; i++) prog[i] = 32'h0;
    // block 0: frequency pass, then the start of the phase pass
    prog[0]  = INSTR_IN_HI;          // r12 = error[31:16] << 16
    prog[1]  = INSTR_IN_LO;          // r12 |= error[15:0]   (H, ps)
    prog[2]  = slli(20, 12, s1);
    prog[3]  = slli(21, 12, s2);
    prog[4]  = slli(22, 12, s3);
    prog[5]  = add(23, 20, 21);
    prog[6]  = add(14, 23, 22);      // r14 = (200/div)*H = DCO period in 10 fs steps
    prog[7]  = addi(6, 12, 0);       // keep H
    prog[8]  = sw_infor(14, 3'b010); // frequency word, switch to phase detection
    // optional l.nop padding delays the end of pass 1 (and so the moment the
    // phase measurement is armed) relative to the new DCO edges
    for (p = 0; p < pad; p++) prog[9 + p] = INSTR_NOP;
    prog[9 + pad]  = 32'h0;          // end of pass 1
    prog[10 + pad] = INSTR_IN_HI;
    prog[11 + pad] = INSTR_IN_LO;    // r12 = E (ps)
    prog[12 + pad] = jump(6, 5);     // lag -> block 6, lead -> block 5
    // block 5: Ref_Clk leads, shorten one period: A - E
    prog[80] = slli(20, 12, 6);
    prog[81] = slli(21, 12, 5);
    prog[82] = slli(22, 12, 2);
    prog[83] = add(23, 20, 21);
    prog[84] = add(15, 23, 22);      // r15 = 100*E
    prog[85] = sub(16, 14, 15);
    prog[86] = sw_infor(16, 3'b111);
    prog[87] = jump(7, 7);
    // block 6: Div_Clk leads, lengthen one period: A + E
    prog[96]  = slli(20, 12, 6);
    prog[97]  = slli(21, 12, 5);
    prog[98]  = slli(22, 12, 2);
    prog[99]  = add(23, 20, 21);
    prog[100] = add(15, 23, 22);
    prog[101] = add(16, 14, 15);
    prog[102] = sw_infor(16, 3'b111);
    prog[103] = jump(7, 7);
    // block 7: monitoring loop, one pass per measurement
    prog[112] = 32'h0;
    prog[113] = INSTR_IN_HI;
    prog[114] = INSTR_IN_LO;
    prog[115] = jump(7, 7);
  endtask

  // ---------------- reference clock ----------------
  real ref_half_ps = 79365.5;
  real ref_phase_ps = 0.0;
  bit  ref_run = 1'b0;
  int  ref_edges = 0;
  realtime t_ref = 0, t_div = 0;

  always begin
    if (!ref_run) @(posedge ref_run);
    #(ref_half_ps) ref_clk = 1'b1;
    ref_edges++;
    #(ref_half_ps) ref_clk = 1'b0;
  end

  always @(posedge ref_clk) t_ref = $realtime;
  always @(posedge div_clk) t_div = $realtime;

  // ---------------- mechanism counters ----------------
  int n_load_cycles = 0, n_patch_hi = 0, n_patch_lo = 0, n_jump_lead = 0, n_jump_lag = 0;
  int n_st_freq = 0, n_st_phase = 0, n_st_trans = 0, n_widened = 0, n_retry = 0, n_passes = 0;

  always @(posedge embed_clk) begin
    if (load && mc_state inside {MC_INIT, MC_LOAD}) n_load_cycles++;
    if (iwb_ack && dut.u_mc.word == INSTR_IN_HI) n_patch_hi++;
    if (iwb_ack && dut.u_mc.word == INSTR_IN_LO) n_patch_lo++;
    if (mc_state == MC_ALGO && dut.u_mc.rd_phase && dut.u_mc.word_jump &&
        dut.u_mc.word[7:4] != dut.u_mc.word[3:0]) begin
      if (dut.u_mc.lead_q) n_jump_lead++; else n_jump_lag++;
    end
    if (iwb_rty) n_retry++;
    if (pass_done) n_passes++;
  end

  always @(posedge dco_clk) begin
    case (dco_state)
      DCO_COARSE_FREQ:  n_st_freq++;
      DCO_COARSE_PHASE: n_st_phase++;
      DCO_COARSE_TRANS: n_st_trans++;
      default: ;
    endcase
  end

  always @(posedge error_valid)
    if (detect_mode && error_value >= 32'd2350 && error_value <= 32'd2365) n_widened++;

  // ---------------- one run ----------------
  task automatic run_once(input int run, input real half_ps, input real phase_ps, input int div,
                                input logic [1:0] nm, input int pad);
    int  start_edge, freq_edge, phase_edge, lock_edge;
    real err;
    int  stores_before;
    logic [31:0] phase_e;
    logic        phase_lead;
    ref_run = 1'b0;
    rst_n = 1'b1;  // a falling edge applies the asynchronous reset
    #1;
    rst_n = 1'b0;
    load = 1'b0;
    ref_half_ps = half_ps;
    div_value = 16'(div);
    n_mode = nm;
    build_program(div, pad);
    #(20000.0);
    rst_n = 1'b1;
    #(phase_ps);
    ref_run = 1'b1;
    // load the program, one word per embed_clk cycle
    @(negedge embed_clk);
    load = 1'b1;
    for (int i = 0; i < 256; i++) begin
      load_instruction = prog[i];
      @(negedge embed_clk);
    end
    load = 1'b0;
    start_edge = ref_edges;
    @(posedge ref_clk);
    @(negedge embed_clk);
    check(mc_state == MC_TRANS, $sformatf("run %0d: controller not in TRANS after loading", run));
    check(dut.u_mem.mem[86] == prog[86] && dut.u_mem.mem[115] == prog[115],
          $sformatf("run %0d: program not loaded", run));
    stores_before = n_store;
    // wait for the frequency word
    wait (n_store == stores_before + 1);
    freq_edge = ref_edges;
    @(posedge dco_clk); @(posedge dco_clk); @(posedge dco_clk); @(posedge dco_clk);
    check(ctw == 32'(longint'($floor(half_ps)) * 200 / div),
          $sformatf("run %0d: frequency word %0d, expected %0d", run, ctw,
                    longint'($floor(half_ps)) * 200 / div));
    check(detect_mode == 1'b1 && dco_mode == 1'b0, $sformatf("run %0d: modes after frequency pass", run));
    // wait for the phase word
    wait (n_store == stores_before + 2);
    phase_edge = ref_edges;
    phase_e = last_r12;
    phase_lead = dut.u_mc.lead_q;
    check(dco_mode && detect_mode && tracking_mode, $sformatf("run %0d: modes after phase pass", run));
    // watch for lock: Div_Clk and Ref_Clk rising edges within 20 ps
    lock_edge = -1;
    for (int k = 0; k < 8; k++) begin
      @(posedge ref_clk);
      #(1000.0);
      err = (t_div > t_ref) ? t_div - t_ref : t_ref - t_div;
      if (err < 20.0 && lock_edge < 0) lock_edge = ref_edges;
    end
    err = (t_div > t_ref) ? t_div - t_ref : t_ref - t_div;
    check(err < 40.0, $sformatf("run %0d: final phase error %0.2f ps", run, err));
    check(lock_edge >= 0, $sformatf("run %0d: never locked", run));
    $display("run %0d: div %0d, n_mode %0d, phase block %s (E %0d ps), ref %0.1f ps, freq word after %0d ref cycles, phase word after %0d, locked after %0d, final |error| %0.2f ps",
             run, div, nm, phase_lead ? "lead" : "lag", phase_e, 2.0 * half_ps, freq_edge - start_edge, phase_edge - start_edge,
             lock_edge - start_edge, err);
    // Without padding the loop must lock within 12 reference cycles; padded
    // programs spend extra cycles on purpose.
    check(lock_edge >= 0 && lock_edge - start_edge <= ((pad == 0) ? 12 : 40),
          $sformatf("run %0d: lock took too many reference cycles", run));
  endtask

  initial begin
    #(200.0 * 1000.0 * 1000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_once(0, 79365.5, 0.0, 1, 0, PADS[0]);
    run_once(1, 79365.5, 30000.0, 8, 1, PADS[1]);
    run_once(2, 61234.5, 12345.0, 1, 2, PADS[2]);
    run_once(3, 70000.5, 50000.0, 1, 3, PADS[3]);
    run_once(4, 100000.5, 50000.0, 1, 3, PADS[4]);
    run_once(5, 250000.5, 7000.0, 1, 0, PADS[5]);
    check(n_load_cycles >= 256 * RUNS, "loading");
    check(n_patch_hi > 0 && n_patch_lo > 0, "input-instruction patching");
    check(n_jump_lead > 0, "lead block jump never taken");
    check(n_jump_lag > 0, "lag block jump never taken");
    check(n_st_freq > 0 && n_st_phase > 0 && n_st_trans > 0, "DCO interface states");
    check(n_widened > 0, "pulse widening never happened");
    check(n_retry > 0, "instruction retry never happened");
    $display("mechanisms: load %0d, patch hi/lo %0d/%0d, jump lead/lag %0d/%0d, DCO freq/phase/trans %0d/%0d/%0d, widened %0d, retries %0d, passes %0d",
             n_load_cycles, n_patch_hi, n_patch_lo, n_jump_lead, n_jump_lag,
             n_st_freq, n_st_phase, n_st_trans, n_widened, n_retry, n_passes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
