`timescale 1ps/10fs
// tb_error_detector: self-checking testbench for the error detector.
// A reference clock and a DCO clock of chosen period and phase offset drive the
// detector. After each release of error_set the testbench notes the first
// rising edge of Ref_Clk and of Div_Clk that follow, and from them predicts the
// result: in frequency detection (detect_mode = 0) the high time of Ref_Clk; in
// phase detection (detect_mode = 1) the time from the earlier to the later
// edge, widened to 2.358 ns when shorter, with lead set when Ref_Clk came
// first. The measured error_value must match within 1 ps. Division values 1
// and 4 are used.
module tb_error_detector;
  logic        ref_clk = 1'b0, dco_clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset
  logic [15:0] div_value = 16'd1;
  logic        detect_mode = 1'b0, error_set = 1'b0;
  logic        div_clk, error_valid, lead, lag;
  logic [31:0] error_value;
  int checks = 0, failures = 0;
  int n_lead, n_lag;

  real     ref_half = 40000.25;
  real     dco_half = 40000.25;
  real     offset   = 0.0;
  realtime t_release, t_ref, t_div;
  bit      got_ref, got_div;

  error_detector dut (.*);

  initial forever begin
    ref_clk = 1'b1;
    #(ref_half) ref_clk = 1'b0;
    #(ref_half);
  end
  initial begin
    #(offset + 1000.0);
    forever begin
      dco_clk = 1'b1;
      #(dco_half) dco_clk = 1'b0;
      #(dco_half);
    end
  end

  always @(posedge ref_clk) if (!error_set && !got_ref) begin
    got_ref = 1'b1;
    t_ref = $realtime;
  end
  always @(posedge div_clk) if (!error_set && !got_div) begin
    got_div = 1'b1;
    t_div = $realtime;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic measure(input bit mode, input real release_ps);
    real want;
    error_set = 1'b1;
    detect_mode = mode;
    #(release_ps);
    got_ref = 1'b0;
    got_div = 1'b0;
    error_set = 1'b0;
    wait (error_valid);
    #100;
    if (!mode) begin
      want = ref_half;
    end else begin
      want = (t_ref <= t_div) ? t_div - t_ref : t_ref - t_div;
      if (want < 2358.0) want = 2358.0;
      check(lead == (t_ref <= t_div) && lag == !lead,
            $sformatf("lead/lag: ref %0t div %0t lead %b lag %b", t_ref, t_div, lead, lag));
      if (lead) n_lead++;
      else      n_lag++;
    end
    check(real'(error_value) > want - 1.0 && real'(error_value) <= want + 0.01,
          $sformatf("mode %0d value %0d want %0f", mode, error_value, want));
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000 rst_n = 1'b1;
    // div = 1, DCO 3 ns behind the reference.
    offset = 3000.0;
    for (int i = 0; i < 12; i++) measure(i % 3 == 0 ? 1'b0 : 1'b1, real'(1000 + $urandom % 200000));
    // div = 4: the DCO runs four times faster.
    div_value = 16'd4;
    dco_half = 10000.0625;
    for (int i = 0; i < 12; i++) measure(i % 3 == 0 ? 1'b0 : 1'b1, real'(1000 + $urandom % 200000));
    // A different reference period and a DCO slightly slower than the reference.
    div_value = 16'd1;
    ref_half = 61234.5;
    dco_half = 61240.0;
    for (int i = 0; i < 12; i++) measure(i % 3 == 0 ? 1'b0 : 1'b1, real'(1000 + $urandom % 300000));
    check(n_lead > 0 && n_lag > 0, $sformatf("both lead (%0d) and lag (%0d) seen", n_lead, n_lag));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
