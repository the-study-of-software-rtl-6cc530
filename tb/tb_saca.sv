`timescale 1ps/10fs
// tb_saca: self-checking testbench for the SACA burst clock model.
// For every N_MODE and several M_CYCLE values it counts the embed_clk rising
// edges after each reference rising edge, measures the clock period, and
// checks that the clock idles high between bursts. With burst_mode or
// initial_signal high the clock must keep running.
module tb_saca;
  logic       ref_clk = 1'b0, initial_signal = 1'b0, burst_mode = 1'b0;
  logic [4:0] m_cycle = 5'd4;
  logic [1:0] n_mode = 2'd0;
  logic       embed_clk;
  int checks = 0, failures = 0;
  int n_rise;
  realtime t_last, period;

  localparam real HALF [4] = '{1901.0, 3731.0, 5556.0, 7463.0};

  saca dut (.*);

  always @(posedge embed_clk) begin
    n_rise++;
    period = $realtime - t_last;
    t_last = $realtime;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // One reference period of 1 us; the burst must finish inside it. A first
  // reference period after changing the controls is not measured, because a
  // larger M_CYCLE restarts a stopped counter at once.
  task automatic burst(input int m, input int nm);
    m_cycle = 5'(m);
    n_mode = 2'(nm);
    ref_clk = 1'b1;
    #500000 ref_clk = 1'b0;
    #500000;
    n_rise = 0;
    ref_clk = 1'b1;
    #500000 ref_clk = 1'b0;
    #499000;
    check(n_rise == m, $sformatf("mode %0d: %0d cycles for M=%0d", nm, n_rise, m));
    if (m > 1) check(period > 2.0 * HALF[nm] - 0.01 && period < 2.0 * HALF[nm] + 0.01,
                     $sformatf("mode %0d period %0f", nm, period));
    check(embed_clk, "clock idles high");
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    for (int nm = 0; nm < 4; nm++) begin
      burst(1, nm); burst(5, nm); burst(20, nm); burst(31, nm);
    end
    burst(0, 0);
    burst_mode = 1'b1;
    #1000 n_rise = 0;
    #100000;
    check(n_rise > 10, "burst_mode keeps the clock running");
    burst_mode = 1'b0;
    initial_signal = 1'b1;
    #1000 n_rise = 0;
    #100000;
    check(n_rise > 10, "initial_signal keeps the clock running");
    initial_signal = 1'b0;
    #20000 n_rise = 0;
    #100000;
    check(n_rise == 0 && embed_clk, "clock stops when both are released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
