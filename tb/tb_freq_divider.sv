`timescale 1ps/10fs
// tb_freq_divider: self-checking testbench for the frequency divider.
// Runs the DCO clock at 1 GHz and, for several division values, counts the
// rising edges of div_clk over 840 DCO cycles (840 is a multiple of every value
// used) and measures the high time of one output period. Values 0 and 1 must
// pass the DCO clock through unchanged.
module tb_freq_divider;
  logic        dco_clk = 1'b0;
  logic        rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset
  logic [15:0] div_value = 16'd1;
  logic        div_clk;
  int checks = 0, failures = 0;
  int edges;
  realtime t_rise, t_high;

  freq_divider dut (.dco_clk(dco_clk), .rst_n(rst_n), .div_value(div_value), .div_clk(div_clk));

  always #500 dco_clk = ~dco_clk;
  always @(posedge div_clk) begin
    edges++;
    t_rise = $realtime;
  end
  always @(negedge div_clk) t_high = $realtime - t_rise;

  task automatic run(input int unsigned d);
    int unsigned eff;
    eff = (d <= 1) ? 1 : d;
    div_value = 16'(d);
    repeat (2 * eff + 2) @(posedge dco_clk);
    #1;
    edges = 0;
    repeat (840) @(posedge dco_clk);
    #1;
    checks++;
    if (edges != 840 / eff) begin
      failures++;
      $display("FAIL div=%0d edges=%0d", d, edges);
    end
    checks++;
    if (t_high != realtime'(1000 * (eff / 2 == 0 ? 0.5 : eff / 2))) begin
      failures++;
      $display("FAIL div=%0d high=%0t", d, t_high);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2200 rst_n = 1'b1;
    run(1); run(2); run(3); run(4); run(5); run(7); run(8); run(0); run(12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
