`timescale 1ps/10fs
// tb_opl_pa: self-checking testbench for the one-pulse-lock pulse amplifier.
// For each case error_set is released and a train of input pulses follows.
// Checks: exactly one output pulse per release; a pulse narrower than 2.358 ns
// comes out 2.358 ns wide; a wider pulse keeps its width; a pulse that is
// already high when error_set falls is skipped; error_set forces the output low.
module tb_opl_pa;
  logic input_pulse = 1'b0, error_set = 1'b1;
  logic output_pulse;
  int checks = 0, failures = 0;
  int n_out;
  realtime t_rise, width;

  opl_pa dut (.input_pulse(input_pulse), .error_set(error_set), .output_pulse(output_pulse));

  always @(posedge output_pulse) begin
    n_out++;
    t_rise = $realtime;
  end
  always @(negedge output_pulse) width = $realtime - t_rise;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic train(input real w, input bit start_high);
    error_set = 1'b1;
    input_pulse = start_high;
    #5000;
    n_out = 0; width = 0;
    error_set = 1'b0;
    if (start_high) begin
      #(w);
      input_pulse = 1'b0;
    end
    repeat (3) begin
      #20000 input_pulse = 1'b1;
      #(w) input_pulse = 1'b0;
    end
    #20000;
    check(n_out == 1, $sformatf("one pulse for w=%0f (got %0d)", w, n_out));
    check(width > (w < 2358.0 ? 2357.99 : w - 0.01) && width < (w < 2358.0 ? 2358.01 : w + 0.01),
          $sformatf("width for w=%0f is %0f", w, width));
    error_set = 1'b1;
    #1;
    check(!output_pulse, "error_set forces the output low");
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    train(5.0, 1'b0);
    train(1000.0, 1'b0);
    train(2357.0, 1'b0);
    train(3000.0, 1'b0);
    train(12345.0, 1'b1);
    for (int i = 0; i < 10; i++) train(real'(1 + $urandom % 15000), $urandom % 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
