`timescale 1ps/10fs
// tb_diff_delay_tdc: self-checking testbench for the differential delay TDC.
// Pulses of width T (integer ps plus 0.5 ps, at least the 2.358 ns minimum)
// must give the picosecond digit T mod 10. Every digit is covered, then random
// widths.
module tb_diff_delay_tdc;
  logic       pulse = 1'b0, error_set = 1'b1;
  logic [3:0] value;
  int checks = 0, failures = 0;

  diff_delay_tdc dut (.pulse(pulse), .error_set(error_set), .value(value));

  task automatic measure(input int unsigned t);
    error_set = 1'b1;
    #1000 error_set = 1'b0;
    #1000 pulse = 1'b1;
    #(real'(t) + 0.5) pulse = 1'b0;
    #300;
    checks++;
    if (value != 4'(t % 10)) begin
      failures++;
      $display("FAIL T=%0d digit=%0d", t, value);
    end
  endtask

  initial begin
    #500000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned t = 2358; t < 2420; t++) measure(t);
    for (int i = 0; i < 30; i++) measure(2358 + $urandom % 200000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
