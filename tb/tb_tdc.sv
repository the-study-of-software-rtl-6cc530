`timescale 1ps/10fs
// tb_tdc: self-checking testbench for the 1 ps TDC.
// Applies pulses of known width (an integer number of picoseconds plus 0.5 ps,
// so no edge coincides with a 10 ps or 11 ps stage boundary) and checks that
// TDC_OUT equals the integer width, that error_valid rises at the pulse's
// falling edge and that error_set clears both. Widths cover the document's
// minimum pulse (2.358 ns), every picosecond digit and several ring laps.
module tb_tdc;
  logic        pulse = 1'b0;
  logic        error_set = 1'b0;
  logic [31:0] tdc_out;
  logic        error_valid;
  int checks = 0, failures = 0;

  tdc dut (.pulse(pulse), .error_set(error_set), .tdc_out(tdc_out), .error_valid(error_valid));

  task automatic measure(input int unsigned width_ps);
    error_set = 1'b1;
    #1000;
    checks++;
    if (error_valid !== 1'b0) begin failures++; $display("FAIL valid not cleared"); end
    error_set = 1'b0;
    #1000.25;
    pulse = 1'b1;
    #(real'(width_ps) + 0.5);
    pulse = 1'b0;
    #1;
    checks++;
    if (!error_valid) begin failures++; $display("FAIL valid not set for %0d", width_ps); end
    checks++;
    if (tdc_out != width_ps) begin
      failures++; $display("FAIL width %0d ps measured %0d", width_ps, tdc_out);
    end
    #3000; // ring relaxes
  endtask

  initial begin
    #500000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned d = 0; d < 10; d++) measure(2358 + d);
    measure(2560); measure(5119); measure(5120); measure(5121);
    measure(12345); measure(79365); measure(100003);
    for (int i = 0; i < 20; i++) measure(2400 + ($urandom % 200000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
