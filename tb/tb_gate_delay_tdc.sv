`timescale 1ps/10fs
// tb_gate_delay_tdc: self-checking testbench for the 10 ps gate-delay TDC.
// Pulses of width T (integer ps plus 0.5 ps) must give value = floor(T/10):
// bits [7:0] the ring position, bit 8 the middle bit and bits [31:9] the ring
// period counter. Widths cover short pulses, ring-lap boundaries and long
// pulses; error_set must clear the result. Pulses are spaced by more than
// one ring length (2.56 ns) so the ring is back at rest before each one.
module tb_gate_delay_tdc;
  logic        pulse = 1'b0, error_set = 1'b0;
  logic [31:0] value;
  int checks = 0, failures = 0;

  gate_delay_tdc dut (.pulse(pulse), .error_set(error_set), .value(value));

  task automatic measure(input int unsigned t);
    error_set = 1'b1;
    #4000 error_set = 1'b0;
    #1000 pulse = 1'b1;
    #(real'(t) + 0.5) pulse = 1'b0;
    #100;
    checks++;
    if (value != t / 10) begin
      failures++;
      $display("FAIL T=%0d value=%0d want %0d", t, value, t / 10);
    end
  endtask

  initial begin
    #500000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    measure(0); measure(9); measure(10); measure(2358);
    measure(2549); measure(2550); measure(2560); measure(5119); measure(5120);
    measure(5130); measure(10240); measure(158731);
    for (int i = 0; i < 20; i++) measure($urandom % 300000);
    error_set = 1'b1;
    #10;
    checks++;
    if (value != 0) begin
      failures++;
      $display("FAIL error_set did not clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
