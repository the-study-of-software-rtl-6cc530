`timescale 1ps/10fs
// tb_diff_decoder: self-checking testbench for the differential decoder.
// For a pulse width T it builds the ten sub-TDC results the decoder expects,
// v[k] = floor((T - 11k)/10) mod 21, and checks that the decoded digit is
// T mod 10 and that the tenth comparator fires exactly when the digit is 9.
// Widths sweep every digit and many ring wraps, then random widths follow.
// Purely combinational; a watchdog ends the run if it hangs.
module tb_diff_decoder;
  logic [9:0][4:0] v;
  logic [3:0]      value;
  logic [9:0]      hit;
  int checks = 0, failures = 0;

  diff_decoder dut (.v(v), .value(value), .hit(hit));

  task automatic apply(input int unsigned t);
    for (int k = 0; k < 10; k++) v[k] = 5'(((t - 11 * k) / 10) % 21);
    #10;
    checks++;
    if (value != 4'(t % 10) || hit[9] != (t % 10 == 9)) begin
      failures++;
      $display("FAIL T=%0d value=%0d hit=%b", t, value, hit);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned t = 100; t < 600; t++) apply(t);
    for (int i = 0; i < 200; i++) apply(100 + ($urandom % 4000000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
