`timescale 1ps/10fs
// tb_sub_tdc: self-checking testbench for an even and an odd sub-TDC.
// Each sub-TDC gets the undelayed pulse as its latch pulse and a copy delayed
// by d ps as its work pulse (inverted for the odd one). For a pulse of width T
// the latched value must be floor((T - d)/10) mod 21; error_set must clear it.
module tb_sub_tdc;
  logic       latch_pulse = 1'b0, work_e = 1'b0, work_o = 1'b1, error_set = 1'b1;
  logic [4:0] value_e, value_o;
  int checks = 0, failures = 0;

  sub_tdc #(.ODD(1'b0)) dut_e (.work_pulse(work_e), .latch_pulse(latch_pulse), .error_set(error_set), .value(value_e));
  sub_tdc #(.ODD(1'b1)) dut_o (.work_pulse(work_o), .latch_pulse(latch_pulse), .error_set(error_set), .value(value_o));

  task automatic measure(input int t, input int d);
    error_set = 1'b1;
    #1000 error_set = 1'b0;
    #1000;
    fork
      begin
        latch_pulse = 1'b1;
        #(real'(t) + 0.5) latch_pulse = 1'b0;
      end
      begin
        #(real'(d));
        work_e = 1'b1; work_o = 1'b0;
        #(real'(t) + 0.5);
        work_e = 1'b0; work_o = 1'b1;
      end
    join
    #1000;
    checks++;
    if (value_e != 5'(((t - d) / 10) % 21) || value_o != 5'(((t - d) / 10) % 21)) begin
      failures++;
      $display("FAIL T=%0d d=%0d even=%0d odd=%0d want %0d", t, d, value_e, value_o, ((t - d) / 10) % 21);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 2358; t < 2600; t += 7) measure(t, 0);
    for (int i = 0; i < 40; i++) measure(2358 + $urandom % 20000, 11 * ($urandom % 10));
    error_set = 1'b1;
    #10;
    checks++;
    if (value_e != 0 || value_o != 0) begin
      failures++;
      $display("FAIL error_set did not clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
