`timescale 1ps/10fs
// tb_dco: self-checking testbench for the DCO model.
// With ctw = 0 the period must be the 333 MHz base period; otherwise it must
// be ctw x 10 fs. Periods are measured between rising edges and compared
// within 20 fs (the simulation resolution is 10 fs).
module tb_dco;
  logic [31:0] ctw = '0;
  logic        dco_clk;
  int checks = 0, failures = 0;

  dco dut (.ctw(ctw), .dco_clk(dco_clk));

  task automatic measure(input real want_ps);
    realtime t0, t1;
    repeat (2) @(posedge dco_clk);
    t0 = $realtime;
    @(posedge dco_clk);
    t1 = $realtime;
    checks++;
    if ((t1 - t0) - want_ps > 0.02 || want_ps - (t1 - t0) > 0.02) begin
      failures++;
      $display("FAIL ctw=%0d period=%0f want %0f", ctw, t1 - t0, want_ps);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    measure(1.0e6 / 333.0);
    for (int i = 0; i < 20; i++) begin
      ctw = 32'd300_000 + $urandom % 20_000_000;
      measure(real'(ctw) * 0.01);
    end
    ctw = 32'd15_873_100;  // 200 x 79365.5 ps: a 6.3 MHz reference
    measure(158731.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
