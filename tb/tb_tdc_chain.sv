`timescale 1ps/10fs
// tb_tdc_chain: self-checking testbench for the delay-chain ring model.
// Holds `work` high for a known time and compares the taps with a reference
// model that advances one stage every 10 ps. Both the 256-stage ring with
// non-inverting feedback and the 21-stage ring with inverting feedback are
// checked, including return to the rest pattern when `work` falls.
module tb_tdc_chain;
  import sdpll_pkg::*;
  localparam logic [255:0] REST_W = ring_rest(256);
  localparam logic [20:0]  REST_S = REST_W[20:0];

  logic         work = 1'b0;
  logic [255:0] taps_l;
  logic [20:0]  taps_s;
  int checks = 0, failures = 0;

  tdc_chain #(.STAGES(256)) dut_l (.work(work), .taps(taps_l));
  tdc_chain #(.STAGES(21), .INVERT_FB(1'b1)) dut_s (.work(work), .taps(taps_s));

  task automatic run(input int n);
    logic [255:0] m_l;
    logic [20:0]  m_s;
    m_l = REST_W;
    m_s = REST_S;
    for (int i = 0; i < n; i++) begin
      m_l = {~m_l[254:0], m_l[255]};
      m_s = {~m_s[19:0], ~m_s[20]};
    end
    work = 1'b1;
    #(10.0 * n + 5.0);
    checks++;
    if (taps_l != m_l) begin
      failures++;
      $display("FAIL 256-stage ring after %0d stages", n);
    end
    checks++;
    if (taps_s != m_s) begin
      failures++;
      $display("FAIL 21-stage ring after %0d stages", n);
    end
    work = 1'b0;
    #6000;
    checks++;
    if (taps_l != REST_W || taps_s != REST_S) begin
      failures++;
      $display("FAIL rings did not return to rest after %0d", n);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100;
    run(0); run(1); run(2); run(20); run(21); run(255); run(256); run(257); run(600);
    for (int i = 0; i < 10; i++) run($urandom % 2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
