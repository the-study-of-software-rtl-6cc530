`timescale 1ps/10fs
// tb_tdc_decoder: self-checking testbench for the thermometer decoder.
// A reference model steps a ring the way the delay chain does: every stage
// takes the inverse of the one before it and stage 0 takes the feedback. After
// n steps from the rest pattern the 256-stage decoder must report
// {middle, pos} = n mod 512 (non-inverting feedback) and the 21-stage decoder
// used by the sub-TDCs must report pos = n mod 21 (inverting feedback).
// Purely combinational; a watchdog ends the run if it hangs.
module tb_tdc_decoder;
  import sdpll_pkg::*;
  localparam logic [255:0] REST_W = ring_rest(256);
  localparam logic [20:0]  REST_S = REST_W[20:0];

  logic [255:0] snap_l;
  logic [20:0]  snap_s;
  logic         middle_l, middle_s;
  logic [7:0]   pos_l;
  logic [4:0]   pos_s;
  int checks = 0, failures = 0;

  tdc_decoder #(.STAGES(256)) dut_l (.snap(snap_l), .middle(middle_l), .pos(pos_l));
  tdc_decoder #(.STAGES(21))  dut_s (.snap(snap_s), .middle(middle_s), .pos(pos_s));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    snap_l = REST_W;
    snap_s = REST_S;
    for (int n = 0; n < 1600; n++) begin
      #10;
      checks++;
      if ({middle_l, pos_l} != 9'(n % 512)) begin
        failures++;
        $display("FAIL 256-stage n=%0d got %0d", n, {middle_l, pos_l});
      end
      checks++;
      if (pos_s != 5'(n % 21)) begin
        failures++;
        $display("FAIL 21-stage n=%0d got %0d", n, pos_s);
      end
      snap_l = {~snap_l[254:0], snap_l[255]};
      snap_s = {~snap_s[19:0], ~snap_s[20]};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
