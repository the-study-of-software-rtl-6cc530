`timescale 1ps/10fs
// tb_delay_pulse: self-checking testbench for the 11 ps delay chain.
// Sends pulses of random width and checks that tap k rises (k even) or falls
// (k odd, the inverted copies) exactly k x 11 ps after the input's rising edge
// and holds its level for the width of the input pulse.
module tb_delay_pulse;
  logic       pulse = 1'b0;
  logic [9:0] tap;
  int checks = 0, failures = 0;
  realtime t_on [10];
  realtime t_off [10];
  realtime t0;

  delay_pulse dut (.pulse(pulse), .tap(tap));

  for (genvar k = 0; k < 10; k++) begin : g_mon
    if (k % 2 == 0) begin : g_even
      always @(posedge tap[k]) t_on[k] = $realtime;
      always @(negedge tap[k]) t_off[k] = $realtime;
    end else begin : g_odd
      always @(negedge tap[k]) t_on[k] = $realtime;
      always @(posedge tap[k]) t_off[k] = $realtime;
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real w;
    #1000;
    for (int i = 0; i < 20; i++) begin
      w = 150.0 + real'($urandom % 5000);
      t0 = $realtime;
      pulse = 1'b1;
      #(w) pulse = 1'b0;
      #1000;
      for (int k = 0; k < 10; k++) begin
        checks++;
        if (t_on[k] - t0 > 11.0 * k + 0.01 || t_on[k] - t0 < 11.0 * k - 0.01 ||
            t_off[k] - t_on[k] > w + 0.01 || t_off[k] - t_on[k] < w - 0.01) begin
          failures++;
          $display("FAIL tap %0d: delay %0f width %0f (w=%0f)", k, t_on[k] - t0, t_off[k] - t_on[k], w);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
