`timescale 1ps/10fs
// tb_phase_detector: checks the phase detector with two clocks of equal period
// and a chosen offset. When Ref_Clk rises first the phase-error pulse must last
// from the Ref_Clk edge to the Div_Clk edge and `lead` must be set; when
// Div_Clk rises first the pulse runs from the Div_Clk edge to the Ref_Clk edge
// and `lag` must be set. Before each case `clear` is pulsed so the detector
// pairs the edges starting from the first one that arrives. Pulse widths are
// measured by the testbench.
module tb_phase_detector;
  logic ref_clk = 1'b0, div_clk = 1'b0, rst_n = 1'b1, clear = 1'b0;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset
  logic phase_error, lead, lag;
  int checks = 0, failures = 0;
  realtime t_rise = 0, width = 0;

  phase_detector dut (.*);

  always @(posedge phase_error) t_rise = $realtime;
  always @(negedge phase_error) width = $realtime - t_rise;

  task automatic run_case(input real period, input real offset);
    // offset > 0: Div_Clk rises offset ps after Ref_Clk
    real expw;
    clear = 1'b1;
    #(period / 8.0);
    clear = 1'b0;
    for (int k = 0; k < 4; k++) begin
      fork
        begin
          if (offset < 0) #(-offset);
          ref_clk = 1'b1; #(period / 2.0) ref_clk = 1'b0;
        end
        begin
          if (offset >= 0) begin #(offset) div_clk = 1'b1; #(period / 2.0) div_clk = 1'b0; end
          else begin div_clk = 1'b1; #(period / 2.0) div_clk = 1'b0; end
        end
      join_none
      #(period);
    end
    #(period / 4.0);
    expw = (offset >= 0) ? offset : -offset;
    checks++;
    if (width < expw - 0.01 || width > expw + 0.01) begin
      failures++; $display("FAIL offset %0.1f: pulse width %0.2f", offset, width);
    end
    checks++;
    if ((offset >= 0) !== lead || (offset < 0) !== lag) begin
      failures++; $display("FAIL offset %0.1f: lead %0d lag %0d", offset, lead, lag);
    end
    wait fork;
  endtask

  initial begin
    #(100000000.0);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000 rst_n = 1'b1;
    #1000;
    run_case(100000.0, 3000.0);
    run_case(100000.0, -3000.0);
    run_case(100000.0, 25000.5);
    run_case(100000.0, -40000.0);
    run_case(158730.0, 1.0);
    run_case(158730.0, -12.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
