`timescale 1ps/10fs
// dco: behavioural model of the digitally controlled oscillator. This is a
// behavioural model, not synthesizable logic; the document, too, describes its
// DCO only as a behavioural model.
//
// Each output period is chosen just before its rising edge from the control
// word: `ctw` * 10 fs, or the base period of 333 MHz (about 3.003 ns) while
// `ctw` is 0. The clock is high for the first half of each period. Because the
// word is sampled once per period, a word that the DCO interface holds for one
// DCO cycle sets the length of exactly one period.
// The 333 MHz base and the 10 fs step follow the document; reading the control
// word as a period rather than a frequency offset is this design's choice (it
// matches the document's software, which scales the TDC's picoseconds by 100
// to obtain the word).
module dco #(
  parameter real BASE_PERIOD_PS = 1.0e6 / 333.0,
  parameter real STEP_PS        = 0.01
) (
  input  logic [31:0] ctw,
  output logic        dco_clk
);

  real period_ps;
  real high_ps;

  logic started;

  initial begin
    dco_clk = 1'b0;
    started = 1'b0;
  end

  always begin
    // The oscillator starts half a base period after power-up, by which time
    // the control word has been through reset.
    if (!started) begin
      #(BASE_PERIOD_PS / 2.0);
      started = 1'b1;
    end
    if (ctw == 32'd0) begin
      period_ps = BASE_PERIOD_PS;
      high_ps   = BASE_PERIOD_PS / 2.0;
    end else begin
      // Split on whole steps so the two halves add up to exactly ctw steps.
      period_ps = real'(ctw) * STEP_PS;
      high_ps   = real'(ctw >> 1) * STEP_PS;
    end
    dco_clk = 1'b1;
    #(high_ps);
    dco_clk = 1'b0;
    #(period_ps - high_ps);
  end

endmodule
