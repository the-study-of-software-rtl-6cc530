`timescale 1ps/10fs
// opl_pa: Pulse Amplifier with One Pulse Lock. This is a behavioural model, not
// synthesizable logic: the widening relies on a delay path.
//
// One pulse lock: after `error_set` falls, only the first complete pulse of
// `input_pulse` is passed on. A flip-flop armed by the input's rising edge lets
// the pulse through; a second flip-flop, set by the falling edge of the passed
// pulse, blocks everything after it. A pulse that is already high when
// `error_set` falls is not passed (it has no rising edge), so no partial pulse
// is measured.
// Pulse amplifier: a passed pulse narrower than MIN_WIDTH_PS is widened to
// MIN_WIDTH_PS through a delay path; a wider pulse keeps its width.
// `error_set` (active high) clears both flip-flops and forces the output low.
// The default minimum is the TDC's minimum pulse of 2.358 ns from the
// document's specification table; the flip-flop arrangement follows the
// document's schematic in function.
module opl_pa #(
  parameter real MIN_WIDTH_PS = 2358.0
) (
  input  logic input_pulse,
  input  logic error_set,
  output logic output_pulse
);

  logic armed;
  logic done;
  logic pass;
  logic hold;

  initial begin
    armed = 1'b0;
    done  = 1'b0;
    hold  = 1'b0;
  end

  always @(posedge input_pulse or posedge error_set) begin
    if (error_set) armed <= 1'b0;
    else           armed <= 1'b1;
  end

  assign pass = input_pulse & armed & !done & !error_set;

  always @(negedge pass or posedge error_set) begin
    if (error_set) done <= 1'b0;
    else           done <= 1'b1;
  end

  always @(posedge pass) begin
    hold <= 1'b1;
    #(MIN_WIDTH_PS);
    hold <= 1'b0;
  end

  assign output_pulse = (pass | hold) & !error_set;

endmodule
