`timescale 1ps/10fs
// tdc: the proposed 1 ps time-to-digit converter.
//
// The gate-delay TDC measures the pulse width in 10 ps units and the
// differential delay TDC supplies the remaining picosecond digit, so
// TDC_OUT = 10 * gate + digit is the pulse width in picoseconds
// (32 bits: up to about 4.29 ms).
// `error_valid` rises on the falling edge of the pulse, when both converters
// have latched their result, and is cleared, together with the converters, by
// `error_set` (active high, asynchronous). Only the first pulse after
// `error_set` should reach this block (see the one-pulse lock in front of it);
// later pulses would add to the lap count.
// The x10-and-add combination follows the document; the valid flag is this
// design's own handshake.
module tdc (
  input  logic        pulse,
  input  logic        error_set,
  output logic [31:0] tdc_out,
  output logic        error_valid
);

  logic [31:0] gate_value;
  logic [3:0]  digit;

  gate_delay_tdc u_gate (
    .pulse     (pulse),
    .error_set (error_set),
    .value     (gate_value)
  );

  diff_delay_tdc u_diff (
    .pulse     (pulse),
    .error_set (error_set),
    .value     (digit)
  );

  assign tdc_out = gate_value * 32'd10 + 32'(digit);

  always_ff @(negedge pulse or posedge error_set) begin
    if (error_set) error_valid <= 1'b0;
    else           error_valid <= 1'b1;
  end

endmodule
