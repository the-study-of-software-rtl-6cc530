`timescale 1ps/10fs
// diff_delay_tdc: the 1 ps "Differential delay TDC".
//
// The pulse is delayed in 11 ps steps (0..99 ps). Five even sub-TDCs take the
// 0, 22, 44, 66 and 88 ps copies, five odd sub-TDCs the 11, 33, 55, 77 and 99 ps
// copies; each measures the pulse shortened by its delay with 10 ps stages.
// Because 11 ps - 10 ps = 1 ps, the place where neighbouring results step by
// two instead of one is the picosecond digit of the pulse width, which the
// differential decoder extracts into `value` (0..9).
// Timing: valid from the falling edge of `pulse` until `error_set` rises.
// Group sizes, delays and decoder follow the document.
module diff_delay_tdc (
  input  logic       pulse,
  input  logic       error_set,
  output logic [3:0] value
);

  localparam int unsigned N = 10;

  logic [N-1:0]      tap;
  logic [N-1:0][4:0] v;
  logic [N-1:0]      hit_unused;

  delay_pulse #(.TAPS(N), .STAGE_PS(11.0)) u_delay (
    .pulse (pulse),
    .tap   (tap)
  );

  // EVEN GROUP (k = 0,2,4,6,8) and ODD GROUP (k = 1,3,5,7,9).
  for (genvar k = 0; k < N; k++) begin : g_sub
    sub_tdc #(.ODD(k % 2 == 1)) u_sub (
      .work_pulse  (tap[k]),
      .latch_pulse (tap[0]),
      .error_set   (error_set),
      .value       (v[k])
    );
  end

  diff_decoder #(.N(N)) u_dec (
    .v     (v),
    .value (value),
    .hit   (hit_unused)
  );

endmodule
