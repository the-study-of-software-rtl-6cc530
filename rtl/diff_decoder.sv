`timescale 1ps/10fs
// diff_decoder: the differential decoder of the differential delay TDC.
//
// Sub-TDC k reports v[k] = floor((T - 11k)/10) mod 21 for pulse width T. With
// T = 10q + r, neighbouring values differ by one except between k = r and
// k = r+1, where they differ by two (or by -19 when the modulo-21 count wraps).
// Comparator k (k = 0..8) therefore flags v[k] - v[k+1] equal to 2 or -19,
// which the document prints as "2 or 19". When none of them fires r is 9; the
// tenth comparator confirms this from v[0] - v[9] being 9 modulo 21 (this
// design's choice of what the tenth comparator tests). A priority encoder turns
// the flags into the picosecond digit `value` (0..9). Purely combinational.
module diff_decoder #(
  parameter int unsigned N   = 10,
  parameter int unsigned MOD = 21
) (
  input  logic [N-1:0][4:0] v,
  output logic [3:0]        value,
  output logic [N-1:0]      hit
);

  always_comb begin
    logic signed [6:0] d;
    for (int k = 0; k < N - 1; k++) begin
      d = 7'(signed'({2'b0, v[k]})) - 7'(signed'({2'b0, v[k+1]}));
      hit[k] = (d == 7'sd2) || (d == 7'(2 - int'(MOD)));
    end
    d = 7'(signed'({2'b0, v[0]})) - 7'(signed'({2'b0, v[N-1]}));
    if (d < 0) d = d + 7'(MOD);
    hit[N-1] = (d == 7'(N - 1));
  end

  always_comb begin
    value = 4'(N - 1);
    for (int k = N - 1; k >= 0; k--) begin
      if (hit[k]) value = 4'(k);
    end
  end

endmodule
