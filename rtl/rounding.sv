// rounding: rounds an unsigned N-bit magnitude to the nearest power of two,
// as the ROBA multiplier needs for its shift-only partial products.
//
// How: find the leading one at bit p. The value lies between 2^p and
// 2^(p+1); it is nearer 2^(p+1) exactly when bit p-1 is also set (a value of
// 3*2^(p-1) is a tie and is rounded up, as in the original ROBA scheme). The
// result is one-hot and one bit wider than the input, because e.g. 255 rounds
// to 256. Zero rounds to zero (all bits 0). Purely combinational.
//
//   mag   N-bit unsigned magnitude
//   pow2  (N+1)-bit one-hot nearest power of two, or 0 for mag = 0
//
// Rounding to the nearest power of two follows the ROBA multiplier; the tie
// rule and the handling of zero are this design's own choices.
module rounding #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] mag,
  output logic [N:0]   pow2
);
  always_comb begin
    pow2 = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (mag[i]) begin
        pow2 = '0;
        if (i > 0 && mag[i-1]) pow2[i+1] = 1'b1;
        else                   pow2[i]   = 1'b1;
      end
    end
  end
endmodule
