// shifter: multiplies an operand by a power of two given in one-hot form,
// using a shift instead of a multiplier. The ROBA multiplier uses three of
// them, for A_r*B, B_r*A and A_r*B_r.
//
// How: the one-hot input is encoded to its bit index k, and the operand is
// shifted left by k. A zero power (a rounded zero operand) gives zero.
// Purely combinational.
//
//   pow2     WP-bit one-hot power of two (or 0)
//   operand  WA-bit unsigned operand
//   product  WO-bit unsigned product (WO must hold operand << (WP-1))
//
// Three shifters in place of multipliers follow the ROBA block diagram; the
// one-hot form of the power of two is this design's own choice.
module shifter #(
  parameter int unsigned WP = 9,
  parameter int unsigned WA = 9,
  parameter int unsigned WO = 17
) (
  input  logic [WP-1:0] pow2,
  input  logic [WA-1:0] operand,
  output logic [WO-1:0] product
);
  logic [$clog2(WP+1)-1:0] k;

  always_comb begin
    k = '0;
    for (int unsigned i = 0; i < WP; i++)
      if (pow2[i]) k = i[$clog2(WP+1)-1:0];
  end

  assign product = (pow2 == '0) ? '0 : (WO'(operand) << k);
endmodule
