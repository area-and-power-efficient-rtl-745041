// roba_mult: rounding-based approximate (ROBA) multiplier.
//
// Idea: round each operand to its nearest power of two, A_r and B_r. The
// exact product satisfies A*B = A_r*B + B_r*A - A_r*B_r + (A_r-A)*(B_r-B).
// The last term is the hard one and is small, so it is dropped:
//   A*B ~= A_r*B + B_r*A - A_r*B_r,
// and each remaining term is a product with a power of two, i.e. a shift.
//
// Structure (one instance per stage, in data-flow order):
//   sign_detector -> rounding (x2) -> shifter (x3) -> roba_adder
//   -> roba_subtractor -> sign_set
// For signed multiplication the sign detector hands magnitudes to the core
// and the sign-set stage restores the sign of the product; with is_signed low
// both stages are disabled and the operands are unsigned.
//
// Interface: a, b are N-bit operands, prod the 2N-bit result (two's
// complement when is_signed = 1). Purely combinational, no clock.
//
// The stages and the formula follow the ROBA multiplier as described; the
// tie rule of the rounding (3*2^(p-1) rounds up) and the is_signed port are
// this design's own choices.
module roba_mult #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           is_signed,
  output logic [2*N-1:0] prod
);
  logic [N-1:0]   abs_a, abs_b;
  logic           sign_a, sign_b;
  logic [N:0]     a_r, b_r;
  logic [2*N:0]   ar_b, br_a, ar_br;
  logic [2*N+1:0] sum;
  logic [2*N-1:0] mag;

  sign_detector #(.N(N)) u_sign_detector (
    .a, .b, .is_signed, .abs_a, .abs_b, .sign_a, .sign_b
  );

  rounding #(.N(N)) u_round_a (.mag(abs_a), .pow2(a_r));
  rounding #(.N(N)) u_round_b (.mag(abs_b), .pow2(b_r));

  // A_r * B
  shifter #(.WP(N+1), .WA(N+1), .WO(2*N+1)) u_shift_arb (
    .pow2(a_r), .operand({1'b0, abs_b}), .product(ar_b)
  );
  // B_r * A
  shifter #(.WP(N+1), .WA(N+1), .WO(2*N+1)) u_shift_bra (
    .pow2(b_r), .operand({1'b0, abs_a}), .product(br_a)
  );
  // A_r * B_r
  shifter #(.WP(N+1), .WA(N+1), .WO(2*N+1)) u_shift_arbr (
    .pow2(b_r), .operand(a_r), .product(ar_br)
  );

  roba_adder #(.W(2*N+1)) u_adder (.x(ar_b), .y(br_a), .sum);

  roba_subtractor #(.WI(2*N+2), .WO(2*N)) u_subtractor (
    .minuend(sum), .subtrahend({1'b0, ar_br}), .diff(mag)
  );

  sign_set #(.W(2*N)) u_sign_set (
    .mag, .sign_a, .sign_b, .is_signed, .result(prod)
  );
endmodule
