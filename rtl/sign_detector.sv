// sign_detector: first stage of the ROBA multiplier. It looks at the most
// significant bit of each operand and, for signed multiplication, turns a
// negative operand into its magnitude by two's complement negation; it also
// passes the two sign bits on to the sign-set stage. With is_signed low the
// stage is disabled: the operands are taken as unsigned magnitudes and both
// sign bits are 0. Purely combinational.
//
//   a, b        N-bit operands (two's complement when is_signed = 1)
//   abs_a/abs_b N-bit unsigned magnitudes; |-2^(N-1)| = 2^(N-1) still fits
//   sign_a/b    operand signs (0 in unsigned mode)
//
// The behaviour follows the sign-detector description of the ROBA multiplier;
// the is_signed port that selects the mode is this design's own interface.
module sign_detector #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         is_signed,
  output logic [N-1:0] abs_a,
  output logic [N-1:0] abs_b,
  output logic         sign_a,
  output logic         sign_b
);
  always_comb begin
    sign_a = is_signed & a[N-1];
    sign_b = is_signed & b[N-1];
    abs_a  = sign_a ? (~a + 1'b1) : a;
    abs_b  = sign_b ? (~b + 1'b1) : b;
  end
endmodule
