// sign_set: the last stage of the ROBA multiplier. In signed mode the product
// is negative when exactly one operand was negative; the stage then returns
// the two's complement of the unsigned magnitude. In unsigned mode it is
// disabled and passes the magnitude through. Purely combinational.
// Setting the sign last follows the ROBA block diagram; taking it as the
// XOR of the operand signs is the usual rule, not spelled out by the source.
module sign_set #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] mag,
  input  logic         sign_a,
  input  logic         sign_b,
  input  logic         is_signed,
  output logic [W-1:0] result
);
  logic neg;
  assign neg    = is_signed & (sign_a ^ sign_b);
  assign result = neg ? (~mag + 1'b1) : mag;
endmodule
