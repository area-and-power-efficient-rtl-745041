// roba_adder: the adder stage of the ROBA multiplier. It adds the two
// shifted partial products A_r*B and B_r*A; the result is one bit wider than
// its inputs so the sum cannot overflow. Purely combinational.
// The stage and its place in the chain follow the ROBA block diagram; the
// result width is this design's own choice.
module roba_adder #(
  parameter int unsigned W = 17
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W:0]   sum
);
  assign sum = {1'b0, x} + {1'b0, y};
endmodule
