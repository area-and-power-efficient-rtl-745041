// roba_subtractor: the subtractor stage of the ROBA multiplier. It removes
// the term A_r*B_r from A_r*B + B_r*A, giving the approximate magnitude
// A_r*B + B_r*A - A_r*B_r. That value never goes below zero and, for N-bit
// magnitudes, always fits in 2N bits (it is the exact product minus the
// dropped term (A_r-A)(B_r-B)), so the result is cut to WO bits; the two
// top bits of the internal difference are therefore left unused.
// Purely combinational. The stage follows the ROBA block diagram; the
// widths are this design's own choice.
module roba_subtractor #(
  parameter int unsigned WI = 18,
  parameter int unsigned WO = 16
) (
  input  logic [WI-1:0] minuend,
  input  logic [WI-1:0] subtrahend,
  output logic [WO-1:0] diff
);
  logic [WI-1:0] full;
  assign full = minuend - subtrahend;
  assign diff = full[WO-1:0];
endmodule
