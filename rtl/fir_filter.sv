// fir_filter: the transversal (FIR) part of the LMS adaptive filter,
//   y(n) = sum_k w_k(n) * x(n-k),  k = 0 .. TAPS-1.
// Each tap product comes from a signed ROBA approximate multiplier instead
// of an exact one. The full-width products (Q8.24 for Q4.12 operands) are
// summed first, then the sum is scaled back to Q4.12 by an arithmetic right
// shift of FRAC bits (rounding towards minus infinity) and saturated to W
// bits. Purely combinational.
//
//   x_taps   TAPS signed samples, x_taps[k] = x(n-k)
//   weights  TAPS signed tap weights
//   y        signed filter output
//
// The tap/multiplier/adder-chain structure follows the filter structure;
// the Q4.12 scaling and the saturation are this design's own choices.
module fir_filter
  import lms_pkg::*;
#(
  parameter int unsigned W    = DATA_W,
  parameter int unsigned T    = TAPS,
  parameter int unsigned FRAC = FRAC_BITS
) (
  input  logic [T-1:0][W-1:0] x_taps,
  input  logic [T-1:0][W-1:0] weights,
  output logic [W-1:0]        y
);
  localparam int unsigned SW = 2*W + $clog2(T) + 1;

  logic [T-1:0][2*W-1:0] prod;

  for (genvar k = 0; k < T; k++) begin : g_tap
    roba_mult #(.N(W)) u_mult (
      .a(x_taps[k]), .b(weights[k]), .is_signed(1'b1), .prod(prod[k])
    );
  end

  logic signed [SW-1:0] acc;
  logic signed [63:0]   scaled;

  always_comb begin
    acc = '0;
    for (int unsigned k = 0; k < T; k++)
      acc += SW'($signed(prod[k]));
    scaled = 64'(acc >>> FRAC);
    y      = W'(sat_to(scaled, W));
  end
endmodule
