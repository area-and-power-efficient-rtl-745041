// weight_update: the weight-update block (WUB) of the LMS adaptive filter.
// It holds the TAPS tap weights and adapts them by the LMS rule
//   w_k(n+1) = w_k(n) + mu * e(n) * x(n-k).
//
// How: one signed ROBA multiplier forms mu*e(n), scaled back to Q4.12 and
// saturated; one ROBA multiplier per tap multiplies that by x(n-k); the
// scaled product is added to the weight and the sum saturated to W bits. The
// new weights are loaded on the rising clock edge while enable is high, so
// one adaptation step is made per enabled clock. A synchronous, active-high
// reset clears all weights to zero.
//
//   step_size  mu, Q4.12      error  e(n), Q4.12
//   x_taps     x(n-k), Q4.12  weights  registered w_k(n), Q4.12
//
// The multiply-add-register structure per tap follows the filter structure;
// the order (mu*e first, then times x), the Q4.12 scaling, saturation and
// reset to zero are this design's own choices.
module weight_update
  import lms_pkg::*;
#(
  parameter int unsigned W    = DATA_W,
  parameter int unsigned T    = TAPS,
  parameter int unsigned FRAC = FRAC_BITS
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                enable,
  input  logic [W-1:0]        step_size,
  input  logic [W-1:0]        error,
  input  logic [T-1:0][W-1:0] x_taps,
  output logic [T-1:0][W-1:0] weights
);
  logic [2*W-1:0]        mu_e_full;
  logic [W-1:0]          mu_e;
  logic [T-1:0][2*W-1:0] upd_full;
  logic [T-1:0][W-1:0]   w_next;

  roba_mult #(.N(W)) u_mult_mu_e (
    .a(step_size), .b(error), .is_signed(1'b1), .prod(mu_e_full)
  );

  assign mu_e = W'(sat_to(64'($signed(mu_e_full) >>> FRAC), W));

  for (genvar k = 0; k < T; k++) begin : g_tap
    roba_mult #(.N(W)) u_mult_upd (
      .a(mu_e), .b(x_taps[k]), .is_signed(1'b1), .prod(upd_full[k])
    );
    assign w_next[k] = W'(sat_to(64'($signed(weights[k]))
                                 + 64'($signed(upd_full[k]) >>> FRAC), W));
  end

  always_ff @(posedge clk) begin
    if (reset)       weights <= '0;
    else if (enable) weights <= w_next;
  end
endmodule
