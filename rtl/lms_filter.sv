// lms_filter: LMS adaptive filter built from ROBA approximate multipliers.
//
// An FIR filter with adaptive weights: each sample x(n) enters a tapped
// delay line, the FIR part forms y(n) = sum_k w_k x(n-k), the error
// e(n) = d(n) - y(n) against the desired signal is formed, and the
// weight-update block moves every weight by mu*e(n)*x(n-k). All multipliers
// are ROBA multipliers.
//
// Timing: one sample per clock. While enable is high, x(n) = data_in and
// d(n) = desired_in are taken in the cycle they are presented; y_out and
// error_out are combinational results for that sample, and on the rising
// edge the delay line shifts and the weights become w(n+1). With enable low
// nothing is stored. Reset is synchronous and active high; it clears the
// delay line and the weights.
//
// Ports follow the filter of the top-level schematic (Data_in, Desired_in,
// Step_size, Enable, Reset, Clk, Error_out); y_out and weights are brought
// out for observation. Q4.12 data, the saturation of e(n) to 16 bits and
// the combinational (unregistered) outputs are this design's own choices.
module lms_filter
  import lms_pkg::*;
#(
  parameter int unsigned W    = DATA_W,
  parameter int unsigned T    = TAPS,
  parameter int unsigned FRAC = FRAC_BITS
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                enable,
  input  logic [W-1:0]        data_in,
  input  logic [W-1:0]        desired_in,
  input  logic [W-1:0]        step_size,
  output logic [W-1:0]        error_out,
  output logic [W-1:0]        y_out,
  output logic [T-1:0][W-1:0] weights
);
  logic [T-1:0][W-1:0] x_taps;

  assign x_taps[0] = data_in;

  for (genvar k = 1; k < T; k++) begin : g_delay
    delay_unit #(.W(W)) u_data_reg (
      .clk, .reset, .enable, .data_in(x_taps[k-1]), .delay_out(x_taps[k])
    );
  end

  fir_filter #(.W(W), .T(T), .FRAC(FRAC)) u_fir (
    .x_taps, .weights, .y(y_out)
  );

  // e(n) = d(n) - y(n), saturated to W bits
  assign error_out = W'(sat_to(64'($signed(desired_in)) - 64'($signed(y_out)), W));

  weight_update #(.W(W), .T(T), .FRAC(FRAC)) u_wub (
    .clk, .reset, .enable, .step_size, .error(error_out), .x_taps, .weights
  );
endmodule
