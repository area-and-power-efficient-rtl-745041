// lms_top: top level of the LMS adaptive filter with ROBA multipliers.
//
// It holds two things side by side, as in the top-level schematic:
//  * the adaptive filter (lms_filter): Data_in, Desired_in and Step_size in,
//    Error_out (and the filter output y) out;
//  * a stand-alone 8x8 ROBA multiplier fed with the low bytes Data_in[7:0]
//    and Step_size[7:0]; its 16-bit product is output as prod, and
//    final_out = Error_out + prod (16-bit, wrapping).
//
// Timing: one sample per clock while Enable is high (see lms_filter);
// prod and final_out are combinational. Reset is synchronous, active high.
//
// The port names, the two instances and the final_out adder follow the
// schematic. Mult_signed, which selects signed or unsigned operation of the
// stand-alone multiplier, and the Weights output are this design's own
// additions.
module lms_top
  import lms_pkg::*;
(
  input  logic                        clk,
  input  logic                        Reset,
  input  logic                        Enable,
  input  logic [DATA_W-1:0]           Data_in,
  input  logic [DATA_W-1:0]           Desired_in,
  input  logic [DATA_W-1:0]           Step_size,
  input  logic                        Mult_signed,
  output logic [DATA_W-1:0]           Error_out,
  output logic [DATA_W-1:0]           y,
  output logic [TAPS-1:0][DATA_W-1:0] Weights,
  output logic [2*MULT_W-1:0]         prod,
  output logic [DATA_W-1:0]           final_out
);
  lms_filter #(.W(DATA_W), .T(TAPS), .FRAC(FRAC_BITS)) lms1 (
    .clk, .reset(Reset), .enable(Enable),
    .data_in(Data_in), .desired_in(Desired_in), .step_size(Step_size),
    .error_out(Error_out), .y_out(y), .weights(Weights)
  );

  roba_mult #(.N(MULT_W)) mult (
    .a(Data_in[MULT_W-1:0]), .b(Step_size[MULT_W-1:0]),
    .is_signed(Mult_signed), .prod
  );

  assign final_out = Error_out + DATA_W'(prod);
endmodule
