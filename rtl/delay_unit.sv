// delay_unit: one element of the filter's tapped delay line, x(n) -> x(n-1).
// A W-bit register that loads its input on the rising clock edge when
// enable is high and holds otherwise; a synchronous, active-high reset
// clears it. The filter chains TAPS-1 of them.
//
// Register, enable and reset follow the delay units of the filter schematic
// (Data_reg_1..3, ports Clk, Data_in, Enable, Reset, Delay_out); reset
// polarity and its synchronous timing are this design's own choices.
module delay_unit #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         enable,
  input  logic [W-1:0] data_in,
  output logic [W-1:0] delay_out
);
  always_ff @(posedge clk) begin
    if (reset)       delay_out <= '0;
    else if (enable) delay_out <= data_in;
  end
endmodule
