// lms_pkg: widths, fixed-point format and saturation helpers shared by the
// LMS adaptive filter and its ROBA (rounding-based approximate) multipliers.
//
// Samples, desired values, step size, error and tap weights are 16-bit two's
// complement words, the width of the filter ports (Data_in[15:0],
// Desired_in[15:0], Step_size[15:0], Error_out[15:0]). Their binary point is
// this design's own choice: Q4.12 (FRAC_BITS = 12), which leaves headroom for
// the sum of four tap products. The filter length of four taps follows the
// filter structure; the 8-bit width of the stand-alone multiplier follows the
// a[7:0] / b[7:0] operands of the top-level schematic.
package lms_pkg;

  parameter int unsigned DATA_W    = 16;  // sample / weight / error width
  parameter int unsigned FRAC_BITS = 12;  // fractional bits of the Q4.12 format
  parameter int unsigned TAPS      = 4;   // filter length
  parameter int unsigned MULT_W    = 8;   // operand width of the stand-alone multiplier

  // Clamp a wide signed value to a W-bit two's complement word (W <= 64).
  function automatic logic signed [63:0] sat_to(input logic signed [63:0] v,
                                                input int unsigned W);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (W - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (W - 1));
    if (v > hi)      return hi;
    else if (v < lo) return lo;
    else             return v;
  endfunction

  // True when sat_to(v, W) would change v.
  function automatic logic out_of_range(input logic signed [63:0] v,
                                        input int unsigned W);
    return (v > ((64'sd1 <<< (W - 1)) - 64'sd1)) || (v < -(64'sd1 <<< (W - 1)));
  endfunction

endpackage
