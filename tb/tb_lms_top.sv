// tb_lms_top: end-to-end test of the top level at its default sizes.
//
// Phase 1, adaptation: system identification of an unknown 4-tap system
// (0.5, -0.3, 0.2, 0.1) from a random input with step size 0.5, with Enable
// dropped now and then. Error, filter output and weights are compared
// every cycle with a bit-level model; at the end the weights must be near
// the unknown system and the error must have shrunk.
// Phase 2, saturation: full-scale desired values and random step sizes drive
// the error and the weights into saturation.
// Phase 3, reset: Reset clears the delay line and the weights.
// Throughout, the stand-alone 8x8 multiplier (prod) and final_out are
// checked in both signed and unsigned mode.
// Each mechanism is counted and must occur: enabled update, held cycle,
// reset, saturation, signed and unsigned multiplications, a negative
// product, operands rounded up and down.
module tb_lms_top;
  import roba_ref_pkg::*;
  import lms_pkg::*;
  localparam int W = 16, T = 4, FRAC = 12, NADAPT = 3000, NSAT = 200;
  logic clk = 0, Reset, Enable, Mult_signed;
  logic [W-1:0] Data_in, Desired_in, Step_size, Error_out, y, final_out;
  logic [T-1:0][W-1:0] Weights;
  logic [15:0] prod;
  longint h [T] = '{2048, -1229, 819, 410};
  longint hist [T];
  lms_model m;
  int checks = 0, failures = 0;
  int n_update = 0, n_hold = 0, n_reset = 0, n_signed = 0, n_unsigned = 0;
  int n_negprod = 0, n_round_up = 0, n_round_down = 0;
  longint err_first = 0, err_last = 0;

  lms_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NADAPT + NSAT + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endfunction

  // Compare the outputs of the current cycle (inputs already applied).
  task automatic check_outputs(longint x, longint d);
    longint p, a8, s8;
    m.eval(x, d);
    check("y", sx(y, W), m.y);
    check("Error_out", sx(Error_out, W), m.e);
    a8 = Data_in[7:0];
    s8 = Step_size[7:0];
    p  = ref_roba(a8, s8, 8, Mult_signed);
    check("prod", longint'(prod), p & 16'hFFFF);
    check("final_out", longint'(final_out), (longint'(Error_out) + (p & 16'hFFFF)) & 16'hFFFF);
    if (Mult_signed) n_signed++; else n_unsigned++;
    if (p < 0) n_negprod++;
    begin
      longint ma;
      ma = (Mult_signed && a8 >= 128) ? 256 - a8 : a8;
      if (ref_round(ma) > ma) n_round_up++;
      if (ref_round(ma) < ma) n_round_down++;
    end
  endtask

  task automatic clock_and_check_weights();
    @(posedge clk); #1;
    for (int k = 0; k < T; k++) check("Weights", sx(Weights[k], W), m.wt[k]);
  endtask

  initial begin
    m = new(W, FRAC, T);
    foreach (hist[k]) hist[k] = 0;
    Reset = 1; Enable = 0; Mult_signed = 0;
    Data_in = '0; Desired_in = '0; Step_size = W'(2048);
    @(posedge clk); #1;
    Reset = 0;

    // Phase 1: adaptation
    for (int i = 0; i < NADAPT; i++) begin
      longint x, d;
      Enable = (i % 13) != 12;
      Mult_signed = i[0];
      x = sx($urandom, 12);
      if (Enable) begin
        for (int k = T - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = x;
      end
      d = 0;
      for (int k = 0; k < T; k++) d += h[k] * ((k == 0) ? x : hist[k]);
      d = Enable ? asr(d, FRAC) : sx($urandom, 12);
      Data_in = W'(x); Desired_in = W'(d);
      #1;
      check_outputs(x, d);
      if (Enable) begin
        if (i < 200) err_first += (m.e < 0) ? -m.e : m.e;
        if (i >= NADAPT - 200) err_last += (m.e < 0) ? -m.e : m.e;
        m.step(x, Step_size);
        n_update++;
      end else n_hold++;
      clock_and_check_weights();
    end
    $display("weights after adaptation: %0d %0d %0d %0d (system %0d %0d %0d %0d)",
             sx(Weights[0], W), sx(Weights[1], W), sx(Weights[2], W), sx(Weights[3], W),
             h[0], h[1], h[2], h[3]);
    $display("sum |e| first 200 samples %0d, last 200 samples %0d", err_first, err_last);
    for (int k = 0; k < T; k++) begin
      longint dv;
      dv = sx(Weights[k], W) - h[k];
      checks++;
      if (dv > 205 || dv < -205) begin
        failures++;
        $display("weight %0d not converged", k);
      end
    end
    checks++;
    if (err_last * 4 > err_first) begin
      failures++;
      $display("error did not shrink");
    end

    // Phase 2: full-scale inputs, saturating error and weights
    m.sat_count = 0;
    for (int i = 0; i < NSAT; i++) begin
      longint x, d;
      Enable = 1;
      Mult_signed = i[1];
      x = sx($urandom, 16);
      d = (i % 2) ? 32767 : -32768;
      Step_size = W'(sx($urandom, 14));  // any sign: exercises the stand-alone multiplier too
      Data_in = W'(x); Desired_in = W'(d);
      #1;
      check_outputs(x, d);
      m.step(x, Step_size);
      n_update++;
      clock_and_check_weights();
    end

    // Phase 3: reset
    Enable = 1; Reset = 1;
    Data_in = W'(100); Desired_in = '0;
    #1;
    check_outputs(100, 0);
    @(posedge clk); #1;
    m.reset();
    n_reset++;
    Reset = 0; Enable = 0;
    for (int k = 0; k < T; k++) check("Weights after reset", sx(Weights[k], W), 0);
    Data_in = W'(1000); Desired_in = W'(300);
    #1;
    check_outputs(1000, 300);
    check("y after reset", sx(y, W), 0);

    $display("updates=%0d holds=%0d resets=%0d saturations=%0d signed=%0d unsigned=%0d negprod=%0d round_up=%0d round_down=%0d",
             n_update, n_hold, n_reset, m.sat_count, n_signed, n_unsigned, n_negprod,
             n_round_up, n_round_down);
    begin
      int seen [9];
      seen = '{n_update, n_hold, n_reset, m.sat_count, n_signed, n_unsigned, n_negprod,
               n_round_up, n_round_down};
      foreach (seen[i]) begin
        checks++;
        if (seen[i] == 0) begin
          failures++;
          $display("mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
