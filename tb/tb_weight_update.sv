// tb_weight_update: random step sizes, errors and tap samples with random
// enable and reset; the registered weights are compared every cycle with
// w_k + (roba(roba(mu, e) >> 12, x_k) >> 12), saturated.
module tb_weight_update;
  import roba_ref_pkg::*;
  localparam int W = 16, T = 4, FRAC = 12;
  logic clk = 0, reset, enable;
  logic [W-1:0] step_size, error;
  logic [T-1:0][W-1:0] x_taps, weights;
  longint model [T];
  int checks = 0, failures = 0, updates = 0, sats = 0;

  weight_update #(.W(W), .T(T), .FRAC(FRAC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; enable = 0; step_size = '0; error = '0; x_taps = '0;
    @(posedge clk); #1;
    foreach (model[k]) model[k] = 0;
    for (int i = 0; i < 3000; i++) begin
      longint mue, nw;
      reset     = ($urandom % 200) == 0;
      enable    = ($urandom % 4) != 0;
      step_size = W'(sx($urandom, 13));
      error     = (i % 7 == 0) ? W'($urandom) : W'(sx($urandom, 13));
      for (int k = 0; k < T; k++) x_taps[k] = W'(sx($urandom, 14));
      #1;
      mue = ref_sat(asr(ref_roba(step_size, error, W, 1), FRAC), W);
      @(posedge clk);
      if (reset) foreach (model[k]) model[k] = 0;
      else if (enable) begin
        updates++;
        for (int k = 0; k < T; k++) begin
          nw = model[k] + asr(ref_roba(mue, x_taps[k], W, 1), FRAC);
          if (ref_sat(nw, W) != nw) sats++;
          model[k] = ref_sat(nw, W);
        end
      end
      #1;
      for (int k = 0; k < T; k++) begin
        checks++;
        if (longint'($signed(weights[k])) != model[k]) begin
          failures++;
          if (failures < 10) $display("i=%0d w[%0d]=%0d exp %0d", i, k, $signed(weights[k]), model[k]);
        end
      end
    end
    $display("updates=%0d saturations=%0d", updates, sats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
