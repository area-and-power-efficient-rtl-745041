// tb_fir_filter: random samples and weights (including full-scale values
// that saturate) against an integer model of sum_k roba(x_k, w_k) >> 12.
module tb_fir_filter;
  import roba_ref_pkg::*;
  localparam int W = 16, T = 4, FRAC = 12;
  logic [T-1:0][W-1:0] x_taps, weights;
  logic [W-1:0] y;
  int checks = 0, failures = 0, sats = 0;

  fir_filter #(.W(W), .T(T), .FRAC(FRAC)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      longint acc, e;
      for (int k = 0; k < T; k++) begin
        x_taps[k]  = (i < 2500) ? W'(sx($urandom, 14)) : W'($urandom);
        weights[k] = (i < 2500) ? W'(sx($urandom, 14)) : W'($urandom);
      end
      #1;
      acc = 0;
      for (int k = 0; k < T; k++) acc += ref_roba(x_taps[k], weights[k], W, 1);
      e = ref_sat(asr(acc, FRAC), W);
      if (e != asr(acc, FRAC)) sats++;
      checks++;
      if (y != W'(e)) begin
        failures++;
        if (failures < 10) $display("i=%0d got %0d exp %0d", i, $signed(y), e);
      end
    end
    checks++;
    if (sats == 0) failures++;
    $display("saturated outputs: %0d", sats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
