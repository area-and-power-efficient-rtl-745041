// tb_rounding: exhaustive check of the 8-bit rounding stage against a
// distance-comparing nearest-power-of-two search; also counts values that
// round up and down so both directions are exercised.
module tb_rounding;
  import roba_ref_pkg::*;
  localparam int N = 8;
  logic [N-1:0] mag;
  logic [N:0]   pow2;
  int checks = 0, failures = 0, ups = 0, downs = 0;

  rounding #(.N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      longint r;
      mag = N'(i);
      #1;
      r = ref_round(i);
      if (r > i) ups++;
      if (r < i) downs++;
      checks++;
      if (longint'(pow2) != r) begin
        failures++;
        if (failures < 10) $display("mag=%0d pow2=%0d expected %0d", i, pow2, r);
      end
    end
    checks++;
    if (ups == 0 || downs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
