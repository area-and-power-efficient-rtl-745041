// tb_roba_mult: exhaustive check of the 8-bit ROBA multiplier in unsigned and
// signed mode, and a random check of a 16-bit signed one, against the integer
// model A_r*B + B_r*A - A_r*B_r. It also reports the mean absolute relative error of
// the 8-bit unsigned products against exact multiplication.
module tb_roba_mult;
  import roba_ref_pkg::*;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic        s8;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  int checks = 0, failures = 0;
  real rel_err_sum = 0.0;
  int  rel_err_n = 0;

  roba_mult #(.N(8))  dut8  (.a(a8),  .b(b8),  .is_signed(s8),   .prod(p8));
  roba_mult #(.N(16)) dut16 (.a(a16), .b(b16), .is_signed(1'b1), .prod(p16));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; b16 = '0;
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++) begin
          longint e;
          s8 = m[0]; a8 = 8'(i); b8 = 8'(j);
          #1;
          e = ref_roba(i, j, 8, m[0]);
          checks++;
          if (p8 != 16'(e)) begin
            failures++;
            if (failures < 10) $display("N=8 s=%0d %0d*%0d got %0d exp %0d", m, i, j, p8, e);
          end
          if (m == 0 && i > 0 && j > 0) begin
            rel_err_sum += (real'(i * j) > real'(p8) ? real'(i * j) - real'(p8) : real'(p8) - real'(i * j)) / real'(i * j);
            rel_err_n++;
          end
        end
    for (int t = 0; t < 20000; t++) begin
      longint e;
      a16 = (t == 0) ? 16'h8000 : 16'($urandom);
      b16 = (t == 0) ? 16'h8000 : (t == 1) ? 16'h7FFF : 16'($urandom);
      #1;
      e = ref_roba(a16, b16, 16, 1);
      checks++;
      if (p16 != 32'(e)) begin
        failures++;
        if (failures < 10) $display("N=16 %0d*%0d got %0d exp %0d", $signed(a16), $signed(b16), $signed(p16), e);
      end
    end
    $display("mean absolute relative error (8-bit unsigned): %f", rel_err_sum / rel_err_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
