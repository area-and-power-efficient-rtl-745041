// tb_sign_detector: exhaustive check of the 8-bit sign detector in both
// modes against integer absolute values and sign bits.
module tb_sign_detector;
  import roba_ref_pkg::*;
  localparam int N = 8;
  logic [N-1:0] a, b, abs_a, abs_b;
  logic is_signed, sign_a, sign_b;
  int checks = 0, failures = 0;

  sign_detector #(.N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < 256; i++) begin
        longint va, vb;
        is_signed = m[0];
        a = N'(i);
        b = N'(255 - i);
        #1;
        va = is_signed ? sx(i, N) : i;
        vb = is_signed ? sx(255 - i, N) : 255 - i;
        checks++;
        if (abs_a != N'(va < 0 ? -va : va) || abs_b != N'(vb < 0 ? -vb : vb) ||
            sign_a != (va < 0) || sign_b != (vb < 0)) begin
          failures++;
          if (failures < 10) $display("mismatch mode=%0d a=%0d", m, i);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
