// tb_shifter: every one-hot power (and zero) against random operands,
// compared with an integer multiplication.
module tb_shifter;
  localparam int WP = 9, WA = 9, WO = 17;
  logic [WP-1:0] pow2;
  logic [WA-1:0] operand;
  logic [WO-1:0] product;
  int checks = 0, failures = 0;

  shifter #(.WP(WP), .WA(WA), .WO(WO)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = -1; k < WP; k++)
      for (int r = 0; r < 50; r++) begin
        longint p, e;
        p = (k < 0) ? 0 : (longint'(1) << k);
        pow2    = WP'(p);
        operand = (r == 0) ? '1 : WA'($urandom);
        #1;
        e = p * longint'(operand);
        checks++;
        if (longint'(product) != e) begin
          failures++;
          if (failures < 10) $display("pow2=%0d op=%0d got %0d", p, operand, product);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
