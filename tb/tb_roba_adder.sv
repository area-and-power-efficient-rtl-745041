// tb_roba_adder: random and extreme operands against integer addition.
module tb_roba_adder;
  localparam int W = 17;
  logic [W-1:0] x, y;
  logic [W:0]   sum;
  int checks = 0, failures = 0;

  roba_adder #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      x = (i == 0) ? '1 : W'($urandom);
      y = (i == 0) ? '1 : W'($urandom);
      #1;
      checks++;
      if (longint'(sum) != longint'(x) + longint'(y)) begin
        failures++;
        if (failures < 10) $display("%0d + %0d got %0d", x, y, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
