// tb_roba_subtractor: random minuend >= subtrahend pairs whose difference
// fits the output, against integer subtraction.
module tb_roba_subtractor;
  localparam int WI = 18, WO = 16;
  logic [WI-1:0] minuend, subtrahend;
  logic [WO-1:0] diff;
  int checks = 0, failures = 0;

  roba_subtractor #(.WI(WI), .WO(WO)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      longint d, s;
      d = longint'($urandom) & 64'hFFFF;
      s = longint'($urandom) % (longint'(1) << WI - 1);
      if (i == 0) begin d = 65535; s = 131071 - 65535; end
      minuend    = WI'(s + d);
      subtrahend = WI'(s);
      #1;
      checks++;
      if (longint'(diff) != d) begin
        failures++;
        if (failures < 10) $display("%0d - %0d got %0d", s + d, s, diff);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
