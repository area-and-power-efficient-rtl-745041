// tb_sign_set: all sign/mode combinations with random magnitudes, against
// integer negation.
module tb_sign_set;
  localparam int W = 16;
  logic [W-1:0] mag, result;
  logic sign_a, sign_b, is_signed;
  int checks = 0, failures = 0;

  sign_set #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 800; i++) begin
      longint e;
      {is_signed, sign_a, sign_b} = 3'(i);
      mag = W'($urandom) & 16'h3FFF;
      #1;
      e = (is_signed && (sign_a != sign_b)) ? -longint'(mag) : longint'(mag);
      checks++;
      if (result != W'(e)) begin
        failures++;
        if (failures < 10) $display("mag=%0d s=%b%b%b got %0d", mag, is_signed, sign_a, sign_b, result);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
