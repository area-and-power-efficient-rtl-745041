// tb_delay_unit: random data with random enable and occasional reset,
// compared cycle by cycle with a one-word model.
module tb_delay_unit;
  localparam int W = 16;
  logic clk = 0, reset, enable;
  logic [W-1:0] data_in, delay_out;
  logic [W-1:0] model;
  int checks = 0, failures = 0;

  delay_unit #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; enable = 0; data_in = '0;
    @(posedge clk); #1;
    model = '0;
    for (int i = 0; i < 1000; i++) begin
      reset   = ($urandom % 50) == 0;
      enable  = $urandom % 3 != 0;
      data_in = W'($urandom);
      @(posedge clk);
      if (reset) model = '0;
      else if (enable) model = data_in;
      #1;
      checks++;
      if (delay_out != model) begin
        failures++;
        if (failures < 10) $display("cycle %0d got %h exp %h", i, delay_out, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
