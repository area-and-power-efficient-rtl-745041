// tb_lms_filter: system identification. An unknown 4-tap system with weights
// 0.5, -0.3, 0.2, 0.1 (Q4.12) filters a random input; its exact output is the
// desired signal. The filter's y, e and weights are compared every cycle
// with a bit-level model, enable is dropped now and then, and at the end the
// weights must be close to the unknown system's and the error must have
// shrunk.
module tb_lms_filter;
  import roba_ref_pkg::*;
  localparam int W = 16, T = 4, FRAC = 12, NSAMP = 3000;
  logic clk = 0, reset, enable;
  logic [W-1:0] data_in, desired_in, step_size, error_out, y_out;
  logic [T-1:0][W-1:0] weights;
  longint h [T] = '{2048, -1229, 819, 410};
  longint hist [T];
  lms_model m;
  int checks = 0, failures = 0, holds = 0;
  longint err_first = 0, err_last = 0;

  lms_filter #(.W(W), .T(T), .FRAC(FRAC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NSAMP + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = new(W, FRAC, T);
    foreach (hist[k]) hist[k] = 0;
    reset = 1; enable = 0; data_in = '0; desired_in = '0; step_size = W'(2048);
    @(posedge clk); #1;
    reset = 0;
    for (int i = 0; i < NSAMP; i++) begin
      longint x, d;
      enable = (i % 17) != 16;
      x = sx($urandom, 12);  // uniform in [-0.5, 0.5)
      d = 0;
      if (enable) begin
        for (int k = T - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = x;
      end
      for (int k = 0; k < T; k++) d += h[k] * ((k == 0) ? x : hist[k]);
      if (!enable) d = 0;  // unrelated value while idle
      d = asr(d, FRAC);
      data_in = W'(x); desired_in = W'(d);
      #1;
      m.eval(x, d);
      checks += 2;
      if (longint'($signed(y_out)) != m.y) begin
        failures++;
        if (failures < 10) $display("i=%0d y=%0d exp %0d", i, $signed(y_out), m.y);
      end
      if (longint'($signed(error_out)) != m.e) begin
        failures++;
        if (failures < 10) $display("i=%0d e=%0d exp %0d", i, $signed(error_out), m.e);
      end
      if (enable) begin
        if (i < 200) err_first += (m.e < 0) ? -m.e : m.e;
        if (i >= NSAMP - 200) err_last += (m.e < 0) ? -m.e : m.e;
        m.step(x, step_size);
      end else holds++;
      @(posedge clk); #1;
      for (int k = 0; k < T; k++) begin
        checks++;
        if (longint'($signed(weights[k])) != m.wt[k]) begin
          failures++;
          if (failures < 10) $display("i=%0d w[%0d]=%0d exp %0d", i, k, $signed(weights[k]), m.wt[k]);
        end
      end
    end
    $display("final weights %0d %0d %0d %0d (system %0d %0d %0d %0d)",
             sx(weights[0], W), sx(weights[1], W), sx(weights[2], W), sx(weights[3], W),
             h[0], h[1], h[2], h[3]);
    $display("sum |e| first 200: %0d, last 200: %0d, holds %0d", err_first, err_last, holds);
    for (int k = 0; k < T; k++) begin
      longint dv;
      dv = longint'($signed(weights[k])) - h[k];
      checks++;
      if (dv > 205 || dv < -205) failures++;
    end
    checks++;
    if (err_last * 4 > err_first) failures++;
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
