// tb_matched_filter -- checks the 12-tap root-raised-cosine filter: the
// impulse response must equal round(256 h((n - 5.5)/2) / 2) recomputed here
// from the pulse formula (roll-off 0.3), random input must match a direct
// convolution with saturation, and 'clear' must empty the delay line.
module tb_matched_filter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, in_valid, out_valid;
  logic signed [11:0] in_y, out_q;
  int checks = 0, failures = 0;
  int coef [12];
  int hist [$];

  matched_filter #(.W(12)) dut (.*);

  function automatic real rrc(real t);
    real b = 0.3, pi = 3.141592653589793;
    if (t < 1e-9 && t > -1e-9) return 1.0 - b + 4.0 * b / pi;
    return ($sin(pi * t * (1.0 - b)) + 4.0 * b * t * $cos(pi * t * (1.0 + b))) /
           (pi * t * (1.0 - (4.0 * b * t) ** 2));
  endfunction

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic push(input int v);
    @(negedge clk); in_valid = 1; in_y = 12'(v);
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    for (int n = 0; n < 12; n++) coef[n] = int'($floor(256.0 * rrc((n - 5.5) / 2.0) / 2.0 + 0.5));
    clear = 0; in_valid = 0; in_y = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // impulse response (input 256 -> output equals the tap)
    for (int n = 0; n < 12; n++) begin
      push(n == 0 ? 256 : 0);
      checks++;
      if (out_q !== 12'(coef[n])) begin failures++; $display("FAIL tap %0d: %0d exp %0d", n, out_q, coef[n]); end
    end
    // random input
    for (int t = 0; t < 400; t++) begin
      int v, acc, expv;
      v = int'($urandom % 1024) - 512;
      if (t % 50 == 7) v = 2047;
      hist.push_front(v);
      push(v);
      acc = 0;
      for (int n = 0; n < 12 && n < hist.size(); n++) acc += coef[n] * hist[n];
      expv = acc >>> 8;
      if (expv > 2047) expv = 2047;
      if (expv < -2048) expv = -2048;
      checks++;
      if (out_q !== 12'(expv)) begin failures++; $display("FAIL t %0d: %0d exp %0d", t, out_q, expv); end
    end
    // clear
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    push(0);
    checks++;
    if (out_q !== 12'(0)) begin failures++; $display("FAIL after clear: %0d", out_q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
