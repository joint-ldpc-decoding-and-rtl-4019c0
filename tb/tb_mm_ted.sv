// tb_mm_ted -- checks u[i] = d[i-1] s[i] - d[i] s[i-1] over random symbol
// sequences, that u is 0 for the first symbol after clear and when disabled,
// and the detector's sign on a sampled raised-cosine pulse train: samples
// taken late must give a negative mean error, early ones a positive mean.
module tb_mm_ted;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, en, step, d_bit;
  logic signed [11:0] s;
  logic signed [13:0] u;
  int checks = 0, failures = 0;

  mm_ted #(.W(12)) dut (.*);

  function automatic real rc(real t);
    real b = 0.3, pi = 3.141592653589793, den;
    den = 1.0 - (2.0 * b * t) ** 2;
    if (t < 1e-9 && t > -1e-9) return 1.0;
    if (den < 1e-6 && den > -1e-6) return (pi / 4.0) * $sin(pi * t) / (pi * t);
    return ($sin(pi * t) / (pi * t)) * $cos(pi * b * t) / den;
  endfunction

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int sp, dp;
    clear = 0; en = 1; step = 0; d_bit = 0; s = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    sp = 0; dp = 1;
    for (int i = 0; i < 500; i++) begin
      int sv, dv, expv;
      sv = int'($urandom % 4000) - 2000; dv = int'($urandom % 2);
      en = (i % 97 != 50);
      s = 12'(sv); d_bit = 1'(dv); #1;
      expv = (i == 0 || !en) ? 0 : ((dp ? -1 : 1) * sv - (dv ? -1 : 1) * sp);
      checks++;
      if (u !== 14'(expv)) begin failures++; $display("FAIL i %0d: u %0d exp %0d", i, u, expv); end
      @(negedge clk); step = 1; @(negedge clk); step = 0;
      sp = sv; dp = dv;
    end
    en = 1;
    // sign of the error on a noiseless raised-cosine pulse train
    for (int dir = -1; dir <= 1; dir += 2) begin
      int a [64];
      longint sum;
      real dl;
      dl = 0.15 * dir;
      for (int i = 0; i < 64; i++) a[i] = ($urandom % 2) ? 1 : -1;
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      sum = 0;
      for (int i = 0; i < 64; i++) begin
        real y;
        y = 0.0;
        for (int m = 0; m < 64; m++) y += a[m] * rc(real'(i - m) + dl);
        s = 12'(int'(y * 128.0)); d_bit = (a[i] < 0); #1;
        sum += longint'(u);
        @(negedge clk); step = 1; @(negedge clk); step = 0;
      end
      checks++;
      if ((dir > 0 && sum >= 0) || (dir < 0 && sum <= 0)) begin
        failures++; $display("FAIL sign: delay %f gives sum %0d", dl, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
