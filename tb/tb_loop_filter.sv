// tb_loop_filter -- checks c[i+1] = c[i] + KP u[i] (two gains), that c holds
// without step and that clear returns it to 0.
module tb_loop_filter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, step;
  logic signed [13:0] u;
  logic signed [23:0] c1, c3;
  int checks = 0, failures = 0;

  loop_filter #(.UW(14), .CW(24), .KP(1)) dut1 (.clk, .rst_n, .clear, .step, .u, .c(c1));
  loop_filter #(.UW(14), .CW(24), .KP(3)) dut3 (.clk, .rst_n, .clear, .step, .u, .c(c3));

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int acc;
    clear = 0; step = 0; u = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    acc = 0;
    for (int i = 0; i < 300; i++) begin
      int uv;
      uv = int'($urandom % 8000) - 4000;
      u = 14'(uv); step = (i % 5 != 3);
      @(negedge clk);
      if (i % 5 != 3) acc += uv;
      checks++;
      if (c1 !== 24'(acc) || c3 !== 24'(3 * acc)) begin
        failures++; $display("FAIL i %0d: c %0d/%0d exp %0d", i, c1, c3, acc);
      end
    end
    step = 0; clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (c1 !== '0 || c3 !== '0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
