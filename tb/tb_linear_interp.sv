// tb_linear_interp -- checks y = floor(x0 + mu (x1 - x0) / 256) against an
// integer reference for random and extreme operands.
module tb_linear_interp;
  logic signed [11:0] x0, x1, y;
  logic [7:0] mu;
  int checks = 0, failures = 0;
  linear_interp #(.W(12), .MUW(8)) dut (.*);
  initial begin
    for (int t = 0; t < 5000; t++) begin
      int a, b, m, expv;
      a = int'($urandom % 4096) - 2048; b = int'($urandom % 4096) - 2048; m = int'($urandom % 256);
      if (t == 0) begin a = -2048; b = 2047; m = 255; end
      if (t == 1) begin a = 2047; b = -2048; m = 255; end
      x0 = 12'(a); x1 = 12'(b); mu = 8'(m);
      expv = a + int'($floor(real'((b - a) * m) / 256.0));
      #1; checks++;
      if (y !== 12'(expv)) begin failures++; $display("FAIL %0d %0d %0d -> %0d exp %0d", a, b, m, y, expv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
