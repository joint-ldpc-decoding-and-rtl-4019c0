// tb_sample_buffer -- checks the frame store: random writes over the whole
// depth, read back through both read ports (port 1 one address ahead, as the
// interpolator uses it), and reads beyond the end returning 0.
module tb_sample_buffer;
  localparam int W = 12, DEPTH = 100, AW = $clog2(DEPTH + 2);
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [AW-1:0] waddr, raddr0, raddr1;
  logic signed [W-1:0] wdata, rdata0, rdata1;
  int checks = 0, failures = 0;
  logic signed [W-1:0] ref_mem [DEPTH];

  sample_buffer #(.W(W), .DEPTH(DEPTH)) dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; waddr = '0; wdata = '0; raddr0 = '0; raddr1 = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = AW'(a); wdata = W'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH + 2; a++) begin
      raddr0 = AW'(a); raddr1 = AW'(a + 1); #1;
      checks++;
      if (rdata0 !== ((a < DEPTH) ? ref_mem[a] : '0)) begin failures++; $display("FAIL port0 @%0d", a); end
      checks++;
      if (rdata1 !== ((a + 1 < DEPTH) ? ref_mem[a+1] : '0)) begin failures++; $display("FAIL port1 @%0d", a+1); end
    end
    // a write with we low must not change the store
    @(negedge clk); we = 0; waddr = 7; wdata = ~ref_mem[7];
    @(negedge clk); raddr0 = 7; #1; checks++;
    if (rdata0 !== ref_mem[7]) begin failures++; $display("FAIL write without enable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
