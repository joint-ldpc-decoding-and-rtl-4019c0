// tb_resample -- checks the frequency-word to NCO-word conversion
// w = 2**24 * 0.5 * (1 + v * 1e-6) (within 2 LSB) for the ppm values of a
// search, that w only changes on a sample tick, and that it follows the tick
// after v is captured.
module tb_resample;
  import ldpc_tr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic v_valid, tick;
  logic signed [PPMW-1:0] v;
  logic [NF-1:0] w;
  int checks = 0, failures = 0;

  resample dut (.*);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int vl [9] = '{0, 400, -400, 1730, -2000, 2000, 2600, -2600, 100};
    v_valid = 0; tick = 0; v = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); checks++;
    if (w !== 24'h800000) begin failures++; $display("FAIL reset w %h", w); end
    foreach (vl[n]) begin
      logic [NF-1:0] w_before;
      real expw;
      @(negedge clk); v_valid = 1; v = PPMW'(vl[n]);
      @(negedge clk); v_valid = 0; w_before = w;
      repeat (2) @(negedge clk);
      checks++;
      if (w !== w_before) begin failures++; $display("FAIL w changed without tick"); end
      tick = 1; @(negedge clk); tick = 0;
      expw = 8388608.0 * (1.0 + vl[n] * 1.0e-6);
      checks++;
      if (real'(w) - expw > 2.0 || expw - real'(w) > 2.0) begin
        failures++; $display("FAIL v %0d: w %0d exp %f", vl[n], w, expw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
