// tb_interp2 -- checks the delay interpolator/decimator. A known stream
// q[j] is fed with gaps between valid beats; for several delay words
// pos = b*256 + mu the outputs must appear exactly at j = 2i + b + 1 and equal
// q[2i+b] + floor(mu (q[2i+b+1] - q[2i+b]) / 256).
module tb_interp2;
  import ldpc_tr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic restart, q_valid, z_valid;
  logic [POSW-1:0] pos;
  logic signed [11:0] q, z;
  int checks = 0, failures = 0;
  int qs [200];

  interp2 #(.W(12)) dut (.*);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int poslist [4] = '{3456, 3251, 3661, 256};
    restart = 0; q_valid = 0; q = '0; pos = '0;
    for (int j = 0; j < 200; j++) qs[j] = int'($urandom % 2000) - 1000;
    repeat (2) @(negedge clk); rst_n = 1;
    foreach (poslist[p]) begin
      int b, m, nz;
      b = poslist[p] / 256; m = poslist[p] % 256; nz = 0;
      pos = POSW'(poslist[p]);
      @(negedge clk); restart = 1; @(negedge clk); restart = 0;
      for (int j = 0; j < 200; j++) begin
        q_valid = 1; q = 12'(qs[j]); #1;
        checks++;
        if (j > b && ((j - b - 1) % 2 == 0)) begin
          int expv;
          expv = qs[j-1] + int'($floor(real'((qs[j] - qs[j-1]) * m) / 256.0));
          if (!z_valid || z !== 12'(expv)) begin
            failures++; $display("FAIL pos %0d j %0d: valid %0b z %0d exp %0d", poslist[p], j, z_valid, z, expv);
          end
          nz++;
        end else if (z_valid) begin
          failures++; $display("FAIL pos %0d j %0d: unexpected output", poslist[p], j);
        end
        @(negedge clk); q_valid = 0;
        if (j % 3 == 0) @(negedge clk);
      end
      checks++;
      if (nz != (200 - b) / 2) begin failures++; $display("FAIL pos %0d: %0d outputs", poslist[p], nz); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
