// tb_nco -- checks the interpolation NCO. For control words w = 0.5 (1 + e)
// with e from -2600 to +2600 ppm the testbench follows the ideal interpolant
// instants t_j = j / w (in samples) in real arithmetic and checks that the
// overflow flag marks exactly the samples k with k <= t_j < k + 1, and that
// eta / w reproduces the fractional part to within 2**-16.
module tb_nco;
  import ldpc_tr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic restart, step, ovf;
  logic [NF-1:0] w, eta;
  int checks = 0, failures = 0;

  nco dut (.*);

  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int ppm_list [5] = '{0, 1730, -2000, 2600, -700};
    restart = 0; step = 0; w = NF'(1) << (NF-1);
    repeat (2) @(negedge clk); rst_n = 1;
    foreach (ppm_list[p]) begin
      real wr, tj;
      int j, k;
      wr = 0.5 * (1.0 + ppm_list[p] * 1.0e-6);
      w  = NF'(longint'(wr * 16777216.0));
      wr = real'(w) / 16777216.0;
      @(negedge clk); restart = 1; @(negedge clk); restart = 0;
      j = 0; tj = 0.0;
      for (k = 0; k < 4000; k++) begin
        bit exp_ovf;
        exp_ovf = (tj >= real'(k)) && (tj < real'(k + 1));
        #1; checks++;
        if (ovf !== exp_ovf) begin
          failures++; $display("FAIL ppm %0d sample %0d: ovf %0b expected %0b", ppm_list[p], k, ovf, exp_ovf);
        end
        if (exp_ovf) begin
          real mu_ref, mu_dut;
          mu_ref = tj - real'(k);
          mu_dut = (real'(eta) / 16777216.0) / wr;
          checks++;
          if (mu_dut - mu_ref > 1.0e-4 || mu_ref - mu_dut > 1.0e-4) begin
            failures++; $display("FAIL ppm %0d sample %0d: mu %f expected %f", ppm_list[p], k, mu_dut, mu_ref);
          end
          j++; tj = real'(j) / wr;
        end
        @(negedge clk); step = 1; @(negedge clk); step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
