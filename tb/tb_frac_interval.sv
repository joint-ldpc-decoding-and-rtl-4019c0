// tb_frac_interval -- checks mu = floor(2**8 * eta / w) for random eta < w,
// including control words around 0.5 and corner values.
module tb_frac_interval;
  import ldpc_tr_pkg::*;
  logic [NF-1:0] eta, w;
  logic [MUW-1:0] mu;
  int checks = 0, failures = 0;
  frac_interval dut (.*);
  initial begin
    for (int t = 0; t < 2000; t++) begin
      longint e, ww, expv;
      ww = (t < 1000) ? longint'(8388608 + int'($urandom % 40000) - 20000) : longint'(1 + $urandom % 16777215);
      e  = longint'($urandom) % ww;
      if (t == 0) e = 0;
      if (t == 1) e = ww - 1;
      eta = NF'(e); w = NF'(ww);
      expv = (e * 256) / ww;
      #1; checks++;
      if (mu !== MUW'(expv)) begin failures++; $display("FAIL eta %0d w %0d mu %0d exp %0d", e, ww, mu, expv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
