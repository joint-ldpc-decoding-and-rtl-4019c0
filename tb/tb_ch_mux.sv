// tb_ch_mux -- checks selection between z (sel 0) and s (sel 1) and the LLR
// quantisation floor(v / 16) saturated to +-31.
module tb_ch_mux;
  import ldpc_tr_pkg::*;
  logic sel;
  logic signed [11:0] z, s;
  logic signed [CHW-1:0] llr;
  int checks = 0, failures = 0;
  ch_mux #(.W(12), .LSH(4)) dut (.*);
  initial begin
    for (int t = 0; t < 3000; t++) begin
      int a, b, v, expv;
      a = int'($urandom % 4096) - 2048; b = int'($urandom % 4096) - 2048;
      sel = 1'($urandom); z = 12'(a); s = 12'(b);
      v = sel ? b : a;
      expv = v >>> 4;
      if (expv > 31) expv = 31;
      if (expv < -31) expv = -31;
      #1; checks++;
      if (llr !== CHW'(expv)) begin failures++; $display("FAIL sel %0b z %0d s %0d: %0d exp %0d", sel, a, b, llr, expv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
