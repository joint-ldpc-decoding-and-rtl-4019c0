// tb_interp3 -- checks the loop-2 interpolator: for random symbol indices,
// delay words and loop-filter corrections c (Ti units, 16 fraction bits) the
// read address must be floor(P / 256) with P = 512 i + pos + floor(c / 256),
// the second address one more, and s the linear interpolation of a q table
// at those addresses.
module tb_interp3;
  import ldpc_tr_pkg::*;
  logic [10:0] sym_idx;
  logic [POSW-1:0] pos;
  logic signed [23:0] c;
  logic [12:0] raddr0, raddr1;
  logic signed [11:0] q0, q1, s;
  int checks = 0, failures = 0;
  int qt [8192];

  interp3 #(.W(12), .AW(13), .IW(11), .CW(24), .CF(16)) dut (.*);

  always_comb begin
    q0 = 12'(qt[raddr0]);
    q1 = 12'(qt[raddr1]);
  end

  initial begin
    for (int a = 0; a < 8192; a++) qt[a] = int'($urandom % 3000) - 1500;
    for (int t = 0; t < 3000; t++) begin
      int i, p, cc, P, a, m, expv;
      i  = int'($urandom % 1944);
      p  = 3200 + int'($urandom % 500);
      cc = int'($urandom % 400000) - 200000;
      sym_idx = 11'(i); pos = POSW'(p); c = 24'(cc);
      P = 512 * i + p + (cc >>> 8);
      a = P >>> 8; m = P & 255;
      expv = qt[a] + int'($floor(real'((qt[a+1] - qt[a]) * m) / 256.0));
      #1; checks++;
      if (raddr0 !== 13'(a) || raddr1 !== 13'(a + 1) || s !== 12'(expv)) begin
        failures++; $display("FAIL i %0d pos %0d c %0d: addr %0d exp %0d, s %0d exp %0d", i, p, cc, raddr0, a, s, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
