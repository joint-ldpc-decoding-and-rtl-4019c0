// tb_ldpc_decoder -- self-checking test of the layered min-sum LDPC decoder at
// the full code size (N = 1944).
//
// The testbench builds its own codewords: random information bits, then the
// parity blocks from the dual-diagonal structure of the base matrix
// (p0 = sum of all block-row partial syndromes, p1 = lambda0 + P^1 p0,
// p(b+1) = lambda_b + p(b) [+ p0 in block row 6]), and checks every codeword
// against the full parity-check matrix before use. It then checks:
//  1. a noiseless codeword: all checks satisfied after one iteration, hard
//     decisions equal the codeword, and the run takes exactly
//     2*E*n_iter + E + 1 cycles (E = 86*Z edges);
//  2. noisy codewords (BPSK + Gaussian noise, about 3 dB Eb/N0): after one
//     iteration the reported count equals the count of satisfied checks the
//     testbench computes from the decoder's own hard decisions; after 10
//     iterations the codeword is recovered;
//  3. update loading: a frame of zero LLRs followed by an update load of the
//     codeword's LLRs yields the codeword's hard decisions without decoding.
module tb_ldpc_decoder;
  import ldpc_tr_pkg::*;
  localparam int Z = 81;
  localparam int N = NB * Z;
  localparam int M = MB * Z;
  localparam int E = HB_NBLK * Z;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic load_start, load_update, ch_valid, run;
  logic signed [CHW-1:0] ch_llr;
  logic [5:0] n_iter;
  logic busy, done;
  logic [10:0] sat_cnt;
  logic [$clog2(N)-1:0] hd_addr;
  logic hd_bit;

  ldpc_decoder #(.Z(Z)) dut (.*);

  int checks = 0, failures = 0;
  bit cw [N];
  int llr [N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int hcol(int b, int c, int r);
    return c * Z + ((r + (HB[b][c] % Z)) % Z);
  endfunction

  task automatic encode();
    bit lam [MB][Z];
    bit p0 [Z];
    for (int n = 0; n < 12 * Z; n++) cw[n] = 1'($urandom);
    for (int b = 0; b < MB; b++)
      for (int r = 0; r < Z; r++) begin
        lam[b][r] = 0;
        for (int c = 0; c < 12; c++) if (HB[b][c] >= 0) lam[b][r] ^= cw[hcol(b, c, r)];
      end
    for (int r = 0; r < Z; r++) begin
      p0[r] = 0;
      for (int b = 0; b < MB; b++) p0[r] ^= lam[b][r];
    end
    for (int r = 0; r < Z; r++) cw[12*Z + r] = p0[r];
    for (int r = 0; r < Z; r++) cw[13*Z + r] = lam[0][r] ^ p0[(r + 1) % Z];
    for (int b = 1; b < 11; b++)
      for (int r = 0; r < Z; r++)
        cw[(13+b)*Z + r] = lam[b][r] ^ cw[(12+b)*Z + r] ^ ((b == 6) ? p0[r] : 1'b0);
  endtask

  function automatic int satisfied(bit v [N]);
    int s = 0;
    for (int b = 0; b < MB; b++)
      for (int r = 0; r < Z; r++) begin
        bit p = 0;
        for (int c = 0; c < NB; c++) if (HB[b][c] >= 0) p ^= v[hcol(b, c, r)];
        if (!p) s++;
      end
    return s;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  task automatic make_llr(input real sigma, input real scale);
    for (int n = 0; n < N; n++) begin
      real y = (cw[n] ? -1.0 : 1.0) + sigma * gauss();
      int q = int'($floor(y * scale + 0.5));
      if (q > 31) q = 31;
      if (q < -31) q = -31;
      llr[n] = q;
    end
  endtask

  task automatic load(input bit upd, input bit zero);
    @(negedge clk); load_start = 1; load_update = upd;
    @(negedge clk); load_start = 0;
    for (int n = 0; n < N; n++) begin
      ch_valid = 1; ch_llr = zero ? '0 : CHW'(llr[n]);
      @(negedge clk);
    end
    ch_valid = 0;
  endtask

  task automatic decode(input int it, output int cycles);
    @(negedge clk); run = 1; n_iter = 6'(it);
    @(posedge clk); #1 run = 0; cycles = 0;
    while (!done) begin @(posedge clk); #1 cycles++; end
  endtask

  task automatic read_hd(output bit v [N]);
    for (int n = 0; n < N; n++) begin
      hd_addr = $clog2(N)'(n); #1 v[n] = hd_bit;
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hd [N];
    int cyc, mism;
    load_start = 0; load_update = 0; ch_valid = 0; run = 0; ch_llr = '0; n_iter = '0; hd_addr = '0;
    repeat (3) @(negedge clk); rst_n = 1;

    // 1. noiseless codeword
    encode();
    check(satisfied(cw) == M, "encoder produced a non-codeword");
    make_llr(0.0, 20.0);
    load(0, 0);
    decode(1, cyc);
    check(sat_cnt == 11'(M), $sformatf("clean: sat_cnt %0d != %0d", sat_cnt, M));
    check(cyc == 2*E + E + 1, $sformatf("clean: cycles %0d != %0d", cyc, 3*E + 1));
    read_hd(hd);
    mism = 0; for (int n = 0; n < N; n++) if (hd[n] != cw[n]) mism++;
    check(mism == 0, $sformatf("clean: %0d wrong decisions", mism));

    // 2. noisy codewords
    for (int t = 0; t < 3; t++) begin
      encode();
      make_llr(0.70, 8.0);
      load(0, 0);
      decode(1, cyc);
      read_hd(hd);
      check(sat_cnt == 11'(satisfied(hd)),
            $sformatf("noisy %0d: sat_cnt %0d, hard decisions satisfy %0d", t, sat_cnt, satisfied(hd)));
      check(sat_cnt < 11'(M), "noisy frame already satisfied after one iteration");
      load(0, 0);
      decode(10, cyc);
      check(cyc == 2*E*10 + E + 1, $sformatf("noisy: cycles %0d", cyc));
      read_hd(hd);
      mism = 0; for (int n = 0; n < N; n++) if (hd[n] != cw[n]) mism++;
      check(mism == 0 && sat_cnt == 11'(M), $sformatf("noisy %0d: %0d errors, sat %0d", t, mism, sat_cnt));
    end

    // 3. update loading
    encode();
    make_llr(0.0, 20.0);
    load(0, 1);
    load(1, 0);
    read_hd(hd);
    mism = 0; for (int n = 0; n < N; n++) if (hd[n] != cw[n]) mism++;
    check(mism == 0, $sformatf("update load: %0d wrong decisions", mism));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
