// tb_ldpc_timing_rx -- end-to-end test of the receiver at its default size
// (N = 1944 symbols, 4 samples per symbol).
//
// The testbench encodes a random frame with the (1944, 972) code, maps it to
// BPSK, shapes it with a unit-energy root-raised-cosine pulse (roll-off 0.3,
// truncated to +-8 symbols) and samples it with receiver-side timing errors
//   tau[k] = D + (k - PRE) Ts F_ppm 1e-6 + random walk,
// i.e. a constant delay D, a frequency offset from symbol 0 on and, for the
// second frame, a Gaussian random walk; Gaussian noise, band-limited as an
// analog anti-aliasing filter would leave it, sets Eb/N0.
// Samples are scaled to 1.0 = 128 and fed one per clock.
// Checks per frame: the final frequency estimate lies within 150 ppm of the
// injected offset; the chosen delay word lies within one 0.2 T step of the
// injected delay; the decoded frame equals the transmitted codeword; the last
// decoder run satisfies all checks; the processing time after capture is
// within 1 % of the schedule's cycle count. It also counts how often each mechanism
// of the receiver ran and fails if one never did: front-end passes, NCO
// overflows (interpolants), loop-1 candidate scores (expected
// 11 * (5 + 2) = 77), frequency-window recentrings, delay candidates,
// loop-2 passes, non-zero timing-error outputs and decoder channel loads
// through mux input 1.
module tb_ldpc_timing_rx;
  import ldpc_tr_pkg::*;
  localparam int Z = 81;
  localparam int N = NB * Z;
  localparam int M = MB * Z;
  localparam int E = HB_NBLK * Z;
  localparam int PRE = 16;
  localparam int XDEPTH = 4 * N + 96;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, x_valid, d_valid, d_bit, done, sat_valid;
  logic signed [SW-1:0] x_data;
  rx_phase_e phase;
  logic signed [PPMW-1:0] cand_ppm, freq_est;
  logic [POSW-1:0] cand_pos, delay_pos;
  logic [10:0] sat_cnt;
  rx_events_t events;

  ldpc_timing_rx dut (.*);

  int checks = 0, failures = 0;
  bit cw [N];

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

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  function automatic real rrc(real t);
    real b, pi, x;
    b = 0.3; pi = 3.141592653589793;
    if (t < 1e-7 && t > -1e-7) return 1.0 - b + 4.0 * b / pi;
    x = 4.0 * b * t;
    if (x * x > 0.999999 && x * x < 1.000001)
      return (b / $sqrt(2.0)) * ((1.0 + 2.0 / pi) * $sin(pi / (4.0 * b)) + (1.0 - 2.0 / pi) * $cos(pi / (4.0 * b)));
    return ($sin(pi * t * (1.0 - b)) + x * $cos(pi * t * (1.0 + b))) / (pi * t * (1.0 - x * x));
  endfunction

  // mechanism counters
  int n_fe, n_ovf, n_score, n_recenter, n_dcand, n_l2pass, n_ted, n_sel1;
  rx_phase_e prev_phase;
  always @(posedge clk) if (rst_n) begin
    prev_phase <= phase;
    if (phase == RX_FE && prev_phase != RX_FE) n_fe++;
    if (events.interp) n_ovf++;
    if (phase == RX_L1_DEC && sat_valid) n_score++;
    if (events.recenter) n_recenter++;
    if (phase == RX_L2_PASS && prev_phase != RX_L2_PASS) n_l2pass++;
    if (events.ted_nz) n_ted++;
    if (events.l2_sym) n_sel1++;
    if (events.dly_next) n_dcand++;
  end

  // Noise as seen behind an analog anti-aliasing filter: white Gaussian noise
  // at the sample rate, low-pass filtered with a 33-tap Hamming-windowed sinc
  // (cutoff 0.8/T, above the 0.65/T signal band, unity gain in the band), so
  // the in-band noise density is that of the white noise and Eb/N0 holds at
  // the matched filter. Interpolator 1 keeps 2 samples per symbol without
  // further filtering, so white noise over the full 4/T band would alias into
  // the signal band and cost 3 dB.
  real nz [XDEPTH];
  task automatic band_noise();
    real wn [XDEPTH + 32];
    real g [33];
    real gs;
    gs = 0.0;
    for (int m = -16; m <= 16; m++) begin
      real x;
      x = 0.4 * real'(m);
      g[m+16] = ((m == 0) ? 1.0 : $sin(3.141592653589793 * x) / (3.141592653589793 * x))
                * (0.54 + 0.46 * $cos(3.141592653589793 * real'(m) / 16.0));
      gs += g[m+16];
    end
    foreach (wn[i]) wn[i] = gauss();
    for (int k = 0; k < XDEPTH; k++) begin
      nz[k] = 0.0;
      for (int m = 0; m < 33; m++) nz[k] += g[m] * wn[k + m];
      nz[k] = nz[k] / gs;
    end
  endtask

  task automatic run_frame(input real ppm, input real dly, input real walk, input real ebn0_db);
    real n0, sig, tau;
    int got [N];
    int nd, errs, last_sat, ncyc;
    encode();
    n0  = 2.0 / $pow(10.0, ebn0_db / 10.0);  // Es = 1, rate 1/2
    sig = $sqrt(2.0 * n0);                   // per-sample noise at 4 samples/symbol
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    band_noise();
    tau = dly;
    for (int k = 0; k < XDEPTH; k++) begin
      real t, acc;
      int i0, smp;
      // receiver sample k sits at transmitter time (k - PRE)/4 + tau (symbols)
      if (k > PRE) tau = tau + 0.25 * ppm * 1.0e-6 + 0.25 * walk * gauss();
      t = real'(k - PRE) / 4.0 + tau;
      acc = 0.0;
      i0 = int'($floor(t));
      for (int i = i0 - 8; i <= i0 + 9; i++)
        if (i >= 0 && i < N) acc += (cw[i] ? -1.0 : 1.0) * rrc(t - real'(i));
      acc += sig * nz[k];
      smp = int'($floor(acc * 128.0 + 0.5));
      if (smp > 2047) smp = 2047;
      if (smp < -2048) smp = -2048;
      x_valid = 1; x_data = SW'(smp);
      @(negedge clk);
    end
    x_valid = 0;
    nd = 0; last_sat = 0; ncyc = 0;
    while (phase != RX_DONE) begin
      @(posedge clk);
      ncyc++;
      if (sat_valid) last_sat = int'(sat_cnt);
      if (d_valid) begin got[nd] = d_bit; nd++; end
    end
    errs = 0;
    for (int i = 0; i < N; i++) if (got[i] != int'(cw[i])) errs++;
    $display("frame ppm %0.0f delay %0.2f: estimate %0d ppm, delay word %0d, last score %0d/%0d, %0d bit errors, %0d cycles after capture",
             ppm, dly, freq_est, delay_pos, last_sat, M, errs, ncyc);
    check(nd == N, $sformatf("%0d decoded symbols delivered", nd));
    check(real'(freq_est) - ppm < 150.0 && ppm - real'(freq_est) < 150.0,
          $sformatf("frequency estimate %0d for %0.0f ppm", freq_est, ppm));
    begin
      real dw, exp_dw;
      exp_dw = 3456.0 - 2.0 * dly * 256.0;
      dw = real'(delay_pos);
      check(dw - exp_dw <= 102.0 && exp_dw - dw <= 102.0,
            $sformatf("delay word %0d for delay %0.2f T (ideal %0.0f)", delay_pos, dly, exp_dw));
    end
    begin
      // 78 front-end passes of about 4N cycles, 77 loop-1 decoder runs of
      // 3 iterations (2E cycles each) plus syndrome pass (E), 20 loop-2 runs of
      // one iteration plus syndrome pass, 19 loop-2 passes and the output of N
      real model;
      model = 78.0 * 4 * N + 77.0 * 7 * E + 20.0 * 3 * E + 20.0 * N;
      check(real'(ncyc) > 0.99 * model && real'(ncyc) < 1.01 * model,
            $sformatf("%0d cycles after capture, model %0.0f", ncyc, model));
    end
    check(errs == 0, $sformatf("%0d decoded bit errors", errs));
    check(last_sat == M, $sformatf("final satisfied checks %0d", last_sat));
  endtask

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_score0, n_l2_0;
    void'($urandom(32'd20051)); // fixed seed: the same frames on every run
    start = 0; x_valid = 0; x_data = '0;
    n_fe = 0; n_ovf = 0; n_score = 0; n_recenter = 0; n_dcand = 0; n_l2pass = 0; n_ted = 0; n_sel1 = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    run_frame(1730.0, 0.30, 0.0, 3.0);
    check(n_score == 77, $sformatf("loop-1 candidate scores %0d (expected 77)", n_score));
    check(n_l2pass == 19, $sformatf("loop-2 passes %0d (expected 19)", n_l2pass));
    n_score0 = n_score; n_l2_0 = n_l2pass;
    run_frame(-1240.0, -0.25, 0.002, 3.0);
    check(n_score - n_score0 == 77, "second frame candidate scores");
    check(n_recenter == 4, $sformatf("recentrings %0d (expected 2 per frame)", n_recenter));
    check(n_dcand == 10, $sformatf("delay candidates scored %0d (expected 5 per frame)", n_dcand));
    $display("mechanisms: front-end passes %0d, interpolants %0d, candidate scores %0d, recentrings %0d, delay candidates %0d, loop-2 passes %0d, non-zero TED outputs %0d, mux-1 loads %0d",
             n_fe, n_ovf, n_score, n_recenter, n_dcand, n_l2pass, n_ted, n_sel1);
    check(n_fe > 0 && n_ovf > 0 && n_score > 0 && n_recenter > 0 && n_dcand > 0 &&
          n_l2pass > 0 && n_ted > 0 && n_sel1 > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
