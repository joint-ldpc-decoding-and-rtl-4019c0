// tb_ldpc_timing_rx_search -- frequency-acquisition workload for the receiver at
// its default size: the narrowing frequency search at low Eb/N0.
//
// Two receivers are instantiated: 'dut' with default parameters (2-D
// delay/frequency search) and 'dut_f' with a single delay candidate
// (NDLY = 1), i.e. a frequency-only search.
// Part 1 replays the classic example of the search on dut_f: a +1730 ppm
// frequency offset and no delay at Eb/N0 = 1 dB, three noise realisations.
// The testbench follows the receiver's outputs to recover the estimate after
// every search iteration (the centre of the next window, read from the first
// candidate of search iterations 2 and 3, and freq_est after iteration 3) and
// prints them with the window centres and steps, and for the first
// realisation every candidate's score. Reference values for this example are
// 1600, 1800 and 1700 ppm. Checks: the iteration-1 estimate lies within one
// 400 ppm step of 1730 ppm in every realisation, and the mean final error is
// at most 100 ppm.
// Part 2 sweeps Eb/N0 (0.6, 1.0, 1.5 and 2.0 dB) on dut_f, two frames each,
// random frequency offsets within +-1800 ppm, no delay, and prints the mean
// absolute frequency error, the RMS timing error and the decoded bit errors
// per point. Check: mean frequency error at most 100 ppm over the 1.5 and
// 2.0 dB frames.
// Part 3 runs dut (2-D search) on two frames at 2 dB with random offsets and
// random delays within +-0.4 T. At low Eb/N0 the 2-D search may trade a delay
// error against a frequency error, so the check is on the combined effect:
// RMS timing error below 20 % of a symbol.
//
// RMS timing error of a frame: the timing error of symbol i left by the loop-1
// estimates is (D - D_est) + i (F - F_est) 1e-6 symbols, with the delay
// estimate D_est = (3456 - delay_pos) / 512; the RMS is taken over the N
// symbols of the frame.
//
// The frame generator is the same as in tb_ldpc_timing_rx: random codeword of
// the (1944, 972) code, BPSK, root-raised-cosine pulses (roll-off 0.3),
// receiver-side timing error tau[k] = D + (k - PRE) Ts F 1e-6, band-limited
// Gaussian noise, samples scaled to 1.0 = 128, one per clock.
module tb_ldpc_timing_rx_search;
  import ldpc_tr_pkg::*;
  localparam int Z = 81;
  localparam int N = NB * Z;
  localparam int M = MB * Z;
  localparam int PRE = 16;
  localparam int XDEPTH = 4 * N + 96;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // receiver 0: default parameters (2-D search); receiver 1: a single delay
  // candidate, i.e. the frequency-only search of the example
  logic x_valid;
  logic signed [SW-1:0] x_data;
  logic start [2];
  logic d_valid [2], d_bit [2], done [2], sat_valid [2];
  rx_phase_e phase [2];
  logic signed [PPMW-1:0] cand_ppm [2], freq_est [2];
  logic [POSW-1:0] cand_pos [2], delay_pos [2];
  logic [10:0] sat_cnt [2];
  rx_events_t events [2];

  ldpc_timing_rx dut (
    .clk, .rst_n, .start(start[0]), .x_valid, .x_data, .d_valid(d_valid[0]),
    .d_bit(d_bit[0]), .done(done[0]), .phase(phase[0]), .cand_ppm(cand_ppm[0]),
    .cand_pos(cand_pos[0]), .sat_valid(sat_valid[0]), .sat_cnt(sat_cnt[0]),
    .freq_est(freq_est[0]), .delay_pos(delay_pos[0]), .events(events[0]));

  ldpc_timing_rx #(.NDLY(1)) dut_f (
    .clk, .rst_n, .start(start[1]), .x_valid, .x_data, .d_valid(d_valid[1]),
    .d_bit(d_bit[1]), .done(done[1]), .phase(phase[1]), .cand_ppm(cand_ppm[1]),
    .cand_pos(cand_pos[1]), .sat_valid(sat_valid[1]), .sat_cnt(sat_cnt[1]),
    .freq_est(freq_est[1]), .delay_pos(delay_pos[1]), .events(events[1]));

  int checks = 0, failures = 0;
  bit cw [N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int hcol(int b, int c, int r);
    return c * Z + ((r + (HB[b][c] % Z)) % Z);
  endfunction

  // systematic encoder using the dual-diagonal parity part of the base matrix
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

  function automatic real fabs(real a);
    return (a < 0.0) ? -a : a;
  endfunction

  // per-frame observations of the receiver in use (sel)
  int sel;
  int n_score, n_first;         // candidates scored; candidates of search iteration 1
  int est1, est2;               // estimates after search iterations 1 and 2
  bit show_scores;
  always @(posedge clk) if (rst_n && phase[sel] == RX_L1_DEC && sat_valid[sel]) begin
    if (n_score == n_first)      est1 = int'(cand_ppm[sel]) + 5 * 200;  // first candidate of iteration 2
    if (n_score == n_first + 11) est2 = int'(cand_ppm[sel]) + 5 * 100;  // first candidate of iteration 3
    if (show_scores) $display("    candidate %0d: delay word %0d, %0d ppm, %0d of %0d checks satisfied",
                              n_score, cand_pos[sel], cand_ppm[sel], sat_cnt[sel], M);
    n_score++;
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

  // runs one frame; returns the frequency estimate error (ppm), the RMS timing
  // error (fraction of a symbol) and the decoded bit errors
  task automatic run_frame(input int which, input real ppm, input real dly, input real ebn0_db,
                           output real ferr, output real rms, output int errs);
    real n0, sig, tau, dest, acc2;
    int got [N];
    int nd;
    encode();
    n0  = 2.0 / $pow(10.0, ebn0_db / 10.0);  // Es = 1, rate 1/2
    sig = $sqrt(2.0 * n0);                   // per-sample noise at 4 samples/symbol
    sel = which; n_first = (which == 0) ? 55 : 11;
    n_score = 0; est1 = 0; est2 = 0;
    @(negedge clk); start[which] = 1; @(negedge clk); start[which] = 0;
    band_noise();
    tau = dly;
    for (int k = 0; k < XDEPTH; k++) begin
      real t, acc;
      int i0, smp;
      if (k > PRE) tau = tau + 0.25 * ppm * 1.0e-6;
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
    nd = 0;
    while (phase[which] != RX_DONE) begin
      @(posedge clk);
      if (d_valid[which]) begin got[nd] = d_bit[which]; nd++; end
    end
    check(nd == N, $sformatf("%0d decoded symbols delivered", nd));
    check(n_score == n_first + 22, $sformatf("%0d candidates scored", n_score));
    errs = 0;
    for (int i = 0; i < N; i++) if (got[i] != int'(cw[i])) errs++;
    ferr = real'(freq_est[which]) - ppm;
    dest = (3456.0 - real'(delay_pos[which])) / 512.0;
    acc2 = 0.0;
    for (int i = 0; i < N; i++) begin
      real e;
      e = (dly - dest) + real'(i) * (ppm - real'(freq_est[which])) * 1.0e-6;
      acc2 += e * e;
    end
    rms = $sqrt(acc2 / real'(N));
  endtask

  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ferr, rms, snr [4], sum_f1, sum_fh;
    int errs;
    void'($urandom(32'd20051)); // fixed seed: the same frames on every run
    start = '{0, 0}; x_valid = 0; x_data = '0; n_score = 0; sel = 0; show_scores = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    // part 1: +1730 ppm, no delay, 1 dB, frequency-only search, three noise
    // realisations (scores printed for the first)
    sum_f1 = 0.0;
    for (int r = 0; r < 3; r++) begin
      show_scores = (r == 0);
      run_frame(1, 1730.0, 0.0, 1.0, ferr, rms, errs);
      $display("search example %0d, 1730 ppm at 1 dB, frequency-only search:", r);
      $display("  iteration 1: window centre 0 ppm, step 400 ppm, estimate %0d ppm", est1);
      $display("  iteration 2: window centre %0d ppm, step 200 ppm, estimate %0d ppm", est1, est2);
      $display("  iteration 3: window centre %0d ppm, step 100 ppm, estimate %0d ppm (error %0.0f ppm)",
               est2, freq_est[1], ferr);
      $display("  RMS timing error %0.2f %%, %0d decoded bit errors", 100.0 * rms, errs);
      check(est1 >= 1730 - 400 && est1 <= 1730 + 400, $sformatf("iteration-1 estimate %0d", est1));
      sum_f1 += fabs(ferr);
    end
    show_scores = 0;
    check(sum_f1 / 3.0 <= 100.0, $sformatf("example: mean final error %0.0f ppm", sum_f1 / 3.0));

    // part 2: Eb/N0 sweep, random frequency offsets, no delay, frequency-only search
    snr = '{0.6, 1.0, 1.5, 2.0};
    sum_fh = 0.0;
    foreach (snr[s]) begin
      real sum_f, sum_r;
      int sum_e;
      sum_f = 0.0; sum_r = 0.0; sum_e = 0;
      for (int f = 0; f < 2; f++) begin
        real ppm;
        ppm = real'(int'($urandom % 3601) - 1800);
        run_frame(1, ppm, 0.0, snr[s], ferr, rms, errs);
        $display("  %0.1f dB: offset %0.0f ppm -> estimate %0d ppm, RMS timing error %0.2f %%, %0d bit errors",
                 snr[s], ppm, freq_est[1], 100.0 * rms, errs);
        sum_f += fabs(ferr); sum_r += rms * rms; sum_e += errs;
        if (snr[s] >= 1.5) sum_fh += fabs(ferr);
      end
      $display("Eb/N0 %0.1f dB: mean |frequency error| %0.0f ppm, RMS timing error %0.2f %%, %0d bit errors in 2 frames",
               snr[s], sum_f / 2.0, 100.0 * $sqrt(sum_r / 2.0), sum_e);
    end
    check(sum_fh / 4.0 <= 100.0, $sformatf("1.5-2 dB: mean frequency error %0.0f ppm", sum_fh / 4.0));

    // part 3: the default receiver's 2-D search with random delays at 2 dB
    for (int f = 0; f < 2; f++) begin
      real ppm, dly;
      ppm = real'(int'($urandom % 3601) - 1800);
      dly = real'(int'($urandom % 81) - 40) / 100.0;
      run_frame(0, ppm, dly, 2.0, ferr, rms, errs);
      $display("2-D search at 2 dB: offset %0.0f ppm, delay %0.2f T -> estimate %0d ppm, delay word %0d, RMS timing error %0.2f %%, %0d bit errors",
               ppm, dly, freq_est[0], delay_pos[0], 100.0 * rms, errs);
      check(rms < 0.20, $sformatf("2-D search: RMS timing error %0.3f", rms));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
