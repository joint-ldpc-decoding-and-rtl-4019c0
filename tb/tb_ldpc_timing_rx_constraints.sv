// tb_ldpc_timing_rx_constraints -- the satisfied-check score as a function of
// the frequency estimation error, for 2, 4 and 6 decoder iterations at
// Eb/N0 = 1 and 2 dB: the curve the narrowing search relies on.
//
// Three receivers with a single hypothesis each (NCAND = NDLY = NSEARCH = 1:
// frequency word 0, delay 0) and L1_ITERS = 2, 4 and 6 receive the same
// frames, which carry a frequency offset equal to the estimation error under
// test (0, 200, 400 and 800 ppm). The score of each receiver's single loop-1
// decoder run is recorded (L2_ITERS = 1 keeps the rest of the frame short).
// Six frames per point are averaged and printed as a table in percent of
// the 972 checks. Checks: at zero error the score grows with the number of
// iterations (6 above 2) at both Eb/N0 values, at zero error it lies at least
// 5 points above the score at 800 ppm for every iteration count, and at
// 2 dB with 6 iterations it is at least 90 %.
//
// The frame generator is the same as in tb_ldpc_timing_rx: random codeword of
// the (1944, 972) code, BPSK, root-raised-cosine pulses (roll-off 0.3),
// receiver-side timing error tau[k] = (k - PRE) Ts F 1e-6, band-limited
// Gaussian noise, samples scaled to 1.0 = 128, one per clock.
module tb_ldpc_timing_rx_constraints;
  import ldpc_tr_pkg::*;
  localparam int Z = 81;
  localparam int N = NB * Z;
  localparam int M = MB * Z;
  localparam int PRE = 16;
  localparam int XDEPTH = 4 * N + 96;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, x_valid;
  logic signed [SW-1:0] x_data;
  logic d_valid [3], d_bit [3], done [3], sat_valid [3];
  rx_phase_e phase [3];
  logic signed [PPMW-1:0] cand_ppm [3], freq_est [3];
  logic [POSW-1:0] cand_pos [3], delay_pos [3];
  logic [10:0] sat_cnt [3];
  rx_events_t events [3];

  for (genvar g = 0; g < 3; g++) begin : g_rx
    ldpc_timing_rx #(.L1_ITERS(2 + 2 * g), .L2_ITERS(1), .NSEARCH(1), .NCAND(1), .NDLY(1)) dut (
      .clk, .rst_n, .start, .x_valid, .x_data, .d_valid(d_valid[g]),
      .d_bit(d_bit[g]), .done(done[g]), .phase(phase[g]), .cand_ppm(cand_ppm[g]),
      .cand_pos(cand_pos[g]), .sat_valid(sat_valid[g]), .sat_cnt(sat_cnt[g]),
      .freq_est(freq_est[g]), .delay_pos(delay_pos[g]), .events(events[g]));
  end

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

  // score of each receiver's loop-1 run in the current frame
  int score [3];
  always @(posedge clk)
    if (rst_n)
      for (int g = 0; g < 3; g++)
        if (phase[g] == RX_L1_DEC && sat_valid[g]) score[g] = int'(sat_cnt[g]);

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

  task automatic run_frame(input real ppm, input real ebn0_db);
    real n0, sig, tau;
    encode();
    n0  = 2.0 / $pow(10.0, ebn0_db / 10.0);  // Es = 1, rate 1/2
    sig = $sqrt(2.0 * n0);                   // per-sample noise at 4 samples/symbol
    score = '{-1, -1, -1};
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    band_noise();
    tau = 0.0;
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
    while (phase[0] != RX_DONE || phase[1] != RX_DONE || phase[2] != RX_DONE) @(posedge clk);
    check(score[0] >= 0 && score[1] >= 0 && score[2] >= 0, "every receiver scored the frame");
  endtask

  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pct [2][4][3];   // [Eb/N0][error][iterations]
    real snr [2];
    int err [4];
    void'($urandom(32'd4242)); // fixed seed: the same frames on every run
    start = 0; x_valid = 0; x_data = '0;
    snr = '{1.0, 2.0};
    err = '{0, 200, 400, 800};
    repeat (3) @(negedge clk); rst_n = 1;
    foreach (snr[s])
      foreach (err[e]) begin
        real acc [3];
        acc = '{0.0, 0.0, 0.0};
        for (int f = 0; f < 6; f++) begin
          run_frame(real'(err[e]), snr[s]);
          for (int g = 0; g < 3; g++) acc[g] += real'(score[g]);
        end
        for (int g = 0; g < 3; g++) pct[s][e][g] = 100.0 * acc[g] / (6.0 * real'(M));
      end
    $display("satisfied checks [%%] against frequency estimation error:");
    $display("  Eb/N0  iterations      0 ppm    200 ppm    400 ppm    800 ppm");
    foreach (snr[s])
      for (int g = 0; g < 3; g++)
        $display("  %0.0f dB  %0d            %6.1f     %6.1f     %6.1f     %6.1f",
                 snr[s], 2 + 2 * g, pct[s][0][g], pct[s][1][g], pct[s][2][g], pct[s][3][g]);
    foreach (snr[s]) begin
      check(pct[s][0][2] > pct[s][0][0],
            $sformatf("%0.0f dB: 6 iterations (%0.1f) above 2 (%0.1f)", snr[s], pct[s][0][2], pct[s][0][0]));
      for (int g = 0; g < 3; g++)
        check(pct[s][0][g] >= pct[s][3][g] + 5.0,
              $sformatf("%0.0f dB, %0d iterations: %0.1f at 0 ppm against %0.1f at 800 ppm",
                        snr[s], 2 + 2 * g, pct[s][0][g], pct[s][3][g]));
    end
    check(pct[1][0][2] >= 90.0, $sformatf("2 dB, 6 iterations: %0.1f %%", pct[1][0][2]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
