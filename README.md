# LDPC-aided timing recovery receiver

A receiver for a frame of LDPC-coded BPSK symbols that carries no pilots or
preamble for synchronisation. It finds the sampling phase and the clock
frequency error using the error-correcting code alone. The measure it relies
on is the number of parity checks that the decoder's hard decisions satisfy.
When the timing hypothesis is wrong, the re-sampled symbols are garbage and
about half of the checks fail. When it is close, almost all of them hold.

The receiver therefore works in two stages, both driven by the decoder:

* **Loop 1 (acquisition)** buffers the whole frame and re-samples it for many
  (delay, frequency) hypotheses. It runs a few decoder iterations for each
  one and keeps the hypothesis with the most satisfied checks. A
  coarse-to-fine search narrows the frequency window.
* **Loop 2 (tracking)** is a decision-directed phase-locked loop. Between
  decoder iterations, a Mueller-Muller timing error detector compares freshly
  re-timed symbols with the decoder's current decisions. A first-order loop
  filter turns the error into a timing correction, and the corrected symbols
  replace the decoder's channel input. Decoding and tracking improve each
  other: better decisions give a cleaner timing error, and better timing gives
  better decisions.

The code is the rate-1/2, length-1944 quasi-cyclic LDPC code of IEEE 802.11n
(expansion factor Z = 81). The received signal is sampled at 4 samples per
symbol and interpolated to 2 samples per symbol. The receiver handles:

* constant delays within ±0.5 symbol;
* frequency offsets within ±2000 ppm;
* a slow random walk of the sampling phase.

Everything is synthesizable SystemVerilog. The top module is
`ldpc_timing_rx`, and every module has a self-checking testbench.

## Signal chain

```
data, loop 1  x[k] -> frame store -> Interpolator 1 -y-> matched filter -q-> Interpolator 2 -z-> mux 0 -> decoder
timing        frequency estimator -v-> resample -w-> NCO -eta-> frac_interval -mu-> Interpolator 1
              delay estimator -pos-> Interpolator 2 and Interpolator 3
score         decoder -sat_cnt-> frequency estimator -best count, estimate-> delay estimator
data, loop 2  matched filter -q-> q store -> Interpolator 3 -s-> mux 1 -> decoder
PLL           s, decoder decisions d -> M&M detector -u-> loop filter -c-> Interpolator 3
```

| Signal | Rate | Meaning |
|---|---|---|
| `x[k]` | 4/T | received samples, stored for the whole frame |
| `y[j]`, `q[j]` | 2/T | interpolants and matched-filter output |
| `z[i]`, `s[i]`, `d[i]` | 1/T | symbol values for loop 1 and loop 2; decoder decisions |
| `sat_cnt` | one per decoder run | satisfied parity checks, out of 972 |

| Module | Role |
|---|---|
| `sample_buffer` | Frame store: one write port, two read ports (addresses a and a+1 for linear interpolation). It is used twice, for `x` (7872 words) and for `q` (3952 words). |
| `nco`, `frac_interval` | Gardner-style interpolation control. A modulo-1 register `eta` counts down by the control word `w` = Ts/Ti ≈ 0.5 at every sample. Its underflow marks a sample followed by an interpolant, and `mu = eta / w` is that interpolant's fractional position. The divider is exact, so a frequency-corrected `w` gives exact `mu`. |
| `linear_interp` | Interpolator 1: `y = x0 + mu (x1 - x0)`. |
| `matched_filter` | 12-tap root-raised-cosine FIR (roll-off 0.3, 2 taps per symbol) with coefficients `{-1,10,-5,-25,29,122,122,29,-25,-5,10,-1}/256`. Its output is registered. |
| `interp2` | Interpolator 2: applies the loop-1 delay candidate and keeps one value per symbol. |
| `resample` | Converts the frequency word `v` (ppm) to the NCO control word `w = 0.5 (1 + v·1e-6)` and holds it at the sample rate. |
| `freq_estimator`, `delay_estimator` | The loop-1 search, described below. |
| `interp3` | Interpolator 3: re-interpolates the stored `q[j]` at symbol instants moved by the loop-2 correction `c[i]`. |
| `mm_ted` | Mueller-Muller detector `u[i] = d[i-1] s[i] - d[i] s[i-1]`, where `d` comes from the decoder and not from a slicer. |
| `loop_filter` | First-order loop filter `c += Kp u`, with Kp ≈ 0.001 symbol per unit of error. |
| `ch_mux` | Selects `z` (loop 1) or `s` (loop 2) and quantises it to a 6-bit decoder LLR. |
| `ldpc_decoder` | Layered min-sum decoder that also counts satisfied checks. |
| `ldpc_timing_rx` | Top level and sequencer. |
| `ldpc_tr_pkg` | Code tables, number formats, phase enum and event struct. |

## Loop 1: searching timing hypotheses by counting satisfied checks

This is the heart of the design, and it takes most of the run time.

### One hypothesis, one score

A hypothesis is a pair (frequency word `v`, delay word `pos`). Scoring it
works as follows:

1. Load `v` into the resampler and restart the NCO and the matched filter.
2. Stream the stored frame through Interpolator 1, the matched filter and
   Interpolator 2, at one sample per clock. This front-end pass delivers N =
   1944 symbol values, which are loaded into the decoder.
3. Run `L1_ITERS` = 3 decoder iterations and a syndrome pass. The number of
   satisfied checks (0..972) is the score.

The frequency word changes the NCO step and therefore the spacing of all the
interpolants. A wrong frequency slowly shifts every later symbol away from its
optimum, and the score falls quickly once the accumulated drift reaches a
sizeable fraction of a symbol. The delay word moves every symbol instant by
the same amount.

### The two-dimensional search

Frequency candidates are `centre + (idx - 5)·step`, for idx = 0..10. The first
window is centre 0 and step 400 ppm, which gives ±2000 ppm. Delay candidates
are 0.2 T apart: −0.4, −0.2, 0, +0.2 and +0.4 T. So a delay within ±0.5 T is
always within 0.1 T of a candidate, and loop 2 removes the rest.

1. **Search iteration 1** nests the two searches. For each of the 5 delays,
   the frequency estimator sweeps all 11 frequencies, which is 55 hypotheses.
   The best count of each sweep and that sweep's frequency estimate go to the
   delay estimator. The delay estimator keeps the best delay, together with
   the frequency estimate that came with it.
2. **Search iterations 2 and 3** keep the chosen delay. Each one recentres the
   frequency window on the previous estimate and halves the step, so the
   window halves as well: ±1000 ppm at 200 ppm steps, then ±500 ppm at
   100 ppm steps. Each is 11 hypotheses.

That makes 77 hypotheses per frame. Tie rule: when several candidates share
the top count, the estimate is the midpoint between the first and the last of
them. Ties are common near convergence, where several neighbouring candidates
decode perfectly. For delays, the midpoint is rounded down to a candidate, and
that candidate's own frequency estimate is used.

Here is a worked example for a true offset of +1730 ppm, at a single delay:

| Search iteration | 1 | 2 | 3 |
|---|---|---|---|
| window (ppm) | −2000..2000 | 600..2600 | 1300..2300 |
| step (ppm) | 400 | 200 | 100 |
| estimate (ppm) | 1600 | 1800 | 1700 |

The final error is 30 ppm. `tb_freq_estimator` replays exactly this sequence.

### Delay words and the fixed pipeline delay

Positions in the 2-samples-per-symbol stream `q[j]` are expressed in units of
Ti/256 (12-bit word `POSW`). Symbol 0 of the frame appears in `q` at position
`BASE` = 13.5 Ti = 3456. That offset is the sum of two fixed delays:

* the frame format puts symbol 0 at sample `PRE` = 16, which is 8 Ti;
* the 12-tap filter's group delay is 5.5 Ti.

A delay candidate of `D` symbols uses `pos = BASE − 512·D`; the step of 0.2 T
is 102 units. Interpolator 2 emits `z[i]` by interpolating between `q[2i+b]`
and `q[2i+b+1]`, where `b = pos >> 8` and the fraction is `pos & 255`.

## The decoder as a timing sensor

`ldpc_decoder` is a serial, layered, normalised min-sum decoder:

* one edge per clock cycle;
* normalisation factor 0.75;
* 8-bit a-posteriori LLRs and 6-bit check messages.

The parity-check matrix is the 12 × 24 base matrix of the 802.11n rate-1/2
code, expanded by Z = 81. The package derives per-row tables from it with
constant functions (degree, block columns, shifts, edge offsets), so the
decoder only visits the 86 non-zero blocks, E = 86·81 = 6966 edges.

* Each check row takes two sweeps over its edges. The first reads `Q = L − R`
  and tracks the two smallest magnitudes and the sign parity. The second
  writes the new message and `L = Q + R'`. One iteration therefore costs 2E
  cycles.
* After the last iteration, a syndrome pass (E cycles) counts the satisfied
  checks. The count comes out with a one-cycle `done` pulse.
* **Fresh load:** the first iteration treats all stored check messages as 0.
* **Update load** (used by loop 2) replaces the channel values and adds only
  their change to the a-posteriori LLRs (`L += new − old`). The check
  messages earned by earlier iterations are kept, so loop 2 keeps decoding
  instead of starting over.
* An assertion flags a `run` or `load_start` issued while the decoder is busy.

## Loop 2: decision-directed tracking between decoder iterations

After loop 1, the sequencer does one front-end pass at the final estimates.
This pass loads the decoder and also writes the whole matched-filter stream
`q[j]` into the q store. After that, loop 2 alternates two steps, for
`L2_ITERS` = 20 decoder iterations in total:

* one decoder iteration (with its syndrome pass);
* a tracking pass over the frame, before every iteration except the first.
  For each symbol i:
  1. Interpolator 3 reads `q` at position `2i·256 + pos + c[i]`.
  2. The detector compares the result with the decoder's current hard
     decision `d[i]` and its predecessor.
  3. The loop filter updates `c`.
  4. The re-timed value goes through mux input 1 into the decoder as an
     update load.

Each pass restarts the loop filter at `c` = 0, so the PLL sees the frame once
per pass with the same initial state. The correction is therefore relative to
the loop-1 timing and cannot run away across passes. This handles:

* the residual delay left by the 0.2 T grid;
* the residual frequency error left by the 100 ppm final step;
* random walks of the sampling phase.

Units: `c` is in Ti with 16 fraction bits. `KP = 1` on a detector output
scaled 1.0 = 128 gives 2⁷/2¹⁷ ≈ 0.001 symbol of correction per unit of
timing error.

## Sequencer, interface and frame format

`ldpc_timing_rx` steps through the phases of `rx_phase_e`, which are visible
on the `phase` port:

```
IDLE -> CAPTURE -> { SETUP -> FE -> L1_DEC -> L1_NEXT } x 77 (L1_REC after the 55th)
     -> SETUP -> FE -> { L2_DEC -> L2_PASS } x 19 -> L2_DEC -> OUT -> DONE
```

| Port | Meaning |
|---|---|
| `start` | Pulse in IDLE or DONE to begin a frame. |
| `x_valid`, `x_data` | After `start`, exactly `XDEPTH` = 4N + 96 = 7872 samples, signed 12 bit with 1.0 = 128 (gaps allowed). Symbol 0 is expected at sample 16; later samples pad the frame. |
| `d_valid`, `d_bit` | In OUT, N consecutive cycles carry the decoded code bits in order (1 means a negative symbol). |
| `done` | High in DONE, after the last decoded bit. |
| `cand_ppm`, `cand_pos` | Hypothesis under test. |
| `sat_valid`, `sat_cnt` | Each decoder result. |
| `freq_est`, `delay_pos` | Final estimates. |
| `events` | One-cycle strobes (`rx_events_t`) for counters: interpolant produced, frequency window recentred, delay candidate finished, loop-2 symbol loaded, non-zero timing error. |

### Processing time

Here E = 6966 and N = 1944, with one sample per clock. Each loop-1 hypothesis
costs about 4N cycles of front end and 7E cycles of decoding (3 iterations
plus the syndrome pass). 77 of them take 4.36 M cycles. Loop 2 adds:

* about 8 k cycles for its front-end pass;
* 20 × 3E cycles for its decoder runs;
* 19 × N cycles for its tracking passes.

The output takes another N cycles. The measured total from the end of capture
to `done` is 4.82 M cycles, about 25 ms at 200 MHz per 1944-bit frame. Almost
all of it is decoder cycles. The decoder is the place to add parallelism (for
example Z edges per cycle) if throughput matters; the search itself would not
change.

## Number formats

| Quantity | Format |
|---|---|
| samples `x`, `y`, `q`, `z`, `s` | signed 12 bit, 1.0 = 128 |
| NCO `eta`, control word `w` | unsigned 24-bit fractions; nominal `w` = 2²³ |
| `mu` | 8-bit fraction |
| frequency word | signed 16-bit ppm |
| delay word `pos` | 12 bit, Ti/256 units |
| loop-filter state `c` | signed 24 bit, Ti with 16 fraction bits |
| decoder channel LLR | 6 bit, `z >>> 4` saturated to ±31 |

## What follows the published receiver and what is this design's own

These follow the published receiver:

* the block structure and the two loops;
* 4 and 2 samples per symbol and linear interpolation;
* the 12-tap RRC matched filter with roll-off 0.3;
* the (1944, 972) 802.11n code;
* the satisfied-check score;
* the ±2000 ppm window, 400 ppm step, three search iterations with window and
  step halved, and the midpoint rule for ties;
* three decoder iterations per hypothesis;
* the 0.2 T delay step with a single search iteration, nested outside the
  frequency sweep;
* the Mueller-Muller detector fed with decoder decisions after every
  iteration;
* the first-order loop with gain 0.001.

These are this design's own choices:

* **Number of loop-2 iterations.** This is meant to equal the decoder's normal
  iteration count, which the published description does not fix. `L2_ITERS` = 20 is a
  parameter.
* **Delay grid.** Five candidates, −0.4..+0.4 T, to cover ±0.5 T. The
  midpoint of tied delays is rounded down, and the midpoint delay's own
  frequency estimate is kept.
* **Search iterations 2 and 3** refine the frequency only, at the chosen
  delay.
* **Loop 2 ordering.** Loop 2 starts with a plain decoder iteration. The PLL
  state is cleared at the start of every tracking pass.
* **Decoder.** The algorithm (layered normalised min-sum), its schedule, the
  word widths and the update-load mechanism.
* **Fixed-point formats, handshakes, frame format (`PRE`) and the sequencer.**
* **Exact divider for `mu`,** instead of the usual reciprocal approximation.
* **Base-matrix shift values.** Taken from the 802.11n standard itself.
* **Analog front end.** The sampling switch and free-running sample clock are
  not modelled. The receiver takes `x[k]` as a digital stream, and the
  testbench generates it. An anti-aliasing filter in front of the sampler is
  assumed (see "Front-end noise bandwidth" below).
* **Not built:** the PLL-only reference receiver (second-order loop) used
  only for comparison in the published results.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>`, has a watchdog, and compares against
values computed independently in the testbench:

| Testbench | What it checks |
|---|---|
| `tb_sample_buffer` | Random fill and read-back through both ports; reads past the end return 0. |
| `tb_nco` | For control words from −2600 to +2600 ppm, the overflow marks exactly the samples that precede each ideal interpolant instant. `eta/w` matches the ideal fraction. |
| `tb_frac_interval`, `tb_linear_interp`, `tb_ch_mux`, `tb_loop_filter` | Arithmetic against integer references. |
| `tb_matched_filter` | Impulse response recomputed from the RRC formula; random input against direct convolution; clear. |
| `tb_interp2`, `tb_interp3` | Output timing, addresses and interpolated values for many delay words and corrections. |
| `tb_resample` | ppm-to-control-word conversion and its timing. |
| `tb_mm_ted` | The formula, and the error sign for early and late sampling of a pulse train. |
| `tb_freq_estimator` | The +1730 ppm example above (windows, steps, estimates), the tie midpoint, and one cycle per candidate. |
| `tb_delay_estimator` | Best delay and its frequency, and midpoint ties. |
| `tb_ldpc_decoder` | Full size, with its own encoder built from the dual-diagonal parity structure. Exact run latency; satisfied count equal to a recount from the hard decisions; noisy codewords corrected; update loads. |
| `tb_ldpc_timing_rx` | End to end at default parameters (below). |
| `tb_ldpc_timing_rx_search` | Acquisition at low Eb/N0 (below). |
| `tb_ldpc_timing_rx_constraints` | The score curve that the search relies on (below). |

`tb_ldpc_timing_rx` runs two full frames at the default size. Each is encoded
at random, shaped with a root-raised-cosine pulse, and sampled with receiver
timing errors at Eb/N0 = 3 dB:

* **Frame 1:** +1730 ppm with a 0.3 T delay.
* **Frame 2:** −1240 ppm with a −0.25 T delay and a random walk.

It checks:

* the frequency estimate is within 150 ppm of the injected offset;
* the delay word is within one 0.2 T step of the injected delay;
* the frame is decoded with no bit errors, and the last run satisfies all 972
  checks;
* the processing time is within 1 % of the cycle model above.

It also counts, and requires, every mechanism: front-end passes, interpolants,
77 scores per frame, 2 window recentrings and 5 delay candidates per frame,
19 loop-2 passes, non-zero timing errors and loop-2 symbol loads.

In a recent run both frames decoded without errors:

| Frame | Frequency estimate | Cycles after capture |
|---|---|---|
| +1730 ppm | 1700 ppm | 4.82 M |
| −1240 ppm | −1200 ppm | 4.82 M |

`tb_ldpc_timing_rx_search` looks at acquisition near the code's limit. It
instantiates the default receiver and a second one with `NDLY = 1`, which
searches frequency only.

1. **Worked example.** The +1730 ppm example is run at 1 dB with three noise
   realisations on the frequency-only receiver. The testbench prints every
   candidate's score and the estimate after each search iteration. Typical
   sequences are 1600 → 1600 → 1700 and 2000 → 1800 → 1700 ppm. The final
   error is 30–70 ppm, with 3–8 % RMS timing error.
2. **Eb/N0 sweep.** Two frames with random offsets are run at each of 0.6,
   1.0, 1.5 and 2.0 dB. The mean frequency error at 1.5–2 dB is in the range
   15–45 ppm. At 1 dB and below a single frame can fail outright: the search
   locks onto a wrong window when the satisfied-check counts at three decoder
   iterations are barely above those of random data (about 65 % of checks).
3. **2-D search.** Two frames with random delays are run at 2 dB on the
   default receiver. Near the noise limit, the joint search can trade a
   delay error for a frequency error of up to about 200 ppm that partly
   cancels it, so the check is on the resulting RMS timing error.

`tb_ldpc_timing_rx_constraints` measures the score curve behind the search.
Three receivers are reduced to a single hypothesis (`NCAND = NDLY = NSEARCH
= 1`) with 2, 4 and 6 decoder iterations, and all of them score the same
frames. Each frame carries a known frequency error. Averages over 6 frames, in
percent of the 972 checks:

| Eb/N0 | Iterations | 0 ppm | 200 ppm | 400 ppm | 800 ppm |
|---|---|---|---|---|---|
| 1 dB | 2 | 78.3 | 71.5 | 68.4 | 69.1 |
| 1 dB | 4 | 78.7 | 70.6 | 66.9 | 66.9 |
| 1 dB | 6 | 80.6 | 70.6 | 66.6 | 66.3 |
| 2 dB | 2 | 89.2 | 75.4 | 67.6 | 66.7 |
| 2 dB | 4 | 97.8 | 73.5 | 67.4 | 66.6 |
| 2 dB | 6 | 99.6 | 74.0 | 67.7 | 66.8 |

The peak is about 400 ppm wide at the base, which is why 400 ppm is a safe
first step. At 2 dB the peak sharpens with iterations as expected. At 1 dB
more iterations help little. The published curves for this receiver reach
about 75, 89 and 96 % at 1 dB for 2, 4 and 6 iterations, so the limited-precision
min-sum decoder used here converges more slowly at 1 dB. That limits
acquisition at 1 dB and below. Wider a-posteriori values and messages (10 and
8 bits) leave the table unchanged. 8-bit channel LLRs (`CHW = 8` with a 2-bit
shift in `ch_mux`) raise the 1 dB, 6-iteration point to about 85 %, but they
raise the far-off scores as much. What remains is mostly the min-sum check
update itself.

### Front-end noise bandwidth

Interpolator 1 reduces 4 samples per symbol to 2 before the matched filter,
with no filtering of its own. Noise that is white over the full 4/T sample
bandwidth would therefore fold into the signal band and cost 3 dB. The
end-to-end testbenches model the analog anti-aliasing filter that precedes
a real sampler: they low-pass the noise to 0.8/T, above the 0.65/T signal
band, keeping the in-band noise density and therefore Eb/N0. A front end
without such a filter would need an extra decimation filter in front of
Interpolator 1.

These tests cover a handful of frames per operating point. They do not
produce statistical curves (averages over hundreds of trials, BER and FER).
The random-walk strength used in the published evaluation is not known, so
the loop-2 tracking limit has not been characterised.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_ldpc_timing_rx \
    rtl/ldpc_tr_pkg.sv tb/tb_ldpc_timing_rx.sv
./obj_dir/Vtb_ldpc_timing_rx
```

Any other testbench builds the same way by replacing the module and file
name. Modules are found in `rtl/` by name, and the package must come first.
The end-to-end test takes about 10 s, the acquisition test about a minute,
and the other testbenches seconds.

Parameters worth changing:

* `Z` (any value up to 81 gives a valid code, since the shifts are taken
  modulo Z; it scales N and all memories);
* `L1_ITERS`, `L2_ITERS`, `NSEARCH`, `NCAND`, `INIT_STEP`, `NDLY` and `DSTEP`
  on the top;
* `KP` on the loop filter;
* `LW`/`RW` on the decoder.
