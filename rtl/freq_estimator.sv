// freq_estimator -- loop-1 frequency-offset search with successively narrower
// windows, driven by the number of satisfied LDPC parity checks.
//
// A search iteration ("sweep") tries NCAND evenly spaced candidates
//   cand = center + (idx - (NCAND-1)/2) * step,  idx = 0..NCAND-1,
// presented on 'cand' (the frequency word v[i], in ppm). For each candidate
// the receiver decodes the frame and returns the satisfied-check count with
// cnt_valid; the estimator then moves to the next candidate. After the last
// one it pulses sweep_done with the estimate: the candidate with the most
// satisfied checks or, when several tie, the midpoint between the first and
// the last of the tied candidates. 'recenter' moves the window centre to
// new_center and divides the step by 2**C2_SH; because the candidate count is
// fixed the window shrinks by the same factor (c1 = c2 = 2 by default).
// 'init' restores center = 0 and step = INIT_STEP. With the defaults (11
// candidates, 400 ppm) the first window is +-2000 ppm. The search rule, the
// tie rule, the halving and the default window/step follow the published
// receiver; the handshake is this design's.
module freq_estimator
  import ldpc_tr_pkg::*;
#(
  parameter int NCAND     = 11,
  parameter int INIT_STEP = 400,
  parameter int C2_SH     = 1,
  parameter int CNTW      = 11
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   init,
  input  logic                   sweep_start,
  input  logic                   cnt_valid,
  input  logic [CNTW-1:0]        cnt,
  input  logic                   recenter,
  input  logic signed [PPMW-1:0] new_center,
  output logic signed [PPMW-1:0] cand,
  output logic                   last,
  output logic                   sweep_done,
  output logic signed [PPMW-1:0] est,
  output logic [CNTW-1:0]        best_cnt,
  output logic [PPMW-1:0]        step
);
  localparam int HALF = (NCAND - 1) / 2;
  localparam int IW   = $clog2(NCAND + 1);

  logic signed [PPMW-1:0] center;
  logic [IW-1:0]          idx, first_i, last_i;
  logic [CNTW-1:0]        best;
  logic                   have;
  logic signed [PPMW+IW+1:0] off, tie_off;

  always_comb begin
    off     = ((PPMW+IW+2)'(idx) - (PPMW+IW+2)'(HALF)) * (PPMW+IW+2)'(step);
    cand    = center + PPMW'(off);
    last    = (idx == IW'(NCAND - 1));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      center <= '0; step <= PPMW'(INIT_STEP); idx <= '0;
      first_i <= '0; last_i <= '0; best <= '0; have <= 1'b0;
      sweep_done <= 1'b0;
    end else begin
      sweep_done <= 1'b0;
      if (init) begin
        center <= '0; step <= PPMW'(INIT_STEP);
      end else if (recenter) begin
        center <= new_center; step <= step >> C2_SH;
      end
      if (sweep_start) begin
        idx <= '0; have <= 1'b0; best <= '0; first_i <= '0; last_i <= '0;
      end else if (cnt_valid) begin
        if (!have || cnt > best) begin
          best <= cnt; first_i <= idx; last_i <= idx; have <= 1'b1;
        end else if (cnt == best) begin
          last_i <= idx;
        end
        if (last) begin
          sweep_done <= 1'b1;
          idx <= '0;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end

  // estimate of the finished sweep, valid from sweep_done until the next sweep_start
  always_comb begin
    tie_off  = ((PPMW+IW+2)'(first_i) + (PPMW+IW+2)'(last_i) - (PPMW+IW+2)'(2*HALF))
               * (PPMW+IW+2)'(step);
  end
  assign est      = center + PPMW'(tie_off >>> 1);
  assign best_cnt = best;
endmodule
