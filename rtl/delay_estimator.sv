// delay_estimator -- loop-1 time-delay search (outer loop of the 2-D search).
//
// Candidate delays are evenly spaced: the delay word presented to
// Interpolator 2 is
//   pos = BASE + (idx - (NDLY-1)/2) * DSTEP,  idx = 0..NDLY-1,
// in units of Ti/2**MUW (BASE is the fixed filter/pipeline delay). DSTEP = 102
// is 0.4 Ti = 0.2 T, so the five default candidates cover -0.4 T..+0.4 T, i.e.
// delays within +-0.5 T are matched to within 0.1 T. For every delay candidate
// the frequency estimator runs a full sweep; its best satisfied-check count
// and frequency estimate are handed in with res_valid. The estimator stores
// every candidate's frequency estimate and tracks the first and the last
// candidate reaching the highest count; after the last candidate it picks the
// midpoint between them (rounded down to a candidate), takes that
// candidate's delay word and frequency estimate (best_pos, best_f) and pulses
// done in the same cycle they become valid. While no search is running
// ('searching' low) pos holds the chosen delay. 'start' begins a new search.
// The step, the single search iteration, the 2-D ordering (delay outside,
// frequency inside) and the midpoint rule for ties (the same as the frequency
// search) follow the published receiver; rounding the midpoint down and the
// handshake are this design's.
module delay_estimator
  import ldpc_tr_pkg::*;
#(
  parameter int NDLY  = 5,
  parameter int DSTEP = 102,
  parameter int BASE  = 3456,
  parameter int CNTW  = 11
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic                   res_valid,
  input  logic [CNTW-1:0]        cnt,
  input  logic signed [PPMW-1:0] f_est,
  output logic [POSW-1:0]        pos,
  output logic                   searching,
  output logic                   last,
  output logic                   done,
  output logic [POSW-1:0]        best_pos,
  output logic signed [PPMW-1:0] best_f,
  output logic [CNTW-1:0]        best_cnt
);
  localparam int HALF = (NDLY - 1) / 2;
  localparam int IW   = $clog2(NDLY + 1);

  logic [IW-1:0] idx, first_i, last_i, first_n, last_n, mid_n;
  logic          have;
  logic [POSW-1:0] cand;
  logic [CNTW-1:0] cnt_n;
  logic signed [PPMW-1:0] f_mem [NDLY];

  function automatic logic [POSW-1:0] f_pos(input logic [IW-1:0] i);
    return POSW'(BASE + (int'(i) - HALF) * DSTEP);
  endfunction

  always_comb begin
    cand = f_pos(idx);
    pos  = searching ? cand : best_pos;
    last = (idx == IW'(NDLY - 1));
    // first/last holder of the highest count, including the current result
    first_n = first_i; last_n = last_i; cnt_n = best_cnt;
    if (!have || cnt > best_cnt) begin
      first_n = idx; last_n = idx; cnt_n = cnt;
    end else if (cnt == best_cnt) begin
      last_n = idx;
    end
    mid_n = IW'((int'(first_n) + int'(last_n)) / 2);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      idx <= '0; have <= 1'b0; searching <= 1'b0; done <= 1'b0;
      first_i <= '0; last_i <= '0;
      best_pos <= POSW'(BASE); best_f <= '0; best_cnt <= '0;
      for (int i = 0; i < NDLY; i++) f_mem[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        idx <= '0; have <= 1'b0; searching <= 1'b1; best_cnt <= '0;
      end else if (res_valid && searching) begin
        f_mem[idx] <= f_est;
        first_i <= first_n; last_i <= last_n; best_cnt <= cnt_n; have <= 1'b1;
        if (last) begin
          searching <= 1'b0; done <= 1'b1; idx <= '0;
          best_pos <= f_pos(mid_n);
          best_f   <= (mid_n == idx) ? f_est : f_mem[mid_n];
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
endmodule
