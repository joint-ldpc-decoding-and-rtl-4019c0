// ldpc_timing_rx -- pilotless BPSK receiver whose timing recovery is steered
// by the LDPC decoder: the fraction of satisfied parity checks scores timing
// hypotheses (loop 1), and the decoder's hard decisions drive a
// decision-directed PLL (loop 2).
//
// Data path (one received frame of N = 24*Z code symbols):
//   x[k] --> sample_buffer --> Interpolator 1 (linear_interp, NCO + frac_interval
//   timing) --> matched_filter --> Interpolator 2 (interp2, delay word) --> ch_mux
//   --> ldpc_decoder;  q[j] --> q buffer --> Interpolator 3 (interp3, PLL
//   correction c[i]) --> ch_mux / mm_ted --> loop_filter --> Interpolator 3.
// Rates: x at 1/Ts = 4/T, y and q at 1/Ti = 2/T, z, s and d at 1/T.
//
// Operation (the sequencer in this module):
//  1. CAPTURE: XDEPTH samples arrive on x_valid/x_data (symbol 0 is expected
//     PRE samples into the frame) and are stored.
//  2. Loop 1, 2-D search: for each of NDLY delay candidates the frequency
//     estimator sweeps NCAND frequency candidates (+-2000 ppm, 400 ppm step).
//     Each candidate costs one front-end pass over the stored frame (one sample
//     per clock) that loads the decoder, and L1_ITERS decoder iterations; the
//     satisfied-check count is the score. The best delay (with its best
//     frequency) is kept, then NSEARCH-1 further frequency sweeps follow at the
//     chosen delay, each with window and step halved around the last estimate.
//  3. Loop 2: one front-end pass at the final estimates fills the q buffer and
//     loads the decoder; then L2_ITERS decoder iterations, each but the first
//     preceded by a pass in which Interpolator 3 re-times every symbol with the
//     PLL correction c[i], the Mueller-Mueller detector compares it with the
//     decoder's current decision, the first-order loop filter updates c, and
//     the re-timed value replaces the decoder's channel value (messages kept).
//  4. OUT: the N hard decisions are streamed on d_valid/d_bit, then done.
//
// Status outputs: phase, the candidate under test (cand_ppm, cand_pos), each
// decoder result (sat_valid/sat_cnt), the final estimates (freq_est, delay_pos)
// and one-cycle event strobes (events) for counters.
// Timing (E = 86*Z decoder edges): every loop-1 candidate costs a front-end
// pass of about 4N cycles plus (2*L1_ITERS + 1)*E decoder cycles, and there are
// NCAND*(NDLY + NSEARCH - 1) = 77 of them; loop 2 adds one front-end pass,
// L2_ITERS runs of 3E cycles and L2_ITERS - 1 passes of N cycles; the output
// takes N cycles. For the defaults that is about 4.82 million cycles from the
// end of capture to done, 4.36 million of them in loop 1.
//
// Follows the published receiver: the block structure, the two loops, 4 and
// 2 samples per symbol, linear interpolation, the 12-tap matched filter, the
// (1944, 972) code, the satisfied-constraint score, the narrowing search with
// c1 = c2 = 2, +-2000 ppm / 400 ppm / 3 search iterations / 3 decoder
// iterations per estimate, the 0.2 T delay step with one search iteration,
// the 2-D search order, the M&M detector fed with decoded symbols after every
// iteration and the first-order loop with Kp = 0.001. This design's own
// choices: the serial schedule, the fixed-point formats, resetting the PLL at
// every loop-2 pass, rounding the midpoint of equal delay scores down, the
// number of loop-2 iterations (L2_ITERS) and the handshakes.
module ldpc_timing_rx
  import ldpc_tr_pkg::*;
#(
  parameter int Z         = 81,
  parameter int PRE       = 16,
  parameter int L1_ITERS  = 3,
  parameter int L2_ITERS  = 20,
  parameter int NSEARCH   = 3,
  parameter int NCAND     = 11,
  parameter int INIT_STEP = 400,
  parameter int NDLY      = 5,
  parameter int DSTEP     = 102,
  parameter int N         = NB * Z,
  parameter int XDEPTH    = 4 * N + 96,
  parameter int QDEPTH    = 2 * N + 64,
  parameter int XAW       = $clog2(XDEPTH + 2),
  parameter int QAW       = $clog2(QDEPTH + 2),
  parameter int NAW       = $clog2(N)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic                   x_valid,
  input  logic signed [SW-1:0]   x_data,
  output logic                   d_valid,
  output logic                   d_bit,
  output logic                   done,
  output rx_phase_e              phase,
  output logic signed [PPMW-1:0] cand_ppm,
  output logic [POSW-1:0]        cand_pos,
  output logic                   sat_valid,
  output logic [10:0]            sat_cnt,
  output logic signed [PPMW-1:0] freq_est,
  output logic [POSW-1:0]        delay_pos,
  output rx_events_t             events
);
  // fixed filter/pipeline delay: symbol 0 lies at q index PRE/2 + 5.5
  localparam int BASE = (PRE / 2) * (1 << MUW) + 11 * (1 << (MUW - 1));
  localparam int CF   = 16;
  localparam int CW   = 24;

  rx_phase_e st;
  logic [XAW-1:0] xa;          // capture address / front-end read address
  logic [QAW-1:0] qa;          // q buffer write address
  logic [NAW-1:0] zc;          // symbols delivered to the decoder
  logic [1:0]     wc;          // setup wait counter
  logic [2:0]     srch;        // search iteration
  logic           l2;          // front-end pass belongs to loop 2
  logic [5:0]     l2it;
  logic           run_issued;
  logic signed [PPMW-1:0] f_final;

  // ------------------------------------------------------------ frame store
  logic signed [SW-1:0] x0, x1;
  sample_buffer #(.W(SW), .DEPTH(XDEPTH), .AW(XAW)) u_xbuf (
    .clk, .we(st == RX_CAPTURE && x_valid), .waddr(xa), .wdata(x_data),
    .raddr0(xa), .rdata0(x0), .raddr1(xa + 1'b1), .rdata1(x1));

  // ------------------------------------------------------------ loop 1 timing
  logic [NF-1:0]  w, eta;
  logic           ovf, nco_restart, fe_step;
  logic [MUW-1:0] mu;
  logic signed [PPMW-1:0] v;
  logic           v_valid;

  resample u_resample (.clk, .rst_n, .v_valid, .v, .tick(1'b1), .w);
  nco u_nco (.clk, .rst_n, .restart(nco_restart), .step(fe_step), .w, .eta, .ovf);
  frac_interval u_frac (.eta, .w, .mu);

  logic signed [SW-1:0] y;
  linear_interp #(.W(SW), .MUW(MUW)) u_interp1 (.x0, .x1, .mu, .y);

  logic                 q_valid;
  logic signed [SW-1:0] q;
  logic                 fe_clear;
  matched_filter #(.W(SW)) u_mf (
    .clk, .rst_n, .clear(fe_clear), .in_valid(fe_step && ovf), .in_y(y),
    .out_valid(q_valid), .out_q(q));

  logic                 z_valid;
  logic signed [SW-1:0] z;
  logic [POSW-1:0]      pos;
  interp2 #(.W(SW), .JW(QAW + 1)) u_interp2 (
    .clk, .rst_n, .restart(fe_clear), .pos, .q_valid(q_valid && st == RX_FE), .q,
    .z_valid, .z);

  // ------------------------------------------------------------ estimators
  logic f_init, f_sweep_start, f_cnt_valid, f_recenter, f_last, f_sweep_done;
  logic signed [PPMW-1:0] f_new_center, f_cand, f_est;
  logic [10:0] f_best_cnt;
  logic [PPMW-1:0] f_step;
  logic [10:0] dec_sat;

  freq_estimator #(.NCAND(NCAND), .INIT_STEP(INIT_STEP)) u_fest (
    .clk, .rst_n, .init(f_init), .sweep_start(f_sweep_start), .cnt_valid(f_cnt_valid),
    .cnt(dec_sat), .recenter(f_recenter), .new_center(f_new_center), .cand(f_cand),
    .last(f_last), .sweep_done(f_sweep_done), .est(f_est), .best_cnt(f_best_cnt),
    .step(f_step));

  logic d_start, d_res_valid, d_searching, d_last, d_done;
  logic [POSW-1:0] d_best_pos;
  logic signed [PPMW-1:0] d_best_f;
  logic [10:0] d_best_cnt;

  delay_estimator #(.NDLY(NDLY), .DSTEP(DSTEP), .BASE(BASE)) u_dest (
    .clk, .rst_n, .start(d_start), .res_valid(d_res_valid), .cnt(f_best_cnt),
    .f_est(f_est), .pos, .searching(d_searching), .last(d_last), .done(d_done),
    .best_pos(d_best_pos), .best_f(d_best_f), .best_cnt(d_best_cnt));

  // ------------------------------------------------------------ loop 2
  logic [QAW-1:0] qr0, qr1;
  logic signed [SW-1:0] qd0, qd1, s;
  logic signed [CW-1:0] c;
  logic [NAW-1:0] si;           // loop-2 symbol index
  logic           l2_active;
  sample_buffer #(.W(SW), .DEPTH(QDEPTH), .AW(QAW)) u_qbuf (
    .clk, .we(st == RX_FE && q_valid && qa < QAW'(QDEPTH)), .waddr(qa), .wdata(q),
    .raddr0(qr0), .rdata0(qd0), .raddr1(qr1), .rdata1(qd1));

  interp3 #(.W(SW), .AW(QAW), .IW(NAW), .CW(CW), .CF(CF)) u_interp3 (
    .sym_idx(si), .pos, .c, .raddr0(qr0), .raddr1(qr1), .q0(qd0), .q1(qd1), .s);

  logic hd_bit;
  logic signed [SW+1:0] u;
  logic l2_clear;
  mm_ted #(.W(SW)) u_ted (
    .clk, .rst_n, .clear(l2_clear), .en(1'b1), .step(l2_active), .s, .d_bit(hd_bit), .u);
  loop_filter #(.UW(SW + 2), .CW(CW), .KP(1)) u_lf (
    .clk, .rst_n, .clear(l2_clear), .step(l2_active), .u, .c);

  // ------------------------------------------------------------ decoder
  logic signed [CHW-1:0] llr;
  logic sel;
  logic dec_load_start, dec_load_update, dec_ch_valid, dec_run, dec_busy, dec_done;
  logic [5:0] dec_iters;
  logic [NAW-1:0] hd_addr;

  ch_mux #(.W(SW)) u_mux (.sel, .z, .s, .llr);

  ldpc_decoder #(.Z(Z)) u_dec (
    .clk, .rst_n, .load_start(dec_load_start), .load_update(dec_load_update),
    .ch_valid(dec_ch_valid), .ch_llr(llr), .run(dec_run), .n_iter(dec_iters),
    .busy(dec_busy), .done(dec_done), .sat_cnt(dec_sat), .hd_addr, .hd_bit);

  // ------------------------------------------------------------ sequencer
  always_comb begin
    sel             = (st == RX_L2_PASS);
    l2_active       = (st == RX_L2_PASS) && (wc == 2'd1);
    fe_step         = (st == RX_FE);
    dec_ch_valid    = (st == RX_FE) ? z_valid : l2_active;
    hd_addr         = (st == RX_OUT || st == RX_L2_PASS) ? si : '0;
    nco_restart     = (st == RX_SETUP) && (wc == 2'd3);
    fe_clear        = nco_restart;
    dec_load_start  = nco_restart || ((st == RX_L2_PASS) && (wc == 2'd0));
    dec_load_update = (st == RX_L2_PASS);
    l2_clear        = (st == RX_L2_PASS) && (wc == 2'd0);
    v_valid         = (st == RX_SETUP) && (wc == 2'd1);
    v               = l2 ? f_final : f_cand;
    dec_run         = ((st == RX_L1_DEC) || (st == RX_L2_DEC)) && !run_issued && !dec_busy;
    dec_iters       = (st == RX_L1_DEC) ? 6'(L1_ITERS) : 6'd1;
    f_cnt_valid     = (st == RX_L1_DEC) && dec_done;
  end

  assign phase     = st;
  assign cand_ppm  = f_cand;
  assign cand_pos  = pos;
  assign sat_valid = dec_done;
  assign sat_cnt   = dec_sat;
  assign freq_est  = f_final;
  assign delay_pos = d_best_pos;
  assign d_valid   = (st == RX_OUT);
  assign d_bit     = hd_bit;
  assign done      = (st == RX_DONE);
  assign events    = '{interp:   fe_step && ovf,
                       recenter: f_recenter,
                       dly_next: d_res_valid && d_searching,
                       l2_sym:   dec_ch_valid && sel,
                       ted_nz:   l2_active && (u != '0)};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= RX_IDLE; xa <= '0; qa <= '0; zc <= '0; wc <= '0; srch <= '0; l2 <= 1'b0;
      l2it <= '0; run_issued <= 1'b0; f_final <= '0; si <= '0;
      f_init <= 1'b0; f_sweep_start <= 1'b0; f_recenter <= 1'b0; f_new_center <= '0;
      d_start <= 1'b0; d_res_valid <= 1'b0;
    end else begin
      f_init <= 1'b0; f_sweep_start <= 1'b0; f_recenter <= 1'b0;
      d_start <= 1'b0; d_res_valid <= 1'b0;
      case (st)
        RX_IDLE, RX_DONE: if (start) begin
          st <= RX_CAPTURE; xa <= '0;
        end
        RX_CAPTURE: if (x_valid) begin
          if (xa == XAW'(XDEPTH - 1)) begin
            st <= RX_SETUP; wc <= '0; srch <= '0; l2 <= 1'b0;
            f_init <= 1'b1; f_sweep_start <= 1'b1; d_start <= 1'b1;
          end
          xa <= xa + 1'b1;
        end
        RX_SETUP: begin
          wc <= wc + 1'b1;
          if (wc == 2'd3) begin st <= RX_FE; xa <= '0; qa <= '0; zc <= '0; end
        end
        RX_FE: begin
          if (xa < XAW'(XDEPTH)) xa <= xa + 1'b1;
          if (q_valid && qa < QAW'(QDEPTH)) qa <= qa + 1'b1;
          if (z_valid) begin
            zc <= zc + 1'b1;
            if (zc == NAW'(N - 1)) begin
              st <= l2 ? RX_L2_DEC : RX_L1_DEC; run_issued <= 1'b0;
            end
          end
        end
        RX_L1_DEC: begin
          if (dec_run) run_issued <= 1'b1;
          if (dec_done) st <= RX_L1_NEXT;
        end
        RX_L1_NEXT: begin
          wc <= '0;
          if (!f_sweep_done) begin
            st <= RX_SETUP;
          end else if (srch == 3'd0) begin
            d_res_valid <= 1'b1;
            if (d_last) st <= RX_L1_REC;
            else begin st <= RX_SETUP; f_sweep_start <= 1'b1; end
          end else if (srch == 3'(NSEARCH - 1)) begin
            f_final <= f_est; l2 <= 1'b1; l2it <= '0; st <= RX_SETUP;
          end else begin
            srch <= srch + 1'b1; f_recenter <= 1'b1; f_new_center <= f_est;
            f_sweep_start <= 1'b1; st <= RX_SETUP;
          end
        end
        RX_L1_REC: if (d_done) begin
          wc <= '0; st <= RX_SETUP;
          if (NSEARCH == 1) begin
            f_final <= d_best_f; l2 <= 1'b1; l2it <= '0;
          end else begin
            srch <= srch + 1'b1; f_recenter <= 1'b1; f_new_center <= d_best_f;
            f_sweep_start <= 1'b1;
          end
        end
        RX_L2_DEC: begin
          if (dec_run) run_issued <= 1'b1;
          if (dec_done) begin
            l2it <= l2it + 1'b1; si <= '0; wc <= '0;
            st <= (l2it == 6'(L2_ITERS - 1)) ? RX_OUT : RX_L2_PASS;
          end
        end
        RX_L2_PASS: begin
          if (wc == 2'd0) wc <= 2'd1;
          else begin
            si <= si + 1'b1;
            if (si == NAW'(N - 1)) begin st <= RX_L2_DEC; run_issued <= 1'b0; end
          end
        end
        RX_OUT: begin
          si <= si + 1'b1;
          if (si == NAW'(N - 1)) st <= RX_DONE;
        end
        default: st <= RX_IDLE;
      endcase
    end
endmodule
