// ldpc_decoder -- serial layered min-sum decoder for the rate-1/2 quasi-cyclic
// LDPC code of ldpc_tr_pkg, reporting the number of satisfied parity checks.
//
// The receiver's timing loops are steered by how many of the M = 12*Z parity
// checks the decoder's hard decisions satisfy, so besides decoding, every run
// ends with a syndrome pass that counts satisfied checks (sat_cnt).
//
// Storage: channel LLRs ch_mem[N], a-posteriori LLRs l_mem[N] (LW bits) and
// one check-to-variable message per edge r_mem[E] (RW bits), N = 24*Z and
// E = 86*Z (1944, 972 and 6966 for Z = 81).
//
// Schedule: check rows are processed one at a time in order (layered
// decoding), one edge per clock cycle. Phase 1 reads, for every edge of the
// row, Q = L - R, keeps Q and tracks the two smallest |Q|, the position of
// the smallest and the sign parity; phase 2 writes R' = sign * 0.75 * min
// (normalised min-sum, magnitudes capped to 2**(RW-1)-1) and L = Q + R'.
// One iteration takes 2*E cycles, the closing syndrome pass E cycles.
//
// Interface:
//  * load_start with load_update = 0 starts a fresh frame: the next N
//    ch_valid beats write ch_mem and l_mem in index order, and all R are taken
//    as 0 in the first iteration. With load_update = 1 the beats replace the
//    channel values of the current frame and add their change to L
//    (L += llr_new - llr_old), so the decoder's extrinsic messages survive.
//    This is how loop 2 feeds re-timed symbols between iterations.
//  * run with n_iter >= 1 performs n_iter iterations plus the syndrome pass;
//    busy is high meanwhile, done pulses for one cycle when sat_cnt is
//    valid.
//  * hd_addr/hd_bit read the current hard decision of a code bit
//    (1 = negative LLR) combinationally; a same-cycle load write is seen the
//    next cycle.
// The code, the decoder's role and the satisfied-constraint output follow the
// published receiver; the decoding algorithm, schedule and word widths are
// this design's.
module ldpc_decoder
  import ldpc_tr_pkg::*;
#(
  parameter int Z    = 81,
  parameter int LW   = 8,
  parameter int RW   = 6,
  parameter int CNTW = 11,
  parameter int ITW  = 6
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load_start,
  input  logic                  load_update,
  input  logic                  ch_valid,
  input  logic signed [CHW-1:0] ch_llr,
  input  logic                  run,
  input  logic [ITW-1:0]        n_iter,
  output logic                  busy,
  output logic                  done,
  output logic [CNTW-1:0]       sat_cnt,
  input  logic [$clog2(NB*Z)-1:0] hd_addr,
  output logic                  hd_bit
);
  localparam int N   = NB * Z;
  localparam int E   = HB_NBLK * Z;
  localparam int NAW = $clog2(N);
  localparam int EAW = $clog2(E);
  localparam int ZW  = $clog2(Z);
  localparam int KW  = $clog2(DMAX);
  localparam int LMAX = (1 << (LW-1)) - 1;
  localparam int RMAX = (1 << (RW-1)) - 1;

  // shifts reduced modulo Z
  function automatic list_t f_shz();
    list_t l;
    for (int i = 0; i < MB*DMAX; i++) l[i] = HB_SHF[i] % Z;
    return l;
  endfunction
  localparam list_t SHZ = f_shz();

  typedef enum logic [2:0] {D_IDLE, D_LOAD, D_P1, D_P2, D_SYN, D_FIN} dstate_e;
  dstate_e st;

  logic signed [CHW-1:0] ch_mem [N];
  logic signed [LW-1:0]  l_mem  [N];
  logic signed [RW-1:0]  r_mem  [E];

  logic            upd_mode, first_iter;
  logic [NAW-1:0]  ptr;
  logic [3:0]      br;
  logic [ZW-1:0]   zr;
  logic [KW-1:0]   k;
  logic [ITW-1:0]  iter, iter_max;
  logic [CNTW-1:0] cnt;
  logic            par;

  // per-row working set
  logic signed [LW-1:0] qbuf [DMAX];
  logic [NAW-1:0]       cbuf [DMAX];
  logic [DMAX-1:0]      sbuf;
  logic [RW-2:0]        min1, min2;
  logic [KW-1:0]        minidx;
  logic                 sgn;

  // ---------------------------------------------------------------- addressing
  logic [KW:0]   deg;
  logic          k_last, row_last;
  logic [NAW-1:0] col;
  logic [EAW-1:0] eidx;
  logic [ZW:0]    zsum;

  always_comb begin
    int slot;
    slot     = int'(br) * DMAX + int'(k);
    deg      = (KW+1)'(HB_DEG[br]);
    k_last   = ((KW+1)'(k) == deg - 1'b1);
    row_last = (br == 4'(MB - 1)) && (zr == ZW'(Z - 1));
    zsum     = (ZW+1)'(zr) + (ZW+1)'(SHZ[slot]);
    if (zsum >= (ZW+1)'(Z)) zsum = zsum - (ZW+1)'(Z);
    col      = NAW'(HB_COL[slot] * Z) + NAW'(zsum);
    eidx     = EAW'((HB_EBASE[br] + int'(k)) * Z) + EAW'(zr);
  end

  // ---------------------------------------------------------------- datapath
  logic signed [LW-1:0] lv;
  logic signed [RW-1:0] rv;
  logic signed [LW+1:0] qw;
  logic signed [LW-1:0] qv;
  logic [LW-1:0]        qmag;
  logic [RW-2:0]        qmag_c;
  logic [RW-2:0]        mo, msc;
  logic signed [RW-1:0] rnew;
  logic signed [LW+1:0] lw;
  logic signed [LW-1:0] lnew;
  logic signed [LW+1:0] uw;
  logic signed [LW-1:0] lupd;

  always_comb begin
    lv     = l_mem[col];
    rv     = first_iter ? '0 : r_mem[eidx];
    qw     = (LW+2)'(lv) - (LW+2)'(rv);
    if (qw > (LW+2)'(LMAX))       qv = LW'(LMAX);
    else if (qw < -(LW+2)'(LMAX)) qv = LW'(-LMAX);
    else                          qv = LW'(qw);
    qmag   = qv[LW-1] ? LW'(-qv) : LW'(qv);
    qmag_c = (qmag > LW'(RMAX)) ? (RW-1)'(RMAX) : (RW-1)'(qmag);
    // phase 2
    mo     = (k == minidx) ? min2 : min1;
    msc    = mo - (mo >> 2);
    rnew   = (sgn ^ sbuf[k]) ? -RW'({1'b0, msc}) : RW'({1'b0, msc});
    lw     = (LW+2)'(qbuf[k]) + (LW+2)'(rnew);
    if (lw > (LW+2)'(LMAX))       lnew = LW'(LMAX);
    else if (lw < -(LW+2)'(LMAX)) lnew = LW'(-LMAX);
    else                          lnew = LW'(lw);
    // channel update during load
    uw     = upd_mode ? (LW+2)'(l_mem[ptr]) + (LW+2)'(ch_llr) - (LW+2)'(ch_mem[ptr])
                      : (LW+2)'(ch_llr);
    if (uw > (LW+2)'(LMAX))       lupd = LW'(LMAX);
    else if (uw < -(LW+2)'(LMAX)) lupd = LW'(-LMAX);
    else                          lupd = LW'(uw);
  end

  assign hd_bit = l_mem[hd_addr][LW-1];
  assign busy   = (st == D_P1) || (st == D_P2) || (st == D_SYN) || (st == D_FIN);

  // memories (no reset: every entry is written before it is read)
  always_ff @(posedge clk) begin
    if (st == D_LOAD && ch_valid) begin
      ch_mem[ptr] <= ch_llr;
      l_mem[ptr]  <= lupd;
    end else if (st == D_P2) begin
      l_mem[cbuf[k]] <= lnew;
    end
    if (st == D_P2) r_mem[eidx] <= rnew;
    if (st == D_P1) begin
      qbuf[k] <= qv;
      cbuf[k] <= col;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= D_IDLE; upd_mode <= 1'b0; first_iter <= 1'b1; ptr <= '0;
      br <= '0; zr <= '0; k <= '0; iter <= '0; iter_max <= '0;
      cnt <= '0; par <= 1'b0; sat_cnt <= '0; done <= 1'b0;
      sbuf <= '0; min1 <= '0; min2 <= '0; minidx <= '0; sgn <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        D_IDLE: begin
          if (load_start) begin
            st <= D_LOAD; ptr <= '0; upd_mode <= load_update;
            if (!load_update) first_iter <= 1'b1;
          end else if (run) begin
            st <= D_P1; br <= '0; zr <= '0; k <= '0; iter <= '0;
            iter_max <= n_iter - 1'b1;
          end
        end
        D_LOAD: if (ch_valid) begin
          if (ptr == NAW'(N - 1)) st <= D_IDLE;
          ptr <= ptr + 1'b1;
        end
        D_P1: begin
          sbuf[k] <= qv[LW-1];
          if (k == '0) begin
            min1 <= qmag_c; min2 <= (RW-1)'(RMAX); minidx <= '0; sgn <= qv[LW-1];
          end else begin
            sgn <= sgn ^ qv[LW-1];
            if (qmag_c < min1) begin
              min2 <= min1; min1 <= qmag_c; minidx <= k;
            end else if (qmag_c < min2) begin
              min2 <= qmag_c;
            end
          end
          if (k_last) begin st <= D_P2; k <= '0; end
          else k <= k + 1'b1;
        end
        D_P2: begin
          if (k_last) begin
            k <= '0;
            if (row_last) begin
              br <= '0; zr <= '0; first_iter <= 1'b0;
              if (iter == iter_max) begin st <= D_SYN; cnt <= '0; par <= 1'b0; end
              else begin st <= D_P1; iter <= iter + 1'b1; end
            end else begin
              st <= D_P1;
              if (zr == ZW'(Z - 1)) begin zr <= '0; br <= br + 1'b1; end
              else zr <= zr + 1'b1;
            end
          end else k <= k + 1'b1;
        end
        D_SYN: begin
          if (k_last) begin
            k <= '0; par <= 1'b0;
            if ((par ^ lv[LW-1]) == 1'b0) cnt <= cnt + 1'b1;
            if (row_last) st <= D_FIN;
            else if (zr == ZW'(Z - 1)) begin zr <= '0; br <= br + 1'b1; end
            else zr <= zr + 1'b1;
          end else begin
            k <= k + 1'b1; par <= par ^ lv[LW-1];
          end
        end
        D_FIN: begin
          sat_cnt <= cnt; done <= 1'b1; st <= D_IDLE; br <= '0; zr <= '0;
        end
        default: st <= D_IDLE;
      endcase
    end

  // a run or load may only start on a loaded frame, and not while busy
  property p_no_run_while_busy;
    @(posedge clk) disable iff (!rst_n) busy |-> !run && !load_start;
  endproperty
  a_no_run_while_busy: assert property (p_no_run_while_busy);
endmodule
