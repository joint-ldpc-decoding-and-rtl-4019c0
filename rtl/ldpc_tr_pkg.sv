// ldpc_tr_pkg -- shared constants and types of the LDPC-aided timing-recovery receiver.
//
// Holds the fixed-point formats that cross module boundaries and the
// quasi-cyclic parity-check matrix of the rate-1/2, n = 1944 LDPC code of IEEE
// 802.11n (12 x 24 base matrix, expansion factor 81). A base-matrix entry s >= 0
// stands for the Z x Z identity matrix cyclically shifted right by s, and -1 for
// the all-zero block; row r of block row b then checks column
// c*Z + ((r + s) mod Z) for every block column c with s >= 0. For an expansion
// factor Z below 81 the same base matrix is used with every shift taken mod Z,
// which still gives a valid quasi-cyclic code with the same degree profile (used
// only to keep simulations short). The code and its size (1944, 972) follow the
// published receiver; the shift values are those of the 802.11n standard.
// The per-row compaction (HB_DEG/HB_COL/HB_SHF/HB_EBASE) is computed here by
// constant functions so that the decoder can walk only the non-zero blocks.
package ldpc_tr_pkg;

  localparam int MB      = 12;   // block rows
  localparam int NB      = 24;   // block columns
  localparam int DMAX    = 8;    // largest check-node degree of the code
  localparam int Z_STD   = 81;   // expansion factor of the (1944, 972) code

  typedef int base_row_t [NB];
  typedef int base_mat_t [MB][NB];

  localparam base_mat_t HB = '{
    '{57,-1,-1,-1,50,-1,11,-1,50,-1,79,-1, 1, 0,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1},
    '{ 3,-1,28,-1, 0,-1,-1,-1,55, 7,-1,-1,-1, 0, 0,-1,-1,-1,-1,-1,-1,-1,-1,-1},
    '{30,-1,-1,-1,24,37,-1,-1,56,14,-1,-1,-1,-1, 0, 0,-1,-1,-1,-1,-1,-1,-1,-1},
    '{62,53,-1,-1,53,-1,-1, 3,35,-1,-1,-1,-1,-1,-1, 0, 0,-1,-1,-1,-1,-1,-1,-1},
    '{40,-1,-1,20,66,-1,-1,22,28,-1,-1,-1,-1,-1,-1,-1, 0, 0,-1,-1,-1,-1,-1,-1},
    '{ 0,-1,-1,-1, 8,-1,42,-1,50,-1,-1, 8,-1,-1,-1,-1,-1, 0, 0,-1,-1,-1,-1,-1},
    '{69,79,79,-1,-1,-1,56,-1,52,-1,-1,-1, 0,-1,-1,-1,-1,-1, 0, 0,-1,-1,-1,-1},
    '{65,-1,-1,-1,38,57,-1,-1,72,-1,27,-1,-1,-1,-1,-1,-1,-1,-1, 0, 0,-1,-1,-1},
    '{64,-1,-1,-1,14,52,-1,-1,30,-1,-1,32,-1,-1,-1,-1,-1,-1,-1,-1, 0, 0,-1,-1},
    '{-1,45,-1,70, 0,-1,-1,-1,77, 9,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1, 0, 0,-1},
    '{ 2,56,-1,57,35,-1,-1,-1,-1,-1,12,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1, 0, 0},
    '{24,-1,61,-1,60,-1,-1,27,51,-1,-1,16, 1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1, 0}
  };

  typedef int deg_t   [MB];
  typedef int list_t  [MB*DMAX];   // entry b*DMAX + k: k-th non-zero block of row b

  function automatic deg_t f_deg();
    deg_t d;
    for (int b = 0; b < MB; b++) begin
      d[b] = 0;
      for (int c = 0; c < NB; c++) if (HB[b][c] >= 0) d[b]++;
    end
    return d;
  endfunction

  function automatic list_t f_col();
    list_t l;
    int k;
    for (int b = 0; b < MB; b++) begin
      k = 0;
      for (int c = 0; c < DMAX; c++) l[b*DMAX + c] = 0;
      for (int c = 0; c < NB; c++)
        if (HB[b][c] >= 0) begin
          l[b*DMAX + k] = c;
          k = k + 1;
        end
    end
    return l;
  endfunction

  function automatic list_t f_shf();
    list_t l;
    int k;
    for (int b = 0; b < MB; b++) begin
      k = 0;
      for (int c = 0; c < DMAX; c++) l[b*DMAX + c] = 0;
      for (int c = 0; c < NB; c++)
        if (HB[b][c] >= 0) begin
          l[b*DMAX + k] = HB[b][c];
          k = k + 1;
        end
    end
    return l;
  endfunction

  // first edge slot of each block row (prefix sum of degrees)
  function automatic deg_t f_ebase();
    deg_t e;
    int acc;
    acc = 0;
    for (int b = 0; b < MB; b++) begin
      e[b] = acc;
      for (int c = 0; c < NB; c++) if (HB[b][c] >= 0) acc++;
    end
    return e;
  endfunction

  function automatic int f_nblk();
    int acc;
    acc = 0;
    for (int b = 0; b < MB; b++)
      for (int c = 0; c < NB; c++) if (HB[b][c] >= 0) acc++;
    return acc;
  endfunction

  localparam deg_t  HB_DEG   = f_deg();
  localparam list_t HB_COL   = f_col();
  localparam list_t HB_SHF   = f_shf();
  localparam deg_t  HB_EBASE = f_ebase();
  localparam int    HB_NBLK  = f_nblk();   // 86 non-zero blocks

  // ---------------------------------------------------------------------------
  // Fixed-point formats
  // ---------------------------------------------------------------------------
  localparam int SW      = 12;  // sample width: signed, 1.0 = 2**SFRAC
  localparam int SFRAC   = 7;
  localparam int NF      = 24;  // NCO register / control word: unsigned fraction bits
  localparam int MUW     = 8;   // fractional interval width (mu in [0,1), 2**-MUW steps)
  localparam int CHW     = 6;   // decoder channel LLR width
  localparam int PPMW    = 16;  // frequency word, signed ppm
  localparam int POSW    = 12;  // delay word: signed, units of Ti/2**MUW

  // receiver operation phase (top-level sequencer)
  typedef enum logic [3:0] {
    RX_IDLE,     // waiting for start
    RX_CAPTURE,  // writing the received frame into the sample buffer
    RX_SETUP,    // loading the frequency word, restarting NCO/filter/decoder
    RX_FE,       // front-end pass: Interpolator 1 -> matched filter -> Interpolator 2 -> decoder
    RX_L1_DEC,   // loop 1: decoding one candidate
    RX_L1_NEXT,  // loop 1: scoring the candidate, choosing the next one
    RX_L1_REC,   // loop 1: end of the 2-D sweep, recentring the frequency window
    RX_L2_DEC,   // loop 2: one decoder iteration
    RX_L2_PASS,  // loop 2: Interpolator 3 + timing error detector + loop filter pass
    RX_OUT,      // streaming out the decoded symbols
    RX_DONE
  } rx_phase_e;

  // one-cycle event strobes of the receiver, for monitoring and counters
  typedef struct packed {
    logic interp;     // Interpolator 1 produced an interpolant (NCO overflow)
    logic recenter;   // frequency window recentred and halved
    logic dly_next;   // delay estimator moved to its next candidate
    logic l2_sym;     // loop 2 fed one re-timed symbol to the decoder (mux input 1)
    logic ted_nz;     // timing error detector output non-zero
  } rx_events_t;

endpackage
