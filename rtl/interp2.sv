// interp2 -- Interpolator 2: applies the loop-1 time-delay candidate to the
// matched-filter stream and decimates it to one value per symbol.
//
// The delay word 'pos' gives, in units of Ti/2**MUW (Ti = half a symbol), the
// position of symbol 0 within the q[j] stream: it is the fixed pipeline and
// filter delay plus twice the candidate delay p[h] (in symbols). With
// b = pos >> MUW and mu = pos mod 2**MUW, symbol i is taken at q position
// 2i + b + mu, so when q[j] with j = 2i + b + 1 arrives (q_valid), z[i] =
// q[j-1] + mu (q[j] - q[j-1]) is presented combinationally with z_valid.
// 'restart' resets the q counter at the start of a frame. pos must be >= 0.
// Its place after the matched filter and its control by the time-delay
// estimator follow the published block diagram; the decimation scheme is this
// design's.
module interp2
  import ldpc_tr_pkg::*;
#(
  parameter int W  = 12,
  parameter int JW = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                restart,
  input  logic [POSW-1:0]     pos,
  input  logic                q_valid,
  input  logic signed [W-1:0] q,
  output logic                z_valid,
  output logic signed [W-1:0] z
);
  logic [JW-1:0]       j;
  logic signed [W-1:0] q_prev;
  logic [JW-1:0]       b;
  logic [MUW-1:0]      mu;

  assign b  = JW'(pos >> MUW);
  assign mu = pos[MUW-1:0];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      j <= '0; q_prev <= '0;
    end else if (restart) begin
      j <= '0; q_prev <= '0;
    end else if (q_valid) begin
      j <= j + 1'b1;
      q_prev <= q;
    end

  logic [JW-1:0] rel;
  assign rel     = j - b - 1'b1;
  assign z_valid = q_valid && (j > b) && !rel[0];

  linear_interp #(.W(W), .MUW(MUW)) u_li (.x0(q_prev), .x1(q), .mu(mu), .y(z));
endmodule
