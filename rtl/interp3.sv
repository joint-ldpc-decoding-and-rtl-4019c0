// interp3 -- Interpolator 3: loop-2 re-interpolation of the buffered
// matched-filter output at PLL-corrected symbol instants.
//
// For symbol i the position in the stored q[j] sequence is
//   P = (2i << MUW) + pos + (c >>> (CF - MUW))
// in units of Ti/2**MUW, where pos is the loop-1 delay word (the same one
// Interpolator 2 used) and c is the loop-filter output c[i] in Ti units with
// CF fraction bits. raddr = P >> MUW and raddr+1 address the q buffer;
// s[i] = q0 + mu (q1 - q0) with mu = P mod 2**MUW. Combinational. A
// negative position is clamped to 0. The block's inputs (buffered q, c[i]) and
// output s[i] follow the published block diagram; the address arithmetic is
// this design's.
module interp3
  import ldpc_tr_pkg::*;
#(
  parameter int W  = 12,
  parameter int AW = 13,
  parameter int IW = 11,
  parameter int CW = 24,
  parameter int CF = 16
) (
  input  logic [IW-1:0]        sym_idx,
  input  logic [POSW-1:0]      pos,
  input  logic signed [CW-1:0] c,
  output logic [AW-1:0]        raddr0,
  output logic [AW-1:0]        raddr1,
  input  logic signed [W-1:0]  q0,
  input  logic signed [W-1:0]  q1,
  output logic signed [W-1:0]  s
);
  localparam int PW = AW + MUW + 2;
  logic signed [PW-1:0] p;
  logic [MUW-1:0]       mu;

  always_comb begin
    p = PW'({sym_idx, 1'b0, {MUW{1'b0}}}) + PW'(pos) + PW'(c >>> (CF - MUW));
    if (p < 0) p = '0;
    raddr0 = AW'(p >>> MUW);
    raddr1 = raddr0 + 1'b1;
    mu     = p[MUW-1:0];
  end

  linear_interp #(.W(W), .MUW(MUW)) u_li (.x0(q0), .x1(q1), .mu(mu), .y(s));
endmodule
