// frac_interval -- computes the fractional interval mu[k] = eta[k] / w[k].
//
// eta and w are unsigned fractions with NF bits; the NCO only asks for mu when
// eta < w, so the quotient is below 1 and is returned with MUW fraction bits
// (truncated). A full combinational divider is used rather than Gardner's
// approximation mu ~ eta / w0, so mu stays exact when w carries a frequency
// correction. w = 0 returns 0. The block name and its role come from the
// published block diagram; the divider form and widths are this design's.
module frac_interval
  import ldpc_tr_pkg::*;
(
  input  logic [NF-1:0]  eta,
  input  logic [NF-1:0]  w,
  output logic [MUW-1:0] mu
);
  logic [NF+MUW-1:0] q;
  always_comb begin
    q  = (w == '0) ? '0 : ({eta, {MUW{1'b0}}} / {{MUW{1'b0}}, w});
    mu = (q >= (NF+MUW)'(1 << MUW)) ? {MUW{1'b1}} : q[MUW-1:0];
  end
endmodule
