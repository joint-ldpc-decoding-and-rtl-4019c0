// ch_mux -- channel-input multiplexer of the LDPC decoder.
//
// sel = 0 passes the loop-1 symbol value z[i] (Interpolator 2), sel = 1 the
// loop-2 value s[i] (Interpolator 3). The chosen value (1.0 = 2**SFRAC) is
// scaled to a decoder LLR by an arithmetic right shift of LSH bits and
// saturated to the symmetric range +-(2**(CHW-1) - 1). With min-sum decoding
// the LLR scale does not matter, so no noise-variance factor is applied.
// Combinational. The two-input select is that of the published block diagram;
// the quantisation is this design's.
module ch_mux
  import ldpc_tr_pkg::*;
#(
  parameter int W   = 12,
  parameter int LSH = 4
) (
  input  logic                  sel,
  input  logic signed [W-1:0]   z,
  input  logic signed [W-1:0]   s,
  output logic signed [CHW-1:0] llr
);
  localparam int LMAX = (1 << (CHW-1)) - 1;
  logic signed [W-1:0] v, sh;
  always_comb begin
    v  = sel ? s : z;
    sh = v >>> LSH;
    if (sh > W'(LMAX))       llr = CHW'(LMAX);
    else if (sh < W'(-LMAX)) llr = CHW'(-LMAX);
    else                     llr = CHW'(sh);
  end
endmodule
