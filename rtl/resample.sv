// resample -- converts the frequency word v[i] into the NCO control word w[k]
// and holds it at the sample rate.
//
// v is a signed frequency-offset estimate in ppm, captured when v_valid is
// high. At each sample tick w is refreshed as
//   w = W0 + (v * KQ) >>> 16,  W0 = 0.5 * 2**NF,  KQ = round(0.5e-6 * 2**NF * 2**16)
// i.e. w = (Ts/Ti)(1 + v * 1e-6), so that a receiver clock running slow by v
// ppm is compensated by a proportionally larger NCO decrement. w changes one
// tick after v is captured. The frequency word and its resampling to 1/Ts
// follow the published block diagram; the ppm-to-control-word scaling is this
// design's.
module resample
  import ldpc_tr_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   v_valid,
  input  logic signed [PPMW-1:0] v,
  input  logic                   tick,
  output logic [NF-1:0]          w
);
  localparam logic [NF-1:0] W0 = NF'(1) << (NF-1);
  localparam int            KQ = 549756;                // 0.5e-6 * 2**24 * 2**16
  logic signed [PPMW-1:0] v_q;
  logic signed [PPMW+21:0] prod;

  assign prod = (PPMW+22)'(v_q) * (PPMW+22)'(KQ);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      v_q <= '0;
      w   <= W0;
    end else begin
      if (v_valid) v_q <= v;
      if (tick)    w   <= W0 + NF'(prod >>> 16);
    end
endmodule
