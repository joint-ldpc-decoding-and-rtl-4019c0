// nco -- interpolation-control NCO (Gardner style) for Interpolator 1.
//
// A modulo-1 register eta (NF fraction bits) is decremented by the control
// word w once per input sample: eta[k+1] = (eta[k] - w[k]) mod 1. When
// eta[k] < w[k] the register underflows during the coming step, which means
// that an interpolant lies between samples k and k+1; 'ovf' flags that
// sample, and eta[k] is passed on so that the fractional interval
// mu = eta / w can be formed. w = Ts/Ti, nominally 0.5 for Ti = T/2 and
// Ts = T/4. 'restart' clears eta, which places the first interpolant exactly
// on the first sample; 'step' advances one sample. Outputs are combinational
// from the current state; the state moves on the clock edge where step = 1.
// The NCO, its eta output and its overflow strobe are those of the published
// block diagram; the register width and restart behaviour are this design's.
module nco
  import ldpc_tr_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          restart,
  input  logic          step,
  input  logic [NF-1:0] w,
  output logic [NF-1:0] eta,
  output logic          ovf
);
  logic [NF-1:0] eta_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        eta_q <= '0;
    else if (restart)  eta_q <= '0;
    else if (step)     eta_q <= eta_q - w;   // wraps modulo 2**NF

  assign eta = eta_q;
  assign ovf = (eta_q < w);
endmodule
