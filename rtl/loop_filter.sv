// loop_filter -- first-order loop filter of the loop-2 timing PLL.
//
//   c[i+1] = c[i] + KP * u[i]
// c is the timing correction in units of Ti (half a symbol) with CF fraction
// bits, u the timing error in sample units (1.0 = 2**7). With CF = 16 the
// gain KP = 1 corresponds to a loop gain of 2**7 / 2**17 = 0.00098 symbol per
// unit of detector output, i.e. the Kp = 0.001 of the published receiver.
// 'clear' returns c to 0 at the start of each loop-2 pass; 'step' applies one
// update on the clock edge. The first-order form and Kp follow the published
// receiver; the fixed-point scaling is this design's.
module loop_filter #(
  parameter int UW = 14,
  parameter int CW = 24,
  parameter int KP = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 step,
  input  logic signed [UW-1:0] u,
  output logic signed [CW-1:0] c
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     c <= '0;
    else if (clear) c <= '0;
    else if (step)  c <= c + CW'(u) * CW'(KP);
endmodule
