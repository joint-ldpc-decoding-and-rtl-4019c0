// linear_interp -- linear interpolator y = x0 + mu * (x1 - x0).
//
// Used for all three interpolators of the receiver. mu is an unsigned
// fraction with MUW bits (0 <= mu < 1); the product is rounded towards minus
// infinity by an arithmetic shift. Purely combinational. Linear interpolation
// is what the published receiver uses; the word widths are this design's.
module linear_interp #(
  parameter int W   = 12,
  parameter int MUW = 8
) (
  input  logic signed [W-1:0] x0,
  input  logic signed [W-1:0] x1,
  input  logic        [MUW-1:0] mu,
  output logic signed [W-1:0] y
);
  logic signed [W:0]       d;
  logic signed [W+MUW+1:0] p;
  always_comb begin
    d = (W+1)'(x1) - (W+1)'(x0);
    p = d * $signed({1'b0, mu});
    y = W'((W+MUW+2)'(x0) + (p >>> MUW));
  end
endmodule
