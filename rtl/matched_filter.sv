// matched_filter -- 12-tap root-raised-cosine matched filter at 2 samples
// per symbol.
//
// Taps are c[n] = round(256 * h((n - 5.5) * T/2) / 2), n = 0..11, where h is
// the unit-energy root-raised-cosine pulse with roll-off 0.3,
//   h(t) = [sin(pi t (1-b)) + 4 b t cos(pi t (1+b))] / [pi t (1 - (4 b t)^2)]
// (t in symbol periods). The factor 1/2 makes the peak of the combined
// transmit/receive pulse about 1.0. Each 'in_valid' shifts one interpolant
// y[j] into the delay line; the next cycle 'out_valid' presents
// q[j] = (sum c[n] y[j-n]) >>> 8, saturated to W bits. Group delay: 5.5
// input samples. 'clear' empties the delay line between frames. The tap
// count, roll-off and rate follow the published receiver; the coefficient
// scaling and word widths are this design's.
module matched_filter #(
  parameter int W = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_y,
  output logic                out_valid,
  output logic signed [W-1:0] out_q
);
  localparam int NTAP = 12;
  localparam int CSH  = 8;
  typedef logic signed [9:0] coef_t;
  localparam coef_t COEF [NTAP] = '{-10'sd1, 10'sd10, -10'sd5, -10'sd25, 10'sd29, 10'sd122,
                                    10'sd122, 10'sd29, -10'sd25, -10'sd5, 10'sd10, -10'sd1};

  logic signed [W-1:0] tap [NTAP];
  logic signed [W+14:0] acc;

  always_comb begin
    acc = (W+15)'(COEF[0]) * (W+15)'(in_y);
    for (int n = 1; n < NTAP; n++) acc += (W+15)'(COEF[n]) * (W+15)'(tap[n-1]);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int n = 0; n < NTAP; n++) tap[n] <= '0;
      out_valid <= 1'b0;
      out_q     <= '0;
    end else if (clear) begin
      for (int n = 0; n < NTAP; n++) tap[n] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        tap[0] <= in_y;
        for (int n = 1; n < NTAP; n++) tap[n] <= tap[n-1];
        if ((acc >>> CSH) > (W+15)'((1 <<< (W-1)) - 1))  out_q <= W'((1 <<< (W-1)) - 1);
        else if ((acc >>> CSH) < -(W+15)'(1 <<< (W-1))) out_q <= W'(-(1 <<< (W-1)));
        else                                           out_q <= W'(acc >>> CSH);
      end
    end
endmodule
