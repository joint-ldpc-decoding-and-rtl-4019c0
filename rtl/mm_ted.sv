// mm_ted -- decision-directed Mueller-Mueller timing error detector.
//
//   u[i] = d[i-1] s[i] - d[i] s[i-1]
// with d in {+1, -1} (input bit d_bit = 1 means -1, the decoder's hard
// decision for a code bit 1) and s the loop-2 interpolant. The decisions come
// from the LDPC decoder after its latest iteration, not from a slicer. u is
// combinational from the current inputs and the previous symbol held in
// registers; 'step' moves the current (s, d) into those registers and 'clear'
// forgets them at the start of a frame. u is 0 while no previous symbol is
// held (the first symbol of a frame) and when en = 0. A negative u means the
// samples are late. The detector type and its use of decoded symbols follow
// the published receiver; the widths and the enable are this design's.
module mm_ted #(
  parameter int W = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                en,
  input  logic                step,
  input  logic signed [W-1:0] s,
  input  logic                d_bit,
  output logic signed [W+1:0] u
);
  logic signed [W-1:0] s_prev;
  logic                d_prev;
  logic                prev_ok;
  logic signed [W+1:0] a, b;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s_prev <= '0; d_prev <= 1'b0; prev_ok <= 1'b0;
    end else if (clear) begin
      s_prev <= '0; d_prev <= 1'b0; prev_ok <= 1'b0;
    end else if (step) begin
      s_prev <= s; d_prev <= d_bit; prev_ok <= 1'b1;
    end

  always_comb begin
    a = d_prev ? -(W+2)'(s)      : (W+2)'(s);
    b = d_bit  ? -(W+2)'(s_prev) : (W+2)'(s_prev);
    u = (en && prev_ok) ? a - b : '0;
  end
endmodule
