// sample_buffer -- frame store for received samples (and, as a second
// instance, for matched-filter outputs).
//
// The receiver keeps a whole frame because loop 1 re-interpolates the same
// samples once for every frequency/delay candidate: about 4N samples for an
// N-symbol frame at 4 samples per symbol, plus a few padding samples before
// and after so that delayed or frequency-shifted candidates stay inside.
// One synchronous write port and two asynchronous read ports; the second read
// port fetches the neighbouring sample that a linear interpolator needs in the
// same cycle. A read address at or beyond DEPTH returns 0 (the frame is
// treated as zero outside the stored span). The frame-store idea and the 4N
// size follow the published receiver; the port structure is this design's.
module sample_buffer #(
  parameter int W     = 12,
  parameter int DEPTH = 7872,
  parameter int AW    = $clog2(DEPTH + 2)
) (
  input  logic                clk,
  input  logic                we,
  input  logic [AW-1:0]       waddr,
  input  logic signed [W-1:0] wdata,
  input  logic [AW-1:0]       raddr0,
  output logic signed [W-1:0] rdata0,
  input  logic [AW-1:0]       raddr1,
  output logic signed [W-1:0] rdata1
);
  logic signed [W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we && waddr < AW'(DEPTH)) mem[waddr] <= wdata;

  always_comb begin
    rdata0 = (raddr0 < AW'(DEPTH)) ? mem[raddr0] : '0;
    rdata1 = (raddr1 < AW'(DEPTH)) ? mem[raddr1] : '0;
  end
endmodule
