// tb_delay_estimator -- runs the outer (time-delay) loop of the 2-D search:
// five candidates at BASE + (idx - 2) * 102, a satisfied-check count and a
// frequency estimate per candidate; the estimator must keep the best
// candidate's delay word and frequency, hold that delay word once the search
// ends, and resolve equal highest counts to the midpoint candidate between the
// first and the last of them (rounded down), with that candidate's frequency.
module tb_delay_estimator;
  import ldpc_tr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, res_valid, searching, last, done;
  logic [10:0] cnt, best_cnt;
  logic signed [PPMW-1:0] f_est, best_f;
  logic [POSW-1:0] pos, best_pos;
  int checks = 0, failures = 0;

  delay_estimator dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic search(input int counts [5], input int winner, input int best);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int n = 0; n < 5; n++) begin
      check(searching && int'(pos) == 3456 + (n - 2) * 102, $sformatf("candidate %0d pos %0d", n, pos));
      check(last == (n == 4), "last flag");
      cnt = 11'(counts[n]); f_est = PPMW'(100 * n - 150); res_valid = 1;
      @(negedge clk); res_valid = 0;
    end
    check(done && !searching, "done after the last candidate");
    check(int'(best_pos) == 3456 + (winner - 2) * 102 && int'(pos) == int'(best_pos),
          $sformatf("best pos %0d", best_pos));
    check(int'(best_f) == 100 * winner - 150, $sformatf("best f %0d", best_f));
    check(int'(best_cnt) == best, $sformatf("best count %0d", best_cnt));
  endtask

  initial begin
    start = 0; res_valid = 0; cnt = '0; f_est = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    search('{600, 700, 880, 760, 610}, 2, 880);
    search('{900, 700, 600, 760, 610}, 0, 900);
    search('{600, 800, 700, 800, 610}, 2, 800);   // tie 1..3 -> 2
    search('{600, 700, 720, 760, 910}, 4, 910);
    search('{972, 972, 500, 972, 972}, 2, 972);   // tie 0..4 -> 2
    search('{400, 972, 972, 500, 300}, 1, 972);   // tie 1..2 -> 1 (rounded down)
    search('{400, 500, 972, 600, 972}, 3, 972);   // tie 2..4 -> 3
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
