// tb_freq_estimator -- replays the narrowing frequency search of a worked
// example: true offset 1730 ppm, satisfied-check count falling by one per
// 10 ppm of candidate error. Three search iterations starting at +-2000 ppm
// with a 400 ppm step must visit windows [-2000,2000], [600,2600] and
// [1300,2300] with steps 400, 200, 100 and give estimates 1600, 1800 and 1700
// ppm. A separate sweep with a three-way tie checks the midpoint rule, and
// the number of cycles per candidate must be one.
module tb_freq_estimator;
  import ldpc_tr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init, sweep_start, cnt_valid, recenter, last, sweep_done;
  logic [10:0] cnt, best_cnt;
  logic signed [PPMW-1:0] new_center, cand, est;
  logic [PPMW-1:0] step;
  int checks = 0, failures = 0;

  freq_estimator dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int score(int f);
    int e = (f > 1730) ? f - 1730 : 1730 - f;
    return 900 - e / 10;
  endfunction

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int exp_lo [3] = '{-2000, 600, 1300};
    int exp_st [3] = '{400, 200, 100};
    int exp_est [3] = '{1600, 1800, 1700};
    init = 0; sweep_start = 0; cnt_valid = 0; recenter = 0; cnt = '0; new_center = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    for (int s = 0; s < 3; s++) begin
      @(negedge clk); sweep_start = 1; @(negedge clk); sweep_start = 0;
      check(int'(step) == exp_st[s], $sformatf("iter %0d step %0d", s, step));
      for (int n = 0; n < 11; n++) begin
        check(int'(cand) == exp_lo[s] + n * exp_st[s], $sformatf("iter %0d cand %0d = %0d", s, n, cand));
        check(last == (n == 10), "last flag");
        cnt = 11'(score(int'(cand))); cnt_valid = 1;
        @(negedge clk); cnt_valid = 0;
      end
      check(sweep_done == 1'b1, "sweep_done one cycle after the last count");
      check(int'(est) == exp_est[s], $sformatf("iter %0d estimate %0d exp %0d", s, est, exp_est[s]));
      check(int'(best_cnt) == score(exp_est[s]), "best count");
      @(negedge clk); recenter = 1; new_center = est; @(negedge clk); recenter = 0;
    end
    // tie: candidates 2, 3, 4 and 6 share the best count -> midpoint of 2 and 6
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    @(negedge clk); sweep_start = 1; @(negedge clk); sweep_start = 0;
    for (int n = 0; n < 11; n++) begin
      cnt = (n == 2 || n == 3 || n == 4 || n == 6) ? 11'd700 : 11'd500; cnt_valid = 1;
      @(negedge clk); cnt_valid = 0;
    end
    check(int'(est) == -400, $sformatf("tie midpoint %0d exp -400", est));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
