// tb_sched_criterion: self-checking test of sched_criterion.
//
// One instance of each criterion is driven with random priorities and random
// insertion strobes. Checks: under the priority criterion a signed comparison
// of two priorities agrees with the unsigned comparison of their ranks
// (negative priorities run first) and the rank equals prio + 2**31; under EDF
// the rank is the deadline itself; under FCFS the rank ignores prio and counts
// the insertions seen since reset, advancing one clock edge after take.
module tb_sched_criterion;
  import sched_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int_t prio = '0;
  logic take = 1'b0;
  int_t rank_p, rank_e, rank_f;
  int checks = 0, failures = 0;

  sched_criterion #(.CRIT(CRIT_PRIORITY)) u_p (.clk, .rst_n, .prio, .take, .rank(rank_p));
  sched_criterion #(.CRIT(CRIT_EDF))      u_e (.clk, .rst_n, .prio, .take, .rank(rank_e));
  sched_criterion #(.CRIT(CRIT_FCFS))     u_f (.clk, .rst_n, .prio, .take, .rank(rank_f));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int signed a, b;
    int_t ra, rb;
    longint unsigned expect_p;
    int unsigned arrivals;
    arrivals = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 2000; t++) begin
      a = $urandom;
      b = (t % 3 == 0) ? a : int'($urandom);
      if (t % 5 == 0) b = -a;
      prio = a;
      take = $urandom_range(0, 1);
      #1;
      ra = rank_p;
      expect_p = (longint'(unsigned'(a)) + 64'h8000_0000) & 64'hFFFF_FFFF;
      check(rank_p == int_t'(expect_p), "priority rank value");
      check(rank_e == int_t'(a), "edf rank value");
      check(rank_f == arrivals, "fcfs rank value");
      @(posedge clk);
      if (take) arrivals++;
      prio = b;
      #1;
      rb = rank_p;
      check((a < b) == (ra < rb), "priority order preserved");
      check((a == b) == (ra == rb), "priority ties preserved");
      @(negedge clk);
    end
    check(arrivals > 0 && rank_f == arrivals, "fcfs counted arrivals");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
