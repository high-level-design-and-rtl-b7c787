// tb_hw_scheduler: end-to-end test of hw_scheduler at its default parameters
// (16 element slots, priority criterion), through the call interface only.
//
// Phase 1, directed: five clients of equal priority and one of higher
// priority are created and inserted. The high-priority client must be chosen
// first and keep the resource under choose; once it is removed, repeated
// choose calls must hand the resource round robin over the other five, in
// insertion order; choose_another and choose of a named element must hand it
// where they say. These expectations are written out by hand.
// Phase 2, random: calls are issued back to back or with gaps, with random
// methods (including unknown method numbers and out-of-range element
// identifiers), and checked against the reference model in sched_ref_pkg.
// Every call must complete with done exactly two cycles after it was issued.
// Counters make sure every mechanism was exercised: each method succeeding
// and failing, a full pool, destroying a queued element, choose switching and
// keeping, both kinds of rejected call and back-to-back calls.
module tb_hw_scheduler;
  import sched_pkg::*;
  import sched_ref_pkg::*;
  localparam int unsigned N = 16;
  localparam int unsigned LATENCY = 2;

  typedef struct {
    status_e st;
    int      ret;
    bit      check_ret;
    longint  issued;
  } exp_t;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic call_valid = 1'b0;
  logic [3:0] call_m = '0;
  int_t call_par = '0, call_prio = '0;
  logic done, call_ready;
  status_e st;
  int_t ret;

  int checks = 0, failures = 0;
  int n_bad_method = 0, n_bad_param = 0, n_back_to_back = 0;
  longint cycle = 0;
  exp_t expq[$];
  sched_ref ref_m;

  hw_scheduler dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Response checker: compares every done with the oldest expectation.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && done) begin
      exp_t e;
      if (expq.size() == 0) check(0, "done without a call");
      else begin
        e = expq.pop_front();
        check(cycle - e.issued == LATENCY, "latency");
        check(st == e.st, $sformatf("status (got %0d expected %0d)", st, e.st));
        if (e.check_ret && st == ST_OK) check(ret == e.ret, $sformatf("ret (got %0d expected %0d)", ret, e.ret));
      end
    end
  end

  // Issue one call in the current cycle and predict its answer.
  task automatic issue(input int m, input int par, input int prio);
    exp_t e;
    bit ok;
    int r;
    bit takes_id;
    check(call_ready, "the parallel core never holds a call back");
    call_valid = 1'b1;
    call_m     = 4'(m);
    call_par   = par;
    call_prio  = prio;
    e.issued   = cycle;
    e.check_ret = 1;
    takes_id = (m == M_INSERT || m == M_DESTROY || m == M_REMOVE || m == M_CHOOSE_ELEM);
    if (m > 10) begin
      e.st = ST_BAD_METHOD; e.ret = 0; e.check_ret = 0;
      n_bad_method++;
    end else if (takes_id && (par < 0 || par >= int'(N))) begin
      e.st = ST_BAD_PARAM; e.ret = 0; e.check_ret = 0;
      n_bad_param++;
    end else begin
      ref_m.call(method_id_e'(m), takes_id ? par : 0, par, prio, ok, r);
      e.st = ok ? ST_OK : ST_NONE;
      e.ret = r;
    end
    expq.push_back(e);
    @(posedge clk);
    #1;
    call_valid = 1'b0;
  endtask

  // Directed call: issue, wait for the answer and compare with the given one.
  task automatic expect_call(input int m, input int par, input int prio,
                             input status_e want_st, input int want_ret, input string what);
    issue(m, par, prio);
    // The model must agree with the hand-written expectation too.
    check(expq[$].st == want_st, {what, ": model status"});
    if (want_st == ST_OK) check(expq[$].ret == want_ret, {what, ": model ret"});
    repeat (LATENCY) @(posedge clk);
    #1;
  endtask

  initial begin
    int k, m, par, gap;
    int ids[6];
    ref_m = new(N);
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;

    // ---- Phase 1: directed ----
    expect_call(M_SIZE, 0, 0, ST_OK, 0, "empty size");
    expect_call(M_CHOSEN, 0, 0, ST_NONE, 0, "nothing chosen");
    for (int i = 0; i < 5; i++) begin
      expect_call(M_CREATE, 500 + i, 10, ST_OK, i, "create philosopher");
      ids[i] = i;
    end
    expect_call(M_CREATE, 900, 1, ST_OK, 5, "create main");
    ids[5] = 5;
    expect_call(M_GET_ID, 503, 0, ST_OK, 3, "get_id");
    expect_call(M_GET_ID, 777, 0, ST_NONE, 0, "get_id miss");
    for (int i = 0; i < 5; i++) expect_call(M_INSERT, ids[i], 0, ST_OK, 500 + i, "insert philosopher");
    expect_call(M_INSERT, 2, 0, ST_NONE, 0, "insert twice");
    expect_call(M_CHOSEN, 0, 0, ST_OK, 500, "first inserted is chosen");
    expect_call(M_INSERT, ids[5], 0, ST_OK, 900, "insert main");
    expect_call(M_CHOOSE, 0, 0, ST_OK, 900, "higher priority takes over");
    expect_call(M_CHOOSE, 0, 0, ST_OK, 900, "higher priority keeps it");
    expect_call(M_SIZE, 0, 0, ST_OK, 6, "size 6");
    expect_call(M_REMOVE_HEAD, 0, 0, ST_OK, 900, "main leaves");
    expect_call(M_CHOSEN, 0, 0, ST_OK, 501, "next in line");
    expect_call(M_CHOOSE, 0, 0, ST_OK, 502, "round robin 2");
    expect_call(M_CHOOSE, 0, 0, ST_OK, 503, "round robin 3");
    expect_call(M_CHOOSE, 0, 0, ST_OK, 504, "round robin 4");
    expect_call(M_CHOOSE, 0, 0, ST_OK, 500, "round robin 0");
    expect_call(M_CHOOSE, 0, 0, ST_OK, 501, "round robin 1");
    expect_call(M_CHOOSE_ELEM, 4, 0, ST_OK, 504, "choose element 4");
    expect_call(M_CHOSEN, 0, 0, ST_OK, 504, "element 4 owns");
    expect_call(M_CHOOSE_ANOTHER, 0, 0, ST_OK, 502, "choose another");
    expect_call(M_DESTROY, 2, 0, ST_OK, 502, "destroy the owner");
    expect_call(M_CHOSEN, 0, 0, ST_OK, 503, "owner after destroy");
    expect_call(M_REMOVE, 2, 0, ST_NONE, 0, "remove destroyed");
    expect_call(M_INSERT, 16, 0, ST_BAD_PARAM, 0, "identifier out of range");
    expect_call(M_INSERT, -1, 0, ST_BAD_PARAM, 0, "negative identifier");
    expect_call(12, 0, 0, ST_BAD_METHOD, 0, "unknown method");
    expect_call(M_SIZE, 0, 0, ST_OK, 4, "size 4");

    // ---- Phase 2: random, pipelined ----
    for (int step = 0; step < 20000; step++) begin
      k = $urandom_range(0, 99);
      if (k < 15)      m = M_CREATE;
      else if (k < 21) m = M_DESTROY;
      else if (k < 25) m = M_GET_ID;
      else if (k < 28) m = M_SIZE;
      else if (k < 31) m = M_CHOSEN;
      else if (k < 50) m = M_INSERT;
      else if (k < 58) m = M_REMOVE;
      else if (k < 64) m = M_REMOVE_HEAD;
      else if (k < 78) m = M_CHOOSE;
      else if (k < 86) m = M_CHOOSE_ANOTHER;
      else if (k < 97) m = M_CHOOSE_ELEM;
      else             m = $urandom_range(11, 15);
      if (m == M_CREATE || m == M_GET_ID) par = $urandom_range(2000, 2023);
      else if ($urandom_range(0, 49) == 0) par = ($urandom_range(0, 1) != 0) ? -int'($urandom_range(1, 5)) : int'(N) + int'($urandom_range(0, 40));
      else par = $urandom_range(0, N - 1);
      issue(m, par, int'($urandom_range(0, 6)) - 3);
      gap = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 3) : 0;
      if (gap == 0) n_back_to_back++;
      repeat (gap) @(posedge clk);
      #1;
    end
    repeat (LATENCY + 2) @(posedge clk);
    check(expq.size() == 0, "every call answered");

    for (int i = 0; i <= 10; i++) begin
      check(ref_m.n_ok[i] > 0, $sformatf("method %0d succeeded", i));
      if (i != int'(M_SIZE) && i != int'(M_GET_ID) && i != int'(M_CREATE))
        check(ref_m.n_fail[i] > 0, $sformatf("method %0d failed", i));
    end
    check(ref_m.n_fail[M_GET_ID] > 0, "get_id miss");
    check(ref_m.n_pool_full > 0, "storage full");
    check(ref_m.n_destroy_queued > 0, "queued element destroyed");
    check(ref_m.n_switch > 0, "choose switched");
    check(ref_m.n_keep > 0, "choose kept");
    check(ref_m.n_another > 0, "choose_another switched");
    check(n_bad_method > 0, "unknown method rejected");
    check(n_bad_param > 0, "bad identifier rejected");
    check(n_back_to_back > 0, "back-to-back calls");
    $display("mechanisms: pool full %0d, destroy queued %0d, choose switch %0d keep %0d, another %0d, bad method %0d, bad param %0d, back-to-back %0d",
             ref_m.n_pool_full, ref_m.n_destroy_queued, ref_m.n_switch, ref_m.n_keep,
             ref_m.n_another, n_bad_method, n_bad_param, n_back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
