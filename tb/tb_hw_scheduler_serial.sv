// tb_hw_scheduler_serial: end-to-end test of hw_scheduler built with the
// memory-based microarchitecture (UARCH_SERIAL, 16 slots, priority
// criterion), through the call interface only.
//
// Random calls, including unknown methods and out-of-range identifiers, are
// presented back to back or with gaps; each is held until call_ready lets an
// edge take it. Every answer is compared, in order, with the reference model
// in sched_ref_pkg, and every call must be answered exactly once. Calls rejected by the dispatch layer must take two
// cycles. Calls that reach the core must take from three to 2N+3 cycles,
// counted like the two cycles of the parallel core: from the cycle in which
// the call is presented to the one in which done is high. The
// testbench counts how often a call was held back by call_ready (which must
// happen) and how widely the answer times spread (they must vary).
module tb_hw_scheduler_serial;
  import sched_pkg::*;
  import sched_ref_pkg::*;
  localparam int unsigned N = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic call_valid = 1'b0;
  logic call_ready;
  logic [3:0] call_m = '0;
  int_t call_par = '0, call_prio = '0;
  logic done;
  status_e st;
  int_t ret;

  int checks = 0, failures = 0, n_held = 0, n_bad = 0;
  int lat_min = 1000, lat_max = 0;
  sched_ref ref_m;

  hw_scheduler #(.UARCH(UARCH_SERIAL)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    status_e st;
    int      ret;
    bit      rejected;
    int      m;
    longint  taken;
  } exp_t;

  exp_t   expq[$];
  longint cycle = 0;

  // Answer checker: every done is compared with the oldest open call.
  always @(posedge clk) begin
    exp_t e;
    int lat;
    cycle <= cycle + 1;
    if (rst_n && done) begin
      if (expq.size() == 0) check(0, "done without a call");
      else begin
        e = expq.pop_front();
        // Cycles from the one in which the call was presented and taken to
        // the one in which done is high.
        lat = int'(cycle - e.taken);
        check(st == e.st, $sformatf("status of method %0d (got %0d expected %0d)", e.m, st, e.st));
        if (e.st == ST_OK) check(ret == e.ret, $sformatf("ret of method %0d", e.m));
        if (e.rejected) check(lat == 2, "rejected call takes two cycles");
        else begin
          check(lat >= 3 && lat <= 2 * N + 3, "core call time within bounds");
          if (lat < lat_min) lat_min = lat;
          if (lat > lat_max) lat_max = lat;
        end
      end
    end
  end

  initial begin
    int k, m, par;
    bit ok, takes_id;
    int r;
    exp_t e;
    ref_m = new(N);
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int step = 0; step < 8000; step++) begin
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
      else if ($urandom_range(0, 49) == 0) par = int'(N) + int'($urandom_range(0, 9));
      else par = $urandom_range(0, N - 1);
      call_valid = 1'b1;
      call_m = 4'(m);
      call_par = par;
      call_prio = int'($urandom_range(0, 6)) - 3;
      // Hold the call until an edge takes it.
      #1;
      while (!call_ready) begin
        n_held++;
        @(posedge clk);
        #1;
      end
      @(posedge clk);
      e.taken = cycle;
      e.m = m;
      takes_id = (m == M_INSERT || m == M_DESTROY || m == M_REMOVE || m == M_CHOOSE_ELEM);
      e.rejected = 1;
      e.ret = 0;
      if (m > 10) e.st = ST_BAD_METHOD;
      else if (takes_id && par >= int'(N)) e.st = ST_BAD_PARAM;
      else begin
        e.rejected = 0;
        ref_m.call(method_id_e'(m), takes_id ? par : 0, par, call_prio, ok, r);
        e.st = ok ? ST_OK : ST_NONE;
        e.ret = r;
      end
      if (e.rejected) n_bad++;
      expq.push_back(e);
      #1;
      // Sometimes leave a gap.
      if ($urandom_range(0, 3) == 0) begin
        call_valid = 1'b0;
        repeat ($urandom_range(1, 3)) @(posedge clk);
        #1;
      end
    end
    call_valid = 1'b0;
    repeat (2 * N + 6) @(posedge clk);
    check(expq.size() == 0, "every call answered");
    for (int i = 0; i <= 10; i++) check(ref_m.n_ok[i] > 0, $sformatf("method %0d succeeded", i));
    check(ref_m.n_pool_full > 0, "storage full");
    check(ref_m.n_destroy_queued > 0, "queued element destroyed");
    check(ref_m.n_switch > 0 && ref_m.n_keep > 0, "choose switched and kept");
    check(n_bad > 0, "rejected calls");
    check(lat_max > lat_min, "answer time varies");
    check(n_held > 0, "calls were held back by call_ready");
    $display("held back %0d times, core call time %0d to %0d cycles, rejected calls %0d",
             n_held, lat_min, lat_max, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
