// tb_alloc_wrapper: self-checking test of alloc_wrapper (8 slots, priority
// criterion).
//
// Random methods, one per cycle, with element identifiers, client values
// (from a small set, so the search by value meets duplicates) and priorities
// (small signed range, so ties occur) are applied to the wrapper and to the
// reference model in sched_ref_pkg. The option-typed response is compared
// every cycle: whether it holds a value and, if so, the value. Every method
// must have both succeeded and failed at least once, and the pool must have
// been full, a queued element destroyed and choose must have both switched
// and kept the owner.
module tb_alloc_wrapper;
  import sched_pkg::*;
  import sched_ref_pkg::*;
  localparam int unsigned N   = 8;
  localparam int unsigned IDW = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic req_valid = 1'b0;
  method_id_e req_m = M_CHOSEN;
  logic [IDW-1:0] req_id = '0;
  int_t req_value = '0, req_prio = '0;
  maybe_int_t rsp;

  int checks = 0, failures = 0;
  sched_ref ref_m;

  alloc_wrapper #(.N(N), .CRIT(CRIT_PRIORITY), .IDW(IDW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit e_ok;
    int e_ret, k;
    ref_m = new(N);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int step = 0; step < 8000; step++) begin
      k = $urandom_range(0, 99);
      if (k < 16)      req_m = M_CREATE;
      else if (k < 22) req_m = M_DESTROY;
      else if (k < 26) req_m = M_GET_ID;
      else if (k < 29) req_m = M_SIZE;
      else if (k < 32) req_m = M_CHOSEN;
      else if (k < 52) req_m = M_INSERT;
      else if (k < 60) req_m = M_REMOVE;
      else if (k < 66) req_m = M_REMOVE_HEAD;
      else if (k < 80) req_m = M_CHOOSE;
      else if (k < 88) req_m = M_CHOOSE_ANOTHER;
      else             req_m = M_CHOOSE_ELEM;
      req_valid = ($urandom_range(0, 19) != 0);
      req_id    = IDW'($urandom_range(0, N - 1));
      req_value = int_t'($urandom_range(1000, 1011));
      req_prio  = int_t'($urandom_range(0, 4) - 2);
      #1;
      if (req_valid) begin
        ref_m.call(req_m, req_id, req_value, req_prio, e_ok, e_ret);
        check(rsp.exists == e_ok, $sformatf("exists of method %0d", req_m));
        if (e_ok) check(rsp.thing == int_t'(e_ret), $sformatf("value of method %0d", req_m));
      end else begin
        check(!rsp.exists, "idle cycle returns nothing");
      end
      @(posedge clk);
      @(negedge clk);
    end
    for (int m = 0; m <= 10; m++) begin
      if (m != int'(M_SIZE) && m != int'(M_CREATE) && m != int'(M_GET_ID))
        check(ref_m.n_fail[m] > 0, $sformatf("method %0d failed at least once", m));
      check(ref_m.n_ok[m] > 0, $sformatf("method %0d succeeded at least once", m));
    end
    check(ref_m.n_pool_full > 0, "pool full seen");
    check(ref_m.n_destroy_queued > 0, "queued element destroyed");
    check(ref_m.n_switch > 0 && ref_m.n_keep > 0, "choose switched and kept");
    $display("pool full %0d, destroy of queued %0d, choose switched %0d kept %0d",
             ref_m.n_pool_full, ref_m.n_destroy_queued, ref_m.n_switch, ref_m.n_keep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
