// tb_hw_scheduler_crit: directed test of the three scheduling criteria
// through the call interface of hw_scheduler.
//
// Three 4-slot schedulers, one per criterion, receive the same calls. Three
// clients are created with prio 100, 50 and -0x7000_0000 (which, read as an
// unsigned deadline, is 0x9000_0000, a late one) and inserted in that order.
// Hand-written expectations:
//   priority  the negative prio is most urgent: choose picks the third
//             client, then the second, then the first as each leaves.
//   EDF       deadline 50 is earliest, then 100, then 0x9000_0000.
//   FCFS      the prio is ignored: the first client keeps the resource under
//             choose, and the clients run in insertion order; choose_another
//             hands the resource on, and choose then returns it to the
//             earlier arrival.
module tb_hw_scheduler_crit;
  import sched_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic call_valid = 1'b0;
  logic [3:0] call_m = '0;
  int_t call_par = '0, call_prio = '0;
  logic    done[3];
  logic    ready[3];
  status_e st[3];
  int_t    ret[3];
  int checks = 0, failures = 0;

  hw_scheduler #(.N(4), .CRIT(CRIT_PRIORITY)) u_pri (.clk, .rst_n, .call_valid, .call_ready(ready[0]), .call_m, .call_par,
    .call_prio, .done(done[0]), .st(st[0]), .ret(ret[0]));
  hw_scheduler #(.N(4), .CRIT(CRIT_EDF)) u_edf (.clk, .rst_n, .call_valid, .call_ready(ready[1]), .call_m, .call_par,
    .call_prio, .done(done[1]), .st(st[1]), .ret(ret[1]));
  hw_scheduler #(.N(4), .CRIT(CRIT_FCFS)) u_fcfs (.clk, .rst_n, .call_valid, .call_ready(ready[2]), .call_m, .call_par,
    .call_prio, .done(done[2]), .st(st[2]), .ret(ret[2]));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One call to all three; want[i] is the expected ret of scheduler i.
  task automatic call3(input method_id_e m, input int par, input int prio,
                       input int w_pri, input int w_edf, input int w_fcfs, input string what);
    int want[3];
    want = '{w_pri, w_edf, w_fcfs};
    call_valid = 1'b1;
    call_m = m;
    call_par = par;
    call_prio = prio;
    @(posedge clk);
    #1;
    call_valid = 1'b0;
    @(posedge clk);
    #1;
    for (int i = 0; i < 3; i++) begin
      check(ready[i] && done[i] && st[i] == ST_OK, $sformatf("%s: status of scheduler %0d", what, i));
      check(ret[i] == want[i], $sformatf("%s: ret of scheduler %0d is %0d, expected %0d", what, i, ret[i], want[i]));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    call3(M_CREATE, 11, 100, 0, 0, 0, "create A");
    call3(M_CREATE, 22, 50, 1, 1, 1, "create B");
    call3(M_CREATE, 33, -32'sh7000_0000, 2, 2, 2, "create C");
    call3(M_INSERT, 0, 0, 11, 11, 11, "insert A");
    call3(M_INSERT, 1, 0, 22, 22, 22, "insert B");
    call3(M_INSERT, 2, 0, 33, 33, 33, "insert C");
    call3(M_CHOOSE, 0, 0, 33, 22, 11, "first choose");
    call3(M_CHOOSE, 0, 0, 33, 22, 11, "choose again keeps the owner");
    call3(M_CHOOSE_ANOTHER, 0, 0, 22, 11, 22, "choose another");
    call3(M_CHOOSE, 0, 0, 33, 22, 11, "choose returns to the most urgent");
    call3(M_REMOVE_HEAD, 0, 0, 33, 22, 11, "first leaves");
    call3(M_CHOSEN, 0, 0, 22, 11, 22, "second owner");
    call3(M_REMOVE_HEAD, 0, 0, 22, 11, 22, "second leaves");
    call3(M_CHOSEN, 0, 0, 11, 33, 33, "third owner");
    call3(M_SIZE, 0, 0, 1, 1, 1, "one left");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
