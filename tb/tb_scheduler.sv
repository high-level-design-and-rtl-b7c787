// tb_scheduler: self-checking test of scheduler (priority criterion, 8
// elements).
//
// Random methods with random element identifiers and priorities in a small
// signed range (so equal priorities are common) are applied one per cycle.
// A reference model holds the chosen element and a SystemVerilog queue of
// waiting elements sorted by priority, first-come first among equals; it
// predicts ok and the returned element combinationally, and the chosen
// element, size and membership after each clock edge. Counters make sure
// every method has been seen to succeed and to fail, and that choose has both
// switched and kept the owner.
module tb_scheduler;
  import sched_pkg::*;
  localparam int unsigned N   = 8;
  localparam int unsigned IDW = 3;

  typedef struct {
    int unsigned    id;
    longint         rank;
  } ent_t;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  sched_op_e op = S_NOP;
  logic [IDW-1:0] id = '0;
  int_t prio = '0;
  logic ok, res_valid, chosen_valid;
  logic [IDW-1:0] res_id, chosen_id;
  logic [$clog2(N+1)-1:0] size;
  logic [N-1:0] queued;

  int checks = 0, failures = 0;
  int n_ok[7], n_fail[7];
  int n_switch = 0, n_keep = 0;

  // Reference state.
  ent_t wait_q[$];
  bit   c_v;
  ent_t c;
  bit   in_s[N];

  scheduler #(.N(N), .CRIT(CRIT_PRIORITY), .IDW(IDW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic void enqueue(ent_t e);
    int pos = wait_q.size();
    for (int i = wait_q.size() - 1; i >= 0; i--) if (wait_q[i].rank > e.rank) pos = i;
    wait_q.insert(pos, e);
  endfunction

  function automatic int find(int unsigned x);
    for (int i = 0; i < wait_q.size(); i++) if (wait_q[i].id == x) return i;
    return -1;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit e_ok;
    int unsigned e_res;
    int k;
    ent_t t;
    c_v = 0;
    foreach (in_s[i]) in_s[i] = 0;
    foreach (n_ok[i]) begin n_ok[i] = 0; n_fail[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int step = 0; step < 6000; step++) begin
      // Bias towards inserts while the scheduler is nearly empty.
      k = $urandom_range(0, 99);
      if (k < 35)      op = S_INSERT;
      else if (k < 50) op = S_REMOVE;
      else if (k < 58) op = S_REMOVE_HEAD;
      else if (k < 75) op = S_CHOOSE;
      else if (k < 85) op = S_CHOOSE_ANOTHER;
      else if (k < 97) op = S_CHOOSE_ELEM;
      else             op = S_NOP;
      id   = IDW'($urandom_range(0, N - 1));
      prio = int_t'($urandom_range(0, 4) - 2);
      #1;
      e_ok = 0;
      e_res = id;
      case (op)
        S_INSERT: if (!in_s[id]) begin
          e_ok = 1;
          in_s[id] = 1;
          t.id = id;
          t.rank = longint'(signed'(prio));
          if (!c_v) begin c_v = 1; c = t; end
          else enqueue(t);
        end
        S_REMOVE: if (in_s[id]) begin
          e_ok = 1;
          in_s[id] = 0;
          if (c_v && c.id == id) begin
            if (wait_q.size() > 0) c = wait_q.pop_front();
            else c_v = 0;
          end else wait_q.delete(find(id));
        end
        S_REMOVE_HEAD: if (c_v) begin
          e_ok = 1;
          e_res = c.id;
          in_s[c.id] = 0;
          if (wait_q.size() > 0) c = wait_q.pop_front();
          else c_v = 0;
        end
        S_CHOOSE, S_CHOOSE_ANOTHER: if (c_v) begin
          e_ok = 1;
          if (wait_q.size() > 0 && (op == S_CHOOSE_ANOTHER || wait_q[0].rank <= c.rank)) begin
            t = c;
            c = wait_q.pop_front();
            enqueue(t);
            if (op == S_CHOOSE) n_switch++;
          end else if (op == S_CHOOSE && wait_q.size() > 0) n_keep++;
          e_res = c.id;
        end
        S_CHOOSE_ELEM: if (in_s[id]) begin
          e_ok = 1;
          if (c.id != id) begin
            t = wait_q[find(id)];
            wait_q.delete(find(id));
            enqueue(c);
            c = t;
          end
        end
        default: ;
      endcase
      check(ok == e_ok, "ok");
      check(res_valid == e_ok, "res_valid");
      if (e_ok) check(res_id == IDW'(e_res), "res_id");
      if (e_ok) n_ok[op]++; else n_fail[op]++;
      @(posedge clk);
      @(negedge clk);
      check(chosen_valid == c_v, "chosen_valid");
      if (c_v) check(chosen_id == IDW'(c.id), "chosen_id");
      check(size == wait_q.size() + c_v, "size");
      for (int i = 0; i < N; i++) check(queued[i] == in_s[i], "queued");
    end
    for (int o = 1; o <= 6; o++) begin
      check(n_ok[o] > 0, "method succeeded at least once");
      check(n_fail[o] > 0, "method failed at least once");
    end
    check(n_switch > 0 && n_keep > 0, "choose both switched and kept");
    $display("choose switched %0d kept %0d", n_switch, n_keep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
