// tb_philosophers: a dining-philosophers thread set run on hw_scheduler at
// its default parameters, the kind of application the scheduler serves. The
// workload runs twice: once on the default register-based scheduler and once
// on one built with the memory-based microarchitecture (UARCH_SERIAL).
//
// A main thread (priority 0) and five philosopher threads (priority 10,
// equal, so they share the processor round robin) are created and inserted.
// Main then waits for the philosophers: it removes itself, as a join would
// suspend it. On every timer tick the thread that owns the processor (the
// scheduler's chosen element) makes one step: think, take its first fork,
// take its second fork, eat, put both forks down. Philosopher 4 takes its
// forks in the opposite order, so the set cannot deadlock. A philosopher
// that finds a fork taken is suspended (remove) and resumed (insert) when
// the fork is put down. After each step the tick calls choose, the
// preemption point. When every philosopher has eaten enough times, main is
// resumed and, being more urgent, takes the processor on the next choose;
// then all threads are destroyed.
//
// Every call's answer is compared with the reference model in sched_ref_pkg.
// The testbench also checks that the owner is always a thread that is not
// blocked, that neighbours never eat at the same time, that size matches the
// number of runnable threads, and that every philosopher eats. It measures
// the cycles of every call, from presenting it to done. The register-based
// scheduler must take exactly 2 for every method. The memory-based one must
// stay within 2N+3 and must take longer for some calls. The average per method
// is printed for both, with the time at a 50 MHz clock.
module tb_philosophers;
  import sched_pkg::*;
  import sched_ref_pkg::*;
  localparam int unsigned N = 16;
  localparam int P = 5;
  localparam int MEALS = 6;

  typedef enum {THINK, HUNGRY, HAS_ONE, EAT} phase_e;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [1:0] call_valid = '0;
  logic [1:0] call_ready, done;
  logic [3:0] call_m = '0;
  int_t call_par = '0, call_prio = '0;
  status_e st[2];
  int_t ret[2];

  int checks = 0, failures = 0;
  int n_suspend, n_resume, n_switch, n_calls;
  int which;                 // 0: register-based, 1: memory-based
  longint cyc_sum[2][11];
  int     cyc_n[2][11];
  int     cyc_max[2];
  sched_ref ref_m;

  hw_scheduler dut_par (
    .clk, .rst_n, .call_valid(call_valid[0]), .call_ready(call_ready[0]), .call_m,
    .call_par, .call_prio, .done(done[0]), .st(st[0]), .ret(ret[0]));
  hw_scheduler #(.UARCH(UARCH_SERIAL)) dut_ser (
    .clk, .rst_n, .call_valid(call_valid[1]), .call_ready(call_ready[1]), .call_m,
    .call_par, .call_prio, .done(done[1]), .st(st[1]), .ret(ret[1]));

  always #10 clk = ~clk;  // 50 MHz

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One call, waited for; the answer is checked against the model.
  task automatic call(input method_id_e m, input int par, input int prio,
                      output status_e o_st, output int o_ret);
    bit ok;
    int r;
    bit takes_id;
    int lat;
    takes_id = (m == M_INSERT || m == M_DESTROY || m == M_REMOVE || m == M_CHOOSE_ELEM);
    ref_m.call(m, takes_id ? par : 0, par, prio, ok, r);
    // The previous call has been answered, so the scheduler is ready.
    check(call_ready[which], "ready for the next call");
    call_valid[which] = 1'b1;
    call_m = m;
    call_par = par;
    call_prio = prio;
    @(posedge clk);
    #1;
    call_valid[which] = 1'b0;
    lat = 1;
    do begin
      @(posedge clk);
      #1;
      lat++;
    end while (!done[which] && lat < 100);
    n_calls++;
    check(done[which], "answered");
    if (which == 0) check(lat == 2, "register-based: two cycles");
    else            check(lat <= 2 * N + 3, "memory-based: within 2N+3 cycles");
    cyc_sum[which][m] += longint'(lat);
    cyc_n[which][m]++;
    if (lat > cyc_max[which]) cyc_max[which] = lat;
    check(st[which] == (ok ? ST_OK : ST_NONE), $sformatf("status of method %0d", m));
    if (ok) check(ret[which] == r, $sformatf("ret of method %0d", m));
    o_st = st[which];
    o_ret = ret[which];
  endtask

  task automatic run_table();
    status_e s;
    int r, owner, main_id, f1, f2, k, runnable, tick;
    int id[P], eats[P], timer[P], waiting_on[P];
    phase_e ph[P];
    bit fork_busy[P], blocked[P], all_fed, main_back;
    ref_m = new(N);
    n_suspend = 0; n_resume = 0; n_switch = 0; n_calls = 0;

    // Main thread starts and owns the processor.
    call(M_CREATE, 1000, 0, s, main_id);
    call(M_INSERT, main_id, 0, s, r);
    for (int i = 0; i < P; i++) begin
      call(M_CREATE, 100 + i, 10, s, id[i]);
      call(M_INSERT, id[i], 0, s, r);
      ph[i] = THINK; timer[i] = 1 + i; eats[i] = 0; blocked[i] = 0;
      waiting_on[i] = -1; fork_busy[i] = 0;
    end
    call(M_CHOSEN, 0, 0, s, r);
    check(r == 1000, "main owns the processor first");
    // Main joins: it suspends itself.
    call(M_REMOVE, main_id, 0, s, r);
    main_back = 0;

    for (tick = 0; tick < 20000; tick++) begin
      call(M_CHOSEN, 0, 0, s, r);
      check(s == ST_OK, "someone runs");
      if (r == 1000) begin
        check(main_back, "main runs only after being resumed");
        break;
      end
      owner = r - 100;
      check(owner >= 0 && owner < P && !blocked[owner], "owner is a runnable philosopher");
      // Fork order: left = i, right = (i+1)%P; philosopher P-1 takes right first.
      f1 = (owner == P - 1) ? 0 : owner;
      f2 = (owner == P - 1) ? owner : owner + 1;
      case (ph[owner])
        THINK: begin
          timer[owner]--;
          if (timer[owner] <= 0) ph[owner] = HUNGRY;
        end
        HUNGRY, HAS_ONE: begin
          k = (ph[owner] == HUNGRY) ? f1 : f2;
          if (!fork_busy[k]) begin
            fork_busy[k] = 1;
            if (ph[owner] == HUNGRY) ph[owner] = HAS_ONE;
            else begin ph[owner] = EAT; timer[owner] = 2 + $urandom_range(0, 2); end
          end else begin
            // Suspend until the fork is put down.
            call(M_REMOVE, id[owner], 0, s, r);
            blocked[owner] = 1;
            waiting_on[owner] = k;
            n_suspend++;
          end
        end
        EAT: begin
          check(!(ph[(owner + 1) % P] == EAT) && !(ph[(owner + P - 1) % P] == EAT),
                "neighbours never eat together");
          timer[owner]--;
          if (timer[owner] <= 0) begin
            eats[owner]++;
            fork_busy[f1] = 0;
            fork_busy[f2] = 0;
            ph[owner] = THINK;
            timer[owner] = 1 + $urandom_range(0, 3);
            for (int j = 0; j < P; j++)
              if (blocked[j] && (waiting_on[j] == f1 || waiting_on[j] == f2)) begin
                call(M_INSERT, id[j], 0, s, r);
                blocked[j] = 0;
                waiting_on[j] = -1;
                n_resume++;
              end
          end
        end
      endcase
      // Size equals the runnable threads.
      runnable = int'(main_back);
      for (int j = 0; j < P; j++) runnable += !blocked[j];
      call(M_SIZE, 0, 0, s, r);
      check(r == runnable, "size matches runnable threads");
      all_fed = 1;
      for (int j = 0; j < P; j++) if (eats[j] < MEALS) all_fed = 0;
      if (all_fed && !main_back) begin
        call(M_INSERT, main_id, 0, s, r);
        main_back = 1;
      end
      // Timer tick: preemption point.
      call(M_CHOOSE, 0, 0, s, r);
      if (r - 100 != owner) n_switch++;
    end
    check(main_back, "every philosopher ate enough");
    // Main tears down the table.
    for (int i = 0; i < P; i++) call(M_DESTROY, id[i], 0, s, r);
    call(M_SIZE, 0, 0, s, r);
    check(r == 1, "only main is left");
    call(M_DESTROY, main_id, 0, s, r);
    call(M_CHOSEN, 0, 0, s, r);
    check(s == ST_NONE, "empty at the end");
    for (int j = 0; j < P; j++) check(eats[j] >= MEALS, $sformatf("philosopher %0d ate", j));
    check(n_suspend > 0 && n_resume > 0, "threads were suspended and resumed");
    check(n_switch > 0, "the processor changed hands");
    $display("%s: ticks %0d, calls %0d, suspends %0d, resumes %0d, switches %0d, meals %0d %0d %0d %0d %0d",
             (which != 0) ? "memory-based" : "register-based", tick, n_calls, n_suspend, n_resume,
             n_switch, eats[0], eats[1], eats[2], eats[3], eats[4]);
  endtask

  initial begin
    static string name[11] = '{"chosen", "create", "insert", "destroy", "remove", "remove_head",
                        "size", "get_id", "choose", "choose_another", "choose_elem"};
    foreach (cyc_n[u, m]) begin cyc_n[u][m] = 0; cyc_sum[u][m] = 0; end
    cyc_max = '{0, 0};
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (which = 0; which < 2; which++) run_table();
    check(cyc_max[1] > 3, "memory-based calls that walk take longer");
    $display("average cycles per call (at 50 MHz), register-based / memory-based:");
    for (int m = 0; m < 11; m++)
      if (cyc_n[0][m] > 0 && cyc_n[1][m] > 0)
        $display("  %-14s %5.2f (%4.0f ns) / %5.2f (%4.0f ns)", name[m],
                 real'(cyc_sum[0][m]) / cyc_n[0][m], 20.0 * real'(cyc_sum[0][m]) / cyc_n[0][m],
                 real'(cyc_sum[1][m]) / cyc_n[1][m], 20.0 * real'(cyc_sum[1][m]) / cyc_n[1][m]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
