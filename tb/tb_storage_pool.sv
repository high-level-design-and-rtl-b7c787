// tb_storage_pool: self-checking test of storage_pool (8 slots).
//
// Random reserve and release requests, at times both in one cycle, are
// applied with random client values drawn from a small set, so the value
// search meets duplicates and misses. A reference array of slots predicts the
// slot each reserve returns (the lowest free one), the full condition, both
// read ports and the search result (lowest used slot holding the value).
// Counters make sure the pool has been full and a reserve has been refused.
module tb_storage_pool;
  import sched_pkg::*;
  localparam int unsigned N   = 8;
  localparam int unsigned IDW = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic alloc_en = 1'b0, free_en = 1'b0;
  int_t alloc_value = '0, alloc_prio = '0, find_value = '0;
  logic [IDW-1:0] free_id = '0, rd_a_id = '0, rd_b_id = '0;
  logic alloc_ok, rd_a_used, rd_b_used, find_ok;
  logic [IDW-1:0] alloc_id, find_id;
  int_t rd_a_value, rd_a_prio, rd_b_value;
  logic [N-1:0] used;

  int checks = 0, failures = 0, n_full = 0, n_hit = 0, n_miss = 0;
  bit   m_used[N];
  int_t m_val[N], m_pri[N];

  storage_pool #(.N(N), .IDW(IDW)) dut (.*);

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
    int e_slot, e_find;
    foreach (m_used[i]) begin m_used[i] = 0; m_val[i] = 0; m_pri[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 5000; t++) begin
      alloc_en    = ($urandom_range(0, 99) < 55);
      free_en     = ($urandom_range(0, 99) < 40);
      alloc_value = int_t'($urandom_range(100, 111));
      alloc_prio  = $urandom;
      free_id     = IDW'($urandom_range(0, N - 1));
      rd_a_id     = IDW'($urandom_range(0, N - 1));
      rd_b_id     = IDW'($urandom_range(0, N - 1));
      find_value  = int_t'($urandom_range(100, 111));
      #1;
      e_slot = -1;
      for (int i = N - 1; i >= 0; i--) if (!m_used[i]) e_slot = i;
      e_find = -1;
      for (int i = N - 1; i >= 0; i--) if (m_used[i] && m_val[i] == find_value) e_find = i;
      check(alloc_ok == (e_slot >= 0), "alloc_ok");
      if (e_slot >= 0) check(alloc_id == IDW'(e_slot), "alloc_id");
      else begin
        n_full++;
      end
      check(find_ok == (e_find >= 0), "find_ok");
      if (e_find >= 0) begin
        check(find_id == IDW'(e_find), "find_id");
        n_hit++;
      end else n_miss++;
      check(rd_a_used == m_used[rd_a_id], "rd_a_used");
      if (m_used[rd_a_id]) begin
        check(rd_a_value == m_val[rd_a_id], "rd_a_value");
        check(rd_a_prio == m_pri[rd_a_id], "rd_a_prio");
      end
      check(rd_b_used == m_used[rd_b_id], "rd_b_used");
      if (m_used[rd_b_id]) check(rd_b_value == m_val[rd_b_id], "rd_b_value");
      for (int i = 0; i < N; i++) check(used[i] == m_used[i], "used");
      if (free_en) m_used[free_id] = 0;
      if (alloc_en && e_slot >= 0) begin
        m_used[e_slot] = 1;
        m_val[e_slot]  = alloc_value;
        m_pri[e_slot]  = alloc_prio;
      end
      @(posedge clk);
      @(negedge clk);
    end
    check(n_full > 0, "pool was full");
    check(n_hit > 0 && n_miss > 0, "search hit and missed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
