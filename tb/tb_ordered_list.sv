// tb_ordered_list: self-checking test of ordered_list.
//
// Random cycles of remove-by-identifier, remove-head and ordered insert, often
// both in the same cycle, are applied to an 8-entry list with ranks drawn
// from a small range so that ties are common. A reference model kept in a
// SystemVerilog queue (linear search, insert after the last entry of lower or
// equal rank) predicts the lookup result of every cycle and the head, count
// and full flag after it. Every cycle is one operation, so the check also
// confirms the single-cycle latency. A watchdog ends the run if it hangs.
module tb_ordered_list;
  localparam int unsigned N   = 8;
  localparam int unsigned IDW = 3;
  localparam int unsigned RW  = 32;

  typedef struct {
    logic [IDW-1:0] id;
    logic [RW-1:0]  rank;
  } ent_t;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic rm_en = 1'b0, rm_head = 1'b0, ins_en = 1'b0;
  logic [IDW-1:0] rm_id = '0, ins_id = '0;
  logic [RW-1:0]  ins_rank = '0;
  logic rm_found, ins_dropped, head_valid, full;
  logic [RW-1:0] rm_rank, head_rank;
  logic [IDW-1:0] head_id;
  logic [$clog2(N+1)-1:0] count;

  int checks = 0, failures = 0;
  ent_t model[$];

  ordered_list #(.N(N), .RW(RW), .IDW(IDW)) dut (.*);

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
    int pos, m_pos, ties;
    bit m_found, m_drop;
    logic [RW-1:0] m_rank;
    ties = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(count == 0 && !head_valid, "empty after reset");
    for (int t = 0; t < 4000; t++) begin
      rm_en    = ($urandom_range(0, 9) < 4);
      rm_head  = $urandom_range(0, 1);
      rm_id    = IDW'($urandom_range(0, N - 1));
      ins_en   = ($urandom_range(0, 9) < 6);
      ins_id   = IDW'($urandom_range(0, N - 1));
      ins_rank = RW'($urandom_range(0, 5));
      #1;
      // Model: locate the element to remove.
      m_found = 0; m_pos = 0; m_rank = '0;
      if (rm_head) begin
        m_found = model.size() > 0;
        if (m_found) m_rank = model[0].rank;
      end else begin
        for (int i = 0; i < model.size(); i++)
          if (!m_found && model[i].id == rm_id) begin
            m_found = 1; m_pos = i; m_rank = model[i].rank;
          end
      end
      check(rm_found == m_found, "rm_found");
      if (m_found) check(rm_rank == m_rank, "rm_rank");
      if (rm_en && m_found) model.delete(m_pos);
      m_drop = ins_en && model.size() >= N;
      check(ins_dropped == m_drop, "ins_dropped");
      if (ins_en && !m_drop) begin
        pos = model.size();
        for (int i = model.size() - 1; i >= 0; i--) if (model[i].rank > ins_rank) pos = i;
        if (pos > 0 && model[pos-1].rank == ins_rank) ties++;
        model.insert(pos, '{ins_id, ins_rank});
      end
      @(posedge clk);
      @(negedge clk);
      check(count == model.size(), "count");
      check(full == (model.size() == N), "full");
      check(head_valid == (model.size() > 0), "head_valid");
      if (model.size() > 0) begin
        check(head_id == model[0].id, "head_id");
        check(head_rank == model[0].rank, "head_rank");
      end
    end
    // Drain through the head and check the whole order.
    rm_en = 1; rm_head = 1; ins_en = 0;
    while (model.size() > 0) begin
      check(head_id == model[0].id && head_rank == model[0].rank, "drain order");
      model.delete(0);
      @(posedge clk);
      @(negedge clk);
    end
    check(count == 0, "drained");
    check(ties > 0, "equal ranks exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
