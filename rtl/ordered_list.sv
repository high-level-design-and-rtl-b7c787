// ordered_list: a list of up to N elements kept sorted by ascending rank.
//
// Each entry holds an element identifier and its rank. Entry 0 is the head.
// In one clock cycle the list can remove one element (the head, or a named
// element found by a parallel compare against every entry) and then insert
// one element. The insert goes after every entry whose rank is lower or
// equal, so elements of equal rank leave in the order they came in. The
// combined remove-then-insert is what the scheduler needs to swap its chosen
// element with a queued one in a single cycle.
//
// The list is made of registers and every operation is one cycle; this is
// the register-based, fully parallel organisation (data in registers, all
// loops unrolled). Sorting by rank with stable insertion is this design's
// reading of an "ordered list" whose order is set by the scheduling criterion.
//
// Reset is synchronous and active low (rst_n); it empties the list.
//
// Interface: rm_en/rm_head/rm_id and ins_en/ins_id/ins_rank are sampled at
// the rising clock edge. rm_found and rm_rank report, combinationally, whether
// the element to remove is present and its rank. head_*, count and full show
// the registered state. An insert into a full list (after the removal of the
// same cycle) is dropped and reported by ins_dropped.
module ordered_list #(
  parameter int unsigned N   = 16,
  parameter int unsigned RW  = 32,
  parameter int unsigned IDW = (N > 1) ? $clog2(N) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           rm_en,
  input  logic           rm_head,
  input  logic [IDW-1:0] rm_id,
  input  logic           ins_en,
  input  logic [IDW-1:0] ins_id,
  input  logic [RW-1:0]  ins_rank,
  output logic           rm_found,
  output logic [RW-1:0]  rm_rank,
  output logic           ins_dropped,
  output logic           head_valid,
  output logic [IDW-1:0] head_id,
  output logic [RW-1:0]  head_rank,
  output logic [$clog2(N+1)-1:0] count,
  output logic           full
);

  localparam int unsigned CW = $clog2(N+1);

  typedef struct packed {
    logic [IDW-1:0] id;
    logic [RW-1:0]  rank;
  } entry_t;

  entry_t        q      [N];
  logic [CW-1:0] cnt;

  entry_t        after_rm  [N];
  entry_t        after_ins [N];
  logic [CW-1:0] cnt_rm, cnt_ins;
  logic [CW-1:0] rm_pos, ins_pos;
  logic          do_rm, do_ins;
  entry_t        new_e;

  always_comb begin
    // Locate the element to remove.
    rm_found = 1'b0;
    rm_pos   = '0;
    rm_rank  = '0;
    if (rm_head) begin
      rm_found = (cnt != '0);
      rm_rank  = q[0].rank;
    end else begin
      for (int i = N - 1; i >= 0; i--) begin
        if (CW'(i) < cnt && q[i].id == rm_id) begin
          rm_found = 1'b1;
          rm_pos   = CW'(i);
          rm_rank  = q[i].rank;
        end
      end
    end
    do_rm = rm_en && rm_found;

    // Close the gap left by the removed entry.
    for (int i = 0; i < N; i++) begin
      if (do_rm && CW'(i) >= rm_pos && i < N - 1) after_rm[i] = q[i+1];
      else                                         after_rm[i] = q[i];
    end
    cnt_rm = do_rm ? cnt - 1'b1 : cnt;

    // Insert after all entries of lower or equal rank.
    new_e.id   = ins_id;
    new_e.rank = ins_rank;
    ins_pos    = '0;
    for (int i = 0; i < N; i++) begin
      if (CW'(i) < cnt_rm && after_rm[i].rank <= ins_rank) ins_pos = CW'(i + 1);
    end
    do_ins      = ins_en && (cnt_rm < CW'(N));
    ins_dropped = ins_en && !do_ins;
    for (int i = 0; i < N; i++) begin
      if (!do_ins || CW'(i) < ins_pos) after_ins[i] = after_rm[i];
      else if (CW'(i) == ins_pos)      after_ins[i] = new_e;
      else                             after_ins[i] = after_rm[i-1];
    end
    cnt_ins = do_ins ? cnt_rm + 1'b1 : cnt_rm;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < N; i++) q[i] <= '0;
    end else begin
      cnt <= cnt_ins;
      for (int i = 0; i < N; i++) q[i] <= after_ins[i];
    end
  end

  assign head_valid = (cnt != '0);
  assign head_id    = q[0].id;
  assign head_rank  = q[0].rank;
  assign count      = cnt;
  assign full       = (cnt == CW'(N));

  // The occupied part of the list is always sorted by ascending rank.
  for (genvar g = 0; g + 1 < N; g++) begin : g_sorted
    a_sorted: assert property (@(posedge clk) disable iff (!rst_n)
      (CW'(g + 1) < cnt) |-> (q[g].rank <= q[g+1].rank));
  end

endmodule
