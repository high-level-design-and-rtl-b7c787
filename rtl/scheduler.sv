// scheduler: the ready queue of a resource, ordered by a scheduling
// criterion, plus the element that currently owns the resource (the
// "chosen" one).
//
// The chosen element is held in its own register; all other ready elements
// wait in an ordered_list sorted by rank. Every method finishes in one clock
// cycle:
//   S_INSERT         make element id ready. It becomes the chosen one if the
//                    scheduler was empty, otherwise it is queued by rank.
//                    Fails if id is already in the scheduler.
//   S_REMOVE         take element id out. If it was the chosen one, the head
//                    of the queue becomes chosen. Fails if id is not in.
//   S_REMOVE_HEAD    take the chosen element out; the head becomes chosen.
//   S_CHOOSE         give the resource to the most urgent element: if the
//                    queue head ranks lower than or equal to the chosen one,
//                    the two swap places (the old chosen is queued behind
//                    elements of equal rank, giving round robin among equals).
//   S_CHOOSE_ANOTHER give the resource to the queue head whatever its rank,
//                    queueing the old chosen one.
//   S_CHOOSE_ELEM    give the resource to element id, queueing the old one.
// The result is an option value (res_valid, res_id): the element inserted or
// removed, or the chosen element after a choose; ok is 0 when the method
// failed or there was nothing to return. size counts chosen plus queued.
//
// The method names and the split into scheduler, ordered list and criterion
// follow the document; the exact behaviour of each method (which element is
// returned, how equal ranks are treated, when a method fails) is this
// design's choice.
//
// Interface: op, id and prio are sampled at the rising clock edge; ok,
// res_valid and res_id are combinational results of the method presented in
// the same cycle; chosen_*, size and queued show the registered state.
// Reset is synchronous and active low and empties the scheduler.
module scheduler
  import sched_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter crit_e       CRIT = CRIT_PRIORITY,
  parameter int unsigned IDW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  sched_op_e              op,
  input  logic [IDW-1:0]         id,
  input  int_t                   prio,
  output logic                   ok,
  output logic                   res_valid,
  output logic [IDW-1:0]         res_id,
  output logic                   chosen_valid,
  output logic [IDW-1:0]         chosen_id,
  output logic [$clog2(N+1)-1:0] size,
  output logic [N-1:0]           queued
);

  localparam int unsigned CW = $clog2(N+1);

  // Chosen element and the set of elements in the scheduler.
  logic           ch_v;
  logic [IDW-1:0] ch_id;
  int_t           ch_rank;
  logic [N-1:0]   in_set;

  logic           n_ch_v;
  logic [IDW-1:0] n_ch_id;
  int_t           n_ch_rank;
  logic [N-1:0]   n_in_set;

  // Ordered list controls and status.
  logic           l_rm_en, l_rm_head, l_ins_en;
  logic [IDW-1:0] l_rm_id, l_ins_id;
  int_t           l_ins_rank;
  logic           l_rm_found, l_ins_dropped, l_head_v, l_full;
  int_t           l_rm_rank, l_head_rank;
  logic [IDW-1:0] l_head_id;
  logic [CW-1:0]  l_count;

  // Criterion.
  int_t           new_rank;
  logic           take;

  sched_criterion #(.CRIT(CRIT)) u_crit (
    .clk  (clk),
    .rst_n(rst_n),
    .prio (prio),
    .take (take),
    .rank (new_rank)
  );

  ordered_list #(.N(N), .RW(INT_W), .IDW(IDW)) u_list (
    .clk        (clk),
    .rst_n      (rst_n),
    .rm_en      (l_rm_en),
    .rm_head    (l_rm_head),
    .rm_id      (l_rm_id),
    .ins_en     (l_ins_en),
    .ins_id     (l_ins_id),
    .ins_rank   (l_ins_rank),
    .rm_found   (l_rm_found),
    .rm_rank    (l_rm_rank),
    .ins_dropped(l_ins_dropped),
    .head_valid (l_head_v),
    .head_id    (l_head_id),
    .head_rank  (l_head_rank),
    .count      (l_count),
    .full       (l_full)
  );

  always_comb begin
    n_ch_v     = ch_v;
    n_ch_id    = ch_id;
    n_ch_rank  = ch_rank;
    n_in_set   = in_set;
    l_rm_en    = 1'b0;
    l_rm_head  = 1'b0;
    l_rm_id    = id;
    l_ins_en   = 1'b0;
    l_ins_id   = ch_id;
    l_ins_rank = ch_rank;
    take       = 1'b0;
    ok         = 1'b0;
    res_valid  = 1'b0;
    res_id     = id;

    unique case (op)
      S_INSERT: if (!in_set[id]) begin
        ok           = 1'b1;
        res_valid    = 1'b1;
        take         = 1'b1;
        n_in_set[id] = 1'b1;
        if (!ch_v) begin
          n_ch_v    = 1'b1;
          n_ch_id   = id;
          n_ch_rank = new_rank;
        end else begin
          l_ins_en   = 1'b1;
          l_ins_id   = id;
          l_ins_rank = new_rank;
        end
      end

      S_REMOVE: if (in_set[id]) begin
        ok           = 1'b1;
        res_valid    = 1'b1;
        n_in_set[id] = 1'b0;
        l_rm_en      = 1'b1;
        if (ch_v && ch_id == id) begin
          l_rm_head = 1'b1;
          n_ch_v    = l_head_v;
          n_ch_id   = l_head_id;
          n_ch_rank = l_head_rank;
        end
      end

      S_REMOVE_HEAD: if (ch_v) begin
        ok              = 1'b1;
        res_valid       = 1'b1;
        res_id          = ch_id;
        n_in_set[ch_id] = 1'b0;
        l_rm_en         = 1'b1;
        l_rm_head       = 1'b1;
        n_ch_v          = l_head_v;
        n_ch_id         = l_head_id;
        n_ch_rank       = l_head_rank;
      end

      S_CHOOSE, S_CHOOSE_ANOTHER: if (ch_v) begin
        ok        = 1'b1;
        res_valid = 1'b1;
        res_id    = ch_id;
        if (l_head_v && (op == S_CHOOSE_ANOTHER || l_head_rank <= ch_rank)) begin
          l_rm_en   = 1'b1;
          l_rm_head = 1'b1;
          l_ins_en  = 1'b1;
          n_ch_id   = l_head_id;
          n_ch_rank = l_head_rank;
          res_id    = l_head_id;
        end
      end

      S_CHOOSE_ELEM: if (in_set[id]) begin
        ok        = 1'b1;
        res_valid = 1'b1;
        if (ch_id != id) begin
          l_rm_en   = 1'b1;
          l_ins_en  = 1'b1;
          n_ch_id   = id;
          n_ch_rank = l_rm_rank;
        end
      end

      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ch_v    <= 1'b0;
      ch_id   <= '0;
      ch_rank <= '0;
      in_set  <= '0;
    end else begin
      ch_v    <= n_ch_v;
      ch_id   <= n_ch_id;
      ch_rank <= n_ch_rank;
      in_set  <= n_in_set;
    end
  end

  assign chosen_valid = ch_v;
  assign chosen_id    = ch_id;
  assign size         = l_count + CW'(ch_v);
  assign queued       = in_set;

  // The queue never overflows: it holds at most N-1 elements besides the
  // chosen one, so an insert is never dropped.
  a_no_drop: assert property (@(posedge clk) disable iff (!rst_n) !l_ins_dropped);
  a_not_full: assert property (@(posedge clk) disable iff (!rst_n) !l_full);
  // A queued element named by its identifier is always found in the queue.
  a_found: assert property (@(posedge clk) disable iff (!rst_n)
    (l_rm_en && !l_rm_head) |-> l_rm_found);
  // Something is chosen whenever anything is queued.
  a_chosen: assert property (@(posedge clk) disable iff (!rst_n) l_head_v |-> ch_v);

endmodule
