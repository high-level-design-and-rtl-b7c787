// serial_core: storage allocation, element storage and scheduler in one
// unit, built for small area: the data structures sit in memories and are
// walked one entry per clock cycle.
//
// It offers the same methods, with the same results and failure rules, as
// alloc_wrapper (the register-based core). Only the time they take differs.
// Element storage is two memories, client value and priority, indexed by
// element identifier, plus a bitmap of used slots. The ready queue is a third
// memory holding (identifier, rank) pairs sorted by ascending rank, with a
// count register; the owner (chosen element) and the membership bitmap are
// registers. Every memory has one read and one write per cycle, as a small
// RAM would, so:
//   - removing an element walks the queue from the front, finds it and
//     moves each later entry one place forward, one entry per cycle;
//   - inserting walks from the back, moving each entry of higher rank one
//     place back, until the place of the new entry is found;
//   - get_id compares one slot per cycle;
//   - choose, choose_another and choose_elem remove one entry and then
//     insert the old owner.
// The rules of the queue (owner kept apart, equal ranks in arrival order,
// choose swaps on lower or equal rank) are those of the scheduler module.
//
// Handshake: a request is taken when req_valid and req_ready are both high at
// a rising clock edge; req_ready is high only while the unit is idle. The
// answer comes with a one-cycle rsp_valid pulse, at the earliest two cycles
// after the request and at the latest about 2N+2 cycles after it (a choose
// that walks the whole queue twice). Reset is synchronous and active low;
// the memories themselves are not cleared, since nothing reads an entry
// before it is written.
//
// The document describes this organisation only as the one whose data
// structures were mapped to memories to save area. The memory layout, the
// walks and the handshake are this design's choices.
module serial_core
  import sched_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter crit_e       CRIT = CRIT_PRIORITY,
  parameter int unsigned IDW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           req_valid,
  output logic           req_ready,
  input  method_id_e     req_m,
  input  logic [IDW-1:0] req_id,
  input  int_t           req_value,
  input  int_t           req_prio,
  output logic           rsp_valid,
  output maybe_int_t     rsp
);

  localparam int unsigned CW = $clog2(N+1);

  typedef struct packed {
    logic [IDW-1:0] id;
    int_t           rank;
  } entry_t;

  typedef enum logic [2:0] {IDLE, RM_WALK, INS_WALK, FIND_WALK, RESPOND} state_e;

  // What the answer carries.
  typedef enum logic [1:0] {RET_VALUE, RET_ID, RET_SIZE} ret_e;

  // Memories.
  int_t   val_mem [N];
  int_t   pri_mem [N];
  entry_t q_mem   [N];

  // Registers.
  state_e         state;
  logic [N-1:0]   used, in_set;
  logic [CW-1:0]  q_cnt;
  logic           ch_v;
  logic [IDW-1:0] ch_id;
  int_t           ch_rank;
  logic [CW-1:0]  idx;        // walk position
  logic           found;      // remove walk has passed the element
  logic           rm_by_id;   // remove walk looks for rm_id, else takes the head
  logic [IDW-1:0] rm_id;
  logic           rm_to_chosen; // the removed entry becomes the owner
  logic           ins_pend;   // an insert follows the remove walk
  entry_t         ins_e;
  int_t           find_val;
  logic           res_ok;
  logic [IDW-1:0] res_id;
  ret_e           res_kind;

  // Lowest free slot.
  logic           free_ok;
  logic [IDW-1:0] free_id;
  always_comb begin
    free_ok = 1'b0;
    free_id = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (!used[i]) begin
        free_ok = 1'b1;
        free_id = IDW'(i);
      end
    end
  end

  // Criterion, fed from the priority memory.
  int_t new_rank;
  logic take;
  sched_criterion #(.CRIT(CRIT)) u_crit (
    .clk  (clk),
    .rst_n(rst_n),
    .prio (pri_mem[req_id]),
    .take (take),
    .rank (new_rank)
  );

  assign take = (state == IDLE) && req_valid && req_m == M_INSERT &&
                used[req_id] && !in_set[req_id];

  // Queue entries read by the walks.
  entry_t rm_e, ins_prev;
  assign rm_e     = q_mem[IDW'(idx)];
  assign ins_prev = q_mem[IDW'(idx - 1'b1)];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= IDLE;
      used         <= '0;
      in_set       <= '0;
      q_cnt        <= '0;
      ch_v         <= 1'b0;
      ch_id        <= '0;
      ch_rank      <= '0;
      idx          <= '0;
      found        <= 1'b0;
      rm_by_id     <= 1'b0;
      rm_id        <= '0;
      rm_to_chosen <= 1'b0;
      ins_pend     <= 1'b0;
      ins_e        <= '0;
      find_val     <= '0;
      res_ok       <= 1'b0;
      res_id       <= '0;
      res_kind     <= RET_VALUE;
    end else begin
      unique case (state)
        IDLE: if (req_valid) begin
          state        <= RESPOND;
          res_ok       <= 1'b0;
          res_id       <= req_id;
          res_kind     <= RET_VALUE;
          found        <= 1'b0;
          idx          <= '0;
          rm_by_id     <= 1'b0;
          rm_id        <= req_id;
          rm_to_chosen <= 1'b0;
          ins_pend     <= 1'b0;
          unique case (req_m)
            M_CHOSEN: begin
              res_ok <= ch_v;
              res_id <= ch_id;
            end
            M_CREATE: begin
              res_kind <= RET_ID;
              res_id   <= free_id;
              if (free_ok) begin
                res_ok           <= 1'b1;
                used[free_id]    <= 1'b1;
                val_mem[free_id] <= req_value;
                pri_mem[free_id] <= req_prio;
              end
            end
            M_SIZE: begin
              res_ok   <= 1'b1;
              res_kind <= RET_SIZE;
            end
            M_GET_ID: begin
              res_kind <= RET_ID;
              find_val <= req_value;
              state    <= FIND_WALK;
            end
            M_INSERT: if (used[req_id] && !in_set[req_id]) begin
              res_ok         <= 1'b1;
              in_set[req_id] <= 1'b1;
              if (!ch_v) begin
                ch_v    <= 1'b1;
                ch_id   <= req_id;
                ch_rank <= new_rank;
              end else begin
                ins_e <= '{id: req_id, rank: new_rank};
                idx   <= q_cnt;
                state <= INS_WALK;
              end
            end
            M_REMOVE, M_DESTROY: if (used[req_id] && (in_set[req_id] || req_m == M_DESTROY)) begin
              res_ok <= 1'b1;
              if (req_m == M_DESTROY) used[req_id] <= 1'b0;
              if (in_set[req_id]) begin
                in_set[req_id] <= 1'b0;
                if (ch_id == req_id) begin
                  // The owner leaves: the queue head takes over.
                  ch_v         <= (q_cnt != '0);
                  rm_to_chosen <= 1'b1;
                  if (q_cnt != '0) state <= RM_WALK;
                end else begin
                  rm_by_id <= 1'b1;
                  state    <= RM_WALK;
                end
              end
            end
            M_REMOVE_HEAD: if (ch_v) begin
              res_ok        <= 1'b1;
              res_id        <= ch_id;
              in_set[ch_id] <= 1'b0;
              ch_v          <= (q_cnt != '0);
              rm_to_chosen  <= 1'b1;
              if (q_cnt != '0) state <= RM_WALK;
            end
            M_CHOOSE, M_CHOOSE_ANOTHER: if (ch_v) begin
              res_ok <= 1'b1;
              res_id <= ch_id;
              if (q_cnt != '0 && (req_m == M_CHOOSE_ANOTHER || q_mem[0].rank <= ch_rank)) begin
                res_id       <= q_mem[0].id;
                rm_to_chosen <= 1'b1;
                ins_pend     <= 1'b1;
                ins_e        <= '{id: ch_id, rank: ch_rank};
                state        <= RM_WALK;
              end
            end
            M_CHOOSE_ELEM: if (used[req_id] && in_set[req_id]) begin
              res_ok <= 1'b1;
              if (ch_id != req_id) begin
                rm_by_id     <= 1'b1;
                rm_to_chosen <= 1'b1;
                ins_pend     <= 1'b1;
                ins_e        <= '{id: ch_id, rank: ch_rank};
                state        <= RM_WALK;
              end
            end
            default: ;
          endcase
        end

        // Walk forward: find the entry (or take the head), then close the gap.
        RM_WALK: begin
          if (found) begin
            q_mem[IDW'(idx - 1'b1)] <= rm_e;
          end else if (!rm_by_id || rm_e.id == rm_id) begin
            found <= 1'b1;
            if (rm_to_chosen) begin
              ch_id   <= rm_e.id;
              ch_rank <= rm_e.rank;
            end
          end
          if (idx + 1'b1 == q_cnt) begin
            q_cnt <= q_cnt - 1'b1;
            idx   <= q_cnt - 1'b1;
            state <= ins_pend ? INS_WALK : RESPOND;
          end else begin
            idx <= idx + 1'b1;
          end
        end

        // Walk backward: move entries of higher rank back, then place ins_e.
        INS_WALK: begin
          if (idx != '0 && ins_prev.rank > ins_e.rank) begin
            q_mem[IDW'(idx)] <= ins_prev;
            idx              <= idx - 1'b1;
          end else begin
            q_mem[IDW'(idx)] <= ins_e;
            q_cnt            <= q_cnt + 1'b1;
            state            <= RESPOND;
          end
        end

        // Compare one slot per cycle with the value looked for.
        FIND_WALK: begin
          if (used[IDW'(idx)] && val_mem[IDW'(idx)] == find_val) begin
            res_ok <= 1'b1;
            res_id <= IDW'(idx);
            state  <= RESPOND;
          end else if (idx == CW'(N - 1)) begin
            state <= RESPOND;
          end else begin
            idx <= idx + 1'b1;
          end
        end

        RESPOND: state <= IDLE;

        default: state <= IDLE;
      endcase
    end
  end

  assign req_ready = (state == IDLE);
  assign rsp_valid = (state == RESPOND);

  always_comb begin
    rsp.exists = res_ok;
    unique case (res_kind)
      RET_ID:   rsp.thing = int_t'(res_id);
      RET_SIZE: rsp.thing = int_t'(q_cnt) + int_t'(ch_v);
      default:  rsp.thing = val_mem[res_id];
    endcase
  end

  // The walks never run past the queue.
  a_walk_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (state == RM_WALK || state == INS_WALK) |-> idx <= q_cnt);
  // The owner and the queue together never hold more than N elements.
  a_queue_fits: assert property (@(posedge clk) disable iff (!rst_n)
    (32'(q_cnt) + 32'(ch_v)) <= N);

endmodule
