// alloc_wrapper: the storage-allocation layer around the scheduler.
//
// The scheduler only orders element identifiers; it cannot create elements.
// This wrapper owns a storage_pool and a scheduler and offers the same
// methods as the scheduler plus the ones that need storage:
//   M_CREATE         reserve a slot holding (value, prio); returns the new
//                    element identifier.
//   M_DESTROY        take element id out of the scheduler if it is there and
//                    release its slot; returns its value.
//   M_GET_ID         find the element holding value; returns its identifier.
//   M_INSERT         make element id ready, ranked by the prio stored with it.
//   M_REMOVE         take element id out of the scheduler.
//   M_REMOVE_HEAD    take the chosen element out of the scheduler.
//   M_CHOSEN         the element that currently owns the resource.
//   M_CHOOSE, M_CHOOSE_ANOTHER, M_CHOOSE_ELEM
//                    passed to the scheduler's choose methods.
//   M_SIZE           number of elements in the scheduler.
// Methods that yield an element return the client value stored for it,
// which is how the element pointer of the software version is turned back
// into something the caller knows. The response is an option value:
// rsp.exists is 0 when the method failed (pool full, element not allocated,
// element not in the scheduler, nothing chosen) and the state is unchanged.
// Methods on an element identifier whose slot is not allocated fail.
//
// The set of methods and the wrapper's job follow the document; what each
// method returns and when it fails are this design's choices. M_CHOOSE,
// M_CHOOSE_ANOTHER and M_CHOOSE_ELEM are not in the wrapper's method list
// the document draws, but are passed through so that the resource can be
// handed over through the call interface.
//
// Timing: the request is sampled at the rising clock edge when req_valid is
// high; rsp is combinational in the same cycle, so every method takes one
// cycle and a new request can be given every cycle. Reset is synchronous and
// active low.
module alloc_wrapper
  import sched_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter crit_e       CRIT = CRIT_PRIORITY,
  parameter int unsigned IDW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           req_valid,
  input  method_id_e     req_m,
  input  logic [IDW-1:0] req_id,
  input  int_t           req_value,
  input  int_t           req_prio,
  output maybe_int_t     rsp
);

  localparam int unsigned CW = $clog2(N+1);

  // Storage pool.
  logic           p_alloc_en, p_alloc_ok, p_free_en;
  logic [IDW-1:0] p_alloc_id;
  logic           p_a_used, p_b_used, p_find_ok;
  int_t           p_a_value, p_a_prio, p_b_value;
  logic [IDW-1:0] p_b_id, p_find_id;
  logic [N-1:0]   p_used;

  // Scheduler.
  sched_op_e      s_op;
  logic           s_ok, s_res_valid, s_chosen_valid;
  logic [IDW-1:0] s_res_id, s_chosen_id;
  logic [CW-1:0]  s_size;
  logic [N-1:0]   s_queued;

  storage_pool #(.N(N), .IDW(IDW)) u_storage (
    .clk        (clk),
    .rst_n      (rst_n),
    .alloc_en   (p_alloc_en),
    .alloc_value(req_value),
    .alloc_prio (req_prio),
    .alloc_ok   (p_alloc_ok),
    .alloc_id   (p_alloc_id),
    .free_en    (p_free_en),
    .free_id    (req_id),
    .rd_a_id    (req_id),
    .rd_a_used  (p_a_used),
    .rd_a_value (p_a_value),
    .rd_a_prio  (p_a_prio),
    .rd_b_id    (p_b_id),
    .rd_b_used  (p_b_used),
    .rd_b_value (p_b_value),
    .find_value (req_value),
    .find_ok    (p_find_ok),
    .find_id    (p_find_id),
    .used       (p_used)
  );

  scheduler #(.N(N), .CRIT(CRIT), .IDW(IDW)) u_sched (
    .clk         (clk),
    .rst_n       (rst_n),
    .op          (s_op),
    .id          (req_id),
    .prio        (p_a_prio),
    .ok          (s_ok),
    .res_valid   (s_res_valid),
    .res_id      (s_res_id),
    .chosen_valid(s_chosen_valid),
    .chosen_id   (s_chosen_id),
    .size        (s_size),
    .queued      (s_queued)
  );

  always_comb begin
    p_alloc_en = 1'b0;
    p_free_en  = 1'b0;
    s_op       = S_NOP;
    p_b_id     = s_res_id;
    rsp        = '{exists: 1'b0, thing: '0};

    if (req_valid) begin
      unique case (req_m)
        M_CHOSEN: begin
          p_b_id = s_chosen_id;
          rsp    = '{exists: s_chosen_valid, thing: p_b_value};
        end
        M_CREATE: begin
          p_alloc_en = 1'b1;
          rsp        = '{exists: p_alloc_ok, thing: int_t'(p_alloc_id)};
        end
        M_DESTROY: if (p_a_used) begin
          s_op      = S_REMOVE;
          p_free_en = 1'b1;
          rsp       = '{exists: 1'b1, thing: p_a_value};
        end
        M_GET_ID: rsp = '{exists: p_find_ok, thing: int_t'(p_find_id)};
        M_SIZE:   rsp = '{exists: 1'b1, thing: int_t'(s_size)};
        M_INSERT, M_REMOVE, M_CHOOSE_ELEM: if (p_a_used) begin
          s_op = (req_m == M_INSERT) ? S_INSERT :
                 (req_m == M_REMOVE) ? S_REMOVE : S_CHOOSE_ELEM;
          rsp  = '{exists: s_ok && s_res_valid, thing: p_b_value};
        end
        M_REMOVE_HEAD, M_CHOOSE, M_CHOOSE_ANOTHER: begin
          s_op = (req_m == M_REMOVE_HEAD) ? S_REMOVE_HEAD :
                 (req_m == M_CHOOSE)      ? S_CHOOSE : S_CHOOSE_ANOTHER;
          rsp  = '{exists: s_ok && s_res_valid, thing: p_b_value};
        end
        default: ;
      endcase
    end
  end

  // Every element in the scheduler occupies an allocated slot, and any
  // element a scheduler method returns is allocated.
  a_queued_allocated: assert property (@(posedge clk) disable iff (!rst_n)
    (s_queued & ~p_used) == '0);
  a_result_allocated: assert property (@(posedge clk) disable iff (!rst_n)
    (rsp.exists && s_op != S_NOP && !p_free_en) |-> p_b_used);

endmodule
