// hw_scheduler: a hardware resource scheduler reached through one call
// interface, call(m, par, prio) -> (st, ret), the dispatch layer of the
// design.
//
// The scheduler keeps the clients of a resource (for instance the threads of
// an operating system) in a queue ordered by a scheduling criterion and tells
// which client owns the resource now. Software reaches all of its methods
// through a single entry point: a method identifier m and two integer
// parameters. This module is that entry point. It interprets m, converts par
// into an element identifier where the method takes one, calls the
// storage-allocation wrapper (alloc_wrapper, which holds the element storage
// and the scheduler proper) and turns the wrapper's option-typed answer into
// a status and an integer:
//   st = ST_OK         the method ran; ret is its result
//   st = ST_NONE       the method ran but returned nothing or failed
//   st = ST_BAD_METHOD m is not a known method; nothing changed
//   st = ST_BAD_PARAM  par is not an element identifier (0..N-1); nothing
//                      changed
// par carries the element identifier for M_INSERT, M_DESTROY, M_REMOVE and
// M_CHOOSE_ELEM, and the client value for M_CREATE and M_GET_ID; prio is
// used by M_CREATE only.
//
// Two microarchitectures sit behind the dispatch layer, selected by UARCH:
//   UARCH_PARALLEL (default)  alloc_wrapper: registers and parallel search.
//                  Every method takes one cycle.
//   UARCH_SERIAL   serial_core: memories walked one entry per cycle. It uses
//                  less logic, and its time depends on the method and on how
//                  full the queue is.
//
// Timing: a call is taken when call_valid and call_ready are both high at a
// rising clock edge. Its result appears with a one-cycle done pulse. With
// UARCH_PARALLEL, call_ready is always high and done comes exactly two cycles
// after the call: one cycle to register the call, one to run the method and
// register the answer. Every method takes the same time, so scheduling has
// no jitter, and one call can be started every cycle. With UARCH_SERIAL,
// call_ready is low from the cycle after a call is taken until its answer is
// registered. The answer then takes from three cycles (methods that walk no
// memory) to 2N+3. Calls rejected by the dispatch layer (ST_BAD_METHOD,
// ST_BAD_PARAM) always take two cycles. Reset is synchronous and active low; it empties the storage
// and the scheduler.
//
// The call signature, the dispatch-by-method-identifier structure and the
// layering (dispatch, allocation, scheduler) follow the document. The
// method encoding, the status codes, the two-cycle pipeline and the element
// identifier range check are this design's choices. Parameters: N is the
// number of element slots (the document gives no number); CRIT selects the
// scheduling criterion; UARCH selects the microarchitecture. The document
// evaluates a register-based and a memory-based organisation. The
// register-based one is the default because every method then takes the
// same time.
module hw_scheduler
  import sched_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter crit_e       CRIT  = CRIT_PRIORITY,
  parameter uarch_e      UARCH = UARCH_PARALLEL
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       call_valid,
  output logic       call_ready,
  input  logic [3:0] call_m,
  input  int_t       call_par,
  input  int_t       call_prio,
  output logic       done,
  output status_e    st,
  output int_t       ret
);

  localparam int unsigned IDW = (N > 1) ? $clog2(N) : 1;

  // Stage 1: the registered call, held until its answer is registered.
  logic       c_v;
  method_id_e c_m;
  int_t       c_par, c_prio;

  // Stage 2: decode, run and answer.
  logic       known, takes_id, id_ok;
  logic       a_valid, a_ready, a_rsp_valid;
  logic       taken;     // the core has taken the request and works on it
  maybe_int_t a_rsp;
  logic       answer;
  status_e    n_st;
  int_t       n_ret;

  assign call_ready = !c_v || answer;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c_v    <= 1'b0;
      c_m    <= M_CHOSEN;
      c_par  <= '0;
      c_prio <= '0;
    end else if (call_ready) begin
      c_v    <= call_valid;
      c_m    <= method_id_e'(call_m);
      c_par  <= call_par;
      c_prio <= call_prio;
    end
  end

  always_comb begin
    known    = 1'b1;
    takes_id = 1'b0;
    unique case (c_m)
      M_INSERT, M_DESTROY, M_REMOVE, M_CHOOSE_ELEM: takes_id = 1'b1;
      M_CHOSEN, M_CREATE, M_REMOVE_HEAD, M_SIZE, M_GET_ID,
      M_CHOOSE, M_CHOOSE_ANOTHER: ;
      default: known = 1'b0;
    endcase
    // Element identifiers are 0..N-1; par is a signed int.
    id_ok   = !takes_id || (!c_par[INT_W-1] && c_par < int_t'(N));
    a_valid = c_v && known && id_ok && !taken;
    // The call is answered when it is rejected here or when the core answers.
    answer  = c_v && (!known || !id_ok || a_rsp_valid);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                                   taken <= 1'b0;
    else if (answer)                              taken <= 1'b0;
    else if (a_valid && a_ready && !a_rsp_valid)  taken <= 1'b1;
  end

  always_comb begin
    if (!known) begin
      n_st  = ST_BAD_METHOD;
      n_ret = '0;
    end else if (!id_ok) begin
      n_st  = ST_BAD_PARAM;
      n_ret = '0;
    end else begin
      n_st  = a_rsp.exists ? ST_OK : ST_NONE;
      n_ret = a_rsp.thing;
    end
  end

  if (UARCH == UARCH_SERIAL) begin : g_serial
    serial_core #(.N(N), .CRIT(CRIT), .IDW(IDW)) u_core (
      .clk      (clk),
      .rst_n    (rst_n),
      .req_valid(a_valid),
      .req_ready(a_ready),
      .req_m    (c_m),
      .req_id   (c_par[IDW-1:0]),
      .req_value(c_par),
      .req_prio (c_prio),
      .rsp_valid(a_rsp_valid),
      .rsp      (a_rsp)
    );
  end else begin : g_parallel
    // One cycle per method: the answer comes in the cycle of the request.
    alloc_wrapper #(.N(N), .CRIT(CRIT), .IDW(IDW)) u_alloc (
      .clk      (clk),
      .rst_n    (rst_n),
      .req_valid(a_valid),
      .req_m    (c_m),
      .req_id   (c_par[IDW-1:0]),
      .req_value(c_par),
      .req_prio (c_prio),
      .rsp      (a_rsp)
    );
    assign a_ready     = 1'b1;
    assign a_rsp_valid = a_valid;
  end

  // Stage 2 result register.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done <= 1'b0;
      st   <= ST_OK;
      ret  <= '0;
    end else begin
      done <= answer;
      if (answer) begin
        st  <= n_st;
        ret <= n_ret;
      end
    end
  end

  // A request is held until the core takes it, and the core only answers a
  // request it has taken or takes in the same cycle.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (a_valid && !a_ready) |=> a_valid);
  a_answer_taken: assert property (@(posedge clk) disable iff (!rst_n)
    a_rsp_valid |-> (taken || (a_valid && a_ready)));
  // With the parallel core every call is answered two cycles after it came.
  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
    (UARCH == UARCH_PARALLEL && call_valid) |=> answer);

endmodule
