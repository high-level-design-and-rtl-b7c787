// sched_pkg: types and constants shared by the hardware resource scheduler.
//
// The scheduler is reached through one call interface carrying a method
// identifier, two 32-bit integer parameters and returning a status and a
// 32-bit integer. The method identifiers follow the method names of the
// storage-allocation wrapper and of the scheduler it wraps; their numeric
// encoding is this design's choice. A "maybe" value (an option type: a valid
// flag plus a value) replaces every pointer that could be absent, so no
// invalid element index ever travels through the hardware.
package sched_pkg;

  // Width of the C++ "int" used for par, prio and ret.
  localparam int unsigned INT_W = 32;

  typedef logic [INT_W-1:0] int_t;

  // Option type: exists = 0 means "no value".
  typedef struct packed {
    logic exists;
    int_t thing;
  } maybe_int_t;

  // MethodId of the call interface.
  typedef enum logic [3:0] {
    M_CHOSEN         = 4'd0,
    M_CREATE         = 4'd1,
    M_INSERT         = 4'd2,
    M_DESTROY        = 4'd3,
    M_REMOVE         = 4'd4,
    M_REMOVE_HEAD    = 4'd5,
    M_SIZE           = 4'd6,
    M_GET_ID         = 4'd7,
    M_CHOOSE         = 4'd8,
    M_CHOOSE_ANOTHER = 4'd9,
    M_CHOOSE_ELEM    = 4'd10
  } method_id_e;

  // Status returned with every call.
  typedef enum logic [1:0] {
    ST_OK         = 2'd0,  // the method ran and ret holds its result
    ST_NONE       = 2'd1,  // the method ran but had nothing to return or failed
    ST_BAD_METHOD = 2'd2,  // unknown MethodId, nothing changed
    ST_BAD_PARAM  = 2'd3   // par is not a valid element identifier, nothing changed
  } status_e;

  // Operations of the scheduler core (ordered ready queue plus chosen element).
  typedef enum logic [2:0] {
    S_NOP            = 3'd0,
    S_INSERT         = 3'd1,
    S_REMOVE         = 3'd2,
    S_REMOVE_HEAD    = 3'd3,
    S_CHOOSE         = 3'd4,
    S_CHOOSE_ANOTHER = 3'd5,
    S_CHOOSE_ELEM    = 3'd6
  } sched_op_e;

  // Scheduling criteria; the ordered list always sorts by ascending rank.
  typedef enum logic [1:0] {
    CRIT_PRIORITY = 2'd0,  // rank = prio (smaller value runs first)
    CRIT_FCFS     = 2'd1,  // rank = arrival order at insertion
    CRIT_EDF      = 2'd2   // rank = absolute deadline given in prio
  } crit_e;

  // Microarchitecture of the storage and the scheduler behind the dispatch
  // layer.
  typedef enum logic {
    UARCH_PARALLEL = 1'b0,  // registers, parallel search: every method in one cycle
    UARCH_SERIAL   = 1'b1   // memories, one entry per cycle: less logic, variable time
  } uarch_e;

endpackage
