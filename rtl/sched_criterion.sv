// sched_criterion: the scheduling criterion, which turns the priority
// parameter of a client into the rank the ordered ready queue sorts by.
//
// The queue always puts the smallest rank first, so each criterion only has
// to map its notion of urgency onto an unsigned number:
//   CRIT_PRIORITY  prio is a signed integer, smaller runs first; the sign bit
//                  is flipped so that signed order becomes unsigned order.
//   CRIT_EDF       prio is an absolute deadline (unsigned time); the earliest
//                  deadline runs first, so the rank is the deadline itself.
//   CRIT_FCFS      prio is ignored; the rank is an arrival counter that
//                  advances on every insertion, so clients run in the order
//                  they were inserted. The counter wraps after 2**32 inserts.
// The three criteria are the ones named in the scheduler's class diagram;
// how each one ranks clients is this design's choice.
//
// Interface: rank is combinational from prio and the counter. take is
// asserted in the cycle a client is inserted; the FCFS counter then
// advances at the rising clock edge. Reset (synchronous, active low) clears
// the counter.
module sched_criterion
  import sched_pkg::*;
#(
  parameter crit_e CRIT = CRIT_PRIORITY
) (
  input  logic clk,
  input  logic rst_n,
  input  int_t prio,
  input  logic take,
  output int_t rank
);

  int_t arrival;

  always_ff @(posedge clk) begin
    if (!rst_n)                            arrival <= '0;
    else if (take && CRIT == CRIT_FCFS)    arrival <= arrival + 1'b1;
  end

  always_comb begin
    unique case (CRIT)
      CRIT_FCFS: rank = arrival;
      CRIT_EDF:  rank = prio;
      default:   rank = {~prio[INT_W-1], prio[INT_W-2:0]};
    endcase
  end

endmodule
