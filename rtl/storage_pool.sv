// storage_pool: statically allocated storage for the elements a scheduler
// manages, standing in for dynamic memory allocation.
//
// There are N slots; each holds a used flag, the client value the element
// stands for (an integer handle of the client, such as a thread identifier)
// and the client's priority parameter. The slot index is the element
// identifier used everywhere else in the design.
//   alloc  reserves the lowest-numbered free slot and writes value and prio
//          into it; alloc_ok/alloc_id (an option value) say which slot, or
//          that the pool is full.
//   free   releases slot free_id; releasing a free slot changes nothing.
//   read   two combinational read ports, A (used, value, prio) and B (used,
//          value), look up a slot by index.
//   find   searches all used slots in parallel for find_value and returns
//          the lowest matching slot as an option value.
// The document gives the pool's role (reserve and release storage for the
// wrapped scheduler, sized by a template parameter); the lowest-free-slot
// policy and the search by value are this design's choices.
//
// Timing: alloc and free take effect at the rising clock edge; all outputs
// are combinational from the registered slots and the inputs of the same
// cycle. Reset is synchronous and active low and frees every slot.
module storage_pool
  import sched_pkg::*;
#(
  parameter int unsigned N   = 16,
  parameter int unsigned IDW = (N > 1) ? $clog2(N) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           alloc_en,
  input  int_t           alloc_value,
  input  int_t           alloc_prio,
  output logic           alloc_ok,
  output logic [IDW-1:0] alloc_id,
  input  logic           free_en,
  input  logic [IDW-1:0] free_id,
  input  logic [IDW-1:0] rd_a_id,
  output logic           rd_a_used,
  output int_t           rd_a_value,
  output int_t           rd_a_prio,
  input  logic [IDW-1:0] rd_b_id,
  output logic           rd_b_used,
  output int_t           rd_b_value,
  input  int_t           find_value,
  output logic           find_ok,
  output logic [IDW-1:0] find_id,
  output logic [N-1:0]   used
);

  logic [N-1:0] used_q;
  int_t         value_q [N];
  int_t         prio_q  [N];

  // Lowest free slot and lowest slot holding find_value.
  always_comb begin
    alloc_ok = 1'b0;
    alloc_id = '0;
    find_ok  = 1'b0;
    find_id  = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (!used_q[i]) begin
        alloc_ok = 1'b1;
        alloc_id = IDW'(i);
      end
      if (used_q[i] && value_q[i] == find_value) begin
        find_ok = 1'b1;
        find_id = IDW'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      used_q <= '0;
      for (int i = 0; i < N; i++) begin
        value_q[i] <= '0;
        prio_q[i]  <= '0;
      end
    end else begin
      if (free_en) used_q[free_id] <= 1'b0;
      if (alloc_en && alloc_ok) begin
        used_q[alloc_id]  <= 1'b1;
        value_q[alloc_id] <= alloc_value;
        prio_q[alloc_id]  <= alloc_prio;
      end
    end
  end

  assign rd_a_used  = used_q[rd_a_id];
  assign rd_a_value = value_q[rd_a_id];
  assign rd_a_prio  = prio_q[rd_a_id];
  assign rd_b_used  = used_q[rd_b_id];
  assign rd_b_value = value_q[rd_b_id];
  assign used       = used_q;

endmodule
