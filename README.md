# A hardware resource scheduler with one call interface

This is a scheduler for a shared resource, such as the processor an operating
system hands from thread to thread, built as hardware. It keeps the clients of
the resource in a queue ordered by a scheduling criterion. It knows which
client owns the resource now and which one is next in line.

Software reaches the scheduler through one entry point. The entry point is
modelled on a single C++ function:

    call(MethodId m, int par, int prio) -> (Status st, int ret)

The method identifier `m` selects the operation, for example create, insert,
remove or choose.

Behind the entry point there are two interchangeable microarchitectures.

- **Register-based (the default).** Every method, whatever it does, answers exactly two clock cycles after it was issued, and a new call can start every cycle. The time the operating system spends in the scheduler is therefore fixed, with no jitter.
- **Memory-based.** It keeps the same data in small memories and walks them one entry per cycle. It is several times smaller, but its answer time depends on the method and on how many clients are queued.

The RTL follows the structure of a scheduler that was written once in C++ for
both a software and a hardware build. In the hardware build, wrappers turn
that C++ into something a high-level synthesis tool accepts. This RTL keeps the
same layers: dispatch, storage allocation and scheduler. It writes each layer
directly as register-transfer logic.

## Layers

```
            call_valid, call_m, call_par, call_prio          done, st, ret
                         |                                        ^
  +----------------------v----------------------------------------+------+
  | hw_scheduler  (dispatch: decode m, convert par, call/answer stages) |
  |  +-------------------------------------------------------------+    |
  |  | alloc_wrapper  (storage allocation, element <-> client value)|    |
  |  |   +------------------+        +---------------------------+  |    |
  |  |   | storage_pool     |        | scheduler                 |  |    |
  |  |   | N slots:         |        |  chosen register          |  |    |
  |  |   | used,value,prio  |        |  ordered_list (N entries) |  |    |
  |  |   +------------------+        |  sched_criterion          |  |    |
  |  |                               +---------------------------+  |    |
  |  +-------------------------------------------------------------+    |
  |      or, with UARCH = UARCH_SERIAL, in place of the box above:       |
  |  +-------------------------------------------------------------+    |
  |  | serial_core  (same methods; value, prio and queue memories,  |    |
  |  |               walked one entry per cycle by a state machine) |    |
  |  +-------------------------------------------------------------+    |
  +----------------------------------------------------------------------+
```

| File | Role |
|------|------|
| `rtl/sched_pkg.sv` | Shared types: method identifiers, status codes, option value, criteria |
| `rtl/hw_scheduler.sv` | Top. Dispatch layer: registers the call, decodes `m`, range-checks identifiers and formats the answer |
| `rtl/alloc_wrapper.sv` | Storage-allocation layer: creates and destroys elements and translates between element identifiers and client values |
| `rtl/storage_pool.sv` | `N` statically allocated element slots. Reserve and release a slot, read it, or search by client value |
| `rtl/scheduler.sv` | The scheduler proper: the owner register plus the ordered ready queue |
| `rtl/ordered_list.sv` | The sorted queue. In one cycle it can remove one entry and insert one |
| `rtl/sched_criterion.sv` | Turns a client's `prio` into the rank the queue sorts by (priority, EDF or FCFS) |
| `rtl/serial_core.sv` | Memory-based replacement for the three blocks above it: the same methods, performed by walking memories |

### No pointers, only identifiers and option values

Hardware has no pointers and no heap. An element is therefore the index of
its slot in `storage_pool`, from 0 to N-1. The storage is a fixed array; "allocating" an element means
marking a free slot as used.

A method that may have nothing to return gives back an option value: a flag
saying whether a value is present, plus the value (`maybe_int_t` in the
package). An empty option leaves the scheduler state unchanged and reaches
the caller as `st = ST_NONE`. No invalid element index ever travels through
the design.

## The call interface

A call is taken at each rising edge where `call_valid` and `call_ready` are
both high. Later, `done` is high for one cycle with `st` and `ret` for that
call, and calls are answered in order. In the register-based version,
`call_ready` is always high and `done` comes two cycles after the call. In the
memory-based version, `call_ready` is low while a call is being worked on; see
below.

| `m` | Method | `par` | `prio` | `ret` when `st = ST_OK` | `st = ST_NONE` when |
|----|--------|-------|--------|-----------|------------------|
| 0 | chosen | – | – | client value of the current owner | nothing is in the scheduler |
| 1 | create | client value | priority / deadline | new element identifier | all N slots are in use |
| 2 | insert | element id | – | its client value | slot not allocated, or element already in the scheduler |
| 3 | destroy | element id | – | its client value | slot not allocated |
| 4 | remove | element id | – | its client value | not allocated or not in the scheduler |
| 5 | remove_head | – | – | client value of the removed owner | scheduler empty |
| 6 | size | – | – | number of elements in the scheduler | never |
| 7 | get_id | client value | – | identifier of the lowest slot holding it | no slot holds it |
| 8 | choose | – | – | client value of the owner after the call | scheduler empty |
| 9 | choose_another | – | – | client value of the owner after the call | scheduler empty |
| 10 | choose_elem | element id | – | its client value (it now owns the resource) | not allocated or not in the scheduler |

Two further status codes reject a call before anything runs:

- `ST_BAD_METHOD`: `m` is 11–15.
- `ST_BAD_PARAM`: the method takes an element id and `par` is outside 0..N-1. A negative `par` counts as outside.

The client value is whatever the software uses to name a client, such as a
thread handle. It is stored at `create` and handed back by every method that
yields an element.

`destroy` on an element that is still in the scheduler first takes it out. If
that element owned the resource, the next one in line becomes the owner. Then
`destroy` frees the slot.

## Owner and ready queue

This is the part that takes the most care. The scheduler keeps the current
owner (`chosen`) in its own register. Every other ready element waits in
`ordered_list`, sorted by ascending rank. Among equal ranks, the order is the
order of arrival. The owner keeps the rank it was given when it was inserted.

- **insert** does not preempt. Into an empty scheduler, the element becomes the owner. Otherwise it is queued behind every element of lower or equal rank. To let a more urgent newcomer take over, the caller issues `choose`.
- **choose** compares the queue head with the owner. If the head's rank is lower **or equal**, the two swap: the head becomes the owner and the old owner is queued behind its equals. Repeated `choose` calls therefore pass the resource round robin among clients of equal rank. A more urgent owner keeps the resource.
- **choose_another** swaps with the head whatever its rank. This is a yield.
- **choose_elem** hands the resource to a named queued element and queues the old owner.
- **remove** and **remove_head** of the owner promote the queue head.

A swap needs two list operations in the same cycle: remove the head, then
insert the old owner. `ordered_list` computes both in one combinational pass.

1. It finds the entry to remove, either the head or a match of the identifier against all entries in parallel.
2. It shifts the entries above it down by one.
3. It counts how many remaining entries rank lower or equal to the new one. That count is the insert position.
4. It shifts the entries from that position up by one.

The result is written back at the clock edge. The queue never holds more than
N-1 elements besides the owner, so an insert is never dropped. Assertions in
`scheduler` and `ordered_list` check this, and check that the queue stays
sorted.

## Scheduling criteria

The queue always sorts by ascending unsigned rank. `sched_criterion` maps
`prio` to a rank according to the parameter `CRIT`:

| `CRIT` | Rank | Effect |
|--------|------|--------|
| `CRIT_PRIORITY` (default) | `prio` with its sign bit inverted | a smaller signed `prio` runs first |
| `CRIT_EDF` | `prio` read as an unsigned absolute deadline | the earliest deadline runs first |
| `CRIT_FCFS` | value of an insertion counter, `prio` ignored | clients run in the order they were inserted, and `choose` never preempts |

The rank is taken when an element is inserted, from the `prio` stored at
`create`. The FCFS counter is 32 bits wide and wraps after 2^32 inserts. At
that point the order between ranks from before and after the wrap is wrong.

## The memory-based variant (`UARCH_SERIAL`)

`serial_core` performs the same methods with the same results and failure
rules. The same reference model checks both versions. Only the data layout
and the timing differ.

- **Element storage.** Two memories hold the client value and the priority, indexed by element identifier. A bitmap of used slots stays in registers, so `create` still finds the lowest free slot in one step.
- **Ready queue.** A memory holds the sorted queue of (identifier, rank) pairs, with a count register. The owner and the membership bitmap are registers.
- **One entry per cycle.** Each memory is read and written at most once per cycle, as a small RAM would be, and a state machine walks the queue one entry at a time:
  - **Remove.** The walk starts at the front and finds the entry (the head, or a matching identifier). Then it moves every later entry one place forward.
  - **Insert.** The walk starts at the back. It moves each entry of higher rank one place back until it reaches the new entry's place.
  - **get_id.** Compares one slot per cycle.
  - **choose, choose_another and choose_elem.** A remove walk followed by an insert walk of the old owner.

Timing is counted from the cycle in which the call is presented to the cycle
in which `done` is high:

- A call the dispatch layer rejects takes 2 cycles.
- A method that walks nothing takes 3 cycles.
- A walk adds up to one cycle per queued entry. The worst case, a choose over a full queue, is 2N+3 cycles.

`call_ready` is low from the cycle after a call is taken until its answer is
registered.

On the dining-philosophers workload, where at most six threads exist, the
averages per method were 3 cycles for create, size and chosen, about 4 for
insert, about 6.4 for remove and about 7 for choose. The register-based
version took 2 cycles for every one of them.

## Timing and size

- **Pipeline (register-based).** In the first cycle the call is registered. In the second cycle the method runs combinationally through all layers and the answer is registered. The latency is 2 cycles for every method, and the throughput is one call per cycle.
- **Reset.** `rst_n` is synchronous and active low. It frees every slot and empties the scheduler. The memories of the serial version are not cleared: no entry is read before it is written.
- **Storage (register-based).** N × 64 bits of slot storage plus N × (32 + log2 N) bits of queue, all in registers. Every search and shift is a parallel compare or mux across all N entries, so logic depth grows with N. This buys constant time with area.
- **Area estimate.** Generic synthesis for Virtex-6 (yosys `synth_xilinx`, flattened, no place and route) at N = 16:
  - register-based: about 3,760 LUTs and 1,780 flip-flops, or 2.5 % of an XC6VLX240T;
  - memory-based: about 500 logic LUTs, 36 RAM32M distributed-RAM cells and 284 flip-flops.

  The scheduler this design follows was reported at 1,654 LUTs for its memory-based ("fully serial") version and 5,121 for its register-based ("fully parallel") one, on the same device.
- **Not characterised.** Neither version has been placed and routed, so whether they meet the 50 MHz target of that scheduler is not known.
- **Operating-system names.** An operating system's suspend and resume map onto `remove` and `insert`. The dining-philosophers testbench uses them that way.

Parameters of `hw_scheduler`:

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `N` | 16 | element slots, which is also the most clients the scheduler can hold. No size was specified; 16 is this design's choice |
| `CRIT` | `CRIT_PRIORITY` | scheduling criterion |
| `UARCH` | `UARCH_PARALLEL` | `UARCH_PARALLEL`: register-based, 2 cycles per call. `UARCH_SERIAL`: memory-based, 3 to 2N+3 cycles per call |

## What follows the original and what is this design's own

These come from the original C++ scheduler:

- the layering into dispatch, storage allocation and scheduler;
- the call signature `(m, par, prio) -> (st, ret)`;
- the method names;
- option values in place of pointers;
- statically allocated storage indexed by element;
- a queue ordered by a pluggable criterion (priority, EDF, FCFS);
- constant time for all operations in the register-based version;
- data structures in memories for a smaller memory-based version.

These were chosen here, because the original leaves them to its C++ code or
does not state them:

- the numeric encoding of methods and status codes;
- the 2-cycle latency and the call_valid/call_ready handshake;
- the memory layout and the walks of the memory-based version;
- N = 16;
- how each method behaves at the edges, including which element it returns, when it fails, round robin among equal ranks and non-preemptive insert;
- the lowest-free-slot allocation;
- the search by client value;
- the rank formulas of the three criteria;
- the range check on identifiers.

`choose`, `choose_another` and `choose_elem` are reached through the
allocation layer, so the resource can be handed over through the single call
interface.

## Simulating

Every testbench is self-checking and prints one line,
`TB_RESULT checks=<n> failures=<n>`. The reference models in the testbenches
are written independently of the RTL: SystemVerilog queues, searched and
sorted procedurally.

| Testbench | What it covers |
|-----------|----------------|
| `tb/tb_ordered_list.sv` | random remove/insert pairs against a queue model, stable order among ties |
| `tb/tb_sched_criterion.sv` | rank formulas and order preservation for all three criteria |
| `tb/tb_storage_pool.sv` | reserve, release, both read ports and the search, including a full pool |
| `tb/tb_scheduler.sv` | every scheduler method succeeding and failing, and choose both switching and keeping the owner |
| `tb/tb_alloc_wrapper.sv` | the allocation layer against `tb/sched_ref_pkg.sv` |
| `tb/tb_hw_scheduler.sv` | the top at default parameters, end to end (details below) |
| `tb/tb_philosophers.sv` | a dining-philosophers thread set: five equal-priority threads sharing the processor round robin, suspended (remove) when a fork is taken and resumed (insert) when it is put down, and a more urgent main thread that joins and then returns; run on both microarchitectures, printing the average cycles per method |
| `tb/tb_serial_core.sv` | the memory-based core against `tb/sched_ref_pkg.sv`, with bounds on the answer time and one cycle for methods that walk nothing |
| `tb/tb_hw_scheduler_serial.sv` | the top built with `UARCH_SERIAL`, end to end, calls held back by `call_ready`, answer times from 3 to 2N+3 |
| `tb/tb_hw_scheduler_crit.sv` | the same call sequence on priority, EDF and FCFS instances, with hand-written expected owners |

`tb/tb_hw_scheduler.sv` has a directed phase: a small thread set with
priority takeover and round robin among five equal clients. It then issues
20,000 random calls, back to back or with gaps, and also checks the 2-cycle
latency of every call. It counts each mechanism it exercised: full pool,
destroy of a queued element, choose switching and keeping, choose_another,
rejected methods and parameters, and back-to-back calls.

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/sched_pkg.sv tb/sched_ref_pkg.sv tb/tb_hw_scheduler.sv \
    --top-module tb_hw_scheduler -o sim
./obj_dir/sim
```

To run another testbench, replace `tb_hw_scheduler` with its name.
Packages must be named on the command line ahead of the files that import
them. `tb/sched_ref_pkg.sv` is the reference model imported by
`tb_alloc_wrapper`, `tb_serial_core`, `tb_hw_scheduler`,
`tb_hw_scheduler_serial` and `tb_philosophers`.
