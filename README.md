# Decoupled instruction window for value speculation

A processor that predicts data values lets an instruction's consumers run
before its result exists. When a prediction is wrong, only the consumers need
to run again (*instruction reissue*). Squashing everything younger, as is done
for branch mispredictions, throws away too much work. Reissue has a cost,
though. In a conventional design every instruction has to stay in the
scheduling window until it commits, in case it must be reissued. The window
then fills with instructions that were dispatched long ago, and its useful
capacity shrinks. A bigger window would restore that capacity, but it would
also make wakeup and select slower.

This RTL implements the remedy proposed by T. Sato in *Decoupling Recovery
Mechanism for Data Speculation from Dynamic Instruction Scheduling Structure*.
It splits the instruction window into two structures with different jobs:

* a **scheduling window** (64 entries) that only schedules. An entry is freed
  in the cycle its instruction is dispatched.
* an **instruction buffer** (128 entries, organised like a register update
  unit) that holds every instruction from decode to commit. It does nothing
  while predictions are right. After a misprediction it finds the dependents
  that already left the window and dispatches them again. Because it only
  matters in that rare case, its wakeup/select logic can be pipelined over two
  cycles without slowing the common path.

Around these two structures the RTL builds a complete 8-wide out-of-order
back end:

* decode with renaming;
* a 4096-entry stride value predictor;
* eight functional units that each execute every operation (latency 1,
  multiply 4, divide 12);
* an arbiter that shares the units between the window and the buffer;
* a register file written at commit.

## Life of an instruction

1. **Decode** (`decode_rename`) takes up to 8 instructions per cycle in
   program order and writes each one into *both* the window and the buffer.
   If either structure has too few free entries, the group is cut short and
   the rest waits. Each instruction gets a tag, which names its buffer entry.
   Each source register is resolved through a rename table that gives the tag
   of the register's newest in-flight producer. The operand value comes from
   the first of these that applies: an older instruction of the same group; a
   result broadcast this cycle; a result already held in the buffer; or the
   register file. If the stride predictor is confident about the
   instruction's result, that predicted value goes to its consumers
   immediately.
2. **Wakeup and select in the window** (`scheduling_window`). Entries watch
   the eight result buses for their source tags. Up to as many ready entries
   as there are free units are dispatched per cycle. An entry is released as
   soon as its instruction is dispatched.
3. **Execution** (`functional_unit`). Each result comes back with its tag and
   a version number (see below).
4. **Result filtering and broadcast** (`instruction_buffer`). The buffer
   accepts a result only if it belongs to the entry's current version. It then
   broadcasts the result to the window, to its own entries and to decode.
5. **Commit.** Up to 8 consecutive completed entries leave from the head of
   the buffer per cycle. An entry can commit only if it has no reissue
   pending. Committing writes the register file and trains the value
   predictor.

## How a misprediction is found and repaired

This part is the least obvious, and the whole design exists for it.

**Detection by value comparison.** A source operand in the window or the
buffer holds a *value*, a *producer tag*, a *ready* flag and a *live* flag
(live means the source is linked to a producer at all). Every broadcast is
compared with the tags of all live sources:

* A source that is still waiting simply takes the value.
* A source that already holds a value also takes the new value if it
  differs. In the buffer, that difference marks the entry **for reissue**.

A value-predicted instruction carries its predicted value as its result from
decode on. Its real result, when broadcast, therefore differs from what its
consumers hold exactly when the prediction was wrong, and this marks them.
Each reissued instruction broadcasts again when it completes. Its consumers
compare once more, so the repair walks down the dependence chain one level
at a time. A verified prediction costs nothing: the broadcast carries the
value the consumers already have.

**Versions.** When the buffer marks an entry that was already dispatched, it
advances the entry's 4-bit version number. It also withdraws the entry's
result and its completed state. The execution still in a unit carries the old
version. When that execution finishes, the buffer drops its result, so a
stale result is never broadcast or committed.

**Where the dependents are dispatched from.**

* A dependent that has already left the window exists only in the buffer, and
  the buffer reissues it.
* A dependent still waiting in the window has just taken the corrected value
  there, so the window dispatches it normally.

The buffer marks such dependents for reissue too and may select them. Its
select pipeline is slower than the window, though. Before dispatching, the
second stage checks the selection again and **cancels** it if the
instruction is still in the window or was dispatched from it in the
meantime. This is the cancellation rule of the original proposal.

**Tags** are the entry index plus a generation bit that flips each time the
allocation pointer wraps. An entry index can come back into use while
younger instructions still name its previous occupant. The generation bit
keeps those names from matching the new occupant's broadcasts.

**Why commit is safe.** Commit is in order. When an entry reaches the head,
all its producers have committed. Each of them broadcast its final value at
least one cycle before committing. An entry whose source changed on that
last broadcast lost its completed state in the same cycle. So an entry that
commits was computed from final values.

## The two-cycle reissue pipeline

```
cycle n      a result broadcast changes a source; the entry is marked (registered at the edge)
cycle n+1    stage 1: oldest-first select of up to 8 marked entries whose sources are ready
cycle n+2    stage 2: re-check (entry alive, same version, not in and not dispatched by the
             window); surviving requests go to the dispatch arbiter
```

The entry reaches a functional unit at the end of cycle n+2: two cycles of
wakeup/select latency (`WAKEUP_LAT`). `dispatch_arbiter` serves the window
first. The k-th instruction from the window goes to the k-th free unit, and
buffer requests take the units that are left. A request that gets no unit
stays marked and is selected again later. Entries waiting in stage 2 are not
selected a second time.

## Timing

| path | latency |
|---|---|
| decode → selectable in the window | next cycle |
| dispatch → result on a bus | 1 cycle (ALU), 4 (multiply), 12 (divide) |
| result on a bus → a waiting consumer selectable in the window | next cycle (no same-cycle bypass, so dependent 1-cycle operations issue every other cycle) |
| result on a bus → marked entry dispatched by the buffer | 2 cycles |
| completion → commit | next cycle at the earliest |

A functional unit accepts one-cycle operations back to back. A multiply or
divide occupies the unit until its result appears.

## Files

Each `rtl/<name>.sv` holds one module or package. It opens with a comment on
its function, interface and timing, and says what follows the published
design and what is this implementation's choice.

| file | role |
|---|---|
| `rtl/dw_pkg.sv` | shared types (instruction, operand, unit request, result), operation set, latencies, the ALU function and the source-snoop rule |
| `rtl/decoupled_window_core.sv` | top level: wires everything below |
| `rtl/decode_rename.sv` | group decode, rename table, operand resolution, stall on full window or full buffer |
| `rtl/scheduling_window.sv` | 64-entry wakeup/select window, released at dispatch |
| `rtl/instruction_buffer.sv` | 128-entry in-order buffer: misprediction detection, versioning, two-cycle reissue select, cancellation, commit |
| `rtl/dispatch_arbiter.sv` | shares the units between window and buffer |
| `rtl/functional_unit.sv` | one execution unit (every operation) |
| `rtl/stride_value_predictor.sv` | 4096-entry tag / prev_value / stride / 2-bit confidence table |
| `rtl/register_file.sv` | 32 registers, 16 read ports, 8 write ports |

### Top-level interface (`decoupled_window_core`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `in_valid[DW]`, `in_instr[DW]` | in | instructions in program order; valid slots first |
| `n_accept` | out | how many of them were taken; offer the rest again |
| `cm_valid`, `cm_pc`, `cm_rd`, `cm_value` | out | committed instructions, in order |
| `ev_predicted`, `ev_mispredict`, `ev_marked`, `ev_reissue`, `ev_cancel` | out | per-cycle event counts (predictions made, mispredictions found, entries marked, reissues dispatched, buffer selections cancelled) |
| `stall_win`, `stall_buf` | out | decode cut short by a full window / buffer |
| `win_used`, `buf_used` | out | occupancy |

An instruction (`dw_pkg::instr_t`) has these fields:

* `pc`;
* `op`: add, sub, and, or, xor, sll, srl, slt, mul or div;
* destination `rd` and sources `rs1`, `rs2`;
* `use_imm`, which replaces `rs2` with `imm`.

Register 0 reads as zero.

### Parameters

| parameter | default | origin |
|---|---|---|
| `DW` (decode/commit width) | 8 | 8-way machine of the evaluation |
| `NFU` (functional units) | 8 | this implementation (the machine width) |
| `WIN_ENTRIES` | 64 | evaluated configuration (half the buffer) |
| `BUF_ENTRIES` | 128 | evaluated configuration; power of two, at most 128 with the 8-bit tags of `dw_pkg` |
| `WAKEUP_LAT` | 2 | evaluated configuration; at least 2 |
| `VP_ENTRIES` | 4096 | evaluated configuration |
| `LAT_ALU/MUL/DIV` (package) | 1/4/12 | evaluated configuration |
| `XLEN`, `NREGS` (package) | 32, 32 | this implementation (MIPS-like) |

## Stride value predictor

Every entry holds four fields:

* `tag`, the upper address bits;
* `prev_value`, the last result;
* `stride`, the difference of the last two results;
* `conf`, a 2-bit saturating counter.

The prediction is `prev_value + stride`. The core speculates only when the tag
matches and `conf` is 3. The following are this implementation's choices:

* Training uses committed values. `conf` goes up when the committed value
  equals the entry's prediction and down otherwise; then `stride` and
  `prev_value` are updated.
* A tag miss replaces the entry with stride 0 and confidence 0.
* The index is address bits [13:2].
* Several updates of one cycle apply in order, each one seeing the ones
  before it.

## Where this RTL departs from, or goes beyond, the published design

* **Scope.** The published evaluation surrounds the window with a full
  machine: instruction and data caches, an L2, a BTB, a gshare predictor and
  a return stack. Only their sizes are given, and they are not part of the
  proposal. This core has none of them. It takes a fetched instruction
  stream, and its operation set has no loads, stores or branches. As a
  result, the published benchmark runs (SPEC95 integer programs) cannot be
  executed on it.
* **Detecting dependents.** The original work points to an earlier mechanism
  that finds the dependents of a mispredicted instruction *serially*. Its
  circuit is not described. Here the buffer uses the tag comparison it
  already needs for wakeup, and adds a comparison of values.
* **Choices of this implementation:** the version numbers, the generation
  bit of the tags, window selection by entry position, oldest-first reissue
  selection, priority of the window at the arbiter, unpipelined
  multiply/divide, commit-time predictor training, 32-bit data and 32
  registers.
* The number of functional units is not given; the design uses 8, one per
  issue slot.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one ends with
`TB_RESULT checks=N failures=M`. Build one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dw_pkg.sv tb/tb_decoupled_window_core.sv \
          --top-module tb_decoupled_window_core
./obj_dir/Vtb_decoupled_window_core
```

Replace the testbench name to run another one. The files a testbench uses
are found through `-Irtl`.

* `tb_decoupled_window_core` runs the whole core at its default sizes. It
  executes a 16-instruction loop body 300 times (4804 instructions) and
  compares every commit with an in-order reference model. The loop contains:
  * values that keep their stride, which are predicted correctly;
  * values that wrap every 8 iterations, which are confidently mispredicted;
  * a randomised value;
  * divides that make dependents run ahead on predicted values;
  * a serial divide chain that fills both structures.

  The test fails if any of these never happens: prediction, misprediction,
  reissue from the buffer, cancellation of the buffer's copy, window-full
  stall or buffer-full stall. A typical run: 4804 instructions in about 5100
  cycles, about 2800 predictions, 1000 mispredictions, 5800 reissues, 130
  cancellations, and peak occupancy 64 (window) and 128 (buffer).

  The run also prints average occupancy, about 124 entries in the buffer and
  about 4 in the window. This shows the point of the design: the buffer
  stays full of dispatched instructions that wait to commit, while the
  window, freed at dispatch, stays nearly empty.
* `tb_core_random` runs six random 24-instruction loop bodies 60 times each
  (8644 instructions, divides and multiplies included). It compares every
  commit with the reference model. A typical run reaches an IPC of about 3.2
  with about 80 mispredictions and 1000 reissues. Different
  `+verilator+seed+N` values give different programs.
* `tb_instruction_buffer` is a directed misprediction scenario. It checks the
  cycle in which the reissue appears (two cycles after the correcting
  broadcast), the cancellation, the dropping of a stale result, the cascade
  to a second-level dependent, and commit order. It also fills and drains
  the buffer.
* `tb_scheduling_window` compares random wakeup/select against a model,
  including that selection is work-conserving and that entries are freed at
  dispatch.
* `tb_functional_unit` checks every operation against a reference and checks
  the exact latencies of 1, 4 and 12 cycles.
* `tb_stride_value_predictor`, `tb_decode_rename`, `tb_dispatch_arbiter` and
  `tb_register_file` check their blocks against reference models or directed
  expectations.

Every testbench has a cycle watchdog. The end-to-end test runs in well under
a second of simulation time.
