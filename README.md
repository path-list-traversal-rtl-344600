# Sorted path list for SIMT divergence tracking

A SIMT core runs the threads of a warp in lockstep, one instruction for all
of them. When a branch sends threads in different directions, the hardware
has to remember where each group of threads is waiting and bring the groups
back together when they reach the same instruction again. This RTL does
that with a *sorted list of paths* per warp instead of one program counter
per thread.

A **path** is a PC, a function call depth and the mask of the warp's threads
that are at that PC. At any time every thread of a warp is in exactly one
path. The warp always runs its highest-priority path:

1. the one with the **deepest call depth**, and among equals
2. the one with the **smallest PC**.

Running the smallest PC first lets threads that fell behind catch up with
the others, which then wait for them. Because the list is kept in that
order, two paths that can be merged (same PC, same depth) are always next
to each other at the front of the list, so reconvergence needs only a
compare between the active path and the next one. No associative search
over the list and no reduction tree over per-thread PCs is needed.

The design follows the sorted-list mechanism described by C. Collange and
N. Brunie (Inria research report RR-9073, 2017) for the Simty RISC-V SIMT
core. It covers the SIMT branching units only: the branch/memory unit and
the path tracking unit. The rest of the core (fetch, decode, register files,
execution units, memory) is outside this RTL. Its signals are the ports of
the top module.

## Where the paths live

Each warp's sorted list is split over three tables:

| table | entries | holds |
|-------|---------|-------|
| HCT1, first hot context table | 1 per warp | the active path **x**. Fetch reads its PC, execution reads its mask. |
| HCT2, second hot context table | 1 per warp | the next path **y**, ready to take over the moment x merges, exits or stops being first |
| CCT, cold context table | THREADS-2 per warp | every other path |

The CCT is sized for the worst case of one thread per path: THREADS paths in
all, two of them in the hot tables. Strictly, the second hot table is not
needed for the function. It is there so that the new PC never depends on the
cold table: fetch is always resteered from x, which comes out of a 3-input
sort of paths that are already in registers.

## The update pipeline

Every instruction a warp executes turns its active path into up to two new
paths, **a** and **b** (see the branch/memory unit below). The path tracking
unit then updates the warp's list in three stages:

| stage | work |
|-------|------|
| 1 | read **c** = HCT2[warp] |
| 2 | the compact-sort unit (CCS) merges paths with equal PC and depth among a, b, c and sorts the survivors into x < y < z. If only x is left, read the CCT head of the warp. |
| 3 | write x to HCT1 and resteer fetch to x.pc. Write y to HCT2. If z is valid, push z on the CCT. If only x was left, pop the CCT head and write it to HCT2 as y. |

So the list grows by one path (push) only on a real divergence while two
paths are already hot. It shrinks by one (pop) when merges or exits leave a
single hot path. Otherwise the cold table is left alone.

The CCS is built for latency, not as a sorting network. Equality and order
comparators between the three pairs (a,b), (a,c) and (b,c) all work at the
same time. From their results, boolean logic decides which inputs survive
(an input equal to an earlier one is folded into it, and the masks are ORed)
and what rank each survivor has. Each output x, y, z is then a 3-input
one-hot multiplexer.

A warp has at most one instruction in the tracking pipeline. `warp_inflight`
shows which warps are in stages 2 and 3, and an assertion enforces the rule.
In a deeper core pipeline this holds anyway: the next instruction of a warp
cannot be fetched before the warp has been resteered.

## Keeping the cold table sorted

This is the least obvious part of the design. The CCT of each warp is a
stack: push and pop both work at its head. After a push, the order can be
wrong. Take a warp with x = 10, y = 20 and the cold list [30]. If x jumps
to two targets 40 and 50, the CCS gives x = 20, y = 40, z = 50. The cold
list becomes [30, 50] with 50 at the head, and y = 40 is no longer the
second-best path: 30 is.

A sorting state machine repairs this in the background. It works only in
cycles when the cold table is idle, that is when no insertion and no
extraction happens. It is shared by all warps in turn:

* It takes one warp with cold entries and no instruction in flight. Then it
  compares that warp's cold entries one at a time with the warp's HCT2 path y.
* If an entry comes before y, the two are swapped in the next cycle: the
  entry goes to HCT2 and y takes the entry's slot. The scan goes on with the
  new y.
* After one pass over a warp, HCT2 holds the best of that warp's waiting
  paths. The scan then moves to the next warp, in rotating order, that has
  cold entries and is not busy.

A pending swap is **cancelled**, and the comparison retried, when in the
swap cycle:
* the cold table is pushed, popped or cleared (for any warp), or
* the warp has an instruction entering or in the tracking pipeline.

These rules make sure the pipeline and the sorter never see a
half-swapped list. They also mean that the list is sorted only *eventually*.
If a warp issues instructions back to back, the sorter gets fewer idle cycles
for it. Until the sorter has caught up, the warp may run a path that is not
its true best one. This costs efficiency, never correctness: every thread
still executes exactly its own instruction sequence.

The cold table's read port is shared. The pipeline uses it only for the
head read before a pop, and the sorter uses it the rest of the time. Its
write port is shared the same way: a push has priority over the sorter's
swap write. HCT2 has a second write port for the swap. The pipeline writes
HCT2 back on every instruction, so without that port the sorter would hardly
ever be able to swap. The two writers never hit the same warp.

## Splitting the active path

`branch_mem_unit` makes a and b from the active path and the executed
instruction's class, target and per-thread condition mask `cond`:

| class | a | b |
|-------|---|---|
| `OP_SEQ` | pc+4, all threads | - |
| `OP_BRANCH` | target, threads with cond | pc+4, the others |
| `OP_JUMP` | target, all threads | - |
| `OP_CALL` | target at depth+1, all threads | - |
| `OP_INDIRECT` | target, threads whose target it is | same pc, the others (they replay) |
| `OP_RET` | target at depth-1, threads returning there | same pc, the others (they replay) |
| `OP_MEM` | pc+4, threads whose access was served | same pc, the others (they replay) |
| `OP_EXIT` | - | - (the threads terminate) |

A path with an empty mask is invalid, so a branch that all threads take the
same way gives a single path. For indirect jumps and returns, the core picks
one target (for example that of the first active thread) and sets `cond` for
the threads that share it. The other threads run the instruction again.

## Behaviour to be aware of

* **Two paths at one PC can run one instruction apart.** Merging happens
  only in the CCS, between a, b and c. A path can be pushed to the cold
  table at a PC that another path reaches later, or popped into HCT2 at the
  PC the active path has just reached. The two groups then run that
  instruction separately, one right after the other. They merge on the next
  CCS step, unless that instruction splits or ends them (an exit, for
  instance). The end-to-end test prints how many warps leave the exit
  instruction in a single group. That number also depends on how many idle
  cycles the sorter gets: more cycles between a warp's instructions let more
  warps finish as one group.
* **An invalid active path means the warp has finished.** While any thread
  of the warp is alive, x is valid.
* **Starting a warp** loads one path (PC, mask, depth 0) and empties its
  list. The start request goes through the same three stages. An executed
  instruction has priority over a start in the same cycle (`start_ready`).

## Top-level interface (`simt_path_tracker`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst` | in | clock and synchronous active-high reset |
| `ex_valid`, `ex_warp`, `ex_op`, `ex_target`, `ex_cond` | in | a warp has executed an instruction of class `ex_op` |
| `ex_path` | out | active path of `ex_warp`, read from HCT1 in the same cycle |
| `warp_inflight` | out | warps with an update in stages 2-3; they may not issue |
| `start_valid`, `start_warp`, `start_pc`, `start_mask`, `start_ready` | in/out | load a warp |
| `fe_warp`, `fe_path` | in/out | fetch read port: active path of any warp |
| `rsp_valid`, `rsp_warp`, `rsp_path` | out | resteer: new active path, **two cycles after `ex_valid`** |
| `ev_push`, `ev_pop`, `ev_merge`, `ev_swap`, `ev_swap_cancel` | out | one pulse per cold push, cold pop, merge (0-2 per cycle), sorter swap, cancelled swap |

Paths are `path_pkg::path_t`, a packed struct `{valid, depth, pc, mask}`
that is 101 bits wide at the defaults. The table entries take effect at the
clock edge that ends stage 3. The next instruction of that warp can enter
one cycle later.

## Parameters

The sizes shared by all modules are in `rtl/path_pkg.sv`. `NWARPS` and
`DEPTH` are also module parameters, for the tables' sizes.

| name | default | origin |
|------|---------|--------|
| `WARPS` / `NWARPS` | 8 | the configuration the reference synthesis results use |
| `THREADS` | 64 | the largest of the 2 to 64 threads per warp that the reference sweeps. A narrower warp simply uses the low mask bits. |
| `CCT_DEPTH` / `DEPTH` | THREADS-2 = 62 | worst case of one thread per path |
| `PC_W` | 32 | RV32 program counter |
| `DEPTH_W` | 4 | call depth width (own choice) |

At the defaults, the cold table is 8 x 62 entries of 100 bits (about 50 kbit)
and the two hot tables hold 8 paths each. In the reference implementation
these narrow memories map onto FPGA block RAM. Coarse synthesis with yosys
keeps them as memories and leaves about 450 word-level cells and 570
flip-flops.

## Departures and own choices

Not specified by the original description, and chosen here:
* what each of the three stages does exactly;
* the stack organisation of the cold table;
* the extra cancel condition (warp in flight) and the way the sorter picks
  its next warp;
* the second HCT2 write port;
* the instruction classes, including replays for indirect jumps, returns and
  memory, and the call-depth update;
* the warp start path;
* reset, widths and the event outputs.

Equal paths are merged only in the CCS, as described. The design adds no
extra merge in the sorter or on a pop. The per-thread-PC arbiter that the
original work compares against is not part of this design.

## Files

| file | content |
|------|---------|
| `rtl/path_pkg.sv` | sizes, `path_t`, `op_e`, priority order `path_lt`, merge test `path_eq` |
| `rtl/context_compact_sort.sv` | CCS: 3-path merge and sort |
| `rtl/hot_context_table.sv` | HCT: one path per warp, 2 read and 2 write ports |
| `rtl/cold_context_table.sv` | CCT: per-warp cold stack, push/pop/clear, background sorter |
| `rtl/path_tracking_unit.sv` | the 3-stage pipeline around two HCTs, the CCS and the CCT |
| `rtl/branch_mem_unit.sv` | split of the active path into a and b |
| `rtl/simt_path_tracker.sv` | top: branch/memory unit + path tracking unit + warp start |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_traversal_example` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops with
`$finish`. Each has a watchdog. For example, with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    --top-module tb_simt_path_tracker rtl/path_pkg.sv tb/tb_simt_path_tracker.sv
./obj_dir/Vtb_simt_path_tracker
```

Replace the top module and file to run another testbench. All of them run at
the default sizes in a few seconds.

What the tests check:
* `tb_context_compact_sort`: 20 000 random and directed triples against a
  merge-then-selection-sort reference.
* `tb_hot_context_table`: both read ports and both write ports against a
  reference array, and reset.
* `tb_branch_mem_unit`: every instruction class against the table above.
* `tb_cold_context_table`, stack behaviour: push, pop, head and clear
  against a reference stack, with the sorter held off.
* `tb_cold_context_table`, sorting: after the sorter has run under push/pop
  traffic and port contention, HCT2 comes before every cold entry and no
  path was lost or duplicated. The cycle count of one pass is checked too.
* `tb_path_tracking_unit`, random updates: 8 warps get random updates
  (moves, splits, calls, returns, partial and full exits). Each new active
  path must equal a reference merge-sort, and each resteer must come exactly
  two cycles after its request.
* `tb_path_tracking_unit`, invariants: after every update, the warp's paths
  across all three tables must be disjoint and hold exactly its live
  threads. When the test ends, every list must be sorted.
* `tb_simt_path_tracker`, end to end at full default size: 8 warps of up
  to 64 threads (warps 0 to 5 start with 2, 4, 8, 16, 32 and 64 threads,
  on the low mask bits) run a small program with an if/else nest, memory replays, a call
  with a branch inside, a data-dependent loop, a three-way split and an
  indirect jump. Every thread's completed instruction sequence must match a
  thread-by-thread run of the same program. Each mechanism (divergence,
  push, pop, merge, swap, cancelled swap, memory and indirect replay, call,
  return, start, completion) must occur, and threads must stay grouped
  (at least four threads per issued instruction on average).
  Between a warp's resteer and its next instruction, the test waits
  7 cycles. This stands in for the rest of a 10-stage pipeline.
* `tb_traversal_example`: the `if (A && B) C; else D; E;` case with four
  threads. The warp must run exactly A{0-3}, B{0,2,3}, C{0}, D{1-3},
  E{0-3}, with two merges and no cold-table traffic.
