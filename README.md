# Simple physical register sharing for an out-of-order core

An out-of-order core renames every destination onto a physical register and
keeps that register until a later writer of the same logical register
commits. Many of those registers are wasted. Some hold only 0 or 1, and some
hold a value that the very next instruction overwrites in place (`r5 = r5 + 4`),
with nobody else reading the old one. When the pool runs dry, rename stalls.

This RTL implements the "simple" register-sharing scheme from *Dynamically
Reducing Pressure on the Physical Register File through Simple Register
Sharing*. Three cheap mechanisms are added to an R10000-style rename backend
so that fewer registers are held at once:

| mechanism | when | what it saves |
|---|---|---|
| **trivial 0** | rename | `x xor x`, `x - x`, `x * 0`, `x and 0`, ... where the zero operand is already mapped to the hardwired zero register. The destination is mapped to P0 and no register is allocated. |
| **early release of 0/1** | commit | An instruction whose result was 0 or 1 gives its register back at commit instead of waiting for the next writer. Every mapping of it is redirected to the hardwired P0 or P1. |
| **SUSO sharing** | rename | A *single-use self-overwriting* instruction reuses its source's register. Its destination equals a source, and nothing read the old value in between. It gets a new *version* of the same register, not a new one. |

The three work together in one core, `regshare_core`. It is 4 wide, with
160 pooled physical registers, a 40-entry issue queue and a 256-entry
reorder buffer.

## Tags: storage index plus version

A physical register name (a *tag*) is 10 bits wide:

```
 tag = { version[1:0], storage[7:0] }
```

- **Storage 0 and 1** are P0 and P1. They are hardwired to the values 0 and
  1, are never in the free list, and are always ready.
- **Storage 2 to 161** are the 160 pooled registers.
- **A normal allocation** gets version 0.
- **Each SUSO instruction** that shares the register increments the version.
  So one register can carry up to four values in sequence: one producer plus
  three SUSO instructions. At version 3 the next self-overwriting instruction
  allocates normally.

The version bits keep wakeup correct. Every producer still broadcasts a
distinct tag, so a consumer of version 1 is not woken by the write of
version 0. The busy table and all wakeup comparisons use the full 10-bit tag.
The register file and the free list use only the 8-bit storage index.

## Pipeline

```
 front end --W insns--> rename+dispatch --> issue queue --> issue/execute/writeback --> ROB commit
                          |  RAT, ref bits,                  |  0/1 detect                 |  0/1 candidates
                          |  free list, checkpoints          v                             v
                          +<--------------------- early-release queue (1 RAT search/cycle) +
```

1. **Rename and dispatch (1 cycle).** Up to 4 instructions are renamed in
   program order (`rename_unit`). Each slot sees the map left by the slots
   before it. The group is accepted as a prefix: it stops at the first slot
   that finds no room in the ROB, the issue queue or the free list. It also
   stops at a second branch, or at a branch with no free checkpoint.
   Trivial-0 instructions complete at rename and never enter the issue queue.
2. **Issue (1 cycle).** The issue queue picks up to 4 ready entries, lowest
   index first. In that same cycle it reads operands, executes, writes the
   register file and broadcasts the destination tags. Dependants can
   therefore issue in the next cycle. `cv_detect` flags results equal to 0
   or 1, and the ROB records this in two bits per entry.
3. **Commit (next cycle on).** Up to 4 done entries leave the ROB head in
   order. The old mapping of each is returned to the free list. There are
   two exceptions to this: a SUSO entry releases nothing, because its old
   mapping is its own storage; and a release of P0/P1 is dropped.

## Early release of 0/1 results

This is the most involved part. It spans the ROB, the early-release queue
(`er_queue`), the RAT CAM port, the checkpoints, the free list and the
issue queue.

1. **Candidates at commit.** A committing entry whose result was 0/1 and
   whose destination is a pooled register becomes a candidate. Up to 4 can
   arrive per cycle. They wait in a 4-entry queue. Commit stops before a
   candidate that would not fit.
2. **One search per cycle.** The oldest candidate's tag is compared against
   all 32 RAT entries. The comparison uses the map as written by this
   cycle's rename group, since rename and search happen in the same cycle.
   - *No match:* a younger instruction has already remapped the logical
     register. It will free the register at its own commit, so the
     candidate is dropped.
   - *Match:*
     - The storage index goes back to the free list in this cycle.
     - Every matching RAT entry is rewritten to P0 or P1 (tag `{0..0, V}`).
     - Every matching entry in every valid branch checkpoint is rewritten
       the same way. A later misprediction therefore cannot bring the freed
       register back.
     - Checkpoints are touched only on a match. This matters: a stale copy
       in a checkpoint must not be rewritten after the register has been
       reused.
3. **Delayed broadcast.** One cycle after the match, the tag and value are
   broadcast on a dedicated issue-queue port. Every waiting operand with
   that tag is marked ready and *common*, so at issue the constant is used
   instead of a register-file read. The delay covers instructions renamed
   in the cycle of the search: they read the old mapping and enter the
   queue one cycle later.
4. **Reaching the ROB too.** The broadcast also reaches the ROB. SUSO
   entries keep the tag of their remaining operand for undo, and that tag
   is rewritten to P0/P1 in the same way.

**Stale candidates.** While a candidate waits in the queue, a younger
instruction that remapped the same logical register can commit and free the
register. The free list can then hand it out again, with version 0, under
the very same tag. A later search would find the new owner and free a live
register. To prevent this, every storage index freed at commit, and every
index released by the queue itself, removes all waiting and arriving
candidates with that index.

**Sharing and release together.** Take a register shared by a producer and
its SUSO successors. It can be released early only through the tag that is
still mapped, which is that of the youngest sharer. So it is never freed
while an older sharer still needs it.

## SUSO sharing

`suso_detect` grants sharing when all of these hold:

- The instruction writes one of its own sources.
- The destination's *reference bit* is clear.
- The destination is not mapped to P0/P1.
- The version is below 3.
- The operation is reversible: add, sub or xor. Sub and xor with both
  sources the same register are trivial 0 instead.

Reference bits live in the RAT, one per logical register:

- A source read sets its bit.
- A destination write clears its bit.
- All bits are set when a branch takes its checkpoint, and when a checkpoint
  is restored.

As a result, sharing never crosses a branch. A mispredicted branch cannot
leave a shared register holding a wrong-path value whose producer is
already gone.

**Undo after an exception.** An executed SUSO instruction has destroyed its
source value. When the ROB is unwound after an exception, `suso_reverse`
recomputes that value from the shared register and the remaining operand
(register or immediate), and writes it back:

| operation | recovery |
|---|---|
| add | `r - y` |
| sub | `r + y` if the overwritten operand was the minuend, else `y - r` |
| xor | `r ^ y` |

The remaining operand is never itself overwritten by a SUSO instruction,
since it was read after its last write. If it was released early, its tag
has become P0/P1 in the ROB entry, as described above.

## Recovery

- **Branch misprediction.** A branch resolves when it issues. The front end
  marks which branches it mispredicted (`insn.mispred`). In the cycle the
  oldest mispredicted branch issues, the core does all of the following:
  - restores the RAT map and the free-list read pointer saved at the
    branch's rename;
  - sets all reference bits;
  - drops younger checkpoints;
  - cuts the ROB tail back to the branch;
  - removes younger issue-queue entries.

  One cycle later, `redirect` tells the front end to resend from the
  instruction after the branch. A correctly predicted branch frees its
  checkpoint when it issues.
- **Exception.** An instruction marked `insn.excpt` is handled at the ROB
  head. The issue queue and all checkpoints are cleared, and the early
  release search is held. The ROB is then unwound from the tail, one entry
  per cycle. For each entry, the old mapping is written back to the RAT and
  an allocated register is returned to the head of the free list. An
  executed SUSO entry is reversed in the same cycle (two register-file
  reads, one write). `exc_taken` ends the walk, and the front end resends
  from `exc_seq` (the testbench clears the flag and re-executes). Unwinding
  the whole buffer gives the same map as restoring the oldest checkpoint
  and walking only its basic block. It needs no checkpoint at the head.

## Top-level interface (`regshare_core`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset (all logical registers map to P0, all 160 registers free) |
| `in_valid[W]`, `in_insn[W]` | in | instructions in program order (`rs_pkg::insn_t`) |
| `in_acc[W]` | out | accepted slots, always a prefix; the rest must be offered again |
| `redirect`, `exc_taken`, `exc_seq`, `exc_busy` | out | recovery requests to the front end (see above) |
| `dbg_lreg` → `dbg_value`, `dbg_tag` | in/out | read a logical register through the current map |
| `rob_count`, `fl_count` | out | occupancy of the ROB and the free list |
| `perf` | out | event counters (`rs_pkg::perf_t`): cycles, commits, register stalls, trivial 0, SUSO, release candidates / hits / misses / queue-full cycles, constant operands used at issue, mispredictions, exceptions, SUSO undos |

`insn_t` fields:

- `seq`: program-order number.
- `op`: add, sub, mul, and, or, xor, sll, srl, sra, br.
- `has_dst`, `dst`, `src1`, `src2`: logical registers, with r0 always 0.
- `use_imm` and `imm`: a 16-bit sign-extended immediate that replaces
  `src2`.
- `mispred` and `excpt`: flags for the front end's misprediction and for an
  exception.

## Modules

| file | role |
|---|---|
| `rs_pkg.sv` | widths, tag layout, instruction / issue-queue / ROB entry structs, counters |
| `regshare_core.sv` | top: wires the blocks, issue/execute, branch and exception control, perf counters |
| `rename_unit.sv` | 4-wide rename with in-group cross-checks, allocation, trivial 0, SUSO, reference bits |
| `trivial0_detect.sv` | zero-result rules per operation |
| `suso_detect.sv` | sharing rule and version increment |
| `rat.sv` | map, reference bits, checkpoints, early-release CAM port |
| `free_list.sv` | FIFO of free registers; checkpointable read pointer; unpop for unwinding |
| `busy_table.sv` | one busy bit per 10-bit tag |
| `issue_queue.sv` | 40 entries, wakeup, early-release broadcast port, select, squash |
| `alu.sv` | 64-bit integer operations |
| `cv_detect.sv` | 0/1 result detection |
| `prf.sv` | 160 registers plus hardwired P0/P1 |
| `rob.sv` | 256 entries, 0/1 bits, SUSO undo fields, commit, squash, unwind |
| `er_queue.sv` | candidate queue, one search per cycle, stale-candidate removal, 1-cycle broadcast delay |
| `suso_reverse.sv` | undo arithmetic for add/sub/xor |

Every file opens with a comment on its function, timing and interface.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `W`, `IW` | 4, 4 | rename/commit width, issue width (the four-way machine for which the RAT needs 12 read and 4 write ports) |
| `NUM_PREG` | 160 | pooled physical registers, at most 254 (8-bit storage index) |
| `IQ_N` | 40 | issue-queue entries |
| `ROB_N` | 256 | reorder-buffer entries, at most 256 |
| `NCKPT` | 4 | branch checkpoints, at most 4 |
| `ERQ_DEPTH` | 4 | early-release candidate queue |
| `SHARE_VALUE`, `SHARE_LIFETIME` | 1, 1 | switch off value-based sharing (trivial 0 and early release) or lifetime-based sharing (SUSO), for comparison with a plain core |
| `rs_pkg::VER_W` | 2 | version bits, giving three SUSO sharers per register |

## Where this departs from the described scheme

The scheme was evaluated on a 4-thread SMT machine with a 16-wide fetch and
an 11-wide issue. This core is a single thread, with 4-wide rename, issue
and commit. It has no loads, stores or caches; all operations execute in one
cycle; and branch outcomes arrive with the instructions.

Choices made here, where the scheme leaves details open:

- the pipeline depths;
- prefix acceptance at rename and one branch per rename group;
- 4 checkpoints and a 4-entry candidate queue;
- the lowest-index issue select;
- the dedicated broadcast port, as opposed to borrowing a wakeup port;
- stalling commit when the candidate queue is full;
- X − X treated as trivial 0;
- unwinding the whole ROB on an exception.

Two additions are needed for correctness in this form:

- Stale candidates are removed from the early-release queue when their
  register is freed.
- The early-release broadcast also rewrites the remaining-operand tags kept
  for SUSO undo.

Undo of `r + r → r` by shifting is not used. Instructions whose two sources
are the same register never share.

## Simulation

Every block has a self-checking testbench in `tb/`, named `tb_<module>`. Each
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.
Stimulus comes from `$urandom`, and results are compared against models
written in the testbench. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv rtl/rs_pkg.sv tb/tb_rat.sv --top-module tb_rat
./obj_dir/Vtb_rat
```

`tb_regshare_core` runs the full-size core (no parameter overrides) on a
generated 4000-instruction program:

- **Register pressure:** long dependence chains with independent work
  between them.
- **0/1 producers and trivial-0 idioms.**
- **SUSO chains.**
- **Constant operands:** long multiply chains that make an early release
  land while a consumer is still waiting.
- **Branches**, 25% of them mispredicted. On a misprediction the driver
  feeds wrong-path instructions until `redirect`.
- **Exceptions** inside SUSO chains.

Every 400 instructions it drains the core. It then compares all 32 logical
registers with an in-order reference model. It also checks that no register
was lost or duplicated: free registers plus distinct mapped registers must
equal 160. It counts every mechanism and fails if any never occurred:

- register stalls;
- trivial 0;
- SUSO;
- release hits, misses and queue-full cycles;
- constant operands used at issue;
- mispredictions;
- exceptions;
- SUSO undos.

With the default seed (`+seed=N` changes it) all of these occur and all
checks pass. The run takes a few seconds.

`tb_sharing_modes` runs one register-pressure program on four default-size
cores side by side:

- plain;
- value-based sharing only;
- lifetime-based sharing only;
- both.

The program is a dependent multiply chain with two or three independent
instructions per link. The independent instructions are SUSO increments,
trivial-0 idioms and 0/1 results, so the window grows until rename runs out
of registers. All four cores must produce the reference results. The plain
core waits about 280 cycles for registers; each sharing configuration must
wait fewer (all three wait none) and must actually share.

What is not verified: timing or area of any kind; the transistor-level RAT
cell, whose search-and-clear function is modelled in `rat.sv`; and any
real benchmark, because the core has no memory system to run one.
