# Register renaming for a small out-of-order pipeline

A pipeline that issues out of order can only reorder instructions as far as
their register names allow. A true data dependence (read after write, RAW)
must be respected. Write-after-write (WAW) and write-after-read (WAR)
conflicts are different: they exist only because two instructions happen to
use the same architectural register name. Renaming removes them. In hardware,
every result gets its own storage location, and a table remembers which
location currently stands for each architectural register.

This repository holds synthesizable SystemVerilog for three variants of that
idea. All three are built into the same small pipeline and run side by side
in one top module (`rr_top`):

| core | where results wait before commit | what commit does |
|------|----------------------------------|------------------|
| `u_ptr` (`rr_core_ptr`, `UNIFIED=0`) | 64-entry physical register file (PRF) | copies the value into a 32-entry architectural register file (ARF) and frees a physical register |
| `u_urf` (`rr_core_ptr`, `UNIFIED=1`) | 64-entry unified register file (URF) | copies only the physical-register pointer into an architectural rename table (ART) and frees a physical register |
| `u_val` (`rr_core_val`) | the reorder buffer entries themselves | copies the value from the ROB into the ARF |

All three run the same programs to the same results in the same number of
cycles. They differ in the storage they need and in where values move.

## The pipeline

```
  F -> D -> [IQ] -> I -+-> X ----------------------+-> W -> [ROB] -> C
                       +-> Y0 -> Y1 -> Y2 -> Y3 ---+
```

- **F** fetches one instruction per cycle from a 64-word instruction memory. It runs straight-line code only, because there are no branches.
- **D** decodes, renames and dispatches one instruction per cycle. Each instruction goes into the 4-entry issue queue (IQ) and the 4-entry reorder buffer (ROB).
- **I** issues one instruction per cycle out of order. It picks the *oldest* IQ entry whose operands are available and whose write-back slot is free.
- **X** is a one-stage adder for `add` and `addi`. **Y0–Y3** is a four-stage multiplier for `mul`, which returns the low 32 bits.
- **W** has a single write-back port. Results arrive out of order.
- **C** commits in program order, one instruction per cycle, from the head of the ROB.

The instruction set is RV32 `add`, `addi` and `mul` in their standard
encodings. `x0` reads as zero and is never renamed. Any other instruction
word is dropped in D.

### Issue timing, the W port and bypassing

An instruction issued in cycle *t* reaches W in cycle *t+2* through X, or
*t+5* through Y. Because both pipes share one W port, the **scoreboard**
keeps a reservation bit for each of the next five cycles. An add is held back
if an earlier mul already owns the W slot it would need. This is the main
structural hazard of the design.

Values are bypassed only from W, and the bypass has two points:

- If the producer is in W in the cycle the consumer issues, I takes the value from the W result bus.
- If the producer reaches W in the cycle after the consumer issues, X or Y0 takes it from the W result bus.

So a consumer can issue one cycle before its producer writes back. The
scoreboard counts the cycles left to W for each physical register, or each
ROB id in the value variant. That count tells I which case applies.

The standard example below shows the resulting timing. The cycle numbers are
the same for all three cores and are checked by the core testbenches.

```
                         D   I   W   C
a: mul  x1, x2, x3       1   2   7   8
b: mul  x4, x1, x5       2   6  11  12   waits for a; takes a's result in Y0
c: addi x6, x4, 1        3  10  12  13   waits for b
d: addi x4, x7, 1        4   7   9  14   independent; W slot 7 belongs to a
```

`d` overtakes `b` and `c`. It also writes `x4` before `b` does, which is a WAW
conflict that renaming makes harmless. The ROB still commits all four in
order.

## Pointer-based renaming (`rr_core_ptr`)

Three structures work together:

- **Free list** (`rr_free_list`): one free bit per physical register. A priority encoder hands out the lowest-numbered free register.
- **Rename table** (`rr_rename_table`): for each of x1..x31, the physical register it maps to (`preg`) and a pending bit `p`, meaning "a write to this register is in flight". Entries are always valid. After reset xi maps to p(i-1), everything is zero, and p31..p63 are free.
- **ROB** (`rr_rob_ptr`): per entry a valid bit `v`, a pending bit `p` (not yet written back), `preg` (where the result goes), `areg` (the architectural destination) and `ppreg` (the physical register `areg` mapped to *before* this instruction).

What each stage does:

| stage | action |
|-------|--------|
| D | Look up both sources in the rename table and write the specifiers and pending bits into the IQ. Take a free register for the destination. Record the old mapping as `ppreg` in the ROB, then point the table at the new register with `p` set. |
| I | Issue the oldest ready entry. Read the PRF (or bypass). Claim the W slot in the scoreboard. |
| W | Write the PRF. Clear the ROB entry's `p`. Clear the rename table's `p` for whichever register still maps to this physical register. Wake up IQ sources waiting on it. |
| C | Retire the head. `UNIFIED=0` copies PRF[preg] into ARF[areg]; `UNIFIED=1` writes `preg` into ART[areg]. Both return `ppreg` to the free list. |

### When a physical register may be freed

This rule is the subtle part of the design. Take `add r1,r2,r3; add r4,r1,r5;
add r1,r6,r7`. The first add writes r1 into some physical register P. The
second add reads P. It is tempting to free P as soon as the third add
(the next writer of r1) writes back. But the second add may not have issued
yet, and a new owner of P could then overwrite the value it still needs.

The safe point is when the *next writer of the same architectural register
commits*. At that point every older instruction has committed, so every
reader of P has finished. That is why the ROB carries `ppreg`, and why C
rather than W returns it to the free list. The core testbench checks this
every cycle: no physical register on the free list is still mapped by the
rename table, and none is named by a waiting IQ source.

### Same-cycle corner cases

- **D and W in the same cycle.** A source looked up in D may be written back by W in that same cycle. The rename table then already reports it as not pending. Without this, the new IQ entry would miss the one wakeup it waits for and never issue. The value core does the same and takes the value from W.
- **Rename and clear of the same entry.** A rename in D and a clear (writeback in W, or commit in the value core) can hit the same table entry in the same cycle. The rename wins, because the newer mapping is the one that counts.
- **Wakeup by `preg`.** W wakes up the rename table by matching `preg` against every entry, so W does not need to know `areg`.
- **ROB index.** Each instruction carries its ROB index through the IQ and the pipes, so W knows which ROB entry to mark complete.

### Unified register file (`UNIFIED=1`)

This variant has no separate ARF. The committed state is a 32-entry table of
pointers (`rr_art`), and commit moves a 6-bit pointer instead of a 32-bit
value. Reading an architectural register from outside means reading
URF[ART[x]].

## Value-based renaming (`rr_core_val`)

Here the "physical register" is the ROB entry id: 2 bits for 4 entries.
Results are written into the ROB at W and copied to the ARF at C. Registers
are allocated and freed together with ROB entries, so there is no free list.

- **Rename table** (`rr_rename_table_val`): per register a valid bit `v`, a pending bit `p` and a ROB id. An entry is valid only while a write to that register is in flight. Commit clears `v`, but only if the entry still points at the committing ROB entry.
- **ROB** (`rr_rob_val`): `p`, `v`, `value`, `areg`.
- **IQ sources** hold either a value or a ROB id. D picks the source of each value:

| rename table entry | what goes into the IQ |
|--------------------|-----------------------|
| not valid | value from the ARF |
| valid, pending | ROB id, with `p` set |
| valid, complete | value read from the ROB, or from W if it is written back in this very cycle |

When W writes a result, waiting IQ entries with that ROB id copy the value in
(`rr_issue_queue` with `CAPTURE=1`). This matters because a producer can
commit, and its ROB entry can be reused, before a waiting consumer issues. A
consumer that kept only the ROB id could then read the wrong entry.

For the example, the IQ entries are `p0 / 1 / 2`, `p1 / p0* / 4`, `p2 / p1*`
and `p3 / 5`, and the ROB destinations are x1, x4, x6 and x4. The testbench
checks these.

## Files

All RTL is in `rtl/`, one module or package per file:

| file | role |
|------|------|
| `rr_pkg.sv` | shared types: operation enum, decoded-instruction struct, pipe latencies |
| `rr_top.sv` | three cores side by side, each with its own fetch stage |
| `rr_core_ptr.sv` | pointer-based core; `UNIFIED` selects PRF+ARF or URF+ART |
| `rr_core_val.sv` | value-based core |
| `rr_fetch.sv` | F stage: PC and instruction memory |
| `rr_decode.sv` | decoder for add / addi / mul |
| `rr_free_list.sv` | free bits and priority encoder |
| `rr_rename_table.sv`, `rr_rename_table_val.sv` | rename tables for the two schemes |
| `rr_art.sv` | architectural rename table |
| `rr_issue_queue.sv` | compacting IQ with oldest-first select, wakeup and optional value capture |
| `rr_scoreboard.sv` | cycles-to-W per tag, W-port reservation |
| `rr_rob_ptr.sv`, `rr_rob_val.sv` | reorder buffers for the two schemes |
| `rr_regfile.sv` | reset-to-zero register file with any number of read and write ports |
| `rr_x_unit.sv`, `rr_y_unit.sv` | adder; four-stage multiplier |

### Top-level interface (`rr_top`)

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `imem_we` | in | 3 | write enable of each core's instruction memory |
| `imem_waddr`, `imem_wdata` | in | 6, 32 | instruction memory write address and word |
| `start` | in | 1 | pulse: every core starts fetching at address 0 |
| `num_insts` | in | 7 | number of instructions to run |
| `done` | out | 3 | core *i* has fetched and committed all instructions |
| `dbg_areg` | in | 5 | architectural register to observe |
| `dbg_value` | out | 3 × 32 | committed value of `dbg_areg` in each core |

Parameters: `NUM_PREGS` = 64, `ROB_ENTRIES` = 4, `IQ_ENTRIES` = 4,
`IMEM_WORDS` = 64. The first three are the sizes used throughout the
worked examples. `ROB_ENTRIES` must be a power of two, and `NUM_PREGS` must
be at least 32.

At the default sizes, at most four instructions are in flight and 33
physical registers are spare. So in practice D stalls only on a full ROB:
the free list never runs dry, and the IQ never fills before the ROB. The
core testbench also runs a smaller configuration (34 physical registers,
8 ROB entries) to exercise those two stalls.

Synthesis of `rr_top` at the defaults gives about 3,600 word-level cells,
925 flip-flop bits and 15,000 memory bits. Most of the memory bits are the
three 64-word instruction memories and the two 64 × 32 register files.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/rr_pkg.sv tb/rr_tb_pkg.sv tb/rr_top_tb.sv --top-module rr_top_tb -o sim
./obj_dir/sim
```

Replace `rr_top_tb` with any other testbench in `tb/`. `tb/rr_tb_pkg.sv`
holds instruction encoders, a sequential reference model and program
generators.

- `rr_top_tb` runs `rr_top` at its default parameters. It loads and runs the example, the register-freeing sequence and six random 64-instruction programs. It compares all 31 registers of all three cores with the reference model, and requires every counted mechanism to occur: out-of-order issue, bypass, ROB-full stall, W-port conflict and commit.
- `rr_core_ptr_tb` and `rr_core_val_tb` run the example against the cycle table above and the IQ/ROB contents, then 1,200 random instructions. They check issue-to-W latency for every instruction, and the free-list invariant for the pointer core. A second, smaller instance must stall at least once on a full IQ, and the pointer core's instance must also stall on an empty free list. Both bypass points must be used.
- Every other module has its own testbench, driven by random stimulus against a model.

## Limits and choices to be aware of

- **No recovery.** There are no branches, exceptions or misprediction recovery. The ROB and ART provide the in-order state that recovery would need, but nothing uses it.
- **Choices not dictated by renaming itself.** The selection policy (oldest ready first), the two bypass points, the reset state (xi in p(i-1), all registers zero), the dropping of unsupported words, and the way a program is loaded and started are this design's own choices.
- **Scoreboard contents.** The scoreboard holds a cycles-to-W count per tag plus the W-port reservations. It is not a full table of functional-unit state.
- **Multiplier split.** The product is formed in Y0 from two 16-bit halves and summed in Y1; Y2 and Y3 only carry it. Only the four-stage latency matters to the rest of the pipeline.
