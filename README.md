# Register renaming and branch prediction for a dynamically scheduled core

This RTL covers two front-end problems that limit instruction-level parallelism.

- **Data flow: false dependences.** Write-after-write and write-after-read hazards appear only because a program reuses a small set of architectural register names. Renaming gives every new result its own physical register, so only true (read-after-write) dependences remain.
- **Control flow: branch direction.** A deep, wide front end needs good guesses far ahead of execution. Four direction predictors are provided:
  - gshare;
  - a perceptron predictor;
  - a predictor that looks for earlier repeats of the recent history;
  - a prophet/critic hybrid, in which a second predictor checks the first one's guesses after it has seen where they lead.

Everything is written in synthesizable SystemVerilog (IEEE 1800-2017) and tested with Verilator. The renaming hardware also runs inside a small six-stage in-order RV32I pipeline, which shows the rename stage working on real instructions.

## Register renaming

### The three structures

| Module | What it is | Default size |
|---|---|---|
| `reg_map_table` | One entry per logical register. It holds the physical tag the register is currently mapped to, plus a valid bit. | 32 × 7 bits |
| `free_tag_buffer` | A circular FIFO of the physical tags that are not in use. Renaming takes tags at the head. Released tags come back at the tail. | 128 entries |
| `rename_unit` | Renames a group of `WAYS` instructions per cycle using the two structures above. | `WAYS = 2` |

The valid bit in the map table means "the value lives in a physical register". When it is clear, the value is still in the logical register file. In that case the rename stage passes the logical number on and sets `out_srcN_renamed = 0`.

At reset the first 32 physical tags (parameter `FIRST_FREE`) are taken by the logical registers: map entry *i* holds tag *i*. The free buffer starts with tags 32..127. `RESET_RENAMED = 0` gives the other convention instead: all valid bits clear and all 128 tags free.

### Renaming a group in one cycle

For each instruction *k* of the group:

1. Each source reads the map table.
2. A destination takes the *k*-th tag at the head of the free buffer. `x0` never takes one.
3. The destination's map entry is overwritten at the clock edge.

The part that needs care is a **dependence inside the group**. Suppose instruction B reads a register that an older instruction A of the same group writes. The map table still holds the mapping from before A. B must instead get the tag A is taking from the free buffer in this same cycle.

`rename_unit` compares every source with the destinations of all older instructions in the group. The youngest older match wins. Without this bypass, the second instruction of the classic example

    sub x5,x1,x2 ; add x6,x5,x4

would read the stale `p5` instead of `p9`.

When two instructions of a group write the same logical register, the younger one must own the map entry. For that reason the table's highest-numbered write port has priority.

The map table therefore needs `3·WAYS` read ports (two sources and the old destination per instruction) and `WAYS` write ports. The old destination mapping (`now_old_tag`) is what the instruction must release when it retires.

### Timing and back-pressure

- The group is accepted when `in_ready` is high and `in_hold` is low.
- `in_ready` means the free buffer holds at least as many tags as the group has destinations. A group never renames partially.
- The renamed group appears on the `out_*` registers in the next cycle.
- The same information is available combinationally on `now_*`. This is used by the pipeline, which latches it into its own stage register.
- Released tags enter through `free_valid`/`free_tag`, up to `WAYS` per cycle.
- `clr_valid`/`clr_log`/`clr_tag` clear a valid bit, but only if the entry still holds that tag. This covers a value that has been copied back to the logical register file.
- A clear and a write to the same entry in one cycle: the write wins.

## Six-stage pipeline (`rv_pipeline6`)

IF → ID → RN → EX → MA → WB, in order, one instruction per cycle.

- **RN** renames with a one-way `rename_unit` and reads the 128 × 32 physical register file (`phys_regfile`) with the physical source tags.
- **EX forwarding** takes a source from the EX/MA register or from WB. The match is on physical tags, which are unique while an instruction is in flight.
- **Load-use:** a load directly followed by its user holds RN for one cycle.
- **Branches and jumps** are resolved in EX. They redirect fetch and squash the three younger instructions.
- **RN stalls** when no tag is free.
- **Tag release:** when an instruction leaves WB, it writes its result and returns its *previous* mapping to the free buffer. This is safe because every older reader has already read its operand.

The register file writes through, so a read in the same cycle as a write sees the new value.

Supported instructions are the RV32I integer set plus LW/SW. There are no byte or halfword accesses, no FENCE and no system instructions; illegal encodings are flagged by the decoder and execute as no-ops. Instruction and data memory are 1024 words each, with asynchronous read. They are loaded through `prog_*` during reset.

## Branch direction predictors

### gshare (`gshare_predictor`)

- The table holds 4096 two-bit counters (`PHT_BITS = 12`).
- The index is `PC[13:2] XOR history`, with a 12-bit global history.
- The prediction is the counter's MSB.
- The fetch stage shifts the predicted or actual bit into the history (`hist_valid`).
- Write-back updates the counter that was used. The index is carried down the pipeline on `pred_idx`/`upd_idx`.
- After reset the table is initialised one entry per cycle to "weakly not taken". `ready` rises after 4096 cycles.

### Perceptron (`perceptron_predictor`)

The table holds 256 perceptrons indexed by `PC[9:2]`. Each perceptron has 29 signed 8-bit weights w0..w28 for a 28-bit global history. The output is

    y = w0 + Σ x_i·w_i,  where x_i = +1 for a taken bit and −1 for a not-taken bit.

The prediction is taken when y ≥ 0.

**Training:** when the outcome t disagrees with the sign of y, or when |y| ≤ θ, every weight moves by t·x_i (w0 by t). The threshold is θ = ⌊1.93·28 + 14⌋ = 68. Weights saturate.

For training, the caller returns the history the prediction used (`upd_hist`), and y is recomputed from it. `hist_restore` loads the history register directly, which is used for repair.

### Pattern matching (`pattern_match_predictor`)

This predictor treats the global history (64 bits, newest first) as a string and looks for earlier copies of its newest bits.

1. For every older position *d*, a chain of comparators counts how many bits in a row match the newest bits. The largest count is the longest match, `Lmax`.
2. A shorter pattern is then used for the vote, so that it has several earlier copies. Its length is `Lsel = max(1, Lmax·SEL_NUM/SEL_DEN)`, half of `Lmax` by default.
3. For every earlier copy of the `Lsel`-bit pattern, the bit that came right after it is counted as a one or a zero.
4. The majority is the prediction. A tie takes the bit after the most recent copy. A history with no match at all predicts not taken.

Everything is computed in one cycle with about H² comparator bits. `pred_longest`, `pred_sel_len`, `pred_ones` and `pred_zeros` expose the intermediate values. The rule for choosing the vote length is this design's own.

### Prophet/critic hybrid (`prophet_critic`)

This is the least obvious block.

**The two predictors:**

- **Prophet:** a perceptron. It predicts every branch as soon as the branch source offers it. The branch then waits in a 12-entry fetch target queue (FTQ).
- **Critic:** a tagged gshare table (4096 × {valid, 13-bit tag, 2-bit counter} = 8 KB). It judges a queued branch only once the prophet has predicted `FUTURE` = 4 branches starting with that one. The critic therefore sees where the prophet's guess leads before giving its opinion.

The critic's index is `PC xor BOR`. The branch outcome register (BOR) is

    BOR = { final outcomes of the 8 older branches,
            prophet prediction of this branch,
            prophet predictions of the next 3 branches }

**Critique.** On a tag hit whose counter disagrees with the prophet, the critic **overrides**:

1. The branch's prediction is flipped.
2. All younger queue entries are dropped, because they were built on the wrong path.
3. The prophet's history is rewritten with the corrected bit.
4. `redirect_valid`/`redirect_id` tell the branch source to restart with the next sequence number.

Only critiqued entries leave the queue towards fetch (`f_valid`/`f_ready`).

**Resolve.** The back end returns branches in order, with the prophet history and BOR that travelled with them (`res_*`).

- The prophet trains on every branch.
- The critic counter trains on a tag hit.
- A critic entry is allocated when it missed and the prophet was wrong.
- A wrong final prediction empties the queue, repairs both histories and restarts the source after the branch.

**Priority** in one cycle: misprediction, then override, then accepting a new branch.

The test shows why the critic helps. A branch whose outcome is the XOR of the two previous branches cannot be learnt by a perceptron, which sums its inputs linearly. In the test the prophet gets it right about half the time; the final prediction gets it right in more than 99% of cases once trained. The sweep bench repeats this for 1 to 8 future bits. On this stream, settings of 1 to 4 and 8 bits get the xor branch right in 96–100% of cases. The 6-bit setting reaches only about 83%, because the 14-bit BOR is folded into a 12-bit index. The stream is synthetic, so these numbers do not predict behaviour on real programs.

## Top level (`aca_top`)

The renaming hardware and the predictors are separate designs. They sit side by side and share only the clock and the synchronous active-low reset.

| Prefix | Part |
|---|---|
| `pl_*` | the pipeline |
| `rn_*` | a 2-way rename stage |
| `gs_*` | gshare |
| `pc_*` | a stand-alone perceptron |
| `pcr_*` | the prophet/critic hybrid |
| `pm_*` | the pattern-matching predictor |

All defaults are the full sizes.

## Simulating

Every testbench is self-checking and ends with a line `TB_RESULT checks=N failures=M`. Each also has a watchdog. For example:

    verilator --binary --assert rtl/rename_pkg.sv rtl/rv_pkg.sv \
        $(ls rtl/*.sv | grep -v _pkg) tb/rv_prog_pkg.sv tb/tb_aca_top.sv \
        --top-module tb_aca_top -o sim
    ./obj_dir/sim

The packages come first. For a single block, list the packages it imports, the block, the modules it instantiates and `tb/tb_<block>.sv`. Verilator prints a handful of width and unused-signal warnings; `-Wno-fatal` keeps them from stopping the build.

| Testbench | What it checks |
|---|---|
| `tb_free_tag_buffer` | FIFO order, multi-tag dequeue/enqueue, full and empty |
| `tb_reg_map_table` | all ports against an array model, write priority, conditional clear |
| `tb_rename_unit` | the textbook four-instruction example at widths 1, 2 and 3, the valid-bit case `sub p9, x1, p2`, then random groups against a sequential model (bypasses, stalls, clears) |
| `tb_gshare_predictor` | index, counters and history against a model, saturation, warm loop |
| `tb_perceptron_predictor` | y and training against a model, θ rule, weight saturation |
| `tb_prophet_critic` | sequence numbers, restart points, in-order resolve, carried histories, that critique waits for the future branches, and the XOR branch |
| `tb_prophet_critic_sweep` | the same checks through `prophet_critic_harness` for 1, 2, 3, 4, 6 and 8 future bits, with a table of mispredictions, overrides and xor-branch accuracy per setting |
| `tb_pattern_match_predictor` | lengths, vote counts and prediction against a brute-force string search; random and periodic streams (periodic ones must never miss), ties, no-match |
| `tb_rv_pipeline6` | a 545-instruction program against an instruction-set model: retire order and values, final registers and memory, exact cycle count, every hazard path |
| `tb_aca_top` | all six parts at full size in parallel; each mechanism (stalls, bypasses, forwarding, redirects, overrides, a full queue, both training rules) must occur |

The shared package `tb/rv_prog_pkg.sv` holds a tiny assembler and the reference model of the instruction set.

## Where this design makes its own choices

The lecture material behind this design gives the structures, sizes and rules named above. The following are choices of this design:

- **Renaming:**
  - a stall when tags run short;
  - `x0` takes no tag;
  - the reset mapping;
  - the conditional clear.
- **Pipeline:**
  - tag release at WB;
  - no branch prediction in the pipeline;
  - the instruction subset;
  - the memory sizes.
- **gshare:** the table size, the history length and the reset value.
- **Perceptron:** the table size (256 rows, 7.25 KB), the index bits and saturation.
- **Prophet/critic:**
  - the critic's history length;
  - its index and tag functions;
  - its allocation policy;
  - the sequence-number restart interface;
  - in-order resolve.

- **Pattern matching:**
  - the history length;
  - the selected-length rule;
  - the tie and no-match cases.

The future bits are counted from the critiqued branch itself: its own prophet prediction plus the predictions of the next three branches. Another reading is also possible, in which the branch's own prediction is the last history bit and four younger predictions follow it. Changing to that reading would mean changing the BOR concatenation and the critique condition.
