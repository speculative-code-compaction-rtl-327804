# Speculative code compaction front end

Hot loops in ordinary programs often compute the same values over and over: a load returns the
same constant every iteration, a compare always comes out the same way, an add turns one
constant into another. A value predictor and a branch predictor already know this. This design
uses that knowledge to rewrite the decoded micro-ops sitting in the micro-op cache. It
substitutes predicted values, folds away every micro-op whose inputs are then known, and
stores the shorter sequence next to the original. At fetch time it streams whichever version
is expected to pay off. If a prediction turns out wrong, the processor squashes the stream and
falls back to the original micro-ops. All of this happens in the front end. The additions are
a small integer ALU, a register context table, a write buffer, a second micro-op cache
partition and some selection logic.

The RTL is SystemVerilog (IEEE 1800-2017). The main configuration is modelled on a 6-wide,
Icelake-like x86 core. It has a 2304-micro-op, 8-way micro-op cache split into 36
unoptimized and 12 optimized sets, with 6 micro-ops per line.

## Regions, slots and the micro-op format

Everything is organised around 32-byte code regions. A region's decoded micro-ops fill at
most three lines (ways) of one set: 6 + 6 + 6 = 18 micro-ops. A micro-op is named by
`upc_t = {region, slot}`, where `region` is virtual address bits 47..5 and `slot` is 0..17.

The micro-op format is this design's own (`rtl/scc_pkg.sv`, `uop_t`). It is RISC-like:

| field | meaning |
|---|---|
| `op` | `MOV ADD SUB AND OR XOR SHL SHR SAR CMP BR JCC JMP LOAD STORE MUL DIV FP NOP LIVEOUT` |
| `cond` | branch condition `EQ NE LT GE LTU GEU` (`BR` compares two registers, `JCC` tests flags) |
| `dst src1 src2` | 5-bit register numbers: 16 architectural + 16 microcode temporaries |
| `s1_imm s2_imm imm` | one 64-bit immediate, which can replace either source |
| `tgt` | direct branch target as `{region, slot}` |
| `som` | first micro-op of its x86 instruction |
| `eor` | last micro-op of its region |

`CMP` writes the condition codes `{N,Z,C,V}`. The register context table keeps them as
entry 32.

Compacted micro-ops (`cuop_t`) add the following fields:

- `pc`: position in the original stream.
- `pred_src`: marks a prediction source.
- `inv_idx`: which confidence counter it validates (0..3 data, 4..5 control).
- `pv` / `pred_taken`: the predicted value or direction, for the back end to check.
- Up to `LO_SLOTS` = 4 inlined live-outs `{register, value}`.

## The compaction pass (`scc_unit`)

A line whose hotness counter reaches `HOT_THRESH` (8) raises a request for its region. The
request goes into a 6-entry queue (`scc_req_queue`). When the unit is idle it takes the head
and runs one pass:

1. It locks the region's lines in the unoptimized partition, so they cannot be evicted, and
   clears the context table.
2. It reads one micro-op per cycle, in program order, starting at slot 0. The first matching
   rule below decides what happens to the micro-op:

| condition | action | result |
|---|---|---|
| all sources known (context table or immediate), simple ALU op | evaluate in `scc_alu` | **eliminated**; result written to the table as *pending* |
| no source known (or load/mul/div) and the value predictor is confident | keep as **data prediction source**; record the invariant (max 4) | result written to the table as known, not pending |
| branch with all operands known | **branch folded**, eliminated | processing *pivots* to the outcome |
| unfoldable branch, branch predictor confident | keep as **control prediction source** (max 2) | processing follows the prediction |
| otherwise | keep; one known register source moves into the immediate (**constant propagation**) | destination becomes unknown |

3. Every prediction source carries the table's pending values as live-outs, except its own
   destination, and those values stop being pending. The reason: if the prediction is wrong,
   the pipeline restarts from the original code and needs the register state the eliminated
   micro-ops would have produced. Live-outs still pending when the pass ends go on an extra
   `LIVEOUT` carrier micro-op, which closes the stream.

   With `CONST_W` below 64, every constant the pass would create must be representable as a
   `CONST_W`-bit signed value. This applies to a folded result, a propagated operand and a
   predicted value. A constant that does not fit leaves its micro-op as it was.

4. The pass **stops** at any of these points:
   - after the region's last micro-op (continue at the next region);
   - on a micro-op cache miss, including a pivot to a non-resident target;
   - before a third branch;
   - after an unpredictable branch;
   - when the write buffer has one free entry left.

5. The pass **aborts** (nothing is kept) on any of these:
   - a branch whose target lies inside its own x86 instruction (a self-looping string
     instruction);
   - a store whose known address falls inside the region being compacted (self-modifying
     code);
   - a need for more than 4 live-outs on one micro-op.

6. The pass then computes the shrinkage: micro-ops read minus micro-ops kept. If the shrinkage
   is at least `COMPACT_MIN` (2), the 18-entry write buffer (`scc_write_buffer`) is written
   into the optimized partition together with the invariants and the continuation point.
   Otherwise it is discarded. Either way the lock is released.

Timing: a pass over *n* micro-ops takes *n* + 2 cycles from `start` to `done`/`commit`. The
request reaches the unit one cycle after it enters an empty queue.

### Example

The end-to-end test uses a 14-micro-op region that compacts to 6 micro-ops:

```
slot  original                     compacted
 0    r1 <- load [r2]   (VP: 10)   load r1          pred. source, invariant 0
 1    r3 <- r1 + 2                 -                folded, r3 = 12 pending
 2    r4 <- r3 + r5                r4 <- 12 + r5    propagated
 3    r6 <- 7                      -                folded
 4    flags <- cmp r6, 7           -                folded
 5    jcc eq -> 8                  -                branch folded, pivot to 8
 8    r7 <- load [r2+8] (VP: 5)    load r7          pred. source, live-outs r3=12, r6=7, flags
 9    br ne r7, r9 -> 11 (BP: T)   br               control invariant, pivot to 11
11    r8 <- r7 + 1                 -                folded, r8 = 6 pending
12    store [r1] <- r8             store            kept
13    nop (end of region)          liveout r8=6     carrier
```

## The two partitions

**Unoptimized partition (`uop_cache_unopt`).** This is the ordinary micro-op cache, filled
line by line by the legacy decoder. Each line's tag entry also holds:

- a **lock bit**, set for the lines of the region being compacted;
- a **hotness counter**. Every fetch access to the line increments it, and every 28 cycles all
  counters are decremented.

Replacement takes an invalid way first, otherwise the unlocked way with the lowest hotness.

**Optimized partition (`uop_cache_opt`).** Each entry is one compacted stream of a region.
Several versions of one region can live in the same set, made under different predictions.
Each entry holds:

- six 4-bit saturating confidence counters, one per invariant, starting at 8. The back end
  increments one when its prediction source commits and decrements it when it is squashed
  (`upd_*` port);
- the shrinkage;
- the position and predicted value of each data invariant;
- the continuation point;
- a hotness counter that rises on lookups and streaming cycles and falls every 3 cycles.

Both partitions are indexed with the same region address. The set is the region modulo the
set count, and the full region address is kept as the tag.

## Choosing what to fetch (`scc_line_select`, `scc_thresh_tune`, `scc_fetch_fsm`)

For each region the front end asks for, the fetch state machine goes through these states:

- **LOOKUP**: look up both partitions. The line selection logic keeps the optimized versions
  that pass all three filters:
  - every control-invariant counter is ≥ the current misprediction threshold (see below);
  - the shrinkage is ≥ 2;
  - the hotness is ≥ 2.

  Among those it picks the highest score, which is the sum of the confidence counters in use
  plus the shrinkage.
- **VPCHECK**: compare every data invariant of the chosen version with the value
  predictor's current prediction, using four probe ports in one cycle. The optimized version
  is streamed only if all of them still agree. This guards against versions built from
  predictor state that has since changed.
- **OPT**: stream the compacted micro-ops, 6 per cycle. Each group is tagged with the entry's
  set/way so that validations can find their counter.
- **UNOPT**: stream the original lines, one per cycle.
- **DECODE**: on a miss, hand the region to the legacy decoder.

**Misprediction threshold (`scc_thresh_tune`).** The threshold is not a constant. It follows
the trend of mispredictions. The tuner counts the wrong prediction sources reported by the
back end over an epoch of 1024 cycles. At the end of the epoch it compares the count with the
previous epoch's count:

- more mispredictions raise the threshold by one, so only well-proven versions are streamed;
- fewer mispredictions lower it by one;
- an equal count leaves it unchanged.

The threshold starts at 4 and stays within 1..15. A new value takes effect in the cycle after
the epoch ends.

A fetch from the optimized partition takes 1 + ⌈*n*/6⌉ + 1 cycles after the request. A fetch
from the unoptimized partition takes 1 + number of lines.

**Recovery rule.** Suppose a squash is caused by a prediction source that came from the
optimized partition, and the cause is one SCC relies on (`sq_scc_related`, as opposed to, for
example, memory disambiguation). Then the next fetch of that region uses the unoptimized
partition, whatever the selection logic says. Together with the falling confidence counters and
the failing value-predictor check, this phases a stale version out. If the region stays hot,
its unoptimized lines heat up again and it is compacted anew under the new predictions.

## Top level (`scc_frontend`)

`scc_frontend` wires the blocks together:

```
 decoder fill --> uop_cache_unopt --hot--> scc_req_queue --> scc_unit --commit--> uop_cache_opt
                       ^   |                                   |  ^                  |
              fetch    |   +---- slot reads, lock -------------+  |                  |
 fetch req --> scc_fetch_fsm <---------- scc_line_select <--------|------------------+
                       |                                          |
                       +--> delivered micro-ops            VP / BP probes (ports)
```

`scc_thresh_tune` sits beside the line selection. It takes the back end's misprediction
reports (`upd_valid` with `upd_correct` low) and supplies the selection's confidence threshold.

Parameters: `U_SETS` (36), `O_SETS` (12), `WAYS` (8), `RQ_DEPTH` (6) and `CONST_W` (64).
Parts that belong to the surrounding processor appear as ports:

- the value predictor: one probe for compaction, four for the fetch check;
- the branch predictor: one probe;
- the legacy decoder: request, done and line fill;
- the back end: confidence updates and squash information;
- the statistics pulses `scc_ev` and `ev_*`, plus the current threshold `conf_thresh`.

Predictor probes must answer within the same cycle. `CONST_W` restricts every constant the
unit creates (a fold result, a propagated immediate, or a predicted value used as an
invariant) to a `CONST_W`-bit signed value. Use 8 or 16 to model rename-time inlining with
narrow constants.

## Where this departs from, or fills in, the published scheme

The following are this design's own choices:

- The micro-op encoding, the register count (32 + flags) and the 64-bit width.
- The thresholds: compaction request at hotness 8, `COMPACT_MIN` = 2, optimized hotness
  threshold 2, initial confidence 8, initial optimized hotness 4, hotness width 4 bits.
- The tuning rule for the misprediction threshold. The scheme only says that the threshold
  follows whether mispredictions increase or decrease. The epoch-to-epoch comparison, the step
  of one, the 1024-cycle epoch, the limits and the initial value 4 are choices made here. All
  mispredicted invariants count, data and control alike.
- Live-outs are limited to 4 per micro-op (more aborts the pass). They are delivered on a
  carrier micro-op at the end of the stream.
- Only values produced by eliminated micro-ops are inlined as live-outs. Values produced by
  kept micro-ops come from the pipeline anyway.
- A compacted stream occupies one optimized entry of up to 18 micro-ops, rather than a chain of
  6-micro-op ways.
- Set index = region mod sets, because 36 and 12 sets are not powers of two.
- The fetch state machine handles one region per request, with one cycle of lookup and one of
  value-predictor check. It accepts a new request in the cycle after `done`.
- Unpredictable branches end a pass.
- Invariants come from the value and branch predictors only. Hints from a loop stream detector
  are not used.

The value predictor (H3VP/EVES), the LTAGE branch predictor, the x86 decoder, the rename-stage
constant inlining and the back end are not part of this RTL.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_scc_alu` | all operations and branch conditions against a reference; compare+JCC equals BR |
| `tb_scc_regctx` | random writes/clears against a model |
| `tb_scc_req_queue` | order, 6-entry capacity, drop on full, duplicate suppression, latency |
| `tb_scc_write_buffer` | contents, full, overflow, clear |
| `tb_scc_unit` | six hand-worked passes: every transformation, live-outs, pivots, all stop and abort rules, pass length *n* + 2 |
| `tb_uop_cache_unopt` | fill/read, slot reads, request on the 8th access, decay, lock-aware replacement, fill drop |
| `tb_uop_cache_opt` | co-hosted versions, read-out, counter saturation, hotness decay/rise, replacement |
| `tb_scc_line_select` | 5000 random sets against a reference scorer, with fixed and random thresholds |
| `tb_scc_thresh_tune` | 300 epochs of rising, falling and repeated misprediction rates against a reference model; both limits reached |
| `tb_scc_fetch_fsm` | source choice and delivery cycle for every path, recovery rule |
| `tb_scc_unit_constw` | one region compacted with 8-, 16- and 64-bit constants: what each width folds, propagates and inlines |
| `tb_scc_frontend` | end to end at default size (below) |
| `tb_scc_frontend_split` | the same scenario with the partitions split 12 unoptimized / 36 optimized (change `US`/`OS` for 24/24) |

`tb_scc_frontend` runs the whole front end at its default parameters. The testbench acts as
the decoder, both predictors and the back end. It walks a program of three regions:

- a hot kernel (the example above);
- a region that stores into itself (aborted);
- a region with nothing to remove (discarded).

It then changes a loaded value partway through. It checks that:

- the kernel goes from 14 delivered micro-ops to 6;
- the stale version mispredicts, is squashed and is refetched unoptimized;
- the value-predictor check rejects the stale version;
- a new version is compacted and co-hosted.

It also counts that each of these mechanisms occurs at least once: fold, propagate, data and
control invariant, branch fold, pivot, live-out, abort, discard, lock, decode, confidence
increment and decrement. A final idle phase checks that the misprediction threshold rises after
the epoch that held the misprediction, then falls back after a quiet epoch.

To simulate with plain Verilator (any testbench, shown for the top):

```
verilator --binary --timing --assert -Irtl -Itb rtl/scc_pkg.sv tb/tb_scc_frontend.sv \
          --top-module tb_scc_frontend
./obj_dir/Vtb_scc_frontend
```

Verilator finds the other modules through `-Irtl` (one module per file, named after the
module). The end-to-end test runs in a few seconds.
