# Aging-aware reliable multiplier with adaptive hold logic

Transistors slow down as they age (NBTI/PBTI shift their threshold voltage), so a
multiplier clocked for its worst-case path on day one starts failing later, or must carry a
large guard band from the start. This design avoids both problems with three ideas:

1. **Bypassing array multipliers.** In a column-bypassing array, every cell of column *i*
   is idle when multiplicand bit `a[i]` is 0. In a row-bypassing array, every cell of row *j*
   is idle when multiplicator bit `b[j]` is 0. Operands with many zeros therefore have short
   critical paths, and the path length can be predicted from the zero count of one operand.
2. **Variable latency with adaptive hold logic (AHL).** The clock period is shorter than
   the worst case. As each pattern is loaded, the AHL counts the zeros of the watched operand.
   If there are enough, the pattern gets one cycle; otherwise the AHL freezes the input
   register for one extra cycle, so the pattern gets two.
3. **Razor error detection with aging feedback.** The result is captured by Razor
   registers. Each has a main flip-flop and a shadow latch that samples a little later. A
   mismatch means the path was too slow: the operation is repaired from the shadow latch at
   the cost of one extra cycle. An aging indicator counts these errors per window of
   operations. When a window has too many, the AHL switches to a stricter judging block that
   needs one more zero before it allows a single cycle. Fewer patterns then run in one cycle,
   and the error rate falls again.

The main configuration is 64 x 64 bits with a carry look-ahead adder (CLA) as the final
adder. It is built in two variants, column-bypassing and row-bypassing, which differ only in
the array and in which operand the AHL watches.

## Structure

```
            md, mr (N bits each)          clk_del domain
               |        \
               |         +--> AHL: judging block (zeros > n)   --+
               |               judging block (zeros > n+1) --+  |
               |               aging indicator ----------> mux --+--> one_cycle
               v                                                      |
        pipo_reg (input register) <-- en (D flip-flop: one_cycle | !load)
               |
     cbm_multiplier / rbm_multiplier   (array of bypassing cells + cla_adder)
               |  prod (2N bits)
        razor_ff: main flip-flops (clk) + shadow latches (clk_del) -> error
               |
        result register, res_valid                -> controller: re-execute on error,
                                                     error and done strobes to AHL
```

| File | Contents |
|---|---|
| `rtl/ahl_multiplier_top.sv` | both 64-bit reliable multipliers side by side, plus the 8-bit variable-latency adder example |
| `rtl/reliable_multiplier.sv` | one complete multiplier: input register, array, AHL, Razor register, controller |
| `rtl/cbm_multiplier.sv`, `rtl/fa_bypass_col.sv` | column-bypassing array and its cell |
| `rtl/rbm_multiplier.sv`, `rtl/fa_bypass_row.sv` | row-bypassing array and its cell |
| `rtl/full_adder.sv` | one-bit adder cell |
| `rtl/cla_adder.sv`, `rtl/cla_tree.sv`, `rtl/cla4.sv`, `rtl/cla_logic4.sv` | hierarchical carry look-ahead adder |
| `rtl/razor_ff.sv` | Razor register |
| `rtl/ahl.sv`, `rtl/judging_block.sv`, `rtl/aging_indicator.sv` | adaptive hold logic |
| `rtl/pipo_reg.sv` | operand register |
| `rtl/vl_rca.sv` | variable-latency ripple-carry adder with hold logic (the textbook example of the idea) |
| `rtl/mult_pkg.sv` | `bypass_e` (column/row) and the default width |

## The bypassing arrays

Both arrays are carry-save arrays with N-1 rows of N cells. Cell (j, i) has binary weight
i+j. It adds the partial product `a[i]&b[j]`, the sum of cell (j-1, i+1) and the carry of
cell (j-1, i). Its sum goes down-right and its carry goes straight down. A cell therefore
shares its multiplicand bit with the whole column above and below it. Product bit j is the
rightmost sum of row j. The last row's sums and carries are merged into the upper N product
bits by the CLA.

**Column bypassing** (`fa_bypass_col`). When `a[i]` = 0 the cell's adder inputs are
forced to 0, and a multiplexer passes the incoming sum straight through. The carry out is
0. This is exact: every carry entering a bypassed column comes from a bypassed cell above
it, so it is 0 too.

**Row bypassing** (`fa_bypass_row`). When `b[j]` = 0 the row is idle, and two multiplexers
hand the previous row's state down unchanged. The previous row's carries weigh twice as much
as its sums, so a bypassed row passes each cell the carry of its **left** neighbour in the
row above (`cin_byp`); this keeps every bit at its weight. One carry per bypassed row has no
place to go: the rightmost one, of weight j, which an active row would have added into
product bit j. These carries are collected in a word (`orphan`) and added to the low half of
the product by a small correction adder on the right side of the array. That adder's carry
out becomes the carry in of the final CLA. This correction is this design's own. The plain
reading of the row-bypassing scheme, which passes a constant 0 as the carry, is exact only
for the first row.

In the RTL the transmission/tri-state gates that isolate a bypassed adder are AND gates.
The function is the same and the adder still does not toggle. The arrays are combinational.
Their delay is data-dependent only in silicon, not in simulation.

## Final adder: carry look-ahead

`cla4` builds bit generate `g = a&b` and propagate `p = a|b` (the OR form) and gets its
carries from `cla_logic4`, which uses the two-level expansions
`c1 = g0 + p0c0`, `c2 = g1 + p1g0 + p1p0c0`, and so on. Each sum bit is `a^b^c`. Each block
also hands its group generate/propagate
`GG = g3 + p3g2 + p3p2g1 + p3p2p1g0` and `PG = p3p2p1p0` up one level. `cla_tree` combines
groups four at a time, level by level. At 64 bits that is sixteen `cla4` blocks, four
look-ahead units over them and one unit on top. Widths that are not a power of four (for
example 32) are padded with groups that have generate 0 and propagate 1.

## Adaptive hold logic and variable latency

`judging_block` outputs 1 when the watched operand has more than `TH` zeros. The AHL has two
of them, with `TH = N_ZERO` and `TH = N_ZERO+1`. The aging indicator's output selects
between them: the first while the circuit is young, the second once it has been flagged as
aged. The selected output, `one_cycle`, goes into a D flip-flop that holds the input
register's enable (`en`, the inverse of the gating signal):

```
en_next = one_cycle | !load
```

Loading a pattern that needs two cycles sets `en` to 0 for exactly one cycle. The input
register then holds its operands for a second cycle, and `en` returns to 1 on the next edge.
The AHL judges the operand at the **input** of the input register, so the decision is taken
on the same edge that loads the pattern. The original circuit gates the register's clock
with an AND gate. This RTL uses a clock enable instead, and keeps `en` at 1 while nothing is
being loaded.

`aging_indicator` counts Razor errors over `WINDOW` completed operations. At the end of each
window both counters clear. If the window had more than `THRESH` errors, `aging` goes to 1.
It then stays at 1 until reset, because ageing does not reverse.

## Razor register and the two clocks

`razor_ff` has a main flip-flop per bit on the rising edge of `clk`. It also has a shadow
latch per bit that is transparent while `clk_del` is low and closes when `clk_del` rises.
`clk_del` is `clk` delayed by less than half a period. `error` is the OR over all bits of
main XOR shadow. Asserting `restore` reloads the main flip-flops from the shadow latches on
the next `clk` edge. The shadow element is deliberately a latch, so synthesis reports 2N
latch bits per multiplier.

A Razor register only works if the next operands do not reach it before the shadow latch
closes (its hold condition). RTL has zero delay, so in `reliable_multiplier` the input
register, the AHL, the controller and the result register are all clocked by `clk_del`. The
operands change on the same edge that closes the shadow latches, and non-blocking
assignment guarantees the latch keeps the old product. The main flip-flops sample the
product a delay earlier, on `clk`. Seen from the operands, the main flip-flops get a cycle
shortened by that delay and the shadow latches get the full cycle, which is the Razor
arrangement.

### Cycle by cycle (edges of `clk_del`, E0 = load edge)

| pattern | E1 | E2 | E3 | E4 |
|---|---|---|---|---|
| one cycle, no error | final capture checked, `done` | `res_valid` = 1 | | |
| two cycles, no error | (`en` = 0, first sample ignored) | final capture checked, `done` | `res_valid` = 1 | |
| one cycle, Razor error | error: `razor_err`, input held | main reloaded from shadow (on `clk`), `done` | `res_valid` = 1 | |
| two cycles, Razor error | (`en` = 0) | error | `done` | `res_valid` = 1 |

One-cycle patterns can be accepted back to back: a new pattern loads on the same edge on
which the previous one is done. `in_ready` is 0 during the first cycle of a two-cycle
pattern and during the cycle in which an error is found. Only the final capture of an
operation is checked, because the early sample of a two-cycle pattern is expected to be
wrong.

## Interface of `reliable_multiplier`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `clk_del` | in | 1 | main clock and its delayed copy (delay < half a period) |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `in_valid`, `in_ready` | in/out | 1 | operand handshake, sampled on `clk_del` |
| `md`, `mr` | in | N | multiplicand, multiplicator (unsigned) |
| `res_valid`, `res` | out | 1, 2N | one-cycle strobe with the product |
| `two_cycle` | out | 1 | the operation in flight was given two cycles |
| `razor_err` | out | 1 | strobe: an error was caught and the operation is being re-executed |
| `aging` | out | 1 | aging indicator |

Parameters: `N` (64), `BYPASS` (`BYPASS_COLUMN` or `BYPASS_ROW`), `N_ZERO` (N/2, the
judging threshold n), `WINDOW` (1024 operations), `THRESH` (32 errors).
`ahl_multiplier_top` instantiates one multiplier of each kind (`col_*`, `row_*` ports)
sharing the clocks and reset, plus `vl_rca` (`rca_*` ports).

## The variable-latency adder example

`vl_rca` is an 8-bit ripple-carry adder with hold logic `hold = (A4^B4)(A5^B5)`, with bits
numbered from 1 (so `a[3]`, `a[4]`). Suppose one cell has unit delay and the cycle is five
cells long. When either of those two bits does not propagate, no carry chain longer than
five cells can form, and the sum settles in one cycle. `hold` = 1 asks for two. Its
testbench checks that property exhaustively.

## Where this design makes its own choices

- `N_ZERO`, `WINDOW` and `THRESH` are free choices. The method fixes only that the second
  judging threshold is one more than the first. In silicon, n would be set from the timing
  of the array at the chosen clock period.
- The handshake, the result register, the reset, the clock enable in place of a gated
  clock, and the choice to run the control logic on `clk_del` are this design's own.
- The row-bypassing carry multiplexer and the right-hand correction adder are this
  design's own (see above).
- Re-execution after a Razor error costs exactly one cycle. The result comes from the
  shadow latches.
- The aging flag is sticky.
- The comparison designs are not included: ripple-carry final adders and the plain array
  multiplier. Neither is a cell that bypasses both rows and columns at once, which is only
  an idea for later work.

## How far it can be trusted

- Both arrays are checked against `*` on every 4-bit operand pair and on 1500 64-bit pairs,
  random and sparse, with long runs of zeros and ones. The CLA is checked at 16, 32 and 64
  bits, including full carry chains.
- The timing behaviour (the latency of every operation, Razor re-execution, the aging
  switch, and the stricter judging block taking over) is checked by a scoreboard
  (`tb/rm_agent.sv`) that models the AHL from the operands alone.
- Zero-delay simulation never produces a real timing error. The testbenches inject them
  instead: for 2 ns around a `clk` edge of a final capture, they force the product to a
  corrupted value. This is what a path slowed by ageing does: the main flip-flop samples the
  wrong value, and the shadow latch, closing 3 ns later, gets the right one. Whether a real
  64-bit array meets the one-cycle/two-cycle split at a given period is a question for
  static timing analysis, not for this RTL.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mult_pkg.sv tb/ahl_multiplier_top_tb.sv \
          --top-module ahl_multiplier_top_tb -Mdir obj -o sim && ./obj/sim
```

Replace the testbench name to run another one (`tb/<block>_tb.sv`). Add
`+verilator+rand+reset+2` to start from random register contents.

- `ahl_multiplier_top_tb` runs the full-size design (N = 64, window 1024) with no parameter
  overridden. It runs about 2000 operations per multiplier, with errors injected in the
  first 1000 cycles. Building it takes a few minutes; running it takes seconds.
- `reliable_multiplier_tb` runs the same checks at N = 16, with a window of 16 operations,
  so that the aging switch happens within a short run.
- `workload_sizes_tb` runs the 16x16 and 32x32 configurations of both variants, with
  default aging settings and occasional injected errors (helpers `tb/rm_bench.sv`,
  `tb/rm_agent.sv`).
- Every other block has its own `tb/<module>_tb.sv`.
