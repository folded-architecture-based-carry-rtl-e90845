# Folded carry-feed-forward carry-skip adder

A carry-skip adder splits an N-bit addition into M-bit blocks. A carry that
enters a block whose bits all propagate is passed straight on, so it does not
have to ripple through every bit. In the classic form the carry still waits
for each block's ripple chain to settle before the skip multiplexer can
decide, and that multiplexer lies on the critical path once per block.

This design, the CFF-CI-CSKA (carry feed-forward, concatenation-incrementation
carry-skip adder), takes the ripple chains off the carry path altogether:

* each block adds its slice with a carry in of **zero**, so all blocks start
  at once (concatenation);
* a small **carry feed-forward** circuit per block computes, from the
  operand bits alone, the carry that block would produce (G) and whether it
  would pass a carry through (P);
* the carry between blocks then travels through **one compound gate per
  block**, `Cout = G | P & Cin`, built as AND-OR-INVERT and OR-AND-INVERT
  gates in turn so that no inverter is needed on the way;
* each block's **incrementation** circuit finally adds the carry that reached
  it to the block's zero-carry sum.

On top of the adder sits a **folded** wrapper: one narrow adder core is used
FOLD times in a row, over FOLD clock cycles, to add a full-width word. With
the defaults (32 bits, 4-bit blocks, FOLD = 8) a single 4-bit stage does the
work of eight.

## Module hierarchy

```
folded_cska            N=32, M=4, FOLD=8   sequential wrapper, shared core
└─ cff_ci_cska         N=W=N/FOLD, M       combinational adder, Q=N/M stages
   └─ cska_stage       M, KIND (AOI/OAI)   one block
      ├─ rca_block     M                   zero-carry ripple block
      │  └─ mirror_fa                      inverting full-adder cell
      ├─ cff_block     M                   carry feed-forward: G and P
      ├─ skip_logic    KIND                AOI or OAI compound gate
      └─ incr_block    M, CIN_INV          adds the stage carry to the sum
cska_pkg                                   skip_kind_e, skip_kind_of()
```

`cff_ci_cska` at its defaults (N = 32, M = 4) is the full-width,
single-cycle adder; `folded_cska` instantiates it at width N/FOLD.

## The carry chain and its alternating polarity

Why `Cout = G | P & Cin` is exact: if every bit of the block propagates, the
zero-carry sum generates nothing (G = 0) and the carry out equals the carry
in. If some bit does not propagate, that bit either generates or kills, so
the carry leaving the block no longer depends on the carry in; it equals G.
G and P depend only on the operands and are ready long before the carry
arrives.

An AOI gate computes `~((x & y) | z)` and an OAI gate `~((x | y) & z)`. The
stages are numbered from 0:

| stage j | gate | x  | y (carry in) | z  | output     |
|---------|------|----|--------------|----|------------|
| even    | AOI  | P  | C (true)     | G  | ~Cout      |
| odd     | OAI  | ~P | ~C           | ~G | Cout (true)|

So the carry wire between stages is complemented after every even stage.
Consequences a user of the RTL must keep in mind:

* `cska_stage` with `KIND = SKIP_OAI` expects a **complemented** `c_in`
  and returns a true `c_out`; with `SKIP_AOI` it is the other way round.
* The incrementer of an odd stage receives the complemented carry;
  `incr_block`'s `CIN_INV` parameter undoes this inside the block.
* `cff_ci_cska` inverts the last carry once when the stage count Q is odd,
  so its `cout` is always true polarity.
* The inverters that form ~P and ~G for the OAI stages act on signals that
  are ready early; they are not on the carry path.

The critical path of `cff_ci_cska` is: operands → feed-forward logic of
stage 0 → Q compound gates → incrementer of the last stage (M - 1 AND gates
and an XOR). At the defaults that is 8 compound gates instead of 32 ripple
cells.

## Inside a block

**rca_block.** Because its carry in is always zero, bit 0 is a half adder.
Because the block's carry out comes from the feed-forward circuit, bit M-1
computes only its sum. The middle bits use *mirror* full adders, which
naturally output the complement of carry and sum. The full-adder function is
self-dual (inverting all three inputs inverts both outputs), so the cells
alternate: a cell whose carry arrives true gets true operands and passes on
~carry; the next gets inverted operands and the inverted carry and passes on
the true carry. The inverters sit on the operand and sum wires, never on the
carry wire.

**cff_block.** Per bit, `p_i = a_i ^ b_i` and `g_i = a_i & b_i`.
`G = OR over i of (g_i & p_{i+1} & ... & p_{M-1})` — for M = 4 that is
`g3 | p3 g2 | p3 p2 g1 | p3 p2 p1 g0`, three AND terms and an OR.
`P`, the AND of all `p_i`, is built as a tree of 2-input NAND and NOR gates
(NAND on the first level, NOR on the second, and so on) instead of one wide
AND gate, which keeps fan-in low; for M = 4 the tree is exactly
`NOR(NAND(p0,p1), NAND(p2,p3))`. Widths that are not a power of two pad the
tree with constant 1s.

**incr_block.** A half-adder chain: `t_0 = carry`,
`s_out_i = s_in_i ^ t_i`, `t_{i+1} = s_in_i & t_i`. It has no carry out;
`(A + B) mod 2^M + Cin` and the true sum agree modulo 2^M, and the block's
carry is produced by the compound gate.

## Folding (`folded_cska`)

Parameters: `N` (word width, 32), `M` (block width, 4), `FOLD` (passes per
addition, 8). The core is `cff_ci_cska` of width `W = N / FOLD`; N must be a
multiple of FOLD and W a multiple of M.

| port   | dir | width | meaning |
|--------|-----|-------|---------|
| clk    | in  | 1 | clock, rising edge |
| rst_n  | in  | 1 | asynchronous reset, active low; clears all registers |
| start  | in  | 1 | sampled while `busy` is low: capture `a`, `b`, `cin` and begin |
| a, b   | in  | N | addends |
| cin    | in  | 1 | carry in |
| busy   | out | 1 | an addition is in progress; `start` is ignored |
| done   | out | 1 | one-cycle pulse: `sum` and `cout` are valid |
| sum    | out | N | `(a + b + cin) mod 2^N`, held until the next start |
| cout   | out | 1 | carry out of bit N-1 |

Timing, counting rising edges with the start edge as edge 0: on edge k
(k = 1..FOLD) the core result for slice k-1, taken from bits
`(k-1)*W +: W` of the captured operands, is written into `sum`, and the slice
carry is stored for the next pass. `done` is high after edge FOLD, in the
same cycle `busy` falls, and a `start` presented in that cycle is accepted,
so additions can follow each other every FOLD cycles. `FOLD = 1` gives a
fully parallel adder with one register stage and a latency of one cycle.

The operand registers stay still and a multiplexer picks the slice; the sum
is written slice by slice. Two assertions check that `done` lasts one cycle
and that the pass counter stays below FOLD.

## Departures from the source and choices made here

* The source describes folding only as an idea (sharing one unit over time
  stages) plus a latency of eight passes; the slice order (least significant
  first), the registers, the start/busy/done handshake and the reset are this
  design's own.
* The exact gate lists for the feed-forward block are given inconsistently in
  the source; the logic function above is built for any M.
* Which pins of the AOI/OAI gates take P, C and G is not spelled out; the
  assignment in the table above is the one that yields the carry function
  with no inverter on the carry path.
* The first stage is built like all others (zero-carry block plus
  incrementer), rather than as a plain ripple block with a carry in.
* Only the fixed-stage-size form is built (all blocks M bits). The
  variable-stage-size form, the conventional multiplexer-skip adder and other
  adders appear in the source only as comparisons.
* Not built: the variable-latency extension, which replaces the middle stage
  with a parallel-prefix adder and uses a predictor to give a second clock
  cycle when a long carry path is active. The source names it without saying
  what the predictor tests or how large the middle stage is.
* Transistor-level matters (mirror adder sizing, the transmission-gate
  multiplexer and its output buffer of the conventional skip block,
  near-threshold supply operation) have no RTL counterpart. Delay, power and
  voltage figures reported in the source for 16, 32 and 64 bits are
  properties of a circuit implementation and are not reproduced by this RTL.

## Sizes

The 32-bit default matches the main configuration (eight 4-bit blocks).
A 16-bit addition fits the default with zero-extended operands. A 64-bit
addition needs `N = 64`: either `cff_ci_cska #(.N(64))` (sixteen stages)
or `folded_cska #(.N(64))` (eight 8-bit passes); both are simulated.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it covers |
|-----------|----------------|
| tb_mirror_fa | all 8 inputs; self-duality of the cell |
| tb_rca_block | exhaustive for M = 2, 3, 4, 5, 6 |
| tb_cff_block | exhaustive G and P for M = 3, 4, 5, 8 |
| tb_skip_logic | both gates as carry logic and as truth tables |
| tb_incr_block | exhaustive, M = 4 and 7, true and complemented carry |
| tb_cska_stage | exhaustive 4-bit stage, AOI and OAI polarity |
| tb_cff_ci_cska | 16, 32, 64 and 12-bit (odd stage count) adders; random, all-propagate and broken-chain operands |
| tb_folded_cska | default 32-bit folded adder end to end: latency of exactly 8 cycles, carries between passes, whole-word skips, start ignored while busy, back-to-back start on done, reset mid-addition |
| tb_folded_variants | FOLD = 1, 2, 4 at 32 bits and a 64-bit adder in 8 passes |

Reference values come from the simulator's own wide addition. The tests
count how often each mechanism occurs (skips, generates, carries between
passes and so on) and fail if one never does.

## Simulating

The package must be read first. For example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_folded_cska rtl/cska_pkg.sv tb/tb_folded_cska.sv
./obj_dir/Vtb_folded_cska
```

Replace the top module and file for any other testbench. Lint a module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/cska_pkg.sv rtl/<module>.sv`.
The only lint note expected is the reset-use remark on `folded_cska`,
explained at the top of that file.
