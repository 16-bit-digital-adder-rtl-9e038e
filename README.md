# CPL carry-select adders and radix-4 tree comparators

This is register-transfer-level SystemVerilog for two small arithmetic circuits. Both were first
designed as full-custom transistor circuits for low power:

* a **64-bit magnitude comparator** that decides A > B or A = B with a three-tier radix-4 tree.
  It comes in three circuit styles: static, full dynamic and partially dynamic;
* a **16-bit carry-select adder** built from 4-bit complementary pass-transistor logic (CPL)
  blocks. Each block works out its result for both carry-in values internally, so the carry
  passes only one multiplexer per block.

The RTL gives the logic of these circuits: the same sub-blocks, the same tree and chain
structure, the same signal polarities and, for the dynamic comparators, the same precharge
values. It does not give their transistor-level timing. The two circuits are independent.
`cpl_adder_cmp64_top` places them side by side, each with its own ports.

## The comparator

### Principle

Two words are compared from the most significant bit down. The first bit position where A and
B differ decides the result, and all lower bits are ignored. If no position differs, the words
are equal. The comparator has only two outputs:

| output | meaning |
|---|---|
| `ag` | A > B |
| `eq` | A = B |

"B greater" is `~ag & ~eq` and is left to the user.

### XE cell

One XE cell per bit produces two rails: `x = a ^ b` (the bits differ) and `e = ~(a ^ b)` (the
bits agree).

* `xe_static` is the 12-transistor CPL version.
* `xe_dynamic` is the 5-transistor clocked version. While its clock is high, both rails are
  pre-discharged to 0. While the clock is low, it evaluates.

In the static comparator the 64 XE cells are about 768 of the 1244 transistors. The original
design counts them as a resource that an adder or multiplier could share. No sharing logic is
specified, so none is built here.

### Level-1 block: four bits, three chains (`cmp_l1_static`, `cmp_l1_chains`)

This is the core idea of the comparator. A Level-1 block compares 4 bit pairs without computing
"greater" for each bit. Instead, three pass-transistor chains act on the XE rails:

* **Chain 1** is a series chain gated by `e3, e2, e1, e0`, starting at the MSB. At each position
  `i`, a side transistor gated by `x_i` passes the data bit `b_i` onto node N1. The chain keeps
  conducting only while the bits above are equal. So N1 receives `b` of the first unequal
  position. Since that position is unequal, `b_i = 0` means `a_i = 1`. If every bit is equal,
  N1 is pulled to 1.
* **Chains 2 and 3** drive node N2. N2 is 0 when all `e` are 1, and 1 as soon as any `x` is 1.
* The outputs are the inverted nodes: `mag = ~N1` and `eq = ~N2`.

So `mag` is "A greater" when chain 1 passes B bits (`PASS_B = 1`). It becomes "B greater" when
the chain passes A bits instead (`PASS_B = 0`). When the words are equal, `mag` is 0.

`cmp_l1_chains` writes chain 1 as a priority walk from the MSB:

1. If a position has `x = 1` while the chain is still open, it supplies N1.
2. If a position has `e = 0` without `x = 1`, the chain is cut there. This happens only with
   pre-discharged dynamic XE cells.

### Level-2 block and the polarity flip (`cmp_l2_static`, `cmp_l2_chains`)

A Level-2 block is the same circuit one level up. Its inputs are four `(mag, eq)` pairs from the
tier below, with group 3 the most significant:

* `~eq_in[i]` plays the role of `x`;
* `eq_in[i]` plays the role of `e`;
* `mag_in[i]` is the value that chain 1 passes.

The output is again the inverted node: `mag = ~mag_in[first unequal group]`, or 0 if all groups
are equal. That group is unequal, so an inverted "A greater" means "B greater". **Each Level-2
tier therefore flips the polarity of the magnitude output:**

| tier | blocks | inputs | magnitude output |
|---|---|---|---|
| 1 | 16 × Level-1 | A, B bits (B passed) | AG |
| 2 | 4 × Level-2 | AG, EQ | BG |
| 3 | 1 × Level-2 | BG, EQ | AG |

With three tiers, the final output is `ag`. `eq` has the same polarity at every tier.

### The 64-bit tree (`cmp64_static`)

The tree is radix-4 with 4 × 4 × 4 = 64 bits:

* The slowest decision happens when only the LSB pair differs. It must pass chain positions in
  all three tiers, 12 in total.
* The fastest decision happens when the MSB pair differs. It takes one chain position per tier,
  3 in total.

The transistor design adds buffers on the four tier-2 outputs. They have no logic function and
are not represented.

### Dynamic comparators (`cmp64_dynamic`, `cmp64_partial_dynamic`)

The dynamic versions keep the tree and add clocked precharge devices. Each clock is an
active-high precharge pulse, meant to be short: 20–25 % of a 5 GHz period. A short precharge
phase cuts the short-circuit current and leaves more of the cycle for evaluation.

| clock | drives | while high |
|---|---|---|
| `clk_a` (CLK_a) | 64 dynamic XE cells | `x = e = 0` |
| `clk_b` (CLK_b) | 16 dynamic Level-1 blocks (`cmp_l1_dynamic`) | N1 precharged to 1, N2 pre-discharged to 0: `mag = 0`, `eq = 1` |
| `clk_c` (CLK_c) | 5 dynamic Level-2 blocks (`cmp_l2_dynamic`) | N1 precharged to 1: `mag = 0`. `eq` is not clocked |

Level-2 blocks deliberately have no precharge on the EQ chain. With one, EQ would reach the last
tier ahead of the magnitude signal and the result would be wrong.

The pre-discharged XE rails cut chain 1, so a Level-1 block whose XE cells are precharging also
reads `mag = 0`, `eq = 1`. At the outputs this gives:

* `ag = 0` whenever any clock is high;
* `eq = 1` whenever `clk_a` or `clk_b` is high;
* when all clocks are low, `ag` and `eq` equal the static comparator's outputs.

`cmp64_partial_dynamic` uses static XE cells (`XE_DYNAMIC = 0`) and has no XE clock. This
removes most of the switching power and 64 clock loads, at the cost of more transistors. Its
outputs behave the same way, except that nothing depends on `clk_a`.

Two choices here are this implementation's own:

* **Clock roles.** Which clock drives which tier is an assumption. The text names CLK_a to CLK_c
  for the full design, and CLK_b, CLK_bb and CLK_c for the partial one. CLK_bb is taken to be the
  complement of CLK_b, which drives pMOS precharge devices. It is folded into `clk_b`, because
  every clock input here is an active-high "precharge" signal.
* **Partial design, tier 3.** Tier 3 of the partially dynamic design is dynamic, as in the full
  design, because both designs list the same non-XE transistor count.

**Not modelled: self-pipelining.** The transistor design balances its worst and best path delays
so that successive comparisons can be in flight together. It runs at 5 GHz with about 270 ps
latency, and needs no flip-flops. This is a property of delays, which a zero-delay RTL model
does not have. Here a result is valid in the evaluation phase of the cycle in which its operands
are applied. If you take this RTL to a standard-cell flow, register the operands and results.
Treat the clocks as the precharge enables they are. They are not flip-flop clocks.

## The adder

### CPL cell (`cpl_adder_cell`)

One cell per bit gives three outputs, each with its complement:

* `s0 = a ^ b`, the sum when the carry in is 0. Its complement is the sum when the carry in is 1.
* `c0 = a & b`, the carry out when the carry in is 0.
* `c1 = a | b`, the carry out when the carry in is 1.

The predictions for both carry-in cases therefore come from one cell, without a second adder.

### Internal carry selection (`cpl_cs_block`)

The 4-bit block is split into two 2-bit sections:

1. Each section computes its sums and carry out for both values of its own carry in. Bit 0 takes
   the cell rails directly. Bit 1 chooses between its rails using bit 0's predicted carry.
2. For the case "block carry in = 1", the predicted carry of the low section selects the high
   section's matching results. The other case ("block carry in = 0") works the same way. This
   yields two complete 4-bit results, and carry outs, before the real carry arrives.
3. The real `cin` selects one of the two results. All four sums and `cout` come out of the same
   final multiplexer level.

The widths 2, 3 and 5 that the square-root adder needs are built from the same sections: 1 or 2
sections, or 3 sections where the last has one bit. This generalisation is this
implementation's choice.

### 16-bit adders

* `cpl_csa16_linear` is four 4-bit blocks. The carry crosses four block multiplexers. This is
  the main configuration.
* `cpl_csa16_sqrt` uses blocks of 2, 2, 3, 4 and 5 bits, with five carry ripples. The exact
  split is inferred. In the original circuit it was slower than the linear adder, because its
  small blocks gain little from internal selection.

## Files

Each module is in `rtl/<module>.sv`:

```
cpl_adder_cmp64_top
├── cpl_csa16_linear ── cpl_cs_block (×4) ── cpl_adder_cell
├── cpl_csa16_sqrt   ── cpl_cs_block (2,2,3,4,5 bits)
├── cmp64_static     ── cmp_l1_static (×16) ── xe_static, cmp_l1_chains
│                    └─ cmp_l2_static (×5)  ── cmp_l2_chains
├── cmp64_dynamic    ── cmp_l1_dynamic (×16) ── xe_dynamic | xe_static, cmp_l1_chains
│                    └─ cmp_l2_dynamic (×5)  ── cmp_l2_chains
└── cmp64_partial_dynamic ── cmp64_dynamic #(.XE_DYNAMIC(0))
```

Parameters and their defaults, which are the sizes of the original design:

| parameter | module(s) | default | meaning |
|---|---|---|---|
| `PASS_B` | Level-1 | 1 | 1 = AG, 0 = BG |
| `XE_DYNAMIC` | `cmp_l1_dynamic`, `cmp64_dynamic` | 1 | dynamic XE cells |
| `WIDTH` | `cpl_cs_block` | 4 | block width |
| `N`, `M` | `cpl_csa16_linear` | 16, 4 | adder width, block width |

The comparator tree is fixed at 64 bits.

The logic is combinational throughout. There is no reset and there are no flip-flops.

Two immediate assertions guard invariants during simulation:

* `xe_dynamic` never raises both rails at once;
* in `cpl_cs_block`, the predicted carry for a carry in of 1 is never below the one for a carry
  in of 0.

## Simulation

Each testbench in `tb/` checks its module against values computed directly from the operands:
`a + b + cin`, `a > b` and `a == b`. Each prints `TB_RESULT checks=N failures=M` and stops
itself through a watchdog. To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
          --top-module tb_cmp64_dynamic tb/tb_cmp64_dynamic.sv -o sim
./obj_dir/sim
```

The main testbenches:

* **Exhaustive.** `tb_xe_*`, `tb_cpl_adder_cell`, `tb_cmp_l1_*` (all clock states) and
  `tb_cpl_cs_block` (widths 2–5).
* **Random with targeted cases.** The comparator benches place the first difference at each of
  the 64 bit positions. The adder benches include full carry propagation.
* **`tb_cmp64_dynamic` and `tb_cmp64_partial_dynamic`.** They run a 5 GHz clock with a 20 % or
  25 % precharge pulse and one comparison per cycle. They check the precharge values during the
  pulse and the result at the end of evaluation, and confirm one result per cycle. They then try
  every combination of the three clocks.
* **`tb_cpl_adder_cmp64_top`.** The whole design at default sizes for 4000 cycles. It counts
  each mechanism and fails if one never occurs. The mechanisms are:
  * carry in of 0 and of 1;
  * carry out;
  * a carry entering each block of both adders;
  * full propagation;
  * each comparison outcome;
  * a decision in each of the 16 Level-1 groups;
  * the worst and best comparator paths;
  * each single-clock precharge state.
* **`tb_workloads`.** It replays the characterisation stimuli:
  * 10/20/40 ns square waves on the adder inputs;
  * the XE pulse test at 2 GHz with 50/25/10 % duty;
  * an LSB-only-difference pattern on the comparators;
  * an all-bits-toggling pattern on the comparators.

  The comparator patterns run at 1 GHz (static) and at 5 GHz with 20 % and 25 % duty (dynamic).
  The exact input vectors of the original characterisation are not reproduced. These two
  patterns stand in for them.

## How far to trust it, and where it departs

All three comparator versions compute the same function, and the tests show it matches unsigned
comparison. Both adders match binary addition. The departures:

* **Transistor level.** Electrical features are absent: complementary rails, inverter buffers,
  sizing, the tier-2 buffers, and charge holding on dynamic nodes. Delay, power and transistor
  counts from the original work cannot be measured on this RTL.
* **The dynamic XE equation.** The E rail is read as XNOR gated by the inverted clock, mirroring
  the X rail, so both rails are pre-discharged together. The printed equation, read literally,
  would keep E high through evaluation.
* **Inferred details.** The clock-to-tier assignment, CLK_bb as the complement of CLK_b, and the
  2-2-3-4-5 square-root split are inferred, as described above.
* **Left out.** The reduced-duty-cycle clock source and clock tree are not built. The original
  work supplied those clocks from the simulator. XE resource sharing is not built either, since
  it has no specified interface. The baseline adders used only for comparison are also left out:
  ripple-carry pairs, the BEC-based adder and the regular 4-bit CPL adder.

Verilator lint reports three harmless warnings:

* two CPL cell complement outputs (`c0_n`, `c1_n`) are left open in `cpl_cs_block`;
* `clk_xe` is unused when `cmp_l1_dynamic` has static XE cells.
