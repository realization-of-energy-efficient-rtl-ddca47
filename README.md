# 64-bit carry skip adders with concatenation and incrementation

A carry skip adder splits its operands into stages. Each stage is a short
ripple carry adder. If every bit of a stage propagates, the stage's carry
input is passed ("skipped") straight to the next stage. The classic version
has a weakness: every stage's ripple chain still waits for its carry input,
and a 2:1 multiplexer selects the skipped carry.

This RTL implements two adders that remove that wait:

* **CI-CSKA**: a combinational 64-bit carry skip adder built by
  *concatenation and incrementation*. Every stage except the first adds its
  slice with a carry input of zero, so all stages work at the same time. The
  real carry then crosses each stage through one compound gate (AOI or OAI).
  A chain of half adders adds that carry to the stage's precomputed sum.
* **Hybrid variable latency CI-CSKA**: the same adder with its middle stage
  replaced by a Brent–Kung parallel prefix adder, the *nucleus*. The propagate
  signal of the nucleus tells whether an operation can use the long carry path.
  If it can, the operation gets two clock cycles; if not, it gets one. The clock
  period only has to cover the short paths. The intent is to allow a lower
  supply voltage without lowering the clock frequency.

Both adders are in `cska64_top`, side by side, each with its own ports.

## How a concatenation/incrementation stage works

Take stage *j*, with *M* bits, whose carry input is `C_O,j-1`:

1. **Ripple block (`ci_rca`), carry-in zero.** It computes `Z = A + B` of the
   slice. Its lowest cell is a half adder, because the carry input is zero;
   the rest are full adders. Its carry out is the block *generate* `G_j`. The
   bit propagates `p_i = a_i ^ b_i` are brought out as well.
2. **Block propagate.** `P_j` is the AND of the stage's `p_i`.
3. **Skip logic (`ci_skip_logic`).** `C_O,j = G_j | (P_j & C_O,j-1)`. This
   equals the true carry out of the stage. If `P_j = 1`, the slice with carry-in
   zero cannot produce a carry, so `G_j = 0`. If `P_j = 0`, the carry out does
   not depend on the carry in.
4. **Incrementation block (`ci_incrementer`).** `S = Z + C_O,j-1` through M
   half adders. The last carry is dropped, because the skip logic already
   supplies the stage's carry out.

Stage 1 has no skip logic and no incrementer. It is a ripple block with full
adders only, and it takes the adder's real carry input.

With all stages added in parallel, the critical path is:

* the ripple chain of stage 1,
* then one skip gate per middle stage,
* then the incrementer of the last stage.

### AOI / OAI polarity: the part that needs care

The skip function is built as one inverting compound gate per stage instead
of a multiplexer, so the carry changes polarity at every stage:

| stage | carry in | gate | carry out |
|---|---|---|---|
| 2 | true `C_O,1` | AOI: `~(G \| P & C)` | inverted `C̄_O,2` |
| 3 | inverted `C̄_O,2` | OAI: `~(Ḡ & (~P \| C̄))` | true `C_O,3` |
| 4 | true | AOI | inverted |

In an OAI stage, the ripple block's carry out and the incoming carry are used
inverted. The incrementer always needs the true carry, so an inverted incoming
carry is complemented on its way to the incrementer. The rule used everywhere:
**stage k (counting stage 1 as k = 0) produces an inverted carry when k is
odd**. `ci_cska_stage` has a parameter `INV_IN` that says which case it is in.
If the last stage leaves an inverted carry, the adder complements it, so
`cout` is always true polarity.

## Stage sizes

* `ci_cska` defaults to the fixed-stage-size form: **4 stages of 16 bits**.
* A variable stage size is one parameter away. `STAGE_SIZE` is a 16-entry
  list, ended by the first zero, and its entries must add up to `WIDTH`. An
  example: `'{0: 1, 1: 3, 2: 5, 3: 7, 4: 9, 5: 11, 6: 13, 7: 15, default: 0}`.
  Its testbench checks this configuration.
* Elaboration stops with an error if the sizes do not add up to `WIDTH`.

For the fixed-stage-size form, the stage size with the least delay is about
`sqrt(N·α/2)`. Here `α = T_skip / T_carry`, the skip-gate delay divided by the
ripple delay per bit. Which size is best depends on the cell library; the
default follows the 4 × 16 arrangement.

## The hybrid adder (`hvl_cska`)

Default layout, from the least significant end:

| stage | bits | kind |
|---|---|---|
| 1 | 0–3 | ripple block with the carry input |
| 2 | 4–13 | CI stage (AOI) |
| 3 | 14–27 | CI stage (OAI) |
| 4 | 28–35 | **nucleus**: modified Brent–Kung prefix adder, AOI skip gate |
| 5 | 36–49 | CI stage (OAI) |
| 6 | 50–59 | CI stage (AOI) |
| 7 | 60–63 | CI stage (OAI) |

The hybrid is built on a variable-stage-size adder. Small first and last
stages shorten the two ends of the critical path: the first ripple block and
the last incrementer.

### The nucleus (`bk_ppa`)

The nucleus has four parts:

1. **Preprocessing.** `p_i = a_i ^ b_i`, `g_i = a_i & b_i`.
2. **Brent–Kung network**, computed as if the carry-in were zero. For 8 bits,
   with positions counted from 1:
   * up-sweep: 2:1, 4:3, 6:5, 8:7; then 4:1, 8:5; then 8:1;
   * down-sweep: 6:1; then 3:1, 5:1, 7:1.

   The code uses the general rule, so any power-of-two width works.
3. **Added level.** It merges the real carry from the stage below into every
   prefix: `c_{i+1} = G_{i:1} | P_{i:1} & C_O,p-1`. This extra level is what
   lets the prefix tree run in parallel with the stages below it.
4. **Postprocessing.** `s_i = p_i ^ c_i`. Bit 1 takes the incoming carry
   directly.

The nucleus passes `G_8:1` and `P_8:1` to its skip gate, which works like any
other stage's.

### One-cycle / two-cycle prediction

A carry from below can reach the upper stages only if the whole nucleus
propagates (`P_8:1 = 1`). Otherwise the carry into stage 5 is set by
`G_8:1`, which the prefix tree forms quickly. So `two_cycle = P_8:1`, the AND of the propagates of bits 28–35:

* if it is 0, only short paths are active, and one clock period is enough;
* if it is 1, the long path may be active, and the operation gets a second
  period.

For random operands this happens for 1 operation in 256.

### Clocked wrapper and timing (`hvl_cska_unit`, `vl_controller`)

```
 a,b,cin ──► [operand reg] ──► hvl_cska ──► [result reg] ──► s, cout
                 ▲  load            │ two_cycle     ▲ capture
                 └──── vl_controller ◄──────────────┘
```

* An operation is loaded when `in_valid && in_ready`.
* A **one-cycle** operation is captured on the next clock edge, and
  `out_valid` is high for one cycle after it. A new operation can load on that
  same edge, so one-cycle operations stream at one per clock.
* A **two-cycle** operation keeps the operand register for one more cycle.
  During that cycle `in_ready` is low and `stretched` is high. It is captured
  on the second edge.
* `out_two_cycle` reports which case a result came from.
* Reset is synchronous and active-low. There is no output back-pressure: the
  consumer must take `out_valid` when it comes.
* Assertions in `vl_controller` check that no operation is held for more than
  two cycles.

## Modules

| file | role |
|---|---|
| `rtl/cska_pkg.sv` | stage-size list type and helper functions |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | cells |
| `rtl/ci_rca.sv` | ripple block, with or without carry input |
| `rtl/ci_incrementer.sv` | half-adder incrementation chain |
| `rtl/ci_skip_logic.sv` | AOI / OAI skip gate |
| `rtl/ci_cska_stage.sv` | one concatenation/incrementation stage |
| `rtl/ci_cska.sv` | 64-bit CI-CSKA |
| `rtl/bk_ppa.sv` | modified Brent–Kung nucleus |
| `rtl/hvl_cska.sv` | 64-bit hybrid adder with prediction output |
| `rtl/vl_controller.sv` | one-/two-cycle control |
| `rtl/hvl_cska_unit.sv` | clocked hybrid adder |
| `rtl/cska64_top.sv` | both adders side by side |

## Simulating

Each module has a self-checking testbench, `tb/<module>_tb.sv`. The
testbench compares against sums worked out inside it and ends with a
`TB_RESULT checks=… failures=…` line. For example:

```
verilator --binary --timing --assert -Irtl rtl/cska_pkg.sv tb/cska64_top_tb.sv --top-module cska64_top_tb
./obj_dir/Vcska64_top_tb
```

`cska64_top_tb` runs the whole design at its default sizes. It streams 4000
operations through both adders. It starts with the reference vectors:

* `0xFF + 0x100` with carry-in 0 (result `0x1FF`) and with carry-in 1 (`0x200`);
* `0x64 + 0x96 + 1` (`0xFB`);
* `100 + 200 + 1` (`301`).

It also counts each mechanism and fails if one never happens: a stage skip, a
final carry, a one-cycle and a two-cycle operation, a carry crossing the
nucleus, a stall, and back-to-back operations. `bk_ppa_tb` is exhaustive for
the 8-bit nucleus.

## How far to trust it, and where it departs

* **Correct as an adder.** Both adders are checked against `a + b + cin` on
  random and corner operands, including carries that run through every stage.
  The tests of the 8-bit nucleus, the skip gate and the 8-bit incrementer
  are exhaustive.
* **Timing is modelled, not implemented.** The RTL fixes the structure (which
  gates sit on which path), but the delay advantage depends on the cells that
  synthesis picks. A synthesis tool may restructure the compound gates unless
  they are kept. Reported gains are about a 2× shorter delay than a mux-based
  carry skip adder, and a little less area and power.
* **Hybrid stage sizes are this design's choice.** The 8-bit nucleus and the
  variable-stage-size shape (small ends) come from the original structure. The
  sizes 4/10/14 below and 14/10/4 above were chosen so that the nucleus gets a
  true-polarity carry and uses an AOI gate. The original scheme speaks of replacing
  the middle "stages"; one nucleus stage is built, as its structure diagrams
  show.
* **The prediction is the nucleus propagate alone.** It is conservative: some
  operations with `P_8:1 = 1` would have fit in one cycle.
* **Clock stretching is a stall.** The original scheme stretches the clock
  adaptively and lowers the supply voltage. Here the clock stays fixed, and the
  operand register is held for an extra cycle. The analog supply and clock
  circuitry is not part of this RTL.
* **Not included:** the conventional mux-based carry skip adder that these
  designs are measured against.
