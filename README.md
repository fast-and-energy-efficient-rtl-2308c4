# Concatenation-incrementation carry skip adder (CI-CSKA) and hybrid CSKA

A conventional carry skip adder splits the operands into stages. Each stage
is a ripple-carry block, and a 2:1 multiplexer at the stage output lets a
carry jump over the stage when all of its bits propagate. The carry still has
to wait at every stage for the multiplexer, and the block inside a stage can
only start its final ripple once the carry arrives.

The CI-CSKA changes two things:

* **Concatenation.** Every stage's ripple-carry block adds its operand slices
  with carry-in 0. All stages do this at once, before any carry has arrived.
* **Incrementation.** A separate incrementation block then adds the arriving
  carry (0 or 1) to that partial sum.

After these two changes the stage carry-out is just `G | P & Cin`. Here `G` is
the carry-out of the block working on its own and `P` means "every bit
propagates". That is a single compound AND-OR-INVERT (AOI) or OR-AND-INVERT
(OAI) gate, not a multiplexer. On the carry path from one stage to the next
there is only that one gate.

A second design, the **hybrid CSKA**, takes the CI-CSKA and replaces its
middle stages with one wide core stage built on a Brent-Kung parallel-prefix
network. This shortens the critical path. The slack it gains is meant to be
used by a variable-latency scheme to lower the supply voltage further. That
scheme is not part of this RTL (see *Not included*).

Both adders are 32 bits wide and purely combinational:
`{cout, sum} = a + b + cin`.

## Files

| file | contents |
|---|---|
| `rtl/cska_pkg.sv` | width (32) and the default stage-size tables |
| `rtl/full_adder.sv` | 1-bit full adder |
| `rtl/rca_block.sv` | ripple-carry block, also outputs the block propagate |
| `rtl/incrementer.sv` | adds one carry bit to a partial sum |
| `rtl/skip_logic.sv` | AOI or OAI skip gate |
| `rtl/ci_cska_stage.sv` | one CI stage: RCA(carry 0) + incrementer + skip gate |
| `rtl/ci_cska.sv` | the CI-CSKA, stage sizes set by a parameter |
| `rtl/bk_prefix.sv` | Brent-Kung prefix network (group generate and propagate) |
| `rtl/ppa_core_stage.sv` | core stage of the hybrid adder |
| `rtl/hybrid_cska.sv` | the hybrid CSKA |
| `rtl/cska_top.sv` | both adders side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Anatomy of a CI stage

```
  a[k], b[k] ──► RCA block (carry-in 0) ──► s_rca ──► incrementer ──► sum[k]
                     │ G (carry-out)            ▲ c_in (true polarity)
                     │ P = &(a ^ b)             │
                     ▼                          │
 c_in ───────────► skip gate:  c_out = G | P & c_in
```

* The RCA block and the prefix chain inside the incrementer depend only on
  the operands. They settle while lower stages are still working.
* The incrementer computes `y[i] = x[i] ^ (c_in & x[i-1:0] all ones)`. The
  all-ones prefix comes from a serial AND chain that the operands drive, so
  once the carry arrives the sum bits are only one AND plus one XOR away.
* The incrementer does not produce its own carry-out. The skip gate's value
  is identical to it: `x` can be all ones with no block carry only when
  `P = 1`.
* Stage 0 is a plain ripple-carry block driven by the adder's `cin`. A skip
  gate there would add nothing.

## Carry polarity: why stages alternate AOI and OAI

A compound gate inverts its output. Rather than spend an inverter in every
stage, the carry travels in alternating polarity:

| stage | carry in | gate | carry out |
|---|---|---|---|
| 0 (RCA) | true (`cin`) | – | true |
| 1, 3, 5, … | true | AOI: `~(G \| P & c)` | inverted |
| 2, 4, 6, … | inverted | OAI on inverted inputs: `~(~G & (~P \| ~c))` | true |

`ci_cska_stage` and `ppa_core_stage` have a parameter `CI_INVERTED`. It says
which row the stage is in. The stage re-inverts the carry locally for its own
incrementer. The top-level adders work out `CI_INVERTED = (k % 2 == 0)` for
stage `k ≥ 1`, and turn `cout` back to true polarity if the last stage has
an odd index. When you change the stage list, the polarities follow
automatically.

## Stage sizes

`ci_cska` takes `NSTAGES` and an array `STAGE_SIZES[NSTAGES]` (stage 0 first).
The sizes must add up to `WIDTH`; otherwise elaboration stops with an error.

* The default is a variable stage size (VSS) profile, `{2,3,4,5,6,5,4,3}`.
  Stages grow toward the middle, which gives early stages time to ripple and
  keeps the final incrementation short. The profile follows that usual shape
  for carry skip adders, but the exact numbers are this design's own choice.
  No analytic sizing was available to derive them.
* A fixed stage size (FSS) adder is the same module with equal entries. The
  testbench checks 8 × 4.

## The hybrid adder's core stage

`hybrid_cska` has a list of lower CI stages (`PRE_SIZES`; entry 0 is the RCA
stage), one core stage of `CORE_WIDTH` bits, and a list of upper CI stages
(`POST_SIZES`). The default `{2,3,4} [16] {4,3}` replaces the CI-CSKA's three
middle stages (5+6+5 = 16 bits) with one 16-bit core.

Inside `ppa_core_stage`:

1. Bit generate `a & b` and propagate `a ^ b` feed `bk_prefix`. That module
   forms `G[i:0]` and `P[i:0]` for every bit. It uses a forward tree of
   log2(W) levels, whose top bit (the longest span) is ready first. A
   backward tree of log2(W)−1 levels then fills in the intermediate
   positions.
2. The prefix network has no carry-in, so it runs in parallel with the
   carry coming up from below, just as the RCA blocks do in the CI stages.
   The arriving carry is merged in one step:
   `carry_i = G[i-1:0] | P[i-1:0] & c_in`, `sum_i = p_i ^ carry_i`.
3. The stage carry-out comes from the same AOI/OAI skip gate, using
   `G[W-1:0]` and `P[W-1:0]`.

`CORE_WIDTH` must be a power of two. Entering the carry after the prefix
network is this design's reading of the "modified" prefix adder. The exact
modification is not known.

## Interfaces

`cska_top` has no clock or reset. It has two independent sets of ports:

| port | width | meaning |
|---|---|---|
| `ci_a`, `ci_b`, `ci_cin` | 32, 32, 1 | CI-CSKA operands and carry-in |
| `ci_sum`, `ci_cout` | 32, 1 | CI-CSKA result |
| `ci_stage_p` | 8 | block propagate of each CI-CSKA stage |
| `hy_a`, `hy_b`, `hy_cin` | 32, 32, 1 | hybrid operands and carry-in |
| `hy_sum`, `hy_cout` | 32, 1 | hybrid result |
| `hy_stage_p` | 6 | block propagate of each hybrid stage (core at index 3) |

The stage-propagate outputs are there for observation. On the hybrid adder
they are where a variable-latency detector would connect.

## Not included

* **Variable-latency control.** The hybrid adder is meant to run with a
  scheme that gives some results an extra cycle. This allows a lower supply
  voltage. Which operand patterns would take the longer path, and how the
  handshake would work, is not specified, so no controller is provided. The
  combinational hybrid adder and its per-stage propagate outputs are.
* **Analytic stage sizing.** The defaults above are chosen, not derived.
* **Electrical results.** Delay, power and energy against supply voltage
  (roughly 0.65 V up to 1.1 V nominal in 45-nm static CMOS) depend on a
  transistor-level implementation. The RTL fixes only the logic structure.
  Written behaviourally like this, a synthesis tool may remap the gates. If
  you need the AOI/OAI skip gates and the stage boundaries kept, preserve
  the hierarchy or use dont-touch constraints.
* **Comparison adders** (ripple-carry, conventional CSKA with multiplexers,
  carry-select, Kogge-Stone): not part of this design.

## Verification

Every module has a self-checking testbench. It compares the outputs with
values the testbench works out on its own: integer sums, or a serial prefix
scan for `bk_prefix`. Each testbench ends with
`TB_RESULT checks=N failures=M`. Small widths are tested exhaustively: 4-bit
stages, 5-bit incrementer, all gate inputs. Wide ones get random and
propagate-heavy operands (b close to ~a), which force long skip chains.
Both carry polarities of the two stage types are tested. A second
arrangement of the hybrid (`{4,4} [8] {4,4,4,4}`) puts the core stage at an
even index, so it is tested with an inverted carry-in too.

`tb_cska_top` runs both adders at their default parameters with 10000
uniform random operand pairs, then directed and propagate-heavy vectors.
From the operands alone it counts how often each carry mechanism happened:
a carry skipping a stage, a stage generating a carry, the incrementer
rippling past bit 0, a carry crossing every stage, overflow, and the same
three events in the core stage. A mechanism that never happens counts as a
failure. All testbenches pass.

## Simulating

Verilator 5, from the repository root:

```
verilator --binary --timing -Wno-fatal -y rtl +libext+.sv \
    rtl/cska_pkg.sv tb/tb_cska_top.sv --top-module tb_cska_top
./obj_dir/Vtb_cska_top
```

Swap in any `tb/tb_<module>.sv` to test one module. Package `cska_pkg` must
come first on the command line. To try a different stage profile, override
`NSTAGES`/`STAGE_SIZES` on `ci_cska`, or `NPRE`/`PRE_SIZES`/`CORE_WIDTH`/
`NPOST`/`POST_SIZES` on `hybrid_cska`, or edit the tables in `cska_pkg`.
