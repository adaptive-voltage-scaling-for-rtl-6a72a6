# Adaptive voltage scaling for a DCT unit

A DCT core that must run at a given clock frequency gets a supply voltage that is just high enough for that frequency. It does not get a fixed 1.2 V. An on-chip loop finds that voltage:

- a ring oscillator that mimics the DCT critical path runs from a trial voltage;
- a frequency detector compares it with the DCT clock;
- a small controller walks the trial voltage down one level at a time until the replica becomes too slow;
- the last level that was still fast enough is applied to the DCT.

Dynamic power goes with V², so a DCT clocked at 222 MHz can run at 0.8 V instead of 1.2 V.

The voltage comes from two on-chip *variable voltage generators* (VVGs). Each is a linear reference generator whose load resistor is made of five switchable parallel transistors. A 5-bit select word picks one of five output levels:

| level | 0 | 1 | 2 | 3 | 4 |
|---|---|---|---|---|---|
| voltage | 1.17 V | 1.10 V | 1.00 V | 0.90 V | 0.80 V |
| select word (one-cold) | `01111` | `10111` | `11011` | `11101` | `11110` |
| DCT max. clock at that voltage | 435 MHz | 399 MHz | 350 MHz | 300 MHz | 222 MHz |

The two VVGs have different jobs:

- **VVG1** supplies only the ring oscillator. Its select word `pre_sel` changes during the search.
- **VVG2** supplies the DCT. Its select word `sel` is set once, when the search has locked.

The DCT itself is an 8-point 1-D DCT built without multipliers, using the computation-sharing multiplier (CSHM) technique. It has three selectable coefficient sets for a quality/power trade-off.

```
            pre_sel[4:0]                 slow                       sel[4:0]
   +------+  -------->  +-----------+  ------>  +------------+  --------->  +------+
   | VVG1 |  vref       | reference |           | controller |              | VVG2 | -- vout --> DCT supply
   +------+ ----------> |  circuit  |  <------  | (control   |              +------+
       ^                | ring osc. |   ctrl    |  logic +   |
       |                | + freq.   |           |  selector) |
       |                | detector  |  <-- ref_clk (= DCT clock) ---+
       |                +-----------+           +------------+
       +--------------------- pre_sel ------------------+
```

Everything digital is clocked by `ref_clk`, the DCT's operating clock, which also serves as the frequency reference.

## The voltage search, cycle by cycle

Both the search and its timing come from the control logic (`control_logic.sv`). This is the part to understand first.

The control logic is a shift chain of 11 flip-flops: `FF, Q4a, Q4b, Q3a, Q3b, Q2a, Q2b, Q1a, Q1b, Q0a, Q0b`.

- While `reset` is high a 0 enters the chain.
- After `reset` falls a 1 enters, and the 1s fill the chain one flop per `ref_clk` cycle.
- Level *k* is active while its `a` flop is 1 and the next level's `a` flop is still 0. So each level lasts exactly two cycles, and `pre_sel` is one-cold, moving from bit 4 to bit 0.
- The first cycle of a level lets VVG1 settle.
- In the second cycle (the level's `b` flop is set) `ctrl` is high. This is the measurement window.

Cycles are counted in `ref_clk` rising edges after `reset` falls:

| edge | chain | `pre_sel` | `ctrl` in the following cycle | what happens |
|---|---|---|---|---|
| 1 | FF | `11111` | 0 | VVG1 at the 1.2 V start supply |
| 2 | +Q4a | `01111` | 0 | VVG1 moves to 1.17 V and settles |
| 3 | +Q4b | `01111` | 1 | measure level 0 |
| 4 | +Q3a | `10111` | 0 | settle 1.10 V |
| 5 | +Q3b | `10111` | 1 | measure level 1 |
| … | … | … | … | … |
| 11 | +Q0b | `11110` | 1 | measure level 4 (0.80 V) |
| 12 | frozen | `11110` | 0 | lock after the lowest level |

`lock` is held by the **MDFF**, a flip-flop with a 2:1 multiplexer on its D input:

- `S0` selects the input, and `lock` is fed back to `S0`.
- `D1` is tied to 1, so a set lock stays set.
- `D0` is "this was a measurement cycle, and either `slow` was reported or this was the lowest level".

When lock sets, the chain stops shifting, `pre_sel` stays on the level that failed, and `ctrl` stays low. The search therefore locks at most 12 cycles after reset. It locks as early as edge 4 if even 1.17 V is too slow.

### The selector

The selector (`selector.sv`) turns the locked search into `sel`, the VVG2 word. It uses three rules:

1. **Normal case.** The level that locked was the first that was too slow, so the level before it is applied.
2. **Highest-level exception.** The replica is too slow even at 1.17 V. There is nothing higher, so 1.17 V is applied. The clock is beyond what the DCT can do.
3. **Lowest-level exception.** The replica is still fast enough at 0.80 V. The search ends anyway and 0.80 V is applied.

To apply these rules, the selector remembers the `pre_sel` word of the previous level. It also looks at `slow` at the moment lock rises. This is how it tells a lock "because 0.80 V was too slow" from a lock "because 0.80 V was reached and passed". Until lock, `sel` selects 1.17 V, so the DCT is never under-supplied during a search. `sel` is loaded one cycle after lock and then holds until the next reset.

Example. With a 350 MHz clock the measurements go: 1.17 V fast, 1.10 V fast, 1.00 V fast (350 MHz capability, just enough), 0.90 V slow. Lock sets at edge 10, and `sel` selects 1.00 V.

## The half-cycle frequency detector

The detector (`freq_detector.sv`) gives its verdict within half a reference cycle. The rest of the cycle is left to the controller, so one level costs one measurement cycle and no more. A conventional three-flop detector needs a whole reference cycle for the same decision.

`ctrl` rises right after a rising edge of `ref_clk` and releases the ring oscillator. The oscillator's NAND stage holds the ring while `ctrl` is low, so the oscillator rests high. Its first falling edge then comes one oscillator half-period after `ctrl` rises.

The detector has two flip-flops:

- **First flop.** Clocked by the inverted oscillator output, with D tied to 1. It records that this first falling edge has happened. Its inverted output is called `a`.
- **Second flop.** Clocked by the inverted reference, gated with `ctrl`. It samples `a` at the reference's falling edge.

If the oscillator has not completed its half-period by then, it is slower than the clock, and `slow` = 1. The first flop is cleared while `ctrl` is low. `slow` holds until the next window.

The comparison is between oscillator high time and reference high time. Because the oscillator replicates the DCT critical path, that amounts to "is the DCT fast enough at this voltage".

## The DCT datapath

The transform is the orthonormal 8-point DCT:

z_k = c(k)/2 · Σ x_i cos((2i+1)kπ/16), with c(0) = 1/√2 and c(k) = 1 otherwise.

It is split into an even half and an odd half. The even half works on the sums s_j = x_j + x_{7-j}, the odd half on the differences t_j = x_j − x_{7-j} (j = 0…3):

```
[z0 z2 z4 z6] = s0·[d  b  d  f] + s1·[d  f -d -b] + s2·[d -f -d  b] + s3·[d -b  d -f]
[z1 z3 z5 z7] = t0·[a  c  e  g] + t1·[c -g -a -e] + t2·[e -a  g  c] + t3·[g -e  c -a]
```

The seven magnitudes are a = cos(π/16)/2, b = cos(π/8)/2, c = cos(3π/16)/2, d = cos(π/4)/2, e = cos(5π/16)/2, f = cos(3π/8)/2 and g = cos(7π/16)/2. Each is held as an 8-bit code with 7 fraction bits.

### Computation-sharing multiplication

Writing the products column by column means each input sample is multiplied by a fixed group of coefficients: d, b and f in the even half; a, c, e and g in the odd half.

Each coefficient is cut into 2-bit groups. Every non-zero group is either 01, 11, or 01 shifted by one (10). So the only products ever needed are 1·x and 3·x, which the "alphabet" {01, 11} gives.

- One **pre-computer** per input (`cshm_precompute.sv`) forms 1x and 3x once.
- Each **select-adder** (`cshm_select_adder.sv`) handles one coefficient. For each group, a shifter decodes the group, a multiplexer picks 0, 1x or 3x, and an inverse shifter restores the stripped zero. The group results are then added at weights 1, 4 and 16.
- The top group of every DCT coefficient is 00, so only three groups are built. An assertion catches a coefficient that would need the fourth.

The result is exact: the select-adder computes x·coef.

### Coefficient sets

| set | a | b | c | d | e | f | g |
|---|---|---|---|---|---|---|---|
| original | 63 | 59 | 53 | 45 | 36 | 24 | 12 |
| Type1 | 63 | 60 | 51 | 44 | 35 | 24 | 11 |
| Type2 | 60 | 56 | 52 | 44 | 36 | 24 | 12 |

Values are codes; divide by 128 for the coefficient value.

- **Type1** makes the lowest group 00 for b, d, f and 11 for a, c, e, g. For the 11 coefficients the lowest select-adder reduces to a fixed choice of 3x.
- **Type2** makes the lowest group 00 everywhere, so that select-adder disappears.

In silicon each reduced set would be its own cheaper datapath. Here the set is chosen per vector through `coef_mode`, so one datapath can be compared against another.

### Pipeline and number format

- **Stage 1** registers the butterfly (s and t) together with the coefficient mode. The mode is decoded to its coefficient set after the register, so any power-up value gives a legal set.
- **Stage 2** holds the pre-computers, select-adders and output sums, and registers z0…z7.

The unit accepts one vector per clock, and each result appears two clocks later with `out_valid`. Inputs are signed 8-bit. Outputs are signed 21-bit and exact: the real value is `z / 128`, computed with the selected integer coefficients. With the original set, the results stay within a few LSBs of the ideal DCT.

Only the 1-D transform is built. A 2-D 8×8 DCT would need a transpose buffer and a second pass, which this design does not include.

## Analog parts: behavioural models

Two blocks are analog in silicon. They are modelled behaviourally so that the loop can be simulated end to end. Both use delays and are not synthesizable.

**`vvg.sv`**
- Maps a one-cold select word to the voltages in the table above.
- The all-ones word gives the 1.2 V start supply, and `enable` low gives 0 V.
- The output is a 12-bit millivolt value that follows its inputs after `SETTLE_PS` (default 200 ps).

**`ring_osc.sv`**
- A NAND stage followed by one lumped transport delay of half a period.
- The half-period at each level is 10⁶ / (2·f_MHz) ps, rounded down, with f the DCT maximum frequency from the first table. That gives 1149, 1253, 1428, 1666 and 2252 ps.
- A voltage between levels snaps to the nearest level. Below 0.7 V the ring does not oscillate.

Rounding the replica's half-period down makes it marginally faster than the exact critical path. So a clock of exactly 350 MHz, whose half-period of 1429 ps is rounded up, still passes at 1.00 V. To port the design, replace these two models with the real macros; the RTL around them does not change.

## Top-level interface (`avs_dct_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `ref_clk` | in | 1 | operating clock of the DCT, also the AVS reference |
| `reset` | in | 1 | synchronous, active high; hold ≥ 2 cycles; restarts the search |
| `vvg_enable` | in | 1 | enables both voltage generators |
| `in_valid`, `x[0:7]`, `coef_mode` | in | 1, 8×8, 2 | DCT input vector and coefficient set (0 original, 1 Type1, 2 Type2) |
| `out_valid`, `z[0:7]` | out | 1, 8×21 | DCT result, two cycles after input, scaled by 128 |
| `pre_sel`, `ctrl`, `slow`, `lock`, `vco_out` | out | 5,1,1,1,1 | search state |
| `sel` | out | 5 | VVG2 select; final after `lock` + 1 cycle |
| `vref_mv`, `vout_mv` | out | 12, 12 | VVG1 and VVG2 output in mV (`vout_mv` = DCT supply) |

Parameters: `DATA_W` (input width, default 8) and `ZW` (output width, derived). The number of levels (5) and the coefficient width (8) are package constants in `avs_pkg`.

## Choices made here and departures from the source design

These follow the source design:

- the five voltages and their DCT frequencies;
- the one-level-per-two-cycles search from the top down;
- the 11-flop chain and the MDFF;
- the half-cycle detector structure;
- the selector's three rules;
- CSHM with 2-bit decomposition and the three coefficient sets;
- a two-stage DCT pipeline.

These are this implementation's own choices:

- **Select code.** The one-cold encoding of the select words.
- **Measurement timing.** The settle-then-measure split of each two-cycle level, and the generation of `ctrl` by the control logic.
- **Lock and MDFF wiring.** How the MDFF is wired to hold lock, freezing the chain on lock, and forcing lock after the lowest level.
- **Detector gating.** Gating the detector's sampling clock with `ctrl`, and clearing its first flop while `ctrl` is low.
- **Selector inputs and start value.** The extra `slow` input of the selector, and driving VVG2 to 1.17 V before lock.
- **Lock time.** The worst-case lock time is 12 reference cycles. The source design quotes about ten; the difference is the entry flop and the MDFF cycle.
- **DCT pipeline.** Where the pipeline is cut (after the butterfly).
- **DCT data and handshake.** Signed 8-bit inputs, full-precision outputs, and the `in_valid`/`out_valid` handshake.
- **DCT coefficient mode.** Run-time `coef_mode` switching instead of three separate datapaths.
- **Top voltage.** The top level is 1.17 V, the value the generator provides. The source's DCT power tables list 1.2 V for that operating point.

Not included:

- the op-amp voltage follower and output driver inside each VVG, which is analog and covered by the VVG model;
- the matching delay elements in front of the detector, which are analog timing;
- an earlier FSM-based regulator variant that the source describes as background;
- a 2-D DCT;
- the inverse DCT and an all-digital PLL, which are proposed only as future work.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_cshm_precompute`, `tb_cshm_select_adder` | 1x/3x; product = x·coef for all 64 coefficients with a 00 top group |
| `tb_dct_even`, `tb_dct_odd`, `tb_dct_1d` | against a reference that builds every matrix entry from the angle (2i+1)kπ/16, for all three sets; two-cycle latency; back-to-back streaming; closeness to the floating-point DCT |
| `tb_mdff`, `tb_vvg`, `tb_ring_osc`, `tb_freq_detector`, `tb_reference_circuit` | cell function, voltages and settling, oscillator periods, `slow` versus half-period comparison |
| `tb_control_logic`, `tb_selector`, `tb_avs_controller` | cycle-exact `pre_sel`/`ctrl`/`lock` sequence for every possible failing level, selector rules, lock time |
| `tb_avs_dct_top` | full system at default parameters (see below) |

`tb_avs_dct_top` runs the full system at default parameters. It uses clocks of 435, 399, 350, 300 and 222 MHz, which must lock at 1.17, 1.10, 1.00, 0.90 and 0.80 V respectively. It also runs 500 MHz (highest-level exception) and 150 MHz (lowest-level exception). After each lock it streams DCT vectors in all three coefficient modes and checks them. The testbench also counts each mechanism, and fails if one never occurs.

`tb/dct_ref_pkg.sv` holds the DCT reference model. `tb/avs_slow_model.sv` is a stand-in reference circuit for the controller tests.

### Running with Verilator

From the project root, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/avs_pkg.sv tb/tb_avs_dct_top.sv --top-module tb_avs_dct_top -o sim
./obj_dir/sim
```

Use the same command with another `tb_*` file for a single block. Files are found by module name through `-Irtl -Itb`, so only the package and the testbench need to be listed. `--timing` is required, because the voltage-generator and ring-oscillator models use delays, and the design assumes `timescale 1ps/1ps`.

For lint, use `verilator --lint-only -Wall -Irtl rtl/avs_pkg.sv rtl/<module>.sv`. The remaining warnings are:

- unused fields of the coefficient struct in each half of the DCT (each half uses only its own coefficients);
- unused package constants;
- `reset` being used both as a synchronous reset and as the asynchronous reset of the detector's `slow` flop, which sits in the oscillator/reference-edge clock domain.
