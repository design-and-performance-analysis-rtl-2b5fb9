# Aging-aware variable-latency multiplier with adaptive hold logic

Transistor aging (bias temperature instability, hot-carrier injection and
similar effects) makes every path in a circuit slower over the years. A
conventional multiplier is therefore clocked for its critical path *plus* an
aging margin, although most operand pairs never exercise that path. This
design takes the opposite approach:

* The multiplier is clocked for a *typical* path. Operand pairs whose active
  paths are short finish in one cycle; pairs with long active paths get two.
* The decision is made per operation, from the number of zero bits in one
  operand, by the **adaptive hold logic (AHL)**. Zero bits switch off parts of
  a **bypassing array multiplier**, so many zeros means short paths.
* **Razor flip-flops** on the product catch the cases where the AHL guessed
  wrong (a "one-cycle" pattern that was actually too slow). The correct value
  is recovered from a shadow latch and the operation costs one extra cycle.
* An **aging indicator** counts these Razor errors. When they become frequent
  the circuit has aged, and the AHL switches to a stricter rule, so fewer
  patterns are given a single cycle.

The result is a multiplier whose average latency stays close to one cycle
while its clock does not have to carry the worst-case aged delay.

All RTL is SystemVerilog in `rtl/`, one module per file; self-checking
testbenches are in `tb/`.

## Block diagram

```
            md ──►┌────────┐ md_q ┌──────────────────────────┐ product_raw ┌───────────┐
            mr ──►│ input  │─────►│ column- or row-bypassing │────────────►│   Razor   │──► product
      in_valid ──►│ regs   │ mr_q │ array multiplier         │             │ flip-flops│──► error
                  └───▲────┘──┐   │ (CSA or Brent-Kung merge)│             └─────▲─────┘
                      │ load  │   └──────────────────────────┘                   │ load
                      │       └──►┌──────────────────────────┐                   │
                      │           │ adaptive hold logic      │◄── error ─────────┘
                      └───────────│  judging blocks, mux,    │
                    load =        │  OR + D flip-flop,       │──► aging_result, aging_count
              hold_n & ~error     │  aging indicator         │
                                  └──────────────────────────┘
```

`aging_aware_multiplier` is the top. The same enable (`load`, exported as
`in_ready`) clocks the input registers and the Razor main flip-flops: it
plays the part of the gated clock in the original AND-gate formulation.

## How an operation flows

Time is counted in rising edges of `clk`.

1. **Edge k:** `load = 1`, so `md`/`mr` enter `md_q`/`mr_q` (or zeros, if
   `in_valid = 0`). The Razor flip-flops capture the previous operation's
   product on the same edge.
2. **Cycle k:** the multiplier evaluates `md_q * mr_q`. At the same time the
   AHL counts the zeros in the *bypassing operand* (the multiplicand `md_q`
   for column bypassing, the multiplier `mr_q` for row bypassing):
   * one-cycle if `#zeros > n` (or `> n+1` once `aging_result = 1`),
   * otherwise two-cycle: `hold_n = 0`, and edge k+1 does not load.
3. **Edge k+1** (one-cycle) or **k+2** (two-cycle): the Razor flip-flops
   capture the product and the next operand pair is loaded.
4. **The cycle after capture:** `out_valid = 1` and `product` is the result,
   unless the Razor flags an error. On an error, the next edge reloads the
   main flip-flops from the shadow latches and does not load new operands.
   `out_valid` then rises one cycle later with the corrected product.

Each operation therefore keeps the input registers for 1 cycle (one-cycle
pattern, no error) or 2 cycles (two-cycle pattern, or a one-cycle pattern
that failed). There is one exception: if the aging indicator switches while
an operation is held, the stricter rule can hold that operation once more.
Results appear in order, one `out_valid` pulse per operation.

### The hold logic's flip-flop

The AHL is built as judging blocks, a 2:1 multiplexer selected by the aging
indicator, an OR gate and a D flip-flop:

```
hold_n = mux_out | ~q          q <= hold_n   (every clk edge)
```

A 0 on `hold_n` stores `q = 0`. The next cycle then sees `~q = 1`, which
forces `hold_n = 1`. So a two-cycle pattern is held for **exactly one** extra
cycle, never more. In the original description `!gating` is ANDed with the
clock. Here `hold_n` (the D input) drives the synchronous enable of the
input registers and the Razor flip-flops instead. These registers skip
exactly the edge that the gated clock would remove, and the design needs no
gated clock.

### Razor flip-flops and recovery

Each product bit has:

* a main flip-flop on `clk`, with a 2:1 multiplexer in front that selects
  the shadow value when an error is flagged;
* a shadow latch, transparent while the delayed clock `clk_del` is high;
* an XOR comparator. The per-bit comparator outputs are ORed into `error`.

The shadow latch is only armed in the cycle after an enabled capture. This
stops the idle cycle of a two-cycle operation from raising an error. Two
timing rules follow from the Razor principle. The design relies on them;
it does not check them:

* `clk_del` must fall before the next rising edge of `clk`. `error` is only
  meaningful after `clk_del` falls, and it is used on the following `clk`
  edge.
* The shortest path from the input registers to the Razor data input must
  be longer than the time from the `clk` edge to the falling edge of
  `clk_del`. Otherwise the next operation's data overwrites the shadow value.
  In silicon this is met by padding short paths. The testbenches model it.

The shadow element is a real level-sensitive latch (`always_latch`). It is
the only latch in the design, and the latch warning that synthesis tools
print for `razor_flip_flop` is expected.

Recovery is done locally. The corrected product is reloaded from the shadow
latch, and the pipeline stalls for that one edge. The operation is not
re-issued from its operands: the shadow latch already holds the right value.

### Aging indicator

The aging indicator has a saturating error counter (`aging_count`) and a
counter of completed operations. At the end of every window of `AI_WINDOW`
operations the error count is cleared. When the count reaches `AI_THRESH`,
`aging_result` goes high. It then **stays high until reset**, because aging
does not heal. If it fell back at the next window, the AHL would oscillate
between its two judging rules.

## The bypassing multipliers

Both arrays are unsigned N×N carry-save arrays. A zero operand bit disables
a line of full adders. "Disabled" means the adder inputs are forced to 0:
the two-state equivalent of tri-state isolation, so the adders do not
switch. A multiplexer then carries the previous partial sum past them. The
last row and the final carry-propagate merge are one `carry_save_adder`.

**Column bypassing** (`column_bypass_multiplier`, enabled by multiplicand
bits) is a Braun array. Cell (i, j) adds `a_i & b_j`, the sum from cell
(i+1, j-1) and the carry from cell (i, j-1). Row 0 has no carries, so on a
line with `a_i = 0` every carry is zero. Passing the incoming sum straight
on is then exact. The carries leaving the last bypassable row are ANDed with
`a_i`, which clears anything a disabled adder could leave behind.

**Row bypassing** (`row_bypass_multiplier`, enabled by multiplier bits)
cannot reuse the Braun array. There a disabled row would have to pass
carries whose weight changes from row to row. Instead the running sum is
kept as two vectors, sum and carry, of 2N bits each, with every bit at its
absolute weight. A row with `b_j = 0` passes both vectors through unchanged
and is exact as well. The cost is wider rows. Synthesis removes the adders
whose inputs are constant zero.

**Final adder** (`FINAL` parameter):

* `ADDER_CSA`: the `carry_save_adder` merges with a ripple-carry adder.
  This is the classic 4-bit arrangement: a row of full adders over a
  ripple-carry adder, the "carry-save adder" variant.
* `ADDER_BKA`: the ripple-carry adder is replaced by a Brent-Kung
  parallel-prefix adder (`brent_kung_adder`). Its stages are:
  * pre-processing: `p = a ^ b`, `g = a & b`, with the carry-in folded into
    bit 0;
  * an up-sweep of black cells, which produce (G, P);
  * a down-sweep of gray cells, which produce G only and are used wherever a
    group reaches bit 0;
  * post-processing: `s_i = p_i ^ G(i-1:0)`.

  For W = 4 the network has a black cell at bit 3 and a gray cell at bit 1
  in the first level, a gray cell at bit 3 in the second level, a gray cell
  at bit 2 in the down-sweep, and buffers elsewhere. Widths that are not a power of two are
  padded internally.

## Parameters of the top

| parameter   | default         | meaning |
|-------------|-----------------|---------|
| `N`         | 16              | operand width (4 and 16 are the published sizes) |
| `BYPASS`    | `BYPASS_COLUMN` | `BYPASS_COLUMN` or `BYPASS_ROW` (`aam_pkg::bypass_e`) |
| `FINAL`     | `ADDER_BKA`     | `ADDER_CSA` (ripple merge) or `ADDER_BKA` (`aam_pkg::adder_e`) |
| `N_JUDGE`   | 8               | judging threshold n: one-cycle if #zeros > n (2 for N = 4) |
| `AI_CNT_W`  | 8               | aging indicator counter width (3 for N = 4) |
| `AI_THRESH` | 16              | errors within one window that mean "aged" (own choice) |
| `AI_WINDOW` | 256             | operations per counting window (own choice) |

The default is the combination reported as fastest: 16×16 column
bypassing with the Brent-Kung adder. Good values for `N_JUDGE`, `AI_THRESH`
and `AI_WINDOW` depend on the clock period chosen relative to the array
delay. Only silicon or gate-level timing can set them.

## Ports of the top

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `clk_del` | in | 1 | clock; delayed clock for the shadow latches (delay below half a period) |
| `rst_n` | in | 1 | synchronous active-low reset |
| `in_valid`, `md`, `mr` | in | 1, N, N | operand pair, taken on an edge with `in_ready = 1`; hold it until then |
| `in_ready` | out | 1 | the register enable (`hold_n & ~error`); it does not depend on `in_valid` |
| `product`, `out_valid` | out | 2N, 1 | result, valid for one cycle per operation |
| `error` | out | 1 | Razor error, one cycle per detected violation |
| `aging_result`, `aging_count` | out | 1, AI_CNT_W | aging indicator state |

## Where this RTL departs from the published design, and why

* **Clock gating → clock enable.** The source ANDs the clock with a
  flip-flop output. Done literally, that shortens clock pulses rather than
  removing an edge. The enable form removes exactly one edge.
* **Re-execution.** The source says a failed one-cycle operation is
  re-executed in two cycles, without giving the mechanism. It is built as
  Razor local recovery: the shadow value is reloaded and the pipeline stalls
  for one edge.
* **Row-bypassing array.** The published drawing of the row-bypassing array
  has extra correction adders whose exact wiring was not used. The
  absolute-weight carry-save form above gives the same bypass behaviour
  without them.
* **Tri-state gates** become AND isolation, since the design is two-state.
* **Own choices:**
  * the valid/ready handshake and the bubble handling (a bubble loads zeros
    and is judged one-cycle);
  * the reset values;
  * the window, threshold and stickiness of the aging indicator;
  * `#zeros == n` counts as two-cycle;
  * the saturating counter.
* **Not reproduced:** the published LUT counts, delays and frequencies. They
  come from one FPGA tool flow, and RTL simulation cannot reproduce them.

## Verification

Every block has a self-checking testbench. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_brent_kung_adder` | 4-bit exhaustive; 16-bit and 12-bit (padded) random and corner cases |
| `tb_carry_save_adder` | 4-bit exhaustive and 16-bit random, both merging adders |
| `tb_column_bypass_multiplier`, `tb_row_bypass_multiplier` | 4×4 exhaustive and 16×16 on sparse random operands, both adders |
| `tb_adaptive_hold_logic` | decision against an independent zero count, one-cycle hold only, the stricter rule after aging (N = 4 and 16) |
| `tb_aging_indicator` | cycle-by-cycle against a model: window reset, saturation, sticky switch |
| `tb_razor_flip_flop` | on-time data, late data (error, then corrected value one edge later), disabled captures |
| `tb_aging_aware_multiplier` | the whole design at its default parameters (16×16, column, Brent-Kung), 2000 operations |
| `tb_aam_{col,row}{4,16}_{csa,bka}` | the other seven published configurations, end to end |

The RTL has no delays, so the end-to-end testbenches add a path-delay model.
Each change of the raw product reaches the Razor data input after
750 ps + STEP × (ones in the bypassing operand), as a transport delay. The
clock period is 1000 ps. STEP starts at a "fresh" value, where every
one-cycle pattern meets timing. After a number of operations it jumps to an
"aged" value, where one-cycle patterns just past the judging threshold miss
the edge. Each test checks:

* every product;
* the number of cycles each operation holds the input registers;
* that Razor errors occur after exactly the operations whose modelled delay
  exceeded their cycle;
* the aging indicator against a model.

Each test also requires every mechanism to occur at least once: one-cycle
and two-cycle patterns, bubbles, upstream stalls, Razor errors and
corrections, the aging switch, the stricter judging rule, and a window reset.
In these runs the errors stop once the indicator has switched. That is the
intended effect of the adaptive rule.

Simulating with Verilator 5 (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/aam_pkg.sv \
          tb/tb_aging_aware_multiplier.sv --top-module tb_aging_aware_multiplier
./obj_dir/Vtb_aging_aware_multiplier
```

Any other testbench is built the same way. Verilator finds the modules it
needs in `rtl/` by file name.
