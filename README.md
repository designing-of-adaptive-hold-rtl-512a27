# Aging-aware variable-latency multiplier with adaptive hold logic

A conventional multiplier is clocked at its worst-case path delay, although
most operand patterns never activate that path. In a bypassing array
multiplier the active path length depends on the operands. A column whose
multiplicand bit is 0 contributes nothing, so its adders are skipped. The
more zeros the multiplicand has, the sooner the product settles.

This design exploits that. Each multiplication gets either **one or two clock
cycles**, chosen per operation by an **adaptive hold logic (AHL)** that counts
the zeros of the operand. The rare one-cycle operation that still misses the
clock edge is caught by **Razor flip-flops** at the multiplier output and
corrected one cycle later. The AHL also guards against transistor aging
(NBTI/PBTI), which slowly lengthens every path. As the circuit ages, Razor
errors become frequent. An **aging indicator** notices this and switches the
AHL to a stricter rule: the operand then needs one more zero to qualify for
one cycle. The circuit trades a few more two-cycle operations for staying
correct and fast as it ages.

Beside this unit, the top level holds an unrelated signed **Baugh-Wooley
array multiplier** (see the last section).

## Block structure

```
             md, mr, in_valid                      clk_del domain | clk domain
                 |                                                |
     +-----------+------------------+                             |
     |                              v                             |
     |      +------------------+  input registers (load enable = |
     |      | adaptive hold    |  gating_n and no recovery)       |
     +----->| logic            |        |                         |
  md (or mr)|  #0s > n  ---0\  |        v                         |
            |  #0s > n+1---1 |-OR-D Q--> gating_n   column- (or row-) bypassing
            |  aging indicator |   ^ Q-bar          array multiplier
            +------------------+   |                       |  mult_p
                     ^ error       +-- (loop)              v
                     |                          Razor flip-flops (main on clk,
                     +------------------------- shadow on clk_del) --> product
```

| module | role |
|---|---|
| `aging_aware_mult` | the variable-latency unit: input registers, AHL, multiplier, Razor register, recovery control |
| `adaptive_hold_logic` | two `zero_judge`s, a mux steered by `aging_indicator`, an OR and the gating flip-flop |
| `zero_judge` | raises `one_cycle` when its operand has more than N zero bits |
| `aging_indicator` | counts Razor errors per window of operations; sets `aged` past a threshold |
| `razor_ff` | main flip-flop, shadow element, XOR and restore mux, per bit |
| `column_bypass_mult` | carry-save array with per-column bypass muxes (default multiplier) |
| `row_bypass_mult` | array with per-row bypass muxes (alternative, `BYPASS = BYPASS_ROW`) |
| `baugh_wooley_mult` | signed Baugh-Wooley array, independent of the rest |
| `full_adder` | the adder cell of the arrays |
| `ahl_pkg` | the `bypass_e` type |
| `ahl_top` | the two units side by side |

## How one operation flows

The AHL works one cycle ahead of the multiplier. It judges the operand while
that operand still waits at the **input** of the input registers. The verdict
and the operand enter their flip-flops on the same edge:

1. The operand sits on `md`/`mr`. The mux selects one of the two judging
   blocks according to `aged`. The OR gate feeds `verdict OR Q-bar` to the
   gating flip-flop.
2. On that edge the input registers load the operand and the flip-flop stores
   the verdict. The flip-flop output is `gating_n`.
3. **One-cycle verdict** (`gating_n` = 1): the input registers may load again
   on the next edge, and the Razor register captures the product on the next
   `clk` edge.
4. **Two-cycle verdict** (`gating_n` = 0): the input registers are held for
   one edge, and the multiplier keeps its operands for a second cycle. On that
   edge `Q-bar` = 1 forces the flip-flop back to 1. So a two-cycle verdict
   never blocks for more than one cycle, and the freshly arriving operand is
   judged normally in the next cycle.

A result counts as complete at the `clk` edge where the input registers are
allowed to move on: `complete = op_valid & gating_n & ~restore`.

### The two clocks and why

`clk_del` is `clk` delayed by less than a period (3 ns of 10 ns in the
testbenches). The clocks are used as follows:

- Razor main flip-flops, the result flags and the recovery control run on
  `clk`.
- The input registers, the AHL flip-flop and the aging indicator run on
  `clk_del`. So does the Razor shadow element.

A new operation is therefore launched on the very edge at which the shadow
element samples the previous result. Razor's short-path hazard cannot occur:
the next operation cannot overwrite the shadow before it has sampled. The
timing budget is as follows:

- A one-cycle operation has one period minus the skew to reach the main
  flip-flops.
- Anything that arrives up to the end of a full period is still caught by
  the shadow and flagged.
- A two-cycle operation has two periods minus the skew.

### Razor detection and recovery

Each `clk` edge, the main flip-flops sample the product. On the following
`clk_del` edge the shadow flip-flops sample it again. If they disagree,
`err_any` rises. If the sample was a completed result, the unit recovers:

- at the next `clk` edge the main flip-flops reload the shadow value
  (`restore`), so the operation has effectively taken two cycles;
- the input registers and the AHL flip-flop are held for one `clk_del` edge,
  so that the operation already in flight does not land on the same edge as
  the corrected result;
- `razor_error` pulses for one cycle. It is the error input of the aging
  indicator.

Razor mismatches on edges that are not result edges are ignored, for example
the first edge of a two-cycle operation.

### Aging indicator

The indicator counts accepted operations and Razor recoveries. Every
`OP_WINDOW` operations both counts are cleared. If the error count within a
window exceeds `ERR_THRESHOLD`, `aged` is set and stays set until reset. From
then on the AHL uses the "more than N+1 zeros" judging block.

### Interface and latency (`aging_aware_mult`, ports prefixed `vl_` in `ahl_top`)

| signal | dir | meaning |
|---|---|---|
| `clk`, `clk_del` | in | normal and delayed clock |
| `rst_n` | in | asynchronous active-low reset |
| `in_valid`, `md`, `mr` | in | operands; loaded on the `clk_del` edge when `in_ready` = 1 |
| `in_ready` | out | `gating_n` and no recovery in progress |
| `out_valid`, `product` | out | result; sample both on the rising `clk` edge |
| `razor_error` | out | one-cycle pulse per recovered result |
| `aged` | out | the aging indicator |
| `one_cycle` | out | AHL verdict for the operand now at `md`/`mr` |

Latency is counted in `clk` edges from the loading `clk_del` edge to the
capture. `out_valid` is seen on the `clk` edge after the capture.

| case | latency |
|---|---|
| one-cycle operation | 1 |
| two-cycle operation | 2 |
| Razor recovery | +1 |
| operation loaded right after a recovered one | +1 |

Results leave in order. The throughput is one operation per cycle while the
operands qualify for one cycle.

`out_valid` depends on the Razor comparison, which settles only after the
`clk_del` edge. It must therefore be sampled on `clk` edges, not used
combinationally early in the cycle.

Parameters: `W` (32), `N_ZEROS` (16), `OP_WINDOW` (1024),
`ERR_THRESHOLD` (32), `BYPASS` (`BYPASS_COLUMN`). The top adds `BW_N` (4).

## The bypassing multipliers

**Column bypassing** (`column_bypass_mult`) uses the layout of a classic
4x4 array, generalised to W bits:

- (W-1) rows of (W-1) full adders. The cell in row j, column i adds
  `md[i]&mr[j]` to the sum arriving diagonally from column i+1 of the row
  above and to the carry coming down column i.
- The left column takes `md[W-1]&mr[j-1]`. The first row takes
  `md[i+1]&mr[0]`.
- A ripple-carry row produces the upper half of the product. Its top input is
  `md[W-1]&mr[W-1]`.
- Every cell has a 2:1 mux that passes the incoming sum when `md[i]` = 0.
  The last-row carries are ANDed with `md[i]` before the ripple row.

The carries inside a bypassed column are not gated. That is exact, because a
column with `md[i]` = 0 never generates or receives a carry. In silicon the
bypassed adders would also have their inputs frozen to save power. That
power saving is outside the scope of RTL.

**Row bypassing** (`row_bypass_mult`) is the alternative the architecture
also supports. Here the AHL counts zeros of the multiplier `mr`. Each row j
is a (W+1)-bit carry-propagate adder on bits j..j+W of the running sum. A
mux skips the row when `mr[j]` = 0. This per-row ripple structure is a
simple stand-in. The usual carry-save row-bypassing array needs extra
correction adders, which are not modelled here.

## Testing and the delay model

RTL simulation has no gate delays, so on its own every operation would
finish in time. The testbench environment `tb/vl_env.sv` adds delay. After
each load it forces the multiplier output (`mult_p`) to keep showing the
previous product for a time D. D depends on the number of ones k in the
controlling operand and on an aging knob. With T = 10 ns and a 3 ns skew,
a one-cycle operation has 7 ns to arrive:

| k | D |
|---|---|
| below W-N | 6.5 ns minus 0.4 ns per one fewer (minimum 3 ns) |
| W-N and above | 10 ns plus 1 ns per extra one (maximum 16 ns) |
| aged | add 0.7 ns |

So a fresh circuit never misses. An aged circuit misses exactly for patterns
with N+1 zeros: those the first judging block accepts and the second does
not. For every operation the environment predicts the following, and checks
the actual behaviour against each prediction:

- whether it is one- or two-cycle;
- whether Razor must recover it;
- its latency;
- its product, in order.

It also requires each mechanism to occur at least once: one-cycle, two-cycle,
Razor recovery, hold after recovery, idle slot and aging switch. After the
switch, no errors may remain. The delay figures are a model chosen to
exercise the mechanism. They are not timing of any real array.

| testbench | what it covers |
|---|---|
| `tb_ahl_top` | whole top at default parameters: 1500 fresh + 3000 aged operations on the 32-bit column unit (recoveries exceed 32 and trip the indicator), plus an exhaustive 4-bit Baugh-Wooley sweep. |
| `tb_aging_aware_mult` | 16x16 and 32x32, column and row bypassing, with short aging windows |
| `tb_column_bypass_mult`, `tb_row_bypass_mult` | exhaustive 4 and 8 bit, 20 000 random 32-bit |
| `tb_baugh_wooley_mult` | exhaustive 4, 5, 8 bit signed |
| `tb_zero_judge`, `tb_aging_indicator`, `tb_adaptive_hold_logic`, `tb_razor_ff` | unit checks against reference models; `tb_razor_ff` drives data early and late relative to the clock edge |

To run one with plain Verilator from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb -Irtl rtl/ahl_pkg.sv tb/tb_ahl_top.sv --top-module tb_ahl_top
./obj_dir/Vtb_ahl_top
```

Each testbench ends with `TB_RESULT checks=<n> failures=<m>`. The
environment also prints the mean latency. In the default run it is about
1.6 cycles per operation, against 2 for a fixed two-cycle design.

## Baugh-Wooley signed multiplier

`baugh_wooley_mult` multiplies two N-bit two's-complement numbers. Both
operands carry a negatively weighted sign bit, so the product has the
following terms:

- `a[N-1]b[N-1]·2^(2N-2)`, which is positive;
- the positive products `a[i]b[j]` with i, j < N-1;
- minus two rows, `a[i]b[N-1]` and `a[N-1]b[j]`, each weighted by
  `2^(N-1)`.

Each subtraction becomes addition of the bitwise complement. The leftover
constants come to `-2^(2N-1) + 2^N`, which modulo `2^(2N)` equals
`+2^(2N-1) + 2^N`. The hardware is therefore an ordinary carry-save array
with these changes:

- the partial products of the sign row and the sign column are NAND instead
  of AND, except `a[N-1]b[N-1]`;
- the final ripple row gets a 1 as carry-in (weight `2^N`);
- the leftmost adder of that row gets a 1 (weight `2^(2N-1)`).

The array has N x N cells. Carries go straight down, sums go diagonally
down-right, and zeros enter the top row and the left column. The default
N = 4 matches the classic 4-bit block diagram. This unit has no connection
to the variable-latency multiplier.

## Where this departs from, or goes beyond, the underlying design

- **Clocking.** Input registers and the AHL flip-flop run on the delayed
  clock. Only the shadow element's clock is given by the architecture.
- **Judging ahead.** The AHL judges the operand at the input registers'
  inputs, one cycle before the multiplier computes with it. Judging the
  pattern while the multiplier already works on it would hold the input
  registers one edge too late.
- **Clock gating as enable.** The input registers' clock gating is written
  as a load enable.
- **Shadow element.** The Razor shadow latch is modelled as a flip-flop on
  the delayed clock's rising edge. It holds the same value as a latch open
  between the two edges, and it is free of simulation races.
- **Recovery.** Recovery reloads the shadow value and holds the input side
  for one cycle. The architecture only says the operation is re-executed in
  two cycles.
- **Added interface.** The handshake (`in_valid`/`in_ready`/`out_valid`),
  the reset behaviour, and the AHL flip-flop enable during recovery are
  additions.
- **Unknown values.** The judging threshold N, the aging window, the error
  threshold and the clock skew are not known from the design. The values
  used (W/2, 1024, 32, 3 ns of 10 ns) are placeholders to be tuned against
  real timing.
- **Sticky `aged`.** Once set, `aged` stays set until reset.
- **Row-bypassing array.** It is a simple per-row adder chain rather than a
  carry-save array.
- **Not built.** A Booth-recoded multiplier, and the triangular "HPM"
  reduction tree sometimes paired with Baugh-Wooley multipliers, are not
  part of this RTL. No structure is given for either.
