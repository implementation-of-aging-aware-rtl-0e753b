# Aging-aware variable-latency multiplier

Transistor aging slows a chip down over time. NBTI in pMOS and PBTI in nMOS
raise threshold voltages, so a multiplier clocked at its worst-case delay on
day one makes timing errors years later. The usual fix is a guard band: a
clock period long enough for the aged worst case. That wastes time on almost
every operation, because in a bypassing array multiplier most operand
patterns are much faster than the critical path.

This design takes the other route. It clocks the multiplier well below its
worst-case delay and lets each operation take **one or two cycles**:

* an **adaptive hold logic (AHL)** circuit looks at the operand that controls
  the bypassing, counts its zero bits and decides how long the pattern needs;
* **Razor flip-flops** on the product catch a pattern that was judged short
  but arrived late. They correct the result one cycle later from a shadow
  copy taken on a delayed clock;
* an **aging indicator** counts those errors. When they become frequent, it
  switches the AHL to a stricter rule, so fewer patterns get only one cycle.

The multiplier itself is a column- or row-bypassing carry-save array. Its
final carry-propagate row is a **Kogge-Stone** parallel-prefix adder instead
of a ripple-carry adder.

All RTL is SystemVerilog (IEEE 1800-2017) in `rtl/`, and every module has a
self-checking testbench in `tb/`.

## Block diagram

```
            md ──►┌────────┐      ┌───────────────────────────┐
                  │ md reg ├─────►│ bypass_multiplier         │
            mr ──►│ mr reg ├─────►│  CSA array + ks_adder     ├──► razor_register ──► product
                  └───▲────┘      └───────────────────────────┘    (2M razor_ff)  │
                      │ ld = gating_n & ~error                                     │ error
                      │                                                            │
                  ┌───┴──────────────────────────────────────┐                     │
 md or mr reg ───►│ ahl: #0s > n ─┐                           │◄────────────────────┘
                  │      #0s > n+1┴─ mux ─ OR ─ D-FF(negedge)─┼─► gating_n
                  │             aging_indicator ▲ (sel)       │
                  └───────────────────────────────────────────┘
```

| Module | Role |
|---|---|
| `aging_aware_multiplier` | Top level: operand registers, multiplier, Razor register, AHL, handshake |
| `bypass_multiplier` | M x M carry-save array with column or row bypassing and a Kogge-Stone final adder |
| `ks_adder` | Kogge-Stone adder with carry-in and carry-out |
| `razor_register` | 2M Razor flip-flops, the OR of their error flags, and self-restore |
| `razor_ff` | One Razor bit: main flip-flop, shadow element on `clk_del`, XOR, restore mux |
| `ahl` | Two zero-count judging blocks, mux, OR gate, falling-edge D flip-flop |
| `aging_indicator` | Windowed error counter that sets `aged` |
| `vl_rca` | 8-bit ripple-carry adder with variable-latency hold logic; sits in the top beside the multiplier, on its own `rca_*` ports |
| `aam_pkg` | `bypass_e` enum (`BYPASS_COLUMN`, `BYPASS_ROW`) and `ceil_log2` |

## Why zero bits predict the delay

In a **column-bypassing** array, cell (i, j) adds `md[i] & mr[j]` to the sum
from above and the carry from the upper-right cell. Every carry entering
column i was produced in column i. So when multiplicand bit `md[i]` is 0,
each cell in that column receives two zero inputs: the upper sum passes
straight down, and the cell's carry is forced to 0. The more zero bits the
multiplicand has, the more adders are skipped and the shorter the longest
path. A **row-bypassing** array does the same per row, using the
multiplicator bit `mr[j]`. A bypassed row passes both its sum vector and its
carry vector down unchanged. A carry left behind at a product bit the row
would have retired is absorbed by a short chain of extra adders on the low
product bits. That chain feeds the Kogge-Stone adder's carry-in.

The AHL therefore counts zeros in `md` for a column-bypassing array and in
`mr` for a row-bypassing one (`BYPASS` parameter). A pattern gets one cycle
when the count is **greater than n**. Once the aging indicator has fired, it
needs **more than n + 1** zeros.

The same principle on a small scale is `vl_rca`: an 8-bit ripple-carry adder
with a cycle of 5 full-adder delays and the hold rule
`(a[3]^b[3]) & (a[4]^b[4])`. A carry chain longer than 5 must cross both
bits. Random inputs raise `hold` a quarter of the time, which gives an
average latency of 0.75·5 + 0.25·10 = 6.25 units instead of 8.

## Cycle-level behaviour of the top level

This is the part to understand before changing anything.

**Operand registers.** The operand registers load on the rising edge when
`ld = gating_n & ~error`. In the original structure an AND gate gates their
clock. Here it is a clock enable with the same effect.

**Hold decision.** The AHL flip-flop is clocked on the **falling** edge. Half
a cycle after a new pattern is loaded, it takes
`D = judge(pattern) | ~gating_n`:

* the pattern is judged short, so `gating_n` stays 1, and the next rising
  edge captures the product and loads the next pattern;
* the pattern is judged long, so `gating_n` drops to 0, and the next rising
  edge neither captures nor loads. On the next falling edge `~gating_n` forces
  `gating_n` back to 1, so the hold never lasts more than one cycle.

Example: B is judged long; A, C and D are judged short.

| Rising edge | e1 | e2 | e3 | e4 | e5 | e6 |
|---|---|---|---|---|---|---|
| `gating_n` just before the edge | 1 | 1 | 0 | 1 | 1 | 1 |
| operand registers load | A | B | (hold) | C | D | E |
| Razor register captures | – | A | – | B | C | D |
| `out_valid` seen at the edge for | – | – | A | – | B | C |

**Razor capture.** The Razor register captures only on edges where
`gating_n` is 1, which is the end of an operation's last cycle. `out_valid`
is high during the following cycle, with `product` holding the result.

**Latency.** Counted from the edge that takes the operands to the edge that
samples `out_valid`, latency is 2 cycles for a one-cycle pattern and 3 for a
two-cycle pattern. A Razor correction adds 1. Throughput is one operation
per 1 or 2 cycles.

**Razor error.** Suppose the main flip-flops captured a stale product but
the shadow elements, sampled on `clk_del`, hold the right one. Then `error`
(also `re_execute`) is high for one cycle, and on the next rising edge:

* every main flip-flop loads its shadow value, so the corrected result
  appears with `out_valid` a cycle late;
* the operand registers do not load, so the pattern that had been started
  meanwhile is executed for at least one more cycle;
* the aging indicator counts the error.

**Aging.** The aging indicator counts completed operations in windows of
`AGING_WINDOW` (32). If `AGING_ERR_THR` (4) errors fall into one window, it
sets `aged`, and the AHL switches to the n + 1 judging block. `aged` is sticky
until reset, because aging does not reverse.

**Handshake.** The source drives `md`, `mr` and `in_valid`. They are taken on
a rising edge while `in_ready` is high. `in_ready` changes on the falling
edge and during a Razor error cycle, so sample it just before the rising
edge. An operation taken with `in_valid` low flows through and produces no
`out_valid`. Two assertions in the top check the protocol: `gating_n` is never low
for two edges in a row, and `error` is never high for two edges in a row.

## Razor flip-flops in RTL

A Razor flip-flop works on path delays, which RTL does not have. Two things
follow.

* The shadow element is **edge-triggered on `clk_del`**, not a
  level-sensitive latch. A real shadow latch keeps the late value until the
  restore edge only because the data path meets Razor's short-path
  constraint: no new data arrives before the latch closes. With zero-delay
  logic the next pattern's product appears at the same edge. An
  edge-triggered shadow samples at the moment the latch would close and
  behaves the same way in simulation.
* With zero-delay logic, **`clk_del` must rise together with `clk`**. Tie it
  to `clk` in simulation. A real late arrival can only be produced where the
  data timing is under the testbench's control:
  * `tb_razor_ff` and `tb_razor_register` move data between the `clk` and
    `clk_del` edges;
  * the top-level testbenches force one main flip-flop to a stale value right
    after a capture, which is the state a late arrival leaves behind.

## Kogge-Stone adder

`ks_adder` uses the textbook cells:

* square cells: `g = a & b`, `p = a ^ b`;
* black ("big circle") cells: `G = Gi | Pi & Gj`, `P = Pi & Pj`;
* buffer ("small circle") cells: pass the pair on;
* sum ("triangle") cells: `sum_i = p_i ^ c_i`.

The carry-in is an extra prefix position below bit 0 (generate = `cin`,
propagate = 0). An 8-bit adder therefore has nine prefix columns and four
levels. In the multiplier the adder is M bits wide and sums the upper halves
of the array's final sum and carry vectors. Its carry-out is asserted to be
0.

## Parameters

| Parameter (top) | Default | Origin |
|---|---|---|
| `M` | 16 | Operand width of the published design; 8 is the other size evaluated |
| `BYPASS` | `BYPASS_COLUMN` | Both array types were evaluated; column is this design's default |
| `N_ZEROS` | `M/2` | Judging threshold n; its value is this design's choice |
| `AGING_WINDOW` | 32 | This design's choice |
| `AGING_ERR_THR` | 4 | This design's choice |

With random operands and n = 8, 40.2 % of 16-bit patterns run in one cycle
(1.6 cycles per operation). Raise `N_ZEROS` for a shorter clock period. Lower
it if the array is fast enough at the chosen period.

## What follows the original design and what does not

Taken from the original design:

* the architecture: gated operand registers, bypassing array,
  Kogge-Stone final adder, 2m Razor flip-flops and the AHL;
* the AHL structure: judging blocks "#0s > n" and "#0s > n+1", a mux
  selected by the aging indicator, an OR with the flip-flop's inverted output
  and a falling-edge flip-flop;
* the Razor bit: main flip-flop, shadow, XOR and restore mux;
* the bypass rules, the Kogge-Stone cell functions and the 8-bit hold rule;
* the 16-bit example 0xD295 × 0xAF25 = 0x90124A89.

Where the original is ambiguous, this RTL follows its structure diagram. In
particular, the aging indicator, fed by the error signal, drives the judging
mux's select line.

Choices made in this RTL:

* the value of n and the aging indicator's window, threshold and sticky
  output;
* the handshake signals and the reset values;
* the re-execution protocol, which restores the result and holds the
  operand registers for one edge;
* checking Razor only on capture edges;
* the edge-triggered shadow element;
* the full-width sum/carry vectors between array rows, with M cells per row;
* the extra low-side adder chain of the row-bypassing array.

Not modelled: power, area and delay. Bypassing saves switching power through
tri-state input isolation, which is a gate-level property. Here a bypassed
cell is expressed only by the values it selects. The gains reported for the
original design (delay, area and power against ripple-carry final adders)
cannot be reproduced from RTL simulation. Neither can the path-delay
distribution of its array multipliers.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog.

| Testbench | What it does |
|---|---|
| `tb_ks_adder` | 8-bit exhaustive (131,072 cases); random 16-bit and 5-bit |
| `tb_bypass_multiplier` | 8x8 column and row exhaustive; 16x16 random and controlled zero counts; the 0xD295 × 0xAF25 example |
| `tb_razor_ff`, `tb_razor_register` | On-time and late data, error flag, restore, capture enable, no repeated error after a restore |
| `tb_aging_indicator` | 120 reset episodes at three error rates against a counter model |
| `tb_ahl` | Falling-edge hold rule against a model; four errors switch to the n + 1 rule |
| `tb_aging_aware_multiplier` | Default parameters, end to end, against a cycle-level model (see below) |
| `tb_aam_row` | The same with a row-bypassing array |
| `tb_workload_patterns` | 65,536 patterns through 16x16 (random) and 8x8 (all pairs) in both array types; checks every product and latency, and the one-cycle share (exactly 23,808 for 8x8) |
| `tb_vl_rca` | Exhaustive; checks that every pattern with `hold = 0` has a carry path of at most 5 units, a hold share of 1/4, and a 6.25-unit average |

The cycle-level model in `tb_aging_aware_multiplier` checks `in_ready`,
`out_valid`, `error`, `aged`, every product and every undisturbed latency.
It requires each mechanism to occur:

* one-cycle and two-cycle operations;
* Razor errors and their restores;
* re-execution holds;
* the switch to the aged rule, after which n + 1-zero patterns take two
  cycles;
* idle cycles;
* the 0xD295 × 0xAF25 example.

To run one with Verilator (any testbench; list the package first):

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/aam_pkg.sv tb/tb_aging_aware_multiplier.sv --top-module tb_aging_aware_multiplier
./obj_dir/Vtb_aging_aware_multiplier
```

All flip-flops have an asynchronous active-low reset, so a testbench must
drive a falling edge on `rst_n`. A reset level already present at time zero
is not an event.
