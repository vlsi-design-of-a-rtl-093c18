# Wallace tree multiplier with an XOR/multiplexer full adder, and an FIR filter built on it

A Wallace tree multiplier adds its partial products in parallel: instead of
rippling one row into the next, it takes the rows three at a time and
compresses each group of three into two with a layer of full adders, until only
two rows are left for one ordinary adder. Almost all of its area and switching
is in those full adders. This design replaces the usual gate-level full adder
with a cell made of one XOR gate and two 2:1 multiplexers, which shortens the
critical path of each cell to one XOR plus one multiplexer and cuts switching
activity. The multiplier is then used as the multiplier of every tap of a
direct-form FIR filter.

The main configuration is an unsigned 8 x 8 multiplier (16-bit product) and a
4-tap FIR filter with 8-bit samples and coefficients. Both sizes are
parameters; the multiplier is also tested at 16 x 16.

## Block map

```
fir_wallace                    FIR filter (top): delay line, taps, output register
├── tap_enable_ctrl            turns each tap on once it has a valid sample
└── fir_mac  x TAPS            one tap: multiply, then add to the running sum
    └── wallace_multiplier     N x N unsigned multiplier
        ├── partial_product_gen    N*N AND gates
        ├── wallace_reduction      rows -> two rows, full and half adders
        │   ├── fa_cell            picks the full-adder cell (FA_STYLE)
        │   │   ├── xor_mux_full_adder   (default cell)
        │   │   └── mux4_full_adder      (alternative cell, uses mux4)
        │   └── half_adder
        └── carry_select_adder     final addition (ripple_adder sections + mux2)
wallace_pkg                    fa_style_e: FA_XOR_MUX (default) / FA_MUX4
```

Everything below `fir_mac` is combinational. The only registers are in
`fir_wallace` and `tap_enable_ctrl`.

## The full-adder cells

### XOR/multiplexer cell (`xor_mux_full_adder`, default)

The cell computes `sel = B xor C` and uses it as the select line of two 2:1
multiplexers:

| B xor C | sum | carry |
|---------|-----|-------|
| 0 (B = C)  | A  | B |
| 1 (B ≠ C)  | ~A | A |

This is exactly a full adder. When B equals C, the pair contributes an even
amount: 0 or 2. So the sum bit is A, and the carry is B (1 only when both are
1). When B differs from C, the pair contributes exactly 1. So the sum is the
complement of A, and a carry occurs exactly when A is 1. The longest path is
one XOR followed by one multiplexer. A passes straight to the data inputs, so
a late-arriving A costs only a multiplexer delay.

Which data input sits on which select value is fixed by the truth table above.
The original circuit drawing shows only which signals feed which multiplexer.

### 4:1-multiplexer cell (`mux4_full_adder`, option)

This is an earlier multiplexer-based cell. It uses two 4:1 multiplexers
selected by `{A,B}`, and each 4:1 multiplexer is built from three 2:1
multiplexers (`mux4`):

| {A,B} | sum mux data | carry mux data |
|-------|--------------|----------------|
| 00    | CI           | 0              |
| 01    | ~CI          | CI             |
| 10    | ~CI          | CI             |
| 11    | CI           | 1              |

Its critical path is an inverter plus two multiplexer levels. You can select
it everywhere with `FA_STYLE = FA_MUX4` on `wallace_multiplier` or
`fir_wallace`. This lets you compare the two cells in the same tree.

`half_adder` is the plain XOR/AND pair.

## The reduction tree (`wallace_reduction`)

This is the part that takes some care to read.

**Input.** `partial_product_gen` produces N rows. Row i is `a & {N{b[i]}}`,
unshifted. Bit j of row i has weight 2^(i+j). The tree shifts each row into
place.

**Grouping rule.** At every stage, the rows are split into groups of three
(rows 0–2, 3–5, ...). Each column of a group is handled by how many dots
(existing bits) it has:

* three dots go into a full adder;
* two dots go into a half adder;
* one dot passes straight down.

Group g produces a sum row, which becomes row 2g of the next stage, and a
carry row shifted one column left, which becomes row 2g+1. The one or two rows
left over when the row count is not a multiple of three pass down unchanged.
This gives the row-count recurrence

    R(i+1) = 2*floor(R(i)/3) + R(i) mod 3,   R(0) = N

and the tree stops at two rows:

| N  | rows per stage             | stages | full adders | half adders |
|----|----------------------------|--------|-------------|-------------|
| 8  | 8, 6, 4, 3, 2              | 4      | 38          | 15          |
| 16 | 16, 11, 8, 6, 4, 3, 2      | 6      | 200         | 53          |

**How the generate code places adders.** Which columns of which rows hold a
dot depends on N, so it is worked out at elaboration time. The constant
function `stage_map(s)` replays the grouping rule from the initial staircase of
partial products. It returns a bit map (row r, column c → bit r*2N+c) of the
dots present before stage s. Then, for every group and column, `dots()` counts
the dots and `dot_row()` finds the rows they sit in. The generate block
instantiates an `fa_cell`, a `half_adder`, a wire or nothing to match. A slot
without a dot is tied to 0. So the netlist holds only the adders a dot
diagram would show, and a later stage never reads a bit the map says is
absent.

Each stage's rows live in their own generate scope (`g_stage[s].row`). This
means no signal feeds back into itself, and lint tools see no combinational
loop. A carry out of the top column (weight 2^(2N)) is dropped. The N x N
product fits in 2N bits, and every dot in the tree has a non-negative weight,
so that carry is always 0.

The adder positions follow from the grouping rule. They are not a copy of a
hand-drawn 8-bit dot diagram, so individual adders may sit in different
columns or stages than in such a drawing. The stage count and the adder
types per column follow the same rule.

## Final adder (`carry_select_adder`)

The two remaining rows are added by a carry-select adder made of 4-bit
sections:

* The lowest section is a ripple adder fed by `cin`.
* Every higher section has two ripple adders. One assumes a carry-in of 0 and
  the other a carry-in of 1.
* The real carry from the section below picks one result through 2:1
  multiplexers.

The sections use the same full-adder cell as the tree. For the 16-bit adder of
the 8 x 8 multiplier, that is four sections. The carry path is one 4-bit
ripple plus three multiplexers.

## The FIR filter (`fir_wallace`)

```
              x ──┬──[z^-1]──┬──[z^-1]──┬──[z^-1]──┐
                  │          │          │          │
      coef[0] ─(x)│ coef[1]─(x) coef[2]─(x) coef[3]─(x)       (x) = fir_mac
                  │          │          │          │
          0 ──── (+) ─────── (+) ────── (+) ────── (+) ──[reg]── y
```

The filter computes y[n] = Σ coef[k]·x[n−k] for k = 0 … TAPS−1, in direct
form:

* Tap 0 multiplies the incoming sample.
* A delay line of TAPS−1 registers feeds the later taps.
* Each tap is a `fir_mac`, which adds `coef[k]·x[n−k]` to the running sum
  passed along the taps.

**Tap enable control.** `tap_enable_ctrl` keeps tap k switched off until k
samples have entered since reset. Before that, tap k's delay register holds
no real sample. A switched-off tap forces both multiplier operands to zero,
so its Wallace tree does not toggle, and it passes the sum through unchanged.
The delay line resets to zero, so the output values are the same with or
without the control. The control saves switching, and it does not change
results. `tap_en` is brought out so its effect can be observed. Bit 0 is
always 1.

**Interface and timing.**

| port        | dir | width              | meaning |
|-------------|-----|--------------------|---------|
| `clk`       | in  | 1                  | clock, rising edge |
| `rst_n`     | in  | 1                  | asynchronous, active low; clears delay line, y, out_valid, tap enables |
| `in_valid`  | in  | 1                  | `x` is a new sample at this edge |
| `x`         | in  | N                  | sample, unsigned |
| `coef`      | in  | TAPS x N (array)   | coefficients, unsigned; may change at any time |
| `y`         | out | 2N + clog2(TAPS)   | filter output, full precision (18 bits by default) |
| `out_valid` | out | 1                  | y was loaded at the last edge |
| `tap_en`    | out | TAPS               | tap enables |

On a rising edge with `in_valid` high, the filter:

* shifts the delay line;
* loads `y` with the output for the sample just accepted;
* raises `out_valid`.

The latency is therefore one clock, and the filter can accept one sample every
clock. Without `in_valid`, the delay line and `y` hold, and `out_valid` falls.
The whole multiply-and-sum is one combinational path between the delay line
and the `y` register. It runs through a Wallace tree and TAPS adders, and it
sets the clock rate.

The output width covers the largest possible sum, TAPS·(2^N−1)². Nothing
saturates or wraps.

## Parameters

| module               | parameter  | default     | notes |
|----------------------|------------|-------------|-------|
| `fir_wallace`        | `N`        | 8           | sample and coefficient width |
|                      | `TAPS`     | 4           | filter length, ≥ 2 |
|                      | `FA_STYLE` | `FA_XOR_MUX`| full-adder cell in every multiplier |
| `wallace_multiplier` | `N`        | 8           | operand width, ≥ 2 |
| `carry_select_adder` | `W`, `BLK` | 16, 4       | width, section size |

## Where this RTL is the design's and where it is its own choice

The following come from the design:

* the XOR/multiplexer full adder and the 4:1-multiplexer full adder;
* the AND-array partial products;
* the three-row grouping rule and its row-count recurrence;
* the use of full adders for three dots and half adders for two dots;
* the carry-select final adder;
* the 8-bit main size, with 16 bits as the second size;
* the direct-form FIR structure with one multiplier and one adder per tap;
* the idea of a control logic that enables each MAC stage when it is needed.

The following were chosen here:

* **Filter length:** 4 taps. The source gives no length.
* **Arithmetic:** unsigned operands, coefficients as input ports, and a
  full-precision output.
* **Filter interface:** the registered output with one clock of latency, the
  `in_valid`/`out_valid` handshake, and the asynchronous reset.
* **Tap control:** its form, a shift register of ones that counts the first
  TAPS−1 samples, and operand gating as the way a tap is disabled.
* **Adders:** the 4-bit carry-select section size, and a plain `+` for the
  adder chain between taps.
* **Half adder:** its gate structure.

Points where this RTL does not match reported results:

* The published FPGA implementation of the filter reports 171 flip-flops. This
  4-tap filter has 46: 24 in the delay line, 18 in `y`, 1 for `out_valid` and 3
  for the tap enables. The filter that was measured was longer or registered
  differently, and how is not known.
* The reported 8-bit multiplier simulation shows internal 8-bit signals. These
  suggest it was put together from four 4 x 4 products. This RTL builds one
  8-bit tree directly. The product it gives for the reported operands (170 x
  171 = 29070) is checked.
* The multiplier returns the full 2N-bit product. A fixed-width variant keeps
  only the upper N bits and allows at most 1 ulp of truncation error. It was
  discussed as an aim for this multiplier, but the reported results (a 16-bit
  product and 32 I/O pins for 8 x 8) use the full product, and so does this
  RTL.
* Reduction uses 3:2 counters (full adders) and half adders only. No 4:2
  compressors are used.
* Transistor-level properties of the cells cannot be expressed in RTL. The
  multiplexers were meant as two-transistor pass-gate multiplexers with no
  direct path from supply to ground. Power and delay advantages therefore show
  only after mapping to a cell library that has such multiplexers.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares against
arithmetic worked out in the testbench and prints
`TB_RESULT checks=<n> failures=<n>`. Each also has a watchdog.

| testbench                | what it covers |
|--------------------------|----------------|
| `tb_xor_mux_full_adder`, `tb_mux4_full_adder`, `tb_half_adder` | all input combinations |
| `tb_partial_product_gen` | every bit against `a[j] & b[i]`, and the weighted sum against `a*b` |
| `tb_wallace_reduction`   | row0 + row1 = a·b: all pairs for N = 8 and N = 5 (uneven groups), 3000 random pairs for N = 16 |
| `tb_carry_select_adder`  | W = 16 and W = 10 (short last section): full-length carry chains and random operands |
| `tb_wallace_multiplier`  | all 65536 pairs with each cell type; 170 x 171 = 0111000110001110₂; 3000 random 16 x 16 products |
| `tb_fir_mac`             | enabled and disabled taps, with random and full-scale values |
| `tb_tap_enable_ctrl`     | enable ramp with random gaps between samples, idle clocks, reset |
| `tb_fir_wallace`         | the whole filter at default parameters against a reference model (see below) |

`tb_fir_wallace` runs about 3000 clocks of random traffic:

* roughly 30 % idle clocks;
* coefficient changes while samples are flowing;
* a reset in the middle of the run;
* a full-scale stretch with all-ones samples and coefficients.

On every clock it checks the output value, the one-clock latency, the hold
behaviour and the tap enables. It also counts each mechanism: tap switch-on,
hold, coefficient change, full-scale output and restart. A mechanism that never
occurs counts as a failure.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/wallace_pkg.sv \
          tb/tb_fir_wallace.sv --top-module tb_fir_wallace
./obj_dir/Vtb_fir_wallace
```

Substitute any other testbench name. `wallace_pkg.sv` must be given first; the
other modules are found through `-y rtl`. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/wallace_pkg.sv rtl/<module>.sv`.

## Lint notes

* `wallace_multiplier` leaves the final adder's carry out unused. It is always
  0, for the reason given above.
* `wallace_reduction` has output bits that are constant 0. These are `row1`
  bit 0 and the top columns where no dot remains.
* `tap_en[0]` of the filter is constant 1.

All of these follow from the arithmetic, not from missing logic.
