# Last-bit accurate IIR filter in direct form I

Fixed-point filters usually come from a floating-point design. Someone then picks
internal word lengths by trial and error until the hardware output looks "close enough".
This design starts from a different specification: **the output must be within one unit
in the last place (one LSB) of the output the filter would produce with infinitely
accurate arithmetic and the exact real coefficients.** This property is called faithful,
or last-bit accurate, rounding. It fixes everything else:

* the output LSB `L_OUT` is both the precision and the accuracy of the filter;
* the output MSB `M_OUT` follows from how much the filter can amplify its input;
* the internal precision `L_EXT` follows from how much the feedback loop can amplify
  rounding errors;
* the number of guard bits inside the multiply-accumulate unit follows from the error
  bound of each constant multiplier.

The filter computes

    y(k) = sum_{i=0..NB} b_i u(k-i)  -  sum_{i=1..NA} a_i y(k-i)

with real coefficients (`B`, `A` are `real` parameters). The constant multipliers are
look-up tables whose entries are rounded from the *real* coefficients. The coefficients
are never rounded to some word length first. Nothing in the datapath is a general-purpose
multiplier. On an FPGA, every table maps to one 6-input LUT per output bit.

## Number formats

A format `(m, l)` is a signed two's complement number. Its MSB has weight `-2^m`, its LSB
has weight `2^l`, and it is `m - l + 1` bits wide. For example, `(0, -11)` is a 12-bit
number in [-1, 1).

| signal | format | default (f_c = 0.6 filter) |
|---|---|---|
| input `u_in` | `(0, L_IN)` | `(0, -11)`, 12 bits |
| internal / fed-back `y~` | `(M_OUT, L_EXT)` | `(1, -14)`, 16 bits |
| output `y_out` | `(M_OUT, L_OUT)` | `(1, -11)`, 13 bits |
| sum-of-products terms | `(M_OUT, L_EXT - G)` | `(1, -19)`, 21 bits (`G` = 5) |

## Datapath

```
 u_in ──┬──────────────────────────────► ┌────────────────────┐
        ▼                                │ fix_sopc           │  y~(k), (M_OUT, L_EXT)
  delay_line  u(k-1) … u(k-NB)  ───────► │   Σ b_i·u(k-i)     ├────────┬──► final_round ──► [reg] ──► y_out
                                         │ - Σ a_i·y~(k-i)    │        │                         (M_OUT, L_OUT)
  delay_line  y~(k-1) … y~(k-NA) ──────► │                    │        │
        ▲                                └────────────────────┘        │
        └──────────────────────────────────────────────────────────────┘
```

* Two register chains (`delay_line`) hold the past inputs and the past *extended*
  results.
* One sum of products (`fix_sopc`) multiplies the `NB+1` inputs by `b_i` and the `NA`
  past results by `-a_i`. It returns `y~(k)` in the extended format.
* `final_round` rounds `y~(k)` to nearest at `L_OUT`. This is the only rounding the user
  ever sees.

The loop carries `y~` in the extended format, not the rounded output. Feeding back the
rounded output would recirculate its half-LSB error through `1/A(z)`, and that error can
be amplified far beyond one LSB.

## Where the formats come from (the error budget)

The total output error splits into two parts:

* the final rounding, at most `2^(L_OUT-1)`;
* the error of `y~`.

Each evaluation of the sum of products makes an error `e_r` of less than `2^L_EXT`. That
error enters the loop, which acts on it as the filter `1/A(z)`. The error of `y~` is
therefore bounded by `WCPG(1/A) · 2^L_EXT`. The worst-case peak gain `WCPG(H)` of a filter
is the sum of the absolute values of its impulse response: the largest output peak for
any input of peak 1. Requiring this part to stay below `2^(L_OUT-1)` gives

    L_EXT = L_OUT - 1 - ceil(log2 WCPG(1/A))
    M_OUT = ceil(log2(WCPG(H) + 2^(L_OUT-1)))      (input MSB is 0)

so the total error is below `2^(L_OUT-1) + 2^(L_OUT-1) = 2^L_OUT`. Poles close to the unit
circle make `WCPG(1/A)` large, and the filter then gets more internal bits. For the
reference filters below, `WCPG(1/A)` ranges from 3.7 to 18711, so the extension ranges
from 3 to 16 bits.

Overflow is harmless. Intermediate sums may leave the `(M_OUT, ·)` range, but all
arithmetic is modulo `2^(M_OUT+1)`. The true result always fits, so the wrapped
intermediate values cancel out.

`M_OUT` and `L_EXT` are parameters of `fix_iir`, not computed in the RTL. A WCPG needs
the impulse response summed until it vanishes (thousands of steps for sharp filters),
which elaboration-time code should not do. Compute them with any numerical tool. Summing
`|h(k)|` in double precision until the terms underflow is adequate for stable filters of
moderate order. A rigorous upper bound is safer still. `iir_pkg` lists the values for the
five reference filters.

## The sum of products (`fix_sopc`)

`fix_sopc` computes `r = Σ C[i]·x[i]` faithfully at LSB `L_R`. Each input may have its own
format (`W_X[i]`, `L_X[i]`). The output MSB `M_R` is given by the caller, because the
filter knows a much tighter range (from `WCPG(H)`) than could be derived from the
constants.

1. Each product is computed `G` bits below `L_R` by a table-based multiplier
   (`fix_real_kcm`), with a known error bound in units of `2^(L_R-G)`:
   * `c = 0` — no hardware, no error;
   * `|c| = 2^k` — a shift, exact unless it shifts bits out (then truncation, < 1 unit);
   * otherwise — `D` tables, each perfectly rounded, so at most `D/2` units.
2. `G` is chosen at elaboration so that the sum of all these bounds stays below half an
   output LSB. Counting in half-units, the total is `E`, and `G = max(1, ceil(log2(E+1)))`
   is the smallest value with `E < 2^G`. In the default filter, 6 inputs have 2 tables and
   5 inputs have 3 tables, so `E = 27` and `G = 5`.
3. All table outputs of all multipliers are added in one multi-operand adder
   (`bitheap_sum`). The addition is exact.
4. Rounding to `L_R` needs `+2^(L_R-1)` and then dropping the `G` guard bits. The
   constant `2^(G-1)` is merged into the first table of the first multiplier, so it costs
   no adder.

The total error is below `2^(L_R-1)` (products) plus `2^(L_R-1)` (rounding). The test
bench checks this bound on every result.

## Constant multiplication by tables (`fix_real_kcm`, `kcm_table`)

The input `x` (`W_X` bits) is cut into `D = ceil(W_X/6)` digits of 6 bits. The most
significant digit is signed, the others unsigned. Then

    c·x = Σ_j c · d_j · 2^(L_X + 6j)

For every possible value of the digit, each term is tabulated as
`round(c · d_j · 2^(L_X + 6j - L_P))`. That is one 64-entry table, filled at elaboration
time from the real `c`. The tables of the low digits hold small values. If every entry of
a table would be below half a unit, the table is not built at all, and the error bound of
half a unit still holds. A 12-bit input uses 2 tables, a 16-bit input 3, a 27-bit input 5.

The multiplier hands its `D` table outputs to the enclosing sum of products rather than
adding them itself. This way a single adder tree sums all tables of all multipliers.

**Sign extension without sign bits.** A table whose entries fit in `w` bits does not
copy its sign up to the full width of the sum. It stores each entry with the sign bit
inverted, which is the entry plus `2^(w-1)`, a non-negative `w`-bit number. Everything
above bit `w-1` is then constant zero. Each such table adds `2^(w-1)` to the sum. The
sum of products subtracts all these offsets at once, inside the same constant as the
rounding bit, in the first table of the first multiplier. That table stays in plain
two's complement form. `iir_pkg::kcm_offset` computes a multiplier's offset from its
parameters. Each table's width comes from its two extreme digits, because rounding is
monotonic.

## Interface and timing of `fix_iir`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous reset, active low; clears both delay lines and the output |
| `in_valid` | in | 1 | `u_in` is a new sample |
| `u_in` | in | `1-L_IN` | input sample, `(0, L_IN)` |
| `out_valid` | out | 1 | `y_out` holds the result of the sample accepted on the previous edge |
| `y_out` | out | `M_OUT-L_OUT+1` | output sample, `(M_OUT, L_OUT)` |

* It accepts one sample per clock and has a latency of one cycle.
* With `in_valid` low it holds all state, so gaps in the input stream are allowed.
* The whole sum of products sits inside the feedback loop as combinational logic: the
  tables, then an adder tree of `ceil(log2(#tables))` levels. This path sets the clock
  period. The design has no pipeline registers; a loop pipelined by a factor `P` would
  need a reformulated filter.

Parameters: `NB`, `NA` (order ≤ `MAX_ORDER` = 15), `B` (b0..bNB), `A` (a1..aNA),
`L_IN`, `L_OUT`, `M_OUT`, `L_EXT`. `B` and `A` are arrays of the fixed size `MAX_ORDER+1`
and `MAX_ORDER`, in which only the first entries are used. In the same way, `fix_sopc`
takes `C`, `W_X`, `L_X` as arrays of size `MAX_IN` = 32. The fixed sizes keep the
parameter arrays portable: some simulators size an array parameter from the default of
the parameter it depends on.

## Reference filters

`iir_pkg` holds five 5th-order Butterworth low-pass filters for 12-bit signals. Their
normalised cut-off frequencies (fraction of Nyquist) are 0.6, 0.7, 0.8, 0.9 and 0.95. The
coefficients are the standard bilinear-transform Butterworth designs (`b`, `a` of
`H(z) = Σ b_i z^-i / (1 + Σ a_i z^-i)`), stored as doubles. The defaults of `fix_iir` are
the 0.6 filter.

| f_c | WCPG(H) | WCPG(1/A) | M_OUT | L_EXT | feedback width | extension bits | SOPC guard bits G | max error seen |
|---|---|---|---|---|---|---|---|---|
| 0.6 | 1.82 | 3.67 | 1 | -14 | 16 | 3 | 5 | 0.65 LSB |
| 0.7 | 2.13 | 8.56 | 2 | -16 | 19 | 5 | 6 | 0.57 LSB |
| 0.8 | 2.27 | 38.2 | 2 | -18 | 21 | 7 | 6 | 0.56 LSB |
| 0.9 | 2.75 | 748 | 2 | -22 | 25 | 11 | 6 | 0.56 LSB |
| 0.95 | 3.08 | 18711 | 2 | -27 | 30 | 16 | 6 | 0.53 LSB |

The last column is the largest error against a double-precision model over 6000 samples
(random, full-scale random signs, square wave, sine). It stays below the 1 LSB
specification in every case. Between 1% and 8% of the outputs are not the nearest value,
which faithful rounding allows.

The original FPGA implementation of this method reports 7, 8, 10, 15 and 19 guard bits
for these five filters. The extension bits plus `G` here give 8, 11, 13, 17 and 22. The
trend is the same, but the exact bit budget differs by 1 to 3 bits. The cause is not
resolved here. The output LSB of the original is not known either, and
`L_OUT = L_IN = -11` is assumed here.

## Departures from the published architecture

* **Summation.** The original throws the table outputs into a bit-heap compressor
  generator. Here `bitheap_sum` is a balanced adder tree, and synthesis picks the adders.
* **Term widths.** Each table is as narrow as its entries, and the sign extension is
  done with one pre-added constant, as in the original. The terms are then
  zero-extended to the full internal width for the adder tree, and synthesis trims the
  constant zero bits. Power-of-two (shift) terms stay in plain two's complement form.
* **Table contents.** The tables are computed in double precision. The original uses
  multiple precision. With double coefficients, an entry could only be mis-rounded if its
  exact value lay within about `2^-53` (relative) of a rounding tie.
* **Formats.** `M_OUT` and `L_EXT` are parameters computed outside the RTL, as
  explained above. Guard bits `G` and table contents are derived inside the RTL.
* **Small inputs.** For inputs only a few bits wider than 6, the original may tabulate
  the whole product in one larger table. It gives 8-bit inputs, at 4 LUTs per output
  bit, as an example. This design always splits inputs into 6-bit digits, so an 8-bit
  input uses two tables.
* **Control.** The handshake (`in_valid`/`out_valid`), the reset and the output
  register are this design's choice. The original pipelines to a target frequency; this
  design is not pipelined.

## Files

| file | content |
|---|---|
| `rtl/iir_pkg.sv` | `ALPHA`, array capacities, table/error helper functions, reference filters |
| `rtl/fix_iir.sv` | the filter (top) |
| `rtl/delay_line.sv` | register chain with enable |
| `rtl/fix_sopc.sv` | faithful sum of products by real constants, guard-bit derivation |
| `rtl/fix_real_kcm.sv` | multiplier by a real constant: digit split, special constants |
| `rtl/kcm_table.sv` | one rounded-product table, with the neglect rule |
| `rtl/bitheap_sum.sv` | multi-operand adder tree |
| `rtl/final_round.sv` | round to nearest by dropping LSBs |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_butterworth_all` |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself; a watchdog ends a
hung run as a failure. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv --top-module tb_fix_iir \
          rtl/iir_pkg.sv tb/tb_fix_iir.sv
./obj_dir/Vtb_fix_iir
```

Replace `tb_fix_iir` by any other testbench name. What the testbenches check:

* `tb_fix_iir` runs the default filter end to end, at default parameters.
  * Stimulus: about 4500 samples of random input with gaps, an impulse, a step, a
    full-scale square wave, and the worst-case input for the peak gain, which drives the
    output beyond ±1.
  * Each output is compared with a double-precision model and must be within one LSB.
  * `out_valid` must follow `in_valid` by exactly one cycle.
  * It also counts and requires: stalls, final rounding in both directions, modular
    wrap-around of intermediate sums, and outputs beyond the input range.
* `tb_butterworth_all` runs the five reference filters side by side.
* `tb_fix_sopc` checks the faithful-rounding bound and the derived guard-bit counts, both
  with generic constants and with 0, 1 and -0.5.
* `tb_fix_real_kcm` checks the product error bound for generic, negative,
  power-of-two (left and right shift) and zero constants.
* `tb_kcm_table` checks every entry of three tables, one of them neglected.
* `tb_bitheap_sum`, `tb_delay_line` and `tb_final_round` are random or exhaustive checks
  against software models.

## Using another filter

1. Get real coefficients `b_0..b_NB`, `a_1..a_NA` with `a_0 = 1`. The filter must be
   stable.
2. Compute `WCPG(H)` and `WCPG(1/A)` by summing the absolute impulse responses. Derive
   `M_OUT` and `L_EXT` with the two formulas above.
3. Instantiate `fix_iir` with `NB`, `NA`, `B`, `A`, `L_IN`, `L_OUT`, `M_OUT`, `L_EXT`. `B`
   and `A` must be full-capacity arrays; use `'{0: b0, 1: b1, …, default: 0.0}`.

The guard bits and all table contents follow automatically. If `WCPG(1/A)` is
underestimated, the accuracy bound is lost silently, so round these values upwards.
