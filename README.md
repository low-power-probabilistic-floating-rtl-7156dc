# Probabilistic low-power single-precision multiplier

This is an IEEE 754 single-precision floating-point multiplier that trades a little
accuracy in the low-order mantissa bits for energy. Most of a floating-point
multiplier's energy goes into the 24x24-bit mantissa multiplier, and the low-order
bits of the mantissa product matter least to the result. So only the mantissa array
is made inexact, and its cost is set column by column. The least significant
full-adder columns can be switched off ("truncated"). The next ones can run at a
lowered supply, where thermal noise makes their outputs occasionally wrong. The most
significant columns stay at the nominal 1.2 V and are exact. Sign and exponent are
always computed exactly, since an error there changes the value completely. The
multiplier is aimed at applications whose output is looked at by people, such as
ray-traced images, where a slightly wrong product does no visible harm.

The RTL describes the logic of this scheme. The supply voltages themselves are
analog and are not in the RTL. What the logic sees of a supply choice is a per-column
level code: a truncated column's cells output 0, and a lowered column's cells get
noise events with a probability set for that level. With every column at 1.2 V and
zero error probability, the multiplier is an ordinary single-precision multiplier
that truncates instead of rounding.

## Datapath

```
 a = {sa, ea, fa}      b = {sb, eb, fb}
   sa ^ sb ------------------------------------------------> sign
   ea, eb --> exp_adder (ea + eb - 127) ---> Incrementer --> exponent
   {1,fa}, {1,fb} --> prob_array_mult (48-bit product)          ^
                         |                     Control (bit 47) +
                         +--> Shifter: bits 46..24 or 45..23 --> fraction
                   (voltage profile col_vdd, noise from fa_noise_source)
```

* **Sign**: XOR of the operand signs.
* **Exponent** (`exp_adder`): adds the biased exponents and subtracts 127. The result
  is 10 bits wide and signed, so that overflow and underflow can be seen.
* **Mantissa** (`prob_array_mult`): 24x24-bit ripple-carry array multiplier built
  from 552 probabilistic full adders. Each mantissa gets its hidden one prepended.
* **Normalise** (`fp_normalize`): the product of two values in [1,2) lies in [1,4).
  If product bit 47 is set, the fraction is bits 46..24 and the exponent is
  incremented. Otherwise the fraction is bits 45..23. There is deliberately **no
  rounding unit**. The rounding unit of a conventional multiplier costs a sizeable
  share of its energy. Once the product is inexact anyway, rounding it adds nothing
  useful.

## The mantissa array and its columns

This is the part that needs the most care. The array has 23 rows of 24 full adders.
The indices below are 1-based, as in the usual drawing of an array multiplier:

* Row 1 adds `X[j+1]·Y[1]` and `X[j]·Y[2]` in cell j. Its top-left cell gets a
  constant 0 in place of `X[25]·Y[1]`.
* Row r (r ≥ 2) adds `X[j]·Y[r+1]` to the sum bit coming down from cell j+1 of the
  row above. The most significant cell of the row takes the final carry of the row
  above instead.
* Within a row, the carry ripples from cell 1 (carry-in 0) to cell 24.
* Cell 1 of every row delivers a finished product bit: row r gives `Z[r+1]`. The
  last row also gives `Z24..Z47`, and its final carry is `Z48`. `Z1 = X1·Y1` is a
  lone AND gate.

A **column** is the set of cells whose sum bits have the same weight. The cell in
row r, position j belongs to column `c = r + j - 1`. That gives 46 columns, and
column c contributes to product bit `Z[c+1]`. For example, column 23 holds the cells
for `X23·Y2`, `X22·Y3`, ... `X1·Y24` and produces `Z24`. Inside a column, sums flow
down the column and carries go to the next column up. This is what makes the
per-column supply meaningful:

* **Truncating** the lowest T columns (their cells output 0) removes every partial
  product of weight 1..T, and all carries out of them. The array then computes
  exactly `X1·Y1 + Σ{partial products of weight > T}`. The result can only be too
  small, never too large. For T = 23, with a product of at least 2^46, the loss is
  below 2^28.6, which is at most 48 units in the last place of the result.
* A **noise event** on one cell's sum (carry) output changes the final product by
  exactly ±2^c (±2^(c+1)). This is because everything after that cell is exact
  addition. Errors in low columns therefore cost little, and errors in high columns
  cost a lot. This is the reason for biasing the supply by significance.

`p` is combinational. Its worst path runs along the ripple of the last rows, about
70 cells long. The array is not pipelined.

## Voltage profiles

A voltage profile gives one supply level to each column, from least to most
significant. Full adders in the same column always share a level. The levels are
coded by `fpm_pkg::vdd_level_e`: `VDD_OFF` (truncated, 0 V), `VDD_0V8`, `VDD_0V9`,
`VDD_1V0`, `VDD_1V1` and `VDD_1V2` (nominal). Three example profiles come with the
package, through `fpm_pkg::profile_level(profile, column)`:

| profile | 0 V (off) | 0.8 V | 0.9 V | 1.0 V | 1.1 V | 1.2 V |
|---|---|---|---|---|---|---|
| `PROF_TRUNCATION` | 1-23 | | | | | 24-46 |
| `PROF_BIVOS` (biased voltage scaling) | | 1-20 | 21-29 | 30-33 | 34-35 | 36-46 |
| `PROF_BIVOS_TRUNC` (recommended) | 1-22 | 23-24 | 25-29 | 30-33 | 34-35 | 36-46 |

The profile is an input port (`col_vdd`), so any other profile can be applied. For
the exact multiplications of an application, use all columns at `VDD_1V2` with zero
error probability.

For orientation: in the source study, all three schemes were compared at equal image
quality in a ray tracer. At 58 dB PSNR against an error-free image, the energy of
the mantissa array relative to full-voltage operation was about 80% (BIVOS), 75%
(truncation) and 66% (combined). At 47 dB it was 55%, 51% and 38%. The source does
not say which exact profiles gave those points. This RTL does not reproduce those
energies, which come from circuit simulation.

## Noise model (`fa_noise_source`, `prob_fa`)

Each full adder (`prob_fa`) has a `noise_s` and a `noise_c` input, which invert its
sum and its carry, and a `sleep` input, which forces both outputs to 0 and overrides
noise. `sleep` is set for columns at `VDD_OFF`.

`fa_noise_source` drives all 1104 noise inputs. Each cell has its own 32-bit xorshift
generator. Its low 16 bits decide the sum event and its high 16 bits the carry event:
an event happens when that value is below `perr[level]`. So `perr` holds the error
probability of one full adder output at each level, in units of 2^-16. Reasonable
values depend on the process and its noise, and must come from circuit simulation of
the cell at each voltage. No values are built in. The intended use is `perr[VDD_1V2]
= 0` (the nominal supply is taken to be error free) and probabilities that rise as
the supply drops. `perr[VDD_OFF]` is ignored. Seeds are a fixed hash of the `SEED`
parameter and the cell index, loaded by reset, so a run is reproducible. The
generators advance once per accepted operation.

Errors on different cells, and on sum and carry, are independent here. This is a
modelling choice.

## Interface and timing of `fpmul_prob`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | `a`, `b` hold an operation this cycle |
| `a`, `b` | in | 32 | IEEE 754 single operands |
| `col_vdd` | in | 46 x `vdd_level_e` | voltage profile, entry c-1 = column c |
| `perr` | in | 6 x 16 | error probability per level, 2^-16 units |
| `out_valid` | out | 1 | `result` valid |
| `result` | out | 32 | product |

One operation per clock, with no stall. The result is registered and appears one
clock after the operands, with `out_valid`. `col_vdd` and `perr` are meant to be held
steady while operating; they are not registered.

Special operands are handled as follows, as an implementation choice: a zero or
subnormal operand gives a signed zero (flush to zero). An exponent of 255 or more
gives a signed infinity, and an exponent of 0 or less gives a signed zero. Infinity
times a non-zero value gives a signed infinity. NaN, or infinity times zero, gives
`0x7FC00000`.

## What is and is not modelled

* The supply rails, level shifters and power switches of each column are analog and
  are not in the RTL. `col_vdd` stands in for them. Synthesising this RTL gives one
  supply domain. Building the real circuit needs a voltage-island (UPF/CPF) flow
  that maps column c's cells to its rail.
* Thermal noise is analog. Here it is replaced by pseudo-random bit flips with
  programmable probability. The generators are sizeable: 552 x 32 flip-flops, more
  than the rest of the design. Drop `fa_noise_source` (tie the noise inputs to 0) if
  you only want the logic that would be fabricated.
* A product that noise pushes below 1.0 is not shifted left, because the normaliser
  has only an incrementer. Truncation alone never does this: the partial product
  `X24·Y24` always sets bit 46. Noise can, but only rarely, when the exact product of
  the mantissas lies within about 2^-9 of 1.0 and the net noise error is negative.
  Such a result then reads its fraction from bits 45..23 and is badly wrong (by up to
  a factor of about 1.5). A designer who cares can add a one-position left shift with
  an exponent decrement in `fp_normalize`.
* Energy figures are not computed by the RTL. `profile_workload_tb` counts toggles
  per column and applies a V² scaling as a rough estimate only.

## Files

`rtl/`:
* `fpm_pkg.sv`: widths, level enum, profile helper
* `prob_fa.sv`: noisy full adder
* `prob_array_mult.sv`: 24x24 array
* `fa_noise_source.sv`: error generator
* `exp_adder.sv`
* `fp_normalize.sv`
* `fpmul_prob.sv`: top

`tb/`: one self-checking testbench per module (`<module>_tb.sv`), plus
`profile_workload_tb.sv`. Each prints `TB_RESULT checks=N failures=M` and stops on a
watchdog.

* `prob_array_mult_tb`: exact products at 1.2 V. For every truncation depth 1..46 it
  checks against a partial-product sum, with noise on sleeping cells having no
  effect. It also checks that a single noise event moves the product by exactly
  ±2^c.
* `fpmul_prob_tb`: the whole multiplier at default parameters against a
  double-precision reference. It covers exact results at nominal, the ≤48-ulp bound
  under truncation and bounded error under noise. It also checks the one-cycle
  latency under random valid gaps. It counts normalising shifts, overflow,
  underflow, zeros, infinities, NaNs, truncation losses and noise errors, and fails
  if any of them never occurred.
* `profile_workload_tb`: runs the same operands through the nominal and the three
  example profiles. For each it prints the error rate of each product bit, the mean
  relative error and a V²-weighted toggle estimate. With example error probabilities
  of 10/2/0.5/0.1/0% at 0.8/0.9/1.0/1.1/1.2 V, the estimate was 50% (truncation), 63%
  (BIVOS) and 39% (combined) of nominal. The mean relative errors were about 7e-7,
  4e-5 and 4e-5.

Simulating with Verilator (5.x), from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -y rtl rtl/fpm_pkg.sv tb/fpmul_prob_tb.sv \
          --top-module fpmul_prob_tb -o sim && ./obj_dir/sim
```

Use the same form for any other testbench. Lint with `verilator --lint-only -Wall -Irtl
-y rtl rtl/fpm_pkg.sv rtl/fpmul_prob.sv`. The package must come first on the command
line.
