# A stochastic flash ADC built from digital logic only

A conventional flash ADC needs a resistor ladder that spaces its comparator
thresholds exactly one LSB apart, and comparators matched well enough that
their offsets stay far below that LSB. Both are analog design problems that
get harder as processes shrink. This converter turns the problem around: it
has **no reference ladder at all**. Every comparator sees the same input, and
the only thing that makes one comparator trip at a different voltage from
another is its random mismatch offset. Offsets from process mismatch are
Gaussian with zero mean, so for an input `v` the number of comparators that
trip is, on average, `N * Phi(v / sigma)`, where `Phi` is the Gaussian CDF.
The digital back end counts the comparators that tripped and applies the
inverse Gaussian CDF to the count, which turns it back into a number
proportional to `v`.

That leaves three digital pieces, each a module here:

* a clocked comparator that in silicon is two cross-coupled 3-input NAND
  gates and an SR latch (`nand_comparator`), replicated into a ladderless
  bank (`comparator_bank`);
* a Wallace-tree ones counter (`wallace_counter`), which replaces the usual
  thermometer-to-binary decoder;
* a piecewise-linear inverse Gaussian CDF (`inv_gauss_pwl`).

A digital sine source (`sine_gen`) provides the test input, and
`flash_adc_top` wires the chain together. All RTL is synthesizable
SystemVerilog-2017.

## Signal path and timing

```
            vin (mV)          dec[14:0]           count[3:0]         vout (mV)
sine_gen ─────────► comparator_bank ─────► wallace_counter ─────► inv_gauss_pwl ─────►
 1.6 MHz             15 comparators,        Wallace tree,          5-segment PWL
 5 V p-p             random trip points     registered             Phi^-1, registered
```

One sample per clock, fully pipelined. With `vin` the sample on the source's
output after edge `t`:

| signal  | valid after edge | holds                                        |
|---------|------------------|----------------------------------------------|
| `vin`   | t                | generated input, signed mV                   |
| `dec`   | t + 1            | comparator decisions for `vin`               |
| `count` | t + 2            | number of ones in `dec`                      |
| `vout`  | t + 3            | reconstructed input, signed mV               |

The clock is taken as 100 MHz (nothing in the design depends on it except the
sine source's frequency setting). `rst_n` is synchronous and active low and
clears every register; `en` advances the sine source only, the converter runs
on every clock.

## Number formats

All voltages are signed 16-bit integers in millivolts (`flash_adc_pkg::sample_t`).
The input swing is 5 V peak to peak (±2500 mV) within a 7 V (±3500 mV)
reference range; 16 bits leave ample headroom. The count is
`ceil(log2(N+1))` bits, 4 bits for the 15 comparators.

## The comparator and the ladderless bank

The physical comparator is two 3-input NAND gates, cross-coupled. With the
clock low both outputs are precharged high. When the clock rises, each output
discharges through three series NMOS devices, one of which is gated by that
side's input; the side with the larger input discharges faster, crosses a
PMOS threshold first, and the cross-coupling regenerates it to the rail. An SR
latch, buffered by inverters, keeps the decision while the comparator is
precharged for the next sample. Built from standard cells this way, the
comparator can be placed and routed like any digital logic, but a synthesis
tool will "optimise" it into something with the same Boolean function and no
analog behaviour, so in silicon it has to be instantiated cell by cell.

`nand_comparator` describes what the cell does digitally: on the rising edge it
decides `vin_p - vin_n > TRIP_MV` and holds the decision until the next edge,
which is exactly a flip-flop on a signed comparison. Ties resolve low. The
analog race itself (discharge rates, metastability near the trip point,
kickback) is not modelled; `TRIP_MV` stands for the comparator's mismatch
offset.

`comparator_bank` instantiates `N = 15` of them on one common input
(`vin_n` is tied to 0 mV in the top). Their trip points form the "die": they
are drawn at elaboration from a seeded pseudo-random Gaussian generator,
`flash_adc_pkg::gauss_offset_mv`, which sums twelve uniform numbers from a
32-bit linear congruential generator (Irwin–Hall approximation) and scales by
`SIGMA`. Change `SEED` to model another die, `SIGMA` for another process. For
the default seed the trip points, sorted, are

```
-2368 -1174 -658 -524 -480 -422 -284 86 775 910 954 997 1019 1242 1687   (mV)
```

(sample mean 117 mV, sample standard deviation 1094 mV for a population
sigma of 1520 mV). The bank's output is not a thermometer code: comparator
order means nothing, and out-of-order ones ("bubbles") are the normal case.

Why `SIGMA = 1520 mV`: the inverse Gaussian stage linearises the central 90 %
of the offset distribution, ±1.645 sigma, and 1.645 × 1520 mV = 2500 mV, the
peak of the input sine. In a real die sigma is set by device sizing (smaller
comparators, larger mismatch, larger input range); here the numbers are scaled
to the 5 V input swing.

## Counting ones with a Wallace tree

Because of bubbles, a thermometer decoder (find the 1→0 transition) would give
nonsense. Counting the ones gives the same answer for every arrangement of
the same number of tripped comparators, so bubbles cost nothing and need no
extra correction logic.

`wallace_counter` adds the `N` one-bit inputs with a Wallace tree. Bits are
kept in columns by weight (column `c` has weight `2^c`; all inputs start in
column 0). Each level cuts every column into groups of three, each reduced by
a full adder to a sum in the same column and a carry in the next; a leftover
pair goes into a half adder, a single leftover bit passes through. Levels
repeat until no column has more than two bits; a single carry-propagate
addition of the two remaining rows gives the count. For `N = 15`:

| level | bits in columns 0,1,2,3 |
|-------|-------------------------|
| 0     | 15, 0, 0, 0             |
| 1     | 5, 5, 0, 0              |
| 2     | 2, 4, 2, 0              |
| 3     | 1, 3, 2, 1              |
| 4     | 1, 1, 2, 2  → final add |

The schedule is computed at elaboration by the constant function `cnt_at`,
so the module works for any `N`; each level is its own signal vector
(`g_lvl[l].src`/`dst`), so no signal feeds back on itself. Carries out of
the top column are dropped: the total is at most `N < 2^W`, so they are always
zero. The count is registered (`PIPE = 1`); `PIPE = 0` makes the module
combinational.

## Linearising: the piecewise-linear inverse Gaussian

`inv_gauss_pwl` computes `vout ≈ SIGMA · Phi^-1(count/N)` without a divider
or a table:

1. `q = count/N − 1/2` in Q16, as `(2·count − N) · round(2^24 / 2N) >> 8`.
2. `Phi^-1(1/2 + q)` is odd in `q`, so only `|q|` is mapped and the sign is
   restored at the end.
3. `|q|` is clamped at 0.45. Only the central 90 % is linearised; counts in
   the outer 5 % tails (for `N = 15`, counts 0 and 15) saturate at
   ±1.645·SIGMA = ±2500 mV.
4. Five straight segments between the knots below give
   `y = Y[k] + SLOPE[k]·(|q| − Q[k])`, rounded to whole mV.

| abs(q)               | 0 | 0.15   | 0.25   | 0.35   | 0.40   | 0.45   |
|----------------------|---|--------|--------|--------|--------|--------|
| Phi^-1(1/2 + abs(q)) | 0 | 0.3853 | 0.6745 | 1.0364 | 1.2816 | 1.6449 |

The knots are closer together towards the tail, where `Phi^-1` curves most.
`Y[k]` and `SLOPE[k]` are computed from `SIGMA` at elaboration, so the
hardware is a multiplication by a constant, a multiplication by one of five
slope constants, four magnitude comparisons, adders and a sign flip. For
`N = 15, SIGMA = 1520` the 16 output levels are (mV):

```
count  0..7 : -2500 -2316 -1699 -1300 -952 -659 -391 -130
count 8..15 :   130   391   659   952 1300 1699 2316 2500
```

## The sine source

`sine_gen` is a modified coupled-form oscillator:
`x ← x − E·y; y ← y + E·x` (the second step uses the new `x`), with
`E = 2·sin(π·FREQ_HZ/CLK_HZ)` in Q20. Its update matrix has determinant 1,
so the amplitude neither grows nor decays and no sine table is needed. The
state carries 10 guard bits, and `x` starts at `AMPL_MV·cos(ω/2)` so that the
peak of `y` is exactly `AMPL_MV`. At 1.6 MHz and 100 MHz it stays within 1 mV
of an ideal sine. `sample` is the sine, `cosine` the quadrature output.

## What to expect from it

With only 15 comparators this is roughly a 4-bit converter, and its steps are
random rather than uniform: the reconstructed output follows the input with
an RMS error of about 500 mV over a ±2500 mV sine (512 mV at 1.6 MHz, 499 mV
at 40 kHz, with the default die). The error comes from how far the 15 actual
trip points of a die fall from the ideal Gaussian quantiles; the linearisation
can only correct the average shape. More comparators reduce it as `1/sqrt(N)`;
`N`, `SIGMA` and `SEED` are parameters of the top.

## Parameters of `flash_adc_top`

| parameter | default     | meaning                                          |
|-----------|-------------|--------------------------------------------------|
| `N`       | 15          | comparators                                      |
| `SIGMA`   | 1520        | comparator offset spread, mV                     |
| `SEED`    | 0x12345678  | seed of the modelled die's offsets               |
| `CLK_HZ`  | 100 000 000 | clock frequency (sine source only)               |
| `FREQ_HZ` | 1 600 000   | sine frequency                                   |
| `AMPL_MV` | 2500        | sine amplitude (5 V peak to peak)                |

Shared types and constants live in `rtl/flash_adc_pkg.sv`.

## Departures and choices to be aware of

* **Comparator count.** "15-bit" is read as fifteen 1-bit comparator
  decisions summed into a 4-bit count, not as a 15-bit output word, which
  would need 32 767 comparators.
* **Comparator model.** The NAND/SR-latch circuit is described by its digital
  function (edge-sampled signed comparison). Analog effects, and the
  instantiation of specific library cells needed to keep synthesis from
  rewriting the circuit, are outside this RTL.
* **Offsets are fixed per build.** Real mismatch is unknown until the die is
  measured; here it is a deterministic pseudo-random draw so that simulations
  are reproducible and testbenches can predict every output.
* **Reference input.** There is no reference signal: the comparators'
  negative input is 0 mV. A 7 V range is assumed for the reference side and
  only sets the headroom of the sample format.
* **Knots, formats, clock, reset and pipelining** (one register per stage)
  are this design's choices.
* **Not included:** a split-ADC background calibration scheme is sometimes
  paired with such a converter; it is not part of this RTL.

## Simulating

Every testbench is self-checking and ends by printing
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5, from the directory
holding `rtl/` and `tb/`:

```
verilator --binary --timing -y rtl -y tb rtl/flash_adc_pkg.sv tb/adc_ref_pkg.sv \
    tb/tb_flash_adc_top.sv --top-module tb_flash_adc_top
./obj_dir/Vtb_flash_adc_top
```

Replace the testbench name for the others. Each runs in well under a second.

| testbench              | what it checks                                                                  |
|------------------------|---------------------------------------------------------------------------------|
| `tb_nand_comparator`   | decision vs. `vin_p − vin_n > trip`, ties, hold between edges, two trip points  |
| `tb_comparator_bank`   | 1 mV input sweeps find every trip point; single 0→1 switch; shift with `vin_n`; Gaussian statistics; bubbles |
| `tb_wallace_counter`   | all 2^15 inputs, plus N = 7 (combinational, exhaustive) and N = 31 (random); latency |
| `tb_inv_gauss_pwl`     | every count against a floating-point PWL (±2 mV), symmetry, monotonicity, saturation, latency |
| `tb_sine_gen`          | samples vs. ideal sine (±6 mV), peaks, period 62.5 samples, hold with `en` low   |
| `tb_flash_adc_top`     | whole converter at default parameters, 20 sine periods with a pause; every `dec`, `count`, `vout` against a reference model; bubbles, both saturations and the pause must occur |
| `tb_flash_adc_workloads` | 40 kHz sine: every count value 0–15 occurs, RMS error below 600 mV; 7 V peak-to-peak 2 MHz sine: output saturates at exactly ±2500 mV; both checked sample by sample |

`tb/adc_scoreboard.sv` holds the end-to-end reference model and
`tb/adc_ref_pkg.sv` the floating-point inverse Gaussian used by the checks.
