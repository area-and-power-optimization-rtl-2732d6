# Second-order background gain calibration for a pipelined ADC

A pipelined ADC built with low-gain opamps in a scaled CMOS process has a
first stage whose residue amplifier does not have a constant gain error. Over
the output swing the error grows roughly with the square of the output:

    y = (1 - dg) * (2x - D),    dg = dg0 + dg2 * y^2

A zero-order calibration, which corrects only `dg0`, leaves the ADC limited by
the `dg2` term. This RTL corrects both terms digitally and estimates them in
the background while the ADC runs. A known pseudorandom dither `PN = ±1` is
injected into the first stage, and the unit measures how strongly that dither
still shows up in the corrected residue.

The design saves area and power by keeping two internal signals at reduced
precision, without touching the output word:

* `Y` keeps all 13 bits where it is multiplied into the corrected output. Only
  7 of its bits go into the `Y^2` of the second-order correction term.
* `Y_PN`, the signal the estimator correlates with `PN`, is cut to 7 of its
  13 bits before the squarer, the cuber, the three averaging filters and the
  `E x E` product. These units set the cost of the unit.

Both numbers are parameters (`YR_W`, `YPN_W`), so the full-precision unit is
one parameter change away.

## Signal flow

```
            +--------------------- unit_delay <----------------------+
            | dg0, dg2 (Q2.29)                                       |
            v                                                        |
  Y --> correction_block --Ycal--> compute_ypn --Y_PN--> estimation_block
 (13b)  Ycal = Y(1+dg0+dg2*Yr^2)    ^   ^   |             ^  (dg0, dg2 updates,
                                    D   PN  +--> OUT_cal  PN   3 lowpass_filters)
                                        ^        (14 b)   ^
  pn_generator --pn_out--> analog stage |                 |
               \--(PN_DELAY cycles)-----+-----------------+
```

One sample goes through the whole loop every clock:

1. **Correction** (`correction_block`). `Ycal = Y * (1 + dg0 + dg2 * Yr^2)`,
   where `Yr` is `Y` with its 6 LSBs dropped. `dg0` and `dg2` are the
   estimates registered in the previous clock.
2. **Output and Y_PN** (`compute_ypn`). This block forms `OUT_cal = (D + Ycal)/2`,
   the calibrated 14-bit word. It also forms `Y_PN = 2*OUT_cal - (D - PN/2)`,
   which equals `Ycal + PN/2`: the residue with the dither's contribution put
   back.
3. **Estimation** (`estimation_block`). This block applies both updates in
   the same clock:

       dg0 <- dg0 + 2^-22 * PN * Y_PN
       dg2 <- dg2 + 2^-14 * ( E[PN*Y_PN^3] - 3 * E[PN*Y_PN] * E[Y_PN^2] )

   Each `E[.]` is a first-order filter `E <- E + 2^-19 (x - E)`.
   Multiplying by `PN` is a conditional negation. Multiplying by a step size
   is a shift, realised by giving the accumulator that many more fraction
   bits than its increment.
4. **Unit delay** (`unit_delay`). This register returns the new estimates to
   the correction, so the loop has no combinational path.

### Why the estimator works

Suppose the correction is off by `e0 + e2*r^2` (relative), where `r` is the
true residue. Then `Y_PN` contains a part proportional to `PN` whose size
depends on `e0` and `e2`:

* `E[PN*Y_PN]` measures `e0`, plus a share of `e2`.
* `E[PN*Y_PN^3] - 3*E[PN*Y_PN]*E[Y_PN^2]` cancels the `e0` share. What is
  left is proportional to `e2` times the variance of the signal power.

Each accumulator integrates its error term until that term averages to zero.
The `dg0` loop is slow: its time constant is about `2 / mu0 = 8.4 M` samples.
The `dg2` loop is faster than its own averaging filters, whose time constant
is `2^19 = 524 k` samples. As a result, `dg2` wanders around its target
instead of sitting still (see *Accuracy* below).

## Number formats

| signal | width | format | note |
|---|---|---|---|
| `y`, `Ycal`, `Y_PN` | 13 | Q1.11, range [-2, 2) of VREF | M - m = 14 - 1 bits |
| `d` | 3 | integer, half units of VREF | sub-DAC level including the dither, -3..+3 |
| `out_cal` | 14 | Q1.12 | the M-bit calibrated word |
| `dg0`, `dg2` (`coef_t`) | 32 | Q2.29 | as carried by the unit delay |
| `Yr` (inside correction) | 7 | Q1.5 | `Y` floored |
| `Y_PN` (inside estimation) | 7 | Q1.5 | floored |
| `dg0` accumulator | 30 | 27 fraction bits | 5 + 22 |
| `E[PN*Y_PN]`, `E[Y_PN^2]`, `E[PN*Y_PN^3]` | 27 / 33 / 41 | 24 / 29 / 34 fraction bits | outputs of the filters |
| `dg2` accumulator | 51 | 48 fraction bits | 34 + 14 |

`D` is coded in half units so that the dithered sub-DAC level `d + PN/2`
(`d` = the comparator digit -1, 0, +1) is an integer. With that coding,
`OUT_cal = (D + Ycal)/2` is free of the dither, and `D - PN/2` is the plain
digit. Every truncation in the datapath is a floor (dropping LSBs).
Accumulators, filters and the outputs `Ycal` and `Y_PN` clamp at their range
ends instead of wrapping. `ycal_sat` and `ypn_sat` report clamping.

## The averaging filters need guard bits

The hardest detail is in `lowpass_filter`. The plain fixed-point form of
`E <- E + 2^-KE (x - E)` keeps `E` with `KE` fraction bits beyond `x`. In that
form the leak term `E/2^KE` can only be removed in whole input LSBs, so the
filter settles anywhere within about one input LSB of the true mean. That
band is harmless for `E[Y_PN^2]` and `E[PN*Y_PN^3]`, whose LSBs are tiny.
For `E[PN*Y_PN]` at 7 bits it is not: the input LSB is 1/32, about as large
as the correlation being measured. In simulation that offset pushed `dg2`
to a wrong, stable value near -0.04 instead of +0.01.

The filter therefore keeps `GUARD = 12` extra state bits and rounds the leak
term. Its output drops the guard bits again, so the widths of the
`E x E` multiplier are unchanged. Keep this in mind before reducing `GUARD`.

## Top-level interface (`gain_cal_unit`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | one sample per clock; synchronous active-low reset (estimates to 0, PN to its seed) |
| `y` | in | `Y_W` | residue code of stage 1, from the later stages |
| `d` | in | 3 | stage-1 sub-DAC level in half units |
| `pn_out` | out | 1 | dither bit for the analog stage (1 = +1) |
| `out_cal` | out | `Y_W+1` | calibrated word, registered (latency 1 clock) |
| `ypn_q` | out | `Y_W` | `Y_PN` of the same sample (monitor) |
| `est` | out | 64 | `{dg0, dg2}` currently applied |
| `ycal_sat`, `ypn_sat` | out | 1 | clamping flags of that sample |

`y` and `d` must belong to the sample that the stage converted with the
`pn_out` value from `PN_DELAY` clocks earlier. Set `PN_DELAY` to the latency
of the analog pipeline plus any input registers.

Parameters: `Y_W` = 13, `YR_W` = 7, `YPN_W` = 7, `K0` = 22, `K2` = 14,
`KE` = 19, `PN_DELAY` = 0, `SECOND_ORDER` = 1.

To run other configurations, change only these parameters:

* Full precision: set `YR_W = YPN_W = 13`.
* Precision sweeps: set `YR_W` and `YPN_W` anywhere from 5 to 13.
* Calibrating stage 2 of the same ADC: `Y_W = 12`, `YR_W = YPN_W = 6`.
* Zero-order calibration, the usual reference: `SECOND_ORDER = 0`. Only
  `dg0` is estimated, `dg2` stays 0, and synthesis drops the three filters.

All of these elaborate. Their filter states stay under 72 bits.

## Files

`rtl/` holds the synthesizable design:

* `gain_cal_pkg.sv`: sizes, the coefficient type and the clamp helper.
* `gain_cal_unit.sv`: the top.
* The loop blocks: `correction_block.sv`, `compute_ypn.sv`,
  `estimation_block.sv`, `lowpass_filter.sv`, `unit_delay.sv`.
* `pn_generator.sv`: a 31-bit LFSR, `x^31 + x^28 + 1`.

`tb/` holds the testbenches:

* `adc_model_pkg.sv` is a real-valued model of the analog first stage:
  * 1.5-bit comparators at ±VREF/4;
  * the dither applied through the sub-DAC level;
  * residue gain error `dg = 0.02 + 0.01 y^2`;
  * ideal later stages that floor `y` to the 13-bit code.
* There is one self-checking testbench per block.
* `tb_gain_cal_unit` is the end-to-end test. It raises the step sizes 4x and
  uses `PN_DELAY = 2`.
* `tb_gain_cal_full` is the same test with every parameter at its default.
  It runs 42 M samples in about 50 s.
* `tb_precision_sweep` runs six loops side by side on the same input, at
  4x step sizes, through the helper `cal_loop_harness`. Five calibrate
  stage 1 with `Y`/`Y_PN` at 13/13, 7/7, 5/5, 7/13 and 13/7 bits. The sixth
  calibrates stage 2 (12-bit `Y`, both signals at 6 bits).
* `tb_calibration_order` compares zero-order and second-order calibration
  for opamp gains `A0` = 25, 100 and 400 V/V. The gain falls as
  `A0 (1 - (y/1.414)^2)`, so the stage's error is `dg = 2/A0 + y^2/A0`.

Each testbench prints `TB_RESULT checks=N failures=M`.

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -O2 -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/gain_cal_pkg.sv tb/adc_model_pkg.sv tb/tb_gain_cal_full.sv \
    --top-module tb_gain_cal_full -Mdir obj && ./obj/Vtb_gain_cal_full
```

For block testbenches that do not use the model, drop `tb/adc_model_pkg.sv`.

## Verification status

* **Bit-exact checks.** The block testbenches compare every output with a
  model written independently in the testbench:
  * the correction against real arithmetic, within the two floors;
  * `OUT_cal` and `Y_PN` exhaustively over `Ycal`, `D` and `PN`;
  * the estimator and the filters cycle by cycle against 64-bit integer
    models;
  * the LFSR against its recurrence and balance.
* **Behavioural checks.** The estimator testbench also checks the direction
  and rate of both updates.
* **End-to-end checks.** The end-to-end tests close the loop around the
  analog model with a 0.9 VREF sine. They check:
  * the per-sample `OUT_cal` equation;
  * the settled estimates;
  * the SNDR before and after calibration;
  * that every mechanism happened: correction, dropped LSBs of `Y` and
    `Y_PN`, both directions of both estimates, and both kinds of clamping.

### Accuracy

At the default parameters, `dg0` and `dg2` settle near the values that
cancel the model's error: 0.0202 and 0.0097 at 42 M samples. The SNDR of
`OUT_cal` rises from 36 dB uncalibrated to about 56 dB.

Reports of this method give more than 79 dB for the same front end and
precision. This model does not reach that. The limit is not the fixed-point
arithmetic: a floating-point run of the same equations, with 7-bit or with
13-bit `Y_PN`, gives 58-60 dB. The limit is the wander of `dg2` described
above, about ±20 % around its target. The tests therefore check against
52 dB (defaults) and 48 dB (4x faster steps), not 79 dB.

The precision sweep (11 M samples, 4x steps) printed these SNDR values
after calibration:

| `Y` / `Y_PN` bits | 13/13 | 7/7 | 5/5 | 7/13 | 13/7 | stage 2, 6/6 |
|---|---|---|---|---|---|---|
| SNDR (dB) | 51.7 | 51.3 | 49.5 | 51.7 | 50.8 | 49.6 |

The order matches the expectation: 7 bits cost little and 5 bits cost
more. The spread is small, though, because the `dg2` wander dominates at
these step sizes. The intermediate widths 6 and 8 to 12 were not run.

The order comparison (same run length and steps, 7/7 bits) printed:

| `A0` (V/V) | no calibration | zero-order | second-order |
|---|---|---|---|
| 25 | 24 dB | 40.4 dB | 52.4 dB |
| 100 | 36 dB | 51.4 dB | 51.3 dB |
| 400 | 47 dB | 63.1 dB | 51.2 dB |

Second-order calibration wins clearly where the `y^2` error is large.
Its estimates converge (`dg0` 0.086 for 0.08 and `dg2` 0.038 for 0.04 at
`A0` = 25). Its SNDR, however, stops near 51 dB whatever `A0` is, because
the wander of `dg2` adds an error of its own. At high `A0` that floor sits
below what zero-order calibration achieves. The published comparison has
no such floor. This is the same shortfall as the 56 dB versus 79 dB above.

Several things are unknown:

* the behaviour against a real converter;
* a different input signal;
* other noise sources.

Timing closure at 100 MHz has not been checked. The correction, `Y_PN`
and estimation path is a single combinational stage, roughly three
multipliers deep.

## Design choices and departures

* The dither enters the analog model through the sub-DAC level, not at the
  sub-ADC input. With a dithered comparator input, `E[PN*Y_PN]` would carry a
  bias from the comparator decisions, and the equations as written would not
  converge. Only the testbench model is affected. The RTL takes whatever
  `D` the stage applied.
* The order comparison uses the opamp gain curve only up to its `y^2`
  term, `dg = 2/A0 + y^2/A0`. The full curve adds `y^4` and higher terms,
  which no second-order unit can remove. So the second-order results at
  low `A0` are somewhat optimistic next to a full-curve model.
  The `A0` points are chosen here, not read from a plot.
* The following are this design's own choices:
  * the number formats;
  * the `PN_DELAY` alignment line;
  * the output register;
  * clamping instead of wrapping;
  * the 16-bit coefficient precision inside the correction;
  * the filter guard bits and rounding;
  * the LFSR polynomial and seed.
* Not included:
  * the analog stages (sub-ADC, MDAC, later stages, flash ADC);
  * the digital error correction that assembles the later stages' digits
    into `Y`;
  * any foreground calibration mode.

  `Y` is an input. Only the stage-1 part of the output word,
  `(D + Ycal)/2`, is formed here.
