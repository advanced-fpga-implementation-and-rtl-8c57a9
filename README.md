# Multilevel diode-clamped converter PWM controller: PD, POD, APOD and simplified SVM

A multilevel diode-clamped converter builds each phase voltage from a stack of
DC-link capacitors. With LEVELS output levels per leg it has LEVELS-1 switch
pairs per leg. Its controller must decide, many thousand times a second, which
level each of the three legs connects to, so that the short-time average follows
a sinusoidal reference. This RTL puts four ways of doing that side by side on
one clock, behind a technique select:

* **Level-shifted carrier PWM**: LEVELS-1 triangular carriers are stacked in
  bands, and each reference is compared with all of them. The three classic
  arrangements differ only in which carriers are inverted:
  * **PD** (phase disposition): none are inverted.
  * **POD** (phase opposition disposition): the lower half is inverted.
  * **APOD** (alternative phase opposition disposition): every other carrier is
    inverted.
* **Simplified space vector modulation (SSVM)**: the three references form one
  rotating space vector. The work that SVM normally does in all six sectors is
  done only in sector 1, after permuting the phases. The three nearest switching
  vectors are then found from integer and fractional parts in a skewed g-h
  coordinate frame, with no trigonometry and no per-triangle tables.

The design is written for any odd or even LEVELS of 3 or more. Its default is a
5-level converter, with 8-bit references and carriers, and a 100 MHz clock.

## Files

| file | module | role |
|---|---|---|
| `rtl/mlc_pkg.sv` | package | technique and frequency-select enums, word width, time-base count |
| `rtl/ref_gen.sv` | `ref_gen` | three-phase 50 Hz references from a 300-entry sine table |
| `rtl/carrier_gen.sv` | `carrier_gen` | up-down counter and the LEVELS-1 stacked carriers |
| `rtl/pwm_compare.sv` | `pwm_compare` | reference > carrier comparators |
| `rtl/switching_period.sv` | `switching_period` | SSVM time base: 0..1000 sawtooth at 2/4/5/10 kHz |
| `rtl/ssvm_modulator.sv` | `ssvm_modulator` | the SSVM steps, from the references to the gates |
| `rtl/vout_synth.sv` | `vout_synth` | ideal converter output voltages from the gates, for a DAC |
| `rtl/mlc_pwm_top.sv` | `mlc_pwm_top` | both paths, the technique select and the DAC word |
| `tb/*_tb.sv` | | one self-checking testbench per module, plus `mlc_pwm_levels_tb` for the top at 3, 7 and 9 levels |

## Leg states and switch numbering

Switch `S_1` is the top switch of a leg and `S_(LEVELS-1)` the bottom one. Each
has a complementary partner, which is the inverse and is not brought out. Leg
state `j` (0..LEVELS-1) connects the leg to capacitor node `j`. In state `j` the
lowest `j` switches are on and the rest are off. Every other pattern is
forbidden.

In the RTL, a leg's gates are one vector `s_x[LEVELS-2:0]`, with `s_x[i]` =
`S_(i+1)`. A legal vector is therefore a thermometer code filled from the high
index down, and the number of ones is the leg level. Both modulators produce
only such patterns. The top asserts this on every clock.

## Carrier path

`ref_gen` holds one sine period as `SIN_TAB[i] = round(80*(1+sin(2*pi*i/300)))`,
computed at elaboration. Three pointers read it:

* phase a starts at 0;
* phase b starts at 199, which puts it 120 degrees behind a;
* phase c starts at 99, which puts it 120 degrees ahead of a.

The pointers advance once every `2*(REF_HALF_DIV+1)` clocks (6666 clocks, so
50.0 Hz at 100 MHz). Each output is the table value plus 20, so the references
swing from 20 to 180.

`carrier_gen` has its own prescaler, one step every `2*(150+1)` = 302 clocks.
On each step an up-down counter `d` moves by one, running 0 -> 50 -> 0. The
carrier of band `k` (0 = bottom) is `k*BAND + d`, or `k*BAND + (BAND - d)` when
inverted. With BAND = 50, the four carriers fill 0..200. The references' 160
peak-to-peak over that 200 span gives a modulation index of 0.8. The inversion
pattern is set by `mode` and changes in the same clock as `mode`.

`pwm_compare` sets `s_x[i] = (v_x > carrier[i])`. Because the bands do not
overlap, the result is always a legal leg state.

At 100 MHz the carrier frequency is 100e6 / (302 * 100) = 3.31 kHz. For 5 kHz,
set `CAR_HALF_DIV = 99`.

## SSVM path

This is the part that needs the most care. `ssvm_modulator` does steps 1 to 4
in one combinational pass and registers the results. Steps 5 and 6 use the
registered on-times and the current time base `vp`.

1. **Sector.** The sector comes from the order of the three references:

   | order | sector |
   |---|---|
   | va >= vb >= vc | 1 |
   | vb >= va >= vc | 2 |
   | vb >= vc >= va | 3 |
   | vc >= vb >= va | 4 |
   | vc >= va >= vb | 5 |
   | va >= vc >= vb | 6 |

   Ties go to the first match in the order 1, 6, 2, 3, 4, 5.
2. **Reconstructed reference.** The references are permuted into `(Ua, Ub, Uc)`
   with `Ua >= Ub >= Uc`:

   | sector | Ua | Ub | Uc |
   |---|---|---|---|
   | 1 | a | b | c |
   | 2 | b | a | c |
   | 3 | b | c | a |
   | 4 | c | b | a |
   | 5 | c | a | b |
   | 6 | a | c | b |

   The new vector U\* always lies in sector 1. It runs through the sector-1
   triangles in the same order as the original vector runs through the triangles
   of its own sector.
3. **Triangle type.** The g-h coordinates are
   `Ug = (LEVELS-1)(Ua-Ub)/VDC` and `Uh = (LEVELS-1)(Ub-Uc)/VDC`, with VDC = 180.
   Let `G`, `H` be their integer parts and `fg`, `fh` their fractions. U\* is in
   an *upper* triangle (apex up) when `fg + fh < 1`, and in a *lower* one
   otherwise. The hardware keeps this exact: `G` and `fg` are the quotient and
   remainder of `2(LEVELS-1)(Ua-Ub)` divided by `2*VDC` (`4*VDC` when
   `m_full = 0`, which halves the references).
4. **Durations**, in counts of a 1000-count period:

   | | v1 | v2 | v3 | t2 | t3 |
   |---|---|---|---|---|---|
   | upper | (G, H) | (G+1, H) | (G, H+1) | 1000*fg | 1000*fh |
   | lower | (G+1, H+1) | (G+1, H) | (G, H+1) | 1000*(1-fh) | 1000*(1-fg) |

   In both cases `t1 = 1000 - t2 - t3`. The durations are rounded down.
5. **Pulses.** Each vector `(g, h)` is applied in its first redundant state. In
   that state the Ua leg sits at the top level, giving leg levels
   `(LEVELS-1, LEVELS-1-g, LEVELS-1-g-h)`. Switch `S_(i+1)` of a sector-1 leg is
   on in every vector where that leg's level is at least `LEVELS-1-i`. Its
   on-time is the sum of the durations of those vectors. The switch is on while
   `vp < on-time`.

   The pulses are placed in the period in one of two ways, chosen by the
   `SYMMETRIC` parameter (`SSVM_SYMMETRIC` on the top):

   * **Left-aligned** (`SYMMETRIC = 0`, the default). A switch is on while
     `vp < on-time`. Because `vp` is a sawtooth, all pulses start at the
     beginning of the period, and the vector with the highest levels comes
     first.
   * **Centred** (`SYMMETRIC = 1`). A switch is on while
     `1000 - on-time <= 2*vp < 1000 + on-time`. Each pulse sits in the middle
     of the period. The vectors run from the lowest levels up to the highest
     and back down.

   The pulse widths are the same either way. Centring works because the
   pulses of one leg are nested: a switch lower in the leg is on in every
   vector where a switch above it is on. The nesting also keeps every leg
   state legal.
6. **Interchange.** The sector-1 pulses are returned to the physical legs by the
   inverse of the step-2 permutation. For example, in sector 3 leg a takes the
   Uc pulses, leg b the Ua pulses and leg c the Ub pulses.

**Example** (5 levels): references (172, 140, 80) in sector 1 give Ug = 0.71
and Uh = 1.33. So G = 0 and H = 1, and the sum 2.04 is at least G+H+1 = 2, so
U\* is in a lower triangle. The three vectors are therefore:

| vector | (g, h) | levels (a, b, c) | duration |
|---|---|---|---|
| v1 | (1, 2) | 4, 3, 1 | 44 |
| v2 | (1, 1) | 4, 3, 2 | 666 |
| v3 | (0, 2) | 4, 4, 2 | 288 |

With left-aligned pulses the legs step through 442, then 432, then 431 inside
a period. With centred pulses they step through 431, 432, 442, 442, 432 and
431.

`switching_period` produces `vp`, counting 0..1000 and wrapping. It advances
every 50, 24, 20 or 10 clocks for `select_ts` = 00, 01, 10 or 11. That gives
2.00, 4.16, 5.00 or 9.99 kHz at 100 MHz.

Outside the hexagon (`G + H > LEVELS-2`, overmodulation) the method has no
answer. There the levels are clamped at 0. The default references stay well
inside: Ug+Uh peaks at 3.08 of 4.

## Output voltage and DAC word

`vout_synth` computes, from the gates, what an ideal converter with balanced
capacitors would put out:

* the connection function of each leg state;
* the pole voltages `j*VDC/(LEVELS-1)`, each rounded down per level;
* the balanced-load phase voltages `(2*va0 - vb0 - vc0)/3`, truncated toward
  zero.

The carrier path uses VDC = 96 and gives two's-complement words. The SSVM path
uses VDC = 180 and adds 125 before the division by 3, so its word is the
offset phase voltage rounded down. `dac_a` carries phase a of the selected path to an
8-bit DAC. For the carrier path it is the two's-complement word plus 128, so
both paths give offset-binary codes.

## Top-level interface (`mlc_pwm_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock (100 MHz for the stated rates); synchronous active-high reset |
| `mode` | in | 2 | `PWM_PD`, `PWM_POD`, `PWM_APOD`, `PWM_SSVM` |
| `select_ts` | in | 2 | SSVM frequency: `TS_2K`, `TS_4K`, `TS_5K`, `TS_10K` |
| `m_full` | in | 1 | SSVM index: 1 full, 0 half |
| `va_ref`..`vc_ref` | out | 8 | references |
| `vp`, `sector` | out | 16, 3 | SSVM time base and sector |
| `s_a`, `s_b`, `s_c` | out | LEVELS-1 | gates of the selected technique |
| `cb_v*_out`, `ssvm_v*_out` | out | 8 | phase voltages of each path |
| `dac_a` | out | 8 | DAC word |

**Timing.** The references are registered. The carrier gates are
combinational from registered signals. The SSVM gates lag the references by two
clocks and `vp` by one. Both paths run all the time, so a change of `mode` takes
effect at once.

## Where this differs from the original design

* **SSVM in logic.** The original runs the SSVM steps as a C program on the
  Zynq's ARM core. Xilinx AXI GPIO blocks carry the references and `vp` to the
  processor and the output word back. Here the same steps are logic, and the
  vendor blocks are absent:
  * the processor system;
  * the AXI GPIO blocks and the AXI interconnect;
  * the processor reset block.
* **One image.** The original builds one FPGA image per technique. Here all
  four share a top and a select input.
* **One clock.** The original clocks its counters with divided clocks. Here
  clock enables on one clock give the same rates.
* **Reset.** Reset is synchronous and active high.
* **Assumed clock and reference rate.** The 100 MHz clock and the reference
  divider value are inferred, not given.
* **Carrier peak.** The carrier triangle peaks at 50, as the original counter
  does, rather than at the 49 its description states.
* **Sector ties.** Ties follow the sector table with `>=` throughout. The
  original program uses strict `>` in places, which sends some ties to the wrong
  sector.
* **Pulse alignment.** SSVM pulses are left-aligned against a sawtooth by
  default, as in the original program. The original text describes a
  symmetric ascending/descending sequence, which is available as
  `SSVM_SYMMETRIC = 1`.
* **Continuous sampling.** The SSVM recomputes durations every clock from the
  live references, as the original program's loop does. It does not sample
  them once per switching period. When a line voltage changes quickly within
  one period, a late pulse edge reflects the late value of the reference. The
  period's volt-seconds then lie between those of its smallest and largest
  reference, not exactly at the mean.
* **Arithmetic.** The SSVM uses exact integer arithmetic instead of floating
  point. Durations are rounded down to whole counts.
* **Levels other than 5.** For 3, 7 and 9 levels, set `LEVELS` and choose
  `BAND` (100, 33, 25) so that the carrier stack fits 8 bits.
* **Not built.** There is no capacitor-voltage balancing (the original has none
  either), no THD measurement, and no continuous modulation-index or frequency
  control. The SSVM index is full or half; the carrier index is fixed by the
  table.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`. To run one:

```
verilator --binary --timing --assert --top-module mlc_pwm_top_tb \
  rtl/mlc_pkg.sv rtl/*.sv tb/mlc_pwm_top_tb.sv
./obj_dir/Vmlc_pwm_top_tb
```

What each testbench checks:

* `ref_gen_tb`: two table periods against `$sin`, the sample spacing, and the
  20..180 swing.
* `carrier_gen_tb`: 5- and 9-level carriers in all modes, with random mode
  changes, against a triangle model.
* `pwm_compare_tb`: random and boundary values, including equality.
* `vout_synth_tb`: every legal state combination at 5, 3 and 9 levels, and
  forbidden patterns.
* `switching_period_tb`: step spacing and full-period length for all four
  selects.
* `ssvm_modulator_tb`, at 5 and 3 levels, on the example above, points around
  the circle, random points and ties:
  * sector, triangle type and durations against a real-arithmetic model;
  * that each `vp` instant shows one of the three expected vectors;
  * that line-to-line volt-seconds per period equal the reference's
    `(LEVELS-1)*(va-vb)*1000/VDC` to within a few counts.
* `mlc_pwm_levels_tb`: the top at 3, 7 and 9 levels side by side, with centred
  SSVM pulses on the 7-level instance. Each runs one 50 Hz period per
  technique, with the same gate and DAC checks as `mlc_pwm_top_tb`. The SSVM
  volt-seconds of each switching period are bounded by the in-period range of
  the references. Every level, sector and triangle type must occur. This takes
  about 8 M clocks and 30 s.
* `ssvm_modulator_tb` also checks a centred 5-level instance. It checks that
  each leg rises to its peak level by mid-period and falls back after.
* `mlc_pwm_top_tb` (default parameters, about 11.5 M clocks, about 15 s):
  * one 50 Hz period in each of PD, POD and APOD, with the gates checked every
    clock against an independent carrier model;
  * one period of SSVM at 5 kHz, half a period at half index, and part of a
    period at 10 kHz;
  * SSVM volt-seconds checked every switching period, except periods that cross
    a sector edge, where left-aligned pulses change meaning mid-period;
  * that the following all occur: every mode, every level, every sector, both
    triangle types, the index step and both frequencies.

## Changing it

* `LEVELS`, `BAND`, the dividers and `SSVM_SYMMETRIC` are parameters of the top.
* The sine table is generated from `N_SAMPLES`, `AMP` and `OFFSET` in
  `ref_gen`.
* The SSVM depends on LEVELS only through `(LEVELS-1)` in the g-h scaling and
  the number of switches per leg.
* Widening `DW` in `mlc_pkg` gives finer references and carriers. Adjust
  `BAND`, `AMP` and `OFFSET` to match.
