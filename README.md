# Outphasing drive for a solid-state RF amplifier: digital signal component separator and feedback linearizers

A solid-state power amplifier (SSPA) is most efficient when it runs close to
saturation, but a saturated amplifier cannot reproduce amplitude modulation.
Outphasing solves this by never asking either amplifier to vary its amplitude.
The wanted baseband vector `s = I + jQ` (amplitude and phase modulated) is
split into two vectors `d0`, `d1` of the **same, constant length**. Only their
phases vary. Each drives one amplifier, and a power combiner adds the two
outputs. Because `d0 + d1 = 2s`, the sum carries the original modulation.

This repository holds synthesizable SystemVerilog for the digital part of
such a drive, built for the cavity field control of an accelerator:

```
 sp, cav_meas, ff                 sspa0_meas                    NCO (shared IF carrier)
        |                             |                              |
 cavity_controller --s--> dscs --r0--> fb_linearizer --u0--> if_modulator --> dac0
   (PI + feedforward)        \--r1--> fb_linearizer --u1--> if_modulator --> dac1
                                      |
                                  sspa1_meas
```

* `cavity_controller` regulates the cavity field. It takes the set point
  minus the measured field, runs a PI controller, and adds a beam
  feedforward term. Its output is the AM-PM vector `s`.
* `dscs` is the signal component separator. It turns `s` into `r0 = d0` and
  `r1 = d1`.
* `fb_linearizer` is one local PI loop per amplifier. It removes that
  amplifier's slow gain droop and phase drift. With the linearizer on, the
  amplifier output tracks `r0` (or `r1`) and so keeps its constant amplitude.
* `if_modulator` and `nco` move each drive onto a common IF carrier for its
  DAC.

The DACs, RF up-converters, amplifiers, combiner, cavity and the receivers
that measure the cavity field and the amplifier outputs are analog. They are
outside this RTL, and their signals are ports of the top, `dscs_top`.

## The separator

### Geometry

Let `s = r·e^{jα}` with `r ≤ RMAX`. Add to `s` a vector `e` that is
perpendicular to it, with length `sqrt(RMAX² − r²)`:

```
e  = j·e^{jα}·sqrt(RMAX² − r²)      i.e.  e_I = −sin α · sqrt(RMAX² − r²)
                                          e_Q = +cos α · sqrt(RMAX² − r²)
d0 = s + e,    d1 = s − e
```

By Pythagoras `|d0| = |d1| = sqrt(r² + RMAX² − r²) = RMAX`. The two outputs sit
at `α ± θ`, with `cos θ = r / RMAX`:

* At full amplitude (`r = RMAX`), `e = 0` and both outputs equal `s`.
* At zero amplitude, `θ = 90°` and the outputs point in opposite directions,
  so they cancel in the combiner.

### Datapath

Everything is computed in I/Q coordinates with CORDICs. There are no
multipliers apart from constant gain corrections and one squaring.

| step | unit | what it does | latency (cycles) |
|---|---|---|---|
| 1 | `cordic_vectoring` | `(I, Q) → (r, α)`, circular CORDIC in vectoring mode, 18 iterations | 20 |
| 2 | register | `p = RMAX² − r²`, or `p = 0` when `r ≥ RMAX` | 1 |
| 3 | `cordic_sqrt` | `sqrt(p)`, hyperbolic CORDIC in vectoring mode | 27 |
| 4 | `cordic_rotation` | rotates `(0, sqrt(p))` by `α`, giving `(e_I, e_Q)` | 21 |
| 5 | register | `d0 = s + e`, `d1 = s − e`, saturated to 16 bits | 1 |

The total is 70 cycles. `s` and `α` are carried through register chains
(`delay_line`) so that they line up with the CORDIC results.

### Points that are easy to get wrong

* **Phase accuracy at small amplitude.** `e` is longest (about `RMAX`)
  exactly when `s` is shortest. An angle error `δα` in the vectoring step
  therefore shows up as `RMAX·δα` in the outputs. The vectoring CORDIC
  carries 12 fraction bits below the input LSB so that this error stays
  within a few LSB down to inputs of about 100 LSB. For `s = 0` the
  vectoring CORDIC reports `α = 0` (the usual `atan2(0, 0)` convention), so
  the outputs are `(0, RMAX)` and `(0, −RMAX)`.
* **Square root by CORDIC.** A hyperbolic vectoring CORDIC returns
  `K_h·sqrt(x² − y²)`. It converges only while `|y/x| < 0.81`. `cordic_sqrt`
  first shifts `p` left by an even count `2n` into `[2^30, 2^32)`. It then
  feeds `x = p' + 2^30` and `y = p' − 2^30`, which keeps `|y/x| < 0.6`. Since
  `x² − y² = 4·p'·2^30`, it undoes the scaling with a right shift by
  `32 + n` after multiplying by `1/K_h`. Iterations 4 and 13 are repeated, as
  the hyperbolic CORDIC requires.
* **CORDIC gains.** Both circular CORDICs remove the gain
  `K = Π sqrt(1 + 2^-2i) ≈ 1.6468` with one constant multiply by
  `round(2^16/K) = 39797`. The hyperbolic one uses `round(2^16/K_h) = 79135`,
  where `K_h ≈ 0.82816`. The arctangent table holds
  `round(atan(2^-i)/(2π)·2^24)`. All of these live in `dscs_pkg`.
* **Over-range input.** For `r ≥ RMAX` the radicand is clamped to zero, so
  `e = 0` and `d0 = d1 = s`. The outputs then exceed `RMAX`, and the
  `over_range` flag is raised, delayed to line up with the outputs. A
  controller upstream should keep `|s| ≤ RMAX`.
* **Exact recombination.** `d0 + d1 = 2s` holds bit-exactly whenever neither
  output saturates, because `e` is added and subtracted from the same word.

## Feedback linearizer

The loop around amplifier `k` computes

```
u_k = r_k + C_k(r_k − y_k)          C_k: PI, separately on I and Q
```

`y_k` is the measured amplifier output, scaled to the drive scale. At low
frequency the loop gain is large, so `y_k → r_k`. The drive `u_k` then
becomes approximately `G_k^{-1}·r_k` minus the amplifier's input
disturbance. When the amplifier gain droops during a pulse, `u_k` rises to
make up for it, and the amplifier output keeps its constant amplitude.

With `lin_en` low, the integrator is held at zero and `u_k = r_k`. The
amplifier is then driven by the separator alone, and any droop reaches the
cavity. There it is corrected more slowly, by the cavity loop raising `|s|`.
The end-to-end testbench shows both behaviours.

The PI core (`iq_pi`) has these properties:

* Its gains are 16-bit unsigned run-time inputs with 12 fraction bits.
* `en`, `kp` and `ki` are registered together with the error sample they
  apply to.
* The integrator is clamped to ±32767·2^12 (anti-windup), and the output
  saturates to 16 bits.

The same core serves the cavity controller.

## Cavity controller and IF

* `cavity_controller`:
  * computes `u = PI(sp − cav_meas) + ff`;
  * with `cav_en` low, outputs `ff` alone (open loop);
  * takes the beam feedforward term `ff` as an input, because its generator
    is not part of this design.
* `nco`:
  * a 32-bit phase accumulator whose top 24 bits rotate `(AMP, 0)` in a
    rotation CORDIC;
  * the default tuning word `FTW = 2^30` gives `f_IF = f_s/4`;
  * at a sample clock of 100.625 MHz (805 MHz / 8), that is a 25.15625 MHz IF.
* `if_modulator`: computes `dac = round((I·cos − Q·sin)/2^15)`, saturated to
  16 bits. Both modulators share one NCO.

## Interfaces and timing

* **Data format.**
  * One I/Q sample per clock, as `iq_t` (a packed struct of two 16-bit
    signed words).
  * Phases are 24 bits, where `2^24` is one turn.
  * `in_valid`/`out_valid` flags travel with the data. There is no
    back-pressure.
* **Reset.** Synchronous and active high. It clears every pipeline stage
  and integrator.
* **Latencies.**

  | block | latency (cycles) |
  |---|---|
  | `cordic_vectoring` | `ITER+2` |
  | `cordic_rotation` | `ITER+3` |
  | `cordic_sqrt` | `NITER+4` |
  | `dscs` | `2·ITER+NITER+11` = 70 |
  | `iq_pi` | 2 |
  | `fb_linearizer` | 4 |
  | `cavity_controller` | 4 |
  | `if_modulator` | 2 |
  | `dscs_top`, inputs to `u0`/`u1` | 78 |
  | `dscs_top`, inputs to `dac0`/`dac1` | 80 |

* **Closed-loop delays.** Both the linearizer loop and the cavity loop have
  these pipeline delays inside them. The gains used in the testbench (see
  below) are stable with them.

### Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `RMAX` | 27500 | `dscs`, `dscs_top` | constant output amplitude, integer I/Q units |
| `ITER` | 18 | circular CORDICs | iterations |
| `NITER` | 23 | `cordic_sqrt` | distinct hyperbolic shifts (25 stages) |
| `FTW` | `32'h4000_0000` | `nco`, `dscs_top` | IF tuning word, `f_IF = FTW/2^32·f_s` |
| `AMP` | 32767 | `nco` | carrier amplitude |
| `GAIN_FRAC` | 12 | PI blocks | fraction bits of `kp`, `ki` |

## What is and is not modelled

These are choices of this design, where the published description leaves
the point open:

* All widths.
* The value of `RMAX`. 27500 matches the integer amplitude scale of the
  published baseband captures.
* The sample clock.
* The over-range behaviour.
* The PI gain format and anti-windup.
* The sign convention of the cavity error.
* The NCO: the original used a vendor NCO core. This NCO is a functional
  equivalent built on the rotation CORDIC.
* The IF: the nominal 805 MHz RF minus the quoted 776.84375 MHz LO is
  28.15625 MHz, not the quoted 25.15625 MHz IF. The design follows the
  quoted IF, and `FTW` is a parameter.

Not built:

* The separator outputs are not gated off when the RF pulse ends. With a
  zero input they remain two opposite vectors of length `RMAX` (at ±90°). Switching
  the amplifiers off between pulses is left to the surrounding system.
* Four- and eight-port separators are not built. They are only described as
  possible extensions.
* The beam feedforward controller is not built. Its output is the `ff` port.
* No analog part is built.

## Verification

Every block has a self-checking testbench in `tb/`. Each testbench compares
the block against an independent reference (real arithmetic or an integer
model), checks the latency, and prints
`TB_RESULT checks=N failures=M`.

* `tb_cordic_vectoring`, `tb_cordic_rotation`, `tb_cordic_sqrt`: random and
  edge-case inputs against `$sqrt`, `$atan2`, `$sin` and `$cos`.
* `tb_dscs`: random vectors up to 1.15·`RMAX` and a staircase input. It
  checks:
  * the outputs against the equations above, to 4 LSB;
  * the constant envelope;
  * exact `d0 + d1 = 2s`;
  * the over-range path;
  * the 70-cycle latency.
* `tb_iq_pi`, `tb_fb_linearizer`, `tb_cavity_controller`:
  * bit-exact integer models;
  * the integrator clamp;
  * enable/disable;
  * closed-loop settling against a drooping amplifier or a first-order
    cavity model.
* `tb_nco`, `tb_if_modulator`: carrier values for two tuning words, and
  exact modulator arithmetic including saturation.
* `tb_dscs_top`: the whole design at its default parameters, closed around
  `tb/rf_plant_model.sv`, a behavioural baseband model. The model has two
  amplifiers with linear gain droop and fixed phase offsets, a combiner
  `(y0 + y1)/2` and a first-order cavity. The test runs three RF pulses at an
  assumed 100.625 MHz clock:
  1. 700 µs, droops 10 %/8 %, linearizers off. The amplifier outputs sag and
     the cavity loop raises `|s|` by about 8 %.
  2. The same pulse with the linearizers on. The amplifier outputs stay
     within 1 % of `RMAX`, `|u0|` rises by about 10 %, and `|s|` stays flat.
  3. 1.0 ms, 14 % droop on both amplifiers, linearizers on. `|u0|` reaches
     about 31 970, within the 16-bit range.

  In every pulse the cavity field ends within 1 % of the set point. On every
  sample, the test checks the constant envelope, `r0 + r1 = 2s` and the DAC
  samples. It also requires each mechanism to occur at least once: over
  range, linearizer off, linearizer on, droop left to the cavity loop, and
  droop compensated locally. The whole run takes about a second.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_dscs_top rtl/dscs_pkg.sv tb/tb_dscs_top.sv -o sim
./obj_dir/sim
```

Replace `tb_dscs_top` by any other testbench name. `dscs_pkg.sv` must be read
first, and the remaining files are found through `-y`. For linting, use
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/dscs_pkg.sv rtl/<module>.sv`.

## Files

* `rtl/dscs_pkg.sv`: types (`iq_t`, `phase_t`), the arctangent table, CORDIC
  gain constants and saturation.
* `rtl/cordic_vectoring.sv`, `rtl/cordic_rotation.sv`, `rtl/cordic_sqrt.sv`:
  the three CORDICs.
* `rtl/dscs.sv`: the separator.
* `rtl/iq_pi.sv`, `rtl/fb_linearizer.sv`, `rtl/cavity_controller.sv`: the
  control loops.
* `rtl/nco.sv`, `rtl/if_modulator.sv`: IF generation.
* `rtl/delay_line.sv`: an alignment register chain.
* `rtl/dscs_top.sv`: the top.
* `tb/`: one testbench per block, plus `rf_plant_model.sv`.
