# ADC clock-jitter measurement and compensation

A sample that an ADC takes at (k + eps[k]) T_s instead of k T_s carries an
error of roughly eps[k] T_s times the signal slope. This design measures eps[k]
for every sample with a stochastic time-to-digital converter (TDC). It then
removes the error digitally:

    D_c[k] = D_i[k] + (eps_hat[k] / eps_u) * D_u[k]

where D_u[k] is a fixed-tap FIR estimate of eps_u times the slope. The TDC has
an unknown transfer curve, because its comparators have random offsets.
Nothing is calibrated in the factory. Instead, a mapping table turns each TDC
code into a jitter value, and the table is trained in the background from the
ADC samples themselves. A long reconstruction filter predicts what each sample
should have been, and the difference to the actual sample gives one jitter
estimate per window.

Two systems are built, side by side, in `jitter_comp_top`:

| | clock situation | TDC measures | calibration processor |
|---|---|---|---|
| variant 1 (`s1_*`) | clean external clock `clk_e`; a delay buffer makes the jittery ADC clock `clk_i` | absolute jitter eps[k] (`clk_e` against `clk_i`) | `jcp1`: one table, one estimator |
| variant 2 (`s2_*`) | the external clock `clk` itself jitters; a passive delay line gives `clk_d`, one period late | cycle jitter tau[k] = eps[k] - eps[k-1] (`clk_d` against `clk`) | `jcp2`: table, lossy accumulator, two estimators |

Variant 2 is the main system, sized as in the table below. The ADC, the
variable delay buffer with its delay-locked loop, and the delay line are analog.
They are not part of the RTL; their signals are ports.

## Block map

```
 variant 2                                        variant 1
 clk_d, clk --> stochastic_tdc --dt--> jcp2       clk_e, clk_i --> stochastic_tdc --dt--> jcp1
                  (127 x tcmp,          |  jmt (128 x 23)            |  jmt
                   tdc_adder)           |  lossy_acc                 |  jitter_estimator
                                        |  jitter_estimator x2       |     srf_mac, jitter_calc
                                        |     srf_mac, jitter_calc   |  hr_rom
                                        |  hr_rom (shared)           |
 s2_di ----------------------------> jcf <-- eps_hat   s1_di --> jcf <-- eps_hat
                                        \-- D_u, centre sample --> estimators
```

`jc_pkg` holds the number formats and the coefficient formulas.

| parameter | default | meaning |
|---|---|---|
| `L` | 127 | comparators in the TDC; code range 0..L |
| `STEP_PS` | 1.0 | spacing of the comparator offsets in the model |
| `M` | 7 | JCF half length (15 taps) |
| `N` | 1024 | SRF half length; one estimate per 2N+1 = 2049 samples |
| `A_SHIFT` | 13 | table update gain a = 2^-13 |
| `B_Q` | 58982 | lossy accumulator b = 0.9 in 16 fractional bits (63570 for 0.97) |

## Number formats

| quantity | width | scale |
|---|---|---|
| ADC word D_i, D_c | 16, signed | LSBs |
| JCF tap input | 8 | top 8 bits of D_i |
| h_s[n] = sinc(n - eps_u), eps_u = 2^-5 | 6, signed | 2^-9 (largest tap 16) |
| D_u | 18, signed | twice the true value in D_i LSBs |
| eps_hat, eps_c, T(m), tau | 23, signed | 2^-29 of T_s (one LSB is 0.0186 fs at 100 MS/s) |
| h_r[n] = 5 sin(4 n pi / 5) / (n pi) | 18, signed | 2^-17 |

Because eps_u is a power of two, the correction needs no divider:
D_c = D_i + round(D_u * eps / 2^25), saturated to 16 bits. The h_s taps and
the ROM contents are computed during elaboration from closed forms, so there
are no data files. sin(pi (n - 2^-5)) and sin(4 n pi / 5) take only a few
distinct values, so integer constants give the exact rounded results.

## The TDC

`tcmp` is one timing comparator. It is written as what it is digitally: a
flip-flop clocked by V2 that samples V1, so its output is 1 when V1 rose
first. The comparator's offset t_os is a simulation-only transport delay on V1
(positive offset) or on V2 (negative offset). Synthesis ignores delays, so
each comparator becomes one flip-flop. `stochastic_tdc` places the offsets at
(i - 63) ps. That is the ideal uniform 1 ps TDC that the performance
simulations assume, so the code is m = 63 + ceil(t_d / 1 ps), clamped to
0..127. A real TDC would have Gaussian offsets. The mapping table absorbs
whatever the curve is, so nothing downstream depends on the offsets being
uniform. `tdc_adder` counts the ones and registers the code.

## Compensation filter (`jcf`)

The filter is a 15-sample delay line with 14 constant-coefficient products
summed into D_u, and one multiply-add for D_c. The centre sample and D_u are
brought out so that the estimators share this filter and need none of their
own. A sample registered at edge t appears on the taps after edge t+M+1 and on
`dc` after edge t+M+2. The jitter estimate enters `EPS_LAT` clocks after its
sample and is delayed internally to meet it. `EPS_LAT` is 1 for variant 1 and
2 for variant 2.

## Background calibration: estimator, SRF and table

A jitter estimator (`jitter_estimator`) sees the sample stream and D_u:

1. `srf_mac` rebuilds the centre sample of a window of 2N+1 samples from its
   2N neighbours: D_r[k] = sum over n of h_r[n] (D_i[k-n] + D_i[k+n]). This is
   an ideal low-pass reconstruction for signals below 0.4 f_s, with the centre
   tap removed. It uses one multiplier and one accumulator. The samples stream
   through in order, each is multiplied by the coefficient for its distance
   from the centre, and the centre itself is skipped. A window therefore costs
   2N+1 clocks and needs no sample memory, and the next window starts right
   after it.
2. When the window passes its centre, the estimator latches D_i, D_u and the
   TDC code of that sample.
3. `jitter_calc` computes eps_c = (D_r - D_i) * eps_u / D_u, that is
   (D_r - D_i) * 2^25 / D_u. It uses a serial restoring divider: 23 clocks, or
   one clock if the result would exceed the 23-bit range (it saturates) or if
   D_u = 0 (no estimate).
4. `jmt` moves the entry of that code towards the estimate:
   T = T + round((eps_c - T) / 2^13).

A single estimate is very noisy. The neighbours are jittered too, and the
finite SRF leaves an error proportional to the tangent of the signal phase.
That error is large near the peaks of a sine, where D_u is small. The table's
low-pass filter has a time constant of 8192 updates, and it is what averages
the error out. At one update per 2049 samples, the table takes about 10^8 to
10^9 samples to converge. That is seconds of real time, but far beyond what an
event-driven simulation covers (see below).

## Variant 2: cycle jitter and the two estimators (`jcp2`)

Without a clean reference, only tau[k] = eps[k] - eps[k-1] is measurable. The
table maps codes to tau_hat. A lossy accumulator,
eps_hat[k] = tau_hat[k] + b * eps_hat[k-1], rebuilds the absolute jitter. It
forgets with b < 1 so that a dc error in the TDC cannot run away.

Training needs eps_c[k] - eps_c[k-1] for the same sample k:

* JE1 and JE2 run in lock step, with the same window position counter and one
  ROM port each.
* JE2's input is JE1's input delayed by one sample, so JE1's window centres on
  D_i[k] and JE2's on D_i[k-1]. The two results come out together and their
  difference trains T(code of sample k).
* For a given code, the two reconstructed points are always T_s + tau(m)
  apart, not T_s, which biases the result. So when JE1 is at its centre, the
  sample D_i[k] that JE2 receives next, as the first neighbour after its own
  centre, is replaced by D'_i[k] = D_i[k] + (T(m) / eps_u) D_u[k]. That is the
  sample moved back in time by the current table value, read through the
  table's second read port.
* An update happens only when both estimates are usable. The first window
  after reset is skipped, because JE2 then starts with a stale register.

## Timing summary

For the sample taken at clock edge k (ADC word and TDC code both registered at
edge k+1):

| output | valid after edge |
|---|---|
| `sX_dt` | k+1 |
| `s1_eps_hat` | k+2 |
| `s2_eps_hat` | k+3 |
| `sX_dc` (with `sX_dc_valid`) | k+M+3 |
| table update for a window centre | about N + M + 30 edges after the centre sample (end of the window plus the division) |

All logic of a variant runs on its own ADC clock: `clk` for variant 2, `clk_i`
for variant 1. Resets are asynchronous and active low. The tables start at
zero, so D_c = D_i until they have learned.

## What the testbenches show

Every block has a self-checking testbench in `tb/` that compares against
independent reference arithmetic (`tb_ref_pkg`: floating-point coefficients,
64-bit integer models). Most run at the default sizes. `srf_mac`, the
estimator and the two processors use N = 16 and a large update gain so that
many windows fit in a short run. The TDC testbench also runs the finer
converter with 236 comparators at 0.25 ps (8-bit code), and the accumulator
testbench also runs b = 0.97, the setting suited to that converter.

`tb_jitter_comp_top` runs both systems end to end with:
* clocks jittered by 3 ps rms, generated with femtosecond resolution;
* an ADC model that samples a 0.9 full-scale sine at the jittered instants;
* the real comparator models.

It checks bit-exactly, every clock, the TDC code against the applied jitter
and D_c against D_i + (eps_hat / eps_u) D_u. It also requires that every
mechanism happens: table updates, nonzero table values, D'_i interpolation,
lossy accumulation and changed samples. To let the tables learn within 150,000
samples, it uses N = 32 and a = 2^-7. It also uses a test tone, f_i/f_s =
0.2691, at which the 65-tap reconstruction is nearly exact. Results of that
run:

* both tables learn with the right sign: the slope of T(m) against the
  code-bin centre is 0.63 (variant 1) and 0.62 (variant 2), against an ideal
  of about 1;
* variant 1 lowers the error power of the samples against the ideal sine from
  112 to 64 LSB^2 (2.4 dB);
* variant 2 does not yet improve: 113 to 388 LSB^2. The accumulator multiplies
  the remaining per-code table error by about 1 / (1 - b^2) = 5.3, so variant 2
  needs much more training than variant 1. The roughly 10 dB improvement
  reported for this scheme relies on a converged table with a = 2^-13, which
  takes far more samples than can be simulated here.

`tb_jitter_comp_top_full` runs the top at its defaults (N = 1024,
a = 2^-13) for 25,000 samples, about 12 windows, with the same bit-exact
checks. At this size the tables move by only thousandths of a picosecond, so
it shows the datapath and the training machinery at full size, not learning.

## Departures and choices

* The number formats, rounding, saturation, reset values, register stages and
  handshakes are this design's own.
* The correction and D'_i are rounded to the nearest LSB; truncation would
  bias D_c by half an LSB.
* The JCF keeps full 16-bit samples in its delay line, because the centre
  sample is needed in full, and it has output registers. It therefore has more
  than the 200 flip-flops quoted for a minimal 15-tap version.
* eps_u = 2^-5 is chosen here. The method only needs it to be a power of two.
* SRF windows are back to back, each reconstructing its own centre sample.
* The divider is serial, which is enough at one result per 2N+1 clocks.
* The comparators have evenly spaced offsets (the ideal TDC of the
  performance study), not random ones.
* Not built: the ADC, the variable delay buffer with its delay-locked or
  phase-locked loop, and the passive delay line. These are analog and are
  modelled only inside the testbenches. A JCF with jitter-dependent taps
  (full interpolation filter) is not built, because this design uses the
  simplified fixed-tap form.

## Simulating

Everything is plain SystemVerilog for Verilator 5 (`--timing` is needed for
the comparator delays). From the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/jc_pkg.sv tb/tb_ref_pkg.sv tb/tb_jitter_comp_top.sv \
    --top-module tb_jitter_comp_top -o sim
./obj_dir/sim
```

Replace the testbench name for any other block (`tb_jcf`, `tb_jcp2`, ...).
Each testbench prints `TB_RESULT checks=<n> failures=<n>`. The end-to-end
testbench takes about 1.5 minutes, the full-size one about 25 seconds.

To change the design:
* `M` and `N` change the filter lengths; the widths follow.
* `L` and `MW` set the TDC and the table size. For the 0.25 ps TDC, use
  L = 236 and STEP_PS = 0.25, which gives 8-bit codes and a 256-entry table,
  with B_Q = 63570.
* `A_SHIFT` trades training speed against the final accuracy of the table.

The synthesizable part is everything except the comparator delays. The whole
top synthesizes, each comparator to a flip-flop.
