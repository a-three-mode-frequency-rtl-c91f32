# Three mode frequency feedback controller

A single-loop PID controller that needs no A/D or D/A converter. The measured
process variable c(t) (0–10 V) drives a voltage controlled oscillator, and the
controller simply counts its pulses over short apertures. On the output side a
stepper motor turns a potentiometer: the motor integrates the step pulses it
receives, so the controller only has to emit, once per sample period, the
*change* of the control output. The controller therefore computes the velocity
form of PID with up/down counters, serial pulse-rate multipliers and a
nine-state sequencer, all in three-decade BCD.

This RTL implements the controller described in L. R. Schneider, *A Three Mode
Frequency Feedback Controller* (M.Sc. thesis, University of Alberta, 1976), as
synchronous SystemVerilog. The original was built from TTL counters and a
NAND-gate sequencer; its gate-level schematics and timing diagram are not
reproduced here, so the block structure and arithmetic follow the original
while clocking, state durations and a few mechanisms are this design's own
(see *Departures and limits*).

## The control law in counts

With setpoint r, feedback samples c(s-1) at the start and c(s) at the end of
a sample period, and gains K, Gi, β, each sample produces one correction

```
Δθ = K · [ (c(s-1) − c(s))                      proportional
         + Gi · (r − c(s-1))                    integral
         + β · (c(mid) − (c(s-1) + c(s)) / 2) ]  derivative
```

Δθ is a number of stepper steps. The potentiometer adds them up, so the
output voltage is K·[e + (1/Ti)∫e + Td·de/dt] in the usual PID form.

All c values are VCO counts over one aperture: with a 10 Hz–10 kHz VCO for
0–10 V and a 0.08 s aperture, one volt is about 80 counts and full scale is
about 800, inside the ±999 range of a three-decade counter. One output step
is 0.05 V (200 steps per turn of the potentiometer).

### The derivative as a deflection

The derivative term needs the change of slope of c(t) between two samples,
(Δc(s-1) − Δc(s)). Measuring two slopes would need two more measurements.
Instead the controller measures c once more, half way through the period,
and compares it with the chord through the two end samples. The difference
x = c(mid) − (c(s-1)+c(s))/2 is the deflection of the curve from its chord.
For a curve of constant curvature, c(t) = a·t²/2 over a period Δt:

```
change of slope   = a · Δt
deflection |x|    = a · Δt² / 8
```

so the deflection is proportional to the change of slope (factor 8/Δt), and
its sign matches as long as c(t) is monotonic within the period. The
derivative gain β absorbs the factor: β = Td · 8/Δt (3.72·Td at a 2.15 s
period). A step input breaks the monotonic assumption, which is why the
derivative term is only meaningful for disturbances that rise over a
period or more.

## One sample period

Four counters do the work: A and B measure, the accumulator collects the three
terms, C drives the motor. The sequencer (`sequence_generator`) steps through
nine states; the defaults are in 10 ms timebase ticks.

| # | state   | ticks | what happens |
|---|---------|-------|--------------|
| 1 | `AP1`   | 8   | A is preset to the setpoint and counts the VCO **down**; B, cleared, counts it **up**. Afterwards A = r − c(s-1), B = c(s-1). |
| 2 | `INT`   | 40  | A × Gi is added to the accumulator (serial multiply, A ends at 0). |
| 3 | `WAIT1` | 42  | rest of the first delay α = 90 ticks. |
| 4 | `AP2`   | 8   | A, cleared, counts the VCO up: A = c(mid). |
| 5 | `WAIT2` | 82  | second delay α. |
| 6 | `AP3`   | 8   | A and B both count the VCO **down**: A = c(mid) − c(s), B = c(s-1) − c(s). |
| 7 | `HALF`  | 9   | B is emptied: each B pulse adds to the accumulator (proportional term) and every second one is taken from A, leaving A = c(mid) − c(s) − B/2 = x. |
| 8 | `DER`   | 9   | A × β is added to the accumulator. |
| 9 | `OUT`   | 9   | the accumulator is strobed into C; C is stepped out while the next period runs. The accumulator is cleared when `AP1` starts. |

The period is 215 ticks = 2.15 s. The integral term uses c(s-1) instead of
c(s) so that it can be evaluated in the dead time between the first and second
apertures. Changes of c between the end of `AP3` and the next `AP1` (states
7–9, about 12 % of the period) are not seen by the proportional term: a very
fast disturbance that falls there is acted on only through the integral term.

Because every period measures its own c(s-1), c(mid) and c(s), no value
is carried from one period to the next apart from the setpoint. The first
period after reset is already a valid sample.

## Serial arithmetic

### Signed BCD counters

`bcd_updown_counter` holds three BCD digits and a sign bit. Positive numbers
are plain BCD with the sign set. Counting down through zero gives 999 with the
sign cleared, so −x is held as 1000 − x (−20 is `980`, sign 0). Counting up
from 999 while negative returns to 000 with the sign set. "Toward zero" is
therefore *down* for a positive and *up* for a negative value, and every
transfer below empties its source by counting it toward zero. Counts beyond
±999 are refused and flagged (`ovf`).

### Multiplying by n/10

`serial_multiplier` reproduces the original pulse-rate multiplier. An
oscillator feeds two dividers. A programmable divide-by-n (`divide_by_n`, n on
three BCD switches) counts the source toward zero. A fixed divide-by-10 pulses
the destination in the direction of the source's sign. When the source reaches
zero, its zero detect stops both dividers. The source empties after |v|·n
oscillator ticks, by which time the destination has received
floor(|v|·n/10) pulses. The gain switch is therefore set to ten times the
gain:

| gain | switch input | range with 3 digits |
|------|--------------|---------------------|
| K*   | `k_sw` = 10·K*   | 0.1 – 99.9 |
| Gi   | `gi_sw` = 10·Gi  | 0.1 – 99.9 |
| β    | `beta_sw` = 10·β | 0.1 – 99.9 |

A setting of 0 switches the term off. The overall proportional gain is
K = K* · (0.05 V/step) · (80 counts/V) = 4·K*.

### Output stage

`stepper_output` is the same arrangement with counter C as the source and the
motor as the destination. C is counted at f_osc/n (n = `k_sw`) and the motor is
stepped at f_osc/10, clockwise for a positive correction. With the default
500 Hz output oscillator the motor runs at 50 steps/s. A correction of +20 at
`k_sw` = 10 gives 20 clockwise steps; −20 (held as 980) gives 20
counterclockwise steps. If the next strobe arrives before C is empty, the rest
is dropped and `step_cut_short` pulses. At 50 steps/s a 2.15 s period can step
out about 107 steps.

## Sample rate

`sample_rate` divides the clock into the 10 ms timebase and lets `rate_sel`
stretch it by 1, 2, 4 or 8, i.e. sample periods of 2.15, 4.30, 8.60 and
17.2 s. To keep the counts (and the resolution) unchanged, the VCO pulses are
divided by the same factor: a longer aperture sees a proportionally slower
count. The VCO input is a free-running square wave. It is synchronised with two
flip-flops, and its rising edges are counted. Each half-cycle must therefore
last at least two clock cycles; at 100 kHz this allows up to 25 kHz.

## Top level: `ffc_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | 100 kHz clock, asynchronous active-low reset |
| `vco_in` | in | 1 | VCO square wave (asynchronous) |
| `setpoint` | in | 12 | three BCD digits, in VCO counts per aperture (≈ 0.8 + 79.9·V) |
| `k_sw`, `gi_sw`, `beta_sw` | in | 12 each | gain switches, BCD, 10× the gain |
| `rate_sel` | in | 2 | sample time ×1, ×2, ×4, ×8 |
| `step`, `cw` | out | 1 | one-cycle step pulse and its direction |
| `step_busy`, `step_cut_short` | out | 1 | C not yet empty / reloaded before empty |
| `state` | out | 9 | one-hot sequencer state |
| `sample_strobe` | out | 1 | pulses when a correction is strobed into C |
| `correction`, `c_value` | out | 13 | last correction and counter C (`sbcd_t`: sign + 3 BCD digits) |
| `overrun` | out | 1 | a serial transfer had not finished when its state ended |
| `ovf` | out | 1 | a counter saturated |

Parameters (defaults in brackets): `BASE_DIV` clock cycles per 10 ms tick
[1000], `STEP_OSC_DIV` clock cycles per output-oscillator tick [200, i.e.
500 Hz], `MUL_OSC_DIV` clock cycles per multiplier-oscillator tick [1], and
`END_COUNT`, the cumulative end tick of each state
[`'{8,48,90,98,180,188,197,206,215}`]. To run from a different clock, scale
`BASE_DIV` and `STEP_OSC_DIV` with it. To retime the sequence, edit
`END_COUNT`; the multiplication windows must stay long enough for
|source|·n multiplier ticks (`overrun` reports when they are not).

## Departures and limits

Taken from the original: the four-counter configuration, the three
measurements and their order, the deflection measurement for the derivative,
the n/10 serial multiplier and its switch convention, BCD with 1000-complement
negatives, counter C and the stepper drive, the nine-state sequencer, the
0.08 s aperture and the 2.15 s period, and a sample time that can be stretched
together with the VCO.

This design's own choices:

- Synchronous logic on one 100 kHz clock with clock enables, in place of
  separate oscillators and ripple counters. The multiplier oscillator runs at
  the clock rate.
- State durations other than the apertures and the total period: α = 90
  ticks, and 40/9/9 ticks for the integral, half and derivative transfers.
- The proportional transfer and the B/2 subtraction share one pass that
  empties B. B/2 is truncated toward zero. The result A − B/2 equals the
  original rule ("add B/2 to a negative A, subtract it from a positive A")
  whenever A and B have the same sign, which holds for a monotonic c(t).
- The sequencer changes state in one clock cycle; the original NAND ring
  briefly had two states high.
- Counters saturate at ±999 instead of wrapping. A zero gain switch
  disables its term. A correction not yet stepped out is dropped at the next
  strobe.
- Sample-rate steps are powers of two.
- The delay α and the aperture T are meant to be adjustable. Here they
  are set by the `END_COUNT` parameter of the sequencer at build time. At run
  time they can only be stretched together with the whole period through
  `rate_sel`.

Limits worth knowing:

- With a gain of n/10 and whole-number switch settings, Gi = 0.25 and
  Gi = 0.12, the integral gains of the original tests, cannot be set; 0.2 or
  0.3 and 0.1 are the nearest.
- β above 99.9 (the original quotes a range up to 5580) needs more switch
  digits. A large β also needs a longer `DER` window.
- The derivative term assumes c(t) has no inflection within a period.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

- `tb_bcd_updown_counter`: random operations against an integer model,
  including −20 ↔ 980 and saturation.
- `tb_divide_by_n`: output on exactly every n-th tick, and none for n = 0.
- `tb_serial_multiplier`: floor(|v|·n/10) with the correct sign, in exactly
  |v|·n oscillator ticks.
- `tb_half_transfer`: B moved to the accumulator and B/2 taken from A, in
  |B| ticks.
- `tb_sequence_generator`: state order, per-state durations, 215-tick
  period, one-hot.
- `tb_sample_rate`: timebase spacing for each setting; VCO counts per tick
  independent of the setting.
- `tb_stepper_output`: step count and direction for the ±20 examples and
  random loads; 10 oscillator ticks per step; cut-short on reload.
- `tb_ffc_top`: the whole controller at its default parameters in closed
  loop. It uses behavioural models of the VCO (`tb/vco_model.sv`), of the
  stepper and potentiometer (`tb/stepper_pot_model.sv`), and of a first-order
  process (gain 1, time constant 10 s). For every sample it rebuilds the
  correction from the counter contents after each aperture and compares it
  with the strobed value. It checks the steps given for each correction, the
  sample period in clock cycles and the aperture counts against the VCO
  voltage. It runs a +1 V step disturbance, a setpoint change, a ramped
  disturbance with β = 3.0 and a disturbance at 4.30 s sampling, and requires
  settling within 0.1 V each time. It counts integral, proportional and
  derivative terms, negative corrections, both directions of rotation and
  doubled periods; each must occur. It simulates about 135 sample periods
  (≈ 5 minutes of process time, 30 M clock cycles) in roughly 20 s.
- `tb_ffc_series_b`: the derivative workload. A second-order process
  (`tb/process_model.sv`; damping 0.7 and 0.2 rad/s chosen for the test) is
  disturbed by a 1 V step spread over one sample period, first with β = 0 and
  then with β = 3.0. Each correction is checked, and the loop must settle
  within 0.1 V both times.
- `tb_ffc_series_c`: the sample-time workload. A 1 V step disturbance is
  applied at 2.15, 4.30 and 8.60 s sampling on the 10 s first-order
  process. The first corrective step comes after 2.17, 4.32 and 8.62 s. The
  test requires the delay and the peak deviation to grow with the sample time.
  At 2.15 and 4.30 s the loop must settle within 0.1 V. At 8.60 s it is left
  with a residual oscillation, which is what sampling too slowly for the
  process looks like.

Running a testbench with Verilator (from the directory holding `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ffc_pkg.sv tb/tb_ffc_top.sv --top-module tb_ffc_top -o sim
./obj_dir/sim
```

Replace `tb_ffc_top` with any other testbench name.

## Files

- `rtl/ffc_pkg.sv`: counter types (`bcd_t`, `sbcd_t`), state enum, BCD
  helper functions.
- `rtl/bcd_updown_counter.sv`: signed three-decade counter (A, B, C,
  accumulator).
- `rtl/divide_by_n.sv`: BCD programmable divider.
- `rtl/serial_multiplier.sv`: n/10 pulse-rate multiplier.
- `rtl/half_transfer.sv`: proportional transfer and B/2 correction.
- `rtl/sequence_generator.sv`: nine-state sequencer.
- `rtl/sample_rate.sv`: timebase, sample-rate stretch, VCO input.
- `rtl/osc_divider.sv`: clock-enable generator for the oscillators.
- `rtl/stepper_output.sv`: counter C and the stepper drive.
- `rtl/ffc_top.sv`: the controller.
