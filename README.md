# Digital power factor correction controller

A load at the end of a distribution feeder (induction motors, furnaces,
lighting) draws a lagging current, typically at a power factor near 0.8. The
extra reactive current raises line losses and the voltage drop. This
controller measures the angle between the feeder voltage and current. When the
power factor leaves a narrow lagging band, 0.95 to 0.97 by default, it
switches sections of a shunt capacitor bank in or out, one at a time.

Two independent ways of measuring the angle are built side by side in
`pfc_top`, and each drives its own capacitor bank output:

| method | input | measures | angle unit | bank output |
|---|---|---|---|---|
| state diagram | 1-bit signs of voltage and current | time between the ends of the two positive half cycles | samples | `cap_en_s` |
| block diagram | signed A/D samples of voltage and current | cos φ from power and energy sums | 0.1 degree | `cap_en_b` |

The state-diagram method is tiny: two 4-bit counters, two 2-bit state
registers and a subtractor. It is the one the case study below was sized
for. The block-diagram method needs multipliers and a divider, but it resolves
the angle far more finely. Everything is synchronous to a single clock with a
synchronous, active-high reset.

## Worked example: the 0.8 lagging load

The reference case is a plant drawing 24 MW + j18 MVAr (power factor 0.8
lagging, φ = 36.87°) at 11 kV and 50 Hz. The aim is 0.96 lagging (φ = 16.26°),
which takes about 11 MVAr of compensation. At 11 kV that is roughly 289 µF,
built from nine 33 µF sections. One section supplies
V²·2πf·C = 1.2545 MVAr. With all nine connected, the net load is
24 + j6.71 MVA, a power factor of 0.963, inside the band. With eight, it is
0.949, just outside. The bank therefore has `N_CAPS = 9` sections, and on
this load the controller ends with all nine connected. `tb_pfc_top` runs this
case in closed loop.

## State-diagram phase measurement

`phase_angle_fsm` is a four-state machine with a sample counter. It advances
once per `sample_en` pulse, and `en` is the sampled sign of the signal
(1 = positive):

```
S0 (after reset/restart) --en=0--> S1     S0 --en=1--> S2
S1 --en=0--> S1                           S1 --en=1--> S2
S2 --en=1--> S2                           S2 --en=0--> S3 (exit, frozen)
```

The counter counts every sample taken in S0, S1 and S2, including the one that
moves the machine into S3. The final count is therefore the number of samples
from the start of the measurement up to and including the first low sample
after a positive half cycle.

`phase_diff_meter` runs two of these machines from the same start: one on the
current sign (`en1`) and one on the voltage sign (`en2`). `phase_comparator`
subtracts the smaller count from the larger. If the current lags, its positive
half cycle ends later, so its count is larger. The difference is the phase
angle in samples, and `lagging` records which count was larger. For example,
counts 13 (current) and 5 (voltage) give a difference of 8, lagging.

Three points matter when you use this method:

* **Start timing.** The machines measure once per start and then stay in S3.
  A new measurement needs `meas_restart` (or reset). Both counts must fit in
  4 bits, so with the default 16 samples per half cycle the restart must come
  during the voltage's positive half cycle. It must also leave enough time for
  the lagging current to finish its half cycle within 15 samples. Restarting
  at the voltage peak gives a voltage count of 9, which leaves room for up to
  6 samples (67°) of lag. A counter that reaches 15 saturates and raises
  `overflow`. The top then discards that measurement (`meas_valid` stays low)
  and leaves the bank alone.
* **Resolution.** One sample is 180°/16 = 11.25°. The 0.95–0.97 band
  (18.19°–14.07°) lies inside one step. The thresholds in samples are the
  band edges truncated: `PHI_UPPER_CNT = PHI_LOWER_CNT = 1`. In effect, a lag
  of 2 or more samples connects a section, 1 sample holds, and 0 samples or a
  lead disconnects. Whether a true 15.6° reads as 1 or 2 samples depends on
  where the zero crossings fall between samples. To get finer steps, raise
  `CNT_W` and the sample rate together, and change `SAMPLES_PER_HALF_CYCLE` in
  `pfc_pkg`.
* **Sense.** `lagging` comes from comparing the two counts. Equal counts
  (`in_phase`) are treated as "not lagging", so they disconnect a section.

## Block-diagram power factor measurement

`pf_block_path` takes one voltage/current sample pair per `sample_valid`
pulse. `WINDOW = 32` pairs should span exactly one line cycle.

1. `vi_multiplier` forms v·i. Two more copies form v² and i².
2. `power_integrator` sums each product over the window, giving
   P = Σv·i, V2 = Σv² and I2 = Σi².
3. `pf_divider` computes **cos²φ = P² / (V2·I2)** as an 8-bit fraction. It is a
   restoring divider that produces one bit per clock and saturates at 255 for
   cos²φ = 1. Dividing the squares avoids the square roots that RMS values
   would need. For whole cycles of sinusoids the result is exact, whatever the
   amplitudes. `nonpositive` flags P ≤ 0 (reverse power, |φ| ≥ 90°), and
   `no_signal` flags a zero divisor.
4. `pf_angle_lut` turns cos²φ into φ in tenths of a degree. Entry k holds
   `round(acos(sqrt((k+0.5)/256)) * 1800/π)`. A constant function computes
   the table at elaboration, so no data file is needed. P ≤ 0 is reported as
   90.0°.

Near the band the table step is about 0.4°. Near unity it is coarse: one step
of cos²φ below 1 is already 3.6°, so angles under about 4° are not resolved.
That does not matter for the band decisions. A power factor magnitude has no
sign, so this method cannot tell leading from lagging on its own. `pfc_top`
supplies the sense from the latest valid state-diagram measurement
(`lag_sense`). After reset, `lag_sense` is "lagging", which is how a feeder
load normally starts.

There is one result per window. `angle_valid` is registered PF_W + 5 = 13
clock edges after the edge that takes the window's last sample. The
integrators restart immediately, so windows can follow back to back.
Assertions check two things: the three integrators stay in step, and the
divider is idle whenever a sum arrives.

## Capacitor bank switching

`cap_bank_controller` acts on each new angle. It connects one more section
when the load lags by more than `PHI_UPPER`. It disconnects one section when
the angle is below `PHI_LOWER` or the load leads. Inside the band it does
nothing. Each method has its own thresholds, expressed in its own angle unit:

| instance | unit | `PHI_UPPER` (pf 0.95) | `PHI_LOWER` (pf 0.97) |
|---|---|---|---|
| state diagram | samples | 1 | 1 |
| block diagram | 0.1° | 182 | 141 |

Sections are used in a fixed order. `cap_en` is a thermometer code: section 0
is connected first and disconnected last, and `n_on` gives the count. A request
to connect when all sections are in, or to disconnect when none are, is
refused and reported as a one-cycle `at_max` or `at_min` pulse. Every change is
reported as a one-cycle `connect` or `disconnect` pulse on the clock after the
measurement. In `pfc_top` these four pulses come out as
`events_s` / `events_b` = {at_min, at_max, disconnect, connect}. Each `cap_en`
bit stands for one switched section. In a three-phase plant, that bit switches
all three phases of the section.

## Top level: `pfc_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous reset (disconnects both banks) |
| `meas_restart` | in | 1 | start a new state-diagram measurement |
| `sign_sample_en` | in | 1 | takes one sample of `en1`, `en2` |
| `en1`, `en2` | in | 1 | current sign, voltage sign |
| `count1`, `count2`, `phase_diff` | out | 4 | current count, voltage count, difference |
| `meas_valid` | out | 1 | pulse: a measurement without overflow completed |
| `meas_overflow`, `meas_done`, `in_phase`, `lag_sense` | out | 1 | status of the state-diagram measurement |
| `state1`, `state2` | out | 2 | S0..S3 of the two machines |
| `cap_en_s`, `n_on_s`, `events_s` | out | 9, 4, 4 | bank driven by the state-diagram method |
| `adc_valid` | in | 1 | one voltage/current sample pair |
| `v_sample`, `i_sample` | in | 8 | signed A/D samples |
| `angle_valid`, `angle_ddeg` | out | 1, 10 | block-diagram angle, 0.1° |
| `pf2`, `p_nonpositive`, `no_signal` | out | 8, 1, 1 | cos²φ and flags |
| `cap_en_b`, `n_on_b`, `events_b` | out | 9, 4, 4 | bank driven by the block-diagram method |

Parameters, with their defaults in brackets: `CNT_W` (4), `N_CAPS` (9),
`SAMPLE_W` (8), `WINDOW` (32), `PF_W` (8) and `ANG_W` (10), plus the four
thresholds. The package `pfc_pkg` holds the state type, the band in hundredths
of a degree, and the conversion of the band into each method's unit.

The A/D converters, the current and voltage transformers with their scaling,
and the capacitor bank itself are outside this RTL. Their signals are the
ports listed above.

## What comes from the method and what is this design's own

Taken from the correction scheme:

* the four-state counting machine and its transitions;
* the two counters and subtract-the-smaller comparator;
* 4-bit counts;
* the multiply → integrate → divide → table chain of the block-diagram method;
* comparison against an upper and a lower reference angle;
* the 0.95–0.97 band;
* nine sections.

Chosen here:

* The S0 transition on a high sample goes to S2. This is the only reading that
  makes the two branches of S0 differ.
* S3 is absorbing until a restart, and the restart input exists.
* The counter saturates and flags overflow instead of wrapping.
* `en1` is the current and `en2` the voltage.
* The lagging flag is reported alongside the difference.
* The divisor is V2·I2, and the division works on squares.
* The table is indexed by cos²φ.
* The 8-bit samples and the 32-sample window.
* One section is switched per measurement, in thermometer order.
* Leading angles disconnect.
* The block-diagram method borrows the sign from the state-diagram method.
* 16 samples per half cycle is assumed when converting the band into samples.

Not provided: any protection of the bank, such as discharge delay before
reconnection, or limits on switching rate. The scheme does not describe these,
so add them before driving real switchgear.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module's outputs with values worked out independently: integer arithmetic,
`$acos`/`$sqrt`, or a small model of the expected behaviour. Each has a
watchdog and ends with a `TB_RESULT checks=N failures=M` line.

* `tb_phase_angle_fsm`: directed and random sign sequences, with and without
  idle cycles; every transition; restart; saturation.
* `tb_phase_comparator`: all 256 count pairs.
* `tb_phase_diff_meter`: sampled square waves at every shift; the 13/5 → 8
  example; overflow.
* `tb_cap_bank_controller`: a bank model over 2000 random angles and both
  threshold sets.
* `tb_vi_multiplier`, `tb_power_integrator`, `tb_pf_divider`,
  `tb_pf_angle_lut`: corner cases, random values, and exact latencies.
* `tb_pf_block_path`: sinusoids at random amplitudes and angles. cos²φ must
  match exactly. The angle must be within 1° of the true angle (4° below 10°).
  Latency, reverse power and no-current cases are also covered.
* `tb_pfc_top`: the closed-loop test at default parameters. A load model
  (24 + j18 MVA, then heavier, lighter, leading and reverse loads) is fed
  from the two bank outputs. The test checks, in every round, the counts, the
  angle and the number of connected sections. At the end it requires that
  every controller action occurred for both methods: connect, disconnect,
  full bank, empty bank, hold. It also requires overflow, leading, in-phase,
  S0→S2, no-signal and reverse-power rounds.

To simulate with Verilator 5 from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl rtl/pfc_pkg.sv tb/tb_pfc_top.sv --top-module tb_pfc_top
./obj_dir/Vtb_pfc_top
```

Replace `tb_pfc_top` with any other testbench name to run that testbench. All
of them finish in well under a second.

## Limits

* With the default 4-bit counters, the state-diagram method can only tell
  "2 or more samples of lag", "1 sample" and "0 or leading". On the reference
  load it connects all nine sections. It may keep asking for more (reported
  as `at_max`) when sampling rounds the residual 15.6° up to 2 samples.
* That method depends on correct restart timing (see above). A badly timed
  restart is caught by `overflow`, but it costs a measurement.
* The block-diagram method assumes that `WINDOW` samples span whole line
  cycles. Otherwise P, V2 and I2 carry a ripple term and the angle is biased.
* Either method can switch a section on every measurement. Real capacitor
  banks need a minimum time between operations, which is not built in.
