# Hybrid digital controller for a four-switch non-inverting buck-boost converter

A four-switch non-inverting buck-boost (NIBB) converter can regulate its
output whether the input is above, near or below it. Near unity conversion
ratio, plain buck or plain boost control runs out of duty-cycle range. A
linear voltage loop is also slow to answer a load step, and slowest in boost,
where the right-half-plane zero limits the bandwidth.

This controller uses two sets of rules:

- **Steady state.** A conventional two-loop current-programmed (CPM)
  controller runs with four operating modes and a switching frequency that
  follows the conversion ratio.
- **Load steps.** A hybrid transient controller takes over the switches. It
  measures how fast the output falls right after the step, which is
  proportional to the new load. It looks up an inductor current target Ith
  and, optionally, a voltage floor Vth. It then drives the state of the
  converter along a prescribed trajectory back to regulation. How large the
  output dip may be is therefore a programmable quantity, not an accident of
  the loop gain.

A self-tuning estimator makes the look-up independent of the actual output
capacitance. At start-up it discharges the capacitor with a known bleeder
current, measures the resulting slope, and fills the table from it.

All of it uses one ADC for the voltages, one DAC and one current comparator.
No current ADC is used.

## Power stage and switch sub-circuits

Switches Q1/Q2 form the input leg and Q3/Q4 the output leg, with the inductor
between the legs. The controller uses four switch combinations, named in
`nibb_pkg`:

| constant   | switches on | inductor voltage | use |
|------------|-------------|------------------|-----|
| `G_CHARGE` | Q1 + Q4     | +Vin             | rise, output cut off |
| `G_DISCH`  | Q2 + Q3     | −Vout            | fall, feeds output |
| `G_PASS`   | Q1 + Q3     | Vin − Vout       | straight through |
| `G_FREE`   | Q2 + Q4     | 0                | calibration: inductor parked, output left to the bleeder |

A simulation assertion in the top checks that the two switches of a leg are
never commanded on together. Dead time is left to the gate drivers.

## Operating modes and the comparator-driven sequence

`mode_select` computes Vmode = Vin − Vref on every ADC sample and classifies
it as follows:

| Vmode (codes, 5 mV each)      | mode           |
|-------------------------------|----------------|
| ≥ +ENH_BAND (+120, 0.6 V)     | buck           |
| 0 < Vmode < +ENH_BAND         | enhanced buck  |
| −ENH_BAND < Vmode ≤ 0         | enhanced boost |
| ≤ −ENH_BAND                   | boost          |

A mode change happens only when the sample still crosses the band edge after
being moved by HYST (10 codes, 50 mV) against the direction of the change.

`cpm_sequencer` latches the mode at the start of each switching period. It
then steps through one to three intervals per period. Each interval is ended
by the current comparator, with the DAC set to the level that interval
needs.

- **Buck, valley control.** The period starts with Q2+Q3 until the current
  falls to Iref, then Q1+Q3 for the rest of the period.
- **Boost, peak control.** The period starts with Q1+Q4 until the current
  reaches Iref, then Q1+Q3 for the rest of the period.
- **Enhanced buck.** The period has three intervals:
  - t_e1: Q2+Q3 down to Iref;
  - t_e2: Q1+Q4 up to Iref + `ie2_delta`;
  - t_e3: Q1+Q3 for the remainder.

  The short boosting interval gives the loop authority when Vin is only a
  little above Vout, where a pure buck would need a duty cycle near 100 %.
- **Enhanced boost.** The period has three intervals:
  - t_e1: Q1+Q4 up to Iref;
  - t_e2: Q2+Q3 down to Iref − `ie2_delta`;
  - t_e3: Q1+Q3 for the remainder.

The comparator is ignored for `BLANK` clocks after every interval change. A
Q1+Q4 interval is cut off after `CHG_MAX` clocks, so a saturated reference
cannot keep the output disconnected for whole periods.

### Frequency scaling

`period_gen` sets the period with this rule:

    period = max(T_MIN, T_MAX − SLOPE·|Vin − Vref|)

The defaults are 500 to 250 clocks, which is 100 to 200 kHz at a 50 MHz
clock. Close to unity the inductor ripple is small, so the converter runs
slowly and saves switching loss. Far from unity it runs faster to keep the
ripple down. A new period length takes effect at the next period boundary.

### Voltage loop

`voltage_compensator` is a PI controller on the error e = Vref − Vout:

    integ += e·2^(FRAC−KI_SH);   Iref = integ/2^FRAC + KP·e

The integrator and the output are clamped to the DAC range. Iref updates
once per switching period, and only when the error is non-zero. During a
transient or a calibration the loop is held. When a recovery ends, the
transient controller presets it with its load estimate, so regulation
resumes at the right level. After a loading step a preset can only raise
Iref. After an unloading step, `preset_lower` lets it lower Iref. The default
gains are KP = 2 and KI = 1/16 DAC code per ADC code and period.

## Transient recovery

`transient_controller` watches each ADC sample. A loading step is detected
when Vout falls more than `det_th` below Vref. An unloading step is detected
when Vout rises more than `det_th` above Vref. Once either is detected, the
controller owns the switches and the DAC, and the voltage loop is held.

### Loading: measuring the new load

The controller first turns on Q1+Q4, which disconnects the output. The
capacitor alone feeds the load, so the drop ΔV2 over a fixed time is
proportional to the load current. Two ADC intervals are used, after one
interval of settling. The inductor current rises meanwhile, limited by the
comparator at `i_max`. ΔV2, kept with fractional bits, addresses the LUT,
which returns Ith and Vth. In boost-type modes only the output-side share of
the inductor current reaches the load, so Ith is scaled by Vref/Vin.

### Current-constrained profile (`PROF_CURRENT`)

The inductor current rises straight to Ith. The current then slides in a
band from Ith to Ith + 2·`i_hyst`, under comparator control, until Vout
reaches Vref. The switch pair used depends on the side of unity:

| side of unity | "on" pair | "off" pair |
|---------------|-----------|------------|
| buck side     | Q1+Q3     | Q2+Q3      |
| boost side    | Q1+Q4     | Q1+Q3      |

In both cases the output keeps being fed. With the inductor current just
above the load, the capacitor recharges along the load line. The dip is set
by how far the current must rise. After the slide, the voltage loop is
preset to Ith and steady-state control resumes.

### Voltage-deviation and current-constrained profile (`PROF_VOLT_CURRENT`)

The first stage is a voltage slide. It switches Q1+Q4 while Vout is above
Vth and Q1+Q3 while Vout is below it. This holds the output at a programmed
floor Vth while the current keeps building. When the comparator reports that
the current has reached Ith, the controller moves to the current slide
described above. This profile trades a deliberate, bounded dip for the
shorter time that boost operation needs to build up current.

### Unloading

The controller applies Q2+Q3, so the inductor current falls at −Vout/L while
it still feeds the output. This continues until an ADC sample shows that the
output has stopped rising, which means the current has reached the new load.
It also stops if the comparator shows that the current has reached zero.

The voltage loop still holds the reference for the old, heavy load. The
controller therefore measures the new load before handing back. It turns on
Q2+Q4, so the inductor freewheels at about the load current and the
capacitor alone feeds the output. It then takes ΔV2 over the same window as
for a loading step and looks it up in the table. The loop is then preset
downwards:

- on the buck side, to Ith − 2·`i_hyst`, because Iref is a valley level there
  and the ripple sits above it;
- on the boost side, to Ith, because Iref is a peak level there.

Without this preset, the stale reference drives the output back up and the
unloading step is handled as a string of episodes.

A timeout (`TIMEOUT` clocks) ends any episode. After an episode, detection
is locked out for `LOCKOUT` samples.

## Self-tuning estimator and its table

The bleeding resistor Rbld sits across the output. At 3.3 V it draws a known
unit current Iunit (`IUNIT_CODE`, 44 DAC codes = 0.22 A in the default
scaling). On `cal_start`, `self_tuning_estimator` works as follows:

1. It opens the load switch (`mout` = 0).
2. It parks the inductor with Q2+Q4.
3. It waits `SETTLE` samples.
4. It measures the drop of Vout over 2^CAL_LOG2 = 8 samples. That drop is
   ΔV1, the slope for one unit current, in 1/8-code units.

It then fills the table, one row per clock. Row r stands for k = r + 2 unit
currents:

    in[r]  = k·ΔV1
    Ith[r] = I_ZERO + k·Iunit + Iunit/2        (saturated to the DAC range)
    Vth[r] = Vref − min(gdev·⌊k·ΔV1/8⌋, dv_max)   (floored at 0)

k unit currents at the output correspond to a load of (k − 1)·Iunit plus the
bleeder. Ith adds half a row as margin, because a target below the load can
never recharge the output. Vth grows with the load through `gdev` and stops
at `dv_max`. After reset, a generic table built from `DV1_GENERIC` is loaded
at once, so the table is usable before the first calibration. The transient
controller, however, is armed only after a calibration with Mout closed.
Look-up returns the row whose `in` is nearest to ΔV2, and the last row when
ΔV2 exceeds the table.

## Number formats and interface

The following are the defaults of this design:

- **Clock:** 50 MHz.
- **ADC:** 12 bits at 5 mV/LSB (full scale 20.475 V, covering a 2–15 V
  input). `adc_valid` strobes once per sample, at 1 MHz in the testbench.
- **DAC:** 10 bits at 5 mA/LSB. Code `I_ZERO` (100) means zero inductor
  current: the current-sense path is offset so that light loads, whose valley
  current is negative, can still be programmed. The DAC therefore spans
  −0.5 A to +4.6 A.
- **Comparator:** `cmp_async` is high when the sensed current is above the
  DAC level. It is synchronised with two flops.

| Port group | Signals |
|------------|---------|
| converters | `adc_valid`, `vout_adc`, `vin_adc`, `cmp_async`, `dac_code` |
| power stage | `gates` (struct q1..q4, on commands), `mout` |
| configuration | `vref`, `cal_start`, `profile`, `ie2_delta`, `det_th`, `i_hyst`, `i_max`, `gdev`, `dv_max` |
| status | `mode`, `period`, `cal_active`, `lut_ready`, `cal_dv1`, `tr_active`, and the one-clock pulses `ev_load`, `ev_unload`, `ev_slide_v`, `ev_slide_i` |

The switches and the DAC have three possible owners, in this priority order:
calibration (Q2+Q4, DAC at `i_max`), then the transient controller, then the
steady-state sequencer.

## Files

| file | content |
|------|---------|
| `rtl/nibb_pkg.sv` | widths, mode and profile enums, gate struct and sub-circuit constants |
| `rtl/mode_select.sv` | mode from Vin − Vref with hysteresis |
| `rtl/period_gen.sv` | frequency scaling, period counter |
| `rtl/voltage_compensator.sv` | PI voltage loop with hold and preset |
| `rtl/cpm_sequencer.sv` | per-mode switch sequence driven by the comparator |
| `rtl/self_tuning_estimator.sv` | calibration and Ith/Vth table |
| `rtl/transient_controller.sv` | detection, ΔV2 measurement, sliding recovery, unloading |
| `rtl/nibb_hybrid_controller.sv` | top level |
| `tb/nibb_plant_model.sv` | behavioural power stage, ADC, DAC and comparator (not synthesizable) |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_nibb_steady_state` for the operating points |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog ends a hung run. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl \
        rtl/nibb_pkg.sv rtl/*.sv tb/nibb_plant_model.sv \
        tb/tb_nibb_hybrid_controller.sv --top-module tb_nibb_hybrid_controller
    ./obj_dir/Vtb_nibb_hybrid_controller

To run a unit test, replace the last file and the top module name, for
example with `tb/tb_cpm_sequencer.sv` and `tb_cpm_sequencer`. The plant
model is needed only by `tb_transient_controller`,
`tb_nibb_hybrid_controller` and `tb_nibb_steady_state`.

The plant model integrates the inductor current and capacitor voltage with a
20 ns forward-Euler step. It uses L = 8.2 µH, C = 30 µF, Rbld = 15 Ω and a
constant-current load. The input voltage (mV) and the load current (mA) are
integer inputs, so a testbench can step them.

### What the end-to-end test does

`tb_nibb_hybrid_controller` runs the top at its default parameters through
the following sequence:

1. Start-up in buck mode from 5 V.
2. Calibration. ΔV1 is checked against the value expected from Rbld and C.
3. A 0.8 A load.
4. A move to 3.8 V (enhanced buck), then a 0.8 → 3.5 A loading step with the
   current-constrained profile, then the unloading step.
5. A move to 3.0 V (enhanced boost).
6. A move to 2.6 V (boost), then a 0.8 → 3.0 A loading step with the
   voltage-deviation profile.

At each stage the test checks the mode, the period, the regulation band,
that recovery completes within a time limit, and that the dip stays inside a
bound. It counts every mechanism (each mode, calibration, loading,
unloading, voltage slide, current slide, period change) and fails any that
never occurs.

`tb_nibb_steady_state` visits the steady-state operating points: 3.8 V and
3.4 V (enhanced buck), 3.2 V and 2.8 V (enhanced boost) and 2.5 V (boost).
It then steps the input to 3.0 V, which must move the converter from boost to
enhanced boost and lengthen the period from 250 to 380 clocks. At each point
it checks the following:

- the mode and the regulation;
- the period against the frequency law, and the number of periods in 1 ms;
- that t_e2 occurs in every period of an enhanced mode and never in the
  pure modes;
- charge balance.

The charge-balance check works as follows. The output receives the inductor
current only outside the Q1+Q4 interval. The mean inductor current while it
feeds the output, times that time share, must therefore match the load plus
the bleeder current within 10 %. In enhanced buck this is the relation
I_L(avg) = Iout / (1 − t_e2/Ts).

Typical results of the end-to-end test:

| step | deviation | recovery |
|------|-----------|----------|
| enhanced-buck step, 0.8 → 3.5 A | about 0.94 V | about 56 µs |
| boost step, 0.8 → 3.0 A, with Vth set 1 V below Vref | about 1.07 V | about 100 µs |
| enhanced-buck unloading, 3.5 → 0.8 A | about 0.58 V overshoot | one episode |

The unloading overshoot is close to what this power stage allows. Ramping
2.7 A down at −Vout/L puts about 0.3 V on 30 µF, and detection at the
threshold adds about 0.2 V.

## Where this design departs from the published scheme, and why

- **t_e2 in the enhanced modes** is ended by the comparator at Iref ±
  `ie2_delta`, a programmable excursion. The published scheme names the
  comparator as the way to end t_e2 but gives no level.
- **Vth rule.** The voltage threshold of each row is a programmable gain on
  the row's slope with a ceiling (`gdev`, `dv_max`). The published scheme
  derives Vth from the measurement but gives no formula.
- **Ith margin.** Each row holds half a unit current above the estimated
  load, and it counts the bleeder's own current. The current band sits above
  Ith, not around it. With a constant-current load, any target below the
  load fails to recover, so the margin matters more than in a resistive-load
  analysis. For the same reason, recovery time depends on the resolution of
  the table (`IUNIT_CODE`).
- **Slide sub-circuits.** The switch pairs used in the slides are chosen per
  side of unity (see the tables above), so that the output is never starved
  during the slide.
- **Boost-side Ith scaling** by Vref/Vin is added, so that the table, which
  is calibrated in output current, also serves boost-type modes.
- **ΔV2 measurement.** ΔV2 is measured with Q1+Q4 on, over two ADC
  intervals, which is independent of the mode in use.
- **Unloading** is one discharge interval that ends at the voltage peak, not
  a computed optimal switching sequence. It is followed by a load
  measurement and a downward preset of the voltage loop.
- **ΔV2 after unloading** is measured with Q2+Q4 on, so that the inductor
  current holds at the new load. Q1+Q4 would add about 1.8 A in those
  microseconds at a 5 V input.
- **Voltage-loop preset** only raises Iref after a loading step, so an
  estimate on the low side cannot pull the loop down. After an unloading
  step it lowers Iref.
- **Added limits:** the `CHG_MAX` limit on Q1+Q4 intervals, comparator
  blanking, an episode timeout and a detection lockout. All are protective
  additions.
- **Unspecified details:** band edges, hysteresis, PI gains, word widths,
  clock rate, table size (32 rows) and calibration timing are all choices of
  this design. They are parameters or inputs, so they can be retuned.

## Limits

- Only the digital controller is RTL. The ADC, the DAC, the comparator, the
  current sense and the power stage exist only as the behavioural testbench
  model.
- The DAC range (4.6 A) bounds the inductor current. A 3.5 A load in pure
  boost at low input voltage needs more than that, which is why the boost
  step in the test is 3.0 A at 2.6 V.
- Loop gains and thresholds were tuned against the idealised plant model,
  which has no losses or ringing and uses a constant-current load. They
  should be re-tuned on hardware.
