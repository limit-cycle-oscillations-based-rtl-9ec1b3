# Limit-cycle based auto-tuning controller for a digital buck converter

A digitally controlled buck converter has to be compensated for an output
filter it does not know exactly: the capacitance, load and parasitics change
between boards and during operation. A fixed worst-case PID is stable
everywhere but slow almost everywhere. This controller measures the power
stage while it runs and then loads a PID that matches it.

The measurement needs no injected test signal. The controller makes the loop
oscillate on purpose, but only a little:

1. It swaps the PID for a slow integrator.
2. It coarsens the DPWM from 10 to 7 bits.

The loop now cannot find a duty ratio that puts the output inside the ADC's
zero-error bin, so it settles into a small limit cycle (LCO). The LCO runs
close to the L-C resonance. Its size in the control word, with a known
quantizer gain, gives the damping and the load.

From the LCO frequency and amplitude, the controller then does three things:

- It picks one of thirty stored PID laws.
- It chooses which transistor segments should switch.
- It restores full DPWM resolution.

During regulation, the whole disturbance is a few coarse DPWM steps of
duty-ratio ripple, a few tens of millivolts at the output.

The RTL is written for one operating point:

| Quantity | Value |
| --- | --- |
| Switching frequency | 400 kHz |
| Input voltage | 8 V (5–9 V) |
| Output voltage | 3.3 V |
| Inductor | 33 µH |
| Output capacitance | 10–55 µF |
| Load | 1–10 Ω |
| Window ADC step | 20 mV |

## Signal flow

```
            e[n]  +----------------------+  d_c[n]  +------+  delta  +--------+ c_h,c_l
 ADC  ----------->|  pid_compensator     |--------->| dpwm |-------->| switch |--------> gate
 (outside)        |  conv / tuned / K/s  |          | 10/7b|         | select |          drivers
   ^              +----------------------+          +------+         +--------+
   | V_ref[n]        ^ coef      ^ law        ^ drop               ^ s[n]
   |                 |           |            |                    |
 zero_offset_cal   coef_lut <- address_gen   mode_selector ----> load_estimator
   ^                 ^             ^  ^        ^   ^   ^              ^
   | D_c LSBs        |             |  |        |   |   |              |
 steady_state_capture --d_c_ac--> frequency_extractor -- f_LC ---------+
                  \-- d_c ------> amplitude_meter ----- A_pp ---------+
 instability_detector (e[n], check) --> start / stable --> mode_selector
 esr_delay: optional 0-3 sample delay of e[n] while the integral law runs
```

`lco_autotune_top` wires these blocks together. The ADC and the power stage
are outside the chip:

- `e` (signed error word) and `vref` (digital reference) connect to the ADC.
- `c_h` / `c_l` (drive requests for the large and small transistor pair) go
  to the gate drivers.
- `th_lo` / `th_hi` are the two programmable load thresholds.
- `id_dly` sets the extra error delay used during identification (0 = off).

All other top-level outputs are status signals.

## Clocking and sample rate

`clk` is the DPWM counter clock: 1024 clocks per switching period, so
409.6 MHz at 400 kHz. Everything else runs on that clock with one-clock
enables. The DPWM pulses `period_start` (`sample` at the top) once per
period; the ADC result is taken there. The compensator updates `d_c[n]` one
clock later (`dc_valid`), and the two LCO meters run on that strobe. The
tuning sequence counts its waits in samples.

## The tuning sequence (`mode_selector`)

| State | Law | DPWM | What happens | Leaves when |
| --- | --- | --- | --- | --- |
| REGULAR | tuned (or conventional before the first tuning) | 10 b | normal regulation | `start` from the detector |
| REGAIN | conventional PID | 10 b | a worst-case-safe PID brings the loop back | detector reports `stable` |
| CAPTURE | integral K/s | 10 b | integrator settles; `D_c` follows `d_c` | 256 samples |
| OFFSET | integral | 10 b | reference shifted so the dropped LSBs of `d_c` sit at 100b | 256 samples |
| LOWRES | integral | 7 b (8 b after the limiter) | limit cycle builds up; meters restarted | 2 LCO half-period results, or timeout |
| MEASURE | integral | 7 b | four `A_pp` and four `f_LC` results averaged | both averages done, or timeout (4096 samples) |
| LOOKUP | integral | 7 b | address formed from the averages, table read | 2 clocks |
| LOAD | integral | 7 b | coefficients loaded, `s[n]` updated, offset removed | 1 clock |

Other details of the sequence:

- **Amplitude limiter.** At very light load the stage Q is high and the
  cycle can grow large enough to hurt regulation. If an `A_pp` result in
  LOWRES or MEASURE exceeds `APP_LIMIT` (16 fine LSBs, two 7-bit steps), the
  sequencer raises `fine` and returns to OFFSET. It re-centres the duty for an
  8-bit DPWM (two dropped bits: midpoint 10b, which adds +2 to the offset
  already in use) and measures again with half the quantization step. This
  happens at most once per tuning. The `A_pp` average is then doubled, so the
  tables and thresholds stay on the 7-bit scale (`A_pp` is proportional to
  the quantization step).
- A start in steady state skips REGAIN.
- Every start raises `force_all`, so all four transistors conduct until the
  new load estimate is ready. A sudden heavy load therefore never runs on the
  small transistors alone.
- A timeout returns to REGULAR with the previous law and pulses `aborted`.
  This happens, for example, when the output capacitor is so large that the
  limit cycle is too slow to measure.

## Why the limit cycle can be measured

### Integral law

The integrator (`K = 64·2⁻¹⁰` duty LSB per error LSB per sample) has two
jobs:

- It keeps the output regulated while the DPWM is coarse.
- It turns a ±1-LSB error square wave into a triangular swing of `d_c`,
  several fine LSBs tall.

The swing keeps the fine (10-bit) value of `d_c`. Only the DPWM output is
coarse.

### Zero-offset calibration

A limit cycle only exists if no coarse duty value holds the output inside
the zero bin. Before the DPWM is coarsened, `zero_offset_calibration` does
the following:

- It reads the three LSBs that will be dropped from the captured steady-state
  duty `D_c`.
- It adds `100b − LSBs` to the reference. For example, 001 gives +011.
- The integrator then moves `d_c` by the same amount. Its average ends up
  exactly between two coarse values, so the limit cycle is symmetric.

The reference word is scaled so that one LSB moves `d_c` by about one LSB
(V_g/1024 per LSB). The captured `D_c` is shifted by the same offset, so it
stays the centre of the cycle.

### Quantizer detail

The DPWM rounds to the nearest coarse value, half up, and saturates at the
top. With the dropped bits at 100b, the fine value sits exactly on a
decision boundary. This matters for the frequency measurement below.

## Measuring the cycle

### Amplitude (`amplitude_meter`)

The meter follows the sign of `Δd_c[n] = d_c[n] − d_c[n−1]`:

- The sample before a rise-to-fall change is `A_max`.
- The sample before a fall-to-rise change is `A_min`.
- Flat samples keep the last direction.

Each maximum that follows a seen minimum gives `A_pp = A_max − A_min`.

### Frequency (`frequency_extractor`)

`d_c_ac = d_c − D_c` is formed in `steady_state_capture`. A counter starts
when `d_c_ac` becomes non-negative and stops at the next negative sample, so
the count is half the LCO period in switching periods.

Zero is treated as positive, so the sign bit alone decides. This matches the
coarse step between `D_c − 1` and `D_c`. A three-valued sign would add the
length of the plateau at `D_c` to the count.

The count is turned into a frequency word `f_LC = 4800 / count`, saturated
to 8 bits. One LSB is 41.67 Hz at 400 kHz.

### Averaging and the asymmetry limit

The sequencer skips the first two results while the cycle builds up. It then
averages four of each result.

`D_c` is only known to within the ADC zero bin (±10 mV is about ±1.3 duty
LSB here). The cycle can therefore be asymmetric: in simulation at 2.5 Ω it
spends 31 samples above `D_c` and 56 below. The half-period count then
overstates the frequency, even though the full period is correct. This is
inherent in half-period timing, and the testbench records it.

## Choosing the PID (`address_generator`, `coef_lut`)

The compensator is the incremental PID

```
d_c[n] = d_c[n-1] + a0·e[n] + a1·e[n-1] + a2·e[n-2]
a0 = Kd,  a1 = −2·r·cos(2π·fz/fs)·Kd,  a2 = r²·Kd,  r = exp(−π·fz/(Q·fs))
```

It has a pair of complex zeros at `fz` with quality factor `Q`, plus the
integrator pole.

### Table address

- **Frequency.** The frequency word is rounded down by keeping its four MSBs,
  `k = f_LC[7:4]`. This gives fifteen usable values; 0 is treated as 1.
  Rounding down keeps the zeros below the resonance. Each table row uses
  `fz = 16·k·41.67 Hz`, i.e. steps of 667 Hz.
- **Damping.** `D_c·A_pp` is proportional to the stage's Q. When it reaches
  `Q_TH = 1536`, the high-Q law of the pair (`Q = 4`) is chosen instead of
  `Q = 1`.
- **Address.** `2·(k−1) + q_high`.

### Table contents

The three tables (`a0`, `a1`, `a2`) have 30 words of 10 bits each:

- Coefficients are two's complement with 5 fraction bits. `Kd = 6`, so
  `a0 = 192` everywhere.
- `a0` and `a1` are rounded. `a2` is then chosen so that `a0 + a1 + a2`
  equals the rounded exact sum. That sum is the integral gain, and rounding
  it to zero would leave the loop without integral action.
- They are in `rtl/coef_lut_a0.hex`, `_a1.hex` and `_a2.hex`. They are read
  with `$readmemh` by paths relative to the project root.

### Compensator arithmetic

- The accumulator has 10 fraction bits and saturates at 0 and full scale.
- The conventional worst-case law is a parameter of `pid_compensator`: Kd 6,
  fz 3.5 kHz, Q 1, giving `[192, −373, 182]`.

## Load estimate and switch selection (`load_estimator`, `switch_select`)

From the describing-function analysis, the load resistance is proportional
to `A_pp·ω_LC`. `D_c` normalises `A_pp` for the input voltage, so the
estimator compares `metric = D_c·A_pp·f_LC` (28 bits) with the two
thresholds:

| Condition | `s[n]` | Segments |
| --- | --- | --- |
| `metric ≥ th_hi` | 01 | light load: small transistors only |
| `th_lo ≤ metric < th_hi` | 11 | all four |
| `metric < th_lo` | 00 | over current: all off |

`switch_select` gates the DPWM pulse into one drive request per segment.
Dead time and the synchronous-rectifier complement belong to the gate driver
and are not modelled.

## Instability detector

The detector starts a tuning in two cases:

- on a rising edge of `check`;
- when one error sample reaches |e| ≥ 10 LSB (200 mV).

It reports `stable` after 256 consecutive samples with |e| ≤ 1 LSB. This is
a deliberately simple stand-in for a dedicated instability detector.

## Departures from the published scheme

- **Capture timing.** `D_c` is captured after the integrator has settled,
  not at the last sample of regular operation. A tuned PID that limit-cycles
  itself would otherwise give a noisy `D_c`.
- **Frequency word.** The conversion of the half-period count into a
  frequency word (reciprocal with scale 4800) and the use of `f_LC` as a
  multiplier in the load metric are this design's choices.
- **Chosen values.** These were all chosen for the operating point above:
  the amplitude limit, the rescaling of `A_pp` after the limiter, the
  damping threshold, the two Q values, `Kd`, `K`, the conventional PID, the
  wait lengths, the number of averaged periods and the timeout.
- **ESR delay.** `esr_delay` puts 0 to 3 samples of extra delay on `e[n]`
  while the integral law runs. The extra phase lag offsets the lead of an
  ESR zero near the resonance, which would otherwise push the limit cycle
  above f_0. The amount is set by the `id_dly` port; 0 turns it off. The
  design does not choose the delay itself, and the tables are not corrected
  for the lower cycle frequency that the delay causes.
- **Not built:** any current limiter beyond the all-off protection.

## Simulating

Run from the project root, because the coefficient tables are read by
relative paths. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/lco_pkg.sv tb/tb_lco_autotune_top.sv --top-module tb_lco_autotune_top \
    -Mdir obj_top -o sim && obj_top/sim
```

Every block has its own self-checking bench `tb/tb_<module>.sv`, and each
ends by printing `TB_RESULT checks=N failures=M`.

### End-to-end bench

`tb_lco_autotune_top` closes the loop around `buck_plant_model`, an
averaged-switch Euler model of the segmented buck and the window ADC. The
controller parameters stay at their defaults. The run takes about 15 s of
wall time and covers:

1. Start-up at R = 5 Ω. Result: LCO 4.5 kHz, `A_pp` 9, light-load sequence.
2. A step to 2.5 Ω and a `check`. Result: all four transistors.
3. Forced over-current protection, then re-tuning.
   - Then `id_dly` = 2 and a `check` at 2.5 Ω. Result: the delay lowers the
     observed limit-cycle frequency (about 4.5 to 4.3 kHz).
4. A step to 10 Ω and a `check`. Result: the amplitude limiter switches the
   identification to 8 bits, and the tuning completes with the small
   transistors.
5. A 4.7 mF capacitor. Result: measurement timeout.

The bench checks:

- the LCO period seen in `d_c` against the L-C resonance;
- the `f_LC` word against the observed half periods;
- the table address and the loaded coefficients against the formulas above;
- `s[n]` against the thresholds;
- regulation to within 40 mV.

It also counts every mechanism (disturbance and check starts, regain, offset
calibration, coarse resolution, measurement, coefficient load, forced
all-on, each switching sequence, protection, amplitude limiter, timeout) and fails if any one
never occurred.

### Sweep over the filter range

`tb_lco_sweep` runs the same closed loop, at default parameters, over
R = 1, 2, 5 and 10 Ω and C = 10, 22 and 55 µF. At each point it pulses
`check` and applies the same tuning and regulation checks. The run takes
about 30 s and all twelve points pass:

- **Frequency.** The observed LCO period is within 5 % of `1/(2π√(LC))` at
  every point. The averaged half-period word is up to about 25 % off in
  either direction, because of the asymmetry described above.
- **Amplitude.** `A_pp` grows with R and with C (1 to 10 fine LSBs), as the
  describing-function analysis predicts.
- **Limiter case.** At R = 10 Ω, C = 55 µF the cycle exceeds the limit and
  the identification is repeated at 8 bits.

In that limiter case the cycle does not shrink in the model: it keeps
growing during the 8-bit measurement, and the reported `A_pp` is very
large (390). The frequency, the high-Q table choice, the light-load
sequence and the regulation still come out right. Treat the limiter as a
coarse safeguard, not a precision mode. `APP_LIMIT` and `K` are the knobs
to revisit for a high-Q stage.

### Block benches

- `tb_dpwm` checks high-time and period length (1024 clocks) for both
  resolutions.
- `tb_pid_compensator` runs a bit-exact reference model.
- `tb_esr_delay` checks every delay tap, the pass-through when disabled and
  that the history moves only on the sample strobe.
- `tb_mode_selector` uses shortened waits and checks state durations and
  every pulse.
