# Three-phase induction motor controllers: scalar V/Hz drive and field-oriented control

This repository holds two controllers for a three-phase AC induction motor. Both are written as
synthesizable SystemVerilog and both drive the six IGBT gates of a standard two-level inverter.

* **`vfd`: a scalar (Volts-per-Hertz) variable-frequency drive.** This is the design meant for an
  FPGA board with a 100 MHz clock. Two push-buttons set the output frequency in 1 Hz steps from
  0 to 50 Hz. Each phase compares a sine reference with a sawtooth carrier (sinusoidal PWM).
  The three sines sit 120° apart, and their amplitude grows with frequency up to the motor's
  nominal 50 Hz. Every inverter leg gets a dead time, so its two switches are never on together.
* **`foc`: a field-oriented control (FOC) datapath.** It has a Clarke transform, a Park
  transform, an inverse Park transform and a space-vector PWM (SVPWM) modulator. Its inputs are
  phase currents, a rotor angle and (d, q) voltage references. The loop is open: no PI
  regulators or angle estimator are included, as explained in "What is not here".

`motor_ctrl_top` puts the two side by side. They share only clock and reset, and each brings out
its own ports with a `vfd_` or `foc_` prefix.

Unless noted otherwise, all resets are synchronous and active high.

## Inverter gate numbering

Both controllers use the same numbering for the six gates, `s[1:6]`:

| leg (phase) | upper switch | lower switch |
|-------------|--------------|--------------|
| A (phase 1) | `s[1]`       | `s[4]`       |
| B (phase 2) | `s[3]`       | `s[6]`       |
| C (phase 3) | `s[5]`       | `s[2]`       |

`s` is declared `[1:6]`, an ascending range, so that the index is the switch number. Because of
this, a 6-bit literal compared with `s` lists `s1, s2, ..., s6` from left to right.

## The scalar drive (`vfd`)

```
 up/down ─► btn_pulse ─► freq_ctrl ──current_freq──► seg7_display ─► cat, an
                            │  │  └─factor (0..100 %)────────────┐
                            │  └─eoc = 98000 / f                 │
                            │         ▼                          ▼
                            │   clock_divider ─tick─► sine_addr_gen ─► 3 × sin_rom ─► sine_ph1..3
                            │         └──────tick──► sawtooth_gen ───► sawtooth
                            └─enable, enable_pulse           pwm_phN = sawtooth < sine_phN
                                                     3 × phase_gen (dead time) ─► s[1:6]
```

### How the frequency is produced

`freq_ctrl` holds the set frequency `f`, from 0 to `MAX_FREQ` = 50. From it, the module works out
an end count `eoc = 98000 / f`. `clock_divider` uses this value: its counter passes `eoc` and then
restarts, so it pulses once every `eoc + 2` clock cycles. Each pulse advances the three sine-table
addresses by one. A table holds 1024 entries, so the output frequency is

    f_out = 100 MHz / (1024 · (98000/f + 2))

| set f (Hz) | eoc   | f_out (Hz) | sawtooth period |
|-----------:|------:|-----------:|----------------:|
| 1          | 98000 | 0.996      | 32 ms           |
| 10         | 9800  | 9.963      | 3.2 ms          |
| 25         | 3920  | 24.90      | 1.29 ms         |
| 50         | 1960  | 49.77      | 0.65 ms         |

The 98000 is a linearisation constant. It makes `f_out` about 0.5 % low: 50 Hz gives a sine period
of exactly 2,009,088 cycles, which the testbenches check. At 0 Hz, `eoc` is 98000 and the drive is
disabled.

The enable signal is `f > 0`. When it rises, a one-cycle `enable_pulse` reloads the three
addresses to 0, 682 and 341 (0°, 240° and 120° of the 1024-entry period). Phase 1 therefore always
starts at 0°.

### Amplitude: the V/Hz factor

`factor = min(100, f · 100 / MAX_FREQ)` is a percentage. `sin_rom` multiplies the table entry by
it and divides by 100, truncating toward zero, so 25 Hz gives half amplitude. This keeps the motor
voltage roughly proportional to frequency and avoids large currents at low speed. Each table entry
is `round(32767 · sin(2πi/1024))`. The table is computed at elaboration with `$sin`, so there is no
data file. The scaled sample is registered, which adds one cycle of latency.

### The carrier (read this before changing it)

`sawtooth_gen` runs from −32768 up in steps of 2048. It steps on the **same divider pulse that
advances the sine addresses**, not on a fixed clock. Once it has passed 32767 it returns to −32768.
One tooth is therefore 33 divider pulses, whatever the frequency. This has two consequences:

* There are always about 1024/33 ≈ 31 carrier periods per sine period.
* The PWM frequency scales with the output frequency: about 1.5 kHz at 50 Hz, 31 Hz at 1 Hz.

This follows the carrier logic the drive was specified with. That specification also states a 10 µs
carrier period, which a carrier tied to the sine-address divider cannot have. A fixed-rate carrier
would need its own divider, and `STEP` would have to be chosen for it. That is the first thing to
change if a higher or constant PWM frequency is wanted.

The comparison is `pwm_phN = (sawtooth < sine_phN) && enable`, on signed 16-bit values.

### Dead time (`phase_gen`)

Each leg turns one PWM bit into an upper and a lower gate signal:

* When the bit changes, both gates go off in the next cycle.
* They stay off for `DEAD_CYCLES` cycles: 300 by default, which is 3 µs at 100 MHz.
* The side selected by the bit then turns on.
* If the bit changes during the dead time, the dead time restarts, so pulses shorter than it are
  swallowed.
* While `enable` is low, both gates are off.

The outputs are registered. An assertion in `phase_gen` and another in `vfd` check that no leg
ever has both switches on.

The inverter module this targets asks for at least 2 µs. 3 µs was chosen, and the reference text
quotes both figures.

### Other outputs

| port | behaviour |
|------|-----------|
| `pwm_wave_ph1_out`..`ph3_out` | the raw PWM bits, before dead time |
| `sync` | MSB of the phase-1 address: a square wave at `f_out`, falling when phase 1 crosses 0° |
| `reset_out` | `reset` passed through, to reset the power module |
| `enable_led[15:0]` | all on while the drive runs |
| `cat[7:0]`, `an[3:0]` | 4-digit multiplexed display of `f`, active low, `cat = {dp,g,f,e,d,c,b,a}`; each digit lit 2.6 ms (`REFRESH_W` = 18) |

The buttons go through `btn_pulse`, a two-flop synchroniser and rising-edge detector, with a
latency of 3 cycles. There is **no debouncer**. The verification stimulus presses a button for a
single 10 ns cycle, which a debouncer would reject. On real buttons, add one in front of
`btn_pulse`. If up and down pulse in the same cycle, up wins unless `f` is already at the limit.
In that case down acts.

## The FOC datapath (`foc`)

```
 i_a, i_b ─► clarke ─► (i_alpha, i_beta) ─► park(theta) ─► (i_d, i_q)      [outputs]
 v_d_ref, v_q_ref ─► invpark(theta) ─► (v_alpha, v_beta) ─► svpwm ─► s[1:6]
```

**Number formats.** Currents and voltages are signed 32-bit integers. The modulator's thresholds
assume they are scaled so that a full-size vector has a magnitude of about 100. Angles are whole
degrees, from 0 to 359, and only `theta[8:0]` is used. sin and cos are signed Q1.14, where 16384
means 1.0. Products use 64-bit intermediates and are rounded to the nearest integer, with ties
away from zero.

* **`clarke`** is combinational. It computes `alpha = a` and `beta = (a + 2b)/√3`, using the
  constants `37837/2^16` and `75674/2^16`. The formula assumes balanced currents, so `i_c` is
  accepted but not used.
* **`trigonometry`** is a 360-entry table filled at elaboration. It returns registered sin and
  cos of the same address, one cycle after the address. cos reads the entry 90° ahead.
* **`park`** computes `d = α·cos + β·sin` and `q = −α·sin + β·cos`.
* **`invpark`** computes `α = d·cos − q·sin` and `β = d·sin + q·cos`.
* Each of `park` and `invpark` has its own table. Their outputs are combinational in the data
  inputs and one cycle behind `theta`.

### SVPWM as built

The modulator is a simplified space-vector PWM. It keeps the sector structure but not the dwell
time computation.

1. **Sector.** The sector comes from two thresholds on α and the sign of β. It is registered.

   | | α ≥ 50 | −50 < α < 50 | α ≤ −50 |
   |---|---|---|---|
   | β ≥ 0 | 3 | 1 | 5 |
   | β < 0 | 2 | 6 | 4 |

2. **State.** A state register follows the sector one cycle later. Each state selects two adjacent
   active vectors, written `{C,B,A}`:
   `S1 010/110, S2 100/101, S3 100/110, S4 001/011, S5 010/011, S6 001/101`.
   `S0` gives 000/000 and `S7` gives 111/111. S7 is never reached.
3. **Switching.** The two vectors alternate every `HALF_CYCLES` cycles. The default of 500 gives
   5 µs, a fixed 100 kHz pattern with **equal** time for both vectors. Zero vectors are not used.
   The reference vector's magnitude affects only the choice of sector, not the duty cycle.
4. **Gates.** `s[1], s[3], s[5]` are legs A, B and C of the applied vector. The lower gates are
   their complements. **No dead time is inserted here.** Before this output drives real switches,
   put it through `phase_gen` legs as `vfd` does.

The latency from `v_alpha`/`v_beta` to the gates is 2 cycles, plus 1 cycle from `theta` through
`invpark`.

With the test stimulus (|i| = 100 rotating with `theta`, `v_d` = 86, `v_q` = 50), `i_d` stays at 0
and `i_q` at −100 within ±2. All six sectors are visited once per turn.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `vfd`, top | `MAX_FREQ` | 50 | highest set frequency, Hz (1..127) |
| `vfd`, top, `phase_gen` | `DEAD_CYCLES` | 300 | dead time in clock cycles |
| `vfd`, top, `seg7_display` | `REFRESH_W` | 18 | display scan counter width |
| `foc`, top, FOC blocks | `W` | 32 | data width |
| `foc`, top, `svpwm` | `HALF_CYCLES` | 500 | cycles per SVPWM half period |
| `svpwm` | `THRESH` | 50 | sector threshold on α |
| `sin_rom` | `DEPTH`, `WIDTH`, `AMPLITUDE` | 1024, 16, 32767 | sine table |
| `sawtooth_gen` | `STEP` | 2048 | carrier step |

Shared constants and functions are in `rtl/vfd_pkg.sv` and `rtl/foc_pkg.sv`. These include
`get_eoc`, the table generators, the Clarke constants, rounding, and the SVPWM state enum.

## Where this departs from the reference design, and why

* **FOC in fixed point.** The reference FOC was a simulation-only model that used real numbers. Here
  it is synthesizable, with Q1.14 trigonometry and rounded integer results. Its precision is finer
  than the original four-decimal table.
* **Aligned sin/cos.** The reference trigonometry table registered its cos address separately. Its
  cos therefore lagged sin by a cycle, and it used an offset of 269 where 270 was meant. Here both
  outputs belong to the same angle.
* **Clocked SVPWM switching.** A counter replaces the simulation-only timing of the original
  switching process. The durations are the same: 5 µs per vector.
* **Carrier period.** The carrier follows the specified carrier logic, not the stated 10 µs
  period (see "The carrier").
* **Dead time.** The dead time is 3 µs. The reference text gives both 3 µs and 2 µs.
* **Own choices.** These details are not specified, so the choices here are this design's own:
  * the source of `enable`/`enable_pulse` (`f > 0` and its rising edge);
  * `sync` being the phase-1 address MSB;
  * `reset_out` following `reset`;
  * the button pulse circuit;
  * the display's scan rate, digit order and polarity, following Basys-3 conventions.
* **Extra FOC outputs.** `i_alpha`, `i_beta`, `i_d` and `i_q` are brought out of `foc`. Nothing
  inside uses them, because the PI loop is missing, so without these ports they would be
  optimised away.

## What is not here

These parts are not implemented:

* **PI regulators for the d/q currents.** They are described only in principle, with no gains or
  structure.
* **A rotor angle or speed estimator, and ADC current sensing.** These would be needed to close the
  FOC loop on a real motor. They are not included.
* **Parts with no logic to write.** These are the power module (a six-IGBT inverter), the motor,
  and the 3.3 V level-adapter board.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_sin_rom` | all 1024 entries at 100 %, 2000 random address/factor pairs against real-number sine, 1-cycle latency |
| `tb_clock_divider` | pulse period `eoc+2` for several end counts, one-cycle pulses, reset |
| `tb_btn_pulse` | one pulse per press of 1..300 cycles, 3-cycle latency |
| `tb_freq_ctrl` | 60 ups stop at 50, downs, random sequences; factor, eoc, enable, enable pulses against a model |
| `tb_sawtooth_gen` | step sequence, 33-tick tooth, hold between ticks and when disabled |
| `tb_sine_addr_gen` | start phases, advance only on enabled ticks, wrap, reload |
| `tb_phase_gen` | no overlap, ≥ 300 off cycles before every turn-on, correct side after a stable input |
| `tb_seg7_display` | decodes the scanned digits for 0..99 and above |
| `tb_vfd` | 50 Hz and 25 Hz sine periods to the cycle, PWM duty in each half-wave of all three phases, half amplitude at 25 Hz, display, LEDs, stop at 0 Hz, dead time and short circuit on every cycle |
| `tb_vfd_ramp` | the reference verification run: 10 ms idle, then 60 presses 5 ms apart (310 ms, 31 M cycles), then one 50 Hz period; frequency and display after every press |
| `tb_trigonometry` | all 360 angles against `$sin`/`$cos`, ±1 LSB |
| `tb_clarke`, `tb_park`, `tb_invpark` | random inputs against real arithmetic (±1 and ±2) and the reference points (7, 100, 176°) → (0, −100) and (86, 50, 0°) → (86, 50) |
| `tb_svpwm` | every sector and the thresholds: vector pair, hold time of exactly `HALF_CYCLES`, complementary gates, reset state |
| `tb_foc` | two turns of the reference FOC stimulus: Clarke, i_d ≈ 0, i_q ≈ −100, applied vector in the right sector |
| `tb_motor_ctrl_top` | both controllers at once, default parameters: 0 → 50 → 25 → 0 Hz with exact periods, and the FOC sweep |

`tb_motor_ctrl_top` also counts each mechanism and fails if any never occurs:

* the frequency limit being reached;
* drive start;
* a change of end count;
* a factor below 100 and at 100;
* a sawtooth wrap and a sine-address wrap;
* a dead time being inserted;
* each of the six SVPWM sectors;
* both switching vectors.

All testbenches run at the default parameters except `tb_seg7_display` (`REFRESH_W` = 6) and
`tb_svpwm` (`HALF_CYCLES` = 8). The longest is `tb_vfd_ramp`, at about 20 s; `tb_vfd` and
`tb_motor_ctrl_top` take about 10 s each.

To run one with Verilator 5, from the repository root:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_motor_ctrl_top -y rtl -y tb +libext+.sv -Irtl \
  rtl/vfd_pkg.sv rtl/foc_pkg.sv tb/tb_motor_ctrl_top.sv -o sim
./obj_dir/sim
```

Replace the top module name to run another testbench. Lint a module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/vfd_pkg.sv rtl/foc_pkg.sv rtl/<module>.sv`.

The lint leaves two kinds of warning:

* Ascending-range warnings from the `s[1:6]` numbering.
* Unused-parameter warnings when a package is linted on its own.

## Size

After generic coarse synthesis, `vfd` has 252 flip-flops and three 16 Kbit sine tables, and uses
43 I/O pins. The original FPGA implementation of this drive reported 348 flip-flops, 2176 LUTs and
3 DSP blocks on an Artix-7 XC7A35T. It has 41,600 flip-flops and 1,800 Kbit of block RAM, so the
drive uses a few percent of the device.

`foc` has 13 flip-flops (the SVPWM sector, state and switching counter) and the sine/cos tables of
`park` and `invpark`. Its logic is dominated by eight 32 × 16-bit multipliers.
