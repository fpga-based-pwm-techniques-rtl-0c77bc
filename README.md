# AMISC-PWM: amplitude-modulated inverted-sine-carrier PWM for a single-phase inverter

This RTL generates the gate signals of a single-phase full-bridge voltage source
inverter. It uses carrier-based PWM with an unusual carrier. A triangular
carrier is replaced by a train of *inverted half-sines*. The amplitude of that
train is *modulated by the reference sine itself*. The reference (a sine scaled
by the modulation index Ma) is compared with this carrier:

* in the positive half of the fundamental, the **positive group** (switches S1
  and S4) conducts while the reference is above the carrier;
* in the negative half, the **negative group** (S2 and S3) conducts while the
  reference is below the (negative) carrier.

The aim of the scheme is a higher fundamental output voltage than plain
sinusoidal PWM. Because the carrier has the same envelope as the reference,
every pulse in a half-cycle has the same width (see below).

Default operating point: 100 MHz system clock, 50 Hz fundamental, 6 kHz
carrier (120 carrier periods per fundamental period), 16-bit signed samples,
and a modulation index with 10 fraction bits.

## How the two waveforms are made

Both waveforms come from one 50-entry quarter-wave sine table
(`quarter_sine_rom`). Each unit holds its own copy. Entry k is

    table[k] = round(32767 * sin((k + 0.5) * 1.8 deg)),   k = 0..49

The table is computed when the design is elaborated. A constant function in
`amisc_pkg` evaluates it with integer fixed-point arithmetic, so there is no
data file. The half-step offset is deliberate: read backwards (49..0), the
table is the exact mirror of itself read forwards. That is what lets a single
quarter build a whole sine with no special case at 90 degrees.

**Reference (sdm_unit + rws_unit).** A counter n runs 0..199 per fundamental
period, one step per 10 kHz enable. A decoder maps it onto the table:

| quarter | count n  | table address | sign |
|---------|----------|---------------|------|
| 1       | 0..49    | n             | +    |
| 2       | 50..99   | 99 - n        | +    |
| 3       | 100..149 | n - 100       | -    |
| 4       | 150..199 | 199 - n       | -    |

The result is sine(n) = 32767·sin(2π(n+0.5)/200) in 16-bit signed form.
The polarity flag `pos_half` is `n < 100`. `rws_unit` then computes
ref = floor(sine · Ma), where Ma is an unsigned fixed-point number with
10 fraction bits (0.4 → 410, 0.8 → 819). Values up to 2047/1024 are accepted;
the reference is one bit wider than the sine so that it cannot overflow.

**Carrier (amiscg_unit).** A second counter k runs 0..99 per carrier period,
one step per 600 kHz enable. Counts 0..49 read the table forwards and 50..99
read it backwards, so each carrier period holds one half-sine s(k). Three
operations turn s(k) into the carrier:

1. *Inversion:* `inv = 32767 - s(k)`. This is near full scale at the edges of
   each carrier period and near zero in its middle: a sharp peak at each
   period boundary and a rounded valley in between.
2. *Peak correction:* the first table entry is not zero, so `inv` would peak at
   32767 - table[0] = 32252 instead of full scale. It is multiplied by the
   constant G = round(32767·2^15 / 32252), rounded, and clipped. This way every
   carrier period peaks at exactly 32767 at both ends.
3. *Amplitude modulation:* carrier = ±(corrected · |sine|) / 2^15. The
   envelope is the reference sine magnitude from the SDM unit. The sign is
   chosen by `pos_half`, which selects the positive or the negative envelope.

**Comparison (cps_unit).** One signed subtraction d = ref − carrier:
`pos_pulses = pos_half & (d > 0)` and `neg_pulses = !pos_half & (d < 0)`. An
assertion checks that the two groups are never on together.

## What the pulse pattern looks like

Divide both the reference and the carrier by the envelope |sin ωt|. What is
left is a constant Ma against the fixed shape 1 − sin θ of one carrier period.
So within a half-cycle every pulse has the same width, a fraction

    w(Ma) = 1 - (2/π)·asin(1 - Ma)      (w = 1 for Ma >= 1)

of the carrier period. Each pulse is centred in a carrier valley. The bridge
voltage is therefore a quasi-square wave, chopped 60 times per half-cycle. Its
fundamental is (4/π)·w times the DC link voltage. The end-to-end testbench
measured:

| Ma   | pulse width w | fundamental / V_dc | pulses per period |
|------|---------------|--------------------|-------------------|
| 0.4  | 0.590         | 0.7385             | 120               |
| 0.8  | 0.872         | 1.0950             | 120               |
| 1.2  | 1 (merged)    | 1.2732 (= 4/π)     | 3                 |

For Ma ≥ 1 the pulses merge and the inverter enters square-wave operation
without a separate mode. This gives a high fundamental, but the output is
**not linear in Ma**: 0.4 → 0.74 and 0.8 → 1.10. The scheme is sometimes
described as having a linear gain. That does not hold for the construction
implemented here, which follows the published waveform drawings: a carrier
envelope of the same shape as the reference, and pulses of equal width.
Keep this in mind if you close a voltage loop around the modulator.

## Clocking and timing

There is one clock, `clk` (CLK_HZ = 100 MHz). The published design divides it
into separate clocks (100 → 10 MHz, 10 kHz, 600 kHz, and a 50 Hz generator).
This RTL replaces those clocks with one-clock enables from `clock_enable_gen`:

    clk ──► 10 MHz tick ──┬─► 10 kHz tick  (reference step, 200 per 20 ms)
                          └─► 600 kHz tick (carrier step, 100 per 166.7 µs)

The ratio 10 MHz / 600 kHz = 50/3 is not an integer. `clock_enable_gen` uses a
phase accumulator: it adds OUT/g and wraps at IN/g, where g = gcd(IN, OUT).
The carrier steps are therefore 16 or 17 base ticks apart, and there are
exactly 60 carrier steps per reference step, with no drift. Both enables come
from the same 10 MHz tick, so carrier and reference stay locked: 120 carrier
periods per fundamental period, always at the same phase.

The 50 Hz square wave that separates the two pulse groups is not a divider of
its own. It is the `pos_half` flag of the reference counter, so it can never
slip against the reference.

Latency, counted in clock edges from the edge that samples an enable:

* reference path, 4 edges: counter, SDM register, RWS register, comparator
  register;
* carrier path, 3 edges: counter, AMISCG register, comparator register;
* a new `mod_index`, 2 edges: RWS register, comparator register.

The top output `pos_half` is delayed one clock to line up with `ref_wave` and
`carrier_wave`. All of this is a few clocks, against 10,000 clocks per
reference sample.

Reset (`rst_n`) is active-low and synchronous. It clears all counters, so the
output starts at phase 0 of the positive half.

## Modules

| file | role |
|------|------|
| `rtl/amisc_pkg.sv` | defaults (table depth 50, widths, Ma format), the constant functions for the sine table, the peak-correction gain and gcd |
| `rtl/quarter_sine_rom.sv` | 50 × 15-bit quarter-wave table, combinational read |
| `rtl/sdm_unit.sv` | sine data manipulation: 0..199 counter, quarter decoder, sign, polarity flag |
| `rtl/rws_unit.sv` | reference wave scaling: sine × Ma |
| `rtl/amiscg_unit.sv` | carrier generation: 0..99 counter, half-sine, inversion, peak correction, envelope modulation |
| `rtl/cps_unit.sv` | comparison and separation into positive and negative group pulses |
| `rtl/clock_enable_gen.sv` | fractional rate divider producing enables |
| `rtl/amisc_pwm.sv` | top level |

Top-level ports of `amisc_pwm`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, active-low synchronous reset |
| `mod_index` | in | 11 | Ma, unsigned with 10 fraction bits; may change at any time |
| `pos_pulses` | out | 1 | positive group (S1, S4) |
| `neg_pulses` | out | 1 | negative group (S2, S3) |
| `gate` | out | 4 | gate[0..3] = S1..S4 |
| `ref_wave` | out | 17 | scaled reference, signed (for observation) |
| `carrier_wave` | out | 16 | carrier, signed (for observation) |
| `pos_half` | out | 1 | polarity flag aligned with the two waves |

Parameters of the top: `CLK_HZ`, `BASE_HZ`, `REF_SAMPLE_HZ`, `CAR_SAMPLE_HZ`
(the rates); `Q` (quarter-table depth, default 50; the counters are 4Q and 2Q
steps); `MAG_W` (sample magnitude bits, default 15); and `MI_W` / `MI_FRAC`
(the Ma format). The fundamental is REF_SAMPLE_HZ / (4Q). The carrier
frequency is CAR_SAMPLE_HZ / (2Q).

## Which parts follow the published design, and which are choices

These parts follow the published architecture:

* the four units (SDM, RWS, AMISCG, CPS) and their parallel operation;
* the 0..199 and 0..99 counters;
* the quarter-table mapping, with the second quarter addressed 99-n, and the
  sign inversion of quarters 3 and 4;
* the carrier made of inverted sine, peak-corrected and modulated by a
  positive or negative peak-sine envelope selected by the polarity flag;
* one comparator and the separation of pulses into two groups by half-cycle;
* the 100 MHz / 10 MHz / 10 kHz / 600 kHz clock names.

These are choices made for this RTL:

* all widths and number formats;
* the half-step table offset;
* how the peak is corrected (a constant gain);
* the comparison sense (a pulse is on while |ref| > |carrier|);
* enables instead of generated clocks;
* the register stages;
* synchronous reset;
* the gate bus order.

Not included:

* **No dead time** is inserted between the groups. Both are off around every
  zero crossing of the reference, but within a half-cycle a group switches
  every carrier period. Add dead time in the gate driver, or after `cps_unit`.
* **The inverter power stage** (switches, DC link, load) is outside the RTL.
  `gate` is meant to drive it.
* **No separate 50 Hz clock**; see *Clocking and timing*.

## Simulating

Each module has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl rtl/amisc_pkg.sv \
              tb/tb_amisc_pwm.sv --top-module tb_amisc_pwm -o sim
    ./obj_dir/sim

Replace `amisc_pwm` with any module name to run that module's testbench.

* `tb_amisc_pwm` runs the top at its default parameters, about 6 M clocks
  (around 12 s). It covers three whole 50 Hz periods, at Ma = 0.8, 0.4 and
  1.2.
  * On every clock it compares both pulse outputs with an independent model.
    The model derives the sample numbers from the clock count and the sample
    values from `$sin`.
  * It checks the 2,000,000-clock fundamental period, the number of pulses,
    and the fundamental of the bridge voltage against (4/π)·w(Ma).
  * It counts that positive pulses, negative pulses, polarity switches, index
    changes, full-peak carrier samples and merged (over-modulated) pulses all
    occurred.
* `tb_quarter_sine_rom` checks all 50 entries against `$sin`, the rising
  order, and addresses past the table.
* `tb_sdm_unit` checks two full periods: the signed sine, the magnitude, the
  flag and the counter.
* `tb_rws_unit` checks corner and random products, including negative
  samples.
* `tb_amiscg_unit` checks the corrected inverted sine and the modulated
  carrier for every count, for full, random and zero envelopes in both
  polarities. It also checks that every carrier period reaches full scale.
* `tb_cps_unit` checks random, equal and near-equal inputs in both halves.
* `tb_clock_enable_gen` checks the exact tick positions of a ÷10 divider and
  of a 50:3 divider fed with random input ticks.
