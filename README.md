# Gate-pulse controller for a three-phase modular 5-level converter

A modular 5-level converter builds each phase from two stacked full-bridge
cells. Each cell can add +Vdc, 0 or -Vdc to the phase voltage, so the phase
has five levels (-2Vdc to +2Vdc). Each cell has four IGBTs, so one phase needs
eight gate signals and the three-phase converter needs 24. That is more PWM
channels than a typical DSP offers. This RTL produces all 24 in parallel on a
single FPGA clock.

The modulation is phase-shifted-carrier sinusoidal PWM:

* One sine reference per phase comes from a 256-entry look-up table.
* Four triangular carriers are used, 0°, 90°, 180° and 270° apart. Only two
  are counted; the other two are their bitwise inverses.
* Each of the four half-bridge legs of a phase compares the phase reference
  with its own carrier, and the result decides which of the leg's two IGBTs
  conducts.
* A deadband keeps both IGBTs of a leg off while they hand over.

## Signal chain and numbers

All blocks run on one clock, `clk`, which is 50 MHz by default. Every slower
rate comes from a clock divider that emits a one-cycle enable pulse.

| quantity | how it is made | default |
|---|---|---|
| reference table | 256 entries, 16 bits, `S(n) = 32767.5 + 32767.5·sin(2πn/256)`, rounded | entry 0 = `8000`, 1 = `8324`, 255 = `7cdb` (hex) |
| reference frequency | one table step every `REF_DIV` cycles: `f_clk / (256·REF_DIV)` | 3906 → 50.004 Hz |
| reference to comparators | top 9 bits of the table word | 0..511 |
| carrier | 9-bit up/down counter stepped every `CAR_DIV` cycles, 1024 steps per period: `f_clk / (2·2^9·CAR_DIV)` | 32 → 1525.9 Hz |
| deadband | `DEADBAND` carrier counts, half on each side of the reference | 32 counts ≈ 20.5 µs at a steady reference |

The carrier counts 0, 1, …, 511, holds for one step at 511, counts down to 0,
and holds for one step there. A period is therefore exactly 1024 steps. The
90° carrier is the same counter reset to 256 instead of 0, so it runs a
quarter period ahead. Inverting all nine bits gives `511 - x`, the triangle
mirrored about mid-scale, which is the 180° (or 270°) copy.

Phases B and C read the same table 171 and 85 entries ahead of phase A. That
puts them 120° and 240° behind. 256 is not divisible by three, so these
offsets are rounded and the phase error is 0.47°.

## Which carrier drives which IGBT

In phase p, `gate[p][0]` to `gate[p][7]` are S1 to S8:

| gates | position | carrier |
|---|---|---|
| S1 (upper), S2 (lower) | top cell, left leg | 0° |
| S3, S4 | top cell, right leg | 180° (inverted 0°) |
| S5, S6 | bottom cell, left leg | 90° |
| S7, S8 | bottom cell, right leg | 270° (inverted 90°) |

The output of a cell is Vdc·(S1 − S3) for the top cell and Vdc·(S5 − S7) for
the bottom cell. The phase output is their sum.

The two legs of a cell share the reference, but their comparators work in
opposite senses:

* In a left leg, the upper IGBT is on while the reference is above the
  carrier.
* In a right leg, the upper IGBT is on while the mirrored carrier is above the
  reference.

The result is unipolar switching. In the positive half-cycle each cell
switches only between 0 and +Vdc, and in the negative half-cycle only between
0 and −Vdc. The 90° offset between the two cells interleaves their switching
edges. The phase voltage is then a five-level staircase, and the line-to-line
voltage has nine levels.

If both legs used the left-leg sense, a cell would swing between +Vdc and
−Vdc within one half-cycle, and the line voltage would have only five levels.

## The comparator and its deadband

Each half-bridge leg has its own `pwm_comparator`. With `cmp` as the
comparison value and `count` as the carrier, the comparator computes:

```
below = count <  cmp - DEADBAND/2        (reference above carrier)
above = count >= cmp + DEADBAND/2        (carrier above reference)
left leg  (RIGHT_LEG = 0): pwm_t = below, pwm_b = above
right leg (RIGHT_LEG = 1): pwm_t = above, pwm_b = below
dba = neither
```

Here `pwm_t` drives the upper IGBT and `pwm_b` the lower one. As the carrier
crosses the reference, the conducting IGBT turns off DEADBAND/2 counts before
the crossing. Its partner turns on DEADBAND/2 counts after it.
At a steady reference the dead time is therefore `DEADBAND·CAR_DIV` clock
cycles. The comparison is done two bits wider than the operands, so nothing
wraps at the ends of the range:

* A reference below 16 keeps the upper IGBT off for the whole period.
* A reference above 495 keeps the lower IGBT off for the whole period.

This is the part that needs the most care. The dead time is not a timer. It
comes from the distance between two thresholds that move with the reference.
The carrier moves one count per step. When the reference moves towards the
carrier during a handover, the dead time gets shorter:

* With the plain 50 Hz sine, the reference moves at most about 6 counts per
  table step.
* The third-harmonic reference has a steeper slope, about 11 counts.
* The shortest handover in a full-speed simulation was 21 carrier steps
  (13.4 µs).

Switching `sine_type` while the converter runs makes the reference jump. One
handover can then be as short as a couple of carrier steps. Change the
reference type while `ena` is low, or while `load` is low, which holds the
comparison value.

The gate, deadband and disable outputs are registered. They update on the
comparator's own divider tick. That tick runs at the carrier rate, so the
gates follow the carrier one carrier step late (32 cycles, 640 ns). An
assertion in `pwm_comparator` checks that `pwm_t` and `pwm_b` are never high
together.

## Controls

| port | meaning |
|---|---|
| `rst` | synchronous, active high: carriers go to 0 and 256, counting up; the table index goes to 0; all gates go off |
| `ena` | low: carriers freeze and every gate and deadband flag goes low; the reference keeps running |
| `load` | high: comparators follow the references; low: each comparator holds its last value |
| `sine_type` | 0: plain sine; 1: third-harmonic-injected sine, `2/√3·(sin t + sin 3t / 6)`, which has the same peak as the sine; 2 and 3: plain sine |

`ena`, `load` and the two `sine_type` bits are meant for four slide switches.
Outputs for observation: `ref_out` is the 9-bit reference per phase, `angle`
is the 16-bit table word per phase, and `car_0` and `car_90` are the two
counted carriers.

## Module hierarchy

```
mmc_controller            top: 3 phases, 24 gates
├── ref_signal_gen        table index, reference divider, 3 phase outputs
│   ├── clk_divider       (REF_DIV)
│   └── sine_lut ×3       512 x 16 ROM: sine page and third-harmonic page
├── carrier_counter ×2    0° (INIT 0) and 90° (INIT 256)
│   └── clk_divider       (CAR_DIV)
├── inverter9 ×2          180° and 270° carriers
└── phase_leg_ctrl ×3     one per phase
    └── pwm_comparator ×4 one per half-bridge leg
        └── clk_divider   (CAR_DIV)
mmc_pkg                   widths, table size, default dividers, reference-type enum
```

The table contents are computed at elaboration from the formula above with
`$sin`; no data file is needed. At the defaults, synthesis gives about 250
flip-flops and three 512×16 ROMs. That fits easily in a small FPGA such as a
Spartan-3E XC3S500E.

## What follows the source design and what is this design's own choice

These follow the source design: the 9-bit up/down carriers and their start
values, generating 180°/270° by inversion, the assignment of carriers to legs,
the 256×16 table and its formula, the divider equations, and the deadband of
32 split into ±16.

These are this design's own choices:

* The 50 MHz clock. It is consistent with a 20 ns clock and with a measured
  1,525 Hz switching frequency, which is 50 MHz / (32·1024).
* Clock-enable dividers instead of derived clocks.
* The one-step hold at the carrier turning points, which gives exactly 1024
  steps per period.
* Both counters counting up after reset.
* The gate sense of the right-leg comparators (upper IGBT on while the
  mirrored carrier is above the reference). This sense is what makes the line
  voltage nine-level.
* The meaning of `load`, `ena` and the deadband flag.
* Registered comparator outputs.
* The B/C table offsets.
* Scaling the 16-bit table to a 9-bit reference that spans the full carrier.
  This is a modulation index of about 1. A reference drawn on an 8-bit scale
  (0..255) against a 0..511 carrier would mean half that.
* The reference-type encoding and the amount of third harmonic.
* Sharing the two carrier counters among the three phases.
* Building the deadband into each comparator instead of a separate stage
  after the comparators.

Not part of the RTL are the crystal, the 3.3 V to 15 V gate drivers, the IGBT
cells and the board connectors and switches. The top module's ports stand in
for them.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_clk_divider` checks tick positions under a random enable.
* `tb_inverter9` checks all 512 inputs.
* `tb_carrier_counter` checks the 0°/90° carriers against `tri(k)` and
  `tri(k+256)`, freezing, and the 1024-step period.
* `tb_sine_lut` checks all 512 words against the formula, the twelve
  entries listed in the table above exactly, and the read latency.
* `tb_ref_signal_gen` checks three phases, both reference types, the step rate
  and the period.
* `tb_pwm_comparator` compares random stimulus against a model, and measures
  the deadband width and the saturated ends in a carrier sweep.
* `tb_phase_leg_ctrl` checks the carrier-to-gate mapping, that all five phase
  levels occur, and that each cell switches unipolarly.
* `tb_mmc_controller` runs the whole controller at its default parameters.
  It covers one 20 ms period with plain sine, one with third-harmonic sine, a
  load hold and a disable. It checks carriers, references, shoot-through,
  dead times, the five levels of every phase, the nine levels of the line
  voltage A − B, 29 S1 pulses per period, the repeating held pattern and the
  disabled outputs. It runs about 2.1 million cycles in a few seconds.

To run a testbench with Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/mmc_pkg.sv tb/tb_mmc_controller.sv --top-module tb_mmc_controller
./obj_dir/Vtb_mmc_controller
```

## Changing it

* For another clock, set `REF_DIV = f_clk / (256·f_ref)` and
  `CAR_DIV = f_clk / (1024·f_carrier)`.
* The deadband is `DEADBAND` carrier counts. Its length in time is
  `DEADBAND·CAR_DIV / f_clk`.
* The table formula is in `sine_lut.sv`. The phase offsets and the
  reference-type codes are in `mmc_pkg.sv`.
* A converter with more cells per phase needs more carriers spread evenly
  over 360°, with one comparator per leg. `phase_leg_ctrl` is the unit to
  replicate.
