# Level-shift SPWM gate generator for a 5-level NPC inverter

A single-phase, 5-level neutral-point-clamped (NPC, diode-clamped) inverter leg
has eight switches in series: four upper switches S1..S4 and four lower
switches S1'..S4'. Four capacitors split the DC input voltage Vi, and twelve
clamping diodes tie the intermediate nodes to the capacitor taps. By closing
four adjacent switches at a time, the leg puts one of five voltages on its
output: +Vi/2, +Vi/4, 0, -Vi/4 or -Vi/2.

This RTL produces the eight gate signals. It uses level-shift sinusoidal PWM
(SPWM): a 50 Hz sine reference is compared with 20 kHz triangular carriers
stacked in voltage bands. Wherever the reference lies above a carrier, the
switch that carrier commands is on. The logic is small: one counter, one phase
accumulator with a sine table, two comparators and a lookup table. It runs
entirely in parallel hardware, with a fixed latency of a few clock cycles.

## Signal chain

```
            +-------------+  ref_val (signed)   +-----------------+ g_lo, g_hi  +-------------------+  gates[8]
mod_index ->| sine_ref_gen|-------------------->| spwm_comparator |-----------> | npc_switch_mapper |---------> gate drivers
            +-------------+                     |                 | positive    |  (state table)    |  level
            +-------------+  c_lo, c_hi         |                 |             +-------------------+
            | carrier_gen |-------------------->|                 |
            +-------------+                     +-----------------+
```

| module | role |
|---|---|
| `npc5_pkg` | gate-word struct `npc5_gates_t`, level enum `npc5_level_e`, the state table `level_to_gates()` |
| `carrier_gen` | up/down counter that makes the two stacked triangular carriers |
| `sine_ref_gen` | DDS sine reference with linear interpolation and a modulation-index scale |
| `spwm_comparator` | splits the reference into polarity and magnitude and compares the magnitude with both carriers |
| `npc_switch_mapper` | turns (polarity, g_lo, g_hi) into the output level and its eight-switch pattern |
| `npc5_spwm_top` | wires the four together |

## How four carriers become two comparisons

A level-shift modulator for an m-level inverter needs m-1 = 4 carriers. Each
carrier fills one quarter of the reference range:

```
 +2*HALF  /\    /\    upper positive band  -> S1
 +HALF   /  \/  \/    lower positive band  -> S2
 0       ----------
 -HALF   \  /\  /\    lower negative band  -> S3
 -2*HALF  \/  \/      upper negative band  -> S4
```

Here the carriers are built as one group of two. The comparator takes the
magnitude of the reference and compares it with:

- `c_lo`, a triangle from 0 to HALF;
- `c_hi = c_lo + HALF`, a triangle from HALF to 2*HALF.

This yields two fundamental PWM signals, `g_lo = |ref| > c_lo` and
`g_hi = |ref| > c_hi`. The polarity of the reference then decides which
switches they drive:

| half cycle | S1 | S2 | S3 | S4 | Sk' |
|---|---|---|---|---|---|
| positive (ref >= 0) | g_hi | g_lo | 1 | 1 | not Sk |
| negative | 0 | 0 | not g_lo | not g_hi | not Sk |

This is the same as comparing the signed reference with four carriers, where
the negative pair is the positive pair mirrored about zero. In the negative
half cycle, S3 and S4 carry the inverted patterns that S2 and S1 carried half
a period earlier. So the four upper-switch waveforms are two basic signals and
their half-period-shifted complements.

The mapper first decodes the level and then looks up the gate pattern. This
makes the state table explicit in one place (`npc5_pkg::level_to_gates`):

| level | S1 | S2 | S3 | S4 | S1' | S2' | S3' | S4' |
|---|---|---|---|---|---|---|---|---|
| +Vi/2 | 1 | 1 | 1 | 1 | 0 | 0 | 0 | 0 |
| +Vi/4 | 0 | 1 | 1 | 1 | 1 | 0 | 0 | 0 |
| 0     | 0 | 0 | 1 | 1 | 1 | 1 | 0 | 0 |
| -Vi/4 | 0 | 0 | 0 | 1 | 1 | 1 | 1 | 0 |
| -Vi/2 | 0 | 0 | 0 | 0 | 1 | 1 | 1 | 1 |

In `npc5_gates_t`, `upper[k]` is Sk and `lower[k]` is Sk'. A switch and its
complement are never on together, and the mapper asserts this. The output
moves by at most one level per step.

## Numbers and timing

Defaults: 100 MHz clock, 20 kHz carrier, 50 Hz output.

- **Carrier.** One count per clock, so HALF = 100 MHz / (2 * 20 kHz) = 2500. A
  carrier period is exactly 5000 clocks. The carrier resolution is 1/2500 of a
  band.
- **Reference.** A 32-bit phase accumulator advances by 2147 per clock, which
  gives 49.9989 Hz (2,000,467 clocks per period). The top 10 phase bits address
  a 1024-entry Q1.15 sine table, which is computed at elaboration from
  `round(32767 * sin(2*pi*i/1024))`. The next 12 bits interpolate linearly
  between neighbouring entries.
- **Why interpolate.** Without interpolation, the reference jumps by up to
  25 carrier units every 1953 clocks. If a jump lands just after a crossing,
  the carrier and reference cross a second time, and a 0.2 µs sliver pulse
  reaches a switch. With interpolation, the reference moves by about one unit
  at a time, no faster than the carrier, so each carrier slope crosses it at
  most once.
- **Amplitude.** `mod_index` is an unsigned Q1.15 number (32768 = 1.0). The
  reference peak is `mod_index * 5000` carrier units, so at 1.0 it reaches the
  top of the upper band. Below 0.5 the leg uses only the three inner levels.
  Values above 1.0 overmodulate, up to 2.0.
- **Latency.** From phase accumulator to reference: 3 clocks. Comparator: 1
  clock. Mapper: 1 clock. The gates change at most once per clock.
  `carrier_peak` marks the top of each carrier. `ref_cycle_start` marks the
  start of each output period and is aligned with the reference sample.
- **Reset.** Synchronous and active-low. While it is held, all eight gates are
  off.

Resources after generic synthesis of the top: about 67 word-level cells,
121 flip-flop bits, and a 1024 x 16 sine ROM. The ROM is read through two
ports.

## What is outside the FPGA

The gate outputs are 3.3 V logic. High-side and low-side gate drivers must
raise them to the roughly 15 V the power switches need. The following are not
logic and are not part of the RTL:

- the gate drivers;
- the power stage (DC source, capacitors, switches, clamping diodes);
- the output inductor and the load.

No dead time is inserted between a switch and its complement. Add it in the
drivers, or add a dead-time stage after `npc_switch_mapper`, before driving
real hardware.

## Design choices beyond the basic scheme

The modulation principle, the two carrier groups, the 50 Hz / 20 kHz
frequencies and the switching table are the scheme itself. The following are
choices of this implementation:

- the 100 MHz clock;
- the DDS reference, its table size and its interpolation;
- the in-phase (phase-disposition) alignment of the carrier bands;
- taking the reference magnitude, so that one carrier group serves both half
  cycles;
- the Q1.15 modulation-index input;
- all word widths, the pipeline registers and the reset behaviour.

Comparisons are strict: when the reference equals a carrier, the comparator
output is 0.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `carrier_gen_tb` | triangle values clock by clock against a counter model, both bands, the peak strobe, the 5000-clock period |
| `sine_ref_gen_tb` | the reference against `peak*sin(phase)` computed in real arithmetic (within 2 units) over two periods with five modulation indices; step size; half-cycle signs; the 20 ms period |
| `spwm_comparator_tb` | 20,000 random references and carriers, including equality cases |
| `npc_switch_mapper_tb` | every input combination against the state table; complementarity; reset state |
| `npc5_spwm_top_tb` | end to end at default parameters (see below) |
| `npc5_rl_load_tb` | the gates drive a load model (see below) |

**`npc5_spwm_top_tb`.** The gates drive an ideal leg model,
`tb/npc5_bridge_model.sv`, with 800 V DC. The test runs one full output period
at modulation index 1.0, then half a period at 0.4. It checks, at every clock:

- the gate state is legal;
- the reported level agrees with the leg model;
- the output changes by single-level steps only.

It checks for every carrier period:

- the period is 50 µs;
- a switch toggles no more than the carrier allows;
- the average output follows `2*m*sin(theta)`.

It checks once per output period:

- the period is 20 ms;
- the output fundamental is `m*Vi/2` within 1 %.

At index 0.4 it checks that ±Vi/2 never occurs. It also counts that every
level, both half cycles, steps up and down, and the reduced-index mode all
occurred. The run takes about 3 s.

**`npc5_rl_load_tb`.** The gates drive the leg model into 100 Ω, with and
without 20 mH in series, and the current is integrated at the clock step. At
modulation index 1.0 the current THD is 26.96 % unfiltered and 0.86 % with the
inductor. Published simulation results for this operating point (800 V, level-shift
SPWM) are 27.06 % and 1.24 %. The ideal leg has no dead time, no device drops and no
capacitor ripple, which explains the lower filtered figure.

To run a testbench with plain Verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
    rtl/npc5_pkg.sv tb/npc5_spwm_top_tb.sv --top-module npc5_spwm_top_tb -o sim
./obj_dir/sim
```

## Changing it

- **Another clock or switching frequency.** Set `CLK_HZ` and `F_SW_HZ` on
  `npc5_spwm_top`. HALF, the carrier and reference widths, and the DDS
  increment all follow.
- **Another output frequency.** Set `F_OUT_HZ`. The testbenches assume the
  defaults in their expected periods.
- **A finer or coarser table.** Set `LUT_AW` and `FRAC_W` on `sine_ref_gen`.
  Keep `LUT_AW + FRAC_W` large enough that the reference moves by no more than
  one carrier unit per table step.
- **Another state assignment**, for example a different S-numbering on a
  board: edit `npc5_pkg::level_to_gates` only.
