# Switching-pattern controller for a 35-level LUO progression switched ladder inverter

A multi-level inverter makes an AC voltage as a staircase. This inverter
stacks four DC sources whose voltages follow the LUO progression:
V_i = i for i ≤ 2 and V_i = 7·3^(i-2) for i ≥ 3, which gives 1, 2, 7 and 21 V.
Each source can be added to the ladder, subtracted from it or bypassed. A pair
of polarity switches then applies the ladder voltage to the load with either
sign. With three choices for each source, every whole voltage from −31 to +31 V
can be reached. The default configuration uses 35 of these levels: −17 … +17 V.

This RTL is the digital part only. It is a small controller that runs from one
clock and drives the 14 gate signals of the power stage, so that the load sees
a 35-step sine approximation. It uses no carrier and no PWM. Each level is
switched on once per quarter wave, at a precomputed angle.

```
clk ──► phase_counter ──phase[7:0]──► hhm_level_generator ──{neg,mag}──► luo_switch_encoder ──► 14 gate signals
        (prescaler +                  (fold to quarter wave,              (level → add/sub/bypass
         8-bit angle)                  compare with 17 angles)             per source, polarity; registered)
```

## Switching angles

One AC cycle is split into 256 angle counts: 0..255 covers 0..360°. Level i of
an M-level inverter (i = 1 … (M−1)/2) uses the half-height angle

    alpha_i = asin((2i − 1) / (M − 1))

That is the angle at which the ideal sine crosses the middle of step i. The
angle is converted to counts, truncated, and then moved one count later:

    T_i = floor(alpha_i · 256 / 2π) + 1

For M = 35 this gives the following first-quarter thresholds, in counts:

    2 4 7 9 11 14 16 19 22 25 28 31 34 38 42 47 55

The "+1" is the improvement over plain half-height switching. With it, the
staircase has an RMS value of 12.033 V and a fundamental amplitude of
17.012 V. These are the figures this design is meant to reproduce.
Rounding or truncating without the offset gives a fundamental of 17.16 V or
17.27 V. `luo_pkg::hhm_threshold` computes the thresholds during elaboration
with real arithmetic, so no number table is stored and any odd M from 3 to 63
works. Only the comparison constants reach the hardware.

`hhm_level_generator` uses the quarter-wave symmetry of the sine:

* The low 7 bits of the angle give the position p within the half cycle.
* The position is folded into the first quarter: q = p for p ≤ 64, and
  q = 128 − p above that. So the thresholds are crossed in rising order up to
  90° and in reverse order after it.
* The level magnitude is the number of thresholds with q ≥ T_i. It is computed
  as a thermometer code followed by a ones count.
* The top angle bit gives the sign. Counts 0..127 are the positive half and
  128..255 the negative half.

The peak level 17 is held for 19 counts in each half (counts 55..73).

## From a level to gate signals

Each source k has three gate signals, named after its voltage: `sKp` (add),
`sKn` (subtract) and `sKd` (bypass). Exactly one of the three is on.
`luo_switch_encoder` splits a magnitude L into source modes, starting with the
largest source:

* r starts at L.
* For each source k, let R_k be the sum of all smaller sources. Add source k
  if r > R_k. Subtract it if r < −R_k. Otherwise bypass it.
* Take the chosen contribution off r before moving to the next source.

For 1, 2, 7 and 21 V the limits are 10, 3, 1 and 0. This gives the
combinations of the inverter's level table:

| level | 21 V | 7 V | 2 V | 1 V | sum |
|------:|:----:|:---:|:---:|:---:|-----|
| 3  |   |   | + | + | 2+1 |
| 4  |   | + | − | − | 7−2−1 |
| 6  |   | + |   | − | 7−1 |
| 10 |   | + | + | + | 7+2+1 |
| 11 | + | − | − | − | 21−7−2−1 |
| 14 | + | − |   |   | 21−7 |
| 17 | + | − | + | + | 21−7+2+1 |

The rule also covers levels 18..31, for use with up to 63 levels.

A negative level uses the same ladder pattern as the positive one. The only
difference is that `swn` is on instead of `swp`. At level 0 every source is
bypassed, and the polarity switch stays on the side of the current half cycle.

The gate signals come from registers and change one clock after the angle
changes, so they are free of glitches. Reset puts every source in bypass and
opens both polarity switches, so the load sees no voltage. Two assertions in
the encoder check that exactly one of p/n/d is on per source and that `swp`
and `swn` are never on together.

## Timing

`phase_counter` has two counters:

* a prescaler that counts `PRESCALE` clocks, 512 by default (a 9-bit
  register);
* an 8-bit angle counter that steps once each time the prescaler wraps.

One output cycle therefore takes PRESCALE × 256 clocks, which is 131072 at the
defaults. A 50 Hz output needs a 6.5536 MHz clock. The gate outputs follow the
angle by one clock. The design has no other latency and no handshake: after
reset it runs without stopping.

## Top level: `luo_sli_controller`

| port | dir | meaning |
|------|-----|---------|
| `clk` | in | clock |
| `rst_n` | in | active-low synchronous reset |
| `s1p s1n s1d` | out | 1 V source: add / subtract / bypass |
| `s2p s2n s2d` | out | 2 V source |
| `s7p s7n s7d` | out | 7 V source |
| `s21p s21n s21d` | out | 21 V source |
| `swp swn` | out | output polarity: + / − |
| `level[5:0]` | out | signed level now being driven (for monitoring) |

| parameter | default | meaning |
|-----------|---------|---------|
| `M` | 35 | number of output levels; must be odd, 3..63 |
| `PRESCALE` | 512 | clocks per angle count |

`luo_pkg` holds the shared constants:

* the number of sources and the angle resolution (8 bits);
* the LUO voltage function and the threshold function;
* the `sw_pattern_t` gate-signal struct.

A synthesised controller is small: 37 flip-flops plus about 220 word-level
cells.

## Verification

Each testbench checks its own results and prints
`TB_RESULT checks=N failures=F`.

* `tb_phase_counter`: runs three full cycles with a prescaler of 5. Every
  clock it checks the angle and the step strobe against a count of clocks. It
  also checks the wrap and reset.
* `tb_hhm_level_generator`: tries all 256 angles at M = 35 and M = 7. It
  checks against the fixed threshold list above, and against a sine search
  that finds the first count whose sine exceeds (2i−1)/(M−1).
* `tb_luo_switch_encoder`: checks levels 0..17 against the source-combination
  table, for both signs. For levels 18..31 it checks that the sources sum to
  the level. It also checks the reset state, the one-clock latency and the
  polarity switches.
* `tb_luo_sli_controller` runs the top at its default parameters through two
  full 50 Hz cycles (262k clocks, under a second of simulation):
  * The gates drive a behavioural model of the power stage
    (`tb/sli_power_stage_model.sv`).
  * The load voltage is compared every clock with a reference staircase.
  * It also requires every level from −17 to +17, rises and falls, polarity
    reversals, the cycle wrap and a reset in the middle of a cycle.
  * Each cycle it measures V_RMS = 12.033 V, a fundamental of 17.012 V and a
    peak of ±17 V.
* `tb_luo_sli_m63`: runs the top at 63 levels, the full reach of the four
  sources. It checks every level from −31 to +31.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_luo_sli_controller \
    -y rtl -y tb +libext+.sv rtl/luo_pkg.sv tb/tb_luo_sli_controller.sv
./obj_dir/Vtb_luo_sli_controller
```

## How far to trust it, and where it departs from the source design

* **The power stage is not RTL.** It is an analog circuit: sources, power
  switches and the load. A behavioural model exists only in `tb/`.
* **Where the "+1" goes.** The angle formula of the source design does not
  show where the integer offset "1" is added. This design adds it to the
  truncated angle count, the only placement tried that gives the published
  RMS (12.03 V) and fundamental (17.01 V).
* **THD.** Over all 127 harmonics of the 256-step staircase, THD comes out at
  2.33%. The published figure is 2.59%, from a Simulink FFT whose sampling and
  harmonic range are not known. So the THD has not been matched.
* **The 14 gate signals.** Their names come from the source design's block
  diagram: three per source plus two for polarity. Its circuit drawing instead
  shows one two-way switch per source plus two polarity switches (6 in all).
  The 14-signal interface is the one implemented here. Reading the suffixes
  p / n / d as add / subtract / bypass is this design's interpretation.
* **Level count.** The default is 35 levels. A 63-level setting, the largest
  the sources allow, is supported through `M` and tested.
* **This design's own choices**, none of them specified by the source design:
  * the prescaler length, and reading the 9-bit register as a prescaler;
  * the reset input and the reset state;
  * the registered outputs;
  * the polarity at level 0;
  * the `level` monitor port.

  No dead time is inserted between gate changes. A real power stage may need
  one, or gate drivers that provide it.
