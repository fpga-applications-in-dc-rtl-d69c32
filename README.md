# Single-chip SPWM and SVPWM modulator for a three-phase inverter

This RTL drives the six switches of a two-level three-phase voltage-source
inverter. It contains two complete pulse-width modulators, side by side on
one clock:

- **SPWM**, sine-triangle modulation. Three sine references, 120° apart,
  are compared with a triangular carrier.
- **SVPWM**, space-vector modulation. The three phase voltages become one
  rotating vector. The dwell times of the two neighbouring inverter states
  and of the zero states are computed once per switching period and played
  out as centre-aligned pulses.

Each modulator ends in a dead-time inserter that turns its three phase
signals into six gate signals, P1..P6. The two modulators share nothing
except the clock and reset, so either can drive the inverter.

All datapath arithmetic uses a small fixed-point format, **1Q8**. It is a
9-bit two's-complement word with 7 fraction bits. A dedicated ALU (the
*QALU*) and a package of functions for it supply that arithmetic. Both
modulators take their fundamental and switching frequencies as run-time
inputs.

```
            +-------------------------------- fpga_pwm_top ------------------------------+
 fo_hz ---->| frequency_selector --theta--+                                               |
 sw_div --->| clock_divider -----tick-----+--> spwm_pwm_controller --pwm[3]--> dead_time  |--> spwm_p[6:1]
 m_index -->|                             |      (carrier, QALU)              _inserter  |
 td ------->|                             +<-- start/angle, done/sin --> external CORDIC |
            |                                                                            |
 va,vb,vc ->| sampler -> coord_converter_32 -> sector_detector                           |
 vdc, ts -->|              (alpha,beta)          (sector)                                |
            |                 |                     |                                    |
            |            sincos_generator x2 --> duty_calculator --T1,T2,T0-->           |
            |                                     (QALU, divider)   svpwm_pwm_generator  |
 td ------->|                                                       --pwm[3]--> dead_time|--> svpwm_p[6:1]
            +----------------------------------------------------------------------------+
```

## Number format: 1Q8

| Value | Bits (sign . D8..D1) | Hex |
|---|---|---|
| +1.0 | 0 1 0000000 | 080 |
| -1.0 | 1 1 0000000 | 180 |
| +π/4 ≈ 0.7854 | 0 0 1100100 | 064 |
| -π/4 | 1 1 0011100 | 19C |
| largest | 0 1 1111111 (1.9921875) | 0FF |
| smallest | 1 0 0000000 (-2.0) | 100 |

A word is a signed integer `x` with value `x / 128`. It has one sign bit,
one integer bit and seven fraction bits. That gives headroom above ±1, so
sums such as 2·va − vb − vc do not wrap before they are scaled. Negative
numbers are two's complement.

`rtl/qalu_pkg.sv` holds the type `q_t`, the constants, and the operations as
functions:

- add and subtract, saturating;
- multiply, rounded half up and saturated (`(a·b + 64) >>> 7`);
- multiply by a Q.15 constant (`q_scale`);
- compare.

`rtl/qalu.sv` wraps the same functions behind an opcode (`qalu_op_e`):

- arithmetic: add, sub, mul, neg, abs, max, min;
- logic: and, or, xor, not;
- shifts: shl, shr;
- flags: zero, negative and overflow.

A block that evaluates a sequence of operations instantiates one `qalu` and
steps it through the sequence. Blocks with one fixed formula call the
package functions directly.

Angles are binary: 16 bits per turn (`angle_t`). So 60° = 10923,
90° = 16384 and 120° = 21845. Wrap-around is free.

## SPWM path

**Frequency selector** (`frequency_selector.sv`). This is a 40-bit phase
accumulator. It adds `fo_hz · K` every clock, with K = round(2^40 / f_clk);
K is 21990 at 50 MHz. The top 16 bits are the phase angle θ. `fo_hz` is an
integer in hertz (0..255). The frequency error is below 2·10⁻⁵.

**Clock divider** (`clock_divider.sv`). It produces a one-clock enable
`tick` every `sw_div` clocks. This is an enable, not a derived clock.

**PWM controller** (`spwm_pwm_controller.sv`). This is the core of the SPWM
path.

- **Carrier.** A symmetric triangle in 1Q8 runs from −1.0 to +1.0 and back,
  one LSB per tick. A carrier period is therefore 512 ticks:
  f_sw = f_clk / (512 · sw_div). At 50 MHz, `sw_div` = 5 gives 19.5 kHz
  and `sw_div` = 37 gives 2.64 kHz.
- **Regular sampling.** At each carrier minimum (`valley`) the controller
  latches θ. It then asks the CORDIC core for sin θ, sin(θ − 120°) and
  sin(θ + 120°), one request at a time. Each request raises `cordic_start`
  for one clock with `cordic_angle`. Each answer is `cordic_done` with
  `cordic_sin`.
- **Scaling.** Each sine is multiplied by `m_index` in the QALU. The result
  goes into a shadow register.
- **Update.** At the next valley the shadow set becomes the active set of
  references (`phase_wave`). The references therefore change only at the
  carrier minimum and lag the sampled angle by one carrier period. All three
  answers must arrive within one carrier period; at 19.5 kHz that is 2560
  clocks.
- **Comparison.** `pwm[k]` = reference k > carrier, registered.

The CORDIC core itself is not part of this RTL; it is an external sine
source. Its request/response pair is brought out at the top
(`spwm_cordic_*`). The testbenches attach a behavioural model
(`tb/cordic_model.sv`) with a fixed 16-clock latency.
`rtl/sincos_generator.sv` has the same handshake and latency and can be
wired in instead.

## SVPWM path

The sequencer in `svpwm_modulator.sv` runs the chain once per switching
period. It starts on the generator's `period_start`:

| Step | Block | Clocks |
|---|---|---|
| sample va, vb, vc, vdc, ts | sequencer | 1 |
| α, β | `coord_converter_32` | 1 |
| sector s | `sector_detector` | 1 |
| sin, cos of (s−1)·60° | `sincos_generator` | 16 |
| sin, cos of s·60° | `sincos_generator` | 16 |
| T1, T2, T0 | `duty_calculator` | 44 |
| load shadow registers | `svpwm_pwm_generator` | — |

The whole chain takes about 85 clocks. The new times take effect at the
next period boundary, so `ts` must be well above 100 clocks. The pulses
therefore lag the sampled voltages by one period.

### 3-2 converter and sector

The converter applies the amplitude-invariant Clarke transform, with Q.15
constants and rounding to 1Q8:

- α = (2va − vb − vc) / 3
- β = (vb − vc) / √3

Sector k spans (k−1)·60° to k·60°. The detector uses three exact sign tests
instead of an angle:

- A = β ≥ 0
- B = (√3/2)α − β/2 > 0
- C = −(√3/2)α − β/2 ≥ 0

N = A + 2B + 4C then maps 3, 1, 5, 4, 6, 2 to sectors 1..6. The zero vector
lands in sector 3; its dwell times are all zero-vector time.

### Sin/cos generator

This is a rotation-mode CORDIC on an 18-bit datapath with 15 fraction bits.
It runs 14 micro-rotations, one per clock, with shifts and adds only.

- The start vector is (0.60725, 0), which pre-compensates the CORDIC gain.
- Angles beyond ±90° are rotated by 180° first, and the results are
  negated.
- The results are rounded to 1Q8 and are within one LSB of the exact
  values.
- The result arrives 16 clocks after `start`.

### Duty calculator: the hard part

For a vector in sector s, the two active inverter states that border the
sector lie at angles (s−1)·60° and s·60°. Projecting the reference onto the
normals of those borders gives the dwell times without any arctangent or
square root:

```
p1 = sin(s·60°)·α − cos(s·60°)·β          (∝ |V| sin(60° − θ'))
p2 = cos((s−1)·60°)·β − sin((s−1)·60°)·α  (∝ |V| sin(θ'))
T1 = √3 · Ts · p1 / Vdc
T2 = √3 · Ts · p2 / Vdc
T0 = Ts − T1 − T2
```

Here θ' is the angle inside the sector.

The block computes these in three stages:

1. **Projections.** One shared QALU instance evaluates the four products
   and the two differences, one operation per clock (6 clocks, 1Q8).
2. **Scale factor.** A 32/16-bit restoring divider (`seq_divider.sv`,
   33 clocks) computes Kf = round(√3 · Ts · 2^15 / (Vdc · 2^7)), the number
   of clocks per 1/256 of normalised voltage. The constant √3 is Q.15.
3. **Times.** T = round(Kf · p / 256). A negative projection counts as
   zero.

**Over-modulation.** If T1 + T2 > Ts, the vector lies outside the hexagon.
T1 is then clipped to Ts, and T2 to Ts − T1, so T0 is never negative. A
non-positive Vdc is treated as a division by zero and gives T1 = Ts.

**Resolution.** The projections carry 7 fraction bits. One LSB of p moves
a time by about √3·Ts/(128·Vdc). At Ts = 8334 and Vdc = 1.0 that is about
113 clocks, or 1.4 % of the period.

### PWM generator

The generator produces seven-segment, centre-aligned PWM. A counter runs
0..Ts−1. Phase x is on for

```
on_x = T0/2 + T1·x(V_s) + T2·x(V_s+1)
```

clocks, centred in the period. x(V) is the phase's bit in the switching
state of active vector V:

| Vector | V1 | V2 | V3 | V4 | V5 | V6 |
|---|---|---|---|---|---|---|
| State (a b c) | 100 | 110 | 010 | 011 | 001 | 101 |

The phase is on while thr ≤ count < Ts − thr, with thr = ⌊(Ts − on)/2⌋.
Each period gives the sequence 000 → V → V' → 111 → V' → V → 000, with
one switch per phase per half period.

`load` writes a shadow set, which is taken over at the end of a period.
After reset Ts is 0, all phases are off and `period_start` pulses every
clock until the first set arrives. Because of this start-up behaviour, the
first two periods after reset are irregular; the first is a few clocks
long and the second one clock longer than Ts.

## Dead-time inserter

This block is shared by both paths (`dead_time_inserter.sv`). For each leg,
a PWM edge turns the active switch off one clock later. The other switch
turns on after `td` + 1 more clocks with both off, so there is at least one
clock of gap even at `td` = 0. A pulse shorter than the gap leaves both
switches off.

An assertion checks that the two switches of a leg are never on together.
A gate follows its PWM edge by `td` + 2 clocks, and each pulse loses
`td` + 1 clocks of on-time.

The outputs use inverter numbering:

| Phase | Top switch | Bottom switch |
|---|---|---|
| a | P1 | P4 |
| b | P3 | P6 |
| c | P5 | P2 |

## Top level and parameters

`fpga_pwm_top` prefixes its ports `spwm_*` and `svpwm_*`. Besides the gate
signals, it brings out monitoring signals:

- SPWM: the references, the carrier, the valley pulse and the pre-dead-time
  PWM;
- SVPWM: α, β, the sector, T1/T2/T0, the update pulse and the pre-dead-time
  PWM.

| Parameter | Default | Meaning |
|---|---|---|
| `CLK_HZ` | 50 000 000 | clock frequency; sets the phase increment of the frequency selector |
| `TW` | 16 | width of Ts and the dwell times (Ts ≤ 65535 clocks, f_sw ≥ 763 Hz at 50 MHz) |
| `TD_W` | 8 | width of the dead-time inputs (≤ 255 clocks, 5.1 µs at 50 MHz) |
| `qalu_pkg::QW`, `QF` | 9, 7 | the 1Q8 word |
| `sincos_generator.ITER` | 14 | CORDIC iterations |

Each input voltage is a 1Q8 value on a common base with `vdc`. The linear
range is |V| ≤ Vdc/√3, for example amplitude 0.577 at Vdc = 1.0.

Synthesis with yosys (coarse, generic cells) gives the following for the
whole top: about 690 word-level cells, 905 flip-flop bits, and one 448-bit
ROM, which is the CORDIC arctangent table.

## Operating points

All figures below assume the 50 MHz clock.

| Mode | Setting | Result |
|---|---|---|
| SPWM, 20 kHz carrier, 50 Hz | `sw_div` = 5 | 19.53 kHz; the divider cannot give exactly 20 kHz, and `sw_div` = 4 gives 24.4 kHz |
| SPWM, 2.64 kHz carrier | `sw_div` = 37 | 2.64 kHz |
| SVPWM, 6 kHz | `ts` = 8334 | 6 kHz |
| SVPWM, 40 kHz | `ts` = 1250 | 40 kHz |
| SVPWM, 6 MHz | — | not possible: Ts would be 8 clocks, far less than the ~85-clock computation |

## Where this design departs from, or adds to, the architecture it implements

- **Block diagram and data format follow the architecture.** This
  includes:
  - the block set of both modulators and their connections;
  - the 1Q8 word;
  - the QALU as a library of functions;
  - dead time as an adjustable delay;
  - centre-aligned SVPWM output.
- **This design's own choices.** The architecture names these blocks but
  does not describe their insides:
  - carrier shape and resolution, regular sampling, the CORDIC handshake;
  - the Clarke form, the sector sign tests, the CORDIC sin/cos;
  - the dwell-time equations, over-modulation clipping, the counter-based
    PWM generator;
  - all widths.
- **Added inputs.** `sw_div` and `m_index` were added for the SPWM path. The
  original block diagram shows only the clock, the fundamental frequency
  and the dead time as inputs.
- **Vdc routing.** The original SVPWM diagram feeds Vdc into the 3-2
  converter. Here it is sampled with the phase voltages and used in the
  duty calculator. The transform itself does not need it, and the
  normalisation is the same.
- **QALU instances.** The diagrams show one QALU per modulator, connected
  to every block. Here each block with a sequence of operations owns one
  QALU instance, and the fixed formulas call the shared functions directly.
- **Clock frequency.** The 50 MHz clock is an assumption. Every time
  quantity (`td`, `ts`, `sw_div`) is in clock cycles.

## Verification

Each testbench in `tb/` checks its block against values computed
independently in the testbench, mostly from real arithmetic. Each one ends
with a `TB_RESULT checks=… failures=…` line and has a watchdog.

| Testbench | Checks |
|---|---|
| `tb_qalu` | every opcode on random and corner operands, against real arithmetic |
| `tb_clock_divider` | tick period for several ratios, including changes on the fly |
| `tb_frequency_selector` | phase slope for many frequencies (reduced `CLK_HZ`) |
| `tb_sincos_generator` | random angles and the sector-border angles: 1 LSB accuracy, 16-clock latency |
| `tb_dead_time_inserter` | random PWM and `td`: gap length, delay, pulse swallowing, no shoot-through |
| `tb_spwm_pwm_controller` | carrier shape, reference = m·sin of the angle at the previous valley, comparison, m change |
| `tb_coord_converter_32` | random voltages against exact α, β |
| `tb_sector_detector` | random vectors against the angle of the quantised vector; either neighbour accepted within 0.6° of a border |
| `tb_duty_calculator` | random vectors and sectors against real dwell times, clipping, 44-clock latency |
| `tb_svpwm_pwm_generator` | per-phase on-times and centring for all sectors, period length, shadow update |
| `tb_svpwm_modulator` | whole SVPWM path at reduced Ts: per-phase duty at 36 angles, all sectors, no shoot-through, over-modulation |
| `tb_spwm_modulator` | whole SPWM path at a reduced clock: references, per-period duty of phase a, no shoot-through, reprogramming |
| `tb_fpga_pwm_top` | see below |
| `tb_pwm_workloads` | see below |

`tb_fpga_pwm_top` runs the top at its default parameters for 25 ms of chip
time. The SPWM path runs at 50 Hz with a 19.5 kHz carrier and is then
reprogrammed to 100 Hz with a 24.4 kHz carrier. The SVPWM path runs at
6 kHz with a stepping voltage vector and a final over-modulating step. The
testbench counts, and requires at least one of:

- carrier periods and CORDIC requests;
- the frequency change;
- dead-time gaps in both paths;
- all six sectors;
- duty updates;
- over-modulated periods.

`tb_pwm_workloads` judges only the gate signals, at default parameters. It
makes two runs from reset, each through one 50 Hz period:

- 19.5 kHz SPWM with 6 kHz SVPWM;
- 2.64 kHz SPWM with 40 kHz SVPWM.

It checks every carrier period and every pulse width against the expected
duty cycle. It also checks the 50 Hz fundamental of both paths.

To run one testbench with plain Verilator from the top of the tree:

```
verilator --binary --timing -Irtl -Itb rtl/qalu_pkg.sv rtl/*.sv tb/cordic_model.sv \
          tb/tb_fpga_pwm_top.sv --top-module tb_fpga_pwm_top -Mdir obj -o sim
./obj/sim
```

Replace the last file and the top module with any other testbench. The
longest testbenches take a few seconds.

Lint (`verilator --lint-only -Wall`) reports only three kinds of warning:

- unused signals: ALU flags and the divider remainder, which the blocks
  do not need;
- unused package parameters;
- the asynchronous reset reaching the no-shoot-through assertion.
