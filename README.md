# Digital controller for a DC-DC converter test platform

This RTL is the FPGA side of a bench for trying out digital control of buck
converters. Two converters are served. One is a single-phase 5 V to 3.3 V
buck (10 A). The other is a four-phase 12 V to 1.5 V buck (50 A). The
controller does four jobs:

* It generates the switch drive waves. Each phase gets a direct wave for the
  high-side switch and an inverse wave for the low-side switch. The duty
  resolution is 10 bits in a 1.28 us period, which is 1.25 ns per step.
* It produces the clocks that time the loop. `clk_adc` clocks the A/D
  converters and the PID. `ce_pid` and `ck_dpwm` time the PID update and the
  hand-over of the new duty.
* It closes the output-voltage loop with a fixed-point PID. In open-loop mode
  a duty from a port is used instead.
* It passes an 8-bit word to a bank of switched load resistors, so the load
  on the converter can be changed.
* It averages the readings of the board's four A/D converters, which
  measure the converter's output voltage and current.

The power stages, load resistors, isolation, signal conditioning, A/D
converters and the clock PLL are analog or bought parts. They are not here.

## Getting 1.25 ns out of a 200 MHz clock

The main trick is how the modulator reaches 1.25 ns steps while its logic
runs at 200 MHz (5 ns).

**Coarse wave.** An 8-bit counter (`pwm_timebase`) counts 256 slots of
5 ns, so one wrap is one 1.28 us period. `thick_comparator` makes the
coarse wave C1. C1 is high while the count is below `d[9:2]`. So the upper
eight duty bits give a pulse of `d[9:2]` slots.

**Fine bits.** Every slot is sent out as four bits of 1.25 ns by a 4:1
serializer (`lvds_serializer`, MSB first). `fine_adjust` picks the 4-bit
word for each slot:

| situation                           | word sent         |
|-------------------------------------|-------------------|
| C1 high                             | `1111`            |
| first slot after C1 falls, `d[1:0]=0` | `0000`          |
| first slot after C1 falls, `d[1:0]=1` | `1000`          |
| first slot after C1 falls, `d[1:0]=2` | `1100`          |
| first slot after C1 falls, `d[1:0]=3` | `1110`          |
| otherwise                           | `0000`            |

A flip-flop holding last slot's C1 detects the fall. The pulse therefore
lasts `4*d[9:2] + d[1:0] = d` bit times. The duty is in units of 1/1024 of
the period, from 0 up to 1023/1024.

This has one consequence: **duties 1 to 3 give no pulse at all.** The fine
bits are added only at a falling edge of C1, and with `d[9:2] = 0` C1 never
rises. The tests check this case.

The real serializer is an FPGA LVDS transmitter. It is clocked at 400 MHz
and shifts on both edges. Here it is ordinary logic on one 800 MHz edge
(`clk_ser`), which gives the same bit time. `clk_ser` must be in phase with
`clk`, as two outputs of one PLL would be. The word crosses from the
200 MHz domain through a toggle bit that `clk_ser` samples. A word's first
bit leaves 2.5 ns after the `clk` edge that captures it.

## Inverse waves and dead time

The low-side switch of a phase gets the complement of the coarse wave.
`inverse_comparator` pulls that complement in by SEPARACION slots (`sep`,
8 bits, 5 ns each) on both sides. With C1 high for counts `[0, V)`, the
inverse wave is high for counts `[V+sep, 256-sep)`. For example, with
`V = 100` and `sep = 5`, it is high for counts 105 to 250. Both switches are
then off for `sep` slots before the high-side switch turns on. After the
high-side switch turns off, they are both off for `sep` slots minus the fine
bits.

The inverse wave has 5 ns resolution. It is passed through its own
serializer, as four equal bits, so its latency matches the direct wave.

**Keep `sep` at 1 or more.** With `sep = 0` and `d[1:0] != 0`, the two
switches of a phase overlap by up to three bits. If `V + 2*sep >= 256`, the
inverse wave stays low.

## Four phases

`pwm_timebase` keeps one counter per phase. Phase `p` lags phase 0 by
`p*64` slots, which is 90, 180 and 270 degrees. Each phase has its own
coarse comparator, fine-adjust logic, inverse comparator and two
serializers. At duty 0.125, the operating point of the 12 V to 1.5 V
converter, no two phases are on at the same time. The summed inductor
current then ripples at four times the switching frequency. A single-phase
converter uses phase 0.

## Duty hand-over

A new duty must never change a wave in the middle of its period. The hand-
over happens in three steps:

1. At the `ck_dpwm` rising edge, `dpwm` copies the duty into a pending
   register.
2. Each phase copies the pending value into its active register in the last
   slot of its own period.
3. The phase uses the active value for the whole of its next period.

So every pulse is a whole pulse of either the old or the new width.

## Loop timing

All of the loop timing is decoded from the phase-0 slot counter (slot `k`
starts `k*5` ns into the period):

| signal     | behaviour |
|------------|-----------|
| `clk_adc`  | 640 ns period. It is high in slots 0-63 and 128-191, so it rises at slot 0 and at slot 128. |
| `ce_pid`   | High in slots 64-191. Only the mid-period `clk_adc` edge (slot 128) updates the PID. |
| `ck_dpwm`  | Rises at slot 224, 160 ns before the period ends, and falls at the period end. The PID result goes to the DPWM on this edge. |

The 640 ns and 160 ns values, and what each signal is for, come from the
design. The exact `ce_pid` window and the low time of `ck_dpwm` are choices
made here. Inside the FPGA, the PID registers do not run on `clk_adc` as a
clock. They are enabled in the 200 MHz domain by a one-clock strobe taken at
that same edge.

## The PID in fixed point

The error `E` is the A/D word: 10-bit two's complement. The output voltage is
subtracted from the reference in the analog path ahead of the A/D, so a
positive error asks for more duty. The integral `S` is 12 bits and saturates at -2048 and 2047.

```
S[n] = sat12(S[n-1] + E[n])
D[n] = KP*E[n] + KI*S[n] + KD*(E[n] - E[n-1])
```

**Gain format.** Each gain is a 6-bit `<sign><2 int>.<3 frac>` word. To keep
small gains precise, each gain word holds the real gain multiplied by a
power of two (SHIFT_P, SHIFT_I, SHIFT_D = 1, 6, 6). The products therefore
have 4, 9 and 9 fraction bits:

* P is `<12>.<4>`
* I is `<9>.<9>`
* D is `<7>.<9>`

All three are aligned to 9 fraction bits, sign-extended to `<12>.<9>` and
added into a `<14>.<9>` sum.

**Output.** The sum is a duty in units of one full period:

* A negative sum gives `D = 0`.
* An integer part of 1 or more gives `D = 1023`.
* Otherwise `D` is the 9 fraction bits with a 0 appended as the LSB.

**Example gains.** The reference values are KP = 0.12628, KI = 0.06186 and
KD = 0.02596. Rounded, they become the words KP = `000.010` (2), KI =
`011.111` (31) and KD = `001.101` (13). The real gains are then 0.125,
31/512 and 13/512 per error LSB. These words are the `kp`, `ki` and `kd`
input ports.

**Choices made here:**

* `E[n]-E[n-1]` is saturated to 10 bits, so the derivative product stays
  16 bits wide.
* `D` is registered at the sample.
* Status flags report integral saturation and both duty clamps.

## A/D reading averages

`adc_averager` adds each of the four A/D readings (10-bit two's
complement) into its own accumulator on every `clk_adc` rising edge. That
is two samples per PWM period. After `2^AVG_LOG2` samples (16 by default,
a choice made here) it shifts the sums right, which rounds toward minus
infinity. It then publishes the four averages on `adc_avg` with a one-clock
`adc_avg_valid` pulse and clears the accumulators. The loop's error word
uses its own input, `adc_error`, and is not averaged.

## Dynamic load word

`load_word` is registered once and driven on `load_sw`. Each bit closes one
MOSFET that puts one resistor across the converter output. The board has
two ranges: about 0.02-50 ohm and 50 ohm-40.2 kohm. How the word reaches the
FPGA from the PC is outside this RTL.

## Switch polarity

The board's switches are on when their drive is low. With the top parameter
`ACTIVE_LOW` = 1 (the default), `pwm_hi` and `pwm_lo` are inverted at the
pins. They are high (switches off) during reset. Set the parameter to 0 for
active-high waves.

## Files

| file | contents |
|------|----------|
| `rtl/dcdc_pkg.sv` | Shared widths, the duty/error/gain types and the loop-mode enum. |
| `rtl/dcdc_ctrl_top.sv` | Top: DPWM, auxiliary clocks, PID, mode multiplexer, load word. |
| `rtl/dpwm.sv` | Four-phase modulator with direct and inverse waves. |
| `rtl/pwm_timebase.sv` | Slot counter and its phase-shifted copies. |
| `rtl/thick_comparator.sv` | Coarse wave C1. |
| `rtl/fine_adjust.sv` | Serializer word per slot (fine bits). |
| `rtl/inverse_comparator.sv` | Inverse wave with dead time. |
| `rtl/lvds_serializer.sv` | 4:1 serializer. |
| `rtl/aux_clock_gen.sv` | `clk_adc`, `ce_pid`, `ck_dpwm` and internal strobes. |
| `rtl/pid_controller.sv` | PID in fixed point. |
| `rtl/adc_averager.sv` | Block averages of the four A/D readings. |
| `tb/tb_<module>.sv` | Self-checking testbench for each module. |
| `tb/tb_workload_multiphase.sv` | Four-phase converter at duty 0.125. |

### Top-level ports (`dcdc_ctrl_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | 200 MHz slot clock |
| `clk_ser` | in | 1 | 800 MHz bit clock, in phase with `clk` |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `mode` | in | 1 | `MODE_OPEN_LOOP` / `MODE_CLOSED_LOOP` |
| `duty_ol` | in | 10 | open-loop duty |
| `kp`, `ki`, `kd` | in | 6 each | PID gain words |
| `sep` | in | 8 | dead time in 5 ns slots |
| `adc_error` | in | 10 | error word from the A/D, sampled at mid-period |
| `adc_meas` | in | 4 x 10 | readings of the four A/D converters |
| `adc_avg`, `adc_avg_valid` | out | 4 x 10, 1 | block averages and their update pulse |
| `load_word` / `load_sw` | in / out | 8 | dynamic-load switch word |
| `pwm_hi`, `pwm_lo` | out | 4 each | high- and low-side switch drives per phase, serial at 1.25 ns |
| `clk_adc`, `ce_pid`, `ck_dpwm` | out | 1 each | loop clocks |
| `duty_now` | out | 10 | duty to be handed over at the next `ck_dpwm` |
| `pid_sat_int`, `pid_sat_hi`, `pid_sat_lo` | out | 1 each | PID saturation flags of the last sample |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Run them from the project root so that `rtl/` and `tb/` resolve:

```
verilator --binary --timing -Wno-fatal --top-module tb_dcdc_ctrl_top \
    -y rtl -y tb +libext+.sv rtl/dcdc_pkg.sv tb/tb_dcdc_ctrl_top.sv
./obj_dir/Vtb_dcdc_ctrl_top
```

Replace the top module's name to run another testbench. The package must be
listed first on the command line. A plain Verilator build starts
uninitialised variables at zero. Add `+verilator+rand+reset+2` at run time
to start them at random values instead. The design resets everything it
reads, so both must pass.

**What the end-to-end test covers.** `tb_dcdc_ctrl_top` runs the top with
every parameter at its default. It takes about a second of simulation time.
It runs these steps:

1. An open-loop duty sweep from 0.1 to 0.9 in 11 steps. Widths, phase steps
   and dead time are checked on all eight serial outputs.
2. Forced A/D errors that saturate the integral and both duty clamps.
3. Closed-loop regulation of an averaged single-phase buck model to 3.3 V.
4. A load step from 49.9 ohm to 1.5 ohm.

At every hand-over, the duty the controller hands over is compared with a
reference PID in the bench. The bench counts each mechanism it exercises:
mode switch, fine bits, dead time, phase shift, hand-over, integral
saturation, both clamps, load switching and published averages. Each
published average is compared with the mean of the readings the bench
presented. A mechanism that never occurs counts as a failure.

The buck model is the bench's own: a first-order lag per period with 0.1 ohm
source resistance. So is the A/D scaling of 16 codes per volt. Neither is
part of the design. With them and the example gains, the output settles at
3.32 V, both before and after the load step.

## How far to trust it, and where it departs

**Tested.** Every module has a self-checking testbench. The checks compare
against independent models: formulas for the waves and an integer PID
model. Each testbench was also run against a deliberately broken copy of its
module, and it failed as it should.

**Not tested.**

* The design has been simulated only, not placed on an FPGA.
* The 800 MHz single-edge serializer stands in for a double-edge LVDS
  transmitter at 400 MHz. A real build would use the FPGA's serializer
  primitive with the same word order.
* Timing closure at 200/800 MHz has not been checked.

**Departures and choices, collected:**

* The slot clock is taken as 200 MHz, the rate implied by 5 ns slots and a
  1.28 us period. Some block diagrams of the counter label it 250 MHz,
  which would not give that period.
* Duties 1-3 produce no pulse (see above).
* `sep = 0` with nonzero fine bits makes the two switches of a phase
  overlap.
* The averaging block length and rounding are choices made here. So are
  the mode port, the registered load word, the `ce_pid` window, the
  `ck_dpwm` low time, the phase-shift direction (lag) and the reset
  behaviour are this implementation's choices.
* The loop takes its error on a separate input. Which of the four A/D
  converters feeds it is left to the board wiring.
* No PC interface is included. The duty, gains, separation, mode and load
  word are plain ports.
