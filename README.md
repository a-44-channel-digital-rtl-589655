# 44-channel staircase digital voltmeter

This is a register-transfer model of a multiplexed digital voltmeter. The
original instrument was built from discrete logic cards to watch 44 DC control
voltages of a particle accelerator. It uses no per-channel A-D converter. One
4000-step staircase is shared by all channels and swept once about every
200 ms. Every channel has an analog comparator that trips when the staircase
reaches that channel's input. Each time a comparator trips, the staircase
stops. The current step number is then counted serially into that channel's
four-digit display, and the staircase moves on. One sweep therefore measures
all 44 inputs, in order of increasing magnitude.

The RTL covers all the logic of the instrument. The parts that are analog by
nature have behavioural models with `real` signals, so that the whole
instrument can be simulated in a closed loop:

- the staircase D-A converter;
- the self-calibrating reference amplifier;
- the 44 comparators.

## Numbers

| quantity | value |
|---|---|
| channels | 44 (channel 1: internal -5.000 V reference, channel 2: local monitor) |
| staircase | 4000 steps, 0000..3999, 2.5 mV per step, 0 to +10 V |
| inputs | 0 to -10 V, negative, carried as signed microvolts |
| readings | 4 BCD digits; 8000 = never reached (over range); 0000 = zero or positive input |
| instrument clock | about 25 kHz (40 us per step); the model uses 4 system ticks per period |
| measuring cycle | 4000 steps plus the readouts: 4885 periods (195 ms) with 42 distinct readings |

## One measuring cycle

1. **Sweep.** The UP counter holds the step number as three BCD decades (1's,
   10's, 100's) and a two-binary thousands group (K's, 0..3). It advances one
   step per clock period through the A gate. In the middle of each step a
   strobe samples all comparators. A comparator that is high and not yet
   latched latches its comparator latch circuit (CLC) and sets its comparator
   flip-flop (CFF). The CLC keeps that comparator out of the rest of the sweep.
2. **Readout.** Any set CFF sets the readout flip-flop RFF, which closes the A
   gate and so freezes the staircase. Every channel that tripped on this step
   is read in the same readout.
3. **Sweep end.** The step after 3999 wraps the counter to 0000 and sets the
   pause flip-flop PFF. A special readout follows. It forces every comparator
   that never tripped and shows 8000 on those banks.
4. **Re-arm.** At the end of that readout PFF clears. Its falling edge
   re-arms all comparator latches.
5. **Zero readout.** One more readout is made at step 0000. It catches inputs
   that are zero or of the wrong polarity, which show 0000. The next sweep
   then begins.

## The serial readout (the hard part)

The instrument has no parallel path from the step counter to the displays.
Each display digit is a Bipco, a decade counter that drives one Nixie tube.
A Bipco can only be reset and pulsed. The readout turns each digit of the
step number into a burst of pulses, using one BCD *down* counter per digit:

1. **JAM.** The strobe flip-flop SFF falls, and this edge is the JAM pulse.
   It copies the four UP-counter digits into the four down counters. It also
   resets to 0 the Bipcos of every bank whose CFF is set.
2. **Count down.** B-gate pulses, one per clock period, count all four down
   counters backwards. Each digit has its own gate: C for 1's, D for 10's,
   E for 100's and F for K's. The gate passes the same pulses to that digit's
   Bipco in every open bank.
3. **First zero.** When a down counter steps from 1 to 0, the digit's
   first-zero flip-flop FZ sets.
4. **Second zero.** The next 1 to 0 step, ten pulses later, clears FZ, and
   that edge sets the second-zero flip-flop SZ. On the next anti-clock edge
   SZ is copied into SZD, which closes the digit's gate.

A digit d from 1 to 9 therefore sends d+10 pulses to its Bipco. A digit 0
sends 20 pulses. Either way the decade counter ends on d. The longest burst
is 20 pulses, so a readout takes at most about 25 clock periods, however
large the number is. When all four SZD are set, the second-zero OR ends the
readout. Its first edge resets RFF, XFF and every set CFF. Its second edge
sets SFF again, and the staircase continues. A bank whose CFF has been reset
ignores all later resets and pulses, so it keeps its number until the next
sweep reads that channel again.

Sequence of one readout (one period = one step = four ticks):

| event | effect |
|---|---|
| strobe, comparator high | CLC latches, CFF sets |
| next tick | RFF and DFF set; A gate closed; DFF holds FZ/SZ clear |
| next anti-clock edge, DFF set | XFF sets, SFF clears: JAM |
| XFF rising | YFF sets |
| next clock edge | YFF clears; its falling edge clears DFF |
| following clock edges | B gate open (RFF and not DFF): the digit gates pass pulses until their SZD closes them |
| clock edge after all SZD set | SZ OR: RFF, XFF, all CFF clear |
| next anti-clock edge | SFF sets (and PFF clears at sweep end) |
| next clock edge | A gate passes the next staircase step |

The first B-gate pulse comes on the third clock edge after the comparator
trips.

During the pause readout PFF is set. The sequencer then jams 8000 (K's
digit 8, the others 0) instead of the step number. The pause-delay flip-flop
PDC follows PFF on the strobe edge, and it does three things:

- its rising edge is the force pulse;
- both of its edges start a readout;
- while it is set, the A gate stays closed.

Each bank also puts out a current-driver pulse. It is the OR of the four
digit pulses that pass the bank's gate, so it pulses once in every clock
period in which any of the bank's digits counts. A bank that is read gets as
many driver pulses as its longest digit train: 20 if any digit is 0, else
its largest digit plus 10. The top brings these pulses out as `bank_drive`,
where a line driver for the remote cable would connect.

## Self-calibrating reference

The staircase amplitude depends on the D-A converter's -10 V reference, and
no precision parts are used for it. Channel 1 measures a fixed -5.000 V
zener voltage, which a correct staircase reaches exactly at step 2000. The
`ref_pump_logic` block compares the step at which channel 1 trips with
step 2000:

- `k4`, the 2^1 binary of the K's group, goes high at step 2000;
- the Z flip-flop is set at step 2000 and cleared by the next step;
- the CFF of channel 1 sets after step 2000 (`k4` high, Z clear): staircase
  too low, one pump-up pulse;
- it sets before step 2000 (`k4` low, Z clear): staircase too high, one
  pump-down pulse;
- it sets exactly at step 2000 (Z set): no pump.

In the instrument the pump pulses drive two diode pumps into an integrating
amplifier, and `ref_amp` models this as a step of `PUMP_STEP` volts per pulse.
The loop comes to rest when step 2000 reaches 5.000 V and step 1999 does not.
That holds for a reference between -10.000 V and -10.005 V: a dead band of one
staircase step. Starting 10 mV off, it settles within about ten cycles in
simulation. If channel 1 never trips at all, it is forced at step 0000 and
reads as too high. Like the original, the loop relies on starting within
reach of the right amplitude. The original's warm-up, in which the reference
bank hunts across the whole scale before settling at 2000, takes a large
start error and thousands of cycles at one pump step per cycle; the tests
start within 10 mV instead.

## Checking the displays: ten-pulse detector

Every digit of a bank being read receives at least ten pulses. Every Bipco of
the bank was reset to 0, so a correctly counting bank shows 9 on all its tubes
at the same moment, right after the ninth B-gate pulse. The ten pulse counter
(TPC) counts B-gate pulses after each JAM and stops after ten. Its window is
the interval between pulse nine and pulse ten. On the anti-clock edge inside
that window, every bank whose CFF is set must report its AND of 9's. If one
does not, the tilt flip-flop sets. It holds the failure lamp on until the
front-panel reset (`tilt_reset`).

## Local displays and selectors

- **Bank of channel 1** (left-hand local bank): normally shows 2000. It
  moves to 1999 or 2001 only while the reference is being corrected.
- **Channel 2** (centre local bank): measures whatever the input selector
  (`in_sel`) connects. This is another channel's input line (positions 2..43),
  the test voltage `test_uv` (position 44, "T") or the test jack `jack_uv`
  (position 45, "J"). Positions 0 and 1 connect nothing.
- **Selected output** (right-hand bank): `out_sel` routes the gate of any
  channel to a local Bipco bank. That bank then repeats the channel's reading.

## Timing model

The original logic reacts to both edges of a ~25 kHz clock C. Staircase steps
and count pulses start on the C edge. The strobe and several delay
flip-flops act on the anti-clock edge, half a period later. Between the two
edges, the chained flip-flops settle through gate delays.

This model runs everything on one system clock `clk`, four ticks per
instrument period. `clock_gen` issues a one-tick enable at tick 0 (C edge)
and at tick 2 (anti-clock edge, strobe). Every edge-triggered action of the
discrete logic is a one-tick pulse made by registered edge detection, so each
link of a chain such as CFF -> RFF -> ... costs one tick. For the
instrument's 25 kHz, run `clk` at 100 kHz. Reset starts at tick 2, so the
first event after reset is the strobe of step 0000. `rst_n` is an
asynchronous, active-low reset of all flip-flops. After reset SFF is set and
all other flip-flops are clear.

## Modules

| module | role |
|---|---|
| `dvm_pkg` | constants (44 channels, 4 digits, 4000 steps), BCD reading type |
| `dvm_top` | whole instrument: `dvm_core` + `ref_amp` + `stair_dac` + `input_select` + 44 `diff_comparator` |
| `dvm_core` | all logic: the blocks below, wired |
| `clock_gen` | C and anti-clock edge enables, scope trigger |
| `up_counter` | staircase counter, 4000-count carry, `k4` |
| `readout_control` | RFF, DFF, XFF, YFF, SFF, PFF, PDC; A/B gates, JAM, force, latch reset, SZ OR |
| `down_counter` | one jammable BCD down-counter digit with 1->0 pulse |
| `zero_detect` | FZ, SZ, SZD and the digit gate |
| `comparator_latch` | CLC and CFF of one channel |
| `bipco_bank` | gated bank of decade display counters, AND of 9's, driver pulse; `DIGITS` = 3 or 4 |
| `selected_output` | right-hand repeat bank |
| `ref_pump_logic` | Z flip-flop, pump-up / pump-down gates |
| `ten_pulse_detector` | TPC, window, tilt flip-flop |
| `input_select` | comparator-2 input selector |
| `stair_dac`, `ref_amp`, `diff_comparator` | behavioural models (real-valued, not synthesizable) |

Digits are ordered least significant first everywhere: index 0 is 1's and
index 3 is K's.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_dvm_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/dvm_pkg.sv tb/tb_dvm_top.sv
./obj_dir/Vtb_dvm_top
```

- `tb_dvm_top` runs two instruments side by side. One reference starts 10 mV
  low, the other 10 mV high. The test waits for both to calibrate, then checks
  all 44 readings against `ceil(|vin| / (|vref|/4000))`. It also checks the
  cycle length and the selectors. Finally it injects a Bipco fault with
  `force` and checks the tilt lamp and its reset. It counts every mechanism:
  readouts, simultaneous trips, forced over-range readouts, zero readouts,
  pump up, pump down and tilt.
- `tb_dvm_full` runs the default configuration with no parameter overrides,
  through calibration and one full checked cycle. It takes under a second.
- `tb_dvm_ramp` drives one channel down and another up at 50 V/s, the
  fastest input change the original is rated for. A tick stands for 10 us,
  so the ramps move 0.5 mV per tick. Each reading must equal the first
  staircase step that reached the input as it was at that step's strobe.
- `tb_dvm_core` drives the logic with ideal comparators. For every readout it
  checks the d+10 / 20 pulse count per digit and the time the staircase
  stands still.

Each simulation takes well under a second. The default configuration is
simulated in full.

## Where this model departs from the original, and what is its own choice

- **Analog parts are idealised.** The comparators have no offset. The strobe
  bump that the original adds to the staircase is replaced by sampling the
  comparators at the strobe. The reference integrator does not leak. Power
  supplies, Nixie tubes, cable drivers, input protection and the zener itself
  are not modelled; the zener is the parameter `ZENER_UV`.
- **Bipco reset is gated by CFF.** The original description says the JAM
  pulse resets all Bipcos. It also says a bank keeps its numerals once its
  CFF has been reset. Gating the reset with CFF satisfies the second
  statement.
- **Gate closing order.** A worked example in the original description
  ("1803") gives a closing order of the digit gates that does not follow from
  its own equations. This model follows the equations and the d+10 rule: for
  1803 the gates close in the order F, C, E, D.
- **Tilt.** A fault is flagged only when the 9's pulse is missing inside the
  TPC window. An early or late 9's pulse is caught because it is then absent
  in the window. A 9's pulse outside the window raises nothing by itself.
- **Edge polarities.** The original logic equations use one bar notation
  for a level, its complement and an edge, so several of them allow more
  than one reading. For the A and B gates, SFF/JAM, the SZD gate and the PDC
  edges this model takes the reading that agrees with the sequence of events
  described in prose.
- **Timing.** PDC falls one full period after PFF rather than half a period.
  Each readout ends with one extra B-gate pulse, which the closed digit gates
  block.
- **Own choices.** These are the four-tick timing, the signed-microvolt input
  format, the selector position codes, the pump step (1 mV) and the
  reference start value.
- **Bank width.** All 44 banks have four digits. The original fitted some
  remote banks with three; use `bipco_bank #(.DIGITS(3))` for those.
