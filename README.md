# ROM-based stepper motor controllers

A stepper motor moves one increment for every change of the on/off pattern on
its coil drive inputs. A controller therefore only has to produce a cyclic
sequence of bit patterns, one row per step command, walking the table top-down
for clockwise motion and bottom-up for counter-clockwise, wrapping endlessly.
Full steps, half steps, the number of phases and the direction are all
properties of the table and of how it is walked.

The central idea of this design is to keep those tables in a ROM and to use
**the controller's present output pattern as the ROM address of the next
pattern**. With mode bits (direction, full/half step) and a motor-select field
added to the address, one ROM and one register become a *universal stepper
motor controller* (USMC): the same hardware drives 2/4-, 3-, 5-, 6- and
8-phase motors, and can be time-multiplexed among several motors. No modulus
counter has to be matched to the length of each motor's sequence.

The RTL also contains the simpler structures from which the USMC grows, each
as a complete controller of its own: ROM plus up/down counter (6-phase and
8-phase), a dedicated content-addressable 5-phase controller, a
multiplexer-based 2/4-phase controller with its generic form (shown driving
an 8-phase motor), and a controller that plays a fixed
program of steps once per start command. The top module
`stepper_controllers_top` places all of them side by side.

The outputs are logic-level coil commands. Opto-isolators, power switches and
the motors themselves are outside this RTL.

## The universal controller (`usmc`)

```
             motor_sel[2:0]  mode.cw  mode.full      q[5:0]
                 A10..A8       A7       A6          A5..A0
                    |           |        |             |
                    v           v        v             v
             +-------------------------------------------------+
             |       2 Kbyte next-state ROM (usmc_state_rom)    |
             +-------------------------------------------------+
                                   | D5..D0 (next pattern)
                                   v
   preset ROM  ---P5..P0---> [ 6 presettable D flip-flops ] --step--> q, q_n
  (motor_sel)                       ^ preset
```

* **Address map.** `A10..A8` select the motor, `A7` is M1 (CW/CCW, 1 =
  clockwise), `A6` is M2 (F/H, 1 = full step), `A5..A0` are the present
  outputs. Each motor owns a 256-byte region: four modes times 64 possible
  present patterns. The ROM is byte-wide; only D5..D0 are used.
* **Motor select codes.**

  | code | motor | sequence | preset P5..P0 | outputs |
  |---|---|---|---|---|
  | 0 | 2/4-phase | half step, 8 rows | 001001 | A B C D = Q3..Q0 |
  | 1 | 3-phase | full step, 3 rows | 000100 | A B C = Q2..Q0 |
  | 2 | 5-phase | half step, 10 rows | 010101 | A..E = Q4..Q0 |
  | 3 | 6-phase | full step, 6 rows | 100010 | A1 B1 C1 A2 B2 C2 = Q5..Q0 |
  | 4 | 8-phase | full step, 8 rows | 001111 | A1 B1 C1 D1 = Q3..Q0, A2 B2 C2 D2 = Q3_n..Q0_n |
  | 5..7 | free | reads 0 | 0 | for three more motor types |

* **Full and half steps.** For motors that have a half-step sequence, a half
  step moves one row and a full step moves two rows of that sequence. A motor
  standing on a full-step row therefore stays on full-step rows, and the
  mode may be changed between any two steps without an illegal transition.
  3-, 6- and 8-phase motors have only a full-step sequence and move one row
  per step whatever M2 says.
* **Preset.** The register must start from a pattern that belongs to the
  selected sequence. A small preset ROM, addressed by `motor_sel`, holds the
  first row of each sequence. The flip-flops load it while `preset` is high.
  The top drives `preset` from a power-up one-shot and from a user request.
  `usmc` also presets itself whenever `motor_sel` changes, so handing a
  time-multiplexed controller to another motor always starts that motor on
  its first pattern.
* **Robustness.** Every present pattern that is not in the selected sequence
  (a register upset, or a motor switch without preset) has the sequence's
  first row stored as its successor, so the controller is back on a valid
  pattern after one step.

The ROM image is computed at elaboration time by `smc_pkg::usmc_rom_image()`
from the sequence tables in `smc_pkg`; there are no data files. To add a motor,
append its sequence to `SEQ_TABLE`, `SEQ_LEN`, `SEQ_HAS_HALF` and
`PRESET_TABLE` and raise `NUM_MOTORS` (at most 8).

### One controller, several motor groups (`usmc_multi`)

The ROM is far larger than any single motor needs, and a stepper moves slowly
compared with the logic clock. So one copy of the two ROMs can serve several
groups of motors in turn. `usmc_multi` keeps a six-bit state register, a motor
select and a mode for each group. A round-robin pointer visits one group per
clock. It addresses the shared ROMs with that group's
`{motor_sel, mode, q}` and, if the group has a step or preset waiting,
writes the result back.

* A step command is latched at once and applied within `CHANNELS` clocks
  (four by default).
* The mode is captured together with the step command, so it may change right
  after it.
* A group must not step more often than once every `CHANNELS` clocks. An
  assertion reports a violation.
* Motors of one group share that group's outputs.
* In the top, every group with `grp_step_en[k]` set steps on the common step
  strobe. The step period must therefore be at least 4 clocks, and at least 8
  when `half_rate_comp` is used.

### The expanded transition table

"Fully expanded state transition table" is the table the ROM stores: for every
mode and every present pattern, the next pattern. For the 5-phase motor
(sequence 10101, 00101, 01101, 01001, 01011, 01010, 11010, 10010, 10110,
10100, with the full-step codes on the odd rows) it has 40 valid entries
in hex `{M1 M2 ABCDE} -> A'B'C'D'E'`. Examples:

| mode | present | next |
|---|---|---|
| CCW half (00) | 15 | 14 |
| CCW full (01) | 15 | 16 |
| CW half (10) | 15 | 05 |
| CW full (11) | 15 | 0D |
| CW full (11) | 14 | 05 |

The last row shows a motor on a half-step row taking a full step: it moves
two rows, to another half-step row.

## The other controllers

* **`rom_counter_6ph`**: a modulus-6 up/down counter addresses six ROM
  locations holding 100010, 001010, 001100, 010100, 010001, 100001
  (A1 B1 C1 A2 B2 C2). `cw` is the counter's up/down input.
* **`rom_counter_8ph`**: a 3-bit up/down counter addresses eight 8-bit
  locations (A1 B1 C1 D1 A2 B2 C2 D2) stored in `smc_pkg::ROM8_ROWS`.
* **`stt5_controller`**: the 5-phase part of the USMC as a separate circuit.
  It has a 128 x 5 ROM addressed by `{M1, M2, A..E}` and five presettable
  flip-flops (preset 10101).
* **`mux_controller_4ph`**: four 1-of-4 multiplexers, one per coil column,
  with their data inputs tied to that column's bits. A 2-bit up/down counter
  drives all four select inputs. The rows are 1000, 1010, 0110, 0101.
* **`mux_controller`**: the same idea for any sequence. There is one
  1-of-2^k multiplexer (`mux_n`) per column; each data input is tied to the
  bit of that column in the matching row, and inputs beyond the last row are
  grounded. One up/down counter that counts modulo the number of rows drives
  every select input. Parameters `COLS`, `ROWS` and the table `TABLE` set the
  size. The default is the 8-phase full-step sequence of `rom_counter_8ph`:
  eight 1-of-8 multiplexers, 64 data inputs in all. Growing the table only
  widens the multiplexers; no logic has to be redesigned.
* **`sequence_controller`**: plays a fixed program of steps when started.
  Each stored code is `{pattern, position tag}` and is also the address of
  the next code. The tag lets a pattern occur more than once in a program.
  The location of the last code holds that same code, so the motor rests at
  the end of the program. The start input is an extra address bit: with it
  set, the last code's location gives the first code, and the program plays
  again. Start is ignored while a program runs. The default program is an
  example: four clockwise full steps of a 4-phase motor from 1001, then six
  counter-clockwise half steps back to it.

All of these ROMs are built by `rom`, which is written the way a mask ROM
works: an exhaustive address decoder (`rom_decoder`, one word line per
address) feeds an OR-tie, and each output ORs the word lines whose stored bit
is 1. Reads are combinational.

## Step timing

Everything runs on one system clock `clk`. Step commands are one-clock
strobes (`step`) used as clock enables. Registers change on the rising edge of
a strobe cycle, and the ROMs are combinational, so the new pattern appears one
clock edge after the strobe is raised. `rst_n` is an asynchronous active-low
reset. It sets the counters to row 0 and the flip-flops to 0. The power-up
one-shot then holds `preset` for two more clocks.

`step_clock_gen` stands in for the square-wave step oscillator. It emits a
strobe every `step_period` clocks. A half step covers half the distance, so
the motor slows down in half-step mode. To keep the shaft speed constant, set
`half_rate_comp`: while the USMC is in half-step mode the period is then
halved. In the top, one generator drives every controller.

## Where this RTL departs from, or adds to, its source

The source design is a set of TTL-era circuits. These points are choices made
here, or readings of inconsistent source tables:

* **Clocking.** The flip-flops and counters are clocked by the step pulse in
  the source, and the preset is asynchronous. Here both are synchronous, on
  one system clock, with `step` as an enable. The counters are synchronous,
  not ripple counters.
* **4-phase sequence.** Two sources disagree on the first row of the 4-phase
  sequence: 1000 in one, 1001 in another (which also matches the preset code
  001001).
  * The USMC uses 1001, 1000, 1010, 0010, 0110, 0100, 0101, 0001 for half
    steps, and every other row of it for full steps.
  * The multiplexer controller keeps its own wiring, 1000, 1010, 0110, 0101.
* **6-phase sequence.** The six rows listed above form a consistent 6-phase
  pattern. An alternative listing with three coils on in two rows was not used.
* **8-phase motor on the USMC.** The USMC gives an 8-phase motor four outputs
  plus their complements, and presets it to 1111. The 8-phase pattern
  listing that was available does not fit that scheme. So the USMC's 8-phase
  sequence is this design's own: the 4-bit Johnson sequence 1111, 0111, 0011,
  0001, 0000, 1000, 1100, 1110. Each pattern's complement drives the second
  coil group. Treat this region as a placeholder and replace it with the
  sequence of the real motor. The stand-alone `rom_counter_8ph` keeps the
  8-bit listing.
* **Added behaviour.** These are additions of this design:
  * the recovery rule for patterns outside a sequence;
  * the preset on a change of motor select;
  * the half-step rate compensation switch;
  * the position tags of the sequence controller and its example program;
  * the fixed two-clock power-up pulse;
  * the 16-bit step period;
  * in the generic multiplexer controller, a counter that counts modulo the
    number of rows, and the 8-phase table it holds by default;
  * the way motor groups share one controller: the round-robin scan, one
    register per group, and four groups. Time-sharing itself comes from the
    source; the circuit for it does not.
* **Not built.** Quarter-step and finer sequences need coil currents between
  off and on, which one logic bit per coil cannot express. Drives,
  opto-isolators and motors are analog or power parts.

## Files

| file | contents |
|---|---|
| `rtl/smc_pkg.sv` | types (`motor_sel_e`, `mode_t`), sequence tables, ROM image functions |
| `rtl/stepper_controllers_top.sv` | all controllers side by side |
| `rtl/usmc.sv`, `usmc_state_rom.sv`, `usmc_preset_rom.sv` | universal controller |
| `rtl/usmc_multi.sv` | universal controller time-multiplexed among motor groups |
| `rtl/stt5_controller.sv` | content-addressable 5-phase controller |
| `rtl/rom_counter_6ph.sv`, `rom_counter_8ph.sv` | ROM plus up/down counter controllers |
| `rtl/mux_controller_4ph.sv`, `mux4.sv` | 2/4-phase multiplexer controller |
| `rtl/mux_controller.sv`, `mux_n.sv` | generic multiplexer controller (8-phase default) |
| `rtl/sequence_controller.sv` | predetermined-sequence controller |
| `rtl/rom.sv`, `rom_decoder.sv`, `preset_dff_reg.sv`, `updown_counter.sv` | building blocks |
| `rtl/step_clock_gen.sv`, `powerup_oneshot.sv` | step strobe and power-up preset |
| `tb/smc_tb_pkg.sv` | reference tables for the testbenches, typed in separately from `smc_pkg` |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
Each has a watchdog that counts a failure if it hangs. To build and run one
with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/smc_pkg.sv tb/smc_tb_pkg.sv tb/tb_stepper_controllers_top.sv \
    --top-module tb_stepper_controllers_top --Mdir obj -o sim
./obj/sim
```

Swap in any other `tb/tb_<module>.sv` and its top-module name to run that
testbench.

`tb_stepper_controllers_top` runs the top at its default parameters for 600
steps, in well under a second. It exercises the following:

* all five USMC motor types, each in all four modes;
* motor switching and explicit preset requests;
* four time-multiplexed motor groups with random modes, motor switches and
  presets;
* rate compensation;
* counter wrap-around in both directions, in the 6-phase, 8-phase and both
  multiplexer controllers;
* the 5-phase controller in random modes;
* several runs of the sequence controller.

After every step it compares all outputs with independent models. It also
checks that no output moves between steps. The unit testbenches do the
following:

* read the whole 2 Kbyte ROM against rules written independently of the RTL;
* check the 5-phase table entry by entry;
* measure the strobe spacing of the step generator.
