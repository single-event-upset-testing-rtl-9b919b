# Radiation-hardened VGA sync controllers and their upset test harness

This design asks how well different gate-level hardening schemes protect one
small, real piece of satellite logic against single event effects. That logic
is a 640x480 VGA sync generator, the kind that drives a camera display. A
particle strike on logic gates causes a short voltage glitch, called a single
event transient (SET). If the glitch is caught by a flip-flop, or a particle
flips a flip-flop directly, the result is a single event upset (SEU).

The controller is built six ways: one without protection and five hardened
ones. All six sit side by side on the device under test (DUT). Each is built
twice, as copy A and copy B, so that an upset in one copy shows up as a
difference between the two copies' pins. A monitoring board compares every
pin pair, holds any difference long enough for a slow data-acquisition
module to see it, and counts error events for each implementation. Under a
proton beam, the count divided by the fluence (particles per cm²) and by the
number of flip-flops gives each scheme's upset cross-section per bit.

All RTL is SystemVerilog in `rtl/`, with self-checking testbenches in `tb/`.

## The controller

`vga_next_state` holds the combinational logic. `state_reg` holds the
27-bit register bank, whose layout is the struct `vga_pkg::vga_state_t`. The
clock is 25 MHz (40 ns per pixel). Reset is synchronous and active high.

| quantity | value (clocks) | time at 25 MHz |
|---|---|---|
| line length, `h_count` 0..799 | 800 | 32.0 µs |
| hsync low, `h_count` 664..760 | 97 | 3.88 µs |
| visible columns, `h_count` < 640 | 640 | 25.6 µs |
| frame length, `v_count` 0..526 | 527 lines = 421 600 | 16.9 ms |
| vsync low, `v_count` 491..493 | 3 lines = 2400 | 96 µs |
| visible rows, `v_count` < 480 | 480 lines | |

The two sync pins and the two video-on flags are registered one clock after
the count that decides them. The colour pins (`rgb_in` ANDed with both
video-on flags) appear one clock later still. The 3-bit colour gives eight
colours; during the test `rgb_in` is held at `111`.

The sync windows, the visible area and the vertical wrap at 526 come from the
original controller's constants. The line length of 800 clocks is this
design's choice. The original quotes a 31.77 µs line, which would be about
794 clocks at exactly 25 MHz, so to match that figure, change `H_END` in
`vga_pkg`.

## The six implementations

Every implementation has the same ports: `clk`, `rst`, `rgb_in`, `fault`
(see below) and `vga` (the R, G, B, H and V pins as `vga_out_t`). In
fault-free operation all six produce identical pins, cycle for cycle.

| module | logic copies | register banks | between logic and banks | after banks |
|---|---|---|---|---|
| `vga_default` | 1 | 1 | – | – |
| `vga_tmr` | 3 | 3 | – | 3 majority voters |
| `vga_dmr_setsup` | 2 | 3 | AND-OR multiplexer suppressor per bank | 2 majority voters |
| `vga_dmr_gg` | 2 | 3 | guard gate per bank | 2 majority voters |
| `vga_set_delay` | 1 | 1 | delay-line suppressor | – |
| `vga_mbu` | 2 | 3 (bank 1 slaved to bank 0) | – | 2 three-input MBU filters |

In every voted or filtered form, voter (or filter) *j* feeds logic copy *j*,
and the pins come from voter 0. A wrong bank therefore never reaches the
logic, and the next clock reloads it with the correct value.

- **TMR** is local triple modular redundancy: three copies of the logic, the
  banks and the voters. Clock and reset are shared by all three, so a hit on
  the clock or reset tree is not covered, just as in the original test.
- **DMR with SET suppressor.** Two copies of the logic feed a two-input
  suppressor in front of each of three banks. A transient in one logic copy
  is stopped before any bank, and an upset of one bank is outvoted.
- **DMR with guard gate** is the same structure with a Muller C-element in
  place of the suppressor.
- **SET delay** has no redundancy. Each flip-flop input passes a suppressor
  whose second input is the same signal delayed by two inverters. Only
  transients narrower than the delay are filtered, and register upsets get
  through as in the unprotected controller.
- **MBU.** Logic copy 0 loads bank 0 and logic copy 1 loads bank 2. Each
  bit of bank 1 has its asynchronous set driven by bank 0's bit and its clear
  by the inverse, so bank 1 always copies bank 0. That makes every upset of
  bank 0 a two-bit upset on purpose: this is how the test forces a multiple
  bit upset. A three-input filter replaces the voter. It changes its output
  only when all three banks agree, so one or two wrong banks leave it
  holding the correct value.

## How the filters work, and how they are written

All three filters are built the same way: an AND branch and an OR branch of
the redundant inputs feed a multiplexer, and the multiplexer's select is its
own output.

- While the output is 0, the AND branch is selected. A single input flipping
  to 1 cannot move the AND, so the 0 is kept.
- While the output is 1, the OR branch is selected. A single input flipping
  to 0 cannot move the OR, so the 1 is kept.
- The output changes only when all inputs agree on the new value.

This feedback is a storage element. `set_suppressor`, `guard_gate` and
`mbu_filter` therefore write it as the equivalent transparent latch: it is
open while the AND and OR branches agree, and then loads their common
value. The latches that lint and synthesis report in these modules are the
intended circuit, not a coding slip. The guard gate (NAND C-element,
y = ab + ay + by) has the same truth table as the two-input suppressor. The
two differ in their gates, which matters for where a particle can strike but
not for function.

The filters are open all the time in normal running, because the copies
agree. A fault-free hardened controller therefore behaves exactly like the
unprotected one.

`set_delay_filter` builds its delayed branch from `N_INV` inverters (two by
default). An FPGA or ASIC flow must be told to keep that chain (for example
with a keep attribute), otherwise it is optimised away. The same applies to
the redundant logic copies and register banks: a synthesis tool sees
identical copies and merges them into one, which removes the protection.
Keep or no-merge attributes, or a flow that preserves hierarchy, are needed
for a real build. The follower bank of `vga_mbu` has both an asynchronous
set and an asynchronous clear. That needs a flip-flop primitive with both
pins; some synthesis tools do not infer one from behavioural code, in which
case instantiate it directly.

## Fault injection

`vga_pkg::fault_t` has one 27-bit mask per logic copy (`set[0..2]`) and one
per register bank (`seu[0..2]`). The masks are XORed onto the logic output
at a bank's input and onto a bank's output. Each implementation ignores the
copies it does not have. The testbenches raise a mask for the second half of
one clock cycle, from the falling edge up to the next rising edge:

- on `set[i]`, this is a transient that is present when the bank samples;
- on `seu[i]`, this is an upset that lasts until the bank reloads.

A zero-delay simulation has no pulse widths, so for the delay filter `set[0]`
flips only the direct branch. That stands for a transient narrower than the
delay. In the assembled design, only instance 0 of copy A of each
implementation receives the fault input. Tie it to zero for synthesis.

What each implementation masks (checked by its testbench):

| fault | default | TMR | DMR | GG | SET delay | MBU |
|---|---|---|---|---|---|---|
| transient on logic copy 0 | seen | masked | masked | masked | masked | not tested¹ |
| upset of bank 0 | seen | masked | masked | masked | seen | masked (double upset) |
| upset of bank 2 | – | masked | masked | masked | – | masked |
| same transient on logic copies 0 and 1 | seen | seen | seen | seen | masked² | seen |

¹ In the MBU form, a transient captured into bank 0 also lands in bank 1.
The filter then holds the previous clock's value, which is wrong for a bit
that was meant to toggle on that edge. ² This form has only one logic copy.

## Duplication and comparison

- **`vga_array`** instantiates one implementation `N` times and ANDs each pin
  over all instances. The instances stay in step, so the ANDed pins equal a
  single controller's pins. A disturbed instance pulls its pins low at the
  wrong times, which shows on the output.
- **`dut_fpga`** places two `vga_array`s (copy A and copy B) of each of the
  six implementations, giving 60 pins. The default instance counts per copy
  (41, 18, 21, 15, 23, 20) reproduce the flip-flop totals the original chips
  carried for each implementation (about 2240, 2900, 3500, 2390, 1240 and
  3350). They are estimates, not given counts. In the original test, the
  default and DMR forms shared one chip and the other four a second chip;
  here all six sit side by side.
- **`mismatch_detector`** handles one pin pair. It passes both pins through
  two-flip-flop synchronisers into the control clock domain and compares
  them with an XOR. It raises `err` three control clocks after the
  difference and holds it for `STRETCH` clocks after the last difference.
  350 clocks at 50 MHz is 7 µs, one sampling period of the acquisition
  module.
- **`error_counter`** counts a flag once per high run. It re-arms only after
  the flag has gone low, so a stretched flag is one event.
- **`control_board`** has 30 comparison channels (6 implementations × 5
  pins). It also has three counters per implementation: colour (any of R, G
  or B), hsync and vsync.
- **`seu_test_system`** is the top level. It joins `dut_fpga` (on the
  25 MHz `clk_dut`) and `control_board` (on `clk_ctrl`, which must be faster
  than `clk_dut`).

Top ports: `clk_dut`, `clk_ctrl`, `rst`, `clr_counts`, `rgb_in[2:0]`,
`fault[6]`, `vga_pins[6][2]` (copy A = index 0), `err_flags[6][5]` (bit order
R G B H V, high to low) and `err_count[6][3][16]` (colour, hsync, vsync).
Implementation indices follow `vga_kind_e`: default, DMR, TMR, GG, SET delay,
MBU.

Parts of the original set-up that are not logic here:

- the PLL that makes 25 MHz from a 40 MHz oscillator (the clock is a port);
- the data-acquisition module, Ethernet link and PC display (the counts are
  ports);
- the stepper-motor drive that turns each board into the beam.

## Size

`rtl/` holds 27 flip-flops per register bank. The default configuration has
276 controller instances, or about 15 400 flip-flops. It also has 864
filter latch bits in the DMR and guard-gate forms and 1080 in the MBU form
(27 bits × filters per controller × controllers).

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
(each has a watchdog). With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/vga_pkg.sv tb/tb_seu_test_system.sv --top-module tb_seu_test_system
./obj_dir/Vtb_seu_test_system
```

Replace the testbench name to run another. Verilator finds the other modules
through `-Irtl -Itb` by file name.

- `tb_seu_test_system` runs the whole design at its default size, in a few
  seconds:
  1. one fault-free frame with all 60 pins compared to a closed-form timing
     model on every clock;
  2. a simultaneous bank-0 upset in every implementation (counted for default
     and SET delay, masked elsewhere);
  3. a transient on the red bit (counted only for default);
  4. a vertical-count upset giving a vsync error;
  5. a counter clear.
  
  It reports how often each of these happened.
- `tb_beam_run` plays a simulated irradiation run on the default-size
  design, in about a minute and a half. For one frame, single faults arrive
  at random bits and random times (about 700 of them), each at a place the
  hardened forms should mask. The test checks every pin of both copies
  against the timing model on every clock and checks that no flag rises.
  For a second frame, register upsets hit random bits of the unprotected
  and SET-delay forms, with a reset and counter clear after each. Those two
  forms must count errors, and no other form may. The faults and error
  events for each implementation are printed, which mirrors the order seen
  under the beam: the unprotected and delay forms count, the redundant ones
  do not.
- The six controller testbenches share `tb/vga_variant_checker.sv`. It checks
  a full frame pin by pin against the closed-form model, measures the hsync
  period and low time and the vsync low time in clocks, and runs the fault
  table above.
- The filter, voter, comparison and counter testbenches compare against
  reference models written in the testbench.

## Where this RTL departs from, or goes beyond, the original

- The AND-OR multiplexer and the C-element are written as behaviourally
  identical latches, not as gate-level feedback loops.
- The line length (800 clocks), the synchronisers, the timed release of the
  latched error flag, the 50 MHz control clock and the 16-bit saturating
  counters are choices made here.
- The colour-error group is the OR of the three colour mismatch flags. This
  counts an error on any colour, which is what the colour indicator is for.
- The original error counting ran in software on the acquisition PC; here it
  is logic on the control board.
- The original controller listing also contains a clock divider. Here the
  controller runs directly on the 25 MHz clock that is supplied to it.
- The MBU form follows the circuit that was built and tested, with doubled
  logic and bank 1 slaved to bank 0. It does not follow the fully tripled
  variant described as the general idea.
- Instance counts are estimated from flip-flop totals.
- Copy A and copy B run on one shared pixel clock. The comparison relies on
  that to keep the two copies in step.
- Fault-injection ports are added for simulation.
