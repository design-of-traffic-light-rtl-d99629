# Two-road traffic-light controller with countdown display

This is a small FPGA controller for a crossing of an east-west road and a
north-south road. It runs a fixed-time signal plan: each direction gets green,
then yellow, then red, and the other direction is held at red meanwhile. It also
drives two seven-segment digits that count down the seconds left in the
current phase. The target board is a Cyclone V development board (DE1-SoC,
device 5CSEMA5F31C6) with a 50 MHz clock, LEDs for the lamps and common-anode
seven-segment tubes. Nothing in the RTL is device specific.

The design is a reconstruction of a published two-entity design. It has a
frequency divider (`fenpin`, "frequency division") and a traffic-light/display
controller (`jiaotongdeng`, "traffic light"), joined in a top level. The
entity and port names are kept from that design. The sections below say where
this RTL follows the source and where it makes its own choices.

## The signal plan

One pass through the plan takes 67 seconds. It has four phases:

| Phase | East-west (`dx`) | North-south (`nb`) | Length |
|-------|------------------|--------------------|--------|
| S1    | green            | red                | 39 s   |
| S2    | yellow           | red                | 4 s    |
| S3    | red              | green              | 20 s   |
| S4    | red              | yellow             | 4 s    |

After S4 the plan starts again at S1. East-west is red for 24 s of each cycle
and north-south for 43 s. All four lengths are parameters
(`EW_GREEN_S`, `EW_YELLOW_S`, `NS_GREEN_S`, `NS_YELLOW_S`). Each must be 1 to
99 s; elaboration stops with an error otherwise.

Each lamp group is 3 bits, `{red, yellow, green}`, and a lit lamp is a 1. So
S1 is `dx = 001` with `nb = 100`. The types and constants are in
`traffic_pkg`.

## How the controller keeps time (`jiaotongdeng`)

The controller is clocked by the 1 Hz tick, so one clock cycle is one second.
It holds three registers that each describe where the crossing is in its
cycle:

* `sec` is an up-counter over the whole cycle, 0 to 66. It wraps to 0 after
  66. Its modulus is the sum of the four phase lengths.
* `state` is the phase, S1 to S4.
* `remain` is a down-counter holding the seconds left in the phase. It is
  loaded with the phase length when the phase starts and counts down to 1.
  When it is 1, the next tick moves `state` on and reloads `remain` with the
  length of the new phase.

Phase changes are driven by `remain`. `sec` is redundant with the other two,
but the source design is built around such an up-counter. Here it serves as a
cross-check: a concurrent assertion (`a_consistent`) checks on every tick
that `state` is the phase `sec` falls in, and that `remain` equals the end of
that phase minus `sec`. A simulation run with assertions enabled therefore
catches any disagreement between the counters.

The lamps are decoded combinationally from `state`. A phase lasts exactly its
parameter's number of ticks. The outputs change on the tick edge and nowhere
else.

## The countdown display

`remain` is split into tens and units. Each goes through a `seg7_ca` decoder:

* `leds1` shows the tens digit.
* `leds2` shows the units digit.

Over one cycle the display reads 39…01, 04…01, 20…01, 04…01. The leading zero
is shown.

The tubes are common anode, so a segment lights when its line is low. Bit 0
drives segment a, and so on up to bit 6 for segment g (a at the top, then
clockwise, g in the middle). Codes 10 to 15 blank the digit. They cannot occur
here.

The source design mentions four tubes, two per road. Its controller entity
has only these two 7-bit outputs. This RTL follows the entity: both roads'
tube pairs are meant to be wired to the same two outputs and show the same
phase countdown. A per-direction display would need a second pair of outputs.
That display would show each road's own green and red time, for example a red
countdown of 43 s for north-south.

## Clocking and reset

`fenpin` divides the board clock. It counts 0 to `CLK_HZ/(2*OUT_HZ) - 1`,
which is 24 999 999 at the defaults, and toggles `clkout` each time the
counter wraps. The result is an exact 1 Hz square wave with a 50 % duty cycle.
The divider has no reset, like the original entity. It recovers from any
power-up value within one wrap, so only the phase of the first tick is
arbitrary.

The top feeds `clkout` straight into the controller as its clock, as the
source design does. Only `reset` crosses from outside into that 1 Hz domain,
and it is asynchronous. For a 1 Hz design this is acceptable. A design that
grows more logic in the fast domain would do better with a clock enable.

`reset` is active high and asynchronous. It puts the controller in S1 with
39 s on the display and `sec` at 0. The active-high polarity follows the
source design's simulation. The source binds reset to a push button which,
on the DE1-SoC board, reads 1 when released. A board build with that pin
therefore needs an inverter in front of `reset`, or the controller will sit in
reset until the button is pressed.

## Top level (`traffic_light_top`)

| Port    | Dir | Width | Meaning |
|---------|-----|-------|---------|
| `clk`   | in  | 1     | board clock, `CLK_HZ` (50 MHz) |
| `reset` | in  | 1     | active high, asynchronous |
| `dx`    | out | 3     | east-west lamps `{red, yellow, green}` |
| `nb`    | out | 3     | north-south lamps `{red, yellow, green}` |
| `leds1` | out | 7     | countdown tens digit, active low `{g..a}` |
| `leds2` | out | 7     | countdown units digit, active low `{g..a}` |

Parameters:

* `CLK_HZ` is the board clock frequency (default 50 000 000).
* `TICK_HZ` is the tick rate (default 1).
* The four phase lengths are the `*_S` parameters (defaults 39, 4, 20 and 4).

After synthesis the whole design is about 37 flip-flops.

## Where this RTL departs from, or fills in, the source design

* The source describes a "68-state" up-counter, but its phase lengths add up
  to 67 s. The cycle counter here has modulus 67, the sum of the lengths, so
  the lamps keep the stated 39/4/20/4 s timing.
* The source describes separate 39, 4 and 20 second down-counters for the
  display. Here they are one down-counter that is reloaded for each phase.
* These choices are this RTL's own:
  * the lamp bit order, read off the source's simulation values;
  * the reset polarity and the fact that reset is asynchronous;
  * the display range (phase length down to 01);
  * the tens/units split onto `leds1`/`leds2`;
  * the segment bit order;
  * the divider's toggle structure.
* The source's pin list names ten outputs `y[9:0]`, which do not match its
  own top-level schematic. Pin assignment is left out here. It belongs in the
  board constraints.

## Files

* `rtl/traffic_pkg.sv` holds the lamp type and constants and the phase enum.
* `rtl/fenpin.sv` is the clock divider.
* `rtl/jiaotongdeng.sv` is the phase controller, the countdown and the
  display decode.
* `rtl/seg7_ca.sv` is the common-anode digit decoder.
* `rtl/traffic_light_top.sv` is the top level.
* `tb/seg_ref_pkg.sv` is the testbenches' reference model. It builds the
  segment patterns from segment lists and gives the phase and seconds left at
  any second of the cycle.
* `tb/tb_*.sv` are self-checking testbenches. Each prints
  `TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.

## Simulating

Any testbench builds with plain Verilator 5, for example:

```
verilator --binary --timing --assert --top-module tb_traffic_light_top \
  -y rtl -y tb +libext+.sv rtl/traffic_pkg.sv tb/seg_ref_pkg.sv \
  tb/tb_traffic_light_top.sv
./obj_dir/Vtb_traffic_light_top
```

What each testbench covers:

* `tb_seg7_ca` checks all 16 input codes.
* `tb_fenpin` measures every half period of two dividers, 20:1 and 1000:10.
* `tb_jiaotongdeng` runs the default plan and a 1/1/1/1 s plan side by side.
  It compares lamps and both digits after every tick for three cycles, times
  every lamp state (39, 4, 20 and 4 ticks), and applies an asynchronous reset
  in the middle of S3.
* `tb_traffic_light_top` is the end-to-end test with the divider shortened to
  8 board cycles per tick. It runs 1.5 cycles, a mid-cycle reset and one more
  cycle. It checks the tick spacing, every output after every tick, and that
  each mechanism happened at least once: ticks, entry into each phase, the
  wrap from S4 to S1, each countdown reaching 01, and the reset.
* `tb_traffic_light_top_50mhz` runs the top with every parameter at its
  default, a real 50 MHz clock and 1 Hz ticks. It covers the first 3 seconds
  and checks that ticks are exactly 1 s apart, plus the first countdown steps.
  It takes about 40 s of wall time.

A complete 67 s cycle at 50 MHz has not been simulated. It would take about
20 minutes at the simulation speed the 3-second run reaches. The full cycle
is covered at the shortened divider, where the controller sees exactly the
same tick sequence.

Testbenches drive `reset` from 0 to 1 at time 0. The reset is edge-triggered
and the simulator may start a signal at 1, so a reset that is merely held high
from the start might never take effect.
