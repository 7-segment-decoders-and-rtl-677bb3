# Two-button kitchen timer with a hexadecimal 7-segment display

This is a countdown timer for a small CPLD board. It holds 0 to 15 seconds
and shows the time left as one hexadecimal digit (0–9, A, b, C, d, E, F)
on a common-anode 7-segment LED. It is controlled by two pushbuttons:

| gesture                                   | effect                                  |
|-------------------------------------------|-----------------------------------------|
| press and release the left button alone   | time + 1 (never above 15)               |
| press and release the right button alone  | time − 1 (never below 0)                |
| press both, then release both             | toggle run/stop                         |

While it is running, the time drops by one each second until it reaches 0.
At 0 the `alarm` output comes on and stays on until the timer is stopped or
given more time. The whole design is synchronous. A 50 MHz board clock is
divided down to a 100 Hz clock taken from a flip-flop, and every other
register runs on that 100 Hz clock. No register has an asynchronous set or
clear.

## The central idea: act on releases, not presses

When a user presses both buttons, the order in which they land cannot be
known. So the controller never acts while a button is down. A four-state
machine (`button_fsm`) records what has been pressed since both buttons were
last up:

```
            L=1                R=1
   NB ─────────────► LB   NB ─────────► RB        (L is tested first in NB)
   LB ── L=0 ──► NB        RB ── R=0 ──► NB
   LB ── R=1 ──► BB        RB ── L=1 ──► BB        (BB wins if both hold)
   BB ── L=0 and R=0 ──► NB
```

The machine exports both its registered `state` and its combinational
`state_next`. Each action is keyed to a *transition into NB*, the one cycle
in which `state` is LB/RB/BB and `state_next` is NB:

* `LB → NB` increments `seconds` (`seconds_counter`)
* `RB → NB` decrements `seconds` (`seconds_counter`)
* `BB → NB` toggles `run` (`run_toggle`)

A gesture therefore acts exactly once, however long the buttons are held
(unless the optional hold-to-repeat described below is switched on).
Once both buttons have been down, the user may release them in either
order. The state stays BB until both are up, so neither an increment nor a
decrement can slip out.

## Clocks and button inputs

`clock_divider` counts 50 MHz cycles from 0 to `DIVISOR−1` (default 500 000)
and registers the wrap. `clk` is therefore high for one 20 ns cycle every
10 ms. It is glitch-free because it comes straight from a flip-flop. It is
not 50 % duty, and nothing needs it to be, because only its rising edges are
used. On the FPGA/CPLD tools, declare `clk` as a generated clock so that it
gets global routing.

The buttons go to ground and use the device's weak pull-ups, so they read
0 when pressed. The top inverts them. Each one then goes through a
`clk_debounce`, which is two flip-flops on the 100 Hz clock. The first
synchronizes the input and the second gives it a full period to settle.
Sampling only every 10 ms is what debounces the button. Contact bounce that
is shorter than one period can fall inside at most one sample, so the
sampled level changes once per press and once per release.

## Countdown, display and alarm

* `second_prescaler` counts 100 Hz cycles 0…`TICKS_PER_SEC−1` while `run`
  is high. It is held at 0 while stopped, so the first step after a start
  comes a full second later.
* `seconds_counter` applies, in priority order: left release (+1 unless
  15), right release (−1 unless 0), and the one-second tick (−1 unless 0).
  If the increment is blocked at 15, a tick in the same cycle still counts.
  Reaching 0 does not clear `run`.
* `seg7_decoder` is a constant array of sixteen 8-bit patterns indexed by
  the value. The patterns are in the order `{dp,a,b,c,d,e,f,g}` (dp is bit
  7, g is bit 0). They are stored active-high and inverted at the output,
  because a common-anode segment lights when its pin is driven low. The
  decimal point is never lit. The glyphs are the usual ones: 6 with its top
  bar, 7 without f, 9 with its bottom bar, and lower-case b and d.
* `alarm_logic`: `alarm = run && seconds == 0`, active high.
* `com`, the display's common anode, is driven to 1. A single 1 kΩ resistor
  in series with it limits the current.

## Reset

The board has no reset pin. `kitchen_timer` has a two-bit power-on shift
register in the 100 Hz domain. It starts from its declaration value, 0, which
is the power-up state of the device's flip-flops. It holds every other
register in synchronous reset for the first two 100 Hz edges. After reset
the timer is stopped, shows 0 and the button state is NB. This register is
the only one that relies on a power-up value, so Verilator's notice about an
initial value on a procedurally written variable is expected there. The
clock divider needs no reset: its wrap test is `>=`, so it recovers from any
starting count.

## Modules and ports

| file | role |
|------|------|
| `rtl/timer_pkg.sv` | `bstate_t` (NB, LB, RB, BB), `time_t` (4 bits), `seg_t`, `TIME_MAX = 15` |
| `rtl/clock_divider.sv` | 50 MHz → 100 Hz, parameter `DIVISOR` |
| `rtl/clk_debounce.sv` | two-flop synchronizer/debouncer |
| `rtl/button_fsm.sv` | button state machine, outputs `state`, `state_next` |
| `rtl/run_toggle.sv` | run/stop flip-flop |
| `rtl/second_prescaler.sv` | one-second prescaler, parameter `TICKS_PER_SEC` |
| `rtl/seconds_counter.sv` | time remaining |
| `rtl/seg7_decoder.sv` | lookup-table decoder |
| `rtl/alarm_logic.sv` | alarm output |
| `rtl/button_hold_timer.sv` | optional hold-to-repeat timer |
| `rtl/kitchen_timer.sv` | top level |

Top-level ports (`kitchen_timer`), with the board pins of the reference
wiring:

| port | dir | pin | meaning |
|------|-----|-----|---------|
| `clk50` | in | 12 | 50 MHz board clock |
| `left_in` | in | 2 | left button, active low, weak pull-up on |
| `right_in` | in | 29 | right button, active low, weak pull-up on |
| `a b c d e f g` | out | 44 42 36 34 30 48 50 | segments, active low |
| `dp` | out | 38 | decimal point, active low (always off) |
| `com` | out | 52 | common anode, always 1 |
| `alarm` | out | 77 | alarm, active high |

Parameters: `CLK_DIVISOR` (500 000), `TICKS_PER_SEC` (100) and
`HOLD_REPEAT` (0, see below). Changing
`TICKS_PER_SEC` changes the timer rate. Changing `TIME_MAX`/`time_t` in the
package changes the range, but the display shows one hex digit only.

Latency: a release takes effect at the third 100 Hz edge after the pin
changes. The debouncer accounts for two edges and the state register for
one. A user sees this as 20–30 ms, depending on where in the 10 ms period
the change falls.

## What is fixed and what was chosen

These points come from the specification the design was written from:

* the block partition and signal names
* the 50 MHz/100 Hz clocks and a divided clock taken from a flip-flop
* one synchronizer/debouncer per button
* the four button states and their transitions
* the action on each release
* the 0 and 15 limits
* the array-based decoder, its bit order, active-low segments and `com` = 1
* the pin numbers

These are this design's own choices:

* the insides of the debouncer (only its function was specified)
* the one-second countdown step, and the prescaler that makes it
* the alarm rule and its polarity
* the power-on reset
* which exit wins in LB/RB when a button is released in the same 10 ms
  sample as the other is pressed (BB wins)
* the priority of a button action over a countdown step in the same cycle
* the exact glyphs of the digits
* for the optional hold-to-repeat: exactly 4 steps per second, and the
  release step kept after a hold

## Optional hold-to-repeat (`HOLD_REPEAT`)

Set `HOLD_REPEAT = 1` on `kitchen_timer` to enable this feature. If one
button is held alone for a second, the time keeps stepping in that direction
at four steps per second. It stops at 15 or 0 as before. The feature is off
by default, so the default build behaves exactly as described above.

`button_hold_timer` holds a down-counter, `btimer`, with `$clog2(HOLD_TICKS+1)` bits (7 at the default). It is reloaded
with `HOLD_TICKS−1` (99) in every cycle where `state_next ≠ state`, and
otherwise counts down to zero. It therefore measures how long the current
state has lasted.

* In a cycle where the state is LB or RB, will stay so, and `btimer` is
  zero, the block sends a one-cycle `rep_inc`/`rep_dec` to
  `seconds_counter` and reloads `btimer` with `REPEAT_TICKS−1` (24).
* The first step lands exactly `HOLD_TICKS` edges after the state machine
  entered LB/RB. Each later step lands `REPEAT_TICKS` edges after the one
  before.
* Releasing the button still gives its normal single step. So does a
  release after a hold.
* Because the debouncer delays the button by two edges, one more repeat
  step can land after the pin has already been released.
* BB is never treated as a hold, so a long press of both buttons still only
  toggles run.

The repeat period is `TICKS_PER_SEC/4`. It has a floor of 2 cycles for the
very small test settings.

Not included: two further optional features that were described with the
design.

* Long presses of both buttons that load or store an initial time. Their
  initial value and their interplay with the run/stop toggle are not
  defined.
* Keeping that initial time in the device's user flash, which needs the
  vendor flash macro.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl +libext+.sv \
    rtl/timer_pkg.sv tb/kitchen_timer_tb.sv --top-module kitchen_timer_tb
./obj_dir/Vkitchen_timer_tb
```

Use the same command for any `tb/<module>_tb.sv`, changing the
`--top-module`.

* `tb/<module>_tb.sv` test each block against an independent reference:
  * a transition table for the state machine
  * per-segment digit masks for the decoder
  * an action model for the time register
  * cycle counts for the divider and the prescaler
* `tb/kitchen_timer_tb.sv` drives the pins only, at `CLK_DIVISOR = 4` and
  `TICKS_PER_SEC = 5`. It reads the digit back from the segment pins. It
  checks and counts each of these behaviours:
  * increment, and increment blocked at 15
  * decrement, and decrement blocked at 0
  * start and stop, with both press orders
  * a long hold
  * contact bounce shorter than a clock period
  * the countdown step interval, and the countdown stopping at 0
  * the alarm
  * a button action while running
* `tb/kitchen_timer_hold_tb.sv` runs the top with `HOLD_REPEAT = 1` at
  `TICKS_PER_SEC = 8`. It checks these behaviours:
  * short taps still step once
  * the edge at which the first repeat step lands, and the repeat period
  * the extra step on release
  * holding into 15 and into 0
  * a long press of both buttons that only toggles run
* `tb/kitchen_timer_full_tb.sv` runs the top at its default parameters: a
  true 10 ms clock and 1 s countdown steps. It sets 2, starts, counts to 0,
  sees the alarm and stops. It simulates about 2.5 s of board time, roughly
  a minute of wall time.
