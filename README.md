# Digital clock with stopwatch

A small, fully synchronous FPGA design for a board with a 100 MHz oscillator and a
multiplexed seven-segment display (by default a two-digit, common-anode display, such as
a Pmod plug-in module on a Zynq-7000 ZedBoard). One divider makes a one-second tick.
Two independent counters use that tick:

* a **time-of-day clock**, hours:minutes:seconds, running from 00:00:00 to 23:59:59 and
  then back to 00:00:00, whose minutes and hours can be stepped up and down to set the time;
* a **stopwatch** that counts 00..59 s and wraps to 00, controlled by Start, Pause and Stop.

A mode switch selects which of the two is shown on the display.

```
            +----------------+ tick_1s  +----------------+ time   +-------------+  digits  +-------------------+
 clk ------>| clock_divider  |--------->| digital_clock  |------->|             |--------->| seven_seg_display |--> seg_n[6:0]
            |  /CLK_FREQ_HZ  |    |     |  hh:mm:ss      |        | display_mux |          |  scan NUM_DIGITS  |--> an_n
            +----------------+    |     +----------------+        |  "Control"  |          +-------------------+
 set_min_up/dn, set_hr_up/dn ---(sync, rising edge)--^             |  + BCD      |
                                  |     +----------------+ count  |             |
 sw_start, sw_pause, sw_stop -(sync)--->|   stopwatch    |------->|             |
                                  +---->|  00..59        |        +-------------+
                                        +----------------+               ^
 mode_sw ---------------------------------(sync)-------------------------+
```

All registers are clocked by `clk` and reset synchronously by `reset` (active high).
The one-second tick is a one-cycle clock enable, not a derived clock, so the design
has a single clock domain and no clock-domain crossings apart from the board inputs.

## Files

| File | Contents |
|------|----------|
| `rtl/clock_pkg.sv` | `time_t` (hours[4:0], minutes[5:0], seconds[5:0]), `bcd_t`, `mode_e`, `sw_state_e`, day limits |
| `rtl/clock_divider.sv` | 100 MHz to 1 Hz tick |
| `rtl/digital_clock.sv` | chained seconds/minutes/hours counters with time setting |
| `rtl/stopwatch.sv` | Start/Pause/Stop controller and 0..59 counter |
| `rtl/display_mux.sv` | mode multiplexer and binary-to-decimal conversion (uses `bin_to_bcd.sv`) |
| `rtl/seven_seg_display.sv` | digit scanning and segment drive (uses `seg7_decoder.sv`) |
| `rtl/sync_rise.sv` | two-flop input synchronizer with rising-edge pulse |
| `rtl/clock_stopwatch_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per block, the end-to-end test and a full-size test |

## The time-of-day counter

`digital_clock` holds the time in plain binary, in the widths above. On a tick the
seconds advance; the seconds at 59 produce a carry that advances the minutes, and the
minutes at 59 with that carry advance the hours. The hours at 23 with a minutes carry
wrap the whole clock to 00:00:00 and pulse `day_wrap`. All three fields are updated in
the same clock edge; there is no ripple between them.

Time setting is done with four step inputs. A step moves only its own field by one,
wrapping inside the field (minutes 59 → 00 or 00 → 59, hours 23 → 00 or 00 → 23). It
does not carry into the other field and leaves the seconds alone. Up wins if both
directions of one field are given. The next state is computed in one combinational
pass: the tick is applied first and the steps are applied to its result. A tick and
a step in the same cycle therefore both take effect, and no second is lost.

## The stopwatch controller

| State | Count | Leaves when |
|-------|-------|-------------|
| `SW_STOPPED` | held at 00 | `start` (with neither `pause` nor `stop`) → `SW_RUNNING` |
| `SW_RUNNING` | +1 per tick, 59 → 00 (pulses `wrap`) | `stop` → `SW_STOPPED` (count cleared); else `pause` → `SW_PAUSED` |
| `SW_PAUSED` | held | `stop` → `SW_STOPPED` (count cleared); else `start` without `pause` → `SW_RUNNING` |

The controls are levels, as from slide switches; the priority is stop > pause > start.
The stopwatch counts the same one-second tick as the clock. It is not restarted when the
stopwatch starts, so the first counted second can be anywhere from one cycle to one
second long. The resolution is one second and the range is one minute; counting goes
on past 59 by wrapping to 00.

## Display path

`display_mux` is the "Control" multiplexer. With `mode_sw = 0` it passes the clock
time; with `mode_sw = 1` it passes the stopwatch count as the seconds and zeros for
the hours and minutes. It then turns each field into two BCD digits with constant
divisions by 10, giving six digits: index 0 is the ones of the seconds and index 5 the
tens of the hours.

`seven_seg_display` shows the lowest `NUM_DIGITS` of those digits. All digits share the
seven segment lines, so it lights one digit at a time. A prescaler of
`CLK_FREQ_HZ / DIGIT_HZ` cycles (100,000 by default, 1 ms) advances a digit index
0, 1, …, `NUM_DIGITS-1`, 0, … The enable line of the current digit (`an_n`, one-hot,
active low) is pulled low and its pattern is put on `seg_n`. Both outputs are registered
and change on the same clock edge. The segments are active low, as a common-anode
display needs. Bit 0 is segment a and bit 6 is segment g; codes 10–15 are blank.

With the default two digits, the display shows the seconds of the clock or the
stopwatch. Build with `NUM_DIGITS = 6` for a six-digit HH MM SS display. On a module
with a single digit-select line instead of one enable per digit, wire `an_n[0]` to
that line, inverted if its schematic needs it.

## Timing

| Event | Latency |
|-------|---------|
| first tick after reset is released | exactly `CLK_FREQ_HZ` cycles (counters change on edge `CLK_FREQ_HZ-1`, counting the first edge with reset low as edge 0) |
| tick period | `CLK_FREQ_HZ` cycles |
| `mode_sw`, `sw_start/pause/stop` pin → counters/state | acted on at the 3rd clock edge after the pin changes (2 synchronizer flops) |
| `set_*` rising edge → time step | same; one step per rising edge, a held input steps once |
| counters → `seg_n`/`an_n` | 1 cycle, once the scan reaches the digit |

The synchronizers do not debounce. Mechanical buttons on the step inputs may produce
several steps per press unless they are debounced outside this design.

## Parameters

| Parameter | Default | Where | Meaning |
|-----------|---------|-------|---------|
| `CLK_FREQ_HZ` | 100,000,000 | top, `clock_divider`, `seven_seg_display` | board clock frequency |
| `TICK_HZ` | 1 | `clock_divider` | tick rate (the top always uses 1) |
| `DIGIT_HZ` | 1,000 | top, `seven_seg_display` | digit switching rate (1 ms per digit) |
| `NUM_DIGITS` | 2 | top, `seven_seg_display` | digits on the display, 1..6 in the top |
| `MAX_COUNT` | 59 | `stopwatch` | last stopwatch count before wrapping |

`CLK_FREQ_HZ / TICK_HZ` must be at least 2. `CLK_FREQ_HZ / DIGIT_HZ` must be at least 1.

## Design choices and departures

The overall structure follows the published design of this clock and stopwatch. That
covers the divider to a one-second base count, the carry chain of seconds, minutes and
hours, the wrap after 23:59:59, the 00..59 stopwatch with Start, Pause and Stop, and the
switch-selected multiplexer in front of a common-anode, time-multiplexed display. The
following are choices of this implementation, made where that description is silent:

* synchronous, active-high reset of every register, the stopwatch included;
* the tick as a clock enable rather than cascaded internal clocks;
* the exact effect of Start, Pause and Stop (Stop clears the count) and their priority;
* time setting by single steps per rising edge, without carry between fields;
* two-flop input synchronizers, and no debouncing;
* 1 ms per digit, one-hot active-low digit enables, segment bit order, blank codes;
* in stopwatch mode, zeros in the hours and minutes positions;
* mode encoding 0 = clock, 1 = stopwatch.

A stopwatch "maximum of 60 seconds" is read as sixty distinct counts: the design shows
00..59 and then wraps to 00. Lap times, alarm, 12-hour/AM-PM mode
and countdown timers are not part of this design. Pin assignments for a specific board
are not included.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_clock_stopwatch_top rtl/clock_pkg.sv tb/tb_clock_stopwatch_top.sv
./obj_dir/Vtb_clock_stopwatch_top
```

| Testbench | What it checks |
|-----------|----------------|
| `tb_clock_divider` | tick position and period at two ratios, one-cycle width, reset in mid-count |
| `tb_digital_clock` | a full day plus 200 s of ticks against a seconds-since-midnight model; random steps, also coinciding with ticks; `day_wrap` |
| `tb_stopwatch` | directed start/wrap/pause/resume/stop, then 50,000 random cycles against a model |
| `tb_display_mux` | digits for all field values in both modes |
| `tb_seven_seg_display` | scan order, digit period and segment patterns (4-digit instance, 5 cycles per digit), and the 100,000-cycle period of a default instance |
| `tb_clock_stopwatch_top` | end to end with a 16-cycle second: a day and ten minutes of random operation, checking outputs and the decoded display pins of a 2-digit and a 6-digit instance every second; every roll-over, stopwatch action, mode change, step and a mid-run reset must occur (about 2 s to run) |
| `tb_clock_stopwatch_full` | the top at its default parameters for three simulated seconds (3×10⁸ cycles, about 2 minutes): first tick after exactly 10⁸ cycles, display contents in both modes, pause |

All testbenches are two-state: they reset the design before relying on it.
