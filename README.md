# Artix-7 alarm clock in SystemVerilog

A 24-hour alarm clock built entirely from hardware on a 100 MHz FPGA: a
clock divider makes a 1 Hz time base, cascaded counters keep HH:MM:SS, a
purely combinational comparator watches for the alarm time, and the buzzer
comes on one clock cycle (10 ns) after the time reaches the alarm. The time
is shown on a multiplexed seven-segment display; push buttons and slide
switches set the time and the alarm.

The point of doing this in an FPGA rather than on a microcontroller is that
nothing waits its turn. Counting, comparing, scanning the display and
reading the buttons all happen in parallel on every clock edge, so the
alarm's response time is fixed by the logic depth, not by a software loop.

The design follows a published description of an Artix-7 alarm clock
(clock divider, time counter, user input, alarm comparator, display
controller, buzzer module; 100 MHz divided by N = 10^8; fields counted
modulo 60, 60 and 24). That description gives the blocks and what each
does, but few details. Widths, encodings, the button and switch mapping,
debounce and refresh times, reset behaviour and the alarm's on/off rules
are this design's own choices. They are listed under
[Where this design departs or fills gaps](#where-this-design-departs-or-fills-gaps).

## Block structure

```
            +---------------+ tick (1 cycle / s)
 clk ------>| clock_divider |-----------+  (gated off in set-time mode)
            +---------------+           v
 buttons  +------------+ time_edit +--------------+ now  +------------------+
 -------->| user_input |---------->| time_counter |----->| alarm_comparator |--+ match
 switches |  (4 x      | alarm_edit+--------------+  +-->|  (combinational) |  |
 -------->| debouncer) |---------->|alarm_register|--+   +------------------+  |
          +------------+           +--------------+  alarm                    v
              | mode, stop, alarm_en        |  now             +-------------+
              |                             v   |              | buzzer_ctrl |--> buzzer, led_alarm
              |                      mode mux (alarm view)     +-------------+
              |                             v
              |                     +--------------+
              +-------------------->| display_ctrl |--> an[7:0], seg[6:0], dp
                                    | seg7_decoder |
                                    +--------------+
```

Every block runs on the one 100 MHz clock. The slow rates (1 Hz, the display
scan, the debounce timers) are one-cycle clock enables made by counters, not
divided clocks, so there is one clock domain and no clock-crossing logic
beyond the input synchronisers.

| File | Role |
|---|---|
| `rtl/alarm_clock_pkg.sv` | `hms_t` time struct (hh 5 bits, mm 6, ss 6), `mode_e`, `edit_t`, field limits |
| `rtl/clock_divider.sv` | 1 Hz tick from 100 MHz |
| `rtl/time_counter.sv` | cascaded seconds / minutes / hours counters, per-field setting |
| `rtl/alarm_register.sv` | stored alarm time, per-field setting |
| `rtl/alarm_comparator.sv` | combinational equality of current and alarm time |
| `rtl/buzzer_ctrl.sv` | latches the alarm, drives buzzer and LED |
| `rtl/debouncer.sv` | synchroniser, debounce timer and press pulse for one button |
| `rtl/user_input.sv` | buttons and switches to mode and edit commands |
| `rtl/seg7_decoder.sv` | digit to segment pattern |
| `rtl/display_ctrl.sv` | digit scanning, binary to decimal, decimal points |
| `rtl/alarm_clock_top.sv` | the wiring above, plus reset synchroniser and mode LEDs |

## Time base and counting

`clock_divider` counts 0 to `DIV-1` (27 bits for 10^8) and pulses `tick` on
the wrap. So `f_tick = f_clk / DIV`, exactly 1 Hz at 100 MHz. There is no
fractional correction. Accuracy is therefore that of the board oscillator.

`time_counter` keeps the time as three binary fields. On a tick the
seconds step. When seconds wrap from 59, minutes step as well. When both
wrap, hours step, and 23:59:59 is followed by 00:00:00. All three update on
the same edge: this is a synchronous cascade, not a ripple counter.

Setting is separate from counting. An edit command steps exactly one field
and wraps inside that field without carrying, so pressing "minutes" at
:59 gives :00 and leaves the hour alone. An edit in the same cycle as a tick
takes priority. While the set-time switch is on, the top masks the tick, so
the clock holds still while it is being set. The divider keeps running, so
the first second after leaving set-time mode can be shorter than a full
second.

## Alarm path and its timing

This is the part that decides the "low latency" claim, so it is worth being
exact:

1. Clock edge *k*: `time_counter` loads the new time.
2. Same cycle: `alarm_comparator` compares all 17 bits of `now` and `alarm`
   combinationally, and `match` goes high.
3. Clock edge *k+1*: `buzzer_ctrl` sees `match` rising and sets its ringing
   flip-flop. `buzzer` and `led_alarm` go high.

So the buzzer pin rises one clock cycle (10 ns) after the time reaches the
alarm. Both testbenches check this cycle count.

`match` stays high for the whole matching second. `buzzer_ctrl` therefore
acts on the *rising edge* of `match` and then holds the alarm on by itself.
It stays on until one of these happens:

* the stop button is pressed (this works even inside the matching second);
* the alarm-enable switch is turned off;
* reset.

While the alarm is disabled, a match is ignored. Because the comparator
includes seconds, the alarm fires once per day. Stepping the alarm onto the
current time while the alarm is armed also counts as a match, and it rings.

The output is a steady level, which suits an active buzzer module. A
passive piezo would need a tone generator, which is not included.

## Controls

| Input | Effect |
|---|---|
| `sw_set_time` | set-time mode: clock paused, buttons step the time, `led_set_time` on. Wins if both set switches are on. |
| `sw_set_alarm` | set-alarm mode: buttons step the alarm, the display shows the alarm time with the rightmost decimal point lit, `led_set_alarm` on. The clock keeps running. |
| `sw_alarm_en` | alarm armed (`led_alarm_en`); turning it off also silences a ringing alarm |
| `btn_hh`, `btn_mm`, `btn_ss` | step hours / minutes / seconds of whatever is being set; ignored in run mode |
| `btn_stop` | silence the alarm |
| `rst` | active-high reset button: time 00:00:00, alarm 00:00:00, alarm silent |

Each button goes through `debouncer`. This is a two-flip-flop
synchroniser followed by a counter that accepts a new level only after
`DEBOUNCE_CYCLES` consecutive cycles without change (10 ms by default). A
press becomes one edit pulse `DEBOUNCE_CYCLES + 2` cycles after a clean edge.
Bounces shorter than the debounce time produce nothing. The switches and
the reset input are only synchronised, with two flip-flops each. A switch
change takes effect two cycles later.

## Display

`display_ctrl` drives one digit at a time, for `REFRESH_CYCLES` cycles
each (1 ms by default). With 8 digits that is a 125 Hz frame, fast enough
to look steady. Each binary field is split into tens and ones by a constant
divide-by-ten. Digits, right to left: seconds ones, seconds tens, minutes
ones, minutes tens, hours ones, hours tens. Positions 6 and 7 are blank.
Decimal points after the hours and minutes act as separators. An extra
point on digit 0 marks the alarm view.

All display outputs are registered and active low (`an`, `seg`, `dp`). This
matches the common-anode displays on Digilent Artix-7 boards. The segment
order is `seg[0]` = a through `seg[6]` = g. `seg7_decoder` also has glyphs for
hex A-F, which the clock never uses.

## Parameters

| Parameter (top) | Default | Meaning |
|---|---|---|
| `CLK_DIV` | 100_000_000 | system clocks per second (the divide ratio N) |
| `DEBOUNCE_CYCLES` | 1_000_000 | button stable time (10 ms) |
| `REFRESH_CYCLES` | 100_000 | display time per digit (1 ms) |
| `NUM_DIGITS` | 8 | anodes driven; 6 carry the time |

For a different board clock, scale all three cycle counts together. After
synthesis the whole design is about 200 flip-flops, and the decoder becomes
one small ROM.

## Simulating

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. Each one also has a
watchdog that stops a hung run and counts it as a failure. With plain
Verilator 5, from the repository root:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/alarm_clock_pkg.sv tb/tb_alarm_clock_top.sv --top-module tb_alarm_clock_top
./obj_dir/Vtb_alarm_clock_top
```

Replace the testbench name to run another one. The package must come first
on the command line.

| Testbench | What it establishes |
|---|---|
| `tb_clock_divider` | tick exactly every DIV cycles, phase restart on reset |
| `tb_time_counter` | a full day of 86,400 ticks against an integer seconds-of-day model; field edits without carry |
| `tb_alarm_register` | random edit combinations against a modulo model |
| `tb_alarm_comparator` | equal times, single-field and single-bit differences, random pairs |
| `tb_buzzer_ctrl` | one-cycle latency, latching, stop during the match, enable gating |
| `tb_debouncer` | exact press latency, rejection of every glitch shorter than the threshold, bouncing press and release |
| `tb_user_input` | mode decoding and priority, routing of edits, stop pulses |
| `tb_seg7_decoder` | every glyph, checked against a segment-letter description |
| `tb_display_ctrl` | one anode at a time, scan order, dwell time, every digit and decimal point decoded back |
| `tb_alarm_clock_top` | end to end at reduced rates (a 200-cycle "second"): sets 23:59:55 while paused, sets the alarm to 00:00:02 in the alarm view, passes midnight, rings, is stopped, stays silent while disarmed, and is silenced by the enable switch. Each of these is counted and must happen. |
| `tb_alarm_clock_full` | end to end at the default parameters: sets the alarm with two 12 ms button presses, runs about 2.02 × 10^8 cycles of real time, checks ticks exactly every 10^8 cycles, the buzzer 1 cycle after 00:00:02, the display reading, and stop. It takes about 1.5 minutes in Verilator. |

The two end-to-end benches read the time counter, divider tick and alarm
register through hierarchical references. Everything else is checked at
the pins, including the display, which is decoded back into digits.

## Where this design departs or fills gaps

* **Time source.** The source describes two time bases. Its architecture
  and equations use the 100 MHz / 10^8 divider, and this design uses that.
  Its conclusion instead credits a DS3231 real-time-clock chip on I2C, with
  a TCXO and battery backup. That chip and its I2C link are not included:
  the description gives no transactions, register use or hand-off to the
  counters. As built, the clock is only as accurate as the board
  oscillator, and it loses the time on power loss.
* **Display size.** Hours, minutes and seconds need six digits. The
  conclusion names a Basys 3 board, whose display has four digits; a board
  photograph shows a longer display. This design drives 8 anodes, as on a
  Nexys-4-class board. On a 4-digit board, set `NUM_DIGITS = 4`, and only
  the minutes and seconds will show.
* **Own choices.** The following are not given by the source:
  * the button and switch mapping;
  * the paused clock in set-time mode;
  * per-field setting without carry;
  * the latched alarm and its stop and enable rules;
  * the 10 ms debounce and the 1 ms refresh;
  * active-low outputs;
  * synchronous reset to 00:00:00.
* **Not built.** Snooze, multiple alarms and wireless features appear only
  as future work in the source and are left out.
