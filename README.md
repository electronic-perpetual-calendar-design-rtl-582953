# Perpetual calendar for a small CPLD

A complete electronic calendar in one small programmable device. It keeps
seconds, minutes, hours, day of week, day of month, month and year
(2000–2099). Month lengths and leap years are handled in hardware. The
calendar is shown on eight multiplexed seven-segment digits and is set with
two push buttons. The design needs about 150 flip-flops and fits easily in a
1270-logic-element MAX II part such as the EPM1270T144C5.

The design has four parts:

| part | module | what it does |
|---|---|---|
| integrated timing | `timekeeper` | seven chained counters, each with preset, count and carry |
| data adjustment | `adjust_fsm` | mode key picks "running" or one field to set; adjust key steps that field |
| keyboard acquisition | `keyboard` (+ `key_debounce`) | debounces the three keys and turns each press into a one-clock pulse |
| digital display | `display_scan` | shows the date group or the week/time group, one digit at a time |

`tick_gen` divides the board clock into a one-second pulse and a 1 kHz scan
tick. `perpetual_calendar` is the top level.

## The counting chain

All fields are stored as two-digit packed BCD: tens in bits [7:4] and units
in [3:0]. The display therefore needs no binary-to-decimal conversion. The day
of week is a plain 3-bit count.

```
 sec_tick ─► second 00–59 ─co─► minute 00–59 ─co─► hour 00–23 ─co─┬─► day 01–X ─co─► month 01–12 ─co─► year 00–99
                                                                  └─► week 0–6
                                                  month, year ─► month_length ─► X (28/29/30/31)
```

Every counter works the same way (`bcd_counter`, `week_counter`,
`day_counter`):

- A count enable adds one. When the counter is at its limit, it returns to
  its start value (0, or 1 for day and month) and raises its carry `co`.
- `co` is combinational: `co = en && (q >= limit)`. The carry of one counter
  is the count enable of the next. So at 23:59:59 on 31 December 2099, one
  clock edge rolls every field to 2000‑01‑01 00:00:00 at once, with no
  ripple through intermediate values.
- A value above the limit, which only a preset can produce, also wraps to the
  start value with a carry on the next count.
- `ld` loads a preset value and takes priority over counting.

**Month length.** The day counter does not hold a month table. It receives a
two-bit code `max_days` (`00` = 28, `01` = 29, `10` = 30, `11` = 31 days) from
`month_length`. That block decodes the code from the current month and year.
The year is two digits, read as 2000–2099. In that century the leap-year rule
reduces to "divisible by four" (2000 is divisible by 400). For a BCD year
with tens T and units U, that test is: T even and U ∈ {0, 4, 8}, or T odd and
U ∈ {2, 6}. This needs no divider.

Changing the month (by adjustment or preset) can leave the day above the new
month's length, for example 31 February. The next count then takes the day
to 01 and advances the month.

**Day of week.** The week counter advances on the same midnight carry as the
day counter and counts 0…6, where 0 is Sunday. It is independent of the
date. The week is not computed from the date, so it must be set together with
the date.

## Setting the time

`adjust_fsm` has eight states:

```
RUN ─mode─► YEAR ─mode─► MONTH ─mode─► DAY ─mode─► WEEK ─mode─► HOUR ─mode─► MINUTE ─mode─► SECOND ─mode─► RUN
```

- **RUN:** the clock runs and the adjust key does nothing.
- **Any other state:** the clock is frozen. The second pulse is ignored and no
  carries are passed on.
  - Each adjust-key press raises the increment strobe of the selected field
    for one clock (`adj_inc`, a `field_sel_t` struct). That field then steps
    by one and wraps within its own range. Seconds 59 → 00 does not touch the
    minutes.
  - An assertion checks that at most one strobe is active at a time.

The top level also has a parallel preset: `preset_ld` loads all seven fields
from `preset_time` in one clock. This suits a host or a test fixture setting
the calendar directly.

## Keys

The keys are active-low push buttons: `key_mode_n`, `key_adj_n` and
`key_sel_n`. Each passes through `key_debounce`:

1. A two-flip-flop synchroniser.
2. A sample on every scan tick (1 kHz).
3. A counter that accepts a new level only after `DEBOUNCE_TICKS` (20)
   consecutive samples disagree with the current one. Contact bounce shorter
   than 20 ms is ignored.
4. A one-clock pulse on each debounced press.

The select key toggles `disp_group`.

## Display

Eight digits, one lit at a time. Each scan tick moves to the next digit, so
each digit is refreshed 125 times a second. `disp_group` picks the group:

```
disp_group = 0 :   2  0  Y  Y. M  M. D  D      (date, year written as 20YY)
disp_group = 1 :   W  _  H  H. M  M. S  S      (day of week, blank, time)
```

- `selout[i]` enables digit i, active low. Digit 7 is the leftmost.
- `show` is `{dp, g, f, e, d, c, b, a}`, active high, for common-cathode digits.
- The decimal points after the year/hour and the month/minute act as
  separators.
- Both outputs are registered.

For common-anode digits, invert `show`.

## Clocking and timing

- Everything runs on the single clock `clk` (`CLK_HZ`, 50 MHz by default).
- The one-second pulse and the scan tick are one-clock enables, not clocks.
- Reset is asynchronous and active low. It loads `RESET_TIME`, which defaults
  to Saturday 2000‑01‑01 00:00:00. Reset also selects RUN and the date group.

| event | latency |
|---|---|
| first second pulse after reset | `CLK_HZ` clocks, then one every `CLK_HZ` clocks |
| calendar update | the clock edge that samples the second pulse; all carries within that edge |
| key press → pulse | 2–3 clocks + `DEBOUNCE_TICKS` scan ticks (≈ 20 ms) |
| adjust pulse → field change | 2 clocks (registered strobe, then the counter) |
| display | `selout`/`show` follow the digit index and field values by one clock |

## Parameters (top level)

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 50 000 000 | board clock frequency |
| `SCAN_HZ` | 1 000 | digit-step and key-sample rate |
| `DEBOUNCE_TICKS` | 20 | key samples a new level must hold |
| `RESET_TIME` | 2000‑01‑01 Sat 00:00:00 | power-on calendar value |

The shared types are in `cal_pkg`: `cal_time_t`, `field_sel_t`, `mode_e` and
`max_days_e`, plus the BCD increment and seven-segment functions.

## Files

`rtl/`: `cal_pkg.sv`, `bcd_counter.sv`, `week_counter.sv`, `day_counter.sv`,
`month_length.sv`, `timekeeper.sv`, `adjust_fsm.sv`, `key_debounce.sv`,
`keyboard.sv`, `tick_gen.sv`, `display_scan.sv`, `perpetual_calendar.sv`.

`tb/`: one self-checking testbench per block (`tb_<module>.sv`). Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. There is
also a month-long test, `tb_day_counter_may2009`, which takes the day counter
through May 2009 with its length code decoded by `month_length`: 31 counts,
one carry on the 31st. Two more tests drive the top level:

- **`tb_perpetual_calendar`** runs at reduced rates: 200 clocks per second, a
  3-sample debounce.
  - It presets the calendar just before the rollovers it needs: the end of
    28-, 29-, 30- and 31-day months, a year end and the end of 2099.
  - It follows every second against an integer Gregorian model.
  - It checks that each second lasts exactly `CLK_HZ` clocks.
  - It walks through all seven adjust states with one increment each, and
    checks that a short key glitch is ignored.
  - It reads both display groups back from `selout`/`show`.
  - It counts each of these events and fails if one never happened.
- **`tb_perpetual_calendar_full`** runs the top at its default parameters.
  - It presets 2099‑12‑31 23:59:59, waits for the real 50 000 000-clock
    second and checks the full rollover to 2000‑01‑01.
  - It measures the next second and selects the time group with a real 40 ms
    key press.
  - It takes about two minutes in Verilator.

To simulate with Verilator (5.x), from the project root:

```
verilator --binary --timing -Irtl rtl/cal_pkg.sv tb/tb_perpetual_calendar.sv \
          --top tb_perpetual_calendar -Mdir obj
obj/Vtb_perpetual_calendar
```

Any other testbench works the same way: substitute its name. Include
`rtl/cal_pkg.sv` first; `-Irtl` lets Verilator find the other modules by
name.

## How far it can be trusted

What the tests cover:

- All blocks pass their testbenches.
- Month lengths are checked exhaustively for every month of 2000–2099.
- The counters are checked cycle by cycle against integer models under random
  enables and presets.
- Each testbench was also run against a copy of its block with one deliberate
  bug, and caught it.

What has not been done:

- The design has not been run on hardware.
- No timing analysis has been done. The longest combinational path is the
  seven-stage carry chain plus the month-length decode. That path is short
  for a 50 MHz MAX II, but it has not been measured.

## Design decisions and departures

**Follows the original design:**

- the four-part structure;
- the seven counters with preset, count and carry, and their ranges;
- the day counter that counts to the month length X and restarts at 1;
- the two-bit month-length code;
- the week counter clocked by the midnight carry;
- the mode key / adjust key scheme;
- eight digits showing two groups chosen from the keys;
- the display block's port set (hours, minutes, seconds, year, month, day,
  week, scan clock, control in; digit select and segments out).

**Choices made here:**

- **Single clock.** Each counter is enabled by the previous carry instead of
  being clocked by it. This avoids ripple clocks and keeps the design to one
  clock domain. The preset is therefore synchronous rather than asynchronous.
- **Frozen clock while adjusting.** The clock stops while any field is being
  adjusted. Each field steps on its own, without carries.
- **Adjust order.** The adjust states run year → month → day → week → hour →
  minute → second.
- **Third key.** A separate select key toggles the display group.
- **Calendar conventions.** A 24-hour clock, week 0 = Sunday, and the
  2000–2099 century with its leap rule.
- **Board details.** The display layout, digit and segment polarities,
  debouncing, the 50 MHz clock and the reset value.
- **Parallel preset ports.** `preset_ld`/`preset_time` on the top level, and
  the `now`/`mode` state outputs. A board needs only `clk`, `rst_n`, the
  three keys, `selout` and `show` (21 pins).
- **Day above month length.** A day beyond the month's length, left by an
  adjustment, rolls to the 1st of the next month on the next count. It is not
  clamped when the month changes.
