# Digital clock with 12/24-hour format, weekday and time setting

A clock built only from small counters and decoders: seconds and minutes
on four seven-segment digits, the hour on two more digits in either
standard (12-hour) or military (24-hour) format, and a row of seven
weekday lamps. The user can switch the format at any moment. They can also
pause the clock, pick one of six sections with a select button and step it
with an increase button.

The design works without any binary-to-BCD arithmetic. Each decimal digit
of the seconds and minutes is its own counter (0–9 or 0–5). The hour uses
two complete counters running side by side: a 1–12 counter and a 0–23
counter. Five 2:1 multiplexers pick one of them for the display. Two
decoders then map the 5-bit binary hour straight to the units and tens
segment patterns. Every counter is built from JK flip-flops, and its
count sequence, including the wrap, comes from hand-derived J/K equations.

## Counting chain

```
tick ─[pause mux]─► seconds (0-9 → 0-5) ─carry─► minutes (0-9 → 0-5) ─carry─┐
                                                                             │
              ┌──────────────────────────────────────────────────────────────┘
              ├─► 12-hour counter 1..12 ─┐
              └─► 24-hour counter 0..23 ─┴─► format selector ─► hour decoders
                        │ wrap 23→0
                        └─► weekday counter 0..6 ─► weekday decoder (7 lamps)
```

* `tick` is a one-cycle pulse once per second. It is the only time base.
  The pause multiplexer replaces it with 0 while `pause` is 1.
* All flip-flops run on a single clock, `clk`. A counter steps on a
  clock edge when its count enable is high. The enable of each counter is
  the carry of the one below: the carry is that counter's own enable ANDed
  with "at its last value". So the minutes units step in the same clock edge
  in which the seconds go 59 → 00, and so on up to the weekday.
* The 12-hour and 24-hour counters share one enable and are never out of
  step. After reset they read 12 and 0, which is midnight. An assertion in
  the top checks that they always describe the same time of day.
* The weekday counter steps when the 24-hour counter wraps 23 → 0. Day 0
  is Monday.

### The counters and their J/K equations

Each counter is a set of `jk_ff` instances. On an enabled edge a `jk_ff`
holds (J=K=0), sets (10), clears (01) or toggles (11). The equations come
from the excitation method: a Karnaugh map per flip-flop, split into the
half where Q=0 (this gives J) and the half where Q=1 (this gives K). The
last value goes straight back to the first. No reset is used to cut the
sequence short. Every unused code returns to the sequence within a few
steps.

| counter | bits | sequence | equations |
|---|---|---|---|
| `counter_0_9` | 4 | 0..9 | J0=K0=1; J1=Q0·Q3', K1=Q0; J2=K2=Q0·Q1; J3=Q0·Q1·Q2, K3=Q0 |
| `counter_0_5` | 3 | 0..5 | J0=K0=1; J1=Q0·Q2', K1=Q0; J2=Q0·Q1, K2=Q0 |
| `hour12_counter` | 4 | 1..12 | J0=K0=1; J1=K1=Q0; J2=Q0·Q1, K2=Q0·Q1+Q3; J3=Q0·Q1·Q2, K3=Q2 |
| `hour24_counter` | 5 | 0..23 | J0=K0=1; J1=K1=Q0; J2=K2=Q0·Q1; J3=Q0·Q1·Q2·Q4', K3=Q0·Q1·Q2; J4=Q0·Q1·Q2·Q3, K4=Q0·Q1·Q2 |
| `weekday_counter` | 3 | 0..6 | J0=(Q1·Q2)', K0=1; J1=Q0, K1=Q0+Q2; J2=Q0·Q1, K2=Q1 |

## Hour display

`format_selector` is five one-bit `mux2` instances. Select 0 passes the
24-hour counter; select 1 passes the 12-hour counter, with a 0 as its fifth
bit. The 5-bit result feeds two decoders, each defined over all 32 codes:

* `hour_ones_decoder` shows the value mod 10.
* `hour_tens_decoder` shows 0 for 0–9, 1 for 10–19, 2 for 20–29 and 3 for
  30–31. The leading zero is displayed, so 7 o'clock reads `07`.

Segment patterns are 7 bits `{a,b,c,d,e,f,g}`, with a in the MSB and 1 for
a lit segment. In this glyph set, 6 and 9 have tails and 7 uses only a, b
and c (see `clock_pkg`).

## Setting the clock

This is the least obvious part of the design. `selection_system` contains:

* a `counter_0_5` selection counter, which steps on each press of `sel_btn`;
* a setting demultiplexer (`demux_1to8`, enabled only while paused). It
  routes each press of `inc_btn` to output `adj[sel]` as a one-cycle pulse;
* a lamp demultiplexer with a constant-1 input, also enabled by `pause`.
  It lights `sel_led[sel]`.

| `sel` | section that a press steps |
|---|---|
| 0 | seconds units |
| 1 | seconds tens |
| 2 | minutes units |
| 3 | minutes tens |
| 4 | hours (both hour counters) |
| 5 | weekday |

Outputs 6 and 7 of the demultiplexers are never selected.

Each setting pulse is XORed onto the count enable of its counter. While
paused no normal count enable can be high, so the XOR acts as an OR. A
setting step therefore behaves exactly like a normal count: **if the
stepped counter wraps, its carry steps the next section too.** For example,
pressing increase on the seconds tens while it shows 5 sets it to 0 and
advances the minutes. This is deliberate. A version that sets one digit
without disturbing the others would need the carries gated by the
selection. This design does not do that.

The buttons must be clean (debounced) levels, synchronous to `clk`. The
block registers each button and acts on the first cycle in which it is
seen high.

## Top-level interface (`digital_clock_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock of every flip-flop |
| `rst` | in | 1 | synchronous reset, active high: Monday 00:00:00, 12-hour counter at 12, selection 0 |
| `tick` | in | 1 | one-cycle pulse per second |
| `pause` | in | 1 | 1 freezes the clock and enables setting |
| `fmt_12h` | in | 1 | 1 = 12-hour display |
| `sel_btn`, `inc_btn` | in | 1 | select and increase buttons (levels) |
| `sec_ones`, `sec_tens`, `min_ones`, `min_tens` | out | 4,3,4,3 | digit counters |
| `hour24`, `hour12`, `hour_bin` | out | 5,4,5 | both hour counters and the displayed hour |
| `weekday` | out | 3 | 0 = Monday .. 6 = Sunday |
| `seg` | out | 6×7 | segments: [0] sec units, [1] sec tens, [2] min units, [3] min tens, [4] hour units, [5] hour tens |
| `day_led` | out | 7 | one-hot weekday lamps, [0] = Monday |
| `sel`, `sel_led` | out | 3, 8 | selection counter and its lamps (lit only while paused) |

Timing: the counters change on the clock edge at the end of a cycle in
which `tick` is high, or in which an increase press is detected. The
segment, lamp and `hour_bin` outputs are combinational functions of the
counters and of `fmt_12h`/`pause`. The design has no parameters. Any clock
frequency works, provided `tick` is produced at 1 Hz from it. For fast
bench runs, assert `tick` more often.

## Files

`rtl/` holds one module or package per file:

* `clock_pkg`: segment type, glyphs, weekday and selection enums
* `jk_ff`
* counters: `counter_0_9`, `counter_0_5`, `hour12_counter`, `hour24_counter`, `weekday_counter`
* decoders: `seg7_decoder`, `hour_ones_decoder`, `hour_tens_decoder`, `weekday_decoder`
* `mux2` and `format_selector`
* `demux_1to8` and `selection_system`
* `min_sec_section`: one base-60 section, used for both seconds and minutes
* `digital_clock_top`

`tb/` holds a self-checking testbench `tb_<module>.sv` for every module,
plus `tb_logging_run.sv`. Each testbench prints a
`TB_RESULT checks=<n> failures=<m>` line and has a watchdog.

* `tb_digital_clock_top` runs the complete clock through a full week: all
  604 800 seconds, back to Monday 00:00:00, with format switching along the
  way. It then runs 300 000 random cycles that mix ticks, pausing,
  selection and setting. Every output is compared in every cycle against a
  behavioural model. The testbench counts how often each mechanism occurs
  (carries, 12- and 24-hour wraps, weekday wrap, ticks swallowed by pause,
  format switches, setting of each section, setting carries, presses
  ignored while running). It fails if any of them never happened.
* `tb_logging_run` is a short directed run. It checks that the minutes
  units digit changes only when the seconds tens digit goes 5 → 0, that a
  paused clock ignores ticks, that increase presses step only the selected
  digit (with its carry), and that counting resumes from the set value.
* The counter testbenches check the sequences against a model under random
  enables and resets. The decoder and multiplexer testbenches are
  exhaustive; the hour-decoder tables are written out row by row.

## Simulating

With Verilator 5, for example for the full-clock test:

```
verilator --binary --timing -Irtl -y rtl rtl/clock_pkg.sv tb/tb_digital_clock_top.sv \
          --top-module tb_digital_clock_top
./obj_dir/Vtb_digital_clock_top
```

The same command works for any other testbench. The package must come
first; `-y rtl` finds the remaining modules by name. The full-week test
runs in about a second.

## Design decisions

These points go beyond the original circuit or change how it works:

* **One clock with count enables** replaces counters clocked by the
  outputs of the previous counter and a shared JK clock input. The count
  sequence is the same, but there are no gated or rippled clocks. Setting
  pulses are XORed onto enables rather than onto clocks.
* **Wrap by J/K equations**, not by an asynchronous reset when an
  out-of-range value appears.
* **A `tick` input** replaces the free-running clock source. The original
  uses a 2 Hz toggle rate, which is one count per second.
* **Reset state** is Monday 00:00:00, with the 12-hour counter at 12. The
  original gives no reset values.
* **The section order** of the selection counter (the table above) is
  this design's choice.
* **Button handling**: presses are detected on the rising edge of a
  synchronous level. The original clocks the selection counter directly
  from the button.
* **One selection counter** drives both the setting and the lamp
  demultiplexers. The original has two counters on the same clock input,
  which always agree.
* **Lamp demultiplexer enable** is tied to `pause`, so the selection lamps
  are dark while the clock runs.
* **Invalid codes**: the 0–9 decoder blanks codes 10–15, and the weekday
  decoder lights nothing for code 7.

## Not included

* An AM/PM indicator: in 12-hour format nothing tells morning from
  afternoon (the 24-hour counter's value would give it directly).
* Setting a single digit without the carry rippling into the next section
  (see "Setting the clock").
* Hardware for conversion between the formats (add or subtract 12). The
  two parallel hour counters make it unnecessary.
* Debouncing, synchronisers and the 1 Hz prescaler. They depend on the
  board and the system clock.
