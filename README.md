# Keypad-triggered tone generator

Press key 1 on a 4x4 matrix keypad and a speaker plays a square-wave tone
for exactly one second, however briefly or long the key is held. The design
runs from a 50 MHz clock and is made of two counters. Both count down by one
per clock:

- a **timer** measures the one second. It is loaded with N-1 on a key press
  and stops at zero.
- a **frequency divider** runs all the time from M-1 down to 0. It marks
  every M-th clock, and the speaker changes level on those clocks.

The speaker pin toggles on each divider zero while the timer is non-zero. It
is held low while the timer is zero. The tone frequency is
f = 500 + 100·d0 Hz, where d0 is a digit from 0 to 9 chosen when the design
is built. The default is d0 = 7, which gives 1200 Hz.

## Structure

```
 col[3] ──► key_edge_detect ──press──► tone_timer ──timer_on──┐
 (keypad)   2-FF sync + edge            N-1 … 0, stop          ▼
                                                          spkr_toggle ──► spkr
                                 freq_divider ──div_zero──►  (L/H)
                                  M-1 … 0, repeat
 row[3:0] ◄── constant 4'b0111
```

| file | role |
|---|---|
| `rtl/tone_pkg.sv` | default clock rate, digit and counter widths. Also the functions `tone_hz(d0)` and `half_period_clks(clk_hz, f)`. |
| `rtl/key_edge_detect.sv` | synchronises the keypad column and pulses `press` for one clock when it falls |
| `rtl/tone_timer.sv` | one-shot timer. It is *on* while its count is non-zero. |
| `rtl/freq_divider.sv` | free-running divide-by-M counter with a `zero` flag |
| `rtl/spkr_toggle.sv` | speaker level register, a two-state L/H machine |
| `rtl/lab4.sv` | top level: keypad row drive and the wiring of the four blocks |

## Keypad interface

The keypad is a passive switch matrix. The FPGA drives its four row lines and
reads its four column lines, which have weak pull-ups. The top drives the
constant `row = 4'b0111`: only row 3 is low. A column therefore reads low only
while a key on row 3 is pressed. With the keypad wired as intended, key 1
joins row 3 to column 3. The design watches only `col[3]`. Other keys have no
effect, and so do presses on other rows (the testbench checks this).

Pressing the key pulls `col[3]` low, so a press is a **falling edge**.
`key_edge_detect` passes the column through two flip-flops, because a
switch is not synchronous to the clock. A third flip-flop holds the previous
level. `press` is high for one clock when the previous level is 1 and the
current level is 0. Reset sets all three flip-flops to 1 (key released), so a
key held through reset counts as one press when reset ends.

There is no debouncer. None is needed for the tone: contact bounce while
the key goes down starts the timer on its first edge, and the timer ignores
presses while it runs. A bounce when the key is released more than a second
later could in principle start a second tone.

## The timer: length of the tone

`tone_timer` has two states, *off* and *on*. The counter itself holds the
state: off means count = 0, on means count ≠ 0.

- off → on: a `press` pulse loads N-1.
- on: the count falls by one each clock.
- on → off: the count reaches 0 and stays there.

A press while the timer is on is ignored. This is what makes the tone last one
second "regardless of how long the key is pressed". A second press part-way
through a tone does not extend it either.

With N = 50,000,000 at 50 MHz, the timer is on for N-1 clocks. The speaker
register samples `timer_on` one clock later, so the speaker is active for N
clocks, exactly 1 s. The counter is 26 bits wide (2^26 = 67,108,864 > N-1).

## The divider: frequency of the tone

This is the part that is easiest to get wrong. The divider counts
M-1, M-2, …, 0, M-1, … and raises `zero` for one clock in every M. The
speaker *toggles* on each zero, so one full speaker period takes **2M**
clocks:

    M = round(f_clk / (2 f)),   f = 500 + 100·d0 Hz

The package function `half_period_clks` computes this as
`(f_clk + f) / (2 f)` in integer arithmetic, which rounds to the nearest
whole number. For the default, M = 20,833, and the tone is
50e6 / 41,666 = 1200.02 Hz. M ranges from 17,857 (d0 = 9, 1400 Hz) to
50,000 (d0 = 0, 500 Hz). All of these fit in the 20-bit counter.

The divider never stops or restarts. When a key is pressed it is at some
arbitrary phase, so the first toggle of a tone comes 1 to M clocks after the
timer starts. A tone has floor((N-1)/M) or one more toggles; for the default,
2400 or 2401.

## Speaker output

`spkr_toggle` holds the pin level as an enum with states L and H. On each
clock:

| timer on | divider zero | next level |
|---|---|---|
| no | – | L |
| yes | yes | opposite of the current level |
| yes | no | unchanged |

So when the timer runs out the pin goes low on the next clock, even if
it was high in the middle of a half period, and it rests low between tones.
The output is a register, so there is no combinational glitch on the pin.

## Timing summary (defaults)

| event | clocks after the column first reads low |
|---|---|
| `press` pulse | 2 (the column is sampled at the first edge) |
| timer loaded, `timer_on` high | 3 |
| last clock with `timer_on` high | 3 + N - 2 |
| speaker forced low | 3 + N |

## Parameters

`lab4` takes:

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 50,000,000 | clock rate |
| `D0` | 7 | digit in f = 500 + 100·d0 |
| `N` | `CLK_HZ` | tone length in clocks (1 s) |
| `M` | `half_period_clks(CLK_HZ, tone_hz(D0))` | clocks between speaker toggles |
| `TIMER_W` | 26 | timer counter width |
| `TONE_W` | 20 | divider counter width |

The blocks contain assertions that stop elaboration if N-1 or M-1 does not fit
its counter, or if `D0` is not a single digit. To build for a digit, set
`D0`. To shorten tones in simulation, set `N` and `M` directly.

## Ports of the top

| port | dir | width | meaning |
|---|---|---|---|
| `clk50` | in | 1 | 50 MHz clock |
| `rst` | in | 1 | synchronous, active-high reset |
| `row` | out | 4 | keypad rows, constant 4'b0111 |
| `col` | in | 4 | keypad columns, pulled up; only `col[3]` is used |
| `spkr` | out | 1 | speaker drive |
| `timercnt`, `tonecnt`, `timer_on` | out | 26, 20, 1 | counter values and timer state, for observation only |

Reference pin placement on the Cyclone IV E board the design was made for:
clk50 PIN_23, spkr PIN_53, row[3:0] PIN_103/100/98/86, col[3:0]
PIN_84/80/76/74. Turn on the weak pull-ups on the column pins. The speaker
goes between `spkr` and ground. The board has no reset button, so tie
`rst` low there. After power-up with random register contents the circuit
settles by itself within 2^26 clocks (1.3 s): the timer runs out and the
divider wraps.

## Departures and choices

The following are this design's own choices, not fixed by the original
specification:

- **Timer load value.** The timer loads N-1, so the speaker is active for N
  clocks. A reference schematic of the circuit loads 50,000,000 (N) instead.
  The difference is one clock (20 ns).
- **What M means.** One early description calls the tone period "M clocks"
  and also says the output toggles each time an M-state counter reaches zero.
  Those two statements disagree. This design follows the requirement that the
  output toggle every half period, so M is half the period.
- **Rounding of M.** M is rounded to the nearest clock.
- **Reset input.** The `rst` input is an addition.
- **Synchroniser.** The two-flip-flop synchroniser in front of the edge
  detector is an addition.
- **Observation outputs.** The outputs `timercnt`, `tonecnt` and `timer_on`
  are additions.
- **No debouncing.** Debouncing is not done; see above.

The keypad, the speaker, the oscillator and the pin/pull-up setup are
external parts. They are not modelled in `rtl/`. The testbenches model the
keypad as a switch matrix (`tb/keypad_model.sv`).

## Verification

Every testbench prints `TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | what it shows |
|---|---|
| `key_edge_detect_tb` | compares `press` with a reference built from the sampled input history, on random input. Also checks the 2-clock latency, a single pulse for a long press, and the key-held-through-reset case. |
| `tone_timer_tb` | loads N-1, stays on for exactly N-1 clocks, holds at 0, ignores a retrigger; cycle model on random starts |
| `freq_divider_tb` | cycle model at M = 5; exact M-clock spacing of `zero` at the default M = 20,833 |
| `spkr_toggle_tb` | cycle model on random inputs; sees rises, toggled falls and forced lows |
| `lab4_tb` | end to end at N = 300, M = 7, through the keypad model. Covers short presses, contact bounce, a retrigger during a tone, a key held through three tone lengths, tones ending high and being forced low, and presses of other keys. It counts each case and fails if one never happens. |
| `lab4_full_tb` | the design at its defaults, one real second: 1 ms key press, then about 50 M clocks. It measures 1200.02 Hz and a 1.000000 s tone. |
| `lab4_digits_tb` | ten copies with d0 = 0…9, full-size dividers, 4 ms tones. The toggle spacing must equal round(50e6 / (2(500 + 100·d0))). |

`tb/tone_monitor.sv` holds the per-clock checks shared by the last three. It
checks that the speaker is low after any clock with the timer off, that
toggles are exactly M apart, that each tone is N-1 timer clocks long, and the
toggle count per tone.

To run one with Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/tone_pkg.sv \
          tb/lab4_tb.sv --top-module lab4_tb
./obj_dir/Vlab4_tb
```

Replace `lab4_tb` with any testbench name above. `lab4_full_tb` simulates
50 million clocks, which takes about half a minute.
