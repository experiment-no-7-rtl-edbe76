# Turn-signal controller: a Moore machine on a divided clock

A small sequential circuit for an FPGA board with a 50 MHz oscillator. Two
switches, left (`l`) and right (`r`), drive three lamps: left (`lo`), right
(`ro`) and a third lamp `ho`, read here as the hazard lamp. A five-state
Moore machine decides which lamps are lit. Its state clock is the board clock
divided down to 10 Hz, so each lamp pattern lasts 100 ms and a blink is
visible to the eye.

```
 clk_in (50 MHz) ──► selectable_clock ──clk (10 Hz)──► turn_signal_fsm ──► lo, ho, ro
                      s1 s0 = 1 0                        ▲
                                                l, r ────┘
```

## The state machine

| state | lamps lo ho ro | next state                                   |
|-------|----------------|----------------------------------------------|
| idle  | 0 0 0          | `l r` = 00 → idle, 10 → sl, 01 → sr, 11 → slr |
| sl    | 1 0 0          | idle                                         |
| sr    | 0 0 1          | idle                                         |
| slr   | 1 0 1          | sh                                           |
| sh    | 0 1 0          | idle                                         |

The switches are looked at only in idle. Every lit state lasts one state
clock. So:

* holding `l` alone alternates sl and idle: the left lamp blinks at 5 Hz
  (100 ms on, 100 ms off). `r` alone does the same on the right.
* holding both runs slr, sh, idle, slr, and so on: both side lamps, then the
  hazard lamp, then dark, repeating every 300 ms.
* a change of the switches while a lamp is lit takes effect after the
  machine returns to idle.
* a press shorter than one state clock period (100 ms) can fall between two
  rising edges of the divided clock and is then never seen.

### State encoding

The three state bits *are* the three lamps: bit 2 = `lo`, bit 1 = `ho`,
bit 0 = `ro` (`turn_signal_pkg::state_t`). With this encoding the next-state
logic reduces to three flip-flop equations

```
D0 (right)  = R · idle
D1 (hazard) = Q2 · ~Q1 · Q0        (state slr)
D2 (left)   = L · idle             where idle = ~Q2 · ~Q1 · ~Q0
```

and the output decoder disappears: the lamps come straight from the state
register and change only on a rising edge of the state clock, without
glitches. The three codes no state uses (011, 110, 111) lead back to idle on
the next clock.

## The clock divider

`selectable_clock` produces one of four rates from the 50 MHz clock, chosen by
`s1 s0`:

| s1 s0 | divisor N   | rate   |
|-------|-------------|--------|
| 0 0   | 500,000,000 | 0.1 Hz |
| 0 1   |  50,000,000 | 1 Hz   |
| 1 0   |   5,000,000 | 10 Hz  |
| 1 1   |      50,000 | 1 kHz  |

On each rising edge of `clk` a counter is incremented and set back to zero
when the incremented value reaches N, so it steps through 0 … N−1 and the
period is exactly N clocks. `out_clk` is a register set to 1 while the new
count is at most N/2. The duty cycle is therefore not quite 50 %: the output
is high for N/2+1 clocks and low for N/2−1 (2,500,001 and 2,499,999 clocks at
10 Hz). Selecting a smaller divisor while the count is already past it makes
the counter wrap on the next edge, so the first period after a switch is
short. The counter is 29 bits wide, enough for the largest divisor; its width
follows the divisor parameters.

The top ties the select to `s1 s0 = 1 0` (10 Hz) through the parameters
`SEL_S1` and `SEL_S0`.

## Clocking, power-up and reset

The divided clock is used as a real clock: it drives the clock pin of the
state register. This keeps the design as small as possible and mirrors the
classic way of slowing a lab circuit down. On an FPGA the divided clock
should be placed on a global clock buffer. In a larger design, a one-cycle
enable pulse on the 50 MHz clock would be the usual alternative. It is not
used here.

There is no reset pin. The state register starts in idle and the divider
counter starts at zero through their declaration initialisers, which FPGA
configuration loads. `out_clk` has no defined power-up level. If it starts
low, the first board clock makes it rise, the machine takes its first step
at once, and the second step follows N−1 board clocks later instead of N,
because the counter starts at zero and its first edge already steps it to 1.
If it starts high, the first step comes after N board clocks. From then on
every period is exactly N. Verilator's lint reports the initialised registers as
`PROCASSINIT` warnings; they are intended.

## Timing summary (default parameters)

| quantity                                   | value                 |
|--------------------------------------------|-----------------------|
| state clock                                | 50 MHz / 5,000,000 = 10 Hz |
| duration of each lamp pattern              | 100 ms                |
| single-switch blink                        | 5 Hz                  |
| both-switch cycle (slr, sh, idle)          | 300 ms                |
| switch-to-lamp delay                       | up to 100 ms          |
| flip-flops                                 | 33 (29 counter, 1 divided clock, 3 state) |

## Files

| file | contents |
|------|----------|
| `rtl/turn_signal_pkg.sv` | state enumeration and lamp struct |
| `rtl/turn_signal_fsm.sv` | the Moore machine |
| `rtl/selectable_clock.sv` | the four-rate clock divider |
| `rtl/turn_signal.sv` | top: divider at 10 Hz driving the machine |
| `tb/turn_signal_fsm_tb.sv` | machine against a reference model, directed and 2000 random steps |
| `tb/selectable_clock_tb.sv` | divider cycle by cycle against a reference counter in all four settings and across setting changes; period and high time per setting; full-size 1 kHz period of 50,000 clocks |
| `tb/turn_signal_tb.sv` | whole design with short divisors (10 board clocks per state clock), checked every board clock against a reference divider and machine; counts every state, ignored switches, missed short presses and blinking |
| `tb/turn_signal_full_tb.sv` | whole design at default parameters: a full hazard cycle with both switches held, each step timed to 5,000,000 board clocks, then release |

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

Top ports: `clk_in`, `l`, `r` (inputs); `ro`, `lo`, `ho` (outputs). Top
parameters: `SEL_S0` = 0, `SEL_S1` = 1 and the four divisors `DIV_0P1HZ`,
`DIV_1HZ`, `DIV_10HZ`, `DIV_1KHZ`, which a simulation may shorten.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/turn_signal_pkg.sv rtl/selectable_clock.sv rtl/turn_signal_fsm.sv rtl/turn_signal.sv \
    tb/turn_signal_tb.sv --top-module turn_signal_tb -o sim
./obj_dir/sim
```

Replace the testbench file and `--top-module` for the others. The full-size
test simulates 650 ms of board time, about 32 million board clocks, and takes
roughly 15 s.

## How this relates to the original design

Followed as published: the five states and their transitions, the lamp
pattern of each state, the next-state flip-flop equations, the divider's
four divisors, its wrap rule and its high/low split, the fixed 10 Hz
selection, and the divided clock driving the state register directly.

Choices made here:

* The state encoding. The original lists the states by name only; the
  encoding chosen is the one under which its flip-flop equations hold.
* The divider counter is 29 bits rather than a 32-bit integer. It counts the
  same way.
* The divisors are parameters passed down from the top, so that a simulation
  can run at short periods. Their defaults are the 50 MHz values.
* `ho` is taken to be a hazard lamp. Its meaning is not spelled out: it
  lights only in the step that follows both side lamps.
* The board's pin assignment is not included. It depends on the board, and
  the four ports are all there is to assign.
