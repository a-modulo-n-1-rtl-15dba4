# Modulo N+1/2 frequency divider

A divider whose ratio is N + 1/2: fo = fi / (N + 1/2). A typical use is deriving
a 153.8 kHz clock (close to 16 x 9600 baud = 153.6 kHz) from a 1 MHz crystal
(1 MHz / 6.5 = 153.846 kHz).

The textbook way to divide by N + 1/2 is to double the input frequency and then
divide by 2N+1. You double it by XORing the input with a delayed copy of itself,
so that every edge becomes a pulse. The counter then toggles at 2·fi, which costs
dynamic power in CMOS. The design here, after G. Mihov's "A 'Modulo N+1/2
Divider'", keeps the counter at about fi. It needs:

* a divide-by-(N+1) counter (the *main divider*);
* a divide-by-2 flip-flop (output **Q**) that toggles once per output period;
* an XOR gate that feeds the counter with `fi_star = fi ^ Q`.

While Q = 0 the counter advances on rising edges of fi; while Q = 1 it advances
on falling edges. Every time Q toggles, the next counted edge is the opposite
edge of fi, half an input period earlier than it would otherwise have been. Two
output periods hold 2(N+1) counted edges but only 2N+1 input periods. The mean
output period is therefore (N + 1/2)·ti.

## The edge switch, step by step

Take N = 6, input period ti, input high time K·ti. Start at a rising edge of fi
with Q = 0 and the counter in state 6:

| event                          | time              | counter | Q | fi_star            |
|--------------------------------|-------------------|---------|---|--------------------|
| fi rises, counted              | 0                 | 6 → 0   | 0 → 1 | rises, then falls at once (Q flipped the XOR) |
| fi falls (= fi_star rises)     | K·ti              | 1       | 1 | |
| next falls of fi               | K·ti + 1..5·ti    | 2 .. 6  | 1 | |
| fi falls, counted              | (6 + K)·ti        | 6 → 0   | 1 → 0 | rises, then falls at once |
| fi rises (= fi_star rises)     | 7·ti              | 1       | 0 | |
| ...                            | (6 + K)·ti + (7 − K)·ti = 13·ti | 6 → 0 | 0 → 1 | |

So the output periods alternate:

* the period that starts when Q becomes 1 lasts **(N + K)·ti**;
* the period that starts when Q becomes 0 lasts **(N + 1 − K)·ti**.

Their mean is (N + 1/2)·ti whatever K is. Only the split between the two depends
on the duty cycle. Their difference, as a fraction of the mean period, is
|2K − 1| / (N + 1/2). It is zero for a 50 % input duty cycle. It approaches
1/(N + 1/2) as the input pulse gets very narrow or very wide. With a 1 MHz,
25 % duty input the 6.5 divider gives 6.25 µs and 6.75 µs periods.

The counter's clock rate is (N+1)·fo = (2N+2)/(2N+1)·fi: 14/13·fi for N = 6,
instead of 2·fi for the doubling scheme. That is roughly half the dynamic power
in the divider's flip-flops. The divide-by-(N+1) counter and the divide-by-2
flip-flop have 2N+2 states together, against 2N+1 for the doubling scheme's
counter. Both schemes need about the same number of flip-flops.

## The extra clock pulse and what it asks of real hardware

When the counter wraps, Q flips and the XOR inverts fi_star. Right after the
counted rising edge, fi_star therefore drops again. In silicon this pulse lasts
t_G + t_Q: the XOR delay plus the clock-to-output delay of the counter and the
divide-by-2. In this RTL it has zero width: the counted edge happens, then Q
changes in the same time step. In hardware the design is only correct if:

* t_G + t_Q is at least the counter's minimum clock pulse width t_w (otherwise
  the flip-flops may not settle on the counted edge);
* the input high and low times are each at least
  t_G + t_Q − (1/f_max − t_w), where f_max is the counter's maximum clock
  frequency. The input period must then be at least 2·(t_G + t_Q − t_w + 1/f_max).
  With t_G + t_Q = t_w the input can reach about f_max/2.

fi_star is a clock made by logic from a clock and a flip-flop output, and it
carries a deliberate narrow pulse. Treat it as a generated clock in timing
analysis. The delay of the XOR and the feedback path must be controlled (for
example by hand placement, or by a discrete '86 as in the board version below).
On FPGAs, building clocks in fabric logic like this is generally discouraged.

## Two implementations

`mod_nhalf_top` holds both side by side on one input clock. With N = 6 and a
common reset they produce identical waveforms.

### `nhalf_divider`: parameterised (default N = 6)

```
fi ──►(XOR)── fi_star ──► main_divider (0..N) ──► fo
        ▲                       │ wrap
        │                       ▼
        └──────── Q ◄── toggle_divider (÷2, clocked by fi_star)
```

* `edge_select_xor` forms `fi_star = fi ^ sel`.
* `main_divider #(N)`: binary counter 0..N. `wrap` is high in state N. `fo` is high
  from state ceil((N+1)/2) to N, so fo falls at the start of each output period.
* `toggle_divider` is a toggle flip-flop enabled by `wrap`. In the block diagram
  the divide-by-2 hangs off fo; here it toggles on the same fi_star edge on which
  the counter wraps, that is, at the instant fo falls. This avoids a third clock.

### `divider_6p5_161`: board-level version for N = 6

One 74x161 4-bit counter (`counter_161`, the standard function: synchronous
load over count, count when CEP and CET, asynchronous clear MR, TC at 15) and
three gates:

* G1 ('86 XOR) makes the counter clock from the 1 MHz input and Q3;
* G2 ('00 NAND) watches Q1 and Q2. In state 6 it pulls PE low, so the next
  clock loads the counter;
* G3 ('04 inverter) feeds ~Q3 into D3, with D2..D0 grounded. Each load therefore
  clears Q2..Q0 (the divide-by-7) and inverts Q3 (the divide-by-2);
* the output is Q2, 153.8 kHz on average. Q3 runs at half that rate.

CEP and CET are tied high. MR is the reset input here.

## Top-level ports (`mod_nhalf_top`, parameter `N = 6`)

| port | dir | meaning |
|---|---|---|
| `fi` | in | input clock (the 1 MHz oscillator) |
| `rst_n` | in | asynchronous reset, active low: counters to 0, Q to 0 |
| `fo`, `q`, `fi_star` | out | generic divider: output, divide-by-2, counter clock |
| `baud_clk` | out | '161 divider output (Q2), 153.8 kHz for a baud rate generator |
| `q3_161`, `clk_161` | out | '161 divider: Q3 and counter clock |

The oscillator and the baud rate generator are outside this RTL: the first
drives `fi`, the second would take `baud_clk`.

## Design choices not fixed by the original description

* A reset (asynchronous, active low) is added everywhere. The board version uses
  the '161's MR pin for it.
* The general main divider is a binary up-counter that returns to 0 after
  state N. A count above N, possible only without a reset, is treated as the
  last state, so the counter always comes back into its cycle.
* fo's high phase (states ceil((N+1)/2)..N) is a choice. Only its falling edge,
  at the start of each period, is fixed. For N = 6 it is the '161's Q2.
* The divide-by-2 is a synchronous toggle enabled by the counter's wrap, not a
  flip-flop clocked by fo (see above).
* The simpler divider that doubles the clock (XOR plus delay line, then
  divide-by-(2N+1)) is only the point of comparison and is not included.

## Simulating

All files are IEEE 1800-2017 SystemVerilog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_mod_nhalf_top.sv --top-module tb_mod_nhalf_top
./obj_dir/Vtb_mod_nhalf_top
```

The same pattern runs every testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. Time is unitless: an input
period of 1000 units stands for 1 µs.

| testbench | what it checks |
|---|---|
| `tb_edge_select_xor` | XOR truth table, exhaustive and random |
| `tb_main_divider` | count sequence, wrap and fo for N = 6, 1, 4; fo rate; reset |
| `tb_toggle_divider` | toggle on enable, hold otherwise, reset value |
| `tb_counter_161` | '161 against a reference model: load, count, hold, TC, clear |
| `tb_nhalf_divider` | N = 6, 1, 3 at duty 50/25/75/10 %: each period N·ti + high time or N·ti + low time, in alternation; N+1 counter clocks per period; Q toggles each period; mean period (N + 1/2)·ti |
| `tb_divider_6p5_161` | same period rules for the board version, plus the state sequence 0..6 of Q2..Q0 |
| `tb_mod_nhalf_top` | the full design at its defaults: both versions identical at every change; period rules; deviation equals the absolute value of (high time − low time); 26 output periods and 182 counter clocks in 169 input periods (153.846 kHz from 1 MHz). It counts and requires each behaviour: Q rising, Q falling, both kinds of period, equal periods at 50 % duty and unequal ones otherwise |

`nhalf_period_checker` in `tb/` is the shared period monitor. For every
testbench, a deliberately broken copy of its module (for example XOR replaced
by OR, or the wrong state decoded by G2) has been confirmed to fail it.

## Limits of this model

* Zero-delay RTL: nothing here checks the pulse-width and input-timing limits
  above. They have to be met by the gate delays of the real implementation.
* The dynamic-power advantage is an argument about toggle rates. The testbench
  checks the counter clock rate (14/13·fi at N = 6), not power.
