# All-digital DCO from a 1+1/k divider and a multi-phase clock

This is a digitally controlled oscillator (DCO) for all-digital PLLs that
contains no analog part. Its only timing reference is a set of **K phase
clocks**: K copies of a clock of period `t_d`, each one lagging the one before
it by `t_d/K`. Where a conventional DCO tunes a capacitor bank, this one tunes
its frequency by counting.

One output period is built from `2^Z` periods of an internal clock `mp_clk`.
Each of those periods is either

* **`t_d`**: one phase clock is passed through unchanged, or
* **`t_d (1 + 1/K)`**: the circuit steps from one phase clock to the next,
  which comes `t_d/K` later. This is the *1+1/k division*.

The control word `D` (`0 .. 2^Z-1`) sets how many of the `2^Z` periods are
plain `t_d` periods. Those periods are spread evenly over the output period.
Hence

```
T_out = D * t_d + (2^Z - D) * t_d * (1 + 1/K)
f_out = f_d / ((1 + 1/K)(2^Z - D) + D)
```

Each step of `D` shortens the output period by exactly `t_d/K`, so the period
is linear in `D` and the time resolution is `t_d/K`. More phases give a finer
step, but the ratio of highest to lowest frequency is about `1 + 1/K`, so they
also narrow the range. `Z` sets how many steps that range is cut into.

The default configuration is `K = 7`, `Z = 6`, and `f_d = 7 MHz` for the phase
clocks. That gives a resolution of `t_d/7 ≈ 20.4 ns` and this range:

| D  | T_out (ps, t_d = 142856 ps) | f_out     |
|----|-----------------------------|-----------|
| 0  | 10 448 896                  | 95.70 kHz |
| 10 | 10 244 816                  | 97.61 kHz |
| 20 | 10 040 736                  | 99.59 kHz |
| 40 | 9 632 576                   | 103.81 kHz |
| 63 | 9 163 192                   | 109.13 kHz |

These are the values measured in simulation. They match the formula to the
picosecond.

The lowest frequency is `f_d / ((1+1/K) 2^Z)`. It is the free-running
frequency at `D = 0`. The highest frequency is `f_d / (2^Z - 1 + (1+1/K))`, at
`D = 2^Z - 1`.

## Block diagram

```
 clk_ph[K-1:0] ──► frac_divider (1+1/k divider) ──► mp_clk ─┬─► mp_counter ─► dco_comparator ─► dco_out
                      ▲ hold                                │         ▲ clear      │
                      │                                     │         └────────────┘
                      │                                     ├─► pulse_divider J=1 (÷2)   ─┐
                      │                                     ├─► pulse_divider J=2 (÷4)    │ pulses
                      │                                     │   ...                       │
                      │                                     └─► pulse_divider J=Z (÷2^Z) ─┘
                      │                                                                   ▼
                      └──────────────── dist_pulse ◄── dist_selector (AND with D, OR) ◄── d_q ◄── d_in
```

| module | role |
|---|---|
| `dco_top` | The whole oscillator. It also holds `d_q`, which samples `d_in` once per output period. |
| `frac_divider` | The 1+1/k divider. It contains two `phase_selector`s, a `half_divider` and a `ring_counter`. |
| `ring_counter` | K-bit one-hot register. It selects which phase clock is in use. |
| `phase_selector` | One-hot AND-OR multiplexer of the phase clocks. It is used as selector1 and selector2. |
| `half_divider` | Toggle flip-flop on the falling edge of selector2's output. It is frozen while `hold` is high. |
| `pulse_divider` | Divider-j. It pulses for one `mp_clk` period in every `2^J`. |
| `dist_selector` | Uses `D` to pick which dividers count, and ORs their pulses into the distributed pulse. |
| `mp_counter` | Counts `mp_clk` periods, from 0 to `2^Z-1`. |
| `dco_comparator` | Comparators on the count. They form the output and clear the counter. |

## The 1+1/k divider (`frac_divider`)

This is the part that needs the most care.

The ring counter holds a one-hot index `a`. Selector1 passes phase clock
`clk_a`, and its output is `mp_clk`. Selector2 receives the ring rotated left
by one bit, with the MSB wrapping to bit 0, so it passes `clk_(a+1)`. The 1/2
divider toggles on every falling edge of selector2's output. Each rising edge
of the 1/2 divider advances the ring counter.

Follow one step. Say `clk_(a+1)` falls at time `s` and the 1/2 divider rises.
Then:

1. The ring moves to `a+1`. Selector1 now passes `clk_(a+1)`, which has just
   fallen. Before the switch it passed `clk_a`, which fell `t_d/K` earlier.
   Both inputs are low at the switch, so `mp_clk` shows no pulse or glitch.
   Selector2 now passes `clk_(a+2)`. That clock is still high, so selector2's
   output makes a rising edge, which the 1/2 divider ignores.
2. At `s + t_d/K`, `clk_(a+2)` falls. The 1/2 divider returns to 0. The ring
   counter does not move.
3. At `s + t_d + t_d/K`, `clk_(a+2)` falls again. The 1/2 divider rises and
   the ring advances.

So the selection moves one phase later every `t_d + t_d/K`. Each `mp_clk`
period then contains exactly one full high/low cycle of the selected clock.
The high phase lasts `t_d/2` and the low phase lasts `t_d/2 + t_d/K`.

**Hold.** The distributed pulse `hold` freezes the 1/2 divider. This freezes
the ring counter, and `mp_clk` is then simply the selected phase clock, with
period `t_d`. `hold` changes just after a rising edge of `mp_clk`. The
falling edges of selector2 that it governs come `t_d/2 + t_d/K` after that
rising edge, or later. As a result a whole `mp_clk` period is either held
(`t_d`) or divided (`t_d(1+1/K)`), never a mix of the two. In both cases the
1/2 divider is back at 0 when the next `mp_clk` period starts.

**Timing requirements in silicon.** These come from the sequence above:

* `K >= 3`, so that `t_d/K < t_d/2`.
* The loop from selector2's falling edge, through the 1/2 divider and the ring
  counter, to the new selection at both selectors must settle within `t_d/K`.
  That is about 20 ns in the default configuration.
* `hold` must settle between a rising edge of `mp_clk` and the next falling
  edge of selector2.
* The phase clocks must be accurately spaced. Any skew between phases shows up
  directly as period error.

The RTL uses combinational clock multiplexing and generated clocks (`mp_clk`,
the 1/2 divider output). A real implementation needs the corresponding clock
constraints and glitch-aware selector cells.

## Spreading the held periods (`pulse_divider`, `dist_selector`)

Divider-j (`J = 1 .. Z`) counts `mp_clk` and pulses during period number `n`
of the output period when `n mod 2^J = 2^(J-1)`. Because of these offsets, no
two dividers ever pulse in the same period:

* divider-1 pulses in the odd periods;
* divider-2 pulses in periods 2, 6, 10, …;
* divider-3 pulses in periods 4, 12, 20, …;
* and so on, up to divider-Z, which pulses once, in period `2^(Z-1)`.

Bit `b` of `D` (weight `2^b`) enables divider-`(Z-b)`. That divider pulses
`2^b` times per output period, so the enabled pulses add up to exactly `D`
held periods. Each divider's pulses are evenly spaced. Examples for `Z = 6`:

* `D = 20 = 16 + 4` uses divider-2 and divider-4;
* `D = 40 = 32 + 8` uses divider-1 and divider-3.

With `Z = 4`, `D = 6` uses divider-2 and divider-3.

Period 0 is never held. The largest useful word is therefore `2^Z - 1`, which
is what a `Z`-bit `d_in` can express.

## Output and duty ratio (`mp_counter`, `dco_comparator`)

The counter counts every `mp_clk` period, held or divided. The output is high
for counts `0 .. 2^(Z-1)-1` and low for the rest. At count `2^Z - 1` the
counter is cleared and the output goes high again.

Divider-1 to divider-(Z-1) pulse equally often in the two halves. So for even
`D` both halves contain the same mix of period lengths, and the duty ratio is
exactly 50%. For odd `D`, divider-Z's single pulse falls in the low half. That
half is then `t_d/K` shorter, which is 20 ns out of about 10 µs by default.

## Interface of `dco_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk_ph` | in | K | Phase clocks. `clk_ph[i]` lags `clk_ph[i-1]` by `t_d/K`. 50% duty. |
| `rst_n` | in | 1 | Asynchronous reset, active low. |
| `d_in` | in | Z | Control word. It is sampled in the last `mp_clk` period of each output period. |
| `dco_out` | out | 1 | Oscillator output. |
| `mp_clk` | out | 1 | Output of the 1+1/k divider, brought out for observation. |

Parameters: `K = 7` (number of phases) and `Z = 6` (`2^Z` periods per output
period).

After reset:

* phase `clk_ph[0]` is selected;
* all counters are at 0;
* `dco_out` is high;
* the first output period runs with `D = 0`.

A change of `d_in` takes effect at the start of the next output period after
the one in which it is sampled. Every output period therefore uses a single
control word. This also makes a step in `D` produce a clean step in the
period, with no intermediate value.

## Design choices

Where the source description leaves details open, this design fills them in
as follows:

* **Reset.** There is an asynchronous active-low reset everywhere. Reset
  values are chosen so that the state is consistent: ring at phase 0, 1/2
  divider at 0, counters at 0.
* **Control word.** `d_in` is registered once per output period (`d_q`).
* **Selectors.** They are one-hot AND-OR multiplexers.
* **Divider offsets.** The offsets `2^(J-1)` are one concrete choice of
  "started one pulse apart". The dividers are separate counters, as in the
  original structure, even though they all count the same clock.
* **Comparators.** There are two: half period and full period. An output
  register keeps `dco_out` free of glitches.
* **Clock and control range.** `f_d` belongs to the external phase-clock
  source, not to the RTL. The control word spans `0 .. 2^Z-1`.

## Simulation

The testbenches use `tb/multiphase_clock_model.sv`. This behavioural source
makes K phase clocks out of a half-step delay, `t_d = 2*K*HALF_STEP_PS`. For
odd K no two phase edges coincide. The default `HALF_STEP_PS = 10204` gives
`t_d = 142856 ps`, which is 7 MHz within 6 ppm.

Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_dco_top.sv --top-module tb_dco_top -o sim
./obj_dir/sim
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_dco_top` | Full design at default parameters. Checks the period, high time and the mix of `mp_clk` periods for D = 0, 1, 20, 40, 63, 32, 5 and a 10↔40 step sequence. Counts held and divided periods, phase steps, word changes and output periods. |
| `tb_dco_sweep` | Default size, every D from 0 to 63. Checks that the period follows the formula, that neighbouring words differ by exactly `t_d/7`, and the duty ratio. Prints the f_out table. |
| `tb_dco_small` | Same checks with K = 5 and Z = 4. |
| `tb_frac_divider` | Random hold pattern. Each period must be `t_d` or `t_d + t_d/K`, and the phase must advance exactly in divided periods. |
| `tb_<block>` | One unit test for each remaining module against a reference model. |

All of these pass. Each finishes in well under a second.

## Limits

* This is a zero-delay RTL model. The glitch-free selector switching and the
  `t_d/K` loop-delay budget described above hold in simulation by
  construction. In silicon they must be ensured by layout and timing closure.
* The tuning range is narrow by design: 95.7 to 109.1 kHz at the defaults,
  a ratio of about `1 + 1/K`. A wider ratio needs fewer phases (coarser
  steps); a faster phase clock moves the whole range up.
* The phase-clock generator (a DLL or multi-phase ring oscillator) is not part
  of this RTL.
