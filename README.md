# Dual-mode programmable fractional divider built on a 1/1.5 divider cell

A programmable clock divider normally divides by integers only. A
fractional-N PLL then gets a fractional average ratio by having a
delta-sigma modulator switch the integer ratio from one output period to
the next. The switching adds quantisation noise, and the size of that noise
is set by the step between neighbouring ratios. This divider has half-integer
steps built in. Its first stage triggers on **both** edges of the input clock,
so it can stretch an output period by half an input period. With an 8-bit
modulus word `m` it gives two outputs at the same time:

| output      | ratio f_in / f_out | range (8-bit word) | duty cycle |
|-------------|--------------------|--------------------|------------|
| `frac_out`  | 128 + m/2          | 128, 128.5 … 255.5 | not 50%    |
| `int_out`   | 256 + m            | 256, 257 … 511     | exactly 50%, odd ratios included |

The second output comes from the first through a divide-by-two stage, so every
integer ratio has a 50% duty cycle, odd ones included. The same cell, in a
small separate circuit, also gives a 50% duty-cycle divide-by-three.

The RTL is a logic-level model of a source-coupled-logic circuit. Latches
and muxes stand for the differential latches, and one single-ended signal
stands for each differential pair. It simulates the exact edge-by-edge
behaviour of the divider, with no analog timing.

## Block diagram

```
 mod[7:0] ─────────────┐
                       ▼
 in_clk ──┬──► divider_core ──► strobe ──┬──────────────► frac_out
          │  (1/1.5 cell +      ▲        │
          │   seven 2/3 cells)  │        └──► div2 ──────► int_out
          └─────────────────────┘

 div3_in_clk ──► div15_cell (MOD=1, FB_CTRL=1) ──► div2 ──► div3_out
```

`fdiv_top` holds both circuits side by side. They are independent, with
separate clocks and resets.

## The 1/1.5 cell (`div15_cell`): the part to understand first

The cell has four latches, two muxes and three AND gates:

* **latch1 / latch2 + mux1 (output path).** latch1 is transparent while IN
  is low and latch2 while IN is high. mux1 is selected by IN and always
  shows the latch that is currently *closed*. The pair is therefore a
  flip-flop that takes its data on both the rising and the falling edge of
  IN. Its output is OUT.
* **latch3 / latch4 + mux2 (feedback path).** This is a second both-edge
  flip-flop, built the same way. Its data is `OUT & FB_CTRL`.
* **Gates.** The data of the output pair is `~OUT & ~(MOD & mux2)`.

If every edge of IN is taken as one step k, with OUT[k] the value after
edge k and S[k] the mux2 value:

```
OUT[k+1] = ~OUT[k] & ~(MOD & S[k])
S[k+1]   =  OUT[k] &  FB_CTRL
```

* **MOD or FB_CTRL low.** S stays 0 and OUT toggles on every edge, so OUT
  is IN (or its complement): divide by 1. latch1 and latch2 then hold
  constant, opposite values.
* **MOD and FB_CTRL both high.** One step after each high step of OUT, S
  is 1. That blocks the next rise of OUT, so OUT stays low for an extra half
  period:

  ```
  step k   : 0 1 2 3 4 5 6
  OUT      : 1 0 0 1 0 0 1      period = 3 half periods = 1.5 T_IN
  S (mux2) : 0 1 0 0 1 0 0
  ```

In the divider chain, FB_CTRL is high for exactly one OUT period per
division cycle. The cell therefore adds exactly half an input period to
each output period when MOD_0 = 1.

In the model, every feedback loop of the cell closes through a latch that is
opaque while the mux selects it. The model therefore has no real
combinational loop and no race in zero-delay simulation. Lint tools that do
not see latch enables still report the loop (`UNOPTFLAT` in Verilator).
That warning is expected.

## The chain (`divider_core`, `div23_cell`)

Behind the 1/1.5 cell come N 2/3 cells (N = 7 by default). Each is clocked
by the output of the cell before it. Each cell also returns a feedback
control to the cell before it. The last cell's feedback input is tied high.
The output period is

```
T_OUT = (2^N + 2^(N-1)·MOD_N + … + 2·MOD_2 + MOD_1 + 0.5·MOD_0) · T_IN
      = (2^N + m/2) · T_IN          with m = {MOD_N … MOD_0}
```

One 2/3 cell runs through three states, one per period of its input clock:
HI (output high), LO (output low) and, when it divides by 3, EX (output
low). At the end of HI it samples `mod_in`, the feedback from the next cell.
If `mod_in` is set, the cell does two things:

* It raises `mod_out` for the LO period. That is exactly one output period
  of the previous cell, which is what that cell needs to see its feedback
  once.
* If its modulus bit `p` is set, it inserts EX.

The last cell sees `mod_in = 1` every period. So once per output period a
one-period feedback pulse travels from the last cell to the first, and each
cell on its path adds one of its input periods if its bit is set.

This 2/3 cell is a state machine of rising-edge flip-flops. It is not the
classic latch-level 2/3 cell that the chain structure comes from. It has the
same division function and the same feedback handshake. Its own timing
choices are:

* the output is high for one input period;
* the feedback is sampled at the end of HI;
* the extra period comes after LO.

**When the modulus word may change.** Every cell uses its bit late in the
output period, once the feedback from the last cell has reached it. That
happens in the second half of the period or later. A word applied shortly
after a rising edge of the output (the testbenches use 1 time unit, and the
first quarter of the period is safe) sets the length of the period that this
edge begins. A delta-sigma modulator can therefore update the word once per
output period.

## Strobe, the two outputs and divide-by-three

* **`strobe`:** two parallel latches (one transparent on IN low, one on IN
  high) and a mux selected by IN. It is the same both-edge flip-flop as in
  the cell. The ripple through the chain accumulates jitter; the strobe
  re-times the core output to the clean input edges, half an input period
  later. Its output is `frac_out`.
* **`div2`:** a toggle flip-flop on the rising edge of `frac_out`. It is
  high for one whole `frac_out` period and low for the next, so the duty
  cycle is exactly 50% and the ratio is 2·(128 + m/2) = 256 + m.
* **`div3_50`:** a 1/1.5 cell with MOD and FB_CTRL tied high (divide by
  1.5 on every period, high for ½ T_IN, low for 1 T_IN), followed by `div2`.
  The output has a period of 3 T_IN and is high for exactly 1.5 T_IN.

## Interface of `fdiv_top`

| port          | dir | width | meaning |
|---------------|-----|-------|---------|
| `rst_n`       | in  | 1     | asynchronous active-low reset of the programmable divider |
| `in_clk`      | in  | 1     | divider input clock |
| `mod`         | in  | N+1   | modulus word; `mod[0]` = MOD_0 drives the 1/1.5 cell, `mod[k]` the k-th 2/3 cell |
| `frac_out`    | out | 1     | fractional output, ratio 2^N + m/2 |
| `int_out`     | out | 1     | 50% duty-cycle integer output, ratio 2^(N+1) + m |
| `div3_rst_n`  | in  | 1     | reset of the divide-by-three circuit |
| `div3_in_clk` | in  | 1     | divide-by-three input clock |
| `div3_out`    | out | 1     | input / 3, 50% duty cycle |

The one parameter is `N` (default 7, from `fdiv_pkg::N_DEFAULT`), the number
of 2/3 cells. The chain is modular, giving ratios 2^N to 2^(N+1) − 0.5.
The ratio formula has been checked for every word at N = 1, 2, 3, 4 and 7.

## Files

| file | contents |
|------|----------|
| `rtl/fdiv_pkg.sv` | default N, state type of the 2/3 cell |
| `rtl/div15_cell.sv` | 1/1.5 divider cell (latch level) |
| `rtl/div23_cell.sv` | 2/3 divider cell |
| `rtl/divider_core.sv` | 1/1.5 cell + N 2/3 cells |
| `rtl/strobe.sv` | dual-edge re-timing latch pair |
| `rtl/div2.sv` | divide-by-two, 50% duty |
| `rtl/dual_mode_divider.sv` | core + strobe + div2 |
| `rtl/div3_50.sv` | 50% duty-cycle divide-by-three |
| `rtl/fdiv_top.sv` | top: both circuits |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_workloads.sv` | the operating points at real input frequencies |

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl rtl/fdiv_pkg.sv \
    tb/tb_fdiv_top.sv --top-module tb_fdiv_top
obj_dir/Vtb_fdiv_top
```

Replace `tb_fdiv_top` with any other testbench name. Each testbench ends with
`TB_RESULT checks=<n> failures=<n>`. `-Wno-fatal` is needed only because of
the expected latch-loop warning. Every input clock is driven with `#` delays;
a half input period of 5 time units is one step.

What the testbenches check, each against numbers worked out from the ratio
formulas rather than from the RTL:

* **`tb_div15_cell`:** divide by 1 with MOD low and with FB_CTRL low; a
  period of 1.5 T_IN with a high time of ½ T_IN when both are high; exactly
  one stretched period for a one-period FB_CTRL pulse.
* **`tb_div23_cell`:** period of 2 or 3 input periods, and `mod_out` high for
  exactly one input period (the second), with the feedback tied high and in
  sparse patterns.
* **`tb_divider_core`:** the ratio formula for all 256 words, on the period
  in which the word is applied and on the one after it.
* **`tb_strobe`:** output equals the input as it was just before each edge.
* **`tb_div2`:** toggles on every rising edge of an input with random duty
  cycle, and at no other time.
* **`tb_div3_50`:** period 3 T_IN, high 1.5 T_IN.
* **`tb_dual_mode_divider`:** both outputs for selected words, 50% duty of
  `int_out`, strobe delay of ½ T_IN, and a random new word every period.
* **`tb_fdiv_top`:** the whole design at its default size. It runs all 256
  words on both outputs and 300 periods with a random word each, while the
  divide-by-three runs from its own clock. It counts how often each
  mechanism happened: half-period swallow, divide-by-3 in each of the seven
  2/3 cells, strobe re-timing, odd integer ratios, per-period word changes
  and divide-by-three periods. A mechanism that never happened counts as a
  failure. It runs in well under a second.
* **`tb_workloads`:** the measured operating points of the silicon
  prototype, at their real input frequencies (1 fs resolution):
  * 255.5 at 2.56 GHz gives 10.0195 MHz (silicon: 10.02 MHz);
  * 511 at 1.28 GHz gives 2.5049 MHz at 50% duty (silicon: 2.504 MHz);
  * divide-by-three at 2.6 GHz gives 866.7 MHz at 50% duty.

## How far this follows the original circuit, and where it departs

These parts follow the original:

* the 1/1.5 cell's structure: its latches, muxes, gates and their roles;
* the chain of one 1/1.5 cell and N 2/3 cells with backward feedback, the
  last feedback input tied high, and N = 7;
* the ratio formula;
* the strobe as two latches and a mux clocked by the input;
* the divide-by-two for the 50% integer output;
* the 8-bit word MOD[0:7].

These are this design's own choices:

* **2/3 cell insides.** Only its function is given. This version is a small
  flip-flop state machine with the timing described above.
* **Reset.** The original circuit has none. Every latch and flip-flop here
  has an asynchronous active-low reset so that simulation starts from a known
  state. The divider also starts up without a reset: the last cell's
  feedback is constant, so a stray pulse from a random initial state can
  only disturb the first period. This was checked in simulation from random
  initial states.
* **Divide-by-three insides.** It is built from the 1/1.5 cell in
  divide-by-1.5 mode plus divide-by-two, the same method as the integer
  output; no schematic of it is given.
* **When the word may change.** The original says nothing about this. See
  above for what this implementation guarantees.

These parts are not modelled:

* the modulus buffer in front of the core and the source-coupled-logic to
  CMOS translator / output buffer (both are wires here);
* the differential input pair (one single-ended clock here);
* pads and the input stage, and with them the input sensitivity and the
  1–3.3 GHz operating range;
* the delta-sigma modulator of a surrounding PLL.

Because the model has no delays, it says nothing about jitter, which is what
the strobe exists to remove. It also says nothing about maximum frequency.
In the model, the strobe's effect is only the half-period delay.
