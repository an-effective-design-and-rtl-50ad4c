# Pixel-clock DPLL locked to HSYNC

An analog video interface (VGA-style RGB) sends only the horizontal sync
pulse, HSYNC, as timing. The receiver must rebuild the pixel clock from it:
a clock N times faster than HSYNC, where N is the total number of pixel
periods per line (about 800 to over 2600 for common display modes), with
its edges phase aligned to HSYNC. The reference is slow (tens to hundreds of
kHz) and noisy, and the multiplication ratio is large, so every loop update
is expensive in time and a single bad reference edge can pull the loop far.

This design is a digital PLL for that job. Its loop is almost entirely
digital: a phase-frequency detector (PFD) and a time-to-digital converter
(TDC) measure the error between HSYNC and the divided output, a digital
controller searches for the oscillator code by binary search, a loop
filter that rejects extreme codes keeps a steady baseline code, a
delta-sigma modulator (DSM) dithers a fine fractional code into a 10-bit oscillator
code, and a 12-bit programmable divider closes the loop. Only the
oscillator and the TDC delay lines are analog, and they are given here as
behavioural models.

## The loop

```
            +------------------+ avg_dco_code (19)
            |  dlf (filter)    |<-------------------------+
            +------------------+                          |
                    |                                     |
 hsync ---+--> pfd --UP/DN, LEAD/LAG--> pll_ctrl --dco_code (19)--> dsm --D<9:0>--> dco --> ckout
          |     |                          ^                                            |
          |     +--> tdc --tdc_code (7)----+                                            |
          |            ^                                                                |
 hsout ---+------------+<------------------- freq_div (divide by N, 12 bit) <-----------+
```

| Block | Module | Clock | Role |
|---|---|---|---|
| PFD | `pfd` | edges of hsync / hsout | UP/DN pulses as wide as the time error; LEAD/LAG direction levels |
| TDC | `tdc`, `sub_tdc`, `therm2bin`, `tdc_code_sel` | edges of hsync / hsout | measures the error in delay-cell units, one sub-TDC per sign |
| PLL controller | `pll_ctrl` | hsync | lock-in state machine, binary search, phase tracking |
| Loop filter | `dlf` | hsync | baseline code: average of 8 codes with extremes rejected |
| DSM | `dsm` | ckout | first-order modulator, 19-bit word to dithered 10-bit code |
| DCO | `dco`, `dco_bias`, `ring_osc`, `diff2se` | - | behavioural oscillator, two ranges selected by pin P0 |
| Divider | `freq_div` | ckout | hsout = ckout / N |
| Top | `dpll_top` | | the closed loop |

Shared widths and the state type are in `dpll_pkg`.

### The control word

`dco_code` is 19 bits: bits 18:9 are the integral code that reaches the
oscillator, bits 8:0 a fraction of one integral step. **A larger code means
a slower oscillator.** LAG (hsout arrived first, the DCO runs fast) therefore
raises the code, LEAD lowers it. The DSM adds the fraction over time: every
ckout cycle it accumulates bits 8:0 and, on a carry, sends the integral code
plus one. Over 512 cycles the oscillator sees exactly `fraction` cycles at
k+1 and the rest at k. Because one hsout period spans N ≥ 800 ckout cycles,
the hsout period moves in steps of 1/512 of an integral step.

## Lock-in: how the controller finds the frequency and the phase

This is the part that needs the most explanation. The controller makes one
decision per HSYNC period. It uses the LEAD/LAG result of the comparison
that finished before the current HSYNC edge. A *polarity change* is a
decision whose direction is the opposite of the last one.

1. **COARSE** (DSM off). The code starts at 512.0, mid-range. Each period
   it moves by `step` integral codes in the direction asked for; `step`
   starts at 256. At each polarity change the step is halved, and once the
   loop filter has an output the code is also **restored to the filter's
   baseline** `avg_dco_code` instead of staying at the last, overshot value.
   No step is taken on that period.
2. **FINE** (DSM off). The same search once the step is 16 integral codes
   or less, continuing down to a step of 1. A polarity change at step 1
   ends the integral search.
3. **FRAC** (DSM on). The search continues over the whole 19-bit word in
   fractional LSBs, from a step of 256 LSBs (half an integral code) down to
   1, with the same halving and restoring.
4. **TRACK** (DSM on), entered at a polarity change with fractional step 1.
   A baseline code moves by one LSB per period in the direction asked for
   (an integral path), and the TDC's measured error is added to the
   fraction for one period as an immediate correction:
   `dco_code = base ± (tdc × KP) >> KP_SHIFT`, a quarter LSB per TDC count
   by default. `locked` is high in this state.

Because the PFD reports phase, not frequency, the search overshoots the
frequency until the accumulated phase turns over; that is what makes the
polarity changes happen. Halving the step at each turn and restarting from
the filtered baseline makes the frequency converge, and the tracking state
then pulls the phase in. The correction acts one reference period after the
error was measured, so the proportional gain is kept well below one hsout
period change per TDC count; with gain 1 the loop rings.

The decision waits for the comparison to finish: a comparison ends at the
later of its two edges, and its LEAD/LAG and TDC code are read at the next
HSYNC edge. With no LEAD and no LAG (coincident edges, or no hsout edge yet)
the code is held.

## The loop filter

`dlf` keeps eight codes C0..C7 and receives every new `dco_code`. The first
eight fill C0..C7. After that it takes codes in pairs: when the second of a
pair arrives, it finds the largest and the smallest of the ten values,
drops one of each, writes the other eight back, and outputs their mean as
`avg_dco_code`. A code thrown far off by one noisy HSYNC edge is removed
instead of being averaged in. Everything for one pair happens on the clock
that accepts the second code. Ties: the first minimum and the last maximum
are dropped, so two different entries go even when all ten are equal.

## Phase detection

`pfd` is the classic two-flip-flop detector: hsync sets UP, hsout sets DN,
and both clear as soon as both are set. The UP or DN pulse is as long as
the time error. LEAD is UP sampled at each hsout edge (hsync was first);
LAG is DN sampled at each hsync edge (hsout was first). Both are levels that
hold until the next comparison. The clear path through the asynchronous
resets is a deliberate combinational loop, as in any such PFD.

`tdc` holds two `sub_tdc` instances: #1 starts at hsync and stops at hsout,
#2 the other way round. In each, the start edge runs down a chain of 63
delay cells (30 ps each by default, a pair of inverters in silicon); the
stop edge samples all taps into flip-flops, and `therm2bin` counts the
ones. `tdc_code_sel` passes the code of #1 when LEAD is high and of #2 when
LAG is high. The controller receives 7 bits: LAG on top of the selected
6-bit code. The range is 63 × 30 ps ≈ 1.9 ns; larger errors saturate,
which only matters in tracking, where errors are far smaller.

## The oscillator model

`dco` chains three models that follow the stages of the real circuit:

- `dco_bias`: a DAC turns D<9:0> into a voltage, and the bias section
  derives VBN and VBP from it. A larger code gives a weaker bias.
- `ring_osc`: a four-stage differential ring whose period is set by the
  bias and by the range pin P0. Its outputs VOP/VON are small-swing
  voltages, 0.8 V ± 0.15 V.
- `diff2se`: a comparator with 20 mV hysteresis that turns the pair into
  the rail-to-rail CKOUT.

Bias and ring outputs are `real` signals. The model's law is a period linear
in the code, `T = T_MIN + D × T_STEP`:

| P0 | T_MIN | T_STEP | Frequency range |
|---|---|---|---|
| 0 | 3.8 ns | 10 ps | about 263 down to 71 MHz |
| 1 | 1.5 ns | 4 ps | about 667 down to 179 MHz |

Together the two ranges cover the 76-650 MHz the pixel clock needs. P0 is
an external pin; the loop does not choose the range.

## Clocks

| Domain | Blocks | Notes |
|---|---|---|
| hsync | `pll_ctrl`, `dlf` | one update per line |
| ckout | `dsm`, `freq_div` | the DSM takes the 19-bit word across by registering it twice and using it only when both copies agree; the word changes at most once per line, thousands of ckout cycles apart. A new word reaches D<9:0> four ckout cycles later |
| edges | `pfd`, `sub_tdc` | asynchronous by nature |

The divider loads a new N at its wrap point, so a ratio change never
produces a short hsout period; hsout is high for floor(N/2) cycles.

All resets are asynchronous and active low (`rst_n`). A reset returns the
loop to COARSE at code 512.0 with an empty filter.

## What is synthesizable

`pfd`, `therm2bin`, `tdc_code_sel`, `pll_ctrl`, `dlf`, `dsm` and `freq_div`
are synthesizable. `sub_tdc` (delay line) and the oscillator (`dco`,
`dco_bias`, `ring_osc`, `diff2se`) are behavioural models using
SystemVerilog delays and `real` signals. For silicon, replace them
with the delay-cell chain and the analog oscillator. `tdc` and `dpll_top`
are structural and inherit the models. Simulation therefore needs
verilator's `--timing`.

## Measured behaviour

With the default parameters the loop locks to every display mode tried:

| Mode | N | Line rate | CKOUT | P0 | HSYNC periods to TRACK |
|---|---|---|---|---|---|
| XGA 1024×768 @ 75 Hz | 1312 | 60.023 kHz | 78.75 MHz | 0 | 207-214 |
| SXGA 1280×1024 @ 60 Hz | 1688 | 63.981 kHz | 108 MHz | 0 | 218-238 |
| UXGA 1600×1200 @ 60 Hz | 2160 | 75.000 kHz | 162 MHz | 0 | 201-211 |
| WUXGA 1920×1200 @ 60 Hz | 2592 | 74.556 kHz | 193.25 MHz | 0 | 237-246 |
| WUXGA 1920×1200 @ 85 Hz | 2624 | 107.184 kHz | 281.25 MHz | 1 | 209-290 |

(The ranges cover runs with different reference jitter.) Once locked, the
mean CKOUT frequency is within 0.1 % of N × f(HSYNC), in practice a few
ppm. The hsout edge stays within about 0.25 ns of a clean HSYNC edge. With
±0.5 ns random jitter on every HSYNC edge it stays within about 1.1 ns, and
with ±3 ns within about 4.5 ns. The timing values per mode are standard
VESA numbers.

**Lock time departs from the source figure.** The source specifies a
typical lock time of 45 µs. This design needs about 200-300 reference
periods, 2.4-3.6 ms at these line rates. The source does not give enough of
the controller's timing to reproduce its figure: how it splits coarse
from fine search, its fractional start step, and its tracking gains are
unstated. Those choices here are marked below and are the first place to
look for a faster lock.

## Where this design makes its own choices

Following the source: the block structure and bus widths (19-bit code with
10 integral and 9 fractional bits, 10-bit DCO code, 6-bit sub-TDC codes,
12-bit divider); the four lock-in states and their order; the DSM off in
the integral searches and on afterwards; binary search with the step halved
at each polarity change, starting at 256; the restore of the filter
baseline at polarity changes; the filter algorithm; TDC corrections added
to the fractional bits; the two-sub-TDC structure with selection by
LEAD/LAG; the three-stage DCO with a range pin; and a larger code meaning a
slower oscillator.

This design's own:
- clocking of every block (controller and filter on HSYNC, DSM and
  divider on CKOUT) and the word transfer into the DSM;
- the LEAD/LAG flip-flops;
- FINE taking over at an integral step of 16, the fractional start step of
  256, the tracking gains (KI = 1 LSB per period, correction = TDC/4), the
  reset code 512.0, and holding when there is no direction;
- feeding every new code to the filter, doing a filter update in one
  clock, and the tie rules;
- the TDC cell delay (30 ps), 63 cells, and T2B by counting ones;
- the DCO's linear period law and all its numbers, P0 acting on the ring,
  the output swing and the amplifier's hysteresis;
- the divider's duty cycle and load point;
- the 7-bit TDC bus as {LAG, 6-bit code}.

Not provided: detection of loss of lock (nothing leaves TRACK except
reset), and any choice of the DCO range from N.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. For example, the whole loop:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dpll_pkg.sv tb/tb_dpll_top.sv \
          --top-module tb_dpll_top -Mdir obj_top -o sim
./obj_top/sim
```

Use the same pattern for `tb_pfd`, `tb_therm2bin`, `tb_sub_tdc`,
`tb_tdc_code_sel`, `tb_tdc`, `tb_pll_ctrl`, `tb_dlf`, `tb_dsm`, `tb_dco`,
`tb_dco_bias`, `tb_ring_osc`, `tb_diff2se` and `tb_freq_div`, and for `tb_dpll_modes`, which runs all five display modes
with a jittered reference.

The checkers inside the RTL need `--assert`. `pll_ctrl` checks that the
search step is a power of two, that the DSM is on exactly in FRAC and
TRACK, and that FRAC and TRACK are entered only from the state before.
`dlf` checks that each average lies between the two dropped extremes.
`freq_div` checks that its counter stays below N. Each finishes in seconds.

`tb_dpll_top` runs the top at its default parameters through reset and
lock at XGA @ 75 Hz. It then waits 60 reference periods and measures over
the next 40. It checks frequency and phase, and
counts how often each mechanism happened: LEAD and LAG decisions, polarity
changes with step halving, baseline restores, each of the four states, DSM
dithering, filter outputs and TDC corrections. A mechanism that never
happened counts as a failure.

## Parameters worth changing

| Module | Parameter | Default | Effect |
|---|---|---|---|
| `pll_ctrl` | `COARSE_STEP0` | 256 | first integral search step |
| `pll_ctrl` | `FINE_STEP0` | 16 | step at which COARSE becomes FINE |
| `pll_ctrl` | `FRAC_STEP0` | 256 | first fractional step, LSBs |
| `pll_ctrl` | `KP`, `KP_SHIFT` | 1, 2 | tracking correction = tdc × KP >> KP_SHIFT |
| `pll_ctrl` | `KI` | 1 | baseline change per period in TRACK |
| `pll_ctrl` | `INIT_INT` | 512 | integral code after reset |
| `dlf` | `DEPTH` | 8 | stored codes |
| `sub_tdc`, `tdc`, `dpll_top` | `CELL_PS` / `TDC_CELL_PS` | 30.0 | TDC resolution, ps |
| `dco` | `T0_MIN_PS` ... `T1_STEP_PS` | see above | oscillator ranges |

The tracking gain in units of phase depends on N and on the DCO step: one
fractional LSB changes the hsout period by `T_STEP × N / 512`. Keep
`KP / 2^KP_SHIFT × T_STEP × N / 512` well below the TDC cell delay.

Be careful with the search steps. The PFD reports phase, so a search step
turns only after the accumulated phase error unwinds. A step that is too
small unwinds a large phase error very slowly. With `FRAC_STEP0` = 64, or
with `FINE_STEP0` = 32 and `FRAC_STEP0` = 128, several of the display modes
above did not lock within 800 reference periods. The defaults lock every
tested mode.
