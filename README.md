# Real-time full-bridge converter model for hardware-in-the-loop testing

A hardware-in-the-loop (HIL) rig replaces a power converter with a digital
model of it. The converter's real controller drives the model's switch inputs
and reads back the computed currents and voltages. For a converter switching
at tens of kilohertz, the model has to advance its state in steps of
nanoseconds, and each step has to take no longer than it models. This RTL
builds such a model for an H-bridge (full-bridge) converter feeding an LC
filter and a resistive load. It makes **one integration step per clock
cycle**.

The same plant is built in two number systems, and they run side by side:

* **IEEE 754 single precision (float32).** This is the datapath that FPGAs
  with hardened floating-point DSP blocks provide in silicon: two
  subtractors and two multiply-adds, one hardened block each. Design effort
  is low, because no signal width has to be chosen.
* **Signed fixed point.** Widths are chosen per application, which takes more
  effort. In exchange, the resolution can be made as fine as the step size
  requires.

The main point of the design is the trade-off between the two. When dt
shrinks, the model gets more accurate, but only while the number format can
still represent the tiny per-step increments next to state values of
hundreds of volts. Float32 runs out of resolution first: below about 12.5 ns
its error starts to grow again. Fixed point keeps improving. The included
step-size sweep testbench reproduces this (see "Accuracy against step size").

## The plant

The bridge has four switches, S1 to S4, each with an antiparallel diode (D1
to D4). S1 and S3 form the left leg and S2 and S4 the right leg. The
inductor L and the capacitor C, with the load R across C, sit between the
legs. The state variables are the inductor current iL and the capacitor
(output) voltage vout.

**Branch selection.** The model has no diode inputs. It works out which
branch carries the current on each side from the switch commands and the
direction of iL (`branch_select`):

| variable | is 1 when |
|---|---|
| d (left)  | S1 is ON, or S1 and S3 are both OFF and iL < 0 (D1 conducts) |
| q (right) | S2 is ON, or S2 and S4 are both OFF and iL > 0 (D2 conducts) |

**Inductor voltage.** The code dq = {d, q} sets the voltage across the
inductor:

| dq | vL |
|---|---|
| 10 | vg - vout |
| 01 | -vg - vout |
| 00, 11 | -vout |

**Step equations.** With a fixed step dt, the model uses forward Euler, and
both updates read the previous states:

    iL(k)   = iL(k-1)   + (dt/L) * (vsel - vout(k-1))        vsel = vg, -vg or 0
    vout(k) = vout(k-1) + (dt/C) * (iL(k-1) - iR)

dt/L and dt/C are constants fixed at elaboration. The model leaves out
losses: switch, diode and inductor resistances are not part of the plant.

## Datapath

    sw ──► branch_select ──dq──► vsrc_mux(vg) ──vsel──► [ - ]──vL──► [dt/L * vL + iL] ──► iL register ─┬─► il
                ▲                                         ▲                                             │
                └────────── sign of iL ───────────────────┼─────────────────────────────────────────────┤
                                                          │                                             │
                                        vout register ◄── [dt/C * iC + vout] ◄──iC── [ - ] ◄── iR       │
                                              │                                     ▲                  │
                                              └──────────────► vout                 └──────── iL ──────┘

There are four arithmetic functions: `fp32_addsub` twice, and
`fp32_mult_add` twice, each built from `fp32_mul` followed by `fp32_addsub`.
Each state feeds the other equation in the same step. This loop is why
pipelining does not help: a new step cannot start before the previous one
has finished.

**Pipelined variant** (`fb_model_fp32 #(.PIPELINED(1))`). The subtractor
outputs are registered, and the state registers are enabled only every
second clock. The clock can run faster, but one integration step now takes
two clocks, so the model runs at half the clock rate. The top level carries it as a third plant. It has a
step of 2 × DT_NS, so that it stays in real time on the shared clock.

## Number formats: the hard part

A state variable holds a large value, such as 100 V. Each step adds a tiny
increment to it: at dt = 12.5 ns, dt/C times 1 A is 125 µV. A format can
hold both only if its significand spans the ratio between them, plus some
guard bits to carry the accumulated rounding. A common sizing rule is

    w = ceil(log2(x / dx)) + n,     n about 8 or more

where x is the largest value, dx the smallest increment that must still be
represented, and n the guard bits.

* **Float32** has a 24-bit significand, whatever the signal. With vout near
  170 V, the unit in the last place (ulp) is 2^-16 V, about 15 µV. At dt
  = 2.5 ns, a 1 A capacitor current changes vout by 25 µV per step, less
  than two ulps. Each addition then loses a large fraction of the increment.
  Making the step smaller makes the result worse.
* **Fixed point** in this design uses one format, Q10.30, for vg, iR, iL and
  vout: 40 bits, 10 of them integer bits with the sign, so a range of
  ±512 V or A. At dt = 2.5 ns the rule asks for about 32 bits over a 256 V
  range, so 40 bits leave headroom. The step constants dt/L and dt/C are
  48-bit words with 48 fraction bits. This holds steps up to 12.5 µs, and
  elaboration stops with an error if a constant does not fit. Each product
  is rounded to the nearest LSB. Each state saturates at the format limits
  and sets a sticky `ovf` flag.

A design tuned per application would choose a different width for each
signal and each dt. This design trades a few extra bits for one format that
covers every step from 2.5 ns to 12.5 µs.

**Float32 arithmetic details (this design's own choices):**

* results are rounded to nearest, ties to even;
* subnormal inputs are read as zero, and results below the smallest normal
  are flushed to a signed zero;
* an exact cancellation gives +0;
* a NaN input, inf - inf or inf * 0 gives the quiet NaN 0x7FC00000;
* the multiply-add rounds the product before the addition (two roundings,
  not fused).

The float32 modules are combinational. Their latency is whatever the
target's hardened blocks or soft logic need to meet the clock.

## Accuracy against step size

`tb_fb_dt_sweep` runs one experiment: start from 0 V, vg = 200 V, duty 75 %,
12 Ω load, 20 ms. It runs it at ten step sizes and compares each run with a
double-precision model stepping at 1.25 ns. The table gives the mean
absolute errors from simulating this RTL:

| dt (ns) | iL float32 (A) | iL fixed (A) | vout float32 (V) | vout fixed (V) |
|---:|---:|---:|---:|---:|
| 2.5   | 4.7e-3 | 4.3e-5 | 1.3e-2 | 1.3e-4 |
| 5     | 1.1e-3 | 1.3e-4 | 3.5e-3 | 3.9e-4 |
| 12.5  | 6.9e-4 | 3.9e-4 | 2.0e-3 | 1.2e-3 |
| 50    | 1.7e-3 | 1.7e-3 | 5.0e-3 | 5.0e-3 |
| 125   | 4.2e-3 | 4.3e-3 | 1.3e-2 | 1.3e-2 |
| 500   | 1.7e-2 | 1.7e-2 | 5.2e-2 | 5.2e-2 |
| 1250  | 4.4e-2 | 4.4e-2 | 0.13   | 0.13   |
| 2500  | 8.9e-2 | 8.9e-2 | 0.27   | 0.27   |
| 6250  | 0.23   | 0.23   | 0.70   | 0.70   |
| 12500 | 0.51   | 0.51   | 1.5    | 1.5    |

From 50 ns up, both formats are limited by the Euler step alone, and the
error is proportional to dt. Below that, float32 departs from the fixed-point
error, and at 2.5 ns its error is worse than at 12.5 ns. On the reference
FPGA, hardened float32 blocks and fixed point both reach a clock period near
12.5 ns, and float32 in soft logic about 53 ns. So float32 reaches its
resolution limit at about the same step where the technology reaches its
clock limit.

Each copy in the sweep also carries the pipelined float32 plant, with twice
the step. Its results:

* Run with a 2.5 ns clock, its error is the same as the single-cycle plant's
  at 5 ns, to every printed digit.
* Where the 75 % switch-off edge falls on its step grid, its error is about
  twice the single-cycle error at the same clock.
* Where the edge falls between two of its samples, it applies the edge one
  clock late. This happens at dt = 500, 2500 and 12500 ns, where 75 % of the
  period is an odd number of clocks. The duty it sees is then wrong, and its
  error is about 20 times larger.

So with this plant the PWM resolution is two clocks, not one.

In this experiment the output first overshoots to 167.6 V and then settles
at (2·0.75 − 1)·200 V = 100 V with iL = 8.33 A.

## Switch commands and load

* `dpwm` generates a bipolar PWM. S1 and S4 are ON for `duty` clocks of each
  `TSW_CYC`-clock period, and S2 and S3 are ON for the rest. It has no dead
  time. A new duty value takes effect at the next period start. The
  average output is (2D − 1)·vg.
* The model reads the switch commands as they are, so any modulation works.
  The top can bypass the DPWM (`sw_ext_en`, `sw_ext`) to apply dead time,
  freewheeling or all-switches-open intervals.
* `rload_fp32` and `rload_fixed` close each plant with iR = vout / R. They
  read the registered vout, so iR is the load current at the start of the
  step, as the explicit Euler step requires. The top can replace iR from
  outside for the two single-cycle plants (`ir_ext_en`, `ir_ext_fp`,
  `ir_ext_fx`), for example to apply load steps.

## Modules

| file | what it is |
|---|---|
| `rtl/fb_pkg.sv` | switch struct `sw_t`, branch enum `dq_t`, `fp32_t`, fixed-point defaults, elaboration-time real→float32 and real→fixed helpers |
| `rtl/fb_hil_top.sv` | top: DPWM; single-cycle float32, fixed-point and pipelined float32 plants with their loads; switch and load-current selection |
| `rtl/fb_model_fp32.sv` | float32 plant, optional two-clock pipelined form |
| `rtl/fb_model_fixed.sv` | fixed-point plant (formats set by `IW`, `FW`, `KF`, `KW`) |
| `rtl/branch_select.sv` | d/q from the switch commands and the sign of iL |
| `rtl/vsrc_mux.sv` | vg / −vg / 0 selector (float32; the fixed plant has its own) |
| `rtl/fp32_addsub.sv`, `rtl/fp32_mul.sv`, `rtl/fp32_mult_add.sv` | single-precision add/subtract, multiply, multiply-add |
| `rtl/dpwm.sv` | bipolar PWM generator |
| `rtl/rload_fp32.sv`, `rtl/rload_fixed.sv` | resistive load |

## Top-level interface and timing

Parameters of `fb_hil_top`:

| parameter | default | meaning |
|---|---|---|
| `DT_NS` | 12.5 | integration step in ns; this is also the intended clock period |
| `L_UH` | 900 | inductance, µH |
| `C_UF` | 100 | capacitance, µF |
| `R_OHM` | 12 | load resistance, Ω |
| `TSW_NS` | 50000 | PWM period, ns |

The DPWM period in clocks is TSW_NS / DT_NS, which is 4000 by default.

All logic is synchronous to `clk`. `rst` is a synchronous, active-high reset
that sets all three plants to the off state (iL = 0, vout = 0) and loads
`duty`. While `en` is high, every rising edge is one step for the DPWM and
for the two single-cycle plants. The pipelined plant steps on every second
enabled edge. While `en` is low, everything holds its state.

Inputs:

* `duty` (12 bits at the defaults)
* `sw_ext_en`, `sw_ext` (`sw_t`)
* `vg_fp` (float32)
* `vg_fx` (Q10.30)
* `ir_ext_en`, `ir_ext_fp`, `ir_ext_fx`

Outputs:

* `sw`: the switch commands actually applied to the plants
* `pwm_period_start`
* for each plant: iL, vout, iR and dq (`*_fp` for float32, `*_fx` for fixed
  point)
* `ovf_fx`
* for the pipelined plant: `il_fpp`, `vout_fpp`, `dq_fpp`, and `step_fpp`,
  which is high on the clocks whose edge updates it

The state outputs come straight from registers and show the state after the
last step. `sw`, `dq` and the iR outputs are combinational and belong to the
step in progress.

## Verification

Every testbench checks its own results. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* `tb_fp32_addsub`, `tb_fp32_mul`, `tb_fp32_mult_add` check the float32
  units bit-exactly against reals rounded to single precision. They use
  random operands, cancellations, ties and special values.
* `tb_branch_select` checks all switch combinations for each sign of iL.
  `tb_vsrc_mux` checks the source selector.
* `tb_dpwm` checks, with a short period:
  * the switch pattern
  * the high time
  * the period length
  * that a new duty waits for the next period
  * that `en` holds the outputs
* `tb_fb_model_fp32` checks both the single-cycle and the pipelined plant
  bit-exactly against a float32 reference over 40,000 random legal switch
  states, diode cases included. It also checks the one-step-per-clock and
  one-step-per-two-clocks rates.
* `tb_fb_model_fixed` checks the fixed-point plant bit-exactly against an
  integer reference, and against a real-valued model. It also forces
  saturation in a narrow format.
* `tb_fb_hil_top` runs the top at its default parameters through four
  phases:
  * a 20 ms start-up
  * a 10 ms load step to 6 Ω
  * a 10 ms step of vg to 150 V and of the duty to 70 %
  * external switching (dq = 00, 11, both diode cases), then a hold

  It checks the steady states, the error against a 1.25 ns real-valued
  reference, and that both single-cycle plants agree. It also checks that
  the pipelined plant makes exactly one step every second clock, and its
  error against the reference. It also counts each mechanism, and
  a mechanism that never occurs is a failure. The test takes about 15 s.
* `tb_fb_dt_sweep` runs the step-size sweep above, about 45 s.

To run a testbench with Verilator 5:

    verilator --binary --timing --timescale 1ns/1ps -Wno-fatal \
        -Irtl -y rtl -y tb +libext+.sv --top-module tb_fb_hil_top \
        rtl/fb_pkg.sv tb/tb_fp_ref_pkg.sv tb/tb_fb_hil_top.sv
    ./obj_dir/Vtb_fb_hil_top

To run another testbench, replace both `tb_fb_hil_top` names with its name.
The block testbenches that set `DT_NS`, or the format widths, through
`#(...)` show how to instantiate the blocks with other values.

## Where this design departs from, or goes beyond, the reference design

* **Hardened blocks.** On the reference FPGA, the float32 units are the
  vendor's hardened DSP blocks, instantiated through vendor IP. Here they
  are portable, combinational RTL that does the same IEEE 754 arithmetic.
  Subnormal handling, the NaN encoding and the rounding inside the
  multiply-add are assumptions (see "Number formats"). Device figures
  (ALMs, DSP counts, Fmax) cannot be derived from this code.
* **Fixed-point widths.** The reference design sizes each fixed-point
  signal separately and changes the widths with dt. This design uses one
  40-bit format for all of them.
* **Pipelined variant.** The reference design reports a higher error for
  its pipelined float32 model. Here each step of the pipelined plant does
  exactly the arithmetic of the single-cycle plant, because it samples the
  inputs and both differences in the same clock. Its extra error comes only
  from the longer step it needs to stay in real time. In the start-up test,
  its mean iL error is 9.4e-4 A with a 25 ns step, against 6.9e-4 A for the
  single-cycle plant at 12.5 ns. At large steps, where the Euler step alone
  sets the error, the reference design's pipelined error is about three
  times that of its other models, which is more than a doubled step
  explains. That extra factor is not reproduced here.
* **The PWM pattern is inferred.** A bipolar pattern is the one that gives
  the stated 100 V from 200 V at 75 % duty. Dead time and the duty update
  timing are this design's choices.
* **Added to the reference design:**
  * the resistive-load blocks
  * the DPWM bypass
  * the external load-current inputs
  * the `en` input
  * the saturation and overflow flag
  * the reset values

  The reference model takes iR as an input and is driven by a DPWM. The rest
  is added for testing and safe use.
* **The model itself.** It is the lossless Euler model. Diodes are handled
  only through the branch rule. When all switches are open near iL = 0, the
  current therefore dithers around zero instead of stopping, because no
  diode blocks reverse current in the model.
