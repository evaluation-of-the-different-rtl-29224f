# Fixed-point real-time model of a buck converter

This is the digital half of a hardware-in-the-loop (HIL) test bench for power
electronics. It holds a model of an ideal DC-DC buck converter: a MOSFET
switch, a diode, an LC output filter and a resistive load. Each clock it
computes one forward-Euler integration step of the converter's two state
variables, the capacitor voltage `vC` and the coil current `iL`. With a 20 ns
clock the model runs in real time. A controller under test drives the switch
gate `q` and reads back the model's voltages and currents, much as it would on
real hardware.

The arithmetic is signed fixed point. Each internal signal has its own word
length, chosen to be as short as its range and resolution allow. The whole
model stores only the two 25-bit state words, 50 flip-flops in all. Every
other part of a step is combinational.

## The converter and its equations

The circuit values are Vin = 10 V, C = 220 µF, L = 22 µH and R = 2.5 Ω.
The switch runs at 200 kHz with duty 0.5, which gives vo = 5 V and
Iout = 2 A in steady state. The integration step is dt = 20 ns, so one
switching period is 250 steps.

```
vC(k+1) = vC(k) + dt/C * ( iL(k) - vo(k)/R )        vo = vC
iL(k+1) = iL(k) + dt/L * vL(k)

vL = Vin - vC   switch on
     -vC        switch off, iL > 0   (diode conducts)
     0          switch off, iL <= 0  (discontinuous conduction)
```

## Fixed-point formats

A format is written `sfixed(H downto L)`, as in the VHDL-2008 fixed-point
library. Bit `H` is the sign bit, with weight -2^H. Bit `L` is the LSB, with
weight 2^L. The word is H-L+1 bits wide. The short form `Qa.b` stands for
`sfixed(a downto -b)`. A negative `a` means a small number whose upper
fraction bits are known to be sign bits and are not stored.

| signal | role | format | bits |
|---|---|---|---|
| `il` | coil current state | Q6.18 | 25 |
| `vc` | capacitor voltage state | Q5.19 | 25 |
| dt/C | constant, 1525·2^-24 | Q-13.24 | 12 |
| dt/L | constant, 1907·2^-21 | Q-10.21 | 12 |
| 1/R | constant, 1638·2^-12 | Q-1.12 | 12 |
| `inc_i` | iL increment dt/L·vL | Q-4.18 | 15 |
| `inc_v` | vC increment dt/C·Iaux | Q-6.19 | 14 |
| `iaux` | capacitor current iL_FB − IoutAux | Q6.8 | 15 |
| `vaux` | coil voltage vL | Q5.6 | 12 |
| `vin` | input voltage (port) | Q5.6 | 12 |
| `iin` | input current (port) | Q6.5 | 12 |
| `vo` | output voltage (port) | Q5.6 | 12 |
| `iout` | load current vC_FB/R (port) | Q3.8 | 12 |
| `vc_fb` | vC feedback word | Q5.6 | 12 |
| `il_fb` | iL feedback word | Q6.8 | 15 |

The states carry many fraction bits. This is because the increments are tiny:
in steady state a step changes `vC` by a few µV. The rest of the model works
on the short feedback words `vc_fb` and `il_fb`. The formats line up as
follows. A full product of dt/L (top bit 2^-10) and `vaux` (top bit 2^5) has
its top bit at 2^-4, which is the top of `inc_i`. In the same way, dt/C times
`iaux` lands on the top of `inc_v`.

All ports are 12 bits wide, to suit 12-bit digital-to-analog converters. The
converters themselves are not part of this RTL.

## Quantisation modes

Each shortening of a word, whether it drops fraction bits or integer bits,
goes through `sfixed_resize`. Every resize in one model instance uses the
same two parameters:

* `ROUND = FX_ROUND` (default) rounds to the nearest code, with ties going to
  the even code. The decision needs three things: the first dropped bit, the
  OR of the other dropped bits, and the LSB that is kept.
  `FX_TRUNCATE` simply drops the bits. In two's complement that rounds
  towards minus infinity.
* `OVERFLOW = FX_SATURATE` (default) clamps an out-of-range value to the
  largest or most negative code. `FX_WRAP` keeps the low bits, so the sign
  can flip.

Round with saturate is the more accurate pair. Truncate with wrap needs less
logic and has a shorter path.

Products and sums are first formed at full precision, then resized once.
A product of `sfixed(a1 downto b1)` and `sfixed(a2 downto b2)` has format
`sfixed(a1+a2+1 downto b1+b2)`. A sum gets one extra integer bit over the
wider operand, on the finer LSB.

## One integration step

```
          vc (Q5.19) ──resize──> vc_fb (Q5.6) ──┬──────────────> vo
                                                │
                      1/R * vc_fb ──resize──> iout_aux (Q3.8) ─> iout
                                                │
          il (Q6.18) ──resize──> il_fb (Q6.8) ──┼─ minus ─resize─> iaux (Q6.8)
                                 │              │
                                 ├─ q ? ─resize─> iin (Q6.5)
                                 │
  q, vin ──> buck_vl_select (uses vin, vc_fb, sign of il_fb) ──> vaux (Q5.6)

  euler_integrator (iL):  il <= resize(il + resize(dt/L * vaux))
  euler_integrator (vC):  vc <= resize(vc + resize(dt/C * iaux))
```

The state words are reset synchronously to zero, so the converter starts
from rest. The path from the state registers through the two products and
adds back to the registers is one clock long. The clock period is therefore
both the integration step and the timing constraint. For real-time
operation at dt = 20 ns, the whole step must meet 50 MHz.

## Modules

| file | what it is |
|---|---|
| `rtl/fx_pkg.sv` | rounding/overflow enums, `fx_code()` to quantise real constants at elaboration |
| `rtl/sfixed_resize.sv` | format conversion with the two rounding and two overflow modes |
| `rtl/buck_vl_select.sv` | the switch model: picks vL from q, vin, vc_fb and the sign of il_fb |
| `rtl/euler_integrator.sv` | one state variable: constant × input, resize, add, register, feedback resize |
| `rtl/buck_hil_top.sv` | the complete model: two integrators, the switch model, load and output currents |

Top-level ports of `buck_hil_top`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | one period = one integration step |
| `rst` | in | 1 | synchronous, active high; both states go to 0 |
| `q` | in | 1 | switch gate, 1 = on; sampled on each rising edge |
| `vin` | in | 12 | input voltage, Q5.6 (10 V = 640) |
| `vo` | out | 12 | capacitor voltage, Q5.6 |
| `iin` | out | 12 | coil current while `q` = 1, else 0, Q6.5 |
| `iout` | out | 12 | load current, Q3.8 |

The outputs come combinationally from the state registers, so they show a
step's result one clock after the edge that computed it. `iin` is also gated
combinationally by `q`.

## Parameters

`buck_hil_top` has parameters for the circuit (`DT`, `CAP`, `IND`, `RLOAD`,
given as reals), for the two modes, and for every format (`<SIGNAL>_H`,
`<SIGNAL>_L`). The constants dt/C, dt/L and 1/R are computed from the reals
at elaboration, rounded to their formats. The feedback word `vc_fb` must use
the same format as `vin`; elaboration stops with an error otherwise. Wider
formats, such as uniform 32- or 64-bit words, can be set through these
parameters, but you have to choose each integer/fraction split yourself.

## Accuracy and verification

Each testbench checks its block against reference arithmetic in
`tb/fx_ref_pkg.sv`. The reference holds fixed-point values as integer codes
and rounds by integer division, not by bit slicing. `buck_ref_step` is a
code-exact model of one step of the whole design.

| testbench | what it shows |
|---|---|
| `tb_sfixed_resize` | all four mode pairs; exact ties of both parities and signs; range edges; one dropped bit; padding; 20,000 random words |
| `tb_buck_vl_select` | the three switch cases, including iL = 0 and iL < 0; saturation of Vin − vC |
| `tb_euler_integrator` | state, increment and feedback against the reference on every clock; saturation at both ends; reset during operation |
| `tb_buck_hil_top` | the whole model at default parameters, see below |
| `tb_buck_hil_trunc_wrap` | the same run with truncate + wrap |

The two model testbenches compare both states and all three outputs with the
reference on every clock. They run four phases:

1. Nominal operation from rest: 10 ms (500,000 steps) with Vin = 10 V,
   200 kHz and duty 0.5.
2. The switch held off until the coil current reaches zero (discontinuous
   conduction).
3. The switch held on at the largest input voltage, which pushes the states
   past their ranges so that saturation or wrap happens.
4. A reset while running.

Each phase's mechanism is counted and must occur. Phase 1 also runs a
double-precision model of the same equations, and the testbench reports the
mean absolute error and the mean relative error (MAE divided by 2 A or 5 V):

| modes | MAE iL | MAE vC | rel. iL | rel. vC | last period avg |
|---|---|---|---|---|---|
| round, saturate | 5.6 mA | 2.9 mV | 0.28 % | 0.058 % | 2.001 A, 5.001 V |
| truncate, wrap | 10.0 mA | 4.1 mV | 0.50 % | 0.082 % | 2.008 A, 5.001 V |

The default model passes its bound of 0.5 % on both states. With truncation,
the coil current error sits right at 0.50 %, so that testbench uses a 0.6 %
bound for `iL`. The cause is systematic: truncating `vc_fb`, `iout_aux` and
`il_fb` biases each of them downwards, and the loop settles with `iL` about
8 mA high.

## Where this RTL makes its own choices

* **The 1/R constant.** Its format, Q-1.12 (12 bits, 0.39990 S), is chosen
  here. No format was specified for it.
* **Placement of the resizes.** The signal formats above were given, but not
  the exact point where each conversion happens. Here every product, sum and
  difference is formed at full precision and resized once, into the format of
  the named signal it produces. The coil-voltage difference is resized after
  the switch-case selection.
* **Diode test.** The "iL > 0" test uses the feedback word `il_fb`. A negative
  value counts as zero current.
* **`iin`.** It is `il_fb` resized to Q6.5 while the switch is on, and 0
  otherwise.
* **Reset.** The reset is synchronous and sets both states to zero.
* **Constants.** They are rounded to their formats once, half away from zero.
* **The switch signal.** `q` comes from outside, for example from the
  controller under test or from a PWM generator in a testbench. No PWM logic
  is part of the model.

Not provided:

* Floating-point (32- and 64-bit) versions of the model, which are the
  slower and larger alternative to this fixed-point design.
* Ready-made uniform 32/64-bit fixed-point configurations.
* The digital-to-analog converters.

Timing at 50 MHz has not been checked on any FPGA. After generic synthesis,
the register count matches the intended 50 flip-flops.

## Simulating

Any testbench builds with plain Verilator 5 from the project root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/fx_pkg.sv tb/fx_ref_pkg.sv tb/tb_buck_hil_top.sv \
    --top-module tb_buck_hil_top -Mdir obj_top -o sim
./obj_top/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Both
full-model runs take about a second. To try other modes or formats, override
the parameters of `buck_hil_top`, as `tb_buck_hil_trunc_wrap` does.
`fx_ref_pkg::buck_ref_step` models only the default formats, so it must be
changed to match any new formats.
