# Unit-power-factor three-phase rectifier controller with a once-per-period digital PLL

A three-phase PWM rectifier draws sinusoidal current in phase with the grid
voltage only if the controller knows the grid phase at every instant. This RTL
is the complete digital controller of such a rectifier. A three-phase digital
phase-locked loop (TDPLL) finds the grid phase. The voltages and currents are
moved into a frame that rotates with that phase, where they become DC
quantities. A double-loop controller with feed-forward decoupling regulates
the DC-link voltage and the currents. A space-vector PWM drives the six IGBTs
of the bridge.

The PLL is unusual. It does not close its loop on every sample. It measures
its phase error once per grid period, at the upward zero crossing of its own
sine output. Between those instants the loop runs open at the frequency set
at the last measurement. This design follows the structure and constants of
the published TDPLL: "A Novel Unit Power Factor Rectifier Based on
Three-phase Digital PLL". That design is a block diagram for an FPGA DSP
toolbox. The rest of the controller is given there only as named blocks.
Everything in it that is this design's own choice is listed below under
"Own choices and departures".

## How the PLL measures phase

The three phase voltages are first reduced to two orthogonal components by a
Clarke transform (`clarke`). Each sample is scaled by 400, and then

    U_alpha = 0.667 (a - b/2 - c/2)
    U_beta  = 0.667 * 0.8662 (c - b)

With the phase-a voltage `Um sin(phi)`, this gives `U_alpha = Um sin(phi)` and
`U_beta = Um cos(phi)`. Note the sign of beta: c - b, not the textbook
b - c. The whole design keeps this convention.

The phase detector (`phase_detector`) computes the d component of the voltage
in the frame of the PLL's own angle theta:

    ud = U_alpha cos(theta) - U_beta sin(theta) = Um sin(phi - theta)

This is about `Um (phi - theta)` near lock, so it is a phase error in volts.
All four inputs pass through sampling registers enabled by the sampling
pulse. The two products come from 4-stage pipelined multipliers. `ud` is
therefore a staircase: it takes a new value 5 samples after each pulse and
holds it for a whole grid period.

The sampling synchronizer (`sampling_sync`) makes that pulse:
- A registered comparator tests `sin(theta) >= 0`.
- A one-sample delay follows it.
- xor of the two flags marks a crossing.
- and with the undelayed flag keeps only the negative-to-positive crossing.

The result is one pulse per period, one sample wide. It enables the four
sampling registers and the loop-filter integrator. At the instant of the
pulse, `sin(theta)` is close to 0 and `cos(theta)` close to 1. In lock the
error read there is the grid voltage at the PLL's zero crossing.

## Loop filter, offset frequency and the DDS word

The loop filter (`loop_filter`) is a PI regulator written as three gains and
an accumulator:

    f = 0.1 * (0.2 * ud + acc) + 32.768          acc += 0.05 * ud   (on each pulse)

The oscillator (`dds`) is a direct digital synthesizer with a 32-bit phase
accumulator clocked at `f_clk = 100 kHz`. Its output frequency is
`f_clk * M` with M a 32-bit fraction. 50 Hz needs `M = 5e-4`. That number is
too small to add to a filter output directly, so the original design works
with M shifted left by 16 bits, i.e. 32.768. The filter adds its correction
to that, and the result is shifted right by 16 bits into the DDS. The
possible shifts and their offsets:

| left shift | 11 | 12 | 13 | 14 | 15 | 16 | 17 |
|---|---|---|---|---|---|---|---|
| offset | 1.024 | 2.048 | 4.096 | 8.192 | 16.384 | 32.768 | 65.536 |

Here every internal quantity is Q16.16: 32-bit signed with 16 fraction bits
(`fx_pkg`). In that format the right shift by 16 and the reinterpretation
as a 32-bit fraction cancel. The raw bits of `f` are the phase increment
itself. The offset 32.768 is the word 2147484, and 100 kHz × 2147484 / 2^32
is 50.00001 Hz. One unit of `f` is 1.526 Hz. The other shifts of the table
are available as the `SHIFT` parameter of `dds` and `tdpll`. The increment is
then the raw word scaled by 2^(16 − SHIFT), and `F_OFFSET` must be set to
match. The loop gain in hertz per volt changes with the shift.

The DDS takes the top 12 bits of its phase as the table address. The table
is a quarter wave of 1024 entries, computed at elaboration from
`T[i] = round(65536 sin(pi/2 (i + 1/2) / 1024))`. The sine and the cosine
(phase plus a quarter turn) are unfolded from it by symmetry. Half-step
sampling makes the table symmetric and keeps the sine from ever being
exactly zero. The worst-case output error is about 0.08 % of full scale.

### Loop behaviour

With a 311 V grid, a phase error of Δ rad gives `ud ≈ 311 Δ` V. The
proportional path then shifts the frequency by about 9.5 Δ Hz for one
period, which is 1.19 Δ rad of correction. The integral path adds
0.3 Δ rad per period, accumulated. The proportional step slightly
overshoots, and the integral then settles the error over roughly ten
periods. The integrator adds on the same pulse that loads the sampling
registers. At that moment the multipliers still hold the previous
measurement, so the integral always runs one period behind the
proportional term. This is how the original diagram is wired, and it is
kept.

Simulated from a 0.3 rad initial offset, `ud` goes 92, -10, -26, -20, -13,
-8.5, -5.6, -3.1 ... V, period by period. It is below 0.3 V after about
0.28 s. Through a sag to 200 V and an unbalance (one phase at 250 V), the
PLL stays locked and returns to a zero error.

## Rectifier control chain

```
 va,vb,vc ──► tdpll ──► sin, cos ──────────────┬──────────────┬─────────────┐
    │                                           ▼              ▼             ▼
    └──────────────────────────────► abc_dq (voltage)   abc_dq (current)  dq_alphabeta ─► svpwm ─► T1..T6
 ia,ib,ic ──────────────────────────────────────────────────────┘            ▲
                                   ud,uq, id,iq, udc ─► dbc ─► ud*, uq* ──────┘
```

`abc_dq` is the same Clarke stage followed by the rotation

    d =  alpha cos - beta sin = Um sin(phi - theta)
    q = -(alpha sin + beta cos) = -Um cos(phi - theta)

In lock, therefore, the grid voltage lies on the negative q axis:
`ud = 0`, `uq = -Um`. Most texts align the voltage with +d. Keep this in
mind when reading `dbc`.

`dbc` is the double closed-loop controller. Its plant model is the rectifier
in this frame, with v the converter voltage:

    L did/dt = ud + wL iq - R id - vd
    L diq/dt = uq - wL id - R iq - vq

The controller cancels the grid voltage and the cross-coupling terms and
adds PI current regulators:

    vd* = ud + wL iq - PI_i(id* - id)
    vq* = uq - wL id - PI_i(iq* - iq)

The reference currents are `id* = 0` and `iq* = -I_ref`, where `I_ref` comes
from a PI regulator on the DC-link voltage error. The minus sign puts the
current on the voltage axis, so the power factor is one. `I_ref` and its
integrator are clamped to ±100 A (`i_limit` shows it). `wL` is
314 rad/s × 6 mH.

`dq_alphabeta` rotates `vd*, vq*` back to alpha/beta with the exact inverse
rotation.

`svpwm` turns the reference into gate signals in the carrier-based form of
space-vector modulation:
- The reference is split into three phase voltages with the same c - b
  convention.
- The common-mode term `-(max + min)/2` is added. This centres the active
  vectors and shares the zero-vector time equally, which gives the same
  switching instants as symmetric SVPWM.
- Each leg is compared with a triangular carrier.

Duties are normalised to 600 V and clipped, so a reference beyond the
linear range saturates. New compare values are loaded at carrier zero. The
`sector` output (1..6) is the ordering of the three phase voltages, i.e.
the 60° sector of the vector. `gate[k-1]` drives T_k:
- T1 / T4: leg A, upper / lower.
- T3 / T6: leg B, upper / lower.
- T5 / T2: leg C, upper / lower.

## Clocks, formats and interfaces

The top module `rectifier_ctrl` has a single clock, assumed 10 MHz
(`F_CLK`). The control path advances on a clock enable `ce`, one clock in
`CE_DIV = 100`. That is the 100 kHz rate the DDS word is set for. Every
sequential module in the control path has this `ce` input. The PWM carrier
counts on every clock: 2 × `PWM_HALF` = 1000 clocks, i.e. 10 kHz.

| port | format |
|---|---|
| `va vb vc` | 16-bit signed, full scale ±1.0 = ±400 V |
| `ia ib ic` | 16-bit signed, ±400 A, positive from grid into bridge |
| `udc` | 16-bit signed, full scale `UDC_FS` = 1000 V |
| `gate[5:0]` | IGBT gates, 1 = on |
| `sin_theta cos_theta pll_err pll_freq pll_integ u_d u_q i_d i_q i_ref` | Q16.16 observation outputs |
| `pll_theta` | PLL phase, 2^32 = one turn |
| `pll_sync`, `ce`, `pwm_start`, `sector`, `i_limit` | strobes and status |

Reset is asynchronous and active-low, and clears every register. Latency
from a sample to a new gate compare is 4 control samples plus up to one
carrier period.

| module | role |
|---|---|
| `fx_pkg` | Q16.16 type, real-to-fixed conversion, fixed multiply |
| `clarke` | abc → alpha/beta with gain 400 and the 0.667 / 0.5 / 0.8662 constants |
| `phase_detector` | 4 sampling registers, two 4-stage multipliers, subtractor |
| `loop_filter` | PI filter (0.2, 0.05, 0.1) plus the 32.768 offset |
| `dds` | 32-bit phase accumulator, quarter-wave sine/cosine table |
| `sampling_sync` | once-per-period pulse at the upward zero crossing |
| `tdpll` | the PLL: the five blocks above |
| `abc_dq` | Clarke + rotation for voltages and currents |
| `dbc` | DC-voltage loop, decoupled dq current loops |
| `dq_alphabeta` | inverse rotation |
| `svpwm` | carrier-based SVPWM, six gates, sector |
| `rectifier_ctrl` | top: clock enable, DC-voltage scaling, the chain above |

## Own choices and departures

These follow the published design:
- the PLL structure;
- the Clarke constants (0.8662 kept, not √3/2);
- the multiplier depth of 4;
- the filter gains and the 32.768 offset;
- the 16-bit shift;
- the 32-bit phase accumulator;
- the comparator, delay, xor and and of the synchronizer, with their
  registers;
- the 100 kHz sample rate;
- the circuit values used to size `wL`;
- the overall chain: PLL, two abc/dq transforms, decoupling controller,
  inverse transform, SVPWM.

The following are this design's own:
- All word formats (Q16.16 inside, 16-bit samples with 400 V / 400 A /
  1000 V full scale). The source gives no widths except the 32-bit
  accumulator.
- One register stage in the Clarke, Park and inverse Park blocks and in the
  DDS output. The comparator, delay, sampling registers and multipliers
  carry the latencies of the original.
- The DDS table size: 12-bit phase, quarter-wave table, 17-bit magnitude.
- Which product in the phase detector takes sin and which cos. It is taken
  from the detector equation rather than from the drawing.
- That the synchronizer keeps the rising crossing. The original only says
  "at the zero crossing, with the same period as the sine".
- All of `dbc` beyond its name and purpose: the gains (current loop
  Kp = 19 V/A, Ki = 1600 V/(A·s), about 500 Hz; voltage loop
  Kp = 0.4 A/V, Ki = 25 A/(V·s)), the 600 V reference and the ±100 A clamp.
  The reference is the level the DC voltage settles to in the published
  results.
- All of `svpwm` beyond its name and inputs: carrier form, 10 kHz carrier,
  fixed 600 V normalisation, no dead time (lower gate = inverted upper
  gate).
- The 10 MHz clock and the clock enable.
- Wrapping, not saturating, of the PLL integrator. Saturation is not
  described.

Add dead time and a measured-`udc` normalisation before driving real
switches.

Not included:
- The grid-side digital voltage and current filters. They are named but not
  specified, and the samples go straight into the transforms.
- The power circuit.
- The data-acquisition board.

## Verification

Each module has a self-checking testbench in `tb/` that compares it with a
real-valued model:

| testbench | what it shows |
|---|---|
| `tb_clarke` | random and balanced samples against the formulas; ce holds the outputs |
| `tb_phase_detector` | the exact latency of 4 samples after the sampling edge; ignores input changes without a pulse |
| `tb_loop_filter` | output and integrator against the model; integrates only on pulses; offset word 2147484 |
| `tb_dds` | 50 wraps in 100 000 samples at the centre word, 55 at +10 %; exact phase steps; sin/cos within 60 LSB |
| `tb_sampling_sync` | one pulse per period at the right sample; none at falling crossings; ce gaps |
| `tb_tdpll` | lock from three initial phases; ideal, sag and unbalance runs of 0.35 s; pulse spacing 2000 ± 20 samples; phase error changes only 5 samples after a pulse; final phase within 0.02 rad |
| `tb_abc_dq`, `tb_dq_alphabeta` | rotations against the formulas, and the round trip |
| `tb_dbc` | all outputs against a stepped real-valued model; reaching the clamp |
| `tb_svpwm` | carrier period, sector in all six, complementary gates, on-time of each leg, clipping |
| `tb_rectifier_ctrl` | the whole controller at its default parameters, closed through a model of the power circuit |

In `tb_rectifier_ctrl` the power circuit is the switching-function model
(L = 6 mH, R = 0.5 Ω, C = 1000 µF, RL = 18 Ω, 311 V / 50 Hz), integrated at
the 100 ns clock step. It runs three scenarios of 0.35 s each from an empty
DC link and a phase offset: an ideal grid; a sag to 200 V from 0.135 s to
0.23 s; and phase b at 250 V over the same interval.

At the end of each run it requires:
- PLL error below 5 V;
- DC voltage 600 ± 15 V;
- power factor above 0.95.

It also counts, and requires at least once per run: PLL sampling pulses,
the current clamp, all six sectors, and the disturbance.

The results measured in all three runs: DC voltage 600.0–600.5 V and power
factor 0.99995 or better. The run takes under 10 s of wall-clock time.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one, for
example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    --top-module tb_tdpll rtl/fx_pkg.sv tb/tb_tdpll.sv
./obj_dir/Vtb_tdpll
```

The RTL is plain synthesizable SystemVerilog. The only elaboration-time
real arithmetic is in the constants and the sine table.
