# One-step direct PWM for a 3x3 matrix converter (improved DAV-PWM)

A conventional matrix converter links each of its three outputs to one of the
three supply phases through a 3x3 array of bidirectional switches. Over every
modulation period, output *j* is connected to input *k* for a fraction
`d_kj` of the time. The three fractions of an output add up to one. The
modulator has to find these nine duty cycles so that:

* the averaged output voltages follow sinusoidal references, up to the
  largest transfer ratio the converter allows (q = √3/2 ≈ 0.866 of the input
  amplitude);
* the input currents are displaced from the input voltages by a chosen angle
  φ_i.

Space-vector modulation does this with angles, trigonometry and sequence
tables. This design uses no angles and no trigonometry. Every duty cycle is a
ratio of two 2x2 determinants. The whole computation is one layer of adders,
multipliers and comparators with no loop or state, so all duties appear in
**one register update** (the top gives the logic 100 ns to settle). The RTL
also contains what the duty computation needs around it in an FPGA: input
filtering into quadrature pairs, reference generation, turning duties into
on-times, and the switching sequence of each converter cell.

## The geometric idea

Treat the three input phase voltages at one instant as three points in a
plane. Each point is an *analytic pair* (x, y) = V·(cos θ_k, sin θ_k): the
measured voltage and its 90°-shifted companion. The three points form a
triangle. Any point P inside it can be written as
`P = d_1·V1 + d_2·V2 + d_3·V3` with `d_1 + d_2 + d_3 = 1`. The weights are
the barycentric coordinates of P. They are exactly the duty cycles that make
the averaged output equal to P. Each weight is the area of the sub-triangle
opposite its vertex, divided by the area of the whole triangle:

```
d_1 = |det[V2 - P ; V3 - P]| / |det[V2 - V1 ; V3 - V1]|    (and cyclically)
```

So every output phase needs one reference point P_j inside the triangle.
The design picks those points as follows.

1. **Rotation for the displacement angle.** Before anything else, all three
   input vectors are rotated by φ_i: `x' = x·cosφ − y·sinφ`,
   `y' = x·sinφ + y·cosφ` (`in_rotation`). The references are then placed
   in this rotated plane. The input current ends up displaced by φ_i. The
   usable transfer ratio drops to 0.866·cos φ_i.
2. **All references on one horizontal line.** The output references are plain
   cosines `vo_j = q·cos(θ_o − j·120°)` with no common-mode term. They are
   used only as x coordinates. All three points share the same y, `v_sy`.
3. **Shift vector.** One of the rotated input vectors always lies between the
   other two in y: the *intermediate vertex*. The horizontal line through it
   is the longest chord that has room for the full spread of the references.
   The shift vector `(v_sx, v_sy)` moves the references onto that line. It
   places either the largest or the smallest reference exactly on the
   vertex: `v_sx = x_mid − max_o` or `x_mid − min_o`. Which of the two
   depends on the input sector. This one choice replaces the search loop of
   earlier formulations, and it is what reaches the maximum transfer ratio.
   The output whose reference sits on the vertex gets a duty of exactly 1
   for that input.
4. **Determinants.** With `P_j = (vo_j + v_sx, v_sy)`, each output phase
   needs three 2x2 determinants, each two products (`duty_column`, one per
   output). All outputs share one more determinant, twice the triangle's
   area (`sum`). Adding an output phase only adds another `duty_column`.

The synthesised output voltage is not P itself. Undoing the rotation gives
`cosφ·(vo_j + v_sx) + sinφ·v_sy`. The last two terms are the same for all
outputs, so the line-to-line output voltages are `cosφ·(vo_i − vo_j)`. This
is what the top-level testbench checks.

## Sectors

Both sectors come from three `>=` comparators and are 3-bit codes 1..6.

| signal | bit 2 | bit 1 | bit 0 |
|---|---|---|---|
| `so` (outputs) | vo1 ≥ vo2 | vo2 ≥ vo3 | vo3 ≥ vo1 |
| `si` (rotated inputs) | y1 ≥ y2 | y2 ≥ y3 | y3 ≥ y1 |

As time advances, `so` steps through 6 2 3 1 5 4 and `si` through
5 4 6 2 3 1. The code alone tells which reference is largest or smallest,
and which input vertex is intermediate. No sorting is needed:

| code | max_o | min_o | shift vertex (si) | v_sx uses |
|---|---|---|---|---|
| 1 | vo3 | vo1 | input 2 | min_o |
| 2 | vo2 | vo3 | input 1 | min_o |
| 3 | vo2 | vo1 | input 3 | max_o |
| 4 | vo1 | vo2 | input 3 | min_o |
| 5 | vo3 | vo2 | input 1 | max_o |
| 6 | vo1 | vo3 | input 2 | max_o |

Code 7 (all values equal, e.g. a zero reference) falls back to vo1 / input 1.

In the sectors that shift with min_o, the output that holds the minimum sits
exactly on the shift vertex, so its column of duties is (`sum`, 0, 0) moved
to that input's row. In the sectors that shift with max_o, the same holds
for the output that holds the maximum. The core testbench checks this.

## More than three outputs

Nothing in the duty computation depends on there being three outputs. Each
output needs its own reference, one `duty_column` (two more multipliers per
determinant pair) and one `venturini_cell`. The rotation, the input sector,
the shift vector and `sum` are shared. The parameter `NOUT` of `davpwm_top`
(default 3) sets the number of outputs. `ref_gen` then spaces the references
by 360°/NOUT, and `time_scaling` runs 3·NOUT divisions. The output sector
code `so` only exists for three outputs: for any other `NOUT` it is 0, and
`out_sector` finds max_o and min_o with a plain compare-and-select chain.

The shift vector moves all references by the same amount, so what must fit
inside the input triangle is the spread between the largest and smallest
reference. For five outputs that spread is 2·cos(18°) ≈ 1.90 times the
amplitude, against √3 ≈ 1.73 for three, so q is limited to about 0.79
instead of 0.866.

## Numbers and widths

* All voltages and cos/sin are Q15 (signed 16-bit, ±1.0 full scale). The
  references are in the same units as the input voltages: `q_amp` is q times
  the input phase amplitude.
* Rotation products are Q30 and return to Q15 with saturation.
* Inside `duty_column`, the differences are 18 and 19 bits wide and the
  determinants 40 bits, so nothing wraps. Each determinant's absolute value
  is reduced to a 16-bit number by taking bits `[MSB:LSB]` (default 33:18).
  Anything above bit MSB saturates to all ones. With inputs of amplitude 1.0,
  `sum` is about 10 600, which is the duty resolution. With amplitude 0.5 it
  is about 2 660.
* `davpwm_core` returns the nine numerators `d[k][j]` and the common
  denominator `sum`. Duty = `d/sum`.
* `time_scaling` turns them into on-times `t = d·PERIOD/sum` in clock cycles
  (13 bits for PERIOD = 5000).

## One modulation period, cycle by cycle

`pwm_period_counter` counts 0 … PERIOD−1 (default 5000: 100 µs at a 50 MHz
clock). `period_start` is high while the count is 0.

| cycle in period | what happens |
|---|---|
| 0 | the two line-to-line inputs are converted to phase voltages (`line_to_phase`, combinational); the DSOGI steps once; `ref_gen` steps once |
| 1 … 5 | `davpwm_core`'s logic settles; at the end of cycle 5 it registers all duties, sectors and the shift vector at once |
| 6 … 276 | `time_scaling` divides nine times with one shared restoring divider (9·(NW+1)+1 cycles, NW = 16 + 13) |
| 0 of the next period | the `venturini_cell`s (one per output) load the on-times and `si`, and play them over that period |

A sample therefore reaches the switches one period later. The SOGI outputs
run one sample ahead of their input (see below), which partly makes up for
this delay. All control inputs (`w_ts`, `sogi_k`, `cos_phi`, `sin_phi`,
`q_amp`, `ref_step`) can change at any time; they are all taken at cycle 0
of a period.

The duty core is one block of combinational logic with two multiplier levels
(the rotation, then the determinants). Its result is registered in a single
step, but not one clock after its inputs change. All its inputs are
registers that change only at cycle 0, and the result is taken at the end of
cycle `CALC_CYCLES` (default 5, i.e. 100 ns at 50 MHz). The path from those
registers to the core's registers may therefore be constrained as a
five-cycle multicycle path. The top testbench checks that the core's outputs
change only at that clock edge.

## Quadrature signals: the SOGI

`sogi_osg` is a second-order generalized integrator with this loop:
`e = v − vx`, `vx = ω∫(k·e − vy)`, `vy = ω∫vx`. For a sinusoid it settles to
`vx = V cos`, `vy = V sin`, which is the analytic pair the geometry needs.
Three of them, one per phase, form `dsogi_osg`.

The discrete form takes one step per modulation period:

* forward Euler for vx, then the new vx for vy;
* `w_ts = ω·T` in Q15, gain k in Q2.13 (√2 = 11585);
* states with 29 fraction bits.

This form leaves vy half a step ahead of vx. The block therefore outputs the
mean of the last two vy states. At 50 Hz sampled at 10 kHz, both outputs
then equal the input angle one sample ahead, within 0.1 %.

A DC offset on an input is rejected by vx but appears in vy multiplied by k.
The SOGI's frequency is the `w_ts` input. There is no frequency-locked loop.
The states are wide enough for any Q15 input at the settled amplitude. The
outputs saturate to Q15, but there is no extra feedback that limits the
states during transients or resonance.

## Switch sequence of a converter cell

Each `venturini_cell` drives one output. Exactly one of its three switches is
on at any time. Within a period it visits the inputs symmetrically: P for
t_P/2, Q for t_Q/2, R for t_R, Q for t_Q/2, then P until the period ends.
The order depends only on `si` (A, B, C = inputs 1, 2, 3):

| si | order |
|---|---|
| 5, 2 | C A B B A C |
| 6, 1 | A B C C B A |
| 3, 4 | B C A A C B |

The cell uses its own position counter, which is cleared on `load`. Its
output `h` is registered, so it lags the position by one clock.

The outputs are *ideal* switch states. A real bidirectional switch needs a
commutation scheme between switch changes: for example a four-step sequence
that depends on the sign of the output current, with dead times. That scheme
is not part of this RTL.

## Files

| file | role |
|---|---|
| `rtl/davpwm_pkg.sv` | Q15 / sector / duty types, saturation and determinant-to-duty helpers |
| `rtl/davpwm_top.sv` | whole modulator; ports bring out duties, on-times, sectors, shift vector and the 3xNOUT switch states |
| `rtl/davpwm_core.sv` | the one-step duty computation; instantiates the four blocks below |
| `rtl/out_sector.sv`, `rtl/in_rotation.sv`, `rtl/in_sector.sv`, `rtl/duty_column.sv` | combinational parts of the core |
| `rtl/line_to_phase.sv` | v12, v23 → v1, v2, v3 (zero-sum assumption) |
| `rtl/sogi_osg.sv`, `rtl/dsogi_osg.sv` | quadrature signal generation |
| `rtl/ref_gen.sv`, `rtl/cos_lut.hex` | output references: 32-bit phase accumulator plus a 1024-entry cosine table, entry i = round(32767·cos(2πi/1024)) |
| `rtl/pwm_period_counter.sv` | modulation-period time base |
| `rtl/time_scaling.sv` | duties → on-times in cycles |
| `rtl/venturini_cell.sv` | switching sequence of one output |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_davpwm_top_5ph.sv` | the whole chain built for five outputs |

`ref_gen` loads its table with `$readmemh("rtl/cos_lut.hex")`, so run the
tools from the repository root.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the end-to-end test at the default size (about 10 s):

```
verilator --binary --timing --assert -Irtl -y rtl rtl/davpwm_pkg.sv \
    tb/tb_davpwm_top.sv --top-module tb_davpwm_top --Mdir obj -o sim
obj/sim
```

Replace `davpwm_top` by any other module name to run its testbench. Lint a
module with `verilator --lint-only -Wall -Irtl -y rtl rtl/davpwm_pkg.sv
rtl/<module>.sv`.

## What has been verified

* **Core blocks.** Each is compared with real-number models over thousands
  of random cases:
  * rotation within 2 LSB;
  * each determinant within 1 LSB;
  * the three numerators of a column add up to `sum` within 3 LSB;
  * shifted references always fall inside the input triangle for q ≤ 0.86;
  * sector sequences match the tables above.
* **`davpwm_core`.** For random angles, q ≤ 0.86·cosφ and |φ| ≤ 45°, the
  averaged line-to-line outputs equal cosφ times the requested ones within
  0.4 % of the input amplitude. The outputs update in the clock edge where
  `en` is high. In every sector the column of the output holding max_o or
  min_o is checked to be (`sum`, 0, 0) in the shift vertex's row.
* **Other blocks.** The divider, the counter and the switching cells are
  checked exactly, including cycle counts.
* **Full design (`tb_davpwm_top`).** This runs the default parameters,
  PERIOD = 5000, with references at half the supply frequency, at four
  operating points:
  * q = 0.86, φ = 0;
  * q = 0.75, φ = −30°;
  * q = 0.6, φ = −45°;
  * supply amplitudes 75 : 100 : 125 with q = 0.55.

  The averaged line-to-line output voltages, measured from the switch
  waveforms, match cosφ·(vo_i − vo_j) within 1.5 % of full scale. The
  largest error seen is about 1.1 %, mostly from the 1024-entry reference
  table. For φ ≠ 0 the input current shows the expected sign of displacement.
  Every input sector, every output sector and all three switching orders
  occur.
* **Five outputs (`tb_davpwm_top_5ph`).** The same chain with `NOUT = 5`,
  at q = 0.75 with φ = 0, and at q = 0.6 with φ = −30°. The voltages between
  neighbouring outputs match within 1.5 % of full scale; the largest error
  seen is about 0.7 %.

Each testbench has also been run against a deliberately broken copy of its
module (a swapped table entry, a flipped sign, a wrong vertex, a missing
clamp), and each one failed.

## Departures and limits

* **Time scaling.** It uses one integer restoring divider for the nine
  quotients, not a floating-point unit. It needs 9·(NW+1)+1 cycles, so the full
  chain needs a modulation period of more than about 280 clock cycles. At a
  1 MHz switching rate with a 50 MHz clock (50 cycles per period), the duty
  core alone keeps up, but the scaler does not. Nine dividers in parallel, or
  a faster clock, would be needed.
* **Switch timing.** On-times are rounded down, and so are their halves. The
  cycles lost go to the last segment of the period.
* **Multipliers.** The duty core uses 32 signed multipliers (12 for the
  rotation, 6 per output, 2 for the denominator), at most 19x17 bits.
* **Not included:**
  * frequency tracking for the SOGI (frequency-locked loop);
  * four-step commutation and dead time;
  * protection;
  * the measurement interface (ADC).

  `w_ts`, `cos_phi`, `sin_phi`, `q_amp` and `ref_step` are plain inputs, to
  be driven by whatever control layer sits above.
* **Reset.** All registers have a synchronous active-low reset. Until the
  first period after reset, every output is connected to input 1.
