# Floating-point PI current controller for an IPMSM drive

This is the inner current loop of a field-oriented speed drive for an interior
permanent-magnet synchronous motor (IPMSM), written as synthesizable
SystemVerilog. Once per sampling period it takes the commanded and measured
d- and q-axis currents and computes the voltage commands `vd_proposed` and
`vq_proposed`. A space-vector PWM stage (not part of this RTL) turns those
commands into switching signals. Each axis is a discrete PI controller with
anti-windup. All of its arithmetic is IEEE-754 single precision, done by
pipelined floating-point units.

Two problems shape the design:

* **The pipelined units have different latencies.** An adder takes 7 cycles
  and a multiplier 5. Two values that should meet at an adder must therefore
  have passed through the same number of cycles. The proportional path is
  padded with arithmetic that does nothing (subtract 0, add 0) so that it has
  exactly the latency of the integral path.
* **A free-running pipeline would recompute many times per period.** At
  50 MHz a 100 µs sampling period is 5000 cycles. A sample-and-hold
  sequencer starts the datapath exactly once per period. It captures the
  inputs at the start of the computation and holds the outputs until the
  next result.

```
            +-------------+   err_d   +--------------+   +---------------------+
 id_*  ---->|             |---------->| int -> float |-->| pi_axis (d gains)   |--+
            | sample_sync |   err_q   +--------------+   +---------------------+  |
 iq_*  ---->| tick/start  |---------->| int -> float |-->| pi_axis (q gains)   |--+
            | hold v_out  |<--------------------------------------------------------+
            +-------------+--> vd_proposed, vq_proposed, v_update
```

## Control law and gains

The gains come from a root-locus design for each axis. Each axis is modelled
as a first-order plant `G(z) = k1/(z - k2)` plus one sample of computation
delay, where `k2 = exp(-Rs*Ts/L)` and `k1 = (1 - k2)/Rs`. The PI zero
`kp/(kp+ki)` is placed on the plant pole `k2` to cancel it. The loop gain
`K = (kp+ki)*k1 = 0.263` then puts the closed-loop poles at 0.5 ± 0.115j.
This gives a damping ratio of 0.947 and a closed-loop response of
`0.263/(z^2 - z + 0.263)`, which settles in about 0.8 ms (8 samples).

Motor data: Rs = 3.59 Ω, Lq = 0.051 H, Ld = 0.036 H. Sampling period:
Ts = 100 µs.

| axis | k2     | k1       | kp     | ki (= Ki·Ts) | origin |
|------|--------|----------|--------|--------------|--------|
| q    | 0.993  | 0.00195  | 133.9  | 0.97         | published design values |
| d    | 0.9901 | 0.002764 | 94.21  | 0.944        | same procedure applied to Ld (this design's own derivation) |

## One PI axis (`pi_axis`)

Per sample u(n) (the current error in amperes, binary32):

```
integral path:      ai = u - bc          mi = ai * KI_TS      y = y_prev + mi   (y_prev <= y)
proportional path:  ap = u - 0           mp = ap * KP         p = mp + 0
                    s  = y + p
                    v  = clamp(s, UMIN, UMAX)        flags: above / below / in range
anti-windup:        e  = s - v           bc = e * INV_KB      (held for the next sample)
```

So `y(n) = y(n-1) + Ki·Ts·(u(n) - e(n-1)/ki)`. This is back-calculation
anti-windup. While the output is clamped, the excess `e` is fed back into
the integrator input through the gain 1/ki, which pulls the integrator back.
With the default constants the integrator step becomes `0.97·u(n) - e(n-1)`.
That removes the whole previous excess in one sample. The term is delayed
by one sample because `e(n)` only exists after `v(n)` has been computed.

Pipeline timing with the default latencies (add 7, multiply 5, compare 1,
clamp mux 1):

| cycle after `u_valid` | event |
|---|---|
| 7  | both subtractions done (`u - bc`, `u - 0`) |
| 12 | both gain products done |
| 19 | integrator sum `y(n)` and padded `p(n)` arrive together |
| 26 | `s(n)` |
| 28 | `v(n)` and the saturation flags (`v_valid`) |
| 40 | anti-windup term stored |
| 41 | `ready` again |

**Balancing by hold instead of by padding.** Setting
`BALANCE_BY_HOLD = 1` replaces the zero-operand subtractor and adder with a
register. The proportional product `KP·u` (ready after 5 cycles) is caught
in that register and waits there until `y(n)` arrives at cycle 19. This
saves two adders, and outputs and timing are identical. The published
design mentions this arrangement as the better alternative but draws only
the padded one, so padding is the default.

Assertions check three rules: the two paths stay in step, the integrator
never has two sums in flight, and no sample is presented while `ready` is
low.

**Behaviour after a large step.** While the output is clamped, the
back-calculation drives the integrator to about `UMAX - kp·e` with a
one-sample lag. Because the error is falling, the output leaves the limit
early, and the integrator is left far below its final value. The rest of the
way is covered only through the integral action. The pole cancellation no
longer helps here, so recovery is slow. In the closed-loop test a 10 A step
gets within 2 % of its final value only after several hundred samples, though
with no overshoot. Small steps that stay out of the limits follow the
second-order design exactly. This is how the anti-windup arrangement
behaves, not a fault of the RTL. Anyone tuning the drive should know about
it.

## Sampling, hold and timing (`sample_sync`, top level)

* A counter divides the clock by `SAMPLE_CYCLES` (5000: 100 µs at 50 MHz).
  `sample_tick` pulses in the last cycle of each period.
* On a tick the errors `proposed - measured` are captured (integer
  subtraction, WIDTH+1 bits). One cycle later `start` pulses into both
  int-to-float converters.
* Each axis result is latched into its output register. When both have
  arrived, `v_update` pulses. This happens 36 cycles after the tick
  (0.72 µs), and the outputs hold until the next update.
* The datapath is busy for 48 cycles per sample. If a tick arrives while it
  is still busy, the sample is skipped and the sticky `overrun` output is
  set. This can only happen when `SAMPLE_CYCLES < 48`.
* After reset the outputs stay at +0 for one full sampling period, because
  the first sample is taken at the end of the first period.

## Arithmetic units

All units use IEEE-754 binary32 and round to nearest even. Denormal
operands are read as zero, and results below the smallest normal number
become signed zero. A NaN input gives the quiet NaN `32'h7FC00000`. Each
unit computes its result combinationally and then passes it through a
register chain (`pipe_delay`) of its stated latency. One operation can
start every cycle.

| module | function | latency |
|---|---|---|
| `fp_int2float` | signed integer (or fixed point with `FRAC_BITS`) to binary32 | 6 |
| `fp_addsub` | a ± b: align with sticky, add or subtract, normalise, round | 7 |
| `fp_mult` | a × b: 24×24 significand product, normalise, round | 5 |
| `fp_compare` | a > b, a < b, a = b, unordered (+0 = −0) | 1 |
| `fp_saturate` | two comparisons against the limits, then a clamp mux | 2 |
| `fp_integrator` | y(n) = y(n-1) + x(n) with the z⁻¹ state register | 7 |

The latencies are collected in `fp_pkg`. Changing one there rebalances the
whole datapath, because both paths use the same units.

## Interface of `current_pi_controller`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `id_proposed`, `iq_proposed` | in | WIDTH | commanded currents, signed, LSB = 2^-FRAC_BITS A |
| `id_measured`, `iq_measured` | in | WIDTH | measured currents, same format |
| `vd_proposed`, `vq_proposed` | out | 32 | voltage commands, binary32 volts, held |
| `v_update` | out | 1 | pulse when new voltages are present |
| `sample_tick` | out | 1 | end of each sampling period |
| `sat_high`, `sat_low` | out | 2 | per axis ([0] d, [1] q): last output was clamped high / low |
| `overrun` | out | 1 | sticky: a sample was skipped |

Parameters and their defaults:

* `WIDTH = 32` and `FRAC_BITS = 0`: integer amperes.
* `SAMPLE_CYCLES = 5000`.
* `KP_Q`, `KI_TS_Q`, `INV_KB_Q`, `KP_D`, `KI_TS_D`, `INV_KB_D`: binary32
  bit patterns of the gains in the table above. `INV_KB` is 1/ki.
* `V_MAX = +350.0` and `V_MIN = -350.0`.
* `BALANCE_BY_HOLD = 0`: how each axis aligns its two paths (see above).

Set `FRAC_BITS` to match the current sensor's scaling. The testbench uses 8
(1/256 A).

## How far to trust it, and where it departs from the published design

* **The voltage limit is per axis.** The published block diagram compares
  and clamps each axis separately, and that is what is built here. The
  published simulation outputs all have a vector magnitude of exactly
  √(vd² + vq²) = 350 V, which points to a limit on the voltage vector
  magnitude. No circuit for such a limit is described. This design's
  outputs therefore do not reproduce those published voltage values. The
  350 V limit value is taken from that observation.
* **Choices made where the design is not specified:**
  * the d-axis gains (derived as above);
  * all latencies except the 7-cycle adder;
  * single precision;
  * flushing of denormals;
  * the input width and scaling;
  * the sign convention of the anti-windup feedback (`e = s - v`, the sign
    that stops windup);
  * the sequencer's handshake and overrun flag.
* **Sampling period.** The gains were designed for 100 µs, and that is the
  default. The published simulations used samples 20 µs apart, which would be
  `SAMPLE_CYCLES = 1000` and still leaves room for the 48-cycle computation.
* **Not included:**
  * the outer speed PI controller and its speed filter (no gains or
    coefficients are specified);
  * the SVPWM generator (not specified);
  * the motor itself, which is modelled only in a testbench.
* **Verification.** Every arithmetic unit is checked bit for bit against
  correctly rounded references, over thousands of random operands and the
  special cases. The axis and the top are checked bit for bit against a
  sample-by-sample software model, and every latency above is checked to
  the cycle. A closed-loop test with the motor model shows the 2 A step
  response matching `0.263/(z^2 - z + 0.263)` to within 3 mA per sample and
  settling in 8 samples. Synthesis has been run only to a generic gate level,
  not on an FPGA, and no timing closure has been attempted. The
  combinational cores are wide (one full adder or multiplier per cycle
  budget). A real implementation at 50 MHz would spread them over the
  pipeline registers with retiming.

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
For example, for the end-to-end test:

```
verilator --binary --timing -Irtl -Itb rtl/fp_pkg.sv tb/fp_ref_pkg.sv \
    tb/tb_current_pi_controller.sv --top-module tb_current_pi_controller
./obj_dir/Vtb_current_pi_controller
```

Verilator finds the other modules through `-Irtl`, because every module is
in a file of its own name.

| testbench | what it runs |
|---|---|
| `tb_fp_addsub`, `tb_fp_mult`, `tb_fp_int2float`, `tb_fp_compare` | ~15 000 random operations each, bit-exact, latency checked |
| `tb_fp_integrator`, `tb_fp_saturate` | accumulation with reset; all three saturation cases |
| `tb_pi_axis` | 120 samples through linear region, both limits and recovery; padded and hold-balanced instances side by side |
| `tb_sample_sync` | period, capture, hold, update and overrun with a stub datapath |
| `tb_current_pi_controller` | short period, 1/256 A inputs: constant and varying errors, closed loop with the motor model (2 A, ±10 A steps), a second instance provoking overrun, a hold-balanced third instance compared cycle by cycle |
| `tb_current_pi_full` | all defaults (5000-cycle period, integer amperes): 20 samples, constant and growing errors |

`tb/fp_ref_pkg.sv` holds the reference arithmetic. Each binary32 operation
is computed in double precision and rounded once to binary32 by bit
manipulation. This is exact for +, − and ×, because double has more than
2·24+2 significand bits. The package also holds the PI axis model.

## Files

* `rtl/fp_pkg.sv`: the binary32 type, latencies and the rounding helper.
* `rtl/pipe_delay.sv`: the register chain.
* `rtl/fp_*.sv`: the arithmetic units.
* `rtl/pi_axis.sv`: one controller axis.
* `rtl/sample_sync.sv`: the sequencer.
* `rtl/current_pi_controller.sv`: the top level.
* `tb/`: the testbenches and the reference package.
