# All-digital grid synchroniser for a PV inverter (time-delay digital tanlock loop)

Before a photovoltaic inverter can feed the grid, its output waveform must be
locked in phase to the grid voltage. It must also recover lock after the grid
is disturbed: a phase jump, a sag, heavy harmonic distortion, noise. This RTL
does that with a second-order **time-delay digital tanlock loop (TDTL)**:

* There is no oscillator. The inverter's own reference waveform (the "PV
  waveform" P) is passed through a **variable delay**. Moving that delay moves
  the waveform in phase.
* The rising zero crossings of the delayed PV waveform are the loop's
  **sampling instants** t(k). At each one the grid voltage y and a copy of it
  delayed by a **fixed quarter period** (x) are sampled and held.
* The phase error is **e(k) = atan2(x(k), y(k))**. Because it is the angle of
  the vector (y, x), it does not depend on the grid amplitude.
* A **proportional-plus-accumulation filter** turns e(k) into c(k), the
  amount by which the next sampling interval is shortened:
  T(k+1) = T - c(k). The **controller** applies this by changing the
  variable delay.

The output `pv_sync` is the delayed PV waveform.

## Signal flow

```
grid_in ─┬─> fixed_delay (T/4) ── x ──> sample_hold (Sampler1) ─┐
         └─> register ─────────── y ──> sample_hold (Sampler2) ─┤
                                           ^ sampling instant   v
pv_in ──> variable_delay ──┬─> pv_sync     |                arctan_pd ── e(k)
              ^            └─> edge_detector                    │
              │                                                 v
              └──── delay_controller <──── c(k) ──────── loop_filter
```

| file | block | role |
|---|---|---|
| `rtl/tdtl_pkg.sv` | package | widths, number formats, gain conversion |
| `rtl/fixed_delay.sv` | time delay tau | grid delayed by T/4, giving x |
| `rtl/variable_delay.sv` | variable delay | PV waveform delayed by 0..T-1 samples |
| `rtl/edge_detector.sv` | edge detector | rising zero crossings of the delayed PV, with a hold-off |
| `rtl/sample_hold.sv` | Sampler1 / Sampler2 | sample-and-hold of x and y |
| `rtl/arctan_pd.sv` | phase detector | iterative CORDIC atan2, binary-angle output |
| `rtl/loop_filter.sv` | loop filter | c = G1 e + G2 sum(e) |
| `rtl/delay_controller.sv` | controller | delay <- (delay - c) mod T |
| `rtl/tdtl_sync_top.sv` | top | wires the loop |

## Where the loop locks, and what "synchronised" means here

With the quarter-period delay (psi = pi/2) the held samples are
x(k) = A sin(phi) and y(k) = A cos(phi). Here phi is the phase of x at the
sampling instant. The loop drives e(k) = phi to zero. In lock, x(k) = 0 and
y(k) is at its positive peak.

The sampling instants are the rising zero crossings of `pv_sync`. So in lock
**pv_sync crosses zero upwards a quarter period after the grid does**: it is
in phase with x, the grid delayed by tau. The testbench measures this lag at
99 to 100 samples. An application that needs the PV waveform in phase
with the grid must take that fixed T/4 into account; for example, it could
drive the inverter from a reference advanced by T/4. The loop equations fix
this offset; this RTL does not hide it.

## Loop dynamics and the gains

The loop filter is D(z) = G1 + G2/(1 - z^-1), with G1 = 0.00318 s/rad and
G2 = 0.000635 s/rad. Over one grid period the phase error obeys

    phi(k+1) = phi(k) - omega * c(k),   c(k) = G1 e(k) + G2 * sum_{i<=k} e(i)

This gives the normalised loop gain K1 = G1·omega = 1 and r = 1 + G2/G1 = 1.2.
The loop is stable for 0 < K1 < 4/(1+r) = 1.82.

For phi in (-pi, pi) the atan2 detector is exactly linear (e = phi). Then
phi(k+2) = (2 - r K1) phi(k+1) - (1 - K1) phi(k) = 0.8 phi(k+1), which means:

* The proportional path removes all but 20 % of a step within one period.
* After that, the error decays by a factor of 0.8 per period (20 ms). This
  is the integrator unwinding.

Measured on the RTL at 20 kHz, for a half-period (pi) step on a clean grid:

* |phi| falls below 0.3 rad after 76 ms.
* |phi| falls below 0.05 rad after about 215 ms.

A settling time under 100 ms after a phase step therefore holds at the
0.3 rad level, not at 0.05 rad.
The end-to-end test also checks the hardware against the recurrence above,
period by period.

Phase errors wrap through ±pi without special logic. An angle is a 16-bit
two's complement number with pi = 2^15, so the wrap
f(g) = -pi + ((g + pi) mod 2pi) is plain overflow. A step of exactly pi comes
out as e = -pi.

## Number formats and sizes

| quantity | format | default |
|---|---|---|
| grid / PV samples | signed 16 bit | converter codes |
| sample rate `SAMPLE_HZ` | parameter | 20 kHz (this design's choice) |
| nominal frequency `GRID_HZ` | parameter | 50 Hz |
| period T (`PERIOD`) | samples | 400 |
| fixed delay tau (`TAU`) | samples | 100 = T/4 |
| phase error e(k) | signed 16 bit, pi = 2^15 | resolution 0.0055° |
| c(k) and the delay | samples, 16 fraction bits, 40 bit | |
| loop filter gains | `K1_FX = round(G1·fs·2pi)`, `K2_FX = round(G2·fs·2pi)` | 400, 80 |
| filter accumulator | 24 bit, saturating | |

The variable delay moves in whole samples: 0.9° at 20 kHz. The controller
keeps the fractional part, so the loop dithers by at most one sample in lock.
A higher `SAMPLE_HZ` gives a finer step. It costs two RAMs of T/4 and T
words, plus wider counters.

## Blocks in more detail

**fixed_delay.** This is a circular buffer of TAU words. It outputs the word
written TAU strobes earlier, and zero until the buffer has filled once.

**variable_delay.** This is a circular buffer of one period. It reads at
`wp - delay (mod T)`; a delay of 0 passes the input through. One period is
enough because P is periodic: delays d and d+T give the same output.

**edge_detector.** A sampling instant is a sample ≥ 0 that follows a negative
one. The detector is combinational on the current sample, so the samplers
capture x and y of that same sample.

A crossing within HOLDOFF = T/2 samples of the last accepted one is ignored,
and `suppressed` is raised. This case arises when the controller lengthens
the delay just after an edge: the delayed waveform steps back across zero,
and would otherwise be detected a second time in the same period. If the
hold-off lets such an edge through, the sampled phase is still right,
because the grid is periodic with the same T.

**sample_hold.** This is a register that loads on the sampling strobe.
`hold_valid` follows one clock later and starts the phase detector.

**arctan_pd.** This is a CORDIC in vectoring mode, one micro-rotation per
clock, with ITER = 15 and 6 guard bits. A vector in the left half plane is
first turned by pi. The rotation angles are atan(2^-i)·2^15/pi, rounded. The
result arrives ITER + 1 = 16 clocks after `start`, within 4 LSB. atan2(0, 0)
is defined as 0, so the loop simply coasts when the grid voltage collapses.

**loop_filter.** The accumulator is updated as acc += e with saturation.
The filter then computes c = K1_FX·e + K2_FX·acc, one clock after `e_valid`.

**delay_controller.** On c_valid it computes D <- D - c, then adds or
subtracts one period per clock until D is in [0, T). It then outputs
floor(D). It pulses `wrap_up` / `wrap_down` for each period added or removed.

**Loop timing.** From a sampling instant to the new delay takes about
ITER + 6 + |c|/T clocks. An assertion in the top checks that this finishes
before the next sampling instant. With one sample per clock there are still
T/2 = 200 samples of margin.

## Interface of `tdtl_sync_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `smp_valid` | in | 1 | a new pair of converter samples is present |
| `grid_in`, `pv_in` | in | 16 | grid voltage and PV reference, signed |
| `pv_sync`, `pv_sync_valid` | out | 16, 1 | delayed PV waveform, one clock after `smp_valid` |
| `sample_edge` | out | 1 | sampling instant t(k) |
| `x_k`, `y_k` | out | 16 | held samples |
| `e_k`, `e_valid` | out | 16, 1 | phase error |
| `c_k` | out | 40 | filter output |
| `delay_samples` | out | 9 | current variable delay |
| `edge_suppressed`, `acc_sat`, `wrap_up`, `wrap_down` | out | 1 | event flags |

Reset clears the delay, the filter accumulator and all held values.
Converter scaling is up to the analog front end, which is not part of this
RTL. The tests use 50 codes per volt, so a 325 V peak is 16250.

## Behaviour under grid disturbances

`tb/tb_tdtl_sync_top.sv` runs the design at its default parameters for about
11 s of grid time. The grid is 325 V at 50 Hz; the PV reference is an ideal
50 Hz sine. Settling figures below are measured on the RTL:

| disturbance | result |
|---|---|
| acquisition from reset (initial error −pi/2) | < 0.3 rad in 46 ms, < 0.05 rad in 185 ms |
| 10 ms (pi) phase step, clean | < 0.3 rad in 76 ms, < 0.05 rad in 215 ms |
| pi step with white Gaussian noise, 20 dB SNR | < 0.6 rad within 15 ms and stays there |
| pi step with 80 % THD | < 0.3 rad in 96 ms, < 0.05 rad in about 215 ms |
| six consecutive steps (0.5–2.8 rad) with 35 % THD | each < 0.3 rad in 60 ms or less |
| sawtooth phase ramp of 3.33 ms per 0.5 s (a 0.67 % frequency offset) | tracked to < 0.1 rad |
| sag from 325 V to 0 and back over 2.5 s | lock kept; < 0.1 rad once the amplitude is above 20 % |
| clean 1 rad step, period by period | 1.00, −0.19, −0.16, −0.13, −0.08 rad: the recurrence above within 0.04 rad |
| gains K1 = 1.6 / K1 = 2.2 (r = 1.2, limit 1.82) | locks to 0.04 rad / never settles |

**Harmonic distortion.** Distortion changes both the detector's slope at
lock and its zero: with harmonics, e(phi) is no longer phi. Whether the loop
stays inside its lock range therefore depends on the harmonic orders *and
phases*, not only on the THD figure. The tests use:

* third harmonic in antiphase plus fifth harmonic in phase: 0.6 + 0.53
  (80 % THD), and 0.25 + 0.245 (35 % THD);
* in a real-valued model of the loop these mixes lock from any initial
  phase; the RTL test covers the steps listed above. At 80 % THD the
  waveform peaks at 2.1 times the fundamental, and the test clips it at
  full scale as a converter would.

Other mixes lock less well. Odd harmonics all in phase at 80 % THD raise the
detector slope to about 5.9, against a stability limit of 1.82. In
simulation the loop then limit-cycles. The shape of the distorted grid waveform (which harmonics
at which phases) is not fixed by a THD number alone. Check your own grid's
spectrum against the lock range.

**Voltage sags.** The atan2 detector ignores amplitude, and atan2(0, 0) = 0.
So the loop holds its last delay through a sag to zero instead of chasing
noise, and is locked again as soon as the voltage returns. It does not show
a transient at the bottom of the sag.

**Frequency offsets.** The filter accumulator and the delay form two
integrators, so a constant frequency offset, i.e. a phase ramp, is tracked
with no steady error apart from the one-sample delay resolution. The ramp
case above shows this.

## Departures and limits

The loop structure (fixed quarter-period delay, two samplers, arctangent
detector, PI filter, controller and variable delay in place of an oscillator),
the interval law T(k) = T - c(k-1), the filter and its gains G1 and G2 follow
the published TDTL grid synchroniser. The sample rate, word widths, CORDIC
detector, edge rule and hold-off, and modulo-period controller are this
implementation's own. Further points:

* Whether the edge detector fires at the PV waveform's zero crossing or at
  another point is not defined by the loop equations. The zero-crossing
  choice produces the T/4 output lag described above.
* The hold-off in the edge detector and the modulo-T delay accumulation in
  the controller are this design's own mechanisms. They are needed to make a
  delay line behave like the oscillator of a classic tanlock loop.
* The nominal frequency is a parameter, and the grid and PV waveforms are
  assumed to share it. A real grid deviating from 50 Hz appears as a phase
  ramp, which the loop tracks. The fixed delay is then no longer exactly 90°,
  which bends e(phi) slightly.
* The analog front end (grid voltage sensing, converters), the PV
  generator, the battery, the inverter power stage and the energy meter are
  not part of this RTL.
* The design is not isolated from the grid on a fault: anti-islanding and
  similar protection belong to the inverter controller.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl rtl/tdtl_pkg.sv rtl/*.sv \
    tb/tb_tdtl_sync_top.sv --top-module tb_tdtl_sync_top
./obj_dir/Vtb_tdtl_sync_top
```

The full end-to-end run takes about a second. The unit testbenches
(`tb_fixed_delay`, `tb_variable_delay`, `tb_edge_detector`, `tb_sample_hold`,
`tb_arctan_pd`, `tb_loop_filter`, `tb_delay_controller`) build the same way,
with their own module file. They compare each block against an independent
model: a reference history, real-valued atan2, integer filter arithmetic, or
exact modulo arithmetic. Where a latency is fixed, they also check the clock
count. `tb_tdtl_lock_range` runs the loop with gains inside and outside the
stability limit.

To change the operating point, override `SAMPLE_HZ`, `GRID_HZ`, `G1` or `G2`
on `tdtl_sync_top`. The delay depths and fixed-point gains follow from them.
