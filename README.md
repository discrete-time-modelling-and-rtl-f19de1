# Self-sampled all-digital PLL node

This is one node of an all-digital phase-locked loop (ADPLL), the kind of node
used to build networks that distribute a clock across a large chip. The node
takes a slow, stable reference clock. It steers a digitally controlled oscillator
(DCO) until the DCO output, divided by N = 4, matches the reference in
frequency and in phase. Every part of the loop is digital except the oscillator.

The loop is **self-sampled**. Its digital logic does not run on a fixed system
clock. It acts only when a reference or divided edge arrives, and the loop
filter acts only on divided edges. So the update rate depends on the frequency
being controlled. Most of what follows explains the consequences of that.

```
             +---------+  eps   +------------------------+  code  +-----+
 ref_clk --->|         |------->|  PI filter             |------->| DCO |---+--> dco_clk
             |   PFD   |        |  code = c0 + Kp*eps    |        +-----+   |
       +---->|         |        |       + Ki*psi         |                  |
       |     +---------+        |  psi += eps            |                  |
       |                        |  (on divided edges)    |                  |
       |                        +------------------------+                  |
       |                                                                    |
       +---------------------------- div_clk <------------ /N <-------------+
```

## The phase-frequency detector

The detector (PFD) measures how far apart a reference edge (R) and a divided
edge (D) are, and which came first. A plain "time between R and D" is not
enough. When the two frequencies differ a lot, as during acquisition, the edges
do not alternate. The merged edge stream holds runs such as `R R R D` or
`D D D R`. The detector is therefore a three-state machine on a signed state
`m`:

| state | meaning | on R | on D |
|---|---|---|---|
| `m = 0` (`M_WAIT`) | waiting; last error held | go to +1, open measurement | go to -1, open measurement |
| `m = +1` (`M_REF`) | R came first, measuring | stay (measurement goes on) | close, go to 0 |
| `m = -1` (`M_DIV`) | D came first, measuring | close, go to 0 | stay (measurement goes on) |

The same state is also available in the two-variable form used for the
original detector:
- `s` (`lead_ref_o`) records which clock led the last measurement, and keeps
  that value through the waiting state.
- `m_hat` (`measuring_o`) is 1 while measuring.
- The pairs map to `m` as `(0,1)` to -1, `(1,1)` to +1, and `(0,0)` or `(1,0)`
  to 0.

For single edges this is the map `m' = m/2 + sigma*(1 - m^2/2)`, with `sigma = +1`
for R and `-1` for D. The map is written out in the testbenches. A repeated edge of
the leading clock does not restart the measurement. Its time keeps adding up,
so a large frequency error gives a long measurement and thus a saturated error.

When a measurement closes, the detector turns its length `tau_op` into the
timing error

    eps = sign * min(ceil(tau_op / tau_TDC), N_D),     N_D = 7, tau_TDC = 20 ps

The sign is `+` if R opened the measurement and `-` if D did. `eps` is 4 bits in
two's complement (a sign and a 3-bit magnitude). It is held until the next
measurement closes. Because the error saturates at ±7, the loop acts as a
linear PI loop only within ±140 ps of phase error. Beyond that it is close to
bang-bang, and acquisition becomes a ramp whose slope is set by `Ki`.

**How time is measured in this RTL.** The silicon detector is self-timed. This
RTL instead samples both clocks with a time-base clock `clk` whose period is the
TDC resolution (20 ps, i.e. 50 GHz). The operating time is counted in those
cycles (`pfd_tdc`). Both clocks go through identical two-flop synchronisers
(`edge_sync`), so the 2-3 cycle sampling delay is the same for R and D and
cancels out. This keeps the detector fully synchronous and checkable. It is a
modelling choice, not a circuit you would tape out at 50 GHz.

Two cases the state table leaves open are defined by this design:
- Coincident R and D in one cycle while waiting give a zero-length measurement,
  `eps = 0`.
- Coincident R and D during a measurement first close it with the other edge,
  then open a new one with the same sign.

## The self-sampled PI filter

At every divided edge, and only then, `loop_filter` does

    code <= clamp(code_init + round(Kp*eps + Ki*psi), 0, 255)
    psi  <= sat16(psi + eps)

Both right-hand sides use the `eps` and `psi` from *before* the edge. An error
that closes on this same divided edge is used at the next one. So the DCO
frequency changes only at divided edges. `code_init` is the code of the start
frequency f0, since `psi = eps = 0` after reset.

The gains are run-time inputs in unsigned fixed point with 10 fractional bits
(`1.0 = 1024`). The two measured settings are:
- `Kp = 1.0, Ki = 0.048`: `1024, 49`
- `Kp = 0.5, Ki = 0.096`: `512, 98`

The real-valued `v` is rounded half-up to whole code steps. The code is clamped
at the ends of the DCO range, and the clamp is reported on `code_sat_o`.

## DCO and divider

`dco` is a behavioural model, not synthesizable. It has delays and `real`
arithmetic, and stands in for the analog ring oscillator:

    f = 540 MHz + 624 kHz * code      (= 4 x (135 MHz + 156 kHz * code))

Code 0..255 covers 135..175 MHz after the divider. A new code takes effect at
the next rising output edge.

Jitter is optional (`JITTER_REL`). Each period is scaled by `1 + JITTER_REL*g`,
where `g` is approximately Gaussian. The default of 1 % per DCO period gives
0.5 % per divided period, the spread seen on the measured chip. Set
`JITTER_REL = 0.0` for a clean clock.

`freq_divider` is a modulo-4 counter on the DCO clock with a 50 % duty output.

## What the loop does

`tb_adpll_top` repeats the step experiment that characterises the node:
- The loop starts at 143 MHz (code 51).
- The reference steps between 167 MHz and 143 MHz every 7.5 us.
- Reference and DCO both carry 0.5 % jitter.
- The test runs at default parameters and takes under a second.

Typical results:

| gains | time to reach 167 MHz | ramp | lock |
|---|---|---|---|
| Kp = 1.0, Ki = 0.048 | about 2.9 us | 7.8 MHz/us (Ki·7·f_D·156 kHz predicts 8.1) | within 0.05 % of f_ref, mean eps about 0 |
| Kp = 0.5, Ki = 0.096 | about 1.5 us, then rings | 15.6 MHz/us (predicts 16.2) | within 0.1 % of f_ref |

These match the measured transients: a linear ramp of about 3.2 us for the first
setting, and an overshoot of about 1.7 us followed by damped ringing for the
second.

`tb_adpll_map` checks the RTL against an independent event-level model of the
loop. The model is written in real arithmetic in the bench. It keeps the times
to the next reference and divided edges, the detector state, the operating
time, the error and the integral, and steps from one edge to the next. It uses
exact times and a real-valued control word.

Both are run on the same upward step, without jitter. The averaged
divided-frequency curves agree within 0.25 MHz for the first gain set and
1.7 MHz for the second. The larger gap is in the ringing after lock, where the
RTL's 20 ps sampling shows. The times at which the curves first reach 167 MHz
agree to about 1 % (2.92 vs 2.89 us, 1.53 vs 1.53 us).

The same bench counts every loop mechanism and fails if any never occurs:
- R-led and D-led measurements
- saturated and unsaturated errors
- runs of repeated edges within a measurement
- the integral rising and falling
- code updates and reference switches

## How far to trust it

- **From the source design:** the loop structure, the three-state detector and
  its transitions, the error law and `N_D = 7`, the update order of the filter
  (both paths sampled at divided edges), `N = 4`, and the DCO range and step.
- **This design's own choices:** the sampled 20 ps time base instead of a
  self-timed TDC; the handling of coincident edges; the widths (4-bit error,
  12-bit gains with 10 fractional bits, 16-bit integral, 8-bit code); rounding
  and clamping; reset values and polarity; the divider's counter; the DCO's
  jitter model.
- **Departure from the discrete-time description:** there, the error output is
  also refreshed at the intermediate edges of a run such as `R R D`. Here `eps`
  is loaded only when a measurement closes, and held otherwise.
- **Not covered:** the 4×4 network that the node is meant for, because the
  coupling between nodes is not specified. The reference oscillator is left to
  the testbench.

## Files

| file | what it is |
|---|---|
| `rtl/adpll_pkg.sv` | shared types (`pfd_state_t`) and default widths |
| `rtl/pfd_fsm.sv` | detector state machine |
| `rtl/pfd_tdc.sv` | operating-time counter and error quantiser |
| `rtl/pfd.sv` | detector = state machine + quantiser |
| `rtl/loop_filter.sv` | self-sampled PI filter |
| `rtl/freq_divider.sv` | /N divider |
| `rtl/edge_sync.sv` | clock-to-strobe synchroniser |
| `rtl/adpll_core.sv` | all synthesizable logic of one node |
| `rtl/dco.sv` | behavioural DCO model |
| `rtl/adpll_top.sv` | core + DCO, the simulatable node |
| `tb/tb_*.sv` | one self-checking bench per module |
| `tb/tb_adpll_map.sv` | RTL loop against the event-level model of the loop |

Parameters (defaults): `DIV_N = 4`, `N_D = 7`, `ERR_W = 4`, `GAIN_W = 12`,
`GAIN_FRAC = 10`, `PSI_W = 16`, `CODE_W = 8`, `F_MIN_HZ = 540e6`,
`F_STEP_HZ = 624e3`, `JITTER_REL = 0.01`. All files use `timescale 1ps/1fs`.
Drive `clk` with a 20 ps period (`always #10 clk = ~clk;`).

## Simulating

Each bench prints `TB_RESULT checks=N failures=M` and stops itself. Example for
the whole node:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_adpll_top \
  rtl/adpll_pkg.sv rtl/pfd_fsm.sv rtl/pfd_tdc.sv rtl/pfd.sv rtl/loop_filter.sv \
  rtl/freq_divider.sv rtl/edge_sync.sv rtl/dco.sv rtl/adpll_core.sv rtl/adpll_top.sv \
  tb/tb_adpll_top.sv
./obj_dir/Vtb_adpll_top
```

For one unit, list the package, that module (plus its submodules) and its
bench, e.g. `rtl/adpll_pkg.sv rtl/loop_filter.sv tb/tb_loop_filter.sv`. The
benches use only `$urandom`, so a different `+verilator+seed+N` gives another
random run. For synthesis, take `adpll_core` as the top: it contains no
behavioural code. At the default widths it is about 95 word-level cells and
46 flip-flops.
