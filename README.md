# Learned feed-forward linearisation for a dual active bridge current controller

A dual active bridge (DAB) converter sets its output current through the
phase shift between its two full bridges. The textbook single-phase-shift
(SPS) relation between phase and current is smooth and invertible, so a
controller can compute the phase for any wanted current. A real
high-power DAB does not follow it: the blocking (dead) time between the
switches of a leg and the output capacitance of the MOSFETs distort every
commutation, which bends the current transfer function and, near zero
current, flattens it into plateaus. An integral controller still reaches
every setpoint in steady state, but slowly, because it first has to
integrate across the error.

This RTL implements an error-storage based online linearisation (ESBOL).
The controller keeps a table of N breakpoints spread evenly over the
current range. Each entry holds the modulator setpoint that actually
produces the breakpoint current. The table starts as the identity and is
learned online from the integral controller: when the controller has had
to add a correction at a breakpoint, part of that correction moves into the
table. After training, the table is close to the inverse of the plant's
transfer function. The modulator then gets the right setpoint straight
away, and the integral controller only removes what is left. No extra
sensors and no offline identification are needed. The same scheme suits
any time-invariant plant with a nonlinear static characteristic whose
operating points repeat.

## Signal flow

```
            +------------------------------+
 i_sp ----->| error storage system         |-- i_ff --+
   |        | limiter -> locator -> table  |          |      +-----------+   phi   +----------+
   |        |            -> interpolation  |         (+)---->| SPS phase |-------->| gate gen |--> gate_p, gate_s
   |        +--------------^---------------+          |      | (inverse) |         +----------+
   |                       | i_i, w_active            |      +-----------+              |
   +--(-)--> I-controller -+------------------ i_i ---+                                 |
        ^                                                             ctrl_tick <-------+
 i_meas-+
```

The modulator setpoint is

    I_sp,mod = I_ff(I_sp) + I_i

where `I_ff` is read from the table by linear interpolation and `I_i` is
the integral controller output. Without learning the table is the
identity, so `I_ff = I_sp` and the structure is an ordinary feed-forward
plus I-controller. A trained table never makes the loop worse than that
starting point, and breakpoints that are never visited simply stay at
their initial value.

## The error storage

This is the core of the design (`esbol_error_storage_system`), and the part
that most needs explaining.

**Grid.** N breakpoints (default 41) span -I_max..+I_max (default
+/-50 A). They are 2*I_max/(N-1) = 2.5 A apart, which is 2.5 % of the
range. N must be odd so that zero current is a breakpoint, and the
spacing must be a whole number of mA. Both are checked at elaboration.

**Initial contents.** Entry k (0-based) holds `-I_max + k*2*I_max/(N-1)`,
the breakpoint current itself. Reset and the `init` input load these
values. A preload port (`ld_en`, `ld_idx`, `ld_val`) can overwrite single
entries with prior knowledge of the plant before learning starts.

**Readout.** The setpoint is first clamped to +/-I_max. The locator then
divides `I_sp + I_max` by the spacing. The quotient is the lower breakpoint
of the segment, and the remainder is the offset within it. The output is

    I_ff = S[k] + (S[k+1] - S[k]) * offset / spacing

with the quotient truncated toward zero. The readout is combinational.

**Learning.** A learning step happens only when all of these hold:

1. The learning strobe `w_active` is high. The top raises it every
   UPDATE_RATE-th control cycle (default 10) while `learn_en` is set.
   Between strobes, the integral controller has time to settle to the
   effect of the previous update.
2. The limited setpoint lies within WINDOW_PCT percent of the spacing of
   its nearest breakpoint (default 5 %, so +/-125 mA). The nearest
   breakpoint is the setpoint rounded to the grid, with halves rounded up.
   Away from a breakpoint, the controller's correction belongs to an
   interpolated point rather than to one entry, so nothing is learned there.
3. The update value is not zero. The update value comes from the
   controller output I_i through a dead band and a step limit:

       I_u = min(I_i - I_tol,  I_max_step)   if I_i >=  I_tol
       I_u = max(I_i + I_tol, -I_max_step)   if I_i <= -I_tol
       I_u = 0                                otherwise

   The defaults are I_tol = 100 mA and I_max_step = 50 mA. The dead band
   stops learning from noise and from the small residual the loop always
   keeps. The step limit sets the learning speed and prevents
   oscillation between the table and the integrator.

The entry is then updated as `S[n] += I_u`, saturated at +/-2*I_max. The
integral controller is not reset by an update. Instead, the larger
feed-forward makes the current overshoot, and the integrator unwinds by
itself. Over many strobes, the correction moves from I_i into the table.
In the end-to-end test, the residual open-loop error at a trained
breakpoint settles below the dead band (about 40 mA, from about
1.6 A untrained).

Priority within one clock: `init`, then preload, then update. An update
requested in the same clock as `init` or a preload is dropped.

## Control cycle and timing

One control cycle takes one switching period: 2000 clocks at the assumed
100 MHz clock and 50 kHz switching frequency. `ctrl_tick` marks clock 0
of each period.

| clock after tick | action |
|---|---|
| 0 | `i_sp`, `i_meas`, `u_p` sampled |
| 1 | integral controller steps: `I_i += (I_sp - I_meas) / 2^KI_SHIFT` |
| 2 | table read, `i_sp_mod` registered, table updated on a strobe |
| 3 | phase calculation starts |
| about 88 | `phi_valid`: new phase ready |
| next period start | gate generator switches to the new phase |

An assertion in the top checks that the phase calculation has finished
before the next period starts. A period of fewer than about 100 clocks
is therefore not allowed.

## SPS modulator

`dab_sps_phase` inverts the ideal SPS relation (the minus root, so that
|phi| <= pi/2):

    phi = sign(I) * pi/2 * (1 - sqrt(1 - 8 f_sw L_sigma |I| / (n_tr U_p)))

It does this in fixed point with no multiplier in the loop:

- The constant `8 f_sw L_sigma / n_tr` is folded into one integer. With
  currents in mA and voltages in 0.1 V, `x * 2^32 = K * |I| / U_p`.
- A 56-step restoring divider gives x, with 8 guard bits.
- A 25-step bitwise square root gives sqrt(1 - x) in Q24.
- The result is phi/pi as a signed Q24 fraction (+/-2^23 is +/-pi/2).

If x >= 1 (more current than the bridge can carry at this voltage) or
U_p = 0, |phi| is set to pi/2 and `sat` is raised. The result matches a
floating-point evaluation to within 4 LSB of Q24.

`dab_sps_gate_gen` counts through the period. Each bridge drives its
diagonals T1/T4 in the first half period and T2/T3 in the second half.
Every switch turns on only T_bt = 200 ns (20 clocks) after its half
begins, so the two switches of a leg are never on together. The
secondary pattern is delayed by `round(phi/pi * PERIOD/2)` clocks; a
positive phi makes power flow to the secondary. A new phase is taken over
only at a period boundary. Gate bits are [0] T1 (leg A high), [1] T2
(leg A low), [2] T3 (leg B high) and [3] T4 (leg B low).

The phase resolution of the gate generator is one clock, pi/1000. Near
zero current at 750 V this is about 0.7 A, so a real build would need a
high-resolution PWM output stage. The `phi` output keeps full Q24
precision for such a stage.

## Number formats

| quantity | type | unit |
|---|---|---|
| currents | `current_t`, signed 24 bit | 1 mA |
| voltages | `voltage_t`, unsigned 16 bit | 0.1 V |
| phase | `phase_t`, signed Q24 of phi/pi | pi / 2^24 |
| integrator | 34-bit accumulator, 8 bits below 1 mA | |

These types live in `rtl/esbol_pkg.sv`.

## Parameters (top: `esbol_dab_controller`)

| parameter | default | meaning | origin |
|---|---|---|---|
| N | 41 | breakpoints | method |
| I_MAX_MA | 50000 | range +/-50 A | test converter |
| I_TOL_MA | 100 | dead band of the update | method |
| I_MAX_STEP_MA | 50 | largest update step | method |
| WINDOW_PCT | 5 | update window, % of the spacing | method |
| UPDATE_RATE | 10 | control cycles per learning strobe | method |
| KI_SHIFT | 6 | integral gain 1/64 per cycle | this design |
| CLK_HZ | 100 MHz | logic clock | this design |
| F_SW_HZ | 50 kHz | switching frequency | test converter |
| T_BT_NS | 200 | blocking time | test converter |
| L_SIGMA_NH | 11000 | leakage inductance, 11 uH | test converter |
| N_TR | 1 | transformer ratio | test converter |

With the defaults, the table is 41 x 24 bits of flip-flops. The whole
controller synthesises to about 1500 flip-flops.

## Modules

| file | role |
|---|---|
| `esbol_pkg.sv` | types, widths, saturation helper |
| `esbol_dab_controller.sv` | top: schedule, learning strobe, I_sp,mod = I_ff + I_i, modulator |
| `esbol_error_storage_system.sv` | limiter, locator, update limiter, table, interpolator |
| `esbol_input_limiter.sv` | clamp to +/-I_max |
| `esbol_breakpoint_locator.sv` | segment, offset, nearest breakpoint, update window |
| `esbol_update_limiter.sv` | dead band and step limit |
| `esbol_error_storage.sv` | the table: init, update, preload, two read ports |
| `esbol_interpolator.sv` | linear interpolation |
| `esbol_i_controller.sv` | integral controller with anti-windup and disable |
| `dab_sps_phase.sv` | SPS phase from current and U_p |
| `dab_sps_gate_gen.sv` | gate signals with blocking time |

Not included: the power stage, the sensing and ADCs for current and
voltage, and the supervisory sequencer that decides when to train. Their
signals are ports of the top: `i_meas`, `u_p`, `ctrl_en`, `learn_en`,
`init`, `pwm_en` and the preload port.

## What follows the method, and what is chosen here

Taken from the method:

- the feed-forward plus I-controller structure
- the breakpoint grid and its identity initialisation
- the dead-band and step-limited update
- the 5 % update window
- linear interpolation
- the update rate
- the SPS phase equation and the blocking time

Choices made for this RTL:

- **Update-rate reading.** The update rate "10" is read as one learning
  strobe every 10 control cycles.
- **Loop timing.** One control cycle per switching period, and the
  clock schedule above.
- **Integral controller.** Its gain, width and anti-windup clamp.
- **Number formats.** The integer units, the rounding of the nearest
  breakpoint and the truncation in the interpolation.
- **Saturation.** Table entries and I_sp,mod saturate at +/-2*I_max.
- **Table extras.** The preload port and the priority of `init` over
  preload over update.
- **Modulator.** The divider and square-root implementation, the
  saturation of phi, and the counter-based gate generator. The method
  treats the modulator as an existing block and only gives the phase
  equation.
- **Inputs not used.** Only U_p enters the phase calculation, because the
  SPS equation for output current does not contain U_s.

Not built: several tables in parallel, chosen by operating voltage. This
is suggested as a remedy for wide voltage ranges but is not part of the
base scheme.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Reference values are
computed independently in the testbench: real arithmetic for the grid,
the nearest-breakpoint formula and the phase equation, and a reference array for the table. The
unit tests cover:

- full setpoint sweeps and the window edges of every breakpoint
- random traffic against a reference table, with saturation, preload and
  `init`
- the phase at both current signs, at the saturation limit and at zero
  voltage, including its latency
- period length, blocking gaps, shoot-through, and the secondary lag for
  positive and negative phase

Three system testbenches run the whole controller at its default
parameters. They close the loop with `tb/dab_plant_model.sv`, a
behavioural converter model with three parts:

- the SPS power equation from phase to current
- a dead zone around zero phase: 6.9 mrad, a plateau of about 1.5 A, when
  U_s = U_p. It grows when the two DC voltages differ.
- a gain of 0.97

The model answers each control cycle with the current of the phase
applied in that period. The controller therefore sees a loop delay of two
control cycles.

- **`tb_esbol_dab_controller`** is the functional system test:
  - measures the open-loop error with the identity table
  - trains at +/-2.5, +/-5 and +/-10 A with the integral controller on
  - switches to pure feed-forward and requires the error to have shrunk
    to at most 250 mA and to a quarter of its untrained value (it goes
    from about 1.5-1.7 A to about 40 mA)
  - checks interpolation between two trained entries and the learning
    strobe rate
  - triggers input limiting, phase saturation at low U_p, preload and
    `init`

  It counts each of these mechanisms and fails if one never happens.
  About 10 M clocks, a few seconds.
- **`tb_esbol_sweep`** is the stationary transfer-function experiment.
  It sweeps -45 A..45 A in 0.5 A steps at U_s = 720, 750 and 780 V: open
  loop, then a training sweep, then open loop with the learned table.
  The largest error over the sweep drops as follows:

  | U_s | untrained | trained |
  |---|---|---|
  | 720 V | 3.6 A | about 1.0 A |
  | 750 V | 2.6 A | about 0.9 A |
  | 780 V | 3.6 A | about 1.0 A |

  The test requires the trained error to stay below 4 % of 50 A. What
  remains comes from setpoints between breakpoints next to the zero-current
  plateau, which interpolation cannot follow. At the breakpoints the error
  is at most about 0.2 A. About 180 M clocks, 1.5 minutes.
- **`tb_esbol_step`** is the dynamic experiment. It applies steps
  -10 A -> +10 A and back, with the integral controller on, first with
  the identity table and then with a table trained at +/-10 A. The
  settling time to within 200 mA is about 170 control cycles without the
  trained table and about 80 with it. The test requires at least a factor
  of two. The advantage grows as the integral controller gets slower:
  with KI_SHIFT = 7 the trained case settles at once, while the untrained
  one takes about 350 cycles.

The model is only a stand-in for a real converter. The results show that
the learning loop behaves as intended. They say nothing about the
accuracy reached on hardware.

## Simulating

With Verilator 5, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/esbol_pkg.sv tb/tb_esbol_dab_controller.sv --top-module tb_esbol_dab_controller -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test. The testbenches only
need two-state simulation. To retarget another converter, change
F_SW_HZ, L_SIGMA_NH, N_TR, T_BT_NS and I_MAX_MA. Keep N odd and
2*I_MAX_MA divisible by N-1.
