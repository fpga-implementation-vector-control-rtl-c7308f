# Rotor-field-oriented vector control for a tandem-converter induction drive

A *tandem* converter drives one induction machine from two inverters working
in parallel. A large current-source inverter (CSI), switched in pulse-amplitude
mode, carries the active power. A small PWM voltage-source inverter (VSI)
supplies the reactive power and shapes the motor currents. Because the VSI
fixes the motor voltage, the VSI is the actuator of the vector control. With
current-controlled ("bang-bang") PWM on the VSI, the whole drive behaves as if
it were current-fed.

This RTL is the control side of such a drive, for an FPGA. Once per 12 µs
sample period it:

1. rebuilds the stator voltage from the DC-link voltage and the VSI switch
   states;
2. integrates it into the stator flux and compensates that into the rotor
   flux;
3. finds the rotor flux's magnitude and angle;
4. runs the flux and speed loops to get the stator-current reference in the
   field frame;
5. rotates that reference into the stator frame and splits it into three
   phase references for synchronised hysteresis current controllers driving
   the VSI.

A second, slower loop sets the CSI's DC-link current. A run-time multiplexer
can switch the VSI from current control to space-vector modulation (SVM).

Every arithmetic block is a small, separate module. This follows the idea of
a library of vector-control building blocks (phase transformations, vector
analyser, coordinate transformation, controllers, modulators) that can be put
together into different control structures. `tandem_foc_top` is one such
structure: the rotor-field-oriented one with current-feedback modulation.

## Control step and data flow

```
                         Udc, VSI switch states, phase-current signs
                                       |
                                   vs_ident  (period-averaged u_a,b,c)
                                       |
 i_a,b,c (sampled) --> pht_direct   pht_direct
                          | i_d,q       | u_d,q
                          +--> stator_flux_calc : psi_s += KT (u - Rs i)
                          |            |
                          +--> rotor_flux_comp  : psi_r = Lr/Lm (psi_s - sigma Ls i)
                                       |
                                vector_analyser : |psi_r|, sin, cos
                                       |
 psi_ref, omega_ref, omega --> flux_speed_ctrl  : isx (flux PI), isy (speed PI)
                                       |
                                coord_transform : field frame -> stator frame
                                       |
                                  pht_reverse   : -> i_a,b,c references
                                       |
                 i_a,b,c (live) --> cfm_hysteresis --+
 u_d,q (SVM) --> pht_reverse --> svm_modulator ------+--> reconfig_mux --> VSI gates
                                                           ^
 pwm_carrier: sync pulses + triangular carrier ------------+

 isy --> csi_current_mult (idc* = pi/(2 sqrt3) |isy|) --> dclink_current_ctrl --> rectifier voltage ref
```

`sample_timer` raises `adc_convst` once every `SAMPLE_CYCLES` clocks. That
pulse closes one sample period and starts the next A/D conversion. The delay
of each result after the cycle in which `adc_convst` is high:

| result | clocks after the strobe |
|---|---|
| averaged stator voltage | 1 |
| stator flux | 2 |
| rotor flux (vector analyser starts) | 3 |
| flux magnitude, sin, cos | 35 |
| current reference (`i_dq_ref`, `i_abc_ref`, `idc_ref`) | 36 |
| rectifier voltage reference, `ctrl_valid` | 37 |

At the assumed 36 MHz clock, a step takes about 1 µs of the 12 µs period. The
12 µs period is set by the A/D converter: it delivers its six channels
serially. The hysteresis controllers pick up a new reference at their next
sync pulse.

## Number format

All signals are per-unit values in 16-bit two's-complement words with 13
fraction bits (Q2.13). The range is −4 … +3.9999 pu and one LSB is 1.22·10⁻⁴
pu. sin and cos use the same format, so 1.0 is 8192. Each multiplication is
done at full width, rounded to nearest once, and saturated to 16 bits.
Coefficients are `real` parameters. They are turned into integers with 17
fraction bits (`foc_pkg::coef`) when the design is elaborated. Some internal
values need more precision and are kept wider:

- the flux and PI integrators: 32 bits, 29 fraction bits;
- the integration step `KT`: 30 fraction bits;
- the voltage sums in `vs_ident`: 32 bits.

`foc_pkg` holds the word type `pu_t`, the structs `abc_t` (three phases) and
`dq_t` (two components), and the rounding and saturation helpers.

## Flux estimation: the delicate part

Nothing measures the rotor flux. Its estimate sets both the field angle and
the flux feedback, so most of the design's accuracy depends on this chain.

**Stator voltage (`vs_ident`).** The VSI output is a pulse train, so it is
rebuilt from quantities that are known. Each clock, each leg voltage is
`S·Udc − U_ON·sign(i)`. `S` is the upper-switch command. `U_ON` is the forward
drop of whichever device conducts: its sign follows the phase current,
because the current picks the transistor or the diode. The three legs are
summed over the sample period. At the strobe, the phase voltages
`(2v_a − v_b − v_c)/3`, divided by the period length, are output.
Averaging over the period is this design's choice. It gives the integrator
the exact volt-seconds of the period even though the switch states change many
times within it. The division is a multiplication by a constant reciprocal,
so `SAMPLE_CYCLES` must equal the real strobe period.

**Stator flux (`stator_flux_calc`).** This is a forward-Euler integration of
`dψs/dt = ωb (us − Rs is)`, with `KT = ωb·Ts = 2π·50 Hz·12 µs`. The integrator
is a pure integrator with no drift correction. Any DC offset in the voltage
or current readings therefore ramps the flux. A real drive needs offset
calibration of the A/D channels, or a leaky integrator added here.

**Rotor flux (`rotor_flux_comp`).** The estimate is
`ψr = (Lr/Lm)(ψs − σLs·is)`, registered once.

**Vector analyser (`vector_analyser`).** This is the largest block. It:

1. squares and adds the two components in the start cycle;
2. takes a bit-serial square root, two radicand bits per clock for 16 clocks;
3. runs two bit-serial restoring dividers side by side for 15 clocks, giving
   `|ψq|/|ψ|` and `|ψd|/|ψ|`;
4. applies the signs.

The magnitude is the floor of the square root in LSB. The angle terms
therefore carry an extra relative error of 1/|ψ| LSB: negligible at working
flux, coarse near zero. A zero vector gives cos = 1 and sin = 0. Those are
also the values after reset, so the first current reference points along the
d axis. The top asserts that no new rotor flux arrives while the analyser is
still busy.

The default motor constants are example values, not data of a particular
machine: Rs = 0.03 pu, Lr/Lm = 1.033, σLs = 0.197 pu, 50 Hz base. Set them
through the top's parameters `RS`, `KT`, `KR` and `SIGMA_LS`, which are
passed down to `stator_flux_calc` and `rotor_flux_comp`.

## Current control of the VSI

**Synchronised hysteresis (`cfm_hysteresis`).** Each phase compares its
reference with the measured current. Above +`HYST` the upper switch is turned
on. Below −`HYST` it is turned off. Inside the band it keeps its state.
Decisions are taken only on the sync pulses of `pwm_carrier`. This keeps a
plain bang-bang controller to at most one transition per sync interval, which
gives a bounded, nearly constant switching frequency. These controllers use
the live current inputs, not the values latched at the strobe, so they can
follow faster A/D data if it is available.

**Space-vector modulation (`svm_modulator`).** This is a carrier comparison
with min-max common-mode injection: `−(max+min)/2` is added to all three
references. That is equivalent to symmetric SVM, with a linear range up to
2/√3 of Udc/2. The voltage reference comes from the `u_dq_svm` port, since no
voltage-mode control structure is built here.

**Reconfiguration (`reconfig_mux`).** `mod_sel` picks the modulator. The
change takes effect at the next sync pulse, so no switching interval is cut
short. `mod_active` shows which modulator is in force.

`pwm_carrier` counts 0…`CARRIER_HALF`…0. It sends a sync pulse at both turning
points, and the carrier runs from −1 to +1 pu. `CARRIER_HALF` must divide
16384.

## Controllers and the CSI loop

`pi_controller` works as follows on each strobe:

- `e = ref − fb`;
- `integ = clamp(integ + KI·e)`;
- `y = clamp(KP·e + integ)`;
- `sat_flag` marks that `y` is at a limit.

`KI` already includes the sample period. Clamping the integrator to the
output range is the anti-windup. `flux_speed_ctrl` holds two of these
controllers:

- the flux loop gives the field current `isx`, limited to 0…1 pu;
- the speed loop gives the torque current `isy`, limited to ±1.5 pu.

`csi_current_mult` sets the CSI DC-link current reference to
`π/(2√3)·|isy|`. This factor relates the fundamental of a 120° block current
to its DC current. `dclink_current_ctrl` is a PI controller. It works on that
reference and on the measured DC-link current, with negative readings taken
as zero. Its output is the voltage reference of the controlled rectifier,
±1 pu, and the negative half means inversion. The firing pattern of the CSI
itself is not generated. `i_dq_ref`, `i_abc_ref`, `idc_ref` and `ur_ref` are
brought out for that logic.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `tandem_foc_top` | `SAMPLE_CYCLES` | 432 | clocks per sample (12 µs at 36 MHz) |
| `tandem_foc_top` | `CARRIER_HALF` | 1024 | half carrier period in clocks (17.6 kHz at 36 MHz) |
| `tandem_foc_top`, `vs_ident` | `U_ON` | 0.01 pu | device forward drop |
| `tandem_foc_top`, `stator_flux_calc` | `RS`, `KT` | 0.03, 0.00377 | stator resistance, ωb·Ts |
| `tandem_foc_top`, `rotor_flux_comp` | `KR`, `SIGMA_LS` | 1.0333, 0.197 | Lr/Lm, σLs |
| `flux_speed_ctrl` | `FLUX_KP/KI/MAX`, `SPD_KP/KI/MAX` | 4, 0.2, 1.0; 8, 0.02, 1.5 | loop gains and limits |
| `dclink_current_ctrl` | `KP`, `KI`, `UR_MAX` | 1.0, 0.1, 1.0 | DC-link loop |
| `tandem_foc_top`, `cfm_hysteresis` | `HYST` | 0.02 pu | half width of the dead band |
| `csi_current_mult` | `K_CSI` | π/(2√3) | DC-current factor |
| `pht_direct` | `ZERO_SEQ` | 1 | 0 builds the simplified form with g0 = 0 |

The controller gains are placeholders, tuned only far enough for the test
machine model in the testbench. Retune them for a real drive.

## How far it can be trusted, and where it departs

Each module has a self-checking testbench that compares it with floating-point
arithmetic computed in the testbench:

- the transformations and multipliers match to 1–2 LSB;
- the vector analyser's magnitude matches to 2 LSB;
- the integrator matches an Euler model to 2 LSB over 800 steps;
- the PI controllers match a model with the same clamping to 3 LSB.

The top-level test runs the whole design at its default sizes against a
simple R–L machine model (rotor at rest). It:

- magnetises the machine to 1 pu flux;
- saturates the speed loop;
- switches to SVM and back.

It checks the estimated flux every period against an independent model of the
estimator chain, and it checks the 37-clock step latency.

What is not verified: closed-loop behaviour on a real rotating machine, and
the gains, motor constants and clock rate (36 MHz), which are assumptions.
The following are choices of this design that the underlying method does not
fix:

- the format split (Q2.13);
- the bit-serial square root and dividers;
- voltage averaging over the period;
- the anti-windup;
- the CSI reference formula;
- the sync-aligned mode change.

## Simulating

Each testbench is self-contained and prints `TB_RESULT checks=N failures=M`.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/foc_pkg.sv tb/tb_tandem_foc_top.sv --top-module tb_tandem_foc_top
./obj_dir/Vtb_tandem_foc_top
```

Replace `tb_tandem_foc_top` with `tb_<module>` to test a single block. The
top-level run simulates about 360 000 clocks (824 sample periods) and takes a
few seconds. The PI testbenches share a floating-point controller model,
`tb/pi_model.svh`.

## Files

- `rtl/foc_pkg.sv`: number format, types, rounding helpers.
- `rtl/tandem_foc_top.sv`: the complete controller.
- `rtl/pht_direct.sv`, `rtl/pht_reverse.sv`: three-phase ↔ d-q transformations.
- `rtl/vs_ident.sv`: stator voltage identification.
- `rtl/stator_flux_calc.sv`, `rtl/rotor_flux_comp.sv`: flux estimation.
- `rtl/vector_analyser.sv`: magnitude and angle.
- `rtl/coord_transform.sv`: rotation from the field frame to the stator frame.
- `rtl/pi_controller.sv`, `rtl/flux_speed_ctrl.sv`, `rtl/dclink_current_ctrl.sv`: controllers.
- `rtl/csi_current_mult.sv`: CSI current reference.
- `rtl/cfm_hysteresis.sv`, `rtl/svm_modulator.sv`, `rtl/reconfig_mux.sv`: VSI modulation and its selection.
- `rtl/pwm_carrier.sv`, `rtl/sample_timer.sv`: switching clock and sample timer.
- `tb/tb_<module>.sv`: one testbench per module; `tb/pi_model.svh`: shared PI reference model.
