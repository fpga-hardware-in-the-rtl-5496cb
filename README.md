# Direct torque control of an induction motor: flux/torque estimator and DTC logic in SystemVerilog

Direct torque control (DTC) drives an induction motor without a current
controller or PWM modulator. Every sample period the controller estimates the
stator flux vector and the electromagnetic torque, compares the flux magnitude
and the torque with their references using hysteresis comparators, and picks
one of the eight states of a two-level inverter from a fixed look-up table
(Takahashi's switching table). That state is applied until the next sample.

The hard part is the estimator. It must integrate the stator voltage to get
the flux, form a cross product for the torque, and convert the flux vector to
polar form (magnitude and angle). A square root and an arctangent are costly in
logic. This design does the polar conversion with one shift-and-add CORDIC
pipeline followed by a single constant multiply. The estimator produces the
flux angle explicitly, not just a sector number. It is therefore a
self-contained block that other controllers (12- or 24-sector DTC, SVM-DTC) can
reuse unchanged.

The RTL follows a published FPGA design of this estimator and controller. That
design was built as block diagrams for a Virtex-4 board and validated in
hardware-in-the-loop co-simulation against a Simulink motor model. This
SystemVerilog version has the same blocks and published constants. Where the
original leaves something open (word formats, timing, sample time), the choices
are made here and listed below.

## The control loop, one sample at a time

```
          isa, isb                                   phi_ref  te_ref
             |                                          |       |
             v                                          v       v
   +-------------------- flux_torque_estimator ---+  +--------- dtc_control --------+
   | ab_current --+                               |  | sector_select ---------+     |
   |              +--> stator_flux --+--> torque_est --> torque_hysteresis --+-->switching_table --> sw
   | ab_voltage --+        ^         +--> cordic_c2p -> x0.6073 -> flux_hysteresis                |
   +-----^-----------------|----------------------+  +------------------------------+  |
         |                 clear                                                     |
         +------------------------- applied switching state (sw) --------------------+
```

`dtc_top` runs this loop once for each `sample_valid` pulse:

1. The two measured phase currents `isa`, `isb` enter with the pulse. They are
   the currents at the end of the sample period that just ended.
2. `ab_voltage` turns the switching state applied during that period (`sw`,
   held in the control part's output register) into alpha-beta voltages.
   `ab_current` transforms the currents.
3. `stator_flux` advances the flux by one Euler step:
   `phi += Ts * (v - Rs * i)`.
4. `torque_est` and `cordic_c2p` work in parallel on the new flux.
5. `dtc_control` finds the sector and the two comparator outputs, then looks
   up the new switching state. It registers that state into `sw` and raises
   `sw_valid`.

| event | clock after `sample_valid` |
|---|---|
| alpha-beta currents and voltages | 1 |
| flux updated | 2 |
| torque ready (3-stage multipliers + scaling) | 6, delayed to 15 |
| CORDIC result (1 fold + 10 micro-rotations + rounding) | 14 |
| magnitude scaled by 0.6073, `est_valid` | 15 |
| sector and comparators | 16 |
| `sw`, `sw_valid` | 17 |

`busy` is high from the clock after `sample_valid` until `sw_valid`. The next
sample must not arrive while `busy` is high, or it would use the old
switching state; an assertion checks this. With a 100 us sample period, any
clock above about 0.2 MHz finishes with plenty of margin. The estimator alone
is fully pipelined and accepts a sample every clock. Only the loop through the
inverter state forces one sample in flight.

## Number formats

All data words are 16-bit two's-complement fixed point, defined in
`rtl/dtc_pkg.sv`:

| quantity | format | range | LSB |
|---|---|---|---|
| current (A) | Q6.10 | +-32 A | 0.98 mA |
| voltage (V) | Q11.5 | +-1024 V | 31 mV |
| flux (Wb) | Q4.12 | +-8 Wb | 0.24 mWb |
| angle (rad) | Q3.13 | -pi..pi | 0.12 mrad |
| torque (Nm) | Q6.10 | +-32 Nm | 0.98 mNm |

Only the 16-bit width of the CORDIC ports comes from the original design. The
formats were chosen for its motor: about 1.2 Wb stator flux, start-up currents
up to about 15 A and torques up to about 16 Nm. Every arithmetic result rounds
half up and saturates to its format. Constants given as real numbers
(gains, Rs, Ts, 2pi, ...) are real-valued parameters. They are converted to
fixed point at elaboration by `to_fix()`, so changing a parameter needs no
hand-computed constant.

The switching state is the packed struct `sw_vec_t` = `{sa, sb, sc}`, with
`sa` in the MSB and 1 meaning the upper switch of a leg is on. The torque
comparator output is the enum `te_cmp_t`: `TE_DEC` = 0, `TE_HOLD` = 1,
`TE_INC` = 2.

## The estimator

### Alpha-beta transforms (`ab_current`, `ab_voltage`)

The power-invariant Clarke transform is used:

* `is_alpha = 1.225 * isa`, `is_beta = 0.7071 * isa + 1.414 * isb`
* `vs_alpha = 420.2*Sa - 210.1*Sb - 210.1*Sc`,
  `vs_beta = 363.9*Sb - 363.9*Sc`

The voltage gains are `sqrt(2/3)*E`, `E/sqrt(6)` and `E/sqrt(2)`, written out
for a DC link of E = 514.6 V. They are parameters (`K1`..`K5`), so a different DC link
means new parameter values; E is not a run-time input. Because each switch
state is a single bit, the voltage block only selects constants and subtracts
them.

### Flux integrator (`stator_flux`)

This is a discrete integrator per axis. The running sum is kept in a 32-bit
accumulator with 24 fractional bits. One sample adds at most about 0.04 Wb,
and the resistive part can be a few LSB of the 16-bit output, so a 16-bit
register would lose it to rounding. The output is the accumulator rounded to
Q4.12. `clear` zeroes both accumulators.

The Euler step uses the voltage of the period that just ended and the current
measured at its end. The original block diagram feeds the previous step's
current instead. The two differ by `Ts*Rs*(change of current over one
period)`, which is far below the flux LSB at normal operating points.

### Torque (`torque_est`)

`Te = 3/2 * P * (phi_alpha*is_beta - phi_beta*is_alpha)`, with P = 2.

Two multipliers, each a 3-stage pipeline like a DSP48 block, feed a
subtractor. The scaling by 3P/2 is computed exactly as 3*P times the
difference, halved.

### CORDIC cartesian-to-polar (`cordic_c2p`) and scale factor

This block is the core of the estimator. In vectoring mode CORDIC turns the
vector step by step towards the x axis. At step i it rotates by
`+-atan(2^-i)`, which needs only shifts and adds:

```
d = (y >= 0) ? +1 : -1
x' = x + d*(y >>> i)
y' = y - d*(x >>> i)
z' = z + d*atan(2^-i)
```

After N steps y is close to 0. x then holds the vector length times the CORDIC
gain `1/Zn = prod sqrt(1 + 2^-2i)` (1.6468 for N = 10), and z holds the angle.

Details of this implementation:

* **Quadrant folding.** Micro-rotations cover only about +-99.9 degrees. A
  vector in the left half plane is therefore first turned by -90 degrees (if
  y >= 0) or +90 degrees (if y < 0), and z starts at +pi/2 or -pi/2. The
  angle result covers the full -pi..pi.
* **Word growth.** x and y carry 2 extra integer bits, for the gain and the
  sqrt(2) of a diagonal vector, and 3 guard fractional bits. z carries 3 guard
  bits. The `atan(2^-i)` constants are computed at elaboration with `$atan`.
* **Pipeline.** There is one stage per iteration (`N_ITER` = 10, as
  published), one folding stage and one rounding stage, so the latency is 12
  clocks and the throughput is one vector per clock.
* **Accuracy.** Ten iterations leave a residual angle of up to
  atan(2^-9) = 2 mrad. The testbench bound is 3 mrad.
* **Gain correction.** The CORDIC's `magnitude` output is *uncorrected*. As in
  the original design, `flux_torque_estimator` multiplies it afterwards by the
  scale factor Zn = 0.6073 (a Q1.15 constant). This is the only multiplier on
  the polar path. Because the uncorrected value must fit in Q4.12, the
  magnitude saturates for flux vectors longer than about 4.8 Wb, four times
  the rated flux.
* **Zero vector.** The angle of a zero-length vector has no meaning. The
  CORDIC then returns the sum of all micro-rotation angles, about 1.74 rad.

`flux_torque_estimator` delays the torque and the flux components so that
all five outputs of a sample are valid in the same clock.

## The controller

### Sector (`sector_select`)

A negative angle gets 2pi added, so the angle lies in 0..2pi. It is multiplied
by 3/pi (sectors per radian), truncated and incremented. Sector 1 therefore
spans 0..60 degrees, sector 2 spans 60..120 degrees, and so on
counter-clockwise. The original diagram shows the constants rounded to "6"
and "0.954". The exact values are used here; adding 6 instead of 2pi would
misplace angles just above -pi.

### Comparators (`flux_hysteresis`, `torque_hysteresis`)

Both compare `reference - estimate` with zero, as in the original design.
They have no hysteresis band and hence no memory:

* flux (two levels): `cflx` = 1 (raise the flux) when the error is > 0, else
  0 (lower it);
* torque (three levels): `TE_INC` when the error is > 0, `TE_HOLD` when it is
  exactly 0, `TE_DEC` when it is < 0.

With no band, the switching frequency is bounded only by the sample rate.
`TE_HOLD` occurs only on exact equality, for example with zero current and a
zero reference.

### Switching table (`switching_table`)

This is combinational. `sw` = (Sa Sb Sc):

| | | N1 | N2 | N3 | N4 | N5 | N6 |
|---|---|---|---|---|---|---|---|
| flux up (`cflx`=1) | torque up | 110 | 010 | 011 | 001 | 101 | 100 |
| | hold | 111 | 000 | 111 | 000 | 111 | 000 |
| | torque down | 101 | 100 | 110 | 010 | 011 | 001 |
| flux down (`cflx`=0) | torque up | 010 | 011 | 001 | 101 | 100 | 110 |
| | hold | 000 | 111 | 000 | 111 | 000 | 111 |
| | torque down | 001 | 101 | 100 | 110 | 010 | 011 |

With the active vectors numbered V1..V6 = 100, 110, 010, 011, 001, 101, the
table means: in sector k, flux up + torque up gives V(k+1), flux up + torque
down gives V(k-1), flux down + torque up gives V(k+2), and flux down + torque
down gives V(k-2). A sector code outside 1..6 selects 000.

`dtc_control` registers the new state together with the sector and comparator
values that produced it.

## Top-level ports (`dtc_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset (flux to 0, state 000) |
| `clear` | in | zero the flux integrators only |
| `sample_valid` | in | one pulse per sample period |
| `isa`, `isb` | in | phase currents, Q6.10 |
| `phi_ref`, `te_ref` | in | flux (Q4.12) and torque (Q6.10) references, captured with `sample_valid` |
| `sw`, `sw_valid` | out | applied switching state; pulse when a new one is chosen |
| `busy` | out | a sample is in flight |
| `est_valid`, `phi_alpha`, `phi_beta`, `phi_mag`, `phi_ang`, `te` | out | estimates of the last sample |
| `sector`, `cflx`, `ccpl` | out | decisions of the last sample |

Parameters: `RS` (10 ohm), `TS` (100 us), `P` (2), `N_ITER` (10) and `ZN`
(0.6073).

Outside this design:

* the speed PI controller that makes `te_ref`;
* the inverter;
* the motor;
* the current sensing and its A/D conversion.

In the original work these ran in Simulink and were linked to the FPGA by a
vendor-generated Ethernet co-simulation interface, which is not part of this
RTL.

## Where this design departs from the original, or fills gaps

* **Sample time.** `TS` = 100 us is this design's default, not a published
  value. `TS` scales the flux integration directly, so set it to the real
  sample period.
* **Torque gain.** The torque output gain follows the formula `3/2*P` = 3. The
  original block diagram labels that block "3/2P" but shows the gain value 2.
* **Comparator levels.** The flux comparator has two levels and the torque
  comparator three, as in the block diagrams and the loop diagram. One textual
  description swaps the two.
* **Sector constants.** The exact 2pi and 3/pi are used instead of the
  displayed 6 and 0.954 (see above).
* **Original choices kept.** The published design uses 1.225, 0.7071 and
  1.414 for sqrt(3/2), 1/sqrt(2) and sqrt(2). They are kept, and cause errors
  of up to 0.02 %.
* **This design's own choices.** Everything about timing is chosen here, as
  are the CORDIC's insides (folding, guard bits, pipelining), the fixed-point
  formats, the accumulator width, `clear` and `busy`. That covers valid
  strobes, pipeline registers, register placement and output alignment.
* **Bit order.** The bit order of `sw` (Sa in the MSB) follows the order in
  which the table writes the vectors.

## Verification

Each block has a self-checking testbench in `tb/`. The expected values are
computed independently in real arithmetic, and every testbench checks the
latency in clocks. Each prints `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_ab_current`, `tb_ab_voltage` | transforms against the exact formulas and the published gains |
| `tb_stator_flux` | 400+ integration steps against a real-valued Euler integrator; hold and `clear` |
| `tb_torque_est` | streaming products, 4-clock latency |
| `tb_cordic_c2p` | all quadrants, axes and random vectors: angle within 3 mrad, magnitude within 2 mWb |
| `tb_flux_torque_estimator` | whole estimator against a model written from the machine equations; spaced and back-to-back samples |
| `tb_sector_select`, `tb_flux_hysteresis`, `tb_torque_hysteresis` | boundaries, equality, extremes |
| `tb_switching_table` | exhaustive, against the V(k+-1), V(k+-2) rule rather than a copy of the table |
| `tb_dtc_control` | random inputs, back-to-back samples |
| `tb_dtc_top` | closed loop with a real-valued induction motor model, 3000 samples (0.3 s) at default parameters |
| `tb_dtc_speed_profile` | the 2 s drive scenario, described below |

`tb_dtc_top` closes the loop around a real-valued motor model. The model
solves the stator-frame flux equations with the motor data Rs = 10, Rr =
6.3 ohm, Ls = 0.4642, Lr = 0.4612, Lm = 0.4212 H, J = 0.02 kg m2 and P = 2.
The run covers zero torque, acceleration and braking. The testbench checks
every estimate against a replica and the motor's own flux. It checks every
decision against the DTC rule, and it checks that all six sectors, every
comparator output and all eight inverter states occur. It also checks mean
flux and torque against their references. The run ends with 1.005 Wb against
a 1.0 Wb reference, +7.7 Nm against +8 Nm and -4.3 Nm against -4 Nm.

The same run measures the estimator against a floating-point estimator fed
the same currents and switching states:

| output | RMS error | largest error | largest error reported for the original hardware |
|---|---|---|---|
| angle | 1.1 mrad | 2.4 mrad | 30 mrad |
| magnitude | 0.26 mWb | 0.73 mWb | 20 mWb |
| torque | 3.4 mNm | 16 mNm | 40 mNm |

The torque and magnitude errors are a few LSB. They come mostly from the
16-bit flux word that feeds the multipliers and the CORDIC. The angle error
is set by the 10 CORDIC iterations.

`tb_dtc_speed_profile` runs the drive scenario the design was evaluated on. It
covers 2 s with a speed reference of 130, then 100, then 70 rad/s, a load
step from 0 to 5 Nm at 0.6 s and a 1.2 Wb flux reference. The speed loop is a
PI controller in the testbench. The speed settles within 0.2 rad/s of each
reference, the mean flux is 1.226 Wb and the peak phase current is 11 A.

The motor model uses the same alpha-beta convention and torque formula as the
estimator. It checks the control loop, not the physical constants of the
torque formula.

To run a testbench with Verilator 5 (from the folder holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dtc_pkg.sv tb/tb_dtc_top.sv --top-module tb_dtc_top -o sim
./obj_dir/sim
```

Every testbench takes well under a second. The RTL is synthesizable and uses
only `$rtoi`/`$atan`/`**` on constants at elaboration.

## Changing the design

* **CORDIC iterations.** `ZN = prod_{i=0}^{N_ITER-1} 1/sqrt(1 + 2^-2i)`
  hardly depends on `N_ITER`: 0.60735 for 6 iterations and 0.60725 for 10
  or more. The default 0.6073 therefore serves any `N_ITER` from 6 upwards. Each extra iteration adds one clock to
  every latency above and roughly halves the angle error.
* **Motor data.** Set `RS` and `P` for the motor you use.
* **Drive data.** Set `TS` to the sample period. Set `K1`..`K5` of
  `ab_voltage` for a different DC link voltage.
* **Formats.** The word formats are constants in `dtc_pkg`. The datapath
  shifts are derived from them, but the range limits quoted above change
  with them.
* **Delays.** The delay lines that align the torque and flux outputs are
  computed from `N_ITER` and the multiplier latency. An elaboration-time
  assertion stops a build in which they would not line up.

## Files

* `rtl/dtc_pkg.sv`: formats, types, fixed-point helpers
* `rtl/ab_current.sv`, `rtl/ab_voltage.sv`, `rtl/stator_flux.sv`,
  `rtl/torque_est.sv`, `rtl/cordic_c2p.sv`: estimator blocks
* `rtl/flux_torque_estimator.sv`: estimation part
* `rtl/sector_select.sv`, `rtl/flux_hysteresis.sv`,
  `rtl/torque_hysteresis.sv`, `rtl/switching_table.sv`: controller blocks
* `rtl/dtc_control.sv`: control part
* `rtl/dtc_top.sv`: closed loop
* `rtl/pipe_delay.sv`: delay line helper
* `tb/`: the testbenches above
