# Space vector modulator for an asymmetrical dual three-phase machine

An asymmetrical dual three-phase machine has two three-phase stator windings
(a,b,c and d,e,f) displaced by 30 electrical degrees, each with its own
isolated neutral, fed from a six-leg voltage source inverter. Its six phase
voltages decompose into two orthogonal planes: the alpha-beta plane, which
produces torque, and the x-y plane, which only drives losses and current
harmonics. A space vector modulator for this machine must therefore produce
the requested alpha-beta voltage in every sampling period **and** keep the
average x-y voltage at zero.

This RTL is a complete modulator peripheral of that kind, built after the
architecture published as *"FPGA Implementation of a Multiphase Space Vector
Modulation for Asymmetrical Dual Three-phase AC Machines"*. A controller writes a
reference voltage, the carrier period and a dead time over a small parallel
bus; the peripheral drives the twelve gate signals of the inverter.

## The modulation in one page

Of the 64 inverter states only the 12 largest alpha-beta vectors and the zero
vectors are used. The alpha-beta plane is split into 12 sectors of 30 degrees;
sector 1 is centred on the alpha axis and sector numbers grow towards +beta.
In sector k the four large vectors surrounding the reference (V1..V4) and one
zero vector V0 are applied. With b = 2 - sqrt(3) and a = sqrt(3) - 1 and the
reference (va, vb) expressed as a fraction of the DC-link voltage, six linear
forms are

    T1 = b*va - vb      T2 = a*(va - vb)    T3 = va - b*vb
    T4 = va + b*vb      T5 = a*(va + vb)    T6 = b*va + vb

and, with T(i+6) = -T(i), the dwell times as fractions of the period Ts are

    tV1 = T(k)   tV2 = T(k+1)   tV3 = T(k+4)   tV4 = T(k+5)   tV0 = 1 - sum

These are the unique solution of "alpha-beta average = reference, x-y average
= 0, times sum to Ts" for the four vectors of the sector. The linear range is
a circle of radius 0.5*VDC in these units (at a sector centre the four active
times add up to 2|v|).

The same six forms vanish on the six lines that bound the sectors, so their
signs identify the sector: all positive in sector 1, then F1, F2, ... turn
negative one by one as the angle grows, giving a 12-state Johnson code.

Each period is applied as a symmetric, continuous sequence of 11 segments:

    V0/4  V1/2  V2/2  V3/2  V4/2  V0/2  V4/2  V3/2  V2/2  V1/2  V0/4

Leg states, written as two octal digits [Sa Sb Sc]-[Sd Se Sf]:

| sector | V1  | V2  | V3  | V4  | edge zero | middle zero |
|-------:|-----|-----|-----|-----|-----------|-------------|
| 1      | 5-5 | 4-5 | 4-4 | 6-4 | 0-7 | 7-0 |
| 2      | 4-5 | 4-4 | 6-4 | 6-6 | 0-0 | 7-7 |
| 3      | 4-4 | 6-4 | 6-6 | 2-6 | 7-0 | 0-7 |
| 4      | 6-4 | 6-6 | 2-6 | 2-2 | 7-7 | 0-0 |
| 5      | 6-6 | 2-6 | 2-2 | 3-2 | 0-7 | 7-0 |
| 6      | 2-6 | 2-2 | 3-2 | 3-3 | 0-0 | 7-7 |
| 7      | 2-2 | 3-2 | 3-3 | 1-3 | 7-0 | 0-7 |
| 8      | 3-2 | 3-3 | 1-3 | 1-1 | 7-7 | 0-0 |
| 9      | 3-3 | 1-3 | 1-1 | 5-1 | 0-7 | 7-0 |
| 10     | 1-3 | 1-1 | 5-1 | 5-5 | 0-0 | 7-7 |
| 11     | 1-1 | 5-1 | 5-5 | 4-5 | 7-0 | 0-7 |
| 12     | 5-1 | 5-5 | 4-5 | 4-4 | 7-7 | 0-0 |

The zero vectors are chosen so that five legs switch exactly twice per period
(on and off once) and one leg per sector gives three pulses (six transitions),
e.g. leg c in sector 1. Gate outputs `pwm[5:0]` are legs `{a,b,c,d,e,f}`.

## How one sampling period is made

The carrier is a triangle from an up-down counter. A period of 2*Tm clocks
runs `Tm, Tm-1, ..., 1, 0, 1, ..., Tm-1`; it starts at the top, reaches 0 in
the middle, and the next period starts at the top again. With a 16-bit Tm and
a 100 MHz clock the carrier spans 763 Hz (Tm = 65535) upwards; 45 kHz is
Tm = 1111.

The dwell times are converted to carrier counts: `t1..t4 = tVk/2` and
`t0 = tV0/4`, each in clocks. The PWM generator stacks them into five nested
thresholds

    L4 = t0,  L3 = L4 + t4,  L2 = L3 + t3,  L1 = L2 + t2,  L0 = L1 + t1 (= Tm - t0)

and compares: `level[k] = count < Lk`. As the carrier falls it crosses L0,
L1, ... L4 in turn, and on the way up it crosses them in reverse. The levels
therefore form a thermometer code whose population count is the segment
number (0 = outer zero, 1..4 = V1..V4, 5 = middle zero). The switching
function is a Moore machine whose state is that segment; its output is the
row of the table above for the latched sector. Segments of zero length are
skipped because the state jumps directly to the count of set levels.

### Period-synchronous updates (the subtle part)

Everything that shapes a period changes only at a period boundary, and all of
it changes together:

1. The controller writes v_alpha, v_beta, Tm, Tdb into the interface registers
   at any time. Nothing happens yet.
2. A pulse on `act_regs` marks the set as complete. At the next boundary
   (`trigger`, the last clock of a period) the values are copied into the
   shadow registers. While the carrier is stopped the copy is immediate.
3. During the following period the sector detector (1 clock) and the
   dwell-time pipeline (4 clocks) settle on the shadow values.
4. At the next boundary the counter takes the new Tm, the PWM generator
   latches the new thresholds, and the switching function latches the new
   sector, all on the same clock edge.

So a reference that is activated during period P is applied in period P+2,
and no period ever mixes two references or a threshold computed for a
different Tm. `c_direct` is high during the falling half of each period; its
rising edge is the natural moment for the controller to send the next
reference. The gate outputs lag the carrier by two clocks (segment register
plus dead-band register).

Constraints that follow: Tm should be at least 4 (the pipeline must settle
within a period), and references loaded while stopped need 5 clocks before
`start` is raised.

## Dead band

Each leg's requested state becomes an upper/lower gate pair. A change turns
the conducting switch off at once and turns the other one on only after
`min(Tdb, 256)` clocks with both off (up to 2.56 us at 100 MHz). If the request
flips back before the dead time has elapsed, the wait restarts. An assertion
checks that no leg ever has both gates on. With `start` low every gate is off.

## Register interface

| address | register | format |
|--------:|----------|--------|
| 0 | v_alpha | signed Q1.15, fraction of VDC |
| 1 | v_beta  | signed Q1.15, fraction of VDC |
| 2 | Tm      | unsigned, half period in clocks |
| 3 | Tdb     | unsigned, dead time in clocks (saturates at 256) |

Top-level pins (`svm_top`): `clk`, `reset` (synchronous, active high), `we`,
`act_regs`, `start`, `address[1:0]`, `data[15:0]`, `c_direct`, `pwm[5:0]`,
`pwm_n[5:0]`, `error`. A register is written on the rising clock edge where
`we` is high; the bus is assumed synchronous to `clk`. `error` is high for
every period whose reference lies outside the linear range; such a period has
no zero vector, and its first active vector V1 is shortened to what is left of the period.

## Arithmetic

* Coefficients a and b are 18-bit constants with 17 fraction bits
  (95951 and 35121; a + b = 1 exactly).
* The six forms are computed exactly (36 bits), the selected duty ratios are
  cut to 17 fraction bits and multiplied by Tm; t0 = (Tm - t1 - t2 - t3 - t4)/2.
* Times that come out slightly negative near a sector boundary are clamped
  to 0.
* Measured against an exact floating-point solution, each segment is within
  about 2 clocks; the realised period average matches the reference within a
  few clocks' worth of vector (about 0.004 VDC at Tm = 1000).
* The integer carrier makes the two outer zero segments together one clock
  longer and the middle zero one clock shorter than ideal.

## Module map

| module | role |
|--------|------|
| `svm_pkg` | shared types (`svm_regs_t`, `dwell_t`, `seg_e`), constants, vector table |
| `svm_top` | top level: `svm_interface` + `sv_pwm` |
| `svm_interface` | 2-to-4 decoder and the four 16-bit registers |
| `sv_pwm` | shadow registers and the six sub-modules below |
| `counter_unit` | triangular carrier, `trigger`, `c_direct` |
| `detect_sector` | sector from the signs of the six forms (1 clock) |
| `duty_ratio_calc` | dwell counts t0..t4 and overmodulation flag (4 clocks) |
| `pwm_generator` | thresholds L0..L4 and comparators |
| `switching_function` | Moore machine, segment to leg states |
| `deadband` | complementary gates with dead time |

## What is this design's own choice

The published architecture gives the block structure, the equations, the
sequence table, the bus widths, the carrier and dead-time ranges. The
following are not specified there and were decided here:

* address order, Q1.15 reference scaling, synchronous active-high reset;
* the exact double-buffering rule described above, and the meaning of the
  `error` output (overmodulation);
* the sector decoding method, the pipeline depths and the fixed-point widths;
* the carrier count sequence and the comparison sense `count < L`;
* how the dead band treats pulses shorter than the dead time;
* PWM1..PWM6 being legs a..f.

Known differences: the original build used 25 DSP blocks; this one uses a
handful of multipliers and constant multiplications, since only the equations
were available. Reference magnitudes quoted for the original hardware
(0.5 and 0.7 of the DC link) do not match the 0.5*VDC linear limit of the
dwell-time equations taken literally, so the original probably scaled the
reference differently; here a reference above the limit raises `error`. The
text of the original description speaks of one leg switching "four times"
per period, while its own sequence table gives that leg three pulses; the
table is implemented.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The reference model (`tb/svm_model_pkg.sv`)
does not reuse the dwell-time formulas: it projects each switching state
onto the alpha-beta and x-y planes and solves the 4x4 volt-second balance
by Gaussian elimination.

* `tb_svm_top` (default parameters): all 12 sectors, the two-period update
  latency, writes without `act_regs` being ignored, overmodulation, 763 Hz
  and 45 kHz carriers, dead times of 1, 1.45, 2.56 us and a saturated value,
  stop/restart. Per period it checks length, alpha-beta and x-y averages,
  switchings per leg, dead gaps and shoot-through.
* `tb_svm_workload`: a controller model sends a rotating reference every
  period: 50 Hz at 2.5, 5, 7.5 and 10 kHz carriers, 20 Hz and 30 Hz at
  6 kHz, each period checked against its reference.
* Unit benches: register model, carrier sequence cycle by cycle, sector
  against `atan2`, dwell counts against the exact solution, thresholds,
  the full sequence table, dead time against a cycle model.

Run one with Verilator, e.g.

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/svm_pkg.sv tb/svm_model_pkg.sv tb/tb_svm_top.sv --top-module tb_svm_top
    ./obj_dir/Vtb_svm_top

## Not included

The controller that computes the reference (microcontroller, DSP or an
embedded processor), the inverter power stage and the machine are outside
this design.
