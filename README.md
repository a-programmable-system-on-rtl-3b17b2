# Three-phase PLL and vector current controller for an active power filter

A shunt active power filter cancels the harmonic and reactive currents drawn by a
nonlinear load. It does this by injecting, through an inverter and a filter inductor,
a current equal and opposite to the unwanted part. Controlling such a filter in a
synchronous reference frame takes two pieces of fast hardware:

* a **three-phase phase-locked loop** that finds the angle of the line voltage, so that
  currents can be expressed in a frame rotating with the grid;
* a **current controller** that makes the inverter's output current follow its
  reference, choosing at each clock which of the inverter's eight switch states to
  apply.

This repository holds both as synthesizable SystemVerilog. They follow a published
FPGA-plus-Cortex-M3 controller for an active power filter, in which the FPGA holds
exactly these two units. That design's block structure and port names are kept.
Everything the published description leaves open is filled in here and listed in
[What is this design's own](#what-is-this-designs-own). That includes gains, number
formats, the tables and the meaning of the band inputs.

```
             +---------------------------- pll_system ----------------------------+
 va_in ----->|  vd_trans  --vd-->  pi_controller  --dout[7:0]-->  output_trans    |--> sina sinb sinc
 vb_in ----->|  (phase       (16b)  (KP, KI and          (8b)     (8-bit accumulator, |--> cosa cosb cosc
 vc_in ----->|   detector)           NP/NI shifts)                 1/4-wave sine table)|
             |      ^------------------ cosa, cosb, cosc ------------------------+    |
             +--------------------------------------------------------------------+

             +--------------------- direct_current_controller --------------------+
 delia ----->|  three2twophase --alpha,beta--> sector_determination --sector--+     |
 delib ----->|  (shifts and adds)          \-> magnitude_determination        |     |
 delic ----->|                                 inner/outer --> mode FF --+    v     |
 mi, mo ---->|                                                            switching_table --> pwma pwmb pwmc
             +--------------------------------------------------------------------+
```

`apf_fpga_top` instantiates the two side by side. They share the clock and the reset
and nothing else. The calculation that would turn the PLL's sines and the measured load
current into the current reference is not part of this FPGA design. The controller
therefore takes the current *errors* as inputs, and the PLL's sines are outputs.

## Numbers

All samples are 8-bit two's complement: line voltages, sines and cosines (full scale
±127) and current errors. Angles are 8-bit, so 256 steps make one cycle. The shared
widths, the sector type and the vector table are in `rtl/apf_pkg.sv`.

## The PLL loop

The PLL works in three stages:

1. **Phase detector** (`vd_trans`) forms

       vd = va·cosa + vb·cosb + vc·cosc

   from the line voltages and the PLL's own cosines. For a balanced positive-sequence
   input `v_x = V·sin(φ_x)` this is `1.5·V·127·sin(φ − θ)`. It is zero at lock and has
   the sign of the phase error, so the loop's reference is simply vd = 0. The sum
   saturates to 16 bits.
2. **PI controller** (`pi_controller`) multiplies the error by the gains KP and KI.
   It then scales each product down with an arithmetic right shift of NP or NI bits:

       acc  <= acc + KI·vd
       dout <= sat16((KP·vd >>> NP) + (acc >>> NI))

   The integrator stays unshifted (32 bits), so it can hold a fractional frequency. At
   lock it holds about `step·2^NI`.
3. **Oscillator** (`output_trans`) is an 8-bit phase accumulator, `θ <= θ + dout[7:0]`.
   It is followed by a 64-entry quarter-wave sine table and a post processor. The
   table is sampled at half steps, `round(127·sin((i+0.5)·90°/64))`, and is computed at
   elaboration, so no data file is involved. The post processor mirrors the index with
   bit 6 of the angle and negates the result with bit 7. Six lookups per clock give
   the sines and cosines of θ, θ − 120° and θ + 120°. Here 120° is 85 steps, since
   256/3 = 85.33.

Only the low byte of the PI output drives the accumulator. The output frequency is
therefore `dout[7:0]/256 · f_clk`, with an integer step from 1 to 127 per clock. A
line frequency that is not an integer step makes the loop alternate between the two
neighbouring steps, with the integrator holding the average.

With the default gains (KP = 1, NP = 11, KI = 1, NI = 16), a near-full-scale input
(amplitude 90–127) locks within about 120 clocks for steps 1 to 12 per clock. It then
stays within ±6 angle steps (±8.4°) of the input. Most of that band is the
quantisation of the 8-bit angle and frequency. A 90° phase jump relocks in a few tens
of clocks. A much smaller input amplitude lowers the loop gain in proportion, so KP
and KI (or NP and NI) should be scaled to the expected ADC amplitude.

Loop timing has four registers: detector, PI, phase accumulator and sine output
register. The sine outputs show the angle θ had one clock earlier.

## The current controller

The controller treats the three phase errors as one vector and switches the
inverter directly, with no carrier PWM:

* **three2twophase** computes `α = a − (b+c)/2` and `β = (b − c)·√3/2` with shifts
  and adds only. √3/2 is taken as `(8 − 1 − 1/16)/8`, rounded. Both axes carry 1.5×
  the phase amplitude, and the outputs are 10 bits wide.
* **sector_determination** projects (α, β) back onto the three phase axes. The signs
  of the three projections are decoded into sectors 1–6. Sector k spans ±30° around
  the inverter's active vector Vk, at (k−1)·60°. The vectors are V1 = 100, V2 = 110,
  V3 = 010, V4 = 011, V5 = 001 and V6 = 101, written as {a, b, c} with 1 for an upper
  switch on. A zero vector gives sector 0.
* **magnitude_determination** compares α² + β² with `mi²` and `mo²`. It raises
  `inner` when |e| < mi and `outer` when |e| > mo. mi and mo are in α/β units,
  1.5× the phase-current units.
* **Mode flip-flop** gives the hysteresis. It is set when |e| > mo, cleared when
  |e| < mi, and held in between.
* **switching_table** registers the leg states. While the mode is set, it applies the
  active vector of the error's sector. Because the error is reference minus actual,
  that voltage pushes the current back toward its reference, and the vector follows
  the sector as the error turns. While the mode is clear, the table applies a zero
  vector: 111 if two or more legs are already high, 000 otherwise, so that at most
  one leg switches.

The result is a two-band vector hysteresis. The error grows freely up to mo and is
then driven back with the vector that opposes it until it falls below mi. The
inverter then rests on a zero vector. mi and mo set the current ripple and the
switching frequency.

Timing: there are three registers from the error inputs to `pwma/pwmb/pwmc`
(α/β, then sector and bands, then leg state). On a fast-changing error, this latency
adds about three clocks of current slope to the ripple.

## What is this design's own

The published description gives the units, their order, the port names and widths,
and short algorithm outlines. These parts come from it:

* the PLL's chain of phase detector, PI with Kp/Ki multiplies and Np/Ni shifts,
  8-bit adder, sine table and post processor;
* the feedback of cosines into the detector;
* the 16-bit detector and PI words and the 8-bit accumulator input;
* the controller's chain of 3φ→2φ by shifts and adds, sector identification by
  decoding, magnitude determination with the `mi`/`mo` inputs, the switching table and
  a separate flip-flop.

These parts are choices of this design:

* **Number format.** Two's complement throughout.
* **Reset.** Synchronous and active high.
* **Phase detector formula.** The detector's exact formula and its saturation.
* **PI gains and shifts.** No values are published. The defaults were tuned for the
  lock behaviour above.
* **Sine table.** Its size, half-step sampling and quadrant folding, and 120° = 85
  steps.
* **Controller inputs.** They are read as current errors. The published outline
  calls the input the "three-phase reference", but its ports are named
  `delia/delib/delic`, and the port names were followed.
* **Bands.** `mi` and `mo` are read as inner and outer bands on the error-vector
  length, compared through squares.
* **Sectors and vector table.** The placement of the sectors (centred on the active
  vectors) and the whole vector table.
* **Mode flip-flop.** Its role as the hysteresis state.
* **Outputs.** They are direct switch states, not carrier-based PWM.
* **Latencies.** Every latency.
* **Observation ports.** `theta`, `vd`, `sector` and `active` are extra ports.
* **Resource use.** The published synthesis reports list 59 flip-flops and 2
  multipliers for the PLL, and 97 flip-flops and 1 multiplier for the controller.
  This RTL has about 112 flip-flop bits in the PLL, because of the 32-bit integrator
  and the registered outputs, and about 28 in the controller. It uses three 8×8
  products in the detector and four small squarers in the controller.
* **Top level.** The two units were synthesized as separate tops in the published
  work. Combined in `apf_fpga_top`, they need 145 signal pins. That is more than
  either of the 108- and 141-pin packages reported for them, so a board build would
  drop the observation ports or multiplex pins.

Not included:

* the reference-current (SRF) calculation;
* protection, DC-bus regulation and the ADC/DAC interfaces, which have no published
  details;
* the Cortex-M3, the ADC and DAC boards, and the oscilloscope.

## Files

| file | what it is |
| --- | --- |
| `rtl/apf_pkg.sv` | widths, types, sector enum, vector table, saturation |
| `rtl/vd_trans.sv`, `rtl/pi_controller.sv`, `rtl/output_trans.sv` | PLL stages |
| `rtl/pll_system.sv` | PLL loop |
| `rtl/three2twophase.sv`, `rtl/sector_determination.sv`, `rtl/magnitude_determination.sv`, `rtl/switching_table.sv` | controller stages |
| `rtl/direct_current_controller.sv` | controller with its mode flip-flop |
| `rtl/apf_fpga_top.sv` | both units |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/inverter_rl_model.sv` | behavioural inverter + inductor + line EMF (simulation only) |

## Simulating

Each testbench checks its module against values computed independently, often in
floating point: ideal sines, atan2 sectors, Euclidean lengths, and closed-loop lock
and tracking. Each ends with a `TB_RESULT checks=N failures=M` line. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/apf_pkg.sv tb/tb_apf_fpga_top.sv --top-module tb_apf_fpga_top -o sim
./obj_dir/sim
```

Replace the module name for the other testbenches.

`tb_apf_fpga_top` runs the whole design at its default parameters:

1. The PLL locks to a 100-LSB, 256-clock-per-cycle line.
2. The current loop then follows references made from the PLL's sines, through the
   inverter model, against the line voltage as back EMF.
3. The line jumps 45° in phase and the PLL must relock.

The test counts every mechanism and fails if one never happens:

* lock and relock;
* the integrator reaching the line's step;
* each of the six active vectors;
* both zero vectors;
* holding in active mode and in zero mode.

In the default run, the current error stays within ±26 LSB with bands mi = 8 and
mo = 20.

## Changing it

* **PLL gains.** Set KP, KI, NP and NI on `pll_system` for another input amplitude or
  loop bandwidth. The loop gain scales with the input amplitude times KP/2^NP.
* **Oscillator.** The angle width is fixed at 8 bits to match the adder. Widening
  `PHASE_W` in the package needs a larger table index in `output_trans`, and a
  re-derived 120° constant.
* **Controller width.** `AB_W` on the controller sets the α/β width. It must stay at
  least 2 bits above the sample width.
* **Bands.** mi and mo are run-time inputs. Ripple and switching rate trade against
  each other through them.
