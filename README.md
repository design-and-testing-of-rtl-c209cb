# Universal digital LLRF controller for RF cavities

Accelerator RF cavities need their field held steady in amplitude and phase.
A low-level RF (LLRF) controller does this. It takes a small pick-up sample
of the cavity field, compares it with a set point and corrects the drive.
Such controllers are usually built for one cavity type and one frequency.
This design uses a single FPGA bitstream instead, for cavities from about 12
to 97 MHz. Software picks one of four operating modes:

| mode | use | what runs |
|---|---|---|
| Sawtooth generator (`MODE_SAW` = 0) | multi-harmonic buncher: drives an LC tank with fo + 2fo + 3fo | three independent IQ feedback chains at fo, 2fo and 3fo, summed |
| Generator-driven resonator (`MODE_GDR` = 1) | normal-conducting cavity locked to a master oscillator | chain 0 in IQ feedback, plus the motorised frequency tuner |
| Self-excited loop (`MODE_SEL` = 2) | superconducting cavity oscillating at its own resonance | chain 0 as a "phase pass" loop with amplitude limiter; the DPLL pulls the DDS onto the cavity |
| SEL with amplitude/phase lock (`MODE_SEL_AP` = 3) | the same cavity locked to an external reference | SEL loop plus amplitude and phase PI loops; the DPLL locks the DDS to the reference |

The RTL is the programmable-logic part of the controller. It covers the
signal processing from the ADC samples to the DAC code, the tuner motor
outputs, and an AXI4-Lite register bank through which a processor sets every
parameter. The analog front end, the clock chips and the processor software
are not part of it.

## Signal flow

```
              +-----------+   chain 0 (fo)  : DDS -> IQ demod -> DDC -> CORDIC -> PI(I,Q) | SEL -> CORDIC -> IQ mod --+
adc_pu ------>|   mode    |-> chain 1 (2fo) : DDS -> IQ demod -> DDC ----------> PI(I,Q) ----------------> IQ mod --+--> combiner -> limiter -> dac_drive
adc_ref ----->|   mux     |-> chain 2 (3fo) : DDS -> IQ demod -> DDC ----------> PI(I,Q) ----------------> IQ mod --+
              +-----------+-> forward path  : IQ demod (LO of chain 0) -> DDC -> CORDIC -> tuner_ctrl -> tuner_mov/cw/ccw
ext_ref (GPIO) -> dpll: +/-1 x LO(3fo) -> 23-tap FIR -> decimator -> CORDIC -> [phase of chain 0 in SEL] -> PI -> phase increment word -> all DDSs
AXI4-Lite <-> axil_regs -> configuration of everything above; measurements read back
```

* All logic runs on one 125 MHz clock, which is also the ADC and DAC sample
  rate. Every block uses a synchronous, active-low reset.
* **DDS.** Each chain has its own DDS. All DDSs take the same 32-bit phase
  increment word, and each multiplies it by its harmonic number. They leave
  reset together, so fo, 2fo and 3fo stay phase-coherent. The word is the
  software value `PIW_BASE` plus the DPLL's correction.
* **Demodulation and down-conversion.** The IQ demodulator multiplies the
  sample by cos and −sin. The DDC is an integrate-and-dump over 64 samples.
  It yields one baseband I/Q pair every 64 clocks (1.95 MHz), and every loop
  updates at that rate.
* **Control.** IQ-domain PI loops serve Sawtooth and GDR. The SEL path works
  in amplitude and phase: a vectoring CORDIC, then `sel_proc`, then a
  rotation CORDIC back to I/Q.
* **Output.** The IQ modulator forms I·cos − Q·sin. The combiner adds the
  enabled chains, and the limiter clips the sum to the programmed DAC limit.

## How the loops work

### IQ feedback (Sawtooth, GDR)

I and Q each have a PI controller: `u = Kp·e/256 + Σ Ki·e/4096`, where
e = set point − measured value. The integrator and the output saturate at
±(2^17 − 1). The integrator is clamped, so it cannot wind up. The outputs are
the drive I and Q. Set points are given as I/Q. Software converts from
amplitude/phase, which keeps the logic free of that arithmetic.

A cavity path always rotates the phase between drive and pick-up: cables,
filters and pipeline delay add up to 2π·f·delay. That rotation multiplies
the loop gain by cos(rotation). Beyond ±90° the feedback turns positive. Each
chain therefore rotates its PI output by a programmable angle before it
drives the modulator:

```
drive = (u_I + j·u_Q) · (ROT_cos + j·ROT_sin) / 2^15     (saturated to 18 bits)
```

Software writes cos and sin of the compensating angle into `ROTc`. Reset is
cos = 32767, sin = 0, i.e. no rotation. To set the angle, measure the path
with the loop open, or rotate until the loop is stable with the most margin.
The multiply happens as the drive register loads, so it adds no latency.
The SEL modes do not use it, because they have their own phase shift.

### Self-excited loop and phase pass

In SEL mode the controller does not impose a frequency. The vectoring CORDIC
measures the pick-up phase φ relative to the DDS. The drive is then sent out
at phase φ + `PH_SHIFT`. The phase therefore "passes through" the
controller, and the cavity oscillates wherever the total loop phase is a
multiple of 360°, i.e. at its own resonance. If the cavity drifts, the
oscillation follows it.

The drive amplitude is `min(amp·SEL_GAIN/256, AMP_LIM)`. A weak start-up
signal is amplified (`SEL_GAIN` > 1 makes the loop grow). Once the limit is
reached, the drive amplitude is constant. This is the classic SEL amplitude
limiter.

The oscillation frequency generally differs from the DDS frequency. The
measured phase then drifts at the difference frequency. In `MODE_SEL` the
DPLL takes chain 0's measured phase as its error signal and adjusts the DDS
word until that drift stops. The DDS then sits on the cavity frequency. Read
`PIW` back to get the frequency.

In `MODE_SEL_AP` the DPLL locks the DDS to the external reference instead. Two
more PI loops then act:
* the amplitude PI output is the drive amplitude (clipped to [0, `AMP_LIM`]);
* the phase PI output is added to the passed-through phase.

The cavity therefore holds `AMP_SP` and `PH_SP` relative to the reference. In
the test cavity the plant already integrates phase, so a proportional phase
gain is enough. The amplitude loop needs an integral term.

### DPLL

The external reference comes in on a GPIO pin as a squared, two-level
signal. The DPLL needs no multipliers:
1. The bit selects +LO or −LO. Its own DDS supplies the LO at 3fo.
2. A 23-tap FIR follows. Only 3 of its taps are non-zero (1, 2, 1 at delays
   0, 11 and 22).
3. An integrate-and-dump over 64 samples decimates the result.
4. A vectoring CORDIC gives the reference phase.
5. A PI controller (reset gains Kp = 256, Ki = 16, to be tuned through `G_DPLL`)
   turns that phase into a 24-bit signed correction of the 32-bit word, a
   range of ±244 kHz at 125 MHz.

A square wave is rich in odd harmonics, so mixing with 3fo locks to the
reference's third harmonic. That works for a reference at fo or at 3fo.

Sampling a one-bit reference at 125 MHz puts jitter on the word of a few
thousand LSB (one LSB is 0.029 Hz). Its mean is accurate: it settles within
about 50 LSB of the reference in the tests. A reference at an exact simple
fraction of the clock (fs/8, say) is sampled into a repeating pattern, and
its phase then moves in steps. Use a real, incommensurate frequency.

### Tuner

In GDR mode the second ADC channel carries the forward (drive) signal. A
fourth demodulator, DDC and CORDIC path measures its phase against chain 0's
LO. `tuner_ctrl` forms e = forward − pick-up − `TUNER_OFF` after each
update:
* e > `TUNER_THR` selects clockwise (`tuner_cw`);
* e < −`TUNER_THR` selects counter-clockwise (`tuner_ccw`);
* in between the motor stops.

While a direction is selected, `tuner_mov` carries a PWM with a period of 256
clocks and a duty of `TUNER_DUTY`/256. Which rotation detunes which way
depends on the tuner mechanics. Set `TUNER_OFF` and, if needed, swap the
motor wires.

## Number formats and scaling

| quantity | format |
|---|---|
| ADC / DAC | 14-bit two's complement |
| LO (DDS output) | 16-bit, amplitude 32760 |
| baseband I/Q, PI outputs, set points | 18-bit signed |
| measured amplitude | 19-bit unsigned, CORDIC gain removed |
| phase | 16-bit unsigned, 65536 = 360° |
| phase increment word | 32-bit, f = PIW · 125 MHz / 2^32 (12.125 MHz = 416611827) |
| PI gains | 16-bit unsigned; Kp in 2^-8, Ki in 2^-12 per update |
| `SEL_GAIN` | 2^-8 units (256 = 1.0) |

Scale across the chain:
* A pick-up of amplitude A ADC codes is measured as I/Q magnitude ≈ 16·A.
* A drive of magnitude M produces a DAC amplitude of ≈ M/4.
* A cavity path with a gain of 1/4 from DAC code to ADC code therefore closes
  the loop at unity gain. The testbenches use that.

Keep the sum of the chain drives below the DAC range (8191). Above it the
limiter clips and the harmonics distort.

## Timing

| block | latency |
|---|---|
| `cordic_rot` | 17 clocks |
| `cordic_vec` | 18 clocks |
| `iq_demod`, `iq_mod`, `pi_ctrl`, `sel_proc`, `combiner`, `limiter`, `mode_mux` | 1 clock each |
| `ddc` | one strobe every 64 clocks, 1 clock after the 64th sample |

In the SEL path, about 40 clocks pass from the end of a DDC window to the
new drive value. A fixed loop delay in the cavity path rotates the phase by
2π·f·delay. GDR and Sawtooth tolerate that up to the 90° limit noted above.
In SEL it only shifts the oscillation frequency.

## Register map (AXI4-Lite, 32-bit, byte addresses)

| addr | name | content (reset value) |
|---|---|---|
| 0x00 | CTRL | [1:0] mode, [2] clear all PI integrators, [3] DPLL enable, [4] tuner enable (0) |
| 0x04 | PIW_BASE | DDS word from software (416611827 = 12.125 MHz) |
| 0x08 / 0x0C / 0x10 | CH0 I_SP / Q_SP / GAIN | GAIN = {Ki[31:16], Kp[15:0]} (Kp 256, Ki 16) |
| 0x14 / 0x18 / 0x1C | CH1 (2fo) | same layout |
| 0x20 / 0x24 / 0x28 | CH2 (3fo) | same layout |
| 0x2C / 0x30 / 0x34 | G_AMP / G_PH / G_DPLL | {Ki, Kp} of the SEL-AP amplitude loop, phase loop and DPLL |
| 0x38 / 0x3C | AMP_SP / PH_SP | SEL-AP set points |
| 0x40 | PH_SHIFT | SEL phase shift |
| 0x44 | AMP_LIM | SEL amplitude limit (65536) |
| 0x48 | SEL_GAIN | SEL loop gain (256) |
| 0x4C | DAC_LIM | output limiter (8191) |
| 0x50 / 0x54 / 0x58 | TUNER_THR / TUNER_OFF / TUNER_DUTY | dead band (1024), phase offset, PWM duty (128) |
| 0x5C / 0x60 / 0x64 | ROT0 / ROT1 / ROT2 | loop-phase rotation of chain c: {sin[31:16], cos[15:0]}, 2^-15 units (cos 32767, sin 0) |
| 0x80 … 0x8C | AMP0, PH0, I0, Q0 | chain 0 measurements (read only) |
| 0x90 | PIW | DDS word in use (base + DPLL) |
| 0x94 / 0x98 | DPLL_ERR / TUNER_ERR | phase errors |
| 0x9C | STATUS | [0] limiter clipping, [1] tuner cw, [2] tuner ccw |

Writes are accepted when AWVALID and WVALID are both high, and byte strobes
are honoured. Unmapped addresses read 0 and ignore writes. Every response is
OKAY.

## Files

`rtl/` holds one module per file, plus the package `llrf_pkg.sv` with the
widths, the mode enum, the configuration and status structs and the CORDIC
arctangent table. The table holds atan(2^-i) as a fraction of a turn, times
2^32. The hierarchy:

```
llrf_top
 ├─ axil_regs      register bank
 ├─ mode_mux       mode multiplexer / sawtooth broadcaster
 ├─ llrf_chain ×3  (HARM = 1, 2, 3; HAS_SEL only on chain 0)
 │   ├─ dds → cordic_rot
 │   ├─ iq_demod, ddc, cordic_vec
 │   ├─ pi_ctrl ×2 (I, Q) [+ ×2 amplitude/phase]
 │   ├─ sel_proc, cordic_rot
 │   └─ iq_mod
 ├─ combiner, limiter
 ├─ dpll (dds, fir_sparse ×2, ddc, cordic_vec, pi_ctrl)
 ├─ iq_demod, ddc, cordic_vec   forward-signal phase
 └─ tuner_ctrl
```

Every module's parameters default to the configuration described here.
`DEC_LOG` (64-sample down-conversion) and the widths are parameters. The
widths are also package constants.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. For
example:

```
verilator --binary --timing --assert -Irtl rtl/llrf_pkg.sv tb/tb_llrf_top.sv --top-module tb_llrf_top
./obj_dir/Vtb_llrf_top
```

With `-Irtl`, verilator finds the other modules by file name. Unit
testbenches compare each block with a model written independently in the
testbench:
* floating-point sine, cosine, atan2 and sqrt for the CORDICs and the DDS;
* exact integer models for the arithmetic blocks;
* protocol assertions for the AXI slave.

They also check latencies and strobe periods. The closed-loop testbenches
are:
* `tb_llrf_chain`: GDR lock, GDR lock through a −135° path compensated by
  `ROT`, SEL start-up to the limit, phase pass, SEL-AP lock (run with
  `+norot` to watch the uncompensated loop fail);
* `tb_dpll`: lock to a square-wave reference, and to a modelled pick-up
  phase;
* `tb_llrf_top`: the whole controller at its default parameters,
  configured through AXI, with a cavity model (gain 1/4, delay set for zero
  loop rotation at fo = fs/8). It runs GDR, GDR through an inverted cavity
  compensated by a 180° `ROT0`, the tuner in both directions,
  the DPLL on the reference, Sawtooth (checked by a DFT of the pick-up at
  each harmonic), the output limiter, SEL, SEL with the DPLL following the
  cavity, and SEL-AP. It counts every mechanism and fails if any never
  occurred. Run time is about 6 s.

The cavity models are deliberately simple: a gain and a delay, with no
resonance or detuning dynamics. They show that the loops close with the
right signs and settle on their set points. They say nothing about loop
bandwidth against a real cavity.

## Departures and own choices

The controller's published description gives the block structure, the
modes, the sign-inversion DPLL with its sparse 23-tap FIR, the DDS
harmonics, the 125 MHz clock and AXI control. It gives no word widths,
filters, gains or register layout. Everything in the following list is a
choice made here:

* widths and fixed-point formats (table above);
* integrate-and-dump (64) as the down-conversion filter;
* the FIR coefficients (1, 2, 1 at taps 0, 11, 22);
* PI number formats and anti-windup by clamping;
* the SEL limiter law `min(gain·amp, limit)`;
* how SEL-AP combines the PI outputs with the phase pass;
* the tuner sign, dead band and PWM period;
* the loop-phase rotation as a complex multiply by software-written cos/sin;
* a single AXI4-Lite slave in place of several AXI GPIO blocks, and its
  register map;
* mode encoding;
* the forward-phase path for the tuner, whose location the description
  leaves open.

Known differences from the described system:

* The operator interface's "phase offset" is read here as three things:
  the IQ loops' loop-phase rotation (`ROTc`), the SEL phase shift and the
  tuner offset.
* The system has two DAC outputs. Only the drive output is modelled.
* Chain k runs at harmonic k (fo, 2fo, 3fo), which is what sawtooth
  synthesis needs. The demodulator and modulator of a chain share one DDS,
  so each chain measures and drives at the same harmonic.
* Cavities above about 60 MHz (97 MHz) need analog down-conversion before
  the ADC. That is outside this RTL, and the intermediate frequency is not
  specified.

## Not included

These parts have no logic function here, or are bought rather than
designed:
* the analog front end (mixers, filters, couplers);
* the Si5356 clock multiplier, its configuration microcontroller and the
  power-on delay;
* the ADC and DAC chips;
* the ARM processing system with its EPICS IOC and device drivers;
* the Ethernet PHY;
* the motor/piezo power driver;
* the operator GUI.

The top level brings out their connections as plain ports: ADC samples, the
DAC code, the GPIO reference, the tuner outputs and the AXI4-Lite slave.
