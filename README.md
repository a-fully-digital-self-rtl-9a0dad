# Self-calibrating pipelined A/D converter with digital weight tables

A pipelined A/D converter resolves a sample one stage at a time. Each stage
compares its input with a few reference levels, subtracts the matching DAC
level and amplifies the remainder (the residue) for the next stage. At 14 to
16 bits, the comparator trip points, DAC levels and inter-stage gains cannot
be matched well enough for the usual fixed binary recombination of the stage
codes.

This design does not trim the analog parts. It keeps a small table of digital
**weights** per stage, one per local code. The conversion result is the sum of
the looked-up weights, each scaled by its stage's position in the pipeline.
If the weights equal the *actual* DAC levels, seen through the *actual* gains,
the sum is the input voltage, whatever the component errors are. The weights
are measured on chip by the **accuracy-bootstrapping** algorithm. The stages
are connected in a ring, and every stage's DAC steps are converted by all the
other stages. The same adders that form the normal result do the measuring.

The RTL has two parts:

* a synthesizable digital core (`cal_core`): the weight tables, the pipelined
  adder chain, an arithmetic unit, a calibration control unit and a
  gain/offset scaling unit;
* a behavioural model of the analog stage (`adc_stage_model`), with random
  component errors, so that the whole converter can be simulated (`adc_top`).

At the default size (16 stages of gain 2, 1 % random errors on every gain,
trip point and DAC level, 0.1 lsb noise), the end-to-end test measures a
non-linearity of about 900 lsb before calibration and 0.8 lsb after one
calibration pass. After the gain/offset step the gain is 1 within 1e-5 and the
offset is within 2 lsb. Here lsb is 2^-16 of the input range.

## The stage: "minimal + 1" redundancy

Each stage has gain A = 2 and input range 0..1. It has M = 2 comparators,
with trip points at 0.25 and 0.75, and a DAC with three levels: -0.25, 0.25
and 0.75. The DAC is a fixed level of -0.25 plus two increments of 0.5. The
increments are subtracted from the input as the comparators switch on. The
residue is

    vres = A * (vin - V_DAC[cd]),   cd = number of comparators on

A plain 1-bit stage would have one comparator at 0.5. The extra comparator,
with both the trip points and the DAC shifted by 1/(2A), lets a stage accept
inputs from -0.125 to 1.125. A residue pushed slightly out of range by a
comparator error is therefore still converted correctly later in the
pipeline. Comparator errors then drop out of the result altogether. Only the
DAC levels and gains matter, and those are what the weights capture.

More generally, with A = 2^NB the stage has M = A comparators at (j + 1/2)/A
and M+1 DAC levels at (i - 1/2)/A.

**Negative gains.** With `NEG_GAIN = 1` every stage has gain A = -2^NB. The
residue then falls as the input rises. The DAC levels move to (i + 1/2)/|A|,
which for A = -2 gives 0.25, 0.75 and 1.25, so that the residue stays within
0..1. On the digital side, multiplying by A becomes a shift followed by a
negation, and the weight update changes sign. The number of stages must be
even. The product of all gains is then positive, so `code_out` keeps the same
meaning as for positive gains.

## The correction path

Writing the input of the first stage in terms of every stage's DAC level and
gain, and pulling out a common factor A^L, gives

    CR = [[[W_{L-1}] A + W_{L-2}] A + ... ] A + W_0      (times A^-L)

`W_k[cd]` is the weight of stage k for local code cd. With this form every
table holds the same nominal values, the ideal DAC levels. The stages can
therefore use identical hardware. The multiplication by A is a 1-bit shift.

Each `digital_slice` does the following:

1. it turns the flash thermometer code into cd (`thermo_to_bin`);
2. it reads `W[cd]` from its `weight_lut`;
3. it adds that weight to the partial result coming from the previous slice;
4. it shifts the sum left by NB and registers it.

Each slice is one pipeline stage behind the previous one, just as the analog
stages are. The output of slice 0 is the result.

Number formats at the default size:

| quantity | width | format |
|---|---|---|
| weight, data bus | 18 | signed, 16 fractional bits (range -2..2) |
| result bus, `code_out` | 36 | signed, 2^32 = full input range |
| write address | 6 | {stage[3:0], entry[1:0]} |

Each weight is added at the LSB of the result bus, which is where the
division by A^L comes from. After 16 slices, each adding and doubling,
`code_out / 2^32` is the input voltage. The top 16 bits below the binary
point are the 16-bit conversion result, and the bits below them carry the
extra resolution that the calibrated weights give.

**Latency and rate:** one conversion per clock. A sample taken by the first
stage at a clock edge appears on `code_out` L = 16 edges later.

## Calibration: accuracy bootstrapping in hardware

The analog residue of stage 0 can be fed back to stage L-1
(`ring_closed`), and the digital result bus always forms a ring. Any stage l
can then be measured with a converter made of all the others:

    stages l-1, l-2, ..., 0, L-1, ..., l+1, then the comparators of stage l

Stage l itself does two jobs in this set-up:

* its sample/hold takes a fixed voltage Vfix (`sel_fix`), and its DAC is set
  from outside (`ext_en`, `ext_inc`) instead of by its comparators;
* its comparators still digitise the signal coming round the ring, and its
  slice is the last one of that conversion.

The digital side marks where the conversion starts and ends:

* **force to zero**: slice l-1 ignores the incoming partial result, so it is
  the most significant slice of the conversion;
* **gate**: slice l puts bits [34:17] of its result on the 18-bit data bus.
  That bit range is the converted value divided by A, in weight units. With
  A a power of two, the division D = ΔC/A costs no hardware.

`cal_control` runs the following sequence, and `cal_alu` does the
arithmetic:

```
load the nominal weights into all tables
for pass = 1 .. N_IT
  for l = 0 .. L-1                       (least significant stage first)
    i = 0: no increment enabled    -> C[0] = sum of N_AV conversions
           W := nominal W[0]             (W[0] is never changed)
    i = 1 .. M: only increment i enabled -> C[i]
           W := W + (C[0] - C[i]) / N_AV
           write W to entry i of stage l's table
```

Why this converges: the converter that measures stage l starts with stage
l-1, which was calibrated just before. Stage l-1's weights carry the most
significance in that measurement, and stage l's own weights carry the least.
Each newly calibrated stage therefore becomes the accurate front end for the
next one, and the accuracy builds up stage by stage. The zero-level
measurement C[0] cancels the unknown value of Vfix and the stage's own
offset.

After each configuration change the controller waits SETTLE = L + 4 cycles,
so that the ring pipeline refills before it samples. With the defaults a full
calibration takes

    1 + N_IT * L * ((M+1) * (SETTLE + N_AV + 1) + M) = 1089 clock cycles

counted from the edge that samples `cal_start` to the edge that raises
`cal_done`. Normal conversion stops during calibration. `code_valid` goes high
again once the pipeline has refilled.

Choose Vfix so that both residues stay within the stage input range. The
tests use Vfix = 1/(2|A|) = 0.25. With A = 2 this gives residues of 1.0 (no
increment) and 0.0 (one increment). With A = -2 it gives 0.0 and 1.0.

**Refining pass.** If `cal_keep` is high when `cal_start` is sampled, the
tables are not reloaded. The run starts from the weights already stored, so a
second run refines the first one. This is the same as `N_IT = 2`, but chosen
at run time.

## Gain and offset correction

Calibration makes the transfer curve straight, but not exactly the right
slope or position. W[0] of every stage stays at its nominal value, and the
gain of the first stage is never measured, so a gain error of about 1 % is
left. `scale_unit` removes it with two reference levels. The levels come in
on `vref_lo` and `vref_hi`, and the codes they should give come in on `t_lo`
and `t_hi`. After a pulse on `scale_start`, the unit does the following:

1. It converts `vref_lo` and then `vref_hi`, giving C_lo and C_hi. The
   `ref_sel` output switches the input of the pipeline to each level in turn.
2. It computes g = (t_hi - t_lo) / (C_hi - C_lo) with a restoring divider.
   g has GF = NB*L + 4 fractional bits, 20 at the default size. That is one
   converter lsb plus four bits.
3. It reads every weight over the data bus, multiplies it by g, rounds it and
   writes it back. Scaling every weight scales the result by g.
4. It converts `vref_lo` again and finds the remaining offset
   (t_lo - C_lo). Rounded to the weight LSB of the last stage, this is added
   to all weights of stage L-1. A constant added to one stage's weights
   shifts the whole transfer curve.

The correction takes

    3*(SETTLE + 1) + (GF + 2) + 2*L*(M + 1) + 2*(M + 1) = 187 clock cycles

at the default size. Normal conversion stops while it runs. Every rescaled
weight is rounded, which can cost up to about half an lsb of linearity.

## Modules

| module | role | synthesizable |
|---|---|---|
| `cal_pkg` | sizes, nominal-weight function, ALU opcodes | yes |
| `thermo_to_bin` | thermometer code to local code (counts ones) | yes |
| `weight_lut` | M+1 weights per stage; reset/reload to nominal; write and read-back ports | yes |
| `digital_slice` | force-to-zero, weight add, ×A shift, pipeline register, data-bus gate | yes |
| `cal_alu` | accumulates measurements, computes the weight updates | yes |
| `cal_control` | calibration sequencer | yes |
| `scale_unit` | two-point gain/offset correction of all weights | yes |
| `cal_core` | L slices in a ring plus ALU, control and scaling unit: the whole digital part | yes |
| `adc_stage_model` | analog stage: flash, Vfix multiplexer, DAC, summer, S/H with random errors | no (uses `real`) |
| `adc_top` | L analog stage models in a ring plus `cal_core` | no (simulation model) |

On a chip, `cal_core` is the logic block. Its analog interface is `therm`
(flash outputs in) and `sel_fix`, `ext_en`, `ext_inc`, `ring_closed` and
`ref_sel` (switch controls out).

## Using the converter

`adc_top` has these ports:

| port | direction | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset (loads the nominal weights) |
| `vin` | in, `real` | input voltage, range 0..1 |
| `vfix` | in, `real` | fixed calibration voltage, 1/(2\|A\|) |
| `cal_start`, `cal_keep` | in | one-cycle start pulse; with `cal_keep` the stored weights are kept as the starting point |
| `cal_busy`, `cal_done` | out | calibration running; finished (stays high until the next start) |
| `vref_lo`, `vref_hi` | in, `real` | reference voltages for the gain/offset correction |
| `t_lo`, `t_hi` | in, `R_W` | codes the two references should give |
| `scale_start` | in | one-cycle start pulse of the gain/offset correction |
| `scale_busy`, `scale_done` | out | correction running; finished |
| `code_out` | out, `R_W` signed | result, 2^(W_FRAC + NB*L) per full range |
| `code_valid` | out | `code_out` holds a normal conversion |

A typical sequence is reset, a `cal_start` pulse, then optionally a
`scale_start` pulse. Once `code_valid` is high, `code_out` follows `vin`
with a latency of L cycles.

## Parameters

The defaults follow a 16-bit converter. The widths must stay consistent:

* `R_W` must be at least `W_W + NB*L + 2`;
* `A_W` must be at least `clog2(L) + clog2(M+1)`;
* `W_FRAC` must stay at or above `NB*L` for the weights to resolve 1 lsb.

| parameter | default | meaning |
|---|---|---|
| `L` | 16 | stages |
| `NB` | 1 | bits per stage, \|A\| = 2^NB (powers of two only) |
| `NEG_GAIN` | 0 | 1: stage gain A = -2^NB (needs an even L) |
| `W_W`, `W_FRAC` | 18, 16 | weight width and fractional bits |
| `R_W` | 36 | result bus width |
| `A_W` | 6 | table address width |
| `AV_LOG2` | 0 | N_AV = 2^AV_LOG2 conversions averaged per measurement |
| `N_IT` | 1 | calibration passes |
| `GF` | NB*L + 4 | fractional bits of the gain factor (set in `cal_core`) |
| `ERR_A`, `ERR_V`, `ERR_D`, `NOISE`, `SEED` | 1 %, 1 %, 1 %, 0.1 lsb, 1 | analog model only |

## Simulating

Every testbench is self-checking and ends with a `TB_RESULT checks=N
failures=F` line. Build one with Verilator 5, for example the full
converter:

```
verilator --binary --timing --assert -Irtl rtl/cal_pkg.sv \
          $(ls rtl/*.sv | grep -v cal_pkg) tb/tb_adc_top.sv \
          --top-module tb_adc_top -o sim
./obj_dir/sim
```

`tb_workloads` and `tb_workloads_neg` also need `tb/adc_harness.sv`. All
testbenches finish in seconds.

| testbench | what it checks |
|---|---|
| `tb_thermo_to_bin` | every input pattern, M = 2 and 4 |
| `tb_weight_lut` | nominal reset values (for A = 2 and A = -2), address decoding, reload, read-back |
| `tb_digital_slice` | add/shift/force-to-zero/gate against a reference model, with table writes; also with negative gain |
| `tb_cal_alu` | weight updates for N_AV = 1 and 4, including rounding; also with negative gain |
| `tb_cal_control` | order of stages and measurements, settle time, writes, cycle count (L = 4, two passes) |
| `tb_adc_stage_model` | ideal stage exactly, for A = 2 and A = -2; 1 % stage within its error bound |
| `tb_cal_core` | with one faulty analog stage: calibrated weights equal that stage's real DAC levels; conversions within 1 lsb |
| `tb_scale_unit` | gain factor exact, rescaled and offset weights, reference order, cycle count |
| `tb_adc_top` | full size: latency, linearity before and after calibration, refining pass, gain/offset correction, cycle count, every slice/stage/increment used |
| `tb_workloads` | six converter sizes and error levels with positive gains, calibrated end to end (see below) |
| `tb_workloads_neg` | ten configurations with A = -2 and A = -4, up to 48 bits (see below) |
| `tb_cal_progress` | linearity after every calibrated stage over two passes, from the weights (see below) |

The linearity error is measured as follows. A straight line is fitted to
`code_out` against the input over 4000 random inputs. The spread of the
residuals, less the 1 lsb that quantisation causes anyway, is the reported
error.

## Results at other sizes

`tb_workloads` and `tb_workloads_neg` build the converter at several sizes
through a small harness (`adc_harness`). Unless stated otherwise, each case
uses 1 % errors, 0.1 lsb noise, N_AV = 1 and one pass. Here lsb = 2^-bits of
that converter. Each case is one random draw of errors.

| stages, gain | bits | case | before (lsb) | after (lsb) |
|---|---|---|---|---|
| 16, A = 2 | 16 | | 884 | 0.79 |
| 16, A = 2 | 16 | two passes | 878 | 0.69 |
| 16, A = 2 | 16 | 0.5 % errors | 348 | 0.56 |
| 4, A = 4 | 8 | | 3.4 | 0.39 |
| 8, A = 4 | 16 | | 1337 | 0.61 |
| 24, A = 2 | 24 | | 283265 | 0.98 |
| 16, A = -2 | 16 | | 527 | 0.76 |
| 16, A = -2 | 16 | no noise | 528 | 1.27 |
| 16, A = -2 | 16 | two passes | 529 | 0.66 |
| 16, A = -2 | 16 | 2 lsb noise | 712 | 7.3 |
| 16, A = -2 | 16 | 2 lsb noise, N_AV = 8 | 712 | 6.9 |
| 16, A = -2 | 16 | 3 % errors | 2084 | 0.92 |
| 16, A = -2 | 16 | 3 % errors, two passes | 2079 | 0.75 |
| 20, A = -2 | 20 | | 11849 | 0.83 |
| 24, A = -4 | 48 | | 3.5e12 | 3.3 |
| 24, A = -4 | 48 | two passes | 3.5e12 | 1.5 |

Each testbench also runs a batch of 16 converters of the main 16-stage
configuration (1 % errors, 0.1 lsb noise, one pass), each with its own random
errors:

| gain | mean after calibration (lsb) | standard deviation (lsb) | worst (lsb) |
|---|---|---|---|
| A = 2 | 0.71 | 0.19 | 1.11 |
| A = -2 | 0.75 | 0.23 | 1.13 |

Larger converters need wider words. The widths follow the rules under
Parameters:

| size | `W_W` | `W_FRAC` | `R_W` | `A_W` |
|---|---|---|---|---|
| 20 stages, A = -2 | 22 | 20 | 44 | 7 |
| 24 stages, A = 2 | 26 | 24 | 52 | 7 |
| 24 stages, A = -4 | 50 | 48 | 100 | 8 |

Notes on reading the table:

* In the 2 lsb noise cases, most of the error after calibration is noise in
  the test conversions themselves.
* Without noise the result is worse than with 0.1 lsb of noise, because the
  noise dithers the truncation of the measured weights.
* For the 48-bit converter, the analog model computes in double precision.
  That leaves only a few bits below one lsb.
* A second pass helps most where one pass leaves the most error: the 48-bit
  converter and the 3 % case.

The harness then runs the gain/offset correction with references at 0.1 and
0.9 of the range. Afterwards, in every case above, the gain is right to
within 2.3 lsb over the full range, and the offset to within 1.5 lsb. Leaving
out the two 2 lsb noise cases, both are within 1.4 lsb.

## Linearity stage by stage

`tb_cal_progress` follows the default converter through two calibration
passes. It takes one point before calibration and one after each stage. The
converter cannot convert while calibrating, so each point is computed from
the tables. The pipeline is viewed with the newly calibrated stage first.
Each stage's weights are compared with its actual DAC levels, referred to the
input through the actual gains of the stages ahead of it. A common gain is
removed, and each stage adds the spread of its errors to a worst-case total.
This is pessimistic compared with a measured INL. The result, in bits
(16 - log2(1 + error in lsb)), for one random converter:

| point | before | 1 | 2 | 4 | 6 | 8 | 10 | 12 | 14 | 16 | pass 2, end |
|---|---|---|---|---|---|---|---|---|---|---|---|
| bits | 5.7 | 6.5 | 7.5 | 9.3 | 11.0 | 12.5 | 13.8 | 14.7 | 14.9 | 15.2 | 14.9 |

Every calibrated stage pushes the first uncalibrated stage one position
further back, worth one bit, until the converter's own resolution is reached.
In the second pass the value stays between 14.5 and 15.5 bits. It does not
fall back to the level before calibration when the ring wraps around.

## Design choices and limits

* **Sign of the update.** The increments are subtracted from the input, so
  enabling one lowers the measured value. The update therefore uses
  D = (C[0] - C[i]) / A, which makes W[i] = W[i-1] + D[i] rise with i, as the
  DAC levels do. Written the other way round, the weights would fall with i.
* **Nominal weights.** The tables start at -0.25, 0.25 and 0.75, the ideal DAC
  levels of the stage above.
* **Weight precision.** The data bus word is the measured value truncated to
  the weight LSB (2^-16). The weights of the most significant stages carry the
  most significance, and for them this truncation is worth up to about half
  an lsb of the converter. Averaging (`AV_LOG2`) and rounding in the ALU
  reduce this only when noise dithers the measurements.
* **Gain/offset references.** The two reference levels and their target
  codes are inputs of the design. The offset is applied to stage L-1, whose
  weight LSB is one converter lsb. Each reference is converted once, so noise
  on that single conversion stays in the gain and offset.
* **Gains.** Only gains of ±2^NB are built. A gain of 3 would need a real
  multiplier in every slice and a divider in the update, and is not provided.
* **The analog model** draws its errors uniformly within ±ERR, and its noise
  uniformly. It models the sample/hold as one register per clock, with no
  settling, clipping or hysteresis.
* `cal_pkg::nominal_weight` and the width rules above are the only places to
  edit for another stage type. The address layout of the tables,
  {stage, entry}, is this design's own.
