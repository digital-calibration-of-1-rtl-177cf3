# Foreground LMS gain calibration for a 1.5 bit per stage pipelined ADC

Each stage of a 1.5 bit per stage pipelined ADC should amplify its residue by
exactly 2. With a finite op-amp open-loop gain it amplifies by less. With
A = 40 V/V and a parasitic of 0.1·Cf, the gain is 2·(1 − 2.1/40) = 1.895. Once
the stage codes are added back with binary weights, the 12-bit transfer curve
gets large INL and missing codes.

This design measures that gain digitally. Calibration runs in the foreground,
while the converter is not sampling:

1. A known voltage VrefH is switched into one stage at a time, from stage 11
   down to stage 1.
2. The bits that the stages behind it produce are stored.
3. A small floating point engine runs an LMS loop. It searches for the weight
   `w_i` (the reciprocal of the stage gain) for which the digitally rebuilt
   voltage equals VrefH to within a quarter LSB.

Each stage that has been calibrated then becomes part of the "ideal back end"
used for the next stage. The result is `w_1`, given as a 21-bit float, together
with a `calibration_complete` flag.

The calibration engine (`cal_logic` and everything below it) is synthesizable
RTL. The converter itself is analog, so it is given as a behavioural model with
`real` voltages (`pipeline_stage`, `flash_adc2`, `pipelined_adc`). This lets the
whole loop, from analog input to weight, run in one simulation.

## The converter in its two modes

| mode | stages in the chain | output |
|---|---|---|
| normal (`cal_sel = 0`) | 11 non-ideal stages + 2-bit flash | `adc_code`, 13 bits |
| calibration (`cal_sel = i`) | 11 non-ideal stages + 2 ideal extra stages (12, 13) + flash (stage 14) | `cal_word`, 15 bits |

The 12-bit converter has one spare stage (13 raw bits), which makes room for
the reduced gain. The two extra stages are ideal and take part only during
calibration. Together with the ideal flash, they give the back end enough
resolution to resolve the error of stage 11.

In calibration mode, `cal_sel = i` opens the input switch of stage `i` and
drives it with VrefH (= VREF = 1.0 in the model). Stages in front of `i` are
ignored.

A stage samples on the rising edge of `clk`. Its sub-ADC compares the input
with ±VREF/4 and gives code 00/01/10 (d = −1/0/+1). Its residue is:

    vres = (1 − 1/(A·β)) · (2·vin − d·VREF),   β = Cf / (Cs + Cf + Cp)

Cs and Cf are matched and bandwidth is unlimited. Finite gain is the only error
modelled. The flash compares with −VREF/2, 0 and +VREF/2.

### Alignment and redundancy removal

Stage `s` resolves a sample `s` clocks after it entered the pipeline.
`stage_align` delays stage `s` by `N_STAGES − s` more clocks, so that all codes
at its output belong to the same sample. `redundancy_removal` then adds code
`s` at weight `2^(N_STAGES − s)`, and the overlapping bits carry. Bit `D_k` of
the result (`D_1` is the MSB) is `word[N_STAGES + 1 − k]`. Its `first_stage`
input masks the stages in front of the one that receives VrefH, so only stages
`i..14` are summed.

The top has two such paths:
- 12 stage codes to 13 bits for normal use;
- 14 stage codes to 15 bits for calibration.

`adc_code` is the raw, uncalibrated output. On a full-scale ramp with the
default gain of 1.895 it spans codes 182 to 8011 and skips about 1500 of them.
That gap is the error the calibration measures.

## Calibration flow

`start` (with `rst` low) runs two phases.

### 1. Capture (`cal_capture`, 441 clocks)

For `i = 11 … 1` the sequencer does the following:
- sets `cal_sel = i`;
- waits `SETTLE = 30` clocks for the 14-stage pipeline and the alignment
  registers to fill;
- samples `cal_word`;
- writes bits `D_15 … D_i` into the bit store, one per clock.

That adds up to 11·30 + 110 + 1 = 441 clocks. It then raises `done`, which
releases the reset of the calibration engine.

The bit store layout:

- stage 11's group comes first (5 bits), then stage 10 (6 bits), and so on up
  to stage 1 (15 bits), which makes 110 bits;
- inside a group, bits are stored `D_15` first;
- the address of bit `D_k` for stage `i` is `bit_base(i) + 15 − k` (see
  `cal_pkg`).

### 2. LMS engine (`cal_controller` + `cal_memory`)

For stage `i`, with `V_be = 0` at the start:

    for k = 15 down to i+1:   V_be = V_be · w_k + (D_k ? +VrefH/2 : −VrefH/2)
    loop:
        V_tot = V_be · w_i + (D_i ? +VrefH/2 : −VrefH/2)
        V_err = VrefH − V_tot
        if |V_err| < LSB/4: store w_i, go to stage i−1
        w_i = w_i + V_err · V_be            (step size μ = 1)

All weights start at 0.5, the ideal reciprocal of 2. `w_15` is never stored: it
reads as 0.5 and only ever multiplies `V_be = 0`.

An LSB is 2·VREF/2^12, so LSB/4 = 2^-13 when VrefH = 1.0. The comparison uses
the magnitude |V_err|.

The main FSM states are `RESET, READ, CALC_VBE, CALC_VTOT, CALC_VERR,
COMPARE_VERR, UPDATE_W, MEM_WRITE, CALI_DONE`. Two sub-FSMs do the arithmetic.
The controller starts each one by releasing its synchronous reset and stops it
by raising the reset again.

`vbe_calc_fsm` computes `res = vbe·w ± VrefH/2`:

| state | action |
|---|---|
| `READ_INPUTS` | the bit chooses +½ or −½ |
| `MULT1` | VrefH·(±½) |
| `MULT2` | vbe·w |
| `ADD` | sum, `done` |

It uses one shared multiplier, and `done` comes 4 clocks after the reset is
released. The same FSM serves both the `V_be` steps (weight `w_k`) and `V_tot`
(weight `w_i`).

`lms_update_fsm` computes `w + V_err·V_be`:

| state | action |
|---|---|
| `MULT1` | V_err·V_be |
| `ADD` | sum, `done` |

`done` comes 2 clocks after the reset is released.

#### Cycle count

From the release of reset to `calibration_complete`, the engine takes:

    1 + Σ_{i=1..11} ( 6·(15 − i) + 9 + 10·u_i )

Here `u_i` is the number of LMS updates for stage `i`. With A = 40 there are 32
updates in total, so the engine takes 1014 clocks, which is 20.3 µs at 50 MHz.
Including capture, the whole run takes 1456 clocks. The reference FPGA
implementation needed about 35 µs with vendor floating point cores.

After `CALI_DONE`:
- `calibration_complete` stays 1;
- `weight` holds `w_1` until the next reset (it reads 0 before that).

## The 21-bit floating point format

    [20] sign | [19:14] exponent, bias 31 | [13:0] mantissa, implied leading 1
    value = (−1)^s · 1.m · 2^(e − 31)

In this design:
- exponent field 0 means zero;
- fields 1..62 are normal numbers;
- results that would need field 63 saturate to the largest finite value;
- results below the smallest exponent flush to zero;
- `fp21_mult` and `fp21_add` round to nearest, ties to even;
- `fp21_compare` gives the signed `lt` and the magnitude `mag_lt`.

All three are combinational, and each sub-FSM registers their results. The
zero, saturation and rounding rules are choices of this design.

With the defaults, the end-to-end run gives
`weight = 0 011110 00001110010001`:
- this is 0.527863, a stage gain of 1.8944;
- the ideal value 1/1.895 is 0.527704;
- the FPGA reference gave 0.527710 (`0 011110 00001110001100`).

The difference of about 0.03 % comes from the stop rule: the loop stops as soon
as |V_err| < LSB/4. It does not try to land on the exact weight, and it rounds
differently from the vendor cores.

## How much the weight buys

`tb_adc_linearity` measures the benefit of calibration. It first calibrates at
the default parameters. It then converts inputs in normal mode and rebuilds
each sample from the aligned stage codes of the normal path:

    v = Σ_{s=1..11} d_s · VREF/2 · w^(s−1) + w^11 · (c − 1.5) · VREF/2

Here `c` is the flash code. With w = 0.5 this is the plain binary output. With
w = `w_1` from the hardware, it is the corrected output. The result is
quantized to 12 bits.

This reconstruction runs in the testbench. The hardware only delivers the
weight.

| measurement | before (w = 0.5) | after (w = w_1) |
|---|---|---|
| ramp, code density: DNL | +0.62 / −1.00 LSB | +0.72 / −0.62 LSB |
| ramp, code density: INL | ±87.8 LSB | ±0.69 LSB |
| missing codes | 778 | 0 |
| 1 MHz sine at 100 MS/s, 4096-point DFT: SNDR | 36.1 dB | 71.4 dB |
| SFDR | 37.0 dB | 81.8 dB |
| ENOB | 5.7 | 11.6 |

For comparison, the original MATLAB study reported:
- before calibration: DNL +0.61/−1 LSB, INL about ±60 LSB, SNDR 35.9 dB, SFDR
  36.7 dB;
- after calibration: DNL +0.7/−0.63 LSB, INL ±0.77 LSB, SFDR 82.3 dB, and an
  SNDR of 75.4 dB.

That SNDR is above the 74 dB limit of an ideal 12-bit quantizer, so its
measurement set-up must differ from this one. The INL before calibration also
depends on the method.

## Module map

| module | kind | role |
|---|---|---|
| `adc_cal_top` | top (simulation only, contains the model) | converter, both digital paths, capture, engine |
| `cal_logic` | RTL | engine: controller + memory, bit load port |
| `cal_controller` | RTL | main FSM, owns one `vbe_calc_fsm`, one `lms_update_fsm`, error subtractor, comparator |
| `vbe_calc_fsm`, `lms_update_fsm` | RTL | arithmetic sub-FSMs |
| `cal_memory` | RTL | 110-bit bit store, weights w1..w14, VrefH |
| `fp21_mult`, `fp21_add`, `fp21_compare` | RTL | 21-bit float units |
| `fp21_pkg`, `cal_pkg` | packages | format, sizes, state enum, address functions |
| `cal_capture` | RTL | stores calibration bits stage by stage |
| `stage_align`, `redundancy_removal` | RTL | digital back end of the ADC |
| `pipelined_adc`, `pipeline_stage`, `flash_adc2` | behavioural model | the analog converter |

Interface of `cal_logic`:
- inputs: `clk`, `rst` (synchronous, active high), and the bit load port
  `bit_we`/`bit_waddr`/`bit_wdata`;
- outputs: `calibration_complete` and the 21-bit `weight`;
- calibration starts on the first clock with `rst` low.

Concurrent assertions check the start/done handshakes: `done` and the
result of each sub-FSM, and `calibration_complete` with its weight, hold until
reset. They also check that the capture sequencer and the controller only write
inside the bit and weight stores. Simulate with `--assert` to enable them.

The 446 memory bits and 210 flip-flops of the engine are small. Most of the
area goes to the combinational adder, about 440 generic cells.

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. The packages must come
first on the command line:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/fp21_pkg.sv rtl/cal_pkg.sv tb/fp21_ref_pkg.sv tb/cal_ref_pkg.sv \
        tb/tb_adc_cal_top.sv --top-module tb_adc_cal_top -o sim
    ./obj_dir/sim

To run another test, replace `tb_adc_cal_top` with any `tb/tb_*.sv`; the
linearity and spectrum measurement is `tb_adc_linearity`.

The independent references are in two packages:
- `tb/fp21_ref_pkg.sv`: float ↔ `real` conversion with the same rounding;
- `tb/cal_ref_pkg.sv`: a real-valued model of the converter chain, plus a
  bit-exact and clock-exact model of the calibration algorithm.

What the main testbenches cover:

- **`tb_adc_cal_top`** runs at the default parameters.
  - It runs a normal-mode ramp and checks that the output is monotonic and
    covers the range, and that codes are missing.
  - It runs one full calibration and checks the weight within 0.002 of
    1/1.895, with exponent field 30.
  - It checks the capture length exactly.
  - It counts each mechanism: VrefH reaches all 11 stages, 99 back-end
    steps, LMS updates, 11 write-backs, completion, hold, and clearing by
    reset.
- **`tb_cal_logic`** compares the engine bit-exactly and clock-exactly with
  the reference model. It uses op-amp gains of 20, 40, 100 and 1000 and a
  larger parasitic.

## Parameters worth changing

- `A_OL`, `CP_RATIO` and `VREF` on `adc_cal_top`, `pipelined_adc` and
  `pipeline_stage` set the gain error of the model.
- `QUARTER_LSB` on `cal_controller` is the stop threshold, a fp21 value.
- The sizes in `cal_pkg` (11 calibrated stages, a 15-bit calibration ADC, 110
  bits) follow from a 12-bit converter. A different resolution means changing
  them together with `N_STAGES` and `N_ERR_STAGES` of the model.

## Departures and choices

- How the stored bits get into the memory is not specified for the method.
  `cal_capture` and its 30-clock settle time are this design's own. So is
  releasing the engine's reset when capture is done.
- The converter model has every non-ideal stage identical. It models finite
  op-amp gain only: no capacitor mismatch, offset or bandwidth limit.
  `CP_RATIO = 0.1` is a model choice that reproduces a gain of 1.895 at
  A = 40.
- The engine calibrates all 11 stages and keeps w1..w11. Only `w_1` is an
  output, since all stages are meant to be identical.
- Nothing limits the number of LMS iterations, and the step size is 1.
- The clock is taken as 50 MHz (20 ns). Timing in this RTL is given in clocks.

## Not included

- Rebuilding a corrected output code from the calibrated weights in RTL. The
  weight is produced, but `adc_code` stays uncalibrated. The reconstruction
  formula above is applied only in the testbench.
- Hardware for DNL/INL and spectrum measurement. These measurements exist
  only as testbench code (`tb_adc_linearity`).
- Any FPGA-specific implementation. The floating point units here replace
  vendor cores.
- A synthesizable converter. The analog stages exist only as behavioural
  models, so `adc_cal_top` simulates but does not synthesize. `cal_logic` is
  the synthesizable top of the digital part.
