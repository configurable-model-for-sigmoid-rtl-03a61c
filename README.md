# A configurable Sigmoid / Tanh unit built around one look-up table

Recurrent networks such as LSTMs evaluate the logistic Sigmoid and the
hyperbolic tangent at every gate. A separate table or polynomial for each
function costs area twice. This unit computes both functions with **one**
Sigmoid table, using the identity

    Tanh(x) = 2 * Sigmoid(2x) - 1

A mode bit chooses the function for each sample. For Tanh, the input is
doubled before the table and the table output is doubled and lowered by one
after it. Neither doubling needs a multiplier. On the input side, 2x is a
one-bit left shift of a fixed-point number. On the output side, 2s is a
floating-point addition s + s.

The unit takes and returns IEEE-754 single-precision numbers. It is fully
pipelined: one sample per clock, with a fixed latency of 20 clocks by default.

## Datapath

```
 ip (fp32) ──► fp_to_fix ──► x ────────────────► lut_index_mux ──► sigmoid_lut ──► s ──┬──────────────────────────► sigmoid_op
                             │                      ▲   (mode)       1024 x 32         │
                             └──► fix_shl1_sat ──► 2x                                  └─► fp_add(s + s) ─► fp_minus_one ─► tanh_op
```

| Stage | Module | What it does | Clocks |
|---|---|---|---|
| Conversion | `fp_to_fix` | fp32 → 10-bit fixed point, rounded and saturated | 1 |
| Doubling | `fix_shl1_sat` | 2x by a 1-bit shift of the magnitude, saturating | 0 (comb.) |
| Mode MUX | `lut_index_mux` | address = x (Sigmoid) or 2x (Tanh) | 1 |
| Table | `sigmoid_lut` | Sigmoid value, stored in single precision | 1 |
| Adder | `fp_add` | 2s = s + s | 3 |
| −1 | `fp_minus_one` | 2s − 1 (an `fp_add` with the constant −1.0) | 3 |
| Alignment, padding | `pipe_delay` | delays s and the mode to match the Tanh path; output registers up to `LATENCY` | 6 + (LATENCY − 9) |

`sigtanh_pkg` holds the number formats, the constants and the stage latencies.
`sigmoid_tanh_cfg` is the top level.

## The fixed-point address format

The table address is a 10-bit **sign-magnitude** number:

    bit 9      sign
    bits 8..6  integer part (0..7)
    bits 5..0  fraction (1/64 steps)

The range is ±7.984375 in steps of 0.015625, and the 1024 codes address the
table directly. Codes 0–511 are x = +0 … +7.984375, and codes 512–1023 are
x = −0 … −7.984375. Both +0 and −0 hold 0.5. A 12-bit (5,6) format would give
a range of ±31.98, but nearly all of that range lies where the Sigmoid is
already flat. Three integer bits keep the same 1/64 resolution with a smaller
table.

Conversion (`fp_to_fix`) rounds |x|·64 to the nearest integer, with halves
rounded away from zero. Magnitudes of 7.9921875 and above saturate to 511, and
so do infinities and NaNs. Subnormals read as zero.

In Tanh mode, doubling (`fix_shl1_sat`) shifts the magnitude left by one bit.
For |x| ≥ 4 the result no longer fits, so the magnitude saturates at 511
rather than wrapping around. Every such value lies beyond |2x| = 6, where the
table holds exactly 0 or 1, so Tanh correctly gives ±1.

## The table and where it saturates

Entry x holds:

    0                     for x < −6
    1                     for x > +6
    1 / (1 + e^(−x))      for −6 ≤ x ≤ 6, rounded to the nearest single-precision value

Sigmoid therefore saturates beyond |x| = 6 and Tanh beyond |x| = 3. The
table has no source file. It is computed during elaboration by constant
functions in `sigmoid_lut.sv`, using integer arithmetic with 62 fraction bits:

1. e^(−1/64) is summed from its Taylor series.
2. e^(−|x|) is its (64·|x|)-th power.
3. The entry is 1/(1+e) for x ≥ 0 and e/(1+e) for x < 0.
4. The result is rounded to nearest-even in single precision.

Every entry equals the correctly rounded Sigmoid value, and the testbench
checks this bit for bit. Synthesis sees a 1024 × 32-bit ROM (32 kbit).

## Accuracy

The errors come from the input quantization (1/64, or 1/128 of x in Tanh mode)
and from the saturation points:

* **Sigmoid:** the largest slope is 1/4, so quantization contributes at most
  about 0.002. Saturation at ±6 contributes at most 1 − σ(6) ≈ 0.0025. The
  testbench bound is 0.005.
* **Tanh:** the slope is at most 1, so quantization contributes about 0.004.
  Saturation at ±3 contributes 1 − tanh(3) ≈ 0.005. The testbench bound is
  0.01.

Inputs just above 3, below 3 + 1/128, quantize to 2x = 6 exactly. They read
σ(6) and give Tanh ≈ 0.99505 rather than exactly 1.

## Interface and timing (`sigmoid_tanh_cfg`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, all registers on the rising edge |
| `rst_n` | in | 1 | synchronous, active-low; clears only the valid bits |
| `in_valid` | in | 1 | a sample is presented this cycle |
| `mode` | in | 1 | 0 = Sigmoid, 1 = Tanh; sampled with the input |
| `ip` | in | 32 | input, IEEE-754 single |
| `out_valid` | out | 1 | outputs belong to the sample from `LATENCY` clocks earlier |
| `out_mode` | out | 1 | that sample's mode |
| `sigmoid_op` | out | 32 | table output: σ(x) in Sigmoid mode, σ(2x) in Tanh mode |
| `tanh_op` | out | 32 | 2·(table output) − 1: tanh(x) in Tanh mode |

* There is no back-pressure.
* The mode may change on every sample, so Sigmoid and Tanh requests can be
  interleaved freely.
* Only the output named by `out_mode` carries the requested function.

The parameter `LATENCY` (int, default 20) sets the total delay. The datapath
needs 9 clocks. The other `LATENCY − 9` clocks are output registers, so any
value ≥ 9 works (smaller values stop elaboration with an error). The default
of 20 matches the latency this architecture is specified with. The 9-clock
core is what the stages in the table above add up to.

## Floating-point details

`fp_add` is a general three-stage single-precision adder:

1. Order the operands by magnitude.
2. Align the smaller one with guard, round and sticky bits, then add or
   subtract.
3. Normalize, round to nearest-even and pack.

The adder has these simplifications:

* Subnormal inputs are treated as zero.
* Results that underflow are flushed to ±0.
* Overflow gives ±Inf.
* NaN operands, and Inf − Inf, give the quiet NaN `7FC00000`.

None of these cases can arise inside the unit, where the adder sees only
values in [0, 2].

## What is specified and what was chosen here

The following come from the architecture:

* the single shared Sigmoid table and the Tanh identity;
* the shift-based doubling on the input side;
* the adder-based doubling and the −1 on the output side;
* the mode multiplexer;
* the 10-bit (3,6) format and its range and resolution;
* the 1024-entry table;
* the saturation points ±6 (Sigmoid) and ±3 (Tanh);
* the 20-clock latency.

The following were chosen for this implementation:

* **Float format:** single precision.
* **Fixed-point coding:** sign-magnitude. The symmetric range implies it.
* **Rounding:** nearest, halves away from zero in the conversion;
  nearest-even in the table and the adders.
* **Saturation:** in the conversion and in the shift.
* **Table word:** single-precision floats, because the adder after the
  table works in floating point.
* **Stage depths:** the depth of each stage, and output padding to reach
  20 clocks.
* **Control:** the valid handshake, the mode encoding, and the synchronous
  reset of valid bits only.
* **Floating-point cores:** the adder is written here from scratch. The
  reported implementation of this architecture used two DSP slices,
  presumably from vendor floating-point cores.

**Not included.** This repository contains no LSTM cell, which is the
intended user of the unit. An LSTM cell would compute i, f, o and g in
parallel, then c, then h. Its matrix-vector datapath, sizes and weight
storage are outside the scope of this unit.

**Not verified.** The resource and timing figures reported for this
architecture on a Zynq xc7z010 (589 flip-flops, 1620 LUTs, 2 DSPs, a 1.343 ns
critical path) have not been reproduced. The RTL has only been linted,
elaborated and simulated.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench compares
the module against a model written independently with `real` arithmetic,
which lives in `tb/tb_fp_pkg.sv`. Each testbench ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench | Covers |
|---|---|
| `tb_fp_to_fix` | directed edges, a 1/64 and 1/128 sweep, random values over 15 binades, back-to-back samples, 1-cycle latency |
| `tb_fix_shl1_sat` | all 1024 codes |
| `tb_lut_index_mux` | random x, 2x, mode and valid on every cycle |
| `tb_sigmoid_lut` | all 1024 entries bit-exact, monotonicity, 1-cycle read |
| `tb_fp_add` | specials, cancellation, x + x, near and far exponents, bit-exact, 3-cycle latency |
| `tb_fp_minus_one` | values in [0, 2] and random values, bit-exact, 3-cycle latency |
| `tb_sigmoid_tanh_cfg` | the whole unit at its default parameters (see below) |

`tb_sigmoid_tanh_cfg` uses random modes and idle gaps. For every output it
checks:

* the exact latency of 20 clocks;
* the bit pattern against a model of the datapath;
* the error against the ideal function.

It also counts how often each mechanism occurs and fails if any never does:

* both modes, and mode switches between consecutive samples;
* saturation at both ends of each function;
* saturation in the conversion and in the shift;
* idle cycles.

## Simulating

Run from the repository root. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/sigtanh_pkg.sv tb/tb_fp_pkg.sv tb/tb_sigmoid_tanh_cfg.sv \
    --top-module tb_sigmoid_tanh_cfg -o sim
./obj_dir/sim
```

The packages are listed first. Verilator finds the modules through `-y`.
To run another module's testbench, give its file and `--top-module` instead.
The full-unit testbench finishes in a few seconds.

## Changing it

* **Latency:** set `LATENCY`. The pipeline stages themselves are fixed, and
  their depths are listed in `sigtanh_pkg` (`F2X_LAT`, `MUX_LAT`, `LUT_LAT`,
  `ADD_LAT`).
* **Resolution or range:** change `INT_W` / `FRAC_W` in `sigtanh_pkg`. The
  table depth (`LUT_DEPTH = 2^(1+INT_W+FRAC_W)`) and its contents follow
  automatically. The saturation point is `6 << FRAC_W` in `sigmoid_lut`.
  `fp_to_fix` assumes 6 fraction bits in its shift range (`17 − e`) and
  would need to be adjusted. A finer resolution lowers the error but doubles
  the table for each extra bit.
