# A bit-level pipelined single precision log2 unit

This unit computes `log2(x)` for IEEE-754 single precision operands and
delivers one result per clock. Its defining idea is that **no pipeline stage
holds more than about one full adder of logic**. Additions ripple through a
chain of registers, one bit per clock. Multiplications advance one carry-save
row per clock. The coefficient table is a ROM cut into decode, word-select and
group-select stages. The price is a long pipeline of 249 cycles. The gain is a
clock period of roughly one flip-flop plus three or four gate delays.

The mathematics is the classic split of a logarithm into exponent and
mantissa. The mantissa part comes from a small lookup table refined by
parabolic interpolation. It is accurate to within 0.52 units in the last place
(ulp) on every input range tested. The accuracy target was 21 correct bits
(an error under 4 ulp).

| property | value |
|---|---|
| operand / result | IEEE-754 binary32 / binary32 |
| throughput | 1 result per clock, no stalls |
| latency | 249 clocks (`lcu_pkg::LCU_LATENCY`) |
| table | 384 segments × 65 bits (y0 31, a 12, −b 22), computed at elaboration |
| measured error | worst 0.522 ulp, mean 0.25 ulp (about 580k operands) |
| special values | NaN/negative → quiet NaN, ±0 → −inf, +inf → +inf, 1.0 → +0 |
| subnormals | normalized first; they get their true logarithm (down to −149) |

## How the logarithm is formed

Write a positive normal operand as `x = 2^e · 1.m`. Taking `log2(1.m)`
directly from a table would lose relative accuracy next to `x = 1`, where the
result is tiny. The unit therefore changes both the interval and the function
it interpolates.

1. **Re-centring.** If `1.m ≥ 1.5`, the mantissa is halved and the exponent
   incremented. Then `x = 2^e' · t` with `t ∈ [0.75, 1.5)`. With `d = t − 1`,
   `d` lies in `[−0.25, 0.5)` and is exact in 24 fractional bits.
2. **Factoring out d.** `log2(x) = e' + d · g(d)`, where
   `g(d) = log2(1+d)/d`. `g` is smooth and lies between 1.17 and 1.67
   (`g(0) = 1/ln 2`). An approximation of `g` with a small *relative* error
   gives `d·g` the same small relative error, even when `d = 2^-24`.
3. **Table and parabola.** `u = d + 0.25 ∈ [0, 0.75)` is cut into 384
   segments of width `h = 2^-9`. For segment `i`, take `g0, g1, g2` at the
   three points `u_i, u_i + h, u_i + 2h`. The table holds the parabola through
   them, written in the local coordinate `x ∈ [0,1)`:

       g ≈ y0 + b·x + a·x²,   y0 = g0,
       a = (g0 − 2·g1 + g2) / 2,   b = (4·g1 − 3·g0 − g2) / 2.

   `a` is positive and `b` negative on every segment, so the ROM stores `a`
   and `−b` as unsigned numbers. All multipliers are then unsigned. Every
   field has its least significant bit at 2^-30. The entries are produced by
   `lcu_pkg::coef_table()` during elaboration, using integer arithmetic only
   (`log2` by repeated squaring with 46 fractional bits). No data file is
   involved.
4. **Recombination.** `L = |d| · g` is exact to 2^-54. The result magnitude
   is `M = |e'| + L` when `e'` and `d` have the same sign (or `e' = 0`), and
   `M = |e'| − L` otherwise. The subtraction can never cancel badly, because
   `|L| < 0.59 ≤ |e'|`. `M` has 8 integer and 54 fractional bits. It is
   normalized, rounded half-up to 24 bits, and packed.

The segment index and the local coordinate fall straight out of the mantissa
bits, with no arithmetic:

- if `m[22] = 1`, then `u = m[21:0]` and `|d| = 2^22 − m[21:0]`;
- if `m[22] = 0`, then `u = 2·m + 2^22` and `|d| = 2·m`.

`u[23:15]` is the segment and `u[14:0]` is `x`.

## The pipeline, cycle by cycle

Each section starts at the cycle shown, counted from when the operand is
sampled. Sections on the same line run in parallel. Values a section does not
use travel beside it in plain register chains (`pipe_delay`). All numbers come
from `lcu_pkg` (`LAT_*`, `T_*`).

| cycle | section | stages | built from |
|---:|---|---:|---|
| 0 | classify operand; shift subnormal significands up | 5 | `pipe_normalize` |
| 5 | unpack: `e'`, `u`, operands for `|d|` | 1 | registers |
| 6 | `x·x` ‖ ROM read ‖ `|d|` (23-bit increment) | 29 ‖ 3 ‖ 23 | `pipe_csa_mult` 15×15 ‖ `lcu_coef_rom` ‖ `pipe_rca` |
| 35 | `a·x²` ‖ `(−b)·x` | 26 ‖ 36 | `pipe_csa_mult` 12×15 ‖ 22×15 |
| 71 | 3:2 carry-save row: `y0 + a·x² + ~(−b·x)` | 1 | 31 `full_adder`s |
| 72 | `g` = sum + carry + 1 | 31 | `pipe_rca` |
| 103 | `L = |d| · g` | 53 | `pipe_csa_mult` 31×23 |
| 156 | `M = |e'| ± L` | 62 | `pipe_rca` |
| 218 | leading-one normalization of `M` | 6 | `pipe_normalize` |
| 224 | round to 24 bits | 24 | `pipe_rca` (increment) |
| 248 | special-value select, exponent `134 − shift + carry`, pack | 1 | registers |

A valid bit travels beside the operand through a 249-deep reset chain.
Nothing can stall the pipeline, and no operand can overtake another.

Three places do slightly more than one full adder of work in a stage:

- the unpack and pack stages each do an 8-bit exponent subtraction;
- a normalizer stage tests up to 32 bits for zero;
- a ROM stage merges 16 words or 32 groups.

Each of these could be split into more stages if a target technology
required it.

The RTL also ignores fanout. A ROM select line drives all 65 bits of
every word it gates. Each bit of a multiplier's `b` operand drives the
AND gates of a whole row. A gate-level build for a fast clock would buffer these nets, or
replicate their drivers, in extra stages.

## Building blocks

### `full_adder`
This is the sum-of-products full adder:
`s = a'b ci' + a b' ci' + a' b' ci + a b ci` and `co = a·ci + b·ci + a·b`.
Every adder and multiplier below is built from instances of it.

### `pipe_rca` — one full adder per stage
Stage `k` adds bit `k` of the operands and the carry from stage `k−1`. It then
registers three things:

- the new carry;
- the sum bits finished so far;
- the operand bits still to be added.

A new operand pair can enter every clock. Latency is `WIDTH` cycles. The
carry-in port lets the same block subtract (invert one operand, `ci = 1`) and
increment (`b = 0`, `ci = 1`). The default `WIDTH = 4` is the smallest
complete example.

### `pipe_csa_mult` — one carry-save row per stage
Row `j` forms the partial product `a & b[j]` and adds it to the running sum
and carry vectors in a single row of full adders. Each carry moves one column
left into the *next* row instead of rippling along the row. Row `j` drops
product bit `j` out of column 0. After `BW` rows, the remaining sum and carry
vectors are merged by a `pipe_rca` of `AW − 1` stages. The top product bit is
the OR of the last carry and the top carry-vector bit, which can never both be
one. Latency is `BW + AW − 1` cycles: 7 for the 4 × 4 default (four rows, then
three final-adder stages). The operands are unsigned.

### `pipe_rom` — decoder-based pipelined ROM
Words are grouped as `2^H_W` groups of `2^L_W` words. The ROM has three
stages:

1. a one-hot group decoder (on the high address bits) and a one-hot word
   decoder (on the low bits) register their outputs;
2. inside every group, the word-select lines gate the words and an OR tree
   picks one candidate per group;
3. the group-select lines gate the candidates into the output register.

The default is 64 × 8 with two 1-of-8 decoders. Contents come in through the
`INIT` array parameter. Its default is all zero, because this example ROM has
no meaningful contents of its own.

### `lcu_coef_rom`
This is the coefficient table in a `pipe_rom` of 512 × 65 bits, with 32
groups of 16 words. Words 384–511 are zero. The output is the `coef_t`
struct `{y0, a, b}`.

### `pipe_normalize`, `pipe_delay`
These are helpers. `pipe_normalize` is a leading-one shifter with one stage
per power-of-two shift. `pipe_delay` is a register chain that keeps side
values aligned with the arithmetic.

## Interface of `lcu_top`

| port | dir | width | meaning |
|---|---|---:|---|
| `clk` | in | 1 | clock; everything is rising-edge |
| `rst_n` | in | 1 | asynchronous active-low reset; it clears only the valid chain |
| `in_valid` | in | 1 | `x` holds an operand this cycle |
| `x` | in | 32 | operand |
| `out_valid` | out | 1 | `in_valid` delayed by 249 cycles |
| `y` | out | 32 | `log2(x)` of the operand that entered 249 cycles earlier |

The data registers have no reset. Their contents are meaningless until
`out_valid` rises.

## Where this design departs from the original

The design follows a published single precision logarithm unit ("A
Pipelined, Single Precision Floating-Point Logarithm Computation Unit in
Hardware"). That design defines the method: exponent plus table-based
parabolic interpolation of the mantissa. It also defines the three pipelined
building blocks (bit-per-stage ripple adder, carry-save array multiplier,
decoder-based ROM) and the one-full-adder stage depth. It does not publish its
datapath, its table layout or its table contents. Everything below is
therefore this implementation's own choice.

- **Table.** The original uses 648 entries of 12 bytes (7.776 KB). Its
  segmentation is not known, and 648 is not a power of two. This design uses
  384 uniform segments of 65 bits (3.1 KB). It interpolates `g(d)` rather
  than `log2`, and it re-centres the mantissa. The measured error (≤ 0.52
  ulp) is well inside the original's 21-bit (2-bit tolerance) target.
- **Latency.** The original quotes 240 stages. This design has 249: 5 stages
  normalize subnormals, and the other 244 follow from the datapath above.
- **Table contents** are computed exactly at elaboration time rather than
  taken from a math library.
- **Special values and rounding** are not specified by the original. The
  choices are the ones in the table at the top: round half-up, and
  subnormals normalized.
- **Small exponent arithmetic** (8-bit) is done in a single stage, not bit
  by bit. See the list at the end of the pipeline section.
- Only **log2** is built. Another base `n` needs one further multiplication
  by the constant `1/log2(n)`, which is not included.
- The original's 65 nm throughput estimate (2.9 G results/s) depends on a
  cell library. It cannot be confirmed from RTL. The RTL only guarantees one
  result per clock.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line.

| testbench | what it checks |
|---|---|
| `tb_full_adder` | all 8 input combinations against `a + b + ci` |
| `tb_pipe_rca` | 4-bit: all 512 `(a, b, ci)` back to back; 32-bit: random operands and a full-length carry ripple. Each result is checked exactly `WIDTH` cycles later. |
| `tb_pipe_csa_mult` | 4×4: all 256 pairs; 22×15: random pairs and all-ones. Each product is checked exactly `BW+AW−1` cycles later. |
| `tb_pipe_rom` | 64×8 with a scrambled pattern: every address, then random reads, checked 3 cycles later |
| `tb_lcu_coef_rom` | every word against coefficients computed independently in double precision (±2 LSB), the parabola against `g` at 4 points per segment (relative error < 2^-27), and unused words zero |
| `tb_lcu_top` | 4000 mixed operands, streamed with random idle cycles. Results are checked to < 4 ulp against `$ln(x)/$ln(2)`, special values exactly, and the latency exactly. It also counts each datapath path (add, subtract, `e'=0` with `d` above and below zero, rounding carry-out, subnormal, each special class, idle cycles) and fails if any path is never taken. |
| `tb_lcu_workloads` | accuracy survey. It checks the operands 1 − 2^-23 and 1 + 2^-23 (both give the correctly rounded result). It sweeps every 64th mantissa of [0.25,0.5), [0.5,1), [1,2) and [2,4), every operand within 8192 ulp of 1.0, 20000 random normal operands and 20000 subnormal ones. It prints the worst and mean error per range, and fails any range whose mean error reaches 0.59 ulp. |

The full 2^31-operand sweep has not been simulated. About 2^19 operands have
been.

To run one testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/lcu_pkg.sv \
        tb/tb_lcu_top.sv --top-module tb_lcu_top -Mdir obj_top
    ./obj_top/Vtb_lcu_top

Replace `tb_lcu_top` with any other testbench name. Verilator finds the
modules in `rtl/` by file name (`-Irtl`). `tb_lcu_workloads` takes about
8 seconds; the others take well under one.

## Changing the design

- **Table resolution.** `SEG_BITS`, `SEGS`, and the field widths `Y_W`,
  `A_W`, `B_W` in `lcu_pkg` set the table. `coef_table()` recomputes the
  contents. The widths must still hold the largest `y0`, `a` and `−b`
  (`tb_lcu_coef_rom` catches an overflow). Changing `SEG_BITS` changes the
  split of `u` into segment and `x` bits, and with it the multiplier sizes.
- **Latency bookkeeping.** All delay-chain depths in `lcu_top` are derived
  from the `LAT_*` and `T_*` constants in `lcu_pkg`. After changing a block's
  structure, update its `LAT_*` entry and the rest follows.
- **Stage depth.** To reach a shorter clock period, split the stages listed
  at the end of the pipeline section, and add the extra cycles to the
  matching `LAT_*` constant.

## Files

`rtl/`: `lcu_pkg` (constants, types, table generator), `lcu_top`,
`lcu_coef_rom`, `pipe_rom`, `pipe_csa_mult`, `pipe_rca`, `full_adder`,
`pipe_normalize`, `pipe_delay`. `tb/`: one testbench per block, plus
`tb_lcu_workloads`.
