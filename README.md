# Rounding-based multiplier with exact correction (MROBA)

Multiplying by a power of two costs only a shift. This multiplier uses that. It rounds each
operand to its nearest power of two, `Ar` and `Br`, and uses the identity

    A*B = Ar*B + Br*A - Ar*Br + (A - Ar)*(B - Br)

The first three terms need only shifters, one adder and one subtractor. Dropping the last
term gives the **rounding-based approximate multiplier (RoBA)**: fast and small, but not exact.
For example, 18 x 28 gives 512 instead of 504.

The **modified multiplier (MROBA)** in this repository returns the exact product. It still uses
only the RoBA datapath. The dropped term `(A - Ar)*(B - Br)` is itself a product, of two
small numbers, so a second RoBA stage computes it. That stage's own dropped term goes to a third
stage, and so on. After a few stages the term is zero, and the stage outputs add up to `A*B`.

A multiply-accumulate (MAC) register can add the exact product to a running sum on each clock.

The default size is 8-bit two's-complement operands and a 16-bit product.

## The rounding rule

Take a magnitude `m`, and let `k` be the position of its leading one. Then `m` lies in
`[2^k, 2^(k+1))`.

- If bit `k-1` is 0, then `m < 1.5*2^k` and `m` rounds down to `2^k`.
- If bit `k-1` is 1, then `m >= 1.5*2^k` and `m` rounds up to `2^(k+1)`.

The value `3*2^(k-1)` lies exactly halfway between the two powers. It rounds **up**. A larger
rounded value makes the later terms smaller in hardware.

In the circuit, a leading-one detector produces `k`. A small adder then adds the "round up" bit
to get the exponent `e` (0..N). A zero operand rounds to 0, and all its shifted terms are
forced to 0.

The rounding error is always less than half the rounded value: `|m - 2^e| < 2^e / 2`. When
rounding up it is at most `2^e / 4`. This bound is what makes the correction below finish
quickly.

## The RoBA datapath (`roba_mult`)

The instance names follow the RTL schematic of the original implementation:

| instance | module          | computes                                   |
|----------|-----------------|--------------------------------------------|
| `S1`     | `sign_detector` | `|A|`, `|B|`, product sign                   |
| `R1`     | `rounding`      | exponents `ea`, `eb`; `Ar`, `Br` (one-hot) |
| `S11`    | `shifter` 1     | `Ar*B  = |B| << ea`                        |
| `S2`     | `shifter` 2     | `Ar*Br = Ar << eb`                         |
| `S3`     | `shifter` 3     | `Br*A  = |A| << eb`                        |
| `A1`     | `ks_adder`      | `Ar*B + Br*A` (Kogge-Stone)                |
| `S233`   | `subtractor`    | `(Ar*B + Br*A) - Ar*Br` (4-bit CLA groups) |
| `sa16`   | `sign_set`      | two's-complement negation if the product is negative |

The terms are `2N+1` bits wide, because `Ar*Br` can reach `2^(2N)`. The approximate magnitude is
never negative. It also fits in `2N` bits: at N = 8 the largest value is 65,024, checked over
all pairs. So `sign_set` truncates to `2N` bits without loss. Two simulation assertions in
`roba_mult` guard these facts: the adder never carries out and the subtractor never borrows.

`roba_mult` has two more outputs, `res_a = A - sign(A)*Ar` and `res_b` for B. These are the
signed rounding errors. They are at most `2^(N-2)` in magnitude, so they fit in N signed bits.

## Making it exact: the correction cascade (`mroba_mult`)

`mroba_mult` chains `STAGES` copies of `roba_mult`:

    stage 0:  operands (x, y)              -> term0 = x*y - e0a*e0b
    stage 1:  operands (e0a, e0b)          -> term1 = e0a*e0b - e1a*e1b
    stage 2:  operands (e1a, e1b)          -> ...
    p = term0 + term1 + ... (mod 2^(2N))

The sum telescopes, so `p = x*y - (last stage's dropped term)`. A stage is exact when either of
its operands is zero or a power of two. In that case it hands on a zero error, and every later
stage outputs 0.

Each error is less than half the rounded value, so an operand loses at least one bit per stage,
and usually two. An exhaustive check over all operand pairs gives the worst-case number of stages
needed:

| N  | unsigned | signed |
|----|----------|--------|
| 4  | 3        | 2      |
| 6  | 4        | 3      |
| 8  | 5        | 4      |
| 10 | 6        | 5      |

In general, unsigned operands need `N/2 + 1` stages and signed ones need `ceil(N/2)`. The
default `STAGES = N/2 + 1` (from `mroba_pkg::default_stages`) covers both.

- **Signedness of the stages.** Only stage 0 reads the operands in the configured signedness.
  The rounding errors are always signed, so stages 1 and later are always built signed.
- **Wrap-around.** The stage outputs are added modulo `2^(2N)` with Kogge-Stone adders. This is
  exact because the true product always fits in `2N` bits.
- **Extra outputs.** `p_approx` is stage 0 alone, the plain RoBA result. `active[i]` is high
  when stage `i` had two non-zero operands, meaning it still had a correction to make.

Setting `STAGES = 1` turns the module back into the plain approximate multiplier. Values between
1 and the default trade accuracy against area.

## Signed and unsigned operation

With `SIGNED = 1` (the default), operands are two's complement. `sign_detector` takes the
magnitudes; the most negative value `-2^(N-1)` still fits as an N-bit magnitude. `sign_set`
negates the result when the operand signs differ.

With `SIGNED = 0`, operands are unsigned. The sign blocks then pass the values through and never
negate.

## MAC accumulator (`mac_unit`)

On each rising edge with `en` high, the accumulator adds the product to `acc`:

- the product is sign-extended (or zero-extended when unsigned) to `ACCW` bits;
- a Kogge-Stone adder does the addition.

The controls work as follows:

- `clr` empties the accumulator and takes priority over `en`.
- `rst_n` is an asynchronous, active-low reset.
- `ovf` is a sticky flag. It is set when an addition leaves the `ACCW`-bit range, and it is
  cleared by `clr` or reset.

The accumulator wraps. Its default width is `ACCW = 2N + 8`, which allows at least 256
full-scale products before it can overflow.

## Top level (`mroba_top`)

| port       | dir | width  | meaning |
|------------|-----|--------|---------|
| `x`, `y`   | in  | N      | operands |
| `p`        | out | 2N     | exact product, combinational from `x`, `y` |
| `p_approx` | out | 2N     | RoBA approximation, combinational |
| `active`   | out | STAGES | busy correction stages |
| `clk`, `rst_n` | in | 1  | clock and asynchronous reset of the accumulator |
| `mac_en`, `mac_clr` | in | 1 | accumulate `p` / clear, sampled on the rising edge |
| `acc`, `ovf` | out | ACCW, 1 | accumulator and sticky overflow |

Parameters: `N = 8`, `SIGNED = 1`, `STAGES = N/2 + 1`, `ACCW = 2N + 8`.

The multiplier has no clock and no pipeline. The product is valid one combinational delay after
the operands change. The accumulator reflects an enabled product one clock later. At the default
size, generic synthesis gives about 2,200 word-level cells and 25 flip-flops.

## How closely this follows the original design

These parts follow the original description:

- the rounding-to-nearest-power-of-two rule, with ties rounded up;
- the +1 adder after the leading-one stage;
- three shifters for `Ar*B`, `Br*A` and `Ar*Br`;
- the Kogge-Stone adder for shifters 1 and 3, followed by the subtractor for shifter 2;
- the sign detector and sign set, used only for signed operands;
- 8-bit operands with a 16-bit product;
- exact outputs for the modified multiplier, including its published example vectors:
  18 x 28 = 504, 20 x 28 = 560, 40 x 30 = 1200.

These are this design's own choices:

- **The correction cascade.** The original claims exact results for the modified multiplier but
  does not describe how it gets them. The cascade is the construction chosen here to deliver
  that function with the same building blocks. Treat it as a design of this repository, not a
  reproduction.
- **Block internals.** The barrel-shifter structure, the Kogge-Stone prefix tree, the 4-bit
  carry-lookahead groups of the subtractor and the negation circuit are standard choices. The
  lookahead groups were suggested by the original's critical-path report.
- **Term width.** The internal term width of `2N+1` bits is a choice. The original speaks of
  N-bit shifters and adder, which cannot hold the terms.
- **The fourth shifter.** The original schematic shows a fourth shifter instance that its text
  never uses. It is not built.
- **The MAC unit.** Beyond its existence, nothing about it comes from the original: its width,
  its controls, its reset and its overflow flag are all choices.
- **Signed variants.** The original mentions one unsigned and two signed variants. Only one
  signed form (two's complement with sign/magnitude processing) is built, selected by `SIGNED`.

Image workloads (smoothing and sharpening on 8-bit pixels) need 9-bit signed operands when
coefficients are negative. They are exercised with `N = 9`; see below.

## Files

- `rtl/mroba_pkg.sv`: shared helpers (exponent width, default stage count).
- `rtl/sign_detector.sv`, `rounding.sv`, `shifter.sv`, `ks_adder.sv`, `subtractor.sv`,
  `sign_set.sv`: the RoBA building blocks.
- `rtl/roba_mult.sv`: the approximate multiplier.
- `rtl/mroba_mult.sv`: the exact multiplier.
- `rtl/mac_unit.sv`: the accumulator.
- `rtl/mroba_top.sv`: the top level.
- `tb/*_tb.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a cycle watchdog.
- `tb/tb_ref_pkg.sv`: the reference models. Its rounding searches all powers of two instead of
  using the leading-one rule, so it is independent of the RTL.
- `tb/mroba_top_tb.sv`: the full-size test at default parameters. It covers all 65,536 operand
  pairs (exact and approximate product), the accumulator with random enable and clear, and a
  forced overflow. It counts each mechanism: rounding down, rounding up, ties, zero operand,
  negative product, 1 to 4 busy stages, accumulate, hold, clear and overflow.
- `tb/image_filter_tb.sv`: 3x3 Gaussian smoothing and 3x3 sharpening of a generated 16x16 image
  through the MAC path at `N = 9`. It checks each filtered pixel and the 10-cycle cost per
  pixel. It also reports the error that the rounding-only products would have caused: none for
  smoothing, whose coefficients are powers of two, and up to 64 for sharpening.

## Simulating

With Verilator 5, from the repository root:

    verilator --binary --timing --assert -Irtl -Itb rtl/mroba_pkg.sv tb/tb_ref_pkg.sv \
        tb/mroba_top_tb.sv --top-module mroba_top_tb -Mdir obj_top
    ./obj_top/Vmroba_top_tb

Replace `mroba_top_tb` with any other testbench name. Each testbench runs in about a second.

To change the size, override `N`, `SIGNED`, `STAGES` or `ACCW` on `mroba_top`. If you lower
`STAGES` below `N/2 + 1`, `p` is no longer exact for every pair.
