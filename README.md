# Aging-aware fused floating-point dot product with Vedic multipliers

This unit computes the two-term dot product `A*B + C*D`, or `A*B - C*D`, as
one fused operation. It has four 16-bit floating-point operands and a 32-bit
result. Neither product is rounded; only the final sum is rounded, once.

The two significand products come from Vedic multipliers of the
"vertically and crosswise" (Urdhva Tiryakbhyam) kind. Their timing is managed
at run time rather than by a worst-case clock:

* **Adaptive hold logic (AHL)** looks at each multiplier operand before the
  multiplication starts. If the operand has many zeros, the multiplication
  is short, and the AHL lets it finish in one cycle. Otherwise the AHL gives
  it two cycles.
* **Razor flip-flops** capture the product. Each has a shadow latch that
  samples the same signal a little later, on a delayed clock. If a
  one-cycle multiplication was in fact too slow, the main flip-flop and the
  shadow latch disagree. The Razor register then reloads the late, correct
  value and the operation takes one extra cycle.
* **Aging indicator.** As transistors age (NBTI/PBTI), more patterns become
  too slow. An aging indicator counts the Razor errors. Once they come too
  often, it switches the AHL to a stricter rule, so that fewer patterns get
  only one cycle.

The floating-point part is a classic fused dot-product datapath. It has these
stages: exponent compare, magnitude compare, alignment with a sticky bit, a
two's complement for effective subtraction, a 4:2 carry-save compressor and
adder, a leading-zero anticipator (LZA), and normalisation with rounding.

## What is computed

| item | choice |
|---|---|
| operands `a`, `b`, `c`, `d` | IEEE-754 binary16 (1 sign, 5 exponent, 10 fraction bits), subnormals supported |
| result `fmma_result` | IEEE-754 binary32, round to nearest, ties to even |
| `op` | 0: `A*B + C*D`; 1: `A*B - C*D` |
| special values | NaN in, `Inf*0`, or `Inf - Inf` gives the quiet NaN `0x7FC00000`; infinities keep their sign; `(-0) + (-0)` gives -0, an exact cancellation gives +0 |

The products of binary16 numbers have at most 22 significant bits, and their
exponents stay well inside the binary32 range. So the fused result can
neither overflow nor underflow, and it is never a binary32 subnormal. An
assertion in the top checks this.

The 16x16 Vedic multipliers receive the 11-bit significands zero-extended to
16 bits. That is the multiplier size of the design, and it also means the
AHL always sees at least five zeros in an operand.

## Datapath

```
 a,b ──► vedic_ahl_unit u_ab ──► prod_normalize ─┐      ┌─► mag_compare (A*B > C*D)
 c,d ──► vedic_ahl_unit u_cd ──► prod_normalize ─┼──────┤
 exponents of a..d ──────────────────────────────┘      └─► exp_comp ──► alignment shift
                                                                        result exponent
 align (swap, shift) ─► sticky ─► comp_2s ─► csa_4_2 (+ final adder) ─► normalize_round
                          └──────────────► lza ─────────────────────────────┘
```

* **Products.** `prod_normalize` moves the leading one of each 22-bit
  product to bit 21 and reports the shift. For normal operands the shift is
  0 or 1, the "product overflow" bit.
* **Exponent compare (`exp_comp`).** Each product exponent is
  `ea + eb - shift + 98`, re-biased from two binary16 biases to the binary32
  bias. Two 2:1 multiplexers, steered by `A*B > C*D`, pick the bigger and
  the smaller exponent. Their difference is the alignment shift. The result
  exponent is the bigger exponent minus the adjustment reported by the
  rounder.
* **Magnitude compare (`mag_compare`).** It compares whole magnitudes:
  first the exponent, then the significand. The subtraction is always
  *bigger minus smaller*, so the sum is never negative and needs no
  complement afterwards.
* **Adder window (`align`, `sticky`).** The adder works on a 48-bit window.
  The bigger product sits with its leading one at bit 46, and bit 47 takes
  the carry of an addition. The smaller product is shifted right. Anything
  shifted below bit 0 is ORed into bit 0 as a sticky bit. 48 bits leave
  enough guard positions: after a one-bit cancellation there is still a
  24-bit significand, a round bit and a separate sticky position.
* **Complement and adder (`comp_2s`, `csa_4_2`).** On effective subtraction,
  `comp_2s` inverts the smaller product and supplies the +1 as a separate
  row. `csa_4_2` compresses the rows and adds them. The products arrive as
  complete words, so the fourth compressor row is tied to zero.
* **Leading-zero anticipator (`lza`).** It works on the two operands of the
  subtraction, in parallel with the adder. Its pre-encoder is
  `Y(i) = ~(A(i) ^ ~B(i)) & (A(i-1) | ~B(i-1))`, followed by a priority
  encoder. For `A >= B` the count is exact or one short.
  `normalize_round` shifts by this count and shifts one place more if the
  top bit is still zero. For additions it uses an ordinary leading-zero
  count of the sum.
* **Rounding (`normalize_round`).** It keeps 24 bits and rounds to nearest
  even. A rounding carry (`1.11…1` becoming `10.0…0`) is passed back as
  part of the exponent adjustment.

### Bypass paths: adder use and single-multiplier use

The unit can stand in for a plain floating-point adder or a plain
multiplier. Two sets of multiplexers in the top serve these uses:

* **Adder use.** When `|B| = |D| = 1.0`, the products are just the
  significands of `A` and `C` shifted left by 10 places. In that case the
  multipliers are not started, and multiplexers pass the shifted
  significands on as the products. The result comes one clock edge after
  acceptance, instead of two or three, and `two_cycle` and `razor_error`
  read zero.
* **Single-multiplier use.** When exactly one product is zero (for example
  `A = 0` to compute `C*D` alone), the other product is forwarded straight
  to the result. It skips alignment, addition and normalisation. A
  normalised 22-bit product with its binary32 exponent is already an exact
  binary32 number, so nothing needs rounding.

Both bypasses give bit-for-bit the same results as the normal path.

## Variable-latency multiplication: AHL and Razor

Each `vedic_ahl_unit` has these parts:

* an input register, loaded only when an operation starts (this is the
  AHL's input gating);
* the combinational `vedic_mul16x16`;
* a 32-bit `razor_register`;
* the `ahl` block.

`vedic_mul16x16` is built from four 8x8 multipliers, each 8x8 from four
4x4, and each 4x4 from four `vedic_mul2x2` cells. `vedic_combine` adds the
four partial products at every level: the two crosswise products first, then
the upper half of the low vertical product, then the high vertical product
with the carries.

### AHL decision

`ahl` counts the zeros of the multiplier operand `b` and compares the count
in two judging blocks:

* judging block 1: one cycle is enough if zeros > `N_ZEROS` (default 8);
* judging block 2: one cycle is enough if zeros > `N_ZEROS + 1`.

A multiplexer takes block 1 while the aging indicator is clear, and block 2
once it is set. A flip-flop stores the inverted decision as `two_cycle` when
the operation starts.

### Cycle schedule

Counted from the clk edge that accepts `start`:

| cycle | one-cycle, no error | one-cycle, Razor error | two-cycle |
|---|---|---|---|
| 1 | multiply; the Razor register samples at the end | same | multiply |
| 2 | check enabled, no mismatch: `done` | mismatch: `razor_err`; the next edge reloads from the shadow latches | the Razor register samples again |
| 3 | — | `done` | `done` |

The product stays on `product` until the next start.

### Razor flip-flop (`razor_ff`)

A `razor_ff` has these parts:

* a main flip-flop on `clk`;
* a shadow latch, transparent while the delayed clock `clk_del` is high;
* an XOR comparator giving the local error;
* a multiplexer in front of the main flip-flop. It takes the shadow value
  when the local error is set.

`razor_register` ORs the local errors into one error signal.

The comparison is enabled only in the check cycle of a one-cycle operation
(`check`). A two-cycle operation therefore never raises an error, and
neither does the sample taken while new operands are loaded.

The shadow latch is a real level-sensitive latch. Synthesis reports it as
such: 32 latch bits per multiplier, fewer in the top, where constant product
bits are removed.

### Aging indicator (`aging_indicator`)

It counts the operations and the Razor errors in windows of `AGE_WINDOW`
operations (default 64). Both counters clear at the end of each window. When
a window reaches more than `AGE_THRESHOLD` errors (default 4), `aging` is set
and stays set until reset.

### Delayed clock `dclk`

`dclk` must rise after `clk` and fall well before the next `clk` edge. The
testbenches use a 10 ns clock, with `dclk` high from 2 ns to 5 ns after each
rising `clk` edge.

For correct operation, a path judged "one cycle" must settle before `dclk`
falls. The shortest paths must not change the multiplier output before
`dclk` falls, which is the usual Razor hold constraint. Here the operands are
held for the whole operation, so the second condition holds.

## Top-level interface (`fused_dot_product_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `dclk` | in | 1 | clock and delayed clock for the shadow latches |
| `rst_n` | in | 1 | synchronous, active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | operands are taken on a rising edge with both high |
| `a`, `b`, `c`, `d` | in | 16 | binary16 operands |
| `op` | in | 1 | 0 add, 1 subtract `C*D` |
| `out_valid` | out | 1 | one-cycle pulse, `fmma_result` valid (it is also held) |
| `fmma_result` | out | 32 | binary32 result |
| `razor_error` | out | 2 | Razor error in the last operation (bit 0: `A*B` unit, bit 1: `C*D` unit) |
| `two_cycle` | out | 2 | the AHL gave the last operation two cycles |
| `aging` | out | 2 | aging indicators |

Parameters: `N_ZEROS` = 8, `AGE_WINDOW` = 64, `AGE_THRESHOLD` = 4.

Only one operation is in flight at a time. `out_valid` rises 2 clock edges
after the accepting edge when both multipliers finish in one cycle. It rises
after 3 edges when either multiplier needs two cycles or recovers from a
Razor error. In adder use (`|B| = |D| = 1.0`) it rises after 1 edge. The next operation can be presented in the cycle after
`out_valid`.

## Departures and own choices

The block structure above follows the published design. Its top-level block
list is exponent compare, magnitude comparator, two Vedic-AHL multipliers,
align, two's complement, sticky, 4:2 CSA, and normalise/round. It also
follows the published exponent-compare, LZA, Vedic multiplier, AHL and
Razor descriptions.

The following are this implementation's own decisions:

* **Number formats.** The design specifies 16-bit operands and a 32-bit
  result, not the encoding. binary16 in and binary32 out is an assumption.
* **Product form.** In the classic fused dot-product unit, the multiplier
  trees deliver their products in carry-save form to the 4:2 compressor.
  Here the Vedic multipliers deliver complete products, and the Razor
  registers hold them. The compressor's fourth row is therefore zero.
* **No result complement.** There is no complement stage after the adder.
  The magnitude comparator orders the products by their full magnitude
  instead of by exponent only.
* **Product exponent.** The single "product overflow" input of the exponent
  compare is generalised to a normalisation shift, so that subnormal
  operands work.
* **Bypass details.** The original names the two bypass uses (adder with
  `B = D = 1`, single multiplier with `A` or `B` = 0) but not their
  circuits. The trigger conditions, the sign-insensitive test for 1.0, and
  the one-edge latency of adder use are this implementation's choices.
* **"Early normalisation".** It is mentioned as a way to shrink the adder,
  but not described, and is not built.
* **AHL operand.** The source text names the "multiplier" for one judging
  block and the "multiplicand" for the other. Here both count the zeros of
  the multiplier operand `b`. They are alternatives chosen by a
  multiplexer, so judging the same operand is the consistent reading.
* **Assumed sizes.** `N_ZEROS`, `AGE_WINDOW` and `AGE_THRESHOLD` are not
  specified anywhere. Neither are the sticky aging output, the
  `start/ready/done` and `in_valid/in_ready` handshakes, the Razor check
  enable, the cycle schedule, or round-to-nearest-even. All of these are
  assumptions.
* **Multiplier hierarchy.** The source text says at one point that two 2x2
  blocks make a 4x4 multiplier. The 16x16 diagram uses four sub-multipliers
  per level, and that arrangement is used at every level.
* **Delayed clock.** It is an input: how it is generated (a delay line, a
  clock-manager phase) is outside this RTL.
* **Published results not reproduced.** Published figures of the original
  FPGA implementation cannot be reproduced from this RTL: the slice and LUT
  counts, the 6.6 ns delay and the power. The same holds for a published
  simulation result value. For comparison, a generic gate-level synthesis of
  this RTL keeps 236 flip-flops and 48 shadow latches. Those are the two
  32-bit Razor registers, minus their bits that are always zero. The
  original reports 234 flip-flops and 64 latches.

## Files

`rtl/`:

* Package: `fdp_pkg` (formats, widths, biases, the `half_t`/`single_t`
  structs).
* Top: `fused_dot_product_top`.
* Multipliers: `vedic_ahl_unit`, `ahl`, `aging_indicator`,
  `razor_register`, `razor_ff`, `vedic_mul16x16`, `vedic_mul8x8`,
  `vedic_mul4x4`, `vedic_mul2x2`, `vedic_combine`.
* Floating-point datapath: `prod_normalize`, `lzd`, `mag_compare`,
  `exp_comp`, `align`, `sticky`, `comp_2s`, `csa_4_2`, `lza`,
  `normalize_round`.

`tb/`:

* one self-checking testbench `tb_<module>` per block;
* `fdp_ref_pkg`, an exact reference model. It scales both products to a
  common exponent, adds them as 128-bit integers, and rounds the integer
  once to binary32. It shares no method with the RTL datapath.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog if it hangs.

* **Multipliers.** The 2x2, 4x4 and 8x8 multipliers are checked
  exhaustively. The 16x16 gets 200,000 random and corner cases.
* **Datapath blocks.** Each is checked against an independent integer or
  real-number model.
* **Razor.** The Razor testbenches drive late-arriving data. They check
  detection, that in-time data gives no error, and that recovery works even
  when `d` has turned wrong again.
* **Emulated aging.** No RTL simulation has real path delays. The
  multiplier and end-to-end testbenches therefore emulate an aged path by
  forcing a wrong value onto the multiplier output just around the sampling
  edge. The settled value returns before `dclk` rises. This is done only
  for one-cycle operations whose operand has at most `N_ZEROS + 1` zeros.
  The Razor registers must catch every such case. The aging indicator must
  then trip, and after that no more errors may occur, because block 2 now
  gives those patterns two cycles.

`tb_fused_dot_product_top` runs 3000 operations at the default parameters. It
checks every result bit-exactly and every latency. It also counts how often
each mechanism occurred, and fails if one never did. The mechanisms counted
are:

* one-cycle and two-cycle multiplications;
* Razor errors and recoveries;
* aging switches;
* effective subtraction and massive cancellation;
* addition carry-out;
* round-up and sticky bits;
* zeros, infinities and NaNs;
* both product orders;
* adder-only and multiply-only use, the multiplier bypass and the product
  forwarding.

Its first operation uses the operand patterns 52, 104, 2 and 4 of the
published simulation run.

### Running a testbench with Verilator

From the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/fdp_pkg.sv tb/fdp_ref_pkg.sv tb/tb_fused_dot_product_top.sv \
  --top-module tb_fused_dot_product_top
./obj_dir/Vtb_fused_dot_product_top
```

Replace the testbench name to run any other block's testbench. Each
`rtl/*.sv` file also lints cleanly:

```
verilator --lint-only -Wall -y rtl rtl/fdp_pkg.sv rtl/<module>.sv --top-module <module>
```

This reports only unused-signal and unused-package-constant warnings: the
constant upper product bits, and outputs kept for observation.

## How far to trust it

* The arithmetic is exact against an independent model over a broad random
  and directed test set. That set includes subnormals, cancellation and
  ties. It is not a formal proof.
* The timing-error behaviour is verified only logically, with injected late
  values. Whether a given pattern really meets timing in one cycle depends
  on the implementation technology. `N_ZEROS` and `dclk` must be chosen from
  real timing analysis.
* The shadow latches are plain latches. On an FPGA they need the placement
  and timing care that any Razor design needs.
