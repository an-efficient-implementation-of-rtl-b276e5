# IEEE 754 single-precision multiplier with a modified Booth significand multiplier

Multiplying two floating point numbers comes down to three independent jobs: XOR the
signs, add the exponents, and multiply the significands. The significand product is
where nearly all of the delay goes: a 24 x 24-bit multiplication. This design does it with a
radix-4 *modified Booth* multiplier. That multiplier forms only 13 partial product rows
where a plain array multiplier forms 24, and it works on unsigned and on two's complement
operands, chosen by one mode bit. A small normalizer and an overflow/underflow stage
around it produce an IEEE 754 single-precision result.

The result is **not rounded**: the 23-bit fraction is truncated, and the full 46-bit
fraction of the exact product also comes out on a port of its own. This suits a
multiply-accumulate unit, where a following adder (or a separate rounding unit) decides
what to keep.

## Data flow

```
 a[31] b[31] ─────────────► sign_unit (XOR) ───────────────────────────┐
 a[30:23] b[30:23] ─► exponent_adder ─► bias_subtractor ─┐             │
                      (9-bit sum)       (−127, borrow)    ▼             ▼
 1.a[22:0] 1.b[22:0] ─► mbe_multiplier ─────────────► normalizer ─► exception_unit ─► output
                        (unsigned, 48-bit product)    (>>1, exp+1)  (±0, ±inf, flags)    register
```

All of it is combinational up to one output register (see *Interface and timing*).

## Number format

| bits  | field    | meaning                                 |
|-------|----------|-----------------------------------------|
| 31    | sign     | 1 = negative                            |
| 30:23 | exponent | biased by 127; 1..254 for normal values |
| 22:0  | fraction | significand is 1.fraction               |

`fp_mul_pkg` holds these widths and a packed struct `fp32_t` for one word. The top is
parameterized by `EXP_W` (default 8) and `FRAC_W` (default 23). A reduced format with an
8-bit exponent and a 4-bit fraction is built and tested as well. Other widths follow the
same structure but have not been simulated.

## Exponent path

`exponent_adder` is a ripple carry adder: a half adder in bit 0 and full adders in bits
1–7. Its carry out becomes bit 8 of a 9-bit sum S = E1 + E2.

`bias_subtractor` takes off the bias 127 = `0_0111_1111` with a ripple *borrow* chain. A
bias bit of 1 needs a "one-subtractor" cell, and a bias bit of 0 needs a "zero-subtractor"
cell:

| cell             | computes     | difference r   | borrow out      |
|------------------|--------------|----------------|-----------------|
| one-subtractor   | s − 1 − bin  | `~(s ^ bin)`   | `~s \| bin`     |
| zero-subtractor  | s − 0 − bin  | `s ^ bin`      | `~s & bin`      |

Bits 0–6 are one-subtractors and bits 7–8 are zero-subtractors. The 9-bit difference R is
the *intermediate exponent* E1 + E2 − 127. The final borrow is set exactly when that value
is negative. A negative value is an underflow that normalization cannot repair.

For 40 × (−7.5): S = 132 + 129 = 261 = `1_0000_0101`, and R = 134 = `0_1000_0110`.

## The modified Booth multiplier (`mbe_multiplier`)

This is the part that takes the most effort to follow.

### Booth digits

The multiplier operand b is read in overlapping triples (b[2k+1], b[2k], b[2k−1]), with
b[−1] = 0. Each triple is a digit d_k in {−2, −1, 0, +1, +2}, and b = Σ d_k·4^k. Each digit
needs just one partial product row, so there are about half as many rows as bits.
`mbe_encoder` turns a triple into four signals:

| b[2k+1] b[2k] b[2k−1] | digit | X1_a | X2_a | Z | Neg |
|:---------------------:|:-----:|:----:|:----:|:-:|:---:|
| 000 |  0 | 1 | 0 | 1 | 0 |
| 001 | +1 | 0 | 1 | 1 | 0 |
| 010 | +1 | 0 | 1 | 0 | 0 |
| 011 | +2 | 1 | 0 | 0 | 0 |
| 100 | −2 | 1 | 0 | 0 | 1 |
| 101 | −1 | 0 | 1 | 0 | 1 |
| 110 | −1 | 0 | 1 | 1 | 1 |
| 111 |  0 | 1 | 0 | 1 | 0 |

- X1_a = XNOR(b[2k], b[2k−1]).
- X2_a = XOR(b[2k], b[2k−1]), which means |d| = 1.
- Z = XNOR(b[2k], b[2k+1]).
- |d| = 2 is therefore X1_a & ~Z.
- Neg marks the negative digits.

### Partial product bits

`pp_bit_gen` makes one bit of one row, with the encoder built into the cell:

```
p(k,j) = X2_a & (a[j] ^ b[2k+1])  |  X1_a & ~Z & (a[j-1] ^ b[2k+1])
```

For a positive digit the cell picks a[j] or a[j−1], which gives a or 2a. For a negative
digit the picked bit is inverted, which gives the one's complement of the multiple. That
is one less than its negative. The missing +1 is the row's negate bit N_k (the encoder's
Neg), and it is added later.

### Signed and unsigned operands

`sign_mode` = 0 multiplies unsigned numbers and `sign_mode` = 1 multiplies two's
complement numbers. Internally, both operands are widened by one bit: the sign bit when
signed, 0 when unsigned. An unsigned N-bit multiplier then looks like a non-negative
(N+1)-bit signed number. That needs G = ⌈(N+1)/2⌉ digits:

- N = 24 (significand): 13 rows.
- N = 8: 5 rows.

In unsigned mode the last digit is always 0 or +1. Each row is N+2 bits wide, which is
enough for ±2 times an (N+1)-bit multiplicand.

### Sign extension and summation

Each row is a signed number that sits at bit 2k. Extending every row's sign bit up to bit
2N−1 would cost long runs of copies. Instead, each row's top bit s_k is inverted, and one
constant takes care of the rest:

```
row_k = −s_k·2^(N+1) + low_k = (~s_k)·2^(N+1) + low_k − 2^(N+1)
P     = Σ 4^k·({~s_k, low_k} + N_k)  +  C,     C = −2^(N+1)·Σ_{k<G} 4^k  (mod 2^(2N))
```

This is the same as the familiar "1, inverted sign" prefix in front of each row.

The rows are added by a chain of ripple carry adders, one per row:

- The running sum starts at C.
- Row k is added to bits 2N−1..2k.
- The negate bit N_k goes in as that adder's carry in.
- The bits below 2k are already final and pass straight through.

Ripple carry adders are used instead of a carry-save tree because they are simpler. The
cost is a longer delay through the rows. The 2N-bit product is exact in both modes.

In the floating point multiplier, the significands 1.fraction are unsigned, so
`sign_mode` is tied to 0 there. The signed mode is a feature of the multiplier block and is
tested on that block alone.

## Normalization and range rules

Both significands lie in [1, 2), so their product lies in [1, 4). The 48-bit intermediate
product therefore has its leading one at bit 46 or bit 47. Its binary point sits between
bits 46 and 45. If bit 47 is set, `normalizer` shifts the product right by one through a
row of 2:1 multiplexers and adds 1 to the exponent. Its exponent output is one bit wider
than its input, so the increment cannot wrap.

`exception_unit` then applies these rules, first match wins:

| condition                                             | result            | flag      |
|-------------------------------------------------------|-------------------|-----------|
| an operand has exponent field 0, fraction ≠ 0 (denormal) | ±0             | underflow |
| otherwise, an operand is zero                         | ±0                | none      |
| E1 + E2 − 127 < 0 (subtractor borrow)                 | ±0                | underflow |
| exponent after normalization = 0                      | ±0                | underflow |
| exponent after normalization ≥ 255                    | ±∞ (`exp=FF, frac=0`) | overflow |
| otherwise                                             | normal, fraction truncated | none |

Notes on the rules:

- An intermediate exponent of exactly 0 is not yet an underflow. If the product needs the
  normalizing shift, the exponent becomes 1 and the result is a normal number.
- Exponent sums above 254 + 127 can never be brought back into range.
- The sign is always the XOR of the operand signs, also for ±0 and ±∞.
- Infinity and NaN operands (exponent field 255) get **no special treatment**. They pass
  through the arithmetic as if they were normal numbers. Most such products end in
  overflow.

## Interface and timing (`fp_mul_top`)

| port          | dir | width | meaning                                        |
|---------------|-----|-------|------------------------------------------------|
| `clk`         | in  | 1     | clock                                          |
| `reset`       | in  | 1     | synchronous, active high; clears the outputs   |
| `a`, `b`      | in  | 32    | operands                                       |
| `p`           | out | 32    | product, fraction truncated                    |
| `p_frac_full` | out | 46    | all fraction bits of the normalized product (0 on ±0/±∞) |
| `overflow`    | out | 1     | `p` is ±∞                                      |
| `underflow`   | out | 1     | `p` is ±0 because of range or a denormal operand |

The whole datapath is combinational from `a`/`b` to one register stage. A result appears
on the rising clock edge after its operands were applied, so a new multiplication can
start every cycle. An assertion checks that the two flags are never both set.

Example: `a = 0x42200000` (40) and `b = 0xC0F00000` (−7.5) give `p = 0xC3960000` (−300).
The significand product is `10.01011000…`, which is normalized to `1.001011000…` at
exponent 135.

## Where this design makes its own choices

The structure follows a published design. In particular these parts are taken from it:

- the three parallel paths;
- the ripple carry exponent adder;
- the 7 + 2 cell bias subtractor;
- the Booth encoding table and the merged encoder/selector cell;
- a sign/unsigned mode bit;
- ripple carry adders for the partial products;
- the one-place normalizing shift;
- the overflow/underflow rules.

The following points are this design's own:

- **Partial product equation.** The one-bit generator is written from the encoding table,
  not from a gate netlist.
- **Row summation.** The rows are added with the inverted-sign-bit constant, and each
  negate bit enters as a carry in. The original describes the sign extension prefix only by
  example.
- **Output register.** There is one output register, with a synchronous active-high reset.
  The original shows a clock and a reset but gives no latency.
- **Zero operands.** An exact zero operand gives ±0 *without* raising underflow. A
  denormalized operand gives ±0 *with* underflow.
- **Full-precision port.** `p_frac_full` is an extra output, meant as the unrounded value
  for a following adder.
- **Width parameters.** `EXP_W`/`FRAC_W` let the top build smaller formats. The exponent
  adder, bias subtractor and normalizer scale with them.

These are not implemented: rounding, infinity/NaN operands, and denormal results
(gradual underflow).

## Files

| file | contents |
|------|----------|
| `rtl/fp_mul_pkg.sv` | format widths, `fp32_t` |
| `rtl/fp_mul_top.sv` | top: paths, normalizer, range rules, output register |
| `rtl/sign_unit.sv` | sign XOR |
| `rtl/exponent_adder.sv`, `rtl/half_adder.sv`, `rtl/full_adder.sv` | ripple carry exponent adder |
| `rtl/bias_subtractor.sv`, `rtl/one_subtractor.sv`, `rtl/zero_subtractor.sv` | ripple borrow bias subtractor |
| `rtl/mbe_encoder.sv` | Booth encoding of one triple |
| `rtl/pp_bit_gen.sv` | one partial product bit |
| `rtl/ripple_carry_adder.sv` | generic adder with carry in |
| `rtl/mbe_multiplier.sv` | signed/unsigned Booth multiplier, parameter `N` |
| `rtl/normalizer.sv` | one-place normalizing shift |
| `rtl/exception_unit.sv` | overflow/underflow, zero/denormal operands, result packing |

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_sign_unit` | exhaustive |
| `tb_exponent_adder` | all 65 536 exponent pairs, exhaustive |
| `tb_bias_subtractor` | all 512 sums, exhaustive |
| `tb_mbe_encoder` | the eight encoding rows, exhaustive |
| `tb_pp_bit_gen` | all 32 input combinations, exhaustive |
| `tb_ripple_carry_adder` | 8-bit exhaustive, 48-bit random |
| `tb_mbe_multiplier` | 24-bit: corner values and 20 000 random pairs in both modes. 8-bit and 5-bit: every pair in both modes. All against integer multiplication. |
| `tb_normalizer` | 48/9-bit random, and the 8-bit product / 6-bit exponent size exhaustively |
| `tb_exception_unit` | every rule, with random surrounding values |
| `tb_fp_mul_top` | default parameters, see below |
| `tb_fp_mul_small` | the same top with a 4-bit fraction: the worked example `0 10000100 0100 × 1 10000001 1110 = 1 10000111 0010`, then 20 000 random operand pairs |

`tb_fp_mul_top` runs the top at its default parameters:

- It checks the reset and the 40 × −7.5 example first.
- It then applies the edge cases: zero and denormal operands, the largest finite value,
  exponent exactly 255, an intermediate exponent of 0 with and without the shift, and a
  negative intermediate exponent.
- Last come 40 000 random pairs with exponents spread over the whole range.
- Every result is checked one cycle after its operands, against an integer reference model.
- Every result with normal operands is also checked in real arithmetic. A normal result
  must be the exact product truncated to 24 significant bits. An overflow must lie at or
  above 2^128, and an underflow below 2^-126.
- It counts the normalizing shift, no shift, overflow, both kinds of underflow, the rescued
  zero exponent, zero and denormal operands and negative results. It fails if any of them
  never happens.

The testbenches use only plain SystemVerilog and `$urandom`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_fp_mul_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/fp_mul_pkg.sv tb/tb_fp_mul_top.sv
./obj_dir/Vtb_fp_mul_top
```

The package must come first on the command line, because the modules take their default
widths from it. Each testbench finishes in under a second.
