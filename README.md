# Pipelined single-precision floating-point multiplier without rounding

This is an IEEE 754 binary32 multiplier that keeps the **whole** 48-bit
significand product instead of rounding it back to 24 bits. It is meant to
feed a floating-point adder in a multiply-accumulate unit, where the extra
product bits give more precision and rounding can be done once, after the
addition. It takes one operand pair per clock and gives each result three
clocks later. The result is a 56-bit word, with overflow and underflow flags
beside it.

The datapath is written at the cell level: half and full adders, 1-bit
constant subtractors, and a carry-save array. It is not left to `*` and `+`
operators, so the RTL shows the structure that the area and timing come from.

## Number format and result word

Operands are binary32 values: sign `a[31]`, biased exponent `a[30:23]`
(bias 127) and fraction `a[22:0]`. The significand is `1.fraction`, 24 bits
with the hidden one. **Only normal operands are handled** (exponent 1..254).
Zero, subnormals, infinities and NaNs get no special treatment. A zero
operand is read as 1.0 × 2^-127, for example.

The product of two significands in [1, 2) lies in [1, 4). The 48-bit
intermediate product `IP[47:0]` has its radix point between bits 46 and 45,
so its leading one is at bit 46 or 47. After normalisation it is always at
bit 46, and the result word is

| bits | field |
|---|---|
| `top_multiplier_out[55]` | sign |
| `top_multiplier_out[54:46]` | biased exponent, **9 bits** |
| `top_multiplier_out[45:0]` | fraction: the 46 product bits below the leading one |

The exponent has 9 bits, so an overflowed exponent (255..382) is still output
as it is, next to the `overflow` flag. The fraction is not truncated to 23
bits. A bit is lost only when normalisation shifts the product right by one,
and then only the product's last bit is lost.

Example: 40.0 × −7.5 (`0x42200000`, `0xC0F00000`) gives
`1 010000111 0010110000…0`. That is −1.001011₂ × 2^(135−127) = −300.

## Structure

```
 a,b ──┬─ sign_bit (xor) ─────────────[r]──────────[r]─────────────────[r]─┐
       ├─ exponent_adder: ripple_carry_adder ─[r]─ bias_subtractor ─[r]─┐  │
       └─ csa_multiplier: rows 1..12 ─[r]─ rows 13..23 + merging row ─[r]─┤ │
                                                                        normalizer
                                                          (shift, +1, ovf_udf_detect)─[r]─ outputs
             cut 1                        cut 2                         cut 3
```

The sign, the exponent and the significand are computed independently and
in parallel. The three register cuts are placed as follows:

1. **Cut 1** is in the middle of the significand array and between the
   exponent adder and the bias subtraction.
2. **Cut 2** is after the multiplier and after the bias subtraction.
3. **Cut 3** is at the outputs.

The sign goes through three plain registers. The split of the array after
row 12 is this design's choice of "the middle". Set it with the
`csa_multiplier` parameter `PIPE_ROW` (1..23). The latency is the same for
any value.

### Exponent path: adder, then a constant subtractor

`ripple_carry_adder` adds the two 8-bit exponents. It is a half adder at bit 0
followed by seven full adders, and its last carry becomes bit 8 of a 9-bit
sum. Speed does not matter much here, because the significand array is far
slower.

The bias is a constant, so subtracting it needs no general subtractor. A
1-bit subtractor whose subtrahend is fixed reduces to two gates:

| cell | subtrahend | difference R | borrow out Bo |
|---|---|---|---|
| `one_subtractor` (OS) | 1 | not (S xor Bi) | (not S) or Bi |
| `zero_subtractor` (ZS) | 0 | S xor Bi | (not S) and Bi |

`bias_subtractor` chains one cell per bit, taking the cell from the bias
bit. For 127 = `0_0111_1111` that is seven OS cells and then two ZS cells,
with the borrow rippling upwards. The borrow out of bit 8 is set exactly when
E1 + E2 < 127, that is, when the intermediate exponent is negative.

### Significand path: the carry-save array

`csa_multiplier` is the part most worth reading closely. Partial products
`a[i] & b[j]` enter an array of adder cells. Each row hands its sums
*straight down* and its carries *diagonally down and one column left*, so no
carry ripples inside a row:

- **Row 1** has N−1 half adders. Cell j adds `a[j+1]&b[0]` and `a[j]&b[1]`.
- **Rows r = 2..N−1** each have N−1 full adders. Cell j has weight r+j and adds
  three bits:
  - the new partial product `a[j]&b[r]`;
  - the sum of the row above at the same weight, or, for the top cell of the
    row, the leftover partial product `a[N-1]&b[r-1]`;
  - the carry of the row above from one column to the right.
- **The merging row** is a ripple carry adder of one half adder and N−2 full
  adders. It adds the last row's sums and carries, with `a[N-1]&b[N-1]` at
  the top, and gives product bits N..2N−1.

The lowest sum of each row is a finished product bit: bit 0 is `a[0]&b[0]`,
bit r comes from row r, and the rest come from the merging row. For N = 4
this gives 3 HA, two rows of 3 FA, and 1 HA + 2 FA. The longest path runs
from the first cells down the right edge, then along the whole merging
carry chain.

The pipeline register at the cut holds these values:

- the cut row's sums and carries (2 × 23 bits);
- the product bits already finished (13 bits);
- both operands, because the later rows still need partial products.

### Normalisation and range checking

`normalizer` reads bit 47 of the intermediate product. If it is set, a row of
2:1 multiplexers shifts the product right by one and the exponent is
incremented. Otherwise both pass through unchanged.

`ovf_udf_detect` sits inside the normalizer. It needs the exponent both
before and after the increment. With E = E1 + E2 − 127 in −125..381:

| E before normalisation | `category` | outcome |
|---|---|---|
| E < 0 | `EC_UNDERFLOW` | underflow whatever the shift |
| E = 0 | `EC_ZERO` | normal (exponent 1) if the product shifts, otherwise underflow |
| 1 ≤ E ≤ 254 | `EC_NORMAL` | normal, except that E = 254 with a shift overflows |
| E ≥ 255 | `EC_OVERFLOW` | overflow |

On underflow the output exponent and fraction are forced to zero and the
sign is kept. On overflow the value is passed on as computed, with the flag
set.

## Ports of `fp_multiplier`

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | clock; all registers use the rising edge |
| `rst_n` | in | 1 | synchronous, active-low reset of all pipeline registers |
| `a`, `b` | in | 32 | operands, taken on every rising edge |
| `top_multiplier_out` | out | 56 | result, 3 clocks after its operands |
| `overflow`, `underflow` | out | 1 | flags for the same result |
| `category` | out | 2 | class of E before normalisation (`fpm_pkg::exp_class_e`) |

There is no valid/ready handshake, because every clock carries an operation.
After a reset the outputs read zero with `category = EC_ZERO` until the first
operands have gone through the pipeline.

## Where this design departs or fills in

- **No rounding.** The result is the exact product, except for at most one
  bit lost in the normalising shift. A consumer that needs a binary32 result
  must round `top_multiplier_out[45:0]` itself.
- **Special operands** are not decoded (see above).
- **Choices made in this design:**
  - the exact cut row of the array;
  - the reset;
  - the output on overflow and on underflow;
  - the `category` output;
  - the overflow limit for non-default widths of `ovf_udf_detect`, which is
    2^(IE_W−1) − 2.
- **Timing on silicon or FPGA is not characterised here.** The array is kept
  as plain cells, so a synthesis tool's retiming can move the registers. The
  simulation checks only that the pipeline has 3 stages and accepts one
  operation per clock.
- `normalizer.normalized_significand[47]` is always 0. It is kept so that the
  signal stays in the 48-bit product format.

## Files

| file | contents |
|---|---|
| `rtl/fpm_pkg.sv` | format constants, `exp_class_e`, `fp32_t` |
| `rtl/fp_multiplier.sv` | top: three pipeline stages, output word and flags |
| `rtl/sign_bit.sv` | sign xor |
| `rtl/exponent_adder.sv` | adder, cut-1 register, bias subtractor |
| `rtl/ripple_carry_adder.sv`, `rtl/half_adder.sv`, `rtl/full_adder.sv` | adder cells |
| `rtl/bias_subtractor.sv`, `rtl/one_subtractor.sv`, `rtl/zero_subtractor.sv` | constant subtractor |
| `rtl/csa_multiplier.sv` | N×N carry-save array with one cut |
| `rtl/normalizer.sv`, `rtl/ovf_udf_detect.sv` | normalisation and range flags |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Each testbench compares against values it works out itself and ends with the
line `TB_RESULT checks=N failures=M`. Each also has a watchdog that ends the
run if it hangs.

- **Small cells:** all input combinations, against integer arithmetic.
- **`ripple_carry_adder`:** all 65,536 operand pairs.
- **`bias_subtractor`:** all 512 inputs.
- **`exponent_adder`:** all 65,536 exponent pairs, one per clock, with the
  one-clock latency checked.
- **`csa_multiplier`:** the 24×24 array on corner values and 4,000 random
  pairs, plus a 4×4 array on all 256 pairs, against `a*b`.
- **`normalizer`:** random real products at full size. A second 8-bit
  product / 6-bit exponent instance is checked exhaustively.
- **`tb_fp_multiplier`:** the full design at its only size. It takes a new
  pair every clock and checks each result exactly three clocks later against
  an exact double-precision product. The stimulus is:
  - the 40 × −7.5 example;
  - 200 pairs aimed at the exponent limits;
  - a reset in mid-stream;
  - 20,000 random normal pairs.

  It counts each mechanism and fails if one never occurs: the normalising
  shift, no shift, overflow from the exponent sum, overflow caused by the
  shift, underflow from a negative exponent, underflow at zero, a zero
  exponent rescued by the shift, and the reset.

To run one, for example the full design:

```
verilator --binary --timing --assert -y rtl rtl/fpm_pkg.sv \
          tb/tb_fp_multiplier.sv --top-module tb_fp_multiplier -Mdir obj
./obj/Vtb_fp_multiplier
```

`-y rtl` lets verilator find each module in `rtl/<module>.sv`. The package is named first, because the modules import it. The full-design test runs in well under a second.
