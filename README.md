# QSD multiplier

This is a combinational multiplier that works in the quaternary signed digit
(QSD) number system. QSD is radix 4, and each digit can take any value from −3
to 3. Because the digit set is redundant, an addition never needs a carry to
ripple more than one digit. So an adder of any width has the same short delay,
and a multiplier built from such adders escapes the long carry chains of
binary arithmetic. Two two's complement binary operands are converted to QSD
and multiplied. The product comes out as QSD digits.

The default build multiplies two 2-digit QSD numbers. These are 4-bit binary
operands, and the product has 5 digits. Every block has a width parameter `N`,
and the same RTL builds wider multipliers.

## Digits and their code

Every digit is a 3-bit two's complement number:

| value | 3  | 2  | 1  | 0  | −1 | −2 | −3 |
|-------|----|----|----|----|----|----|----|
| code  | 011| 010| 001| 000| 111| 110| 101|

The code `100` (−4) is not a digit. Nothing in the design produces it, and the
inputs must never carry it. A number is a packed array of digits, and digit 0
is the least significant. Its value is Σ d[i]·4^i. The type `qsd_digit_t` is
in `rtl/qsd_pkg.sv`. So is `qsd_icarry_t`, the 2-bit type used for adder
carries, which only take the values −1, 0 and 1.

Most values have more than one representation. For example, 3 can be written
`03` or `1 −1`. The design relies on this: each step picks the representation
that keeps the next step's digits small.

## Carry-free addition (`qsd_adder`)

Each digit position adds a[i] + b[i], which lies in −6..6, in two steps.

1. **Intermediate carry and sum** (`qsd_icsg`). The sum is split as
   4·ic + is, with the carry ic in −1..1 and the intermediate sum is in −2..2.
   Sums from 3 to 6 give ic = 1. Sums from −3 to −6 give ic = −1. All other
   sums give ic = 0.

| a+b | 6 | 5 | 4 | 3  | 2 | 1 | 0 | −1 | −2 | −3 | −4 | −5 | −6 |
|-----|---|---|---|----|---|---|---|----|----|----|----|----|----|
| ic  | 1 | 1 | 1 | 1  | 0 | 0 | 0 | 0  | 0  | −1 | −1 | −1 | −1 |
| is  | 2 | 1 | 0 | −1 | 2 | 1 | 0 | −1 | −2 | 1  | 0  | −1 | −2 |

2. **Second step** (`qsd_step2_adder`). Position i adds the carry from
   position i−1 to its own intermediate sum. The result is at most |1| + |2| = 3
   in magnitude, so it is always a legal digit and nothing carries on.

The bounds are the whole trick. The intermediate sum never exceeds 2 in
magnitude and the carry never exceeds 1, so the second step cannot overflow.
An N-digit adder therefore has a delay of two digit stages whatever N is. Its
result has N+1 digits, and the top digit is the last position's carry.

## Multiplying one digit by one digit (`qsd_digit_mult`)

A digit product p = a·b lies in −9..9. It is recoded as p = 4·c + m with both
c and m in −2..2:

| p | 9 | 6 | 4 | 3  | 2 | 1 | 0 | −1 | −2 | −3 | −4 | −6 | −9 |
|---|---|---|---|----|---|---|---|----|----|----|----|----|----|
| c | 2 | 1 | 1 | 1  | 0 | 0 | 0 | 0  | 0  | −1 | −1 | −1 | −2 |
| m | 1 | 2 | 0 | −1 | 2 | 1 | 0 | −1 | −2 | 1  | 0  | −2 | −1 |

The products 5, 7 and 8 cannot occur. The RTL writes this table as
c = sign(p)·⌊(|p|+1)/4⌋ and m = p − 4c. Only ±3·±3 needs a carry of
magnitude 2.

## Partial products (`qsd_ppg`)

To multiply an N-digit number a by one digit b, N digit multipliers run in
parallel. Position i produces m[i] and a carry c[i], whose weight is one
position higher. The vectors m and c·4 are then added by a carry-free adder.
At position i the first step sees m[i] + c[i−1], which lies in −4..4 and so is
within the adder's range. This gives three stages in total: digit multiply,
intermediate carry and sum, and second step.

The partial product has N+1 digits. The adder's own top digit is always 0,
because position N sees only c[N−1] in −2..2, which never produces an
intermediate carry. It is dropped.

## Summing the partial products (`qsd_multiplier`)

There is one partial product generator per multiplier digit, giving
pp[j] = a·b[j]. The partial products are shifted up j digits and summed by a
chain of N−1 carry-free adders, each 2N digits wide.

The widths work out as follows:
- After pp[j] has been added, the running sum has at most N+2+j digits.
- So every adder input fits in 2N digits, and the digit dropped between stages
  is always 0.
- The final product has 2N+1 digits.

The top digit can be non-zero in a redundant code, even when the value would
fit in 2N digits. With signed 2-digit binary operands it stays 0.

Because each adder in the chain is carry free, each one adds a constant delay.
The total delay therefore grows with the number of partial products but not
with the operand width.

## Binary to QSD conversion (inside `qsd_mult_top`)

A 2N-bit two's complement operand is split into bit pairs, starting from the
least significant bit. Each pair below the top becomes the digit 0..3 by
prefixing a 0 sign bit. The top pair holds the sign and is sign-extended,
which gives a digit in −2..1. The digits' weighted sum equals the operand
exactly, so the conversion is only wiring. It is written as continuous
assignments in the top module rather than as a module of its own.

## Interface and timing

`qsd_mult_top #(N = 2)`:

| port    | dir | width            | meaning                              |
|---------|-----|------------------|--------------------------------------|
| `a_bin` | in  | 2N               | multiplicand, two's complement       |
| `b_bin` | in  | 2N               | multiplier, two's complement         |
| `p_qsd` | out | (2N+1) × `qsd_digit_t` | product, Σ p_qsd[i]·4^i        |

- The design has no clock, no reset and no registers.
- The product is valid one propagation delay after the operands change.
- Register the ports outside if a pipeline is wanted.

The product stays in QSD. To get a binary value, evaluate Σ p[i]·4^i, for
example with a binary adder over the positive and negative digit parts.

## Module hierarchy

```
qsd_mult_top
├── bit-pair to digit wiring (×2 operands)
└── qsd_multiplier
    ├── qsd_ppg (×N)
    │   ├── qsd_digit_mult (×N)
    │   └── qsd_adder #(N+1)
    │       ├── qsd_icsg (×N+1)
    │       └── qsd_step2_adder (×N+1)
    └── qsd_adder #(2N) (×N−1)
```

`qsd_adder` defaults to 128 digits when used on its own. This is the largest
operand width the design targets for stand-alone carry-free addition.

## Where this design makes its own choices

- **Summation order.** The partial products are summed in a linear chain of
  adders. A tree of the same carry-free adders would cut the depth to
  ⌈log2 N⌉ adders; at the default N = 2 both arrangements are one adder.
- **Signed conversion.** The binary inputs are read as two's complement, with
  the top bit pair sign-extended. If the inputs are unsigned, feed a 0 into an
  extra top bit pair instead.
- **Widths.** The partial products keep N+1 digits and the product keeps 2N+1
  digits, which makes every result exact.
- **Tables.** The recoding tables above are the ones the multiplier uses.
  Every entry satisfies 4·carry + digit = value.
- **Left out.** No conversion of the product back to binary is included.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares values
computed independently in the testbench (integer arithmetic and the literal
tables above) and ends with a `TB_RESULT checks=… failures=…` line.

| testbench | what it covers |
|-----------|----------------|
| `tb_qsd_digit_mult` | all 49 digit pairs against the recoding table and 4c+m = a·b |
| `tb_qsd_icsg` | all 49 digit pairs against the split table |
| `tb_qsd_step2_adder` | all 15 legal inputs |
| `tb_qsd_adder` | 128 digits, corner cases, 2000 random pairs and 200 random 64-digit pairs (upper digits zero), checked by value in wide integers; both carry signs and a non-zero top digit must occur |
| `tb_qsd_ppg` | N=2 exhaustive (343 cases), N=6 random; digit products of ±9 must occur |
| `tb_qsd_multiplier` | N=2 exhaustive over all 2401 QSD operand pairs, N=5 random |
| `tb_qsd_mult_top` | default size, all 256 binary operand pairs, checking the converted operands and the product. It also counts digit-product carries of magnitude 1 and 2, and ±1 intermediate carries in both adder levels, and fails if any never occurred |
| `tb_qsd_mult_top_wide` | N=8 (16-bit operands), corner and 20000 random pairs, same checks |

Binary operands never produce the digit −3, so a digit-product carry of −2 is
reached only in the QSD-level testbenches (`tb_qsd_digit_mult`, `tb_qsd_ppg`,
`tb_qsd_multiplier`).

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/qsd_pkg.sv tb/tb_qsd_mult_top.sv --top-module tb_qsd_mult_top -o sim
./obj_dir/sim
```

Every test runs in well under a second.

## Changing the size

Set `N` on `qsd_mult_top`. The operands are 2N bits and the product has 2N+1
digits. Every sub-block derives its widths from `N`. The logic grows as N² digit
multipliers, N·(N+1) adder digit slices in the partial product generators and
(N−1)·2N in the partial product sum.
