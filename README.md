# Radix-8 Booth multiplier with FIR filter and MAC applications

A 16 x 16 signed multiplier spends most of its area and delay adding up
partial products. Radix-8 (modified) Booth recoding cuts their number: the
multiplier operand is rewritten as six digits in the range -4..+4, one per
three bits, so only six partial product rows have to be added instead of 16
(plain binary) or 8 (radix-4 Booth). The price is the "hard" multiple 3A,
which needs an adder of its own; it is built once and shared by all rows.

This RTL implements such a multiplier as four parts:

1. a Booth encoder that recodes the multiplier B into digits,
2. a partial product generator that turns each digit into an aligned row,
   with a short sign prefix on each row in place of sign extension,
3. a correction word (ECW) that carries the "+1" of every negated row, and
4. a Wallace tree of carry-save adders followed by one carry-propagate adder.

The multiplier is then used in two small DSP circuits: a 4-tap FIR filter and
a multiply-accumulate (MAC) unit. The three circuits stand side by side in the
top module `radix8_dsp_top`.

The structure follows the paper "Efficient FPGA Implementation of Radix 8
Partial Product Generator for FIR Filter and MAC Applications". Several
details that the paper leaves open were filled in here; they are listed in
[Departures and choices](#departures-and-choices).

## Radix-8 Booth recoding

Append a 0 below the LSB of B, copy the sign bit of B upwards as far as
needed, and cut the result into overlapping 4-bit groups
`{b[3j+2], b[3j+1], b[3j], b[3j-1]}` (neighbours share one bit). Each group
maps to a digit:

| group          | digit | group          | digit |
|----------------|-------|----------------|-------|
| 0000           |  0    | 1000           | -4    |
| 0001, 0010     | +1    | 1001, 1010     | -3    |
| 0011, 0100     | +2    | 1011, 1100     | -2    |
| 0101, 0110     | +3    | 1101, 1110     | -1    |
| 0111           | +4    | 1111           |  0    |

and then `B = sum_j d_j * 8^j`. For N = 16 there are G = ceil(16/3) = 6
digits; the top group is `{b15, b15, b15, b14}`.

Example: B = 683 = `0b0000_0010_1010_1011` gives digits
d0 = +3, d1 = -3, d2 = +3, d3 = +1, d4 = d5 = 0
(3 - 24 + 192 + 512 = 683).

The encoder (`booth_encoder_r8`) hands each digit on as a
`booth_digit_t` struct: a `neg` flag plus one-hot selects `one`, `two`,
`three`, `four` (all low means zero). Group 1111 is encoded as a plain zero,
so it never produces a negation bit.

## Partial product rows

This is the part that needs the most care. For digit d_j the row is d_j * A,
placed at bit 3j. The generator (`pp_generator_r8`) builds it as follows.

**Magnitude.** A, 2A and 4A are shifts of the sign-extended multiplicand, 3A
is `A + 2A` (one adder for all rows). The selects pick `|d_j| * A`, which is
a W = N + 2 = 18 bit two's complement value (4 * -32768 needs 18 bits).

**Sign.** For a negative digit the 18 bits are inverted. Inversion gives
`-|d_j|A - 1`, so a `+1` is owed at the row's LSB, weight 2^(3j). That bit is
`neg_j`, the digit's sign flag.

**Sign extension.** Each row is a signed number and would have to be
sign-extended to bit 31, which would make every row 32 bits tall on the left.
Instead, with s the row's sign bit (bit 17 of the 18-bit body), each row gets
a short constant-plus-sign prefix:

```
row 0:   ~s  s  s  s  [17 ............ 0]                 bits 21..0
row 1:           1  1 ~s  [17 ............ 0]             bits 23..3
row 2:                    1  1 ~s  [17 ............ 0]    bits 26..6
 ...
row 5:   bits 35..15, cut at bit 31
ECW:     neg_5 at bit 15, neg_4 at 12, ..., neg_0 at bit 0
```

Why this is exact: let `body` be the 18-bit pattern read as unsigned. The
true row value is `body - s * 2^18`. Row 0's prefix adds
`(s + 2s + 4s + 8(1-s)) * 2^18 = (8 - s) * 2^18`, that is the needed
`-s * 2^18` plus an excess of `2^21`. Row j >= 1 adds
`((1-s) + 2 + 4) * 2^(18+3j)`, that is `-s * 2^(18+3j)` plus an excess of
`7 * 2^(18+3j) = 2^(21+3j) - 2^(18+3j)`. Summed over rows 1..5 these
excesses telescope to `2^(18+18) - 2^21`, which cancels row 0's `2^21` and
leaves `2^36`: a multiple of 2^32, so it vanishes in the 32-bit product. In
general the leftover is `2^(W+3G)`, which is beyond 2N for every N.

So the rows need neither a full sign extension nor a separate constant row.
The array has G rows plus the correction word: 7 rows for N = 16.

For the worked example A = 341, B = 683 the rows begin (bits above the body)
with `1000`, `110`, `111`, `111`, `111`, `111`: row 0 positive, row 1
negative (digit -3), the rest positive.

**Correction word.** The negation bits neg_0..neg_5 sit at bits
0, 3, 6, 9, 12, 15 of one more 32-bit row, the ECW. It has no logic of its
own, so it is an output of `pp_generator_r8` rather than a module.

## Adding the rows

`wallace_adder` adds ROWS words of W bits modulo 2^W. Each tree level takes
the rows three at a time and turns each triple into a sum word and a
left-shifted carry word (`csa_3to2`, a row of full adders); one or two
leftover rows pass down unchanged. For 7 rows the levels go
7 -> 5 -> 4 -> 3 -> 2, and the last two rows go through a single
carry-propagate adder (written as `+`, so synthesis picks the adder
architecture). ROWS and W are parameters; any ROWS >= 2 works.

## FIR filter

`fir_filter` computes `y[n] = sum_{k=0}^{3} coef[k] * x[n-k]` with one
radix-8 multiplier per tap.

- On every rising edge of `clk` the input `x_in` is taken, the three previous
  samples shift along a register chain, and the sum of the four products is
  registered into `y_out`. So `y[n]` appears one clock after `x[n]` and a new
  output comes every clock.
- `coef[0..3]` are inputs, read continuously.
- `y_out` is 2N + 2 = 34 bits and cannot overflow.
- `rst` is synchronous and active high. It clears the sample chain and the
  output.

With coefficients 1, 2, 3, 4 and a constant input of 21 from reset, the
output reads 21, 63, 126, 210, 210, ...

## MAC unit

`mac_unit` does `acc_out <= acc_out + x * y` on every rising clock edge.

- `product` shows `x * y` combinationally.
- The accumulator is ACC_W = 2N + 8 = 40 bits. That holds at least 256
  worst-case products. Past its range it wraps as a two's complement
  register; it does not saturate.
- `rst` is synchronous and active high. It clears the accumulator.

With x = 341 and y = 683 held from reset, the accumulator reads 232903,
465806, 698709, ... one clock per step.

## Module map and interfaces

```
radix8_dsp_top            top: the three circuits side by side
 |- radix8_multiplier     stand-alone multiplier (mul_a, mul_b -> mul_p)
 |- fir_filter            fir_x, fir_coef[4] -> fir_y
 |   '- radix8_multiplier x4
 '- mac_unit              mac_x, mac_y -> mac_product, mac_acc
     '- radix8_multiplier

radix8_multiplier
 |- booth_encoder_r8      B -> digits
 |- pp_generator_r8       A, digits -> rows[G], ecw
 '- wallace_adder         rows + ecw -> product
     '- csa_3to2          3:2 carry-save adder, one per row triple
radix8_pkg                booth_digit_t, num_groups(), row_width()
```

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| N         | 16      | all   | operand width, two's complement |
| TAPS      | 4       | `fir_filter`, top | number of FIR taps |
| ACC_W     | 40      | `mac_unit`, top | accumulator width |
| ROWS, W   | 7, 32   | `wallace_adder` | set by `radix8_multiplier` to G+1, 2N |

The multiplier itself is purely combinational. The FIR filter and the MAC
unit have one register stage each and share `clk` and `rst` in the top.
All ports are plain signals; `fir_coef` is an unpacked array of 4 words.

## Departures and choices

The paper gives the Booth table, the grouping, the row alignment, the four
blocks of the generator, the use of a Wallace tree, and the FIR and MAC
behaviour as simulation waveforms. The following were chosen here:

- **Operands are two's complement.** The paper calls its generator signed,
  but its examples use only positive numbers.
- **The correction word (ECW).** The paper names the block but does not say
  what it holds. Here it is the row of negation bits. The sign prefixes are
  the ones visible in the paper's partial product waveforms.
- **Row body width** is N + 2 bits. That is the smallest width that is exact
  for every input.
- **The Wallace tree works on whole rows** (groups of three words), not on
  individual bit columns. The result is the same, but a column-wise
  (Dadda-style) tree would use fewer full adders on the sparse edges of the
  array.
- **FIR structure.** The FIR filter is direct-form with a one-clock latency.
  Its products are summed by ordinary adders. The coefficients are inputs,
  not constants.
- **MAC accumulator.** The accumulator is 40 bits, wraps on overflow and has
  no enable.
- **Reset.** Both clocked blocks use a synchronous, active-high reset.
- **No pipelining inside the multiplier.** The paper gives no latency for it.
- **Not reproduced.** The paper's FPGA area and delay comparison against an
  approximate radix-8 multiplier is not reproduced. That baseline is not
  part of this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and ends with `$finish`.

| testbench | what it checks |
|-----------|----------------|
| `tb_booth_encoder_r8` | digits against the recoding table, and that the digits recombine to B; N = 16 random plus corners, N = 8 exhaustive |
| `tb_pp_generator_r8` | every row and the ECW bit for bit against an arithmetic model; the prefixes of the 341 * 683 example; rows + ECW = A * B (N = 16 and 8) |
| `tb_wallace_adder` | 7 x 32, 3 x 16 and 10 x 16 trees against a plain sum; all-ones and walking-one patterns |
| `tb_radix8_multiplier` | 85 * 211 = 17935, 341 * 683 = 232903, signed corners, 20000 random pairs; N = 8 exhaustive (65536 pairs) |
| `tb_fir_filter` | step response 21, 63, 126, 210 and its one-clock latency; 4000 random samples with random coefficients; mid-stream reset |
| `tb_mac_unit` | 232903 per clock for 341 * 683; random operands; reset; wrap-around of the accumulator |
| `tb_radix8_dsp_top` | all three circuits at default parameters at once, including the three worked examples. It counts each Booth digit value -4..+4, negative top digits, full FIR windows, resets, MAC steps and accumulator wraps, and fails if any count is zero |

Each testbench was also run against a deliberately broken copy of its module
(for example, the 1000 group recoded as -3, or the ECW left out), and each
one reported failures.

To run one with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/radix8_pkg.sv tb/tb_radix8_dsp_top.sv --top-module tb_radix8_dsp_top
./obj_dir/Vtb_radix8_dsp_top
```

Replace the testbench name to run any other. All of them finish in well
under a second. Verilator has only two signal states, so the testbenches
initialise or reset everything they read.

## Changing the design

- **Operand width.** Set `N` on `radix8_multiplier`, `fir_filter`,
  `mac_unit` or the top. The number of digits, the row width, the
  correction-word layout and the tree depth all follow from it.
  `tb_radix8_multiplier` exercises N = 8.
- **FIR length.** Set `TAPS`. The output width grows by `$clog2(TAPS)`.
- **Pipelining.** To pipeline the multiplier, the natural cut is between
  `pp_generator_r8` and `wallace_adder` (7 rows of 32 bits) or before the
  final carry-propagate adder (2 rows).
