# Parallel decimal multipliers with signed-digit recoding and decimal carry-save trees

This repository holds synthesizable SystemVerilog for two fully combinational
multipliers for 16-digit BCD numbers. Each one gives the exact 32-digit BCD product.
They follow the architectures in the paper "Improved Design of
High-Performance Parallel Decimal Multipliers". Both work the way a fast
binary multiplier does:

1. Recode the multiplier into signed digits, so that only a few easy multiples
   of the multiplicand are needed.
2. Form all partial products at once.
3. Add them in a carry-save tree.
4. Do one carry-propagate addition at the end.

The hard part in decimal is the carry-save tree. In BCD, adding digits needs a
correction step after every addition. This design avoids that. Every digit
inside the tree is kept in one of two redundant 4-bit codes, (4221) or (5211).
In these codes a plain binary full adder adds digits correctly. The one decimal
step left is a doubling (x2), and it costs only a small recoder and a one-bit
wire shift.

The two multipliers differ in how they recode the multiplier:

| | SD radix-10 (`mult_sd10`) | SD radix-5 (`mult_sd5`) |
|---|---|---|
| multiplier digit | one digit in -5..5 | 5·Yu + Yl, Yu in 0..2, Yl in -2..2 |
| precomputed multiples | X, 2X, 3X, 4X, 5X (3X needs a carry-propagate adder) | X, 2X only (no carry-propagate adder) |
| partial products for 16 digits | 17, all (4221) | 32: 16 in (5211), 16 in (4221) |
| reduction tree | 17:2 tree, area-optimized (delay-optimized variant included) | mixed 32:2 tree, delay-optimized |

`dec_mult_top` instantiates both. They share the operands `x` and `y`, and each
brings out its own product (`p_sd10`, `p_sd5`).

## Digit codes

A digit is four bits `r3 r2 r1 r0` with the weights named in brackets:

| value | BCD (8421) | (4221) from BCD* | (5211s)* | (5421) |
|---|---|---|---|---|
| 0 | 0000 | 0000 | 0000 | 0000 |
| 1 | 0001 | 0001 | 0001 | 0001 |
| 2 | 0010 | 0010 | 0100 | 0010 |
| 3 | 0011 | 0011 | 0101 | 0011 |
| 4 | 0100 | 1000 | 0111 | 0100 |
| 5 | 0101 | 1001 | 1000 | 1000 |
| 6 | 0110 | 1010 | 1001 | 1001 |
| 7 | 0111 | 1011 | 1100 | 1010 |
| 8 | 1000 | 1110 | 1101 | 1011 |
| 9 | 1001 | 1111 | 1111 | 1100 |

\*In (4221) and (5211) all 16 bit patterns are valid digits, and several
patterns stand for the same value. The (4221) column shows what `rec_bcd_4221`
produces; words inside the trees use any of the valid patterns. The (5211)
column is the subset called (5211s), the output of the (4221) → (5211s) recoder. Its important
property: shifting a (5211s) digit left by one bit gives twice its value, in
(4221). The bit that falls out of the top has weight 5 × 2 = 10, so it is a
decimal carry into the next digit.

Because the weights of (4221) and (5211) add up to 9, inverting all four bits
gives the 9's complement. So a negative multiple costs one row of XOR gates.

`dec_pkg` holds the value functions and the (5211s) and (5421) encoders. The
single-digit recoders each have their own module:

| module | converts | how |
|---|---|---|
| `rec_bcd_4221` | BCD → (4221) | wiring and gates |
| `rec_4221_5211s` | (4221) → (5211s) | the step before an x2 of any (4221) word |
| `rec_4221s_5211s` | (4221s) → (5211s) | smaller version for inputs known to be in (4221s) |
| `rec_5211_4221` | (5211) → (4221) | one full adder per digit |
| `rec_bcd_5421` | BCD → (5421) | digit encoder |
| `rec_4221_5421` | (4221) → (5421) | digit encoder |
| `rec_4221_xs6` | (4221) → BCD excess-6 | digit encoder |

## Decimal carry-save addition

`dec_csa_4221` adds three (4221) words A, B and C:

- Each digit position runs four binary full adders, one per bit. This gives a
  sum digit S and a carry digit H, both in (4221), with A + B + C = S + 2H.
- No digit depends on another digit at this point.
- The doubling 2H uses the x2 block described under Digit codes (recoder, then
  one-bit shift). That is the only place where a carry moves to the next digit,
  and it moves just one position.
- `cin` and `cout` are the bits shifted in and out at the word ends.

`dec_csa_5211` is the same adder for (5211) words. In a (5211) word, x2 is just
the one-bit shift, and the result is in (4221):

- With `MIXED = 0`, the shifted word is recoded back to (5211).
- With `MIXED = 1`, it is left in (4221) for the mixed trees.

`dec_x2n_4221` chains one, two or three x2 stages to make x2, x4 and x8.
The output of an x2 stage is always in the subset (4221s): the ten patterns
0000 0001 0010 0011 1000 1001 1010 1011 1110 1111, which `rec_bcd_4221` also
produces. So every stage after the first uses the smaller `rec_4221s_5211s`.
The parameter `S_IN` makes the first stage use it as well, when the input is
known to be in (4221s).

Most trees do not double right away. They keep a word together with a
power-of-two factor, and the doubling happens later (see Reduction trees).

## Decimal digit adders

`bit_counter` counts the ones in a column of bits that all have the same
weight, and returns the count as a (4221) digit:

- 9 inputs: two levels of full adders.
- 8 inputs: each half counted in binary (0..4), then a final level that adds the
  two halves.
- 7 inputs: an ordinary 7:3 counter.

`dec_digit_adder` places one counter on each bit column of 9, 8 or 7 input
words:

- All inputs must be in the same code, (4221) or (5211).
- For column weight w, the counter gives four words worth w·4, w·2, w·2 and w·1.
  The result is four words in the input code, with factors x4, x2, x2 and x1.
- For 7 inputs the second x2 word is zero.

In one step this takes 8 or 9 operands down to four. It is as fast as about two
3:2 levels, and it delays the doublings to a point where they can overlap with
other additions.

## SD radix-10 multiplier (`mult_sd10`)

**Recoding.** `sd10_recoder` turns each BCD digit Y_i into a digit Yb_i in
-5..5:

- Yb_i = Y_i + ys_{i-1} - 10·ys_i, where ys_i = (Y_i ≥ 5).
- Each digit looks only at its neighbour's sign bit, so there is no carry chain.
- The output is five one-hot selects for |Yb_i| (1X..5X) plus the sign.
- The top carry becomes an extra digit, Yb_d = ys_{d-1}, which is 0 or 1.
  So d digits give d + 1 partial products.

**Multiples.** `mult_gen_sd10` builds X, 2X, 3X, 4X and 5X in (4221), each
d + 1 digits wide:

- X: a per-digit recoding of the BCD input.
- 2X: X is recoded to (5421) and shifted left one bit. That gives 2X in BCD,
  which is then recoded to (4221).
- 4X: one x2 step on 2X. 2X is in (4221s), so the smaller recoder is used.
- 5X: a three-bit left shift of X. A three-bit left shift of a (4221) word gives
  five times its value, in (5211), which is then recoded to (4221).
- 3X = X + 2X: the only multiple with a carry. It uses `bcd_qt_adder` (see
  Final addition) on BCD copies of the operands.

**Partial products.** `ppgen_sd10` does the following for row i:

- A one-hot AND-OR mux picks |Yb_i|·X.
- XOR with the sign makes the 9's complement when Yb_i < 0.
- The missing +1 of the complement ("hot one") goes into the empty lowest digit
  slot of row i+1. Row i+1 is shifted one digit further left, so that slot lines
  up with digit i.

**Sign encoding.** A negative row would need sign extension up to digit 2d. The
design adds a few constant-like leading digits instead (s = sign of the row):

| row | digit d+2 | digit d+1 |
|---|---|---|
| 0 | (0,0,0,¬s): value 1 or 0 | (s,s,s,s): value 0 or 9 |
| 1 … d-1 | – | (1,1,1,¬s): value 9 or 8 |
| d | – | – (Yb_d is never negative) |

Summed modulo 10^2d, these digits cancel the complement offsets exactly. The
leading digit of row d-1 falls at position 2d, outside the product, so it is
never needed.

**Reduction and final addition.** The rows are aligned in one 2d-digit word
each, with zeros wherever a row has no digit. They are reduced by:

- `tree17_area` (default);
- `tree17_delay` when `DELAY_TREE = 1`;
- `tree6_4221` when D + 1 ≤ 6.

The tree returns S and H. `adder_setup` and `bcd_qt_adder` then form
P = S + 2H.

## SD radix-5 multiplier (`mult_sd5`)

**Recoding.** `sd5_recoder` splits each BCD digit into Y = 5·Yu + Yl:

- Yu is in {0,1,2}. Yl is in {-2,…,2}.
- Both come out as one-hot selects, plus the sign of Yl.
- Each digit is recoded on its own, so there is no carry between digits at all.

**Multiples.** `mult_gen_sd5` needs only X and 2X in (4221), plus their bit
inversions (-X and -2X as 9's complements). There is no carry-propagate adder.

**Two partial products per digit.** `ppgen_sd5` forms both halves for multiplier
digit i:

- PP^U = Yu·5X, in (5211). A three-bit left shift of the (4221) words X and 2X
  gives 5X and 10X directly, so a 2:1 one-hot mux is enough.
- The shift leaves the lowest bit of PP^U free. The hot one of a negative PP^L
  goes there, which needs no extra row.
- PP^L = Yl·X, in (4221), picked by a 4:1 one-hot mux from X, 2X, -X and -2X.
- Rows below d-1 get a leading sign digit on PP^L of (1,1,1,¬ysl).
- Row 0 also gets a constant digit of value 1 at position d+1 of its PP^U. This
  constant completes the sign-extension sum modulo 10^2d, whatever the sign of
  row 0.

**Reduction.** The tree depends on D:

- `tree32_mixed` for D up to 16: sixteen (4221) words and sixteen (5211) words.
- `tree16_mixed` for D up to 8.
- `tree6_mixed` for D up to 3.

Unused inputs are tied to zero. The final addition is the same as in the radix-10
multiplier.

## Reduction trees

Each tree takes whole words and returns S and H, with sum of inputs = S + 2H
modulo 10^N. H is returned undoubled so that the final adder can double it
cheaply (see Final addition).

The published design draws each tree as the reduction of one column of digits,
with carries passed to the next column. Here every tree works on full 2d-digit
words at once. That is the same circuit: the shorter columns just see zero
inputs, and the sideways carries of the x2 blocks become carries between digits
of a word.

| module | inputs | structure |
|---|---|---|
| `tree6_4221` | 6 × (4221) | four 3:2 CSAs with x2 on the carries |
| `tree17_area` | 17 × (4221) | Doublings are postponed. Words carry a factor 1, 2, 4 or 8. Words of equal factor are added first, because 2^n(A+B+C) = 2^n·S + 2^(n+1)·H. Only a few words are brought back to factor 1, by x2, x4 and x8 blocks. Fewest recoders. |
| `tree17_delay` | 17 × (4221) | An 8-input and a 9-input digit adder first. The x4 doublings run while the next CSA level is already adding other words. |
| `tree6_mixed` | 3 × (4221) + 3 × (5211) | (5211) words are doubled by wiring alone. One (5211) word is recoded to (4221) with a single full adder. |
| `tree16_mixed`, `tree32_mixed` | 8+8 or 16+16 | Two or four 8-input digit adders, one half per code. The (5211) side is ready earlier because its partial products need fewer logic levels, and its outputs are halved or recoded by wiring. Then same-factor CSAs, then x2/x4/x8. |

Each module's opening comment lists its full schedule.

## Final addition

`adder_setup` prepares the two operands of the final adder:

- 2H: H is recoded (4221) → (5421), then shifted left by one bit. Doubling a
  (5421) digit this way gives a BCD digit, and the top bit (weight 10) becomes a
  carry into the next digit.
- S: recoded to BCD excess-6, meaning each digit plus 6.

`bcd_qt_adder` adds BCD a to excess-6 b:

- Per digit it forms the 4-bit binary sum t.
- t ≥ 16 means the digit generates a decimal carry. t = 15 means it passes an
  incoming carry on.
- A Kogge-Stone parallel-prefix network turns these per-digit signals into every
  decimal carry in log2 N levels.
- Each digit picks one of two precomputed results, t or t + 1. It subtracts 6
  when no carry leaves the digit.
- With `B_XS6 = 0` the adder adds the 6 itself. This is how `mult_gen_sd10`
  uses it for 3X.

## Module map

```
dec_mult_top
├── mult_sd10
│   ├── mult_gen_sd10 ── rec_bcd_4221, rec_bcd_5421, dec_x2n_4221, rec_5211_4221,
│   │                    bcd_qt_adder (3X)
│   ├── sd10_recoder × D
│   ├── ppgen_sd10 × (D+1)
│   ├── tree17_area | tree17_delay | tree6_4221
│   │      └── dec_csa_4221, dec_x2n_4221, dec_digit_adder ── bit_counter
│   │          (dec_x2n_4221 ── rec_4221_5211s, rec_4221s_5211s)
│   ├── adder_setup ── rec_4221_5421, rec_4221_xs6
│   └── bcd_qt_adder
└── mult_sd5
    ├── mult_gen_sd5 ── rec_bcd_4221, dec_x2n_4221
    ├── sd5_recoder × D
    ├── ppgen_sd5 × D
    ├── tree32_mixed | tree16_mixed | tree6_mixed
    │      └── dec_csa_4221, dec_csa_5211, rec_5211_4221, dec_x2n_4221,
    │          dec_digit_adder ── bit_counter
    ├── adder_setup
    └── bcd_qt_adder
```

**Interface.** Inputs are `x` and `y`, each `4*D` bits of BCD, digit i in bits
`[4i+3:4i]`. The outputs are `8*D`-bit BCD products. Inputs must be valid BCD;
other digit patterns give undefined results.

**Timing.** Everything is combinational. There are no clocks, registers or
handshakes: a product is valid one propagation delay after the operands change.
To pipeline the design, registers can be placed between recoding/partial
product generation, the tree, and the final adder.

**Parameters.**

- `D` is the number of digits. The default is 16.
  - `mult_sd10` accepts 2 ≤ D ≤ 16, limited by its 17-input tree.
  - `mult_sd5` accepts 2 ≤ D ≤ 16, limited by its 32-input tree.
- `DELAY_TREE` on `mult_sd10` selects the delay-optimized tree instead of the
  area-optimized one.
- Block-level parameters: `N` (digits per word), `NB`/`NIN` (counter and digit
  adder sizes), `MIXED`, `B_XS6`, `ROW`.

## Simulation

Each block has a self-checking testbench in `tb/`. It compares the block against
arithmetic done independently in the testbench, using 136-bit integers and the
value functions in `tb/dec_tb_pkg.sv`. At the end it prints
`TB_RESULT checks=<n> failures=<n>`. A watchdog ends any run that hangs.

To build and run one testbench with Verilator 5:

```
verilator --binary --top-module tb_dec_mult_top \
    rtl/dec_pkg.sv $(ls rtl/*.sv | grep -v dec_pkg.sv) \
    tb/dec_tb_pkg.sv tb/tb_dec_mult_top.sv
./obj_dir/Vtb_dec_mult_top
```

Replace `tb_dec_mult_top` with any other `tb/tb_*.sv` to run that one.

`tb_dec_mult_top` runs both multipliers at the default 16 digits with no
parameter overrides. It covers:

- 2000 operand pairs: all-9s times all-9s, zero, one, 5555…5 as multiplier,
  and random operands, half of them biased toward the digit 9.
- A count of every mechanism the design has, with a failure for any that never
  happens:
  - each radix-10 magnitude and negative digits;
  - a multiplier digit 9 after a borrow, which recodes to zero;
  - a nonzero top partial product;
  - each Yu and Yl value;
  - a negative row 0 in radix-5;
  - decimal carries that pass through a whole digit in the final adder.

It runs in well under a second.

Other testbenches go further at block level:

- `tb_mult_sd10` also runs the delay-optimized tree and D = 5.
- `tb_mult_sd5` also runs D = 8 and D = 3, covering all three mixed trees.
- `tb_multioperand` uses the trees on their own, as decimal multioperand
  adders. It adds sixteen 16-digit BCD operands through `tree17_area`,
  `tree17_delay` and `tree16_mixed`. Each tree is followed by `adder_setup` and
  an 18-digit `bcd_qt_adder`, and the BCD sum is checked.
- The recoders are checked exhaustively. So is every digit input of the bit
  counters and both signed-digit recoders.

## Where this design departs from, or adds to, the published description

- **2X and 1X selects of the radix-10 recoder.** Here they are derived directly
  from the definition of Yb_i above:
  - y2 = ¬ys_{i-1}·¬y0·(y3 ∨ ¬y2·y1) ∨ ys_{i-1}·¬y3·y0·¬(y2 ⊕ y1)
  - y1 = ¬y2·¬y1·(y0 ⊕ ys_{i-1})

  The sign, 5X, 4X and 3X selects follow the published equations. All 20
  input cases are tested.
- **Radix-5, row 0.** The digit d+1 of PP^U for row 0 is the constant 1, not a
  copy of row 0's sign. With a sign-dependent digit, products with a negative
  Yl in the lowest multiplier digit come out wrong.
- **Sign encoding, radix-10.** The leading digit is placed on rows 1 to d-1 and
  left off row d (see the table above). Any placement that differs only in
  digits at or above 10^2d gives the same product.
- **Tree schedules.**
  - The 6:2 trees follow the published diagrams.
  - For the 17:2, 16:2 and 32:2 trees, the published diagrams give the first
    level (digit adders and CSAs) and the rules: equal factors first, slow
    doublings in parallel with CSAs. The exact pairing of words after the first
    level is this design's own.
  - The module comments give every CSA, so the depth can be compared.
- **8-bit counter.** The final level combines the two binary half-counts
  Q0, Q1 ∈ 0..4 into a (4221) digit: weight-1 bit = Q0₀ ⊕ Q1₀, and the
  weight-2 units spread over the other three bits. It is this design's own
  logic.
- **Gate-level forms.** Full adders, the 7:3 counter and the (4221) → (5211s)
  recoder are written as Boolean equations. Synthesis chooses the gates.
  - The published work gives only the cost of the (4221s) → (5211s) recoder.
    Its equations here are this design's own minimisation over the ten valid
    inputs.
- **Final BCD adder.** The published work names it: a quaternary-tree adder
  that uses conditional speculative decimal addition. It does not detail it.
  The Kogge-Stone carry network here is this design's choice. Any BCD adder
  with the same ports can replace it.
- **Word-level trees and dropped top carries.** Carries out of digit 2d-1 are
  discarded everywhere. The result is exact because the product of two d-digit
  numbers is below 10^2d. Lint reports these dropped bits as unused signals.

## What has not been checked

- Delay and area: no timing or area figures were produced or checked.
  Synthesis with yosys gives about 27,000 generic cells for both 16-digit
  multipliers together.
- Coverage: verification is by simulation only, mostly random. The 16-digit
  multipliers have far too many input pairs for exhaustive testing. Only the
  single-digit blocks are tested exhaustively.
