# Radix-4 arithmetic: Booth multiplier and carry-free QSD adder/subtractor

In a plain binary adder or multiplier, speed is set by carries: every
result bit may have to wait for a carry that ripples up from the bottom.
This design attacks that problem in two ways, both built on radix 4:

* **Multiplication** uses *modified Booth (radix-4) recoding*. The multiplier
  is read two bits at a time, so an N x N product needs about N/2 partial
  products instead of N. Each partial product is one of 0, ±M or ±2M of the
  multiplicand M.
* **Addition and subtraction** use the *quaternary signed digit* (QSD)
  number system. There the digits run from -3 to +3 in radix 4. Because of
  this redundancy a sum can be formed with no carry chain at all: every
  result digit depends only on its own digit position and the position just
  below.

Both units are purely combinational, and both default to 8-bit operands.
They sit side by side in the top module `radix4_arith` and share nothing.

```
 multiplier                         adder / subtractor
 a[7:0]   b[7:0]                    a[7:0]   b[7:0]   sub
   |        |                         |        |       |
   |   booth_encoder x5            bin_to_qsd  bin_to_qsd
   |        | digit -2..+2            | d[3:0]   | e[3:0]
 booth_pp_gen x5                      qsd_cs_gen (digit sum z,
   | rows + negation bits             |   carry c, sum s per digit)
 pp_reduce (carry-save)               qsd_adder  (y[i] = s[i] + c[i-1])
   | sum, carry                       | y[4:0], QSD digits
 parallel_adder                     qsd_to_bin
   |                                  |
 p[15:0]                            result[10:0]
```

## The radix-4 Booth multiplier (`booth_mult`)

### Recoding

A 0 is appended below the multiplier's LSB. Overlapping triples
`{b[2i+1], b[2i], b[2i-1]}` are then taken, starting from the LSB. Each
triple stands for the digit `-2*b[2i+1] + b[2i] + b[2i-1]`:

| triple | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|--------|-----|-----|-----|-----|-----|-----|-----|-----|
| digit  |  0  | +1  | +1  | +2  | -2  | -1  | -1  |  0  |

`booth_encoder` turns a triple into three select lines (`booth_sel_t`):
`one` (magnitude 1), `two` (magnitude 2) and `neg` (negate). A zero digit
never sets `neg`.

How far the multiplier is extended depends on `SIGNED`:

* `SIGNED = 1`, two's complement: an odd width is sign-extended by one bit,
  which gives ceil(N/2) partial products (4 for 8 bits).
* `SIGNED = 0`, unsigned (the default): the multiplier is zero-extended far
  enough that the top triple is `00x`, so the top digit is never negative.
  This gives N/2+1 partial products (5 for 8 bits).

### Partial products without carry chains

`booth_pp_gen` selects 0, M or 2M (2M is a one-bit shift) and inverts every
bit when `neg` is set. A two's complement negation also needs a +1. That +1
is not added in the generator, because doing so would put a carry chain in
every row. Instead `neg` is passed on, and `booth_mult` collects the `neg`
bits into one extra row, with bit 2i holding row i's `+1`. Row i itself is
sign-extended to 2N bits and shifted left by 2i.

### Reduction and final addition

`pp_reduce` folds the partial-product rows and the negation row (six rows
for the default 8-bit unsigned case) into two rows with a linear array of 3:2
counters (full adders with no carry propagation inside a level).
`parallel_adder`, a ripple-carry chain of full adders, then adds the sum
row and the carry row into the 2N-bit product. Any carry out of the top
bit is discarded, which is correct modulo 2^(2N).

### Which products the default gives

With the default `SIGNED = 0`, `11111100 x 00000011` gives
`0000001011110100`, which is 252 x 3. This matches the reference results
the design was specified with, including one that was labelled a
"signed" run. For a true two's complement product (-4 x 3 = -12) set
`SIGNED = 1`. In that mode the design reproduces the textbook 4-bit example
`1100 x 1010`: its rows are `1000` and `0100`, and the product is 24.

## The QSD adder/subtractor (`qsd_addsub`)

### Digits

A QSD digit is held as a 3-bit two's complement number:

| digit | -3  | -2  | -1  |  0  |  1  |  2  |  3  |
|-------|-----|-----|-----|-----|-----|-----|-----|
| code  | 101 | 110 | 111 | 000 | 001 | 010 | 011 |

**Binary to QSD (`bin_to_qsd`).** For unsigned operands this stage is
pure wiring, because every base-4 digit is already a QSD digit. Each bit pair
of the operand becomes one digit, 0..3, with a 0 placed above it; 125
becomes (1 3 3 1), least significant digit last. With `SIGNED = 1` the
top pair carries negative weight, so its digit is -2..+1. An odd width is
first sign-extended by one bit.

### Step 1: digit sum, intermediate carry and sum (`qsd_cs_gen`)

In every position the two digits are added. For subtraction the
subtrahend's digits are negated first, because a QSD number is negated
digit by digit, with no borrow. The digit sum z lies in -6..+6 and is
split as z = 4c + s:

| z | -6 | -5 | -4 | -3 | -2 | -1 | 0 | 1 | 2 | 3 | 4 | 5 | 6 |
|---|----|----|----|----|----|----|---|---|---|---|---|---|---|
| c | -1 | -1 | -1 | -1 |  0 |  0 | 0 | 0 | 0 | 1 | 1 | 1 | 1 |
| s | -2 | -1 |  0 |  1 | -2 | -1 | 0 | 1 | 2 |-1 | 0 | 1 | 2 |

The table is chosen so that |s| <= 2 and |c| <= 1. This choice is what
makes the adder carry-free.

### Step 2: the carry-free sum (`qsd_adder`)

Each result digit is `y[i] = s[i] + c[i-1]`, with `y[0] = s[0]` and
`y[D] = c[D-1]`. Since |s| <= 2 and |c| <= 1, every y[i] lies in -3..+3,
so it is again a single digit and nothing ripples further. The delay is
the same for any operand width. An 8-bit operation gives five result
digits. They are brought out on four bits each, the width used by the
reference waveforms.

Worked example, 125 + 50 (digits listed most significant first):

```
a       1  3  3  1        (125)
b       0  3  0  2        ( 50)
z       1  6  3  3
c       0  1  1  1
s       1  2 -1 -1
y    0  2  3  0 -1        = 2*64 + 3*16 + 0*4 - 1 = 175
```

**QSD to binary (`qsd_to_bin`).** The result digits are split by sign into
two ordinary base-4 numbers. P takes every positive digit and M the
magnitude of every negative digit. Each digit drops straight onto its own
bit pair, and the result is `P - M`: the only carry-propagating operation
in the QSD path. `result` is 2D+3 = 11 bits wide, which holds any
five-digit QSD value.

`qsd_addsub` also brings out `z`, `c` and `s`, so that the intermediate
values can be observed, as in the reference waveforms.

## Interfaces and parameters

All blocks are combinational: outputs follow the inputs after gate delay,
with no clock and no reset.

| module         | parameters (default)                | ports |
|----------------|-------------------------------------|-------|
| `radix4_arith` | `N`=8, `SIGNED`=0                   | `mul_a`, `mul_b` -> `mul_p`; `as_a`, `as_b`, `as_sub` -> `as_z`, `as_c`, `as_s`, `as_y`, `as_result` |
| `booth_mult`   | `N`=8, `SIGNED`=0                   | `a`, `b` -> `p[2N-1:0]` |
| `qsd_addsub`   | `N`=8, `SIGNED`=0                   | `a`, `b`, `sub` -> `z`, `c`, `s`, `y[D:0]`, `result` |
| `booth_encoder`| —                                   | `triple[2:0]` -> `sel` |
| `booth_pp_gen` | `W`=8, `SIGNED_M`=0                 | `m`, `sel` -> `row[W+1:0]`, `neg` |
| `pp_reduce`    | `ROWS`=6, `W`=16                    | `rows` -> `sum_o`, `carry_o` |
| `parallel_adder`| `W`=16                             | `a`, `b`, `cin` -> `sum_o`, `cout` |
| `bin_to_qsd`   | `N`=8, `SIGNED`=0                   | `x` -> `q[D-1:0]` |
| `qsd_cs_gen`   | `D`=4                               | `d`, `e`, `sub` -> `z`, `c`, `s` |
| `qsd_adder`    | `D`=4                               | `c`, `s` -> `y[D:0]` |
| `qsd_to_bin`   | `ND`=5, `OW`=2*ND+1                 | `y` -> `value` |

Here D = ceil(N/2), the number of QSD digits per operand. The shared types
(`booth_sel_t`, `qsd_digit_t`, `qsd_dsum_t`, `qsd_out_t`) are in
`radix4_pkg`. Digit arrays are packed, and index 0 is the least
significant digit.

## Where this RTL makes its own choices

The two datapaths follow the specified design: the recoding table, the
partial product count, the QSD digit code, the intermediate carry/sum
table, the two-step carry-free addition and the conversion chain. The
following points were left open and were decided here:

* **Unsigned by default.** The reference products are unsigned, so both
  units default to unsigned operands. `SIGNED = 1` gives two's complement.
* **No clock.** The reference runs show a clock signal, but no register is
  described, so the units are combinational.
* **One unit for add and subtract.** The reference pin counts suggest that
  addition and subtraction were built as two separate circuits, with no
  select pin. Here they are one unit with a `sub` input.
* **Subtraction by negated digits.** Subtraction negates the subtrahend's
  digits inside the carry/sum generator.
* **Unspecified internals.** The +1 of negated partial products goes into
  an extra row. The reduction is a linear carry-save array. The "parallel
  adder" is a ripple-carry adder. The QSD-to-binary converter is a
  positive-minus-negative subtraction.
* **Signed conversion of odd widths.** The signed binary-to-QSD conversion
  of an odd width gives one digit more than a three-bit top group would.
  For example, 7-bit 1101110 becomes (-1 2 3 2) rather than (-2 3 2); both
  are -18. A three-bit top group could reach -4, which is not a digit.
* **Signal widths.** Intermediate carries and sums are three bits wide,
  which is enough for their range. The reference waveforms show four.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>`.
Each one compares the outputs with values it computes itself, has a
watchdog, and ends with a `TB_RESULT checks=... failures=...` line. The
checks are exhaustive wherever that is cheap:

* **Multiplier** (`tb_booth_mult`): all 65536 operand pairs, unsigned
  8-bit, signed 8-bit and signed 7-bit; the 4-bit example; the two
  reference products; the partial product counts (5, 4, 4, 2).
* **QSD unit** (`tb_qsd_addsub`): all operand pairs in both modes,
  unsigned and signed. Nine reference runs are checked digit by digit,
  including 145+90, 88+100, 75+25, 125+50, 180-50, 220-80, 196-86 and
  143±100.
* **Sub-blocks:** the full recoding table, every partial product, every
  digit pair through the carry/sum table, every five-digit QSD number
  through the converter, and random rows through the reducer and the
  adder.
* **Top level** (`tb_radix4_arith`): runs the whole unit at its default
  size. It also counts how often each Booth digit (-2..+2), each reachable
  digit sum, both modes, positive and negative intermediate carries, and
  negative result digits occur. A mechanism that never occurs fails the
  test.

To simulate one testbench with Verilator 5, from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -Irtl rtl/radix4_pkg.sv \
          tb/tb_radix4_arith.sv --top-module tb_radix4_arith -o sim
./obj_dir/sim
```

Every testbench finishes in well under a second.
