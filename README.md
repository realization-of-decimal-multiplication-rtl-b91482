# Radix-16 modified Booth multiplier (16 x 16 signed)

A combinational multiplier for two's complement operands that cuts the
number of partial products with radix-16 Booth recoding. A plain array
multiplier adds one row per multiplier bit: sixteen rows for 16 bits. Here the
multiplier is read four bits at a time, plus one bit of overlap. Each
five-bit string becomes a signed digit in {-8 … +8}, so the sixteen bits give
four digits. Each digit is built from two radix-4 Booth digits, so the adder
sees eight simple rows instead of sixteen. A Wallace tree of carry-save adders
reduces those rows to two, and a carry look-ahead adder adds the two into the
product.

```
        y ──► append 0 ──► 4 five-bit strings
                              │
x ──────────────┬─────────────┼───────────────┐
                ▼             ▼               ▼
             booth (0)    booth (1) …     booth (3)       radix-16 recoders
             2 rows + 2 negation bits each
                └──────────────┬──────────────┘
                               ▼
                              add:  align and sign-extend 8 rows, 1 row of negation bits
                                    wallace_tree (9 → 6 → 4 → 3 → 2 rows)
                                    cla_adder (32 bits)
                               ▼
                         p[31:0], iop[7:0] = p[7:0]
```

## Interface

`boothmultiplier #(N = 16)`

| port  | dir | width | meaning |
|-------|-----|-------|---------|
| `x`   | in  | N     | multiplicand, two's complement |
| `y`   | in  | N     | multiplier, two's complement |
| `p`   | out | 2N    | product `x*y`, two's complement (always exact) |
| `iop` | out | 8     | `p[7:0]`, the output bus of the original 16-bit chip-level block |

There is no clock, reset or handshake. `p` is valid one combinational delay
after `x` or `y` changes. To pipeline it, register the eight rows at the
input of `add`, or the sum and carry rows at the output of the Wallace tree.

## How a radix-16 digit becomes two simple rows

Radix-16 digit `i` reads the string `{y[4i+3], y[4i+2], y[4i+1], y[4i], y[4i-1]}`,
with `y[-1] = 0`:

    D = -8·y[4i+3] + 4·y[4i+2] + 2·y[4i+1] + y[4i] + y[4i-1]      (−8 … +8)

Forming every multiple 0…8 of x directly would need an adder for 3X, 5X and
7X. Instead, the string is split at `y[4i+1]`, which both halves share:

    lower = -2·y[4i+1] + y[4i]   + y[4i-1]     ∈ {−2 … +2}
    upper = -2·y[4i+3] + y[4i+2] + y[4i+1]     ∈ {−2 … +2}
    D     = lower + 4·upper

Each half is an ordinary radix-4 Booth digit. Its row is therefore only 0, ±X
or ±2X, which takes a shift and an inversion and no adder. The upper row picks
from 0, ±4X, ±8X in effect, because `add` shifts it two more places. The
upper and lower rows are not added inside the recoder. They go to the
carry-save tree as separate rows, so the sum of each digit's two multiples
shares the tree with everything else.

Example, with x = 100 and y = 25 = `0000_0000_0001_1001`:

| row | string bits | digit | row value (17 bits) | neg |
|-----|-------------|-------|---------------------|-----|
| 0 (lower, digit 0) | y1 y0 y-1 = 010 | +1 | `0_0000_0000_0110_0100` (+100) | 0 |
| 1 (upper, digit 0) | y3 y2 y1 = 100 | −2 | `1_1111_1111_0011_0111` (~200) | 1 |
| 2 (lower, digit 1) | y5 y4 y3 = 011 | +2 | `0_0000_0000_1100_1000` (+200) | 0 |
| 3…7 | 000 | 0 | 0 | 0 |

Product: 100 + 4·(−200) + 16·200 = 2500, so `iop` = `1100_0100`.

## Negative rows and the negation bits

A selector never forms −X or −2X with a carry chain. It inverts the bits of
+X or +2X, which gives `−m − 1`. The missing +1 is the row's `neg` bit. This
bit equals the top bit of the row's three-bit group, so `neg` for row k is
`y[2k+1]`. The string `111` means −0. The selector then outputs all ones, and
the +1 brings it back to zero. The eight `neg` bits sit at bit positions
0, 2, 4, …, 14 and never overlap. `add` packs them into one extra row, so the
tree has nine rows.

Rows are 17 bits wide, because ±2X of a 16-bit number needs 17. Each row is
sign-extended to 32 bits by copying its top bit, then shifted left by 2k.
Copying the sign is the simplest correct choice. The usual "1…1 / ~s" trick
for sign extension would make the tree's upper columns shorter. It is not
used here.

## Wallace tree and final adder

`wallace_tree` splits the rows of each level into groups of three. Each group
goes through a row of full adders (`csa_row`, a 3:2 compressor). One or two
rows left over pass to the next level unchanged. Nine rows take four levels
(9 → 6 → 4 → 3 → 2). `ROWS` and `W` are free parameters, and the level count
is worked out during elaboration.

`cla_adder` adds the last sum row and carry row. It has two levels of 4-bit
look-ahead units (`cla_lookahead4`). The first level works on bit generate
and propagate signals. The second level works on the group signals of four
groups, which covers 16 bits. The carry between 16-bit blocks ripples, which
at 32 bits is a single step. The carry out of bit 31 is dropped. The signed
product of two 16-bit numbers always fits in 32 bits.

## Files

| file | content |
|------|---------|
| `rtl/booth_pkg.sv` | `booth_ctrl_t` = {neg, one, two}, default width 16 |
| `rtl/booth_encoder.sv` | 3-bit group → radix-4 digit controls |
| `rtl/booth_selector.sv` | controls + x → 17-bit row (0, X, 2X, inverted if negative) |
| `rtl/booth.sv` | radix-16 recoder: two encoder/selector pairs |
| `rtl/csa_row.sv` | W full adders as a 3:2 compressor |
| `rtl/wallace_tree.sv` | ROWS → 2 carry-save reduction |
| `rtl/cla_lookahead4.sv` | 4-bit carry look-ahead unit |
| `rtl/cla_adder.sv` | two-level carry look-ahead adder |
| `rtl/add.sv` | row alignment, negation-bit row, tree, final adder |
| `rtl/boothmultiplier.sv` | top |

## Parameters

`N` (default 16) sets the operand width everywhere. The design works for any
N ≥ 4. If N is not a multiple of four, `y` is sign-extended up to the next
multiple before recoding. This adds a digit, and the extra rows do not change
the 2N-bit result. The tests cover N = 16, 8 and 6.

## Verification

Every testbench checks itself against values it computes on its own. Each
one prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_booth_encoder` | all 8 groups against the digit formula |
| `tb_booth_selector` | every control word × random and corner x: row + neg = d·x |
| `tb_booth` | all 32 strings × random and corner x: lower + 4·upper = D·x; the 100 × 25 rows above |
| `tb_wallace_tree` | random and all-ones rows for 9×32, 5×16 and 3×12 trees |
| `tb_cla_adder` | carry runs across groups and blocks, random operands, at 32 and 8 bits |
| `tb_add` | random rows and neg bits; the 100 × 25 rows → 2500 |
| `tb_boothmultiplier` | default 16-bit top, no overrides: 100 × 25, all pairs of 8 signed corner values, 200,000 random pairs. It also counts how often each radix-16 digit −8…+8 and each radix-4 selection (0, ±X, ±2X, −0) occurs, and fails if one never occurs |
| `tb_boothmultiplier_small` | exhaustive at N = 8 (65,536 pairs) and N = 6 (4,096 pairs, exercises the sign extension of y) |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/booth_pkg.sv tb/tb_boothmultiplier.sv --top-module tb_boothmultiplier
./obj_dir/Vtb_boothmultiplier
```

Each testbench finishes in well under a second.

## Where this design makes its own choices

The source material gives the algorithm, the two-multiplexer radix-16 recoder,
and the block structure: four recoders feeding one adder block, with a Wallace
tree and then a carry look-ahead adder. It also gives the port names and
widths and one simulated vector (100 × 25). The following are choices of this
design, not taken from the source:

- The encoder's control word and its logic equations.
- Negative rows are carried as one's complement plus a separate +1 bit. The
  reference waveform's 17-bit rows show exactly this form.
- The negation bits share one extra tree row. Rows are sign-extended by
  copying the sign bit.
- The tree groups rows in threes at each level. The final adder has two
  levels of 4-bit look-ahead with a ripple between 16-bit blocks.
- The full product `p` is an output as well. The original block only drives
  its low byte as `iop`.
- Operands are two's complement. The source also mentions padding with zeros
  (an unsigned variant). That variant would need a ninth row, and the
  reference rows show the signed scheme, so it was not built.

Although the source's title speaks of decimal multiplication, the arithmetic
it describes, and this RTL, is binary. Nothing here handles BCD digits.
