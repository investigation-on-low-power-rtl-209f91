# Fast leading-zero counters (8, 16 and 32 bit)

Before a floating-point result can be stored, its mantissa has to be normalised:
shifted left until its most significant one reaches the top. The shift distance is
the number of zeros above that one, and the circuit that finds it, the
leading-zero counter, sits on the critical path of every add and subtract. This
design computes the count with a shallow two-level network of small OR/AND terms
instead of scanning the bits one after another. An 8-bit counter is the basic
cell. A 16-bit and a 32-bit counter are built from two and four of these cells,
each with a small merging stage.

Every counter has the same interface:

| signal | meaning |
|---|---|
| `a` | operand, most significant bit at the top index |
| `v` | 1 when the operand holds at least one 1 |
| `z` | number of zeros above the most significant 1, as a binary number |

All counters are purely combinational. They have no clock, no reset and no state.

## The 8-bit counter (`lzc8`)

The eight operand bits `A7..A0` (A7 most significant) are reduced in two levels.

First level: seven group terms, each over two or three neighbouring bits:

```
G0 = A7 | A6            G2 = A5 | A4            G4 = A3 | A2        G6 = A1 | A0
G1 = ~A7 & (A6 | ~A5)   G3 = A6 | A4            G5 = ~A3 & (A2 | ~A1)
```

Second level: four terms, three of which are the count bits:

```
H0 = ~(G0 | G2)          upper nibble is zero               -> count bit of weight 4
H1 = ~G0 & (G2 | ~G4)    count is 2, 3, 6 or 7              -> count bit of weight 2
H2 = G1 & (G3 | G5)      count is odd                       -> count bit of weight 1
H3 = ~(G4 | G6)          lower nibble is zero
V  = ~(H0 & H3)          operand is not zero
```

How to read the two less obvious terms:

- **H1** is the weight-2 bit. If the top pair `A7,A6` holds a one (G0), the count
  is 0 or 1 and the bit is 0. Otherwise the bit is 1 in two cases. If the next
  pair `A5,A4` holds a one (G2), the count is 2 or 3. If the pair `A3,A2` is also
  empty (~G4), the count is 6 or more.
- **H2** is the weight-1 bit. It is the chain
  `~A7 & (A6 | ~A5 & (A4 | ~A3 & (A2 | ~A1)))` factored into two terms of
  similar depth. G1 holds the top two links. `G3 | G5` holds the rest. Because A6
  appears in both factors, it absorbs correctly.

The output names of the published architecture are `V, X2, X1, X0`, with
`X0 = H0`, `X1 = H1` and `X2 = H2`. So `z = {X0, X1, X2}`: X0 is the most
significant count bit, not the least.

The longest path from input to output is about four gates deep, whatever the
operand.

## Wider counters by merging 8-bit cells

**`lzc16`** uses two `lzc8` cells, one on each byte. If the upper byte holds a
one, the result is the upper count with a 0 on top. Otherwise it is the lower
count with a 1 on top, which adds 8. In logic:
`z = {~v_hi, v_hi ? z_hi : z_lo}` and `v = v_hi | v_lo`.

**`lzc32`** uses four `lzc8` cells directly, with no 16-bit stage between. The
top two count bits tell how many whole zero bytes stand above the first non-zero
byte. They come from the four byte flags `v3..v0`, in the same form as H0 and H1
above:

```
z[4] = ~(v3 | v2)
z[3] = ~v3 & (v2 | ~v1)
```

These two bits also steer a 4:1 multiplexer that picks the selected byte's 3-bit
count as `z[2:0]`.

**`rcd_top`** holds one 8-bit, one 16-bit and one 32-bit counter side by side,
each with its own ports (`a8/v8/z8`, `a16/v16/z16`, `a32/v32/z32`). The three
share nothing. The top exists so that all three variants can be instantiated and
tested together.

## The all-zero operand

For `a == 0` every counter gives `v = 0`. The count is then all ones: 7, 15 or 31.
This is what the equations produce naturally, and the wider counters keep it: an
all-zero byte contributes 7, and its merge bits are 1. A user that needs the count
`N` for a zero operand can compute it as `v ? z : N`, or use `{~v, z} + ~v`.

## How far this follows the original design, and where it departs

What the RTL takes from the original design:

- The 8-bit cell with its term names (G0..G6, H0..H3), the way the terms are
  grouped, and the output assignment (`X0 = H0`, `X1 = H1`, `X2 = H2`, V from H0
  and H3).
- The structure of the 16-bit counter (two 8-bit cells) and of the 32-bit counter
  (four 8-bit cells), and the number of outputs of each.
- The valid flag's value for the example operands `11110000`, `10101010` and
  `00000000`: 1, 1 and 0.

Choices made in this design:

- **Inversions in the equations.** The original equations list only ORs and ANDs.
  Its gate list also names NOR, NAND and inverters. Here the inversions are placed
  so that the network counts leading zeros, with the grouping of each term kept.
  `H3` is the NOR of G4 and G6, and `V` is the NAND of H0 and H3.
- **Merging stages.** The 16-bit and 32-bit merging stages are this design's own.
  They are the simplest logic that combines the cells.
- **Bit labels of the wider counters.** The original labels the 16-bit outputs
  X3..X0 and the 32-bit outputs X4..X0, without giving their weights. Here `z` is
  a plain binary number, with its most significant bit at the top index.
- **Example count values.** The original also lists count values for the three
  example operands. They are not reproduced, because they contradict each other:
  `11110000` and `10101010` both have their first one in the top bit but are
  listed with different outputs.
- **What RTL cannot capture.** The original is a transistor-level design in
  transmission-gate logic on a 45 nm process. It reports a delay of 0.0188 ns
  (16 bit) and 0.15 ns (32 bit), and a power of 1.623 mW (16 bit). These numbers
  belong to that circuit realisation, and this RTL neither reproduces nor checks
  them. Synthesised to standard cells, the RTL gives the same logic function with
  whatever timing the target library gives.

## Files

| file | contents |
|---|---|
| `rtl/lzc8.sv` | 8-bit counter cell |
| `rtl/lzc16.sv` | 16-bit counter, two cells and merge |
| `rtl/lzc32.sv` | 32-bit counter, four cells and merge |
| `rtl/rcd_top.sv` | the three counters side by side |
| `tb/lzc_ref_pkg.sv` | reference model: a loop that scans from the top bit down, plus an operand generator with a chosen leading-zero count |
| `tb/lzc8_tb.sv` | all 256 operands, plus the valid flag of the three example operands |
| `tb/lzc16_tb.sv` | all 65536 operands; also checks that both bytes get selected |
| `tb/lzc32_tb.sv` | 500 operands for each count from 0 to 32, 20000 random operands, walking one and walking zero |
| `tb/rcd_top_tb.sv` | all three counters at once. Fails unless every count value of every width, each zero operand, each byte of the 16-bit counter and each byte of the 32-bit counter has been exercised |

Each testbench compares results against the reference model one time unit after
applying the operand. It ends by printing `TB_RESULT checks=N failures=M`.

## Simulating

Any testbench runs with Verilator 5 like this:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
    --top-module rcd_top_tb tb/lzc_ref_pkg.sv tb/rcd_top_tb.sv
./obj_dir/Vrcd_top_tb
```

Replace `rcd_top_tb` with `lzc8_tb`, `lzc16_tb` or `lzc32_tb` to run one block
alone. Each run takes well under a second.

For lint only: `verilator --lint-only -Wall -Irtl rtl/rcd_top.sv`.

## Changing it

- **A wider counter**, such as 64 bit: use eight `lzc8` cells. Merge them with an
  8-bit leading-zero count over their valid flags, which can itself be an `lzc8`
  fed with the flags. Its count selects the cell whose count becomes the low
  bits.
- **A leading-one counter**: invert the operand at the input.
- **Pipelining**: there are no registers anywhere. Place them at the operand or
  at the outputs. The only internal cut worth considering in the 32-bit counter is
  between the cells and the merge.
