# 8x8 Dadda multipliers with 4-2 and 5-2 compressors

An array multiplier spends most of its delay and energy in one place: turning
the 64 partial-product bits of an 8x8 multiplication into two numbers that a
single adder can finish. This design does that reduction with *compressors*.
These are cells that take many bits of one column and return one bit in that
column plus several bits for the next column. The tree is arranged by Dadda's
rule: each column is reduced only as far as the next level needs.

Two complete multipliers are given. They differ only in the compressor they
use:

| multiplier       | compressor | tree cells                                   | levels     |
|------------------|------------|----------------------------------------------|------------|
| `dadda_mult_4_2` | 4-2        | 18 4-2 compressors, 3 full adders, 3 half adders | 8 → 4 → 2 |
| `dadda_mult_5_2` | 5-2        | 18 5-2 compressors, 2 full adders, 4 half adders | 8 → 4 → 2 |

Both are unsigned and purely combinational, with no clock. Each computes
`p = m * n` for 8-bit operands and gives a 16-bit product. The top,
`mult8x8_top`, feeds the same `m` and `n` to both. It brings out `p42` and
`p52` so that the two can be compared.

## Three stages

1. **Partial products** (`pp_gen`): `pp[i][j] = m[j] & n[i]`. This bit has
   weight 2^(i+j). Column k holds min(k+1, 15-k) bits, so the middle column
   (bit 7) has 8.
2. **Compressor tree**: reduces every column to at most two bits, in two
   levels.
3. **Carry-propagate adder** (`cpa`): adds the two remaining rows. It is
   written as a plain 16-bit `+`, so synthesis can choose the adder
   structure.

## The compressors

### 4-2 compressor (`compressor_4_2`)

Inputs: four column bits `x1..x4`, plus `cin`, which comes from the next lower
column. Outputs: `sum` (weight 1), and `carry` and `cout` (weight 2 each):

    x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout)

It is built from two XOR-XNOR cells (`xor_xnor`, which gives a⊕b and its
complement together) and four 2:1 multiplexers (`mux2`):

    x12   = x1 ^ x2                 x34 = x3 ^ x4
    cout  = x12 ? x3   : x1
    s1    = x34 ? ~x12 : x12        (= x1^x2^x3^x4)
    sum   = s1  ? ~cin : cin
    carry = s1  ? cin  : x4

The longest path, from an `x` input through an XOR-XNOR cell and two
multiplexers to `sum` or `carry`, passes three cells. This matches the
three-gate critical path claimed for this compressor.

The key property is that **`cout` does not depend on `cin`**. In a tree level,
the `cout` of column k feeds the `cin` of column k+1. Because `cout` ignores
`cin`, this chain does not ripple. Where every `cout` lands on a `cin`, the
delay of a level is that of one compressor, whatever the word width.

### 5-2 compressor (`compressor_5_2`)

Inputs: five column bits `x1..x5`, plus two carry-ins `cin1` and `cin2`.
Outputs: `sum`, `carry`, `cout1` and `cout2`:

    x1+x2+x3+x4+x5 + cin1 + cin2 = sum + 2*(carry + cout1 + cout2)

It is three full adders in series:

- FA1(x1, x2, x3) gives `cout1`.
- FA2(sum of FA1, x4, cin1) gives `cout2`.
- FA3(sum of FA2, x5, cin2) gives `carry` and `sum`.

`cout1` depends only on `x1..x3`. `cout2` depends on `cin1` but not on `cin2`.
The trees therefore always connect `cout1 → cin1` and `cout2 → cin2` of the
next column up. If you crossed them (`cout2 → cin1`), `cout2` would ripple
through the whole row.

## How the trees are arranged

Dadda's rule fixes a target height for each level and reduces each column,
lowest first, only until it fits. A column's height at the next level counts
three things:

- the bits left untouched;
- the `sum` outputs placed in the column;
- the `carry` outputs arriving from the column below.

`cout` bits (or `cout1`/`cout2`) from the column below arrive in the same
level. The tree feeds them into compressor carry-ins wherever it can.

Two rules pick the cells:

- A compressor is used when a column exceeds its target by 3 or more.
- Otherwise a full adder is used for an excess of 2, and a half adder for an
  excess of 1.

Both trees use the targets 8 → 4 → 2. Some details:

- Where no carry-in is available, a compressor's `cin` is tied to 0.
- At level 2, each column holds only four bits. Most 5-2 compressors there
  therefore have one `x` input tied to 0. In total, 18 `x` inputs of the 5-2
  tree are tied to 0.
- In a few places in both trees, a `cout` enters an `x` input or a full
  adder instead of a compressor's `cin`. This is correct, but it adds a
  little delay to that path.

Column heights after each level (bit 15 on the left):

    4-2 tree   level 0: 0 1 2 3 4 5 6 7 8 7 6 5 4 3 2 1
               level 1: 0 1 2 4 4 4 4 4 4 4 4 4 4 3 2 1
               level 2: 0 2 2 2 2 2 2 2 2 2 2 2 2 2 2 1
    5-2 tree   level 0: 0 1 2 3 4 5 6 7 8 7 6 5 4 3 2 1
               level 1: 0 1 3 4 2 2 4 4 4 4 3 4 4 3 2 1
               level 2: 1 2 2 2 2 2 2 2 2 2 2 2 2 2 2 1

The trees are written out as explicit instances. Names follow
`s<level>_c<column>_<index>_<output>`; for example, `s1_c7_0_cout` is the
`cout` of the first cell in column 7 of level 1. To change a tree, apply the
same height bookkeeping by hand, or replace the instance list. The header
comment of each file repeats the height table for that tree.

## Files

| file | content |
|------|---------|
| `rtl/mult_pkg.sv` | operand width `OP_W = 8`, product width `PROD_W = 16`, types `operand_t`, `product_t` |
| `rtl/xor_xnor.sv`, `rtl/mux2.sv` | cells of the 4-2 compressor |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | 3-2 and 2-2 counters |
| `rtl/compressor_4_2.sv`, `rtl/compressor_5_2.sv` | the two compressors |
| `rtl/pp_gen.sv` | AND array, parameter `N` (default 8) |
| `rtl/cpa.sv` | final adder, parameter `W` (default 16) |
| `rtl/dadda_mult_4_2.sv`, `rtl/dadda_mult_5_2.sv` | the two multipliers (8x8 only) |
| `rtl/mult8x8_top.sv` | both multipliers on shared operands |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench checks the module against values it computes itself. Each
one prints `TB_RESULT checks=N failures=M`, and each has a time-out.

- The cells and compressors are tested on all input combinations.
- The compressor testbenches also check the independence properties above.
  They flip only the carry-ins and require `cout`, `cout1` and `cout2` to stay
  as specified.
- `pp_gen` is tested on all 65536 operand pairs, bit by bit.
- `cpa` is tested on corner cases and 20000 random pairs.
- The two multipliers and the top are tested on all 65536 operand pairs.
  They first replay five operand pairs that were used in published
  simulations of this design: (192,136), (168,7), (22,204), (85,1) and
  (108,208).
- `tb_mult8x8_top` also counts how often each mechanism is exercised. It
  fails if one of them never happens. The mechanisms are:
  - a 4-2 `cout` passed to the next column;
  - a 5-2 `cout1` and a 5-2 `cout2` passed to the next column;
  - a carry that the final adder moves from bit 7 into bit 8;
  - a product that uses bit 15.

Each testbench was also run against a copy of its module with one deliberate
fault, and every one of them caught it.

To simulate one testbench with Verilator:

    verilator --binary --timing -y rtl -y tb rtl/mult_pkg.sv tb/tb_mult8x8_top.sv \
              --top-module tb_mult8x8_top
    ./obj_dir/Vtb_mult8x8_top

Every run takes well under a second.

## Departures and limits

- **Logic level only.** The compressor cells are meant to be transistor
  circuits: XOR-XNOR cells and multiplexers built from transmission gates.
  Here each cell is its logic function. Power, delay and transistor count
  (for example 0.056 W for the 4-2 multiplier against 0.040 W for the 5-2
  one) are properties of that circuit and are not modelled.
- **4-2 compressor structure.** The cell arrangement (two XOR-XNOR cells, four
  multiplexers) is drawn in the source, but the select input of each
  multiplexer is not marked. The choice above is the standard one that meets
  the compressor equation. One description of the cell counts three XOR-XNOR
  cells, one XOR and two multiplexers. The drawn arrangement was followed
  instead. The multiplexer that forms `sum` also needs the complement of
  `cin`; this inverter is not drawn.
- **Tree details are this design's own.** The exact tree arrangement is not
  specified in the source. This includes the target heights, the bit-to-port
  assignment and the added full and half adders. The arrangement here is one
  valid Dadda-style choice. A different one would change area and delay, but
  not the result.
- **Exact products.** Both multipliers are exact. One published waveform
  value, for 108 × 208, does not equal the true product 22464. The design
  follows exact multiplication.
- **Unsigned only, 8x8 only.** Signed operands and Booth recoding are not
  supported. `pp_gen` and `cpa` are parameterised, but the trees are written
  for 8x8.
- **Not included.** The baselines that the design is compared with are not
  part of this RTL: the plain Dadda multiplier without compressors, and the
  4-2 compressor made of two full adders.
