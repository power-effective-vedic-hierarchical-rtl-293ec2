# 16x16 Vedic hierarchical multiplier with BEC increment and tristate carry select

A combinational 16x16 unsigned multiplier. It builds the product from four
8x8 Vedic multipliers. The aim is low power: short critical paths and few
logic elements. Two ideas shape the recombination network:

- The top byte of the product is never added. It is only incremented, and
  the increment is done by binary-to-excess-one converters (BECs). These are
  cut into 4-bit halves so that the AND chain that decides each bit flip
  stays short.
- The middle 16 bits are summed by a carry select adder. Its "pick the
  carry-in-0 or carry-in-1 result" selectors are pairs of tristate buffers,
  not multiplexers: the input that is not chosen is cut off.

`z = x * y` settles in one combinational pass. There is no clock and no
reset.

## Splitting the product

Write `x = XH:XL` and `y = YH:YL` with 8-bit halves. Then

    x*y = a3*2^16 + (a1 + a2)*2^8 + a0
    a0 = XL*YL   a1 = XL*YH   a2 = XH*YL   a3 = XH*YH

Each `a` is a 16-bit product from one `vedic8x8`. The product is then
assembled byte by byte:

| product bits | source |
|---|---|
| `z[7:0]`   | `a0[7:0]`, untouched |
| `z[23:8]`  | low 16 bits of `a1 + a2 + {a3[7:0], a0[15:8]}` |
| `z[31:24]` | `a3[15:8] + k`, where `k` is the carry out of the middle sum |

The three middle words go through a 16-bit carry save adder (`csa16`). It
produces a sum vector `cs` and a carry vector `cc`. Then `cs + (cc << 1)` is
summed by the 16-bit carry select adder (`csla16_tri`).

## The top byte and the carry of two

Three 16-bit words can add up to more than 2^17. So the carry `k` into the
top byte is 0, 1 or 2, not just 0 or 1. For example, x = y = 65023 gives
k = 2, and about 1.2 % of random operand pairs do the same. The carry
comes from two places:

- `cc[15]`: the CSA carry out of bit 15. Its weight is 2^16, which falls
  outside the 16-bit adder.
- `cout`: the carry out of the carry select adder.

Each one drives its own increment stage (`bec_mux8`):

    top1     = a3[15:8] + cc[15]     (stage u_top1)
    z[31:24] = top1     + cout       (stage u_top2)

`cc[15]` is known as soon as the CSA settles. So the first stage, and the
BECs of the second stage, do their work while the carry select adder is
still adding. After the adder's carry out arrives, only one 8:4 mux is left
on the path.

A design with a single +1 stage, selected only by the adder's carry out,
gives wrong products whenever k = 2. With that variant, 3459 of the
300,000 random pairs of the end-to-end testbench come out wrong.

### Inside one increment stage (`bec_mux8`)

There are two 4-bit BECs, one per nibble. Each BEC follows the pattern

    X0 = ~B0,  X1 = B1 ^ B0,  X2 = B2 ^ (B0&B1),  X3 = B3 ^ (B0&B1&B2)

Two 8:4 muxes choose between each nibble and its incremented value:

- The low mux is selected by the stage's `sel`.
- The high mux is selected by `sel & (B0&B1&B2&B3)`. The four-input AND is
  the end of the low BEC's own AND chain (the `ovf` output of `bec`). So
  the high nibble is incremented only when the low nibble wraps.

The AND with `sel` is needed. Without it, the high nibble would also be
incremented when nothing is being added.

## Vedic base multiplier (`vedic8x8`)

This is the "vertical and crosswise" (Urdhva Tiryakbhyam) method, column by
column:

- Column k adds the carry from column k-1 to every partial product
  `a[i] & b[j]` with `i + j = k`.
- The sum's least significant bit is product bit k. The rest is the carry
  into column k+1, and it can be several bits wide.

Column 0 is just `A0B0`. Column 14 is `C13 + A7B7`, and the final carry is
product bit 15. The module takes the width as parameter `N` (default 8).
The column sums are written as integer additions, so synthesis chooses the
compressor for each column.

## Carry select adder with tristate selectors (`csla16_tri`)

The adder is a square-root carry select adder with groups of 2, 2, 3, 4 and
5 bits: bits [1:0], [3:2], [6:4], [10:7] and [15:11].

- Group [1:0] is a plain ripple carry adder (`rca`).
- Each higher group of width w has three parts:
  - an RCA that assumes carry-in 0. It gives a (w+1)-bit `{carry, sum}`.
  - a (w+1)-bit BEC (`bec`) that turns that result into the carry-in-1
    result.
  - a 2(w+1):(w+1) tristate selector (`tri_buf_sel`). It puts one of the
    two results on the group's output net. It is switched by the carry out
    of the group below.
- The top bit of each selected result is the carry into the next group. The
  top group's carry is `cout`.

The four selectors are therefore 6:3, 8:4, 10:5 and 12:6. The BECs are 3,
4, 5 and 6 bits wide.

`tri_buf_sel` has two continuous assignments that drive `'z` in turns. Lint
and synthesis tools list these nets as having several drivers. That is the
intent: exactly one driver is enabled at any time, so a net never floats
and is never contended. On FPGAs without internal tristate buffers,
synthesis maps each pair to select logic.

## Modules

| module | role |
|---|---|
| `hier_mult16` | top: four Vedic blocks, CSA, carry select adder, two top-byte increment stages |
| `mult_pkg` | operand, half and product widths (16, 8, 32) |
| `vedic8x8` | N x N Vedic column multiplier, N = 8 |
| `csa16` | three-operand carry save adder, one full adder per bit |
| `csla16_tri` | 16-bit carry select adder with tristate selectors |
| `rca` | W-bit ripple carry adder (group adder) |
| `bec` | N-bit binary-to-excess-one converter with an all-ones output |
| `tri_buf_sel` | 2W:W selector from two tristate buffers |
| `mux_8to4` | 2:1 mux of 4-bit words |
| `bec_mux8` | 8-bit conditional increment: two 4-bit BECs and two 8:4 muxes |

Every file in `rtl/` begins with a comment on the block's function, timing
and interface.

## Departures and choices

These points go beyond the published design, or fill in what it leaves
open:

- **Second increment stage.** This is the carry-of-two fix described
  above. It is the one functional change to the published structure. The
  published structure has one top-byte increment stage.
- **AND of the high-nibble select with `sel`** in `bec_mux8`.
- **BEC width of group [10:7].** It is 5 bits, which fits the group's 10:5
  selector.
- **Unsigned operands.** There is no signed mode.
- **No carry input.** The carry select adder has none.
- **Gate-level details that follow the usual textbook form.** These are
  the full adders of the CSA and the RCAs, and the plain 2:1 mux behind
  the "8:4 MUX".
- **Configuration.** Only the combined configuration is built: the split
  BEC plus the tristate carry select adder. The variants with an 8-bit BEC
  and a 16:8 mux, or a mux-based carry select adder, are not included.

Power, logic-element counts and delays depend on the FPGA tools and device.
They are not modelled here.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
testbench ends with a line `TB_RESULT checks=N failures=M`.

- `tb_vedic8x8`: all 65,536 operand pairs, and N = 4 exhaustively.
- `tb_bec`: the four bit equations, plus exhaustive runs at 4 and 6 bits.
- `tb_bec_mux8`: every byte with both `sel` values.
- `tb_csla16_tri`: 20,000 random and corner pairs. It also checks that
  every group took both its carry-0 and carry-1 path.
- `tb_hier_mult16`: the end-to-end test, at the design's only size. It
  covers:
  - 1x1, 20x40, 350x500 and 65535x65535, with their products;
  - corner cases, including x = y = 65023;
  - 300,000 random pairs.

  It works out from the operands which mechanisms each pair uses:
  - top-byte carry 0, 1 and 2;
  - each increment stage;
  - the high-nibble BEC in each stage;
  - each adder group's BEC path.

  It fails if any of these never happened.

Simulate with Verilator 5, for example:

    verilator --binary --timing -Irtl -y rtl +libext+.sv rtl/mult_pkg.sv \
        tb/tb_hier_mult16.sv --top-module tb_hier_mult16 -o sim
    ./obj_dir/sim

The same pattern works for the other testbenches. The end-to-end run takes
a few seconds.

## Changing it

- **Base block.** `vedic8x8` is parameterised and works at other widths.
- **Recombination network.** The top level is drawn for 16-bit operands.
  Other widths would need:
  - a different group split in `csla16_tri`;
  - a `bec_mux8` generalised to the new half width.
- **Pipelining.** To pipeline the multiplier, register `x`/`y` and `z`
  around `hier_mult16`. A natural internal cut is after the four Vedic
  blocks.
