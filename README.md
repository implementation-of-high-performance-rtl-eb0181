# 64-bit Vedic multiply-accumulate unit

A multiply-accumulate (MAC) unit computes running sums of products,
`F = sum of P_i * Q_i`. Filters, dot products, convolutions and polynomial
evaluation are built from this operation. This MAC takes two 64-bit unsigned
operands on every clock. It multiplies them and adds the 128-bit product to a
129-bit accumulator.

The main idea is the multiplier. It is not an array or Wallace-tree
multiplier. It uses the Vedic "vertically and crosswise" (Urdhva
Tiryagbhyam) method:

- A 64x64 product is built from four 32x32 products.
- Each of those is built from four 16x16 products, and so on down to 2x2 cells.
- Each 2x2 cell is four AND gates and two half adders.

Every level has the same regular structure. All the small products of one
size are formed in parallel.

```
            a[63:0]   b[63:0]
               |         |
        +------v---------v------+
        |   vedic_multiplier    |   64x64 -> 128 bits, combinational
        +-----------+-----------+
                    | product[127:0]
        +-----------v-----------+
        |   carry_save_adder    |<------------ out[127:0]
        |      (128 bits)       |
        +-----------+-----------+
                    | sum[128:0]  (bit 128 = carry out)
                    |   bit 128 of next sum = sum[128] XOR out[128]
        +-----------v-----------+
  clk ->|      accumulator      |  129-bit register, synchronous rst
  rst ->|        (PIPO)         |
        +-----------+-----------+
                    |
                out[128:0] ------> back to the adder
```

## The Vedic multiplier

### Splitting an NxN product

Split each operand into a high half and a low half of H = N/2 bits:
`a = aH:aL` and `b = bH:bL`. Four half-size multipliers work in parallel:

| product | operands  | weight |
|---------|-----------|--------|
| q0      | aL * bL   | 1      |
| q1      | aH * bL   | 2^H    |
| q2      | aL * bH   | 2^H    |
| q3      | aH * bH   | 2^2H   |

Each q is 2H = N bits wide. The three adders below combine them. This is
the 16x16 arrangement (H = 8), and the design uses it at every level:

```
  product[H-1:0]  = q0[H-1:0]                          passed straight through
  ADDER1          = q1 + q0[2H-1:H]                    2H bits
  ADDER2          = {q3, H zeros} + {H zeros, q2}      3H bits
  ADDER3          = ADDER1 + ADDER2                    3H bits = product[4H-1:H]
```

The low H bits of q0 carry no weight from the other three products, so they
go straight to the result. No sum overflows its stated width,
because each sum is a part of a product that fits. ADDER1 and ADDER2 are
independent, so the tree is two adders deep per level.

`vedic_adder_tree` holds these three adders. The original design names the
adders but does not say how they are built, so they are written with `+` and
the synthesis tool chooses the adder.

### The 2x2 cell

`vedic_2x2` follows the three steps of the method:

1. Vertical: `q0 = a0 & b0`.
2. Crosswise: `a1&b0` and `a0&b1` go into a half adder. Its sum is `q1`.
3. Vertical: `a1&b1` and the crosswise carry go into a second half adder.
   Its sum is `q2` and its carry is `q3`.

### How the hierarchy is generated

`vedic_multiplier` does not instantiate itself recursively, because some
tools do not elaborate that form. It generates the tree one level at a time
instead:

- Level `L` works on blocks of `S = 2^(L+1)` bits.
- It holds the array `prod[i][j] = a[S*i +: S] * b[S*j +: S]`.
- At level 0, each entry is a `vedic_2x2` cell.
- At higher levels, entry `(i, j)` is a `vedic_adder_tree`. Its `q0..q3`
  are the entries `(2i, 2j)`, `(2i+1, 2j)`, `(2i, 2j+1)` and `(2i+1, 2j+1)`
  of the level below.
- The top level has a single entry, which is the product.

For N = 64 there are six levels. They hold 1024 2x2 cells and
256 + 64 + 16 + 4 + 1 = 341 adder trees. `N` must be a power of two, 2 or
larger. An elaboration-time assertion checks this.

## The carry save adder

`carry_save_adder` adds two WIDTH-bit numbers and a carry in. The result has
WIDTH+1 bits. It uses two rows of one-bit cells:

- **Row 1** works on all bit positions in parallel. Bit 0 is a full adder
  that also takes `cin`. Every other bit is a half adder, which gives the
  saved sum `S_i = p_i ^ q_i` and the saved carry `C_i = p_i & q_i`.
- **Row 2** merges the saved sums with the saved carries, shifted one place
  up:
  - Bit 0 is row 1's bit-0 sum.
  - Bit 1 is a half adder, since no chain carry enters it.
  - Bits 2 to WIDTH-1 are full adders, linked by a ripple carry.
  - The top bit is the XOR of the last saved carry and the last chain carry.
    These two can never both be 1, so no final carry out is built.

Only row 1 is parallel. Row 2 is a ripple chain, so the adder's delay still
grows with WIDTH.

## The accumulator and the 129th bit

`accumulator` is a parallel-in, parallel-out register. It loads all 129 bits
on every rising edge. `rst` is synchronous and active high, and clears the
register to zero.

The adder is 128 bits wide, but the accumulator is 129 bits and all of it is
fed back. `mac_64_bit` joins the two as follows:

- The adder adds the product to the low 128 bits of the accumulator.
- The new bit 128 is the old bit 128 XOR the adder's carry out.

So the running sum is exact up to 2^129 - 1, which is at least two
full-scale products. Beyond that it wraps modulo 2^129, and nothing flags the
wrap. Operands are unsigned.

## Interface and timing of `mac_64_bit`

| port  | dir | width | meaning                                          |
|-------|-----|-------|--------------------------------------------------|
| clk   | in  | 1     | clock, rising edge                               |
| rst   | in  | 1     | synchronous clear of the accumulator, active high |
| a     | in  | N     | operand (N = 64)                                 |
| b     | in  | N     | operand                                          |
| out   | out | 2N+1  | accumulated sum (129 bits)                       |

The parameter is `N` (default 64). The adder is 2N bits wide and the
accumulator 2N+1 bits.

The unit has no input registers and no pipeline:

- The `a` and `b` present before a rising edge are multiplied and added at
  that edge. The new sum appears on `out` just after it.
- One product is accumulated per clock, with no handshake or enable. To
  pause accumulation, hold `a` or `b` at zero.
- If `rst` is high at an edge, the register clears and that cycle's product
  is discarded.
- The critical path runs from `a`/`b` through the multiplier tree and the
  128-bit ripple in row 2 of the adder, to the register. Choose the clock
  period accordingly.

## Where this RTL departs from, or adds to, the original description

The original description fixes the overall structure, all the widths and the
2x2 cell. It also fixes the 16x16 combining scheme and the two-row adder. The
following are choices made here:

- **Adder-tree adders**: written as `+`, since their construction was not
  given.
- **Operand split in the 16x16 scheme**: the third 8x8 block takes
  `a[7:0]` and `b[15:8]`, as in the original block diagram.
- **Carry save adder, first row**: the original says a half adder is used at
  every position. Its 8-bit drawing puts a full adder with a carry in at
  bit 0. The drawing is followed. The MAC ties `cin` to 0, so the two readings
  behave the same there.
- **Carry save adder, second row**: the 8-bit drawing alternates half and
  full adders along the carry chain. A half adder cannot add three bits, so
  every position that a chain carry reaches is a full adder.
- **128-bit adder with a 129-bit accumulator**: joined with the XOR for the
  top bit described above. Overflow past 2^129 wraps.
- **Reset**: a reset input is named, but its polarity and timing are not.
  Here it is synchronous and active high.
- **Signedness**: unsigned throughout.

The comparison design, a MAC built on a modified Wallace-tree multiplier, is
not included. The published figures are FPGA results: about 5547 slices and a
47.156 ns path for this design, against 5770 slices and 49.063 ns for the
Wallace version. They come from one vendor's synthesis and are not
reproduced here. A generic yosys synthesis of `mac_64_bit` gives about 10,000
coarse cells and 129 flip-flops. Of those cells, 341 are the multi-operand
adders of the adder trees and 2431 are XOR gates.

## Files

| file | contents |
|------|----------|
| `rtl/mac_64_bit.sv` | top: multiplier, adder and accumulator |
| `rtl/vedic_multiplier.sv` | NxN Vedic multiplier, generated tree |
| `rtl/vedic_adder_tree.sv` | the three adders that join four sub-products |
| `rtl/vedic_2x2.sv` | 2x2 leaf cell |
| `rtl/carry_save_adder.sv` | two-row adder, WIDTH+1-bit sum |
| `rtl/accumulator.sv` | PIPO register |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | one-bit cells |
| `tb/tb_*.sv` | one self-checking testbench per module above, plus the top |

## Verification

Each testbench compares its module with arithmetic done in the testbench
itself, and prints `TB_RESULT checks=<n> failures=<m>`. Each also has a
watchdog.

- `tb_vedic_2x2`: all 16 operand pairs.
- `tb_vedic_multiplier`:
  - 4x4 and 8x8: exhaustive.
  - 16x16: 20,000 random pairs.
  - 64x64: corner cases plus 20,000 random pairs.
- `tb_carry_save_adder`:
  - 8-bit: exhaustive, including the carry in.
  - 128-bit: carry-propagation corner cases plus 20,000 random triples.
- `tb_accumulator`: loads, holds between edges, and synchronous clear, over
  2000 cycles.
- `tb_mac_64_bit` runs the top at its default size. It checks the sum after
  every edge, and checks before every edge that `out` still holds the
  previous sum. It covers:
  - the dot product 1·1 + … + 8·8 = 204;
  - 5000 random operand pairs, with resets in the middle of the stream;
  - all-ones operands, which force a carry into bit 128 and then a wrap past
    2^129.

  It counts how often each mechanism occurs (accumulate, clear, carry into
  bit 128, wrap) and fails if any of them never happens.

Every testbench was also run against a deliberately broken copy of its
module, and each one reported failures.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -Irtl \
    tb/tb_mac_64_bit.sv --top-module tb_mac_64_bit -Mdir obj_mac
./obj_mac/Vtb_mac_64_bit
```

Replace the testbench name to run any other test. The full-size MAC test
builds in about 15 seconds and runs in under a second. For a narrower unit,
set `N` to any power of two from 2 up, for example
`mac_64_bit #(.N(16))` or `-GN=16` on a Verilator command line for the top.
The adder and accumulator widths follow `N`.
