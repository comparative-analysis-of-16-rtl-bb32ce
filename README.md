# radix8_16bit: a 16 x 16 radix-8 Booth multiplier

A parallel multiplier spends most of its delay and area summing partial
products, so the fewer rows there are to add, the better. Plain binary
multiplication of two 16-bit numbers produces 16 rows. Radix-4 (modified)
Booth recoding halves that. Radix-8 recoding, used here, reads the multiplier
three bits at a time, so each row stands for one base-8 digit. That cuts the
row count to about a third. The cost is one awkward multiple of the
multiplicand, 3Y, which has to be made with an adder before any row can be
selected.

The design is a purely combinational 16 x 16 multiplier with a 32-bit
product. One control bit, `s_u`, selects signed (two's complement) or
unsigned operands, so the same datapath serves both formats.

```
 ain (MD) ──► sign extension ──► two's complement ──► hard multiple
              corrector (s_u)    generator (-MD)      generator (+-3MD)
                  │                    │                     │
                  ▼                    ▼                     ▼
 bin (MR) ──► 6 Booth encoders ──► 6 partial product generators
                                        │  (rows weighted 8^i)
                                        ▼
                          CSA tree, 6 → 4 → 3 → 2 rows
                                        │ sum, carry
                                        ▼
                          carry look-ahead adder ──► mul
```

## Interface

| port  | dir | width | meaning |
|-------|-----|-------|---------|
| `ain` | in  | 16 | multiplicand (MD) |
| `bin` | in  | 16 | multiplier (MR), the operand that is Booth-recoded |
| `s_u` | in  | 1  | `1`: both operands signed; `0`: both unsigned |
| `mul` | out | 32 | product, exact for every operand pair in either mode |

There is no clock or reset. `mul` is a combinational function of the
inputs. The only parameter is `N` (operand width, default 16). Every internal
width is derived from it.

## Radix-8 recoding

The multiplier is split into overlapping four-bit groups. The first group is
`{b2, b1, b0, 0}`, with an implied zero below bit 0. Each later group starts
with the top bit of the group before it: `{b5, b4, b3, b2}`, then
`{b8, b7, b6, b5}`, and so on. A group `{q3, q2, q1, q0}` stands for the digit

    d = -4*q3 + 2*q2 + q1 + q0        (a value in -4 .. +4)

and the product is `sum_i d_i * MD * 8^i`. The encoder (`booth_r8_encoder`)
holds this mapping as a 16-entry case table:

| group | digit | group | digit |
|-------|-------|-------|-------|
| 0000 | 0  | 1000 | -4 |
| 0001 | +1 | 1001 | -3 |
| 0010 | +1 | 1010 | -3 |
| 0011 | +2 | 1011 | -2 |
| 0100 | +2 | 1100 | -2 |
| 0101 | +3 | 1101 | -1 |
| 0110 | +3 | 1110 | -1 |
| 0111 | +4 | 1111 | 0  |

A digit travels as the `booth_digit_t` struct in `booth_r8_pkg`: a negate
flag and a magnitude code `MAG0`..`MAG4`. Zero is never flagged negative.

Some published radix-8 tables list this mapping as 0010 → +2, 0100 → +4,
1000 → -7 and so on, up to ±7. That table does not yield correct products.
The table above does, and it is the standard radix-8 Booth recoding.

## How many partial products

An unsigned 16-bit multiplier is a 17-bit signed number, and each radix-8
digit covers three bits. The design therefore uses
`NPP = ceil((N+1)/3) = 6` partial products. The last group,
`{b17, b16, b15, b14}`, reads two extension bits. Five digits would reach only
±4·(1+8+64+512+4096) = ±18724, which is not enough even for signed 16-bit
operands. A figure of 5 partial products for a 16-bit radix-8 multiplier
therefore undercounts by one.

## Signed and unsigned operands: the sign extension corrector

The datapath is signed throughout. `sign_ext_corrector` makes unsigned
operands fit it:
- The multiplicand is extended to 17 bits.
- The multiplier is extended to 18 bits, that is 3·NPP.
- The fill bit is the operand's top bit when `s_u = 1`, and zero when
  `s_u = 0`.

After that, an unsigned operand is just a non-negative signed one. Nothing
else in the datapath depends on the mode.

One bit sets the mode for both operands. A mixed product, such as an unsigned
21 times a signed -8, runs in signed mode. Any non-negative operand below 2^15
means the same number in both formats. A mixed product whose unsigned operand
is 2^15 or more cannot be formed. It would need a separate mode bit per
operand.

## Multiples of the multiplicand

`booth_r8_ppgen` selects, for each digit, one of 0, ±Y, ±2Y, ±3Y, ±4Y, where
Y is the 17-bit extended multiplicand:
- ±2Y and ±4Y are Y or -Y shifted left one or two places.
- -Y comes from `twos_complement_gen` (invert and add one).
- The hard multiples come from `hard_multiple_gen`, which computes
  +3Y = 2Y + Y and -3Y = (-2Y) + (-Y) with two 19-bit carry look-ahead adders.

These two adders sit on the critical path ahead of partial product selection.
That is the price of radix-8 recoding.

Each partial product is 19 bits in two's complement. The top level
sign-extends it to 32 bits and shifts it left 3i places. Full sign extension
is chosen for clarity. It costs some area over the usual sign-encoding tricks.

## Reduction and final addition

`csa_tree` reduces the six rows with rows of 3:2 carry-save adders
(`csa_3to2`, one full adder per bit):
- At each level the rows are taken three at a time.
- One or two leftover rows pass to the next level unchanged.
- For six rows there are three levels: 6 → 4 → 3 → 2.

The tree is generic in `ROWS`. The level count and the rows per level come
from functions in `booth_r8_pkg`.

`cla_adder` adds the final sum and carry rows. It is a two-level carry
look-ahead adder:
- Each 4-bit group writes its internal carries as sums of products of its
  propagate and generate bits.
- A second look-ahead level gives every group's carry-in from the lower
  groups' group-generate and group-propagate signals.

All sums are taken modulo 2^32. The exact product always fits in 32 bits, for
signed and for unsigned operands.

## Files

| file | contents |
|------|----------|
| `rtl/booth_r8_pkg.sv` | digit type, partial product count, tree sizing functions |
| `rtl/radix8_16bit.sv` | top level |
| `rtl/sign_ext_corrector.sv` | operand extension by `s_u` |
| `rtl/twos_complement_gen.sv` | -MD |
| `rtl/hard_multiple_gen.sv` | +3MD, -3MD |
| `rtl/booth_r8_encoder.sv` | one four-bit group → one digit |
| `rtl/booth_r8_ppgen.sv` | one digit → one partial product |
| `rtl/csa_tree.sv`, `rtl/csa_3to2.sv` | carry-save reduction |
| `rtl/cla_adder.sv` | carry look-ahead adder |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench compares its block with values it computes independently
using integer arithmetic. It prints `TB_RESULT checks=<n> failures=<n>` and
has a watchdog. What each one covers:
- `tb_twos_complement_gen`: all 2^17 inputs.
- `tb_booth_r8_encoder`: all 16 groups.
- `tb_booth_r8_ppgen`: every digit, with random multiplicands.
- `tb_csa_tree`: trees of 3, 6 and 9 rows.
- `tb_cla_adder`: 32-bit and 19-bit widths, including carry chains through
  every group.

`tb_radix8_16bit` runs the whole multiplier at its default size:
- The four worked examples 21 × 8 = 168, -21 × -8 = 168, 21 × -8 = -168 and
  -21 × 8 = -168, in signed mode.
- All pairs of the corner values 0, 1, 0x7FFF, 0x8000, 0xFFFF and 0xAAAA, in
  both modes.
- 200,000 random pairs with random mode.

It also counts how often each digit -4..+4, each mode and a negative
multiplicand occurred. Any of these that never occurs counts as a failure. It
runs in well under a second.

To simulate with Verilator, for example the top level:

    verilator --binary --timing -Wall -Wno-fatal -y rtl \
        rtl/booth_r8_pkg.sv tb/tb_radix8_16bit.sv --top-module tb_radix8_16bit
    ./obj_dir/Vtb_radix8_16bit

The other testbenches build the same way. The package must come first on the
command line.

## Where this design makes its own choices

- **`s_u` port.** A schematic with only `ain`, `bin` and `mul` (64 I/O pins)
  describes a unit without a mode pin. Here `s_u` is an input, so the unit
  has 65 pins. Tie `s_u` to 1 for a signed-only part.
- **No registers.** Input buffers, a clocked and enabled negation stage, and
  an accumulator after the multiplier appear in general multiplier block
  diagrams. None is built. The unit is combinational, so add registers around
  it as the system needs.
- **3Y for any multiplicand.** One suggested speed-up keeps the multiplicand
  in a known set of values held in memory, to avoid computing 3Y at run time.
  No such table is specified, so 3Y is always computed.
- **Internal structure.** The encoding of the digit interface, the extension
  widths, the full sign extension of rows, the Wallace-style tree shape and
  the 4-bit CLA grouping are all implementation choices. Any of them can be
  changed without changing the arithmetic.
- **Baselines not built.** Radix-2 and radix-4 Booth multipliers, which the
  radix-8 design is usually compared against, are not included.

Lint notes: Verilator reports unused bits in two places, and both are
intentional:
- The top carry bit of each `csa_3to2` row is dropped, because arithmetic is
  modulo 2^W.
- In `cla_adder` the sum bits of the padding above `W` are not used when `W`
  is not a multiple of 4.
