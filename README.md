# Combined binary/decimal fixed-point multiplier

A single combinational datapath multiplies either two 64-bit unsigned binary
numbers or two 16-digit BCD numbers. The `bd` control chooses the mode. The
product is 128 bits: a binary number, or 32 BCD-8421 digits.

The main idea is how the partial products are added. The most expensive stage
of a parallel multiplier is usually a decimal carry-save tree, and a binary
tree next to it. This design has neither. It cuts every partial product into
4-bit digits and adds each digit column with an ordinary **binary**
carry-save tree. No carry ever leaves a column, so the same tree works in
both radices: column `j` has weight `16^j` in binary and `10^j` in decimal.
Only after this shared tree do the two modes split:

- **Binary path.** The column sums and carries are placed at bit `4j` and
  added.
- **Decimal path.** Each column count (at most 299) is turned into three
  decimal digits, placed at digit `j`, and added in a format that needs no
  decimal correction.

```
 a ─► multiples_gen ─► pp_select ◄─ b, bd
                          │  33 partial products + 2 sign rows
                          ▼
                     column_tree  (32 binary CSA column trees, shared)
                     │                        │
        binary path  ▼                        ▼  decimal path
        tiny_bin_tree (6 vectors → 2)   col_dec_convert ×32  (S+C, bin→BCD, →4221)
        ks_adder 128-bit                tiny_dec_tree (3 vectors → 2, BCD-4221)
                     │                  dec_ks_adder (→ BCD-8421)
                     └──────── bd ? dec : bin ──► p
```

## Digit codes used

Decimal digits appear in four weighted 4-bit codes. Each code is named after
its bit weights.

| code | weights | why it is used |
|------|---------|----------------|
| BCD-8421 | 8 4 2 1 | operands and product (ordinary BCD) |
| BCD-5421 | 5 4 2 1 | recode A to 5421 and shift left one bit: the result is 2A in 8421. Shift A left three bits and each nibble is a 5421 digit of 5A. |
| BCD-4221 | 4 2 2 1 | all 16 codes are valid digits. A bitwise full-adder row on three 4221 digits gives a sum digit `s` and a carry digit `h`, with `a+b+c = s+2h` and no correction. |
| BCD-5211 | 5 2 1 1 | recode a 4221 vector to 5211 and shift it left one bit: the result is 2× the value in 4221 (decimal doubling) |

The recoders are `bcd8421_to_5421`, `bcd5421_to_8421`, `bcd8421_to_4221`,
`bcd4221_to_8421`, `bcd4221_to_5211` and `bcd_nines_comp`. All but
`bcd4221_to_5211` use two-level sum-of-products equations. `bcd4221_to_5211`
picks one 5211 code per value with a case table.

## Multiples and partial product selection

Each multiplier digit selects **two** partial products. MUX1 picks from
{0, ±A, ±2A}. MUX2 picks from {0, ±4A, ±8A} in binary and from {0, 5A, 10A}
in decimal. Only shifted or recoded copies of A are needed, so no multiple
requires a carry-propagate adder.

- **Binary: radix-16 Booth.** Digit `i` reads bits
  `b[4i+3..4i]` plus `b[4i-1]` and has the value `-8b3+4b2+2b1+b0+b-1`.
  MUX1 takes the radix-4 Booth digit of `(b1 b0 b-1)`. MUX2 takes four times
  the radix-4 Booth digit of `(b3 b2 b1)`. The multiplier is unsigned, so a
  17th digit `(0000 . b63)` adds 0 or A and has no MUX2 product.
- **Decimal: signed-digit radix-5.** A digit 0–9 is split into a MUX1 part
  and a MUX2 part:

  | digit | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
  |-------|---|---|---|---|---|---|---|---|---|---|
  | MUX1 | 0 | A | 2A | −2A | −A | 0 | A | 2A | −2A | −A |
  | MUX2 | 0 | 0 | 0 | 5A | 5A | 5A | 5A | 5A | 10A | 10A |

`pp_recoder` derives the select lines from the digit with two-level
equations. `pp_select` forms the products with AND-OR multiplexers:

- **Binary negative product.** The selected multiple is inverted over its
  whole field. A Booth "−0" therefore becomes all ones.
- **Decimal negative product.** The selection takes the nine's complement
  of A or 2A, which `multiples_gen` prepares.

In both cases the "+1" that completes the complement comes out as a separate
sign bit (`inv1[i]`, `inv2[i]`). That gives 17 + 16 = 33 partial products
plus two rows of sign bits.

## Negative partial products in a column tree

This is the least obvious part of the design, and its scheme is this
design's own. A column tree adds digits as unsigned numbers, so a negative
partial product cannot simply be sign-extended. Sign extension would fill
every column up to 31 with F or 9 digits.

Instead:

- Every product is a field of 17 digits (`F_DIGITS`). Let `r` be the radix
  (16 or 10) and `X` the magnitude of the selected multiple. The field holds
  `X` for a positive product and `r^17 − 1 − X` for a negative one.
- The sign bit adds 1 at the field's lowest column.
- A "positive flag" (`1 − sign`) is added one column above the field, at
  column `i+17`.
- With the flag, both cases become `r^17 + (±X)`, shifted by `r^i`. Every
  row is then non-negative and exactly `r^17·r^i` too large.
- One constant row removes all these offsets: minus their sum, modulo
  `r^32`. It has zeros in columns 0–16, `r−2` in column 17 and `r−3` in
  columns 18–31. `bd` picks the radix-16 or the radix-10 constant.
- Everything above column 31 is dropped. The result is exact because the
  product is less than `r^32`.

`column_tree` gives every column exactly the digits and bits that land in
it. It sums them with its own carry-save tree (`csa_column`): Wallace-style
levels of 3:2 adders (`csa3`). The single bits are slipped into the empty
LSB of first-level carries where possible.

The worst column holds 33 digits plus 2 bits:

- binary: 33·15 + 2 = 497, so 9 bits;
- decimal: 33·9 + 2 = 299, so three BCD digits.

Sum and carry are `col_width(j)` = 6–9 bits wide. Every operand of the tree
is non-negative and their total fits the width, so `s + c` equals the
column total exactly, with no hidden overflow.

## After the column tree

**Binary.** `tiny_bin_tree` places each column's sum and carry at bit `4j`.
A 9-bit value spans three digit positions, so columns are dealt round-robin
into three sum vectors and three carry vectors (`j mod 3`), where they
cannot overlap. Four 128-bit 3:2 adders reduce the six vectors to two, and a
128-bit Kogge-Stone adder (`ks_adder`) gives the product.

**Decimal.** For each column, `col_dec_convert`:

1. adds the sum and carry with a small Kogge-Stone adder;
2. converts the count to three BCD digits by shift-and-add-3 (`bin2bcd`):
   before each one-bit left shift, every digit ≥ 5 gets 3 added;
3. recodes the digits to BCD-4221.

`tiny_dec_tree` deals the columns round-robin into three 32-digit vectors,
then reduces them with one decimal 3:2 adder: a bitwise full-adder row, with
the carry vector doubled by `dec_x2_4221`. `dec_ks_adder` adds the two
vectors:

- each digit pair is recoded to 8421 and added (0–18);
- digit generate (`≥10`) and propagate (`=9`) feed a Kogge-Stone prefix
  tree over the 32 digits;
- every digit prepares its sum and sum+1 modulo 10, and the carry from the
  tree selects one.

## Split and shared back ends

The stages after the column tree exist in two forms. The top-level
parameter `SHARED` picks one.

- **`SHARED = 0` (default): split.** The binary and decimal paths described
  above run side by side and `bd` picks the result. Neither path waits on
  the other's multiplexers.
- **`SHARED = 1`: shared.** Less hardware, at the cost of a multiplexer
  delay in both paths.
  - `tiny_shared_tree`: a single 128-bit 3:2 adder sits behind three 128-bit
    multiplexers and takes either the three decimal vectors or the first
    three binary vectors. Its carry is doubled by a shift in binary and by
    `dec_x2_4221` in decimal. In decimal mode its outputs are final; in
    binary mode three more 3:2 adders finish the job.
  - `bd_ks_adder`: only the first level of the Kogge-Stone adder is
    mode-specific. Each 4-bit digit pair gives a generate (carry at 16, or
    at 10) and a propagate (sum 15, or 9). The digit prefix tree and the
    sum / sum+1 selection are common to both modes.

Both forms produce identical products. `tb_bd_multiplier` tests the split
form and `tb_bd_multiplier_shared` the shared one.

## Interface and timing

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a` | in | 64 | multiplicand: unsigned binary, or 16 BCD-8421 digits |
| `b` | in | 64 | multiplier, same encoding |
| `bd` | in | 1 | 0 = binary, 1 = decimal |
| `p` | out | 128 | product: binary, or 32 BCD-8421 digits |

- The block is purely combinational: no clock, reset or handshake. A product
  is ready one propagation delay after the inputs, so a pipelined use puts
  registers around it.
- Operands are magnitudes. A sign-magnitude user forms the product sign as
  the XOR of the operand signs, outside this block.
- In decimal mode, digit codes 10–15 are not defined.

The width is fixed at 16 digits: the column bookkeeping in `bdm_pkg`
(`N_DIGITS`, `F_DIGITS`, `col_digits`, `col_bits`, `col_width`) is written for
it. The `N` parameter of the top exists only to document this and must stay
16.

## How far it can be trusted

Each module has a self-checking testbench in `tb/` that compares against
integer arithmetic computed in the testbench (`tb_util_pkg`):

- The small recoders, `bin2bcd` and `pp_recoder` are checked exhaustively.
- The other blocks get random and corner inputs.
- `tb_bd_multiplier` and `tb_bd_multiplier_shared` run the full-size
  multiplier on 6,000+ products each:
  - zero, one, all ones and all nines;
  - per-digit corner sweeps, where each digit in turn is at its maximum and
    the others are 0 or 1;
  - uniform random values, and random decimal values with mostly large
    digits.

  It also counts each mechanism and fails if one never occurs: negative
  Booth products, Booth −0, decimal nine's complements, 10A selections, both
  constant rows, three-digit column totals, and decimal carries propagating
  over 8 or more digits.

All testbenches pass. Each was also run against a copy of its module with one
deliberate fault, and each detected it.

Nothing here has been characterised for timing or area, and the arrangement
of adders inside the trees is not tuned for delay.

## Where this differs from the published scheme

The scheme this RTL follows leaves several details open or states them
differently:

- **Column sum and carry are up to 9 bits, not 8.** As a result the binary
  path uses six rearranged vectors instead of four.
- **Layout of the three decimal vectors.** Every column total takes three
  digit positions (round-robin placement). A more compact packing would give
  low columns only two.
- **Handling of negative partial products.** The positive flag and constant
  row above are this design's own.
- **Format conversion in the decimal final adder.** The BCD-4221 to 8421
  conversion sits at the adder's input instead of after the sum selection.
  The result is the same.
- **In the shared tree, the shared 3:2 adder sits at the first binary
  level.** Its position is this design's own choice.
- **Not built:** the earlier variants of the scheme. These use a second
  binary tree for a third partial product per digit, precompute 11A/13A in
  carry-save form, or use a column tree that feeds four/six vectors without
  the per-column decimal adder.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb rtl/bdm_pkg.sv tb/tb_util_pkg.sv rtl/*.sv \
          tb/tb_bd_multiplier.sv --top-module tb_bd_multiplier -Wno-fatal
./obj_dir/Vtb_bd_multiplier
```

Every testbench ends with a `TB_RESULT checks=N failures=M` line. Swap in
any `tb/tb_<module>.sv` and its top name to test one block. The full-size
end-to-end test builds in about 15 s and runs in under a second.

## Files

| file | content |
|------|---------|
| `rtl/bdm_pkg.sv` | sizes, `multiples_t`, `pp_ctl_t`, per-column operand counts |
| `rtl/bd_multiplier.sv` | top |
| `rtl/multiples_gen.sv` | A, 2A, 4A, 8A; decimal A, 2A, 5A, 10A, −A, −2A |
| `rtl/pp_recoder.sv`, `rtl/pp_select.sv` | select lines and partial product multiplexers |
| `rtl/column_tree.sv`, `rtl/csa_column.sv`, `rtl/csa3.sv` | shared binary column tree |
| `rtl/tiny_bin_tree.sv`, `rtl/ks_adder.sv` | binary path |
| `rtl/col_dec_convert.sv`, `rtl/bin2bcd.sv`, `rtl/tiny_dec_tree.sv`, `rtl/dec_x2_4221.sv`, `rtl/dec_ks_adder.sv` | decimal path |
| `rtl/tiny_shared_tree.sv`, `rtl/bd_ks_adder.sv` | shared back end (`SHARED = 1`) |
| `rtl/bcd*.sv` | digit recoders |
| `tb/tb_*.sv` | one testbench per module; `tb_util_pkg.sv` holds the reference arithmetic |
