# 16 × 5 multiplier on a five-operand carry select adder

An unsigned multiplier of a 16-bit multiplicand `n` by a 5-bit multiplier `m`
that does not add its partial products one row after another. All five
partial products go into a single **modified carry select adder (MCSA)**.
The MCSA first compresses every bit column on its own, so no carries travel
between columns. Only the final two-operand addition has a carry chain, and
that chain is a carry select adder: each 4-bit group has both possible results
ready, and the incoming carry only picks one. The circuit is fully
combinational. It has no clock, no reset and no handshake, and the 21-bit
`product` is valid one propagation delay after `n` and `m` change.

The structure follows the published "High Speed Vedic Multiplier Designs
Using Novel Carry Select Adder" design. Its authors report the delay as
80 % lower than a conventional multiplier's, at 48 % more power and 30 % more
area. Those figures come from their Cadence flow and have not been
reproduced here. This RTL does not claim them.

## Data flow

```
 n[15:0], m[4:0]
      │
 partial_product_generator     pp[k] = (n AND m[k]) << k,   k = 0..4
      │
      ├─ pp[0][0] ─────────────────────────────────────► product[0]
      ├─ pp[0][1], pp[1][1] ─► half_adder ─ sum ───────► product[1]
      │                              └─ carry (weight 4)
      │                                    │
      └─ pp[k][19:2], k = 0..4 ─┐          │ (into bit 0 of operand 3)
                                ▼          ▼
                           mcsa, 18-bit operands ──────► product[20:2]
```

* **Bit 0** has only one contribution, `n[0]&m[0]`.
* **Bit 1** has two, and a half adder adds them.
* **Bits 2 and up** are the MCSA's job. Operand `k` of the MCSA is partial
  product `k` from bit 2 upwards. The half adder's carry has weight 4, the
  weight of MCSA bit 0. It rides in bit 0 of operand 3, because `pp[3]` has
  three zeros below its data and that position is always free.

## Inside the modified carry select adder (`mcsa`)

`mcsa` adds five `WIDTH`-bit unsigned numbers `p q r s t`. It returns a
`WIDTH+2`-bit `sum` and a `carry`, so `{carry,sum} = p+q+r+s+t`. `WIDTH` is
16 by default, which gives an 18-bit sum. There are four steps.

1. **5:3 compressor row** (`compressor_5_3_vec`, one `compressor_5_3` per
   column). Each column's five bits are counted into a 3-bit number
   (0 to 5). Across the columns, those bits form three vectors:

       p+q+r+s+t = w0 + 2·w1 + 4·w2

   A 5:3 compressor is two full adders and a half adder:
   * full adder 1 adds x0, x1 and x2;
   * full adder 2 adds x3, x4 and full adder 1's sum, and its sum is o0;
   * the two carries, both of weight 2, go to the half adder: its sum is o1
     and its carry is o2.

2. **Rearrangement.** `w0[0]` has nothing left to add to it, so it is
   `sum[0]`. The rest of the total is even. Half of it is the sum of three
   `WIDTH+1`-bit vectors:

       x = w0 >> 1      y = w1      z = w2 << 1

3. **3:2 compressor row** (`compressor_3_2_vec`, one full adder per
   column). It reduces `x+y+z` to `a + 2·c`. Bit `WIDTH` of `c` can never be
   1, because `x` and `y` are 0 there. That bit is left unconnected on
   purpose, which is the one unused-signal lint warning in `mcsa`.

4. **Carry select chain** (`csla_chain`). It computes `a + 2·c`:
   * `a[0]` is final and becomes `sum[1]`;
   * `a[WIDTH:1] + c[WIDTH-1:0]` is split into 4-bit groups;
   * the lowest group is a plain ripple carry adder (`rca`) with carry-in 0;
   * every higher group is a `csla_basic_block`.

   A basic block holds two 4-bit ripple carry adders that work at the same
   time, one with carry-in 0 and one with carry-in 1. Four 2:1 multiplexers
   pick the sum and one more picks the carry-out. The carry of the group
   below drives all five selects. So a carry crosses each higher group
   through one multiplexer instead of four full adders. The last group's
   carry-out is the MCSA's `carry`.

Steps 1 to 3 are a carry save reduction in which no column waits for
another. The only carry path in the whole multiplier is in step 4.

## Where this implementation departs from the published design

* **The MCSA is 18 bits wide inside the multiplier.** The published
  multiplier feeds partial-product bits 2 to 17 into the 16-bit MCSA. That
  holds every partial-product bit only for a 14-bit multiplicand: with a
  16-bit multiplicand, `pp[3]` reaches bit 18 and `pp[4]` reaches bit 19.
  The description also works through a 14-bit example, but it names the
  multiplier 16 × 5. This RTL keeps the 16-bit multiplicand and sizes the
  MCSA to `N_WIDTH+2` bits. With `N_WIDTH = 14` the multiplier uses exactly
  the 16-bit MCSA, and `tb_vedic_multiplier_n14` tests that configuration.
* **The narrow top group.** An 18-bit MCSA's carry select chain has groups of
  4, 4, 4, 4 and 2 bits. The published adder only has whole 4-bit groups.
* **Where the half adder's carry goes.** The published drawing sends it
  into the partial product 2 slot at bit 2. That slot already holds
  `n[0]&m[2]`, so the carry goes to the partial product 3 slot instead,
  which is always zero. The weight is the same.
* **The product is 21 bits.** The MCSA's top sum bit and its carry are
  always 0 for a 16 × 5 product and are left unconnected.
* **Gate-level choices.** The full adder, half adder, ripple carry adder and
  multiplexers are only named in the published design, not drawn. They are
  written in the plainest form: XOR/majority full adder, XOR/AND half adder,
  and a chain of full adders. The 5:3 compressor, the bit rearrangement, the
  grouping of the final adder and the basic block's structure follow the
  published drawings.

The conventional array-style multiplier the published design is compared
against is not included.

## Modules

| module | role | parameters (default) |
|---|---|---|
| `vedic_multiplier` | top: `product = n * m` | `N_WIDTH` (16) |
| `partial_product_generator` | `pp[k] = (n & m[k]) << k` | `N_WIDTH` (16) |
| `mcsa` | five-operand adder | `WIDTH` (16) |
| `compressor_5_3_vec` / `compressor_5_3` | 5:3 row / cell | `WIDTH` (16) |
| `compressor_3_2_vec` | 3:2 row of `full_adder` | `WIDTH` (17) |
| `csla_chain` | RCA + carry select groups | `WIDTH` (16) |
| `csla_basic_block` | one carry select group | `WIDTH` (4) |
| `rca` | ripple carry adder | `WIDTH` (4) |
| `full_adder`, `half_adder` | cells | — |
| `mcsa_pkg` | group size 4, operand count 5, group arithmetic | — |

The multiplier width `m` is fixed at 5 (`mcsa_pkg::NUM_OPERANDS`), because
the MCSA adds exactly five operands. `N_WIDTH` may be changed freely. The
MCSA then grows with it.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

* `tb_vedic_multiplier` runs the top at its default size and checks all
  2²¹ (n, m) pairs against `n*m`. It also fails if any of these never
  happens:
  * the bit-1 half adder produces a carry;
  * a 5:3 compressor produces its weight-4 output;
  * each carry select group is switched to its carry-in-1 adder.
* `tb_vedic_multiplier_n14` does the same for the 14-bit configuration,
  all 2¹⁹ pairs.
* The adders and compressor cells are tested exhaustively.
* The vector blocks get random and corner operands: all zeros, all ones,
  one-hot columns and long carry chains.
* `tb_mcsa` and `tb_csla_chain` also run the 18-bit widths used inside the
  multiplier.

Every test passes. For each module, a copy with one deliberate bug made its
testbench fail.

Running one with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl rtl/mcsa_pkg.sv \
    tb/tb_vedic_multiplier.sv --top-module tb_vedic_multiplier
./obj_dir/Vtb_vedic_multiplier
```

The full exhaustive run takes under a second. `verilator --lint-only -Wall`
reports only the deliberately unconnected always-zero bits described above.
