# Vedic multipliers: Urdhva-Tiryag and Nikhilam, 4x4 bits

Two small unsigned multipliers based on two rules of Vedic mental arithmetic,
written as synthesizable, purely combinational SystemVerilog:

* **Urdhva-Tiryag** ("vertically and crosswise"). The operands are split into
  halves. All four half-size partial products are formed in parallel, and three
  carry select adders sum them column by column.
* **Nikhilam** ("all from nine and the last from ten"). Each operand is
  replaced by its distance from the base 2^N, which is its 2's complement. The
  two small distances are multiplied, and one addition corrects the upper half.

Both take N-bit operands and give a 2N-bit product. N is 4 by default. Neither
has a clock, a register or a handshake: a product is valid one propagation delay
after the operands change.

## Files

| file | module | role |
|------|--------|------|
| `rtl/vedic_top.sv` | `vedic_top` | both multipliers side by side, each with its own ports |
| `rtl/ut_mult.sv` | `ut_mult` | NxN Urdhva-Tiryag multiplier (recursive for N > 4) |
| `rtl/ut_mult2.sv` | `ut_mult2` | 2x2 cell: four AND gates, two half adders |
| `rtl/half_adder.sv` | `half_adder` | half adder |
| `rtl/csel_adder.sv` | `csel_adder` | W-bit carry select adder |
| `rtl/nikhilam_mult.sv` | `nikhilam_mult` | NxN Nikhilam multiplier |
| `rtl/twos_lut.sv` | `twos_lut` | 2's complement read from a constant table |

Each module has a self-checking testbench, `tb/tb_<module>.sv`.

## The Urdhva-Tiryag multiplier

### The 2x2 cell

For 2-bit operands a = {a1, a0} and b = {b1, b0} the rule reads:

* the vertical right column gives s0 = a0·b0;
* the crosswise column gives a0·b1 + a1·b0. A half adder produces s1 and the
  carry c1;
* the vertical left column gives a1·b1 + c1. A second half adder produces s2 and
  the top bit s3.

Four AND gates and two half adders make the whole cell (`ut_mult2`). After the
bit products, the delay is two half adders.

### 4x4 from four 2x2 cells

Split a = {ah, al} and b = {bh, bl} into 2-bit halves. The four cells compute,
all at once:

```
q0 = al*bl   (right vertical)       q1 = ah*bl, q2 = al*bh   (crosswise)
q3 = ah*bh   (left vertical)
```

The product is `q0 + (q1 + q2)·4 + q3·16`. Three 4-bit carry select adders and
one OR gate add these up:

```
adder 1:  s1, c1 = q1 + q2
adder 2:  s2, c2 = s1 + {00, q0[3:2]}
adder 3:  s3     = q3 + {0, c1|c2, s2[3:2]}
p = {s3, s2[1:0], q0[1:0]}
```

Why an OR gate can merge c1 and c2: both carries weigh 2^N in the middle
column, but they are never both 1. If q1 + q2 overflows, the remainder s1 is at
most 2^N − 2^(H+2) + 2, where H = N/2. Adding q0's upper half (below 2^H) to
that cannot overflow again. Adder 3 never carries out, because the product
fits in 2N bits. `ut_mult` asserts both facts.

For N > 4 the same module instantiates itself on N/2-bit halves, down to the
2x2 cell. N must be a power of two. The testbench checks N = 8 exhaustively.

### The carry select adder

The document asks for a "high speed" adder in place of ripple carry, and names
it a carry select adder, but does not draw its inside. `csel_adder` uses the
plain textbook form:

* the lowest block of `BLK` bits (default 2) is a ripple adder fed by `cin`;
* each higher block holds two ripple adders, one for carry-in 0 and one for
  carry-in 1;
* the real carry from the block below selects one of the two results.

`W` and `BLK` are parameters. A short last block is allowed.

## The Nikhilam multiplier

Take the base B = 2^N and the deficits da = B − a and db = B − b. Then

```
a·b = (a − db)·B + da·db
```

An example with B = 16: 14 × 15 gives da = 2 and db = 1. The cross difference
is 14 − 1 = 13 and da·db = 2, so the product is 13·16 + 2 = 210.

The datapath in `nikhilam_mult`:

1. Two `twos_lut` instances give da and db. The 2's complement is read from a
   constant table of 2^N entries instead of being computed by inverting and
   adding one. This removes an adder stage.
2. `ut_mult` multiplies da by db. This reuses the Urdhva-Tiryag multiplier
   above.
3. The low N bits of da·db are the low N bits of the product.
4. Two adders, written as plain `-`/`+` operators for synthesis to map, give
   the high half as (a − db) + (da·db >> N), modulo 2^N. These adders replace
   the carry save adder of the earlier form of this architecture.

The working is modulo 2^N. The cross difference can be negative, and the
high-half sum can wrap. Both wash out because, for nonzero operands, the true
high half lies between 0 and 2^N − 2.

**Zero operands.** The deficit of 0 would be 2^N, which is one bit too wide.
The N-bit 2's complement of 0 is 0, and the formula would then be wrong. The
module therefore forces the product to 0 when either operand is 0. This guard
is this design's own addition; the architecture it follows does not handle the
case.

## What follows the source architecture and what is this design's choice

Taken from the architecture:

* the 2x2 cell: four AND gates, two half adders and their wiring;
* the 4x4 structure: four 2x2 cells, three 4-bit carry select adders and an
  OR gate, wired as above;
* the Nikhilam datapath: two 2's complement tables, a 4x4 Urdhva-Tiryag
  multiplier and synthesized adders, with the low half taken straight from the
  multiplier;
* the test vectors 15×15 = 225, 13×2 = 26 and 14×15 = 210.

Chosen here:

* the inside of the carry select adder, and its block size of 2;
* the recursive extension to N = 8, 16, …;
* the zero-operand guard in the Nikhilam multiplier;
* the contents of the 2's complement table, computed from its definition;
* having no clock or registers;
* placing the two multipliers side by side in `vedic_top` with separate ports.

Not modelled:

* the FPGA board wiring (switches and LEDs) that was used to show results in
  hardware;
* the reported path delays (about 12.7 ns for the Urdhva-Tiryag multiplier and
  16.4 ns for the Nikhilam one on a Spartan-3 device). These are properties of
  the vendor flow, not of the RTL.

## Limits

* Operands are unsigned.
* `twos_lut` builds its table at elaboration time. At N = 16, with 65,536
  entries, Verilator runs out of memory. N = 4 and N = 8 are tested. For wider
  operands, replace the table with `~x + 1`.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. A
watchdog counts a failure if the run hangs. Example:

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_vedic_top.sv
./obj_dir/Vtb_vedic_top
```

* `tb_vedic_top` runs at the default size with no parameter overrides. It
  checks the three published vectors, then every operand pair on both
  multipliers, and compares the two multipliers with each other. It also counts
  how often each internal mechanism occurred, and fails if any never did:
  * the middle-column carries c1 and c2;
  * a carry select block taking its carry-in-1 result;
  * a Nikhilam deficit product of 16 or more;
  * a negative cross difference;
  * a wrapping high-half sum;
  * the zero guard.
* `tb_ut_mult` and `tb_nikhilam_mult` check N = 4 and N = 8 exhaustively.
* `tb_twos_lut` checks N = 4 and N = 8 exhaustively.
* `tb_csel_adder` checks W = 4 exhaustively, and W = 9 with 4-bit blocks on
  20,000 random operand sets.
* `tb_ut_mult2` and `tb_half_adder` check their cells exhaustively.
