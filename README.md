# 8x8 Vedic multiplier built from Gate Diffusion Input cells

An unsigned 8-bit by 8-bit combinational multiplier. It is organised by the
*Urdhva Tiryakbhyam* ("vertically and crosswise") rule of Vedic arithmetic,
and every gate in it is a Gate Diffusion Input (GDI) cell. A GDI cell is a
two-transistor structure aimed at low power. The multiplier is recursive:

    8x8  = four 4x4 multipliers + three 8-bit ripple carry adders
    4x4  = four 2x2 multipliers + three 4-bit ripple carry adders
    2x2  = four AND partial products + two half adders

All partial products at one level are formed at the same time, and the
adders then combine them. There is no clock, register or reset: the product
follows the operands after the combinational settling time.

## The GDI cell and its six gates

A GDI cell looks like a CMOS inverter with both source terminals brought
out. It has a common gate input **G**. The PMOS source/drain is input **P**
and the NMOS source/drain is input **N**. The two drains together form the
output. When G is low the PMOS conducts and the output is P. When G is high
the NMOS conducts and the output is N. As logic, the cell is therefore a
2:1 multiplexer, `y = G ? N : P` (`gdi_cell`).

You choose the gate by what you tie to P and N (`gdi_gate`, selected by
`FUNC` of type `gdi_pkg::gdi_func_e`):

| FUNC      | N | P | G | output      |
|-----------|---|---|---|-------------|
| `GDI_OR`  | 1 | B | A | A + B       |
| `GDI_AND` | B | 0 | A | A·B         |
| `GDI_MUX` | C | B | A | A'B + A·C   |
| `GDI_NOT` | 0 | 1 | A | A'          |
| `GDI_F1`  | 0 | B | A | A'B         |
| `GDI_F2`  | B | 1 | A | A' + B      |

The table has no XOR, so this design's adders build one from two cells
(`gdi_xor`). A GDI inverter first makes b'. A GDI mux with G = a, P = b and
N = b' then gives a ^ b.

* **Half adder** (`gdi_half_adder`): sum from a GDI XOR, carry from one GDI AND.
* **Full adder** (`gdi_full_adder`): t = a ^ b and sum = t ^ cin from two
  XORs. The carry is a single GDI mux with G = t, P = a and N = cin. If a and
  b differ, the carry-in is passed on. If they are equal, each of them already
  equals the carry, so a is passed.
* **Ripple carry adder** (`gdi_ripple_carry_adder`, parameter `WIDTH`, default 4):
  a half adder at bit 0, then full adders. It has no carry input, because no
  adder in the multiplier needs one.

The cell is modelled as an ideal two-valued multiplexer. A real GDI cell
passes a degraded level when the PMOS passes 0 or the NMOS passes 1. That
effect, and everything else electrical (power, delay, process node), is
outside this RTL. Synthesis will map the cells to ordinary logic. The
structure matters only if you keep the hierarchy, or map `gdi_cell` to a
custom GDI standard cell.

## 2x2 multiplier

`vedic_mul_2x2` forms four products with four GDI AND cells: a0b0, a1b0,
a0b1 and a1b1.

* s0 = a0b0 (the "vertical" product of the low bits).
* s1 is the sum of a half adder on the two crosswise products, a0b1 and a1b0.
* s2 is the sum of a second half adder on a1b1 and the first half adder's carry.
* s3 is the carry of that second half adder. It is 1 only for 3 × 3.

## Combining four sub-products: the 4x4 and 8x8 levels

This is the part that needs care. Both levels have the same shape. Split
each operand into halves of h bits: A = AH:AL and B = BH:BL. Four
sub-multipliers compute, in parallel:

    q0 = AL·BL    q1 = AL·BH    q2 = AH·BL    q3 = AH·BH       (2h bits each)
    A·B = q0 + (q1 + q2)·2^h + q3·2^(2h)

Three 2h-bit ripple carry adders sum them. Here h = 2 for the 4x4 multiplier
and h = 4 for the 8x8 one:

| adder | operands                               | result                 |
|-------|----------------------------------------|------------------------|
| RCA1  | q1 + q2                                | sum1, carry **ca1**    |
| RCA2  | sum1 + {0…0, q0[2h-1:h]}               | sum2, carry **ca2**    |
| RCA3  | q3 + {0…0, ca1 OR ca2, sum2[2h-1:h]}   | product[4h-1:2h], ca3  |

* The low h bits of the product are q0[h-1:0].
* The next h bits are sum2[h-1:0].

**The two middle carries.** ca1 and ca2 both have weight 2^(3h), so both
belong on bit h of RCA3's second operand. One GDI OR cell merges them. This
loses nothing, because they are never 1 together. If q1 + q2 overflows, then
sum1 is small: at most 2 at the 4x4 level, at most 194 at the 8x8 level. In
that case RCA2 cannot overflow as well. This is easy to get wrong. Wiring
only ca1 into RCA3 and dropping ca2 gives wrong products in 4 of the 256
cases of the 4x4 multiplier (11 × 15 is one). At the 8x8 level it gives wrong
products in 524 of the 65,536 cases.

**ca3** is always 0, because the product fits in 4h bits. It is left
unconnected on purpose. Verilator's lint reports it as an unused signal.

Overall, the 8x8 multiplier has 64 GDI AND partial-product cells, 32 half
adders inside the 2x2 multipliers, and 12 four-bit plus 3 eight-bit ripple
carry adders. The longest path is a 2x2 multiplier, then three 4-bit adders,
then three 8-bit adders, all in series.

## How closely this follows the source design

These parts follow the published design:

* The GDI cell and its function table.
* The three-level structure and its block counts.
* Which operand halves feed which sub-multiplier.
* The operands of each adder, and the output bit slices.
* The 2x2 half-adder arrangement.

These are this design's own choices:

* **Gates inside the adders.** Only the half adder and the ripple carry adder
  are named, not their gates. The XOR and full-adder constructions above were
  picked as simple GDI circuits.
* **Merging ca2 into RCA3.** The block diagrams give RCA3 one carry input,
  labelled ca1. The 4x4 diagram gives both carries that label, and the 8x8
  diagram leaves ca2 unconnected. The OR merge is the reading that yields
  correct products.
* **Bit order at RCA3's input.** The diagrams do not print the bit order of
  the constant zeros and the carry at RCA3's input. They are placed by weight.
* **No extra AND gates at the 4x4 level.** The 4x4 level is described as
  having "four AND gates" besides its 2x2 multipliers. No such gates appear
  in its block diagram, and the product needs none, so none are added.
* **Unsigned operands.** Signed multiplication is not addressed.
* **Matrix multiplication.** Using the multiplier for matrix multiplication is
  mentioned as an application. No such unit is described, so none is provided.

## Files

| file | contents |
|------|----------|
| `rtl/gdi_pkg.sv` | `gdi_func_e`, the six GDI wirings |
| `rtl/gdi_cell.sv` | GDI cell, `y = g ? n : p` |
| `rtl/gdi_gate.sv` | one cell wired as OR/AND/MUX/NOT/F1/F2 |
| `rtl/gdi_xor.sv`, `rtl/gdi_half_adder.sv`, `rtl/gdi_full_adder.sv` | adder cells |
| `rtl/gdi_ripple_carry_adder.sv` | `WIDTH`-bit ripple carry adder |
| `rtl/vedic_mul_2x2.sv`, `rtl/vedic_mul_4x4.sv` | sub-multipliers |
| `rtl/vedic_mul_8x8.sv` | top: `a[7:0]`, `b[7:0]` in, `s[15:0] = a*b` out |
| `tb/tb_*.sv` | one self-checking testbench per module above |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog counts a failure if a run hangs. For example, for the top:

    verilator --binary --timing --assert -Irtl rtl/gdi_pkg.sv tb/tb_vedic_mul_8x8.sv \
        --top-module tb_vedic_mul_8x8 -Mdir obj_8x8
    ./obj_8x8/Vtb_vedic_mul_8x8

Swap in another `tb_<module>` to test another level. Verilator finds the
submodules through `-Irtl`.

## Verification

All testbenches are exhaustive and compare against integer arithmetic:

| testbench | what it applies |
|-----------|-----------------|
| `tb_gdi_cell` | all 8 input combinations |
| `tb_gdi_gate` | all 8 input combinations, on all six functions |
| `tb_gdi_half_adder` | all 4 input pairs |
| `tb_gdi_ripple_carry_adder` | all pairs at widths 4 and 8, including the full-length carry ripple 1 + (2^WIDTH − 1) |
| `tb_vedic_mul_2x2` | all 16 operand pairs |
| `tb_vedic_mul_4x4` | all 256 operand pairs |
| `tb_vedic_mul_8x8` | all 65,536 operand pairs, plus a few hand-computed products |

`tb_vedic_mul_2x2` also checks the bit equations of s0, s1 and s3.

The 4x4 and 8x8 testbenches also work out, from the operands alone, how
often each carry of the adder tree is set. They count ca1, ca2 and the 2x2
fourth bit, at every level. A run fails if any of them never occurred.

Every testbench was also run against a deliberately broken copy of its
module, and each one then reported failures. The broken copies include the
dropped-ca2 wiring described above.

All testbenches pass with Verilator 5, and the RTL elaborates under Yosys'
slang front end.
