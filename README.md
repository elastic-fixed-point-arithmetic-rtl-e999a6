# Elastic real/complex fixed-point ALU

A combinational N-bit ALU (N = 32 by default, 16 as the second size) that
does real arithmetic, complex arithmetic and bitwise logic with a single
adder. The adder is "elastic". For real operands it works as one N-bit adder.
For complex operands it splits into two independent N/2-bit adders, one for
the real part and one for the imaginary part. Three small multiplexers at the
middle of the carry chain do the split.

The other arithmetic block is a Vedic multiplier. An N x N product is built
from four (N/2 x N/2) products, recursively down to 2 x 2 cells. The
recombination uses a carry-save adder plus two of the same hybrid adders, and
no carry-propagate adder chain.

There are no clocks or registers. Operands go in, and `Z`/`Cout` settle after
the combinational delay.

## Operations

`R_C` chooses real (0) or complex (1) arithmetic. `S[4:0]` chooses the
function. The output `Z` is 2N bits wide. A product fills all of it. Sums and
logic results are zero-extended.

| R_C | S4 | S3 | S2 S1 S0 | Z | Cout |
|-----|----|----|----------|---|------|
| 0 | 0 | 0 | 000 | A+B | carry |
| 0 | 0 | 0 | 001 | A−B | 1 when A ≥ B (no borrow) |
| 0 | 0 | 0 | 010 | A−1 | 1 when A ≠ 0 |
| 0 | 0 | 0 | 011 | A+1 | carry |
| 0 | 0 | 0 | 100 | A−B−1 | 1 when A > B |
| 0 | 0 | 0 | 101 | A+B+1 | carry |
| 0 | 0 | 0 | 110 | 2A | A[N−1] |
| 0 | 0 | 0 | 111 | A+1 (*undefined code, this design's choice*) | carry |
| x | 0 | 1 | xxx | A·B (2N bits, unsigned) | adder carry of the S2..S0 form |
| 1 | 0 | 0 | x00 | X+Y, each part separately | OR of both halves' carries |
| 1 | 0 | 0 | x01 | X−Y, each part separately | OR of both halves' carries |
| 1 | 0 | 0 | x10 | conjugate of **Y**: Yre − i·Yim | 1 when Yim = 0 |
| 1 | 0 | 0 | x11 | X+Y+1 per part (*undefined code, this design's choice*) | OR of both halves' carries |
| 0 | 1 | x | 000…111 | AND, OR, NAND, NOR, XOR, XNOR, NOT A, A | — |

A complex operand packs its real part in the upper half and its imaginary
part in the lower half: `X = {Xre, Xim}`, with N/2 bits each. The real
operands A and B and the complex operands X and Y have separate ports. This
lets a real and a complex operand pair be presented at the same time, and
`R_C` chooses which pair reaches the adder. Multiplication and the logic
functions always use A and B.

Worked example at N=32, with A=128h, B=89h, X=002500AFh and Y=00130067h:
A·B = 9E68h, X+Y = 00380116h, X−Y = 00120048h, conj(Y) = 0013FF99h and
A NAND B = FFFFFFF7h. The top-level testbench replays all 19 functions on
these operands.

The function table of the published design calls the conjugate "conjugate
of A". Its schematic and its simulation results take the conjugate of the
second complex operand, and this RTL does the same.

Fixed-point words are plain bit vectors. Addition and subtraction wrap
modulo 2^N (or 2^(N/2) per complex part). Nothing saturates, and there is no
fixed binary point. The product is unsigned.

## How one adder does all the add/subtract forms

The arithmetic unit (`arithmetic_unit`) turns every add/subtract function
into `Z = opA + opB + cin` on the elastic adder:

| function | opA | opB | cin |
|---|---|---|---|
| A+B, A−B, A−1, A+1 | A | B, ~B, all ones, 0 | S0 |
| A−B−1, A+B+1, 2A | A | ~B, B, A | S0 |
| X+Y, X−Y (complex) | X | Y, ~Y | S0 (into **both** halves) |
| conj(Y) | 0 | {0, ~Yim} | 1 |

So the carry-in is `S0 OR conj`, where `conj = R_C & S1 & ~S0`. For the
conjugate, the low half of the sum is ~Yim + 1 = −Yim. The upper half of the
output is then replaced by Yre. A 7-input multiplexer (real mode) and a
3-input multiplexer (complex mode) produce opB. S3 then selects between the
zero-extended sum and the multiplier's product, and S4 selects between that
and the logic unit (`alu_out_mux`).

## The hybrid adder (EHC-CSLA)

`ehc_csla` is a carry-select adder whose blocks are Han-Carlson
parallel-prefix adders:

* **Block 0** is a Han-Carlson adder that takes the real carry-in.
* **Every higher block** does three things:
  * It adds its slice with carry-in 0 (Han-Carlson adder).
  * It passes the {carry, sum} of that addition through a
    binary-to-excess-1 converter (`be1c`), which adds one. This gives the
    result for carry-in 1 without a second adder.
  * The carry out of the block below picks one of the two results
    (`csla_block`).

The critical path is therefore one short prefix adder plus one 2:1
multiplexer per block. Blocks grow towards the middle of the word, where
their local addition has the most time before the select carry arrives.

`han_carlson_adder` is the textbook form:
1. The first level merges odd bits with their even neighbours.
2. Kogge-Stone levels run on odd bits only.
3. A last level fills in the even bits.

The carry-in is folded into the generate term of bit 0.

Block widths, from the least significant bit (`ehc_pkg`):

| width | blocks | origin |
|---|---|---|
| 15 | 3,3,4,5 | published |
| 16 | 3,3,4,6 | published (lower half of the elastic 32-bit adder) |
| 32 elastic | 3,3,4,6 ‖ 5,4,4,3 | published |
| 31 | 3,3,4,**6,4,4,4**,3 | first, second, third and last blocks and the count of 8 published; bold widths chosen here |
| 32 (plain) | 3,3,4,**6,4,4,4**,4 | same |
| 3, 4, 7, 8; 16 elastic | 3 / 2,2 / 3,4 / 3,5; 3,5 ‖ 5,3 | chosen here |

A different partition changes only timing, not function. To try one, edit
`blk_code` / `upper_code` in `ehc_pkg`. Each width is coded as packed 4-bit
block sizes.

## The elastic split

`elastic_ehc_csla` is an EHC-CSLA cut at bit N/2. It has three
`R_C`-controlled multiplexers at the cut:

1. **Carry-in of the first upper block's Han-Carlson adder:** 0 for real
   mode, `cin` for complex mode.
2. **Select of that block's carry-select multiplexer:** the lower half's
   carry for real mode, constant 0 for complex mode. In complex mode the
   block therefore uses its own Han-Carlson result, which already includes
   `cin`. The excess-1 path is never chosen.
3. **Lower half's carry into the final OR gate:** blocked in real mode and
   passed in complex mode. `Cout` is the upper carry ORed with the lower
   carry in complex mode.

In real mode the design is an ordinary N-bit EHC-CSLA. In complex mode the
lower carry never reaches the upper half, and both halves get the same
carry-in. A complex subtraction is therefore two two's-complement
subtractions, with no extra hardware.

## The improved Vedic multiplier

`vedic_2x2` is the basic cell. It uses four AND gates and two half adders
(vertically-and-crosswise multiplication of two 2-bit numbers).

`ivm_4x4`, `ivm_8x8`, `ivm_16x16` and `ivm_32x32` each use four multipliers
of half the size on (aL,bL), (aH,bL), (aL,bH) and (aH,bH). `ivm_combine`
then forms the 2N-bit product in three slices:

* **`pr[H-1:0]`** is the low half of aL·bL, passed straight through
  (H = N/2).
* **Middle slice:** an N-bit carry-save adder reduces aH·bL, aL·bH and
  {low half of aH·bH, high half of aL·bL} to S and C, with carry out Co1.
  * S[0] is `pr[H]`.
  * An (N−1)-bit EHC-CSLA adds S[N−1:1] + C[N−1:1] into `pr[N+H−1:H+1]`,
    with carry out Co2.
* **`pr[2N-1:N+H]`** is the high half of aH·bH plus the middle slice's
  overflow.

**Departure from the published design.** The published diagrams OR Co1 and
Co2 together and add the result as a single carry. That is only exact for
4 x 4. From 8 x 8 upwards both carries can be 1 at once, and the OR then
loses 2^(N+H):
* 248 of the 65 536 operand pairs of an 8 x 8 multiplier give a wrong
  product.
* About 1 % of random 16 x 16 and 32 x 32 pairs give a wrong product, even
  when the smaller multipliers inside are exact.

Here the high-slice EHC-CSLA, whose second operand was all zeros, gets Co1
as the least significant bit of that operand and Co2 as its carry-in. This
adds both carries exactly at the same hardware cost. The 4 x 4 keeps the
published 2-bit increment-by-1 converter (`ib1c`) enabled by Co1 OR Co2,
which is exact at that size.

There is no published diagram for the 8 x 8. It is built like the 16 x 16,
one level down.

## Logic unit

`logic_unit` computes all eight functions of A and B in parallel and selects
one with S2..S0. The published design uses an "adjusted" XOR gate from
earlier work whose gate structure is not given. `adj_xor` therefore
implements the plain XOR function, and the synthesis tool maps it.

## Module hierarchy

```
real_complex_alu        top: ports A B X Y R_C S -> Z Cout
├─ arithmetic_unit      (u1) operand muxes, conjugate assembly, S3 select
│  ├─ elastic_ehc_csla  N-bit real / 2 x N/2-bit complex adder
│  │  ├─ han_carlson_adder
│  │  └─ csla_block     HC adder + be1c + 2:1 mux
│  └─ ivm_32x32 (or ivm_16x16 / _8x8 / _4x4 for N = 16 / 8 / 4)
│     └─ 4 x ivm_16x16 … 4 x vedic_2x2, ivm_combine
│        (carry_save_adder, ehc_csla, ib1c at 4x4)
├─ logic_unit           (u2) uses adj_xor
└─ alu_out_mux          (u31) 2N-bit 2:1 by S4
```

Packages: `alu_pkg` holds the select-code enums. `ehc_pkg` holds the adder
partitions. N may be 4, 8, 16 or 32, which are the multiplier sizes.

## Simulating

Every testbench is self-checking. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops. With Verilator 5:

```
verilator --binary --timing -y rtl -y tb \
  rtl/ehc_pkg.sv rtl/alu_pkg.sv tb/alu_ref_pkg.sv \
  tb/tb_real_complex_alu.sv --top-module tb_real_complex_alu
./obj_dir/Vtb_real_complex_alu
```

Replace the testbench name to run another one. All of them finish in
seconds.

| testbench | what it checks |
|---|---|
| `tb_real_complex_alu` | default N=32 top. It replays the worked example and sweeps all select codes in both modes on corner and random operands. It counts every function, real carry-out, complex low-half carry, product wider than N and mode switch, and fails if any never occurred. |
| `tb_real_complex_alu_n16` | the same at N=16 |
| `tb_arithmetic_unit`, `tb_logic_unit` | every code against the reference model |
| `tb_elastic_ehc_csla` | N=32 and 16, both modes, including carries that must not cross the cut |
| `tb_ehc_csla` | every width used (3…32), with long carry chains |
| `tb_ivm_4x4`, `tb_ivm_8x8` | exhaustive |
| `tb_ivm_16x16`, `tb_ivm_32x32` | corner operands plus 40 000 random pairs |
| `tb_han_carlson_adder`, `tb_be1c`, `tb_ib1c`, `tb_vedic_2x2` | exhaustive |
| `tb_carry_save_adder`, `tb_adj_xor` | random and corner cases |

`tb/alu_ref_pkg.sv` is the reference model. It states each function by its
meaning (A−B, conjugate and so on), not by the adder operands the hardware
uses. The testbenches therefore do not repeat the design's own operand
encoding.

## How far to trust it

These parts follow the published schematic closely:
* the function table;
* the operand multiplexers;
* the carry-in term;
* the conjugate datapath;
* the elastic split;
* the 15-bit and 32-bit elastic adder partitions;
* the 4 x 4, 16 x 16 and 32 x 32 multiplier structures.

The simulated results match the published example outputs bit for bit.

This design's own choices:
* the Co1/Co2 carry fix in the multipliers (a correction, explained above);
* the widths of adder blocks that were not published;
* the behaviour of the two undefined select codes;
* the Han-Carlson prefix network and the gate forms of the converters;
* zero-extension of N-bit results;
* `adj_xor` as a plain XOR.

Timing was not analysed, so none of this RTL's delays or areas are claimed.
