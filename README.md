# Reversible 7-bit binary to BCD converter

A decimal multiplier that multiplies two BCD digits in binary gets a 7-bit
product (at most 9 x 9 = 81) that must be turned back into two BCD digits.
This converter does that with reversible gates only: every gate has as many
outputs as inputs and maps inputs to outputs one-to-one, no wire fans out, and
the bits a gate does not need to return are carried out as *garbage outputs*,
while extra inputs are tied to constants. The circuit uses 15 such gates.

The RTL is plain combinational SystemVerilog. Each reversible gate is its own
module, and the converter instantiates them exactly as the gate netlist wires
them, so its structure and counts can be read from the code.

## The idea: split the input at bit 4

Write the input as `b6..b0 = 16*h + l` with `h = b6b5b4` and `l = b3..b0`.

* `l` is 0..15. One MPS gate turns it into a decimal carry (`l > 9`) and a
  units digit (`l mod 10`).
* `16*h` is one of only a few values. For products of two digits, `h` is 0..5,
  so `16*h` is 0, 16, 32, 48, 64 or 80. Two table gates give its decimal
  digits directly: BCDH gives the tens and BCDL the units.

| h (b6b5b4) | 16*h | BCDH (tens) | BCDL (units) |
|---|---|---|---|
| 000 | 0  | 0 | 0  |
| 001 | 16 | 1 | 6  |
| 010 | 32 | 3 | 2  |
| 011 | 48 | 4 | 8  |
| 100 | 64 | 6 | 4  |
| 101 | 80 | 7 | 10 |

80 is split as 7 tens plus 10 units. A second MPS gate corrects the 10 into
carry 1 and digit 0. An HNG gate adds the two decimal carries into a 2-bit count
(0, 1 or 2). Two 4-bit reversible adders then form the result:

```
tens  (c7..c4) = BCDH(h)            + carry count
units (c3..c0) = MPS(BCDL(h)).digit + MPS(l).digit
```

Example, 1010001 = 81: `h = 101` gives 0111 and 1010. MPS turns 1010 into
carry 1 and digit 0000. `l = 0001` gives carry 0 and digit 0001. The tens are
0111 + 1 = 1000, the units 0000 + 0001 = 0001, so the result is 1000 0001.

## Datapath

```
 b6 --FG--+-- b6 -----------+            b5,b4 --BVF--+-- b5,b4 --+
          +-- b6 ---+       |                         +-- b5,b4 --|--+
                    |       v                                     |  |
                    |   BCDH(0,b6,b5,b4) <------------------------+  |
                    +-> BCDL(0,b6,b5,b4) <---------------------------+
                          |                          |
                          | raw units (0..10)        | tens
                          v                          |
 b3..b0 -> MPS(0,..)   MPS(0,..)                     |
            |    |      |    |                       |
       carry|    |digit |    |carry                  |
            v    |      |    v                       v
            HNG(carry_hi, carry_lo, 0, 0) -> {Carry,Sum} -> 4-bit adder -> c7..c4  (cout = g3)
                 |      |
                 v      v
                 4-bit adder ------------------------------> c3..c0  (cout = g2)
```

Constant 0 inputs: FG B; BVF B and D; BCDH A; BCDL A; both MPS A; HNG C and D;
both adders' carry in; the two upper operand bits of the tens adder; and the D
input of each adder HNG.

## The gates

`'` is NOT; all outputs are single bits.

| Gate | Size | Outputs | Role here |
|---|---|---|---|
| FG (Feynman) | 2x2 | P = A, Q = A xor B | copies b6 (B = 0) |
| BVF | 4x4 | P = A, Q = A xor B, R = C, S = C xor D | copies b5 and b4 (B = D = 0) |
| HNG | 4x4 | P = A, Q = B, R = A xor B xor C, S = (A xor B)C xor AB xor D | full adder (D = 0): R sum, S carry |
| MPS | 5x5 | see below | BCD detect and correct (A = 0) |
| BCDH | 4x4 | sum-of-minterms table | tens of 16*b6b5b4 |
| BCDL | 4x4 | sum-of-minterms table | units of 16*b6b5b4 |

**MPS.** With A = 0 and a nibble x on B..E (MSB on B), P = (x > 9) and
{Q,R,S,T} = x + 6 mod 16 when x > 9, else x. T = E always. The equations are:

```
P = AB' + A'BC + BC'(A xor D)
Q = A(C + BC') + C'(AB'D + A'BD')
R = A'C(B' + BD) + AC'D' + AC(B + D)
S = BC(A xnor D) + B'(A xor D) + ABC'
T = E
```

The converter only uses the A = 0 half. The `AC(B + D)` term of R only
matters for A = 1. It was chosen because it is the only term that makes the
5x5 map a permutation, given the other outputs.

**BCDH / BCDL.** Minterm index m = {A,B,C,D}, A the MSB:

```
BCDH  P = m(6,7,10,11,12,13,14,15)   Q = m(3,4,5,9,12,13,14,15)
      R = m(2,4,5,7,8,11,14,15)      S = m(1,2,5,6,9,11,13,15)
BCDL  P = m(3,5,7,11,12,13,14,15)    Q = m(1,4,7,9,10,13,14,15)
      R = m(1,2,5,8,10,11,14,15)     S = m(6,8,9,10,11,12,13,15)
```

Both are permutations of 0..15. Only the A = 0, h = 0..5 entries carry
meaning. The other entries exist only so that the gates stay reversible.

**4-bit adder.** There are four HNG gates in a ripple-carry chain, with D = 0
on each. That gives four constant inputs and eight garbage outputs (the copies
of both operands) per adder.

## Units overflow: what this converter gets wrong

Read this before using the circuit. The units adder adds two corrected digits,
each 0..9, and applies **no** decimal correction to the result. Its carry out
is a garbage output (g2). When `MPS(BCDL(h)).digit + MPS(l).digit > 9`, the
units nibble is 10..15, or wraps past 15, and the tens digit misses a carry.
For example, 25 = 001 1001 gives tens 1, units 6 + 9 = 15.

* **Inputs 0..95:** 70 convert correctly. The other 26 do not: 20-25, 30, 31,
  40, 41, 50-57, 60-63 and 70-73.
* **Products of two BCD digits:** 10 of the 37 distinct values fail: 20, 21,
  24, 25, 30, 40, 54, 56, 63 and 72. These come from 21 of the 100 digit pairs.
  The other products, including 81, convert correctly.
* **Inputs 96..127** (h = 110, 111): these are outside the range the BCDH/BCDL
  tables are built for, and the output means nothing.

The circuit is kept as specified, with 15 gates. A correct converter needs a
decimal correction on the units sum, with its carry added into the tens. That
would cost extra gates, which this RTL does not add. To add them, take the
units adder's `{cout, sum}`, apply a >9 detect/+6 correction to it, and feed
that carry into the tens adder's free carry-in (currently tied to 0).

## Cost

| Gate | Count | Constant inputs | Garbage outputs |
|---|---|---|---|
| HNG (1 carry counter + 2 x 4 in the adders) | 9 | 14 | 20 (18 copies + 2 adder carry outs) |
| MPS | 2 | 2 | 0 |
| BVF | 1 | 2 | 0 |
| FG | 1 | 1 | 0 |
| BCDH | 1 | 1 | 0 |
| BCDL | 1 | 1 | 0 |
| **Total** | **15** | **21** | **20** |

Counted in gate delays (one per gate), the path is 15 deep. The circuit has no
clock and no registers.

## Interface of `rev_bin2bcd7`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `bin` | in | 7 | b6..b0 |
| `bcd` | out | 8 (`bcd2_t`: `.tens`, `.units`) | c7..c4, c3..c0 |
| `g` | out | 4 | {g3, g2, g1, g0}: tens adder cout, units adder cout, carry HNG P (copy of BCDL carry), carry HNG Q (copy of low-nibble carry) |
| `adder_garbage` | out | 16 | HNG input copies of the tens adder [15:8] and units adder [7:0]; bit 2i = x[i], bit 2i+1 = y[i] |

Together, `g` and `adder_garbage` carry all 20 garbage outputs. No two inputs
give the same `{bcd, g, adder_garbage}`. Some of these bits are constant in
this use: for example, g3 can never be 1, and two operand bits of the tens
adder are tied to 0.

## Choices made in this RTL

* **Fan-out gate inputs.** The FG and BVF gates are driven as A = bit, B = 0
  (and C = bit, D = 0 for BVF), because that is the assignment that copies.
* **HNG carry.** S is the standard HNG carry, `(A xor B)C xor AB xor D`.
* **MPS R output.** The A = 0 term is `A'C(B' + BD)`, which gives the BCD
  correction. The A = 1 term was completed for reversibility, as described
  above.
* **BCDH/BCDL.** Defined by the minterm lists above. Their A = 0 rows match
  the digit table and the worked example.
* **Garbage labels.** g1/g0 are the carry HNG's P/Q. The adders' internal
  garbage is brought out on `adder_garbage`.
* **4-bit adder.** The ripple-carry arrangement of the four HNG gates is this
  design's choice. It is the arrangement the 4-constant, 8-garbage count
  implies.

## Files

`rtl/`:
* `rev_bcd_pkg.sv`: `nibble_t` and `bcd2_t`.
* `fg_gate.sv`, `bvf_gate.sv`, `hng_gate.sv`, `mps_gate.sv`, `bcdh_gate.sv`,
  `bcdl_gate.sv`: one module per gate.
* `rev_adder4.sv`: the 4-bit HNG adder.
* `rev_bin2bcd7.sv`: the converter (top).

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each tests
every input of its module:

* The gate testbenches compare each gate with independent arithmetic (sum and
  carry, x mod 10, the tens/units of 16*h) or with its published equations.
  They also check that no two inputs give the same output (reversibility).
* `tb_rev_adder4` checks all 512 operand/carry combinations.
* `tb_rev_bin2bcd7` does the following:
  * compares all 128 inputs with an integer model of the steps above;
  * checks every non-overflowing input below 96 against the true decimal
    value, and checks that exactly 26 inputs overflow;
  * checks the example 81 and the distinctness of the outputs;
  * counts how often each datapath mechanism occurs (low-nibble correction,
    BCDL correction, carry count 2, tens raised), and fails if one never
    occurs.

`tb_bcd_products` runs the converter in its intended use. It feeds in all
100 products a*b of two digits. It checks that the 79 pairs not hit by the
units overflow convert exactly, and that the 21 that are hit do not.

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. To run one with Verilator 5:

```
verilator --binary --timing --assert rtl/*.sv tb/tb_rev_bin2bcd7.sv \
          --top-module tb_rev_bin2bcd7 --Mdir obj
./obj/Vtb_rev_bin2bcd7
```

Replace the testbench file and top name to run another one. For a lint-only
check, use `verilator --lint-only -Wall rtl/*.sv --top-module rev_bin2bcd7`.
