# Weighted multi-operand adder modulo 2^n+1

This RTL adds k operands modulo 2^n+1 and returns the result in ordinary
(weighted) binary form. Each operand and the result lie in 0..2^n, so they are
n+1 bits wide. The usual way to build such an adder needs two carry-propagate
adders in series, or a doubled carry-save tree. This design needs one n-bit
carry-save tree and a single n-bit end-around-carry adder.

The trick is a small *translator* in front of the tree. It rewrites each pair of
(n+1)-bit operands as two n-bit vectors whose sum is congruent to the pair's sum,
up to a known constant. After translation, all the work is n bits wide. The
constants are collected into one correction row that goes into the tree, so the
tree costs nothing extra at run time.

The notation MOMA(k, 2^n+1) means a k-operand adder modulo 2^n+1. The default build
is MOMA(6, 17): six operands with n = 4.

## Datapath

```
 X1 X2   X3 X4   X5 X6          (each 0..2^n, n+1 bits)
  |  |    |  |    |  |
 [transl] [transl] [transl]     ceil(k/2) translators
  U1 Y1    U2 Y2    U3 Y3   COR (constant = |-ceil(k/2)|)
   \  \     |  |    /  /    /
   inverted end-around-carry CSA Dadda tree   (2*ceil(k/2)+1 rows -> 2)
                 F   G
                 |   |
     augmented diminished-1 adder  ->  S = |X1+...+Xk| mod 2^n+1  (n+1 bits)
```

All of it is combinational. There is no clock, no reset and no handshake. The
result is valid one propagation delay after the operands.

## The arithmetic, step by step

Let P = ceil(k/2) be the number of operand pairs, and let |v| mean v modulo 2^n+1.
The whole design rests on one fact: 2^n ≡ -1 (mod 2^n+1). So a bit x of weight 2^n
can be removed and replaced by its complement at weight 1, at the cost of a
constant: |x·2^n| = |x̄ - 1|.

### Translator (`moma_translator`)

The inputs are A = a_n·2^n + A' and B = b_n·2^n + B', where A' and B' are the low n
bits.

1. The two top bits are added: s_n = a_n XOR b_n and c_n = a_n AND b_n. Their weights
   are 2^n and 2^(n+1), which are -1 and -2 modulo 2^n+1.
2. Applying the complement rule to both bits gives:
   |A+B| = |A' + B' + D + 1 + 1|, where D is the n-bit vector 1…1 c̄_n s̄_n. Here c̄_n
   is a NAND of the top bits and s̄_n an XNOR.
3. A', B' and D go through one carry-save stage. This gives a sum vector U and a
   carry vector y. The carry out of bit n-1 has weight 2^n. It is complemented and
   re-entered at bit 0, which gives Y = y_{n-2}…y_0 ȳ_{n-1}. That absorbs one of the
   two +1 terms, so the translator's contract is:

   **|A + B| = |Y + U + 1|**

Bits n-1..2 of D are constant 1. At those positions the full adder becomes a half
adder with inverted sum: u_i = XNOR(a_i, b_i) and y_i = OR(a_i, b_i).

The two low positions are simplified as well. Because operands never exceed 2^n,
a_n = 1 forces a_1 = a_0 = 0 (and likewise for B). Under that rule the two full
adders FA(a_1, b_1, NAND(a_n, b_n)) and FA(a_0, b_0, XNOR(a_n, b_n)) reduce to:

| bit | sum u                        | carry y                       |
|-----|------------------------------|-------------------------------|
| 1   | NOR(a_1 XOR b_1, a_n AND b_n) | a_1 OR b_1                    |
| 0   | XNOR(a_0 OR a_n, b_0 OR b_n)  | (a_0 OR b_0) AND NOT(a_n OR b_n) |

`tb_moma_translator` checks these against the unsimplified full adders for every
valid input pair at n = 4, and for random pairs at n = 8.

If k is odd, the last operand is paired with 0.

Worked example, n = 4: the pair (4, 12) gives D = 1111, U = 0111, Y = 1000. The check
is |8 + 7 + 1| = 16 = 4 + 12.

### Inverted-EAC carry-save tree (`moma_eac_csa`, `moma_eac_tree`)

The tree gets 2P+1 rows: U_1, Y_1, …, U_P, Y_P and a constant row COR. Each
carry-save adder handles its top carry the same way as the translator (complement,
re-enter at bit 0). So each adder computes |S + C| = |x0 + x1 + x2 + 1|.

Because of the end-around carry, every bit column has the same height. The Dadda
schedule can therefore be applied to whole rows. The Dadda heights are
2, 3, 4, 6, 9, 13, 19, 28, …. A level that takes h rows down to the next smaller
height d uses h-d adders on the first rows and passes the rest through. The number
of levels is the minimum carry-save depth θ(2P+1):

| k      | rows | levels |
|--------|------|--------|
| 3–4    | 5    | 3      |
| 5–6    | 7    | 4      |
| 7–8    | 9    | 4      |
| 9–12   | 13   | 5      |

`moma_pkg` computes these counts at elaboration time.

### Correction bookkeeping

The offsets that build up along the datapath are:

| source                            | offset added to the true sum |
|-----------------------------------|------------------------------|
| P translators (contract has +1)   | +P needed                    |
| 2P-1 tree adders, +1 each         | +(2P-1) present in F+G       |
| COR row                           | +COR present in F+G          |

These combine to |ΣX| = |F + G + 1 - P - COR|. With COR = |-P| this becomes

**|ΣX| = |F + G + 1|**

which is exactly what a diminished-1 adder computes. COR must fit in n bits. For
P = 1 (k ≤ 2) it would equal 2^n, so the module requires K ≥ 3 and stops at
elaboration otherwise. For the default k = 6, COR = |-3|_17 = 14 = 1110.

### Augmented diminished-1 adder (`moma_dim1_adder`)

The low n bits are F + G, plus one when the integer addition F + G has no carry out,
taken modulo 2^n. This is the inverted end-around carry.

The carries come from a Kogge-Stone prefix over generate g_i = f_i·g_i and
propagate p_i = f_i XOR g_i, which takes ceil(log2 n) levels. The carry into bit 0 is
the complement of the group generate G[n-1:0]. One more level forms every carry:
c_i = G[i:0] + P[i:0]·~G[n-1:0].

The result is 2^n exactly when F + G = 2^n - 1, which means F and G are bitwise
complementary. The propagate terms are the half-sums, so this condition is the group
propagate P[n-1:0], which the prefix tree already computes. Bit n of the result is
that signal, and no extra gates are needed for it. The low bits are then zero, and a
combinational assertion checks this.

### Example end to end

Inputs: X = (4, 12, 16, 4, 16, 9), k = 6, n = 4.

| step          | values                                              |
|---------------|-----------------------------------------------------|
| D vectors     | 1111, 1110, 1110                                    |
| U / Y         | 0111/1000, 1010/1001, 0111/0000                     |
| COR           | 1110                                                |
| F, G          | 0101, 0100 (not complementary, so bit 4 = 0)        |
| result        | 0 1010 = 10 = 61 mod 17                             |

`tb_moma` checks the U/Y vectors, COR, F, G and the result.

## Modules and interfaces

| module            | parameters (default) | ports |
|-------------------|----------------------|-------|
| `moma` (top)      | `N`=4, `K`=6         | `input [N:0] x[K]`, `output [N:0] s` |
| `moma_translator` | `N`=4                | `input [N:0] a, b`; `output [N-1:0] y, u` |
| `moma_eac_tree`   | `N`=4, `ROWS`=7      | `input [N-1:0] rows[ROWS]`; `output [N-1:0] f, g` |
| `moma_eac_csa`    | `N`=4                | `input [N-1:0] x0, x1, x2`; `output [N-1:0] s, c` |
| `moma_dim1_adder` | `N`=4                | `input [N-1:0] f, g`; `output [N:0] r` |
| `moma_pkg`        | –                    | sizing functions (pairs, Dadda heights, levels, COR) |

Operand values above 2^n are outside the contract and give meaningless results.

Elaboration limits:
- K ≥ 3, and ceil(K/2) must not be ≡ 1 (mod 2^N+1).
- 2 ≤ N ≤ 62.

## Sizes

The default is MOMA(6, 17).

The design was also evaluated at k = 4, 8, 12 with n = 4, 8, 16. Each of these is
built by setting `K` and `N`, for example `moma #(.N(16), .K(12))`. The default
instance also covers MOMA(4, 17): tie the two spare operands to 0.

In the unit-gate model, which counts two-input gates as 1 and XOR as 2, the critical
path is about 4·θ(2P+1) + 2·log2 n + 6 gates. For the default that is 4·4 + 4 + 6 = 26.

## Design choices not fixed by the architecture

- **Low two translator bit positions.** The gate-level simplification above was
  derived for this design from the operand-range rule. It is only valid for
  operands in 0..2^n.
- **Final-adder prefix structure.** The architecture asks for a parallel-prefix
  diminished-1 adder. This design uses a Kogge-Stone prefix followed by one
  carry-increment level. A cyclic prefix structure without that extra level would
  save one operator delay, and could replace `moma_dim1_adder` behind the same ports.
- **Tree wiring.** The rows enter in the order U_1, Y_1, U_2, …, COR, and each level
  fills its adders from the first rows. Any order gives the same value of F + G
  modulo 2^n+1. With this one, the example gives F = 0101, G = 0100.
- **No pipelining.** There are no registers. Add them at the translator or tree
  boundaries if a clocked version is needed.

## Verification

Each testbench checks its unit against integer arithmetic modulo 2^n+1 and prints
`TB_RESULT checks=… failures=…`.

| testbench            | what it covers |
|----------------------|----------------|
| `tb_moma_translator` | all pairs for n = 4 and n = 2, random pairs for n = 8, the example's U/Y vectors |
| `tb_moma_eac_csa`    | all 4096 triples for n = 4, random triples for n = 16, the re-entered carry bit |
| `tb_moma_eac_tree`   | 7×4, 13×8, 25×16, 3×6 and 2×6 trees, levels against θ |
| `tb_moma_dim1_adder` | exhaustive for n = 4 and n = 5, random and complementary pairs for n = 16 |
| `tb_moma`            | default top: the worked example with intermediate values, then 20 000 random sets biased to 0 and 2^n |
| `tb_moma_sizes`      | the nine evaluated (k, n) sizes plus k = 5 and k = 3 (odd pairing) |
| `tb_moma_exhaustive` | all 17^6 = 24 137 569 operand sets of the default MOMA(6, 17) |

`tb_moma` counts these events and fails if any of them never happens:
- pairs with one top bit set, and pairs with both top bits set;
- a result of 2^n, and a result of 0;
- re-entered tree carries of both values.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/moma_pkg.sv tb/tb_moma.sv --top-module tb_moma -Mdir obj_tb_moma
./obj_tb_moma/Vtb_moma
```

Change the testbench name to run another one. The exhaustive run takes about
15 seconds. To lint the RTL:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/moma_pkg.sv rtl/moma.sv
```
