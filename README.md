# Diminished-one modulo 2^n+1 adders

Residue number systems often use the moduli {2^n - 1, 2^n, 2^n + 1}, and the
2^n + 1 channel is usually the slowest. Its operands need n + 1 bits in plain
binary. The *diminished-one* representation avoids the extra bit: a value X is
stored as X* = X - 1 in n bits, and zero gets a separate flag. The sum of two
such operands is

    S* = (A* + B*) mod 2^n        if A* + B* >= 2^n   (drop the carry out)
    S* =  A* + B* + 1             otherwise

In other words, it is an n-bit addition whose carry into bit 0 is the
*inverted* carry out of bit n-1. Wiring that inverted carry straight back
makes a combinational loop. The usual fix adds a second prefix stage that
feeds the inverted carry to every bit position. That stage makes the adder one
operator level deeper than a plain n-bit adder, and gives one net a fan-out
of n.

This RTL implements three adders that fold the end-around carry into the
carry logic itself, so that no loop or extra stage is needed:

| module             | method                                             | carry logic depth |
|--------------------|----------------------------------------------------|-------------------|
| `dim1_ppref_adder` | parallel prefix, carry recirculated at each level  | log2 n prefix levels, like a Kogge-Stone adder |
| `dim1_cla1_adder`  | one-level carry look-ahead                         | one wide AND-OR per carry |
| `dim1_cla2_adder`  | two-level carry look-ahead over groups of K bits   | group terms, group carries, bit carries |

`dim1_adder_top` puts all three side by side on one operand pair. All three
compute the same function, so the top is mainly a way to compare them and
check them against each other. The published synthesis results for these
structures have the one-level CLA fastest at n = 4, and the parallel-prefix
adder fastest from n = 8 upward. The two-level CLA is the smallest at
n = 8 to 32, but it is slower.

Everything is purely combinational. There are no clocks, no registers and no
reset. An output is valid one combinational delay after the operands change.

## Common structure

Every adder has the same three parts:

1. `dim1_preproc` — for each bit: generate g = a & b, propagate p = a | b
   (inclusive OR, not XOR) and half sum h = a ^ b.
2. A carry network. It outputs `cin[i]`, the carry *into* bit i, where
   `cin[0]` is the end-around carry c*_{-1} = NOT(carry out of A* + B*).
3. `dim1_sum` — s_i = h_i ^ cin[i].

The (g, p) pairs travel as `dim1_pkg::gp_t`. The package also holds the prefix
operator `gp_op(hi, lo) = (g_h | p_h & g_l, p_h & p_l)` and the dual of a
bit pair, `gp_dual((g, p)) = (~p, ~g)`.

### The real-zero flag

An all-zero S* has two meanings. Normally it stands for the value 1. It
stands for a true zero only when A + B = 2^n + 1, which means
A* + B* = 2^n - 1, which in turn means the operands are bitwise
complementary. Each adder therefore outputs `zero = &h`, the AND of the half
sums, built from XOR gates that already exist. Read an all-zero `s_dim` with
`zero = 0` as the value 1.

**Operands that are zero are not handled.** The diminished-one system marks
them with a flag outside the n bits, and these adders take only the n-bit
part. Adding zero to x gives x, so a wrapper that bypasses the adder whenever
either zero flag is set is enough.

## The carry algebra behind all three adders

Two identities carry the whole design.

*Inverted carries ripple through dual pairs.* At bit level g implies p. From
that, NOT c_k = NOT p_k | NOT g_k & NOT c_{k-1}. The complement of a carry
therefore moves through bit k exactly as a normal carry moves through the
pair (~p_k, ~g_k). As a consequence, NOT c_{n-1} (the end-around carry)
can be written as an ordinary look-ahead expression over dual pairs.

*Moving an inversion across an operator.* If (G_x, P_x) = (g, p) o NOT(G, P)
and (G_y, P_y) = NOT[(~p, ~g) o (G, P)], then G_x = G_y. Here NOT(G, P)
means (~G, P). So a bit that sits above an inverted group can instead be
pulled into that group in dual form, with the inversion applied after it.

A modulo carry, written with spans of bits, is
c*_i = G_{i:0} | P_{i:0} & ~G_{n-1:i+1}. The carry at position i
depends on all n bits. The bits above i enter through the inversion.

## Parallel-prefix adder (`dim1_ppref_carry`)

This is the most involved part of the design.

In a Kogge-Stone adder, level l combines spans of 2^l bits, and each output
carry is one span that ends at its bit. Here, the span for c*_i has length n
and wraps cyclically: it covers bits i..0 and then bits n-1..i+1 through the
inversion. Written out directly, such a span needs log2(n) + 1 levels. For
example, c*_0 = (g_0,p_0) o NOT[(g_7,p_7) o ... o (g_1,p_1)] needs three
levels just for the seven-bit group. The dual-pair identity fixes that by
moving bits across the inversion until the two halves combined at the last
level have length n/2 each:

    i <= n/2 - 2 :  c*_i = NOT G[ (dual bits i..0) o (bits n-1..i+1) ]
    i >= n/2 - 1 :  c*_i = G[ (bits i..i-n/2+1) o NOT( dual bits i-n/2..0 o bits n-1..i+1 ) ]
    c*_{-1}      = NOT G_{n-1:0}

For n = 8 (modulo 257) this gives, for example:

    c*_0 = NOT G[ (~p0,~g0) o (g7,p7) o ... o (g1,p1) ]
    c*_2 = NOT G[ (~p2,~g2) o (~p1,~g1) o (~p0,~g0) o (g7,p7) o ... o (g3,p3) ]
    c*_3 = G[ (g3..g0) o NOT((g7..g4)) ]
    c*_5 = G[ (g5..g2) o NOT((~p1,~g1) o (~p0,~g0) o (g7,p7) o (g6,p6)) ]

The network builds three kinds of node at level l, where the span length is
L = 2^l:

| array       | span                                                   | positions              | exists at levels |
|-------------|--------------------------------------------------------|------------------------|------------------|
| `nrm[l][e]` | normal pairs, bits e..e-L+1                            | e = L-1 .. n-1         | 0 .. log2n-1 |
| `dul[l][e]` | dual pairs, bits e..e-L+1                              | e = L-1 .. n/2-2       | 0 .. log2n-2 |
| `mix[l][i]` | wrapped: dual bits i..0, then normal bits n-1..n-L+i+1 | i = 0 .. L-2           | 1 .. log2n-1 |

Each node is a single `gp_op` of two nodes from the level below. A wrapped
node is built in one of three ways:

* for i >= L/2, as `dul` o `mix`;
* for i = L/2 - 1, as `dul` o `nrm[n-1]`, where the span first crosses the
  boundary;
* for i < L/2 - 1, as `mix` o `nrm`.

The last level has one operator per carry. For i >= n/2 - 1, that operator
is the modified form G_l | P_l & ~G_r. Level l therefore holds
(n-L+1) + (n/2-L) + (L-1) = 3n/2 - 2^l operators for 1 <= l <= log2(n) - 2,
and n operators at each of the last two levels. For n = 8 that is 10 + 8 + 8
= 26 operators, in three levels. Buffer nodes are not written, so fan-out
buffering is left to synthesis.

Duals are taken only of single bits. A composed pair no longer satisfies
"g implies p", and (~P, ~G) of a composed pair is wrong. The dual spans
(`dul`) are therefore built from dual bits with the ordinary operator, and
are never derived from `nrm`.

`N` must be a power of two, at least 4. Other values stop elaboration.

## One-level CLA (`dim1_cla1_carry`)

If you expand the end-around carry with the dual-pair identity and substitute
it into c*_i = g_i | p_i & c*_{i-1}, each modulo carry becomes a single
carry look-ahead sum of products over all n bits. The bits are taken in the
rotated order i+1, ..., n-1, 0, ..., i, with modified terms:

| bit j       | g*     | p*    |
|-------------|--------|-------|
| j > i + 1   | ~p_j   | ~g_j  |
| j = i + 1   | ~g_j   | —     |
| j <= i      | g_j    | p_j   |

    c*_i = g*_top | OR_r ( AND_{k>r} p*_k ) & g*_r

The module writes these loops literally, and synthesis maps the wide gates.
Any N >= 2 works.

## Two-level CLA (`dim1_cla2_adder`)

The bits are grouped K at a time, giving m = ceil(N/K) groups. The last group
is shorter when K does not divide N.

* `dim1_gpg` — for each group: group generate gg, group propagate gp, and
  gq = gg | gp. The extra OR gate exists because at group level gg does not
  imply gp. The complemented group carry therefore needs
  NOT gq = NOT gg & NOT gp, not just NOT gp.
* `dim1_bgcla` — the carry into each group, end-around carry included. It
  uses the same rotated sum of products as the one-level unit, over groups:
  groups above j+1 use (~gq, ~gg), group j+1 uses ~gg, and groups at or
  below j use (gg, gp).
* `dim1_gcla` — the carries inside each group, from the bit pairs and the
  group's incoming carry. The lowest bit of a group takes the group carry
  directly, which is why those `cin` bits are wired straight through.

K = 2 is the default for N = 8 (four groups). The published evaluation found
four groups fastest at n = 8 and n = 16, and eight groups at n = 32, which
means K = 4 for both of those widths.

## Interfaces

All adders:

| port    | dir | width | meaning |
|---------|-----|-------|---------|
| `a_dim` | in  | N     | A* = A - 1 |
| `b_dim` | in  | N     | B* = B - 1 |
| `s_dim` | out | N     | S* = (A + B) mod (2^N+1) - 1 |
| `zero`  | out | 1     | the result is a true zero |

`dim1_adder_top #(N = 8, K = 2)` has inputs `a_dim` and `b_dim`. Its outputs
are `s_ppref`, `s_cla1`, `s_cla2`, `zero_ppref`, `zero_cla1` and `zero_cla2`.

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. The reference results in `tb/dim1_ref_pkg.sv`
come from integer arithmetic on the represented values,
S = (A* + 1 + B* + 1) mod (2^n + 1), and not from carry equations. To run
the end-to-end test of the top at its defaults (all 65536 operand pairs):

    verilator --binary --timing -Irtl -Itb -y rtl -y tb \
        rtl/dim1_pkg.sv tb/dim1_ref_pkg.sv tb/tb_dim1_adder_top.sv \
        --top-module tb_dim1_adder_top -Mdir obj && ./obj/Vtb_dim1_adder_top

Substitute any other testbench name. The testbenches are:

* `tb_dim1_adder_top` — default size, exhaustive, all three adders. It also
  counts wrapped sums, incremented sums, end-around carries that ripple to
  the top bit, real zeros and value-one results.
* `tb_dim1_workloads` — the top at the four evaluated sizes: n = 4/K = 2,
  8/2, 16/4 and 32/4. Sizes 4 and 8 run exhaustively; 16 and 32 run 50000
  random and corner-case pairs each.
* One testbench per module. The adder and carry-network testbenches cover
  widths 4 to 32, exhaustively up to 8 bits. The two-level CLA testbench
  includes a short last group (N = 10, K = 4). `dim1_bgcla` is tested on
  every gg/gp combination for up to five groups.

Each run takes well under a second.

## Trust and limits

* All three adders agree with the modular reference on every operand pair
  for n = 4, 5 (one-level CLA) and 8, and on random and corner-case operands
  at 10 (two-level CLA), 16 and 32. Corner cases include complementary
  operands and sums of 2^n - 2, 2^n - 1 and 2^n.
* Widths above 32 bits are not tested, because the reference uses 64-bit
  integers.
* The parallel-prefix network for general n is a reconstruction from the
  per-carry equations and the operator counts per level. At n = 8 its
  equations match the worked modulo-257 example term for term. The
  assignment of nodes to operators at other widths is this implementation's
  own, chosen to give the stated operator counts.
* The prefix operators are written as behavioural equations in
  `always_comb` loops. No gate-level structure, sizing or buffering is
  imposed, so area and delay depend on the synthesis tool.
* Not included: zero operands (see above); the earlier adder structures with
  a final reentrant-carry stage that the design is compared against; and
  the plain modulo 2^n and 2^n - 1 adders of the same comparison.
