# Diminished-1 modulo 2^n+1 adder with a group-based parallel-prefix carry network

Residue number systems split a large integer into residues with respect to
several small moduli, and 2^n+1 is one of the usual ones. Adding modulo 2^n+1
directly needs n+1 bits per residue and an awkward correction step. The
*diminished-1* encoding avoids this: a residue A in 1..2^n is stored as the
n-bit number a = A − 1. The modular sum then becomes an ordinary n-bit addition
whose carry-out is fed back into bit 0 *complemented*:

    s = (a + b + NOT cout) mod 2^n,      cout = carry-out of a + b

If a + b overflows, dropping the carry subtracts 2^n, and not adding 1 makes it
2^n + 1 in all, which is the modulus. If it does not overflow, the added 1 is
the extra 1 that the diminished-1 encoding needs (A + B − 1 = a + b + 1).
This feedback is the *inverted end-around carry*.

This RTL implements such an adder as one combinational block. The inverted
end-around carry is folded into a parallel-prefix carry network, so there is
no second carry pass. The network works on four-bit groups to keep it small:

* a reduced **pre-processing** cell per bit;
* a **carry computation unit**: a small tree per four-bit group, then a
  *cyclic* Kogge-Stone network over the n/4 groups;
* a **final sum unit** that ripples the group carry into its four bits through
  a cheap two-gate selection.

Example with n = 16: A = 40000 and B = 30000. Stored, a = 39999 and
b = 29999. a + b = 69998 overflows 2^16, so cout = 1 and s = 69998 − 65536 =
4462. This encodes 4463, and (40000 + 30000) mod 65537 = 4463.

## Interface

`dim1_mod_adder #(parameter int unsigned N = 16)`

| port   | dir | width | meaning |
|--------|-----|-------|---------|
| `a`    | in  | N     | diminished-1 operand, A − 1 |
| `b`    | in  | N     | diminished-1 operand, B − 1 |
| `s`    | out | N     | diminished-1 sum, (a + b + ¬cout) mod 2^N |
| `cout` | out | 1     | carry-out of a + b (its complement went into bit 0) |

The adder is purely combinational. It has no clock or reset, and the result
follows the inputs after the gate delay. `N` must be 4 × a power of two
(8, 16, 32, 64, …); other values stop elaboration with an `$error`. The main
configuration is N = 16. Widths 8 and 32 are also tested.

**Zero is not handled here.** In diminished-1 arithmetic the residue 0 has no
n-bit code and is carried by a separate zero flag. This block has no zero
flags. If a + b = 2^N − 1, the true sum is 0 (mod 2^N+1), and the block outputs
s = 0 with cout = 0. Logic that keeps zero flags must override the result when
an operand is zero, and must flag this case.

## Datapath

```
 a,b ──► preproc_unit ──g,p──► carry_computation ──cg[K-1:0]──► final_sum ──► s
              │                 (group_gp ×K,               ▲      ▲
              │                  cyclic prefix, L levels)   │      │
              └──────────────────────── h, g, p ────────────┘      │
                                    cout = cg[K-1] ; ¬cg[K-1] ─────┘ into group 0
```

K = N/4 is the number of groups, and L = log2 K is the number of inter-group
levels.

### Pre-processing cell (`preproc_unit`)

For each bit: g = a·b, p = a + b (inclusive-OR propagate), and the half sum
h = p·¬g. The half sum is a ⊕ b, but it is built from the p and g the cell
forms anyway, so no separate XOR gate is needed. This saves one gate per bit.

### Carry computation unit (`carry_computation`, `group_gp`, `prefix_op`)

This is the part that needs the most care.

**Prefix operator.** `prefix_op` merges the (G, P) pair of an upper span with
the pair of the span just below it: G = G_hi + P_hi·G_lo and P = P_hi·P_lo.

**Group trees.** `group_gp` reduces the four bits of a group with three
operators: (3,2) and (1,0) first, then the two halves.

**Cyclic inter-group network.** There are L levels. At level l, group k merges
its span with the span that group k − 2^(l−1) holds. For the low groups that
index is negative. It then wraps around to group k − 2^(l−1) + K, which holds
the *top* of the word: the carry that leaves bit N−1 re-enters at bit 0. After
L levels every group's span covers all K groups. For N = 16 the network looks
like this (columns are groups; `∘` is a prefix operator; `~` marks a wrapped
input):

```
level    group 3 (15:12)   group 2 (11:8)   group 1 (7:4)   group 0 (3:0)
group    3 ops             3 ops            3 ops           3 ops
l = 1    3∘2               2∘1              1∘0             0∘~3
l = 2    (3∘2)∘(1∘0)       (2∘1)∘(0∘~3)     (1∘0)∘~(3∘2)    (0∘~3)∘~(2∘1)
```

That makes K·(L+3) = 20 operators.

**Folding in the inverted carry.** The wrap-around must carry the *complement*
of the end-around carry, so the wrapped pair cannot enter unchanged. The carry
out of group k must be

    cg[k] = G[4k+3:0] + P[4k+3:0]·¬G[N−1:4k+4]

In words: group k's carry is 1 if the low part generates one. It is also 1 if
the low part propagates the end-around carry in, and the upper bits do not
generate one (which would make the end-around carry 0). A wrapped pair (G, P)
therefore enters the operator as

    (NOR(G, P), NOT G)          — dim1_pkg::wrap_invert

After such an entry, a span's G means "the carry is 1, whatever the upper
groups not yet merged do". Its P means "the carry is 1, unless those groups
generate a carry that reaches the top". The ordinary prefix operator keeps these
meanings as further upper spans are merged in. When the
network ends, no upper group is left to generate, so the carry of a wrapped
group is `G | P`, which takes one OR per group. The top group never wraps. Its
G is G[N−1:0], the carry-out of a + b, and it is output as `cout`. Its
complement is the carry into group 0.

A special case shows why the closing OR is needed: a + b = 2^N − 1 (every bit
propagates, none generates). Then the true carries are all 1, and every
wrapped span ends with G = 0 and P = 1.

The NOR/NOT wrap gates and the closing OR are this implementation's own
construction. The tree shape, the node count and the cyclic connections
between the groups follow the design. The carries were compared with integer
arithmetic: exhaustively for N = 8, and at random and on corner cases for
N = 16 and 32.

### Final sum unit (`final_sum`)

Each group gets one carry C. Group 0 gets ¬cg[K−1]; group k gets cg[k−1].
Inside the group, the carries into bits 1–3 are prepared for both values of C:

    gg1 = g0                pp1 = p0
    gg2 = g1 + p1·gg1       pp2 = g1 + p1·pp1
    gg3 = g2 + p2·gg2       pp3 = g2 + p2·pp2

A carry-select would pick gg or pp with a multiplexer. gg implies pp, so the
choice reduces to gg + pp·C, one AND and one OR per bit. Each sum bit is
s = h ⊕ (gg + pp·C), and bit 0 of the group is h ⊕ C. The ripple inside the
group runs in parallel with the inter-group prefix levels, so only the final
AND-OR-XOR follows the group carry.

## Departures from the source design and open points

* **Inverted end-around carry inside the prefix network.** The design gives
  where the wrapped connections go but not their gates. The wrap inversion and
  the closing OR described above are this implementation's own.
* **The pre-processing half sum** is built as p·¬g, which reads the reduced
  pre-processing cell as it is drawn. It is logically a ⊕ b.
* **No zero indicator** and no special handling of zero operands (see
  Interface).
* **No registers.** The design was characterised as a combinational block
  between virtual-clocked boundaries, so none were added.
* **Not included:** a modulo 2^n+1 multiplier that would use this adder is
  mentioned alongside the design. Its structure is not specified, so it is not
  provided.
* The baseline prefix adders it is compared with are not included: Sklansky,
  Kogge-Stone, Brent-Kung, Han-Carlson, and the two earlier carry algorithms.

## Files

| file | contents |
|------|----------|
| `rtl/dim1_pkg.sv` | `gp_t` pair type, `GROUP_W = 4`, `wrap_invert` |
| `rtl/prefix_op.sv` | prefix operator |
| `rtl/preproc_unit.sv` | per-bit g, p, h |
| `rtl/group_gp.sv` | four-bit group tree |
| `rtl/carry_computation.sv` | group trees and the cyclic inter-group network |
| `rtl/final_sum.sv` | per-group reduced sum selection |
| `rtl/dim1_mod_adder.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_table_sizes` |

## Simulation

Every testbench checks itself against reference values from plain integer
arithmetic. At the end it prints `TB_RESULT checks=<n> failures=<m>`. Each has
a watchdog. Example, for the top level at its default width:

```
verilator --binary --timing --assert -Irtl \
  rtl/dim1_pkg.sv rtl/prefix_op.sv rtl/group_gp.sv rtl/preproc_unit.sv \
  rtl/carry_computation.sv rtl/final_sum.sv rtl/dim1_mod_adder.sv \
  tb/tb_dim1_mod_adder.sv --top-module tb_dim1_mod_adder -Mdir obj
./obj/Vtb_dim1_mod_adder
```

| testbench | what it covers |
|-----------|----------------|
| `tb_dim1_mod_adder` | N = 16 (default): about 100 000 random sums plus corners, checked bit-exactly and as residues mod 65537. It counts overflow and non-overflow sums, end-around carries that ripple out of group 0 and through all groups, and zero-congruent sums. It fails if any of these never occurs. |
| `tb_table_sizes` | N = 8 exhaustively (all 65 536 pairs) and N = 32 with random and near-all-propagate operands |
| `tb_carry_computation` | group carries for N = 16 and N = 32 against integer carries |
| `tb_group_gp`, `tb_prefix_op` | exhaustive unit checks |
| `tb_final_sum`, `tb_preproc_unit` | unit checks with corner and random operands (and random group carries) |

All testbenches pass with Verilator 5. The design is combinational, so there
is no latency to check: every result is sampled one clock period of the test
clock after the inputs change.

## Changing it

* Width: set `N` (4 × a power of two). The group size `dim1_pkg::GROUP_W`
  must stay 4: `group_gp` is a fixed four-bit tree, which is the grouping the
  design uses.
* To pipeline, put registers between `carry_computation` and `final_sum`.
  All group carries are ready at the same prefix depth.
