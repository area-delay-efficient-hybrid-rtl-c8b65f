# Hybrid Ling–Kogge–Stone adder (32 bits, approximate low byte)

A 32-bit adder whose critical path is set by a 24-bit prefix tree instead of a
32-bit one. The low byte is not added at all in the usual sense: each of its
sum bits is the OR of the operand bits, so it has no carry chain, and a single
carry (C7) is handed to the upper 24 bits. Those 24 bits are added exactly by a
Kogge–Stone parallel prefix tree whose first level uses Ling's pseudo-carry,
which turns the first prefix stage into a plain OR. The price is a bounded
error confined to the low byte; the upper 24 bits of the result are always the
exact sum of the upper operand bits plus C7.

A second, three-phase variant ("Hybrid PPA1") is included next to it: the same
approximate byte, then a 12-bit Kogge–Stone phase (bits 8..19) and a 12-bit
Ladner–Fischer phase (bits 20..31).

Everything is combinational: there is no clock, reset or register anywhere.

```
           a[31:8] b[31:8]                        a[7:0] b[7:0]
                 |                                     |
        +--------v-----------------+  C7     +---------v--------+
 cout <-+ ling_ks_adder, N = 24    |<--------+ approx_or_adder  |
        | 5-level Kogge-Stone tree |         | s = a | b        |
        | Ling first level         |         | C7 = a7 & b7     |
        +--------+-----------------+         +---------+--------+
                 |                                     |
              sum[31:8]                             sum[7:0]
```

## The approximate low byte and its error

`approx_or_adder` computes `s[i] = a[i] | b[i]` for bits 0..7 and
`C7 = a[7] & b[7]`. Write the exact low sum as `(a|b) + (a&b)`. The hybrid
keeps `(a|b)` and replaces `(a&b)` by `256*(a7&b7)`. The error is therefore

```
(a + b) - {cout, sum}  =  (a&b)[6:0]  -  128 * (a7 & b7)
```

It is exact whenever no bit position below 7 has both operand bits set. It can
be positive, when carries inside the byte are dropped (largest: +127 for
`7F + 7F`). It can be negative, when bit 7 both keeps its OR bit and sends C7
up (largest: −128 for `80 + 80`). For `k` approximate bits the range is
`[-2^(k-1), 2^(k-1) - 1]`. The carry C7 is never raised when the exact carry
out of bit 7 would be 0, but it is often missed.

For example, 8AB87B67 + B788ABDA gives 1_424126FF. The exact sum is 1_42412741;
the difference is `(67 & DA) & 7F = 42`.

Over uniformly random 32-bit operands, 89.9 % of results differ from the exact
sum, with a mean absolute error of about 48 (about 1.1e-8 of the result range).
`tb_workload_sizes` prints these figures.

The formula for C7 is this implementation's choice: the design fixes the OR
sum bits and the C7 hand-over, but not how C7 is formed. `a7 & b7` needs no
chain and gives the error range above. Any other single-level choice can
be dropped into `approx_or_adder`.

## The Ling Kogge–Stone upper part

`ling_ks_adder` (N = 24) works on N+1 prefix nodes. Node 0 is the carry-in C7,
with `g = t = cin`. Node k is operand bit k−1, with `g = a & b` and
`t = a | b`. The usual carry recurrence is `c_k = g_k | t_k c_{k-1}`. The Ling
pseudo-carry `H_k = g_k | c_{k-1}` satisfies

```
H_k = g_k | t_{k-1} H_{k-1}        c_k = t_k & H_k
```

So H is a prefix computation over the pairs `(g_k, t_{k-1})`, using the usual
black-cell operator `(G, P) = (G_hi | P_hi G_lo, P_hi P_lo)`. Because `g_{k-1}`
implies `t_{k-1}`, the first black cell collapses to

```
H = g_k | g_{k-1}          T = t_{k-1} & t_{k-2}
```

That removes the AND from the first level. Levels 2 to 5 are an ordinary
Kogge–Stone network with distances 2, 4, 8 and 16. At each level every node
k ≥ d takes node k−d, so no node output drives more than two cells of the next
level. 25 nodes need exactly ⌈log2 25⌉ = 5 levels. Each sum bit is
`(a_j ^ b_j) ^ (t_j & H_j)`, where the second term is the real carry into bit j.

The tree is written as loops over levels inside one `always_comb`, using the
`black_cell` function from `lks_pkg`. Nodes are updated from the top down, so
each black cell reads the previous level's value. A synthesis tool sees the same
network as a generate-built tree.

## Hybrid PPA1 and the Ladner–Fischer phase

`hybrid_ppa1_adder` chains three parts:

1. `approx_or_adder` on bits 0..7, producing C7.
2. `ling_ks_adder` with N = 12 on bits 8..19, taking C7 and producing C19.
3. `lf_adder` with N = 12 on bits 20..31, taking C19 and producing cout.

Its result is bit-for-bit the same function as the main adder. Only the
structure differs: C19 sits between the two exact phases, so their delays add.

`lf_adder` puts the carry-in at node 0. Its first level joins every odd node
with the even node below it. A Sklansky network then completes the odd nodes:
at level l, pair index m = (k−1)/2 with bit l set takes the last odd node of
the block of 2^l pairs below it. A final level gives every even node its group
term from the odd node just under it. Only the odd half of the nodes takes part
in the middle levels. This gives fewer cells than Kogge–Stone, at the cost of
fan-out that grows in the Sklansky levels.

## Modules

| file | role |
|---|---|
| `rtl/lks_pkg.sv` | widths (32, 8, 12, 12), `gp_t` generate/propagate pair, `black_cell`, `prefix_levels` |
| `rtl/approx_or_adder.sv` | approximate low part, parameter `N` (8) |
| `rtl/ling_ks_adder.sv` | exact Ling Kogge–Stone adder with carry-in, parameter `N` (24) |
| `rtl/lf_adder.sv` | exact Ladner–Fischer adder with carry-in, parameter `N` (12) |
| `rtl/hybrid_lks_adder.sv` | the main adder, parameters `WIDTH` (32) and `APPROX_BITS` (8) |
| `rtl/hybrid_ppa1_adder.sv` | the three-phase variant, fixed 8 + 12 + 12 |
| `rtl/lks_top.sv` | both adders side by side, each with its own ports (`lks_*`, `ppa1_*`) |

The carries between the parts (`c7`, and `c19` for PPA1) are outputs, so the
hand-over can be observed. They carry no extra logic.

## Verification

Each testbench checks results against integer arithmetic in
`tb/lks_ref_pkg.sv`, not against a second prefix tree. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it does |
|---|---|
| `tb_approx_or_adder` | all 65 536 byte pairs; checks the OR bits, C7 and the error bound |
| `tb_ling_ks_adder` | N = 24: corner cases plus 200 000 random; N = 5: exhaustive; N = 12: random |
| `tb_lf_adder` | N = 12: corner cases plus random; N = 4, 7 and 8: exhaustive |
| `tb_hybrid_lks_adder` | reference pair, full-length C7 ripple, 200 000 random, error bound, and a 16-bit/4-bit instance |
| `tb_hybrid_ppa1_adder` | same reference, plus C19 against an integer sum of bits 8..19 |
| `tb_lks_top` | end to end at default sizes; fails if a mechanism is never exercised (see below) |
| `tb_workload_sizes` | 8-, 16- and 32-bit instances; reports error rate and mean error distance |

The mechanisms `tb_lks_top` counts are: positive error, negative error, a C7
hand-over, C7 rippling all the way to cout, a carry out, and a C19 hand-over.

To simulate one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lks_top \
  -y rtl -y tb +libext+.sv rtl/lks_pkg.sv tb/lks_ref_pkg.sv tb/tb_lks_top.sv
./obj_dir/Vtb_lks_top
```

Each run takes well under a second.

## Where this RTL departs from, or goes beyond, its source description

- **Ling first stage.** The source describes the upper 24 bits as an exact
  Kogge–Stone adder. It mentions Ling's transformation, a five-level tree and
  fan-out two only in its summary, without equations. The standard Ling
  pseudo-carry was used. The sum is identical either way.
- **C7 logic.** This is this implementation's choice (see above).
- **Carry-in as a prefix node.** Feeding C7 and C19 into the trees as an extra
  node is this implementation's choice.
- **Reported approximate results.** For 8AB87B67 + B788ABDA, the exact sum
  1_42412741 is reproduced. The reported approximate results, 3D308639 and
  3D30D6BD, cannot come from a structure whose upper 24 bits are exact: those
  bits would have to read 424126 or 424127. The structure was followed, and it
  gives 1_424126FF.
- **Error rates.** The reported error rates (about 1.57) use a metric that is
  not defined, so they are not reproduced. `tb_workload_sizes` prints the error
  rate and mean error distance under the definitions given above.
- **Smaller sizes.** The 8- and 16-bit versions are compared in the source
  without their approximate/exact split. `WIDTH` and `APPROX_BITS` let them be
  built, but the splits used in `tb_workload_sizes` are illustrations.
- **Not built.** Brent–Kung and Sklansky upper parts, which appear only as
  alternatives in a comparison, are not built. The same goes for the existing
  approximate Kogge–Stone adder that shares one black cell between its last two
  stages.
- **FPGA results.** LUT counts and delays are FPGA synthesis results. RTL
  simulation does not reproduce them.
