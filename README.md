# Hybrid parallel prefix adders for residue-to-binary conversion

A residue number system (RNS) represents an integer by its remainders
modulo a set of pairwise co-prime moduli, for example
{2^n − 1, 2^n, 2^n + 1}. Arithmetic then runs on each small residue
independently, with no carries between channels. The expensive part is the
way back: the reverse (residue-to-binary) converter is a network of
additions, many of them modulo 2^n − 1 or between operands of very different
widths.

Parallel prefix adders are the fast way to add, but a full prefix tree on
every bit of every adder costs area and power. The adders here are
*hybrid*: a prefix tree only where both operands carry information and the
carry path is long, and much cheaper logic everywhere else. The library
holds:

| module | what it adds | structure |
|---|---|---|
| `ks_adder` | `a + b + cin`, 8 bits | Kogge-Stone prefix adder |
| `bk_adder` | `a + b`, 8 bits | Brent-Kung prefix adder |
| `hrpx_bk_adder` | 18-bit `a` + 8-bit `b` | HRPX: Brent-Kung on the low 8 bits, XNOR/OR ripple on the upper 10 |
| `hmpe_bk_adder` | `(a + b) mod 255` | HMPE: Brent-Kung adder + excess-1 unit |
| `hmpe_ks_adder` | `(a + b) mod 255` | HMPE: Kogge-Stone adder + excess-1 unit |

All of it is combinational: no clock, no reset, no handshake. An output is
valid once its inputs have settled for the gate delay of the path.
`hybrid_adders_top` places the five adders side by side, each with its own
ports. They share nothing. The converter that would combine them is not part
of this design.

## Parallel prefix addition

Every adder here is built in three stages:

1. **Pre-processing** (`gp_precompute`). For each bit, generate
   `G_i = a_i & b_i` and propagate `P_i = a_i ^ b_i`.
2. **Carry calculation** (`ks_prefix_tree`, `bk_prefix_tree`). A *prefix
   graph* of operator nodes (`prefix_cell`) computes, for each position `i`,
   the group pair of the span `[i:0]`. Its `g` is the carry out of bit `i`.
   Its `p` says that every bit from 0 to `i` propagates.
3. **Post-processing**. `S_i = P_i ^ C_(i-1)`, where `C_(-1)` is the
   carry-in, or 0 if there is none.

The operator combines the pair of a more significant span `hi` with that of
the adjoining lower span `lo`:

```
g = g_hi | (p_hi & g_lo)        p = p_hi & p_lo
```

It is associative, so the spans can be joined in any tree shape. The tree
shape is what separates the adder families. A graph node that only forwards
its input (a *buffer* node) is a plain assignment. The pairs travel as the
packed struct `prefix_pkg::gp_t {g, p}`, so a whole row of a graph is one
packed array.

### Kogge-Stone (`ks_prefix_tree`)

There are `ceil(log2 N)` rows. In row `l`, every position `i >= 2^l` joins
with position `i - 2^l`. This gives the minimum depth. The cost is nearly
`N` cells per row and long wires in the last rows. `ks_adder` folds the
carry-in into bit 0 with one more cell, `G'_0 = G_0 | (P_0 & cin)`. In the
8-bit worked example, `10101010 + 00100100` with `cin = 0` gives `11001110`.
That example is the first vector of its testbench.

### Brent-Kung (`bk_prefix_tree`)

This is a binary tree followed by its mirror. For 8 bits:

```
up-sweep    [1:0] [3:2] [5:4] [7:6]  ->  [3:0] [7:4]  ->  [7:0]
down-sweep  [5:0] = [5:4]·[3:0]      ->  [2:0] [4:0] [6:0]
```

In general, up-sweep row `l` joins positions with `(i+1) mod 2^(l+1) == 0`.
Down-sweep rows run from stride `2^(L-2)` down to 1. They join positions with
`(i+1) mod 2s == s` and `i+1 > 2s` to position `i - s`, which is already a
full prefix by then. The carry path is `2·ceil(log2 N) − 1` cells, against
`log2 N` for Kogge-Stone. In exchange there are about `2N` cells and the
fan-out is two. Both tree rules work for any width, not only powers of two.
The testbenches also run 6, 11 and 13 bits.

## HRPX: a wide operand plus a narrow one (`hrpx_bk_adder`)

In a reverse converter one operand is often much wider than the other.
Above the narrow operand's top bit, each position adds only one operand bit
and the incoming carry. That is a half adder, not a full adder. HRPX puts
a Brent-Kung prefix adder on the low `PREFIX_WIDTH = 8` bits. Above them
(`xnor_or_rca`) it uses a ripple chain of one XNOR and one OR per bit:

```
k_0     = ~mid                    (mid = carry out of the prefix part)
s_i     = a_i XNOR k_i            (= a_i ^ c_i)
k_(i+1) = ~a_i | k_i              (= ~(a_i & c_i))
```

The trick that makes these XNOR/OR cells is to carry the ripple signal
active-low (`k = ~c`). The carry out of bit 17 is dropped, so
`sum = (a + b) mod 2^18`. The carry from the prefix part into the ripple
part is brought out as `mid`.

The ripple is slow in principle: one OR per upper bit. But it starts only
when the 8-bit prefix carry arrives, and each of its gates is cheaper than a
prefix cell.

## HMPE: modulo 2^n − 1 with a single zero (`hmpe_*_adder`, `excess_one_unit`)

Modulo 2^n − 1, the carry out of an n-bit addition is worth 2^n ≡ 1, so it
must be added back in (end-around carry). Done naively, this leaves two
codes for zero: `000…0` and `111…1`. A converter needs one, and a separate
zero detector would add delay. HMPE avoids both problems with two units:

* a **regular prefix adder** (Brent-Kung or Kogge-Stone) that forms the
  plain sum `S = (a + b) mod 2^n` and the group signals of the whole word:
  `G(n-1:0)` (carry out) and `P(n-1:0)` (all bits propagate, so `S` is all
  ones);
* a **modified excess-1 unit** that adds 1 to `S` when
  `inc = P(n-1:0) | G(n-1:0)`. It uses an AND ripple, `c_0 = inc`,
  `c_(i+1) = S_i & c_i`, `S'_i = S_i ^ c_i`, and drops the top carry.

Why this is right, for residues `a, b` in `0 … 2^n − 2`:

| case | plain sum `S` | control | result |
|---|---|---|---|
| `a + b < 2^n − 1` | `a + b` | 0 | `a + b` |
| `a + b = 2^n − 1` | all ones | `P = 1` | all ones + 1 wraps to `0` |
| `a + b ≥ 2^n` | `a + b − 2^n` | `G = 1` | `a + b − (2^n − 1)` |

`P` and `G` cannot both be 1. The result is always `(a + b) mod (2^n − 1)`
and never all ones. Both control signals fall out of the prefix tree, which
computes the `[n-1:0]` span anyway, so no extra detector is needed. The
excess-1 unit is an incrementer of one OR, `n − 1` AND and `n` XOR gates, much smaller
than a second `n`-bit adder.

## Where this design departs from its source or fills gaps

* **HRPX width.** The prose of the original design calls HRPX a
  `(4n+1)`-bit adder with `n = 4`, which is 17 bits. Its bit labels
  (`a17 … a8`, `s17 … s0`) and its example simulation (`a[17:0]`,
  `sum[17:0]`) use 18 bits. 18 is the default here; `WIDTH` is a parameter.
* **HMPE example values.** The published example runs of both HMPE adders
  list `a + b + 1` for every input pair, for instance `25 + 54 → 80`. None
  of those pairs carries out or sums to 255. Under the control rule above
  (increment only on `P | G`) the modulo-255 result is `a + b`, here `79`.
  This design follows the rule, because an unconditional increment would
  not be a modulo adder. Expect these outputs to differ from the published
  runs.
* **HRPX upper cells.** The source calls the upper part a ripple of
  "XNOR/OR" gates. One passage also says "XOR/OR". The active-low carry that
  makes XNOR/OR cells compute `a + carry` is this design's own reading. The
  HRPX example sums (`23427 + 71 = 23498`, …) are reproduced exactly.
* **`mid`.** The HRPX example run shows a one-bit signal `mid` but no
  values for it. Here it is the carry from the prefix part.
* **Carry ports.** `ks_adder` has a carry-in, following its worked example.
  `bk_adder` has none, following its graph. Both have a carry-out.
  `hrpx_bk_adder` and the HMPE adders have none.
* **Widths.** The defaults are the sizes of the worked examples. The
  generalisation of both tree rules to any `N` is this design's own.

## Files

`rtl/` holds one module or package per file:

```
hybrid_adders_top
├── ks_adder        ── gp_precompute, prefix_cell (cin), ks_prefix_tree ── prefix_cell
├── bk_adder        ── gp_precompute, bk_prefix_tree ── prefix_cell
├── hrpx_bk_adder   ── gp_precompute, bk_prefix_tree, xnor_or_rca
├── hmpe_bk_adder   ── gp_precompute, bk_prefix_tree, excess_one_unit
└── hmpe_ks_adder   ── gp_precompute, ks_prefix_tree, excess_one_unit
prefix_pkg          ── gp_t, shared by all of the above
```

| parameter | default | where |
|---|---|---|
| `N` | 8 | `ks_adder`, `bk_adder`, `hmpe_*_adder`, trees, `excess_one_unit`, `gp_precompute` |
| `WIDTH`, `PREFIX_WIDTH` | 18, 8 | `hrpx_bk_adder` (needs `WIDTH > PREFIX_WIDTH`) |
| `W` | 10 | `xnor_or_rca` |
| `KS_WIDTH`, `BK_WIDTH`, `HRPX_WIDTH`, `HRPX_PREFIX_WIDTH`, `HMPE_WIDTH` | 8, 8, 18, 8, 8 | `hybrid_adders_top` |

At the defaults, coarse synthesis of the top gives 361 single-bit gates
(AND, OR, XOR, NOT) and no flip-flops.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. It compares
the outputs with integer arithmetic worked out in the testbench, not with a
copy of the logic. Each one prints `TB_RESULT checks=N failures=M` and has
a watchdog.

* `prefix_cell`, `gp_precompute`, `excess_one_unit`, `xnor_or_rca`: all
  inputs.
* Prefix trees: all 8-bit operand pairs, plus random pairs at 6 and 13 bits.
  The expected group generate of `[i:0]` is the carry out of the low `i+1`
  bits.
* `ks_adder`: all 8-bit `a`, `b`, `cin`, plus the worked example and random
  13-bit vectors. `bk_adder`: all 8-bit pairs, plus random 11-bit pairs.
* `hrpx_bk_adder`: the five example pairs with their published sums, 50 000
  random pairs (one in eight with an all-ones upper part, so the carry
  ripples through all of it), and the wrap `0x3FFFF + 1 = 0`.
* `hmpe_*_adder`: every pair of residues 0…254. The testbench checks
  `(a + b) mod 255`, checks that 255 never appears, and counts each of the
  three cases in the table above.
* `tb_hybrid_adders_top`: all five adders at their default sizes, 100 000
  random cycles plus the worked examples. It fails if any mechanism never
  happens: carry-in and carry-out, the HRPX prefix carry and full ripple,
  and both HMPE increment causes.

Each testbench was also run against a copy of its module with one
deliberate bug, and it reported failures.

To simulate with Verilator 5, for example the whole library:

```
verilator --binary --timing -Irtl -y rtl rtl/prefix_pkg.sv \
    tb/tb_hybrid_adders_top.sv --top-module tb_hybrid_adders_top -o sim
./obj_dir/sim
```

Change the top module name for any other testbench. Each one runs in a
second or less.
