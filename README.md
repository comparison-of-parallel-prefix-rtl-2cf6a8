# Kogge-Stone and Brent-Kung parallel prefix adders

A ripple-carry adder is slow because the carry into bit *i* waits for every
bit below it. A parallel prefix adder removes that chain: it writes the carry
into each bit as a *prefix* (a running combination over bits 0..i) of a simple
associative operator, and then evaluates all prefixes at once with a tree of
that operator. The number of tree levels, and so the delay, grows with
log2 of the width instead of linearly.

Different trees give different trade-offs between speed and size. This
repository holds two classic ones, written as synthesizable, parameterized
SystemVerilog so they can be compared side by side at 8, 16 and 32 bits:

* **Kogge-Stone (KSA)**: the minimum number of levels, log2(N), at the price
  of about N·log2(N) operators and long wires.
* **Brent-Kung (BKA)**: about 2N operators with short, regular wiring, at the
  price of 2·log2(N)-1 levels.

Both compute `{cout, s} = x + y + cin` and are purely combinational: there is
no clock, no register and no reset. The result is valid one propagation delay
after the inputs change.

## The three stages

Every adder here is the same three stages; only the middle one differs.

```
 x, y, cin
    |
 [pg_generate]   one half adder per bit: g_i = x_i & y_i, p_i = x_i ^ y_i
    |            carry-in folded into bit 0: g_0 <- g_0 | (p_0 & cin)
 [prefix network of carry_operator cells]   Kogge-Stone or Brent-Kung
    |            output at bit i: G[i:0] = carry out of bit i
 [sum_generate]  s_i = p_i ^ c_i,  c_0 = cin, c_i = G[i-1:0];  cout = G[N-1:0]
```

The per-bit pre-processing cell is exactly a half adder (`half_adder`): its sum
output x^y is the bit's *propagate* p (a carry entering the bit leaves it), and
its carry output x&y is the bit's *generate* g (the bit makes a carry on its
own).

### The carry operator

`carry_operator` merges the (generate, propagate) pair of a bit group with the
pair of the group just below it:

```
(G_hi, P_hi) o (G_lo, P_lo) = (G_hi | P_hi & G_lo,  P_hi & P_lo)
```

The merged group generates a carry if the upper half does, or if the lower half
does and the upper half passes it on; it propagates only if both halves do.
The operator is associative but not commutative, so any tree that combines
adjacent groups in order gives the same result. That freedom is what the two
networks use differently. One cell type computes both G and P everywhere; where
the P output is unused (the final cells of each column) synthesis removes it.

### Carry-in

Instead of adding a row for the carry-in, it is merged into bit 0's pair in
`pg_generate`. With that, the group generate over bits [i:0] coming out of the
network is directly the carry out of bit i, and `sum_generate` only has to
shift the carries up by one bit and put `cin` in at the bottom.

## The Kogge-Stone network

log2(N) levels. At level l the span is d = 2^l, and every bit i >= d combines
its current pair with the pair of bit i-d; bits below d pass theirs through.
After level l each bit covers 2^(l+1) bits (or reaches bit 0), so after the
last level every bit holds its full prefix. For N = 8:

```
level 0 (d=1): bits 1..7 combine with bits 0..6
level 1 (d=2): bits 2..7 combine with bits 0..5
level 2 (d=4): bits 4..7 combine with bits 0..3
```

Each operator drives at most two others, but the wires at level l span 2^l
bits, and the operator count is N·log2(N) - N + 1.

## The Brent-Kung network

A binary reduction tree followed by an inverse tree.

*Up-sweep*, levels with span d = 1, 2, 4, ..., N/2: every bit i with (i+1) a
multiple of 2d combines with bit i-d. Afterwards bit 2^k - 1 holds the full
prefix of bits [2^k-1:0], for every k; the other bits hold partial groups.

*Down-sweep*, spans d = N/4, ..., 2, 1: every bit i with (i+1) an odd multiple
of d and i+1 >= 3d combines with bit i-d. Bit i-d is then already complete
(by the level before, or by the up-sweep), and bit i's group ends exactly where
bit i-d's begins, so bit i becomes complete too. For N = 8:

```
up   d=1: bits 1,3,5,7 combine with 0,2,4,6
up   d=2: bits 3,7     combine with 1,5
up   d=4: bit  7       combines with 3
down d=2: bit  5       combines with 3
down d=1: bits 2,4,6   combine with 1,3,5
```

That is 2N - 2 - log2(N) operators over 2·log2(N) - 1 levels. The selection
rules are written in terms of (i+1) modulo the span, so the network is also
correct for widths that are not a power of two (the testbenches run 12 bits).

## Cost at the three compared widths

Both adder modules publish two localparams, `CELLS` (number of carry-operator
instances) and `LEVELS` (operator levels on the longest path), which stand in
for area and delay in RTL simulation:

| width | KSA operators | KSA levels | BKA operators | BKA levels |
|------:|--------------:|-----------:|--------------:|-----------:|
| 8     | 17            | 3          | 11            | 5          |
| 16    | 49            | 4          | 26            | 7          |
| 32    | 129           | 5          | 57            | 9          |

Each path also has one gate level in `pg_generate` (plus the carry-in merge on
bit 0) and one XOR in `sum_generate`. Real delay and area depend on the target
technology and fitter; these counts only show the structural trade-off. The
table is printed by `ppa_widths_tb`.

## Modules

All RTL is in `rtl/`, one unit per file.

| file | what it is |
|------|------------|
| `ppa_pkg.sv` | `pg_t` (packed `{g, p}` pair) and closed-form operator and level counts |
| `half_adder.sv` | s = x^y, cout = x&y |
| `carry_operator.sv` | the prefix operator on `pg_t` |
| `pg_generate.sv` | per-bit half adders, carry-in merge; `WIDTH` |
| `sum_generate.sv` | sum XORs and carry out; `WIDTH` |
| `kogge_stone_adder.sv` | KSA; ports `x, y, cin, s, cout`; `WIDTH` |
| `brent_kung_adder.sv` | BKA; same ports; `WIDTH` |
| `ppa_top.sv` | both adders on shared `x, y, cin`, outputs `sum_ksa, cout_ksa, sum_bka, cout_bka`; `WIDTH` |

`WIDTH` defaults to 32 everywhere. Each network level lives in its own
generate block with its own `prv`/`nxt` vectors, so simulators and lint tools
see an acyclic chain of signals rather than one array that feeds itself.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself after a fixed simulated time
if it hangs. Expected values come from integer arithmetic, never from the
adder structure.

* `half_adder_tb`, `carry_operator_tb`: exhaustive. The operator reference is
  worked out by chaining two groups' carry behaviour, not from its formula.
* `pg_generate_tb`, `sum_generate_tb`: corners and random vectors at 32 bits.
* `kogge_stone_adder_tb`, `brent_kung_adder_tb`: 8, 12, 16 and 32-bit
  instances. All 2^17 cases at 8 bits, plus long carry chains, one-bit gaps in
  a chain, alternating patterns and 20,000 random vectors on the wider ones.
  `CELLS` and `LEVELS` are checked against the closed forms.
* `ppa_top_tb`: the top at its default 32 bits. Both adders are checked against
  the reference and against each other. The test also counts four carry
  situations and fails if any never happened: carry-in changing the sum, carry
  out, a carry running through all 32 bits, and an inner carry that dies below
  the top.
* `ppa_widths_tb`: the comparison at 8, 16 and 32 bits (exhaustive at 8). It
  prints the cost table above and checks it.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module ppa_top_tb rtl/ppa_pkg.sv tb/ppa_top_tb.sv
./obj_dir/Vppa_top_tb
```

Every testbench finishes in well under a second.

## Design choices and limits

* The two networks are the standard published Kogge-Stone and Brent-Kung
  structures. The carry-in merge into bit 0, the single black-cell type and
  the shared-input comparison top are choices made here.
* Nothing is pipelined or registered. For clocked use, put registers around
  `ppa_top` or around one adder.
* Delay and area are not modelled in simulation. `CELLS` and `LEVELS` are the
  only cost figures the RTL gives. Timing and resource numbers must come from
  synthesis for a given target.
