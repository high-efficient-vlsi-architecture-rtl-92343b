# Three-operand binary adder: carry-save front end, carry-select low part, Han-Carlson high part

This is a combinational adder that computes `A + B + C + Cin` for three N-bit operands
(default N = 8) and returns the exact (N+2)-bit result. Adding three numbers with two
ordinary adders puts two carry chains in series. This design avoids that. It resolves
the three operands into two in one full-adder delay, then resolves the carries of the
remaining two-operand sum once. That carry resolution is split in two:

* the low bits use a cheap **carry generation and selection** adder (LCCGSCA);
* the high bits use a **Han-Carlson parallel-prefix** tree.

The two parts work side by side. The only signal between them is one carry, `LC`.

```
          a   b   c
          |   |   |
     +-----------------------+
     |  bit_addition_logic   |  N full adders:  a + b + c = S' + 2*cy
     +-----------------------+
                |  S', cy
     +-----------------------+
     |    gp_base_logic      |  G_i = S'_i & cy_{i-1},  P_i = S'_i ^ cy_{i-1}   (positions 0..N)
     +-----------------------+
        | G,P [N:L]       | G,P [L-1:0]
 +-----------------+  LC  +-----------------+
 | msp_han_carlson |<-----|   lsp_lccgsca   |<---- cin
 +-----------------+      +-----------------+
   |          |                  |
  cout    sum[N:L]           sum[L-1:0]
```

## Stage 1: bit addition (carry-save)

Each of the N full adders adds the bits of its own position only:

```
S'_i = a_i ^ b_i ^ c_i
cy_i = a_i&b_i | b_i&c_i | c_i&a_i        (weight 2^(i+1))
```

No carry moves sideways here, so every output is ready after one full-adder delay.
What remains is the two-operand sum `S' + 2*cy + cin`.

## Stage 2: generate and propagate

At position i the two bits still to be added are `S'_i` and `cy_{i-1}`, which is the carry of the
full adder one position lower. Their generate and propagate are:

```
G_i = S'_i & cy_{i-1}        P_i = S'_i ^ cy_{i-1}
```

There are N+1 positions, 0..N:

* **Position N** has no operand bits. It holds only `cy_{N-1}`, so `G_N = 0` and `P_N = cy_{N-1}`.
  That is why the result is N+2 bits wide: `sum[N:0]` plus `cout`.
* **Position 0** has no full-adder carry coming in (`G_0 = 0`, `P_0 = S'_0`). Instead, `cin` is the
  carry input of the low part.

Some formulations fold `cin` into position 0 as `G_0 = S'_0 & cin`, `P_0 = S'_0 ^ cin`. Doing that
as well as using `cin` as a carry input would count it twice. The two choices give the same carry
into position 1 and the same `sum[0]`.

One property matters below: G and P of one position come from an AND and an XOR of the same two
bits, so they are **never both 1**.

## Stage 3a: least significant part, carry generation and selection (`lsp_lccgsca`)

This is the least familiar part of the design. It covers positions 0..L-1 (default L = 4) and
computes the carries in two steps.

1. **Generation.** A ripple chain computes the carries as if `cin` were 0. Beside it runs the
   group propagate:
   ```
   c0(i) = G(i) | P(i) & c0(i-1),  c0(-1) = 0
   PP(i) = P(0) & P(1) & ... & P(i)
   ```
   Nothing in this step depends on `cin`.
2. **Selection.** The true carry is `c(i) = c0(i) | cin & PP(i)`. If `PP(i) = 1`, every position
   up to i propagates. Then none of them generates, because G and P are exclusive, so `c0(i) = 0`.
   The OR therefore becomes a **single 2:1 multiplexer per bit**:
   ```
   c(i) = PP(i) ? cin : c0(i)
   ```
   A conventional carry-select adder duplicates the adder for carry-in 0 and 1. This design
   duplicates nothing: one chain and one multiplexer per bit do the job. Synthesis libraries
   usually have a compact multiplexer cell, which is where the low cost comes from.

Sum bits are `sum[i] = P(i) ^ c(i-1)` with `c(-1) = cin`. The carry to the high part is
`LC = c(L-1)`. A late `cin` reaches the outputs through only one multiplexer and one XOR.

The module asserts the exclusivity of G and P. If you reuse it with (G, P) pairs from another
source, the multiplexer shortcut no longer holds, and the assertion reports it.

## Stage 3b: most significant part, Han-Carlson prefix tree (`msp_han_carlson`)

This part covers positions L..N, which is W = N+1-L positions (default 5). Its tree uses only local
(G, P) and runs in parallel with the low part:

| level | cells |
|---|---|
| 1 | each odd position i: `(G,P)_i o (G,P)_{i-1}` |
| 2 .. | Kogge-Stone on odd positions only, spans 2, 4, 8, ... (while `i - span >= 0`) |
| last | each even position i >= 2: `(G,P)_i o (G,P)_{i-1:0}` |

Here `o` is the prefix operator `(g,p)hi o (g,p)lo = (ghi | phi&glo, phi&plo)`, written
`gp_combine` in `three_op_pkg`. The tree has 1 + ceil(log2 W) levels, and no node feeds more than
two cells in a level. This trades one extra level for half the cells of a Kogge-Stone tree.

`LC` arrives last and is merged into every position with one AND-OR:
`c_i = G_{i:L} | P_{i:L} & LC`. Then `sum[i] = P_i ^ c_{i-1}`, and `cout` is the carry out of
position N.

## Interface and timing

`three_op_adder #(N = 8, L = 4)`

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b`, `c` | in | N | operands |
| `cin` | in | 1 | carry input |
| `sum` | out | N+1 | result bits 0..N (`{Sum MSP, Sum LSP}`) |
| `cout` | out | 1 | result bit N+1 |

`{cout, sum} = a + b + c + cin` exactly. The maximum is `3*(2^N-1)+1`.

* **Timing.** The adder is purely combinational: no clock, no reset, no registers. The critical
  path is one full adder, one G/P gate, then the longer of two paths. One is the L-bit generation
  ripple plus one multiplexer. The other is the Han-Carlson tree. Either is followed by one
  AND-OR and one XOR.
* **Choosing L.** L lies in 1..N, and an elaboration-time check rejects other values. Pick L so
  that the ripple ends about when the tree does. The default N/2 is a neutral choice, not a tuned
  one.

The parameter defaults live in `three_op_pkg` (`OP_WIDTH_DEFAULT`, `LSP_WIDTH_DEFAULT`).

## How far this follows the published architecture

These parts follow the published architecture:

* the three stages;
* the full-adder, G/P and sum equations;
* the carry generation and selection recurrences;
* Han-Carlson for the high part and carry selection for the low part, joined by one carry `LC`;
* a purely combinational datapath;
* the 8-bit operand width. This is the width of the published simulation of the reference design
  it is compared with, which adds 10 + 20 + 30 to get 60. The same vector is checked here.

These are choices made here:

* **Split point.** L = N/2; it is not specified.
* **Prefix tree.** The exact Han-Carlson wiring is the textbook form of that tree.
* **`LC` merge.** `LC` joins after the tree rather than inside it.
* **`cin`.** `cin` is used as the carry input of the low part only (see Stage 2).
* **Output width.** The result is the full N+2 bits. The compared reference design shows an 8-bit
  sum and one carry.

The architecture also mentions a "parallel processing unit" for several results at once. It
describes nothing of its structure or interface, so it is not implemented.

Reported pin counts of the original implementation do not match any port list with three 8-bit
operands. The ports here are the ones the equations need.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares against plain integer
arithmetic and ends with a line `TB_RESULT checks=<n> failures=<n>`.

| testbench | what it covers |
|---|---|
| `tb_bit_addition_logic` | every full-adder input; random 8-bit words |
| `tb_gp_base_logic` | all 2^18 inputs of a 9-position instance, including G/P exclusivity |
| `tb_lsp_lccgsca` | L = 4, 7 and 1, each exhaustive; counts carries produced by selection and by generation |
| `tb_msp_han_carlson` | W = 5 exhaustive; W = 1, 2, 3, 8, 16, 17, 33 random plus corners |
| `tb_three_op_adder` | the default 8-bit adder on **all 2^25 inputs** (about 45 s); N = 16, 32, 64, 13 and the extreme splits L = 1 and L = N |

`tb_three_op_adder` also counts how often each mechanism occurs: `LC` produced by selecting
`cin`, `LC` produced by the generation chain, `cout = 1`, and `sum[N] = 1`. It fails if any of
them never occurs. All five testbenches pass. Each one was also run against a deliberately broken
copy of its module, and each failed it.

To run one testbench with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/three_op_pkg.sv \
          tb/tb_three_op_adder.sv --top-module tb_three_op_adder -o sim
./obj_dir/sim
```

The `-y` options let Verilator find every other module, including the `*_slice` helpers, by file
name. Name the package explicitly, because modules import it.

## Files

| file | contents |
|---|---|
| `rtl/three_op_pkg.sv` | defaults, `gp_t`, prefix operator |
| `rtl/bit_addition_logic.sv` | full-adder array |
| `rtl/gp_base_logic.sv` | bit-level G/P |
| `rtl/lsp_lccgsca.sv` | least significant part |
| `rtl/msp_han_carlson.sv` | most significant part |
| `rtl/three_op_adder.sv` | top |
| `tb/*.sv` | testbenches; the `*_slice` modules check one parameter set and are instantiated by the main testbenches |
