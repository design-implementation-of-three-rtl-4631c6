# Three-operand parallel prefix adder

This design computes `a + b + c` for three unsigned N-bit operands (N = 16 by default). The
result is exact and N+2 bits wide. The usual way to add three numbers is a carry-save row followed
by a separate two-operand adder. Here the carry-save row feeds straight into the generate/propagate
logic of a single Han-Carlson parallel prefix adder. The only carry propagation left is one
log-depth prefix tree. The logic is purely combinational: no clock, no reset, no registers.

```
 a b c (N bits each)
   |
 [1] bit addition logic   N full adders:   a + b + c = S' + 2*cy
   |
 [2] base logic           N+1 saltire cells: G_i = S'_i & cy_(i-1),  P_i = S'_i ^ cy_(i-1)
   |                      (cin replaces cy_(-1) at position 0)
 [3] PG logic             Han-Carlson prefix tree: G_i:0 for i = 0..N
   |
 [4] sum logic            S_0 = P_0,  S_i = P_i ^ G_(i-1):0,  Cout = G_N:0
   |
 s = {Cout, S_N .. S_0}   (N+2 bits)
```

## Why it works

After stage 1, the three operands have become two: the parity word `S'` and the majority word
`cy`, which has twice the weight. A normal two-operand adder would now add `S'` and `cy << 1`. Stage 2 is the bit-level half of that
adder. Position `i` sees the `S'_i` bit and the carry bit `cy_(i-1)` that moved up from position
`i-1`. Those two bits either generate a carry (`G_i`) or propagate one (`P_i`). Two details:

* **Position 0** has no stage-1 carry coming in. The external carry-in `cin` takes that slot, so
  the adder computes `a + b + c + cin` at no extra cost.
* **Position N** is one place above the operand width. It has no `S'` bit, so `G_N = 0` and
  `P_N = cy_(N-1)`. Together with the carry out of the tree, this gives the two extra result bits.

So there are N+1 prefix positions (0..N). The result has N+1 sum bits plus a carry-out, which is
N+2 bits. That exactly covers the largest possible sum, `3*(2^N - 1) + 1`.

## The prefix tree (`pg_logic`)

This is the hardest part to read. Each position holds a (generate, propagate) pair for a group of
bits `i:j`. Two adjacent groups merge with the prefix operator:

```
G_i:j = G_i:k | (P_i:k & G_(k-1):j)
P_i:j = P_i:k & P_(k-1):j
```

A **black cell** (`black_cell`) computes both outputs. A **gray cell** (`gray_cell`) computes
only `G`. A gray cell is used wherever the merged group reaches position 0, because its propagate
is never read again.

The Han-Carlson arrangement works on odd positions first and fixes up the even positions at the
end:

| row | distance | merges (N = 16)                                         | cells            |
|-----|----------|---------------------------------------------------------|------------------|
| 0   | 1        | 1:0, 3:2, 5:4, ..., 15:14                               | 1 gray, 7 black  |
| 1   | 2        | 3:0, 5:2, 7:4, ..., 15:12                               | 1 gray, 6 black  |
| 2   | 4        | 5:0, 7:0, 9:2, 11:4, 13:6, 15:8                         | 2 gray, 4 black  |
| 3   | 8        | 9:0, 11:0, 13:0, 15:0                                   | 4 gray           |
| 4   | 1 (even) | 2:0, 4:0, ..., 14:0, 16:0                               | 8 gray           |

Rows 0..L-1 are a Kogge-Stone tree on the odd positions only. L is the smallest number with
`2^L >= (highest odd position) + 1`, computed by `toa_pkg::hc_odd_levels`. The last row gives each
even position `i >= 2` the finished carry of position `i-1`. A position with nothing to merge in a
row is a plain wire. For N = 16 the tree has 33 cells and is 5 cells deep. The whole critical
path is one full adder, one AND/XOR, five prefix cells and one XOR.

The tree is generated from N. The rule above is applied to every width. The testbenches check
N = 4, 16, 32, 33 and 64.

## Modules

| file                        | module                | role |
|-----------------------------|-----------------------|------|
| `rtl/toa_pkg.sv`            | package `toa_pkg`     | `DEFAULT_N = 16`, `hc_odd_levels()` |
| `rtl/adder.sv`              | `adder` (top)         | ports `a`, `b`, `c` [N-1:0] and `S` [N+1:0]; carry-in tied to 0 |
| `rtl/three_operand_adder.sv`| `three_operand_adder` | the four stages; ports `a`, `b`, `c`, `cin`, `s` |
| `rtl/bit_addition_logic.sv` | `bit_addition_logic`  | stage 1: N `full_adder`s |
| `rtl/full_adder.sv`         | `full_adder`          | `s = a^b^c`, `cy = majority(a,b,c)` |
| `rtl/base_logic.sv`         | `base_logic`          | stage 2: N+1 saltire cells (one AND and one XOR each, inline) |
| `rtl/pg_logic.sv`           | `pg_logic`            | stage 3: Han-Carlson tree |
| `rtl/black_cell.sv`         | `black_cell`          | prefix operator; pins `gk pk gj pj` -> `g p` |
| `rtl/gray_cell.sv`          | `gray_cell`           | generate-only prefix operator; pins `gk pk gj` -> `g` |
| `rtl/sum_logic.sv`          | `sum_logic`           | stage 4: XOR row and carry-out |

Every module with a width takes the parameter `N` (type `int unsigned`, default 16). Output
packing is `{Cout, S_N, ..., S_0}` throughout.

## Where this RTL makes its own choices

* **No carry-in on the top.** The reference top level has only `a`, `b`, `c` and an 18-bit `S`.
  The adder described does accept a carry-in. `adder` ties that carry-in to 0 and
  `three_operand_adder` exposes it, so use the core directly if you need it.
* **The top prefix position.** The base stage is described as N+1 cells, but its equations cover
  only positions 0..N-1. Cell N is built as a cell whose `S'` input is 0.
* **Gray cells.** Cells whose group reaches position 0 are gray, and all others are black. Buffers
  on pass-through positions are plain wires.
* **Gate-level style.** Every stage is written as plain Boolean equations. Nothing here depends on
  a synthesis tool's own adder. The reference implementation targeted an FPGA flow. Area, delay
  and power figures for that flow are not reproduced here.
* **Widths other than 16** use the same generation rule. They were not part of the reference
  implementation.

## Simulating

All testbenches are self-checking. Each one prints `TB_RESULT checks=<n> failures=<n>` and stops
with `$finish`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal rtl/toa_pkg.sv -y rtl \
          tb/adder_tb.sv --top-module adder_tb -Mdir obj_adder
./obj_adder/Vadder_tb
```

| testbench                   | what it checks |
|-----------------------------|----------------|
| `tb/adder_tb.sv`            | Top at default size. Uses five reference operand sets (10+13+14=37, 20+23+24=67, 11+123+113=247, 203+159+167=529, 156+163+113=432), corner cases and 200 000 random vectors. It also counts how often each mechanism occurs (stage-1 carry, generate, a carry chain of at least N-2 positions, `S[N]` set, carry-out) and fails if any count is zero. |
| `tb/three_operand_adder_tb.sv` | Core with `cin`. Exhaustive at N=4; random and corner vectors at N=16, 32 and 64. |
| `tb/pg_logic_tb.sv`         | Prefix tree against a ripple-carry reference at N=16 and N=33. |
| `tb/base_logic_tb.sv`, `tb/sum_logic_tb.sv`, `tb/bit_addition_logic_tb.sv` | The stage equations and their arithmetic identities. |
| `tb/full_adder_tb.sv`, `tb/black_cell_tb.sv`, `tb/gray_cell_tb.sv` | Exhaustive truth tables. |

Each of these takes well under a second. To change the width, override `N` on `adder` or
`three_operand_adder`. The result width follows automatically as N+2.
