# 32-bit Ladner-Fischer parallel-prefix adder

A ripple-carry adder makes every bit wait for the carry of the bit below it,
so its delay grows linearly with the word length. A parallel-prefix adder
instead computes all carries at once with a logarithmic-depth tree of small
"prefix" cells. The Ladner-Fischer adder is one such tree: it halves the
problem by first pairing neighbouring bits, solves the odd positions with a
divide-and-conquer (Sklansky) tree, and fills in the even positions with one
last row of cells. This RTL implements it as a purely combinational,
parameterised N-bit adder, with a 32-bit top level.

## The three stages

```
   a[N-1:0]  b[N-1:0]        cin
      |        |              |
  +---v--------v---+          |
  | pre-processing |  p = a ^ b, g = a & b
  +---+--------+---+          |
      | g, p   | p            |
  +---v----+   |              |
  | carry  |<--|--------------+
  | tree   |   |              |
  +---+----+   |              |
      | c      |              |
  +---v--------v---+          |
  | post-processing|<---------+   sum_i = p_i ^ c_{i-1},  c_{-1} = cin
  +---+-------+----+
      |       |
     sum     cout = c[N-1]
```

* **Pre-processing** (`lf_preprocess`): for each bit, propagate
  `p_i = a_i XOR b_i` and generate `g_i = a_i AND b_i`.
* **Carry generation** (`lf_carry_tree`): the prefix tree. Output `c[i]` is
  the carry out of bit i, including the carry-in.
* **Post-processing** (`lf_postprocess`): `sum_i = p_i XOR c_{i-1}`, with
  the carry-in below bit 0; the carry-out is `c[N-1]`.

The propagate vector is used twice: by the tree and, around it, by the sum
stage.

## Prefix cells

Every cell applies the prefix operator to an upper span `(G_hi, P_hi)` and
the adjacent lower span `(G_lo, P_lo)`:

```
G = G_hi | (P_hi & G_lo)        P = P_hi & P_lo
```

* `black_cell` computes both halves (two AND gates, one OR gate).
* `gray_cell` computes only `G`. It is used wherever the lower span already
  reaches down to the carry-in. There the result is a finished carry, and
  its propagate is never needed again.

Inside the tree, the propagate of a finished span is held at 0. That is the
propagate of the carry-in position, which acts as an extra bit below bit 0
with `g = cin, p = 0`.

## The Ladner-Fischer tree

With `L = log2(N)`, the tree has `L + 2` levels:

| level | what happens | cells |
|-------|--------------|-------|
| 0 | the carry-in is merged into bit 0 (`g0 OR (p0 AND cin)`) | 1 gray |
| 1 | every odd bit `i` is joined with bit `i-1` | bit 1 gray, the rest black |
| 2 .. L | Sklansky tree over the N/2 odd bits. At tree level `l`, the odd node `j` (bit `2j+1`) whose index bit `l-1` is set is joined with the top node of the block just below it. | gray where the lower node is already final (`j < 2^l`), black otherwise |
| L+1 | each even bit `i >= 2` is joined with the finished carry of bit `i-1` | gray |

For N = 32 this is 64 cells, 32 black and 32 gray. The carry path is 7 cells
deep, against 32 for a ripple-carry adder. The price is fan-out: in the last
Sklansky level one node drives up to N/4 cells, plus one in the final row.
For N = 16 the tree is 6 cells deep.

The levels are written as generate loops over the arrays `gl[level][bit]`
and `pl[level][bit]`. The generate block names (`g_pass`, `g_gray`,
`g_black`) show in the hierarchy which kind of cell sits at each bit and
level. N must be a power of two of at least 2. Any other value stops
elaboration with an error.

## Top level: `lf32bit`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`  | in  | 32 | operand A (unsigned) |
| `b`  | in  | 32 | operand B (unsigned) |
| `s`  | out | 32 | sum |
| `cry`| out | 1  | carry-out |
| `s0` | out | 33 | full sum `{cry, s}` |

This port list has no carry-in, so the inner adder's carry-in is tied to 0.
Use `lf_adder` directly for an adder with a carry-in. The parameter `N`
(default 32) also builds other widths from the same source. For example,
`lf32bit #(.N(16))` is the 16-bit version.

There are no registers and no clock. The result is valid once the inputs
have passed through the pre-processing gates, `log2(N) + 2` prefix cells
(each an AND followed by an OR) and the sum XOR. Synthesised with yosys (coarse, generic cells),
the 32-bit top comes to 95 one-bit AND, 63 one-bit OR, one 32-bit AND and
two 32-bit XOR cells, and no flip-flops.

## Where this design makes its own choices

* **Tree wiring.** The cell equations, the black/gray cells and the three
  stages are those of the Ladner-Fischer adder as described. The published
  drawings of the 8- and 16-bit networks use blocks over bit groups
  (bit 0, bits 3:1, 7:4, 11:8, 15:12), and these do not fix the cell-level
  wiring. The tree here is the standard Ladner-Fischer network. Only the
  single cell that forms the bit-0 carry from `p0`, `g0` and the carry-in is
  taken from those drawings.
* **Gray cell.** A gray cell is sometimes described as a single AND gate.
  That cannot form a carry, so the AND-OR generate half of the operator is
  used.
* **Sum gate.** The sum is `p XOR carry`. One form of the sum equation shows
  an AND, which would not add.
* **Carry-in.** It is merged into bit 0 by a gray cell at the root of the
  tree rather than in the pre-processing stage. The arithmetic is the same.
* **`s0`.** It is read as the 33-bit sum `{cry, s}`. In the reference
  simulation the sum never overflows, so `s0` always equals `s` there.
* Registers, pipelining, signed operands and overflow flags are not part of
  the design.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module against a model that shares no structure with it, and ends with
`TB_RESULT checks=<n> failures=<m>`.

| testbench | what it covers |
|-----------|----------------|
| `tb_black_cell`, `tb_gray_cell` | all input combinations |
| `tb_lf_preprocess` | 32-bit: corners and random inputs, per bit, against one-bit addition |
| `tb_lf_postprocess` | 32-bit: random `p`, `c` and both carry-in values |
| `tb_lf_carry_tree` | 8-bit: every `(g, p, cin)` combination (2^17). 32-bit: 20 000 random and corner vectors. Both checked against a ripple recurrence. |
| `tb_lf_adder` | 4- and 8-bit: every `(a, b, cin)` combination. 16- and 32-bit: 20 000 random and corner vectors each. |
| `tb_lf32bit` | default 32-bit top. The reference waveform's operand pairs (18+20=38, 28+30=58, ... 220+230=450), corners and 100 000 random pairs. It also checks that a carry-out, a carry through all 32 bits, a carry-free add and a carry across bit 16 each occurred. |
| `tb_lf16bit` | the 16-bit build of the top, with the same kind of checks |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_lf32bit.sv --top-module tb_lf32bit
./obj_dir/Vtb_lf32bit
```

Every testbench runs in well under a second. What is not verified is timing:
the gate delays, LUT counts and power of any implementation depend on the
target and its tools.

## Changing it

* **Width:** set `N` on `lf32bit`, `lf_adder` or any stage. The tree needs a
  power of two.
* **Pipelining:** the `gl`/`pl` level arrays in `lf_carry_tree` are where
  you would add register stages. The sum stage would then need `p` and
  `cin` delayed by the same number of cycles.
* **Other prefix networks:** only the index arithmetic of levels 1 to L+1 in
  `lf_carry_tree` makes this network Ladner-Fischer. The cells and the other
  two stages stay the same.
