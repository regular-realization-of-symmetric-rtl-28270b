# 2*2 net: symmetric Boolean functions in regular reversible logic

A Boolean function of n inputs is *totally symmetric* when its value depends
only on how many of the inputs are 1. Every such function can be written as
S^I(x): it is 1 exactly when the number of 1 inputs is in an index set
I ⊆ {0, 1, ..., n}. Parity, majority, "all zero" and the bits of a
ones-counter are all like this.

This RTL builds such functions from reversible gates only. Each gate has as many
outputs as inputs and maps input vectors one-to-one to output vectors. No
wire fans out except through a fan-out gate. Every output that the function
does not need leaves the structure as a *garbage* output. The circuit is a
regular net of three planes, placed left to right:

```
 x[0..N-1] ──► [1] triangular plane ──T_k──► [2] single-index plane ──S^k──► [3] output plane ──► f[0..M-1]
               N(N-1)/2 MAX/MIN cells        N-2 fan-out + N-1 Feynman        ≤ 1 Feynman gate
                                                                              per (output, index)
```

- **T_k** ("at least k inputs are 1", k = 1..N) are the threshold functions.
  They are the positive unate symmetric functions. T_1 is the OR of the inputs
  and T_N their AND, and each T_k contains T_{k+1}.
- **S^k** ("exactly k inputs are 1") are the single-index functions. They are
  disjoint, so an OR of several S^k equals their EXOR. That is why plane 3
  can use only Feynman (controlled-NOT) gates.

The structure is combinational: it has no clock, no registers and no reset.

## The gates

| module         | equations | role |
|----------------|-----------|------|
| `feynman_gate` | P = A, Q = A xor B | EXOR; a fan-out gate when B = 0 |
| `mvfg`         | P = A, Q = B, R = (A<B) ? C : D, S = (A<B) ? D : C | multi-valued Fredkin gate: an order comparison steers two data lines |
| `minmax_cell`  | two `mvfg` | reversible MAX/MIN cell; for binary signals, OR/AND |

`mvfg` only needs an order on its signals. Its width `W` encodes multi-valued
signals as unsigned numbers. The net itself uses the binary case, `W = 1`, in
which A < B means A = 0 and B = 1.

### How the MAX/MIN cell stays reversible

A MAX/MIN cell cannot simply drop which input was larger, or it could not be
undone. The cell takes two neighbour inputs `a` and `b` plus the constants 0 and 1:

1. Gate 1 compares `a` with `b` and steers the constants. Its data outputs
   are (0,1) if a < b and (1,0) otherwise. Its control outputs are copies
   of `a` and `b`.
2. Gate 2 uses that recorded pair as its controls, and the copies of `b` and
   `a` as its data. It routes `b` to MAX and `a` to MIN when a < b, and swaps
   them when a ≥ b.

The recorded pair leaves the cell as its two garbage outputs (`g_lo`, `g_hi`).
The 4-in/4-out map is one-to-one and *conservative*: the outputs are a
permutation of the inputs. Immediate assertions in `minmax_cell` check that
the outputs are the inputs, sorted. The wiring of the two gates is this
design's own. The only requirements it meets are two gates, two neighbour
inputs and outputs, and two garbage outputs.

## Plane 1: the triangle (`triangular_plane`)

There is one column per input variable. Column j (j = 1..N-1) has j cells and
inserts `x[j]` into the lines that already hold the sorted threshold
functions of `x[0..j-1]`. For N = 3 (three cells), writing cell(a, b) -> (max, min):

```
column 1:  cell(x1, x0)       -> (L0, L1)          L0 = x0|x1, L1 = x0&x1
column 2:  cell(x2, L0)       -> (T1, c)           T1 = x0|x1|x2
           cell(c,  L1)       -> (T2, T3)          T2 = majority, T3 = x0&x1&x2
```

The new variable enters at the top cell of its column. Each cell keeps the
MAX (OR) on its own line and passes the MIN (AND) down to the next cell. The
last MIN becomes a new bottom line. After column N-1, line k-1 holds T_k.
This takes 1+2+...+(N-1) = N(N-1)/2 cells, and each cell touches only its
neighbours. The garbage output `g` has two bits per cell, in column order.

## Plane 2: threshold to single-index (`single_index_plane`)

Neighbouring threshold functions differ in one index, so S^k = T_k xor T_{k+1}
for k < N, and S^N = T_N. The inner lines T_2..T_{N-1} each feed two gates,
so they first pass through N-2 fan-out gates. Then N-1 Feynman gates form the
EXORs. Gate k has T_{k+1} as its control and T_k as its target. Its control
output repeats T_{k+1}:

- for the last gate, that repeat is S^N itself;
- for every other gate, it is the *interval* function S^{k+1..N}, which
  leaves the structure on `g_interval`.

No line carries S^0 (no input is 1).

## Plane 3: output rows (`output_plane`)

The lines S^1..S^N run through the plane as columns. Each output is a row of
Feynman gates. At each column the row needs, the column line is the gate's
control and passes on to the next row, and the row's running value is the
target. The function is set by a parameter:

```
INDEX_SET[j][k] = 1   ⇔   index k (0..N) is in output j's set
```

Index 0 has no line. The design uses the identity
S^0 xor S^1 xor ... xor S^N = 1:

- if a row's set does **not** contain 0, the row starts from constant 0 and
  EXORs the S^k of its set;
- if the set **contains** 0, the row starts from constant 1 and EXORs the
  S^k that are **not** in its set.

A row therefore has one gate for each index k ≥ 1 whose membership differs from
that of index 0. That is at most N gates per output. The bound usually stated
for this structure, at most N-1 per output, assumes an EXOR of N terms costs
N-1 gates. A reversible row that starts from a constant needs one more gate
when all N lines are used, as for the set {1..N}. A row whose set is empty or
full has no gates and outputs a constant.

After the last row, the S^k lines leave the structure on `g_single`.

## Top level (`sym_net_top`)

| parameter   | default | meaning |
|-------------|---------|---------|
| `N`         | 4       | input variables (≥ 3) |
| `M`         | 3       | outputs |
| `INDEX_SET` | counter of ones | `logic [M-1:0][N:0]` index sets, see above |

By default the net is the counter of ones for four inputs: `f` is the binary
count of 1s in `x`. Bit 0 is S^{1,3}, bit 1 is S^{2,3} and bit 2 is S^{4}.
This default is a choice of this design. Any other symmetric function is a
change of `N`, `M` and `INDEX_SET`.

| port         | dir | width    | meaning |
|--------------|-----|----------|---------|
| `x`          | in  | N        | inputs |
| `f`          | out | M        | f[j] = S^{INDEX_SET[j]}(x) |
| `g_cells`    | out | N(N-1)   | comparison record of every MAX/MIN cell |
| `g_interval` | out | N-2      | interval functions S^{k+1..N}, k = 1..N-2 |
| `g_single`   | out | N        | single-index functions S^1..S^N after plane 3 |

Gate counts at the default size are 6 MAX/MIN cells (12 multi-valued Fredkin
gates), 2 fan-out gates, 3 Feynman gates in plane 2 and 5 Feynman gates in
plane 3. Each plane exports its count as a localparam (`CELLS`, `FANOUTS`,
`FEYNMANS`, `GATES`). `rev_pkg` holds the formulas for the counts.

## Where this departs from the usual description

- The internal wiring of the MAX/MIN cell (the constants 0/1 and the order of
  the data inputs) and the insertion order inside the triangle are choices of
  this design. Their functions and gate counts are the standard ones.
- How index 0 is handled (a row that starts from constant 1), and the
  resulting count of up to N gates per output instead of N-1, are described
  above.
- The following are not built: the plain 3x3 Fredkin gate; the simpler
  binary cells (4x4 Fredkin or Kerntopf gates); a net without the middle
  plane; multi-valued nets. Only the gate (`mvfg`, `minmax_cell`) takes
  multi-valued signals.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog:

| testbench | what it covers |
|-----------|----------------|
| `tb_mvfg`, `tb_feynman_gate`, `tb_minmax_cell` | exhaustive truth tables (binary and multi-valued); the MAX/MIN cell's map checked one-to-one |
| `tb_triangular_plane` | N = 3 and N = 7, all inputs, against population counts; nesting; garbage codes |
| `tb_single_index_plane` | N = 3 and N = 8, every threshold code; interval garbage; gate counts |
| `tb_output_plane` | empty, full and index-0 sets, parity |
| `tb_sym_net_top` | N = 7, M = 5, all 128 inputs, including S^0, majority, parity and S^{0,7}. Checks that the whole net is one-to-one (garbage included) and counts each mechanism: cell with a<b, cell with a≥b, every index reached, a constant-1 row firing |
| `tb_sym_net_full` | default parameters (ones counter, N = 4), all inputs, gate counts |
| `tb_example_n3` | N = 3: majority ab+ac+bc, OR, AND and S^1, against the written-out expressions |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/rev_pkg.sv tb/tb_sym_net_top.sv --top-module tb_sym_net_top
./obj_dir/Vtb_sym_net_top
```

The largest sizes simulated are N = 7 for the whole net and N = 8 for plane 2.
Plane 1 grows as N², so larger N only costs elaboration time.
