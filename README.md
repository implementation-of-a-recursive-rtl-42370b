# QRD-RLS matrix inversion core

This core inverts an N x N complex matrix (N = 8 by default) in hardware, the
operation at the heart of MIMO detection and of recursive least-squares
adaptive filters. It solves A·X = I in two phases:

1. **Triangularisation.** A QR decomposition of [A | I] built from *squared
   Givens rotations* (SGR), which need no square roots.
2. **Back substitution.** It solves the resulting triangular system U·X = Z.

The textbook approach is a triangular systolic array with one node per matrix
element, which is fast but very large. Here the array is *folded*: one
boundary cell, one internal cell and one back-substitution cell do the work of
every node in turn. Two memories hold the state that would otherwise sit
inside the nodes, and a controller decides each cycle which node every cell
plays.

Numbers are complex. Each part is a 25-bit floating-point word: sign, 8-bit
exponent and 16-bit mantissa.

```
            in_valid/in_ready/in_data (row-major A)
                        │
                        ▼
  ┌──────────┐     ┌─────────┐  c,s,w ┌───────────────┐
  │controller│────▶│  A mem  │──────▶ │ boundary cell │──┐
  │          │     │ [A | I] │   v    └───────────────┘  │ c, s (next row)
  │ schedule │     │ + work  │◀──┐                       ▼
  │ handshake│     └─────────┘   │ v_new ┌───────────────┐
  │          │                   └───────│ internal cell │
  │          │     ┌─────────┐  u / u_new└───────────────┘
  │          │────▶│  D mem  │◀────────────────┘
  │          │     │ [U | Z] │◀───▶ back-substitution cell ──▶ out_* (X)
  └──────────┘     └─────────┘
```

## Squared Givens rotations

A conventional Givens rotation zeroes one element of an incoming row against
the stored diagonal element. To do that it needs a square root (the norm) and
a division. SGR instead keeps every stored row of R scaled by its own diagonal
element. Each incoming row also carries a real weight w. With that scaling the
square root disappears, and each node is reduced to a few multiply-adds and
one division.

**Boundary cell** (`boundary_cell`). It holds the real diagonal element u of
its array row. It receives the element v of the incoming row that sits in
this row's diagonal column, plus the row's weight w, and computes:

```
u_new = u + w·|v|²          updated diagonal
w_out = w·u / u_new         weight the rotated row carries to the next array row
c     = v / u               rotation parameters for the internal cell
s     = w·conj(v)
```

**Internal cell** (`internal_cell`). For every other column k of the same
array row, the stored element u and the incoming element v become:

```
u_new = u + s·v             stored row absorbs the incoming row
v_new = v − c·u             incoming row loses its component along the stored row
```

`v_new` is what the next array row receives. After array row i, the incoming
row is zero in columns 0..i.

**An empty array row** (u = 0) absorbs the incoming row completely. This
happens for the first input row to reach each array row. Division by zero is
defined to return 0, so c = 0 and w_out = 0: the stored row becomes w·v and
nothing is passed on. No special case is needed in the control. On the very
first input row the controller also forces the stored value read from D
memory to zero, so no clearing pass is needed between matrices.

**After all N input rows**, D memory holds [U | Z]:

- U is upper triangular, the scaled R factor.
- Z is the identity rotated and scaled in the same way.

Because the scaling is applied equally to U and Z, the inverse is simply the
solution of U·X = Z.

## Back substitution

`backsub_cell` folds the LI (multiply-accumulate) and LD (divide) nodes of a
back-substitution column into one cell. The inverse is built column by column
(j = 0..N-1); within a column, rows go from the bottom row i = N-1 up to 0:

```
LI, k = N-1 down to i+1:   acc ← acc − U[i][k]·X[k][j]
LD:                        X[i][j] = (Z[i][j] + acc) / U[i][i],  acc ← 0
```

Each X[i][j] overwrites Z[i][j] in D memory, because later rows of the same
column read it. It is also sent to the output port as it is produced. The
output order is therefore column by column, bottom row first, and each
element is tagged with `out_row`/`out_col`.

## Schedule and cycle counts

The controller (`qrd_controller`) runs two threads during triangularisation.

**Internal thread** (r, i, k). It rotates column k of array row i for input
row r, one column per cycle, for k = i+1 .. 2N-1. The right half of each row
is the identity part. The internal cell keeps the rotation parameters (c, s)
of the current array row in its own registers.

**Boundary thread** (rb, ib). It computes the parameters for the *next* array
row while the internal cell is still busy. A boundary step can issue only
when two conditions hold:

- **Its input exists.** For ib = 0, element A[rb][0] has been loaded.
  For ib > 0, the internal cell has already rotated column ib of array row
  ib-1. The boundary step then runs in a later cycle, never in the same one.
- **The parameter registers are free.** The internal cell has taken the
  previous set. The hand-over is the `p_load` pulse at the edge that ends an
  internal row.

Once the input is ahead, the internal cell never idles, and one matrix takes:

| phase | cycles | N = 8 | N = 12 |
|---|---|---|---|
| triangularisation | N·(N(2N−1) − N(N−1)/2) + 2 | 738 | 2058 |
| back substitution | N²(N+1)/2 | 288 | 936 |

At 125 MHz that is 1026 cycles, about 0.12 M inversions/s at N = 8. The
published figures for this architecture are 777 cycles and 156 cycles
(0.14 M/s). The schedule behind those figures is not known, so this core uses
its own. In particular it runs back substitution on a single MAC/divide cell,
which is where most of the difference comes from.

**Loading** is a valid/ready stream, row-major. `in_ready` stays high while A
memory has room. A memory holds the matrix and a separate 2N-word working row,
so the next matrix can stream in during back substitution of the current one.

Triangularisation does not wait for the matrix, or even for a whole row.
- The boundary step that starts input row r needs only A[r][0].
- Each internal step in array row 0 waits only for its own element A[r][k].

When an element has not yet arrived, the internal cell stalls (`stall`).
Nothing is lost and the result is unchanged.

## Run-time matrix size

The size N is the largest matrix the core handles. Each matrix on the stream
may be smaller: `in_dim` (1..N) is sampled with the matrix's first element,
and only in_dim² elements follow. A value of 0, or any value above N, means N.

A d x d matrix A is inverted as the N x N block-diagonal matrix diag(A, I).
Its inverse is diag(A⁻¹, I), so the top-left corner is the wanted result.
- The padding is never stored: the A memory returns identity elements for
  every read outside the d x d corner.
- The controller never waits on the stream for a padding element.
- At the output, only the d x d elements are sent. The order is unchanged,
  and `out_last` marks element (0, d-1).

A smaller matrix therefore takes as many cycles as a full one. Only the
loading is shorter. The controller keeps the size of the matrix in back
substitution apart from the size of the matrix being loaded, so consecutive
matrices may differ in size.

## Memories

- **`a_mem`.** It holds the input matrix (N x N) and the 2N-element working
  row, the row being passed down the array. It has two combinational read
  ports, one for the boundary cell and one for the internal cell. The
  identity half of [A | I] is generated from the address, not stored. The
  write port for the working row takes `v_new` from the internal cell.
- **`d_mem`.** It holds the N x 2N state [U | Z], which becomes [U | X]. It
  has two write ports and two combinational read ports:
  - During triangularisation, port 0 serves the internal cell (element (i, k))
    and port 1 the boundary cell (diagonal (ib, ib)). They always address
    different array rows.
  - During back substitution, the two read ports fetch U[i][k] and X[k][j] for
    LI steps, and U[i][i] and Z[i][j] for the LD step.

## Number format

Defined in `qrd_pkg` (`fp_t`, `cfp_t`):

| field | bits |
|---|---|
| sign | 1 |
| exponent | 8, bias 127 |
| mantissa | 16, hidden leading one |

- An exponent of 0 means zero. There are no subnormals, infinities or NaNs.
- Results round to nearest on the first dropped bit.
- Overflow saturates to the largest magnitude. Underflow flushes to zero.
- Division by zero returns zero. The absorbing behaviour of the boundary
  cell, described above, depends on this.
- A complex number is two such words (50 bits), real part in the upper half.

The operators are combinational: `fp_add`, `fp_mul` and `fp_div`, plus the
complex helpers `cfp_mul` (four multiplies and two adds) and `cfp_add`. Every
cell step is therefore a single-cycle combinational path through several
floating-point operators. That is fine in simulation but long for an FPGA.
The obvious next step is to pipeline the operators and stretch the schedule
to match.

With 16 mantissa bits, the tests show relative errors of about 1e-4 of the
largest element of the inverse for well-conditioned matrices. Accuracy falls
with the matrix's condition number, as for any fixed-width arithmetic.

## Interface (`qrd_rls_inv`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid`, `in_ready` | in / out | 1 | input handshake, transfer when both are high |
| `in_data` | in | 50 | element A[r][c], row-major |
| `in_dim` | in | ⌈log2(N+1)⌉ | size of this matrix, sampled with its first element |
| `out_valid` | out | 1 | one element of the inverse this cycle |
| `out_row`, `out_col` | out | ⌈log2 N⌉ | its position |
| `out_data` | out | 50 | X[out_row][out_col] |
| `out_last` | out | 1 | final element of this matrix |
| `busy` | out | 1 | the core is working on a matrix |

- The parameter is `N` (default 8).
- The output is registered: one cycle after the LD step that produced it.
- `out_valid` has no back pressure. The consumer must take every element.
- `in_ready` is registered. Drive inputs away from the rising edge, for
  example on the falling edge.

## Departures from the published architecture

- The floating-point adder, multiplier and divider are written here. The
  published design takes them from an FPGA vendor library.
- The cycle schedule, the load handshake, the output order and the
  divide-by-zero convention are this design's own.
- Overlap is limited:
  - Boundary and internal cell work concurrently, as published.
  - Loading overlaps back substitution.
  - The next matrix's triangularisation does *not* overlap the current back
    substitution. That would need a second D memory; the published design
    mentions it only as a possible improvement.
- The run-time matrix size works by padding, as described above. A smaller
  matrix is not processed any faster.
- No attempt was made to match FPGA resource use or clock rate.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and ends. Shared reference helpers
(conversion to and from `real`, a tolerance compare) are in
`tb/fp_tb_pkg.sv`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/qrd_pkg.sv tb/fp_tb_pkg.sv $(ls rtl/*.sv | grep -v qrd_pkg) \
  tb/qrd_rls_inv_tb.sv --top-module qrd_rls_inv_tb -Mdir obj_top
./obj_top/Vqrd_rls_inv_tb
```

The packages must come first. For a unit testbench, swap in its name. The
N = 8 run takes well under a second. `-Wno-fatal` lets the build go on past
lint warnings: unused bits of some internal signals, and reset used both in
the flops and in the concurrent assertions.

| testbench | what it checks |
|---|---|
| `fp_add_tb`, `fp_mul_tb`, `fp_div_tb` | random and corner operands against `real` arithmetic rounded to the format |
| `boundary_cell_tb` | u_new, c, s, w_out against a `real` model, including u = 0 |
| `internal_cell_tb` | u_new, v_new with parameters latched by `p_load` |
| `backsub_cell_tb` | whole back-substitution sequences against a `real` model |
| `a_mem_tb`, `d_mem_tb` | every address and port, the generated identity half |
| `qrd_controller_tb` | the schedule rules: order of steps, data dependencies, hand-over, stalls, cycle counts |
| `qrd_rls_inv_tb` | 12 matrices at N = 8, back to back, against a double-precision Gauss-Jordan inverse; the last four are 3x3 to 6x6 |
| `qrd_rls_inv_n12_tb` | the same at N = 12 |

The end-to-end testbenches use four kinds of matrix:

- diagonally dominant;
- general random;
- lower triangular with widely scaled rows;
- real-valued.

Besides the values, they check:

- output tags and `out_last`;
- both phase cycle counts;
- that each mechanism happened at least once:
  - a stall waiting for input;
  - a row started before it was fully loaded;
  - boundary and internal cell in the same cycle;
  - loading during back substitution;
  - row absorption;
  - input back pressure;
  - a matrix smaller than N.
