# Band LU decomposition on a systolic array derived from its recurrence

This design factors an N x N band matrix A into a unit lower-triangular L and an
upper-triangular U, with A = L·U and no pivoting. It uses a P x Q mesh of small
processors, where P is the lower bandwidth and Q the upper bandwidth of A. The array
is not hand-designed. It is what comes out when the elimination recurrence is mapped
onto space and time:

    a(i,j,0) = a_ij
    a(i,j,k) = a(i,j,k-1) / a(k,j,k-1)                    if k = j   (this is l(i,k))
    a(i,j,k) = a(i,j,k-1) - a(i,k,k) * a(k,j,k-1)         otherwise

The mapping uses the schedule t(i,j,k) = i + j + k and the placement [x,y] = [i-k, j-k].
Each recurrence point (i,j,k) is evaluated by processor [x,y] at cycle t. No two
points share a processor and a cycle.

Two of the three dependencies are not local under this mapping. Every point of row
i at step k needs the same l(i,k), and every point of column j needs the same
u(k,j) = a(k,j,k-1). Both are turned into unit-delay pipelines. l moves one processor
to the right per cycle, and u moves one processor down per cycle. The remaining
dependency, a(i,j,k-1) -> a(i,j,k), is already uniform: one processor up-left per
cycle. The result has only nearest-neighbour links, each one register long.

## The array (`lu_array`)

```
            u (pivot rows) flow down
       [0,0]  -> [0,1]  -> [0,2]  -> [0,3]      row 0: u(k,j) := own diagonal input
         |         |         |         |
       [1,0]  -> [1,1]  -> [1,2]  -> [1,3]      l flows right
         |         |         |         |
       [2,0]  -> [2,1]  -> [2,2]  -> [2,3]      a flows up-left, from [x+1,y+1]
         |         |         |         |
       [3,0]  -> [3,1]  -> [3,2]  -> [3,3]  <-- matrix enters at the bottom row
       column 0: dividers                       and the right column
```

Processor [x,y] at cycle t works on the point with k = (t - x - y)/3, that is, on
element a(x+k, y+k). It is busy only in the cycles where t - x - y is a multiple of
3, which is one cycle in three. This is the usual behaviour of this class of
array. Sending three independent matrices through interleaved would use the idle
cycles, but this design does not do that.

There are three kinds of processor position:

- **Inner processors** (`lu_pe`, x ≥ 1, y ≥ 1). Each computes
  a_out = a_in − l_in·u_in and sends it up-left. It forwards l to the right and u
  down unchanged.
- **Column 0** (`lu_div_pe`). Here j = k, so the point is a new multiplier
  l(i,k) = a(i,k,k-1) / u(k,k). The quotient goes right along the row and is also
  the result for L. The pivot u(k,k) is forwarded down.
- **Row 0**. Here i = k, so u(k,j) = a(k,j,k-1) is exactly the element arriving on
  the processor's own diagonal input. The array ties the u input of each row-0
  processor to its diagonal input. Row 0 therefore turns the arriving row of the
  partially reduced matrix into a row of U and sends it down its columns.
  Processor [0,0] computes a/a = 1. That 1 travels along row 0 as l(k,k), so the
  row-0 inner processors output a − 1·a = 0, which leaves the array unused.

**How the matrix gets in.** The recurrence domain starts at k = 1, but an element
a(i,j) first needs an update when it reaches processor [i-k, j-k] inside the band.
The design extends each element's path backwards to the array edge. Element a(i,j)
enters at step k0 = max(i−P+1, j−Q+1), on processor [i−k0, j−k0], at cycle
t = i + j + k0. That processor is in the bottom row when i − k0 = P − 1, and in the
right column otherwise. From there the element moves up-left one processor per
cycle. At the virtual steps k ≤ 0 the element meets no l and no u, because column
0 and row 0 only emit values for real matrix indices. The subtraction is then
a − 0·0, and the element passes through unchanged. This gives the skewed,
diagonal-by-diagonal feeding of the matrix from the lower right.

**How the results get out.**

- u(k, y+k) appears on `u_res[y]`, the registered u output of row-0 processor
  [0,y], one cycle after t = y + 3k.
- l(x+k, k) appears on `l_res[x]`, the registered l output of column-0 processor
  [x,0], one cycle after t = x + 3k.

The last result, u(N,N), is computed at t = 3N.

**Tokens.** Every link carries a token: a valid bit plus a value. An invalid token
carries zero. An assertion in `lu_pe` checks the pairing rule: an element that
arrives meets either both factors of one elimination step or neither. Near the end
of the matrix a lone l or u may still travel with no element.

## The engine around the array (`lu_top`)

- `lu_ctrl` produces the schedule time t. A start pulse loads
  t = 4 − max(P,Q), the entry time of a(1,1). The counter runs to 3N + P + Q. The
  last P + Q cycles drain the tokens still in flight, so that a new run can start
  directly after `done`.
- `lu_feeder` holds A in band form: row i−1, slot j−i+P−1, which is N x (P+Q−1)
  words. Each cycle it presents, on every edge input, the element whose entry time
  is the current t. It finds that element by inverting the schedule: for edge
  processor [x,y], if t − x − y = 3k, the element is a(x+k, y+k).
- `lu_collector` stores arriving results in band buffers for L and U. It recovers
  each result's indices from its arrival time. Its read port returns 1 on the
  diagonal of L and 0 outside the band.

Host interface of `lu_top`. All indices are 1-based. Values are fixed point as
described below.

| signal | dir | meaning |
|---|---|---|
| `wr_en, wr_i, wr_j, wr_data` | in | write a(wr_i, wr_j). Ignored outside the band and while busy |
| `start` | in | start a decomposition. Sampled when idle |
| `busy` / `done` | out | run in progress / one-cycle pulse at the end |
| `rd_i, rd_j` → `rd_l, rd_u` | in → out | combinational read of L(i,j) and U(i,j) |

A run takes exactly 3N + P + Q − 3 + max(P,Q) cycles from the start edge to
`done`. That is 27 cycles at the defaults N = 6, P = Q = 4.

## Parameters and number format

| parameter | default | meaning |
|---|---|---|
| `P` | 4 | lower bandwidth: L(i,k) = 0 for i − k ≥ P. The array has P rows |
| `Q` | 4 | upper bandwidth: U(k,j) = 0 for j − k ≥ Q. The array has Q columns |
| `N` | 6 | matrix order. Only the buffers and the counter depend on it |
| `lu_pkg::DATA_W` | 32 | value width |
| `lu_pkg::FRAC_W` | 16 | fraction bits |

- The defaults are the 4 x 4 array and the 6 x 6 matrix with bandwidth 4 of the
  classic example of this array.
- P and Q must each be at least 2.
- Values are signed fixed point, Q16.16.
- Products are truncated toward minus infinity.
- Quotients are truncated toward zero.
- A zero pivot gives a quotient of 0. The algorithm has no pivoting, so the
  matrix must have nonsingular leading minors. Diagonally dominant matrices are
  the safe case.

Each processor does its multiply-subtract, or its divide, combinationally within
one clock. That matches the model of one operation per time step. A fast clock
would need the divider pipelined, and the schedule stretched to match.

## What is this design's own

The array structure is derived from the recurrence, as described above. This
includes the processor functions, the three link directions, the unit delays, the
schedule and the placement. The following parts are choices made here:

- the word format;
- the token valid bits and the pass-through of elements before their first
  elimination step;
- tying row 0's u input to its diagonal input;
- where results are tapped;
- the input and output buffers, the counter and the host interface.

In the published drawing of this array, arrows also enter row 0 from above and
column 0 from the left. Their sources are not specified, and in this
implementation those inputs are generated inside the array as described.

The related array that results from the fully eliminated recurrence is not
implemented. In that array, every processor divides and takes four inputs. The
dynamic-programming array used to motivate linear dependencies is also not
implemented.

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog. The
reference model (`tb/tb_lu_ref_pkg.sv`) runs the textbook k-loop elimination with
its own 64-bit fixed-point helpers. These helpers follow the same rounding rules
as the hardware, so results are compared bit for bit. The model also checks that
L·U reproduces A to within a few LSB.

| testbench | what it checks |
|---|---|
| `tb_lu_pe`, `tb_lu_div_pe` | processor arithmetic, forwarding, reset; exact 1.0 for a/a; zero pivot |
| `tb_lu_array` | array alone, 9 x 9 matrix driven by the testbench's own schedule. Every result must appear on its port in exactly the cycle the schedule gives, and nowhere else |
| `tb_lu_ctrl`, `tb_lu_feeder`, `tb_lu_collector` | counter sequence and handshake; every injected token in every cycle; result storage and read port |
| `tb_lu_top` | default size, 8 runs. Checks run length, stream timing and values, all of L and U, and back-to-back start. Counts bottom and right entries, pass-throughs, updates and divisions |
| `tb_lu_sizes` | N = 24 on 4 x 4; bandwidths 3/5, 5/2 and 2/2 |

Simulating one testbench with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/lu_pkg.sv tb/tb_lu_ref_pkg.sv tb/tb_lu_top.sv --top-module tb_lu_top
./obj_dir/Vtb_lu_top
```

To simulate another testbench, replace `tb_lu_top`. For example, use `tb_lu_sizes`,
which also needs `tb/lu_run_harness.sv`; the `-y tb` option finds that file.

## Files

- `rtl/lu_pkg.sv`: types (`tok_t`), the fixed-point format, `fx_mul` and `fx_div`.
- `rtl/lu_pe.sv`, `rtl/lu_div_pe.sv`: the two kinds of processor.
- `rtl/lu_array.sv`: the mesh.
- `rtl/lu_ctrl.sv`, `rtl/lu_feeder.sv`, `rtl/lu_collector.sv`: time base and buffers.
- `rtl/lu_top.sv`: the top level.
- `tb/`: the testbenches listed above, the reference package, and
  `lu_run_harness.sv`, which runs a parameterised instance.
