# A processor-time-minimal systolic array for n × n matrix product

The textbook matrix product `c(i,j) = Σk a(i,k)·b(k,j)` is, as a dependence
graph, an n × n × n directed mesh: node (i,j,k) is one inner-product step, and
it depends on its neighbours at i-1, j-1 and k-1. Two facts about this mesh
fix what a fastest machine for it must look like:

* its longest path has **3n − 2** nodes, so no machine finishes in fewer steps;
* every node lies on a longest path, so in a 3n − 2 step schedule each node
  has exactly one possible step, `i + j + k − 2`. In the middle step,
  ⌈(3n − 2)/2⌉, **⌈3n²/4⌉** nodes run at once, so no machine that reaches
  3n − 2 steps has fewer processors.

This RTL is a systolic array that meets both bounds. It has exactly ⌈3n²/4⌉
processors, connected only to their neighbours, and it computes C = A·B in
3n − 2 clock steps. A conventional n × n array also takes 3n − 2 steps but
needs n² processors. For n = 6 this design uses 27 processors, not 36. For
n = 20 it uses 300 processors in 58 steps, not 400.

The array is a hexagon of processors wrapped onto a cylinder. The product
matrix C stays in the processors. Rows of A and columns of B enter along one
line on the cylinder's surface.

## The processor-time map

All n nodes of a k-column (i,j,·) run on the same processor, one per step, so
the partial sum c(i,j) never moves. Column (i,j) runs in steps i+j−1 …
i+j+n−2. The map of node (i,j,k) to a step and a processor location is:

```
step  τ(i,j,k) = i + j + k − 2
p1    π1(i,j)  = (i + j − ⌈n/2⌉ − 1) mod n
p2    π2(i,j)  = i − j           if n is even, or ⌈n/2⌉+1 ≤ i+j ≤ ⌈3n/2⌉
               = i − j + 1       if n is odd and i+j < ⌈n/2⌉+1
               = i − j − 1       if n is odd and i+j > ⌈3n/2⌉
```

The mod in π1 is where the cylinder comes from. It places column (i,j) on the
same processor as column (i+n/2, j+n/2) (for odd n: (i+⌈n/2⌉, j+⌊n/2⌋)). The
first column is one that ends before the middle step, and it finishes in the
step just before the second one starts. In total ⌊n²/4⌋ processors carry two
columns, and no processor is ever asked to do two things in the same step.

For n = 6, the table shows the grid of (p1, p2) locations. Each entry lists
the columns `ij` that a processor carries, with the first-run column first. A
`.` marks a location with no processor. There are 27 processors, 9 of which
carry two columns.

```
p1\p2      -5      -4      -3      -2      -1       0       1       2       3       4       5
    0       .       .       .   13/46       .   22/55       .   31/64       .       .       .
    1       .       .      14       .   23/56       .   32/65       .      41       .       .
    2       .      15       .      24       .   33/66       .      42       .      51       .
    3      16       .      25       .      34       .      43       .      52       .      61
    4       .      26       .      35       .   11/44       .      53       .      62       .
    5       .       .      36       .   12/45       .   21/54       .      63       .       .
```

## How operands move

Node (i,j,k) needs a(i,k), which comes from node (i,j−1,k), and b(k,j), which
comes from node (i−1,j,k). Both of those nodes ran one step earlier. So each
processor has:

* one a link, from the processor of column (i,j−1);
* one b link, from the processor of column (i−1,j).

Each link is a register, one step long. For even n, processor (p1,p2) gets a
from (p1−1 mod n, p2+1) and b from (p1−1 mod n, p2−1). Links with p1 = n−1 →
0 wrap around the cylinder. For odd n the wrap-around links are skewed:

* an i link that crosses an interval boundary of π2 stays in the same p2;
* a j link that crosses one drops by two in p2.

A processor with two columns keeps the same two neighbours for both of them.
There is one exception: a processor whose first column has j = 1 (or i = 1)
takes that operand from the external input, and for its second column takes
it from the neighbour link. That is why edge processors have a two-way
operand multiplexer.

`ptm_array` does not list the links by hand. It evaluates the map in
constant functions (`ptm_pkg`) during elaboration. For each grid location it
finds:

* how many columns the location carries;
* where its a and b come from;
* whether it takes external input;
* which of its columns may forward operands.

Any n ≥ 2 therefore builds from the same source, including the skewed odd
case.

### Control inside a processor (`ptm_pe`)

A processor has no schedule of its own: it acts when operands arrive.

* **fire.** The processor fires when a valid a and a valid b are present.
  It then computes `acc ← (first ? 0 : acc) + a·b`, with signed operands and
  an ACC_W-bit sum.
* **Tags.** The a operand carries two tags, `first` (k = 1) and `last`
  (k = n). `first` restarts the sum. `last` stores it in the result slot of
  the column now running, then moves on to slot 1. Tags travel with a
  unchanged, because the a that reaches (i,j+1,k) is for the same k.
* **Forward masks.** Both operands are re-registered for the neighbours, but
  a column on the j = n face does not forward a, and one on the i = n face
  does not forward b. These are the static masks `FWD_A` and `FWD_B`, one
  bit per slot. Without them, operands leaving the mesh would travel across
  the wrap-around into processors that are idle in that step. That would do
  no harm to the schedule, but those processors would fire on stray data.
* **Held results.** `c_res[0]` and `c_res[1]` keep the results in place
  until the next `clear`.

Assertions check that a and b always arrive together. They also check that an
edge processor never sees an external and a neighbour operand in the same
step.

## Interface and timing of `ptm_matmul`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, synchronous active-low reset |
| `start` | in | pulse; ignored while `busy` |
| `a_mat[N][N]`, `b_mat[N][N]` | in | signed DATA_W-bit operands, `[row][col]`; hold stable while `busy` |
| `busy`, `step` | out | steps 1 … 3N−2 are running; current step |
| `done` | out | set after step 3N−2 until the next start |
| `c_mat[N][N]`, `c_valid[N][N]` | out | c(i,j), ACC_W bits, read where it is held; valid from the step after node (i,j,N) |
| `pe_fire[N*(2N−1)]` | out | which processors execute a node in this step (grid index p1·(2N−1)+p2+N−1) |

Timing, for `start` high in cycle 0:

* Step t runs in cycle t.
* `done` is high from cycle 3N−1.
* In step t, `ptm_feeder` drives a(i, t−i+1) into the processor of column
  (i,1) and b(t−j+1, j) into the processor of column (1,j), whenever
  1 ≤ k ≤ N. So a(i,j) and b(j,i) enter in step i+j−1.
* When `start` is accepted, `clear` pulses for one cycle to empty the
  result slots.

A new `start` is accepted from the cycle in which `done` rises.

Parameters (top):

| name | default | meaning |
|---|---|---|
| `N` | 6 | matrix size; the array has ⌈3N²/4⌉ processors |
| `DATA_W` | 16 | operand width, signed |
| `ACC_W` | 40 | accumulator / result width; exact for N·2^(2·DATA_W−2) < 2^(ACC_W−1) |
| `STEP_W` | ⌈log2(3N+1)⌉ | width of `step` |

## Files

| file | content |
|---|---|
| `rtl/ptm_pkg.sv` | operand tag type; the map τ, π1, π2 and the constant functions that derive placement and wiring |
| `rtl/ptm_pe.sv` | inner-product step processor |
| `rtl/ptm_array.sv` | the ⌈3N²/4⌉ processors on the (p1,p2) grid, their links, the C readout |
| `rtl/ptm_feeder.sv` | step counter, start/clear/done, skewed input of A and B |
| `rtl/ptm_matmul.sv` | top: feeder + array |
| `tb/tb_map_pkg.sv` | separate model of the schedule, used by the testbenches |
| `tb/tb_ptm_pe.sv` | processor: two columns, external then neighbour input, masks, idle gaps, results held |
| `tb/tb_ptm_array.sv`, `tb/ptm_array_run.sv` | array at N = 2, 5, 6, 7, driven directly: activity of every processor in every step, c_valid timing, results, ⌈3N²/4⌉ processors all busy in the middle step |
| `tb/tb_ptm_feeder.sv` | step count, clear/busy/done, the input rule, start while busy |
| `tb/tb_ptm_matmul.sv`, `tb/ptm_mm_checker.sv` | end to end at N = 6, 5, 7; counts external inputs, neighbour links, wrap-around links, skewed links (odd N), second-column take-overs and full concurrency, and fails if any of them never happens |
| `tb/tb_ptm_matmul_full.sv` | the top at its default parameters, six products |
| `tb/tb_ptm_matmul_sizes.sv` | N = 13, 14 and 20 (127, 147 and 300 processors) |

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ptm_pkg.sv tb/tb_map_pkg.sv tb/tb_ptm_matmul.sv --top-module tb_ptm_matmul -o sim
./obj_dir/sim
```

Replace the last file and `--top-module` to run another testbench. For a
testbench that uses only `ptm_pkg`, leave out `tb/tb_map_pkg.sv`. For
`--lint-only -Wall`, list the rtl files in the order package, pe, array,
feeder, top.

Elaboration runs the placement functions, which scan all n² columns for each
of the n(2n−1) grid points. This is quick up to n ≈ 14. At n = 20,
Verilator spends about half a minute elaborating before it compiles.

To use a different size, set `N` on `ptm_matmul`. To use other widths, set
`DATA_W` and `ACC_W`. To make B or A the stationary matrix instead of C, the
roles of the three operands in the map can be permuted; that variant is not
written here.

## What is the source design and what is added

These parts are taken from the array's definition:

* the map (step and both location formulas, including the odd-n cases);
* the processor count and step count;
* one k-column or two per processor, back to back;
* links only between the processors of neighbouring columns;
* the cylindrical and skewed wrap-around;
* the input rule, with A and B entering along one line of the cylinder;
* C held in place.

These are this design's own choices, because the definition says nothing
about them:

* the word widths (16-bit signed operands, 40-bit sums, no saturation);
* the `first`/`last` tags carried by a, and the two result slots per
  processor;
* the per-slot masks that keep operands from leaving the mesh;
* the multiplexer on edge processors;
* the start/clear/busy/done handshake, synchronous reset, and operand
  matrices on parallel input ports held by the host;
* parallel read-out of the held C through `c_mat`, and the `pe_fire`
  activity port;
* the n × (2n−1) grid numbering.

Not built:

* **The flattened layouts.** The cylinder can be folded flat into a
  trapezoid (about 3n²/4 processors in a plane), or into an n/2 × 3n/2
  rectangle when n/2 is odd. These change where processors sit and how long
  wires are, not which processors are connected, so they need no different
  RTL.
* **The forward-substitution array.** This is the small introductory example
  for a triangular system: 2n − 1 steps on ⌈n/2⌉ processors. Its node-to-
  processor assignment and node operation are not specified in enough detail
  to write it.
* **Other algorithms on the same mesh.** LU factorization, transitive
  closure and longest common subsequence share the dependence graph. They
  would use the same array with a different node operation, and only matrix
  product is implemented.

## How far it is checked

* For every tested n (2, 5, 6, 7, 13, 14, 20) the testbenches compare, in
  every step, the set of firing processors with a separately written model
  of the map.
* They check that exactly ⌈3n²/4⌉ processors are ever used and that all of
  them fire in the middle step.
* They check that `done` comes exactly 3n − 2 steps after `start`.
* They compare every c(i,j) with a reference product, including runs with
  the most negative 16-bit operands.
* Each block's testbench also fails on a deliberately broken copy of the
  block.

The design has not been synthesized for a target technology, and no timing
has been closed. The critical path is one DATA_W × DATA_W multiply plus an
ACC_W-bit add per processor.
