# Area-time optimal networks for matrix multiplication and triangular inversion

This is synthesizable SystemVerilog for a family of matrix networks built
around one idea: the product `AT²` (chip area times computation time squared)
of any circuit that multiplies two n×n matrices is at least proportional to
n⁴. These networks reach that bound, so none can be asymptotically better.
They do it in two ways:

* **Multiplication.** A fully parallel *recursive multiplier* is very fast
  (time O(log n)) but far too large (area O(n⁴)). The *pipelined multiplier*
  is an r×r mesh of smaller recursive multipliers, fed with blocks of the
  operands. By choosing r you can trade area for time anywhere in
  log n ≤ T ≤ n, and `AT²` stays O(n⁴).
* **Inversion of a triangular matrix.** Multiplication reduces to it:
  the inverse of `[I A 0; 0 I B; 0 0 I]` holds `AB` in its upper right
  block. So the same bound applies, and the same trade applies:
  * a *systolic inverter* (one cell per entry) is optimal at T = O(n);
  * a *recursive inverter* is fast, O(log² n), but too big;
  * *mixed inverters* run the systolic algorithm on s×s blocks, with
    recursive or pipelined machinery inside the cells. They cover the
    range in between. The Type-2 mixed inverter is optimal for all
    O(log² n) ≤ T ≤ O(n).

A second way to multiply, the *serially fed multiplier*, uses one recursive
multiplier over r×r blocks whose entries travel one per cycle. It is optimal
over a narrower range, O(log n) ≤ T ≤ O(n^0.58).

The top module, `tri_matrix_top`, instantiates four networks side by side:

* a Type-2 mixed inverter, which contains every inverter and mesh block of
  the design;
* a first-order systolic inverter;
* a pipelined multiplier;
* a serially fed multiplier.

## Number system

Each matrix entry is an element of a finite ring, so one small cell can
multiply or add two entries in constant time. This design uses the integers
modulo 2^W with `W = 16` (`ring_pkg::W`), and all arithmetic wraps around.

The units of this ring are the odd numbers. The inverters therefore need
**every diagonal entry to be odd**, and they ignore entries below the
diagonal. An element's inverse comes from Newton steps `x ← x(2 − ax)`,
starting at `x = a`, unrolled into combinational logic (`elem_inv`).

Matrices appear at ports as unpacked arrays `elem_t m [rows][cols]`.

## Block hierarchy

```
tri_matrix_top
├── mixed_inv  (TYPE=2, N=16, S=4)        Type-2 mixed inverter
│   ├── mixed_inv (TYPE=1, N=4, S=2)  ×4  D-modules: Type-1 mixed inverters
│   │   ├── rec_inv (N=2)                  D-modules: recursive inverters
│   │   │   └── rec_inv (N=1) → elem_inv, rec_mult (S=1), mat_delay
│   │   └── blk_m_module → rec_mult (S=2)  M-modules with recursive multipliers
│   └── blk_m_module ×6                    M-modules with pipelined multipliers
│       └── pipe_mult (N=4, R=2)
│           └── ip_module ×4 → rec_mult (S=2)
├── sys_inv (N=16)                         first-order systolic inverter
│   ├── elem_inv ×16                       D-modules
│   └── m_cell ×120                        M-modules
├── pipe_mult (N=16, R=4)                  pipelined multiplier
│   └── ip_module ×16 → rec_mult (S=4)
└── ser_mult (N=16, R=2)                   serially fed multiplier
    └── rec_mult (S=8, BLK=2) → ser_blk_mult ×512
```

`mat_delay` is a delay line for a matrix. It is used wherever one operand
has to wait for another that comes along a longer path.

## Recursive multiplier (`rec_mult`)

Split U = `[a b; c d]` and V = `[e g; f h]` into quadrants. Then

    U·V = [ae+bf  ag+bh; ce+df  cg+dh]

This takes eight half-size multipliers and four matrix adders. The
recursion ends at one ring multiplier.

Each recursion level has two registered stages:

* a *buffer-driver* stage in front, which copies every quadrant, because
  each quadrant feeds two sub-products;
* an *adder* stage behind.

So an S×S multiplier has log S copy levels, one multiplier level and log S
adder levels. Its latency is `2·log2 S + 1` cycles (`rec_mult_lat`). All the
data of one product sits on a single level at a time, so a new product can
enter every cycle.

The module instantiates itself. S must be a power of two.

## Pipelined multiplier (`pipe_mult`, `ip_module`)

Cut A and B into R×R blocks of size S = N/R. Then

    C = Σ_j (block column j of A) × (block row j of B)

The mesh is R×R inner-product modules. Each holds an S×S `rec_mult` and an
accumulator `c ← c + a·b`:

* block A_ij enters row i from the west and moves east;
* block B_jk enters column k from the north and moves south;
* one module per cycle in both directions.

Row i and column k enter i and k cycles late. Module (i,k) therefore meets
A_ij and B_jk at the same moment, and the active front of each outer product
is an anti-diagonal of the mesh.

A three-bit token (`valid`, `first`, `last`) travels with the A blocks:

* `first` makes the accumulator load the product instead of adding it;
* `last` raises `c_valid` one cycle after the final term is added.

Products can follow one another with no gap.

Interface:

* `start` with full matrices `a` and `b` is accepted while `in_ready` is high;
* the R block columns then go out on R consecutive cycles, so a new product
  can be accepted every R cycles;
* module (i,k) finishes i+k cycles after module (0,0);
* each finished block is delayed by 2R−2−i−k cycles, so all of C appears in
  the single cycle when `out_valid` is high.

Latency from the accepting cycle to `out_valid` is
`pipe_mult_lat(N,R) = 3R + rec_mult_lat(N/R)`. That is 17 cycles at N=16,
R=4, with one result every 4 cycles.

## Serially fed multiplier (`ser_mult`, `ser_blk_mult`)

Here the N×N operands are treated as Q×Q matrices (Q = N/R) whose elements
are R×R blocks. One Q×Q recursive multiplier does all the work:

* Each of its input lines carries one block, entry by entry, row-major,
  over R² cycles.
* The copy and adder levels of `rec_mult` are used unchanged
  (`rec_mult #(.S(Q), .BLK(R))`). They copy and add the streams one entry
  at a time.
* Each leaf is a `ser_blk_mult`. It stores the two blocks as they arrive.
  It then multiplies them in R cycles on an R×R array of multiply-accumulate
  cells, so area is O(R²) and time O(R). Finally it sends the product out
  serially.

Arrival and release take R² cycles and dominate the R-cycle product, so a
leaf collects the next pair of blocks while the previous product is being
formed and sent.

The source suggests a Kung–Leiserson hexagonal mesh as one possible leaf.
The multiply-accumulate array used here has the same O(R²) area and O(R)
time.

`ser_mult` has the same interface as `pipe_mult`:

* it accepts a new product every R² cycles;
* it collects the serial result blocks and presents C in one cycle;
* latency is `ser_mult_lat(N,R) = 2·log2 Q + 2R² + R + 1`, which is 17
  cycles at N=16, R=2.

The defaults meet the scheme's conditions R² ≥ log2 N and
R ≤ N^((2−log2 3)/(3−log2 3)) ≈ N^0.29.

## Recursive inverter (`rec_inv`)

For the upper triangular matrix `[A11 A12; 0 A22]` the inverse is

    [A11⁻¹   −(A11⁻¹·A12)·A22⁻¹;  0   A22⁻¹]

The network works in this order:

1. Two half-size inverters form A11⁻¹ and A22⁻¹ in parallel.
2. One `rec_mult` forms X = A11⁻¹·A12.
3. A second `rec_mult` forms X·A22⁻¹.
4. The output register negates that last product.

Delay lines hold A12 and the two half inverses until they are needed. The
network is fully pipelined, so a new matrix can enter every cycle.

Latency is `rec_inv_lat(N) = rec_inv_lat(N/2) + 2·rec_mult_lat(N/2) + 1`,
with `rec_inv_lat(1) = 1`.

## Systolic inverter (`sys_inv`, `m_cell`)

Write a⁻¹ᵢⱼ for entry (i,j) of the inverse. It follows from

    a⁻¹ᵢⱼ = −(Σ_{p=i}^{j−1} a⁻¹ᵢₚ · aₚⱼ) · a⁻¹ⱼⱼ

The mesh is triangular: cell (i,j) exists for j ≥ i, and entry (i,j) of the
inverse is computed in place.

* Finished entries of the inverse flow **east** along their row, through the
  H buffers.
* Entries of A flow **north** up their column, through the V buffers. The
  diagonal inverse a⁻¹ⱼⱼ follows them.

Diagonal cells (D-modules) replace aᵢᵢ by 1/aᵢᵢ at step i.

Each off-diagonal cell (M-module) has a register R, a buffer H feeding its
east output, a buffer V feeding its north output, and inputs W (west) and
S (south). It starts holding aᵢⱼ, and at step t it does:

| step                | R            | H        | V      |
|---------------------|--------------|----------|--------|
| t = j (first)       | W·R          | W        | aᵢⱼ    |
| j < t < 2j−i        | R + W·S      | W        | S      |
| t = 2j−i (final)    | −R·S         | −R·S     | S      |
| any other t         | –            | W        | S      |

At step t the cell sees a⁻¹ᵢₚ on W and aₚⱼ on S, where p = t + i − j. At
step 2j−i, a⁻¹ⱼⱼ arrives from the diagonal and completes the entry.

Every entry is finished by step 2N−1. One step is one clock cycle, so
`done` rises 2N cycles after `start`: one loading cycle plus 2N−1 steps. A
global step counter tells each cell which step it is in.

## Mixed inverters (`mixed_inv`, `blk_m_module`)

A mixed inverter runs the systolic algorithm on an M×M grid of S×S blocks,
where M = N/S. Entries become blocks and products become matrix products.
The D-modules invert their diagonal blocks; the M-modules (`blk_m_module`)
carry out the same four instructions on blocks.

| `TYPE` | D-module (S×S inverse)                  | M-module multiplier          |
|--------|-----------------------------------------|------------------------------|
| 1      | `rec_inv #(S)`                          | `rec_mult #(S)`              |
| 2      | `mixed_inv #(TYPE=1)` with DS×DS blocks | `pipe_mult #(S, MR)`         |

For Type 2 the defaults are DS = S/log2 S and MR = log2 S. With these sizes,
both kinds of module are O(S²/log S) on a side.

An inversion runs in two phases:

1. All diagonal blocks are inverted at once.
2. The mesh runs 2M−1 steps. In each step's *strobe* cycle, every active
   M-module hands its operands to its multiplier. In the *commit* cycle, when
   the products come out, every cell updates R, H and V together. Nothing in
   the mesh changes between strobe and commit, so the sampled neighbour
   values are still valid.

`done` rises `mixed_inv_lat(...)` cycles after `start`. At the defaults
(N=16, S=4, Type 2) that is 88 cycles. For comparison, the systolic inverter
of the same size needs 32.

Both inverters use the same handshake:

* `start` with `a` is accepted while `busy` is low;
* a start offered while busy is ignored;
* `done` is a one-cycle pulse;
* `ainv` holds the result until the next start.

## Where this RTL goes beyond the source scheme

The algorithms, the block structures and the instruction sets above follow
the published scheme. These points are choices made for this RTL:

* **Fixed choices.**
  * The ring is Z/2^W with W = 16. Inversion uses Newton steps.
  * Default sizes: N = 16 everywhere, S = 4 for the mixed inverter,
    R = 4 for the pipelined multiplier and R = 2 for the serially fed
    multiplier. The scheme fixes no sizes.
* **Timing.**
  * Every level of the recursive networks is one register stage.
  * The inverter buffers are multi-stage delay lines, so the recursive
    inverter is pipelined.
* **Control.**
  * The first/last token in the multiplier mesh.
  * The operand capture and issue sequencers of `pipe_mult` and
    `ser_mult`.
  * The global step counters and the strobe/commit control of the meshes.
  * An off-diagonal cell's first step uses its own loaded entry as the S
    operand and then sends it north. The scheme does not say how column j's
    upward flow starts.
* **Output.** Both multipliers present all of C in one cycle instead of
  shifting it out. The pipelined one still takes a product every R cycles,
  the serially fed one every R² cycles.
* **Leaf of the serial multiplier.** It is a multiply-accumulate array in
  place of the hexagonal mesh the source names. Block entries are sent in
  row-major order.
* **Layout.** Area, wire widths and floorplans are outside what RTL can
  express.

## Using and changing it

All sizes are parameters with the defaults above; `ring_pkg::W` sets the
element width.

* `rec_mult`, `rec_inv`: sizes must be powers of two.
* `pipe_mult`: R must divide N.
* `ser_mult`: R must divide N, with R ≥ 2.
* `mixed_inv`: S must divide N, with N/S ≥ 2.

Run the whole-design test with plain Verilator from the repository root:

    verilator --binary --timing -Wno-fatal -y rtl rtl/ring_pkg.sv \
        tb/tb_tri_matrix_top.sv --top-module tb_tri_matrix_top -o sim
    ./obj_dir/sim

Each module has its own self-checking testbench, `tb/tb_<module>.sv`, and
all of them print `TB_RESULT checks=… failures=…`. They check:

* results against reference models written in the testbench: back
  substitution for inverses, triple loops for products, plus A·A⁻¹ = I;
* exact cycle counts against the latency functions in `ring_pkg`.

`tb_tri_matrix_top` runs at the default sizes and takes about two minutes
to build. It inverts a random matrix with both inverters while both
multipliers work through three back-to-back products. It then multiplies two
5×5 matrices by inverting the 16×16 matrix `[I A 0 0; 0 I B 0; 0 0 I 0;
0 0 0 1]`. It also counts how often each mechanism occurs and fails if one
never does: stalls of both multipliers, mesh steps, inner-product
accumulations, ignored starts, and the three M-module instructions.

Known lint output:

* Linting `rec_mult`, `rec_inv` or `mixed_inv` alone reports signals of
  their recursive branch as unused or undriven. This is how the lint handles
  a module that instantiates itself; the simulations show they are
  connected.
* `mat_delay` with zero depth does not use its clock.
* The entries below the diagonal of both inverters' outputs are constant
  zero.
