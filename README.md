# Three array algorithms as fully parallel hardware

A 64x64 bit-serial array processor of the late 1970s was programmed in an
array language in which one statement acts on a whole 64x64 matrix at once:
`C = C + MATC(A(,K)) * MATR(B(K,))` multiplies and accumulates 4096 elements,
and `A(B.LT.8) = 1` writes only where a mask is true. This RTL takes three
classic programs of that kind and builds each as a synchronous circuit in
which every matrix element has its own hardware, so a whole-matrix statement
takes one clock cycle:

| module     | algorithm                                   | cycles from start to done |
|------------|---------------------------------------------|---------------------------|
| `sea_map`  | mark every height below a sea level         | 1                         |
| `matmul`   | C = A * B                                   | N + 1                     |
| `contour`  | shade height regions, keep their upper edges| L + 4 for L levels        |

`dap_ports_top` places the three side by side; they share only the clock and
reset. All matrices are N x N with N = 64 by default, the fixed matrix size of
the original language. Integers are signed 32-bit, characters 8-bit, logical
values 1 bit (`rtl/dap_pkg.sv`).

## From whole-matrix steps to per-element processes

The original programs are sequences of parallel steps: build a mask matrix,
then write one matrix under it, then another. In hardware it is cheaper to
turn that inside out into one small sequential process per element, all
running in parallel, wherever an element's result does not depend on its
neighbours. The three modules use that form:

* **sea_map**: "clear MAP, then write 'X' where HEIGHT < SEA_LEVEL" becomes
  one comparator per element that writes 1 or 0 directly. No mask matrix is
  stored. The map uses 1 for a cell below sea level and 0 for the blank.
* **matmul**: the broadcast matrices `MATC(A(,K))` (column k repeated) and
  `MATR(B(K,))` (row k repeated) are never built. A column multiplexer gives
  row i the value `a[i][k]`, a row multiplexer gives column j `b[k][j]`, and
  the N*N accumulators add their product. The cycle that samples `start`
  clears C; each of the next N cycles handles one k.
* **contour** stage 1: for each level k = 1..L (one cycle each), every cell
  that is still free and lies below `level(k)` takes region number k and the
  k-th letter of `ABCDEFGHIJKLMNPOQRSTUVWXYZ`, and stops being free. One
  further cycle gives the cells above every level region L+1 and letter L+1.
  The letter string is kept exactly as the original program spells it, P
  before O. At most 25 levels are accepted, so one letter is always left for
  the default region. A start with L outside 1..25 raises `error` and
  finishes at once.

## The neighbour step (contour stages 2 and 3)

This is the one step in which an element needs other elements. A cell is on
the upper edge of its region when its region number is lower than that of
**any** of its four neighbours (north, south, east, west).

On the original machine each processing element read a neighbour through an
input multiplexer. At the border of the array, the value shifted in
depended on the *geometry*:

* **PLANE**: zero is shifted in. Region numbers start at 1, so a border cell
  is compared only with the neighbours it really has.
* **CYCLIC**: the array wraps round.

North-south and east-west were set independently. `contour_edge` wires each
cell straight to its neighbours' registers, which is what such a machine
does in hardware. It is combinational, and its parameters `CYCLIC_NS` and
`CYCLIC_EW` select the geometry. The contour algorithm relies on PLANE in
both directions, the default.

`contour` registers the edge matrix in one cycle. In the next cycle it
blanks (ASCII space) every cell that is not on an edge. Its outputs are the
region numbers, the edge flags and the final letters.

Worked 4x4 example (levels 10, 20, 30, one cell above all of them):

    region      edge        contour
    1 2 2 3     T F T F     A . B .
    2 2 3 3     F T F F     . B . .
    2 3 3 3     T F F T     B . . C
    3 3 3 4     F F T F     . . C .

## Interfaces and timing

Every module has the same handshake:

* `start` is a one-cycle pulse. A start while `busy` is ignored.
* `done` is a one-cycle pulse, raised in the cycle in which the results are
  final.
* `rst_n` is an active-low asynchronous reset that clears every register.
* Inputs (`height`, `a`, `b`, `level`, ...) must stay stable while busy.
* Results stay in their registers until the next start.

Products and sums in `matmul` wrap at 32 bits. The contour `level` port has
25 entries, and `level[0]` is level 1. Levels should be in ascending order,
as the algorithm assumes.

## Where this design departs from, or adds to, the algorithms

* The handshake, the reset, and the one-cycle-per-step timing are this
  design's own choices. The source programs define no interface.
* The run-time error stop on an invalid level count becomes the `error`
  output.
* Two variants of the neighbour comparison exist: comparisons combined with
  OR, and one with AND. OR is used here, because it is the one that produces
  the worked example above.
* The blank is an ASCII space. One variant of the contour program writes 0
  instead.
* The alternative ways of doing the neighbour step are not built. These are
  four zero-padded copies of the region matrix, or blocking channels between
  per-cell processes. Direct wiring gives the same result.
* The original processor array itself is not modelled: its bit-serial
  processing elements, control unit, row and column highways, and per-element
  4K-bit stores. Only the algorithms are built.

## Size

At N = 64:

* `matmul` has 4096 32-bit multiply-accumulators and 4096 x 32 result bits.
* `contour` has 4096 x (32 + 8 + 1 + 1) register bits and 4096 x 4
  comparators.
* `sea_map` has 4096 comparators and 4096 x 8 map bits.

This is large for an FPGA. The design is meant to show the fully parallel
structure; reduce `N` for a real device. Every module is parameterised by
`N`.

## Simulation

Testbenches in `tb/` are self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops, and each has a cycle
watchdog.

* `tb_sea_map`, `tb_matmul`, `tb_contour_edge`, `tb_contour`: small
  instances (4x4 to 8x8). They run the worked examples and random data
  against reference models written in the testbench, and check latencies.
* `tb_dap_ports_top`: the whole top at N = 8. It runs all three algorithms
  end to end and counts how often each mechanism occurred: cells below and
  above sea level, accumulate steps, an ignored start, shaded, default, edge
  and blanked cells, and the level-count error.
* The largest size simulated is the default, N = 64: `tb_dap_ports_top`
  with its `localparam N` set to 64 passes (about 20,000 checks). Building
  that model takes 8 minutes with four compile jobs, and over 10 minutes with
  two. Running it takes well under a second.

Example with plain Verilator:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_contour \
        -y rtl -y tb +libext+.sv -Irtl rtl/dap_pkg.sv tb/tb_contour.sv
    ./obj_dir/Vtb_contour

The testbenches use only two-state values and `$urandom`.
