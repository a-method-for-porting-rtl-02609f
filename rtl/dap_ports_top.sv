// dap_ports_top: the three ported array algorithms side by side.
//
// The algorithms are independent: a sea-level map (sea_map), a matrix
// multiplication (matmul) and a contour map (contour, which contains the
// neighbour comparison contour_edge). They share only the clock and the
// active-low asynchronous reset; each keeps its own start/done handshake and
// its own matrix ports, prefixed sm_, mm_ and ct_. All matrices are N x N
// with N = 64 by default, the fixed matrix size of the original array
// language. Timing per algorithm: sea_map 1 cycle, matmul N+1 cycles,
// contour L+4 cycles for L levels (see each module).
module dap_ports_top
  import dap_pkg::*;
#(
  parameter int unsigned N = N_DAP
) (
  input  logic    clk,
  input  logic    rst_n,
  // sea-level map
  input  logic    sm_start,
  input  int2_t   sm_height     [N][N],
  input  int2_t   sm_sea_level,
  output charac_t sm_map        [N][N],
  output logic    sm_done,
  // matrix multiplication
  input  logic    mm_start,
  input  int2_t   mm_a          [N][N],
  input  int2_t   mm_b          [N][N],
  output int2_t   mm_c          [N][N],
  output logic    mm_busy,
  output logic    mm_done,
  // contour map
  input  logic    ct_start,
  input  int2_t   ct_height     [N][N],
  input  int2_t   ct_level      [MAX_LEVELS],
  input  int2_t   ct_num_levels,
  output int2_t   ct_region     [N][N],
  output logic    ct_edge       [N][N],
  output charac_t ct_contour    [N][N],
  output logic    ct_busy,
  output logic    ct_done,
  output logic    ct_error
);

  sea_map #(.N(N)) u_sea_map (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (sm_start),
    .height    (sm_height),
    .sea_level (sm_sea_level),
    .map       (sm_map),
    .done      (sm_done)
  );

  matmul #(.N(N)) u_matmul (
    .clk   (clk),
    .rst_n (rst_n),
    .start (mm_start),
    .a     (mm_a),
    .b     (mm_b),
    .c     (mm_c),
    .busy  (mm_busy),
    .done  (mm_done)
  );

  contour #(.N(N)) u_contour (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (ct_start),
    .height     (ct_height),
    .level      (ct_level),
    .num_levels (ct_num_levels),
    .region     (ct_region),
    .edge_o     (ct_edge),
    .contour_o  (ct_contour),
    .busy       (ct_busy),
    .done       (ct_done),
    .error      (ct_error)
  );

endmodule
