// matmul: C = A * B for two NxN signed 32-bit integer matrices.
//
// The array-language original clears C and then, for K = 1..N, adds the
// element-wise product of two broadcast matrices: column K of A repeated
// across every column and row K of B repeated down every row. This port skips
// building the broadcast matrices: a column multiplexer picks a[i][k] for
// each row i and a row multiplexer picks b[k][j] for each column j, and each
// of the N*N accumulators adds the product of its row's and its column's
// value. All N*N multiply-accumulates happen in the same cycle; the loop over
// k is sequential, one k per cycle.
//
// Timing: the cycle that samples `start` clears C (step 0). The next N cycles
// each accumulate one k, k = 0 .. N-1, and `done` is high in the cycle after
// the last one, so a result is ready N+1 cycles after start. `busy` is high
// from the clear to the last accumulation; a start while busy is ignored.
// `a` and `b` must stay stable while busy. Products and sums wrap at 32 bits
// (a 32-bit result of 32-bit operands, as in the source's integer type); the
// handshake, reset and overflow behaviour are this design's own choices.
module matmul
  import dap_pkg::*;
#(
  parameter int unsigned N = N_DAP
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  int2_t a [N][N],
  input  int2_t b [N][N],
  output int2_t c [N][N],
  output logic  busy,
  output logic  done
);

  localparam int unsigned KW = (N > 1) ? $clog2(N) : 1;

  logic [KW-1:0] k;
  int2_t         col_k [N];  // a[i][k]: the column A(,K)
  int2_t         row_k [N];  // b[k][j]: the row B(K,)

  always_comb begin
    for (int unsigned i = 0; i < N; i++) col_k[i] = a[i][k];
    for (int unsigned j = 0; j < N; j++) row_k[j] = b[k][j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      k    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          k    <= '0;
        end
      end else begin
        if (k == KW'(N - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        k <= k + 1'b1;
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)              c[i][j] <= '0;
        else if (!busy && start) c[i][j] <= '0;
        else if (busy)           c[i][j] <= c[i][j] + col_k[i] * row_k[j];
      end
    end
  end

endmodule
