// contour: rough contour map of an NxN height matrix.
//
// Given up to 25 ascending levels, every cell is shaded with the number k and
// the letter code_of(k) of the first level it lies below; cells above every
// level get number L+1 and letter code_of(L+1), L being the number of levels.
// Only the upper edge of each region is then kept: a cell whose region number
// is lower than any of its four neighbours (see contour_edge) keeps its
// letter, every other cell is set to blank.
//
// The shading follows the per-element form of the port: instead of building
// a SELECTED mask and applying it in three separate whole-matrix writes, each
// cell checks "still free and height < level(k)" and, if so, writes its
// region number and letter and clears its free bit, all in one cycle. The
// sequence of steps, one clock cycle each, is:
//   start      : check L; all free bits set        (L outside 1..25: error)
//   SHADE  k   : one cycle per level, k = 1 .. L
//   DEFAULT    : still-free cells get L+1 and code_of(L+1)
//   EDGE       : edge matrix registered from contour_edge
//   BLANK      : cells that are not on an edge get BLANK; done follows
// so `done` rises L+4 cycles after start on a valid L, and 1 cycle after
// start (with `error` set) on an invalid one. `busy` covers the steps; a
// start while busy is ignored. `height` and `level` must stay stable while
// busy. Levels are compared as signed integers (height < level). The
// handshake, the error output in place of a run-time error stop, and the
// reset values are this design's own choices.
module contour
  import dap_pkg::*;
#(
  parameter int unsigned N         = N_DAP,
  parameter bit          CYCLIC_NS = 1'b0,
  parameter bit          CYCLIC_EW = 1'b0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  int2_t   height     [N][N],
  input  int2_t   level      [MAX_LEVELS],  // level(1) at index 0
  input  int2_t   num_levels,
  output int2_t   region     [N][N],
  output logic    edge_o     [N][N],
  output charac_t contour_o  [N][N],
  output logic    busy,
  output logic    done,
  output logic    error
);

  typedef enum logic [2:0] {S_IDLE, S_SHADE, S_DEFAULT, S_EDGE, S_BLANK} state_t;

  state_t  state;
  int2_t   k;            // current level, 1-based as in the source
  int2_t   level_k;
  charac_t code_k;
  logic    free_q [N][N];
  logic    edge_d [N][N];

  assign busy = (state != S_IDLE);

  // level(k) and its letter; in S_DEFAULT the letter is code_of(L+1).
  always_comb begin
    level_k = '0;
    for (int unsigned m = 0; m < MAX_LEVELS; m++)
      if (k == int2_t'(m + 1)) level_k = level[m];
    code_k = code_of(int'(k));
  end

  contour_edge #(.N(N), .CYCLIC_NS(CYCLIC_NS), .CYCLIC_EW(CYCLIC_EW)) u_edge (
    .region (region),
    .edge_o (edge_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      k     <= '0;
      done  <= 1'b0;
      error <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          if (num_levels < 1 || num_levels > int2_t'(MAX_LEVELS)) begin
            error <= 1'b1;
            done  <= 1'b1;
          end else begin
            error <= 1'b0;
            k     <= 1;
            state <= S_SHADE;
          end
        end
        S_SHADE: begin
          k <= k + 1;
          if (k == num_levels) state <= S_DEFAULT;
        end
        S_DEFAULT: state <= S_EDGE;
        S_EDGE:    state <= S_BLANK;
        S_BLANK: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default:   state <= S_IDLE;
      endcase
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          free_q[i][j]    <= 1'b0;
          region[i][j]    <= '0;
          contour_o[i][j] <= BLANK;
          edge_o[i][j]    <= 1'b0;
        end else begin
          unique case (state)
            S_IDLE:
              if (start) free_q[i][j] <= 1'b1;
            S_SHADE:
              if (free_q[i][j] && height[i][j] < level_k) begin
                region[i][j]    <= k;
                contour_o[i][j] <= code_k;
                free_q[i][j]    <= 1'b0;
              end
            S_DEFAULT:
              if (free_q[i][j]) begin
                region[i][j]    <= k;  // k = L+1 after the last level
                contour_o[i][j] <= code_k;
                free_q[i][j]    <= 1'b0;
              end
            S_EDGE:
              edge_o[i][j] <= edge_d[i][j];
            S_BLANK:
              if (!edge_o[i][j]) contour_o[i][j] <= BLANK;
            default: ;
          endcase
        end
      end
    end
  end

endmodule
