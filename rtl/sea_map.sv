// sea_map: marks every element of an NxN height matrix that lies below a
// scalar sea level.
//
// The array-language original is two whole-matrix statements: clear the map,
// then write 'X' where HEIGHT < SEA_LEVEL (the comparison forming an
// activity mask). Here the mask and the two writes are folded into one
// per-element choice, as in the final form of the port: each of the N*N
// elements has its own signed comparator and writes 1 ("below sea level",
// the 'X') or 0 (blank) into its map register. All elements work in the same
// clock cycle and none depends on another.
//
// Interface: pulse `start` for one cycle with `height` and `sea_level` valid;
// on that clock edge every `map` element is written, and `done` is high for
// the following cycle (latency 1). `map` holds its value until the next
// start. The 1/0 encoding of the map follows the source; the synchronous
// start/done handshake and the active-low asynchronous reset (clearing the
// map to 0) are this design's own choices.
module sea_map
  import dap_pkg::*;
#(
  parameter int unsigned N = N_DAP
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  int2_t   height [N][N],
  input  int2_t   sea_level,
  output charac_t map    [N][N],
  output logic    done
);

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)     map[i][j] <= '0;
        else if (start) map[i][j] <= (height[i][j] < sea_level) ? 8'd1 : 8'd0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done <= 1'b0;
    else        done <= start;
  end

endmodule
