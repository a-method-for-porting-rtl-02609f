// contour_edge: the neighbour comparison of the contour algorithm.
//
// For every cell of an NxN region-number matrix the module compares the
// cell's value with its four nearest neighbours (north, south, east and west)
// and raises edge[i][j] when the cell is lower than at least one of them.
// This is how the upper edge of each region is found: the lower region's
// cells next to a higher region are kept, everything else is blanked later.
//
// At the border of the array the value shifted in depends on the geometry
// of the original processor array. In PLANE geometry, the default and the one
// the algorithm relies on, zero is shifted in; region numbers are at least 1,
// so a border cell is then compared only with the neighbours it has. In
// CYCLIC geometry the array wraps round; north-south and east-west are chosen
// independently by CYCLIC_NS and CYCLIC_EW. Every cell takes its neighbours'
// values over direct wires, as neighbouring processing elements do, so the
// module is purely combinational with no latency; the caller registers the
// result.
module contour_edge
  import dap_pkg::*;
#(
  parameter int unsigned N         = N_DAP,
  parameter bit          CYCLIC_NS = 1'b0,  // 0: PLANE (zero in), 1: wrap
  parameter bit          CYCLIC_EW = 1'b0
) (
  input  int2_t region [N][N],
  output logic  edge_o [N][N]
);

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      int2_t nb_n, nb_s, nb_w, nb_e;

      // Row 0 is taken as the north border, column 0 as the west border.
      if (i > 0)          begin : g_n  assign nb_n = region[i-1][j]; end
      else if (CYCLIC_NS) begin : g_nw assign nb_n = region[N-1][j]; end
      else                begin : g_nz assign nb_n = '0;             end

      if (i < N - 1)      begin : g_s  assign nb_s = region[i+1][j]; end
      else if (CYCLIC_NS) begin : g_sw assign nb_s = region[0][j];   end
      else                begin : g_sz assign nb_s = '0;             end

      if (j > 0)          begin : g_w  assign nb_w = region[i][j-1]; end
      else if (CYCLIC_EW) begin : g_ww assign nb_w = region[i][N-1]; end
      else                begin : g_wz assign nb_w = '0;             end

      if (j < N - 1)      begin : g_e  assign nb_e = region[i][j+1]; end
      else if (CYCLIC_EW) begin : g_ew assign nb_e = region[i][0];   end
      else                begin : g_ez assign nb_e = '0;             end

      assign edge_o[i][j] = (region[i][j] < nb_n) || (region[i][j] < nb_s) ||
                            (region[i][j] < nb_w) || (region[i][j] < nb_e);
    end
  end

endmodule
