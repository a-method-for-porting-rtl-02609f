// tb_contour_edge: self-checking test of contour_edge.
//
// A 4x4 plane-geometry instance is given the region matrix of the worked
// contour example and must flag exactly the six cells that lie below a
// neighbour. A 6x6 plane instance and a 6x6 fully cyclic instance are then
// given random region numbers and compared with a reference that computes
// each neighbour by index arithmetic here.
module tb_contour_edge;
  import dap_pkg::*;

  localparam int unsigned NA = 4;
  localparam int unsigned NB = 6;

  int checks = 0;
  int failures = 0;

  int2_t r_a [NA][NA];
  logic  e_a [NA][NA];
  int2_t r_b [NB][NB];
  logic  e_p [NB][NB];
  logic  e_c [NB][NB];

  contour_edge #(.N(NA)) dut_a (.region(r_a), .edge_o(e_a));
  contour_edge #(.N(NB)) dut_p (.region(r_b), .edge_o(e_p));
  contour_edge #(.N(NB), .CYCLIC_NS(1'b1), .CYCLIC_EW(1'b1)) dut_c (.region(r_b), .edge_o(e_c));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int2_t nb(input int i, input int j, input bit cyc);
    if (i < 0 || i >= int'(NB) || j < 0 || j >= int'(NB)) begin
      if (!cyc) return 0;
      return r_b[(i + NB) % NB][(j + NB) % NB];
    end
    return r_b[i][j];
  endfunction

  int ex_r [NA][NA] = '{'{1, 2, 2, 3}, '{2, 2, 3, 3}, '{2, 3, 3, 3}, '{3, 3, 3, 4}};
  int ex_e [NA][NA] = '{'{1, 0, 1, 0}, '{0, 1, 0, 0}, '{1, 0, 0, 1}, '{0, 0, 1, 0}};

  initial begin
    foreach (r_a[i, j]) r_a[i][j] = ex_r[i][j];
    foreach (r_b[i, j]) r_b[i][j] = 0;
    #1;
    foreach (e_a[i, j])
      check(e_a[i][j] == ex_e[i][j][0], $sformatf("example edge[%0d][%0d]", i, j));

    for (int t = 0; t < 50; t++) begin
      foreach (r_b[i, j]) r_b[i][j] = int2_t'($urandom_range(1, 5));
      #1;
      foreach (r_b[i, j]) begin
        bit ep, ec;
        ep = r_b[i][j] < nb(i-1, j, 0) || r_b[i][j] < nb(i+1, j, 0) ||
             r_b[i][j] < nb(i, j-1, 0) || r_b[i][j] < nb(i, j+1, 0);
        ec = r_b[i][j] < nb(i-1, j, 1) || r_b[i][j] < nb(i+1, j, 1) ||
             r_b[i][j] < nb(i, j-1, 1) || r_b[i][j] < nb(i, j+1, 1);
        check(e_p[i][j] == ep, $sformatf("plane t=%0d [%0d][%0d]", t, i, j));
        check(e_c[i][j] == ec, $sformatf("cyclic t=%0d [%0d][%0d]", t, i, j));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
