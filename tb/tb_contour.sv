// tb_contour: self-checking test of contour.
//
// A 4x4 instance runs the worked example: three levels 10, 20, 30 and
// heights chosen so that the shaded regions are those of the example, with
// one cell above every level falling into the default region 4. Region
// numbers, edge flags and the final contour letters (A, B, B, B, C, C on the
// upper edges, blank elsewhere) are checked. An 8x8 instance then runs
// random heights and level counts against a reference model written here,
// and two starts with an invalid number of levels (0 and 26) must raise
// error. Every run checks that done comes L+4 cycles after start (1 on an
// invalid count).
module tb_contour;
  import dap_pkg::*;

  localparam int unsigned NA = 4;
  localparam int unsigned NB = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic    start_a, start_b, busy_a, busy_b, done_a, done_b, err_a, err_b;
  int2_t   h_a [NA][NA], reg_a [NA][NA];
  int2_t   h_b [NB][NB], reg_b [NB][NB];
  logic    e_a [NA][NA], e_b [NB][NB];
  charac_t c_a [NA][NA], c_b [NB][NB];
  int2_t   lev_a [MAX_LEVELS], lev_b [MAX_LEVELS];
  int2_t   nl_a, nl_b;

  contour #(.N(NA)) dut_a (.clk(clk), .rst_n(rst_n), .start(start_a), .height(h_a),
                           .level(lev_a), .num_levels(nl_a), .region(reg_a), .edge_o(e_a),
                           .contour_o(c_a), .busy(busy_a), .done(done_a), .error(err_a));
  contour #(.N(NB)) dut_b (.clk(clk), .rst_n(rst_n), .start(start_b), .height(h_b),
                           .level(lev_b), .num_levels(nl_b), .region(reg_b), .edge_o(e_b),
                           .contour_o(c_b), .busy(busy_b), .done(done_b), .error(err_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ex_r [NA][NA] = '{'{1, 2, 2, 3}, '{2, 2, 3, 3}, '{2, 3, 3, 3}, '{3, 3, 3, 4}};
  // expected letters of the example, "." for blank
  string ex_c [NA] = '{"A.B.", ".B..", "B..C", "..C."};

  // reference model for the 8x8 instance
  int2_t   m_reg  [NB][NB];
  logic    m_edge [NB][NB];
  charac_t m_con  [NB][NB];

  function automatic int2_t rnb(input int i, input int j);
    if (i < 0 || i >= int'(NB) || j < 0 || j >= int'(NB)) return 0;
    return m_reg[i][j];
  endfunction

  task automatic model(input int nl);
    foreach (m_reg[i, j]) begin
      int r;
      r = nl + 1;
      for (int k = nl; k >= 1; k--) if (h_b[i][j] < lev_b[k-1]) r = k;
      m_reg[i][j] = r;
      m_con[i][j] = code_of(r);
    end
    foreach (m_reg[i, j]) begin
      m_edge[i][j] = m_reg[i][j] < rnb(i-1, j) || m_reg[i][j] < rnb(i+1, j) ||
                     m_reg[i][j] < rnb(i, j-1) || m_reg[i][j] < rnb(i, j+1);
      if (!m_edge[i][j]) m_con[i][j] = BLANK;
    end
  endtask

  task automatic run_b(output int cyc);
    @(negedge clk) start_b = 1;
    @(negedge clk) start_b = 0;
    cyc = 1;
    while (!done_b) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    int cyc;
    start_a = 0; start_b = 0;
    foreach (lev_a[m]) begin lev_a[m] = 0; lev_b[m] = 0; end
    lev_a[0] = 10; lev_a[1] = 20; lev_a[2] = 30;
    nl_a = 3;
    foreach (h_a[i, j]) h_a[i][j] = int2_t'(ex_r[i][j] * 10 - 5);
    foreach (h_b[i, j]) h_b[i][j] = 0;
    nl_b = 1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // worked example
    @(negedge clk) start_a = 1;
    @(negedge clk) start_a = 0;
    cyc = 1;
    while (!done_a) begin @(negedge clk); cyc++; end
    check(cyc == 3 + 4, $sformatf("example latency %0d expected 7", cyc));
    check(!err_a, "example raises no error");
    foreach (reg_a[i, j])
      check(reg_a[i][j] == ex_r[i][j], $sformatf("example region[%0d][%0d]=%0d", i, j, reg_a[i][j]));
    foreach (c_a[i, j]) begin
      charac_t exp_c;
      exp_c = (ex_c[i][j] == ".") ? BLANK : charac_t'(ex_c[i][j]);
      check(c_a[i][j] == exp_c, $sformatf("example contour[%0d][%0d]=%c", i, j, c_a[i][j]));
      check(e_a[i][j] == (ex_c[i][j] != "."), $sformatf("example edge[%0d][%0d]", i, j));
    end

    // random runs
    for (int t = 0; t < 30; t++) begin
      int lv;
      nl_b = int2_t'($urandom_range(1, MAX_LEVELS));
      lv = -50;
      foreach (lev_b[m]) begin
        lv += int'($urandom_range(0, 12));
        lev_b[m] = int2_t'(lv);
      end
      foreach (h_b[i, j]) h_b[i][j] = int2_t'($signed($urandom_range(0, 400)) - 100);
      model(nl_b);
      run_b(cyc);
      check(cyc == nl_b + 4, $sformatf("t=%0d latency %0d expected %0d", t, cyc, nl_b + 4));
      check(!err_b, "valid level count raises no error");
      foreach (c_b[i, j]) begin
        check(reg_b[i][j] == m_reg[i][j], $sformatf("t=%0d region[%0d][%0d]", t, i, j));
        check(e_b[i][j] == m_edge[i][j], $sformatf("t=%0d edge[%0d][%0d]", t, i, j));
        check(c_b[i][j] == m_con[i][j], $sformatf("t=%0d contour[%0d][%0d]", t, i, j));
      end
    end

    // invalid numbers of levels
    nl_b = 0;
    run_b(cyc);
    check(err_b && cyc == 1, "0 levels rejected");
    nl_b = 26;
    run_b(cyc);
    check(err_b && cyc == 1, "26 levels rejected");
    nl_b = 25;
    model(25);
    run_b(cyc);
    check(!err_b && cyc == 29, "25 levels accepted, error cleared");
    foreach (c_b[i, j]) check(c_b[i][j] == m_con[i][j], "25 levels contour");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
