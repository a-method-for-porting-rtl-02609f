// tb_dap_ports_top: end-to-end test of dap_ports_top at a reduced size
// (8x8 matrices, so that it builds in seconds; set N to 64 to run the
// same test at the default size, which passes but builds for many minutes).
//
// Each of the three algorithms is run on random data and compared with a
// reference computed here: a sea-level map, a 64x64 matrix product (with
// a start pulse during the run, which must be ignored) and a contour map
// with 5 levels, followed by a contour start with an invalid level count.
// The testbench counts how often each mechanism of the design occurred:
// cells below and above sea level, multiply-accumulate steps, a start
// ignored while busy, cells shaded at a level, cells falling into the
// default region, edge cells, blanked cells and the level-count error. A
// mechanism that never occurs counts as a failure. Latencies (1, N+1 and
// L+4 cycles) are checked too.
module tb_dap_ports_top;
  import dap_pkg::*;

  localparam int unsigned N = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic    sm_start, sm_done;
  int2_t   sm_height [N][N];
  int2_t   sm_sea_level;
  charac_t sm_map [N][N];
  logic    mm_start, mm_busy, mm_done;
  int2_t   mm_a [N][N], mm_b [N][N], mm_c [N][N];
  logic    ct_start, ct_busy, ct_done, ct_error;
  int2_t   ct_height [N][N], ct_region [N][N];
  int2_t   ct_level [MAX_LEVELS];
  int2_t   ct_num_levels;
  logic    ct_edge [N][N];
  charac_t ct_contour [N][N];

  dap_ports_top #(.N(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference contour
  int2_t   m_reg  [N][N];
  logic    m_edge [N][N];
  charac_t m_con  [N][N];

  function automatic int2_t rnb(input int i, input int j);
    if (i < 0 || i >= int'(N) || j < 0 || j >= int'(N)) return 0;
    return m_reg[i][j];
  endfunction

  // mechanism counters
  int n_below, n_above, n_mac_steps, n_ignored_start, n_shaded, n_default;
  int n_edge, n_blanked, n_error;

  initial begin
    int cyc, nl;
    int2_t ref_c [N][N];
    n_below = 0; n_above = 0; n_mac_steps = 0; n_ignored_start = 0; n_shaded = 0;
    n_default = 0; n_edge = 0; n_blanked = 0; n_error = 0;
    sm_start = 0; mm_start = 0; ct_start = 0;
    sm_sea_level = 0; ct_num_levels = 0;
    foreach (ct_level[m]) ct_level[m] = 0;
    foreach (sm_height[i, j]) begin
      sm_height[i][j] = 0; mm_a[i][j] = 0; mm_b[i][j] = 0; ct_height[i][j] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // ---- sea-level map
    foreach (sm_height[i, j]) sm_height[i][j] = int2_t'($signed($urandom_range(0, 1000)) - 500);
    sm_sea_level = 17;
    @(negedge clk) sm_start = 1;
    @(negedge clk) sm_start = 0;
    check(sm_done, "sea map done after 1 cycle");
    foreach (sm_map[i, j]) begin
      bit below;
      below = sm_height[i][j] < sm_sea_level;
      if (below) n_below++; else n_above++;
      check(sm_map[i][j] == (below ? 8'd1 : 8'd0), $sformatf("map[%0d][%0d]", i, j));
    end

    // ---- matrix multiplication
    foreach (mm_a[i, j]) begin
      mm_a[i][j] = int2_t'($signed($urandom_range(0, 200)) - 100);
      mm_b[i][j] = int2_t'($urandom);
    end
    foreach (ref_c[i, j]) begin
      ref_c[i][j] = 0;
      for (int k = 0; k < int'(N); k++) ref_c[i][j] += mm_a[i][k] * mm_b[k][j];
    end
    @(negedge clk) mm_start = 1;
    @(negedge clk) mm_start = 0;
    cyc = 1;
    while (!mm_done) begin
      if (mm_busy) n_mac_steps++;
      if (cyc == 3) begin
        mm_start = 1;                // must be ignored
        n_ignored_start++;
      end else mm_start = 0;
      @(negedge clk);
      cyc++;
    end
    mm_start = 0;
    check(cyc == int'(N) + 1, $sformatf("matmul latency %0d expected %0d", cyc, N + 1));
    check(n_mac_steps == int'(N), $sformatf("matmul busy for %0d accumulate steps", n_mac_steps));
    foreach (mm_c[i, j]) check(mm_c[i][j] == ref_c[i][j], $sformatf("c[%0d][%0d]", i, j));
    @(negedge clk);
    check(!mm_busy && !mm_done, "matmul idle after done, busy start ignored");

    // ---- contour map: 5 levels, smooth random terrain so regions form areas
    nl = 5;
    ct_num_levels = nl;
    for (int m = 0; m < int'(MAX_LEVELS); m++) ct_level[m] = int2_t'((2 * N / 6) * (m + 1));
    foreach (ct_height[i, j])
      ct_height[i][j] = int2_t'(i + j + int'($urandom_range(0, 20)) - 5);
    foreach (m_reg[i, j]) begin
      int r;
      r = nl + 1;
      for (int k = nl; k >= 1; k--) if (ct_height[i][j] < ct_level[k-1]) r = k;
      m_reg[i][j] = r;
      m_con[i][j] = code_of(r);
      if (r == nl + 1) n_default++; else n_shaded++;
    end
    foreach (m_reg[i, j]) begin
      m_edge[i][j] = m_reg[i][j] < rnb(i-1, j) || m_reg[i][j] < rnb(i+1, j) ||
                     m_reg[i][j] < rnb(i, j-1) || m_reg[i][j] < rnb(i, j+1);
      if (!m_edge[i][j]) m_con[i][j] = BLANK;
    end
    @(negedge clk) ct_start = 1;
    @(negedge clk) ct_start = 0;
    cyc = 1;
    while (!ct_done) begin @(negedge clk); cyc++; end
    check(cyc == nl + 4, $sformatf("contour latency %0d expected %0d", cyc, nl + 4));
    check(!ct_error, "contour no error");
    foreach (ct_contour[i, j]) begin
      if (ct_edge[i][j]) n_edge++; else n_blanked++;
      check(ct_region[i][j] == m_reg[i][j], $sformatf("region[%0d][%0d]", i, j));
      check(ct_edge[i][j] == m_edge[i][j], $sformatf("edge[%0d][%0d]", i, j));
      check(ct_contour[i][j] == m_con[i][j], $sformatf("contour[%0d][%0d]", i, j));
    end

    // ---- invalid level count
    ct_num_levels = 30;
    @(negedge clk) ct_start = 1;
    @(negedge clk) ct_start = 0;
    check(ct_done && ct_error, "30 levels rejected");
    if (ct_error) n_error++;

    $display("mechanisms: below=%0d above=%0d mac_steps=%0d ignored_start=%0d shaded=%0d default=%0d edge=%0d blanked=%0d error=%0d",
             n_below, n_above, n_mac_steps, n_ignored_start, n_shaded, n_default,
             n_edge, n_blanked, n_error);
    check(n_below > 0, "mechanism: cell below sea level");
    check(n_above > 0, "mechanism: cell above sea level");
    check(n_mac_steps > 0, "mechanism: multiply-accumulate step");
    check(n_ignored_start > 0, "mechanism: start ignored while busy");
    check(n_shaded > 0, "mechanism: cell shaded at a level");
    check(n_default > 0, "mechanism: default region");
    check(n_edge > 0, "mechanism: edge cell");
    check(n_blanked > 0, "mechanism: blanked cell");
    check(n_error > 0, "mechanism: level-count error");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
