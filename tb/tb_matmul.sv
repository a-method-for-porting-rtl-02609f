// tb_matmul: self-checking test of matmul.
//
// A 4x4 instance multiplies the worked example; after the first
// accumulation step C must equal column 0 of A times row 0 of B (the
// intermediate matrix of the example), and at the end the full product.
// An 8x8 instance then multiplies random signed matrices, with a product
// computed here in 32-bit wrapping arithmetic. Each run checks that done
// comes exactly N+1 cycles after start, and one run checks that a start
// while busy is ignored.
module tb_matmul;
  import dap_pkg::*;

  localparam int unsigned NA = 4;
  localparam int unsigned NB = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic  start_a, start_b, busy_a, busy_b, done_a, done_b;
  int2_t a_a [NA][NA], b_a [NA][NA], c_a [NA][NA];
  int2_t a_b [NB][NB], b_b [NB][NB], c_b [NB][NB];

  matmul #(.N(NA)) dut_a (.clk(clk), .rst_n(rst_n), .start(start_a), .a(a_a), .b(b_a),
                          .c(c_a), .busy(busy_a), .done(done_a));
  matmul #(.N(NB)) dut_b (.clk(clk), .rst_n(rst_n), .start(start_b), .a(a_b), .b(b_b),
                          .c(c_b), .busy(busy_b), .done(done_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ex   [NA][NA] = '{'{1, 5, 9, 5}, '{3, 6, 6, 7}, '{7, 5, 2, 4}, '{3, 5, 9, 8}};
  int step1[NA][NA] = '{'{1, 5, 9, 5}, '{3, 15, 27, 15}, '{7, 35, 63, 35}, '{3, 15, 27, 15}};

  initial begin
    int2_t ref_a [NA][NA];
    int2_t ref_b [NB][NB];
    int    cyc;
    start_a = 0; start_b = 0;
    foreach (a_b[i, j]) begin a_b[i][j] = 0; b_b[i][j] = 0; end
    foreach (ex[i, j]) begin a_a[i][j] = ex[i][j]; b_a[i][j] = ex[i][j]; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // worked example, A = B
    @(negedge clk) start_a = 1;
    @(negedge clk) start_a = 0;      // clear done
    foreach (c_a[i, j]) check(c_a[i][j] == 0, "C cleared in the start cycle");
    @(negedge clk);                  // k = 0 accumulated
    foreach (c_a[i, j])
      check(c_a[i][j] == step1[i][j],
            $sformatf("after k=0 c[%0d][%0d]=%0d expected %0d", i, j, c_a[i][j], step1[i][j]));
    start_a = 1;                     // ignored while busy
    @(negedge clk) start_a = 0;
    cyc = 3;
    while (!done_a) begin @(negedge clk); cyc++; end
    check(cyc == NA + 1, $sformatf("4x4 latency %0d expected %0d", cyc, NA + 1));
    foreach (ref_a[i, j]) begin
      ref_a[i][j] = 0;
      for (int k = 0; k < NA; k++) ref_a[i][j] += int2_t'(ex[i][k] * ex[k][j]);
    end
    foreach (c_a[i, j])
      check(c_a[i][j] == ref_a[i][j],
            $sformatf("example c[%0d][%0d]=%0d expected %0d", i, j, c_a[i][j], ref_a[i][j]));
    @(negedge clk);
    check(!busy_a && !done_a, "idle after done");

    // random signed matrices, including large values that wrap
    for (int t = 0; t < 6; t++) begin
      foreach (a_b[i, j]) begin
        a_b[i][j] = (t < 3) ? int2_t'($signed($urandom_range(0, 2000)) - 1000) : int2_t'($urandom);
        b_b[i][j] = (t < 3) ? int2_t'($signed($urandom_range(0, 2000)) - 1000) : int2_t'($urandom);
      end
      foreach (ref_b[i, j]) begin
        ref_b[i][j] = 0;
        for (int k = 0; k < NB; k++) ref_b[i][j] += a_b[i][k] * b_b[k][j];
      end
      @(negedge clk) start_b = 1;
      @(negedge clk) start_b = 0;
      cyc = 1;
      while (!done_b) begin @(negedge clk); cyc++; end
      check(cyc == NB + 1, $sformatf("8x8 latency %0d expected %0d", cyc, NB + 1));
      foreach (c_b[i, j])
        check(c_b[i][j] == ref_b[i][j], $sformatf("random t=%0d c[%0d][%0d]", t, i, j));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
