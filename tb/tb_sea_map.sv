// tb_sea_map: self-checking test of sea_map.
//
// A 4x4 instance runs the worked example of the algorithm (sea level 4, the
// five cells below it marked 1), then an 8x8 instance runs random signed
// heights against a reference computed here. Every run also checks that
// done comes exactly one cycle after start and that the map does not change
// without a start.
module tb_sea_map;
  import dap_pkg::*;

  localparam int unsigned NA = 4;
  localparam int unsigned NB = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic    start_a, start_b, done_a, done_b;
  int2_t   h_a [NA][NA];
  int2_t   h_b [NB][NB];
  int2_t   sl_a, sl_b;
  charac_t m_a [NA][NA];
  charac_t m_b [NB][NB];

  sea_map #(.N(NA)) dut_a (.clk(clk), .rst_n(rst_n), .start(start_a),
                           .height(h_a), .sea_level(sl_a), .map(m_a), .done(done_a));
  sea_map #(.N(NB)) dut_b (.clk(clk), .rst_n(rst_n), .start(start_b),
                           .height(h_b), .sea_level(sl_b), .map(m_b), .done(done_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // worked example: heights and expected map
  int   ex_h [NA][NA] = '{'{6, 6, 4, 2}, '{5, 4, 3, 4}, '{5, 3, 1, 5}, '{1, 4, 4, 5}};
  int   ex_m [NA][NA] = '{'{0, 0, 0, 1}, '{0, 0, 1, 0}, '{0, 1, 1, 0}, '{1, 0, 0, 0}};

  initial begin
    start_a = 0; start_b = 0; sl_a = 0; sl_b = 0;
    foreach (h_a[i, j]) h_a[i][j] = 0;
    foreach (h_b[i, j]) h_b[i][j] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // worked example
    foreach (h_a[i, j]) h_a[i][j] = ex_h[i][j];
    sl_a = 4;
    @(negedge clk) start_a = 1;
    @(negedge clk) start_a = 0;
    check(done_a == 1'b1, "done one cycle after start (example)");
    foreach (m_a[i, j])
      check(m_a[i][j] == charac_t'(ex_m[i][j]),
            $sformatf("example map[%0d][%0d]=%0d", i, j, m_a[i][j]));
    @(negedge clk);
    check(done_a == 1'b0, "done is a single pulse");
    // no start: map must hold even though the inputs change
    sl_a = 100;
    repeat (2) @(negedge clk);
    foreach (m_a[i, j])
      check(m_a[i][j] == charac_t'(ex_m[i][j]), "map holds without start");

    // random signed heights
    for (int t = 0; t < 20; t++) begin
      foreach (h_b[i, j]) h_b[i][j] = int2_t'($signed($urandom_range(0, 400)) - 200);
      sl_b = int2_t'($signed($urandom_range(0, 400)) - 200);
      @(negedge clk) start_b = 1;
      @(negedge clk) start_b = 0;
      check(done_b == 1'b1, "done one cycle after start (random)");
      foreach (m_b[i, j])
        check(m_b[i][j] == ((h_b[i][j] < sl_b) ? 8'd1 : 8'd0),
              $sformatf("random t=%0d map[%0d][%0d]", t, i, j));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
