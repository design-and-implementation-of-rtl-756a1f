// Self-checking testbench for bda_engine.
//
// Drives a 4-tap, 8-bit engine with unequal weights (so that a wrong table
// address order or sign shows) through random sample streams, extreme
// words (-128 and 127 everywhere) and loads without a computation, and
// compares every result with a direct-form sum of products worked out here.
// Also checks that y_valid comes exactly B cycles after the starting sample
// and that the tap registers hold the same window after a computation, and
// that the 16-word table holds the published rows in the published order.
module tb_bda_engine;
  localparam int K = 4, B = 8, COEF_W = 8;
  localparam int C [K] = '{37, -90, 127, -128};
  localparam int YW = COEF_W + B + $clog2(K);

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, in_start = 1'b0;
  logic signed [B-1:0]  in_data = '0;
  logic                 busy, y_valid;
  logic signed [YW-1:0] y;

  bda_engine #(.K(K), .B(B), .COEF_W(COEF_W), .COEF(C)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int hist [K];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic push(input int v, input bit start);
    int expect_y, n;
    @(negedge clk);
    in_valid = 1'b1; in_data = B'(v); in_start = start;
    for (int k = K - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = v;
    @(negedge clk);
    in_valid = 1'b0; in_start = 1'b0;
    if (start) begin
      expect_y = 0;
      for (int k = 0; k < K; k++) expect_y += C[k] * hist[k];
      n = 0;
      check(busy, "busy after start");
      while (!y_valid && n < 4 * B) begin
        @(negedge clk);
        n++;
      end
      check(n == B, $sformatf("latency %0d, expected %0d", n, B));
      check(int'(y) == expect_y, $sformatf("y=%0d expected %0d (x=%0d %0d %0d %0d)",
            y, expect_y, hist[0], hist[1], hist[2], hist[3]));
      @(negedge clk);
      check(!y_valid && !busy, "y_valid is a single pulse");
    end
  endtask

  // Table rows in the published order: address b3 b2 b1 b0, b0 from x[n].
  initial begin
    int d0, d1, d2, d3;
    int rows [16];
    d0 = C[0]; d1 = C[1]; d2 = C[2]; d3 = C[3];
    rows = '{0, d0, d1, d0 + d1, d2, d0 + d2, d1 + d2, d0 + d1 + d2,
             d3, d0 + d3, d1 + d3, d0 + d1 + d3, d2 + d3, d0 + d2 + d3,
             d1 + d2 + d3, d0 + d1 + d2 + d3};
    #1;
    for (int a = 0; a < 16; a++)
      check(int'(dut.rom[a]) == rows[a], $sformatf("table word %0d = %0d, expected %0d",
            a, dut.rom[a], rows[a]));
  end

  initial begin
    for (int k = 0; k < K; k++) hist[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Extreme words.
    for (int k = 0; k < K; k++) push(-128, k == K - 1);
    push(-128, 1'b1);
    for (int k = 0; k < K; k++) push(127, k == K - 1);
    push(127, 1'b1);
    // Single impulse through every tap.
    push(1, 1'b1);
    for (int k = 1; k < K; k++) push(0, 1'b1);
    // Random streams, computations on about half the samples. A window
    // computed twice in a row checks that the tap registers are restored.
    for (int i = 0; i < 400; i++) begin
      push($signed(B'($urandom)), ($urandom % 2) == 1);
      if (i % 50 == 0) push(hist[0], 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
