// Self-checking testbench for cic_decimator (N=5, R=16, 6 bits in, 11 out).
//
// The expected output is worked out independently of the integrator/comb
// structure: as a convolution of the input with the impulse response of
// ((1 - z^-R)/(1 - z^-1))^N, i.e. the N-fold self-convolution of a length-R
// boxcar, taken at every R-th input and shifted right by 26 - 11 = 15 bits.
// The pipelined integrators delay the response by N input samples relative
// to the decimation instant. Inputs are random, then held at the extremes
// (-32 and 31) to exercise full-scale gain. Also checks that exactly one
// output appears per R inputs, one cycle after the R-th.
module tb_cic_decimator;
  localparam int N = 5, R = 16, IN_W = 6, OUT_W = 11;
  localparam int GW = IN_W + N * $clog2(R);
  localparam int HL = N * (R - 1) + 1;
  localparam int NS = 16 * 400;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IN_W-1:0]  in_data = '0;
  logic                    out_valid;
  logic signed [OUT_W-1:0] out_data;

  cic_decimator dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint h [HL];
  int     x [NS];
  int     n_out = 0, last_out_cycle = -1, cycle = 0;

  function automatic longint expected(int m);
    longint s = 0;
    int n = R * m + R - 1 - N;   // newest input in output m
    for (int j = 0; j < HL; j++)
      if (n - j >= 0) s += h[j] * x[n - j];
    return s >>> (GW - OUT_W);
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && out_valid) begin
      checks++;
      if (longint'(out_data) != expected(n_out)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: out %0d = %0d, expected %0d", n_out, out_data, expected(n_out));
      end
      if (last_out_cycle >= 0) begin
        checks++;
        if (cycle - last_out_cycle != R) begin
          failures++;
          $display("FAIL: output spacing %0d", cycle - last_out_cycle);
        end
      end
      last_out_cycle <= cycle;
      n_out <= n_out + 1;
    end
  end

  initial begin
    longint t [HL];
    // Boxcar of length R convolved with itself N times.
    for (int j = 0; j < HL; j++) h[j] = (j < R) ? 1 : 0;
    for (int s = 1; s < N; s++) begin
      for (int j = 0; j < HL; j++) begin
        t[j] = 0;
        for (int i = 0; i < R; i++) if (j - i >= 0) t[j] += h[j - i];
      end
      h = t;
    end
    for (int i = 0; i < NS; i++)
      if (i < NS / 2)      x[i] = $signed(IN_W'($urandom));
      else if (i < 3 * NS / 4) x[i] = -32;
      else                 x[i] = 31;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NS; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = IN_W'(x[i]);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (n_out != NS / R) begin
      failures++;
      $display("FAIL: %0d outputs, expected %0d", n_out, NS / R);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
