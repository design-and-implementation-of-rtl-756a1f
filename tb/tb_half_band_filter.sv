// Self-checking testbench for half_band_filter.
//
// Feeds random 11-bit samples every 16 cycles (the CIC output rate at a
// 1.28 MHz clock), then full-scale steps, switching between the OBC and
// binary DA engines at random. Every output is compared with a direct-form
// FIR, (-1 0 9 16 9 0 -1)/32 written out here, evaluated on every second
// sample and cut to 12 bits. Also checks the output count (one per two
// inputs), the latency of 11 cycles and the DC gain on a constant input.
module tb_half_band_filter;
  import dec_pkg::*;
  localparam int IW = 11, OW = 12, DEC = 2, SP = 16, NS = 800;
  localparam int H [7] = '{-1, 0, 9, 16, 9, 0, -1};

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  da_arch_e             arch = ARCH_OBC;
  logic signed [IW-1:0] in_data = '0;
  logic                 out_valid;
  logic signed [OW-1:0] out_data;

  half_band_filter dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_out = 0, n_exp = 0, n_obc = 0, n_bda = 0;
  int x [NS];
  int lat;
  da_arch_e arch_at [NS];

  function automatic int expected(int i);
    int s = 0;
    for (int k = 0; k < 7; k++) if (i - k >= 0) s += H[k] * x[i - k];
    return int'($signed(OW'(s >>> 5)));
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int i = DEC * n_out + DEC - 1;
    checks++;
    if (int'(out_data) != expected(i)) begin
      failures++;
      if (failures < 10) $display("FAIL: output %0d = %0d, expected %0d", n_out, out_data, expected(i));
    end
    checks++;
    if (lat != IW) begin
      failures++;
      $display("FAIL: latency %0d, expected %0d", lat, IW);
    end
    if (arch_at[i] == ARCH_OBC) n_obc++; else n_bda++;
    n_out <= n_out + 1;
  end

  always @(posedge clk) lat <= lat + 1;

  initial begin
    for (int i = 0; i < NS; i++)
      if (i < NS / 2)         x[i] = $signed(IW'($urandom));
      else if (i < 5 * NS / 8) x[i] = -1024;
      else if (i < 6 * NS / 8) x[i] = 1023;
      else                     x[i] = $signed(IW'($urandom));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NS; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = IW'(x[i]);
      arch     = da_arch_e'($urandom % 2);
      arch_at[i] = arch;
      lat      = -1;
      @(negedge clk);
      in_valid = 1'b0;
      if (i == 5 * NS / 8 - 1) begin
        // Settled on -1024 for many samples: DC gain 1.
        repeat (SP) @(negedge clk);
        checks++;
        if (out_data != -12'sd1024) begin
          failures++;
          $display("FAIL: DC output %0d, expected -1024", out_data);
        end
      end
      repeat (SP - 2) @(negedge clk);
    end
    repeat (SP) @(negedge clk);
    checks++;
    if (n_out != NS / DEC) begin
      failures++;
      $display("FAIL: %0d outputs, expected %0d", n_out, NS / DEC);
    end
    checks++;
    if (n_obc == 0 || n_bda == 0) begin
      failures++;
      $display("FAIL: engines used %0d/%0d times", n_obc, n_bda);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * (SP + 2) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
