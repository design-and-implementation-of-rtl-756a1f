// Self-checking testbench for da_fir.
//
// Instance 1 uses the default configuration: 8 taps, 8-bit samples, every
// weight 11, no decimation. A constant input of 0xAA (-86) must settle at
// 8 * 11 * -86 = -7568, whose low byte is 0x70, with either engine. Then a
// random stream is checked against a direct-form FIR.
// Instance 2 uses 5 taps, 10-bit samples, unequal signed weights,
// decimation by 3 and an output shift of 2, with random engine switching.
module tb_da_fir;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int C2 [5] = '{-64, 13, 63, -7, 29};

  logic   done1, done2;
  int     checks1, failures1, nobc1, nbda1, checks2, failures2, nobc2, nbda2;
  longint y1, y2;
  int     checks, failures;

  da_fir_checker #(.NSAMP(12), .CONST_X(-86)) u_fig (
    .clk, .rst_n, .done(done1), .checks(checks1), .failures(failures1),
    .n_obc(nobc1), .n_bda(nbda1), .last_y(y1));

  da_fir_checker #(.K(5), .B(10), .COEF_W(7), .COEF(C2), .DECIM(3),
                   .OUT_SHIFT(2), .OUT_W(14), .NSAMP(600)) u_dec (
    .clk, .rst_n, .done(done2), .checks(checks2), .failures(failures2),
    .n_obc(nobc2), .n_bda(nbda2), .last_y(y2));

  logic   done3;
  int     checks3, failures3, nobc3, nbda3;
  longint y3;
  da_fir_checker #(.NSAMP(400)) u_rand (
    .clk, .rst_n, .done(done3), .checks(checks3), .failures(failures3),
    .n_obc(nobc3), .n_bda(nbda3), .last_y(y3));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done1 && done2 && done3);
    checks   = checks1 + checks2 + checks3 + 4;
    failures = failures1 + failures2 + failures3;
    if (y1 != -7568 || y1[7:0] != 8'h70) begin
      failures++;
      $display("FAIL: steady-state output %0d, expected -7568 (low byte 70)", y1);
    end
    if (nobc1 == 0 || nbda1 == 0) begin
      failures++;
      $display("FAIL: constant input not run on both engines");
    end
    if (nobc2 == 0 || nbda2 == 0) begin
      failures++;
      $display("FAIL: decimating instance did not use both engines");
    end
    if (nobc3 == 0 || nbda3 == 0) begin
      failures++;
      $display("FAIL: default instance did not use both engines");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d",
             checks1 + checks2 + checks3, failures1 + failures2 + failures3 + 1);
    $finish;
  end
endmodule
