// Stimulus and checker for one da_fir instance, used by tb_da_fir.
//
// Feeds NSAMP random samples with random gaps (at least B+1 cycles apart),
// switching the engine choice (OBC or binary DA) at random, and compares
// every output with a direct-form FIR computed here: the sum of products
// over the last K samples, taken on every DECIM-th sample, shifted right by
// OUT_SHIFT and cut to OUT_W bits. It also checks the latency (B cycles),
// that no output appears on the other samples, and how often each engine
// produced an output. If CONST_X is non-zero the stream starts with K+4
// copies of CONST_X so that the steady-state output can be checked.
module da_fir_checker
  import dec_pkg::*;
#(
  parameter int K         = 8,
  parameter int B         = 8,
  parameter int COEF_W    = 8,
  parameter int COEF [K]  = '{default: 11},
  parameter int DECIM     = 1,
  parameter int OUT_SHIFT = 0,
  parameter int OUT_W     = COEF_W + B + $clog2(K),
  parameter int NSAMP     = 300,
  parameter int CONST_X   = 0
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_obc,
  output int   n_bda,
  output longint last_y
);
  da_arch_e                arch = ARCH_OBC;
  logic                    in_valid = 1'b0;
  logic signed [B-1:0]     in_data = '0;
  logic                    busy, out_valid;
  logic signed [OUT_W-1:0] out_data;

  da_fir #(.K(K), .B(B), .COEF_W(COEF_W), .COEF(COEF), .DECIM(DECIM),
           .OUT_SHIFT(OUT_SHIFT), .OUT_W(OUT_W)) dut (.*);

  int hist [K];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %m: %s", what);
    end
  endtask

  initial begin
    longint s, e;
    int v, n, gap;
    bit starts;
    done = 1'b0; checks = 0; failures = 0; n_obc = 0; n_bda = 0; last_y = 0;
    for (int k = 0; k < K; k++) hist[k] = 0;
    @(posedge rst_n);
    for (int i = 0; i < NSAMP; i++) begin
      v = (CONST_X != 0 && i < K + 4) ? CONST_X : $signed(B'($urandom));
      starts = ((i % DECIM) == DECIM - 1);
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = B'(v);
      arch     = da_arch_e'($urandom % 2);
      if (CONST_X != 0 && i < K + 4) arch = da_arch_e'(i % 2);
      for (int k = K - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = v;
      s = 0;
      for (int k = 0; k < K; k++) s += longint'(COEF[k]) * hist[k];
      e = longint'($signed(OUT_W'(s >>> OUT_SHIFT)));
      @(negedge clk);
      in_valid = 1'b0;
      n = 0;
      if (starts) begin
        while (!out_valid && n < 4 * B) begin
          @(negedge clk);
          n++;
        end
        check(n == B, $sformatf("latency %0d, expected %0d", n, B));
        check(longint'(out_data) == e,
              $sformatf("sample %0d arch %0d: out=%0d expected %0d", i, arch, out_data, e));
        last_y = longint'(out_data);
        if (arch == ARCH_OBC) n_obc++; else n_bda++;
      end else begin
        check(!busy, "busy without a start");
      end
      // Gap to the next sample: at least B+1 cycles after this one.
      gap = (n >= B - 1) ? 0 : B - 1 - n + ($urandom % 4);
      repeat (gap) begin
        @(negedge clk);
        if (!starts) check(!out_valid, "output on a non-decimated sample");
      end
    end
    done = 1'b1;
  end
endmodule
