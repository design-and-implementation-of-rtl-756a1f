// Reconfigurable distributed-arithmetic FIR filter with optional decimation.
//
// y[n] = sum_k COEF[k] * x[n-k] is computed bit-serially, without
// multipliers, by one of two engines chosen at run time: the offset-binary-
// coded engine (arch = ARCH_OBC, 2^(K-1)-word table) or the binary DA engine
// with add/subtract control (arch = ARCH_BDA, 2^K-word table). Both engines
// receive every sample, so their tap registers always hold the same window
// and the choice can change between any two outputs; only the chosen engine
// computes. For decimation by DECIM, a computation starts on every DECIM-th
// sample only. The full-precision result is shifted right arithmetically by
// OUT_SHIFT and its low OUT_W bits are output.
//
// Bit-serial DA, the two table-reduction schemes and the 8-tap, 8-bit
// default follow the design this is built on; the default weights (all 11)
// match its 8-tap example. Run-time selection between the two engines, the
// decimation counter and the output scaling are this design's choices.
//
// Interface and timing: in_valid marks a sample. The arch value present with
// the sample that starts a computation is used for that output. out_valid
// pulses B cycles after that sample (one cycle per input bit). The next
// sample may come at the earliest B+1 cycles after the starting one;
// computing always takes B cycles, so inputs must be at least B+1 cycles
// apart when DECIM is 1. busy is high while a computation runs. Reset is
// synchronous, active low.
module da_fir
  import dec_pkg::*;
#(
  parameter int K         = 8,
  parameter int B         = 8,
  parameter int COEF_W    = 8,
  parameter int COEF [K]  = '{default: 11},
  parameter int DECIM     = 1,
  parameter int OUT_SHIFT = 0,
  parameter int OUT_W     = COEF_W + B + $clog2(K)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  da_arch_e                arch,
  input  logic                    in_valid,
  input  logic signed [B-1:0]     in_data,
  output logic                    busy,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int YW = COEF_W + B + $clog2(K);
  localparam int PW = $clog2(DECIM + 1);

  logic [PW-1:0]        phase;
  logic                 start;
  da_arch_e             arch_q;
  logic                 obc_busy, obc_valid, bda_busy, bda_valid;
  logic signed [YW-1:0] obc_y, bda_y, y_sel;

  assign start = in_valid && (phase == PW'(DECIM - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase  <= '0;
      arch_q <= ARCH_OBC;
    end else if (in_valid) begin
      phase <= start ? '0 : phase + 1'b1;
      if (start) arch_q <= arch;
    end
  end

  obc_da_engine #(.K(K), .B(B), .COEF_W(COEF_W), .COEF(COEF)) u_obc (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_data  (in_data),
    .in_start (start && arch == ARCH_OBC),
    .busy     (obc_busy),
    .y_valid  (obc_valid),
    .y        (obc_y)
  );

  bda_engine #(.K(K), .B(B), .COEF_W(COEF_W), .COEF(COEF)) u_bda (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_data  (in_data),
    .in_start (start && arch == ARCH_BDA),
    .busy     (bda_busy),
    .y_valid  (bda_valid),
    .y        (bda_y)
  );

  assign busy      = obc_busy || bda_busy;
  assign y_sel     = (arch_q == ARCH_OBC) ? obc_y : bda_y;
  assign out_valid = (arch_q == ARCH_OBC) ? obc_valid : bda_valid;
  assign out_data  = OUT_W'(y_sel >>> OUT_SHIFT);

endmodule
