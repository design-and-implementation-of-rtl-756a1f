// Hearing-aid decimation filter: 6-bit samples at 1.28 MHz in, 13-bit
// samples at 4 kHz out (overall decimation by 320).
//
// Stage 1, cic_decimator: 5-stage CIC, divide by 16, 11 bits at 80 kHz.
// Stage 2, half_band_filter: 7-tap half-band FIR, divide by 2, 12 bits at
// 40 kHz. Stage 3, corrector_filter: 8-tap FIR, divide by 10, 13 bits at
// 4 kHz. Both FIR stages are bit-serial distributed-arithmetic filters; arch
// chooses the offset-binary-coded engine (ARCH_OBC, the default and
// lower-power choice) or the binary DA engine (ARCH_BDA) for both, and may
// change at any time: each output uses the setting present when its
// computation starts. The intermediate stage outputs are brought out for
// observation.
//
// The chain, its rates and widths follow the design's block diagram; the
// FIR coefficients and the run-time engine choice are this design's own.
// The A/D converter that feeds in_sample and the D/A converter that takes
// out_sample are outside this module.
//
// Timing: one clock at the input rate (1.28 MHz), in_valid high for every
// input sample (normally every cycle). With in_valid always high, out_valid
// pulses once every 320 cycles. Reset is synchronous, active low.
module decimation_filter
  import dec_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  da_arch_e                arch,
  input  logic                    in_valid,
  input  logic signed [IN_SAMPLE_W-1:0] in_sample,
  output logic                    cic_valid,
  output logic signed [CIC_W-1:0] cic_sample,
  output logic                    hb_valid,
  output logic signed [HB_W-1:0]  hb_sample,
  output logic                    out_valid,
  output logic signed [OUT_SAMPLE_W-1:0] out_sample
);

  cic_decimator #(.N(CIC_STAGES), .R(CIC_R), .IN_W(IN_SAMPLE_W), .OUT_W(CIC_W)) u_cic (
    .clk, .rst_n,
    .in_valid  (in_valid),
    .in_data   (in_sample),
    .out_valid (cic_valid),
    .out_data  (cic_sample)
  );

  half_band_filter u_hb (
    .clk, .rst_n, .arch,
    .in_valid  (cic_valid),
    .in_data   (cic_sample),
    .out_valid (hb_valid),
    .out_data  (hb_sample)
  );

  corrector_filter u_cor (
    .clk, .rst_n, .arch,
    .in_valid  (hb_valid),
    .in_data   (hb_sample),
    .out_valid (out_valid),
    .out_data  (out_sample)
  );

endmodule
