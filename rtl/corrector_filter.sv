// Corrector decimating FIR filter: last stage of the decimation chain.
//
// Takes the 12-bit half-band output at 40 kHz, low-pass filters it with the
// 8-tap response (1 2 5 8 8 5 2 1)/32 and keeps every tenth output: 13-bit
// samples at 4 kHz. The filter is a da_fir: multiplier-free, bit-serial,
// computing one output in 12 cycles with either the OBC or the binary DA
// engine (arch).
//
// Rates and widths follow the design's block diagram, and the 8-tap length
// its FIR filter; the coefficients (each a canonic-signed-digit constant
// with at most two non-zero digits) are this design's choice. Output scaling
// is unity DC gain, the 13th bit giving headroom.
//
// Timing: out_valid pulses 12 cycles after every tenth in_valid. Inputs must
// be at least 13 cycles apart (they come every 32 cycles in the chain).
// Reset is synchronous, active low.
module corrector_filter
  import dec_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  da_arch_e                arch,
  input  logic                    in_valid,
  input  logic signed [HB_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_SAMPLE_W-1:0] out_data
);

  logic busy_unused;

  da_fir #(
    .K(COR_TAPS), .B(HB_W), .COEF_W(5), .COEF(COR_COEF),
    .DECIM(COR_DECIM), .OUT_SHIFT(COR_SHIFT), .OUT_W(OUT_SAMPLE_W)
  ) u_fir (
    .clk, .rst_n, .arch, .in_valid, .in_data,
    .busy      (busy_unused),
    .out_valid (out_valid),
    .out_data  (out_data)
  );

endmodule
