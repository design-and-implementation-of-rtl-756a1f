// Half-band decimating FIR filter: second stage of the decimation chain.
//
// Takes the 11-bit CIC output at 80 kHz, low-pass filters it with a 7-tap
// half-band response (-1 0 9 16 9 0 -1)/32 and keeps every second output:
// 12-bit samples at 40 kHz. The half-band shape puts the -6 dB point at a
// quarter of the input rate (20 kHz) and makes every other tap zero. The
// filter is a da_fir: multiplier-free, bit-serial, computing one output in
// 11 cycles with either the OBC or the binary DA engine (arch).
//
// Rates, widths and the half-band type follow the design's block diagram;
// the tap count and the coefficients (each a canonic-signed-digit constant
// with at most two non-zero digits) are this design's choice. Output
// scaling is unity DC gain, the 12th bit giving headroom for overshoot.
//
// Timing: out_valid pulses 11 cycles after every second in_valid. Inputs
// must be at least 12 cycles apart (they come every 16 cycles in the chain).
// Reset is synchronous, active low.
module half_band_filter
  import dec_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  da_arch_e                arch,
  input  logic                    in_valid,
  input  logic signed [CIC_W-1:0] in_data,
  output logic                    out_valid,
  output logic signed [HB_W-1:0]  out_data
);

  logic busy_unused;

  da_fir #(
    .K(HB_TAPS), .B(CIC_W), .COEF_W(6), .COEF(HB_COEF),
    .DECIM(HB_DECIM), .OUT_SHIFT(HB_SHIFT), .OUT_W(HB_W)
  ) u_fir (
    .clk, .rst_n, .arch, .in_valid, .in_data,
    .busy      (busy_unused),
    .out_valid (out_valid),
    .out_data  (out_data)
  );

endmodule
