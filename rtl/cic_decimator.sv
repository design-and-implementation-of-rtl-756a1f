// Cascaded integrator-comb (CIC) decimator.
//
// N integrators run at the input rate, a down-sampler keeps every R-th
// integrator output, and N combs (first differences, differential delay of
// one decimated sample) run at the output rate. The response is
// ((1 - z^-R) / (1 - z^-1))^N with DC gain R^N, and there is no multiplier
// and no coefficient store. The internal width IN_W + N*log2(R) holds the
// full gain, so the wrap-around of the integrators cancels in the combs.
// The output keeps the top OUT_W bits of that width (an arithmetic right
// shift by IN_W + N*log2(R) - OUT_W, rounding towards minus infinity).
//
// Stage count 5, factor 16 and the widths 6 in / 11 out follow the design's
// block diagram. The differential delay of one, the truncation to the top
// bits and the pipelined integrators (each one adds the previous stage's
// registered value, which delays the response by N-1 input samples) are this
// design's choices.
//
// Interface and timing: in_valid marks an input sample (every clock when the
// clock runs at the input rate). The R-th valid input after reset, and every
// R-th one after that, updates the combs; out_valid then pulses in the next
// cycle with out_data. Reset is synchronous, active low.
module cic_decimator #(
  parameter int N     = 5,    // integrator and comb stages
  parameter int R     = 16,   // decimation factor, a power of two
  parameter int IN_W  = 6,
  parameter int OUT_W = 11
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int GW = IN_W + N * $clog2(R);   // full-gain register width
  localparam int RW = $clog2(R);

  logic signed [GW-1:0] integ [N];    // integrator registers
  logic signed [GW-1:0] dly   [N];    // comb delay registers
  logic signed [GW-1:0] comb  [N+1];  // comb chain, comb[0] is the decimated sample
  logic [RW-1:0]        phase;
  logic                 dec_strobe;

  assign dec_strobe = in_valid && (phase == RW'(R - 1));

  always_comb begin
    comb[0] = integ[N-1];
    for (int i = 0; i < N; i++) comb[i+1] = comb[i] - dly[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        integ[i] <= '0;
        dly[i]   <= '0;
      end
      phase     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        integ[0] <= integ[0] + GW'(in_data);
        for (int i = 1; i < N; i++) integ[i] <= integ[i] + integ[i-1];
        phase <= phase + 1'b1;
      end
      if (dec_strobe) begin
        for (int i = 0; i < N; i++) dly[i] <= comb[i];
        out_valid <= 1'b1;
        out_data  <= OUT_W'(comb[N] >>> (GW - OUT_W));
      end
    end
  end

endmodule
