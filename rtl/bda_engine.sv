// Binary distributed-arithmetic (DA) inner-product engine with an
// add/subtract unit.
//
// Computes y = sum_k COEF[k] * x[n-k] over K taps without a multiplier. In
// each cycle one bit of every tap register (LSB first) forms a K-bit address
// into a 2^K-word table holding sum_k bit_k * COEF[k]. The word is added to
// the accumulator, which is first shifted right by one bit; in the sign-bit
// cycle the word is subtracted instead, because the MSB of a two's
// complement word has negative weight. Controlling add/subtract this way
// needs half the table of the plain binary DA form, whose table also takes a
// sign-time input.
//
// The tap registers, the table contents and its address order (tap 0 is the
// address LSB), the add/subtract control that is 1 for the MSB and the
// shift-accumulate loop follow the binary DA architecture this design is
// built on. The table is a constant ROM computed from COEF at elaboration.
// The accumulator keeps B-1 fraction bits, so no bit is lost.
//
// Interface and timing are those of obc_da_engine: in_valid loads a sample
// into tap 0 and moves the others one tap along; in_start with in_valid
// starts a computation that keeps busy high for B cycles, after which
// y_valid pulses once and y holds the result. Samples must not arrive while
// busy. Reset is synchronous, active low.
module bda_engine #(
  parameter int K      = 4,                 // taps (at least 2)
  parameter int B      = 8,                 // input word width, two's complement
  parameter int COEF_W = 8,                 // signed width every coefficient fits in
  parameter int COEF [K] = '{default: 11},  // tap weights, COEF[0] for x[n]
  localparam int YW    = COEF_W + B + $clog2(K)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [B-1:0]  in_data,
  input  logic                 in_start,
  output logic                 busy,
  output logic                 y_valid,
  output logic signed [YW-1:0] y
);

  localparam int NW = 2 ** K;                 // table words
  localparam int LW = COEF_W + $clog2(K) + 1; // table word width
  localparam int AW = LW + B + 1;             // accumulator width
  localparam int CW = $clog2(B);              // bit-slice counter width

  function automatic int bda_word(int a);
    int s = 0;
    for (int k = 0; k < K; k++)
      if (((a >> k) & 1) != 0) s += COEF[k];
    return s;
  endfunction

  logic signed [LW-1:0] rom [NW];
  for (genvar a = 0; a < NW; a++) begin : g_rom
    assign rom[a] = LW'(bda_word(a));
  end

  logic [B-1:0]         sr [K];      // tap registers, sr[0] is x[n]
  logic [CW-1:0]        slice;
  logic signed [AW-1:0] acc;

  logic                 s_msb;
  logic [K-1:0]         addr;
  logic signed [AW-1:0] word, term, base, acc_next;

  always_comb begin
    s_msb = (slice == CW'(B - 1));
    for (int k = 0; k < K; k++) addr[k] = sr[k][0];
    word     = AW'(rom[addr]);
    term     = s_msb ? -word : word;
    base     = (slice == '0) ? AW'(signed'(0)) : (acc >>> 1);
    acc_next = base + (term <<< (B - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < K; k++) sr[k] <= '0;
      slice   <= '0;
      acc     <= '0;
      busy    <= 1'b0;
      y_valid <= 1'b0;
      y       <= '0;
    end else begin
      y_valid <= 1'b0;
      if (busy) begin
        for (int k = 0; k < K; k++) sr[k] <= {sr[k][0], sr[k][B-1:1]};
        acc <= acc_next;
        if (slice == CW'(B - 1)) begin
          busy    <= 1'b0;
          slice   <= '0;
          y_valid <= 1'b1;
          y       <= YW'(acc_next);
        end else begin
          slice <= slice + 1'b1;
        end
      end else if (in_valid) begin
        sr[0] <= in_data;
        for (int k = 1; k < K; k++) sr[k] <= sr[k-1];
        if (in_start) begin
          busy  <= 1'b1;
          slice <= '0;
        end
      end
    end
  end

  a_no_input_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !in_valid)
    else $error("bda_engine: sample offered while busy");

endmodule
