// Offset-binary-coded distributed-arithmetic (OBC DA) inner-product engine.
//
// Computes y = sum_k COEF[k] * x[n-k] over K taps without a multiplier. Each
// sample is written in offset-binary form, x = 1/2 * (sum_l c_l 2^l
// - c_{B-1} 2^{B-1} - 1) with c_l = +1 for a 1 bit and -1 for a 0 bit. One
// bit slice of all K samples then selects a partial sum 1/2*sum_k COEF[k]*c_k.
// Those partial sums come in +/- pairs, so only the 2^(K-1) words whose tap-0
// bit is 1 are stored: the other K-1 bits, each compared with the tap-0 bit,
// address the table, and the tap-0 bit decides whether the word is added or
// subtracted. In the sign-bit slice the sign of the word is flipped once
// more. The accumulator starts from the constant -1/2*sum_k COEF[k] and is
// shifted right by one bit before each further slice (LSB first).
//
// The table, the tap-0 comparison, the add/negate select, the start-value
// select and the shift-accumulate loop follow the OBC DA architecture this
// design is built on. This implementation stores each word doubled (no 1/2)
// and halves the final sum instead, so the table is exact for odd
// coefficients. The table is a constant ROM computed from COEF at
// elaboration. The accumulator keeps B-1 fraction bits, so no bit is lost.
//
// Interface and timing: in_valid loads in_data into tap 0 and moves every
// stored sample one tap along (word-parallel). If in_start is high with
// in_valid, a computation over the new window starts: busy is high for B
// cycles (one bit slice per cycle, the tap registers rotating right so they
// hold the same words afterwards), then y_valid pulses for one cycle and y
// holds the result until the next one. Samples must not arrive while busy.
// Reset is synchronous, active low.
module obc_da_engine #(
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

  localparam int NW = 2 ** (K - 1);          // table words
  localparam int LW = COEF_W + $clog2(K) + 1; // table word width
  localparam int AW = LW + B + 1;            // accumulator width
  localparam int CW = $clog2(B);             // bit-slice counter width

  // Doubled table word: tap 0 taken as +1, tap k as +1 when its address bit
  // is set and -1 otherwise. Address bit K-1-k belongs to tap k.
  function automatic int obc_word(int a);
    int s = COEF[0];
    for (int k = 1; k < K; k++)
      s += ((a >> (K - 1 - k)) & 1) != 0 ? COEF[k] : -COEF[k];
    return s;
  endfunction

  function automatic int coef_sum();
    int s = 0;
    for (int k = 0; k < K; k++) s += COEF[k];
    return s;
  endfunction

  // Doubled start value, -sum(COEF), aligned with the table words.
  localparam logic signed [AW-1:0] INIT = AW'(-coef_sum()) <<< (B - 1);

  logic signed [LW-1:0] rom [NW];
  for (genvar a = 0; a < NW; a++) begin : g_rom
    assign rom[a] = LW'(obc_word(a));
  end

  logic [B-1:0]         sr [K];      // tap registers, sr[0] is x[n]
  logic [CW-1:0]        slice;       // bit slice being processed
  logic signed [AW-1:0] acc;

  logic                 b0, sign_time, z;
  logic [K-2:0]         addr;
  logic signed [AW-1:0] word, term, base, acc_next;

  always_comb begin
    b0        = sr[0][0];
    sign_time = (slice == CW'(B - 1));
    for (int k = 1; k < K; k++) addr[K - 1 - k] = ~(sr[k][0] ^ b0);
    z         = b0 ^ sign_time;      // 1: add the word, 0: subtract it
    word      = AW'(rom[addr]);
    term      = z ? word : -word;
    base      = (slice == '0) ? INIT : (acc >>> 1);
    acc_next  = base + (term <<< (B - 1));
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
          y       <= YW'(acc_next >>> 1);
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

  // A sample offered during a computation would be lost.
  a_no_input_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !in_valid)
    else $error("obc_da_engine: sample offered while busy");

endmodule
