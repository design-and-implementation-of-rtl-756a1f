// End-to-end self-checking testbench for decimation_filter at its default
// (and only) configuration: 6-bit samples at 1.28 MHz in, 13-bit samples at
// 4 kHz out.
//
// The input is a 1 kHz tone (in band) with a 100 kHz tone on top (out of
// band), then random full-range samples, then full-scale constants. A
// reference of the whole chain is worked out here without the RTL's
// structure: the CIC as a convolution with the 76-tap impulse response of
// ((1 - z^-16)/(1 - z^-1))^5, then the two FIRs in direct form, each
// evaluated only on the samples that are kept. All three stage outputs are
// compared sample by sample. The engine choice is switched between OBC and
// binary DA several times during the run. Also checked: one output every 320
// cycles, one CIC output every 16 and one half-band output every 32, and
// that every mechanism (three decimations, both engines, engine switches,
// negative and positive full-scale) occurred, and that the 1 kHz tone comes
// out at its expected amplitude.
module tb_decimation_filter;
  import dec_pkg::*;
  localparam int NOUT = 400;
  localparam int NS   = 320 * NOUT;
  localparam int HL   = 76;
  localparam int HB_H  [7] = '{-1, 0, 9, 16, 9, 0, -1};
  localparam int COR_H [8] = '{1, 2, 5, 8, 8, 5, 2, 1};

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  da_arch_e                       arch = ARCH_OBC;
  logic signed [IN_SAMPLE_W-1:0]  in_sample = '0;
  logic                           cic_valid, hb_valid, out_valid;
  logic signed [CIC_W-1:0]        cic_sample;
  logic signed [HB_W-1:0]         hb_sample;
  logic signed [OUT_SAMPLE_W-1:0] out_sample;

  decimation_filter dut (.*);

  always #5 clk = ~clk;

  int     checks = 0, failures = 0;
  longint h [HL];
  int     x [NS];
  int     cic_ref [NS / 16];
  int     hb_ref  [NS / 32];
  int     out_ref [NOUT];
  int     n_cic = 0, n_hb = 0, n_out = 0, cycle = 0;
  int     last_cic = -1, last_hb = -1, last_out = -1;
  int     n_out_obc = 0, n_out_bda = 0, n_switch = 0, n_pos_fs = 0, n_neg_fs = 0;
  int     tone_peak = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  task automatic build_reference();
    longint t [HL];
    longint s;
    for (int j = 0; j < HL; j++) h[j] = (j < 16) ? 1 : 0;
    for (int st = 1; st < 5; st++) begin
      for (int j = 0; j < HL; j++) begin
        t[j] = 0;
        for (int i = 0; i < 16; i++) if (j - i >= 0) t[j] += h[j - i];
      end
      h = t;
    end
    for (int m = 0; m < NS / 16; m++) begin
      s = 0;
      for (int j = 0; j < HL; j++)
        if (16 * m + 10 - j >= 0) s += h[j] * x[16 * m + 10 - j];
      cic_ref[m] = int'($signed(CIC_W'(s >>> 15)));
    end
    for (int p = 0; p < NS / 32; p++) begin
      s = 0;
      for (int k = 0; k < 7; k++)
        if (2 * p + 1 - k >= 0) s += HB_H[k] * cic_ref[2 * p + 1 - k];
      hb_ref[p] = int'($signed(HB_W'(s >>> 5)));
    end
    for (int r = 0; r < NOUT; r++) begin
      s = 0;
      for (int k = 0; k < 8; k++)
        if (10 * r + 9 - k >= 0) s += COR_H[k] * hb_ref[10 * r + 9 - k];
      out_ref[r] = int'($signed(OUT_SAMPLE_W'(s >>> 5)));
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    if (cic_valid) begin
      check(int'(cic_sample) == cic_ref[n_cic],
            $sformatf("cic %0d = %0d, expected %0d", n_cic, cic_sample, cic_ref[n_cic]));
      if (last_cic >= 0) check(cycle - last_cic == 16, "CIC output spacing");
      last_cic <= cycle;
      if (cic_sample == 11'sd992)   n_pos_fs++;
      if (cic_sample == -11'sd1024) n_neg_fs++;
      n_cic <= n_cic + 1;
    end
    if (hb_valid) begin
      check(int'(hb_sample) == hb_ref[n_hb],
            $sformatf("half-band %0d = %0d, expected %0d", n_hb, hb_sample, hb_ref[n_hb]));
      if (last_hb >= 0) check(cycle - last_hb == 32, "half-band output spacing");
      last_hb <= cycle;
      n_hb <= n_hb + 1;
    end
    if (out_valid) begin
      check(int'(out_sample) == out_ref[n_out],
            $sformatf("output %0d = %0d, expected %0d", n_out, out_sample, out_ref[n_out]));
      if (last_out >= 0)
        check(cycle - last_out == 320, $sformatf("output spacing %0d", cycle - last_out));
      last_out <= cycle;
      if (arch == ARCH_OBC) n_out_obc++; else n_out_bda++;
      // Settled part of the tone section: track the output amplitude.
      if (n_out >= 20 && n_out < NOUT / 2 - 2) begin
        if (int'(out_sample) > tone_peak)  tone_peak = int'(out_sample);
        if (-int'(out_sample) > tone_peak) tone_peak = -int'(out_sample);
      end
      n_out <= n_out + 1;
    end
  end

  initial begin
    real ph;
    for (int i = 0; i < NS; i++) begin
      ph = 6.283185307179586 * real'(i) / 1280.0;
      if (i < NS / 2)
        x[i] = int'(20.0 * $sin(ph) + 8.0 * $sin(100.0 * ph));
      else if (i < 3 * NS / 4)
        x[i] = $signed(IN_SAMPLE_W'($urandom));
      else if (i < 7 * NS / 8)
        x[i] = -32;
      else
        x[i] = 31;
    end
    build_reference();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NS; i++) begin
      @(negedge clk);
      in_valid  = 1'b1;
      in_sample = IN_SAMPLE_W'(x[i]);
      // Switch engines every 10 output periods, in the middle of a period.
      if (i % 3200 == 1600) begin
        arch = (arch == ARCH_OBC) ? ARCH_BDA : ARCH_OBC;
        n_switch++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (40) @(negedge clk);
    check(n_cic == NS / 16, $sformatf("%0d CIC outputs", n_cic));
    check(n_hb == NS / 32,  $sformatf("%0d half-band outputs", n_hb));
    check(n_out == NOUT,    $sformatf("%0d outputs", n_out));
    check(n_out_obc > 0 && n_out_bda > 0,
          $sformatf("outputs per engine %0d/%0d", n_out_obc, n_out_bda));
    check(n_switch > 0, "engine switch");
    // The 1 kHz tone of amplitude 20 comes out scaled by 2^20 / 2^15 = 32
    // (about 640); at 4 samples per period the largest sample is at least
    // 0.7 of the peak. The 100 kHz tone must not add to it.
    check(tone_peak >= 440 && tone_peak <= 660, $sformatf("1 kHz tone amplitude %0d", tone_peak));
    check(n_pos_fs > 0 && n_neg_fs > 0, "full-scale CIC output");
    $display("1 kHz tone output amplitude: %0d", tone_peak);
    $display("mechanisms: cic=%0d half-band=%0d corrector=%0d obc=%0d bda=%0d switches=%0d fs+=%0d fs-=%0d",
             n_cic, n_hb, n_out, n_out_obc, n_out_bda, n_switch, n_pos_fs, n_neg_fs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
