// tb_decimation_filter_sparse: the decimation filter on a clock much faster
// than its sample rate, with every parameter at its default.
//
// The filter is meant to be clocked at 128 MHz while the modulator delivers
// 1.28 MHz samples, so in_valid is high on one clock in 100. Two copies of
// the top are driven with the same 6-bit sample sequence (random samples,
// then a 4 kHz sine of amplitude 31): one with a sample on every clock, one
// with a sample on every 100th clock. The test checks that
//   * every CIC, half-band and final output of the slow copy equals the
//     value predicted by a reference model built from plain convolutions
//     (the CIC as its 76-tap impulse response, the two FIR stages as direct
//     sums with the same truncation, rounding and saturation),
//   * the slow copy produces exactly the same sample streams as the fast one,
//   * the slow copy's final outputs come exactly 64 * 100 = 6400 clocks apart,
//     and its output counts are one per 16, 32 and 64 inputs.
module tb_decimation_filter_sparse;
  import decim_pkg::*;

  localparam int unsigned HLEN = CIC_N * (CIC_M - 1) + 1;   // 76
  localparam int unsigned CIC_W = IN_W + CIC_N * $clog2(CIC_M); // 26
  localparam int NIN = 64 * 100;          // 100 final outputs
  localparam int GAP = 100;               // clocks per input sample

  logic clk = 1'b0, rst_n = 1'b0;
  logic f_valid = 1'b0, s_valid = 1'b0;
  logic signed [IN_W-1:0] f_sample = '0, s_sample = '0;

  logic f_out_valid, f_cic_valid, f_hb_valid, f_hb_sat, f_corr_sat;
  logic signed [OUT_W-1:0]     f_out;
  logic signed [CIC_OUT_W-1:0] f_cic;
  logic signed [HB_OUT_W-1:0]  f_hb;
  logic s_out_valid, s_cic_valid, s_hb_valid, s_hb_sat, s_corr_sat;
  logic signed [OUT_W-1:0]     s_out;
  logic signed [CIC_OUT_W-1:0] s_cic;
  logic signed [HB_OUT_W-1:0]  s_hb;

  decimation_filter_top dut_fast (
    .clk, .rst_n, .in_valid(f_valid), .in_sample(f_sample),
    .out_valid(f_out_valid), .out_sample(f_out),
    .cic_valid(f_cic_valid), .cic_sample(f_cic),
    .hb_valid(f_hb_valid), .hb_sample(f_hb),
    .hb_sat(f_hb_sat), .corr_sat(f_corr_sat)
  );

  decimation_filter_top dut_slow (
    .clk, .rst_n, .in_valid(s_valid), .in_sample(s_sample),
    .out_valid(s_out_valid), .out_sample(s_out),
    .cic_valid(s_cic_valid), .cic_sample(s_cic),
    .hb_valid(s_hb_valid), .hb_sample(s_hb),
    .hb_sat(s_hb_sat), .corr_sat(s_corr_sat)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (NIN * GAP + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- stimulus and reference model -------------------------------------
  longint xs [NIN];
  longint h [HLEN];
  longint cref [$], href [$], oref [$];

  function automatic longint round_sat(longint acc, int shift, int ow);
    longint q, hi, lo;
    q  = (acc + (longint'(1) <<< (shift - 1))) >>> shift;
    hi = (longint'(1) <<< (ow - 1)) - 1;
    lo = -(longint'(1) <<< (ow - 1));
    if (q > hi) q = hi;
    if (q < lo) q = lo;
    return q;
  endfunction

  task automatic build_reference();
    longint t [HLEN];
    longint acc;
    real v;
    for (int i = 0; i < NIN; i++) begin
      if (i < NIN / 2) begin
        xs[i] = longint'($signed(IN_W'($urandom)));
      end else begin
        v = 31.0 * $sin(2.0 * 3.14159265358979 * 4.0e3 * real'(i) / 1.28e6);
        xs[i] = longint'($rtoi(v + ((v >= 0.0) ? 0.5 : -0.5)));
      end
    end
    // impulse response of the CIC: (16-sample boxcar)^5
    for (int i = 0; i < int'(HLEN); i++) h[i] = longint'(i == 0);
    for (int s = 0; s < int'(CIC_N); s++) begin
      for (int i = 0; i < int'(HLEN); i++) begin
        t[i] = 0;
        for (int k = 0; k < int'(CIC_M); k++) if (i - k >= 0) t[i] += h[i-k];
      end
      h = t;
    end
    // CIC output j is the filter output at input M*j + M - 1 - N
    for (int j = 0; j < NIN / int'(CIC_M); j++) begin
      int n;
      n   = int'(CIC_M) * j + int'(CIC_M) - 1 - int'(CIC_N);
      acc = 0;
      for (int k = 0; k < int'(HLEN); k++) if (n - k >= 0) acc += h[k] * xs[n-k];
      cref.push_back(acc >>> (CIC_W - CIC_OUT_W));
    end
    // half-band output with every odd-numbered CIC sample
    for (int m = 1; m < cref.size(); m += 2) begin
      acc = 0;
      for (int k = 0; k < int'(TAPS); k++)
        if (m - k >= 0) acc += longint'(HB_COEF[k]) * cref[m-k];
      href.push_back(round_sat(acc, COEF_FRAC - 1, HB_OUT_W));
    end
    // corrector output with every odd-numbered half-band sample
    for (int q = 1; q < href.size(); q += 2) begin
      acc = 0;
      for (int k = 0; k < int'(TAPS); k++)
        if (q - k >= 0) acc += longint'(CORR_COEF[k]) * href[q-k];
      oref.push_back(round_sat(acc, COEF_FRAC - 1, OUT_W));
    end
  endtask

  // ---- observation --------------------------------------------------------
  longint fc [$], fh [$], fo [$];            // fast copy's streams
  int  n_cic = 0, n_hb = 0, n_out = 0;
  int  f_cnt = 0;
  longint cyc = 0, last_out = -1;
  int  gap_bad = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && f_cic_valid) fc.push_back(longint'(f_cic));
    if (rst_n && f_hb_valid)  fh.push_back(longint'(f_hb));
    if (rst_n && f_out_valid) begin
      fo.push_back(longint'(f_out));
      f_cnt++;
    end
    if (rst_n && s_cic_valid) begin
      checks += 2;
      if (n_cic >= cref.size() || s_cic !== CIC_OUT_W'(cref[n_cic])) begin
        failures++;
        if (failures < 6) $display("cic %0d: got %0d", n_cic, s_cic);
      end
      if (n_cic >= fc.size() || longint'(s_cic) != fc[n_cic]) failures++;
      n_cic++;
    end
    if (rst_n && s_hb_valid) begin
      checks += 2;
      if (n_hb >= href.size() || s_hb !== HB_OUT_W'(href[n_hb])) begin
        failures++;
        if (failures < 6) $display("hb %0d: got %0d", n_hb, s_hb);
      end
      if (n_hb >= fh.size() || longint'(s_hb) != fh[n_hb]) failures++;
      n_hb++;
    end
    if (rst_n && s_out_valid) begin
      checks += 3;
      if (n_out >= oref.size() || s_out !== OUT_W'(oref[n_out])) begin
        failures++;
        if (failures < 6) $display("out %0d: got %0d", n_out, s_out);
      end
      if (n_out >= fo.size() || longint'(s_out) != fo[n_out]) failures++;
      if (last_out >= 0 && cyc - last_out != longint'(64 * GAP)) begin
        failures++;
        gap_bad++;
      end
      last_out = cyc;
      n_out++;
    end
  end

  // both copies start together; the slow one gets a sample every GAP clocks
  initial begin
    build_reference();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n <= 1'b1;
    fork
      begin
        for (int i = 0; i < NIN; i++) begin
          @(negedge clk);
          f_valid  <= 1'b1;
          f_sample <= IN_W'(xs[i]);
        end
        @(negedge clk) f_valid <= 1'b0;
      end
      begin
        for (int i = 0; i < NIN; i++) begin
          @(negedge clk);
          s_valid  <= 1'b1;
          s_sample <= IN_W'(xs[i]);
          @(negedge clk) s_valid <= 1'b0;
          repeat (GAP - 2) @(negedge clk);
        end
      end
    join
    repeat (2 * GAP) @(posedge clk);

    checks += 4;
    if (n_cic != NIN / 16) failures++;
    if (n_hb  != NIN / 32) failures++;
    if (n_out != NIN / 64) failures++;
    if (f_cnt != NIN / 64) failures++;
    $display("slow copy: cic=%0d hb=%0d out=%0d, output spacing errors=%0d",
             n_cic, n_hb, n_out, gap_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
