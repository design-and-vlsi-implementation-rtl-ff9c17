// tb_decimation_filter_top: end-to-end test of the three-stage decimation
// filter at its default (full) size.
//
// The input is a sequence of phases at one sample per clock (1.28 MHz):
//   1. random 6-bit samples,
//   2. a full-scale square wave, whose edges overshoot in both FIR stages
//      and must saturate them,
//   3. a 4 kHz sine of amplitude 31 (edge of the 0-4 kHz pass band),
//   4. a 30 kHz sine of amplitude 31 (stop band).
// A reference model written as plain convolutions (the CIC as its 76-tap
// impulse response (16-boxcar)^5, the two FIR stages as direct-form sums)
// predicts every sample at every rate: 80 kHz CIC output, 40 kHz half-band
// output and 20 kHz final output, with the same truncation, rounding and
// saturation rules. Every observed sample is compared with it.
// The overall gain from input to output is 32 * 2 * 2 = 128, so the 4 kHz
// tone must come out with a peak near 31 * 128 = 3968 and the 30 kHz tone
// must be attenuated by more than 26 dB.
// Mechanisms counted (each must occur at least once): CIC decimation,
// integrator wrap-around (from the model of the 26-bit last integrator),
// half-band decimation, corrector decimation (DA inner products), an inner
// product whose sign-controlling input is negative (offset binary coding
// uses the other half of the table), half-band saturation and corrector
// saturation.
module tb_decimation_filter_top;
  import decim_pkg::*;

  localparam int unsigned HLEN = CIC_N * (CIC_M - 1) + 1;   // 76
  localparam int unsigned CIC_W = IN_W + CIC_N * $clog2(CIC_M); // 26
  localparam int P1 = 6400, P2 = 16384, P3 = 12800, P4 = 12800;
  localparam int TOTAL = P1 + P2 + P3 + P4;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IN_W-1:0] in_sample = '0;
  logic out_valid, cic_valid, hb_valid, hb_sat, corr_sat;
  logic signed [OUT_W-1:0]     out_sample;
  logic signed [CIC_OUT_W-1:0] cic_sample;
  logic signed [HB_OUT_W-1:0]  hb_sample;

  decimation_filter_top dut (
    .clk, .rst_n, .in_valid, .in_sample, .out_valid, .out_sample,
    .cic_valid, .cic_sample, .hb_valid, .hb_sample, .hb_sat, .corr_sat
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_cic = 0, n_hb = 0, n_out = 0;
  int cnt_wrap = 0, cnt_hb_sat = 0, cnt_corr_sat = 0, cnt_neg_sign = 0;

  initial begin : watchdog
    repeat (TOTAL + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model ----------------------------------------------------
  longint h [HLEN];
  longint xs [$];                 // input samples
  longint cref [$], href [$], oref [$];
  longint isum [CIC_N];           // unbounded integrator model (wrap count)

  initial begin
    longint t [HLEN];
    for (int i = 0; i < int'(HLEN); i++) h[i] = (i == 0);
    for (int s = 0; s < int'(CIC_N); s++) begin
      for (int i = 0; i < int'(HLEN); i++) begin
        t[i] = 0;
        for (int k = 0; k < int'(CIC_M); k++) if (i - k >= 0) t[i] += h[i-k];
      end
      h = t;
    end
    for (int s = 0; s < int'(CIC_N); s++) isum[s] = 0;
  end

  function automatic longint round_sat(longint acc, int shift, int ow, output bit s);
    longint q, hi, lo;
    q  = (acc + (longint'(1) <<< (shift - 1))) >>> shift;
    hi = (longint'(1) <<< (ow - 1)) - 1;
    lo = -(longint'(1) <<< (ow - 1));
    s  = 0;
    if (q > hi) begin q = hi; s = 1; end
    if (q < lo) begin q = lo; s = 1; end
    return q;
  endfunction

  longint hsat_ref [$], osat_ref [$];

  // push one input sample through the reference chain
  task automatic model_step(longint x);
    longint prev;
    xs.push_back(x);
    // wrap-around of the 26-bit last integrator
    prev = isum[CIC_N-1];
    isum[0] += x;
    for (int s = 1; s < int'(CIC_N); s++) isum[s] += isum[s-1];
    if ((prev >>> (CIC_W - 1)) != (isum[CIC_N-1] >>> (CIC_W - 1))) cnt_wrap++;
    if (xs.size() % CIC_M == 0) begin
      longint acc, c;
      int n;
      n = xs.size() - 1 - int'(CIC_N);
      acc = 0;
      for (int k = 0; k < int'(HLEN); k++)
        if (n - k >= 0) acc += h[k] * xs[n-k];
      c = acc >>> (CIC_W - CIC_OUT_W);
      cref.push_back(c);
      if (cref.size() % 2 == 0) begin
        longint a2, y2;
        bit s2;
        int m;
        m  = cref.size() - 1;
        a2 = 0;
        for (int k = 0; k < int'(TAPS); k++)
          if (m - k >= 0) a2 += longint'(HB_COEF[k]) * cref[m-k];
        y2 = round_sat(a2, COEF_FRAC - 1, HB_OUT_W, s2);
        href.push_back(y2);
        hsat_ref.push_back(longint'(s2));
        if (href.size() % 2 == 0) begin
          longint a3, y3;
          bit s3;
          int q;
          q  = href.size() - 1;
          a3 = 0;
          for (int k = 0; k < int'(TAPS); k++)
            if (q - k >= 0) a3 += longint'(CORR_COEF[k]) * href[q-k];
          if (q >= 5 && href[q-5] < 0) cnt_neg_sign++;
          y3 = round_sat(a3, COEF_FRAC - 1, OUT_W, s3);
          oref.push_back(y3);
          osat_ref.push_back(longint'(s3));
        end
      end
    end
  endtask

  // ---- comparison ---------------------------------------------------------
  int  peak3 = 0, peak4 = 0;

  always @(posedge clk) begin
    if (rst_n && in_valid) model_step(longint'(in_sample));
    if (rst_n && cic_valid) begin
      checks++;
      if (n_cic >= cref.size() || cic_sample !== CIC_OUT_W'(cref[n_cic])) begin
        failures++;
        if (failures < 6) $display("cic %0d: got %0d", n_cic, cic_sample);
      end
      n_cic++;
    end
    if (rst_n && hb_valid) begin
      checks += 2;
      if (n_hb >= href.size() || hb_sample !== HB_OUT_W'(href[n_hb])) begin
        failures++;
        if (failures < 6) $display("hb %0d: got %0d", n_hb, hb_sample);
      end
      if (n_hb < hsat_ref.size() && hb_sat !== hsat_ref[n_hb][0]) failures++;
      if (hb_sat) cnt_hb_sat++;
      n_hb++;
    end
    if (rst_n && out_valid) begin
      int t, a;
      checks += 2;
      if (n_out >= oref.size() || out_sample !== OUT_W'(oref[n_out])) begin
        failures++;
        if (failures < 6) $display("out %0d: got %0d", n_out, out_sample);
      end
      if (n_out < osat_ref.size() && corr_sat !== osat_ref[n_out][0]) failures++;
      if (corr_sat) cnt_corr_sat++;
      // amplitude statistics for the tone phases, after settling
      t = 64 * n_out;
      a = (out_sample < 0) ? -int'(out_sample) : int'(out_sample);
      if (t > P1 + P2 + 2000 && t < P1 + P2 + P3 && a > peak3) peak3 = a;
      if (t > P1 + P2 + P3 + 2000 && t < TOTAL && a > peak4) peak4 = a;
      n_out++;
    end
  end

  // ---- stimulus -----------------------------------------------------------
  function automatic logic signed [IN_W-1:0] tone(int i, real f_hz);
    real v;
    v = 31.0 * $sin(2.0 * 3.14159265358979 * f_hz * real'(i) / 1.28e6);
    return IN_W'($rtoi(v + ((v >= 0.0) ? 0.5 : -0.5)));
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n <= 1'b1;
    for (int i = 0; i < TOTAL; i++) begin
      @(negedge clk);
      in_valid <= 1'b1;
      if (i < P1)                in_sample <= IN_W'($urandom);
      else if (i < P1 + P2)      in_sample <= (((i - P1) / 1024) % 2 == 0) ? IN_W'(31) : -IN_W'(32);
      else if (i < P1 + P2 + P3) in_sample <= tone(i, 4.0e3);
      else                       in_sample <= tone(i, 30.0e3);
    end
    @(negedge clk) in_valid <= 1'b0;
    repeat (200) @(posedge clk);

    // rates: one output per 16, 32 and 64 inputs
    checks += 3;
    if (n_cic != TOTAL / 16) failures++;
    if (n_hb  != TOTAL / 32) failures++;
    if (n_out != TOTAL / 64) failures++;
    // workload: pass band and stop band
    checks += 2;
    if (peak3 < 3700 || peak3 > 4095) failures++;
    if (peak4 > 200) failures++;
    // every mechanism must have happened
    checks += 7;
    if (n_cic == 0)        failures++;
    if (cnt_wrap == 0)     failures++;
    if (n_hb == 0)         failures++;
    if (n_out == 0)        failures++;
    if (cnt_neg_sign == 0) failures++;
    if (cnt_hb_sat == 0)   failures++;
    if (cnt_corr_sat == 0) failures++;
    $display("cic=%0d hb=%0d out=%0d wraps=%0d neg_sign=%0d hb_sat=%0d corr_sat=%0d",
             n_cic, n_hb, n_out, cnt_wrap, cnt_neg_sign, cnt_hb_sat, cnt_corr_sat);
    $display("4 kHz peak=%0d (ideal 3968)  30 kHz peak=%0d", peak3, peak4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
