// tb_sigma_delta_workload: the complete converter of a hearing aid, with a
// behavioural first-order sigma-delta modulator in front of the decimation
// filter, both on the 1.28 MHz oversampling clock.
//
// A 4 kHz sine of amplitude 0.5 (the top of the 0-4 kHz band) is modulated
// to a 1-bit stream and decimated by 64. At the 20 kHz output the sine must
// be recovered: a least-squares fit of a 4 kHz sine/cosine pair over the
// settled outputs must give an amplitude within 5 % of 0.5 * 31 * 128 = 1984
// (the chain's gain is 128 per input LSB and a one is coded as +31) and the
// residual after removing the fit must be below 3 % of that amplitude in RMS.
// Output count and rate are checked as well.
module tb_sigma_delta_workload;
  import decim_pkg::*;
  localparam int NIN = 64 * 800;      // 800 output samples
  localparam real FTONE = 4.0e3, FS_OUT = 20.0e3, AMP = 0.5;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  real  u = 0.0;
  logic sd_bit;
  logic signed [IN_W-1:0] sd_word;
  logic out_valid, cic_valid, hb_valid, hb_sat, corr_sat;
  logic signed [OUT_W-1:0]     out_sample;
  logic signed [CIC_OUT_W-1:0] cic_sample;
  logic signed [HB_OUT_W-1:0]  hb_sample;
  int checks = 0, failures = 0, n_out = 0, n_in = 0, ones = 0;
  real ys [$];

  sigma_delta_modulator_model u_mod (.clk, .rst_n, .u, .bit_out(sd_bit), .word_out(sd_word));

  decimation_filter_top dut (
    .clk, .rst_n, .in_valid, .in_sample(sd_word), .out_valid, .out_sample,
    .cic_valid, .cic_sample, .hb_valid, .hb_sample, .hb_sat, .corr_sat
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NIN + 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      n_in++;
      if (sd_bit) ones++;
    end
    if (rst_n && out_valid) begin
      ys.push_back(real'(out_sample));
      n_out++;
    end
  end

  initial begin
    real sc, ss, a, b, amp, res, ref_amp;
    int first, cnt;
    sc  = 0.0;
    ss  = 0.0;
    res = 0.0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n <= 1'b1;
    for (int i = 0; i < NIN; i++) begin
      @(negedge clk);
      u        = AMP * $sin(2.0 * PI * FTONE * real'(i) / 1.28e6);
      in_valid <= 1'b1;
    end
    @(negedge clk) in_valid <= 1'b0;
    repeat (200) @(posedge clk);

    // least-squares fit over the settled outputs (skip the first 40);
    // over whole tone periods (5 outputs each) sin and cos are orthogonal
    first = 40;
    cnt   = ((ys.size() - first) / 5) * 5;
    for (int k = first; k < first + cnt; k++) begin
      sc += ys[k] * $cos(2.0 * PI * FTONE * real'(k) / FS_OUT);
      ss += ys[k] * $sin(2.0 * PI * FTONE * real'(k) / FS_OUT);
    end
    a   = 2.0 * sc / real'(cnt);
    b   = 2.0 * ss / real'(cnt);
    amp = $sqrt(a * a + b * b);
    for (int k = first; k < first + cnt; k++) begin
      real e;
      e = ys[k] - a * $cos(2.0 * PI * FTONE * real'(k) / FS_OUT)
                - b * $sin(2.0 * PI * FTONE * real'(k) / FS_OUT);
      res += e * e;
    end
    res = $sqrt(res / real'(cnt));
    ref_amp = AMP * 31.0 * 128.0;

    checks += 4;
    if (n_out != NIN / 64) failures++;
    if (amp < 0.95 * ref_amp || amp > 1.05 * ref_amp) failures++;
    if (res > 0.03 * ref_amp) failures++;
    if (ones == 0 || ones == n_in) failures++;   // the modulator must toggle
    $display("outputs=%0d amplitude=%0.1f (expected %0.1f) residual rms=%0.2f ones=%0d of %0d",
             n_out, amp, ref_amp, res, ones, n_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
