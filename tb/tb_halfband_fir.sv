// tb_halfband_fir: feeds random 11-bit samples (including full-scale steps
// that overshoot) into the half-band filter and compares every kept output
// with a direct-form convolution of the same coefficients, keeping the 2nd,
// 4th, ... results, rounded to one extra fractional bit and saturated to 12
// bits. Checks the decimation ratio, the one-clock latency and the
// saturation flag; saturation must occur at least once.
module tb_halfband_fir;
  import decim_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [CIC_OUT_W-1:0] in_sample = '0;
  logic out_valid, sat;
  logic signed [HB_OUT_W-1:0] out_sample;
  int checks = 0, failures = 0, n_in = 0, n_out = 0, n_sat = 0;
  longint xs [$];
  logic   pend = 1'b0;
  longint exp_q, exp_sat;

  halfband_fir dut (.clk, .rst_n, .in_valid, .in_sample, .out_valid, .out_sample, .sat);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void model(output longint q, output longint s);
    longint acc = 0;
    int n = xs.size() - 1;
    for (int k = 0; k < int'(TAPS); k++)
      if (n - k >= 0) acc += longint'(HB_COEF[k]) * xs[n-k];
    q = (acc + (1 <<< 13)) >>> 14;
    s = 0;
    if (q > 2047)  begin q = 2047;  s = 1; end
    if (q < -2048) begin q = -2048; s = 1; end
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      // output must appear exactly one clock after every second input
      checks++;
      if (out_valid !== pend) failures++;
      if (pend && out_valid) begin
        checks += 2;
        if (out_sample !== HB_OUT_W'(exp_q)) begin
          failures++;
          if (failures < 6) $display("out %0d: got %0d expected %0d", n_out, out_sample, exp_q);
        end
        if (sat !== exp_sat[0]) failures++;
        if (sat) n_sat++;
        n_out++;
      end
      pend <= 1'b0;
      if (in_valid) begin
        xs.push_back(longint'(in_sample));
        n_in++;
        if (n_in % 2 == 0) begin
          longint q, s;
          model(q, s);
          exp_q   <= q;
          exp_sat <= s;
          pend    <= 1'b1;
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 4000; i++) begin
      int r;
      @(negedge clk);
      in_valid <= ($urandom_range(0, 2) != 0);
      r = i / 100;
      if (r % 4 == 1)      in_sample <= -CIC_OUT_W'(1024);
      else if (r % 4 == 3) in_sample <= CIC_OUT_W'(1023);
      else                 in_sample <= CIC_OUT_W'($urandom);
    end
    @(negedge clk) in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    checks += 2;
    if (n_out != n_in / 2) failures++;
    if (n_sat == 0) failures++;
    $display("inputs=%0d outputs=%0d saturated=%0d", n_in, n_out, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
