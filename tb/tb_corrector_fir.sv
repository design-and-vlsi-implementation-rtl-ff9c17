// tb_corrector_fir: feeds random 12-bit samples (with full-scale runs that
// overshoot) 32 clocks apart into the corrector and compares every output
// with a direct 11-tap convolution of the full impulse response, keeping the
// 2nd, 4th, ... results, rounded to one extra fractional bit and saturated
// to 13 bits. Checks the decimation ratio, the latency of WD+3 = 16 clocks
// after the kept input and the saturation flag.
module tb_corrector_fir;
  import decim_pkg::*;
  localparam int LAT = HB_OUT_W + 1 + 3;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [HB_OUT_W-1:0] in_sample = '0;
  logic out_valid, sat;
  logic signed [OUT_W-1:0] out_sample;
  int checks = 0, failures = 0, n_in = 0, n_out = 0, n_sat = 0, cycle = 0;
  longint xs [$];
  longint exp_q [$];
  longint exp_s [$];
  int     exp_c [$];

  corrector_fir dut (.clk, .rst_n, .in_valid, .in_sample, .out_valid, .out_sample, .sat);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && in_valid) begin
      xs.push_back(longint'(in_sample));
      n_in++;
      if (n_in % 2 == 0) begin
        longint acc, q, s;
        int n;
        acc = 0;
        s = 0;
        n = xs.size() - 1;
        for (int k = 0; k < int'(TAPS); k++)
          if (n - k >= 0) acc += longint'(CORR_COEF[k]) * xs[n-k];
        q = (acc + (1 <<< 13)) >>> 14;
        if (q > 4095)  begin q = 4095;  s = 1; end
        if (q < -4096) begin q = -4096; s = 1; end
        exp_q.push_back(q); exp_s.push_back(s); exp_c.push_back(cycle + LAT);
      end
    end
    if (rst_n && out_valid) begin
      checks += 3;
      if (exp_q.size() == 0) failures++;
      else begin
        longint q, s;
        int c;
        q = exp_q.pop_front();
        s = exp_s.pop_front();
        c = exp_c.pop_front();
        if (out_sample !== OUT_W'(q)) begin
          failures++;
          if (failures < 6) $display("out %0d: got %0d expected %0d", n_out, out_sample, q);
        end
        if (sat !== s[0]) failures++;
        if (cycle != c) begin failures++; if (failures < 6) $display("latency off by %0d", cycle - c); end
        if (sat) n_sat++;
      end
      n_out++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 1200; i++) begin
      int r;
      r = i / 60;
      repeat (31) @(negedge clk);
      in_valid <= 1'b1;
      if (r % 4 == 1)      in_sample <= -HB_OUT_W'(2048);
      else if (r % 4 == 3) in_sample <= HB_OUT_W'(2047);
      else                 in_sample <= HB_OUT_W'($urandom);
      @(negedge clk) in_valid <= 1'b0;
    end
    repeat (40) @(posedge clk);
    checks += 2;
    if (n_out != n_in / 2 || exp_q.size() != 0) failures++;
    if (n_sat == 0) failures++;
    $display("inputs=%0d outputs=%0d saturated=%0d", n_in, n_out, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
