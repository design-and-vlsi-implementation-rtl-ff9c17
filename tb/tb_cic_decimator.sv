// tb_cic_decimator: drives the 5-stage, divide-by-16 CIC decimator with
// random 6-bit samples (with a random input enable) followed by full-scale
// negative and positive constant runs, and compares every output with a
// direct convolution by the impulse response (16-sample boxcar)^5, sampled
// at every 16th input and truncated to the top 11 of 26 bits. Also checks
// the output rate (one output per 16 inputs) and the latency (out_valid 6
// clocks after the 16th input of a group).
module tb_cic_decimator;
  import decim_pkg::*;
  localparam int unsigned N = CIC_N, M = CIC_M;
  localparam int unsigned HLEN = N * (M - 1) + 1;   // 76
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IN_W-1:0] in_sample = '0;
  logic out_valid;
  logic signed [CIC_OUT_W-1:0] out_sample;
  int checks = 0, failures = 0;
  longint h [HLEN];
  longint xs [$];            // accepted inputs
  int     tick_cycle [$];    // cycle of every 16th accepted input
  int     cycle = 0, n_out = 0;

  cic_decimator dut (.clk, .rst_n, .in_valid, .in_sample, .out_valid, .out_sample);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // impulse response: repeated convolution with a boxcar of length M
  initial begin
    longint t [HLEN];
    for (int i = 0; i < int'(HLEN); i++) h[i] = (i == 0);
    for (int s = 0; s < int'(N); s++) begin
      for (int i = 0; i < int'(HLEN); i++) begin
        t[i] = 0;
        for (int k = 0; k < int'(M); k++) if (i - k >= 0) t[i] += h[i-k];
      end
      h = t;
    end
  end

  function automatic longint yfull(int n);
    longint acc = 0;
    for (int k = 0; k < int'(HLEN); k++)
      if (n - k >= 0 && n - k < xs.size()) acc += h[k] * xs[n-k];
    return acc;
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && in_valid) begin
      xs.push_back(longint'(in_sample));
      if (xs.size() % M == 0) tick_cycle.push_back(cycle);
    end
    if (rst_n && out_valid) begin
      longint e;
      // output j corresponds to input index M*j + M - 1 - N
      e = yfull(int'(M) * n_out + int'(M) - 1 - int'(N)) >>> (IN_W + N*$clog2(M) - CIC_OUT_W);
      checks += 2;
      if (out_sample !== CIC_OUT_W'(e)) begin
        failures++;
        if (failures < 6) $display("out %0d: got %0d expected %0d", n_out, out_sample, e);
      end
      if (cycle - tick_cycle[n_out] != int'(N) + 1) begin
        failures++;
        $display("latency %0d", cycle - tick_cycle[n_out]);
      end
      n_out++;
    end
  end

  task automatic drive(int count, int mode);
    for (int i = 0; i < count; i++) begin
      @(negedge clk);
      in_valid  <= (mode != 0) ? 1'b1 : ($urandom_range(0, 3) != 0);
      in_sample <= (mode == 0) ? IN_W'($urandom) :
                   (mode == 1) ? -IN_W'(32) : IN_W'(31);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    drive(3000, 0);
    drive(400, 1);
    drive(400, 2);
    drive(300, 0);
    @(negedge clk) in_valid <= 1'b0;
    repeat (20) @(posedge clk);
    checks++;
    if (n_out != xs.size() / M) failures++;
    // a settled full-scale negative input must give exactly -1024
    $display("outputs=%0d inputs=%0d", n_out, xs.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
