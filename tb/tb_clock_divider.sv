// tb_clock_divider: with a random enable, tick must come exactly with every
// 16th enabled clock and phase must count the enabled clocks modulo 16.
module tb_clock_divider;
  localparam int unsigned M = 16;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic tick;
  logic [$clog2(M)-1:0] phase;
  int checks = 0, failures = 0, count = 0, ticks = 0;

  clock_divider #(.M(M)) dut (.clk, .rst_n, .en, .tick, .phase);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      en <= ($urandom_range(0, 2) != 0);
      #1;
      checks += 2;
      if (phase !== ($clog2(M))'(count % M)) failures++;
      if (tick !== (en && (count % M == M - 1))) failures++;
      @(posedge clk);
      if (en) begin
        if (count % M == M - 1) ticks++;
        count++;
      end
    end
    checks++;
    if (ticks != count / M) failures++;
    $display("ticks=%0d enabled=%0d", ticks, count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
