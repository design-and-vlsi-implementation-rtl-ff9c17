// tb_cic_integrator: checks the accumulator y(n) = x(n) + y(n-1) against a
// reference sum kept modulo 2**W, with a random enable and random inputs
// large enough to make the register wrap around many times.
module tb_cic_integrator;
  localparam int unsigned W = 8;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [W-1:0] x = '0, y;
  int checks = 0, failures = 0, wraps = 0;
  longint ref_sum = 0;   // unbounded reference

  cic_integrator #(.W(W)) dut (.clk, .rst_n, .en, .x, .y);

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
    if (y !== '0) failures++;
    checks++;
    for (int i = 0; i < 2000; i++) begin
      en <= ($urandom_range(0, 3) != 0);
      x  <= W'($urandom);
      @(posedge clk);
      if (en) begin
        longint prev_sum;
        prev_sum = ref_sum;
        ref_sum = ref_sum + longint'(x);
        if ((prev_sum >>> W) != (ref_sum >>> W)) wraps++;
      end
      #1;
      checks++;
      if (y !== W'(ref_sum)) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: y=%0d ref=%0d", i, y, W'(ref_sum));
      end
    end
    checks++;
    if (wraps == 0) failures++;   // wrap-around must have been exercised
    $display("wrap-arounds exercised: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
