// tb_cic_comb: checks y = x - x(delayed by D accepted samples) modulo 2**W,
// and that out_valid follows in_valid by one clock, for D = 1 and D = 2.
module tb_cic_comb;
  localparam int unsigned W = 10;
  logic clk = 1'b0, rst_n = 1'b0, vin = 1'b0;
  logic signed [W-1:0] x = '0, y1, y2;
  logic v1, v2;
  int checks = 0, failures = 0;
  logic signed [W-1:0] hist [$];

  cic_comb #(.W(W), .D(1)) dut1 (.clk, .rst_n, .in_valid(vin), .x, .out_valid(v1), .y(y1));
  cic_comb #(.W(W), .D(2)) dut2 (.clk, .rst_n, .in_valid(vin), .x, .out_valid(v2), .y(y2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [W-1:0] past(int d);
    return (hist.size() > d) ? hist[hist.size() - 1 - d] : '0;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 1500; i++) begin
      logic was_valid;
      vin <= ($urandom_range(0, 2) == 0);
      x   <= W'($urandom);
      @(posedge clk);
      was_valid = vin;
      if (vin) hist.push_back(x);
      #1;
      checks++;
      if (v1 !== was_valid || v2 !== was_valid) failures++;
      if (was_valid) begin
        logic signed [W-1:0] e1, e2;
        e1 = past(0) - past(1);
        e2 = past(0) - past(2);
        checks += 2;
        if (y1 !== e1) failures++;
        if (y2 !== e2) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
