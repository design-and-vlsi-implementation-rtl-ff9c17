// tb_da_processor: checks the distributed-arithmetic inner product in both
// table variants (offset binary coding and the plain 2**N table) against
// sum_i COEF[i]*x[i] computed directly, for random and extreme 13-bit
// inputs. Also checks the timing (done exactly WD+1 clocks after start,
// busy for WD clocks) and, for the plain table, the serial low bits y_lsp.
// A second pair of instances uses the three-input example table (N = 3).
module tb_da_processor;
  import decim_pkg::*;
  localparam int unsigned N = CORR_UNIQ, WD = HB_OUT_W + 1;
  localparam int unsigned LW = COEF_W + $clog2(N) + 1, YW = LW + 1 + WD;
  localparam int C3 [3] = '{5, -3, 7};
  localparam int unsigned YW3 = COEF_W + $clog2(3) + 2 + 8;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0][WD-1:0] x = '0;
  logic [2:0][7:0] x3 = '0;
  logic busy_o, done_o, lsp_o, busy_p, done_p, lsp_p;
  logic busy_o3, done_o3, lsp_o3, busy_p3, done_p3, lsp_p3;
  logic signed [YW-1:0] y_o, y_p;
  logic signed [YW3-1:0] y_o3, y_p3;
  int checks = 0, failures = 0, neg_top = 0;

  da_processor dut_obc (.clk, .rst_n, .start, .x, .busy(busy_o), .done(done_o), .y_lsp(lsp_o), .y(y_o));
  da_processor #(.OBC(1'b0)) dut_plain (.clk, .rst_n, .start, .x, .busy(busy_p), .done(done_p), .y_lsp(lsp_p), .y(y_p));
  da_processor #(.N(3), .WD(8), .OBC(1'b1), .COEF(C3)) dut_obc3 (.clk, .rst_n, .start, .x(x3), .busy(busy_o3), .done(done_o3), .y_lsp(lsp_o3), .y(y_o3));
  da_processor #(.N(3), .WD(8), .OBC(1'b0), .COEF(C3)) dut_plain3 (.clk, .rst_n, .start, .x(x3), .busy(busy_p3), .done(done_p3), .y_lsp(lsp_p3), .y(y_p3));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 1500; t++) begin
      longint e, e3;
      logic [WD-1:0] serial;
      int lat;
      e = 0;
      e3 = 0;
      for (int i = 0; i < int'(N); i++) begin
        case ($urandom_range(0, 5))
          0:       x[i] = {1'b1, {(WD-1){1'b0}}};   // most negative
          1:       x[i] = {1'b0, {(WD-1){1'b1}}};   // most positive
          default: x[i] = WD'($urandom);
        endcase
        e += longint'(CORR_UNIQ_COEF[i]) * longint'($signed(x[i]));
      end
      if (x[N-1][WD-1]) neg_top++;
      for (int i = 0; i < 3; i++) begin
        x3[i] = 8'($urandom);
        e3 += longint'(C3[i]) * longint'($signed(x3[i]));
      end
      @(negedge clk) start <= 1'b1;
      @(negedge clk) start <= 1'b0;
      lat = 1;
      serial = '0;
      for (int c = 0; c < int'(WD); c++) begin
        checks++;
        if (!busy_o || !busy_p || done_o) failures++;
        serial[c] = lsp_p;
        @(negedge clk);
        lat++;
      end
      checks += 8;
      if (!done_o || !done_p || busy_o || busy_p) begin
        failures++;
        $display("timing: done after %0d clocks not seen", lat);
      end
      if (y_o !== YW'(e)) begin failures++; if (failures < 6) $display("obc y=%0d e=%0d", y_o, e); end
      if (y_p !== YW'(e)) begin failures++; if (failures < 6) $display("plain y=%0d e=%0d", y_p, e); end
      if (serial !== WD'(e)) failures++;
      if (y_o3 !== YW3'(e3)) failures++;
      if (y_p3 !== YW3'(e3)) failures++;
      if (busy_o3 || busy_p3) failures++;  // 8-bit units finished earlier
      if (lat != int'(WD) + 1) failures++;
      @(negedge clk);
    end
    checks++;
    if (neg_top == 0) failures++;   // sign-controlled table half must be used
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
