// cic_decimator: N-stage cascaded integrator-comb decimator (first filter
// stage of the chain).
//
// Structure (as specified): N integrators at the oversampling rate, a
// divide-by-M rate change, then N combs with differential delay D at the low
// rate. H(z) = ((1 - z^-(M*D)) / (1 - z^-1))^N, a gain of (M*D)^N.
// With the defaults (N = 5, M = 16, D = 1, 6-bit input) the internal words
// need IN_W + N*log2(M*D) = 26 bits; every stage is that wide and wraps
// around in two's complement, which the combs undo. The 11-bit output is the
// top 11 bits of the 26-bit result (truncation, i.e. floor(y / 2**15)); the
// choice of truncation rather than rounding is this design's own.
//
// Timing: one input sample per clock with in_valid = 1 (1.28 MHz in the
// specification; the clock may be faster with in_valid as enable). The
// integrators form a registered chain, so the k-th integrator lags the first
// by k-1 samples. On every M-th accepted sample the clock divider picks the
// last integrator's value and the combs process it, one clock per comb stage.
// out_valid pulses once per M input samples, N+1 clocks after the M-th input.
// Output j equals the full-rate filter output y(M*j + M - 1 - N), where y(t)
// is the convolution with the impulse response including input t.
// Reset: active low, synchronous, clears every register.
module cic_decimator
  import decim_pkg::*;
#(
  parameter int unsigned N_STAGES = CIC_N,
  parameter int unsigned M        = CIC_M,
  parameter int unsigned D        = CIC_D,
  parameter int unsigned IW       = IN_W,
  parameter int unsigned OW       = CIC_OUT_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_sample,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_sample
);

  localparam int unsigned W = IW + N_STAGES * $clog2(M * D);

  logic signed [W-1:0] integ [N_STAGES];
  logic signed [W-1:0] comb_y [N_STAGES];
  logic                comb_v [N_STAGES];
  logic                tick;

  // ---- integrator section (oversampling rate) ----------------------------
  for (genvar k = 0; k < int'(N_STAGES); k++) begin : g_int
    logic signed [W-1:0] int_in;
    if (k == 0) begin : g_first
      assign int_in = W'(in_sample);   // sign extension
    end else begin : g_next
      assign int_in = integ[k-1];
    end
    cic_integrator #(.W(W)) u_int (
      .clk, .rst_n, .en(in_valid), .x(int_in), .y(integ[k])
    );
  end

  // ---- rate change by M --------------------------------------------------
  clock_divider #(.M(M)) u_div (
    .clk, .rst_n, .en(in_valid), .tick, .phase()
  );

  // ---- comb section (low rate) -------------------------------------------
  for (genvar k = 0; k < int'(N_STAGES); k++) begin : g_comb
    logic signed [W-1:0] c_in;
    logic                c_vin;
    if (k == 0) begin : g_first
      assign c_in  = integ[N_STAGES-1];
      assign c_vin = tick;
    end else begin : g_next
      assign c_in  = comb_y[k-1];
      assign c_vin = comb_v[k-1];
    end
    cic_comb #(.W(W), .D(D)) u_comb (
      .clk, .rst_n, .in_valid(c_vin), .x(c_in),
      .out_valid(comb_v[k]), .y(comb_y[k])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      out_valid <= comb_v[N_STAGES-1];
      if (comb_v[N_STAGES-1]) out_sample <= comb_y[N_STAGES-1][W-1 -: OW];
    end
  end

endmodule
