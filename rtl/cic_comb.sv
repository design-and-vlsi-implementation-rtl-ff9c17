// cic_comb: one differentiator (comb) stage of the CIC filter.
//
// y = x - x delayed by D samples of the low (decimated) rate, i.e.
// H(z) = 1 - z^-D at the low rate, which equals 1 - z^-(M*D) referred to the
// oversampling rate. The arithmetic is two's complement modulo 2**W, so the
// wrap-around of the preceding integrators cancels here.
//
// Interface: a sample x is accepted when in_valid = 1. y is registered and
// out_valid pulses one clock later, so a cascade of K combs has a latency of
// K clocks of the fast clock while all stages still step at the low rate.
// Reset (active low, synchronous) clears the delay line.
module cic_comb #(
  parameter int unsigned W = 26,
  parameter int unsigned D = 1   // differential delay
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic                out_valid,
  output logic signed [W-1:0] y
);

  logic signed [W-1:0] dly [D];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(D); i++) dly[i] <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y      <= x - dly[D-1];
        dly[0] <= x;
        for (int i = 1; i < int'(D); i++) dly[i] <= dly[i-1];
      end
    end
  end

endmodule
