// cic_integrator: one integrator (accumulator) stage of the CIC filter.
//
// y(n) = x(n) + y(n-1): a single-pole recursive filter with unity feedback.
// The register is W bits of two's complement and wraps around on overflow;
// this is intentional. As long as W covers the full gain of the whole CIC
// filter, the wrap-around cancels in the comb section and the final output is
// exact.
//
// Interface: x is accepted on every clock with en = 1; y is the registered
// accumulator and changes one clock after the accepted sample (it already
// includes that sample). Reset (active low, synchronous) clears the
// accumulator; the reset style is this design's choice.
module cic_integrator #(
  parameter int unsigned W = 26
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  always_ff @(posedge clk) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= y + x;   // modulo 2**W
  end

endmodule
