// clock_divider: the rate-change switch between the integrator and comb
// sections of a CIC decimator.
//
// It divides the oversampling rate by M. Instead of producing a second clock
// it counts the accepted input samples (en = 1) and raises tick for one clock
// on every M-th of them, so the comb section runs as a clock-enabled block on
// the same clock. tick is combinational and coincides with the M-th en;
// phase is the number of samples counted since the last tick.
// Reset (active low, synchronous) clears the count, so the first tick comes
// with the M-th sample after reset.
module clock_divider #(
  parameter int unsigned M = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  output logic                 tick,
  output logic [$clog2(M)-1:0] phase
);

  assign tick = en && (phase == ($clog2(M))'(M - 1));

  always_ff @(posedge clk) begin
    if (!rst_n)     phase <= '0;
    else if (tick)  phase <= '0;
    else if (en)    phase <= phase + 1'b1;
  end

endmodule
