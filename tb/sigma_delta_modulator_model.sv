// sigma_delta_modulator_model: behavioural (not synthesizable) model of a
// first-order sigma-delta modulator, for testbenches only.
//
// The analog input u (a real number in -1..1) is summed with the negated
// feedback of a 1-bit DAC, integrated, and quantised to one bit on every
// clock: v <= v + u - y, y = sign(v). The density of ones in the output
// follows the input. The bit is delivered as a 6-bit two's complement word,
// +LEVEL for a one and -LEVEL for a zero, so it can drive the decimation
// filter's 6-bit input directly. bit_out is the raw 1-bit stream.
module sigma_delta_modulator_model #(
  parameter int LEVEL = 31
) (
  input  logic              clk,
  input  logic              rst_n,
  input  real               u,
  output logic              bit_out,
  output logic signed [5:0] word_out
);
  real v = 0.0;

  always @(posedge clk) begin
    if (!rst_n) begin
      v       <= 0.0;
      bit_out <= 1'b0;
    end else begin
      v       <= v + u - (bit_out ? 1.0 : -1.0);
      bit_out <= (v + u - (bit_out ? 1.0 : -1.0)) >= 0.0;
    end
  end

  assign word_out = bit_out ? 6'(LEVEL) : -6'(LEVEL);
endmodule
