// halfband_fir: 11-tap half-band FIR in transposed direct form, decimating
// by 2 (second filter stage: 80 kHz, 11-bit in -> 40 kHz, 12-bit out).
//
// In a half-band filter every odd tap except the centre one is zero. For a
// decimate-by-2 output y(2m+1) = sum_k h[k] x(2m+1-k) this splits the filter
// into two phases that each run at the output rate (40 kHz):
//   * the even taps h[0], h[2], ..., h[10] see only the odd-numbered inputs
//     x(2m+1) and form a 6-tap filter in transposed direct form: the new
//     input is multiplied by all six taps at once and the products are added
//     into a chain of partial-sum registers,
//         e   = h[0]*x + r[1],  r[j] <= h[2j]*x + r[j+1],  r[5] <= h[10]*x;
//   * the centre tap h[5] = 1/2 sees only the even-numbered inputs, delayed
//     by two of them: h[5] * x(2m-4).
// So the transposed chain steps once per output instead of once per input,
// and the 4 zero taps cost nothing. Products are constant multiplications.
//
// Inputs are numbered from 0 after reset; the output is produced with every
// odd-numbered (2nd, 4th, ...) input. The Q1.15 result is rounded to keep one
// fractional bit more than the input (round half up) and saturated to OW
// bits. The 11 taps, the half-band property and the transposed form follow
// the specification; running the transposed chain at the output rate by
// splitting it into phases, the coefficient values, rounding, saturation and
// the output phase are this design's own.
//
// Interface: a sample is accepted when in_valid = 1; out_valid pulses one
// clock after every odd-numbered accepted sample, with out_sample. sat pulses
// with out_valid when that output was saturated. Reset: active low,
// synchronous.
module halfband_fir
  import decim_pkg::*;
#(
  parameter int unsigned IW      = CIC_OUT_W,
  parameter int unsigned OW      = HB_OUT_W,
  parameter coef_arr_t   COEF    = HB_COEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_sample,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_sample,
  output logic                 sat
);

  localparam int unsigned NE    = (TAPS + 1) / 2;    // even taps: 6
  localparam int unsigned CTR   = (TAPS - 1) / 2;    // centre tap: 5
  localparam int unsigned EVD   = CTR / 2;           // even-input delay: 2
  localparam int unsigned PW    = IW + COEF_W;       // product width
  localparam int unsigned AW    = PW + 2;            // partial-sum width
  localparam int unsigned SHIFT = COEF_FRAC - (OW - IW);

  logic signed [AW-1:0] r [1:NE-1];                  // transposed chain
  logic signed [IW-1:0] ev [EVD+1];                  // even-input delay line
  logic signed [AW-1:0] prod [NE];
  logic signed [AW-1:0] ctr_prod;
  logic signed [AW-1:0] y_full;
  logic signed [AW-1:0] y_rnd;
  logic signed [AW-SHIFT-1:0] y_scaled;
  logic                 odd;    // next input is odd-numbered

  always_comb begin
    for (int j = 0; j < int'(NE); j++)
      prod[j] = AW'(in_sample) * AW'(COEF[2*j]);
    ctr_prod = AW'(ev[EVD]) * AW'(COEF[CTR]);
    y_full   = prod[0] + r[1] + ctr_prod;
    y_rnd    = y_full + (AW'(1) <<< (SHIFT - 1));
    y_scaled = y_rnd[AW-1:SHIFT];
  end

  // saturation limits of the OW-bit output
  localparam logic signed [AW-SHIFT-1:0] MAXV = (AW-SHIFT)'((1 <<< (OW - 1)) - 1);
  localparam logic signed [AW-SHIFT-1:0] MINV = -(AW-SHIFT)'(1 <<< (OW - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 1; j < int'(NE); j++) r[j] <= '0;
      for (int j = 0; j <= int'(EVD); j++) ev[j] <= '0;
      odd        <= 1'b0;
      out_valid  <= 1'b0;
      out_sample <= '0;
      sat        <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      sat       <= 1'b0;
      if (in_valid) begin
        odd <= ~odd;
        if (!odd) begin
          // even-numbered input: only the centre-tap delay line moves
          ev[0] <= in_sample;
          for (int j = 1; j <= int'(EVD); j++) ev[j] <= ev[j-1];
        end else begin
          // odd-numbered input: step the transposed chain, emit an output
          for (int j = 1; j < int'(NE) - 1; j++) r[j] <= prod[j] + r[j+1];
          r[NE-1]   <= prod[NE-1];
          out_valid <= 1'b1;
          if (y_scaled > MAXV) begin
            out_sample <= MAXV[OW-1:0];
            sat        <= 1'b1;
          end else if (y_scaled < MINV) begin
            out_sample <= MINV[OW-1:0];
            sat        <= 1'b1;
          end else begin
            out_sample <= y_scaled[OW-1:0];
          end
        end
      end
    end
  end

endmodule
