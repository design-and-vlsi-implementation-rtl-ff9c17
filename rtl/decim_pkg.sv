// decim_pkg: word widths, rates and filter coefficients shared by the
// hearing-aid decimation filter.
//
// The chain takes 6-bit two's complement samples at the oversampling rate
// (1.28 MHz), divides the rate by 16 in a 5-stage CIC filter (11-bit words at
// 80 kHz), by 2 in an 11-tap half-band FIR (12-bit words at 40 kHz) and by 2
// again in an 11-tap droop-corrector FIR (13-bit words at 20 kHz). Rates,
// stage count, tap counts and word widths follow the design specification.
//
// The coefficient values are this design's own: equiripple/least-squares
// designs quantised to 16-bit two's complement with 15 fractional bits
// (Q1.15) with a DC gain of exactly 1 (the half-band taps were searched
// directly in integers under that constraint).
//   Half-band : 11 taps, pass band 0-12 kHz, stop band 28-40 kHz at 80 kHz.
//               Odd taps zero except the centre tap, which is exactly 1/2.
//   Corrector : 11 taps at 40 kHz, pass band 0-4 kHz shaped as the inverse of
//               the CIC droop, stop band 15-20 kHz.
package decim_pkg;

  // ---- word widths --------------------------------------------------------
  localparam int unsigned IN_W     = 6;   // input sample width
  localparam int unsigned CIC_N    = 5;   // integrator / comb stages
  localparam int unsigned CIC_M    = 16;  // CIC rate change factor
  localparam int unsigned CIC_D    = 1;   // differential delay
  localparam int unsigned CIC_OUT_W = 11; // CIC output width
  localparam int unsigned HB_OUT_W = 12;  // half-band output width
  localparam int unsigned OUT_W    = 13;  // corrector (final) output width

  // ---- coefficients -------------------------------------------------------
  localparam int unsigned COEF_W    = 16; // coefficient word, Q1.15
  localparam int unsigned COEF_FRAC = 15;
  localparam int unsigned TAPS      = 11; // taps of both FIR stages

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t coef_arr_t [TAPS];

  // Half-band impulse response h[0..10]; h[5] = 0.5, h[1,3,7,9] = 0.
  localparam coef_arr_t HB_COEF = '{
    16'sd575, 16'sd0, -16'sd2346, 16'sd0, 16'sd9963, 16'sd16384,
    16'sd9963, 16'sd0, -16'sd2346, 16'sd0, 16'sd575
  };

  // Corrector impulse response f[0..10], symmetric.
  localparam coef_arr_t CORR_COEF = '{
    16'sd377, -16'sd67, -16'sd2155, -16'sd48, 16'sd9979, 16'sd16596,
    16'sd9979, -16'sd48, -16'sd2155, -16'sd67, 16'sd377
  };

  // Symmetric folding: the corrector's distributed-arithmetic unit sees six
  // inputs u[k] = x[n-k] + x[n-10+k] (k = 0..4) and u[5] = x[n-5], so it
  // needs only the first half of the impulse response.
  localparam int unsigned CORR_UNIQ = (TAPS + 1) / 2;  // 6
  typedef int da_coef_arr_t [CORR_UNIQ];
  localparam da_coef_arr_t CORR_UNIQ_COEF = '{
    377, -67, -2155, -48, 9979, 16596
  };

endpackage
