// decimation_filter_top: three-stage decimation filter for the digital
// output of an oversampling (sigma-delta) converter in a hearing aid.
//
// 6-bit samples arrive at 1.28 MHz. A 5-stage CIC filter divides the rate by
// 16 (80 kHz, 11 bits), an 11-tap half-band FIR in transposed direct form
// divides by 2 (40 kHz, 12 bits), and an 11-tap droop-corrector FIR in
// direct form, whose products are summed by distributed arithmetic, divides
// by 2 again (20 kHz, 13 bits). Overall the rate drops by 64 and the useful
// band is 0-4 kHz. The stage order, rates, tap counts and word widths follow
// the specification; see the stage modules for what is this design's own.
//
// Interface and timing: one clock, in_valid marks an input sample (tie it to
// 1 when the clock is the 1.28 MHz oversampling clock; a faster clock with a
// sample enable also works as long as samples are at least 1 clock apart).
// out_valid pulses once per 64 input samples. The intermediate stage outputs
// and the saturation flags of the two FIR stages are brought out for
// observation. Reset: active low, synchronous.
module decimation_filter_top
  import decim_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic signed [IN_W-1:0]      in_sample,
  output logic                        out_valid,
  output logic signed [OUT_W-1:0]     out_sample,
  // observation of the intermediate rates
  output logic                        cic_valid,
  output logic signed [CIC_OUT_W-1:0] cic_sample,
  output logic                        hb_valid,
  output logic signed [HB_OUT_W-1:0]  hb_sample,
  output logic                        hb_sat,
  output logic                        corr_sat
);

  cic_decimator u_cic (
    .clk, .rst_n,
    .in_valid, .in_sample,
    .out_valid(cic_valid), .out_sample(cic_sample)
  );

  halfband_fir u_hb (
    .clk, .rst_n,
    .in_valid(cic_valid), .in_sample(cic_sample),
    .out_valid(hb_valid), .out_sample(hb_sample), .sat(hb_sat)
  );

  corrector_fir u_corr (
    .clk, .rst_n,
    .in_valid(hb_valid), .in_sample(hb_sample),
    .out_valid, .out_sample, .sat(corr_sat)
  );

endmodule
