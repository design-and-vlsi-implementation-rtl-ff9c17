// corrector_fir: 11-tap symmetric FIR in direct form, decimating by 2 (last
// filter stage: 40 kHz, 12-bit in -> 20 kHz, 13-bit out). It compensates the
// pass-band droop of the CIC stage and removes what the half-band stage left
// above the final band.
//
// Direct form with symmetric folding: the inputs sit in an 11-word delay
// line; for each kept output the pairs that share a coefficient are added
// first, u[k] = x(n-k) + x(n-10+k) for k = 0..4 and u[5] = x(n-5), so only
// six products remain. Those six products are summed by a bit-serial
// distributed-arithmetic unit (da_processor, offset binary coding, 32-word
// table) in WD = IW+1 clocks, without any multiplier.
//
// Decimation: the delay line shifts on every input and an inner product is
// started after every second input (the 2nd, 4th, ... after reset). The
// Q1.15 result is rounded to one fractional bit more than the input
// (round-half-up) and saturated to OW bits. The structure follows the
// specification; coefficient values, rounding, saturation and the phase of
// the kept samples are this design's choices.
//
// Interface and timing: a sample is accepted when in_valid = 1. out_valid
// pulses WD + 3 clocks after every second accepted input. Inputs that start
// an inner product must be at least WD + 1 clocks apart (in the full chain
// they are 64 clocks apart). sat pulses with out_valid when the output was
// saturated. Reset: active low, synchronous.
module corrector_fir
  import decim_pkg::*;
#(
  parameter int unsigned IW   = HB_OUT_W,
  parameter int unsigned OW   = OUT_W,
  parameter bit          OBC  = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_sample,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_sample,
  output logic                 sat
);

  localparam int unsigned WD    = IW + 1;        // folded-pair width
  localparam int unsigned HALF  = CORR_UNIQ;     // 6
  localparam int unsigned LW    = COEF_W + $clog2(HALF) + 1;
  localparam int unsigned YW    = LW + 1 + WD;
  localparam int unsigned SHIFT = COEF_FRAC - (OW - IW);

  logic signed [IW-1:0]      dl [TAPS];       // dl[k] = x(n-k)
  logic [HALF-1:0][WD-1:0]   u;
  logic                      keep, start;
  logic                      da_busy, da_done, da_lsp;
  logic signed [YW-1:0]      da_y;
  logic signed [YW-1:0]      y_rnd;
  logic signed [YW-SHIFT-1:0] y_scaled;

  always_comb begin
    for (int k = 0; k < int'(HALF) - 1; k++)
      u[k] = WD'(dl[k]) + WD'(dl[TAPS-1-k]);
    u[HALF-1] = WD'(dl[HALF-1]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(TAPS); k++) dl[k] <= '0;
      keep  <= 1'b0;
      start <= 1'b0;
    end else begin
      start <= in_valid && keep;
      if (in_valid) begin
        dl[0] <= in_sample;
        for (int k = 1; k < int'(TAPS); k++) dl[k] <= dl[k-1];
        keep <= ~keep;
      end
    end
  end

  da_processor #(
    .N(HALF), .WD(WD), .WC(COEF_W), .OBC(OBC), .COEF(CORR_UNIQ_COEF)
  ) u_da (
    .clk, .rst_n, .start, .x(u),
    .busy(da_busy), .done(da_done), .y_lsp(da_lsp), .y(da_y)
  );

  localparam logic signed [YW-SHIFT-1:0] MAXV = (YW-SHIFT)'((1 <<< (OW - 1)) - 1);
  localparam logic signed [YW-SHIFT-1:0] MINV = -(YW-SHIFT)'(1 <<< (OW - 1));

  always_comb begin
    y_rnd    = da_y + (YW'(1) <<< (SHIFT - 1));
    y_scaled = y_rnd[YW-1:SHIFT];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_sample <= '0;
      sat        <= 1'b0;
    end else begin
      out_valid <= da_done;
      sat       <= 1'b0;
      if (da_done) begin
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

  // The serial low bits of the DA unit are not needed here: the full
  // parallel result is read when it is done.
  logic unused_lsp;
  assign unused_lsp = da_lsp ^ da_busy;

endmodule
