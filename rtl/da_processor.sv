// da_processor: distributed-arithmetic inner-product unit,
// y = sum_i COEF[i] * x[i], for N two's complement inputs of WD bits and
// constant coefficients.
//
// How it works: the inputs are loaded into shift registers and consumed one
// bit position per clock, least significant bit first. The N bits of one
// position address a look-up table holding every possible sum of the
// coefficients. The looked-up word is added to the accumulator (subtracted
// for the sign-bit position), the sum is shifted right by one, and the bit
// that falls out is the next serial output bit y_lsp. After WD clocks the
// accumulator holds the upper part of the result and the shifted-out bits
// the lower part.
//
// OBC = 1 selects offset binary coding: each bit is read as +1/-1 instead of
// 1/0, which makes the table antisymmetric, so only 2**(N-1) words are
// stored. The top input's bit selects the sign of the looked-up word and
// inverts the other address bits; the accumulator starts from -A0
// (A0 = sum of the coefficients) instead of zero, and the final sum equals
// 2*y, so y is taken one bit higher. OBC = 0 is the plain 2**N-word table.
// The table is computed at elaboration from COEF; both variants follow the
// distributed-arithmetic scheme described for this filter, the bit-level
// register widths and the handshake are this design's own.
//
// Interface and timing: pulse start for one clock while idle (busy = 0) with
// x valid; x is captured then. busy is high for WD clocks; done pulses on
// the clock after the last bit, with y valid from then until the next start.
// y_lsp carries one result bit per busy clock (for the plain table these are
// the WD low bits of y, LSB first). Reset: active low, synchronous.
module da_processor
  import decim_pkg::*;
#(
  parameter int unsigned N    = CORR_UNIQ,       // inputs per inner product
  parameter int unsigned WD   = HB_OUT_W + 1,    // input word length
  parameter int unsigned WC   = COEF_W,          // coefficient width
  parameter bit          OBC  = 1'b1,            // offset binary coding
  parameter int          COEF [N] = CORR_UNIQ_COEF,
  localparam int unsigned LW  = WC + $clog2(N) + 1,  // table word width
  localparam int unsigned AW  = LW + 1,              // accumulator width
  localparam int unsigned YW  = AW + WD              // result width
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [N-1:0][WD-1:0]      x,
  output logic                      busy,
  output logic                      done,
  output logic                      y_lsp,
  output logic signed [YW-1:0]      y
);

  localparam int unsigned LUT_AW   = OBC ? N - 1 : N;
  localparam int unsigned LUT_SIZE = 1 << LUT_AW;

  // ---- look-up table, computed from the coefficients ---------------------
  function automatic logic signed [LW-1:0] table_word(int unsigned addr);
    longint acc = 0;
    if (OBC) begin
      // entry for the top input's bit = 0 (read as -1), others from addr
      for (int i = 0; i < int'(N) - 1; i++)
        acc += addr[i] ? longint'(COEF[i]) : -longint'(COEF[i]);
      acc -= longint'(COEF[N-1]);
    end else begin
      for (int i = 0; i < int'(N); i++)
        if (addr[i]) acc += longint'(COEF[i]);
    end
    return LW'(acc);
  endfunction

  function automatic longint coef_sum();
    longint s = 0;
    for (int i = 0; i < int'(N); i++) s += longint'(COEF[i]);
    return s;
  endfunction

  localparam logic signed [AW-1:0] A0_INIT = OBC ? AW'(-coef_sum()) : '0;

  logic signed [LW-1:0] lut [LUT_SIZE];
  for (genvar a = 0; a < int'(LUT_SIZE); a++) begin : g_lut
    assign lut[a] = table_word(a);
  end

  // ---- datapath -----------------------------------------------------------
  logic [N-1:0][WD-1:0]     sr;      // input shift registers
  logic signed [AW-1:0]     acc;     // upper part of the running sum
  logic [WD-1:0]            lsbs;    // shifted-out low part
  logic [$clog2(WD+1)-1:0]  bitpos;
  logic [N-1:0]             slice;   // bit 'bitpos' of every input
  logic signed [LW-1:0]     f_word;
  logic signed [AW:0]       s;
  logic                     last;

  always_comb begin
    for (int i = 0; i < int'(N); i++) slice[i] = sr[i][0];
    if (OBC) begin
      logic [LUT_AW-1:0] addr;
      addr   = slice[LUT_AW-1:0] ^ {LUT_AW{slice[N-1]}};
      f_word = slice[N-1] ? -lut[addr] : lut[addr];
    end else begin
      f_word = lut[slice[LUT_AW-1:0]];
    end
    last = (bitpos == ($clog2(WD+1))'(WD - 1));
    s    = last ? (AW+1)'(acc) - (AW+1)'(f_word) : (AW+1)'(acc) + (AW+1)'(f_word);
  end

  assign y_lsp = s[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      bitpos <= '0;
      acc    <= '0;
      lsbs   <= '0;
      y      <= '0;
      for (int i = 0; i < int'(N); i++) sr[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        sr     <= x;
        acc    <= A0_INIT;
        lsbs   <= '0;
        bitpos <= '0;
        busy   <= 1'b1;
      end else if (busy) begin
        acc  <= s[AW:1];
        lsbs <= {s[0], lsbs[WD-1:1]};
        for (int i = 0; i < int'(N); i++) sr[i] <= sr[i] >> 1;
        bitpos <= bitpos + 1'b1;
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (OBC) y <= $signed({s[AW:1], s[0], lsbs[WD-1:1]}) >>> 1;
          else     y <= $signed({s[AW:1], s[0], lsbs[WD-1:1]});
        end
      end
    end
  end

  // A new computation may only start when the previous one has finished.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("da_processor: start while busy");

endmodule
