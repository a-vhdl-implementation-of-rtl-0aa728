// sval_pkg: constants and helper functions shared by the SVAL on-board ACF design.
// Sizes follow the memory map of the design: a 1Kx8 histogramme split into 16 energy
// blocks of 64 bytes (32 delay bins per input channel), a 64x8 HF output array, LF
// series of 32 samples giving 16 lags of 16-bit sums, and a 512x10 LF output FIFO.
// compress10() is this design's own 16-to-10-bit compression (the source only says
// the LF results are compressed to 10 bits): a 4-bit exponent and a 6-bit mantissa.
package sval_pkg;
  localparam int unsigned N_ENERGY    = 16;   // energy levels (4 Last Energy bits)
  localparam int unsigned ENERGY_W    = 4;
  localparam int unsigned HF_LAGS     = 32;   // buncher lags per input channel
  localparam int unsigned HF_LAG_W    = 5;
  localparam int unsigned HF_BLOCK    = 64;   // bytes per energy block / output array
  localparam int unsigned HIST_AW     = 10;   // 1K histogramme
  localparam int unsigned LF_SAMPLES  = 32;   // LF time series length
  localparam int unsigned LF_LAGS     = 16;   // lags 1..16
  localparam int unsigned LF_SUM_W    = 16;   // M1 word width
  localparam int unsigned LF_OUT_W    = 10;   // compressed telemetry word

  // 16-bit unsigned -> 10-bit code {exp[3:0], mant[5:0]}.
  // v < 64: exp = 0, mant = v (exact). Otherwise exp = msb_position - 5 (1..10) and
  // mant holds the 6 bits just below the leading one. Decode: exp==0 ? mant
  // : (64 + mant) << (exp - 1).
  function automatic logic [9:0] compress10(input logic [15:0] v);
    logic [3:0] e;
    logic [5:0] mt;
    e  = 4'd0;
    mt = v[5:0];
    for (int p = 6; p < 16; p++) begin
      if (v[p]) begin
        e  = 4'(p - 5);
        mt = 6'((v >> (p - 6)) & 16'h3f);
      end
    end
    return {e, mt};
  endfunction

  function automatic logic [16:0] expand10(input logic [9:0] c);
    if (c[9:6] == 4'd0) return 17'(c[5:0]);
    return 17'((17'd64 + 17'(c[5:0])) << (c[9:6] - 4'd1));
  endfunction
endpackage
