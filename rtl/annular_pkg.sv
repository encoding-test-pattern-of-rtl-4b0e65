// Shared constants and types of the annular-scan-chain test decompressor.
//
// The compressed stream is a sequence of codewords, each opened by one MODE1 bit:
//   MODE1 = 0 : a seed follows, L bits, shifted straight into the scan chain.
//   MODE1 = 1 : MODE2 (1 bit) and an ENC_W-bit shift count n follow; the chain then
//               rotates n positions, its tail returning to its head (inverted when MODE2 = 0).
// The default pattern length (40) and shift-count width (4) are those of the worked
// example of the method; the codeword layout "mode1 mode2 encode" follows it as well.
package annular_pkg;

  // Pattern length of the worked example (40-bit test patterns).
  parameter int unsigned L_DEFAULT     = 40;
  // Width of the shift-count field of the worked example (4-bit encodes such as 0011).
  parameter int unsigned ENC_W_DEFAULT = 4;

  // Control unit states.
  typedef enum logic [2:0] {
    ST_MODE1 = 3'd0,  // reading the codeword's first bit
    ST_SEED  = 3'd1,  // shifting L seed bits into the chain
    ST_MODE2 = 3'd2,  // reading the polarity bit
    ST_ENC   = 3'd3,  // reading the shift count, MSB first
    ST_ROT   = 3'd4   // rotating the chain n positions
  } cu_state_e;

endpackage
