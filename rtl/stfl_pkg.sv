// stfl_pkg: constants and helpers shared by the STFL (slow-transition,
// fast-level) signalling blocks.
//
// STFL sends a codeword byte on one wire as transitions: a 1 is a wire flip,
// a 0 is no flip, and every 1 is followed by a dummy 0 slot so that a wire
// never flips in two consecutive bit slots. Encoders guarantee at most four
// 1s per byte, so a byte always fits in 8 + 4 = 12 bit slots. A burst on the
// mode wire is also 12 slots long. Both numbers follow the design; the
// choice of one clock cycle per bit slot is this implementation's.
//
// The STFL-LLC mode patterns (1D0 = XOR with neighbour, 01D = inverted,
// 000 = original) follow the cache encoding table; the dummy D is sent as 0.
package stfl_pkg;

  localparam int unsigned BYTE_W    = 8;   // bits per codeword
  localparam int unsigned MAX_ONES  = 4;   // at most four 1s per codeword
  localparam int unsigned SLOTS     = BYTE_W + MAX_ONES;  // 12 bit slots per burst
  localparam int unsigned CNT_W     = $clog2(SLOTS + 1);

  // STFL-LLC per-byte encoding modes, as 3-bit patterns sent MSB first.
  typedef enum logic [2:0] {
    LLC_MODE_ORIG = 3'b000,   // "000": codeword = alpha
    LLC_MODE_INV  = 3'b010,   // "01D": codeword = ~alpha
    LLC_MODE_XOR  = 3'b100    // "1D0": codeword = alpha ^ beta
  } llc_mode_e;

  // Constant the rightmost byte of an STFL-LLC group is XORed with.
  localparam logic [7:0] LLC_XOR_CONST = 8'b0101_0101;

  // Population count (Hamming weight) of a byte.
  function automatic logic [3:0] popcount8(input logic [7:0] v);
    logic [3:0] n;
    n = '0;
    for (int i = 0; i < 8; i++) n = n + {3'b000, v[i]};
    return n;
  endfunction

endpackage
