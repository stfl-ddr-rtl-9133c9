// stfl_llc_byte_encoder: STFL-LLC encoder for one byte of a cache block.
//
// Three codewords are possible for a byte alpha: alpha itself (mode 000),
// its complement (mode 01D) and its XOR with the neighbouring byte beta
// (mode 1D0). Two population counters give the Hamming weight of alpha and
// of alpha^beta, the weight of ~alpha being 8 minus that of alpha. A byte
// with at most four 1s is sent as alpha^beta if that has strictly fewer 1s,
// otherwise as alpha. A byte with more than four 1s is sent inverted when
// alpha^beta has at least as many 1s as ~alpha, otherwise as alpha^beta.
// Every codeword therefore has at most four 1s. The three modes, their bit
// patterns and the first two rules follow the design's encoding table; the
// table's catch-all row would send a heavy byte uninverted when alpha^beta is
// lighter than ~alpha, which breaks the four-1s limit, so this
// implementation sends alpha^beta in that case.
//
// Purely combinational.
module stfl_llc_byte_encoder
  import stfl_pkg::*;
(
  input  logic [7:0] alpha,     // byte to send
  input  logic [7:0] beta,      // neighbouring byte (or the group constant)
  output logic [7:0] code,      // codeword, at most four 1s
  output llc_mode_e  mode
);

  logic [3:0] w_a, w_x, w_n;

  assign w_a = popcount8(alpha);
  assign w_x = popcount8(alpha ^ beta);
  assign w_n = 4'd8 - w_a;

  always_comb begin
    if (w_a <= 4'(MAX_ONES)) begin
      mode = (w_x < w_a) ? LLC_MODE_XOR : LLC_MODE_ORIG;
    end else begin
      mode = (w_x >= w_n) ? LLC_MODE_INV : LLC_MODE_XOR;
    end
    unique case (mode)
      LLC_MODE_XOR: code = alpha ^ beta;
      LLC_MODE_INV: code = ~alpha;
      default:      code = alpha;
    endcase
  end

endmodule
