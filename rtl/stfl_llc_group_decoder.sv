// stfl_llc_group_decoder: STFL-LLC decoder for one group of bytes.
//
// The inverse of stfl_llc_group_encoder. Each received codeword is turned
// back into its byte according to its 3-bit mode: 000 as is, 01D inverted,
// 1D0 XORed with the already decoded right-hand neighbour (the constant
// 01010101 for the rightmost byte). Decoding therefore runs from the
// rightmost byte leftwards, an XOR chain at most GROUP_BYTES long. A mode
// pattern other than the three defined ones sets 'mode_err' and the byte is
// taken as is. The decoding rule follows the design; the error flag is this
// implementation's addition.
//
// Purely combinational. Byte order and mode-word packing as in the encoder.
module stfl_llc_group_decoder
  import stfl_pkg::*;
#(
  parameter int unsigned GROUP_BYTES = 4
) (
  input  logic [8*GROUP_BYTES-1:0] code,
  input  logic [3*GROUP_BYTES-1:0] mode,
  output logic [8*GROUP_BYTES-1:0] data,
  output logic                     mode_err
);

  always_comb begin
    logic [7:0] beta;
    logic [7:0] c;
    logic [2:0] m;
    data     = '0;
    mode_err = 1'b0;
    beta     = LLC_XOR_CONST;
    for (int i = GROUP_BYTES - 1; i >= 0; i--) begin
      c = code[8*i +: 8];
      m = mode[3*(GROUP_BYTES-1-i) +: 3];
      case (m)
        LLC_MODE_ORIG: data[8*i +: 8] = c;
        LLC_MODE_INV:  data[8*i +: 8] = ~c;
        LLC_MODE_XOR:  data[8*i +: 8] = c ^ beta;
        default: begin
          data[8*i +: 8] = c;
          mode_err       = 1'b1;
        end
      endcase
      beta = data[8*i +: 8];
    end
  end

endmodule
