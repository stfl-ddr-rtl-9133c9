// stfl_llc_group_encoder: STFL-LLC encoder for one group of bytes.
//
// A cache block is cut into groups of GROUP_BYTES (4) bytes, each sent on
// its own GROUP_BYTES data wires plus one mode wire. Byte i of the group is
// encoded by stfl_llc_byte_encoder against its right-hand neighbour, byte
// i+1; the rightmost byte has no neighbour in the group and is encoded
// against the constant 01010101. Keeping the XOR inside the group bounds the
// decoder's XOR chain to the group length. The 3-bit modes are packed into
// one 3*GROUP_BYTES-bit mode word, byte 0's mode in the most significant
// bits (sent first). All of this follows the design except the bit order of
// bytes and mode word, which is this implementation's choice.
//
// Purely combinational. Byte i is data[8i+7:8i].
module stfl_llc_group_encoder
  import stfl_pkg::*;
#(
  parameter int unsigned GROUP_BYTES = 4
) (
  input  logic [8*GROUP_BYTES-1:0] data,
  output logic [8*GROUP_BYTES-1:0] code,
  output logic [3*GROUP_BYTES-1:0] mode
);

  for (genvar i = 0; i < GROUP_BYTES; i++) begin : g_byte
    logic [7:0] beta;
    llc_mode_e  m;
    if (i == GROUP_BYTES - 1) begin : g_last
      assign beta = LLC_XOR_CONST;
    end else begin : g_mid
      assign beta = data[8*(i+1) +: 8];
    end
    stfl_llc_byte_encoder u_enc (
      .alpha (data[8*i +: 8]),
      .beta  (beta),
      .code  (code[8*i +: 8]),
      .mode  (m)
    );
    assign mode[3*(GROUP_BYTES-1-i) +: 3] = m;
  end

endmodule
