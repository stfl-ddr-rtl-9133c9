// tb_stfl_ref_pkg: reference models used by the STFL testbenches.
//
// These are written from the coding rules, independently of the RTL:
// the slot stream of one STFL burst (each 1 followed by a dummy 0, padded
// with 0s to 12 slots), the two phases of STFL-DDR coding of an 8x8 array,
// and the STFL-LLC choice between original, inverted and XOR codewords.
package tb_stfl_ref_pkg;

  function automatic int ones(input logic [63:0] v);
    int n = 0;
    for (int i = 0; i < 64; i++) if (v[i]) n++;
    return n;
  endfunction

  // Slot stream of a codeword: bit 11 is slot 1. Returns 1 in 'ok' only if
  // the stream fits in 12 slots.
  function automatic logic [11:0] slots_of(input logic [7:0] code, output bit ok);
    logic [11:0] s = '0;
    int pos = 11;
    ok = 1;
    for (int b = 7; b >= 0; b--) begin
      if (pos < 0) begin ok = 0; break; end
      s[pos] = code[b];
      pos--;
      if (code[b]) pos--;      // dummy 0
    end
    if (pos < -1) ok = 0;
    return s;
  endfunction

  // A random byte with at most four 1s.
  function automatic logic [7:0] light_byte();
    logic [7:0] b = 8'($urandom);
    if (ones({56'b0, b}) > 4) b = ~b;
    return b;
  endfunction

  // STFL-DDR coding of one 8x8 array: byte r = row r. Column pairs are
  // (2p+1, 2p); the left (odd) column is inverted when the pair XOR has
  // more than four 1s; then every row with more than four 1s is inverted.
  function automatic void ddr_encode(input logic [63:0] data,
                                     output logic [63:0] rows,
                                     output logic [7:0] horiz,
                                     output logic [3:0] vert);
    logic [7:0] col [8];
    logic [7:0] x;
    for (int c = 0; c < 8; c++)
      for (int r = 0; r < 8; r++) col[c][r] = data[8*r + c];
    for (int p = 0; p < 4; p++) begin
      x = col[2*p+1] ^ col[2*p];
      vert[p] = ones({56'b0, x}) > 4;
      if (vert[p]) col[2*p+1] = ~col[2*p+1];
    end
    for (int r = 0; r < 8; r++) begin
      logic [7:0] row;
      for (int c = 0; c < 8; c++) row[c] = col[c][r];
      horiz[r] = ones({56'b0, row}) > 4;
      rows[8*r +: 8] = horiz[r] ? ~row : row;
    end
  endfunction

  // STFL-LLC choice for one byte. Returns the 3-bit mode pattern.
  function automatic logic [2:0] llc_encode(input logic [7:0] a, input logic [7:0] b,
                                            output logic [7:0] code);
    int wa = ones({56'b0, a});
    int wx = ones({56'b0, a ^ b});
    int wn = 8 - wa;
    if (wa <= 4 && wx < wa) begin code = a ^ b; return 3'b100; end
    if (wa > 4 && wx >= wn) begin code = ~a;    return 3'b010; end
    if (wa > 4)             begin code = a ^ b; return 3'b100; end
    code = a;
    return 3'b000;
  endfunction

  // STFL-LLC coding of a 4-byte group, byte i against byte i+1, the last
  // against 01010101; mode of byte 0 in bits 11:9.
  function automatic void llc_group(input logic [31:0] data,
                                    output logic [31:0] code,
                                    output logic [11:0] mode);
    for (int i = 0; i < 4; i++) begin
      logic [7:0] b = (i == 3) ? 8'h55 : data[8*(i+1) +: 8];
      logic [7:0] c;
      mode[3*(3-i) +: 3] = llc_encode(data[8*i +: 8], b, c);
      code[8*i +: 8] = c;
    end
  endfunction

endpackage
