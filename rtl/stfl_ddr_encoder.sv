// stfl_ddr_encoder: first (column) phase of STFL-DDR coding for one chip.
//
// The 64 bits a chip sends in one burst form an 8x8 array: row r is byte r
// (data[8r+7:8r]) and goes to data wire r; column c is bit c of every row.
// Columns are taken in four adjacent pairs (7,6), (5,4), (3,2), (1,0). For
// each pair the two columns are XORed row by row; if that 8-bit result has
// more than four 1s, the left column of the pair (the higher bit index) is
// inverted in every row and the pair's vertical mode bit is set. This makes
// neighbouring columns more alike, so the per-row inversion done next in each
// stfl_ddr_tx leaves fewer 1s. The rule follows the design; which column
// counts as "left" (the higher index, as the byte is drawn MSB-first) and
// the order of the vertical bits (vert[p] for the pair (2p+1, 2p)) are this
// implementation's choices.
//
// Purely combinational.
module stfl_ddr_encoder
  import stfl_pkg::*;
(
  input  logic [63:0] data,     // 8 bytes, byte r on wire r
  output logic [63:0] coded,    // after column inversions
  output logic [3:0]  vert      // vertical mode bits
);

  always_comb begin
    logic [7:0] pair_xor;
    coded = data;
    for (int p = 0; p < 4; p++) begin
      for (int r = 0; r < 8; r++)
        pair_xor[r] = data[8*r + 2*p + 1] ^ data[8*r + 2*p];
      vert[p] = (popcount8(pair_xor) > 4'(MAX_ONES));
      for (int r = 0; r < 8; r++)
        coded[8*r + 2*p + 1] = data[8*r + 2*p + 1] ^ vert[p];
    end
  end

endmodule
