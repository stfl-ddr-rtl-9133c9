// stfl_ddr_decoder: undoes the column phase of STFL-DDR coding.
//
// The receivers have already removed the per-row inversions, so the only
// thing left is to invert back the left column (bit 2p+1 of every byte) of
// each column pair p whose vertical mode bit is set. Column numbering and
// bit order are those of stfl_ddr_encoder.
//
// Purely combinational.
module stfl_ddr_decoder (
  input  logic [63:0] coded,    // 8 bytes after row de-inversion
  input  logic [3:0]  vert,     // vertical mode bits
  output logic [63:0] data
);

  always_comb begin
    data = coded;
    for (int p = 0; p < 4; p++)
      for (int r = 0; r < 8; r++)
        data[8*r + 2*p + 1] = coded[8*r + 2*p + 1] ^ vert[p];
  end

endmodule
