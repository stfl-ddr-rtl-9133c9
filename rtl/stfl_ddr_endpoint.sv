// stfl_ddr_endpoint: one end of the STFL-DDR link of one DRAM chip.
//
// A chip has eight low-power data wires (one byte per wire per burst) and one
// high-performance mode wire. The same endpoint sits in the processor's
// memory interface and in the DRAM chip; each has transmitters and
// receivers on every wire, since the data bus is shared by reads and writes.
//
// Transmit: the 64-bit block goes through stfl_ddr_encoder (column phase,
// four vertical mode bits), then eight stfl_ddr_tx (row inversion, eight
// horizontal mode bits, STFL serialisation). The 12-bit mode word
// {horizontal[7:0], vertical[3:0]} goes out on the mode wire through an
// stfl_mode_tx with level signalling. Receive: eight stfl_ddr_rx and an
// stfl_mode_rx collect one burst; the horizontal bits undo the row
// inversions and stfl_ddr_decoder the column inversions. The blocks and
// their order follow the design; the packing of the mode word is this
// implementation's choice.
//
// Timing: a burst takes 12 clock cycles (one per bit slot, i.e. 6 cycles of
// a double-data-rate clock). 'tx_start' at edge T drives the first slot;
// the far end's 'rx_start' must be sampled at the same edge T, and
// 'rx_valid' is then high for the cycle after edge T+12 with 'rx_data'.
// Bursts may follow each other every 12 cycles in either direction.
// 'dq_line'/'mode_line' are the levels on the shared wires; 'dq_oe'/'mode_oe'
// say when this end drives them.
module stfl_ddr_endpoint
  import stfl_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // transmit side
  input  logic        tx_start,
  input  logic [63:0] tx_data,
  // receive side
  input  logic        rx_start,
  output logic [63:0] rx_data,
  output logic        rx_valid,
  output logic        rx_err,     // sticky: flip in a dummy slot
  // wires
  input  logic [7:0]  dq_line,
  output logic [7:0]  dq_out,
  output logic        dq_oe,
  input  logic        mode_line,
  output logic        mode_out,
  output logic        mode_oe
);

  logic [63:0] col_coded;
  logic [3:0]  vert_tx;
  logic [7:0]  horiz_tx;
  logic [7:0]  lane_oe;
  logic [SLOTS-1:0] mode_rx_word;
  logic        mode_valid;
  logic [63:0] rows_rx;
  logic [7:0]  lane_valid;
  logic [7:0]  lane_err;

  stfl_ddr_encoder u_enc (
    .data  (tx_data),
    .coded (col_coded),
    .vert  (vert_tx)
  );

  for (genvar r = 0; r < 8; r++) begin : g_wire
    stfl_ddr_tx u_tx (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (tx_start),
      .data     (col_coded[8*r +: 8]),
      .line_in  (dq_line[r]),
      .wire_out (dq_out[r]),
      .oe       (lane_oe[r]),
      .inv      (horiz_tx[r])
    );
    stfl_ddr_rx u_rx (
      .clk       (clk),
      .rst_n     (rst_n),
      .start     (rx_start),
      .wire_in   (dq_line[r]),
      .inv       (mode_rx_word[4 + r]),
      .data      (rows_rx[8*r +: 8]),
      .valid     (lane_valid[r]),
      .dummy_err (lane_err[r])
    );
  end

  assign dq_oe = |lane_oe;

  stfl_mode_tx #(.TRANSITION(1'b0)) u_mode_tx (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (tx_start),
    .mode     ({horiz_tx, vert_tx}),
    .line_in  (mode_line),
    .wire_out (mode_out),
    .oe       (mode_oe)
  );

  stfl_mode_rx #(.TRANSITION(1'b0)) u_mode_rx (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (rx_start),
    .wire_in (mode_line),
    .mode    (mode_rx_word),
    .valid   (mode_valid)
  );

  stfl_ddr_decoder u_dec (
    .coded (rows_rx),
    .vert  (mode_rx_word[3:0]),
    .data  (rx_data)
  );

  assign rx_valid = mode_valid & (&lane_valid);
  assign rx_err   = |lane_err;

endmodule
