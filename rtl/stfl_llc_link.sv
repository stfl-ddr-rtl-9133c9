// stfl_llc_link: one direction of the STFL-LLC data bus of a last-level cache.
//
// A BLOCK_BYTES-byte cache block (64) is moved between the cache controller
// and the selected mats over low-power wires: one data wire per byte and one
// mode wire per group of GROUP_BYTES bytes (16 groups of 4 for a 64-byte
// block, 80 wires). The block is taken into a transmission buffer; each
// group is encoded (stfl_llc_group_encoder), every codeword is sent by an
// stfl_tx_lane and the group's 12 mode bits by an stfl_mode_tx with
// transition signalling. At the far end stfl_rx_lane and stfl_mode_rx
// recover codewords and modes, stfl_llc_group_decoder restores the bytes
// and the block is kept in a reception buffer. This structure follows the
// design; the handshake and timing are this implementation's. Both ends are
// in this module; 'data_wires' and 'mode_wires' show the wire levels.
//
// Timing: a block accepted at edge E (in_valid && in_ready) starts its
// 12-slot burst at edge E+1 and appears on 'out_data' with 'out_valid' in the
// cycle after edge E+14. 'in_ready' comes back so that the next block is
// taken at edge E+12: one block every 12 cycles, with no gap on the wires.
module stfl_llc_link
  import stfl_pkg::*;
#(
  parameter int unsigned BLOCK_BYTES = 64,
  parameter int unsigned GROUP_BYTES = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [8*BLOCK_BYTES-1:0] in_data,
  output logic                     out_valid,
  output logic [8*BLOCK_BYTES-1:0] out_data,
  output logic [BLOCK_BYTES-1:0]   data_wires,
  output logic [BLOCK_BYTES/GROUP_BYTES-1:0] mode_wires,
  output logic                     err       // sticky: bad mode or dummy slot
);

  localparam int unsigned GROUPS = BLOCK_BYTES / GROUP_BYTES;
  localparam int unsigned TW     = $clog2(SLOTS + 1);

  logic [8*BLOCK_BYTES-1:0] tx_buf;     // transmission buffer
  logic [8*BLOCK_BYTES-1:0] tx_code;
  logic [8*BLOCK_BYTES-1:0] rx_code;
  logic [8*BLOCK_BYTES-1:0] rx_dec;
  logic                     start;
  logic [TW-1:0]            timer;
  logic [BLOCK_BYTES-1:0]   lane_valid, lane_err, lane_oe, lane_busy;
  logic [GROUPS-1:0]        mvalid, merr, mode_oe;

  assign in_ready = (timer == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_buf <= '0;
      start  <= 1'b0;
      timer  <= '0;
    end else begin
      start <= in_valid && in_ready;
      if (timer != '0) timer <= timer - 1'b1;
      if (in_valid && in_ready) begin
        tx_buf <= in_data;
        timer  <= TW'(SLOTS - 1);
      end
    end
  end

  for (genvar g = 0; g < GROUPS; g++) begin : g_grp
    logic [3*GROUP_BYTES-1:0] mode_tx, mode_rx;

    stfl_llc_group_encoder #(.GROUP_BYTES(GROUP_BYTES)) u_enc (
      .data (tx_buf [8*GROUP_BYTES*g +: 8*GROUP_BYTES]),
      .code (tx_code[8*GROUP_BYTES*g +: 8*GROUP_BYTES]),
      .mode (mode_tx)
    );

    for (genvar b = 0; b < GROUP_BYTES; b++) begin : g_lane
      localparam int unsigned L = g*GROUP_BYTES + b;
      stfl_tx_lane u_tx (
        .clk      (clk),
        .rst_n    (rst_n),
        .start    (start),
        .code     (tx_code[8*L +: 8]),
        .line_in  (data_wires[L]),
        .wire_out (data_wires[L]),
        .oe       (lane_oe[L]),
        .busy     (lane_busy[L])
      );
      stfl_rx_lane u_rx (
        .clk       (clk),
        .rst_n     (rst_n),
        .start     (start),
        .wire_in   (data_wires[L]),
        .code      (rx_code[8*L +: 8]),
        .valid     (lane_valid[L]),
        .dummy_err (lane_err[L])
      );
    end

    stfl_mode_tx #(.TRANSITION(1'b1)) u_mtx (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (start),
      .mode     (mode_tx),
      .line_in  (mode_wires[g]),
      .wire_out (mode_wires[g]),
      .oe       (mode_oe[g])
    );

    stfl_mode_rx #(.TRANSITION(1'b1)) u_mrx (
      .clk     (clk),
      .rst_n   (rst_n),
      .start   (start),
      .wire_in (mode_wires[g]),
      .mode    (mode_rx),
      .valid   (mvalid[g])
    );

    stfl_llc_group_decoder #(.GROUP_BYTES(GROUP_BYTES)) u_dec (
      .code     (rx_code[8*GROUP_BYTES*g +: 8*GROUP_BYTES]),
      .mode     (mode_rx),
      .data     (rx_dec [8*GROUP_BYTES*g +: 8*GROUP_BYTES]),
      .mode_err (merr[g])
    );
  end

  // reception buffer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      err       <= 1'b0;
    end else begin
      out_valid <= (&lane_valid) & (&mvalid);
      if ((&lane_valid) & (&mvalid)) begin
        out_data <= rx_dec;
        if (|merr) err <= 1'b1;
      end
      if (|lane_err) err <= 1'b1;
    end
  end

endmodule
