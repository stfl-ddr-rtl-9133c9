// stfl_top: an STFL memory system interface, DRAM channel and cache buses.
//
// STFL (slow-transition, fast-level) signalling sends data over low-power,
// unterminated wires at the full interface clock while never flipping a wire
// in two consecutive bit slots: a 1 is a flip followed by a dummy slot, a 0
// is no flip, and encoding keeps each byte at four 1s or fewer, so a byte
// always fits in 12 slots.
//
// DRAM channel (STFL-DDR): a processor-side memory interface and an NCHIPS
// (8) chip DIMM. Each chip has eight low-power data wires and one
// high-performance mode wire; each end of each chip's wires has an
// stfl_ddr_endpoint. stfl_ddr_ctrl takes cache-line requests (64 bytes, one
// 8x8 bit array per chip; chip k carries bytes 8k..8k+7) and starts the
// bursts; stfl_ddr_dimm_seq on the DIMM side talks to the DRAM core through
// the 'mem_*' ports (the core itself is not part of this design). The data
// and mode wires are shared by both directions: whichever end has its
// output enable up drives them, and the levels are brought out on 'dq' and
// 'mode' so that flips can be counted. stfl_clk_div gives the divided
// reference for the data wires.
//
// Cache buses (STFL-LLC): two stfl_llc_link instances, one for blocks going
// from the cache controller to the mats (writes/fills) and one for blocks
// coming back (reads). They stand beside the DRAM channel with their own
// ports: the cache arrays and their controller are not part of this design.
//
// Timing: one DRAM burst (a 64-byte line) every 12 cycles (15 for a read
// right after a write), the first slot driven two edges after the request
// is accepted, read data on 'resp_*' 15 cycles after acceptance; each LLC link moves one 64-byte block every
// 12 cycles with a 14-cycle latency. One clock cycle is one bit slot.
module stfl_top
  import stfl_pkg::*;
#(
  parameter int unsigned NCHIPS      = 8,
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned BLOCK_BYTES = 64,
  parameter int unsigned GROUP_BYTES = 4,
  localparam int unsigned LINE_W     = 64 * NCHIPS,
  localparam int unsigned BLK_W      = 8 * BLOCK_BYTES
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // ---- DRAM channel, processor side
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic                  req_we,
  input  logic [ADDR_W-1:0]     req_addr,
  input  logic [LINE_W-1:0]     req_wdata,
  output logic                  resp_valid,
  output logic [LINE_W-1:0]     resp_rdata,
  // ---- DRAM channel, DRAM core side
  output logic                  mem_rd_en,
  output logic [ADDR_W-1:0]     mem_rd_addr,
  input  logic [LINE_W-1:0]     mem_rd_data,
  output logic                  mem_wr_en,
  output logic [ADDR_W-1:0]     mem_wr_addr,
  output logic [LINE_W-1:0]     mem_wr_data,
  // ---- DRAM channel wires and status
  output logic [8*NCHIPS-1:0]   dq,
  output logic [NCHIPS-1:0]     mode,
  output logic                  ddr_err,
  output logic                  data_ref_clk,
  output logic                  data_ref_tick,
  output logic [31:0]           n_writes,
  output logic [31:0]           n_reads,
  output logic [31:0]           n_turnarounds,
  output logic [31:0]           n_wtr_stalls,
  // ---- LLC: cache controller to mats
  input  logic                  llc_wr_in_valid,
  output logic                  llc_wr_in_ready,
  input  logic [BLK_W-1:0]      llc_wr_in_data,
  output logic                  llc_wr_out_valid,
  output logic [BLK_W-1:0]      llc_wr_out_data,
  output logic [BLOCK_BYTES-1:0] llc_wr_data_wires,
  output logic [BLOCK_BYTES/GROUP_BYTES-1:0] llc_wr_mode_wires,
  // ---- LLC: mats to cache controller
  input  logic                  llc_rd_in_valid,
  output logic                  llc_rd_in_ready,
  input  logic [BLK_W-1:0]      llc_rd_in_data,
  output logic                  llc_rd_out_valid,
  output logic [BLK_W-1:0]      llc_rd_out_data,
  output logic [BLOCK_BYTES-1:0] llc_rd_data_wires,
  output logic [BLOCK_BYTES/GROUP_BYTES-1:0] llc_rd_mode_wires,
  output logic                  llc_err
);

  // ------------------------------------------------------------------ DRAM
  logic              c_tx_start, c_rx_start, d_tx_start, d_rx_start;
  logic [LINE_W-1:0] c_tx_data, c_rx_data, d_tx_data, d_rx_data;
  logic [NCHIPS-1:0] c_rx_valid, d_rx_valid, c_err, d_err;
  logic              cmd_valid, cmd_we;
  logic [ADDR_W-1:0] cmd_addr;

  logic [8*NCHIPS-1:0] c_dq, d_dq;
  logic [NCHIPS-1:0]   c_dq_oe, d_dq_oe, c_mode, d_mode, c_mode_oe, d_mode_oe;

  stfl_ddr_ctrl #(.ADDR_W(ADDR_W), .LINE_W(LINE_W)) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .req_valid     (req_valid),
    .req_ready     (req_ready),
    .req_we        (req_we),
    .req_addr      (req_addr),
    .req_wdata     (req_wdata),
    .resp_valid    (resp_valid),
    .resp_rdata    (resp_rdata),
    .cmd_valid     (cmd_valid),
    .cmd_we        (cmd_we),
    .cmd_addr      (cmd_addr),
    .tx_start      (c_tx_start),
    .tx_data       (c_tx_data),
    .rx_start      (c_rx_start),
    .rx_valid      (&c_rx_valid),
    .rx_data       (c_rx_data),
    .n_writes      (n_writes),
    .n_reads       (n_reads),
    .n_turnarounds (n_turnarounds),
    .n_wtr_stalls  (n_wtr_stalls)
  );

  stfl_ddr_dimm_seq #(.ADDR_W(ADDR_W), .LINE_W(LINE_W)) u_dimm_seq (
    .clk       (clk),
    .rst_n     (rst_n),
    .cmd_valid (cmd_valid),
    .cmd_we    (cmd_we),
    .cmd_addr  (cmd_addr),
    .tx_start  (d_tx_start),
    .tx_data   (d_tx_data),
    .rx_start  (d_rx_start),
    .rx_valid  (&d_rx_valid),
    .rx_data   (d_rx_data),
    .rd_en     (mem_rd_en),
    .rd_addr   (mem_rd_addr),
    .rd_data   (mem_rd_data),
    .wr_en     (mem_wr_en),
    .wr_addr   (mem_wr_addr),
    .wr_data   (mem_wr_data)
  );

  for (genvar k = 0; k < NCHIPS; k++) begin : g_chip
    // shared wires: the driving end wins
    assign dq[8*k +: 8] = d_dq_oe[k] ? d_dq[8*k +: 8] : c_dq[8*k +: 8];
    assign mode[k]      = d_mode_oe[k] ? d_mode[k] : c_mode[k];

    stfl_ddr_endpoint u_cpu (
      .clk       (clk),
      .rst_n     (rst_n),
      .tx_start  (c_tx_start),
      .tx_data   (c_tx_data[64*k +: 64]),
      .rx_start  (c_rx_start),
      .rx_data   (c_rx_data[64*k +: 64]),
      .rx_valid  (c_rx_valid[k]),
      .rx_err    (c_err[k]),
      .dq_line   (dq[8*k +: 8]),
      .dq_out    (c_dq[8*k +: 8]),
      .dq_oe     (c_dq_oe[k]),
      .mode_line (mode[k]),
      .mode_out  (c_mode[k]),
      .mode_oe   (c_mode_oe[k])
    );

    stfl_ddr_endpoint u_dram (
      .clk       (clk),
      .rst_n     (rst_n),
      .tx_start  (d_tx_start),
      .tx_data   (d_tx_data[64*k +: 64]),
      .rx_start  (d_rx_start),
      .rx_data   (d_rx_data[64*k +: 64]),
      .rx_valid  (d_rx_valid[k]),
      .rx_err    (d_err[k]),
      .dq_line   (dq[8*k +: 8]),
      .dq_out    (d_dq[8*k +: 8]),
      .dq_oe     (d_dq_oe[k]),
      .mode_line (mode[k]),
      .mode_out  (d_mode[k]),
      .mode_oe   (d_mode_oe[k])
    );
  end

  // both ends must never drive the same wire at once
  a_dq_one_driver: assert property (@(posedge clk) disable iff (!rst_n)
    (c_dq_oe & d_dq_oe) == '0)
    else $error("stfl_top: both ends drive the data wires");
  a_mode_one_driver: assert property (@(posedge clk) disable iff (!rst_n)
    (c_mode_oe & d_mode_oe) == '0)
    else $error("stfl_top: both ends drive the mode wire");

  assign ddr_err = |{c_err, d_err};

  stfl_clk_div #(.DIV(2)) u_ref_div (
    .clk     (clk),
    .rst_n   (rst_n),
    .clk_div (data_ref_clk),
    .tick    (data_ref_tick)
  );

  // ------------------------------------------------------------------- LLC
  logic llc_wr_err, llc_rd_err;

  stfl_llc_link #(.BLOCK_BYTES(BLOCK_BYTES), .GROUP_BYTES(GROUP_BYTES)) u_llc_wr (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (llc_wr_in_valid),
    .in_ready   (llc_wr_in_ready),
    .in_data    (llc_wr_in_data),
    .out_valid  (llc_wr_out_valid),
    .out_data   (llc_wr_out_data),
    .data_wires (llc_wr_data_wires),
    .mode_wires (llc_wr_mode_wires),
    .err        (llc_wr_err)
  );

  stfl_llc_link #(.BLOCK_BYTES(BLOCK_BYTES), .GROUP_BYTES(GROUP_BYTES)) u_llc_rd (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (llc_rd_in_valid),
    .in_ready   (llc_rd_in_ready),
    .in_data    (llc_rd_in_data),
    .out_valid  (llc_rd_out_valid),
    .out_data   (llc_rd_out_data),
    .data_wires (llc_rd_data_wires),
    .mode_wires (llc_rd_mode_wires),
    .err        (llc_rd_err)
  );

  assign llc_err = llc_wr_err | llc_rd_err;

endmodule
