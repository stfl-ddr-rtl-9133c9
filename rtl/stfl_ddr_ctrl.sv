// stfl_ddr_ctrl: processor-side burst sequencer of the STFL-DDR channel.
//
// It takes one cache-line request at a time (valid/ready), sends a command
// (read or write, address) to the DIMM over the high-performance command
// wires, and one cycle later starts the data burst on every chip: for a
// write it starts the processor-side transmitters, for a read the
// processor-side receivers, which then see the burst the DIMM side starts on
// the same edge. A burst occupies the data wires for BURST cycles, the
// 12 bit slots of STFL-DDR (6 cycles of the double-data-rate clock), so a
// new request is accepted every BURST cycles, reads and writes mixed, with
// no bus turnaround gap on the wires. A read that follows a write is held
// WTR_GAP more cycles, until the written line has reached the DRAM core
// (the role tWTR plays in a DRAM); these stall cycles are counted. Read data is returned on 'resp_*' when the
// receivers of all chips are done. The burst length follows the design;
// the design names a controller without giving its insides, so the
// command/start timing and the handshake are this implementation's own.
//
// Timing: a request accepted at edge E puts the command on 'cmd_*' for the
// cycle after E; 'tx_start' or 'rx_start' is high for the cycle after E+1,
// so the burst's first slot is driven at edge E+2 and read data arrives on
// 'resp_*' in the cycle after edge E+14.
module stfl_ddr_ctrl
  import stfl_pkg::*;
#(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned LINE_W = 512,
  parameter int unsigned BURST  = SLOTS,
  parameter int unsigned WTR_GAP = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  // requests from the last-level cache
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [LINE_W-1:0] req_wdata,
  output logic              resp_valid,
  output logic [LINE_W-1:0] resp_rdata,
  // command to the DIMM
  output logic              cmd_valid,
  output logic              cmd_we,
  output logic [ADDR_W-1:0] cmd_addr,
  // processor-side chip endpoints
  output logic              tx_start,
  output logic [LINE_W-1:0] tx_data,
  output logic              rx_start,
  input  logic              rx_valid,
  input  logic [LINE_W-1:0] rx_data,
  // statistics
  output logic [31:0]       n_writes,
  output logic [31:0]       n_reads,
  output logic [31:0]       n_turnarounds,
  output logic [31:0]       n_wtr_stalls
);

  localparam int unsigned TW = $clog2(BURST + WTR_GAP + 1);

  logic [TW-1:0] timer;       // cycles until the next request may be taken
  logic [TW-1:0] rd_hold;     // cycles until a read may follow the last write
  logic          last_we;     // direction of the previous burst
  logic          any_burst;
  logic          wtr_stall;

  assign wtr_stall = req_valid && !req_we && (timer == '0) && (rd_hold != '0);
  assign req_ready = (timer == '0) && !(!req_we && rd_hold != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer         <= '0;
      rd_hold       <= '0;
      n_wtr_stalls  <= '0;
      cmd_valid     <= 1'b0;
      cmd_we        <= 1'b0;
      cmd_addr      <= '0;
      tx_start      <= 1'b0;
      tx_data       <= '0;
      rx_start      <= 1'b0;
      resp_valid    <= 1'b0;
      resp_rdata    <= '0;
      last_we       <= 1'b0;
      any_burst     <= 1'b0;
      n_writes      <= '0;
      n_reads       <= '0;
      n_turnarounds <= '0;
    end else begin
      // second cycle of a request: start the burst
      tx_start <= cmd_valid &  cmd_we;
      rx_start <= cmd_valid & ~cmd_we;
      cmd_valid <= 1'b0;
      if (timer != '0) timer <= timer - 1'b1;
      if (rd_hold != '0) rd_hold <= rd_hold - 1'b1;
      if (wtr_stall) n_wtr_stalls <= n_wtr_stalls + 1'b1;
      if (req_valid && req_ready) begin
        cmd_valid <= 1'b1;
        cmd_we    <= req_we;
        cmd_addr  <= req_addr;
        timer     <= TW'(BURST - 1);
        if (req_we) begin
          rd_hold  <= TW'(BURST + WTR_GAP - 1);
          tx_data  <= req_wdata;
          n_writes <= n_writes + 1'b1;
        end else begin
          n_reads  <= n_reads + 1'b1;
        end
        if (any_burst && (req_we != last_we)) n_turnarounds <= n_turnarounds + 1'b1;
        last_we   <= req_we;
        any_burst <= 1'b1;
      end
      resp_valid <= rx_valid;
      if (rx_valid) resp_rdata <= rx_data;
    end
  end

endmodule
