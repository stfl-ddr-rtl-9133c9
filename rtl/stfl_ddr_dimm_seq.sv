// stfl_ddr_dimm_seq: DIMM-side counterpart of stfl_ddr_ctrl.
//
// It decodes the command sent by the processor-side controller. For a write
// it starts the DIMM-side receivers of all chips on the next edge and queues
// the address; when the burst has been received it hands the decoded line
// and that address to the DRAM core ('wr_*'). For a read it asks the DRAM
// core for the line ('rd_en'/'rd_addr', answered combinationally on
// 'rd_data'), registers it and starts the DIMM-side transmitters on the next
// edge. This sequencing is this implementation's own; the DRAM core itself
// (arrays, bank timing) is outside the interface and not modelled.
//
// Timing: a command seen at edge C starts the burst at edge C+1, the same
// edge at which the processor side starts its end of the burst.
module stfl_ddr_dimm_seq
  import stfl_pkg::*;
#(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned LINE_W = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  // command from the controller
  input  logic              cmd_valid,
  input  logic              cmd_we,
  input  logic [ADDR_W-1:0] cmd_addr,
  // DIMM-side chip endpoints
  output logic              tx_start,
  output logic [LINE_W-1:0] tx_data,
  output logic              rx_start,
  input  logic              rx_valid,
  input  logic [LINE_W-1:0] rx_data,
  // DRAM core
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic [LINE_W-1:0] rd_data,
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [LINE_W-1:0] wr_data
);

  // Write addresses in flight: at most two (one burst on the wires, the
  // next one's command already seen).
  logic [ADDR_W-1:0] aq [2];
  logic [1:0]        aq_cnt;

  assign rd_en   = cmd_valid & ~cmd_we;
  assign rd_addr = cmd_addr;
  assign wr_en   = rx_valid;
  assign wr_addr = aq[0];
  assign wr_data = rx_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_start <= 1'b0;
      tx_data  <= '0;
      rx_start <= 1'b0;
      aq[0]    <= '0;
      aq[1]    <= '0;
      aq_cnt   <= '0;
    end else begin
      tx_start <= cmd_valid & ~cmd_we;
      rx_start <= cmd_valid &  cmd_we;
      if (cmd_valid && !cmd_we) tx_data <= rd_data;
      // address queue: pop on a finished write burst, push on a write command
      unique case ({cmd_valid && cmd_we, rx_valid})
        2'b10: begin
          aq[aq_cnt[0]] <= cmd_addr;
          aq_cnt        <= aq_cnt + 1'b1;
        end
        2'b01: begin
          aq[0]  <= aq[1];
          aq_cnt <= aq_cnt - 1'b1;
        end
        2'b11: begin
          if (aq_cnt == 2'd1) aq[0] <= cmd_addr;
          else begin
            aq[0] <= aq[1];
            aq[1] <= cmd_addr;
          end
        end
        default: ;
      endcase
      assert (!(rx_valid && aq_cnt == '0))
        else $error("stfl_ddr_dimm_seq: write burst with no queued address");
    end
  end

endmodule
