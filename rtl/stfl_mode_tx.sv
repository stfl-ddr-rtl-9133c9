// stfl_mode_tx: serial transmitter for the 12 mode bits of one burst.
//
// The mode word is loaded into a parallel-in, serial-out shift register and
// sent MSB first, one bit per slot, with no delay injection. With
// TRANSITION = 0 (the STFL-DDR mode wire, a DDR4-style pseudo open drain
// wire) each bit is sent as a level. With TRANSITION = 1 (the STFL-LLC mode
// wire, a low-power wire) each 1 is a flip of the wire level; the LLC mode
// patterns already space 1s apart, so no dummy has to be added. The serial
// shift register and the transition generator follow the design; level
// signalling on the DDR mode wire and the slot timing are this
// implementation's reading.
//
// Timing matches stfl_tx_lane: 'start' at edge T drives slot 1, slot k is on
// 'wire_out' after edge T+k-1, back-to-back bursts may start at edge T+12,
// and 'oe' is high from edge T to edge T+12. While idle the level follows
// 'line_in'.
module stfl_mode_tx
  import stfl_pkg::*;
#(
  parameter bit TRANSITION = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [SLOTS-1:0]  mode,
  input  logic              line_in,
  output logic              wire_out,
  output logic              oe
);

  logic [SLOTS-1:0] sr;
  logic             lvl;
  logic [CNT_W-1:0] cnt;
  logic             tail;
  logic             base;

  assign wire_out = lvl;
  assign oe       = (cnt != '0) || tail;
  assign base     = oe ? lvl : line_in;

  // level after sending bit 'b' from level 'l'
  function automatic logic send(input logic l, input logic b);
    return TRANSITION ? (l ^ b) : b;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      lvl  <= 1'b0;
      cnt  <= '0;
      tail <= 1'b0;
    end else if (start) begin
      sr   <= {mode[SLOTS-2:0], 1'b0};
      lvl  <= send(base, mode[SLOTS-1]);
      cnt  <= CNT_W'(SLOTS - 1);
      tail <= 1'b0;
    end else if (cnt != '0) begin
      sr   <= {sr[SLOTS-2:0], 1'b0};
      lvl  <= send(lvl, sr[SLOTS-1]);
      cnt  <= cnt - 1'b1;
      tail <= (cnt == CNT_W'(1));
    end else begin
      lvl  <= line_in;
      tail <= 1'b0;
    end
  end

endmodule
