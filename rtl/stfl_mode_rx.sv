// stfl_mode_rx: serial receiver for the 12 mode bits of one burst.
//
// With TRANSITION = 0 the wire level of each slot is the mode bit; with
// TRANSITION = 1 a transition detector (previous-level flip-flop and XOR)
// turns each flip into a 1. Every slot is shifted into a serial-in,
// parallel-out register: mode bits carry no dummies to remove (the dummy
// positions of the LLC patterns are part of the 12-bit mode word).
//
// Timing matches stfl_rx_lane: 'start' at edge S (the transmitter's start
// edge), slots sampled at S+1 .. S+12, 'valid' high for the cycle after
// S+12 with the word on 'mode' (first received bit in the MSB).
module stfl_mode_rx
  import stfl_pkg::*;
#(
  parameter bit TRANSITION = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              wire_in,
  output logic [SLOTS-1:0]  mode,
  output logic              valid
);

  logic             prev_lvl;
  logic             bit_in;
  logic [SLOTS-1:0] sr;
  logic [SLOTS-1:0] sr_next;
  logic [CNT_W-1:0] cnt;

  assign bit_in  = TRANSITION ? (wire_in ^ prev_lvl) : wire_in;
  assign sr_next = {sr[SLOTS-2:0], bit_in};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_lvl <= 1'b0;
      sr       <= '0;
      mode     <= '0;
      cnt      <= '0;
      valid    <= 1'b0;
    end else begin
      prev_lvl <= wire_in;
      valid    <= 1'b0;
      if (cnt != '0) begin
        sr  <= sr_next;
        cnt <= cnt - 1'b1;
        if (cnt == CNT_W'(1)) begin
          mode  <= sr_next;
          valid <= 1'b1;
        end
      end
      if (start) cnt <= CNT_W'(SLOTS);
    end
  end

endmodule
