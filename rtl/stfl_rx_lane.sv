// stfl_rx_lane: STFL receiver for one low-power data wire.
//
// A transition detector (a flip-flop holding the previous wire level and an
// XOR) turns a flip into a 1 and no flip into a 0. The detected bits go into
// a serial-in, parallel-out shift register. The bit detected in one slot also
// controls the shift in the next: after a 1 the register pauses for one slot,
// which drops the dummy 0 the transmitter put there. After eight data bits
// the register stops, so the zero padding at the end of the burst is ignored.
// The detector and the pausing shift register follow the design; the burst
// framing by a 'start' strobe and a slot counter is this implementation's.
//
// Timing: 'start' is sampled at edge S, the same edge at which the far-end
// stfl_tx_lane samples its 'start'. The 12 slots are sampled at edges
// S+1 .. S+12, and 'valid' is high for the one cycle after edge S+12 with the
// received codeword on 'code' (first received bit in the MSB). A new 'start'
// may come at edge S+12, together with the last sample of the burst before.
// 'dummy_err' is a sticky flag for a flip seen in a slot that must be a dummy.
module stfl_rx_lane
  import stfl_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,     // a burst's first slot is sampled next edge
  input  logic       wire_in,   // wire level
  output logic [7:0] code,      // received codeword
  output logic       valid,     // one-cycle pulse: 'code' is complete
  output logic       dummy_err  // sticky: a flip arrived in a dummy slot
);

  logic             prev_lvl;   // transition detector flip-flop
  logic             det;        // detected bit of this slot
  logic [7:0]       sr;         // serial-in, parallel-out shift register
  logic [7:0]       sr_next;
  logic [3:0]       nbits;      // data bits taken so far
  logic             take;       // this slot is a data bit
  logic             skip;       // previous bit was 1: this slot is a dummy
  logic [CNT_W-1:0] cnt;        // slots left in the burst
  logic             active;

  assign det     = wire_in ^ prev_lvl;
  assign active  = (cnt != '0);
  assign take    = active && !skip && (nbits != 4'd8);
  assign sr_next = take ? {sr[6:0], det} : sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_lvl  <= 1'b0;
      sr        <= '0;
      code      <= '0;
      nbits     <= '0;
      skip      <= 1'b0;
      cnt       <= '0;
      valid     <= 1'b0;
      dummy_err <= 1'b0;
    end else begin
      prev_lvl <= wire_in;
      valid    <= 1'b0;
      if (active) begin
        cnt <= cnt - 1'b1;
        sr  <= sr_next;
        if (skip) begin
          skip <= 1'b0;                      // shift paused: dummy dropped
          if (det) dummy_err <= 1'b1;
        end else if (take) begin
          nbits <= nbits + 1'b1;
          skip  <= det;
        end
        if (cnt == CNT_W'(1)) begin
          code  <= sr_next;
          valid <= 1'b1;
        end
      end
      if (start) begin
        sr    <= '0;
        nbits <= '0;
        skip  <= 1'b0;
        cnt   <= CNT_W'(SLOTS);
      end
    end
  end

endmodule
