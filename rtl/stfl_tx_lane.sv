// stfl_tx_lane: STFL transmitter for one low-power data wire.
//
// A codeword byte is loaded into a parallel-in, serial-out shift register
// and sent MSB first, one bit per bit slot. A delay injector remembers the
// bit sent in the previous slot; if it was a 1, the shift is held and a
// dummy 0 is sent instead, so the wire never flips in two consecutive slots.
// The transition generator (a level flip-flop and an XOR) turns every 1 into
// a flip of the wire level and every 0 into no flip. A codeword has at most
// four 1s (the encoders guarantee it), so a burst is a fixed SLOTS = 12 slots;
// the slots left over after the last data bit are sent as 0 (no flip).
// These steps follow the design. The one-clock-per-slot timing, MSB-first
// order and the shared-line handling below are this implementation's choices.
//
// Timing: 'start' is sampled at edge T, which also drives slot 1; slot k
// (k = 1..12) is on 'wire_out' after edge T+k-1. A new 'start' may come at
// edge T+12, so bursts follow each other with no gap (12 cycles per byte).
// 'oe' is high from edge T to edge T+12, so that the far end's idle
// transmitter has copied the final level before this end lets go of a shared
// (bidirectional) wire. While idle the level register follows 'line_in', the
// level on the wire, so a later burst starts from whatever level the other
// end left there.
module stfl_tx_lane
  import stfl_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,     // load 'code' and begin a 12-slot burst
  input  logic [7:0] code,      // codeword, at most four 1s
  input  logic       line_in,   // present level of the (shared) wire
  output logic       wire_out,  // level driven on the wire
  output logic       oe,        // this end drives the wire
  output logic       busy       // burst in progress
);

  logic [7:0]       sr;         // parallel-in, serial-out shift register
  logic             prev;       // delay injector: bit sent in the previous slot
  logic             lvl;        // transition generator level
  logic [CNT_W-1:0] cnt;        // slots left in the burst
  logic             tail;       // one extra cycle of drive after the burst
  logic             bit_now;    // bit sent in the current slot
  logic             base;       // level a new burst starts from

  assign bit_now  = prev ? 1'b0 : sr[7];
  assign base     = oe ? lvl : line_in;
  assign wire_out = lvl;
  assign busy     = (cnt != '0);
  assign oe       = busy || tail;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      prev <= 1'b0;
      lvl  <= 1'b0;
      cnt  <= '0;
      tail <= 1'b0;
    end else if (start) begin
      assert (popcount8(code) <= 4'(MAX_ONES))
        else $error("stfl_tx_lane: codeword %b has more than %0d ones", code, MAX_ONES);
      // slot 1 is the codeword's MSB; no dummy can be due yet
      sr   <= {code[6:0], 1'b0};
      prev <= code[7];
      lvl  <= base ^ code[7];
      cnt  <= CNT_W'(SLOTS - 1);
      tail <= 1'b0;
    end else if (busy) begin
      if (!prev) sr <= {sr[6:0], 1'b0};   // shift only when no dummy is due
      prev <= bit_now;
      lvl  <= lvl ^ bit_now;
      cnt  <= cnt - 1'b1;
      tail <= (cnt == CNT_W'(1));
    end else begin
      lvl  <= line_in;
      tail <= 1'b0;
    end
  end

endmodule
