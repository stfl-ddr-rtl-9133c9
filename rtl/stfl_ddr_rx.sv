// stfl_ddr_rx: STFL-DDR receiver for one data wire of a DRAM chip.
//
// An stfl_rx_lane (transition detector and pausing shift register) recovers
// the codeword; its bits are then XORed with the row's inversion bit, which
// arrives on the mode wire, to give back the byte before row inversion.
// Both steps follow the design.
//
// Timing is that of stfl_rx_lane: 'valid' is high for the cycle after the
// 12th sampled slot. 'inv' must be valid in that cycle (stfl_mode_rx
// delivers the mode word in the same cycle).
module stfl_ddr_rx
  import stfl_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       wire_in,
  input  logic       inv,       // horizontal mode bit of this row
  output logic [7:0] data,
  output logic       valid,
  output logic       dummy_err
);

  logic [7:0] code;

  stfl_rx_lane u_lane (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .wire_in   (wire_in),
    .code      (code),
    .valid     (valid),
    .dummy_err (dummy_err)
  );

  assign data = code ^ {8{inv}};

endmodule
