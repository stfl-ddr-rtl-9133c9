// stfl_ddr_tx: STFL-DDR transmitter for one data wire of a DRAM chip.
//
// A population counter takes the Hamming weight of the byte assigned to this
// wire. If it is above four, the byte is inverted before it enters the
// transmitter's shift register, so that at most four 1s (wire flips) are
// sent, and the inversion is reported on 'inv' as this row's horizontal mode
// bit. The inverted or original byte is then sent by an stfl_tx_lane (shift
// register, delay injector, transition generator). All of this follows the
// design.
//
// 'inv' is combinational from 'data' and is meant to be captured together
// with 'start'. Timing is that of stfl_tx_lane: 12 slots from the 'start'
// edge, back-to-back bursts every 12 cycles.
module stfl_ddr_tx
  import stfl_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,      // byte for this wire (after column coding)
  input  logic       line_in,
  output logic       wire_out,
  output logic       oe,
  output logic       inv        // horizontal mode bit for this byte
);

  logic [7:0] code;

  assign inv  = (popcount8(data) > 4'(MAX_ONES));
  assign code = data ^ {8{inv}};

  stfl_tx_lane u_lane (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .code     (code),
    .line_in  (line_in),
    .wire_out (wire_out),
    .oe       (oe),
    .busy     ()
  );

endmodule
