// tb_stfl_tx_lane: self-checking testbench of stfl_tx_lane.
//
// Sends random codewords of at most four 1s, some back to back and some
// with idle gaps, and checks every slot of the wire against the reference
// slot stream: a flip exactly where a 1 is due, never two flips in
// consecutive slots, 'oe' high for exactly the burst plus one cycle, and a
// new burst accepted every 12 cycles.
module tb_stfl_tx_lane;
  import tb_stfl_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] code = '0;
  logic wire_out, oe, busy;
  logic line;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // unidirectional wire: the line is what the transmitter drives
  assign line = wire_out;

  stfl_tx_lane dut (.clk, .rst_n, .start, .code, .line_in(line),
                    .wire_out, .oe, .busy);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one burst; 'gap' idle cycles before it
  task automatic burst(input logic [7:0] c, input int gap);
    logic [11:0] s;
    bit ok;
    logic lvl_before, lvl_prev;
    s = slots_of(c, ok);
    check(ok, "reference stream fits");
    repeat (gap) @(negedge clk);
    if (gap == 0) @(negedge clk);
    start = 1; code = c;
    lvl_before = wire_out;
    @(posedge clk); #1;
    start = 0;
    lvl_prev = lvl_before;
    for (int k = 0; k < 12; k++) begin
      check(wire_out == (lvl_prev ^ s[11-k]),
            $sformatf("code %b slot %0d flip", c, k + 1));
      check(oe, $sformatf("oe in slot %0d", k + 1));
      if (k > 0) check(!(s[11-k] && s[12-k]), "no two consecutive 1 slots");
      lvl_prev = wire_out;
      if (k < 11) begin @(posedge clk); #1; end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // corner cases
    burst(8'b0000_0000, 2);
    burst(8'b1111_0000, 0);   // back to back: starts exactly 12 cycles later
    burst(8'b1010_1010, 0);
    burst(8'b0000_1111, 0);
    burst(8'b1000_0001, 3);
    // random
    for (int i = 0; i < 300; i++) burst(light_byte(), ($urandom % 3 == 0) ? 1 + $urandom % 3 : 0);
    // after the last burst: oe stays for one cycle past slot 12, then drops
    @(posedge clk); #1;
    check(!oe, "oe dropped after the tail cycle");
    check(!busy, "idle after the burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
