// tb_stfl_rx_lane: self-checking testbench of stfl_rx_lane.
//
// The testbench plays the far-end transmitter: for a random codeword of at
// most four 1s it flips the wire according to the reference slot stream
// (one slot per clock, the first slot right after the 'start' edge) and
// checks that 'valid' comes exactly 12 cycles after 'start' with the right
// codeword. Bursts run back to back and with gaps; one burst carries a
// flip in a dummy slot and must raise 'dummy_err'.
module tb_stfl_rx_lane;
  import tb_stfl_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, wire_in = 0;
  logic [7:0] code;
  logic valid, dummy_err;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  stfl_rx_lane dut (.clk, .rst_n, .start, .wire_in, .code, .valid, .dummy_err);

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

  // expected results, checked when 'valid' rises
  logic [7:0] exp_q[$];
  int         due_q[$];
  int         cyc = 0;
  bit         ignore = 0;  // error-injection burst: result not checked
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    #2;
    if (valid && !ignore) begin
      check(exp_q.size() > 0, "valid with nothing sent");
      if (exp_q.size() > 0) begin
        logic [7:0] e;
        int d;
        e = exp_q.pop_front();
        d = due_q.pop_front();
        check(code == e, $sformatf("code %b expected %b", code, e));
        check(cyc == d, $sformatf("valid at cycle %0d expected %0d", cyc, d));
      end
    end
  end

  // drive one burst: start is sampled at edge S, slot k on the wire after
  // edge S+k-1 (as the transmitter would drive it)
  task automatic burst(input logic [7:0] c, input int gap, input logic [11:0] extra = '0);
    logic [11:0] s;
    bit ok;
    s = slots_of(c, ok) | extra;
    repeat (gap) @(negedge clk);
    if (gap == 0) @(negedge clk);
    start = 1;
    @(posedge clk);
    exp_q.push_back(c);
    due_q.push_back(cyc + 13);  // cyc still holds the count before edge S
    for (int k = 0; k < 12; k++) begin
      #1;
      if (k == 0) start = 0;
      wire_in = wire_in ^ s[11-k];
      if (k < 11) @(posedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    burst(8'h00, 2);
    burst(8'hF0, 0);
    burst(8'h0F, 0);
    burst(8'hAA, 0);
    burst(8'h55, 4);
    for (int i = 0; i < 300; i++) burst(light_byte(), ($urandom % 3 == 0) ? 1 + $urandom % 3 : 0);
    repeat (20) @(posedge clk);
    check(exp_q.size() == 0, "every burst delivered");
    check(!dummy_err, "no dummy error on legal streams");
    // a flip in the dummy slot after the first 1 of 1000_0000 (slot 2)
    ignore = 1;
    burst(8'h80, 2, 12'b0100_0000_0000);
    repeat (20) @(posedge clk);
    check(dummy_err, "flip in a dummy slot flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
