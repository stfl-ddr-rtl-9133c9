// tb_stfl_ddr_tx: self-checking testbench of stfl_ddr_tx.
//
// Random bytes of any weight, plus all-0s and all-1s. Checks that the
// inversion bit is set exactly for bytes with more than four 1s and that
// the wire carries the slot stream of the (possibly inverted) byte, so that
// no burst has more than four flips and no two flips are adjacent. Bursts
// are sent back to back, one per 12 cycles.
module tb_stfl_ddr_tx;
  import tb_stfl_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] data = '0;
  logic wire_out, oe, inv;
  int checks = 0, failures = 0;
  int n_inv = 0;

  always #5 clk = ~clk;

  stfl_ddr_tx dut (.clk, .rst_n, .start, .data, .line_in(wire_out),
                   .wire_out, .oe, .inv);

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

  task automatic burst(input logic [7:0] b);
    logic [7:0] c;
    logic [11:0] s;
    bit ok, e_inv;
    logic lvl_prev;
    int flips = 0;
    e_inv = ones({56'b0, b}) > 4;
    c = e_inv ? ~b : b;
    s = slots_of(c, ok);
    @(negedge clk);
    start = 1; data = b;
    #1 check(inv == e_inv, $sformatf("inv for %b", b));
    if (e_inv) n_inv++;
    lvl_prev = wire_out;
    @(posedge clk); #1;
    start = 0;
    for (int k = 0; k < 12; k++) begin
      check(wire_out == (lvl_prev ^ s[11-k]), $sformatf("byte %b slot %0d", b, k + 1));
      if (wire_out != lvl_prev) flips++;
      lvl_prev = wire_out;
      if (k < 11) begin @(posedge clk); #1; end
    end
    check(flips <= 4, "at most four flips per byte");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    burst(8'h00);
    burst(8'hFF);
    burst(8'hF8);   // five 1s: inverted
    burst(8'hF0);   // four 1s: sent as is
    for (int i = 0; i < 400; i++) burst(8'($urandom));
    check(n_inv > 50, "inversion exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
