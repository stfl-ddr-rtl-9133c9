// tb_stfl_mode_tx: self-checking testbench of stfl_mode_tx.
//
// Two instances: level signalling (DDR mode wire) and transition signalling
// (LLC mode wire). Random 12-bit mode words are sent back to back; every
// slot is compared with the word's bit (level) or with a flip/no flip
// (transition), MSB first, and 'oe' must cover the burst.
module tb_stfl_mode_tx;
  logic clk = 0, rst_n = 0, start = 0;
  logic [11:0] mode = '0;
  logic w_lvl, w_tr, oe_lvl, oe_tr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  stfl_mode_tx #(.TRANSITION(1'b0)) dut_lvl (.clk, .rst_n, .start, .mode,
    .line_in(w_lvl), .wire_out(w_lvl), .oe(oe_lvl));
  stfl_mode_tx #(.TRANSITION(1'b1)) dut_tr (.clk, .rst_n, .start, .mode,
    .line_in(w_tr), .wire_out(w_tr), .oe(oe_tr));

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

  task automatic burst(input logic [11:0] m);
    logic prev_tr;
    @(negedge clk);
    start = 1; mode = m;
    prev_tr = w_tr;
    @(posedge clk); #1;
    start = 0;
    for (int k = 0; k < 12; k++) begin
      check(w_lvl == m[11-k], $sformatf("level slot %0d of %b", k + 1, m));
      check(w_tr == (prev_tr ^ m[11-k]), $sformatf("transition slot %0d of %b", k + 1, m));
      check(oe_lvl && oe_tr, "oe during burst");
      prev_tr = w_tr;
      if (k < 11) begin @(posedge clk); #1; end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    burst(12'hFFF);
    burst(12'h000);
    burst(12'b100_010_000_100);
    for (int i = 0; i < 200; i++) burst(12'($urandom));
    repeat (3) @(posedge clk);
    #1 check(!oe_lvl && !oe_tr, "oe released when idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
