// tb_stfl_clk_div: self-checking testbench of stfl_clk_div.
//
// Divide-by-2 (the default, 1600 MHz to 800 MHz) and divide-by-6: the
// divided clock must have a period of DIV fast cycles and a 50% duty
// cycle, and 'tick' must be high exactly in the cycle before it rises.
module tb_stfl_clk_div;
  logic clk = 0, rst_n = 0;
  logic d2, t2, d6, t6;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  stfl_clk_div                dut2 (.clk, .rst_n, .clk_div(d2), .tick(t2));
  stfl_clk_div #(.DIV(6))     dut6 (.clk, .rst_n, .clk_div(d6), .tick(t6));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic p2, p6, e_t2, e_t6;
    int n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 600; c++) begin
      #1;
      // expected: clk_div = (c / (DIV/2)) odd; tick before a rising edge
      check(d2 == ((c / 1) % 2 == 1), $sformatf("div2 level at %0d", c));
      check(d6 == ((c / 3) % 2 == 1), $sformatf("div6 level at %0d", c));
      e_t2 = ((c + 1) % 2 == 1);
      e_t6 = ((c + 1) % 6 == 3);
      check(t2 == e_t2, $sformatf("div2 tick at %0d", c));
      check(t6 == e_t6, $sformatf("div6 tick at %0d", c));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
