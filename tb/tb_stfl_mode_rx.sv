// tb_stfl_mode_rx: self-checking testbench of stfl_mode_rx.
//
// Two instances, level and transition signalling, each fed its own wire
// driven by the testbench with a random 12-bit word, one slot per cycle
// after the 'start' edge. Both must present the word 12 cycles after start.
module tb_stfl_mode_rx;
  logic clk = 0, rst_n = 0, start = 0, w_lvl = 0, w_tr = 0;
  logic [11:0] m_lvl, m_tr;
  logic v_lvl, v_tr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  stfl_mode_rx #(.TRANSITION(1'b0)) dut_lvl (.clk, .rst_n, .start, .wire_in(w_lvl),
    .mode(m_lvl), .valid(v_lvl));
  stfl_mode_rx #(.TRANSITION(1'b1)) dut_tr (.clk, .rst_n, .start, .wire_in(w_tr),
    .mode(m_tr), .valid(v_tr));

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
    @(negedge clk);
    start = 1;
    @(posedge clk);
    for (int k = 0; k < 12; k++) begin
      #1;
      if (k == 0) start = 0;
      w_lvl = m[11-k];
      w_tr  = w_tr ^ m[11-k];
      check(!v_lvl && !v_tr, "no early valid");
      @(posedge clk);
    end
    #1;
    check(v_lvl && v_tr, "valid 12 cycles after start");
    check(m_lvl == m, $sformatf("level word %h expected %h", m_lvl, m));
    check(m_tr == m, $sformatf("transition word %h expected %h", m_tr, m));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    burst(12'hFFF);
    burst(12'h000);
    for (int i = 0; i < 200; i++) burst(12'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
