// tb_stfl_ddr_rx: self-checking testbench of stfl_ddr_rx.
//
// The testbench sends the slot stream of a light codeword on the wire and
// presents an inversion bit as the mode wire would; the receiver must return
// the codeword, XORed with the inversion bit, 12 cycles after 'start'.
module tb_stfl_ddr_rx;
  import tb_stfl_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, wire_in = 0, inv = 0;
  logic [7:0] data;
  logic valid, dummy_err;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  stfl_ddr_rx dut (.clk, .rst_n, .start, .wire_in, .inv, .data, .valid, .dummy_err);

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

  task automatic burst(input logic [7:0] c, input bit i);
    logic [11:0] s;
    bit ok;
    s = slots_of(c, ok);
    @(negedge clk);
    start = 1;
    @(posedge clk);
    for (int k = 0; k < 12; k++) begin
      #1;
      if (k == 0) start = 0;
      wire_in = wire_in ^ s[11-k];
      check(!valid, "no early valid");
      @(posedge clk);
    end
    // edge S+12 has just sampled slot 12
    #1 inv = i;
    #1;
    check(valid, "valid 12 cycles after start");
    check(data == (c ^ {8{i}}), $sformatf("data %b for code %b inv %0d", data, c, i));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    burst(8'h00, 1'b0);
    burst(8'h00, 1'b1);
    burst(8'hAA, 1'b0);
    for (int i = 0; i < 300; i++) burst(light_byte(), 1'($urandom));
    check(!dummy_err, "no dummy error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
