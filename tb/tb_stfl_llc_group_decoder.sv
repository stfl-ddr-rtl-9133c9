// tb_stfl_llc_group_decoder: self-checking testbench of stfl_llc_group_decoder.
//
// Groups coded by the reference model must decode to the original bytes,
// including chains where several neighbouring bytes use XOR mode. An
// undefined mode pattern must raise 'mode_err'.
module tb_stfl_llc_group_decoder;
  import tb_stfl_ref_pkg::*;

  logic [31:0] code, data;
  logic [11:0] mode;
  logic        mode_err;
  int checks = 0, failures = 0, n_chain = 0;

  stfl_llc_group_decoder dut (.code, .mode, .data, .mode_err);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [31:0] d);
    logic [31:0] c;
    logic [11:0] m;
    llc_group(d, c, m);
    code = c; mode = m;
    #1;
    check(data == d, $sformatf("decoded %h expected %h (mode %b)", data, d, m));
    check(!mode_err, "no mode error on legal modes");
    if (m[11:9] == 3'b100 && m[8:6] == 3'b100) n_chain++;
  endtask

  initial begin
    one(32'h0);
    one('1);
    one(32'h5555_5555);
    for (int i = 0; i < 3000; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      case ($urandom % 3)
        0: one($urandom);
        1: one({b, b ^ 8'h01, b, b ^ 8'h10});
        default: one({b ^ 8'h80, b ^ 8'h01, b, b ^ 8'h10});
      endcase
    end
    check(n_chain > 0, "XOR chain exercised");
    code = '0; mode = 12'b110_000_000_000;
    #1 check(mode_err, "undefined mode flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
