// tb_stfl_llc_group_encoder: self-checking testbench of stfl_llc_group_encoder.
//
// Random 4-byte groups (some with repeated or zero bytes, where XOR and
// inversion pay off) are compared with the reference group coding: each
// byte against its right neighbour, the last against 01010101.
module tb_stfl_llc_group_encoder;
  import tb_stfl_ref_pkg::*;

  logic [31:0] data, code;
  logic [11:0] mode;
  int checks = 0, failures = 0;

  stfl_llc_group_encoder dut (.data, .code, .mode);

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
    logic [31:0] e_code;
    logic [11:0] e_mode;
    data = d;
    #1;
    llc_group(d, e_code, e_mode);
    check(code == e_code, $sformatf("group %h: code %h expected %h", d, code, e_code));
    check(mode == e_mode, $sformatf("group %h: mode %b expected %b", d, mode, e_mode));
  endtask

  initial begin
    one(32'h0);
    one('1);
    one(32'h5555_5555);
    one(32'hFFFE_FDFC);
    for (int i = 0; i < 3000; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      case ($urandom % 3)
        0: one($urandom);
        1: one({b, b ^ 8'h01, b, b ^ 8'h10});
        default: one({b, 8'h00, ~b, 8'hFF});
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
