// tb_stfl_llc_byte_encoder: self-checking testbench of stfl_llc_byte_encoder.
//
// All 65536 (alpha, beta) pairs are compared with the reference choice of
// mode and codeword. The codeword must have at most four 1s, must decode
// back to alpha, and each of the three modes must occur.
module tb_stfl_llc_byte_encoder;
  import tb_stfl_ref_pkg::*;
  import stfl_pkg::*;

  logic [7:0] alpha, beta, code;
  llc_mode_e  mode;
  int checks = 0, failures = 0;
  int n_mode [3] = '{0, 0, 0};

  stfl_llc_byte_encoder dut (.alpha, .beta, .code, .mode);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        logic [7:0] e_code, back;
        logic [2:0] e_mode;
        alpha = 8'(a); beta = 8'(b);
        #1;
        e_mode = llc_encode(alpha, beta, e_code);
        check(mode == e_mode && code == e_code,
              $sformatf("a=%b b=%b: mode %b code %b, expected %b %b", alpha, beta, mode, code, e_mode, e_code));
        check(ones({56'b0, code}) <= 4, "codeword at most four 1s");
        back = (mode == LLC_MODE_XOR) ? code ^ beta : (mode == LLC_MODE_INV) ? ~code : code;
        check(back == alpha, "codeword decodes back");
        case (mode)
          LLC_MODE_ORIG: n_mode[0]++;
          LLC_MODE_INV:  n_mode[1]++;
          default:       n_mode[2]++;
        endcase
      end
    check(n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0, "all three modes used");
    $display("modes: orig %0d inv %0d xor %0d", n_mode[0], n_mode[1], n_mode[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
