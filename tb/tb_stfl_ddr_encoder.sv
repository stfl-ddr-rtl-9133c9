// tb_stfl_ddr_encoder: self-checking testbench of stfl_ddr_encoder.
//
// Random and hand-picked 8x8 arrays are compared with the reference column
// phase: the vertical bits, the coded array, and the property that after
// coding every column pair's XOR has at most four 1s.
module tb_stfl_ddr_encoder;
  import tb_stfl_ref_pkg::*;

  logic [63:0] data, coded;
  logic [3:0]  vert;
  int checks = 0, failures = 0, n_vert = 0;

  stfl_ddr_encoder dut (.data, .coded, .vert);

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

  task automatic one(input logic [63:0] d);
    logic [63:0] rows, e_coded;
    logic [7:0]  horiz;
    logic [3:0]  e_vert;
    data = d;
    #1;
    ddr_encode(d, rows, horiz, e_vert);
    // the reference's rows include the row inversion; undo it to get the
    // column-phase result
    for (int r = 0; r < 8; r++) e_coded[8*r +: 8] = rows[8*r +: 8] ^ {8{horiz[r]}};
    check(vert == e_vert, $sformatf("vert %b expected %b", vert, e_vert));
    check(coded == e_coded, $sformatf("coded %h expected %h", coded, e_coded));
    for (int p = 0; p < 4; p++) begin
      logic [7:0] x;
      for (int r = 0; r < 8; r++) x[r] = coded[8*r + 2*p + 1] ^ coded[8*r + 2*p];
      check(ones({56'b0, x}) <= 4, "pair XOR at most four 1s after coding");
    end
    n_vert += ones({60'b0, vert});
  endtask

  initial begin
    one(64'h0);
    one('1);
    one(64'hAAAA_AAAA_AAAA_AAAA);   // every pair differs in every row
    one(64'h5555_5555_5555_5555);
    one(64'h0102_0408_1020_4080);
    for (int i = 0; i < 2000; i++) one({$urandom, $urandom});
    check(n_vert > 100, "column inversion exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
