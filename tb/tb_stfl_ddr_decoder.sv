// tb_stfl_ddr_decoder: self-checking testbench of stfl_ddr_decoder.
//
// Arrays are coded by the reference model; after the row inversions are
// removed (the receivers' job) the decoder must return the original array.
module tb_stfl_ddr_decoder;
  import tb_stfl_ref_pkg::*;

  logic [63:0] coded, data;
  logic [3:0]  vert;
  int checks = 0, failures = 0;

  stfl_ddr_decoder dut (.coded, .vert, .data);

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
    logic [63:0] rows;
    logic [7:0]  horiz;
    logic [3:0]  v;
    ddr_encode(d, rows, horiz, v);
    for (int r = 0; r < 8; r++) coded[8*r +: 8] = rows[8*r +: 8] ^ {8{horiz[r]}};
    vert = v;
    #1;
    check(data == d, $sformatf("decoded %h expected %h (vert %b)", data, d, v));
  endtask

  initial begin
    one(64'h0);
    one('1);
    one(64'hAAAA_AAAA_AAAA_AAAA);
    one(64'h5555_5555_5555_5555);
    for (int i = 0; i < 2000; i++) one({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
