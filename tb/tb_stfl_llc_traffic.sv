// tb_stfl_llc_traffic: STFL-LLC wire activity and mode usage per data profile.
//
// 64-byte cache blocks of three profiles (random, sparse: about a third of
// the bytes zero and the rest small integers, float: arrays of 64-bit
// floating-point values of similar magnitude) are streamed back to back
// through one stfl_llc_link. For each profile the testbench reports how often
// each encoding mode is chosen, the 1s per byte a binary bus would send and
// the flips per byte seen on the data wires. It checks that every block
// arrives intact, that the data-wire flips equal the 1s of the reference
// codewords, that no byte costs more than four flips, and that the coded
// wires never flip more than a binary bus has 1s (every mode choice is at
// most as heavy as the original byte, except for bytes with more than four
// 1s, which get lighter).
module tb_stfl_llc_traffic;
  import tb_stfl_ref_pkg::*;

  localparam int NB = 64;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, err;
  logic [8*NB-1:0] in_data = '0, out_data;
  logic [NB-1:0] dw, dw_prev;
  logic [NB/4-1:0] mw;
  int checks = 0, failures = 0;
  longint n_flips = 0;

  always #5 clk = ~clk;

  stfl_llc_link dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid,
                     .out_data, .data_wires(dw), .mode_wires(mw), .err);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) n_flips += ones(64'(dw ^ dw_prev));
    dw_prev <= dw;
  end

  logic [8*NB-1:0] exp_q[$];
  always @(posedge clk) begin
    #2;
    if (out_valid) check(exp_q.size() > 0 && out_data == exp_q.pop_front(), "block intact");
  end

  function automatic logic [8*NB-1:0] make(input int prof);
    logic [8*NB-1:0] b;
    for (int w = 0; w < NB / 8; w++) begin
      logic [63:0] v;
      case (prof)
        0: v = {$urandom, $urandom};
        1: for (int k = 0; k < 8; k++)
             v[8*k +: 8] = ($urandom % 3 == 0) ? 8'h00 : 8'($urandom % 24);
        default: v = {1'b0, 11'h400 + 11'($urandom % 4), 20'($urandom), $urandom};
      endcase
      b[64*w +: 64] = v;
    end
    return b;
  endfunction

  task automatic run(input int prof, input string name, input int n);
    longint raw = 0, coded = 0, f0;
    int nm [3];
    int r100, f100;
    logic [8*NB-1:0] blk;
    foreach (nm[i]) nm[i] = 0;
    f0 = n_flips;
    for (int i = 0; i < n; i++) begin
      blk = make(prof);
      for (int g = 0; g < NB / 4; g++) begin
        logic [31:0] c;
        logic [11:0] m;
        llc_group(blk[32*g +: 32], c, m);
        raw += ones({32'b0, blk[32*g +: 32]});
        coded += ones({32'b0, c});
        for (int k = 0; k < 4; k++) begin
          check(ones({56'b0, c[8*k +: 8]}) <= 4, "codeword at most four 1s");
          case (m[3*k +: 3])
            3'b000: nm[0]++;
            3'b010: nm[1]++;
            default: nm[2]++;
          endcase
        end
      end
      in_valid = 1; in_data = blk;
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      exp_q.push_back(blk);
    end
    in_valid = 0;
    repeat (16) @(negedge clk);
    check(exp_q.size() == 0, "all blocks delivered");
    check(n_flips - f0 == coded, $sformatf("%s: wire flips equal coded 1s", name));
    check(coded <= raw, $sformatf("%s: no more flips than binary 1s", name));
    r100 = int'(raw * 100 / (NB * n));
    f100 = int'(coded * 100 / (NB * n));
    $display("%s: %0d blocks, modes orig %0d inv %0d xor %0d, binary 1s per byte %0d.%0d%0d, STFL flips per byte %0d.%0d%0d",
             name, n, nm[0], nm[1], nm[2], r100 / 100, (r100 / 10) % 10, r100 % 10,
             f100 / 100, (f100 / 10) % 10, f100 % 10);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run(0, "random", 300);
    run(1, "sparse", 300);
    run(2, "float", 300);
    check(!err, "no error flags");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
