// tb_stfl_ddr_traffic: STFL-DDR wire activity for three data profiles.
//
// Two chip endpoints on shared wires (controller side and DRAM side) move
// 64-bit blocks back to back in both directions. Three profiles stand in for
// the kinds of data memory-bound applications move:
//   random  - uniformly random bytes (compressed or encrypted data);
//   sparse  - about a third of the bytes zero, the rest small integers
//             (index arrays, counters, zero-filled buffers);
//   float   - 64-bit floating-point values of similar magnitude, so the
//             sign/exponent bytes repeat from one value to the next.
// For every profile the testbench counts the 1s a plain binary bus would
// send and the flips actually seen on the STFL data wires, and checks that
// every block arrives intact, that no wire flips more than four times per
// burst and that the flips equal the 1s of the reference coding. On dense
// data (random, float) the coded wires must flip less than a binary bus has
// 1s; sparse data is already light, and there the column phase may add a
// few 1s, so only a 10% margin is required.
module tb_stfl_ddr_traffic;
  import tb_stfl_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic a_go = 0, b_go = 0;
  logic [63:0] a_d = '0, b_d = '0, a_q, b_q;
  logic a_v, b_v, a_e, b_e;
  logic [7:0] a_dq, b_dq, dq;
  logic a_oe, b_oe, a_m, b_m, a_moe, b_moe, mode;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  assign dq   = b_oe  ? b_dq : a_dq;
  assign mode = b_moe ? b_m  : a_m;

  stfl_ddr_endpoint a (.clk, .rst_n, .tx_start(a_go), .tx_data(a_d), .rx_start(b_go),
    .rx_data(a_q), .rx_valid(a_v), .rx_err(a_e), .dq_line(dq), .dq_out(a_dq), .dq_oe(a_oe),
    .mode_line(mode), .mode_out(a_m), .mode_oe(a_moe));
  stfl_ddr_endpoint b (.clk, .rst_n, .tx_start(b_go), .tx_data(b_d), .rx_start(a_go),
    .rx_data(b_q), .rx_valid(b_v), .rx_err(b_e), .dq_line(dq), .dq_out(b_dq), .dq_oe(b_oe),
    .mode_line(mode), .mode_out(b_m), .mode_oe(b_moe));

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

  function automatic logic [63:0] make(input int prof, input int i);
    logic [63:0] v;
    case (prof)
      0: v = {$urandom, $urandom};
      1: for (int k = 0; k < 8; k++)
           v[8*k +: 8] = ($urandom % 3 == 0) ? 8'h00 : 8'($urandom % 24);
      default: begin
        // sign 0, exponent 0x400..0x403, random mantissa
        v = {1'b0, 11'h400 + 11'($urandom % 4), 20'($urandom), $urandom};
      end
    endcase
    return v;
  endfunction

  task automatic run(input int prof, input string name, input int n);
    longint raw = 0, flips = 0, coded = 0;
    logic [63:0] d, rows;
    logic [7:0] h, prev;
    logic [3:0] v;
    int fw [8];
    int r100, f100;
    bit dir;
    for (int i = 0; i < n; i++) begin
      d = make(prof, i);
      dir = 1'(i % 3 == 0);
      ddr_encode(d, rows, h, v);
      raw   += ones(d);
      coded += ones(rows);
      @(negedge clk);
      if (dir) begin b_go = 1; b_d = d; end else begin a_go = 1; a_d = d; end
      prev = dq;
      foreach (fw[r]) fw[r] = 0;
      @(posedge clk); #1;
      a_go = 0; b_go = 0;
      for (int k = 0; k < 12; k++) begin
        for (int r = 0; r < 8; r++) if (dq[r] != prev[r]) fw[r]++;
        prev = dq;
        if (k < 11) begin @(posedge clk); #1; end
      end
      for (int r = 0; r < 8; r++) begin
        check(fw[r] <= 4, "at most four flips per wire per burst");
        check(fw[r] == ones({56'b0, rows[8*r +: 8]}), "flips equal coded 1s");
        flips += fw[r];
      end
      fork
        automatic logic [63:0] dd = d;
        automatic bit          ddir = dir;
        begin
          @(posedge clk); #1;
          check(ddir ? (a_v && a_q == dd) : (b_v && b_q == dd), "block delivered intact");
        end
      join_none
    end
    check(flips == coded, "wire flips equal coded 1s over the profile");
    // dense data: the four-1s limit must win over binary; sparse data is
    // already light, and the column phase may add a few 1s there
    if (prof != 1) check(flips < raw, $sformatf("%s: fewer flips than binary 1s", name));
    else           check(flips * 10 <= raw * 11, $sformatf("%s: within 10%% of binary 1s", name));
    r100 = int'(raw * 100 / (8 * n));
    f100 = int'(flips * 100 / (8 * n));
    $display("%s: %0d blocks, binary 1s per byte %0d.%0d%0d, STFL flips per byte %0d.%0d%0d",
             name, n, r100 / 100, (r100 / 10) % 10, r100 % 10, f100 / 100, (f100 / 10) % 10, f100 % 10);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, "random", 2000);
    run(1, "sparse", 2000);
    run(2, "float", 2000);
    repeat (4) @(posedge clk);
    check(!a_e && !b_e, "no dummy-slot errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
