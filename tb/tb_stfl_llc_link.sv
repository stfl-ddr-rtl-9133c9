// tb_stfl_llc_link: self-checking testbench of stfl_llc_link.
//
// 64-byte blocks (random, zero-rich and with neighbouring bytes alike, so
// that all three encoding modes occur) are offered back to back. Checked:
// one block accepted every 12 cycles; each block delivered intact 14
// cycles after acceptance and in order; no data wire flips in two
// consecutive cycles; the flips per data wire per burst equal the 1s of the
// reference codeword, and each group's mode wire flips once per 1 of the
// reference mode word; no error flag.
module tb_stfl_llc_link;
  import tb_stfl_ref_pkg::*;

  localparam int NB = 64;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, err;
  logic [8*NB-1:0] in_data = '0, out_data;
  logic [NB-1:0] dw, dw_prev, flip_prev;
  logic [NB/4-1:0] mw, mw_prev;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_mode [3] = '{0, 0, 0};

  always #5 clk = ~clk;

  stfl_llc_link dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid,
                     .out_data, .data_wires(dw), .mode_wires(mw), .err);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [8*NB-1:0] exp_q[$];
  int              due_q[$];
  int              flips_d [NB];
  int              flips_m [NB/4];
  int              exp_fd_q[$];   // expected flips, per wire, queued per burst
  int              exp_fm_q[$];

  always @(posedge clk) cyc <= cyc + 1;

  // wire monitor: never two consecutive flips on a data wire
  always @(posedge clk) begin
    if (rst_n) begin
      logic [NB-1:0] f;
      f = dw ^ dw_prev;
      check((f & flip_prev) == '0, "no data wire flips in consecutive cycles");
      flip_prev <= f;
      for (int i = 0; i < NB; i++) flips_d[i] += int'(f[i]);
      for (int g = 0; g < NB/4; g++) flips_m[g] += int'(mw[g] ^ mw_prev[g]);
    end else flip_prev <= '0;
    dw_prev <= dw;
    mw_prev <= mw;
  end

  // output monitor
  always @(posedge clk) begin
    #2;
    if (out_valid) begin
      logic [8*NB-1:0] e;
      int d;
      check(exp_q.size() > 0, "output with nothing sent");
      if (exp_q.size() > 0) begin
        e = exp_q.pop_front();
        d = due_q.pop_front();
        check(out_data == e, "block delivered intact");
        check(cyc == d, $sformatf("delivered at %0d expected %0d", cyc, d));
      end
    end
  end

  function automatic logic [8*NB-1:0] make_block(input int kind);
    logic [8*NB-1:0] b;
    logic [7:0] base;
    base = 8'($urandom);
    for (int i = 0; i < NB; i++) begin
      case (kind)
        0: b[8*i +: 8] = 8'($urandom);
        1: b[8*i +: 8] = ($urandom % 3 == 0) ? 8'($urandom) : 8'h00;
        2: b[8*i +: 8] = base ^ (8'h01 << ($urandom % 2));
        default: b[8*i +: 8] = ($urandom % 2) ? 8'hFF : 8'hFE;
      endcase
    end
    return b;
  endfunction

  initial begin
    int last_acc;
    logic [8*NB-1:0] blk;
    last_acc = -1;
    foreach (flips_d[i]) flips_d[i] = 0;
    foreach (flips_m[i]) flips_m[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      blk = make_block(n % 4);
      in_valid = 1; in_data = blk;
      while (!in_ready) @(negedge clk);
      if (last_acc >= 0) check(cyc - last_acc == 12, "one block every 12 cycles");
      last_acc = cyc;
      exp_q.push_back(blk);
      due_q.push_back(cyc + 15);  // cyc still holds the count before the accepting edge
      // reference flips for this burst
      for (int g = 0; g < NB/4; g++) begin
        logic [31:0] c;
        logic [11:0] m;
        llc_group(blk[32*g +: 32], c, m);
        for (int b = 0; b < 4; b++) begin
          exp_fd_q.push_back(ones({56'b0, c[8*b +: 8]}));
          case (m[3*(3-b) +: 3])
            3'b000: n_mode[0]++;
            3'b010: n_mode[1]++;
            default: n_mode[2]++;
          endcase
        end
        exp_fm_q.push_back(ones({52'b0, m}));
      end
      @(negedge clk);
      in_valid = 0;
      // sample the flip counters once this burst is on the wires: its slots
      // lie between edges E+1 and E+12
      fork
        begin
          int fd [NB];
          int fm [NB/4];
          repeat (0) @(posedge clk);
          foreach (fd[i]) fd[i] = flips_d[i];
          foreach (fm[i]) fm[i] = flips_m[i];
          repeat (12) @(posedge clk);
          #3;
          for (int i = 0; i < NB; i++) check(flips_d[i] - fd[i] == exp_fd_q.pop_front(), $sformatf("flips on data wire %0d", i));
          for (int g = 0; g < NB/4; g++) check(flips_m[g] - fm[g] == exp_fm_q.pop_front(), $sformatf("flips on mode wire %0d", g));
        end
      join_none
    end
    repeat (30) @(posedge clk);
    check(exp_q.size() == 0, "all blocks delivered");
    check(!err, "no error");
    check(n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0, "all three modes used");
    $display("modes: orig %0d inv %0d xor %0d", n_mode[0], n_mode[1], n_mode[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
