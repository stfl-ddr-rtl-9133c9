// tb_stfl_top: end-to-end testbench of stfl_top at its default size.
//
// DRAM channel: a behavioural DRAM core (an associative array of 64-byte
// lines; a line never written reads as a pattern of its address) sits on
// the mem_* ports. A random stream of line writes and reads over a small
// address set is offered back to back, so bursts follow each other with no
// gap, the bus turns around between reads and writes, and reads right after
// writes are held. Every read must return the last data written to its
// address (or the pattern), 15 cycles after acceptance; every write must
// reach the core with the right address and data; no data wire may flip in
// two consecutive cycles and no end may see a flip in a dummy slot.
//
// LLC: blocks are sent over both STFL-LLC buses at the same time and must
// arrive intact 14 cycles after acceptance.
//
// Every mechanism of the design is counted and must occur at least once:
// column inversion, row inversion, dummy slots, back-to-back bursts, bus
// turnaround, write-to-read hold, the three LLC modes, both LLC buses and
// the divided reference clock.
module tb_stfl_top;
  import tb_stfl_ref_pkg::*;

  localparam int NCH = 8;
  localparam int LW  = 64 * NCH;
  localparam int BW  = 512;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_we = 0, req_ready, resp_valid;
  logic [31:0] req_addr = '0;
  logic [LW-1:0] req_wdata = '0, resp_rdata;
  logic mem_rd_en, mem_wr_en;
  logic [31:0] mem_rd_addr, mem_wr_addr;
  logic [LW-1:0] mem_rd_data, mem_wr_data;
  logic [8*NCH-1:0] dq;
  logic [NCH-1:0] mode;
  logic ddr_err, ref_clk, ref_tick, llc_err;
  logic [31:0] n_writes, n_reads, n_turn, n_wtr;
  logic wi_v = 0, wi_r, wo_v, ri_v = 0, ri_r, ro_v;
  logic [BW-1:0] wi_d = '0, wo_d, ri_d = '0, ro_d;
  logic [63:0] w_dw, r_dw;
  logic [15:0] w_mw, r_mw;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  stfl_top dut (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .resp_valid, .resp_rdata,
    .mem_rd_en, .mem_rd_addr, .mem_rd_data, .mem_wr_en, .mem_wr_addr, .mem_wr_data,
    .dq, .mode, .ddr_err, .data_ref_clk(ref_clk), .data_ref_tick(ref_tick),
    .n_writes, .n_reads, .n_turnarounds(n_turn), .n_wtr_stalls(n_wtr),
    .llc_wr_in_valid(wi_v), .llc_wr_in_ready(wi_r), .llc_wr_in_data(wi_d),
    .llc_wr_out_valid(wo_v), .llc_wr_out_data(wo_d),
    .llc_wr_data_wires(w_dw), .llc_wr_mode_wires(w_mw),
    .llc_rd_in_valid(ri_v), .llc_rd_in_ready(ri_r), .llc_rd_in_data(ri_d),
    .llc_rd_out_valid(ro_v), .llc_rd_out_data(ro_d),
    .llc_rd_data_wires(r_dw), .llc_rd_mode_wires(r_mw),
    .llc_err);

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

  // ---------------------------------------------------------- DRAM core model
  logic [LW-1:0] core [int unsigned];
  function automatic logic [LW-1:0] pattern(input logic [31:0] a);
    return {NCH*2{a}};
  endfunction
  assign mem_rd_data = core.exists(mem_rd_addr) ? core[mem_rd_addr] : pattern(mem_rd_addr);

  logic [31:0]   exp_wa_q[$];
  logic [LW-1:0] exp_wd_q[$];
  logic [LW-1:0] exp_rd_q[$];
  int            exp_rt_q[$];
  int            n_core_writes = 0;

  always @(posedge clk) begin
    if (mem_wr_en) begin
      core[mem_wr_addr] = mem_wr_data;
      n_core_writes++;
      check(exp_wa_q.size() > 0, "core write expected");
      if (exp_wa_q.size() > 0) begin
        logic [31:0] a;
        logic [LW-1:0] d;
        a = exp_wa_q.pop_front();
        d = exp_wd_q.pop_front();
        check(mem_wr_addr == a && mem_wr_data == d, $sformatf("core write to %h", mem_wr_addr));
      end
    end
  end

  always @(posedge clk) begin
    #2;
    if (resp_valid) begin
      check(exp_rd_q.size() > 0, "read response expected");
      if (exp_rd_q.size() > 0) begin
        logic [LW-1:0] d;
        int t;
        d = exp_rd_q.pop_front();
        t = exp_rt_q.pop_front();
        check(resp_rdata == d, "read returns the last written line");
        check(cyc == t, $sformatf("read response at %0d expected %0d", cyc, t));
      end
    end
  end

  // wire monitor on the shared DRAM data wires
  logic [8*NCH-1:0] dq_prev, flip_prev;
  int n_flips = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      logic [8*NCH-1:0] f;
      f = dq ^ dq_prev;
      if ((f & flip_prev) != '0) begin
        checks++; failures++;
        $display("FAIL: DRAM data wire flipped in consecutive cycles at %0d", cyc);
      end
      for (int i = 0; i < 8*NCH; i++) n_flips += int'(f[i]);
      flip_prev <= f;
    end else flip_prev <= '0;
    dq_prev <= dq;
  end

  // divided reference clock
  int n_ref_edges = 0;
  logic ref_prev = 0;
  always @(posedge clk) begin
    if (ref_clk && !ref_prev) n_ref_edges++;
    ref_prev <= ref_clk;
  end

  // ---------------------------------------------------------------- counters
  int n_colinv = 0, n_rowinv = 0, n_dummy = 0, n_b2b = 0;
  int n_llc_mode [3] = '{0, 0, 0};
  int n_llc_w = 0, n_llc_r = 0;

  task automatic count_ddr(input logic [LW-1:0] d);
    for (int k = 0; k < NCH; k++) begin
      logic [63:0] rows;
      logic [7:0]  h;
      logic [3:0]  v;
      ddr_encode(d[64*k +: 64], rows, h, v);
      n_colinv += ones({60'b0, v});
      n_rowinv += ones({56'b0, h});
      n_dummy  += ones(rows);
    end
  endtask

  task automatic count_llc(input logic [BW-1:0] b);
    for (int g = 0; g < BW/32; g++) begin
      logic [31:0] c;
      logic [11:0] m;
      llc_group(b[32*g +: 32], c, m);
      for (int i = 0; i < 4; i++)
        case (m[3*i +: 3])
          3'b000: n_llc_mode[0]++;
          3'b010: n_llc_mode[1]++;
          default: n_llc_mode[2]++;
        endcase
    end
  endtask

  function automatic logic [LW-1:0] make_line(input int kind);
    logic [LW-1:0] l;
    logic [7:0] base;
    base = 8'($urandom);
    for (int i = 0; i < LW/8; i++)
      case (kind)
        0: l[8*i +: 8] = 8'($urandom);
        1: l[8*i +: 8] = ($urandom % 4 == 0) ? 8'($urandom) : 8'h00;
        default: l[8*i +: 8] = base ^ (8'h01 << ($urandom % 3));
      endcase
    return l;
  endfunction

  // ------------------------------------------------------------ DRAM stream
  logic [LW-1:0] shadow [int unsigned];
  bit ddr_done = 0;
  initial begin
    int last_acc;
    bit we;
    logic [31:0] a;
    logic [LW-1:0] d;
    last_acc = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 120; i++) begin
      we = (i < 4) ? 1'b1 : 1'($urandom);
      a  = 32'h40 * ($urandom % 8);
      d  = make_line(i % 3);
      req_valid = 1; req_we = we; req_addr = a; req_wdata = d;
      while (!req_ready) @(negedge clk);
      if (last_acc >= 0 && cyc - last_acc == 12) n_b2b++;
      last_acc = cyc;
      if (we) begin
        shadow[a] = d;
        exp_wa_q.push_back(a);
        exp_wd_q.push_back(d);
        count_ddr(d);
      end else begin
        logic [LW-1:0] e;
        e = shadow.exists(a) ? shadow[a] : pattern(a);
        exp_rd_q.push_back(e);
        exp_rt_q.push_back(cyc + 16);  // cyc still holds the count before the accepting edge
        count_ddr(e);
      end
      @(negedge clk);
    end
    req_valid = 0;
    repeat (30) @(negedge clk);
    ddr_done = 1;
  end

  // ------------------------------------------------------------- LLC streams
  logic [BW-1:0] llc_wq[$], llc_rq[$];
  int            llc_wt[$], llc_rt[$];
  bit llc_done = 0;

  always @(posedge clk) begin
    #2;
    if (wo_v) begin
      check(llc_wq.size() > 0 && wo_d == llc_wq.pop_front(), "LLC write bus block intact");
      check(llc_wt.size() > 0 && cyc == llc_wt.pop_front(), "LLC write bus latency");
      n_llc_w++;
    end
    if (ro_v) begin
      check(llc_rq.size() > 0 && ro_d == llc_rq.pop_front(), "LLC read bus block intact");
      check(llc_rt.size() > 0 && cyc == llc_rt.pop_front(), "LLC read bus latency");
      n_llc_r++;
    end
  end

  initial begin
    logic [BW-1:0] bw, br;
    @(posedge rst_n);
    @(negedge clk);
    for (int i = 0; i < 60; i++) begin
      bw = make_line(i % 3);
      br = make_line((i + 1) % 3);
      wi_v = 1; wi_d = bw; ri_v = 1; ri_d = br;
      while (!(wi_r && ri_r)) @(negedge clk);
      llc_wq.push_back(bw); llc_wt.push_back(cyc + 15);
      llc_rq.push_back(br); llc_rt.push_back(cyc + 15);
      count_llc(bw); count_llc(br);
      @(negedge clk);
      wi_v = 0; ri_v = 0;
    end
    repeat (30) @(negedge clk);
    llc_done = 1;
  end

  initial begin
    wait (ddr_done && llc_done);
    check(exp_rd_q.size() == 0 && exp_wa_q.size() == 0, "every DRAM request completed");
    check(llc_wq.size() == 0 && llc_rq.size() == 0, "every LLC block delivered");
    check(!ddr_err && !llc_err, "no error flags");
    check(n_writes == 32'(n_core_writes), "write counter matches core writes");
    $display("DRAM: writes %0d reads %0d back-to-back %0d turnarounds %0d write-to-read stall cycles %0d",
             n_writes, n_reads, n_b2b, n_turn, n_wtr);
    $display("DRAM: column inversions %0d row inversions %0d dummy slots %0d wire flips %0d",
             n_colinv, n_rowinv, n_dummy, n_flips);
    $display("LLC: blocks %0d + %0d, modes orig %0d inv %0d xor %0d",
             n_llc_w, n_llc_r, n_llc_mode[0], n_llc_mode[1], n_llc_mode[2]);
    $display("reference clock rising edges %0d", n_ref_edges);
    check(n_writes > 0 && n_reads > 0, "reads and writes happened");
    check(n_b2b > 0, "back-to-back bursts happened");
    check(n_turn > 0, "bus turnaround happened");
    check(n_wtr > 0, "write-to-read hold happened");
    check(n_colinv > 0, "column inversion happened");
    check(n_rowinv > 0, "row inversion happened");
    check(n_dummy > 0, "dummy slots happened");
    check(n_flips == n_dummy, "one wire flip per transmitted 1");
    check(n_llc_mode[0] > 0 && n_llc_mode[1] > 0 && n_llc_mode[2] > 0, "all LLC modes happened");
    check(n_llc_w > 0 && n_llc_r > 0, "both LLC buses used");
    check(n_ref_edges > 0, "reference clock divided");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
