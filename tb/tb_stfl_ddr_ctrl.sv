// tb_stfl_ddr_ctrl: self-checking testbench of stfl_ddr_ctrl.
//
// A stream of random reads and writes is offered with req_valid held high,
// so the controller runs at its full rate. Checked: a request is accepted
// every 12 cycles (one STFL-DDR burst), the command appears the cycle after
// acceptance with the request's direction and address, exactly one of
// tx_start / rx_start follows one cycle later, a read right after a write
// waits 3 more cycles (15 instead of 12) and those stall cycles are counted, write data is on tx_data,
// read data handed in on rx_data/rx_valid comes out on resp_* one cycle
// later, and the read/write/turnaround counters match.
module tb_stfl_ddr_ctrl;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_we = 0;
  logic req_ready;
  logic [31:0] req_addr = '0;
  logic [127:0] req_wdata = '0;
  logic resp_valid;
  logic [127:0] resp_rdata;
  logic cmd_valid, cmd_we;
  logic [31:0] cmd_addr;
  logic tx_start, rx_start;
  logic [127:0] tx_data;
  logic rx_valid = 0;
  logic [127:0] rx_data = '0;
  logic [31:0] n_writes, n_reads, n_turn, n_wtr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  stfl_ddr_ctrl #(.ADDR_W(32), .LINE_W(128)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata,
    .resp_valid, .resp_rdata, .cmd_valid, .cmd_we, .cmd_addr,
    .tx_start, .tx_data, .rx_start, .rx_valid, .rx_data,
    .n_writes, .n_reads, .n_turnarounds(n_turn), .n_wtr_stalls(n_wtr));

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

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // per-request checks, run beside the request stream
  task automatic follow(input bit we, input logic [31:0] a, input logic [127:0] wd);
    logic [127:0] rd;
    @(negedge clk);
    check(cmd_valid && cmd_we == we && cmd_addr == a, "command one cycle after acceptance");
    check(!tx_start && !rx_start, "no start with the command");
    @(negedge clk);
    check(tx_start == we && rx_start == !we, "start one cycle after the command");
    if (we) check(tx_data == wd, "write data on tx_data");
    if (!we) begin
      // the receivers finish 12 cycles after the start edge
      repeat (11) @(negedge clk);
      rd = {$urandom, $urandom, $urandom, $urandom};
      rx_valid = 1; rx_data = rd;
      @(negedge clk);
      rx_valid = 0;
      check(resp_valid && resp_rdata == rd, "read data one cycle after rx_valid");
    end
  endtask

  initial begin
    int e_w, e_r, e_t, e_s, last_acc, gap;
    bit last_we, first, we;
    logic [31:0] a;
    logic [127:0] wd;
    e_w = 0; e_r = 0; e_t = 0; e_s = 0; last_acc = -1; last_we = 0; first = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      we = 1'($urandom);
      a  = $urandom;
      wd = {$urandom, $urandom, $urandom, $urandom};
      req_valid = 1; req_we = we; req_addr = a; req_wdata = wd;
      while (!req_ready) @(negedge clk);
      // accepted at the coming edge
      if (last_acc >= 0) begin
        gap = (!first && last_we && !we) ? 15 : 12;
        check(cyc - last_acc == gap, $sformatf("accepted %0d cycles after the last one, expected %0d", cyc - last_acc, gap));
        if (gap == 15) e_s += 3;
      end
      last_acc = cyc;
      if (we) e_w++; else e_r++;
      if (!first && we != last_we) e_t++;
      first = 0; last_we = we;
      fork
        follow(we, a, wd);
      join_none
      @(negedge clk);
    end
    req_valid = 0;
    repeat (20) @(negedge clk);
    check(n_writes == 32'(e_w) && n_reads == 32'(e_r) && n_turn == 32'(e_t) && n_wtr == 32'(e_s), "counters");
    check(e_t > 0, "turnarounds exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
