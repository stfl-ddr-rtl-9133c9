// tb_stfl_ddr_endpoint: self-checking testbench of stfl_ddr_endpoint.
//
// Two endpoints share eight data wires and a mode wire, as the processor
// side and the DRAM chip do. Random 64-bit blocks are sent in random
// directions, back to back (one burst per 12 cycles, including direction
// changes) and with idle gaps. Checked for every burst: the receiving end
// delivers the block 12 cycles after the start edge; the number of flips on
// each data wire equals the number of 1s in that row after the reference
// coding (so at most four); the mode wire carries the 12 reference mode bits
// as levels; and neither end flags a dummy-slot error.
module tb_stfl_ddr_endpoint;
  import tb_stfl_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic a_tx_start = 0, b_tx_start = 0;
  logic [63:0] a_tx_data = '0, b_tx_data = '0;
  logic [63:0] a_rx_data, b_rx_data;
  logic a_rx_valid, b_rx_valid, a_err, b_err;
  logic [7:0] a_dq, b_dq, dq;
  logic a_oe, b_oe, a_m, b_m, a_moe, b_moe, mode;
  int checks = 0, failures = 0;
  int n_vert = 0, n_horiz = 0, n_turn = 0;

  always #5 clk = ~clk;

  assign dq   = b_oe  ? b_dq : a_dq;
  assign mode = b_moe ? b_m  : a_m;

  // a burst started by one end is received by the other on the same edge
  stfl_ddr_endpoint a (.clk, .rst_n, .tx_start(a_tx_start), .tx_data(a_tx_data),
    .rx_start(b_tx_start), .rx_data(a_rx_data), .rx_valid(a_rx_valid), .rx_err(a_err),
    .dq_line(dq), .dq_out(a_dq), .dq_oe(a_oe), .mode_line(mode), .mode_out(a_m), .mode_oe(a_moe));
  stfl_ddr_endpoint b (.clk, .rst_n, .tx_start(b_tx_start), .tx_data(b_tx_data),
    .rx_start(a_tx_start), .rx_data(b_rx_data), .rx_valid(b_rx_valid), .rx_err(b_err),
    .dq_line(dq), .dq_out(b_dq), .dq_oe(b_oe), .mode_line(mode), .mode_out(b_m), .mode_oe(b_moe));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one burst from a (dir 0) or b (dir 1)
  task automatic burst(input bit dir, input logic [63:0] d, input int gap);
    logic [63:0] rows;
    logic [7:0]  horiz;
    logic [3:0]  vert;
    logic [7:0]  lvl_prev;
    int          flips [8];
    ddr_encode(d, rows, horiz, vert);
    n_vert  += ones({60'b0, vert});
    n_horiz += ones({56'b0, horiz});
    repeat (gap) @(negedge clk);
    if (gap == 0) @(negedge clk);
    if (dir) begin b_tx_start = 1; b_tx_data = d; end
    else     begin a_tx_start = 1; a_tx_data = d; end
    lvl_prev = dq;
    foreach (flips[r]) flips[r] = 0;
    @(posedge clk); #1;
    a_tx_start = 0; b_tx_start = 0;
    for (int k = 0; k < 12; k++) begin
      for (int r = 0; r < 8; r++) if (dq[r] != lvl_prev[r]) flips[r]++;
      check(mode == {horiz, vert}[11-k], $sformatf("mode slot %0d", k + 1));
      check(!(a_rx_valid || b_rx_valid) || k == 0, "no valid inside a burst");
      lvl_prev = dq;
      if (k < 11) begin @(posedge clk); #1; end
    end
    for (int r = 0; r < 8; r++)
      check(flips[r] == ones({56'b0, rows[8*r +: 8]}),
            $sformatf("wire %0d: %0d flips, expected %0d", r, flips[r], ones({56'b0, rows[8*r +: 8]})));
    // the receiving end has the block after the next edge
    fork
      begin
        @(posedge clk); #1;
        if (dir) begin
          check(a_rx_valid, "a: valid 12 cycles after start");
          check(a_rx_data == d, $sformatf("a received %h expected %h", a_rx_data, d));
        end else begin
          check(b_rx_valid, "b: valid 12 cycles after start");
          check(b_rx_data == d, $sformatf("b received %h expected %h", b_rx_data, d));
        end
      end
    join_none
  endtask

  initial begin
    bit last_dir, dir;
    last_dir = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    burst(0, 64'h0, 2);
    burst(0, '1, 0);
    burst(1, 64'hAAAA_AAAA_AAAA_AAAA, 0);
    burst(0, 64'h0F0F_0F0F_F0F0_F0F0, 0);
    for (int i = 0; i < 400; i++) begin
      dir = 1'($urandom);
      if (dir != last_dir) n_turn++;
      last_dir = dir;
      burst(dir, {$urandom, $urandom}, ($urandom % 4 == 0) ? 1 + $urandom % 3 : 0);
    end
    repeat (4) @(posedge clk);
    check(!a_err && !b_err, "no dummy-slot errors");
    check(n_vert > 0 && n_horiz > 0 && n_turn > 0, "column/row inversion and turnaround exercised");
    $display("column inversions %0d, row inversions %0d, turnarounds %0d", n_vert, n_horiz, n_turn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
