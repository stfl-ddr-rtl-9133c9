// stfl_clk_div: frequency divider for the data-wire reference.
//
// The interface runs from one reference clock (1600 MHz in the design); the
// low-power data wires never carry more than one flip per two bit slots,
// i.e. they need an 800 MHz reference. Because the two rates have a fixed
// ratio, the slower reference is derived by division instead of being sent
// as a second clock. This module divides by DIV (2 by default; any even
// value) with a counter and a toggle flip-flop, and also gives a one-cycle
// 'tick' at each rising edge of the divided clock for logic that stays in
// the fast clock domain. Dividing is what the design describes; the
// counter-and-toggle circuit is this implementation's.
module stfl_clk_div #(
  parameter int unsigned DIV = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk_div,   // clk / DIV, 50% duty cycle
  output logic tick       // high in the fast-clock cycle before clk_div rises
);

  localparam int unsigned HALF = DIV / 2;
  localparam int unsigned W    = (HALF > 1) ? $clog2(HALF) : 1;

  logic [W-1:0] cnt;
  logic         wrap;

  assign wrap = (cnt == W'(HALF - 1));
  assign tick = wrap & ~clk_div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      clk_div <= 1'b0;
    end else if (wrap) begin
      cnt     <= '0;
      clk_div <= ~clk_div;
    end else begin
      cnt     <= cnt + 1'b1;
    end
  end

endmodule
