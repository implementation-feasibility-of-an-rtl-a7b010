// phy_clk_div2ph: two-phase divide-by-two clock divider.
//
// A toggle flip-flop on the rising edge of i_clk gives a clock of half the
// frequency; o_clk_0 is that clock and o_clk_180 its inverse (180 degrees).
// The asynchronous reset parks o_clk_0 low. The outputs change one clk-to-q
// after each rising input edge. The block's purpose is the original design's; the
// toggle-flop realisation is the simplest one that does it.
`timescale 1ps / 1ps
module phy_clk_div2ph (
  input  logic i_clk,
  input  logic i_rst_n,
  output logic o_clk_0,
  output logic o_clk_180
);

  logic q;

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) q <= 1'b0;
    else          q <= ~q;
  end

  assign o_clk_0   = q;
  assign o_clk_180 = ~q;

endmodule
