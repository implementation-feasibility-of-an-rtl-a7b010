// phy_clk_div4ph: four-phase divide-by-two clock divider.
//
// From a differential input clock (i_clk_t, i_clk_c) it builds four clocks of
// half the input frequency, 90 degrees apart: a toggle flop on the rising edge
// of i_clk_t gives phase 0, a flop that copies it on the rising edge of i_clk_c
// (half an input period later = a quarter of the output period) gives phase 90,
// and their inverses give 180 and 270. o_clk[k] is phase k*90 degrees. After
// reset all flops are low. The purpose (quadrature clock generation by
// division) is from the original PHY; the circuit is this design's.
`timescale 1ps / 1ps
module phy_clk_div4ph (
  input  logic       i_clk_t,
  input  logic       i_clk_c,
  input  logic       i_rst_n,
  output logic [3:0] o_clk
);

  logic q0;
  logic q90;

  always_ff @(posedge i_clk_t or negedge i_rst_n) begin
    if (!i_rst_n) q0 <= 1'b0;
    else          q0 <= ~q0;
  end

  always_ff @(posedge i_clk_c or negedge i_rst_n) begin
    if (!i_rst_n) q90 <= 1'b0;
    else          q90 <= q0;
  end

  assign o_clk = {~q90, ~q0, q90, q0};

endmodule
