// phy_clkmux3to1: differential 3:1 clock multiplexer.
//
// i_sel is one-hot: bit k routes i_clk[k] to the output. In the original cell
// every input drives the output through a tri-state buffer enabled by its
// select bit; here the same function is written as an AND-OR, and with no
// select bit set the output rests low instead of floating (this design's
// choice, so that nothing downstream sees an undriven clock). o_clk_c is the
// complementary leg. Purely combinational; changing the select is not
// glitch-free (use phy_gfcm for that).
`timescale 1ps / 1ps
module phy_clkmux3to1 (
  input  logic [2:0] i_clk,
  input  logic [2:0] i_sel,
  output logic       o_clk_t,
  output logic       o_clk_c
);

  assign o_clk_t = |(i_clk & i_sel);
  assign o_clk_c = ~o_clk_t;

endmodule
