// phy_gfcm: glitch-free 2:1 clock multiplexer.
//
// Each input clock has a two-stage enable synchroniser clocked on its falling
// edge. A side may only turn on after the other side's enable has gone low,
// and enables change only while their own clock is low, so the output never
// sees a truncated pulse. After reset clk0 is selected. A select change takes
// about two falling edges of the old clock to release it and two of the new
// clock to take over; in between the output rests low.
//
// The block's function (a glitch-free clock mux inside the common clock
// driver) is from the original PHY; the flip-flop synchroniser structure is
// this design's choice.
`timescale 1ps / 1ps
module phy_gfcm (
  input  logic i_clk0,
  input  logic i_clk1,
  input  logic i_sel,
  input  logic i_rst_n,
  output logic o_clk
);

  logic [1:0] sync0;
  logic [1:0] sync1;

  always_ff @(negedge i_clk0 or negedge i_rst_n) begin
    if (!i_rst_n) sync0 <= 2'b11;
    else          sync0 <= {sync0[0], ~i_sel & ~sync1[1]};
  end

  always_ff @(negedge i_clk1 or negedge i_rst_n) begin
    if (!i_rst_n) sync1 <= 2'b00;
    else          sync1 <= {sync1[0], i_sel & ~sync0[1]};
  end

  assign o_clk = (i_clk0 & sync0[1]) | (i_clk1 & sync1[1]);

endmodule
