// phy_cgc: latch-based clock gating cell.
//
// The enable is the OR of a functional enable (i_clk_en) and a test enable
// (i_cgc_en). In the rest-low variant (REST_HIGH=0) the enable is captured by a
// latch that is transparent while the clock is low, and the clock is ANDed
// with the latched enable, so a disabled clock rests at 0 and an enable change
// can never shorten a high pulse. The rest-high variant (REST_HIGH=1) latches
// while the clock is high and ORs the clock with the inverted latched enable,
// so the output rests at 1. o_clk_b is the complementary leg of the
// differential cell.
//
// Structure (OR, inverter, latch, AND) and pin names follow the gate-level
// view of the cell in the original PHY; the rest-high variant is described
// there only by its behaviour and is built here as the mirror image.
// Timing: i_clk_en must be stable during the clock phase in which the latch is
// open. The latch is intended (it is the point of the cell).
`timescale 1ps / 1ps
module phy_cgc #(
  parameter bit REST_HIGH = 1'b0
) (
  input  logic i_clk,
  input  logic i_clk_en,
  input  logic i_cgc_en,
  output logic o_clk,
  output logic o_clk_b
);

  logic en;
  logic en_lat;

  assign en = i_clk_en | i_cgc_en;

  if (!REST_HIGH) begin : g_rest_low
    always_latch begin
      if (!i_clk) en_lat = en;
    end
    assign o_clk = i_clk & en_lat;
  end else begin : g_rest_high
    always_latch begin
      if (i_clk) en_lat = en;
    end
    assign o_clk = i_clk | ~en_lat;
  end

  assign o_clk_b = ~o_clk;

endmodule
