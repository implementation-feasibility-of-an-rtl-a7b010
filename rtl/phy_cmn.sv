// phy_cmn: common clock block shared by both channels.
//
// A 3:1 clock mux (phy_clkmux3to1, one-hot i_ref_sel) picks the PLL reference
// from the analog reference clock, the reference clock or the alternate
// reference. The PLL (phy_pll, behavioural) turns it into a differential
// 240 ps clock and the 2600 ps VCO clock. A 4-phase divider (phy_clk_div4ph,
// held in reset until lock) halves the 240 ps clock into four quadrature
// 480 ps clocks, 120 ps apart: the same edges as taking every sixth edge of
// the 80 ps internal PLL clock with a three-edge offset. Each quadrature clock leaves
// through a rest-low clock gate (phy_cgc) that opens only when i_clk_en is
// high and the PLL is locked, so the channels never see clocks before lock.
// The inputs, the PLL and its output clocks are the original common block's;
// the use of the 3:1 mux for reference selection and of a gate per phase is
// this design's arrangement of the cells the original block contains, as is
// building the four phases with the divider rather than inside the PLL.
`timescale 1ps / 1ps
module phy_cmn (
  input  logic       i_ana_refclk,
  input  logic       i_refclk,
  input  logic       i_refclk_alt,
  input  logic [2:0] i_ref_sel,    // one-hot: [0] ana_refclk, [1] refclk, [2] refclk_alt
  input  logic       i_pll_en,
  input  logic       i_clk_en,
  output logic [3:0] o_pll_clk,    // phases 0, 90, 180, 270
  output logic       o_vco0_clk,
  output logic       o_pll_lock
);

  logic       pll_ref;
  logic [3:0] pll_clk;
  logic       gate_en;
  logic       clk2x_t;
  logic       clk2x_c;

  phy_clkmux3to1 u_refmux (
    .i_clk   ({i_refclk_alt, i_refclk, i_ana_refclk}),
    .i_sel   (i_ref_sel),
    .o_clk_t (pll_ref),
    .o_clk_c ()
  );

  phy_pll u_pll (
    .i_refclk    (pll_ref),
    .i_en        (i_pll_en),
    .o_pll_clk_0 (),
    .o_pll_clk_1 (),
    .o_pll_clk_2 (),
    .o_pll_clk_3 (),
    .o_clk2x_t   (clk2x_t),
    .o_clk2x_c   (clk2x_c),
    .o_vco0_clk  (o_vco0_clk),
    .o_lock      (o_pll_lock)
  );

  phy_clk_div4ph u_div4 (
    .i_clk_t (clk2x_t),
    .i_clk_c (clk2x_c),
    .i_rst_n (o_pll_lock),
    .o_clk   (pll_clk)
  );

  assign gate_en = i_clk_en & o_pll_lock;

  for (genvar k = 0; k < 4; k++) begin : g_gate
    phy_cgc #(.REST_HIGH(1'b0)) u_cgc (
      .i_clk    (pll_clk[k]),
      .i_clk_en (gate_en),
      .i_cgc_en (1'b0),
      .o_clk    (o_pll_clk[k]),
      .o_clk_b  ()
    );
  end

endmodule
