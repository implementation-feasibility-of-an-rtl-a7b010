// phy_ctrl_plane: clock selection for the PHY's control side.
//
// o_ref_clk is a glitch-free choice (phy_gfcm) between i_refclk and
// i_refclk_alt. o_mcu_clk is a glitch-free choice between o_ref_clk and the
// PLL clock i_pll_clk, so the MCU can run from the reference before the PLL
// locks and move to the PLL afterwards. o_ahb_clk is o_ref_clk divided by two
// (phy_clk_div2ph; 52 ns from a 26 ns reference). o_ahb_extclk is the external
// AHB clock through a rest-low clock gate. i_rst_n resets the muxes to their
// first input and the divider low. The input and output clocks and their
// periods are the original block's; the select inputs, the reset and the use
// of glitch-free muxes and a divider are this design's.
// The one latch in this module is the enable latch of the external-clock gate
// (phy_cgc), which is intended.
`timescale 1ps / 1ps
module phy_ctrl_plane (
  input  logic i_rst_n,
  input  logic i_refclk,
  input  logic i_refclk_alt,
  input  logic i_pll_clk,
  input  logic i_ahb_extclk,
  input  logic i_refclk_alt_sel,  // 1: use i_refclk_alt as reference
  input  logic i_mcu_pll_sel,     // 1: MCU clock from the PLL
  input  logic i_ahb_extclk_en,
  output logic o_ref_clk,
  output logic o_mcu_clk,
  output logic o_ahb_clk,
  output logic o_ahb_extclk
);

  phy_gfcm u_ref_mux (
    .i_clk0  (i_refclk),
    .i_clk1  (i_refclk_alt),
    .i_sel   (i_refclk_alt_sel),
    .i_rst_n (i_rst_n),
    .o_clk   (o_ref_clk)
  );

  phy_gfcm u_mcu_mux (
    .i_clk0  (o_ref_clk),
    .i_clk1  (i_pll_clk),
    .i_sel   (i_mcu_pll_sel),
    .i_rst_n (i_rst_n),
    .o_clk   (o_mcu_clk)
  );

  phy_clk_div2ph u_ahb_div (
    .i_clk     (o_ref_clk),
    .i_rst_n   (i_rst_n),
    .o_clk_0   (o_ahb_clk),
    .o_clk_180 ()
  );

  phy_cgc #(.REST_HIGH(1'b0)) u_extclk_cgc (
    .i_clk    (i_ahb_extclk),
    .i_clk_en (i_ahb_extclk_en),
    .i_cgc_en (1'b0),
    .o_clk    (o_ahb_extclk),
    .o_clk_b  ()
  );

endmodule
