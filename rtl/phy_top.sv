// phy_top: LPDDR4 PHY, one 32-bit controller-side port as two 16-bit DRAM
// channels.
//
// phy_cmn selects the reference and runs the PLL that makes four quadrature
// 480 ps clocks. Each channel (phy_ch) interpolates its own clock from them,
// serializes write data and strobe onto its pins through programmable delays,
// and captures read data on the strobe edges into a FIFO read out on the
// channel clock (o_phy_clk[c]). phy_ctrl_plane selects the reference, MCU and
// AHB clocks. phy_sram is the MCU's memory; the MCU itself, the DFI block, the
// AHB interconnect and the register file are not part of this RTL, so the
// SRAM port (clocked by o_mcu_clk), every configuration field and the
// channels' write/read data are top-level ports. Per-channel ports are arrays
// indexed by channel.
`timescale 1ps / 1ps
module phy_top
  import phy_pkg::*;
(
  input  logic                  i_rst_n,
  input  logic                  i_refclk,
  input  logic                  i_refclk_alt,
  input  logic                  i_ana_refclk,
  input  logic                  i_ahb_extclk,
  // common block / control plane configuration
  input  logic [2:0]            i_pll_ref_sel,
  input  logic                  i_pll_en,
  input  logic                  i_pll_clk_en,
  input  logic                  i_refclk_alt_sel,
  input  logic                  i_mcu_pll_sel,
  input  logic                  i_ahb_extclk_en,
  output logic                  o_pll_lock,
  output logic                  o_ref_clk,
  output logic                  o_mcu_clk,
  output logic                  o_ahb_clk,
  output logic                  o_ahb_extclk,
  // per-channel configuration
  input  logic                  i_ch_clk_en   [NUM_CH],
  input  logic [PI_N-1:0]       i_pi_sel      [NUM_CH][4],
  input  dly_gear_t             i_dq_gear     [NUM_CH],
  input  dly_ctrl_t             i_dq_ctrl     [NUM_CH],
  input  dly_gear_t             i_dqs_gear    [NUM_CH],
  input  dly_ctrl_t             i_dqs_ctrl    [NUM_CH],
  input  logic                  i_lpbk_en     [NUM_CH],
  output logic                  o_phy_clk     [NUM_CH],
  // per-channel data (o_phy_clk domain)
  input  logic [NUM_DQ-1:0]     i_wrdata_even [NUM_CH],
  input  logic [NUM_DQ-1:0]     i_wrdata_odd  [NUM_CH],
  input  logic                  i_wrdata_en   [NUM_CH],
  input  logic                  i_rd_en       [NUM_CH],
  output logic [NUM_DQ-1:0]     o_rddata_even [NUM_CH],
  output logic [NUM_DQ-1:0]     o_rddata_odd  [NUM_CH],
  output logic                  o_rddata_valid[NUM_CH],
  output logic                  o_rx_overflow [NUM_CH],
  // DRAM pins
  output logic [NUM_DQ-1:0]     o_dq          [NUM_CH],
  output logic                  o_dq_oe       [NUM_CH],
  output logic                  o_dqs         [NUM_CH],
  input  logic [NUM_DQ-1:0]     i_dq          [NUM_CH],
  input  logic                  i_dqs         [NUM_CH],
  // MCU SRAM port (o_mcu_clk domain)
  input  logic                             i_sram_en,
  input  logic                             i_sram_we,
  input  logic [$clog2(SRAM_DEPTH)-1:0]    i_sram_addr,
  input  logic [SRAM_DWIDTH-1:0]           i_sram_wdata,
  input  logic [SRAM_DWIDTH/8-1:0]         i_sram_wstrb,
  output logic [SRAM_DWIDTH-1:0]           o_sram_rdata
);

  logic [3:0] pll_clk;
  logic       vco0_clk;

  phy_cmn u_cmn (
    .i_ana_refclk (i_ana_refclk),
    .i_refclk     (i_refclk),
    .i_refclk_alt (i_refclk_alt),
    .i_ref_sel    (i_pll_ref_sel),
    .i_pll_en     (i_pll_en),
    .i_clk_en     (i_pll_clk_en),
    .o_pll_clk    (pll_clk),
    .o_vco0_clk   (vco0_clk),
    .o_pll_lock   (o_pll_lock)
  );

  phy_ctrl_plane u_ctrl_plane (
    .i_rst_n          (i_rst_n),
    .i_refclk         (i_refclk),
    .i_refclk_alt     (i_refclk_alt),
    .i_pll_clk        (vco0_clk),
    .i_ahb_extclk     (i_ahb_extclk),
    .i_refclk_alt_sel (i_refclk_alt_sel),
    .i_mcu_pll_sel    (i_mcu_pll_sel),
    .i_ahb_extclk_en  (i_ahb_extclk_en),
    .o_ref_clk        (o_ref_clk),
    .o_mcu_clk        (o_mcu_clk),
    .o_ahb_clk        (o_ahb_clk),
    .o_ahb_extclk     (o_ahb_extclk)
  );

  for (genvar c = 0; c < int'(NUM_CH); c++) begin : g_ch
    phy_ch u_ch (
      .i_rst_n        (i_rst_n),
      .i_pll_clk      (pll_clk),
      .i_clk_en       (i_ch_clk_en[c]),
      .i_pi_sel       (i_pi_sel[c]),
      .i_dq_gear      (i_dq_gear[c]),
      .i_dq_ctrl      (i_dq_ctrl[c]),
      .i_dqs_gear     (i_dqs_gear[c]),
      .i_dqs_ctrl     (i_dqs_ctrl[c]),
      .i_lpbk_en      (i_lpbk_en[c]),
      .o_phy_clk      (o_phy_clk[c]),
      .i_wrdata_even  (i_wrdata_even[c]),
      .i_wrdata_odd   (i_wrdata_odd[c]),
      .i_wrdata_en    (i_wrdata_en[c]),
      .i_rd_en        (i_rd_en[c]),
      .o_rddata_even  (o_rddata_even[c]),
      .o_rddata_odd   (o_rddata_odd[c]),
      .o_rddata_valid (o_rddata_valid[c]),
      .o_rx_overflow  (o_rx_overflow[c]),
      .o_dq           (o_dq[c]),
      .o_dq_oe        (o_dq_oe[c]),
      .o_dqs          (o_dqs[c]),
      .i_dq           (i_dq[c]),
      .i_dqs          (i_dqs[c])
    );
  end

  phy_sram #(.DWIDTH(SRAM_DWIDTH), .DEPTH(SRAM_DEPTH)) u_sram (
    .i_clk   (o_mcu_clk),
    .i_en    (i_sram_en),
    .i_we    (i_sram_we),
    .i_addr  (i_sram_addr),
    .i_wdata (i_sram_wdata),
    .i_wstrb (i_sram_wstrb),
    .o_rdata (o_sram_rdata)
  );

endmodule
