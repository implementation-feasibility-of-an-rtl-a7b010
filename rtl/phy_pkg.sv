// phy_pkg: constants and the programmable-delay transfer function shared by
// the LPDDR4 PHY clocking and datapath blocks.
//
// The numbers follow the PHY described for this design: a 26 ns (38.4 MHz)
// reference clock, a PLL that multiplies it by 325 and takes every 12th edge
// of that internal clock (480 ps, four quadrature phases), two 16-bit DRAM
// channels, and a 32-bit x 2048-word MCU SRAM. The delay law of the
// programmable delay cell (four gears, 6-bit fine code, picoseconds) is also
// the original design's. Everything else here is this design's choice.
`timescale 1ps / 1ps
package phy_pkg;

  localparam int unsigned REFCLK_PERIOD_PS = 26000; // 38.4 MHz reference
  localparam int unsigned PLL_MULT         = 325;   // internal PLL clock = ref x 325
  localparam int unsigned PLL_POST_EDGES   = 12;    // output period in internal half-periods
  localparam int unsigned PLL_PHASE_EDGES  = 3;     // 90 degree step in internal half-periods
  localparam int unsigned VCO0_DIV         = 10;    // o_vco0_clk = ref / 10 (2600 ps)

  localparam int unsigned NUM_CH    = 2;   // two 16-bit DRAM channels
  localparam int unsigned NUM_DQ    = 16;  // DQ bits per channel
  localparam int unsigned PI_N      = 16;  // thermometer weight bits per PI phase

  localparam int unsigned SRAM_DWIDTH = 32;
  localparam int unsigned SRAM_DEPTH  = 2048;

  typedef logic [1:0] dly_gear_t;
  typedef logic [5:0] dly_ctrl_t;

  // Programmable delay law, in picoseconds.
  function automatic int unsigned prog_dly_ps(dly_gear_t gear, dly_ctrl_t ctrl);
    case (gear)
      2'd0:    return 200 + 5 * int'(ctrl);
      2'd1:    return 110 + 3 * int'(ctrl);
      2'd2:    return 78  + 2 * int'(ctrl);
      default: return 62  + 1 * int'(ctrl);
    endcase
  endfunction

endpackage
