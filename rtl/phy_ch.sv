// phy_ch: one DRAM channel of the PHY (NUM_DQ data bits plus a strobe).
//
// Clock: a phase interpolator (phy_pi) mixes the four quadrature PLL clocks
// with the thermometer weights i_pi_sel[0..3] (for 0, 90, 180, 270 degrees).
// Its output passes a rest-low clock gate (i_clk_en) and becomes o_phy_clk,
// the channel clock on which the write data is presented and read data is
// taken.
//
// Transmit: per DQ bit a 2:1 serializer (phy_ser2to1) sends the even bit in
// the low phase and the odd bit in the high phase of o_phy_clk, and a
// programmable delay (phy_prog_dly, i_dq_gear / i_dq_ctrl) places it on o_dq.
// A pair presented before rising edge n of o_phy_clk starts on the pad half a
// period after that edge. The strobe o_dqs is a serializer driven with
// (even = not i_wrdata_en, odd = 1): it rests high, and during a burst falls
// at the start of every even bit and rises at the start of every odd bit. It
// has its own delay (i_dqs_gear / i_dqs_ctrl), which is set a quarter period
// (120 ps at 480 ps) longer than the DQ delay so the strobe edges sit in the
// middle of the data bits. o_dq_oe marks the bits that carry data.
//
// Receive: the receive pins are the pads (i_dq, i_dqs) or, with i_lpbk_en, the
// channel's own transmit outputs (driver loopback). A falling strobe edge
// captures the even bit; the following rising edge writes {odd bit on the
// pin, captured even bit} into the RX FIFO (phy_async_fifo), whose write
// clock is the strobe and whose read clock is o_phy_clk. o_rddata_valid shows
// that a pair is waiting; i_rd_en takes it. o_rx_overflow is sticky. The
// FIFO's write side only sees clock edges while a strobe toggles, so its view
// of the read pointer is refreshed only during a burst: after an overflow has
// been drained, the first two pairs of the next burst are still dropped.
//
// The blocks and their order (interpolated clock, datapath, delay element,
// driver with loopback, 2-phase sampling, FIFO to the DFI side) follow the
// original channel; the strobe pattern, the capture scheme, the FIFO depth and
// the use of one PI per channel are this design's choices.
`timescale 1ps / 1ps
module phy_ch
  import phy_pkg::*;
#(
  parameter int unsigned N_DQ      = NUM_DQ,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic              i_rst_n,
  input  logic [3:0]        i_pll_clk,
  input  logic              i_clk_en,
  input  logic [PI_N-1:0]   i_pi_sel [4],
  input  dly_gear_t         i_dq_gear,
  input  dly_ctrl_t         i_dq_ctrl,
  input  dly_gear_t         i_dqs_gear,
  input  dly_ctrl_t         i_dqs_ctrl,
  input  logic              i_lpbk_en,
  output logic              o_phy_clk,
  // write data, o_phy_clk domain
  input  logic [N_DQ-1:0]   i_wrdata_even,
  input  logic [N_DQ-1:0]   i_wrdata_odd,
  input  logic              i_wrdata_en,
  // read data, o_phy_clk domain
  input  logic              i_rd_en,
  output logic [N_DQ-1:0]   o_rddata_even,
  output logic [N_DQ-1:0]   o_rddata_odd,
  output logic              o_rddata_valid,
  output logic              o_rx_overflow,
  // pins
  output logic [N_DQ-1:0]   o_dq,
  output logic              o_dq_oe,
  output logic              o_dqs,
  input  logic [N_DQ-1:0]   i_dq,
  input  logic              i_dqs
);

  logic              pi_clk;
  logic [N_DQ-1:0]   dq_ser;
  logic              dqs_ser;
  logic              oe_ser;
  logic [N_DQ-1:0]   rx_dq;
  logic              rx_dqs;
  logic [N_DQ-1:0]   even_q;
  logic              fifo_empty;

  // ---------------- clock ----------------
  phy_pi #(.N(PI_N)) u_pi (
    .clk0    (i_pll_clk[0]),
    .clk90   (i_pll_clk[1]),
    .clk180  (i_pll_clk[2]),
    .clk270  (i_pll_clk[3]),
    .sel0    (i_pi_sel[0]),
    .sel0b   (~i_pi_sel[0]),
    .sel90   (i_pi_sel[1]),
    .sel90b  (~i_pi_sel[1]),
    .sel180  (i_pi_sel[2]),
    .sel180b (~i_pi_sel[2]),
    .sel270  (i_pi_sel[3]),
    .sel270b (~i_pi_sel[3]),
    .xcpl    (4'b0000),
    .xcplb   (4'b1111),
    .outp    (pi_clk),
    .outn    ()
  );

  phy_cgc #(.REST_HIGH(1'b0)) u_phy_cgc (
    .i_clk    (pi_clk),
    .i_clk_en (i_clk_en),
    .i_cgc_en (1'b0),
    .o_clk    (o_phy_clk),
    .o_clk_b  ()
  );

  // ---------------- transmit ----------------
  for (genvar i = 0; i < int'(N_DQ); i++) begin : g_dq
    phy_ser2to1 u_ser (
      .i_clk   (o_phy_clk),
      .i_deven (i_wrdata_even[i]),
      .i_dodd  (i_wrdata_odd[i]),
      .o_sdata (dq_ser[i])
    );
    phy_prog_dly u_dly (
      .i_in   (dq_ser[i]),
      .i_gear (i_dq_gear),
      .i_ctrl (i_dq_ctrl),
      .o_out  (o_dq[i])
    );
  end

  phy_ser2to1 u_dqs_ser (
    .i_clk   (o_phy_clk),
    .i_deven (~i_wrdata_en),
    .i_dodd  (1'b1),
    .o_sdata (dqs_ser)
  );

  phy_prog_dly u_dqs_dly (
    .i_in   (dqs_ser),
    .i_gear (i_dqs_gear),
    .i_ctrl (i_dqs_ctrl),
    .o_out  (o_dqs)
  );

  phy_ser2to1 u_oe_ser (
    .i_clk   (o_phy_clk),
    .i_deven (i_wrdata_en),
    .i_dodd  (i_wrdata_en),
    .o_sdata (oe_ser)
  );

  phy_prog_dly u_oe_dly (
    .i_in   (oe_ser),
    .i_gear (i_dq_gear),
    .i_ctrl (i_dq_ctrl),
    .o_out  (o_dq_oe)
  );

  // ---------------- receive ----------------
  assign rx_dq  = i_lpbk_en ? o_dq  : i_dq;
  assign rx_dqs = i_lpbk_en ? o_dqs : i_dqs;

  always_ff @(negedge rx_dqs) begin
    even_q <= rx_dq;
  end

  phy_async_fifo #(.WIDTH(2 * N_DQ), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .i_rst_n    (i_rst_n),
    .i_wclk     (rx_dqs),
    .i_push     (1'b1),
    .i_wdata    ({rx_dq, even_q}),
    .o_full     (),
    .o_overflow (o_rx_overflow),
    .i_rclk     (o_phy_clk),
    .i_pop      (i_rd_en),
    .o_rdata    ({o_rddata_odd, o_rddata_even}),
    .o_empty    (fifo_empty)
  );

  assign o_rddata_valid = ~fifo_empty;

endmodule
