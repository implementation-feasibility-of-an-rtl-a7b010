// phy_ser2to1: 2:1 DDR serializer.
//
// On the rising edge of i_clk the even and odd bits are registered (De, Do).
// On the falling edge Do is copied into Do'. A multiplexer driven by the clock
// sends De while the clock is low and Do' while it is high. A pair presented
// before rising edge n therefore leaves as: even bit in the low phase after
// edge n, odd bit in the high phase after edge n+1. The output changes at both
// clock edges and is glitch-free because each mux input is stable while it is
// selected.
//
// The three-register structure and the mux input order (De on 0, Do' on 1)
// follow the classic serializer drawn for this cell; the original cell builds
// the storage from tri-state latches, here edge-triggered flip-flops are used.
`timescale 1ps / 1ps
module phy_ser2to1 (
  input  logic i_clk,
  input  logic i_deven,
  input  logic i_dodd,
  output logic o_sdata
);

  logic de;
  logic dodd_q;
  logic dodd_d;

  always_ff @(posedge i_clk) begin
    de     <= i_deven;
    dodd_q <= i_dodd;
  end

  always_ff @(negedge i_clk) begin
    dodd_d <= dodd_q;
  end

  assign o_sdata = i_clk ? dodd_d : de;

endmodule
