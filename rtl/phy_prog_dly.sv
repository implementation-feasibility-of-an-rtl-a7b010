// phy_prog_dly: behavioural model of the programmable delay cell.
//
// This is a behavioural model, not synthesizable logic: the real cell is a
// full-custom delay line (inverter chain with switchable capacitive loads) and
// its delay comes from the circuit, not from a clocked process.
//
// o_out follows i_in after a transport delay (every edge is kept) of
//   gear 0: 200 + 5*ctrl ps     gear 1: 110 + 3*ctrl ps
//   gear 2:  78 + 2*ctrl ps     gear 3:  62 + 1*ctrl ps
// with a 6-bit fine code ctrl. That law is the original cell's own model; it
// is taken from phy_pkg::prog_dly_ps. The delay applied to an edge is the one
// selected when the edge arrives. o_out takes the input's initial level one
// delay after time zero.
`timescale 1ps / 1ps
module phy_prog_dly
  import phy_pkg::*;
(
  input  logic      i_in,
  input  dly_gear_t i_gear,
  input  dly_ctrl_t i_ctrl,
  output logic      o_out
);

  int unsigned dly_ps;

  assign dly_ps = prog_dly_ps(i_gear, i_ctrl);

  // Schedule the current input level, then every later change of it.
  always begin
    o_out <= #(dly_ps) i_in;
    @(i_in);
  end

endmodule
