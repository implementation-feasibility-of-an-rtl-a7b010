// phy_sram: single-port SRAM for the PHY's embedded MCU (instructions and
// data), DWIDTH-bit words with one write strobe per byte.
//
// On a rising edge of i_clk with i_en high: if i_we, the bytes of i_wdata whose
// i_wstrb bit is set are written at word i_addr; otherwise word i_addr is read.
// Read data appears on o_rdata one cycle after the read (PIPELINE=0) or two
// cycles after it (PIPELINE=1) and holds until the next read. Writes do not
// change o_rdata. The word width, depth, strobe width and pipeline option are
// the original memory's parameters (32 bits x 2048 words, 8 KiB); in silicon
// this is a compiled SRAM macro, here it is an inferred memory array. The
// contents are not initialised.
`timescale 1ps / 1ps
module phy_sram #(
  parameter int unsigned DWIDTH     = 32,
  parameter int unsigned DEPTH      = 2048,
  parameter int unsigned STRB_WIDTH = DWIDTH / 8,
  parameter bit          PIPELINE   = 1'b0
) (
  input  logic                     i_clk,
  input  logic                     i_en,
  input  logic                     i_we,
  input  logic [$clog2(DEPTH)-1:0] i_addr,
  input  logic [DWIDTH-1:0]        i_wdata,
  input  logic [STRB_WIDTH-1:0]    i_wstrb,
  output logic [DWIDTH-1:0]        o_rdata
);

  logic [STRB_WIDTH-1:0][7:0] mem [DEPTH];
  logic [DWIDTH-1:0]          rd_q;

  always_ff @(posedge i_clk) begin
    if (i_en) begin
      if (i_we) begin
        for (int b = 0; b < int'(STRB_WIDTH); b++) begin
          if (i_wstrb[b]) mem[i_addr][b] <= i_wdata[8*b +: 8];
        end
      end else begin
        rd_q <= mem[i_addr];
      end
    end
  end

  if (PIPELINE) begin : g_pipe
    always_ff @(posedge i_clk) o_rdata <= rd_q;
  end else begin : g_nopipe
    assign o_rdata = rd_q;
  end

endmodule
