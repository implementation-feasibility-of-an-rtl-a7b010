// phy_async_fifo: dual-clock FIFO for crossing from a write clock to an
// unrelated read clock (the RX strobe domain to the PHY clock domain).
//
// Write side: on a rising edge of i_wclk with i_push high and the FIFO not
// full, i_wdata is stored and the write pointer advances. All write-side state
// is clocked by a rest-low clock gate (phy_cgc) enabled by "push and not
// full", so the storage and the write pointer are only clocked when a word is
// accepted. A push while full is dropped and sets the sticky o_overflow.
// Read side: o_rdata always shows the oldest word (first-word fall-through);
// a rising edge of i_rclk with i_pop high and the FIFO not empty removes it.
// Pointers cross domains in Gray code through two-flop synchronisers, so
// o_full and o_empty are conservative for two cycles of the other clock.
// When the write clock only runs while data arrives (a strobe), o_full stays
// set after the reader has drained the FIFO until two more write-clock edges.
// i_rst_n resets both sides asynchronously; release it while no words move.
//
// A FIFO between the RX datapath and the DFI side, and a clock-gated write
// buffer inside the asynchronous FIFOs, are from the original PHY; the
// depth, the Gray-pointer scheme and the flags are this design's.
// The one latch in this module is the enable latch of its clock gate (phy_cgc),
// which is intended.
`timescale 1ps / 1ps
module phy_async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 8
) (
  input  logic             i_rst_n,
  input  logic             i_wclk,
  input  logic             i_push,
  input  logic [WIDTH-1:0] i_wdata,
  output logic             o_full,
  output logic             o_overflow,
  input  logic             i_rclk,
  input  logic             i_pop,
  output logic [WIDTH-1:0] o_rdata,
  output logic             o_empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  typedef logic [AW:0] ptr_t;

  function automatic ptr_t bin2gray(ptr_t b);
    return b ^ (b >> 1);
  endfunction

  logic [WIDTH-1:0] mem [DEPTH];

  ptr_t wbin, wgray, rbin, rgray;
  ptr_t rgray_w1, rgray_w2;   // read pointer seen in the write domain
  ptr_t wgray_r1, wgray_r2;   // write pointer seen in the read domain
  logic wclk_g;
  logic wr_ok;

  // ---------------- write domain ----------------
  assign o_full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wr_ok  = i_push & ~o_full;

  phy_cgc #(.REST_HIGH(1'b0)) u_cgc_rl (
    .i_clk    (i_wclk),
    .i_clk_en (wr_ok),
    .i_cgc_en (1'b0),
    .o_clk    (wclk_g),
    .o_clk_b  ()
  );

  always_ff @(posedge wclk_g or negedge i_rst_n) begin
    if (!i_rst_n) begin
      wbin  <= '0;
      wgray <= '0;
    end else begin
      wbin  <= wbin + 1'b1;
      wgray <= bin2gray(wbin + 1'b1);
    end
  end

  always_ff @(posedge wclk_g) begin
    mem[wbin[AW-1:0]] <= i_wdata;
  end

  always_ff @(posedge i_wclk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      rgray_w1   <= '0;
      rgray_w2   <= '0;
      o_overflow <= 1'b0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (i_push && o_full) o_overflow <= 1'b1;
    end
  end

  // ---------------- read domain ----------------
  assign o_empty = (rgray == wgray_r2);
  assign o_rdata = mem[rbin[AW-1:0]];

  always_ff @(posedge i_rclk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (i_pop && !o_empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  initial begin
    assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("phy_async_fifo: DEPTH must be a power of two >= 4");
  end

endmodule
