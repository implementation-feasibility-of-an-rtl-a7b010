// tb_phy_ch: one full 16-bit channel driven by four quadrature 480 ps clocks.
// DQ delay 62 ps, DQS delay 182 ps (a quarter period later). Random write
// bursts are sent; each pair must come back, in order, from the RX FIFO:
//   1. internal loopback,
//   2. external loopback through the pins with an extra 40 ps of board delay,
//   3. loopback with the interpolator at 90 degrees,
//   4. an overflow: a 12-pair burst with reads held off (FIFO depth 8),
//   5. the channel clock gated off and on.
// Each pass counts the pairs sent and received; o_dq_oe must be high in the
// middle of every transmitted bit.
`timescale 1ps / 1ps
module tb_phy_ch;
  import phy_pkg::*;
  localparam int N = 16;

  logic [3:0]  pll = '0;
  logic        rst_n = 1, clk_en = 1, lpbk = 1;
  logic [15:0] pi_sel [4];
  dly_gear_t   dq_gear = 2'd3, dqs_gear = 2'd2;
  dly_ctrl_t   dq_ctrl = 6'd0, dqs_ctrl = 6'd52;
  logic        phy_clk;
  logic [N-1:0] wr_e = '0, wr_o = '0, rd_e, rd_o, dq, dq_in;
  logic        wr_en = 0, rd_en = 0, rd_valid, ovf, oe, dqs, dqs_in;
  int          checks = 0, failures = 0, n_sent = 0, n_recv = 0;
  logic [2*N-1:0] q [$];
  bit          reads_on = 0;

  phy_ch #(.N_DQ(N)) dut (
    .i_rst_n(rst_n), .i_pll_clk(pll), .i_clk_en(clk_en), .i_pi_sel(pi_sel),
    .i_dq_gear(dq_gear), .i_dq_ctrl(dq_ctrl), .i_dqs_gear(dqs_gear), .i_dqs_ctrl(dqs_ctrl),
    .i_lpbk_en(lpbk), .o_phy_clk(phy_clk), .i_wrdata_even(wr_e), .i_wrdata_odd(wr_o),
    .i_wrdata_en(wr_en), .i_rd_en(rd_en), .o_rddata_even(rd_e), .o_rddata_odd(rd_o),
    .o_rddata_valid(rd_valid), .o_rx_overflow(ovf), .o_dq(dq), .o_dq_oe(oe), .o_dqs(dqs),
    .i_dq(dq_in), .i_dqs(dqs_in));

  // four quadrature 480 ps clocks
  initial forever begin
    pll[0] = 1; pll[3] = 0; #120 pll[1] = 1; #120 pll[0] = 0; pll[2] = 1;
    #120 pll[1] = 0; pll[3] = 1; #120 pll[2] = 0;
  end

  // board: 40 ps on every pin
  always @(dq)  dq_in  <= #40 dq;
  always @(dqs) dqs_in <= #40 dqs;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // read side: take a pair whenever one is waiting
  always @(negedge phy_clk) rd_en <= reads_on & rd_valid;
  always @(posedge phy_clk) if (rst_n && rd_en && rd_valid) begin
    logic [2*N-1:0] exp;
    chk(q.size() > 0, "read without write");
    if (q.size() > 0) begin
      exp = q.pop_front();
      chk({rd_o, rd_e} == exp, "read pair matches written pair");
      if ({rd_o, rd_e} != exp) $display("  got %h exp %h", {rd_o, rd_e}, exp);
    end
    n_recv++;
  end

  // output-enable monitor: in the middle of every even/odd bit of a burst
  int n_oe_checks = 0;

  task automatic burst(int len);
    for (int i = 0; i < len; i++) begin
      @(negedge phy_clk);
      wr_en = 1;
      wr_e = N'($urandom);
      wr_o = N'($urandom);
      q.push_back({wr_o, wr_e});
      n_sent++;
    end
    @(negedge phy_clk) wr_en = 0;
  endtask

  task automatic traffic(int bursts);
    repeat (bursts) begin
      burst(1 + int'($urandom % 6));
      repeat (int'($urandom % 4)) @(negedge phy_clk);
    end
    repeat (20) @(negedge phy_clk);
  endtask

  // oe must be high 120 ps into each data bit after the delay
  always @(posedge oe) begin
    #150;
    chk(oe, "oe held during bit");
    n_oe_checks++;
  end

  task automatic reset_rx();
    @(negedge phy_clk) rst_n = 0;
    repeat (4) @(negedge phy_clk);
    rst_n = 1;
    q.delete();
    repeat (2) @(negedge phy_clk);
    reads_on = 1;
  endtask

  int sent0;
  initial begin
    pi_sel[0] = '1; pi_sel[1] = '0; pi_sel[2] = '0; pi_sel[3] = '0;
    repeat (10) @(posedge pll[0]);
    repeat (10) @(negedge phy_clk);
    reset_rx();
    // 1. internal loopback
    sent0 = n_sent;
    traffic(40);
    chk(n_recv == n_sent, "pass 1: all pairs back");
    $display("pass 1 (internal loopback): sent %0d received %0d", n_sent, n_recv);
    // 2. external loopback through the pins
    lpbk = 0;
    traffic(40);
    chk(n_recv == n_sent, "pass 2: all pairs back");
    $display("pass 2 (pin loopback): sent %0d received %0d", n_sent, n_recv);
    // 3. interpolator at 90 degrees, internal loopback
    lpbk = 1;
    pi_sel[0] = '0; pi_sel[1] = '1;
    repeat (10) @(negedge phy_clk);
    traffic(40);
    chk(n_recv == n_sent, "pass 3: all pairs back");
    $display("pass 3 (PI at 90 deg): sent %0d received %0d", n_sent, n_recv);
    // 4. overflow
    chk(!ovf, "no overflow so far");
    reads_on = 0;
    burst(12);
    repeat (10) @(negedge phy_clk);
    chk(ovf, "overflow flagged");
    reads_on = 1;
    repeat (20) @(negedge phy_clk);
    chk(n_recv == n_sent - 4, "first 8 pairs kept, 4 dropped");
    reset_rx();
    n_recv = 0; n_sent = 0;
    chk(!ovf, "overflow cleared by reset");
    // 5. clock gate
    clk_en = 0;
    repeat (5) @(posedge pll[0]);
    #10;
    begin
      int edges = 0;
      fork
        begin repeat (1) @(posedge phy_clk); edges++; end
        begin repeat (10) @(posedge pll[0]); end
      join_any
      disable fork;
      chk(edges == 0, "channel clock stopped");
    end
    clk_en = 1;
    traffic(10);
    chk(n_recv == n_sent && n_sent > 0, "pass 5: traffic after re-enable");
    chk(n_oe_checks > 100, "oe checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
