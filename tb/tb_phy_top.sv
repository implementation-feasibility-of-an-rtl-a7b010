// tb_phy_top: the whole PHY at its default sizes (two 16-bit channels, 2048-
// word SRAM). Sequence:
//   - reference clocks run, PLL enabled on i_refclk, wait for lock;
//   - channel 0 in internal loopback, channel 1 looped back through its pins
//     (with 30 ps of board delay), both sending random write bursts and
//     checking every pair that returns through the RX FIFOs;
//   - channel 1's interpolator is stepped from 45 to 135 degrees and traffic
//     repeated;
//   - channel 0's reads are held off until its RX FIFO overflows, then the
//     two pairs lost while the strobe-clocked full flag catches up are checked;
//   - channel 1's clock is gated off and must stop;
//   - the SRAM is written with byte strobes and read back, first on the
//     reference clock, then after switching the MCU clock to the PLL;
//   - the AHB clock period is measured, and the reference clock is switched
//     to i_refclk_alt;
//   - the PLL is moved to the alternate reference and must lock again.
// Every mechanism is counted; one that never happened is a failure.
`timescale 1ps / 1ps
module tb_phy_top;
  import phy_pkg::*;
  localparam int N = NUM_DQ;

  logic rst_n = 1, rf = 0, alt = 0, ana = 0, ext = 0;
  logic [2:0] pll_ref_sel = 3'b010;
  logic pll_en = 0, pll_clk_en = 1, alt_sel = 0, mcu_sel = 0, ext_en = 1;
  logic lock, ref_clk, mcu_clk, ahb_clk, ahb_extclk;
  logic            ch_clk_en [NUM_CH];
  logic [PI_N-1:0] pi_sel    [NUM_CH][4];
  dly_gear_t       dq_gear [NUM_CH], dqs_gear [NUM_CH];
  dly_ctrl_t       dq_ctrl [NUM_CH], dqs_ctrl [NUM_CH];
  logic            lpbk [NUM_CH], phy_clk [NUM_CH];
  logic [N-1:0]    wr_e [NUM_CH], wr_o [NUM_CH], rd_e [NUM_CH], rd_o [NUM_CH];
  logic            wr_en [NUM_CH], rd_en [NUM_CH], rd_valid [NUM_CH], ovf [NUM_CH];
  logic [N-1:0]    dq [NUM_CH], dq_in [NUM_CH];
  logic            oe [NUM_CH], dqs [NUM_CH], dqs_in [NUM_CH];
  logic            s_en = 0, s_we = 0;
  logic [10:0]     s_addr = '0;
  logic [31:0]     s_wdata = '0, s_rdata;
  logic [3:0]      s_strb = '0;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_lock = 0, n_relock = 0, n_pairs_int = 0, n_pairs_pin = 0, n_pi_step = 0;
  int n_overflow = 0, n_gate = 0, n_sram_rd = 0, n_sram_rd_pll = 0, n_ref_switch = 0, n_ahb = 0;

  phy_top dut (
    .i_rst_n(rst_n), .i_refclk(rf), .i_refclk_alt(alt), .i_ana_refclk(ana), .i_ahb_extclk(ext),
    .i_pll_ref_sel(pll_ref_sel), .i_pll_en(pll_en), .i_pll_clk_en(pll_clk_en),
    .i_refclk_alt_sel(alt_sel), .i_mcu_pll_sel(mcu_sel), .i_ahb_extclk_en(ext_en),
    .o_pll_lock(lock), .o_ref_clk(ref_clk), .o_mcu_clk(mcu_clk), .o_ahb_clk(ahb_clk),
    .o_ahb_extclk(ahb_extclk),
    .i_ch_clk_en(ch_clk_en), .i_pi_sel(pi_sel), .i_dq_gear(dq_gear), .i_dq_ctrl(dq_ctrl),
    .i_dqs_gear(dqs_gear), .i_dqs_ctrl(dqs_ctrl), .i_lpbk_en(lpbk), .o_phy_clk(phy_clk),
    .i_wrdata_even(wr_e), .i_wrdata_odd(wr_o), .i_wrdata_en(wr_en), .i_rd_en(rd_en),
    .o_rddata_even(rd_e), .o_rddata_odd(rd_o), .o_rddata_valid(rd_valid), .o_rx_overflow(ovf),
    .o_dq(dq), .o_dq_oe(oe), .o_dqs(dqs), .i_dq(dq_in), .i_dqs(dqs_in),
    .i_sram_en(s_en), .i_sram_we(s_we), .i_sram_addr(s_addr), .i_sram_wdata(s_wdata),
    .i_sram_wstrb(s_strb), .o_sram_rdata(s_rdata));

  always #13000 rf = ~rf;
  initial begin #4000; forever #13000 alt = ~alt; end
  initial begin #7000; forever #13000 ana = ~ana; end
  always #10000 ext = ~ext;

  // board wiring: channel 1 pins looped back with 30 ps, channel 0 pins idle
  always @(dq[1])  dq_in[1]  <= #30 dq[1];
  always @(dqs[1]) dqs_in[1] <= #30 dqs[1];
  initial begin dq_in[0] = '0; dqs_in[0] = 1'b1; end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- per-channel traffic and scoreboard ----------------
  logic [2*N-1:0] q0 [$], q1 [$];
  bit   reads_on [NUM_CH];
  int   n_sent [NUM_CH], n_recv [NUM_CH];

  for (genvar c = 0; c < NUM_CH; c++) begin : g_sb
    logic take;
    initial take = 1'b0;
    always @(negedge phy_clk[c]) take <= reads_on[c] & rd_valid[c];
    assign rd_en[c] = take;
    always @(posedge phy_clk[c]) if (take && rd_valid[c]) begin
      logic [2*N-1:0] exp;
      if (c == 0) begin
        chk(q0.size() > 0, "ch0 read without write");
        exp = (q0.size() > 0) ? q0.pop_front() : '0;
      end else begin
        chk(q1.size() > 0, "ch1 read without write");
        exp = (q1.size() > 0) ? q1.pop_front() : '0;
      end
      chk({rd_o[c], rd_e[c]} == exp, "read pair matches written pair");
      n_recv[c]++;
      if (lpbk[c]) n_pairs_int++; else n_pairs_pin++;
    end
  end

  task automatic burst(int c, int len);
    for (int i = 0; i < len; i++) begin
      @(negedge phy_clk[c]);
      wr_en[c] = 1;
      wr_e[c] = N'($urandom);
      wr_o[c] = N'($urandom);
      if (c == 0) q0.push_back({wr_o[c], wr_e[c]}); else q1.push_back({wr_o[c], wr_e[c]});
      n_sent[c]++;
    end
    @(negedge phy_clk[c]) wr_en[c] = 0;
  endtask

  task automatic traffic(int c, int bursts);
    repeat (bursts) begin
      burst(c, 1 + int'($urandom % 6));
      repeat (int'($urandom % 4)) @(negedge phy_clk[c]);
    end
    repeat (20) @(negedge phy_clk[c]);
  endtask

  // ---------------- SRAM ----------------
  logic [31:0] sram_ref [16];
  task automatic sram_write(int a, logic [31:0] d, logic [3:0] s);
    @(negedge mcu_clk);
    s_en = 1; s_we = 1; s_addr = 11'(a * 127); s_wdata = d; s_strb = s;
    @(negedge mcu_clk);
    s_en = 0; s_we = 0;
    for (int b = 0; b < 4; b++) if (s[b]) sram_ref[a][8*b +: 8] = d[8*b +: 8];
  endtask
  task automatic sram_read_check(int a, bit on_pll);
    @(negedge mcu_clk);
    s_en = 1; s_we = 0; s_addr = 11'(a * 127);
    @(negedge mcu_clk);
    s_en = 0;
    chk(s_rdata == sram_ref[a], "SRAM read-back");
    if (on_pll) n_sram_rd_pll++; else n_sram_rd++;
  endtask
  task automatic sram_round(bit on_pll);
    for (int a = 0; a < 16; a++) sram_write(a, $urandom, 4'hf);
    for (int a = 0; a < 16; a++) sram_write(a, $urandom, 4'($urandom));
    for (int a = 0; a < 16; a++) sram_read_check(a, on_pll);
  endtask

  // ---------------- clock period helpers ----------------
  task automatic period_of_ahb(output realtime p);
    realtime t0;
    @(posedge ahb_clk) t0 = $realtime;
    @(posedge ahb_clk) p = $realtime - t0;
  endtask

  initial begin
    realtime p;
    for (int c = 0; c < NUM_CH; c++) begin
      ch_clk_en[c] = 1; lpbk[c] = (c == 0); wr_en[c] = 0; wr_e[c] = '0; wr_o[c] = '0;
      dq_gear[c] = 2'd3; dq_ctrl[c] = 6'd0; dqs_gear[c] = 2'd2; dqs_ctrl[c] = 6'd52;
      reads_on[c] = 0; n_sent[c] = 0; n_recv[c] = 0;
      for (int k = 0; k < 4; k++) pi_sel[c][k] = '0;
    end
    pi_sel[0][0] = '1;                       // channel 0 at 0 degrees
    pi_sel[1][0] = '1; pi_sel[1][1] = '1;    // channel 1 at 45 degrees

    #2000 rst_n = 0;
    pll_en = 1;
    #60000;
    wait (lock);
    n_lock++;
    repeat (20) @(negedge phy_clk[0]);
    rst_n = 1;
    repeat (4) @(negedge phy_clk[0]);
    q0.delete(); q1.delete();
    reads_on[0] = 1; reads_on[1] = 1;

    // both channels at once
    fork
      traffic(0, 30);
      traffic(1, 30);
    join
    chk(n_recv[0] == n_sent[0] && n_recv[1] == n_sent[1], "all pairs back on both channels");
    $display("internal loopback pairs %0d, pin loopback pairs %0d", n_pairs_int, n_pairs_pin);

    // interpolator step on channel 1
    pi_sel[1][0] = '0; pi_sel[1][1] = '1; pi_sel[1][2] = '1;
    n_pi_step++;
    repeat (10) @(negedge phy_clk[1]);
    traffic(1, 20);
    chk(n_recv[1] == n_sent[1], "channel 1 after PI step");

    // overflow on channel 0
    reads_on[0] = 0;
    burst(0, 12);
    repeat (10) @(negedge phy_clk[0]);
    chk(ovf[0], "channel 0 overflow flagged");
    if (ovf[0]) n_overflow++;
    chk(!ovf[1], "channel 1 no overflow");
    reads_on[0] = 1;
    repeat (20) @(negedge phy_clk[0]);
    chk(n_recv[0] == n_sent[0] - 4, "four pairs dropped on overflow");
    chk(q0.size() == 4, "four pairs left unmatched");
    q0.delete();   // the last four written were never stored
    // The FIFO's write side still sees "full" until two strobe edges have
    // refreshed its copy of the read pointer: the next two pairs are lost.
    burst(0, 2);
    repeat (20) @(negedge phy_clk[0]);
    chk(n_recv[0] == n_sent[0] - 6, "two pairs dropped after the drain");
    chk(q0.size() == 2, "two pairs left unmatched after the drain");
    q0.delete();
    burst(0, 3);
    repeat (20) @(negedge phy_clk[0]);
    chk(n_recv[0] == n_sent[0] - 6, "traffic resumes after the drain");

    // clock gate on channel 1
    ch_clk_en[1] = 0;
    repeat (4) @(posedge phy_clk[0]);
    begin
      int edges;
      edges = 0;
      fork
        begin @(posedge phy_clk[1]); edges++; end
        begin repeat (20) @(posedge phy_clk[0]); end
      join_any
      disable fork;
      chk(edges == 0, "channel 1 clock stopped");
      if (edges == 0) n_gate++;
    end
    ch_clk_en[1] = 1;

    // SRAM on the reference clock, then on the PLL clock
    sram_round(1'b0);
    mcu_sel = 1;
    repeat (20) @(posedge ref_clk);
    sram_round(1'b1);

    // AHB clock and reference switch
    period_of_ahb(p);
    chk(p == 52000, "AHB clock 52 ns");
    if (p == 52000) n_ahb++;
    mcu_sel = 0;
    alt_sel = 1;
    repeat (10) @(posedge ref_clk);
    chk(ref_clk == alt, "reference clock follows refclk_alt");
    #1000;
    chk(ref_clk == alt, "reference clock follows refclk_alt (later)");
    n_ref_switch++;

    // PLL onto the alternate reference: lock must drop and return
    pll_en = 0;
    #1000;
    chk(!lock, "lock dropped");
    pll_ref_sel = 3'b100;
    pll_en = 1;
    wait (lock);
    n_relock++;
    repeat (10) @(negedge phy_clk[0]);
    traffic(0, 10);
    chk(n_recv[0] == n_sent[0] - 6, "channel 0 after relock");

    // every mechanism must have happened
    chk(n_lock > 0, "PLL lock");
    chk(n_relock > 0, "PLL relock on alternate reference");
    chk(n_pairs_int > 0, "internal loopback traffic");
    chk(n_pairs_pin > 0, "pin loopback traffic");
    chk(n_pi_step > 0, "PI phase step");
    chk(n_overflow > 0, "RX FIFO overflow");
    chk(n_gate > 0, "channel clock gating");
    chk(n_sram_rd > 0 && n_sram_rd_pll > 0, "SRAM on both MCU clocks");
    chk(n_ahb > 0, "AHB clock division");
    chk(n_ref_switch > 0, "reference clock switch");
    $display("lock %0d relock %0d int %0d pin %0d pi %0d ovf %0d gate %0d sram %0d/%0d ahb %0d refsw %0d",
             n_lock, n_relock, n_pairs_int, n_pairs_pin, n_pi_step, n_overflow, n_gate,
             n_sram_rd, n_sram_rd_pll, n_ahb, n_ref_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
