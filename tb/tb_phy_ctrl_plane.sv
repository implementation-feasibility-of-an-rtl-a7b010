// tb_phy_ctrl_plane: 26 ns reference, 30 ns alternate, 2.6 ns PLL clock and a
// 20 ns external AHB clock. The periods of o_ref_clk, o_mcu_clk, o_ahb_clk and
// o_ahb_extclk are measured for each select setting.
`timescale 1ps / 1ps
module tb_phy_ctrl_plane;
  logic rf = 0, alt = 0, pll = 0, ext = 0, rst_n = 1;
  logic alt_sel = 0, mcu_sel = 0, ext_en = 0;
  logic ref_o, mcu_o, ahb_o, ext_o;
  int   checks = 0, failures = 0;

  phy_ctrl_plane dut (.i_rst_n(rst_n), .i_refclk(rf), .i_refclk_alt(alt), .i_pll_clk(pll),
    .i_ahb_extclk(ext), .i_refclk_alt_sel(alt_sel), .i_mcu_pll_sel(mcu_sel), .i_ahb_extclk_en(ext_en),
    .o_ref_clk(ref_o), .o_mcu_clk(mcu_o), .o_ahb_clk(ahb_o), .o_ahb_extclk(ext_o));

  always #13000 rf = ~rf;
  always #15000 alt = ~alt;
  always #1300 pll = ~pll;
  always #10000 ext = ~ext;

  realtime t_ref, t_mcu, t_ahb, t_ext;
  realtime p_ref, p_mcu, p_ahb, p_ext;
  int      n_ext = 0;
  always @(posedge ref_o) begin p_ref = $realtime - t_ref; t_ref = $realtime; end
  always @(posedge mcu_o) begin p_mcu = $realtime - t_mcu; t_mcu = $realtime; end
  always @(posedge ahb_o) begin p_ahb = $realtime - t_ahb; t_ahb = $realtime; end
  always @(posedge ext_o) begin p_ext = $realtime - t_ext; t_ext = $realtime; n_ext++; end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000 rst_n = 0;
    #30000 rst_n = 1;
    #300000;
    chk(p_ref == 26000, "ref_clk from refclk");
    chk(p_mcu == 26000, "mcu_clk from ref_clk");
    chk(p_ahb == 52000, "ahb_clk = ref/2");
    chk(n_ext == 0 && ext_o == 0, "ext clock gated");
    ext_en = 1;
    mcu_sel = 1;
    #300000;
    chk(p_mcu == 2600, "mcu_clk from pll");
    chk(p_ext == 20000, "ext clock passes");
    chk(p_ref == 26000, "ref unchanged");
    alt_sel = 1;
    mcu_sel = 0;
    #400000;
    chk(p_ref == 30000, "ref_clk from refclk_alt");
    chk(p_mcu == 30000, "mcu_clk follows ref_clk");
    chk(p_ahb == 60000, "ahb_clk = alt/2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
