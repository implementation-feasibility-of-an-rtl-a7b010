// tb_phy_cmn: the common block with 26 ns references. With no reference
// selected the PLL must not lock; with i_refclk selected it must lock and
// deliver four 480 ps clocks 120 ps apart; the clock enable must stop them;
// after switching to the alternate reference it must lock again.
`timescale 1ps / 1ps
module tb_phy_cmn;
  logic       ana = 0, rf = 0, alt = 0;
  logic [2:0] sel = 3'b000;
  logic       pll_en = 0, clk_en = 0;
  logic [3:0] pc;
  logic       vco, lock;
  int         checks = 0, failures = 0;
  realtime    tr [4];
  int         n_edges = 0;

  phy_cmn dut (.i_ana_refclk(ana), .i_refclk(rf), .i_refclk_alt(alt), .i_ref_sel(sel),
               .i_pll_en(pll_en), .i_clk_en(clk_en), .o_pll_clk(pc), .o_vco0_clk(vco), .o_pll_lock(lock));

  always #13000 rf = ~rf;
  initial begin #5000; forever #13000 alt = ~alt; end
  initial begin #9000; forever #13000 ana = ~ana; end

  for (genvar k = 0; k < 4; k++) begin : g_mon
    always @(posedge pc[k]) tr[k] = $realtime;
  end
  always @(posedge pc[0]) n_edges++;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic check_phases();
    realtime t0;
    @(posedge pc[0]) t0 = $realtime;
    @(posedge pc[0]) chk($realtime - t0 == 480, "480 ps period");
    #470;
    for (int k = 1; k < 4; k++) chk(tr[k] - tr[0] == realtime'(120 * k), "quadrature phase");
  endtask

  initial begin
    pll_en = 1; clk_en = 1;
    #300000;
    chk(!lock, "no lock without reference");
    chk(n_edges == 0, "no clocks without reference");
    sel = 3'b010;
    #300000;
    chk(lock, "lock on refclk");
    check_phases();
    clk_en = 0;
    #2000 n_edges = 0;
    #20000;
    chk(n_edges == 0 && pc == 4'b0, "gated off");
    clk_en = 1;
    #2000;
    chk(n_edges > 0, "gated on again");
    pll_en = 0; #1000;
    chk(!lock, "lock dropped");
    sel = 3'b100; pll_en = 1;
    #300000;
    chk(lock, "lock on refclk_alt");
    check_phases();
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
