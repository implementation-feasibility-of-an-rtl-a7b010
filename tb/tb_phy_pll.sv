// tb_phy_pll: a 26 ns reference. The PLL must lock, then give four 480 ps
// clocks with rising edges 120 ps apart, a differential 240 ps clock rising
// with the first of them, and a 2600 ps VCO clock; dropping the enable must
// clear lock and stop the outputs.
`timescale 1ps / 1ps
module tb_phy_pll;
  logic ref_clk = 1'b0, en = 1'b0;
  logic p0, p1, p2, p3, c2t, c2c, vco, lock;
  realtime t2;
  int   checks = 0, failures = 0;
  realtime tr [4];
  realtime tv, tv_prev, tp_prev;

  phy_pll dut (.i_refclk(ref_clk), .i_en(en), .o_pll_clk_0(p0), .o_pll_clk_1(p1),
               .o_pll_clk_2(p2), .o_pll_clk_3(p3),
               .o_clk2x_t(c2t), .o_clk2x_c(c2c), .o_vco0_clk(vco), .o_lock(lock));

  always #13000 ref_clk = ~ref_clk;

  always @(posedge p0) tr[0] = $realtime;
  always @(posedge p1) tr[1] = $realtime;
  always @(posedge p2) tr[2] = $realtime;
  always @(posedge p3) tr[3] = $realtime;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000;
    chk(lock == 1'b0, "no lock while disabled");
    en = 1'b1;
    repeat (8) @(posedge ref_clk);
    chk(lock == 1'b1, "lock after enable");
    repeat (20) @(posedge p0);
    @(posedge p0) tp_prev = $realtime;
    @(posedge p0) chk($realtime - tp_prev == 480, "480 ps period");
    #470;
    chk(tr[1] - tr[0] == 120, "phase 90");
    chk(tr[2] - tr[0] == 240, "phase 180");
    chk(tr[3] - tr[0] == 360, "phase 270");
    @(posedge p0) #1;
    chk(c2t == 1'b1 && c2c == 1'b0, "2x clock rises with p0");
    @(posedge c2t) t2 = $realtime;
    @(posedge c2t) chk($realtime - t2 == 240, "2x clock 240 ps");
    #150;
    chk(c2t == 1'b0 && c2c == 1'b1, "2x clock low half");
    @(posedge vco) tv_prev = $realtime;
    @(posedge vco) tv = $realtime;
    chk(tv - tv_prev == 2600, "vco0 2600 ps");
    repeat (4) begin
      @(negedge p0) #10;
      chk(p2 == 1'b1 && p0 == 1'b0, "p2 is inverse of p0");
    end
    en = 1'b0;
    #2000;
    chk(lock == 1'b0, "lock cleared");
    chk({p0, p1, p2, p3, vco, c2t} == 6'b0, "outputs parked");
    #5000;
    chk({p0, p1, p2, p3} == 4'b0, "outputs stay parked");
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
