// tb_phy_cgc: checks both clock gate variants. Enable changes are made in the
// open and in the closed phase of the latch; the gated clock is sampled in the
// middle of each phase and compared with the expected level, and an enable
// change inside the closed phase must not cut the current pulse.
`timescale 1ps / 1ps
module tb_phy_cgc;
  logic clk = 1'b0;
  logic en  = 1'b0;
  logic ten = 1'b0;
  logic lo_clk, lo_clk_b, hi_clk, hi_clk_b;
  int   checks = 0, failures = 0;

  phy_cgc #(.REST_HIGH(1'b0)) dut_lo (.i_clk(clk), .i_clk_en(en), .i_cgc_en(ten), .o_clk(lo_clk), .o_clk_b(lo_clk_b));
  phy_cgc #(.REST_HIGH(1'b1)) dut_hi (.i_clk(clk), .i_clk_en(en), .i_cgc_en(ten), .o_clk(hi_clk), .o_clk_b(hi_clk_b));

  always #5000 clk = ~clk;

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b exp %0b at %0t", what, got, exp, $time);
    end
  endtask

  // one period starting at a rising edge: sample mid-high and mid-low
  task automatic period_check(logic exp_lo_high, logic exp_hi_low);
    #2500;
    check(lo_clk, exp_lo_high, "rest-low high phase");
    check(lo_clk_b, ~exp_lo_high, "rest-low complement");
    check(hi_clk, 1'b1, "rest-high high phase");
    #5000;
    check(lo_clk, 1'b0, "rest-low low phase");
    check(hi_clk, exp_hi_low, "rest-high low phase");
    check(hi_clk_b, ~exp_hi_low, "rest-high complement");
    #2500;
  endtask

  initial begin
    @(posedge clk);
    // disabled: rest-low stays 0, rest-high stays 1
    period_check(1'b0, 1'b1);
    // enable during the low phase: both pass the clock from the next edge
    #7500 en = 1'b1; #2500;
    period_check(1'b1, 1'b0);
    period_check(1'b1, 1'b0);
    // drop enable in the middle of a high phase: the rest-low pulse must survive
    #2500 en = 1'b0;
    check(lo_clk, 1'b1, "no truncated pulse");
    #1000 check(lo_clk, 1'b1, "no truncated pulse later");
    #1500;
    // low phase: rest-low latch is open now -> stays 0; rest-high latched 1 in high phase
    #2500 check(lo_clk, 1'b0, "rest-low low phase after disable");
    check(hi_clk, 1'b1, "rest-high gated in low phase");
    #2500;
    period_check(1'b0, 1'b1);
    // test enable overrides
    #7500 ten = 1'b1; #2500;
    period_check(1'b1, 1'b0);
    ten = 1'b0;
    #7500; #2500;
    period_check(1'b0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
