// tb_phy_clk_div2ph: the outputs must toggle once per input period (half
// frequency: period measured as 2x the input period) and stay complementary.
`timescale 1ps / 1ps
module tb_phy_clk_div2ph;
  logic clk = 1'b0, rst_n = 1'b1, q0, q180;
  int   checks = 0, failures = 0;
  realtime t_prev = 0;
  int   n_rise = 0;

  phy_clk_div2ph dut (.i_clk(clk), .i_rst_n(rst_n), .o_clk_0(q0), .o_clk_180(q180));

  always #2000 clk = ~clk;

  always @(posedge q0) begin
    if (n_rise > 0) begin
      checks++;
      if ($realtime - t_prev != 8000) begin
        failures++;
        $display("FAIL period %0t", $realtime - t_prev);
      end
    end
    n_rise++;
    t_prev = $realtime;
  end

  initial begin
    #1000 rst_n = 1'b0;
    #4000;
    checks++;
    if (q0 !== 1'b0 || q180 !== 1'b1) begin failures++; $display("FAIL reset state"); end
    rst_n = 1'b1;
    repeat (40) begin
      @(negedge clk);
      checks++;
      if (q180 !== ~q0) begin failures++; $display("FAIL complement"); end
    end
    checks++;
    if (n_rise < 15) begin failures++; $display("FAIL too few edges %0d", n_rise); end
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
