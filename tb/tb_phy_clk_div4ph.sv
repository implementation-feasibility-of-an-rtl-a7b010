// tb_phy_clk_div4ph: from a 4 ns differential clock the four outputs must have
// an 8 ns period and rise 0, 2, 4 and 6 ns after the rising edge of phase 0.
`timescale 1ps / 1ps
module tb_phy_clk_div4ph;
  logic       clk = 1'b0, rst_n = 1'b1;
  logic [3:0] q;
  int         checks = 0, failures = 0;
  realtime    t_rise [4];
  realtime    t_p0_prev = 0;
  int         n0 = 0;

  phy_clk_div4ph dut (.i_clk_t(clk), .i_clk_c(~clk), .i_rst_n(rst_n), .o_clk(q));

  always #2000 clk = ~clk;

  for (genvar k = 0; k < 4; k++) begin : g_mon
    always @(posedge q[k]) t_rise[k] = $realtime;
  end

  always @(posedge q[0]) begin
    if (n0 > 1) begin
      checks++;
      if ($realtime - t_p0_prev != 8000) begin failures++; $display("FAIL period"); end
    end
    n0++;
    t_p0_prev = $realtime;
  end

  initial begin
    #1000 rst_n = 1'b0;
    #4000 rst_n = 1'b1;
    repeat (6) @(posedge q[0]);
    repeat (10) begin
      @(posedge q[0]);
      #7900;
      for (int k = 1; k < 4; k++) begin
        checks++;
        if (t_rise[k] - t_rise[0] != realtime'(2000 * k)) begin
          failures++;
          $display("FAIL phase %0d offset %0t", k, t_rise[k] - t_rise[0]);
        end
      end
    end
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
