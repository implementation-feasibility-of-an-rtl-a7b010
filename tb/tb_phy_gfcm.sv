// tb_phy_gfcm: two unrelated clocks (10 ns and 14 ns). After each select
// change the output must settle on the selected clock (compared sample by
// sample), and during the switch no output high or low pulse may be shorter
// than the shorter input half-period.
`timescale 1ps / 1ps
module tb_phy_gfcm;
  logic c0 = 1'b0, c1 = 1'b0, sel = 1'b0, rst_n = 1'b1, o;
  int   checks = 0, failures = 0;
  realtime t_edge = 0;

  phy_gfcm dut (.i_clk0(c0), .i_clk1(c1), .i_sel(sel), .i_rst_n(rst_n), .o_clk(o));

  always #5000 c0 = ~c0;
  always #7000 c1 = ~c1;

  // glitch monitor
  always @(o) begin
    if (rst_n && $realtime > 0) begin
      checks++;
      if ($realtime - t_edge < 5000) begin
        failures++;
        $display("FAIL short pulse %0t ps at %0t", $realtime - t_edge, $time);
      end
    end
    t_edge = $realtime;
  end

  task automatic follow(logic which, int n);
    repeat (n) begin
      #1300;
      checks++;
      if (o !== (which ? c1 : c0)) begin
        failures++;
        $display("FAIL output %0b does not follow clk%0d at %0t", o, which, $time);
      end
    end
  endtask

  initial begin
    #1000 rst_n = 1'b0;
    #11000 rst_n = 1'b1;
    #30000 follow(1'b0, 60);
    #3100 sel = 1'b1;
    #60000 follow(1'b1, 60);
    #1700 sel = 1'b0;
    #60000 follow(1'b0, 60);
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
