// tb_phy_clkmux3to1: three clocks of different periods; for every one-hot and
// the all-off select the output and its complement are compared with the
// expected clock at many sample points.
`timescale 1ps / 1ps
module tb_phy_clkmux3to1;
  logic [2:0] clk = '0;
  logic [2:0] sel = '0;
  logic       t, c;
  int         checks = 0, failures = 0;

  phy_clkmux3to1 dut (.i_clk(clk), .i_sel(sel), .o_clk_t(t), .o_clk_c(c));

  always #3000 clk[0] = ~clk[0];
  always #5000 clk[1] = ~clk[1];
  always #7000 clk[2] = ~clk[2];

  initial begin
    #50;
    for (int s = 0; s < 4; s++) begin
      sel = (s == 3) ? 3'b000 : 3'(1 << s);
      repeat (50) begin
        #1100;
        checks++;
        if (t !== ((s == 3) ? 1'b0 : clk[s]) || c !== ~t) begin
          failures++;
          $display("FAIL sel=%b t=%b c=%b clk=%b", sel, t, c, clk);
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
