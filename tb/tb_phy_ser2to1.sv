// tb_phy_ser2to1: random even/odd pairs are presented before each rising
// edge; the serial output is sampled in the middle of every half period and
// must carry even bit n in the low phase after edge n and odd bit n in the
// high phase after edge n+1.
`timescale 1ps / 1ps
module tb_phy_ser2to1;
  logic clk = 1'b0, de = 1'b0, dodd = 1'b0, s;
  int   checks = 0, failures = 0;
  logic [1:0] pairs [64];

  phy_ser2to1 dut (.i_clk(clk), .i_deven(de), .i_dodd(dodd), .o_sdata(s));

  always #1000 clk = ~clk;

  initial begin
    foreach (pairs[i]) pairs[i] = 2'($urandom);
    @(negedge clk);
    for (int n = 0; n < 64; n++) begin
      {dodd, de} = pairs[n];
      @(posedge clk);          // edge n
      #500;
      if (n > 0) begin
        checks++;
        if (s !== pairs[n-1][1]) begin failures++; $display("FAIL odd %0d", n - 1); end
      end
      @(negedge clk);
      #500;
      checks++;
      if (s !== pairs[n][0]) begin failures++; $display("FAIL even %0d", n); end
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
