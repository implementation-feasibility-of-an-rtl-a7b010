// tb_phy_prog_dly: for every gear and a spread of fine codes, a rising and a
// falling edge are sent through the cell and the time to the output edge is
// compared with the delay law written out here independently.
`timescale 1ps / 1ps
module tb_phy_prog_dly;
  logic       in = 1'b0, out;
  logic [1:0] gear = '0;
  logic [5:0] ctrl = '0;
  int         checks = 0, failures = 0;
  realtime    t_in;

  phy_prog_dly dut (.i_in(in), .i_gear(gear), .i_ctrl(ctrl), .o_out(out));

  function automatic int expected(int g, int c);
    int base [4] = '{200, 110, 78, 62};
    int step [4] = '{5, 3, 2, 1};
    return base[g] + step[g] * c;
  endfunction

  task automatic one_edge(logic v);
    in = v;
    t_in = $realtime;
    @(out);
    checks++;
    if (out !== v || $realtime - t_in != realtime'(expected(int'(gear), int'(ctrl)))) begin
      failures++;
      $display("FAIL gear %0d ctrl %0d: %0t ps", gear, ctrl, $realtime - t_in);
    end
    #1000;
  endtask

  initial begin
    #1000;
    for (int g = 0; g < 4; g++) begin
      for (int c = 0; c < 64; c += 9) begin
        gear = 2'(g);
        ctrl = 6'(c);
        #100;
        one_edge(1'b1);
        one_edge(1'b0);
      end
      ctrl = 6'd63;
      #100;
      one_edge(1'b1);
      one_edge(1'b0);
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
