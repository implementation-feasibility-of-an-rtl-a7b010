// tb_phy_sram: random byte-strobed writes and reads over the full address
// range against a reference model kept in the testbench; read data must
// appear exactly one cycle after the read (PIPELINE=0) and two cycles after
// it for a second instance with PIPELINE=1.
`timescale 1ps / 1ps
module tb_phy_sram;
  localparam int DEPTH = 2048;
  logic        clk = 0, en = 0, we = 0;
  logic [10:0] addr = '0;
  logic [31:0] wdata = '0, rd0, rd1;
  logic [3:0]  strb = '0;
  logic [31:0] ref_mem [DEPTH];
  bit          known   [DEPTH];
  int          checks = 0, failures = 0;

  phy_sram dut0 (.i_clk(clk), .i_en(en), .i_we(we), .i_addr(addr), .i_wdata(wdata), .i_wstrb(strb), .o_rdata(rd0));
  phy_sram #(.PIPELINE(1'b1)) dut1 (.i_clk(clk), .i_en(en), .i_we(we), .i_addr(addr), .i_wdata(wdata), .i_wstrb(strb), .o_rdata(rd1));

  always #5000 clk = ~clk;

  task automatic write(int a, logic [31:0] d, logic [3:0] s);
    @(negedge clk);
    en = 1; we = 1; addr = 11'(a); wdata = d; strb = s;
    @(posedge clk);
    for (int b = 0; b < 4; b++) if (s[b]) ref_mem[a][8*b +: 8] = d[8*b +: 8];
    @(negedge clk) en = 0; we = 0;
  endtask

  task automatic read(int a);
    @(negedge clk);
    en = 1; we = 0; addr = 11'(a);
    @(negedge clk);
    en = 0;
    checks++;
    if (rd0 !== ref_mem[a]) begin failures++; $display("FAIL rd0 @%0d %h exp %h", a, rd0, ref_mem[a]); end
    @(negedge clk);
    checks++;
    if (rd1 !== ref_mem[a]) begin failures++; $display("FAIL rd1 @%0d %h exp %h", a, rd1, ref_mem[a]); end
  endtask

  initial begin
    int a;
    // full words first so that every later read has defined data
    for (int i = 0; i < 64; i++) begin
      a = (i < 2) ? (i * (DEPTH - 1)) : int'($urandom % DEPTH);
      write(a, $urandom, 4'hf);
      known[a] = 1;
    end
    for (int i = 0; i < 300; i++) begin
      a = int'($urandom % DEPTH);
      if (!known[a]) begin write(a, $urandom, 4'hf); known[a] = 1; end
      if ($urandom % 2) write(a, $urandom, 4'($urandom));
      else read(a);
    end
    read(0);
    read(DEPTH - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
