// tb_phy_async_fifo: 7 ns write clock, 5 ns read clock. Phase 1 fills the
// FIFO without reading until o_full, then pushes once more to see o_overflow.
// Phase 2 reads and writes at random. Every word read is compared with a
// reference queue of accepted words; at the end the FIFO must be empty and
// the number of words read must equal the number accepted.
`timescale 1ps / 1ps
module tb_phy_async_fifo;
  localparam int W = 16, D = 8;
  logic         wclk = 0, rclk = 0, rst_n = 1, push = 0, pop = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic         full, empty, ovf;
  int           checks = 0, failures = 0, n_acc = 0, n_rd = 0;
  logic [W-1:0] q [$];
  bit           random_phase = 0;
  bit           drain = 0;

  phy_async_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .i_rst_n(rst_n), .i_wclk(wclk), .i_push(push), .i_wdata(wdata), .o_full(full),
    .o_overflow(ovf), .i_rclk(rclk), .i_pop(pop), .o_rdata(rdata), .o_empty(empty));

  always #3500 wclk = ~wclk;
  always #2500 rclk = ~rclk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // scoreboard
  always @(posedge wclk) if (rst_n && push && !full) begin q.push_back(wdata); n_acc++; end
  always @(posedge rclk) if (rst_n && pop && !empty) begin
    chk(q.size() > 0, "read with nothing written");
    if (q.size() > 0) chk(rdata == q.pop_front(), "data order");
    n_rd++;
  end

  // drivers
  always @(negedge wclk) if (rst_n) begin
    if (random_phase) push <= ($urandom % 3) != 0;
    wdata <= W'($urandom);
  end
  always @(negedge rclk) if (rst_n) pop <= random_phase ? (($urandom % 2) == 0) : drain;

  initial begin
    #1000 rst_n = 0;
    #19000 rst_n = 1;
    chk(empty && !full && !ovf, "reset flags");
    @(negedge wclk) push <= 1;
    wait (full);
    @(negedge wclk);
    chk(n_acc == D, "full after DEPTH words"); $display("n_acc=%0d wbin=%0d", n_acc, dut.wbin);
    chk(!ovf, "no overflow yet");
    @(negedge wclk) push <= 1;       // push while full
    @(negedge wclk) push <= 0;
    chk(ovf, "overflow flagged");
    chk(n_acc == D, "word dropped while full");
    random_phase = 1;
    repeat (2000) @(posedge wclk);
    random_phase = 0;
    @(negedge wclk) push <= 0;
    drain = 1;
    repeat (40) @(posedge rclk);
    chk(empty, "empty at end");
    chk(n_rd == n_acc, "all words read");
    chk(n_acc > 500, "traffic happened");
    $display("accepted %0d read %0d", n_acc, n_rd);
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
