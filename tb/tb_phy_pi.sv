// tb_phy_pi: four quadrature 480 ps clocks drive the interpolator. For a set
// of weight codes the delay from each clk0 rising edge to the outp rising edge
// must equal the phasor-sum phase (worked out here from the weights) times the
// period, within 1 ps, and outn must be the complement of outp.
`timescale 1ps / 1ps
module tb_phy_pi;
  logic        c0 = 0, c90 = 0, c180 = 0, c270 = 0;
  logic [15:0] s0, s90, s180, s270;
  logic        op, on;
  int          checks = 0, failures = 0;
  realtime     t_c0;

  phy_pi #(.N(16)) dut (
    .clk0(c0), .clk90(c90), .clk180(c180), .clk270(c270),
    .sel0(s0), .sel0b(~s0), .sel90(s90), .sel90b(~s90),
    .sel180(s180), .sel180b(~s180), .sel270(s270), .sel270b(~s270),
    .xcpl(4'h0), .xcplb(4'hf), .outp(op), .outn(on));

  initial begin
    forever begin
      c0 = 1; #120 c90 = 1; #120 c0 = 0; c180 = 1; #120 c90 = 0; c270 = 1; #120 c180 = 0; c0 = 1;
      c270 = 0; #120 c90 = 1; #120 c0 = 0; c180 = 1; #120 c90 = 0; c270 = 1; #120 c180 = 0;
    end
  end

  always @(posedge c0) t_c0 = $realtime;

  function automatic logic [15:0] therm(int n);
    return 16'((32'h1 << n) - 1);
  endfunction

  // expected delay in ps for weights (a on phase qa, b on the next phase)
  task automatic try(int w0, int w90, int w180, int w270, real exp_deg);
    realtime d;
    s0 = therm(w0); s90 = therm(w90); s180 = therm(w180); s270 = therm(w270);
    repeat (3) @(posedge c0);
    @(posedge op);
    d = $realtime - t_c0;
    checks++;
    if (d < exp_deg / 360.0 * 480.0 - 1.0 || d > exp_deg / 360.0 * 480.0 + 1.0) begin
      failures++;
      $display("FAIL weights %0d/%0d/%0d/%0d: delay %0t exp %f", w0, w90, w180, w270, d, exp_deg);
    end
    #10;
    checks++;
    if (on !== ~op) begin failures++; $display("FAIL outn"); end
  endtask

  initial begin
    s0 = '1; s90 = '0; s180 = '0; s270 = '0;
    #5000;
    try(16, 0, 0, 0, 0.0);
    try(8, 8, 0, 0, 45.0);
    try(0, 16, 0, 0, 90.0);
    try(0, 16, 16, 0, 135.0);
    try(0, 0, 16, 0, 180.0);
    try(0, 0, 4, 4, 225.0);
    try(0, 0, 0, 16, 270.0);
    try(16, 0, 0, 16, 315.0);
    // 16 on clk0, 6 on clk90: atan(6/16)
    try(16, 6, 0, 0, 20.556);
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
