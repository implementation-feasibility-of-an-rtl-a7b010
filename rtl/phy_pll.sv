// phy_pll: behavioural model of the multi-VCO PLL in the common block.
//
// This is a behavioural model, not synthesizable logic: the real PLL is an
// analog circuit (VCOs, phase detector, charge pump, loop filter).
//
// It measures the period of i_refclk between rising edges. After i_en has been
// high for LOCK_CYCLES reference periods with a stable period it asserts
// o_lock and starts an internal clock at MULT times the reference frequency
// (an 80 ps period for a 26 ns reference). The four outputs are
// built from that internal clock's edges: o_pll_clk_k rises on internal edge
// 1+3k, falls 6 edges later and repeats every POST_EDGES edges, giving a
// 480 ps clock with phases 0, 90, 180, 270 degrees. o_clk2x_t / o_clk2x_c
// is a differential clock at twice that rate (240 ps, high for three internal
// edges), rising together with o_pll_clk_0, for a 4-phase divider that
// rebuilds the same four phases outside the PLL. o_vco0_clk runs at
// VCO0_DIV times the reference frequency (2600 ps). Dropping i_en clears lock
// and parks all outputs low. The multiply factor, the edge selection and the
// output periods are the original design's; the lock criterion is this model's.
`timescale 1ps / 1ps
module phy_pll
  import phy_pkg::*;
#(
  parameter int unsigned MULT        = PLL_MULT,
  parameter int unsigned POST_EDGES  = PLL_POST_EDGES,
  parameter int unsigned PHASE_EDGES = PLL_PHASE_EDGES,
  parameter int unsigned VCO0_RATIO  = VCO0_DIV,
  parameter int unsigned LOCK_CYCLES = 4
) (
  input  logic i_refclk,
  input  logic i_en,
  output logic o_pll_clk_0,
  output logic o_pll_clk_1,
  output logic o_pll_clk_2,
  output logic o_pll_clk_3,
  output logic o_clk2x_t,
  output logic o_clk2x_c,
  output logic o_vco0_clk,
  output logic o_lock
);

  realtime t_last;
  realtime ref_period;
  int      stable_cnt;
  int      edge_n;
  bit      have_last;

  initial begin
    o_lock      = 1'b0;
    o_pll_clk_0 = 1'b0;
    o_pll_clk_1 = 1'b0;
    o_pll_clk_2 = 1'b0;
    o_pll_clk_3 = 1'b0;
    o_clk2x_t   = 1'b0;
    o_clk2x_c   = 1'b1;
    o_vco0_clk  = 1'b0;
    have_last   = 1'b0;
    stable_cnt  = 0;
    ref_period  = 0;
    t_last      = 0;
    edge_n      = 0;
  end

  // Reference period measurement and lock detection.
  always @(posedge i_refclk or negedge i_en) begin
    if (!i_en) begin
      o_lock     = 1'b0;
      stable_cnt = 0;
      have_last  = 1'b0;
    end else begin
      if (have_last) begin
        if ($realtime - t_last == ref_period) begin
          if (stable_cnt < int'(LOCK_CYCLES)) stable_cnt = stable_cnt + 1;
        end else begin
          stable_cnt = 0;
        end
        ref_period = $realtime - t_last;
      end
      t_last    = $realtime;
      have_last = 1'b1;
      if (stable_cnt >= int'(LOCK_CYCLES)) o_lock = 1'b1;
    end
  end

  // Phase k is high for half of the POST_EDGES internal edges, starting at
  // edge k*PHASE_EDGES.
  function automatic logic phase_level(int n, int k);
    int m;
    m = (n - k * int'(PHASE_EDGES)) % int'(POST_EDGES);
    if (m < 0) m = m + int'(POST_EDGES);
    return logic'(m < int'(POST_EDGES) / 2);
  endfunction

  // Internal clock: one step per internal half-period.
  always begin
    if (!o_lock) begin
      edge_n      = 0;
      o_pll_clk_0 <= 1'b0;
      o_pll_clk_1 <= 1'b0;
      o_pll_clk_2 <= 1'b0;
      o_pll_clk_3 <= 1'b0;
      o_clk2x_t   <= 1'b0;
      o_clk2x_c   <= 1'b1;
      @(posedge o_lock);
    end
    o_pll_clk_0 <= phase_level(edge_n, 0);
    o_pll_clk_1 <= phase_level(edge_n, 1);
    o_pll_clk_2 <= phase_level(edge_n, 2);
    o_pll_clk_3 <= phase_level(edge_n, 3);
    o_clk2x_t   <= (edge_n % int'(POST_EDGES / 2)) < int'(POST_EDGES / 4);
    o_clk2x_c   <= (edge_n % int'(POST_EDGES / 2)) >= int'(POST_EDGES / 4);
    edge_n      = (edge_n + 1) % int'(POST_EDGES);
    #(ref_period / real'(2 * MULT));
  end

  always begin
    if (!o_lock) begin
      o_vco0_clk <= 1'b0;
      @(posedge o_lock);
    end
    #(ref_period / real'(2 * VCO0_RATIO));
    o_vco0_clk <= o_lock ? ~o_vco0_clk : 1'b0;
  end

endmodule
