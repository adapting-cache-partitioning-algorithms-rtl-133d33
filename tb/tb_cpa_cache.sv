// tb_cpa_cache: end-to-end test of one partitioned L2 per policy at reduced
// size (8 ways, 2 cores, 64 sets, 32-bit addresses, ATD sampling 1 in 4,
// 4000-cycle intervals). Core 0 cycles through 6 lines in every set, which
// thrashes in the 4 ways of the reset split but fits in 6 or more; core 1
// streams through lines it never reuses. Each cache is checked by a
// scoreboard; in addition, after the first repartition core 0 must own at
// least 6 ways under both policies, and its L2 hit count in the last interval
// must exceed that of the first.
module tb_cpa_cache;
  import cpa_pkg::*;
  localparam int W = 8, N = 2, S = 64, AW = 32, LB = 128, SMP = 4, IV = 4000, CW = 16;
  localparam int WW = $clog2(W), TW = AW - 7 - 6;

  logic clk = 0, rst_n = 0;
  logic req_valid; logic req_core; logic [AW-1:0] req_addr;

  typedef struct {
    logic rv; logic rc; logic rh; logic [WW-1:0] rw; logic re; logic [TW-1:0] ret;
    logic [N-1:0] as, ah; logic bd, rp;
    logic [N-1:0][WW:0] ways; logic [N-1:0][W:0][CW-1:0] sdh;
  } port_t;
  port_t p [2];

  int checks [2], failures [2], n_hit [2][N], n_miss [2][N];
  int n_evict [2], n_ah [2], n_am [2], n_bd [2], n_rp [2], n_ch [2];

  for (genvar g = 0; g < 2; g++) begin : g_pol
    cpa_cache #(.POLICY(g == 0 ? POL_NRU : POL_BT), .WAYS(W), .CORES(N), .SETS(S),
      .ADDR_W(AW), .LINE_B(LB), .SAMPLE(SMP), .INTERVAL(IV), .CNT_W(CW), .SCALE_Q(3)) dut (
      .clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_core(req_core), .req_addr(req_addr),
      .resp_valid(p[g].rv), .resp_core(p[g].rc), .resp_hit(p[g].rh), .resp_way(p[g].rw),
      .resp_evict(p[g].re), .resp_evict_tag(p[g].ret), .atd_sampled(p[g].as), .atd_hit(p[g].ah),
      .boundary(p[g].bd), .repartition(p[g].rp), .ways(p[g].ways), .sdh_cnt(p[g].sdh));
    cpa_scoreboard #(.WAYS(W), .CORES(N), .SETS(S), .ADDR_W(AW), .LINE_B(LB), .CNT_W(CW)) sb (
      .clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_core(req_core), .req_addr(req_addr),
      .resp_valid(p[g].rv), .resp_core(p[g].rc), .resp_hit(p[g].rh), .resp_way(p[g].rw),
      .resp_evict(p[g].re), .resp_evict_tag(p[g].ret), .atd_sampled(p[g].as), .atd_hit(p[g].ah),
      .boundary(p[g].bd), .repartition(p[g].rp), .ways(p[g].ways), .sdh(p[g].sdh),
      .checks(checks[g]), .failures(failures[g]), .n_hit(n_hit[g]), .n_miss(n_miss[g]),
      .n_evict(n_evict[g]), .n_atd_hit(n_ah[g]), .n_atd_miss(n_am[g]), .n_boundary(n_bd[g]),
      .n_repart(n_rp[g]), .n_change(n_ch[g]));
  end

  always #5 clk = ~clk;

  int xchecks = 0, xfail = 0;
  task automatic need(input string what, input bit ok);
    xchecks++;
    if (!ok) begin xfail++; $display("FAIL %s", what); end
  endtask

  task automatic finish_tb();
    int c, f;
    c = xchecks + checks[0] + checks[1];
    f = xfail + failures[0] + failures[1];
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    xfail++;
    finish_tb();
  end

  int hits_first [2], hits_last [2];
  initial begin
    int i0, i1, cyc;
    req_valid = 0; req_core = 0; req_addr = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    i0 = 0; i1 = 0;
    for (cyc = 0; cyc < 3 * IV + 100; cyc++) begin
      if (cyc == IV - 2)     for (int g = 0; g < 2; g++) hits_first[g] = n_hit[g][0];
      if (cyc == 2 * IV - 2) for (int g = 0; g < 2; g++) hits_last[g] = n_hit[g][0];
      if (cyc == 3 * IV - 2) for (int g = 0; g < 2; g++) hits_last[g] = n_hit[g][0] - hits_last[g];
      req_valid = (cyc % 7) != 6;
      req_core  = cyc[0];
      if (!cyc[0]) begin
        // core 0: tag i0/S mod 6 in set i0 mod S
        req_addr = {AW'((i0 / S) % 6) << 13} | {AW'(i0 % S) << 7};
        if (req_valid) i0++;
      end else begin
        req_addr = {AW'(100 + i1 / S) << 13} | {AW'(i1 % S) << 7} | AW'(i1 % 128);
        if (req_valid) i1++;
      end
      @(posedge clk); #1;
      if (cyc == IV + 100)
        for (int g = 0; g < 2; g++) begin
          need($sformatf("policy %0d core 0 ways %0d >= 6", g, p[g].ways[0]), p[g].ways[0] >= 6);
          need("core 1 keeps a way", p[g].ways[1] >= 1);
        end
    end
    req_valid = 0;
    repeat (3) @(posedge clk);
    for (int g = 0; g < 2; g++) begin
      $display("policy %s: hits c0=%0d c1=%0d misses c0=%0d c1=%0d evictions=%0d atd hit/miss=%0d/%0d boundaries=%0d repartitions=%0d changes=%0d first/last-interval c0 hits=%0d/%0d",
        g == 0 ? "NRU" : "BT", n_hit[g][0], n_hit[g][1], n_miss[g][0], n_miss[g][1], n_evict[g],
        n_ah[g], n_am[g], n_bd[g], n_rp[g], n_ch[g], hits_first[g], hits_last[g]);
      need("L2 hits happened", n_hit[g][0] > 0);
      need("L2 misses happened", n_miss[g][1] > 0);
      need("evictions happened", n_evict[g] > 0);
      need("ATD hits happened", n_ah[g] > 0);
      need("ATD misses happened", n_am[g] > 0);
      need("interval boundaries happened", n_bd[g] >= 3);
      need("repartitions happened", n_rp[g] >= 3);
      need("partition changed", n_ch[g] > 0);
      need("partitioning helps core 0", hits_last[g] > hits_first[g]);
    end
    finish_tb();
  end
endmodule
