// tb_cpa_top: end-to-end test of both partitioning systems at their default
// size (2 cores, 16-way 2 MB L2 with 128-byte lines, 64-bit addresses, ATD
// sampling 1 in 32, 1,000,000-cycle intervals), through two intervals and
// the repartitioning between them.
//
// Both ports see the same stream. Core 0 cycles through 12 lines in every one
// of the 1024 sets: too many for the 8 ways of the reset split, few enough for
// 12 or more. Core 1 streams through lines it never reuses, with one access
// for every five of core 0 (when the stream fills a set as often as core 0
// touches it, tree pseudo-LRU keeps none of core 0's 12 lines even in 15
// ways, so the BT system would show no gain). Scoreboards check
// every response, fill ownership and the SDH miss registers. At the end of
// the first interval MinMisses must give core 0 at least 12 ways under both
// policies, core 0 must hit more in the second interval than in the first,
// and every mechanism (L2 hits, misses and evictions, ATD hits and misses,
// boundary with SDH halving, repartition, partition change) must have been
// seen.
module tb_cpa_top;
  localparam int W = 16, N = 2, S = 1024, AW = 64, IV = 1_000_000, CW = 24;
  localparam int WW = 4, TW = 47;

  logic clk = 0, rst_n = 0;
  logic req_valid; logic req_core; logic [AW-1:0] req_addr;

  typedef struct {
    logic rv; logic rc; logic rh; logic [WW-1:0] rw; logic re; logic [TW-1:0] ret;
    logic [N-1:0] as, ah; logic bd, rp;
    logic [N-1:0][WW:0] ways; logic [N-1:0][W:0][CW-1:0] sdh;
  } port_t;
  port_t p [2];

  cpa_top dut (
    .clk(clk), .rst_n(rst_n),
    .nru_req_valid(req_valid), .nru_req_core(req_core), .nru_req_addr(req_addr),
    .nru_resp_valid(p[0].rv), .nru_resp_core(p[0].rc), .nru_resp_hit(p[0].rh),
    .nru_resp_way(p[0].rw), .nru_resp_evict(p[0].re), .nru_resp_evict_tag(p[0].ret),
    .nru_atd_sampled(p[0].as), .nru_atd_hit(p[0].ah), .nru_boundary(p[0].bd),
    .nru_repartition(p[0].rp), .nru_ways(p[0].ways), .nru_sdh(p[0].sdh),
    .bt_req_valid(req_valid), .bt_req_core(req_core), .bt_req_addr(req_addr),
    .bt_resp_valid(p[1].rv), .bt_resp_core(p[1].rc), .bt_resp_hit(p[1].rh),
    .bt_resp_way(p[1].rw), .bt_resp_evict(p[1].re), .bt_resp_evict_tag(p[1].ret),
    .bt_atd_sampled(p[1].as), .bt_atd_hit(p[1].ah), .bt_boundary(p[1].bd),
    .bt_repartition(p[1].rp), .bt_ways(p[1].ways), .bt_sdh(p[1].sdh));

  int checks [2], failures [2], n_hit [2][N], n_miss [2][N];
  int n_evict [2], n_ah [2], n_am [2], n_bd [2], n_rp [2], n_ch [2];

  for (genvar g = 0; g < 2; g++) begin : g_sb
    cpa_scoreboard #(.WAYS(W), .CORES(N), .SETS(S), .ADDR_W(AW), .LINE_B(128), .CNT_W(CW)) sb (
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
    $display("TB_RESULT checks=%0d failures=%0d", xchecks + checks[0] + checks[1],
             xfail + failures[0] + failures[1]);
    $finish;
  endtask

  initial begin : watchdog
    repeat (2 * IV + 50_000) @(posedge clk);
    xfail++;
    $display("FAIL watchdog");
    finish_tb();
  end

  int hits_first [2], hits_second [2];
  initial begin
    longint i0, i1;
    int cyc;
    req_valid = 0; req_core = 0; req_addr = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    i0 = 0; i1 = 0;
    // the interval timer started at reset release, one cycle before cyc 0
    for (cyc = 0; cyc < 2 * IV; cyc++) begin
      if (cyc == IV - 3)     for (int g = 0; g < 2; g++) hits_first[g] = n_hit[g][0];
      if (cyc == 2 * IV - 3) for (int g = 0; g < 2; g++) hits_second[g] = n_hit[g][0];
      req_valid = (cyc % 13) != 12;
      req_core  = (cyc % 6) == 5;
      if (!req_core) begin
        req_addr = (AW'((i0 / S) % 12) << 17) | (AW'(i0 % S) << 7);
        if (req_valid) i0++;
      end else begin
        req_addr = (AW'(1000 + i1 / S) << 17) | (AW'(i1 % S) << 7);
        if (req_valid) i1++;
      end
      @(posedge clk); #1;
      if (cyc == IV + 1000)
        for (int g = 0; g < 2; g++) begin
          $display("policy %0d partition after first interval: core0=%0d core1=%0d", g, p[g].ways[0], p[g].ways[1]);
          need("core 0 gets at least 12 ways", p[g].ways[0] >= 12);
          need("core 1 keeps a way", p[g].ways[1] >= 1);
        end
    end
    req_valid = 0;
    repeat (3) @(posedge clk);
    for (int g = 0; g < 2; g++) begin
      hits_second[g] = hits_second[g] - hits_first[g];
      $display("policy %s: hits c0=%0d c1=%0d misses c0=%0d c1=%0d evictions=%0d atd hit/miss=%0d/%0d boundaries=%0d repartitions=%0d changes=%0d core0 hits interval1/interval2=%0d/%0d",
        g == 0 ? "NRU" : "BT", n_hit[g][0], n_hit[g][1], n_miss[g][0], n_miss[g][1], n_evict[g],
        n_ah[g], n_am[g], n_bd[g], n_rp[g], n_ch[g], hits_first[g], hits_second[g]);
      need("L2 hits happened", n_hit[g][0] > 0);
      need("L2 misses happened", n_miss[g][1] > 0);
      need("evictions happened", n_evict[g] > 0);
      need("ATD hits happened", n_ah[g] > 0);
      need("ATD misses happened", n_am[g] > 0);
      need("boundaries (SDH halving) happened", n_bd[g] >= 1);
      need("repartitions happened", n_rp[g] >= 2);
      need("partition changed", n_ch[g] > 0);
      need("partitioning helps core 0", hits_second[g] > hits_first[g]);
    end
    finish_tb();
  end
endmodule
