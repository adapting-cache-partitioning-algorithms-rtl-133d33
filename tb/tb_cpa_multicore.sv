// tb_cpa_multicore: the 4- and 8-core configurations, the smaller L2 sizes and
// the NRU scaling factors other than 0.75. Six partitioned caches run side by
// side on synthetic multiprogrammed mixes (no benchmark traces are used):
//   cfg 0: NRU, 4 cores, 16-way 2 MB (1024 sets), S = 0.75
//   cfg 1: BT,  4 cores, 16-way 2 MB
//   cfg 2: NRU, 8 cores, 16-way 512 KB (256 sets), S = 0.75
//   cfg 3: BT,  8 cores, 16-way 512 KB
//   cfg 4: NRU, 4 cores, 16-way 1 MB (512 sets), S = 1.0
//   cfg 5: NRU, 4 cores, 16-way 1 MB, S = 0.5
// Core 0 cycles through 6 lines per set, core 1 through 3, all other cores
// stream. Intervals are shortened to 30,000 cycles; the partition is sampled
// just before the second boundary, since an 8-core MinMisses pass takes about
// 1,000 cycles. Scoreboards check every
// response, fill ownership and the SDH miss registers; after the first
// repartition the two reusing cores together must own at least 8 ways, every
// core at least one, core 1's share must follow the scaling factor (cfg 4, 5),
// and each mechanism (hits, misses, evictions, ATD
// hits/misses, boundaries, repartitions, partition change) must occur.
module tb_cpa_multicore;
  import cpa_pkg::*;
  localparam int W = 16, AW = 64, IV = 30_000, CW = 24, NCFG = 6;
  localparam int CYCLES = 3 * IV;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks [NCFG], failures [NCFG];
  int c0_ways [NCFG], c1_ways [NCFG], min_ways [NCFG];
  int n_evict [NCFG], n_ah [NCFG], n_am [NCFG], n_bd [NCFG], n_rp [NCFG], n_ch [NCFG];
  int hit0 [NCFG], miss_last [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int N  = (g == 2 || g == 3) ? 8 : 4;
    localparam int S  = (g < 2) ? 1024 : (g < 4) ? 256 : 512;
    localparam int SQ = (g == 4) ? 4 : (g == 5) ? 2 : 3;
    localparam int IW = $clog2(S);
    localparam int CI = $clog2(N);
    localparam int TW = AW - 7 - IW;
    localparam policy_e POL = (g == 1 || g == 3) ? POL_BT : POL_NRU;

    logic req_valid; logic [CI-1:0] req_core; logic [AW-1:0] req_addr;
    logic rv, rh, re, bd, rp; logic [CI-1:0] rc; logic [3:0] rw; logic [TW-1:0] ret;
    logic [N-1:0] as, ah; logic [N-1:0][4:0] ways; logic [N-1:0][W:0][CW-1:0] sdh;
    int n_hit [N], n_miss [N];

    cpa_cache #(.POLICY(POL), .WAYS(W), .CORES(N), .SETS(S), .ADDR_W(AW), .LINE_B(128),
      .SAMPLE(32), .INTERVAL(IV), .CNT_W(CW), .SCALE_Q(SQ)) dut (
      .clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_core(req_core), .req_addr(req_addr),
      .resp_valid(rv), .resp_core(rc), .resp_hit(rh), .resp_way(rw), .resp_evict(re),
      .resp_evict_tag(ret), .atd_sampled(as), .atd_hit(ah), .boundary(bd), .repartition(rp),
      .ways(ways), .sdh_cnt(sdh));
    cpa_scoreboard #(.WAYS(W), .CORES(N), .SETS(S), .ADDR_W(AW), .LINE_B(128), .CNT_W(CW)) sb (
      .clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_core(req_core), .req_addr(req_addr),
      .resp_valid(rv), .resp_core(rc), .resp_hit(rh), .resp_way(rw), .resp_evict(re),
      .resp_evict_tag(ret), .atd_sampled(as), .atd_hit(ah), .boundary(bd), .repartition(rp),
      .ways(ways), .sdh(sdh), .checks(checks[g]), .failures(failures[g]), .n_hit(n_hit),
      .n_miss(n_miss), .n_evict(n_evict[g]), .n_atd_hit(n_ah[g]), .n_atd_miss(n_am[g]),
      .n_boundary(n_bd[g]), .n_repart(n_rp[g]), .n_change(n_ch[g]));

    // stimulus: round robin over the cores, one idle cycle in 11
    longint idx [N];
    initial begin
      int cyc, c;
      req_valid = 0; req_core = 0; req_addr = 0;
      for (int i = 0; i < N; i++) idx[i] = 0;
      @(posedge rst_n); @(posedge clk); #1;
      for (cyc = 0; cyc < CYCLES; cyc++) begin
        c = cyc % N;
        req_valid = (cyc % 11) != 10;
        req_core  = CI'(c);
        if (c == 0)      req_addr = (AW'((idx[c] / S) % 6) << (7 + IW)) | (AW'(idx[c] % S) << 7);
        else if (c == 1) req_addr = (AW'(64 + (idx[c] / S) % 3) << (7 + IW)) | (AW'(idx[c] % S) << 7);
        else             req_addr = (AW'(1000 + c * 100000 + idx[c] / S) << (7 + IW)) | (AW'(idx[c] % S) << 7);
        if (req_valid) idx[c]++;
        @(posedge clk); #1;
        if (cyc == 2 * IV - 100) begin
          c0_ways[g] = int'(ways[0]); c1_ways[g] = int'(ways[1]);
          min_ways[g] = W;
          for (int i = 0; i < N; i++) if (int'(ways[i]) < min_ways[g]) min_ways[g] = int'(ways[i]);
        end
      end
      req_valid = 0;
      hit0[g] = n_hit[0] + n_hit[1];
      miss_last[g] = 0;
      for (int i = 2; i < N; i++) miss_last[g] += n_miss[i];
    end
  end

  int xchecks = 0, xfail = 0;
  task automatic need(input string what, input bit ok);
    xchecks++;
    if (!ok) begin xfail++; $display("FAIL %s", what); end
  endtask

  task automatic finish_tb();
    int c, f;
    c = xchecks; f = xfail;
    for (int g = 0; g < NCFG; g++) begin c += checks[g]; f += failures[g]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  endtask

  initial begin : watchdog
    repeat (CYCLES + 20_000) @(posedge clk);
    xfail++;
    $display("FAIL watchdog");
    finish_tb();
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (CYCLES + 10) @(posedge clk);
    for (int g = 0; g < NCFG; g++) begin
      $display("cfg %0d: ways core0=%0d core1=%0d min=%0d reuse hits=%0d stream misses=%0d evictions=%0d atd hit/miss=%0d/%0d boundaries=%0d repartitions=%0d changes=%0d",
        g, c0_ways[g], c1_ways[g], min_ways[g], hit0[g], miss_last[g], n_evict[g], n_ah[g], n_am[g],
        n_bd[g], n_rp[g], n_ch[g]);
      need("reusing cores own at least 8 ways", c0_ways[g] + c1_ways[g] >= 8);
      need("every core keeps a way", min_ways[g] >= 1);
      need("reuse hits", hit0[g] > 0);
      need("stream misses", miss_last[g] > 0);
      need("evictions", n_evict[g] > 0);
      need("ATD hits", n_ah[g] > 0);
      need("ATD misses", n_am[g] > 0);
      need("boundaries", n_bd[g] >= 2);
      need("repartitions", n_rp[g] >= 3);
      need("partition changed", n_ch[g] > 0);
    end
    // core 1's three-line loop keeps U = 3 used bits in its ATD set, so the
    // estimated distance is ceil(S*3): 3 ways at S = 1.0, 2 ways at S = 0.5
    need("S=1.0 gives core 1 three ways", c1_ways[4] == 3);
    need("S=0.5 gives core 1 two ways", c1_ways[5] == 2);
    finish_tb();
  end
endmodule
