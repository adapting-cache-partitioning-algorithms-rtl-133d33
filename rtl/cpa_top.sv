// cpa_top: the two proposed partitioning systems side by side.
//
// Cache partitioning algorithms choose, every interval, how many ways of a
// shared last-level cache each core may fill, from per-core stack distance
// histograms. Real caches use pseudo-LRU, which has no LRU stack, so the
// histograms and the enforcement must be adapted. This top holds both
// adaptations, each a complete cpa_cache with its own request port:
//   * nru_*: a shared L2 with NRU replacement, global replacement masks and
//     used-bit based eSDH estimation (scaling factor 0.75 by default);
//   * bt_*:  a shared L2 with binary tree replacement, per-core up/down
//     vectors and ID-bit/XOR/subtract eSDH estimation.
// They are independent designs (a cache uses one policy); they share only
// clock and reset. Default geometry: 2 cores, 16-way 2 MB L2 with 128-byte
// lines, 64-bit addresses, ATD sampling 1 in 32, 1,000,000-cycle intervals.
// Timing of each port is that of cpa_cache: response one cycle after the
// request; requests may start one cycle after reset is released.
module cpa_top
  import cpa_pkg::*;
#(
  parameter int unsigned WAYS     = DEF_WAYS,
  parameter int unsigned CORES    = DEF_CORES,
  parameter int unsigned SETS     = DEF_SETS,
  parameter int unsigned ADDR_W   = DEF_ADDR_W,
  parameter int unsigned LINE_B   = DEF_LINE_B,
  parameter int unsigned SAMPLE   = DEF_SAMPLE,
  parameter int unsigned INTERVAL = DEF_INTERVAL,
  parameter int unsigned CNT_W    = DEF_CNT_W,
  parameter int unsigned SCALE_Q  = DEF_SCALE_Q,
  localparam int unsigned WW      = $clog2(WAYS),
  localparam int unsigned TAG_W   = ADDR_W - $clog2(LINE_B) - $clog2(SETS),
  localparam int unsigned CIW     = (CORES > 1) ? $clog2(CORES) : 1
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // NRU-based partitioned L2
  input  logic                                nru_req_valid,
  input  logic [CIW-1:0]                      nru_req_core,
  input  logic [ADDR_W-1:0]                   nru_req_addr,
  output logic                                nru_resp_valid,
  output logic [CIW-1:0]                      nru_resp_core,
  output logic                                nru_resp_hit,
  output logic [WW-1:0]                       nru_resp_way,
  output logic                                nru_resp_evict,
  output logic [TAG_W-1:0]                    nru_resp_evict_tag,
  output logic [CORES-1:0]                    nru_atd_sampled,
  output logic [CORES-1:0]                    nru_atd_hit,
  output logic                                nru_boundary,
  output logic                                nru_repartition,
  output logic [CORES-1:0][WW:0]              nru_ways,
  output logic [CORES-1:0][WAYS:0][CNT_W-1:0] nru_sdh,
  // BT-based partitioned L2
  input  logic                                bt_req_valid,
  input  logic [CIW-1:0]                      bt_req_core,
  input  logic [ADDR_W-1:0]                   bt_req_addr,
  output logic                                bt_resp_valid,
  output logic [CIW-1:0]                      bt_resp_core,
  output logic                                bt_resp_hit,
  output logic [WW-1:0]                       bt_resp_way,
  output logic                                bt_resp_evict,
  output logic [TAG_W-1:0]                    bt_resp_evict_tag,
  output logic [CORES-1:0]                    bt_atd_sampled,
  output logic [CORES-1:0]                    bt_atd_hit,
  output logic                                bt_boundary,
  output logic                                bt_repartition,
  output logic [CORES-1:0][WW:0]              bt_ways,
  output logic [CORES-1:0][WAYS:0][CNT_W-1:0] bt_sdh
);

  cpa_cache #(
    .POLICY(POL_NRU), .WAYS(WAYS), .CORES(CORES), .SETS(SETS), .ADDR_W(ADDR_W),
    .LINE_B(LINE_B), .SAMPLE(SAMPLE), .INTERVAL(INTERVAL), .CNT_W(CNT_W),
    .SCALE_Q(SCALE_Q)
  ) u_nru (
    .clk(clk), .rst_n(rst_n),
    .req_valid(nru_req_valid), .req_core(nru_req_core), .req_addr(nru_req_addr),
    .resp_valid(nru_resp_valid), .resp_core(nru_resp_core), .resp_hit(nru_resp_hit),
    .resp_way(nru_resp_way), .resp_evict(nru_resp_evict),
    .resp_evict_tag(nru_resp_evict_tag), .atd_sampled(nru_atd_sampled),
    .atd_hit(nru_atd_hit), .boundary(nru_boundary), .repartition(nru_repartition),
    .ways(nru_ways), .sdh_cnt(nru_sdh)
  );

  cpa_cache #(
    .POLICY(POL_BT), .WAYS(WAYS), .CORES(CORES), .SETS(SETS), .ADDR_W(ADDR_W),
    .LINE_B(LINE_B), .SAMPLE(SAMPLE), .INTERVAL(INTERVAL), .CNT_W(CNT_W),
    .SCALE_Q(SCALE_Q)
  ) u_bt (
    .clk(clk), .rst_n(rst_n),
    .req_valid(bt_req_valid), .req_core(bt_req_core), .req_addr(bt_req_addr),
    .resp_valid(bt_resp_valid), .resp_core(bt_resp_core), .resp_hit(bt_resp_hit),
    .resp_way(bt_resp_way), .resp_evict(bt_resp_evict),
    .resp_evict_tag(bt_resp_evict_tag), .atd_sampled(bt_atd_sampled),
    .atd_hit(bt_atd_hit), .boundary(bt_boundary), .repartition(bt_repartition),
    .ways(bt_ways), .sdh_cnt(bt_sdh)
  );

endmodule
