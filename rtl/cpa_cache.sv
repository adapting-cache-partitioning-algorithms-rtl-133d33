// cpa_cache: one complete dynamically partitioned shared L2 for one
// pseudo-LRU policy (NRU or BT).
//
// Blocks and their connections:
//   * tag_dir: the shared L2 tags and replacement state; victims are limited
//     to the requesting core's ways by the global masks (NRU) or the up/down
//     vectors (BT); hits may fall in any way;
//   * one atd per core, looked up in parallel with the L2 by the owner core's
//     accesses to sampled sets, reporting estimated stack distances;
//   * one sdh per core, collecting them as the core's (estimated) SDH;
//   * partition_ctrl with minmisses: at every interval boundary the SDHs are
//     used to choose a new way count per core and then halved, and the new
//     partition is turned into masks and vectors for tag_dir.
// The structure follows the baseline partitioning architecture; the L2 data
// array, cores and memory are outside.
//
// Interface: one L2 request per cycle (req_core names the requesting core;
// arbitration among cores is outside). The address is split into line
// offset, set index and tag. The response comes one cycle later. Requests
// should start one cycle after reset is released (partition registers load).
module cpa_cache
  import cpa_pkg::*;
#(
  parameter policy_e     POLICY   = POL_NRU,
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
  localparam int unsigned OW      = $clog2(LINE_B),
  localparam int unsigned IW      = $clog2(SETS),
  localparam int unsigned TAG_W   = ADDR_W - OW - IW,
  localparam int unsigned CIW     = (CORES > 1) ? $clog2(CORES) : 1
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                req_valid,
  input  logic [CIW-1:0]                      req_core,
  input  logic [ADDR_W-1:0]                   req_addr,
  output logic                                resp_valid,
  output logic [CIW-1:0]                      resp_core,
  output logic                                resp_hit,
  output logic [WW-1:0]                       resp_way,       // hit or filled way
  output logic                                resp_evict,
  output logic [TAG_W-1:0]                    resp_evict_tag,
  output logic [CORES-1:0]                    atd_sampled,    // per core, access cycle
  output logic [CORES-1:0]                    atd_hit,
  output logic                                boundary,
  output logic                                repartition,
  output logic [CORES-1:0][WW:0]              ways,           // current partition
  output logic [CORES-1:0][WAYS:0][CNT_W-1:0] sdh_cnt
);

  logic [IW-1:0]    set_idx;
  logic [TAG_W-1:0] tag;
  assign set_idx = req_addr[OW +: IW];
  assign tag     = req_addr[ADDR_W-1 -: TAG_W];

  logic [CORES-1:0][WAYS-1:0] masks;
  logic [CORES-1:0][WAYS-2:0] ups, downs;

  tag_dir #(
    .POLICY(POLICY), .WAYS(WAYS), .SETS(SETS), .TAG_W(TAG_W), .CORES(CORES)
  ) u_l2 (
    .clk(clk), .rst_n(rst_n),
    .req_valid(req_valid), .req_core(req_core), .req_set(set_idx), .req_tag(tag),
    .masks(masks), .ups(ups), .downs(downs),
    .look_hit(), .look_way(), .look_used(), .look_bt(),
    .resp_valid(resp_valid), .resp_core(resp_core), .resp_hit(resp_hit),
    .resp_way(resp_way), .resp_evict(resp_evict), .resp_evict_tag(resp_evict_tag)
  );

  for (genvar c = 0; c < CORES; c++) begin : g_core
    logic [WAYS:0] inc;
    logic [WW:0]   est_dist;

    atd #(
      .POLICY(POLICY), .WAYS(WAYS), .SETS(SETS), .SAMPLE(SAMPLE),
      .TAG_W(TAG_W), .SCALE_Q(SCALE_Q)
    ) u_atd (
      .clk(clk), .rst_n(rst_n),
      .acc_valid(req_valid && req_core == CIW'(c)), .acc_set(set_idx), .acc_tag(tag),
      .sampled(atd_sampled[c]), .hit(atd_hit[c]), .est_dist(est_dist), .inc(inc)
    );

    sdh #(.WAYS(WAYS), .CNT_W(CNT_W)) u_sdh (
      .clk(clk), .rst_n(rst_n), .inc(inc), .halve(boundary), .cnt(sdh_cnt[c])
    );
  end

  partition_ctrl #(
    .WAYS(WAYS), .CORES(CORES), .CNT_W(CNT_W), .INTERVAL(INTERVAL)
  ) u_ctrl (
    .clk(clk), .rst_n(rst_n), .sdh_cnt(sdh_cnt),
    .boundary(boundary), .repartition(repartition), .ways(ways),
    .masks(masks), .ups(ups), .downs(downs)
  );

endmodule
