// atd: auxiliary tag directory and stack distance estimator of one thread.
//
// The ATD is a private copy of the L2 tags, looked up only by its owner
// thread, that shows how the thread would behave alone in the whole A-way
// cache. It uses the same replacement policy as the L2 (NRU or BT) with no
// partitioning. To save area only one L2 set in SAMPLE is represented: an
// access whose set index is a multiple of SAMPLE goes to ATD set
// index / SAMPLE, any other access leaves the ATD untouched. For a sampled
// access the policy's profiler turns the ATD state before the update into an
// estimated stack distance and the increments of the thread's eSDH.
//
// Set sampling at 1 in 32 and full tags follow the baseline; which sets are
// sampled (index multiple of SAMPLE) and the per-ATD NRU replacement pointer
// are this design's choices.
//
// Timing: inc, est_dist, sampled and hit are combinational in the access cycle
// (the SDH registers them at the same edge at which the ATD updates).
module atd
  import cpa_pkg::*;
#(
  parameter policy_e     POLICY  = POL_NRU,
  parameter int unsigned WAYS    = DEF_WAYS,
  parameter int unsigned SETS    = DEF_SETS,     // L2 sets
  parameter int unsigned SAMPLE  = DEF_SAMPLE,
  parameter int unsigned TAG_W   = 47,
  parameter int unsigned SCALE_Q = DEF_SCALE_Q,
  localparam int unsigned WW     = $clog2(WAYS),
  localparam int unsigned IW     = $clog2(SETS),
  localparam int unsigned SW     = $clog2(SAMPLE),
  localparam int unsigned ASETS  = SETS / SAMPLE
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             acc_valid,  // access by the owner thread
  input  logic [IW-1:0]    acc_set,    // L2 set index
  input  logic [TAG_W-1:0] acc_tag,    // L2 tag
  output logic             sampled,    // the access went to the ATD
  output logic             hit,        // ATD hit
  output logic [WW:0]      est_dist,       // estimated distance (A+1 = miss)
  output logic [WAYS:0]    inc         // eSDH increments
);

  localparam int unsigned AIW = (ASETS > 1) ? $clog2(ASETS) : 1;

  logic [AIW-1:0]  aset;
  logic            look_hit;
  logic [WW-1:0]   look_way;
  logic [WAYS-1:0] look_used;
  logic [WAYS-2:0] look_bt;

  always_comb begin
    if (SW == 0) sampled = acc_valid;
    else         sampled = acc_valid && (acc_set & IW'(SAMPLE - 1)) == 0;
    aset = AIW'(acc_set >> SW);
  end

  tag_dir #(
    .POLICY(POLICY), .WAYS(WAYS), .SETS(ASETS), .TAG_W(TAG_W), .CORES(1)
  ) u_dir (
    .clk(clk), .rst_n(rst_n),
    .req_valid(sampled), .req_core(1'b0), .req_set(aset), .req_tag(acc_tag),
    .masks('1), .ups('0), .downs('0),
    .look_hit(look_hit), .look_way(look_way),
    .look_used(look_used), .look_bt(look_bt),
    .resp_valid(), .resp_core(), .resp_hit(), .resp_way(),
    .resp_evict(), .resp_evict_tag()
  );

  assign hit = sampled && look_hit;

  generate
    if (POLICY == POL_NRU) begin : g_nru
      nru_profiler #(.WAYS(WAYS), .SCALE_Q(SCALE_Q)) u_prof (
        .valid(sampled), .hit(look_hit), .hit_way(look_way),
        .used(look_used), .est_dist(est_dist), .inc(inc)
      );
    end else begin : g_bt
      bt_profiler #(.WAYS(WAYS)) u_prof (
        .valid(sampled), .hit(look_hit), .hit_way(look_way),
        .bt(look_bt), .est_dist(est_dist), .inc(inc)
      );
    end
  endgenerate

endmodule
