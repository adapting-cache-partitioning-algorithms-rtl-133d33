// tag_dir: set-associative tag directory with pseudo-LRU replacement and
// way-partition enforcement. It is the shared L2 tag directory, and with one
// core, all-ones masks and few sets also the storage of an auxiliary tag
// directory (ATD).
//
// Each set holds A tags with valid bits and the replacement state of the
// chosen policy: NRU used bits plus one replacement pointer for the whole
// directory, or BT tree bits. On a request the set is read, the tag compared
// and either the hitting way or a victim chosen by nru_repl / bt_repl under
// the requesting core's global replacement mask (NRU) or up/down vectors (BT).
// Any core may hit in any way; only victims are restricted. On a miss the
// victim is refilled with the new tag at once (the data array and memory are
// outside this block).
//
// Timing: one request per cycle. The look_* outputs describe the request in
// the same cycle, before it updates the set (they feed the profilers). Tags,
// valid and replacement state are written at the next rising edge, and the
// resp_* outputs hold the result from that edge for one cycle. Synchronous
// active-low reset clears valid bits, used bits, tree bits and the pointer;
// tags are not reset. Invalid ways get no priority as victims: the policy
// alone chooses (a choice of this design).
module tag_dir
  import cpa_pkg::*;
#(
  parameter policy_e     POLICY = POL_NRU,
  parameter int unsigned WAYS   = DEF_WAYS,
  parameter int unsigned SETS   = DEF_SETS,
  parameter int unsigned TAG_W  = 47,
  parameter int unsigned CORES  = DEF_CORES,
  localparam int unsigned WW    = $clog2(WAYS),
  localparam int unsigned IW    = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned CIW   = (CORES > 1) ? $clog2(CORES) : 1
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             req_valid,
  input  logic [CIW-1:0]                   req_core,
  input  logic [IW-1:0]                    req_set,
  input  logic [TAG_W-1:0]                 req_tag,
  input  logic [CORES-1:0][WAYS-1:0]       masks,   // NRU: replaceable ways per core
  input  logic [CORES-1:0][WAYS-2:0]       ups,     // BT: force-upper vectors
  input  logic [CORES-1:0][WAYS-2:0]       downs,   // BT: force-lower vectors
  // same-cycle lookup of the current request
  output logic                             look_hit,
  output logic [WW-1:0]                    look_way,
  output logic [WAYS-1:0]                  look_used, // NRU used bits before update
  output logic [WAYS-2:0]                  look_bt,   // BT tree bits before update
  // registered response
  output logic                             resp_valid,
  output logic [CIW-1:0]                   resp_core,
  output logic                             resp_hit,
  output logic [WW-1:0]                    resp_way,
  output logic                             resp_evict,     // a valid line was replaced
  output logic [TAG_W-1:0]                 resp_evict_tag
);

  logic [TAG_W-1:0] tags  [SETS][WAYS];
  logic [WAYS-1:0]  valid [SETS];

  logic             hit;
  logic [WW-1:0]    hit_way;
  logic [WW-1:0]    way;

  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int unsigned w = 0; w < WAYS; w++)
      if (!hit && valid[req_set][w] && tags[req_set][w] == req_tag) begin
        hit     = 1'b1;
        hit_way = WW'(w);
      end
  end

  generate
    if (POLICY == POL_NRU) begin : g_nru
      logic [WAYS-1:0] used [SETS];
      logic [WW-1:0]   ptr;
      logic [WAYS-1:0] used_next;
      logic [WW-1:0]   ptr_next, victim;

      nru_repl #(.WAYS(WAYS)) u_repl (
        .used(used[req_set]), .mask(masks[req_core]), .ptr(ptr),
        .hit(hit), .hit_way(hit_way), .victim(victim), .way(way),
        .used_next(used_next), .ptr_next(ptr_next)
      );

      always_ff @(posedge clk) begin
        if (!rst_n) begin
          ptr <= '0;
          for (int unsigned s = 0; s < SETS; s++) used[s] <= '0;
        end else if (req_valid) begin
          ptr           <= ptr_next;
          used[req_set] <= used_next;
        end
      end
      assign look_used = used[req_set];
      assign look_bt   = '0;
    end else begin : g_bt
      logic [WAYS-2:0] btb [SETS];
      logic [WAYS-2:0] bt_next;
      logic [WW-1:0]   victim;

      bt_repl #(.WAYS(WAYS)) u_repl (
        .bt(btb[req_set]), .up(ups[req_core]), .down(downs[req_core]),
        .hit(hit), .hit_way(hit_way), .victim(victim), .way(way),
        .bt_next(bt_next)
      );

      always_ff @(posedge clk) begin
        if (!rst_n) begin
          for (int unsigned s = 0; s < SETS; s++) btb[s] <= '0;
        end else if (req_valid) begin
          btb[req_set] <= bt_next;
        end
      end
      assign look_used = '0;
      assign look_bt   = btb[req_set];

      // The partitioning logic never forces a node both up and down.
      a_updown: assert property (@(posedge clk) disable iff (!rst_n)
        req_valid |-> (ups[req_core] & downs[req_core]) == '0)
        else $error("tag_dir: up and down both set for core %0d", req_core);
    end
  endgenerate

  assign look_hit = hit;
  assign look_way = way;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < SETS; s++) valid[s] <= '0;
      resp_valid     <= 1'b0;
      resp_core      <= '0;
      resp_hit       <= 1'b0;
      resp_way       <= '0;
      resp_evict     <= 1'b0;
      resp_evict_tag <= '0;
    end else begin
      resp_valid <= req_valid;
      if (req_valid) begin
        resp_core      <= req_core;
        resp_hit       <= hit;
        resp_way       <= way;
        resp_evict     <= !hit && valid[req_set][way];
        resp_evict_tag <= tags[req_set][way];
        if (!hit) begin
          tags[req_set][way]  <= req_tag;
          valid[req_set][way] <= 1'b1;
        end
      end
    end
  end

endmodule
