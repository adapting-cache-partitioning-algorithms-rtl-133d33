// cpa_scoreboard: checker for one cpa_cache port, used by the end-to-end
// testbenches.
//
// It keeps a shadow copy of the L2 tags built only from the responses and
// checks every response against it: a hit must name the way that holds the
// tag, a miss must be for a tag absent from the set, must fill a way the
// requesting core owns under the partition in force when the request was
// made (contiguous runs from the way counts, loaded when `repartition` is
// seen), and must report the eviction of the line that way held. It also
// follows the miss register r(A+1) of every SDH (halved at each boundary,
// incremented on every sampled ATD miss) and counts the mechanisms of the
// design: L2 hits, misses and evictions, ATD hits and misses, interval
// boundaries, repartitions and partition changes.
module cpa_scoreboard #(
  parameter int unsigned WAYS   = 16,
  parameter int unsigned CORES  = 2,
  parameter int unsigned SETS   = 1024,
  parameter int unsigned ADDR_W = 64,
  parameter int unsigned LINE_B = 128,
  parameter int unsigned CNT_W  = 24,
  localparam int unsigned WW    = $clog2(WAYS),
  localparam int unsigned OW    = $clog2(LINE_B),
  localparam int unsigned IW    = $clog2(SETS),
  localparam int unsigned TAG_W = ADDR_W - OW - IW,
  localparam int unsigned CIW   = (CORES > 1) ? $clog2(CORES) : 1
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                req_valid,
  input  logic [CIW-1:0]                      req_core,
  input  logic [ADDR_W-1:0]                   req_addr,
  input  logic                                resp_valid,
  input  logic [CIW-1:0]                      resp_core,
  input  logic                                resp_hit,
  input  logic [WW-1:0]                       resp_way,
  input  logic                                resp_evict,
  input  logic [TAG_W-1:0]                    resp_evict_tag,
  input  logic [CORES-1:0]                    atd_sampled,
  input  logic [CORES-1:0]                    atd_hit,
  input  logic                                boundary,
  input  logic                                repartition,
  input  logic [CORES-1:0][WW:0]              ways,
  input  logic [CORES-1:0][WAYS:0][CNT_W-1:0] sdh,
  output int                                  checks,
  output int                                  failures,
  output int                                  n_hit [CORES],
  output int                                  n_miss [CORES],
  output int                                  n_evict,
  output int                                  n_atd_hit,
  output int                                  n_atd_miss,
  output int                                  n_boundary,
  output int                                  n_repart,
  output int                                  n_change
);

  logic [TAG_W-1:0] sh_tag [SETS][WAYS];
  bit               sh_val [SETS][WAYS];
  logic [WAYS-1:0]  cur_mask [CORES];
  logic [WAYS-1:0]  p_mask;
  int               p_set, p_core;
  logic [TAG_W-1:0] p_tag;
  bit               p_valid;
  longint           ref_miss [CORES];
  int               prev_ways [CORES];

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    checks = 0; failures = 0; n_evict = 0; n_atd_hit = 0; n_atd_miss = 0;
    n_boundary = 0; n_repart = 0; n_change = 0; p_valid = 0;
    for (int c = 0; c < CORES; c++) begin
      n_hit[c] = 0; n_miss[c] = 0; ref_miss[c] = 0; cur_mask[c] = '0; prev_ways[c] = -1;
    end
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) sh_val[s][w] = 0;
  end

  always @(posedge clk) if (rst_n) begin
    // response to the request of the previous edge
    if (resp_valid) begin
      chk("response without request", p_valid, 1);
      chk("resp core", resp_core, p_core);
      if (resp_hit) begin
        chk("hit tag", {sh_val[p_set][resp_way], sh_tag[p_set][resp_way]}, {1'b1, p_tag});
        n_hit[p_core]++;
      end else begin
        bit present; present = 0;
        for (int w = 0; w < WAYS; w++) if (sh_val[p_set][w] && sh_tag[p_set][w] == p_tag) present = 1;
        chk("miss on present tag", present, 0);
        if (p_mask != 0) chk("fill in owned way", p_mask[resp_way], 1);
        chk("evict flag", resp_evict, sh_val[p_set][resp_way]);
        if (resp_evict) begin chk("evict tag", resp_evict_tag, sh_tag[p_set][resp_way]); n_evict++; end
        sh_tag[p_set][resp_way] = p_tag;
        sh_val[p_set][resp_way] = 1;
        n_miss[p_core]++;
      end
    end else begin
      chk("lost response", p_valid, 0);
    end
    // this edge's request
    p_valid = req_valid;
    if (req_valid) begin
      p_core = int'(req_core);
      p_set  = int'(req_addr[OW +: IW]);
      p_tag  = req_addr[ADDR_W-1 -: TAG_W];
      p_mask = cur_mask[p_core];
    end
    // SDH miss registers
    for (int c = 0; c < CORES; c++) begin
      chk("sdh miss register", longint'(sdh[c][WAYS]), ref_miss[c]);
      if (boundary) ref_miss[c] = ref_miss[c] / 2;
      if (atd_sampled[c] && !atd_hit[c]) begin ref_miss[c]++; n_atd_miss++; end
      if (atd_sampled[c] && atd_hit[c]) n_atd_hit++;
    end
    if (boundary) n_boundary++;
    // partition registers load at this edge
    if (repartition) begin
      int first; bit changed;
      first = 0; changed = 0;
      n_repart++;
      for (int c = 0; c < CORES; c++) begin
        for (int w = 0; w < WAYS; w++) cur_mask[c][w] = (w >= first) && (w < first + int'(ways[c]));
        first += int'(ways[c]);
        if (prev_ways[c] >= 0 && prev_ways[c] != int'(ways[c])) changed = 1;
        prev_ways[c] = int'(ways[c]);
      end
      chk("ways add up", first, WAYS);
      if (changed) n_change++;
    end
  end

endmodule
