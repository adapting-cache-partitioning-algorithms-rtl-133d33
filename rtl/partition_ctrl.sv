// partition_ctrl: interval timing and the global partition registers.
//
// A counter divides execution into intervals of INTERVAL cycles. At the end of
// each interval it pulses `boundary`, which starts MinMisses partition
// selection on the current SDH values and, at the same edge, halves every SDH
// counter. When MinMisses reports a new way count per core, the counts are
// turned into the global replacement state of the cache:
//   * masks: core c owns a contiguous run of ways, after those of cores
//     0..c-1 (NRU global replacement masks, A bits per core);
//   * ups/downs: one bit per BT node and core (BT up/down vectors). A node
//     whose upper sub-tree holds owned ways and lower sub-tree none gets up=1,
//     the reverse down=1, otherwise both 0, so up and down are never both 1
//     and the victim walk can only reach owned ways.
// The interval length, the halving and the mask and vector semantics follow
// the description; contiguous way runs and the derivation of the vectors from
// a way set are this design's choices.
//
// Timing: masks, ups and downs are registers, loaded one cycle after `done`
// of MinMisses (repartition marks the load). Reset clears them and they take
// the equal split that MinMisses holds after reset in the first cycle out of
// reset, so requests should start one cycle after reset is released.
module partition_ctrl
  import cpa_pkg::*;
#(
  parameter int unsigned WAYS     = DEF_WAYS,
  parameter int unsigned CORES    = DEF_CORES,
  parameter int unsigned CNT_W    = DEF_CNT_W,
  parameter int unsigned INTERVAL = DEF_INTERVAL,
  localparam int unsigned WW      = $clog2(WAYS)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic [CORES-1:0][WAYS:0][CNT_W-1:0] sdh_cnt,
  output logic                                boundary,   // halve SDHs, start selection
  output logic                                repartition,// new partition loaded
  output logic [CORES-1:0][WW:0]              ways,
  output logic [CORES-1:0][WAYS-1:0]          masks,
  output logic [CORES-1:0][WAYS-2:0]          ups,
  output logic [CORES-1:0][WAYS-2:0]          downs
);

  localparam int unsigned TW = $clog2(INTERVAL);

  logic [TW-1:0] timer;
  logic          mm_done, mm_busy;

  always_ff @(posedge clk) begin
    if (!rst_n) timer <= '0;
    else        timer <= (timer == TW'(INTERVAL - 1)) ? '0 : timer + 1'b1;
  end
  assign boundary = (timer == TW'(INTERVAL - 1));

  minmisses #(.WAYS(WAYS), .CORES(CORES), .CNT_W(CNT_W)) u_mm (
    .clk(clk), .rst_n(rst_n), .start(boundary), .sdh_cnt(sdh_cnt),
    .busy(mm_busy), .done(mm_done), .ways(ways)
  );

  // Way counts to contiguous ownership masks.
  logic [CORES-1:0][WAYS-1:0] mask_d;
  always_comb begin
    int unsigned first;
    first = 0;
    for (int unsigned t = 0; t < CORES; t++) begin
      for (int unsigned i = 0; i < WAYS; i++)
        mask_d[t][i] = (i >= first) && (i < first + int'(ways[t]));
      first += int'(ways[t]);
    end
  end

  // Ownership masks to BT up/down vectors.
  logic [CORES-1:0][WAYS-2:0] up_d, down_d;
  always_comb begin
    int unsigned span, n;
    logic any_up, any_dn;
    for (int unsigned t = 0; t < CORES; t++)
      for (int unsigned lvl = 0; lvl < WW; lvl++) begin
        span = WAYS >> lvl;
        for (int unsigned pos = 0; pos < (1 << lvl); pos++) begin
          any_up = 1'b0;
          any_dn = 1'b0;
          for (int unsigned i = 0; i < span / 2; i++) begin
            any_up |= mask_d[t][pos * span + i];
            any_dn |= mask_d[t][pos * span + span / 2 + i];
          end
          n = bt_node(WAYS, lvl, pos);
          up_d[t][n]   = any_up && !any_dn;
          down_d[t][n] = any_dn && !any_up;
        end
      end
  end

  logic load_q;
  always_ff @(posedge clk) begin
    if (!rst_n) load_q <= 1'b1;          // load the reset split once
    else        load_q <= mm_done;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      masks <= '0;
      ups   <= '0;
      downs <= '0;
    end else if (load_q) begin
      masks <= mask_d;
      ups   <= up_d;
      downs <= down_d;
    end
  end
  assign repartition = load_q;

endmodule
