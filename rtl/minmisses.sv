// minmisses: MinMisses partition selection.
//
// Given the SDH of every thread, it chooses how many ways each thread gets so
// that the total predicted number of misses is minimal, with at least one way
// per thread and all A ways given out. The predicted misses of thread c with
// k ways are m(c,k) = r(k+1) + ... + r(A+1) of its SDH.
//
// The policy's goal and constraints follow the partition selection
// description; how it is computed is this design's choice: an exact dynamic
// programme run one step per cycle,
//   B(0,w) = m(0,w),
//   B(c,w) = min over k = 1..w-c of B(c-1,w-k) + m(c,k),
// remembering the best k for every (c,w), then tracing back from B(N-1,A).
// Ties keep the smallest k. It takes about (N-1)*A*A/2 + N + 2 cycles, far
// below the 1,000,000-cycle interval.
//
// Interface: a start pulse captures the SDH counters (before the halving that
// comes at the same boundary); done pulses for one cycle when ways holds the
// new partition; ways keeps its value until the next done. A start while
// busy is ignored. After reset ways holds an equal split, the remainder going
// to the last thread.
module minmisses #(
  parameter int unsigned WAYS  = cpa_pkg::DEF_WAYS,
  parameter int unsigned CORES = cpa_pkg::DEF_CORES,
  parameter int unsigned CNT_W = cpa_pkg::DEF_CNT_W,
  localparam int unsigned WW   = $clog2(WAYS)
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   start,
  input  logic [CORES-1:0][WAYS:0][CNT_W-1:0]    sdh_cnt,
  output logic                                   busy,
  output logic                                   done,
  output logic [CORES-1:0][WW:0]                 ways
);

  localparam int unsigned MW = CNT_W + WW + 2 + $clog2(CORES + 1);
  localparam int unsigned CI = (CORES > 1) ? $clog2(CORES) : 1;

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_DP, S_BACK} state_e;
  state_e state;

  logic [CORES-1:0][WAYS:0][CNT_W-1:0] snap;
  logic [MW-1:0]  miss   [CORES][WAYS+1];   // m(c,k)
  logic [MW-1:0]  best   [CORES][WAYS+1];   // B(c,w)
  logic [WW:0]    choice [CORES][WAYS+1];   // best k for (c,w)

  logic [CI-1:0]  c;
  logic [WW:0]    w, k, wrem;
  logic [MW-1:0]  run_min;
  logic [WW:0]    run_k;

  // Miss curve of every thread: suffix sums of its SDH.
  always_comb
    for (int unsigned t = 0; t < CORES; t++) begin
      miss[t][WAYS] = MW'(snap[t][WAYS]);
      for (int i = WAYS - 1; i >= 0; i--)
        miss[t][i] = miss[t][i+1] + MW'(snap[t][i]);
    end

  logic [MW-1:0] cand, new_min;
  logic [WW:0]   new_k;
  always_comb begin
    cand = best[c-1][w-k] + miss[c][k];
    if (k == 1 || cand < run_min) begin
      new_min = cand;
      new_k   = k;
    end else begin
      new_min = run_min;
      new_k   = run_k;
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      done    <= 1'b0;
      c       <= '0;
      w       <= '0;
      k       <= '0;
      wrem    <= '0;
      run_min <= '0;
      run_k   <= '0;
      snap    <= '0;
      for (int unsigned t = 0; t < CORES; t++)
        ways[t] <= (WW+1)'(WAYS / CORES + ((t == CORES - 1) ? WAYS % CORES : 0));
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          snap  <= sdh_cnt;
          state <= S_INIT;
        end
        S_INIT: begin
          for (int unsigned i = 0; i <= WAYS; i++) best[0][i] <= miss[0][i];
          c     <= CI'(1);
          w     <= (WW+1)'(2);
          k     <= (WW+1)'(1);
          wrem  <= (WW+1)'(WAYS);
          state <= (CORES > 1) ? S_DP : S_BACK;
          if (CORES == 1) c <= '0;
        end
        S_DP: begin
          run_min <= new_min;
          run_k   <= new_k;
          k       <= k + 1'b1;
          if (k == w - (WW+1)'(c)) begin
            best[c][w]   <= new_min;
            choice[c][w] <= new_k;
            k            <= (WW+1)'(1);
            if (w == (WW+1)'(WAYS)) begin
              if (c == CI'(CORES - 1)) begin
                state <= S_BACK;
              end else begin
                c <= c + 1'b1;
                w <= (WW+1)'(c) + (WW+1)'(2);
              end
            end else begin
              w <= w + 1'b1;
            end
          end
        end
        S_BACK: begin
          if (c == '0) begin
            ways[0] <= wrem;
            done    <= 1'b1;
            state   <= S_IDLE;
          end else begin
            ways[c] <= choice[c][wrem];
            wrem    <= wrem - choice[c][wrem];
            c       <= c - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
