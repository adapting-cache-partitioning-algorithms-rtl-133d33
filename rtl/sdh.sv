// sdh: stack distance histogram of one thread.
//
// A+1 counters r1..r(A+1): ri counts the accesses of the current interval
// that the profiler placed at stack position i, r(A+1) the ATD misses. The
// predicted miss count of the thread with k ways is r(k+1) + ... + r(A+1).
// At each interval boundary every counter is divided by two (a right shift),
// so older intervals weigh less and the counters do not saturate.
//
// Timing: inc (one enable per counter, several may be set in one cycle) and
// halve are sampled at the rising clock edge; when both come together the
// counter is halved first and then incremented. Counters saturate at their
// maximum; the counter width and saturation are this design's choices, the
// rest follows the SDH description. Synchronous active-low reset clears all
// counters.
module sdh #(
  parameter int unsigned WAYS  = cpa_pkg::DEF_WAYS,
  parameter int unsigned CNT_W = cpa_pkg::DEF_CNT_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [WAYS:0]               inc,    // inc[i] increments r(i+1)
  input  logic                        halve,  // interval boundary
  output logic [WAYS:0][CNT_W-1:0]    cnt     // cnt[i] = r(i+1)
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
    end else begin
      for (int unsigned i = 0; i <= WAYS; i++) begin
        logic [CNT_W-1:0] base;
        base = halve ? (cnt[i] >> 1) : cnt[i];
        if (inc[i] && base != '1) cnt[i] <= base + 1'b1;
        else                      cnt[i] <= base;
      end
    end
  end

endmodule
