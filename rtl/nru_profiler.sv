// nru_profiler: stack distance estimation for an ATD that uses NRU.
//
// NRU keeps no stack order, so the distance of a hit is estimated from U, the
// number of used bits set in the set (the accessed line included):
//   * hit on a line whose used bit is 1: the distance lies in 1..U; it is
//     taken as d = ceil(S * U), S being the scaling factor, and eSDH registers
//     r1..rd are all incremented;
//   * hit on a line whose used bit is 0: the distance lies in U+1..A; no
//     register is updated (incrementing all of them would not change the
//     shape of the miss curve);
//   * ATD miss: register r(A+1) is incremented.
// S is given in quarters (SCALE_Q = 4, 3, 2 for 1.0, 0.75, 0.5); 0.75 is the
// value the evaluation found best and is the default. Everything here follows
// the NRU profiling description; the quarter encoding of S is this design's.
//
// Combinational. inc[i] is the increment enable of register r(i+1).
module nru_profiler #(
  parameter int unsigned WAYS    = cpa_pkg::DEF_WAYS,
  parameter int unsigned SCALE_Q = cpa_pkg::DEF_SCALE_Q,
  localparam int unsigned WW     = $clog2(WAYS)
) (
  input  logic            valid,    // an access to this ATD set
  input  logic            hit,      // it hits in the ATD
  input  logic [WW-1:0]   hit_way,  // way that hits
  input  logic [WAYS-1:0] used,     // used bits before the access
  output logic [WW:0]     est_dist,     // estimated distance (1..A, A+1 = miss, 0 = none)
  output logic [WAYS:0]   inc       // eSDH increments, r1..r(A+1)
);

  always_comb begin
    int unsigned u, d;
    u = 0;
    for (int unsigned i = 0; i < WAYS; i++) u += int'(used[i]);
    d = (u * SCALE_Q + 3) / 4;           // ceil(S * U)
    if (d == 0) d = 1;
    if (d > WAYS) d = WAYS;
    inc  = '0;
    est_dist = '0;
    if (valid) begin
      if (!hit) begin
        inc[WAYS] = 1'b1;
        est_dist      = (WW+1)'(WAYS + 1);
      end else if (used[hit_way]) begin
        for (int unsigned i = 0; i < WAYS; i++) inc[i] = (i < d);
        est_dist = (WW+1)'(d);
      end else begin
        est_dist = (WW+1)'(WAYS);            // estimated as A, no update
      end
    end
  end

endmodule
