// nru_repl: replacement and partition enforcement logic of one set under the
// Not Recently Used (NRU) policy.
//
// Every line has a used bit that is set when the line is accessed (hit or
// fill). A single replacement pointer, shared by all sets, gives the first way
// considered on a miss. Candidates are the ways the requesting core may
// replace (its global replacement mask) whose used bit is clear; the search
// starts at the pointer and moves forward one way at a time, wrapping round.
// After a miss the pointer moves forward by one way. After every access, if
// the used bits of all the requesting core's ways are set, every used bit of
// the set is cleared except that of the accessed line. With a mask of all
// ones this is the plain, unpartitioned NRU scheme.
//
// All of the above follows the NRU and partitioned-NRU description. Two
// corner cases are this design's choice: when no owned way has a clear used
// bit, the first owned way from the pointer is replaced; with an empty mask
// the way under the pointer is replaced.
//
// Purely combinational: the caller holds the used bits and the pointer and
// registers used_next / ptr_next when the access is performed.
module nru_repl #(
  parameter int unsigned WAYS = cpa_pkg::DEF_WAYS,
  localparam int unsigned WW  = $clog2(WAYS)
) (
  input  logic [WAYS-1:0] used,      // used bits of the set before the access
  input  logic [WAYS-1:0] mask,      // ways the requesting core may replace
  input  logic [WW-1:0]   ptr,       // shared replacement pointer
  input  logic            hit,       // the access hits
  input  logic [WW-1:0]   hit_way,   // way that hits (when hit)
  output logic [WW-1:0]   victim,    // way replaced on a miss
  output logic [WW-1:0]   way,       // way accessed: hit_way or victim
  output logic [WAYS-1:0] used_next, // used bits after the access
  output logic [WW-1:0]   ptr_next   // pointer after the access
);

  always_comb begin
    logic found_clear, found_owned;
    logic [WW-1:0] cand, first_clear, first_owned;
    found_clear = 1'b0;
    found_owned = 1'b0;
    first_clear = ptr;
    first_owned = ptr;
    for (int unsigned i = 0; i < WAYS; i++) begin
      cand = WW'(ptr + WW'(i));
      if (mask[cand] && !found_owned) begin
        found_owned = 1'b1;
        first_owned = cand;
      end
      if (mask[cand] && !used[cand] && !found_clear) begin
        found_clear = 1'b1;
        first_clear = cand;
      end
    end
    victim = found_clear ? first_clear : first_owned;
  end

  assign way      = hit ? hit_way : victim;
  assign ptr_next = hit ? ptr : WW'(ptr + 1'b1);

  always_comb begin
    logic [WAYS-1:0] set_bit;
    set_bit   = WAYS'(1) << way;
    used_next = used | set_bit;
    if ((used_next & mask) == mask) used_next = set_bit;
  end

endmodule
