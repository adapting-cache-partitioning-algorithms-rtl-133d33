// bt_profiler: stack position estimation for an ATD that uses the binary tree
// pseudo-LRU policy.
//
// The identifier (ID) bits of a way are the tree bits that would make that
// way the pseudo-LRU line. They come from the way number through a fixed
// decoder that reverses the bit order (4 ways: ID0 = W1, ID1 = W0, W0 being
// the most significant bit of the way number), so ID bit k pairs with the
// tree node at level log2(A)-1-k on the way's path (level 0 = root). The ID
// bits are XORed bit-wise with the actual path bits, the XOR result is read
// as a binary number with ID0's column as its most significant bit, and it is
// subtracted from the associativity A. The difference, 1..A, is the
// estimated stack position: all path bits pointing at the way give A (LRU),
// none give 1 (MRU). A hit at position p increments eSDH register rp; an ATD
// miss increments r(A+1).
//
// The decoder, the XOR, the subtraction and the bit weighting follow the
// worked example of the BT profiling figure, generalised to any power-of-two
// associativity. Combinational.
module bt_profiler #(
  parameter int unsigned WAYS = cpa_pkg::DEF_WAYS,
  localparam int unsigned WW  = $clog2(WAYS)
) (
  input  logic            valid,    // an access to this ATD set
  input  logic            hit,      // it hits in the ATD
  input  logic [WW-1:0]   hit_way,  // way that hits
  input  logic [WAYS-2:0] bt,       // tree bits before the access
  output logic [WW:0]     est_dist,     // estimated position (1..A, A+1 = miss, 0 = none)
  output logic [WAYS:0]   inc       // eSDH increments, r1..r(A+1)
);
  import cpa_pkg::bt_node;

  logic [WW-1:0] id;    // ID bits, id[k] = IDk
  logic [WW-1:0] path;  // path[k]: tree bit paired with IDk
  logic [WW-1:0] x;     // XOR read as a number, ID0 column most significant

  // ID decoder: IDk is way-number bit k counted from the least significant.
  always_comb
    for (int unsigned k = 0; k < WW; k++) id[k] = hit_way[k];

  always_comb begin
    int unsigned lvl;
    for (int unsigned k = 0; k < WW; k++) begin
      lvl     = WW - 1 - k;
      path[k] = bt[bt_node(WAYS, lvl, int'(hit_way) >> (WW - lvl))];
    end
    for (int unsigned k = 0; k < WW; k++) x[WW-1-k] = id[k] ^ path[k];
  end

  always_comb begin
    inc  = '0;
    est_dist = '0;
    if (valid) begin
      if (hit) est_dist = (WW+1)'(WAYS) - (WW+1)'(x);
      else     est_dist = (WW+1)'(WAYS + 1);
      inc[est_dist - 1'b1] = 1'b1;
    end
  end

endmodule
