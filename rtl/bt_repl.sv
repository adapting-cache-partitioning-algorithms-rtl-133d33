// bt_repl: replacement and partition enforcement logic of one set under the
// binary tree (BT) pseudo-LRU policy.
//
// A set of A ways keeps A-1 tree bits. On a miss the victim is found by
// walking from the root to a leaf: at each node the bit says whether the
// pseudo-LRU line lies in the upper (0) or lower (1) sub-tree. Partitioning is
// enforced by two per-core vectors, up and down, with one bit per tree node:
// up=1 forces the walk into the upper sub-tree, down=1 into the lower one, and
// with both 0 the stored bit decides (truth table of the BT enforcement
// figure). On every access, hit or fill, the nodes on the path of the accessed
// way are set to point away from it, making it the MRU line.
//
// Node numbering (leaf level first, root last) and all the rules above follow
// the BT description; up and down are never both 1, which the vector
// generator guarantees and tag_dir asserts for every request.
//
// Purely combinational: the caller stores the tree bits and registers bt_next.
module bt_repl #(
  parameter int unsigned WAYS = cpa_pkg::DEF_WAYS,
  localparam int unsigned WW  = $clog2(WAYS)
) (
  input  logic [WAYS-2:0] bt,       // tree bits of the set before the access
  input  logic [WAYS-2:0] up,       // force-upper vector of the requesting core
  input  logic [WAYS-2:0] down,     // force-lower vector of the requesting core
  input  logic            hit,      // the access hits
  input  logic [WW-1:0]   hit_way,  // way that hits (when hit)
  output logic [WW-1:0]   victim,   // way replaced on a miss
  output logic [WW-1:0]   way,      // way accessed: hit_way or victim
  output logic [WAYS-2:0] bt_next   // tree bits after the access
);
  import cpa_pkg::bt_node;

  // Victim search, root to leaf.
  always_comb begin
    int unsigned pos, n;
    logic dir;
    pos = 0;
    for (int unsigned lvl = 0; lvl < WW; lvl++) begin
      n = bt_node(WAYS, lvl, pos);
      if (up[n])        dir = 1'b0;  // force up
      else if (down[n]) dir = 1'b1;  // force down
      else              dir = bt[n]; // normal
      pos = 2 * pos + int'(dir);
    end
    victim = WW'(pos);
  end

  assign way = hit ? hit_way : victim;

  // Promotion to MRU: each node on the path points away from `way`.
  always_comb begin
    int unsigned n;
    bt_next = bt;
    for (int unsigned lvl = 0; lvl < WW; lvl++) begin
      n = bt_node(WAYS, lvl, int'(way) >> (WW - lvl));
      bt_next[n] = ~way[WW-1-lvl];
    end
  end

endmodule
