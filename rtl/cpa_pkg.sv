// cpa_pkg: shared constants, types and helper functions of the pseudo-LRU
// cache partitioning system.
//
// The default geometry is the evaluated baseline: a shared 2 MB, 16-way L2
// with 128-byte lines in a 64-bit machine (1024 sets, 7 offset bits, 10 index
// bits, 47 tag bits), two cores, ATD set sampling of 1 in 32 sets and a
// 1,000,000-cycle repartitioning interval. The SDH counter width is a choice
// of this design.
//
// The binary tree (BT) of an A-way set has A-1 node bits. Nodes are numbered
// from the leaf level up to the root, left to right within a level, so that
// in a 4-way set node 0 joins ways 0/1, node 1 joins ways 2/3 and node 2 is
// the root. A node bit of 0 means the pseudo-LRU line is in the upper
// sub-tree (lower way numbers), 1 the lower sub-tree.
package cpa_pkg;

  // Replacement policy of one partitioning system.
  typedef enum logic [0:0] {
    POL_NRU = 1'b0,  // not recently used: used bits + shared replacement pointer
    POL_BT  = 1'b1   // binary tree pseudo-LRU
  } policy_e;

  localparam int unsigned DEF_WAYS      = 16;         // L2 associativity A
  localparam int unsigned DEF_CORES     = 2;          // cores sharing the L2
  localparam int unsigned DEF_SETS      = 1024;       // 2 MB / (16 x 128 B)
  localparam int unsigned DEF_ADDR_W    = 64;         // 64-bit architecture
  localparam int unsigned DEF_LINE_B    = 128;        // line size in bytes
  localparam int unsigned DEF_SAMPLE    = 32;         // ATD samples 1 set in 32
  localparam int unsigned DEF_INTERVAL  = 1_000_000;  // cycles per interval
  localparam int unsigned DEF_CNT_W     = 24;         // SDH counter width
  // NRU eSDH scaling factor S in quarters: 4 = 1.0, 3 = 0.75, 2 = 0.5.
  localparam int unsigned DEF_SCALE_Q   = 3;

  // Index of the tree node at level `lvl` (0 = root) and position `pos`
  // within that level, in an A-way tree (A a power of two).
  function automatic int unsigned bt_node(int unsigned ways, int unsigned lvl,
                                          int unsigned pos);
    return (ways - (2 << lvl)) + pos;
  endfunction

endpackage
