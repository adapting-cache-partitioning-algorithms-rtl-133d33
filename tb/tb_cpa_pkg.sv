// tb_cpa_pkg: self-checking test of the shared package. The tree node
// numbering must match the 4-way enforcement example (node 0 joins A/B,
// node 1 joins C/D, node 2 is the root) and number a 16-way tree leaf level
// first (0..7), root last (14); the default geometry must describe a 2 MB
// cache of 128-byte lines with 47-bit tags in a 64-bit address space.
module tb_cpa_pkg;
  import cpa_pkg::*;
  int checks = 0, failures = 0;

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [15];
    chk("4-way A/B node", bt_node(4, 1, 0), 0);
    chk("4-way C/D node", bt_node(4, 1, 1), 1);
    chk("4-way root", bt_node(4, 0, 0), 2);
    chk("16-way root", bt_node(16, 0, 0), 14);
    chk("16-way first leaf-level node", bt_node(16, 3, 0), 0);
    chk("16-way last leaf-level node", bt_node(16, 3, 7), 7);
    chk("16-way level 2", bt_node(16, 2, 0), 8);
    chk("16-way level 1", bt_node(16, 1, 1), 13);
    // every node number used exactly once
    foreach (seen[i]) seen[i] = 0;
    for (int l = 0; l < 4; l++)
      for (int p = 0; p < (1 << l); p++) begin
        chk("node in range", bt_node(16, l, p) < 15, 1);
        chk("node unique", seen[bt_node(16, l, p)], 0);
        seen[bt_node(16, l, p)] = 1;
      end
    chk("capacity 2MB", longint'(DEF_SETS) * DEF_WAYS * DEF_LINE_B, 2 * 1024 * 1024);
    chk("tag bits", DEF_ADDR_W - $clog2(DEF_LINE_B) - $clog2(DEF_SETS), 47);
    chk("ATD sets", DEF_SETS / DEF_SAMPLE, 32);
    chk("interval", DEF_INTERVAL, 1_000_000);
    chk("scaling 0.75", DEF_SCALE_Q, 3);
    chk("cores", DEF_CORES, 2);
    chk("policy encodings differ", POL_NRU != POL_BT, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
