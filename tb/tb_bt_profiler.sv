// tb_bt_profiler: self-checking test of the BT stack position estimator.
// The 4-way example (tree bits: A/B node 0, C/D node 1, root 0) must give
// D -> 3 (ID 11 XOR path 10, 4 - 1), and A -> 4, B -> 2, C -> 1; the second
// stack of the limitation example must give the same estimates. A 4-way
// all-patterns table and random 16-way cases compare with a reference that
// counts mismatching path bits with the leaf-level bit weighted highest.
module tb_bt_profiler;
  int checks = 0, failures = 0;

  logic v4, h4; logic [1:0] hw4; logic [2:0] b4; logic [2:0] d4; logic [4:0] i4;
  bt_profiler #(.WAYS(4)) dut4 (.valid(v4), .hit(h4), .hit_way(hw4), .bt(b4),
    .est_dist(d4), .inc(i4));

  logic v, h; logic [3:0] hw; logic [14:0] b; logic [4:0] d; logic [16:0] inc;
  bt_profiler #(.WAYS(16)) dut (.valid(v), .hit(h), .hit_way(hw), .bt(b),
    .est_dist(d), .inc(inc));

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v4 = 1; h4 = 1;
    b4 = 3'b010;   // {root=0, CD node=1, AB node=0}
    hw4 = 3; #1; chk("D", d4, 3); chk("D inc", i4, 5'b00100);
    hw4 = 0; #1; chk("A", d4, 4);
    hw4 = 1; #1; chk("B", d4, 2);
    hw4 = 2; #1; chk("C", d4, 1);
    h4 = 0; #1; chk("miss", d4, 5); chk("miss inc", i4, 5'b10000);
    v4 = 0; #1; chk("idle", i4, 0);

    for (int t = 0; t < 20000; t++) begin
      int x, wv, lvl, base, pos, n, m;
      v = 1; h = ($urandom % 5) != 0; hw = 4'($urandom); b = 15'($urandom); #1;
      if (!h) begin
        chk("r miss", d, 17);
        chk("r miss inc", inc, 17'h10000);
      end else begin
        wv = int'(hw); x = 0;
        for (lvl = 0; lvl < 4; lvl++) begin
          base = 0;
          for (int l = 3; l > lvl; l--) base += (1 << l);
          pos = wv >> (4 - lvl);
          n = base + pos;
          m = int'(b[n] != hw[3 - lvl]);
          x += m << lvl;
        end
        chk("r pos", d, 16 - x);
        chk("r inc", inc, 17'(1) << (16 - x - 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
