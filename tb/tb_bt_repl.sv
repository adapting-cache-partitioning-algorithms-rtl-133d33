// tb_bt_repl: self-checking test of the binary tree replacement / enforcement
// logic. Directed cases reproduce the 4-way tree example (victim A, then all
// path bits set to 1) and the up/down truth table; random 16-way cases compare
// with a reference that walks a heap-ordered tree and maps it to the
// leaf-first node numbering.
module tb_bt_repl;
  int checks = 0, failures = 0;

  logic [2:0] b4, up4, dn4, bn4; logic [1:0] hw4, v4, w4o; logic h4;
  bt_repl #(.WAYS(4)) dut4 (.bt(b4), .up(up4), .down(dn4), .hit(h4), .hit_way(hw4),
    .victim(v4), .way(w4o), .bt_next(bn4));

  logic [14:0] b, up, dn, bn; logic [3:0] hw, v, wo; logic h;
  bt_repl #(.WAYS(16)) dut (.bt(b), .up(up), .down(dn), .hit(h), .hit_way(hw),
    .victim(v), .way(wo), .bt_next(bn));

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // node index of heap node hh (root 1) in a 16-way tree, leaf level first
  function automatic int fig_idx(int hh);
    int lvl, pos, base;
    lvl = $clog2(hh + 1) - 1;
    pos = hh - (1 << lvl);
    base = 0;
    for (int l = 3; l > lvl; l--) base += (1 << l);
    return base + pos;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Tree example: node0 (A/B)=0, node1 (C/D)=1, root node2=0 -> victim A
    b4 = 3'b010; up4 = 0; dn4 = 0; h4 = 0; hw4 = 0; #1;
    chk("victim A", v4, 0);
    chk("after replacing A", bn4, 3'b111);
    // hit on C (way 2): root -> 0 (MRU lower), node1 -> 1 (points to D)
    b4 = 3'b111; h4 = 1; hw4 = 2; #1;
    chk("promote C", bn4, 3'b011);
    // truth table, root node 2, stored bit 0 and 1
    h4 = 0;
    b4 = 3'b000; up4 = 3'b000; dn4 = 3'b000; #1; chk("normal up", v4[1], 0);
    b4 = 3'b100; #1; chk("normal down", v4[1], 1);
    b4 = 3'b000; dn4 = 3'b100; #1; chk("force down bt0", v4[1], 1);
    b4 = 3'b100; #1; chk("force down bt1", v4[1], 1);
    b4 = 3'b000; dn4 = 0; up4 = 3'b100; #1; chk("force up bt0", v4[1], 0);
    b4 = 3'b100; #1; chk("force up bt1", v4[1], 0);
    // core 0 owns A,B: up(2)=1; core 1 owns C,D: down(2)=1
    for (int x = 0; x < 8; x++) begin
      b4 = 3'(x); up4 = 3'b100; dn4 = 0; #1; chk("core0 in A/B", v4[1], 0);
      up4 = 0; dn4 = 3'b100; #1; chk("core1 in C/D", v4[1], 1);
    end

    for (int t = 0; t < 20000; t++) begin
      int hh, rv, rw; logic [14:0] rb; logic d;
      b = 15'($urandom); up = 15'($urandom); dn = 15'($urandom) & ~up;
      if (t % 3 == 0) begin up = 0; dn = 0; end
      h = 1'($urandom); hw = 4'($urandom); #1;
      hh = 1;
      for (int l = 0; l < 4; l++) begin
        int n; n = fig_idx(hh);
        d = up[n] ? 1'b0 : dn[n] ? 1'b1 : b[n];
        hh = 2 * hh + int'(d);
      end
      rv = hh - 16;
      rw = h ? int'(hw) : rv;
      rb = b; hh = 1;
      for (int l = 0; l < 4; l++) begin
        d = rw[3 - l];
        rb[fig_idx(hh)] = ~d;
        hh = 2 * hh + int'(d);
      end
      chk("rand victim", v, rv);
      chk("rand way", wo, rw);
      chk("rand bt_next", bn, rb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
