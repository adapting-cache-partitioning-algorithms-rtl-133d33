// tb_nru_repl: self-checking test of the NRU replacement / enforcement logic.
// Directed cases reproduce the used-bit examples (4 ways) and the fallback
// cases; random cases (16 ways) compare every output with a reference model
// written here as a plain rotating scan.
module tb_nru_repl;
  localparam int W4 = 4, W16 = 16;

  int checks = 0, failures = 0;

  // 4-way instance
  logic [3:0] u4, m4, un4; logic [1:0] p4, hw4, v4, w4o, pn4; logic h4;
  nru_repl #(.WAYS(W4)) dut4 (.used(u4), .mask(m4), .ptr(p4), .hit(h4), .hit_way(hw4),
    .victim(v4), .way(w4o), .used_next(un4), .ptr_next(pn4));

  // 16-way instance
  logic [15:0] u, m, un; logic [3:0] p, hw, v, wo, pn; logic h;
  nru_repl #(.WAYS(W16)) dut (.used(u), .mask(m), .ptr(p), .hit(h), .hit_way(hw),
    .victim(v), .way(wo), .used_next(un), .ptr_next(pn));

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
    // used bits A..D = ways 0..3. C then D accessed: used = 1100.
    m4 = 4'b1111; p4 = 0;
    u4 = 4'b0000; h4 = 1; hw4 = 2; #1;            // access C
    chk("C used_next", un4, 4'b0100);
    u4 = un4; hw4 = 3; #1;                         // access D
    chk("D used_next", un4, 4'b1100);
    chk("hit keeps ptr", pn4, 0);
    // miss with ptr 0: first clear used bit from way 0 is way 0
    u4 = 4'b1100; h4 = 0; p4 = 0; #1;
    chk("miss victim", v4, 0);
    chk("miss way", w4o, 0);
    chk("ptr advances", pn4, 1);
    chk("fill sets used", un4, 4'b1101);
    // pointer on a used way: skip forward
    u4 = 4'b0011; p4 = 0; #1;
    chk("skip used", v4, 2);
    // wrap-around
    u4 = 4'b0111; p4 = 3; #1;
    chk("wrap", v4, 3);
    u4 = 4'b1011; p4 = 3; #1;
    chk("wrap2", v4, 2);
    // all other used bits 1: reset except the accessed line
    u4 = 4'b1011; h4 = 0; p4 = 0; #1;
    chk("victim last clear", v4, 2);
    chk("reset others", un4, 4'b0100);
    // partitioned: core owns ways 2,3; pointer at 0 skips non-owned ways
    m4 = 4'b1100; u4 = 4'b0000; p4 = 0; h4 = 0; #1;
    chk("mask skip", v4, 2);
    // owned ways all used after access -> reset all except accessed
    m4 = 4'b1100; u4 = 4'b0101; h4 = 1; hw4 = 3; #1;
    chk("owned full reset", un4, 4'b1000);
    // hit outside the mask is allowed and sets its bit
    m4 = 4'b0011; u4 = 4'b0000; h4 = 1; hw4 = 3; #1;
    chk("hit outside mask", un4, 4'b1000);
    chk("hit way outside mask", w4o, 3);
    // owned ways all used before a miss: first owned way from pointer
    m4 = 4'b0110; u4 = 4'b0110; h4 = 0; p4 = 3; #1;
    chk("fallback owned", v4, 1);

    // random against reference
    for (int t = 0; t < 20000; t++) begin
      int rv, rw; logic [15:0] ru; int found;
      u = 16'($urandom); m = 16'($urandom);
      if (t % 7 == 0) m = '1;
      if (m == 0) m = 16'h0001 << ($urandom % 16);
      p = 4'($urandom); h = 1'($urandom); hw = 4'($urandom);
      #1;
      found = 0; rv = -1;
      for (int i = 0; i < 16 && !found; i++)
        if (m[(p + i) % 16] && !u[(p + i) % 16]) begin found = 1; rv = (p + i) % 16; end
      for (int i = 0; i < 16 && !found; i++)
        if (m[(p + i) % 16]) begin found = 1; rv = (p + i) % 16; end
      rw = h ? int'(hw) : rv;
      ru = u; ru[rw] = 1'b1;
      if ((ru & m) == m) begin ru = '0; ru[rw] = 1'b1; end
      if (!h) chk("rand victim", v, rv);
      chk("rand way", wo, rw);
      chk("rand used", un, ru);
      chk("rand ptr", pn, h ? int'(p) : (int'(p) + 1) % 16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
