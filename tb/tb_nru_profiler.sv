// tb_nru_profiler: self-checking test of the NRU stack distance estimator.
// Checks the used-bit examples (C,D,D gives U=2 and increments r1,r2; A,B,C
// gives no update; a miss increments r5), the scaling examples (S=0.5 with
// U=8 gives 4, with U=7 gives 4) and random cases for S = 1.0, 0.75, 0.5.
module tb_nru_profiler;
  int checks = 0, failures = 0;

  logic v4, h4; logic [1:0] hw4; logic [3:0] u4; logic [2:0] d4; logic [4:0] i4;
  nru_profiler #(.WAYS(4), .SCALE_Q(4)) dut4 (.valid(v4), .hit(h4), .hit_way(hw4),
    .used(u4), .est_dist(d4), .inc(i4));

  logic v, h; logic [3:0] hw; logic [15:0] u;
  logic [4:0] d10, d075, d05; logic [16:0] i10, i075, i05;
  nru_profiler #(.WAYS(16), .SCALE_Q(4)) dut10 (.valid(v), .hit(h), .hit_way(hw), .used(u), .est_dist(d10), .inc(i10));
  nru_profiler #(.WAYS(16), .SCALE_Q(3)) dut075 (.valid(v), .hit(h), .hit_way(hw), .used(u), .est_dist(d075), .inc(i075));
  nru_profiler #(.WAYS(16), .SCALE_Q(2)) dut05 (.valid(v), .hit(h), .hit_way(hw), .used(u), .est_dist(d05), .inc(i05));

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int ref_d(int uu, real s);
    int d;
    d = int'($ceil(s * uu));
    if (d < 1) d = 1;
    return d;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v4 = 1; h4 = 1; hw4 = 3; u4 = 4'b1100; #1;      // C,D then D
    chk("CDD dist", d4, 2); chk("CDD inc", i4, 5'b00011);
    hw4 = 2; u4 = 4'b0011; #1;                       // A,B then C
    chk("ABC dist", d4, 4); chk("ABC inc", i4, 0);
    h4 = 0; #1;
    chk("miss dist", d4, 5); chk("miss inc", i4, 5'b10000);
    v4 = 0; h4 = 1; #1;
    chk("idle inc", i4, 0);

    v = 1; h = 1; hw = 0; u = 16'h00FF; #1;          // U = 8
    chk("S0.5 U8", d05, 4);
    u = 16'h007F; #1;                                // U = 7
    chk("S0.5 U7", d05, 4);
    chk("S0.75 U7", d075, 6);
    chk("S1.0 U7", d10, 7);

    for (int t = 0; t < 5000; t++) begin
      int uu; logic [16:0] e;
      v = 1; h = ($urandom % 4) != 0; hw = 4'($urandom); u = 16'($urandom);
      if (t % 5 == 0) u = u & 16'($urandom);
      #1;
      uu = $countones(u);
      if (!h) begin
        chk("r miss", i075, 17'h10000); chk("r miss d", d075, 17);
      end else if (!u[hw]) begin
        chk("r clear", i10 | i075 | i05, 0);
      end else begin
        chk("r d10", d10, ref_d(uu, 1.0));
        chk("r d075", d075, ref_d(uu, 0.75));
        chk("r d05", d05, ref_d(uu, 0.5));
        e = '0; for (int i = 0; i < ref_d(uu, 0.75); i++) e[i] = 1'b1;
        chk("r inc075", i075, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
