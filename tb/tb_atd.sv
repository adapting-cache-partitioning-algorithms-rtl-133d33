// tb_atd: self-checking test of the auxiliary tag directory with NRU and with
// BT replacement (4 ways, 64 L2 sets sampled 1 in 32, so 2 ATD sets).
// Lines A..D fill the set, then C, D, D are accessed as in the used-bit and
// tree examples; expected distances are worked out by hand from the policy
// rules: NRU (S = 1.0) gives no update for C (used bit 0) and r1,r2 for each
// D (U = 2); BT gives positions 2, 2, 1, the true LRU positions here. A new
// line E then replaces A under both policies, and accesses to unsampled sets
// must not touch the ATD.
module tb_atd;
  import cpa_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic acc_valid; logic [5:0] acc_set; logic [7:0] acc_tag;
  logic ns, nh, bs, bh; logic [2:0] nd, bd; logic [4:0] ni, bi;

  atd #(.POLICY(POL_NRU), .WAYS(4), .SETS(64), .SAMPLE(32), .TAG_W(8), .SCALE_Q(4)) u_nru (
    .clk(clk), .rst_n(rst_n), .acc_valid(acc_valid), .acc_set(acc_set), .acc_tag(acc_tag),
    .sampled(ns), .hit(nh), .est_dist(nd), .inc(ni));
  atd #(.POLICY(POL_BT), .WAYS(4), .SETS(64), .SAMPLE(32), .TAG_W(8), .SCALE_Q(4)) u_bt (
    .clk(clk), .rst_n(rst_n), .acc_valid(acc_valid), .acc_set(acc_set), .acc_tag(acc_tag),
    .sampled(bs), .hit(bh), .est_dist(bd), .inc(bi));

  always #5 clk = ~clk;

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // one access; expected NRU distance/incs and BT distance
  task automatic access(input int set, input int tag, input int samp,
                        input int n_d, input int n_inc, input int b_d);
    acc_valid = 1; acc_set = 6'(set); acc_tag = 8'(tag);
    #1;
    chk("nru sampled", ns, samp); chk("bt sampled", bs, samp);
    if (samp != 0) begin
      chk("nru dist", nd, n_d); chk("nru inc", ni, n_inc);
      chk("nru hit", nh, int'(n_d != 5));
      chk("bt dist", bd, b_d); chk("bt inc", bi, 1 << (b_d - 1));
      chk("bt hit", bh, int'(b_d != 5));
    end else begin
      chk("nru no inc", ni, 0); chk("bt no inc", bi, 0);
    end
    @(posedge clk); #1;
    acc_valid = 0;
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc_valid = 0; acc_set = 0; acc_tag = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // A=1 B=2 C=3 D=4 fill set 0
    access(0, 1, 1, 5, 5'b10000, 5);
    access(0, 2, 1, 5, 5'b10000, 5);
    access(0, 3, 1, 5, 5'b10000, 5);
    access(0, 4, 1, 5, 5'b10000, 5);
    // unsampled set: no ATD activity
    access(1, 3, 0, 0, 0, 0);
    access(33, 9, 0, 0, 0, 0);
    // C, D, D
    access(0, 3, 1, 4, 5'b00000, 2);
    access(0, 4, 1, 2, 5'b00011, 2);
    access(0, 4, 1, 2, 5'b00011, 1);
    // E replaces A under both policies; A then misses, D still hits
    access(0, 5, 1, 5, 5'b10000, 5);
    access(0, 1, 1, 5, 5'b10000, 5);
    // second ATD set (L2 set 32) is independent
    access(32, 4, 1, 5, 5'b10000, 5);
    access(32, 4, 1, 1, 5'b00001, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
