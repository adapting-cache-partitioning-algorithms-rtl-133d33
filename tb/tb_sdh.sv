// tb_sdh: self-checking test of the stack distance histogram.
// Drives random increment vectors and interval boundaries into a 4-way SDH
// with 6-bit counters and compares every counter, every cycle, with a
// reference model (halve first, then add one, saturate at 63). Also checks
// the miss-curve example: r1, r3, r4 incremented once each.
module tb_sdh;
  localparam int W = 4, CW = 6;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [W:0] inc; logic halve;
  logic [W:0][CW-1:0] cnt;
  int ref_c [W+1];

  sdh #(.WAYS(W), .CNT_W(CW)) dut (.clk(clk), .rst_n(rst_n), .inc(inc), .halve(halve), .cnt(cnt));

  always #5 clk = ~clk;

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inc = 0; halve = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i <= W; i++) ref_c[i] = 0;
    // C, D, D example: distances 3, 4, 1
    foreach (ref_c[i]) chk("reset", cnt[i], 0);
    inc = 5'b00100; @(posedge clk); #1;
    inc = 5'b01000; @(posedge clk); #1;
    inc = 5'b00001; @(posedge clk); #1;
    inc = 0;
    chk("r1", cnt[0], 1); chk("r2", cnt[1], 0); chk("r3", cnt[2], 1);
    chk("r4", cnt[3], 1); chk("r5", cnt[4], 0);
    ref_c[0] = 1; ref_c[2] = 1; ref_c[3] = 1;
    for (int t = 0; t < 5000; t++) begin
      inc = (W+1)'($urandom); halve = ($urandom % 40) == 0;
      @(posedge clk); #1;
      for (int i = 0; i <= W; i++) begin
        if (halve) ref_c[i] = ref_c[i] / 2;
        if (inc[i] && ref_c[i] < (1 << CW) - 1) ref_c[i]++;
        chk("cnt", cnt[i], ref_c[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
