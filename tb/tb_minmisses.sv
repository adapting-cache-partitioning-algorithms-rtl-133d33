// tb_minmisses: self-checking test of MinMisses partition selection.
// A 3-core, 16-way instance gets random SDHs; its partition must give every
// core at least one way, use all 16 ways and reach the minimum total of
// predicted misses found here by exhaustive search. It must finish within the
// cycle budget of the dynamic programme (225 steps plus a few control
// cycles). A 2-core instance checks directed cases: a streaming thread next
// to a thread that reuses 12 ways gets a single way, and the reset split.
module tb_minmisses;
  localparam int W = 16, CW = 12;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic start3, start2;
  logic [2:0][W:0][CW-1:0] sdh3; logic [1:0][W:0][CW-1:0] sdh2;
  logic busy3, done3, busy2, done2;
  logic [2:0][4:0] ways3; logic [1:0][4:0] ways2;
  logic [2:0][W:0][CW-1:0] sv3;   // copy of the SDHs given at start

  minmisses #(.WAYS(W), .CORES(3), .CNT_W(CW)) u3 (.clk(clk), .rst_n(rst_n),
    .start(start3), .sdh_cnt(sdh3), .busy(busy3), .done(done3), .ways(ways3));
  minmisses #(.WAYS(W), .CORES(2), .CNT_W(CW)) u2 (.clk(clk), .rst_n(rst_n),
    .start(start2), .sdh_cnt(sdh2), .busy(busy2), .done(done2), .ways(ways2));

  always #5 clk = ~clk;

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int m3(int c, int k);
    int s; s = 0;
    for (int i = k; i <= W; i++) s += int'(sv3[c][i]);
    return s;
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start3 = 0; start2 = 0; sdh3 = '0; sdh2 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk("reset split 3 a", ways3[0], 5); chk("reset split 3 c", ways3[2], 6);
    chk("reset split 2", ways2[0], 8);

    // directed, 2 cores
    for (int i = 0; i < 12; i++) sdh2[0][i] = 12'd200;
    sdh2[0][W] = 12'd10;
    sdh2[1][W] = 12'd900;
    start2 = 1; @(posedge clk); #1 start2 = 0;
    while (!done2) begin @(posedge clk); #1; end
    chk("stream gets 1 way", ways2[1], 1);
    chk("reuse gets 15", ways2[0], 15);

    for (int t = 0; t < 200; t++) begin
      int best, got, cyc;
      for (int c = 0; c < 3; c++)
        for (int i = 0; i <= W; i++)
          sdh3[c][i] = ($urandom % 3 == 0) ? CW'($urandom % 4000) : CW'($urandom % 50);
      sv3 = sdh3;
      best = 1 << 30;
      for (int a = 1; a <= W - 2; a++)
        for (int b = 1; a + b <= W - 1; b++)
          if (m3(0, a) + m3(1, b) + m3(2, W - a - b) < best)
            best = m3(0, a) + m3(1, b) + m3(2, W - a - b);
      start3 = 1; @(posedge clk); #1 start3 = 0;
      sdh3 = '1;                                 // must have been captured
      cyc = 1;
      while (!done3 && cyc < 1000) begin @(posedge clk); #1; cyc++; end
      checks++;
      if (cyc > 235) begin failures++; $display("FAIL too slow: %0d cycles", cyc); end
      got = m3(0, int'(ways3[0])) + m3(1, int'(ways3[1])) + m3(2, int'(ways3[2]));
      chk("minimum misses", got, best);
      chk("sum of ways", int'(ways3[0]) + int'(ways3[1]) + int'(ways3[2]), W);
      checks++;
      if (ways3[0] < 1 || ways3[1] < 1 || ways3[2] < 1) begin
        failures++; $display("FAIL core without a way");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
