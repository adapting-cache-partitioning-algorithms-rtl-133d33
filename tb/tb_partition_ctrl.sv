// tb_partition_ctrl: self-checking test of interval timing and of the
// partition registers (8 ways, 2 cores, 50-cycle intervals). Checks that the
// boundary pulse comes exactly every 50 cycles, that a new partition is loaded
// after each boundary within the MinMisses budget, that the masks are
// contiguous runs matching the way counts, and that for every possible tree
// state the up/down vectors steer each core's victim walk into its own ways,
// with up and down never both set.
module tb_partition_ctrl;
  localparam int W = 8, N = 2, CW = 8, IV = 50;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [N-1:0][W:0][CW-1:0] sdh;
  logic boundary, repart;
  logic [N-1:0][3:0] ways; logic [N-1:0][W-1:0] masks; logic [N-1:0][W-2:0] ups, downs;

  partition_ctrl #(.WAYS(W), .CORES(N), .CNT_W(CW), .INTERVAL(IV)) dut (
    .clk(clk), .rst_n(rst_n), .sdh_cnt(sdh), .boundary(boundary), .repartition(repart),
    .ways(ways), .masks(masks), .ups(ups), .downs(downs));

  always #5 clk = ~clk;

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // victim walk with leaf-first node numbering
  function automatic int walk(int c, logic [W-2:0] bt);
    int pos, n; bit d;
    pos = 0;
    for (int l = 0; l < 3; l++) begin
      n = (W - (2 << l)) + pos;
      d = ups[c][n] ? 0 : downs[c][n] ? 1 : bt[n];
      pos = 2 * pos + d;
    end
    return pos;
  endfunction

  task automatic check_regs(input int w0);
    chk("ways0", ways[0], w0); chk("ways1", ways[1], W - w0);
    for (int i = 0; i < W; i++) begin
      chk("mask0", masks[0][i], int'(i < w0));
      chk("mask1", masks[1][i], int'(i >= w0));
    end
    for (int c = 0; c < N; c++) begin
      chk("up&down", ups[c] & downs[c], 0);
      for (int b = 0; b < (1 << (W - 1)); b++)
        chk("walk owned", masks[c][walk(c, (W-1)'(b))], 1);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int last_b, nb, nrep;
  initial begin
    sdh = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    check_regs(4);                         // reset split
    // core 0 reuses 5 ways, core 1 streams
    for (int i = 0; i < 5; i++) sdh[0][i] = 8'd100;
    sdh[1][W] = 8'd200;
    last_b = -1; nb = 0; nrep = 0;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(posedge clk); #1;
      if (boundary) begin
        if (last_b >= 0) chk("interval length", cyc - last_b, IV);
        last_b = cyc; nb++;
      end
      if (repart) begin
        nrep++;
        checks++;
        if (cyc - last_b > 40) begin failures++; $display("FAIL late repartition"); end
        @(posedge clk); #1; cyc++;
        if (nrep == 1) check_regs(7);
        if (nrep == 2) begin
          // swap the roles for the following interval
          sdh = '0;
          for (int i = 0; i < 3; i++) sdh[1][i] = 8'd100;
          sdh[0][W] = 8'd200;
        end
        if (nrep == 3) check_regs(5);          // ties: last core gets the fewest ways
      end
    end
    checks++;
    if (nb < 7 || nrep < 7) begin failures++; $display("FAIL boundaries %0d repartitions %0d", nb, nrep); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
