// tb_tag_dir: self-checking test of the shared tag directory under NRU and BT
// (8 ways, 4 sets, 3-bit tags so that hits and evictions are frequent, 2
// cores). The partition changes every 300 accesses; random accesses from both
// cores are checked against a reference model kept here (tags, valid bits,
// used bits and pointer, heap-ordered tree bits), response by response. Every
// filled way must belong to the requesting core.
module tb_tag_dir;
  import cpa_pkg::*;
  localparam int W = 8, S = 4, TW = 3, N = 2;
  int checks = 0, failures = 0;
  int n_hits = 0, n_miss = 0, n_evict = 0;

  logic clk = 0, rst_n = 0;
  logic req_valid; logic req_core; logic [1:0] req_set; logic [TW-1:0] req_tag;
  logic [N-1:0][W-1:0] masks; logic [N-1:0][W-2:0] ups, downs;
  logic nv, nh, ne, bv, bh, be; logic [2:0] nw, bw; logic nc, bc;
  logic [TW-1:0] net, bet;

  tag_dir #(.POLICY(POL_NRU), .WAYS(W), .SETS(S), .TAG_W(TW), .CORES(N)) u_nru (
    .clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_core(req_core),
    .req_set(req_set), .req_tag(req_tag), .masks(masks), .ups(ups), .downs(downs),
    .look_hit(), .look_way(), .look_used(), .look_bt(),
    .resp_valid(nv), .resp_core(nc), .resp_hit(nh), .resp_way(nw),
    .resp_evict(ne), .resp_evict_tag(net));
  tag_dir #(.POLICY(POL_BT), .WAYS(W), .SETS(S), .TAG_W(TW), .CORES(N)) u_bt (
    .clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_core(req_core),
    .req_set(req_set), .req_tag(req_tag), .masks(masks), .ups(ups), .downs(downs),
    .look_hit(), .look_way(), .look_used(), .look_bt(),
    .resp_valid(bv), .resp_core(bc), .resp_hit(bh), .resp_way(bw),
    .resp_evict(be), .resp_evict_tag(bet));

  always #5 clk = ~clk;

  // reference state: [0] NRU, [1] BT
  int rtag [2][S][W]; bit rval [2][S][W];
  bit rused [S][W]; int rptr;
  bit rbt [S][16];                       // heap order, root = 1
  bit hup [N][16], hdn [N][16];

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // heap node -> leaf-first node number (8 ways: levels 0..2)
  function automatic int fidx(int hh);
    int lvl; lvl = $clog2(hh + 1) - 1;
    return (W - (2 << lvl)) + (hh - (1 << lvl));
  endfunction

  task automatic set_partition(input int w0);
    for (int c = 0; c < N; c++)
      for (int i = 0; i < W; i++) masks[c][i] = (c == 0) ? (i < w0) : (i >= w0);
    // up/down per heap node from the masks
    for (int c = 0; c < N; c++) begin
      for (int hh = 1; hh < W; hh++) begin
        int lvl, span, lo; bit au, ad;
        lvl = $clog2(hh + 1) - 1; span = W >> lvl; lo = (hh - (1 << lvl)) * span;
        au = 0; ad = 0;
        for (int i = 0; i < span / 2; i++) begin
          au |= masks[c][lo + i]; ad |= masks[c][lo + span / 2 + i];
        end
        hup[c][hh] = au && !ad; hdn[c][hh] = ad && !au;
        ups[c][fidx(hh)] = hup[c][hh]; downs[c][fidx(hh)] = hdn[c][hh];
      end
    end
  endtask

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_valid = 0; req_core = 0; req_set = 0; req_tag = 0;
    set_partition(4);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    rptr = 0;
    for (int s = 0; s < S; s++) for (int i = 0; i < W; i++) begin
      rval[0][s][i] = 0; rval[1][s][i] = 0; rused[s][i] = 0;
    end
    for (int s = 0; s < S; s++) for (int hh = 0; hh < 16; hh++) rbt[s][hh] = 0;

    for (int t = 0; t < 6000; t++) begin
      int c, s, tg;
      int ehit [2], eway [2], eev [2], eevt [2];
      if (t % 300 == 299) set_partition(1 + $urandom % (W - 1));
      c = $urandom % N; s = $urandom % S; tg = $urandom % 8;
      req_valid = 1; req_core = 1'(c); req_set = 2'(s); req_tag = TW'(tg);
      // reference, both policies
      for (int p = 0; p < 2; p++) begin
        ehit[p] = 0; eway[p] = 0;
        for (int i = W - 1; i >= 0; i--)
          if (rval[p][s][i] && rtag[p][s][i] == tg) begin ehit[p] = 1; eway[p] = i; end
        if (!ehit[p]) begin
          if (p == 0) begin
            int f; f = 0;
            for (int i = 0; i < W && !f; i++)
              if (masks[c][(rptr + i) % W] && !rused[s][(rptr + i) % W]) begin f = 1; eway[0] = (rptr + i) % W; end
            for (int i = 0; i < W && !f; i++)
              if (masks[c][(rptr + i) % W]) begin f = 1; eway[0] = (rptr + i) % W; end
            rptr = (rptr + 1) % W;
          end else begin
            int hh; bit d; hh = 1;
            while (hh < W) begin
              d = hup[c][hh] ? 0 : hdn[c][hh] ? 1 : rbt[s][hh];
              hh = 2 * hh + d;
            end
            eway[1] = hh - W;
          end
          eev[p] = rval[p][s][eway[p]]; eevt[p] = rtag[p][s][eway[p]];
          rtag[p][s][eway[p]] = tg; rval[p][s][eway[p]] = 1;
        end else begin
          eev[p] = 0; eevt[p] = 0;
        end
      end
      // replacement state update
      begin
        bit all; int hh;
        rused[s][eway[0]] = 1; all = 1;
        for (int i = 0; i < W; i++) if (masks[c][i] && !rused[s][i]) all = 0;
        if (all) for (int i = 0; i < W; i++) rused[s][i] = (i == eway[0]);
        hh = 1;
        for (int l = 2; l >= 0; l--) begin
          bit d; d = eway[1][l];
          rbt[s][hh] = !d; hh = 2 * hh + d;
        end
      end
      @(posedge clk); #1;
      req_valid = 0;
      chk("nru valid", nv, 1); chk("bt valid", bv, 1);
      chk("nru core", nc, c); chk("bt core", bc, c);
      chk("nru hit", nh, ehit[0]); chk("bt hit", bh, ehit[1]);
      chk("nru way", nw, eway[0]); chk("bt way", bw, eway[1]);
      chk("nru evict", ne, eev[0]); chk("bt evict", be, eev[1]);
      if (eev[0]) chk("nru evict tag", net, eevt[0]);
      if (eev[1]) chk("bt evict tag", bet, eevt[1]);
      if (!ehit[0]) chk("nru fill owned", masks[c][nw], 1);
      if (!ehit[1]) chk("bt fill owned", masks[c][bw], 1);
      n_hits += ehit[0] + ehit[1]; n_miss += 2 - ehit[0] - ehit[1]; n_evict += eev[0] + eev[1];
      if (t % 3 == 0) begin @(posedge clk); #1; chk("idle resp", nv | bv, 0); end
    end
    $display("hits=%0d misses=%0d evictions=%0d", n_hits, n_miss, n_evict);
    if (n_hits == 0 || n_evict == 0) begin failures++; $display("FAIL no hits or evictions"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
