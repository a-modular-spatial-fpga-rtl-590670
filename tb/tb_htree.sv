// tb_htree: 16-leaf tree (default size) plus a 5-leaf tree.
// Simple mode, all leaves offering: every update leaving the root reaches
// every leaf exactly log2(16) = 4 cycles later; in steady state every 16
// consecutive broadcasts contain each leaf exactly once (round robin); a
// leaf's ready count equals its broadcast count; no flush.
// Sorted mode: a leaf with a much larger key wins far more than its share;
// the tree is flushed after every BURST broadcasts.
// Random mode: every leaf is broadcast at some point; flushes happen.
// 5-leaf tree: every real leaf is broadcast, no padding leaf ever is.
module tb_htree;
  import sp_pkg::*;
  localparam int N = 16, L = 4, BURST = 4, N5 = 5;
  logic clk = 0, rst_n = 0;
  upd_mode_e mode = UPD_SIMPLE;
  upd_t leaf_up [N], leaf_down [N], bcast, up5 [N5], dn5 [N5], bc5;
  logic leaf_ready [N], rdy5 [N5], flushing, fl5;
  upd_t hist [$];
  int checks = 0, failures = 0;
  int rdy_cnt [N], bc_cnt [N], bc5_cnt [8], nflush;

  htree #(.N_LEAVES(N), .BURST(BURST)) dut (
    .clk, .rst_n, .mode, .leaf_up, .leaf_ready, .leaf_down, .bcast, .flushing);
  htree #(.N_LEAVES(N5), .BURST(BURST)) dut5 (
    .clk, .rst_n, .mode(UPD_SIMPLE), .leaf_up(up5), .leaf_ready(rdy5), .leaf_down(dn5),
    .bcast(bc5), .flushing(fl5));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb for (int i = 0; i < N5; i++) up5[i] = '{valid: 1'b1, id: id_t'(i), pos: '0, key: '0};

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin rdy_cnt[i] <= 0; bc_cnt[i] <= 0; end
      for (int i = 0; i < 8; i++) bc5_cnt[i] <= 0;
      nflush <= 0;
    end else begin
      for (int i = 0; i < N; i++) if (leaf_ready[i]) rdy_cnt[i] <= rdy_cnt[i] + 1;
      if (bcast.valid) bc_cnt[bcast.id] <= bc_cnt[bcast.id] + 1;
      if (bc5.valid) bc5_cnt[bc5.id[2:0]] <= bc5_cnt[bc5.id[2:0]] + 1;
      if (flushing) nflush <= nflush + 1;
    end
  end

  task automatic chk(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s", w); end
  endtask

  task automatic restart(input upd_mode_e m);
    mode = m;
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
  endtask

  initial begin
    bit seen [N];
    int ok, mx, big;
    for (int i = 0; i < N; i++) leaf_up[i] = '{valid: 1'b1, id: id_t'(i), pos: pos_t'(i * 3), key: '0};
    // ---- simple mode ----
    restart(UPD_SIMPLE);
    for (int t = 0; t < 400; t++) begin
      @(posedge clk); #1;
      hist.push_back(bcast);
      if (hist.size() > L + 1) void'(hist.pop_front());
      if (hist.size() == L + 1)
        for (int i = 0; i < N; i++) begin
          checks++;
          if (leaf_down[i] != hist[0]) begin failures++; $display("FAIL leaf %0d latency", i); end
        end
    end
    // fairness over 16-broadcast windows
    hist.delete();
    ok = 1;
    for (int w = 0; w < 10; w++) begin
      for (int i = 0; i < N; i++) seen[i] = 0;
      for (int t = 0; t < N; t++) begin
        @(posedge clk); #1;
        if (!bcast.valid || seen[bcast.id]) ok = 0; else seen[bcast.id] = 1;
      end
    end
    chk(ok == 1, "round robin: each leaf once per 16 broadcasts");
    @(posedge clk); #1;
    for (int i = 0; i < N; i++) begin
      mx = rdy_cnt[i] - bc_cnt[i];
      chk(mx >= 0 && mx <= 1, $sformatf("leaf %0d ready %0d vs broadcast %0d", i, rdy_cnt[i], bc_cnt[i]));
    end
    chk(nflush == 0, "no flush in simple mode");
    for (int i = 0; i < N5; i++) chk(bc5_cnt[i] > 10, $sformatf("5-leaf tree: leaf %0d broadcast", i));
    for (int i = N5; i < 8; i++) chk(bc5_cnt[i] == 0, "5-leaf tree: no padding leaf");
    // ---- sorted mode ----
    big = 9;
    for (int i = 0; i < N; i++) leaf_up[i].key = cost_t'((i == big) ? 50 : (i % 3));
    restart(UPD_SORTED);
    repeat (640) @(posedge clk);
    #1;
    $display("sorted: leaf %0d broadcast %0d of ~%0d, flushes %0d", big, bc_cnt[big], 640, nflush);
    chk(bc_cnt[big] > 3 * (640 / N), "sorted: largest change wins more often");
    chk(nflush > 640 / (BURST + L + 2) / 2, "sorted: tree flushed after bursts");
    // ---- random mode ----
    for (int i = 0; i < N; i++) leaf_up[i].key = '0;
    restart(UPD_RANDOM);
    repeat (2000) @(posedge clk);
    #1;
    for (int i = 0; i < N; i++) chk(bc_cnt[i] > 0, $sformatf("random: leaf %0d broadcast", i));
    chk(nflush > 0, "random: flushes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
