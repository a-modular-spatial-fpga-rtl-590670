// tb_updates_per_step: the updates-per-step sweep. Three 4 x 4 placers
// anneal the same scrambled 4 x 4 mesh netlist side by side, with
// stall_cycles = 0, 25 and 75, i.e. 25, 50 and 100 H-tree position updates
// per step without a swap (UpdatesPerStep / N = 1.6, 3.1 and 6.3 for
// N = 16). For each it checks that no step is shorter than 25 + stall
// cycles, that steps of exactly 25 + stall (no swap) and 52 + stall (swap,
// K = 12) cycles occur, as do longer ones (waiting for a partner that is
// still busy with its previous phase), that the H-tree root
// delivers one update in every cycle of the run, that the result is a
// permutation and that the wire length fell; it prints the final wire
// length of each setting.
module tb_updates_per_step;
  import sp_pkg::*;
  localparam int ROWS = 4, COLS = 4, K = 12, N = 16, NI = 3;
  localparam int STALLS [NI] = '{0, 25, 75};

  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0;
  logic [15:0] ld_pe = '0;
  logic ld_we = 1'b0, ld_id_we = 1'b0;
  slot_t ld_addr = '0;
  conn_t ld_data = '0;
  id_t ld_id = '0;
  logic done [NI];
  id_t placement [NI][N];
  upd_t bcast [NI];
  logic [31:0] swaps_total [NI];
  int checks = 0, failures = 0;
  int cyc = 0;
  int last_step [NI], n_short [NI], n_long [NI], n_bad [NI], n_idle [NI], n_wait [NI];

  for (genvar k = 0; k < NI; k++) begin : g_inst
    placer_array dut (
      .clk, .rst_n, .mode(UPD_SIMPLE), .go, .stall_cycles(8'(STALLS[k])), .ld_pe, .ld_we, .ld_addr, .ld_data,
      .ld_id_we, .ld_id, .done(done[k]), .placement(placement[k]), .bcast(bcast[k]),
      .swaps_total(swaps_total[k]));
    always @(posedge clk) begin
      if (!rst_n) begin
        last_step[k] <= -1; n_wait[k] <= 0; n_short[k] <= 0; n_long[k] <= 0; n_bad[k] <= 0; n_idle[k] <= 0;
      end else if (!done[k]) begin
        if (dut.g_row[0].g_col[0].u_pe.step) begin
          if (last_step[k] >= 0) begin
            if (cyc - last_step[k] == 25 + STALLS[k]) n_short[k] <= n_short[k] + 1;
            else if (cyc - last_step[k] == 25 + 2 * K + 3 + STALLS[k]) n_long[k] <= n_long[k] + 1;
            else if (cyc - last_step[k] < 25 + STALLS[k]) n_bad[k] <= n_bad[k] + 1;
            else n_wait[k] <= n_wait[k] + 1;
          end
          last_step[k] <= cyc;
        end
        if (last_step[k] >= 0 && !bcast[k].valid) n_idle[k] <= n_idle[k] + 1;
      end
    end
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int deg [N], nbr [N][K], le_at [N], pe_of [N];

  function automatic int pdist(int a, int b);
    int dx, dy;
    dx = (a % COLS) - (b % COLS); if (dx < 0) dx = -dx;
    dy = (a / COLS) - (b / COLS); if (dy < 0) dy = -dy;
    return dx + dy;
  endfunction

  function automatic int cost_of(int po []);
    int c = 0;
    for (int i = 0; i < N; i++)
      for (int s = 0; s < deg[i]; s++) c += pdist(po[i], po[nbr[i][s]]);
    return c;
  endfunction

  task automatic chk(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s", w); end
  endtask

  initial begin
    int seed, j, tmp, c0, c1, le;
    int po [];
    bit seen [N], ok;
    po = new[N];
    for (int i = 0; i < N; i++) begin
      deg[i] = 0;
      if (i % COLS > 0)        begin nbr[i][deg[i]] = i - 1;    deg[i]++; end
      if (i % COLS < COLS - 1) begin nbr[i][deg[i]] = i + 1;    deg[i]++; end
      if (i / COLS > 0)        begin nbr[i][deg[i]] = i - COLS; deg[i]++; end
      if (i / COLS < ROWS - 1) begin nbr[i][deg[i]] = i + COLS; deg[i]++; end
    end
    seed = 12345;
    for (int i = 0; i < N; i++) le_at[i] = i;
    for (int i = N - 1; i > 0; i--) begin
      seed = seed * 1103515245 + 12345;
      j = ((seed >>> 8) & 32'h7fff) % (i + 1);
      tmp = le_at[i]; le_at[i] = le_at[j]; le_at[j] = tmp;
    end
    for (int p = 0; p < N; p++) pe_of[le_at[p]] = p;
    for (int i = 0; i < N; i++) po[i] = pe_of[i];
    c0 = cost_of(po);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int p = 0; p < N; p++) begin
      ld_pe <= 16'(p); ld_id_we <= 1'b1; ld_id <= id_t'(le_at[p]);
      @(posedge clk);
      ld_id_we <= 1'b0;
      for (int s = 0; s < K; s++) begin
        ld_we <= 1'b1; ld_addr <= slot_t'(s);
        if (s < deg[le_at[p]])
          ld_data <= '{valid: 1'b1, id: id_t'(nbr[le_at[p]][s]),
                       pos: '{x: COORD_W'(pe_of[nbr[le_at[p]][s]] % COLS),
                              y: COORD_W'(pe_of[nbr[le_at[p]][s]] / COLS)}};
        else ld_data <= '0;
        @(posedge clk);
      end
      ld_we <= 1'b0;
    end
    go <= 1'b1; @(posedge clk); go <= 1'b0;
    wait (done[0] && done[1] && done[2]);
    @(posedge clk); #1;
    for (int k = 0; k < NI; k++) begin
      ok = 1;
      for (int i = 0; i < N; i++) seen[i] = 0;
      for (int p = 0; p < N; p++) begin
        le = int'(placement[k][p]);
        if (le >= N || seen[le]) ok = 0; else begin seen[le] = 1; po[le] = p; end
      end
      chk(ok, $sformatf("stall %0d: permutation", STALLS[k]));
      c1 = ok ? cost_of(po) : 9999;
      $display("stall %0d (%0d updates per step): cost %0d -> %0d, steps %0d plain / %0d swap / %0d waited",
               STALLS[k], 25 + STALLS[k], c0, c1, n_short[k], n_long[k], n_wait[k]);
      chk(c1 < c0, $sformatf("stall %0d: wire length fell", STALLS[k]));
      chk(n_bad[k] == 0, $sformatf("stall %0d: %0d steps too short", STALLS[k], n_bad[k]));
      chk(n_short[k] > 0 && n_long[k] > 0 && n_wait[k] > 0, $sformatf("stall %0d: all step kinds seen", STALLS[k]));
      chk(n_idle[k] == 0, $sformatf("stall %0d: root idle %0d cycles", STALLS[k], n_idle[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
