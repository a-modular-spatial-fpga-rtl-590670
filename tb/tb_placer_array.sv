// tb_placer_array: end-to-end test of the placement engine at its default
// size (4 x 4 PEs, 12 connection slots per PE).
//
// The netlist is a 4 x 4 mesh of logic elements (LE i is wired to its
// logical grid neighbours), which has a known optimum of 48 (24 nets of
// length 1, each counted from both ends). It is placed on the array in a
// scrambled order and annealed four times: once per H-tree update mode
// (simple, sorted, random) and once more in simple mode with 25 stall
// cycles per step. After each run the testbench checks, against
// its own model of the netlist:
//   * the placement is still a permutation of the loaded ids;
//   * every PE holds the connection list of the LE it now holds;
//   * once the H-tree has had time to rebroadcast, every PE's position RAM
//     holds the true current position of each connected LE;
//   * the total Manhattan wire length is lower than at the start.
// It also counts how often each mechanism happened (cost-driven swaps,
// random swaps, rejected proposals, phases without a partner, waits for a
// partner still busy with its previous phase, CAM hits of position updates,
// stall cycles, H-tree flushes) and fails on any that never did.
module tb_placer_array;
  import sp_pkg::*;

  localparam int ROWS = 4, COLS = 4, K = 12, N = ROWS * COLS;

  logic clk = 1'b0, rst_n = 1'b0;
  upd_mode_e mode;
  logic go;
  logic [7:0] stall_cycles;
  logic [15:0] ld_pe;
  logic ld_we, ld_id_we;
  slot_t ld_addr;
  conn_t ld_data;
  id_t ld_id;
  logic done;
  id_t placement [N];
  upd_t bcast;
  logic [31:0] swaps_total;

  int checks = 0, failures = 0;
  longint cycle = 0;

  placer_array dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog: no completion");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- netlist model ----------------
  int  deg [N];
  int  nbr [N][K];
  int  pe_of [N];     // current PE index of each LE
  int  le_at [N];     // LE id at each PE (initial)

  function automatic void build_netlist();
    for (int i = 0; i < N; i++) begin
      deg[i] = 0;
      if (i % COLS > 0)        begin nbr[i][deg[i]] = i - 1;    deg[i]++; end
      if (i % COLS < COLS - 1) begin nbr[i][deg[i]] = i + 1;    deg[i]++; end
      if (i / COLS > 0)        begin nbr[i][deg[i]] = i - COLS; deg[i]++; end
      if (i / COLS < ROWS - 1) begin nbr[i][deg[i]] = i + COLS; deg[i]++; end
    end
  endfunction

  function automatic int pdist(int a, int b);
    int dx, dy;
    dx = (a % COLS) - (b % COLS); if (dx < 0) dx = -dx;
    dy = (a / COLS) - (b / COLS); if (dy < 0) dy = -dy;
    return dx + dy;
  endfunction

  function automatic int total_cost();
    int c = 0;
    for (int i = 0; i < N; i++)
      for (int s = 0; s < deg[i]; s++) c += pdist(pe_of[i], pe_of[nbr[i][s]]);
    return c;
  endfunction

  // ---------------- per-PE observation ----------------
  int n_cost_swap [N], n_rand_swap [N], n_reject [N], n_nopartner [N], n_hit [N];
  int n_waitp [N], n_stall [N];
  pos_t snap_pos [N][K];
  conn_id_t snap_sh [N][K];

  for (genvar y = 0; y < ROWS; y++) begin : g_y
    for (genvar x = 0; x < COLS; x++) begin : g_x
      localparam int I = y * COLS + x;
      always @(posedge clk) begin
        if (!rst_n) begin
          n_cost_swap[I] <= 0; n_rand_swap[I] <= 0; n_reject[I] <= 0;
          n_nopartner[I] <= 0; n_hit[I] <= 0; n_waitp[I] <= 0; n_stall[I] <= 0;
        end else begin
          if (dut.g_row[y].g_col[x].u_pe.decision_valid) begin
            if (!dut.g_row[y].g_col[x].u_pe.u_swap.p2) n_nopartner[I] <= n_nopartner[I] + 1;
            else if (dut.g_row[y].g_col[x].u_pe.u_swap.better2) n_cost_swap[I] <= n_cost_swap[I] + 1;
            else if (dut.g_row[y].g_col[x].u_pe.u_swap.r2) n_rand_swap[I] <= n_rand_swap[I] + 1;
            else n_reject[I] <= n_reject[I] + 1;
          end
          if (dut.g_row[y].g_col[x].u_pe.mu_hit) n_hit[I] <= n_hit[I] + 1;
          // waiting in WAIT with its own delta ready while the partner's is not
          if (dut.g_row[y].g_col[x].u_pe.ctl_state == 3'd2 &&
              dut.g_row[y].g_col[x].u_pe.link_out.dvalid &&
              dut.g_row[y].g_col[x].u_pe.has_partner &&
              !dut.g_row[y].g_col[x].u_pe.partner.dvalid) n_waitp[I] <= n_waitp[I] + 1;
          if (dut.g_row[y].g_col[x].u_pe.ctl_state == 3'd4) n_stall[I] <= n_stall[I] + 1;
        end
        for (int s = 0; s < K; s++) begin
          snap_pos[I][s] <= dut.g_row[y].g_col[x].u_pe.u_mem.pos_ram[s];
          snap_sh[I][s]  <= dut.g_row[y].g_col[x].u_pe.u_mem.shadow_ram[s];
        end
      end
    end
  end

  int n_flush;
  always @(posedge clk) begin
    if (!rst_n) n_flush <= 0;
    else if (dut.flushing) n_flush <= n_flush + 1;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic pos_t pe_pos(int p);
    pos_t q;
    q.x = COORD_W'(p % COLS);
    q.y = COORD_W'(p / COLS);
    return q;
  endfunction

  task automatic run(input upd_mode_e m, input int seed, input int stall);
    int c0, c1, tmp, j, le, cnt_ok;
    longint t0;
    bit seen [N];
    // scrambled start: Fisher-Yates with a simple LCG
    for (int i = 0; i < N; i++) le_at[i] = i;
    for (int i = N - 1; i > 0; i--) begin
      seed = seed * 1103515245 + 12345;
      j = ((seed >>> 8) & 32'h7fff) % (i + 1);
      tmp = le_at[i]; le_at[i] = le_at[j]; le_at[j] = tmp;
    end
    for (int p = 0; p < N; p++) pe_of[le_at[p]] = p;
    c0 = total_cost();

    mode = m; stall_cycles = 8'(stall); go = 1'b0; ld_we = 1'b0; ld_id_we = 1'b0;
    ld_pe = '0; ld_addr = '0; ld_data = '0; ld_id = '0;
    rst_n = 1'b0;
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
                       pos: pe_pos(pe_of[nbr[le_at[p]][s]])};
        else
          ld_data <= '0;
        @(posedge clk);
      end
      ld_we <= 1'b0;
    end
    go <= 1'b1;
    t0 = cycle;
    @(posedge clk);
    go <= 1'b0;
    while (!done) @(posedge clk);
    $display("mode %0d: annealed in %0d cycles, %0d swaps (x2)", m, cycle - t0, swaps_total);
    repeat (300) @(posedge clk);   // let the H-tree rebroadcast every position

    // permutation and model update
    for (int p = 0; p < N; p++) seen[p] = 0;
    cnt_ok = 1;
    for (int p = 0; p < N; p++) begin
      le = int'(placement[p]);
      if (le >= N || seen[le]) cnt_ok = 0;
      else begin seen[le] = 1; pe_of[le] = p; end
    end
    check(cnt_ok == 1, "placement is a permutation");
    if (cnt_ok == 1) begin
      c1 = total_cost();
      $display("mode %0d: cost %0d -> %0d (optimum 48)", m, c0, c1);
      check(c1 < c0, "annealing lowered the wire length");
      for (int p = 0; p < N; p++) begin
        le = int'(placement[p]);
        for (int s = 0; s < K; s++) begin
          if (s < deg[le]) begin
            check(snap_sh[p][s].valid && snap_sh[p][s].id == id_t'(nbr[le][s]),
                  $sformatf("PE %0d slot %0d connection id", p, s));
            check(snap_pos[p][s] == pe_pos(pe_of[nbr[le][s]]),
                  $sformatf("PE %0d slot %0d position up to date", p, s));
          end else begin
            check(!snap_sh[p][s].valid, $sformatf("PE %0d slot %0d unused", p, s));
          end
        end
      end
    end
  endtask

  initial begin
    int tot_cost_sw, tot_rand_sw, tot_rej, tot_nop, tot_hit, tot_waitp, tot_stall;
    mode = UPD_SIMPLE; stall_cycles = 0; go = 0; ld_we = 0; ld_id_we = 0; ld_pe = 0;
    ld_addr = 0; ld_data = '0; ld_id = 0;
    build_netlist();
    tot_cost_sw = 0; tot_rand_sw = 0; tot_rej = 0; tot_nop = 0; tot_hit = 0;
    tot_waitp = 0; tot_stall = 0;
    for (int r = 0; r < 4; r++) begin
      // runs 0..2: each H-tree mode; run 3: simple mode with 25 stall cycles
      run((r == 3) ? UPD_SIMPLE : upd_mode_e'(r), 7 + 31 * r, (r == 3) ? 25 : 0);
      for (int i = 0; i < N; i++) begin
        tot_cost_sw += n_cost_swap[i]; tot_rand_sw += n_rand_swap[i];
        tot_rej += n_reject[i]; tot_nop += n_nopartner[i]; tot_hit += n_hit[i];
        tot_waitp += n_waitp[i]; tot_stall += n_stall[i];
      end
      if (r == 0 || r == 3) begin
        checks++;
        if (n_flush != 0) begin failures++; $display("FAIL: flush in simple mode"); end
      end else begin
        checks++;
        if (n_flush == 0) begin failures++; $display("FAIL: no H-tree flush in mode %0d", r); end
      end
    end
    $display("mechanisms: cost swaps %0d, random swaps %0d, rejected %0d, no partner %0d, CAM hits %0d, partner waits %0d, stall cycles %0d",
             tot_cost_sw, tot_rand_sw, tot_rej, tot_nop, tot_hit, tot_waitp, tot_stall);
    check(tot_cost_sw > 0, "cost-driven swap happened");
    check(tot_rand_sw > 0, "random swap happened");
    check(tot_rej > 0, "rejected swap happened");
    check(tot_nop > 0, "phase without partner happened");
    check(tot_hit > 0, "CAM hit on position update happened");
    check(tot_waitp > 0, "wait for a busy partner happened");
    check(tot_stall > 0, "stall between steps happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
