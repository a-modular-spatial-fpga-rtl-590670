// tb_processing_element: two PEs side by side (a 1 x 2 grid), random swaps
// disabled (temperature 1 against a never-zero random number), fed position
// updates by the testbench instead of an H-tree.
// LE 10 sits at (0,0) wired to LUTs at (5,0) and (6,0); LE 11 sits at (1,0)
// wired to LUTs at (0,3) and (0,4). Swapping gains 2 for each, so the first
// horizontal phase must swap; later phases must not (swapping back costs).
// Checks: the swap of ids and connection lists, the cycle counts of a phase
// (25 cycles without a swap, 25 + 2K + 3 = 52 with one, K = 12), that the
// vertical phases (no partner in one row) never swap, that a broadcast
// update reaches the right position-RAM slot of the right PE and changes
// the next delta accordingly, that the H-tree offer shows the held LE at
// the PE's location, and that both PEs finish after 8 phases.
module tb_processing_element;
  import sp_pkg::*;
  localparam int K = 12;
  logic clk = 0, rst_n = 0, go = 0;
  logic ld_we [2], ld_id_we [2];
  slot_t ld_addr = '0;
  conn_t ld_data = '0;
  id_t ld_id = '0;
  link_t lo [2];
  upd_t up [2], down = '0;
  id_t le_id [2];
  logic finished [2];
  logic [31:0] swaps [2];
  int checks = 0, failures = 0;
  int steps [$];
  int cyc = 0;

  for (genvar u = 0; u < 2; u++) begin : g_u
    processing_element #(.K(K), .X(u), .Y(0), .ROWS(1), .COLS(2), .SEED(16'(u * 77 + 5)),
                         .T_INIT(16'd1), .T_STEP(16'd1), .T_MIN(16'd0), .STEPS_PER_TEMP(8)) dut (
      .clk, .rst_n, .go, .stall_cycles(8'd0), .ld_we(ld_we[u]), .ld_addr, .ld_data, .ld_id_we(ld_id_we[u]), .ld_id,
      .link_out(lo[u]), .link_n('0), .link_s('0),
      .link_e(u == 0 ? lo[1] : '0), .link_w(u == 1 ? lo[0] : '0),
      .up(up[u]), .up_ready(1'b0), .down,
      .le_id(le_id[u]), .finished(finished[u]), .swaps(swaps[u])
    );
  end

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (g_u[0].dut.step) steps.push_back(cyc);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s", w); end
  endtask

  task automatic load(input int u, input int id, input int c0, input pos_t p0,
                      input int c1, input pos_t p1);
    ld_id_we[u] <= 1; ld_id <= id_t'(id); @(posedge clk); ld_id_we[u] <= 0;
    for (int s = 0; s < K; s++) begin
      ld_we[u] <= 1; ld_addr <= slot_t'(s);
      ld_data <= (s == 0) ? conn_t'{valid: 1'b1, id: id_t'(c0), pos: p0}
               : (s == 1) ? conn_t'{valid: 1'b1, id: id_t'(c1), pos: p1} : '0;
      @(posedge clk);
    end
    ld_we[u] <= 0;
  endtask

  function automatic pos_t P(int x, int y);
    return '{x: COORD_W'(x), y: COORD_W'(y)};
  endfunction

  initial begin
    ld_we[0] = 0; ld_we[1] = 0; ld_id_we[0] = 0; ld_id_we[1] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    load(0, 10, 20, P(5, 0), 21, P(6, 0));
    load(1, 11, 22, P(0, 3), 23, P(0, 4));
    #1;
    chk(up[0].id == 10 && up[0].pos == P(0, 0) && up[1].id == 11 && up[1].pos == P(1, 0), "offers before");
    go <= 1; @(posedge clk); go <= 0;
    // first phase: swap
    wait (steps.size() == 2);
    @(posedge clk); #1;
    chk(steps[1] - steps[0] == 25 + 2 * K + 3, $sformatf("swap phase %0d cycles", steps[1] - steps[0]));
    chk(le_id[0] == 11 && le_id[1] == 10, "ids swapped");
    chk(swaps[0] == 1 && swaps[1] == 1, "one swap each");
    chk(g_u[0].dut.u_mem.shadow_ram[0].id == 22 && g_u[0].dut.u_mem.pos_ram[1] == P(0, 4),
        "PE0 got LE 11's list");
    chk(g_u[1].dut.u_mem.shadow_ram[1].id == 21 && g_u[1].dut.u_mem.pos_ram[0] == P(5, 0),
        "PE1 got LE 10's list");
    chk(g_u[1].dut.u_mem.u_cam.entry[0].id == 20 && g_u[1].dut.u_mem.u_cam.entry[0].valid,
        "PE1 CAM reprogrammed");
    chk(up[0].id == 11 && up[0].pos == P(0, 0), "offer after swap");
    // broadcast an update for LUT 20 (now PE1's slot 0)
    down <= '{valid: 1'b1, id: id_t'(20), pos: P(2, 0), key: '0};
    @(posedge clk);
    down <= '0;
    repeat (3) @(posedge clk); #1;
    chk(g_u[1].dut.u_mem.pos_ram[0] == P(2, 0), "update reached PE1 slot 0");
    chk(g_u[0].dut.u_mem.pos_ram[0] == P(0, 3), "PE0 untouched by update");
    // phases 1..3: no partner, no swap
    wait (steps.size() == 5);
    @(posedge clk); #1;
    for (int i = 1; i < 4; i++) chk(steps[i+1] - steps[i] == 25, $sformatf("phase %0d: %0d cycles", i, steps[i+1] - steps[i]));
    // phase 4 (horizontal again, started by the 5th step): no swap back; check PE1's delta after update
    @(posedge clk);
    wait (g_u[0].dut.delta_valid && g_u[1].dut.delta_valid);
    #1;
    chk(g_u[1].dut.delta == 16'sd2, $sformatf("PE1 delta %0d after update", g_u[1].dut.delta));
    chk(g_u[0].dut.delta == 16'sd2, $sformatf("PE0 delta %0d", g_u[0].dut.delta));
    wait (finished[0] && finished[1]);
    #1;
    chk(swaps[0] == 1 && le_id[0] == 11, "no further swaps");
    chk(steps.size() == 8, $sformatf("8 phases, got %0d", steps.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
