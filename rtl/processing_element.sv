// processing_element: one cell of the systolic placer.
//
// The PE sits at grid location (X, Y) and holds one logic element (LE),
// identified by `le_id`, together with that element's connection list (up to
// K connected LUTs: ids and last known positions). Every swap phase it
//   1. computes the local delta cost of moving its LE to this phase's
//      neighbour (accumulator_assembly, 19 cycles for K = 12),
//   2. exchanges delta and entropy bit with the neighbour over the
//      registered link and decides with it whether to swap (swap_assembly),
//   3. on a swap, trades LE id and connection list with the neighbour
//      (swapmemory_assembly) and reprograms its CAM.
// Independently it offers its LE's position to the H-tree and feeds every
// broadcast into its memory, where the CAM picks out the ones for its
// connected LUTs (position_update_assembly, memory_assembly).
// Interface: `link_out` is shown to all four neighbours (one register
// stage); `link_*` are theirs. `up`/`up_ready`/`down` connect to the H-tree.
// The load port writes connection slots (`ld_we`) and the LE id
// (`ld_id_we`) before `go`. `finished` rises when the cooling schedule ends.
// The split into these assemblies follows the source design; the link
// bundle, the phase handshake and the load port are this design's own.
module processing_element
  import sp_pkg::*;
#(
  parameter int          K              = 12,
  parameter int          X              = 0,
  parameter int          Y              = 0,
  parameter int          ROWS           = 4,
  parameter int          COLS           = 4,
  parameter logic [15:0] SEED           = 16'hACE1,
  parameter logic [15:0] T_INIT         = 16'd4096,
  parameter logic [15:0] T_STEP         = 16'd256,
  parameter logic [15:0] T_MIN          = 16'd0,
  parameter int unsigned STEPS_PER_TEMP = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  go,
  input  logic [7:0] stall_cycles,
  // netlist load
  input  logic  ld_we,
  input  slot_t ld_addr,
  input  conn_t ld_data,
  input  logic  ld_id_we,
  input  id_t   ld_id,
  // neighbours
  output link_t link_out,
  input  link_t link_n,
  input  link_t link_e,
  input  link_t link_w,
  input  link_t link_s,
  // H-tree leaf
  output upd_t  up,
  input  logic  up_ready,
  input  upd_t  down,
  // status
  output id_t   le_id,
  output logic  finished,
  output logic [31:0] swaps
);
  localparam pos_t LOC = '{x: COORD_W'(X), y: COORD_W'(Y)};

  // control / entropy
  logic       step, acc_start, arm, swap_start, ent_swap, ent_done;
  logic [1:0] phase;
  logic [2:0] ctl_state;
  logic [15:0] temperature;
  // accumulator
  logic   acc_rd_en, acc_busy, delta_valid;
  slot_t  acc_rd_addr;
  conn_t  acc_rd_data;
  delta_t delta;
  // neighbour
  dir_e   dir;
  logic   has_partner;
  link_t  partner;
  // swap
  logic   decision_valid, swap_decision;
  logic   sm_busy, sm_done, sm_wr_en, sm_cp_we, tx_valid;
  slot_t  sm_rd_addr, sm_wr_addr, sm_cp_addr, tx_addr;
  conn_t  sm_rd_data, sm_wr_data, tx_data;
  // position update
  pos_t   le_bpos;
  logic   mu_valid, mu_hit;
  id_t    mu_id;
  pos_t   mu_pos;
  logic [31:0] sent;

  control_assembly u_ctl (
    .clk, .rst_n, .go, .stall_cycles, .entropy_done(ent_done),
    .decision_valid, .swap_decision, .swap_done(sm_done),
    .step, .acc_start, .arm, .swap_start, .phase, .finished, .state_o(ctl_state)
  );

  entropy_assembly #(
    .SEED(SEED), .T_INIT(T_INIT), .T_STEP(T_STEP), .T_MIN(T_MIN),
    .STEPS_PER_TEMP(STEPS_PER_TEMP)
  ) u_ent (
    .clk, .rst_n, .step, .swap(ent_swap), .done(ent_done), .temperature
  );

  neighbour_mux #(.X(X), .Y(Y), .ROWS(ROWS), .COLS(COLS)) u_mux (
    .phase, .link_n, .link_e, .link_w, .link_s, .dir, .has_partner, .partner
  );

  accumulator_assembly #(.K(K)) u_acc (
    .clk, .rst_n, .start(acc_start), .loc(LOC), .dir,
    .rd_en(acc_rd_en), .rd_addr(acc_rd_addr), .rd_data(acc_rd_data),
    .busy(acc_busy), .delta_valid, .delta
  );

  swap_assembly u_swap (
    .clk, .rst_n, .arm, .cur_phase(phase), .has_partner,
    .local_valid(link_out.dvalid), .local_delta(link_out.delta),
    .local_rnd(link_out.rnd), .local_phase(link_out.phase),
    .ext_valid(partner.dvalid), .ext_delta(partner.delta),
    .ext_rnd(partner.rnd), .ext_phase(partner.phase),
    .decision_valid, .swap_decision
  );

  swapmemory_assembly #(.K(K)) u_swapmem (
    .clk, .rst_n, .start(swap_start), .busy(sm_busy), .done(sm_done),
    .rd_addr(sm_rd_addr), .rd_data(sm_rd_data),
    .wr_en(sm_wr_en), .wr_addr(sm_wr_addr), .wr_data(sm_wr_data),
    .cp_we(sm_cp_we), .cp_addr(sm_cp_addr),
    .tx_valid, .tx_addr, .tx_data,
    .rx_valid(partner.sw_valid), .rx_addr(partner.sw_addr), .rx_data(partner.sw_data)
  );

  memory_assembly #(.K(K)) u_mem (
    .clk, .rst_n,
    .ld_we, .ld_addr, .ld_data,
    .ra_addr(acc_rd_addr), .ra_data(acc_rd_data),
    .rb_addr(sm_rd_addr), .rb_data(sm_rd_data),
    .sw_we(sm_wr_en), .sw_addr(sm_wr_addr), .sw_data(sm_wr_data),
    .cp_we(sm_cp_we), .cp_addr(sm_cp_addr),
    .lookup_en(!sm_busy && !swap_start), .upd_valid(mu_valid), .upd_id(mu_id),
    .upd_pos(mu_pos), .upd_hit(mu_hit)
  );

  position_update_assembly u_pu (
    .clk, .rst_n, .loc(LOC), .le_id,
    .init_load(ld_id_we), .swap_load(swap_start), .swap_bpos(partner.le_bpos),
    .le_bpos, .up, .up_ready, .down,
    .mem_upd_valid(mu_valid), .mem_upd_id(mu_id), .mem_upd_pos(mu_pos), .sent
  );

  // logic element held by this PE; traded on a swap
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      le_id <= '0;
      swaps <= '0;
    end else if (ld_id_we) begin
      le_id <= ld_id;
    end else if (swap_start) begin
      le_id <= partner.le_id;
      swaps <= swaps + 1'b1;
    end
  end

  // registered link to the neighbours
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      link_out <= '0;
    end else begin
      link_out.dvalid   <= delta_valid;
      link_out.phase    <= phase;
      link_out.delta    <= delta;
      link_out.rnd      <= ent_swap;
      link_out.le_id    <= le_id;
      link_out.le_bpos  <= le_bpos;
      link_out.sw_valid <= tx_valid;
      link_out.sw_addr  <= tx_addr;
      link_out.sw_data  <= tx_data;
    end
  end
endmodule
