// memory_assembly: the connection list of a PE's logic element.
//
// Three stores of K slots each:
//   * position RAM - last known position of each connected LUT;
//   * shadow RAM   - {valid, id} of each connected LUT, a plain-RAM copy of
//                    the CAM contents that is easy to swap;
//   * CAM          - the same ids, searched in parallel when a position
//                    update arrives.
// Read port A (accumulator) and read port B (swap memory) return
// {valid, id, position} of a slot combinationally. The swap write port
// overwrites the shadow and position RAM of a slot; `cp_we` copies one
// shadow-RAM slot into the CAM. The load port writes all three.
// Position updates (`upd_*`) are looked up in the CAM (1 cycle); on a hit
// the position RAM slot is written in the following cycle, unless the swap
// write port writes in that cycle (it wins). Lookups are ignored while
// `lookup_en` is low (during a swap, while the CAM is being rewritten).
// Structure follows the source design; port arrangement and the
// update-drop rule are this design's own choices.
module memory_assembly
  import sp_pkg::*;
#(
  parameter int K = 12
) (
  input  logic  clk,
  input  logic  rst_n,
  // netlist load
  input  logic  ld_we,
  input  slot_t ld_addr,
  input  conn_t ld_data,
  // read port A (accumulator)
  input  slot_t ra_addr,
  output conn_t ra_data,
  // read port B (swap memory)
  input  slot_t rb_addr,
  output conn_t rb_data,
  // swap write port
  input  logic  sw_we,
  input  slot_t sw_addr,
  input  conn_t sw_data,
  // CAM reprogramming from the shadow RAM
  input  logic  cp_we,
  input  slot_t cp_addr,
  // position updates from the H-tree
  input  logic  lookup_en,
  input  logic  upd_valid,
  input  id_t   upd_id,
  input  pos_t  upd_pos,
  output logic  upd_hit
);
  pos_t     pos_ram    [K];
  conn_id_t shadow_ram [K];

  logic     cam_we;
  slot_t    cam_waddr;
  conn_id_t cam_wdata;
  slot_t    hit_addr;
  pos_t     upd_pos_q;

  assign ra_data = '{valid: shadow_ram[ra_addr].valid, id: shadow_ram[ra_addr].id,
                     pos: pos_ram[ra_addr]};
  assign rb_data = '{valid: shadow_ram[rb_addr].valid, id: shadow_ram[rb_addr].id,
                     pos: pos_ram[rb_addr]};

  always_comb begin
    cam_we    = ld_we | cp_we;
    cam_waddr = ld_we ? ld_addr : cp_addr;
    cam_wdata = ld_we ? conn_id_t'{valid: ld_data.valid, id: ld_data.id}
                      : shadow_ram[cp_addr];
  end

  cam #(.K(K)) u_cam (
    .clk, .rst_n,
    .we(cam_we), .waddr(cam_waddr), .wdata(cam_wdata),
    .lk_valid(upd_valid & lookup_en), .lk_id(upd_id),
    .hit(upd_hit), .hit_addr
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) begin
        pos_ram[i]    <= '0;
        shadow_ram[i] <= '0;
      end
      upd_pos_q <= '0;
    end else begin
      upd_pos_q <= upd_pos;
      if (ld_we) begin
        pos_ram[ld_addr]    <= ld_data.pos;
        shadow_ram[ld_addr] <= '{valid: ld_data.valid, id: ld_data.id};
      end else if (sw_we) begin
        pos_ram[sw_addr]    <= sw_data.pos;
        shadow_ram[sw_addr] <= '{valid: sw_data.valid, id: sw_data.id};
      end else if (upd_hit && lookup_en) begin
        pos_ram[hit_addr] <= upd_pos_q;
      end
    end
  end
endmodule
