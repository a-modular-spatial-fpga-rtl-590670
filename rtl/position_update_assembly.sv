// position_update_assembly: a PE's leaf on the H-tree.
//
// Upward, it always offers this PE's update {id of the logic element it
// holds, this PE's location, key}; the key is the Manhattan distance between
// that location and where the element was last broadcast from (`le_bpos`),
// which the sorted update mode uses as priority. `up_ready` from the tree
// says the offer was taken; `sent` counts taken offers.
// Downward, every broadcast is registered once and handed to the memory
// assembly (`mem_upd_*`), whose CAM decides whether it concerns this PE.
// A broadcast of the PE's own element id updates `le_bpos`. On a swap,
// `swap_load` replaces `le_bpos` with the value that travels with the
// incoming element; `init_load` sets it when a netlist is loaded.
// The leaf role follows the source design; the key and `le_bpos` tracking
// are this design's own.
module position_update_assembly
  import sp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  pos_t  loc,
  input  id_t   le_id,
  input  logic  init_load,
  input  logic  swap_load,
  input  pos_t  swap_bpos,
  output pos_t  le_bpos,
  // H-tree leaf
  output upd_t  up,
  input  logic  up_ready,
  input  upd_t  down,
  // to the memory assembly
  output logic  mem_upd_valid,
  output id_t   mem_upd_id,
  output pos_t  mem_upd_pos,
  output logic [31:0] sent
);
  always_comb begin
    up.valid = 1'b1;
    up.id    = le_id;
    up.pos   = loc;
    up.key   = manhattan(loc, le_bpos);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      le_bpos       <= '0;
      mem_upd_valid <= 1'b0;
      mem_upd_id    <= '0;
      mem_upd_pos   <= '0;
      sent          <= '0;
    end else begin
      mem_upd_valid <= down.valid;
      mem_upd_id    <= down.id;
      mem_upd_pos   <= down.pos;
      if (up_ready) sent <= sent + 1'b1;
      if (init_load)                         le_bpos <= loc;
      else if (swap_load)                    le_bpos <= swap_bpos;
      else if (down.valid && down.id == le_id) le_bpos <= down.pos;
    end
  end
endmodule
