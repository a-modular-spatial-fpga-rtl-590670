// sp_pkg: types and constants shared by the systolic placement engine.
//
// A placement is held as one logic-element (LE) id per processing element
// (PE). Every PE keeps, for its LE, a list of up to K connected LEs (their ids
// and their last known grid positions). Widths are fixed here so that the
// structs can be shared; they cover grids up to 256 x 256 and 65536 LEs.
// The widths, the link bundle and the phase encoding are this design's own
// choices; the cost definition (Manhattan distance) follows the source design.
package sp_pkg;

  localparam int COORD_W = 8;   // one grid coordinate
  localparam int ID_W    = 16;  // logic-element id
  localparam int COST_W  = 16;  // signed delta cost / unsigned cost sums
  localparam int SLOT_W  = 4;   // connection slot index (K <= 16)

  typedef logic [ID_W-1:0]          id_t;
  typedef logic signed [COST_W-1:0] delta_t;
  typedef logic [COST_W-1:0]        cost_t;
  typedef logic [SLOT_W-1:0]        slot_t;

  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
  } pos_t;

  // One entry of a PE's connection list: shadow-RAM part (valid, id) and
  // position-RAM part (pos).
  typedef struct packed {
    logic valid;
    id_t  id;
  } conn_id_t;

  typedef struct packed {
    logic     valid;
    id_t      id;
    pos_t     pos;
  } conn_t;

  // Swap partner direction, chosen per phase by the neighbour mux.
  typedef enum logic [2:0] {
    DIR_NONE = 3'd0,
    DIR_N    = 3'd1,
    DIR_E    = 3'd2,
    DIR_W    = 3'd3,
    DIR_S    = 3'd4
  } dir_e;

  // H-tree arbitration modes.
  typedef enum logic [1:0] {
    UPD_SIMPLE = 2'd0,  // round robin over all PEs
    UPD_SORTED = 2'd1,  // largest position change wins at each crosspoint
    UPD_RANDOM = 2'd2   // random pick at each crosspoint
  } upd_mode_e;

  // A position update travelling on the H-tree.
  typedef struct packed {
    logic  valid;
    id_t   id;
    pos_t  pos;
    cost_t key;  // distance moved since last broadcast (sorted mode)
  } upd_t;

  // Everything a PE shows its four neighbours, registered once.
  typedef struct packed {
    logic   dvalid;   // delta below is this phase's result
    logic [1:0] phase; // swap phase the PE is in
    delta_t delta;    // local delta cost
    logic   rnd;      // entropy swap bit for this phase
    id_t    le_id;    // logic element held by the PE
    pos_t   le_bpos;  // last broadcast position of that LE
    logic   sw_valid; // swap stream entry valid
    slot_t  sw_addr;  // swap stream slot
    conn_t  sw_data;  // swap stream entry
  } link_t;

  function automatic cost_t manhattan(pos_t a, pos_t b);
    logic [COORD_W-1:0] dx, dy;
    dx = (a.x > b.x) ? a.x - b.x : b.x - a.x;
    dy = (a.y > b.y) ? a.y - b.y : b.y - a.y;
    return cost_t'(dx) + cost_t'(dy);
  endfunction

  // Location of the neighbour in direction d of location p.
  function automatic pos_t step_pos(pos_t p, dir_e d);
    pos_t q;
    q = p;
    case (d)
      DIR_N: q.y = p.y - 1'b1;
      DIR_S: q.y = p.y + 1'b1;
      DIR_E: q.x = p.x + 1'b1;
      DIR_W: q.x = p.x - 1'b1;
      default: q = p;
    endcase
    return q;
  endfunction

endpackage
