// neighbour_mux: selects this phase's swap partner among the N, E, W and S
// neighbours of the PE at column X, row Y of a ROWS x COLS grid.
//
// Four phases pair every PE with each neighbour in turn:
//   phase 0: columns (0,1), (2,3), ... pair horizontally
//   phase 1: columns (1,2), (3,4), ...
//   phase 2: rows (0,1), (2,3), ... pair vertically
//   phase 3: rows (1,2), (3,4), ...
// A PE whose partner would lie outside the grid has none (DIR_NONE) and
// sits the phase out. Purely combinational. Considering each neighbour in
// turn follows the source design; this phase order is this design's own.
module neighbour_mux
  import sp_pkg::*;
#(
  parameter int X    = 0,
  parameter int Y    = 0,
  parameter int ROWS = 4,
  parameter int COLS = 4
) (
  input  logic [1:0] phase,
  input  link_t      link_n,
  input  link_t      link_e,
  input  link_t      link_w,
  input  link_t      link_s,
  output dir_e       dir,
  output logic       has_partner,
  output link_t      partner
);
  always_comb begin
    dir = DIR_NONE;
    case (phase)
      2'd0: dir = (X % 2 == 0) ? ((X + 1 < COLS) ? DIR_E : DIR_NONE) : DIR_W;
      2'd1: dir = (X % 2 == 1) ? ((X + 1 < COLS) ? DIR_E : DIR_NONE)
                               : ((X > 0) ? DIR_W : DIR_NONE);
      2'd2: dir = (Y % 2 == 0) ? ((Y + 1 < ROWS) ? DIR_S : DIR_NONE) : DIR_N;
      default: dir = (Y % 2 == 1) ? ((Y + 1 < ROWS) ? DIR_S : DIR_NONE)
                                  : ((Y > 0) ? DIR_N : DIR_NONE);
    endcase
    has_partner = (dir != DIR_NONE);
    case (dir)
      DIR_N:   partner = link_n;
      DIR_E:   partner = link_e;
      DIR_W:   partner = link_w;
      DIR_S:   partner = link_s;
      default: partner = '0;
    endcase
  end
endmodule
