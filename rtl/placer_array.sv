// placer_array: the systolic FPGA cell placement engine (top level).
//
// A ROWS x COLS grid of processing elements anneals a placement of up to
// ROWS*COLS logic elements (LEs): PE (x, y) holds one LE, identified by its
// id, and the grid location of a PE is the location of the LE it holds.
// Neighbouring PEs propose and perform swaps of their LEs in four
// alternating phases (horizontal pairs, then vertical pairs), accepting a
// swap when it shortens the total Manhattan wire length of both LEs'
// connections or when an entropy bit says so; the probability of random
// swaps falls linearly with the temperature. An H-tree broadcasts one LE
// position per cycle to every PE so that the PEs' copies of their
// connected LUTs' positions stay current.
// Interface: before `go`, the netlist is loaded through the load bus: for PE
// `ld_pe`, `ld_id_we` writes the id of the LE placed there and `ld_we`
// writes connection slot `ld_addr` ({valid, id, position} of a connected
// LE). `go` starts all PEs; `done` rises when every PE has ended its cooling
// schedule. `placement[p]` is the id held by PE p = y*COLS + x. `bcast`
// shows the update leaving the H-tree root, `swaps_total` the number of
// swaps summed over PEs (each swap counts twice, once per PE).
// `mode` chooses the H-tree update method (simple round robin is the one
// the source design evaluates). Defaults follow the source design where it
// gives numbers (4 x 4 PEs as drawn, 12 connected LUTs per PE); the cooling
// constants are this design's own.
module placer_array
  import sp_pkg::*;
#(
  parameter int          ROWS           = 4,
  parameter int          COLS           = 4,
  parameter int          K              = 12,
  parameter int          BURST          = 4,
  parameter logic [15:0] T_INIT         = 16'd4096,
  parameter logic [15:0] T_STEP         = 16'd256,
  parameter logic [15:0] T_MIN          = 16'd0,
  parameter int unsigned STEPS_PER_TEMP = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  upd_mode_e mode,
  input  logic      go,
  input  logic [7:0] stall_cycles,
  // netlist load bus
  input  logic [15:0] ld_pe,
  input  logic      ld_we,
  input  slot_t     ld_addr,
  input  conn_t     ld_data,
  input  logic      ld_id_we,
  input  id_t       ld_id,
  // results
  output logic      done,
  output id_t       placement [ROWS*COLS],
  output upd_t      bcast,
  output logic [31:0] swaps_total
);
  localparam int N = ROWS * COLS;

  link_t links    [N];
  upd_t  leaf_up  [N];
  logic  leaf_rdy [N];
  upd_t  leaf_dn  [N];
  logic  fin      [N];
  logic [31:0] swaps [N];
  logic  flushing;

  for (genvar y = 0; y < ROWS; y++) begin : g_row
    for (genvar x = 0; x < COLS; x++) begin : g_col
      localparam int I = y * COLS + x;
      link_t ln, le, lw, ls;
      assign ln = (y > 0)        ? links[I - COLS] : '0;
      assign ls = (y < ROWS - 1) ? links[I + COLS] : '0;
      assign lw = (x > 0)        ? links[I - 1]    : '0;
      assign le = (x < COLS - 1) ? links[I + 1]    : '0;

      processing_element #(
        .K(K), .X(x), .Y(y), .ROWS(ROWS), .COLS(COLS),
        .SEED(16'(16'h9E37 * (I + 1) + 16'h1234)),
        .T_INIT(T_INIT), .T_STEP(T_STEP), .T_MIN(T_MIN),
        .STEPS_PER_TEMP(STEPS_PER_TEMP)
      ) u_pe (
        .clk, .rst_n, .go, .stall_cycles,
        .ld_we(ld_we && ld_pe == 16'(I)), .ld_addr, .ld_data,
        .ld_id_we(ld_id_we && ld_pe == 16'(I)), .ld_id,
        .link_out(links[I]), .link_n(ln), .link_e(le), .link_w(lw), .link_s(ls),
        .up(leaf_up[I]), .up_ready(leaf_rdy[I]), .down(leaf_dn[I]),
        .le_id(placement[I]), .finished(fin[I]), .swaps(swaps[I])
      );
    end
  end

  htree #(.N_LEAVES(N), .BURST(BURST)) u_htree (
    .clk, .rst_n, .mode, .leaf_up, .leaf_ready(leaf_rdy), .leaf_down(leaf_dn),
    .bcast, .flushing
  );

  always_comb begin
    done        = 1'b1;
    swaps_total = '0;
    for (int i = 0; i < N; i++) begin
      done        = done & fin[i];
      swaps_total = swaps_total + swaps[i];
    end
  end
endmodule
