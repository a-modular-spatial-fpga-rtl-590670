// hypo_cost_accumulator: cost of this PE's logic element if it were moved
// to the swap partner's location.
//
// One extra pipeline stage forms the hypothetical location, one step from
// `loc` in direction `dir`, and delays the entry stream to match; a
// current_cost_accumulator then sums the distances from that location. The
// result therefore appears one cycle after the current-cost result for the
// same stream (5 cycles after `in_last`). The extra cycle follows the source
// design; forming the location as a neighbour step is this design's reading.
module hypo_cost_accumulator
  import sp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  logic  in_last,
  input  conn_t in_entry,
  input  pos_t  loc,
  input  dir_e  dir,
  output logic  cost_valid,
  output cost_t cost
);
  logic  h_v, h_first, h_last;
  conn_t h_e;
  pos_t  hypo_loc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      h_v <= 1'b0; h_first <= 1'b0; h_last <= 1'b0; h_e <= '0;
      hypo_loc <= '0;
    end else begin
      h_v      <= in_valid;
      h_first  <= in_first;
      h_last   <= in_last;
      h_e      <= in_entry;
      hypo_loc <= step_pos(loc, dir);
    end
  end

  current_cost_accumulator u_acc (
    .clk, .rst_n,
    .in_valid(h_v), .in_first(h_first), .in_last(h_last), .in_entry(h_e),
    .loc(hypo_loc), .cost_valid, .cost
  );
endmodule
