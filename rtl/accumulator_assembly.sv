// accumulator_assembly: local delta cost of swapping with the current
// neighbour (delta = M(L(E2),C(E1)) - M(L(E1),C(E1)), Manhattan sums).
//
// On `start` it reads the K connection-list entries from the position RAM,
// one address per cycle starting the next cycle (`rd_addr`, combinational
// read data `rd_data`), and streams them into a current-cost accumulator
// (at `loc`) and a hypothetical-cost accumulator (at the neighbour in
// direction `dir`); a diff accumulator subtracts. `delta_valid` rises
// K + 7 cycles after `start` (19 for K = 12, as the source design counts:
// 12 reads + 4 pipeline stages + 2 for the difference + 1 for the
// hypothetical location) and holds, with `delta`, until the next `start`.
// `busy` is high while addresses are being issued.
module accumulator_assembly
  import sp_pkg::*;
#(
  parameter int K = 12
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  pos_t   loc,
  input  dir_e   dir,
  output logic   rd_en,
  output slot_t  rd_addr,
  input  conn_t  rd_data,
  output logic   busy,
  output logic   delta_valid,
  output delta_t delta
);
  slot_t cnt;
  logic  cur_v, hyp_v;
  cost_t cur_c, hyp_c;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= '0;
    end else if (start) begin
      busy <= 1'b1; cnt <= '0;
    end else if (busy) begin
      if (cnt == slot_t'(K - 1)) busy <= 1'b0;
      cnt <= cnt + 1'b1;
    end
  end

  assign rd_en   = busy;
  assign rd_addr = cnt;

  current_cost_accumulator u_cur (
    .clk, .rst_n,
    .in_valid(busy), .in_first(cnt == '0), .in_last(cnt == slot_t'(K - 1)),
    .in_entry(rd_data), .loc, .cost_valid(cur_v), .cost(cur_c)
  );

  hypo_cost_accumulator u_hyp (
    .clk, .rst_n,
    .in_valid(busy), .in_first(cnt == '0), .in_last(cnt == slot_t'(K - 1)),
    .in_entry(rd_data), .loc, .dir, .cost_valid(hyp_v), .cost(hyp_c)
  );

  diff_accumulator u_diff (
    .clk, .rst_n, .clear(start),
    .cur_valid(cur_v), .cur_cost(cur_c), .hyp_valid(hyp_v), .hyp_cost(hyp_c),
    .delta_valid, .delta
  );
endmodule
