// current_cost_accumulator: cost of one logic element at a given location.
//
// Consumes a stream of connection-list entries (one per cycle, `in_first`
// on the first and `in_last` on the last) and returns the sum over the valid
// entries of the Manhattan distance between `loc` and the entry's position.
// Invalid (unused) slots add nothing. Four pipeline stages, as in the source
// design: register input, compute the Manhattan distance, add to the running
// total, register the total. `cost_valid` pulses for one cycle, 4 cycles
// after the cycle that carried `in_last`; `cost` then holds until the next
// result. `loc` must be stable while the stream is in flight.
module current_cost_accumulator
  import sp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  logic  in_last,
  input  conn_t in_entry,
  input  pos_t  loc,
  output logic  cost_valid,
  output cost_t cost
);
  // stage 1: register input
  logic  s1_v, s1_first, s1_last;
  conn_t s1_e;
  // stage 2: distance
  logic  s2_v, s2_first, s2_last;
  cost_t s2_d;
  // stage 3: running total
  logic  s3_last;
  cost_t sum;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_first <= 1'b0; s1_last <= 1'b0; s1_e <= '0;
      s2_v <= 1'b0; s2_first <= 1'b0; s2_last <= 1'b0; s2_d <= '0;
      s3_last <= 1'b0; sum <= '0;
      cost_valid <= 1'b0; cost <= '0;
    end else begin
      s1_v     <= in_valid;
      s1_first <= in_valid & in_first;
      s1_last  <= in_valid & in_last;
      s1_e     <= in_entry;

      s2_v     <= s1_v;
      s2_first <= s1_first;
      s2_last  <= s1_last;
      s2_d     <= (s1_v && s1_e.valid) ? manhattan(loc, s1_e.pos) : '0;

      if (s2_v) sum <= (s2_first ? '0 : sum) + s2_d;
      s3_last <= s2_v & s2_last;

      cost_valid <= s3_last;
      if (s3_last) cost <= sum;
    end
  end
endmodule
