// diff_accumulator: local delta cost of a proposed swap,
//   delta = hypothetical cost - current cost   (negative = improvement).
//
// Captures the current cost when `cur_valid` pulses and the hypothetical
// cost when `hyp_valid` pulses (one or more cycles later), then subtracts in
// a second cycle: `delta_valid` rises 2 cycles after `hyp_valid`, as in the
// source design. `delta` and `delta_valid` then hold until `clear`, so that
// a swap partner can pick them up whenever it is ready.
module diff_accumulator
  import sp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   cur_valid,
  input  cost_t  cur_cost,
  input  logic   hyp_valid,
  input  cost_t  hyp_cost,
  output logic   delta_valid,
  output delta_t delta
);
  cost_t cur_q, hyp_q;
  logic  hyp_seen;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur_q <= '0; hyp_q <= '0; hyp_seen <= 1'b0;
      delta_valid <= 1'b0; delta <= '0;
    end else if (clear) begin
      hyp_seen <= 1'b0;
      delta_valid <= 1'b0;
    end else begin
      if (cur_valid) cur_q <= cur_cost;
      hyp_seen <= hyp_valid;
      if (hyp_valid) hyp_q <= hyp_cost;
      if (hyp_seen) begin
        delta       <= delta_t'(hyp_q) - delta_t'(cur_q);
        delta_valid <= 1'b1;
      end
    end
  end
endmodule
