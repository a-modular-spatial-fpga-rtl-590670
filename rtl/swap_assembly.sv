// swap_assembly: makes the swap decision for one PE and its partner.
//
// Inputs are the registered link values of this PE (local) and of the
// partner (ext): delta cost, delta-valid, entropy swap bit and phase tag.
// Because both PEs evaluate the same registered values, they decide the same
// thing in the same cycle. The decision fires once per phase (re-armed by
// `arm`) when the local delta is valid and tagged with the current phase
// `cur_phase` and, if there is a partner, the partner's delta is valid for
// the same phase (stale values from the previous phase never fire). Then
//   swap = has_partner & (local_rnd | ext_rnd | (local_delta + ext_delta < 0))
// i.e. a random swap if either PE's entropy bit is set, otherwise only if the
// combined Manhattan cost falls. Pipeline of four registers, matching the
// source design's 4-cycle swap decision: capture, sum, compare, decision.
// `decision_valid` pulses 4 cycles after the cycle in which the fire
// condition holds. Using the OR of both entropy bits and the phase tag
// are this design's own choices to keep the two PEs consistent.
module swap_assembly
  import sp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       arm,
  input  logic [1:0] cur_phase,
  input  logic       has_partner,
  input  logic       local_valid,
  input  delta_t     local_delta,
  input  logic       local_rnd,
  input  logic [1:0] local_phase,
  input  logic       ext_valid,
  input  delta_t     ext_delta,
  input  logic       ext_rnd,
  input  logic [1:0] ext_phase,
  output logic       decision_valid,
  output logic       swap_decision
);
  logic armed, fire;
  logic f0, f1, f2;
  logic p0, p1, p2;
  logic r0, r1, r2;
  delta_t ld0, ed0;
  logic signed [COST_W:0] sum1;
  logic better2;

  assign fire = armed && local_valid && local_phase == cur_phase &&
                (!has_partner || (ext_valid && ext_phase == local_phase));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      armed <= 1'b0;
      f0 <= 1'b0; p0 <= 1'b0; r0 <= 1'b0; ld0 <= '0; ed0 <= '0;
      f1 <= 1'b0; f2 <= 1'b0; p1 <= 1'b0; p2 <= 1'b0; r1 <= 1'b0; r2 <= 1'b0;
      sum1 <= '0; better2 <= 1'b0;
      decision_valid <= 1'b0; swap_decision <= 1'b0;
    end else begin
      if (arm)       armed <= 1'b1;
      else if (fire) armed <= 1'b0;
      // stage 0: capture
      f0  <= fire;
      p0  <= has_partner;
      r0  <= local_rnd | (has_partner & ext_rnd);
      ld0 <= local_delta;
      ed0 <= has_partner ? ext_delta : '0;
      // stage 1: total delta
      f1   <= f0;
      p1   <= p0;
      r1   <= r0;
      sum1 <= (COST_W+1)'(ld0) + (COST_W+1)'(ed0);
      // stage 2: compare
      f2      <= f1;
      p2      <= p1;
      r2      <= r1;
      better2 <= sum1 < 0;
      // stage 3: decision
      decision_valid <= f2;
      swap_decision  <= f2 & p2 & (r2 | better2);
    end
  end
endmodule
