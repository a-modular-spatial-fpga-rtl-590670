// control_assembly: the PE's sequencer, one pass per swap phase.
//
//   IDLE : wait for `go`.
//   S0   : one cycle. If the entropy assembly reports `done`, go to DONE.
//          Otherwise clock the entropy assembly (`step`), start the
//          accumulator (`acc_start`), advance to the next neighbour
//          (`phase` + 1, seen by the neighbour mux), re-arm the swap
//          assembly, and go to WAIT.
//   WAIT : on `decision_valid`: if `swap_decision`, start the swap memory
//          (`swap_start`) and go to SWAP, else back to S0.
//   SWAP : on `swap_done` back to S0.
//   STALL: entered instead of S0 when `stall_cycles` > 0; waits that many
//          cycles, so that more position updates reach the PE between
//          swap decisions (each cycle of the H-tree delivers one).
//   DONE : annealing finished; stays until reset.
// All outputs are decoded from the registered state (`step`, `acc_start`,
// `arm` during S0; `swap_start` in the WAIT cycle that sees the decision).
// S0/WAIT/SWAP follow the source design's state machine, and the stall is
// the source design's way of raising the updates per step above the
// minimum; IDLE, DONE and the phase counter are this design's additions. `phase` resets to 3 so that
// the first S0 selects phase 0.
module control_assembly
  import sp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       go,
  input  logic [7:0] stall_cycles,
  input  logic       entropy_done,
  input  logic       decision_valid,
  input  logic       swap_decision,
  input  logic       swap_done,
  output logic       step,
  output logic       acc_start,
  output logic       arm,
  output logic       swap_start,
  output logic [1:0] phase,
  output logic       finished,
  output logic [2:0] state_o
);
  typedef enum logic [2:0] {IDLE, S0, WAIT, SWAP, STALL, DONE} state_e;
  state_e st;
  state_e after_phase;
  logic [7:0] stall_cnt;

  assign after_phase = (stall_cycles == 8'd0) ? S0 : STALL;

  wire in_s0 = (st == S0) && !entropy_done;

  assign step       = in_s0;
  assign acc_start  = in_s0;
  assign arm        = in_s0;
  assign swap_start = (st == WAIT) && decision_valid && swap_decision;
  assign finished   = (st == DONE);
  assign state_o    = st;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= IDLE;
      phase     <= 2'd3;
      stall_cnt <= '0;
    end else begin
      case (st)
        IDLE: if (go) st <= S0;
        S0: if (entropy_done) st <= DONE;
            else begin
              st    <= WAIT;
              phase <= phase + 1'b1;
            end
        WAIT: if (decision_valid) begin
                st        <= swap_decision ? SWAP : after_phase;
                stall_cnt <= '0;
              end
        SWAP: if (swap_done) st <= after_phase;
        STALL: begin
          stall_cnt <= stall_cnt + 1'b1;
          if (stall_cnt == stall_cycles - 8'd1) st <= S0;
        end
        DONE: st <= DONE;
        default: st <= IDLE;
      endcase
    end
  end
endmodule
