// entropy_assembly: randomness and cooling schedule of the annealer.
//
// An LFSR (lfsr16) supplies a 16-bit random number; a temperature register
// follows a linear cooling schedule. Each `step` pulse (one per swap phase,
// given by the control assembly) advances the LFSR and latches
//   swap = (random number < temperature)
// and after every STEPS_PER_TEMP steps lowers the temperature by T_STEP,
// never below T_MIN. `done` is high while the temperature is at T_MIN.
// `swap` and `done` are registered and change only in the cycle after a
// step. The two outputs, the comparison and the linear schedule follow the
// source design; all numbers (16-bit values, T_INIT, T_STEP, T_MIN,
// STEPS_PER_TEMP) are this design's own choices.
module entropy_assembly #(
  parameter logic [15:0] SEED           = 16'hACE1,
  parameter logic [15:0] T_INIT         = 16'd4096,
  parameter logic [15:0] T_STEP         = 16'd256,
  parameter logic [15:0] T_MIN          = 16'd0,
  parameter int unsigned STEPS_PER_TEMP = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        step,
  output logic        swap,
  output logic        done,
  output logic [15:0] temperature
);
  logic [15:0] rnd, rnd_next;
  logic [$clog2(STEPS_PER_TEMP+1)-1:0] hold_cnt;

  lfsr16 #(.SEED(SEED)) u_lfsr (.clk, .rst_n, .en(step), .value(rnd));

  // value the LFSR takes at this step (same recurrence as lfsr16)
  assign rnd_next = (rnd >> 1) ^ (rnd[0] ? 16'hB400 : 16'h0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      temperature <= T_INIT;
      hold_cnt    <= '0;
      swap        <= 1'b0;
    end else if (step) begin
      swap <= (rnd_next < temperature);
      if (hold_cnt == $bits(hold_cnt)'(STEPS_PER_TEMP - 1)) begin
        hold_cnt    <= '0;
        temperature <= (temperature > T_MIN + T_STEP) ? temperature - T_STEP : T_MIN;
      end else begin
        hold_cnt <= hold_cnt + 1'b1;
      end
    end
  end

  assign done = (temperature <= T_MIN);
endmodule
