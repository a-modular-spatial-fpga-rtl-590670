// lfsr16: 16-bit Galois linear-feedback shift register, the random number
// source of the entropy assembly and of the random H-tree crosspoints.
//
// Polynomial x^16 + x^14 + x^13 + x^11 + 1 (maximal length, period 65535).
// The state advances by one step in every cycle with `en` high; `value` is
// the current state. Reset loads SEED, which must be non-zero. The use of an
// LFSR follows the source design; the polynomial, width and seed are this
// design's own choice.
module lfsr16 #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [15:0] value
);
  localparam logic [15:0] TAPS = 16'hB400;

  always_ff @(posedge clk) begin
    if (!rst_n)   value <= (SEED == 16'h0) ? 16'h1 : SEED;
    else if (en)  value <= (value >> 1) ^ (value[0] ? TAPS : 16'h0);
  end
endmodule
