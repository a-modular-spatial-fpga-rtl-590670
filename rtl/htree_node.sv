// htree_node: one crosspoint of the H-tree's upward path.
//
// Holds one position update in an output register. The register is
// (re)loaded whenever it is empty or the parent takes its content
// (`parent_ready`); it then takes one of the two children's offers and tells
// that child so (`child_ready`). Which child wins when both offer:
//   UPD_SIMPLE : alternate (round robin), so every leaf below gets an equal
//                share of the slots;
//   UPD_SORTED : the larger key (largest position change), ties alternate;
//   UPD_RANDOM : the random bit `rnd`.
// `flush` empties the register (tree reset of the sorted and random modes).
// `child_ready` depends combinationally on `parent_ready`. The three
// policies are the source design's update methods; the valid/ready
// arrangement is this design's own.
module htree_node
  import sp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  upd_mode_e  mode,
  input  logic       rnd,
  input  logic       flush,
  input  upd_t       c0,
  input  upd_t       c1,
  output logic [1:0] child_ready,
  input  logic       parent_ready,
  output upd_t       out
);
  logic rr;      // child preferred next in round robin
  logic load, pick;

  assign load = !out.valid || parent_ready;

  always_comb begin
    if (c0.valid && c1.valid) begin
      case (mode)
        UPD_SORTED: pick = (c0.key == c1.key) ? rr : (c1.key > c0.key);
        UPD_RANDOM: pick = rnd;
        default:    pick = rr;
      endcase
    end else begin
      pick = c1.valid;
    end
    child_ready[0] = load && c0.valid && !pick;
    child_ready[1] = load && c1.valid && pick;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      out <= '0;
      if (!rst_n) rr <= 1'b0;
    end else if (load) begin
      out <= pick ? c1 : c0;
      if (c0.valid || c1.valid) rr <= !pick;
    end
  end
endmodule
