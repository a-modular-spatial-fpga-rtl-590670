// htree: H-tree that broadcasts position updates to all PEs.
//
// The N_LEAVES leaves (PEs) form the bottom of a binary tree of depth
// L = ceil(log2(N_LEAVES)) (missing leaves offer nothing). Upward, L levels
// of htree_node crosspoints each keep one update in a register and choose
// between their two children by the mode in `mode`; one update per cycle
// leaves the root. Downward, the root's update passes L levels of
// registers (one per tree node, fanning out by two) so that every leaf sees
// the same update exactly L cycles after it left the root; `bcast` shows the
// root's update. In the sorted and random modes the whole tree is emptied
// (flushed) after every BURST updates that leave the root, so the tree
// refills with fresh data. The tree shape, the L-cycle latency, the three
// modes and the burst reset follow the source design; registers per level,
// the node arbitration and the LFSR for random picks are this design's own.
module htree
  import sp_pkg::*;
#(
  parameter int N_LEAVES = 16,
  parameter int BURST    = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  upd_mode_e mode,
  input  upd_t      leaf_up    [N_LEAVES],
  output logic      leaf_ready [N_LEAVES],
  output upd_t      leaf_down  [N_LEAVES],
  output upd_t      bcast,
  output logic      flushing
);
  localparam int L = (N_LEAVES < 2) ? 1 : $clog2(N_LEAVES);
  localparam int P = 1 << L;

  upd_t  up    [2*P];   // heap-indexed: 1 = root, P..2P-1 = leaves
  upd_t  down  [2*P];   // down[n] = register at tree node n (n >= 2)
  logic [15:0] rnd;
  logic [$clog2(BURST+1)-1:0] burst_cnt;
  logic  flush;

  lfsr16 #(.SEED(16'h1D2B)) u_lfsr (.clk, .rst_n, .en(1'b1), .value(rnd));

  // leaves
  for (genvar i = 0; i < P; i++) begin : g_leaf
    if (i < N_LEAVES) begin : g_real
      assign up[P+i]        = leaf_up[i];
      assign leaf_ready[i]  = g_node[(P+i)/2].cr[(P+i)%2];
      assign leaf_down[i]   = down[P+i];
    end else begin : g_pad
      assign up[P+i] = '0;
    end
  end

  // upward crosspoints
  assign up[0] = '0;
  for (genvar n = 1; n < P; n++) begin : g_node
    logic [1:0] cr;   // ready to this node's two children
    logic       pr;   // ready from the parent
    if (n == 1) begin : g_root
      assign pr = 1'b1;
    end else begin : g_inner
      assign pr = g_node[n/2].cr[n%2];
    end
    htree_node u_node (
      .clk, .rst_n, .mode, .rnd(rnd[n % 16]), .flush,
      .c0(up[2*n]), .c1(up[2*n+1]),
      .child_ready(cr), .parent_ready(pr),
      .out(up[n])
    );
  end

  // downward broadcast registers
  assign down[0] = '0;
  assign down[1] = up[1];
  assign bcast   = up[1];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 2; n < 2*P; n++) down[n] <= '0;
    end else begin
      for (int n = 2; n < 2*P; n++) down[n] <= down[n/2];
    end
  end

  // burst reset for sorted and random modes
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      burst_cnt <= '0;
      flush     <= 1'b0;
    end else begin
      flush <= 1'b0;
      if (mode != UPD_SIMPLE && up[1].valid && !flush) begin
        if (burst_cnt == $bits(burst_cnt)'(BURST - 1)) begin
          burst_cnt <= '0;
          flush     <= 1'b1;
        end else begin
          burst_cnt <= burst_cnt + 1'b1;
        end
      end
    end
  end
  assign flushing = flush;
endmodule
