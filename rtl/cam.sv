// cam: content addressable memory of the ids of a PE's connected LUTs.
//
// K entries of {valid, id}. A lookup presented in one cycle (`lk_valid`,
// `lk_id`) is answered in the next: `hit` and the lowest matching slot
// `hit_addr`. Entries are written one per cycle through `we`/`waddr`/`wdata`
// (used when loading a netlist and when reprogramming after a swap). The
// source design builds its CAM from FPGA shift-register LUTs; here it is a
// register array compared in parallel, which is this design's own choice.
module cam
  import sp_pkg::*;
#(
  parameter int K = 12
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     we,
  input  slot_t    waddr,
  input  conn_id_t wdata,
  input  logic     lk_valid,
  input  id_t      lk_id,
  output logic     hit,
  output slot_t    hit_addr
);
  conn_id_t entry [K];
  logic     m_hit;
  slot_t    m_addr;

  always_comb begin
    m_hit  = 1'b0;
    m_addr = '0;
    for (int i = K - 1; i >= 0; i--) begin
      if (entry[i].valid && entry[i].id == lk_id) begin
        m_hit  = 1'b1;
        m_addr = slot_t'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) entry[i] <= '0;
      hit <= 1'b0; hit_addr <= '0;
    end else begin
      if (we) entry[waddr] <= wdata;
      hit      <= lk_valid & m_hit;
      hit_addr <= m_addr;
    end
  end
endmodule
