// swapmemory_assembly: exchanges the connection lists of two PEs.
//
// On `start` it walks the K slots, reading one per cycle from the memory's
// read port B and sending it to the partner on the swap stream (`tx_*`,
// registered). Entries arriving from the partner (`rx_*`, one link register
// later) are written to the same slot through the memory's swap write port;
// each slot is read before the partner's value for it can arrive. When all K
// entries have been received, the CAM is reprogrammed from the shadow RAM,
// one slot per cycle, and `done` pulses. With both PEs started in the same
// cycle a swap takes 2K + 3 cycles from `start` to `done` (27 for K = 12).
// Walking the shadow and position RAMs follows the source design; the
// stream format and the separate CAM pass are this design's choices.
module swapmemory_assembly
  import sp_pkg::*;
#(
  parameter int K = 12
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  output logic  busy,
  output logic  done,
  // memory read port B
  output slot_t rd_addr,
  input  conn_t rd_data,
  // memory swap write port
  output logic  wr_en,
  output slot_t wr_addr,
  output conn_t wr_data,
  // CAM reprogramming
  output logic  cp_we,
  output slot_t cp_addr,
  // stream to the partner
  output logic  tx_valid,
  output slot_t tx_addr,
  output conn_t tx_data,
  // stream from the partner
  input  logic  rx_valid,
  input  slot_t rx_addr,
  input  conn_t rx_data
);
  typedef enum logic [1:0] {IDLE, EXCH, DRAIN, PROG} state_e;
  state_e st;
  slot_t  cnt;
  logic [SLOT_W:0] rx_cnt;

  assign busy    = (st != IDLE);
  assign rd_addr = cnt;
  assign cp_addr = cnt;
  assign cp_we   = (st == PROG);
  assign wr_en   = rx_valid && (st == EXCH || st == DRAIN);
  assign wr_addr = rx_addr;
  assign wr_data = rx_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= IDLE; cnt <= '0; rx_cnt <= '0; done <= 1'b0;
      tx_valid <= 1'b0; tx_addr <= '0; tx_data <= '0;
    end else begin
      done     <= 1'b0;
      tx_valid <= 1'b0;
      if (wr_en) rx_cnt <= rx_cnt + 1'b1;
      case (st)
        IDLE: if (start) begin
          st <= EXCH; cnt <= '0; rx_cnt <= '0;
        end
        EXCH: begin
          tx_valid <= 1'b1;
          tx_addr  <= cnt;
          tx_data  <= rd_data;
          cnt      <= cnt + 1'b1;
          if (cnt == slot_t'(K - 1)) st <= DRAIN;
        end
        DRAIN: if (rx_cnt + (wr_en ? 1 : 0) == (SLOT_W+1)'(K)) begin
          st <= PROG; cnt <= '0;
        end
        PROG: begin
          cnt <= cnt + 1'b1;
          if (cnt == slot_t'(K - 1)) begin
            st <= IDLE; done <= 1'b1;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
