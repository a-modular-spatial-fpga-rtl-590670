// tb_swapmemory_assembly: two swap-memory units, each with its own model
// memory, joined through one register stage each way (as the PE link is).
// Both are started together; checks that the two connection lists end up
// exchanged slot for slot, that the CAM is reprogrammed once per slot from
// the new shadow contents after the exchange, and the swap length of
// 2K + 3 cycles from start to done.
module tb_swapmemory_assembly;
  import sp_pkg::*;
  localparam int K = 12;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy [2], done [2], wr_en [2], cp_we [2], tx_valid [2];
  slot_t rd_addr [2], wr_addr [2], cp_addr [2], tx_addr [2];
  conn_t rd_data [2], wr_data [2], tx_data [2];
  logic  lv [2];
  slot_t la [2];
  conn_t ld [2];
  conn_t mem [2][K];
  conn_t orig [2][K];
  int cam_writes [2][K];
  logic cam_after_last_rx_ok [2];
  int rx_seen [2];
  int checks = 0, failures = 0;

  for (genvar u = 0; u < 2; u++) begin : g_u
    swapmemory_assembly #(.K(K)) dut (
      .clk, .rst_n, .start, .busy(busy[u]), .done(done[u]),
      .rd_addr(rd_addr[u]), .rd_data(rd_data[u]),
      .wr_en(wr_en[u]), .wr_addr(wr_addr[u]), .wr_data(wr_data[u]),
      .cp_we(cp_we[u]), .cp_addr(cp_addr[u]),
      .tx_valid(tx_valid[u]), .tx_addr(tx_addr[u]), .tx_data(tx_data[u]),
      .rx_valid(lv[1-u]), .rx_addr(la[1-u]), .rx_data(ld[1-u])
    );
    assign rd_data[u] = mem[u][rd_addr[u]];
    always @(posedge clk) begin
      lv[u] <= tx_valid[u]; la[u] <= tx_addr[u]; ld[u] <= tx_data[u];
      if (wr_en[u]) begin mem[u][wr_addr[u]] <= wr_data[u]; rx_seen[u] <= rx_seen[u] + 1; end
      if (cp_we[u]) begin
        cam_writes[u][cp_addr[u]] <= cam_writes[u][cp_addr[u]] + 1;
        if (rx_seen[u] != K || mem[u][cp_addr[u]] != orig[1-u][cp_addr[u]])
          cam_after_last_rx_ok[u] <= 1'b0;
      end
    end
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int round = 0; round < 10; round++) begin
      for (int u = 0; u < 2; u++) begin
        for (int i = 0; i < K; i++) begin
          orig[u][i] = '{valid: ($urandom_range(0, 3) != 0), id: id_t'($urandom),
                         pos: '{x: 8'($urandom), y: 8'($urandom)}};
          mem[u][i] = orig[u][i];
          cam_writes[u][i] = 0;
        end
        cam_after_last_rx_ok[u] = 1'b1;
        rx_seen[u] = 0;
      end
      @(posedge clk);
      start <= 1; @(posedge clk); start <= 0;
      lat = 1;
      #1;
      while (!done[0] && lat < 100) begin @(posedge clk); #1; lat++; end
      checks += 3;
      if (lat != 2 * K + 3) begin failures++; $display("FAIL swap length %0d", lat); end
      if (done[1] !== 1'b1) begin failures++; $display("FAIL partner not done together"); end
      @(posedge clk); #1;
      if (busy[0] || busy[1]) begin failures++; $display("FAIL still busy"); end
      for (int u = 0; u < 2; u++) begin
        for (int i = 0; i < K; i++) begin
          checks += 2;
          if (mem[u][i] != orig[1-u][i]) begin failures++; $display("FAIL unit %0d slot %0d not exchanged", u, i); end
          if (cam_writes[u][i] != 1) begin failures++; $display("FAIL unit %0d slot %0d CAM writes %0d", u, i, cam_writes[u][i]); end
        end
        checks++;
        if (!cam_after_last_rx_ok[u]) begin failures++; $display("FAIL CAM programmed before exchange complete"); end
      end
      repeat ($urandom_range(0, 5)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
