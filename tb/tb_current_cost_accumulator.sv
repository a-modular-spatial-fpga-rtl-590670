// tb_current_cost_accumulator: streams random 12-entry connection lists
// (random valid bits and positions) with gaps between them and checks the
// Manhattan sum and the 4-cycle latency after the last entry.
module tb_current_cost_accumulator;
  import sp_pkg::*;
  localparam int K = 12;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  conn_t in_entry = '0;
  pos_t loc;
  logic cost_valid;
  cost_t cost;
  int checks = 0, failures = 0;
  int exp_q[$];
  int last_t[$];
  int cyc = 0;

  current_cost_accumulator dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && cost_valid) begin
    int e, t;
    checks += 2;
    e = exp_q.pop_front(); t = last_t.pop_front();
    if (int'(cost) != e) begin failures++; $display("FAIL cost %0d exp %0d", cost, e); end
    if (cyc - t != 4) begin failures++; $display("FAIL latency %0d", cyc - t); end
  end

  initial begin
    int sum, dx, dy;
    loc = '{x: 8'd5, y: 8'd9};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 50; n++) begin
      sum = 0;
      loc <= '{x: 8'($urandom_range(0, 200)), y: 8'($urandom_range(0, 200))};
      @(posedge clk);
      for (int i = 0; i < K; i++) begin
        in_valid <= 1; in_first <= (i == 0); in_last <= (i == K - 1);
        in_entry.valid <= $urandom_range(0, 3) != 0;
        in_entry.id    <= id_t'($urandom);
        in_entry.pos   <= '{x: 8'($urandom_range(0, 200)), y: 8'($urandom_range(0, 200))};
        #1;
        if (in_entry.valid) begin
          dx = int'(in_entry.pos.x) - int'(loc.x); if (dx < 0) dx = -dx;
          dy = int'(in_entry.pos.y) - int'(loc.y); if (dy < 0) dy = -dy;
          sum += dx + dy;
        end
        if (i == K - 1) begin exp_q.push_back(sum); last_t.push_back(cyc); end
        @(posedge clk);
      end
      in_valid <= 0; in_first <= 0; in_last <= 0;
      repeat (4 + n % 3) @(posedge clk);  // loc must hold while the stream is in flight
    end
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
