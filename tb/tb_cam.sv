// tb_cam: fills the CAM with random ids (some slots invalid, some ids
// repeated), then compares every lookup against a linear search of a model:
// hit and lowest matching slot, one cycle later. Rewrites entries and
// repeats.
module tb_cam;
  import sp_pkg::*;
  localparam int K = 12;
  logic clk = 0, rst_n = 0, we = 0, lk_valid = 0;
  slot_t waddr = '0;
  conn_id_t wdata = '0;
  id_t lk_id = '0;
  logic hit;
  slot_t hit_addr;
  conn_id_t model [K];
  int checks = 0, failures = 0, nhit = 0;

  cam #(.K(K)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int eh, ea, a;
    id_t q;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < K; i++) model[i] = '0;
    for (int round = 0; round < 20; round++) begin
      for (int w = 0; w < 6; w++) begin
        a = $urandom_range(0, K - 1);
        model[a] = '{valid: ($urandom_range(0, 5) != 0), id: id_t'($urandom_range(0, 20))};
        we <= 1; waddr <= slot_t'(a); wdata <= model[a];
        @(posedge clk);
      end
      we <= 0;
      for (int l = 0; l < 40; l++) begin
        q = id_t'($urandom_range(0, 22));
        eh = 0; ea = 0;
        for (int i = K - 1; i >= 0; i--) if (model[i].valid && model[i].id == q) begin eh = 1; ea = i; end
        lk_valid <= (l % 7 != 3); lk_id <= q;
        @(posedge clk); #1;
        checks++;
        if (l % 7 == 3) begin
          if (hit) begin failures++; $display("FAIL hit without lookup"); end
        end else if (hit != eh || (eh && int'(hit_addr) != ea)) begin
          failures++; $display("FAIL id %0d: hit %0d@%0d exp %0d@%0d", q, hit, hit_addr, eh, ea);
        end
        if (hit) nhit++;
      end
      lk_valid <= 0;
    end
    checks++;
    if (nhit < 50) begin failures++; $display("FAIL too few hits"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
