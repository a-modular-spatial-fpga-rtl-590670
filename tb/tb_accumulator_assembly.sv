// tb_accumulator_assembly: a model position RAM with random connection
// lists; for every partner direction checks the local delta cost
// (neighbour-location sum minus own-location sum) and that it is ready
// exactly 19 cycles after start (K = 12) and holds until the next start.
module tb_accumulator_assembly;
  import sp_pkg::*;
  localparam int K = 12;
  logic clk = 0, rst_n = 0, start = 0;
  pos_t loc;
  dir_e dir;
  logic rd_en, busy, delta_valid;
  slot_t rd_addr;
  conn_t rd_data;
  delta_t delta;
  conn_t mem [16];
  int checks = 0, failures = 0;

  accumulator_assembly #(.K(K)) dut (.*);
  assign rd_data = mem[rd_addr];
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int md(pos_t a, pos_t b);
    int dx, dy;
    dx = int'(a.x) - int'(b.x); dy = int'(a.y) - int'(b.y);
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  initial begin
    int cur, hyp, lat;
    pos_t h;
    loc = '0; dir = DIR_NONE;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      loc = '{x: 8'($urandom_range(1, 100)), y: 8'($urandom_range(1, 100))};
      dir = dir_e'(n % 5);
      h = loc;
      case (dir)
        DIR_N: h.y--; DIR_S: h.y++; DIR_E: h.x++; DIR_W: h.x--; default: ;
      endcase
      cur = 0; hyp = 0;
      for (int i = 0; i < 16; i++) begin
        mem[i] = '{valid: ($urandom_range(0, 4) != 0), id: id_t'(i),
                   pos: '{x: 8'($urandom_range(0, 100)), y: 8'($urandom_range(0, 100))}};
        if (i < K && mem[i].valid) begin cur += md(loc, mem[i].pos); hyp += md(h, mem[i].pos); end
      end
      start <= 1; @(posedge clk); start <= 0;
      lat = 1;
      #1;
      while (!delta_valid && lat < 60) begin @(posedge clk); #1; lat++; end
      checks += 2;
      if (lat != 19) begin failures++; $display("FAIL latency %0d", lat); end
      if (int'(delta) != hyp - cur) begin failures++; $display("FAIL delta %0d exp %0d", delta, hyp - cur); end
      repeat (3) @(posedge clk); #1;
      checks++;
      if (!delta_valid || int'(delta) != hyp - cur) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
