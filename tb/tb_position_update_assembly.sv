// tb_position_update_assembly: checks the upward offer (id, location and
// key = distance from the last broadcast position), the one-cycle pass of
// broadcasts to the memory side, the tracking of the own element's last
// broadcast position, the swap and init loads, and the count of taken
// offers.
module tb_position_update_assembly;
  import sp_pkg::*;
  logic clk = 0, rst_n = 0, init_load = 0, swap_load = 0, up_ready = 0;
  pos_t loc = '{x: 8'd3, y: 8'd7};
  id_t le_id = id_t'(42);
  pos_t swap_bpos = '0, le_bpos;
  upd_t up, down = '0;
  logic mem_upd_valid;
  id_t mem_upd_id;
  pos_t mem_upd_pos;
  logic [31:0] sent;
  int checks = 0, failures = 0, nready = 0;

  position_update_assembly dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s", w); end
  endtask

  function automatic int md(pos_t a, pos_t b);
    int dx, dy;
    dx = int'(a.x) - int'(b.x); dy = int'(a.y) - int'(b.y);
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  initial begin
    pos_t bp, p;
    id_t q;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    init_load <= 1; @(posedge clk); init_load <= 0; #1;
    bp = loc;
    chk(le_bpos == loc && up.key == 0, "init load");
    for (int n = 0; n < 300; n++) begin
      q = ($urandom_range(0, 3) == 0) ? le_id : id_t'($urandom_range(0, 60));
      p = '{x: 8'($urandom_range(0, 30)), y: 8'($urandom_range(0, 30))};
      down <= '{valid: ($urandom_range(0, 5) != 0), id: q, pos: p, key: '0};
      up_ready <= $urandom_range(0, 1);
      swap_load <= ($urandom_range(0, 9) == 0);
      swap_bpos <= '{x: 8'($urandom_range(0, 30)), y: 8'($urandom_range(0, 30))};
      #1;
      chk(up.valid && up.id == le_id && up.pos == loc, "offer fields");
      chk(int'(up.key) == md(loc, bp), "offer key");
      if (up_ready) nready++;
      @(posedge clk); #1;
      chk(mem_upd_valid == down.valid && mem_upd_id == down.id && mem_upd_pos == down.pos,
          "broadcast passed to memory after one cycle");
      if (swap_load) bp = swap_bpos;
      else if (down.valid && down.id == le_id) bp = down.pos;
      chk(le_bpos == bp, "last broadcast position");
      chk(sent == 32'(nready), "sent count");
      if (n == 150) le_id = id_t'(7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
