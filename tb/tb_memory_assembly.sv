// tb_memory_assembly: loads a connection list, then runs random mixes of
// position updates (matching and non-matching ids, with lookups enabled
// and disabled), swap-port writes, CAM reprogramming and reads on both
// ports, comparing against a model of the three stores. An update that
// hits is visible on the read ports two cycles after it is presented.
module tb_memory_assembly;
  import sp_pkg::*;
  localparam int K = 12;
  logic clk = 0, rst_n = 0;
  logic ld_we = 0, sw_we = 0, cp_we = 0, lookup_en = 1, upd_valid = 0;
  slot_t ld_addr = '0, ra_addr = '0, rb_addr = '0, sw_addr = '0, cp_addr = '0;
  conn_t ld_data = '0, sw_data = '0, ra_data, rb_data;
  id_t upd_id = '0;
  pos_t upd_pos = '0;
  logic upd_hit;
  conn_t    m_ram [K];   // shadow + position model
  conn_id_t m_cam [K];
  int checks = 0, failures = 0, nhits = 0;

  memory_assembly #(.K(K)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pos_t rpos();
    return '{x: 8'($urandom_range(0, 63)), y: 8'($urandom_range(0, 63))};
  endfunction

  task automatic check_all();
    for (int i = 0; i < K; i++) begin
      ra_addr = slot_t'(i); rb_addr = slot_t'(K - 1 - i);
      #1;
      checks += 2;
      if (ra_data != m_ram[i]) begin failures++; $display("FAIL port A slot %0d", i); end
      if (rb_data != m_ram[K-1-i]) begin failures++; $display("FAIL port B slot %0d", K-1-i); end
    end
  endtask

  initial begin
    int a, hit, ha, en;
    id_t q;
    pos_t p;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // load: distinct ids 100..111, slot 5 unused
    for (int i = 0; i < K; i++) begin
      m_ram[i] = '{valid: (i != 5), id: id_t'(100 + i), pos: rpos()};
      m_cam[i] = '{valid: m_ram[i].valid, id: m_ram[i].id};
      ld_we <= 1; ld_addr <= slot_t'(i); ld_data <= m_ram[i];
      @(posedge clk);
    end
    ld_we <= 0;
    @(posedge clk);
    check_all();
    for (int n = 0; n < 400; n++) begin
      case ($urandom_range(0, 3))
        0, 1: begin  // position update
          q = id_t'($urandom_range(98, 114)); p = rpos(); en = ($urandom_range(0, 4) != 0);
          hit = 0; ha = 0;
          for (int i = K - 1; i >= 0; i--) if (m_cam[i].valid && m_cam[i].id == q) begin hit = 1; ha = i; end
          upd_valid <= 1; upd_id <= q; upd_pos <= p; lookup_en <= en;
          @(posedge clk); #1;
          upd_valid <= 0; upd_pos <= rpos();
          checks++;
          if (upd_hit != (hit && en)) begin failures++; $display("FAIL hit flag id %0d", q); end
          if (hit && en) begin m_ram[ha].pos = p; nhits++; end
          @(posedge clk);
          lookup_en <= 1;
          @(posedge clk);
        end
        2: begin  // swap write (shadow + position), CAM not touched
          a = $urandom_range(0, K - 1);
          m_ram[a] = '{valid: ($urandom_range(0, 3) != 0), id: id_t'($urandom_range(98, 114)), pos: rpos()};
          sw_we <= 1; sw_addr <= slot_t'(a); sw_data <= m_ram[a];
          @(posedge clk);
          sw_we <= 0;
        end
        default: begin  // reprogram one CAM slot from the shadow RAM
          a = $urandom_range(0, K - 1);
          m_cam[a] = '{valid: m_ram[a].valid, id: m_ram[a].id};
          cp_we <= 1; cp_addr <= slot_t'(a);
          @(posedge clk);
          cp_we <= 0;
        end
      endcase
      check_all();
    end
    checks++;
    if (nhits < 20) begin failures++; $display("FAIL too few hits %0d", nhits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
