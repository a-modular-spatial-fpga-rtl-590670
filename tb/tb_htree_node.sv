// tb_htree_node: random child offers, keys and parent readiness in each of
// the three modes. Checks against a reference of the crosspoint rules: the
// register reloads only when empty or taken, both offers present -> round
// robin (simple), larger key (sorted, ties round robin) or the random bit
// (random); a single offer is always taken; child_ready marks the taken
// child; flush empties the register.
module tb_htree_node;
  import sp_pkg::*;
  logic clk = 0, rst_n = 0, rnd = 0, flush = 0, parent_ready = 0;
  upd_mode_e mode = UPD_SIMPLE;
  upd_t c0 = '0, c1 = '0, out;
  logic [1:0] child_ready;
  upd_t m_out;
  logic m_rr;
  int checks = 0, failures = 0, took [2];

  htree_node dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic upd_t rupd();
    upd_t u;
    u.valid = ($urandom_range(0, 3) != 0);
    u.id    = id_t'($urandom);
    u.pos   = pos_t'($urandom);
    u.key   = cost_t'($urandom_range(0, 3));
    return u;
  endfunction

  initial begin
    bit ld, pk;
    logic [1:0] ecr;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    m_out = '0; m_rr = 0;
    took[0] = 0; took[1] = 0;
    @(posedge clk); #1;
    for (int n = 0; n < 3000; n++) begin
      mode = upd_mode_e'((n / 1000) % 3);
      c0 = rupd(); c1 = rupd(); rnd = $urandom_range(0, 1);
      parent_ready = $urandom_range(0, 1); flush = ($urandom_range(0, 30) == 0);
      #1;
      ld = !m_out.valid || parent_ready;
      if (c0.valid && c1.valid)
        pk = (mode == UPD_SORTED) ? ((c0.key == c1.key) ? m_rr : (c1.key > c0.key))
           : (mode == UPD_RANDOM) ? rnd : m_rr;
      else pk = c1.valid;
      ecr = {ld && c1.valid && pk, ld && c0.valid && !pk};
      checks++;
      if (child_ready != ecr) begin failures++; $display("FAIL child_ready %b exp %b (n %0d)", child_ready, ecr, n); end
      if (ecr[0]) took[0]++;
      if (ecr[1]) took[1]++;
      @(posedge clk);
      if (flush) m_out = '0;
      else if (ld) begin
        m_out = pk ? c1 : c0;
        if (c0.valid || c1.valid) m_rr = !pk;
      end
      #1;
      checks++;
      if (out != m_out) begin failures++; $display("FAIL out (n %0d)", n); end
    end
    checks++;
    if (took[0] < 100 || took[1] < 100) begin failures++; $display("FAIL one child starved"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
