// tb_swap_assembly: random deltas, entropy bits and partner presence.
// Checks the decision rule (swap if either entropy bit is set or the summed
// delta is negative, never without a partner), the 4-cycle latency from the
// fire condition, one decision per arm, and that values tagged with
// another phase or not yet valid never fire.
module tb_swap_assembly;
  import sp_pkg::*;
  logic clk = 0, rst_n = 0, arm = 0, has_partner = 0;
  logic [1:0] cur_phase = 0, local_phase = 0, ext_phase = 0;
  logic local_valid = 0, ext_valid = 0, local_rnd = 0, ext_rnd = 0;
  delta_t local_delta = '0, ext_delta = '0;
  logic decision_valid, swap_decision;
  int checks = 0, failures = 0, nswap = 0, nno = 0;

  swap_assembly dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s", w); end
  endtask

  initial begin
    int ld, ed, lat, ndec;
    bit lr, er, hp, exp_sw;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      ld = $urandom_range(0, 400) - 200; ed = $urandom_range(0, 400) - 200;
      lr = ($urandom_range(0, 4) == 0); er = ($urandom_range(0, 4) == 0);
      hp = ($urandom_range(0, 5) != 0);
      exp_sw = hp && (lr || er || (ld + ed < 0));
      cur_phase <= 2'(n);
      arm <= 1; @(posedge clk); arm <= 0;
      // stale values from the previous phase: must not fire
      local_valid <= 1; local_phase <= 2'(n - 1); ext_valid <= 1; ext_phase <= 2'(n - 1);
      has_partner <= hp;
      repeat (6) begin @(posedge clk); #1; chk(!decision_valid, "stale phase fired"); end
      // local valid only, partner not yet
      local_valid <= 1; local_phase <= 2'(n); local_delta <= delta_t'(ld); local_rnd <= lr;
      ext_valid <= 0; ext_phase <= 2'(n); ext_delta <= delta_t'(ed); ext_rnd <= er;
      if (hp) repeat (6) begin @(posedge clk); #1; chk(!decision_valid, "fired without partner delta"); end
      ext_valid <= 1;
      lat = 1; ndec = 0;
      // fire condition holds in the cycle before this edge
      @(posedge clk); #1;
      while (!decision_valid && lat < 20) begin @(posedge clk); #1; lat++; end
      chk(lat == 4, $sformatf("latency %0d", lat));
      chk(swap_decision == exp_sw, $sformatf("decision %0d exp %0d (ld %0d ed %0d lr %0d er %0d hp %0d)",
                                             swap_decision, exp_sw, ld, ed, lr, er, hp));
      if (swap_decision) nswap++; else nno++;
      repeat (8) begin @(posedge clk); #1; if (decision_valid) ndec++; end
      chk(ndec == 0, "only one decision per arm");
      local_valid <= 0; ext_valid <= 0;
    end
    chk(nswap > 20 && nno > 20, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
