// tb_diff_accumulator: random cost pairs; checks delta = hyp - cur
// (signed), that delta_valid rises 2 cycles after the hypothetical cost and
// holds until clear.
module tb_diff_accumulator;
  import sp_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, cur_valid = 0, hyp_valid = 0;
  cost_t cur_cost = '0, hyp_cost = '0;
  logic delta_valid;
  delta_t delta;
  int checks = 0, failures = 0;

  diff_accumulator dut (.*);
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

  initial begin
    int c, h, gap;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 100; n++) begin
      c = $urandom_range(0, 6000); h = $urandom_range(0, 6000); gap = $urandom_range(1, 3);
      clear <= 1; @(posedge clk); clear <= 0;
      #1 chk(!delta_valid, "cleared");
      cur_valid <= 1; cur_cost <= cost_t'(c); @(posedge clk); cur_valid <= 0;
      cur_cost <= cost_t'($urandom);
      repeat (gap - 1) @(posedge clk);
      hyp_valid <= 1; hyp_cost <= cost_t'(h); @(posedge clk); hyp_valid <= 0;
      hyp_cost <= cost_t'($urandom);
      #1 chk(!delta_valid, "not yet after 1 cycle");
      @(posedge clk); #1;
      chk(delta_valid && int'(delta) == h - c, $sformatf("delta %0d exp %0d", delta, h - c));
      repeat (3) @(posedge clk); #1;
      chk(delta_valid && int'(delta) == h - c, "delta holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
