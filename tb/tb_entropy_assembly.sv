// tb_entropy_assembly: checks the swap bit (random < temperature) and the
// linear cooling schedule against a model, and that done rises exactly when
// the temperature reaches its minimum (after (T_INIT-T_MIN)/T_STEP *
// STEPS_PER_TEMP steps) and never earlier.
module tb_entropy_assembly;
  localparam logic [15:0] T_INIT = 16'd40000, T_STEP = 16'd10000, T_MIN = 16'd0;
  localparam int SPT = 3;
  logic clk = 0, rst_n = 0, step = 0;
  logic swap, done;
  logic [15:0] temperature;
  logic [15:0] r, t;
  int checks = 0, failures = 0, nsw = 0;

  entropy_assembly #(.SEED(16'hBEEF), .T_INIT(T_INIT), .T_STEP(T_STEP),
                     .T_MIN(T_MIN), .STEPS_PER_TEMP(SPT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] nxt(logic [15:0] s);
    return {s[0], s[15:1]} ^ (s[0] ? 16'h3400 : 16'h0);
  endfunction

  task automatic chk(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s", w); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    chk(temperature == T_INIT && !done, "reset state");
    r = 16'hBEEF; t = T_INIT;
    for (int k = 0; k < 4 * SPT; k++) begin
      step <= 1; @(posedge clk); #1;
      step <= 0;
      r = nxt(r);
      chk(swap == (r < t), $sformatf("swap bit at step %0d", k));
      if (swap) nsw++;
      if (k % SPT == SPT - 1) t = t - T_STEP;
      chk(temperature == t, $sformatf("temperature at step %0d", k));
      chk(done == (k == 4 * SPT - 1), $sformatf("done at step %0d", k));
      repeat (2) begin @(posedge clk); #1; end
      chk(temperature == t, "holds without step");
    end
    chk(nsw > 0, "some random swaps at high temperature");
    // at minimum: swap never set
    for (int k = 0; k < 5; k++) begin
      step <= 1; @(posedge clk); #1; step <= 0;
      chk(!swap && done && temperature == T_MIN, "frozen at minimum");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
