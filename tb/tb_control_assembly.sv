// tb_control_assembly: walks the state machine through phases with and
// without swaps, with variable waits, and into DONE. Checks the one-cycle
// S0 pulses (step, acc_start, arm), the phase counter (0,1,2,3,0,...),
// that `stall_cycles` (3 here) idle cycles separate phases, that a swap is
// started exactly when a positive decision arrives, that
// nothing starts while waiting or swapping, and that DONE is final.
module tb_control_assembly;
  import sp_pkg::*;
  logic clk = 0, rst_n = 0, go = 0, entropy_done = 0;
  logic decision_valid = 0, swap_decision = 0, swap_done = 0;
  logic step, acc_start, arm, swap_start, finished;
  logic [1:0] phase;
  logic [2:0] state_o;
  int checks = 0, failures = 0, nsteps = 0, nswaps = 0;

  localparam int STALL = 3;
  logic [7:0] stall_cycles = 8'(STALL);
  control_assembly dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (step) nsteps <= nsteps + 1;
    if (swap_start) nswaps <= nswaps + 1;
  end

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
    int exp_steps, exp_swaps;
    bit sw;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (5) begin @(posedge clk); #1; chk(!step && !finished, "idle until go"); end
    go <= 1; @(posedge clk); go <= 0;
    exp_steps = 0; exp_swaps = 0;
    for (int n = 0; n < 40; n++) begin
      #1;
      chk(step && acc_start && arm, "S0 pulses");
      exp_steps++;
      @(posedge clk); #1;
      chk(phase == 2'(n), $sformatf("phase %0d", phase));
      chk(!step && !acc_start, "single-cycle S0");
      repeat ($urandom_range(0, 6)) begin @(posedge clk); #1; chk(!step && !swap_start, "waiting"); end
      sw = $urandom_range(0, 1);
      decision_valid <= 1; swap_decision <= sw;
      #1;
      chk(swap_start == sw, "swap start with decision");
      @(posedge clk);
      decision_valid <= 0; swap_decision <= 0;
      if (sw) begin
        exp_swaps++;
        repeat ($urandom_range(1, 8)) begin @(posedge clk); #1; chk(!step && !swap_start, "swapping"); end
        swap_done <= 1; @(posedge clk); swap_done <= 0;
      end
      repeat (STALL) begin #1; chk(!step, "stall cycles"); @(posedge clk); end
    end
    #1;
    entropy_done <= 1;
    @(posedge clk); #1;
    chk(!step, "no step when done");
    repeat (5) begin
      decision_valid <= 1; swap_decision <= 1;
      @(posedge clk); #1;
      chk(finished && !step && !swap_start, "DONE is final");
    end
    chk(nsteps == exp_steps && nswaps == exp_swaps, $sformatf("counts %0d/%0d %0d/%0d", nsteps, exp_steps, nswaps, exp_swaps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
