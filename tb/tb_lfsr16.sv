// tb_lfsr16: checks the LFSR against a bit-serial reference of the same
// polynomial (x^16 + x^14 + x^13 + x^11 + 1), checks that `en` low holds the
// state, and that the sequence has the full period 65535.
module tb_lfsr16;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] value, ref_v;
  int checks = 0, failures = 0;
  int period;

  lfsr16 #(.SEED(16'h1234)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: Galois step written out bit by bit
  function automatic logic [15:0] ref_step(logic [15:0] s);
    logic [15:0] n;
    logic fb;
    fb = s[0];
    for (int i = 0; i < 15; i++) n[i] = s[i+1];
    n[15] = fb;
    n[13] = s[14] ^ fb;
    n[12] = s[13] ^ fb;
    n[10] = s[11] ^ fb;
    return n;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    checks++; if (value !== 16'h1234) begin failures++; $display("FAIL seed"); end
    ref_v = 16'h1234;
    for (int i = 0; i < 300; i++) begin
      en <= (i % 3 != 2);
      @(posedge clk); #1;
      if (i % 3 != 2) ref_v = ref_step(ref_v);
      checks++;
      if (value !== ref_v) begin failures++; $display("FAIL step %0d: %h vs %h", i, value, ref_v); end
    end
    // period
    en <= 1;
    ref_v = value;
    period = 0;
    do begin
      @(posedge clk); #1;
      period++;
    end while (value != ref_v && period < 70000);
    checks++;
    if (period != 65535) begin failures++; $display("FAIL period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
