// tb_prbs15: self-checking testbench of the PRBS-15 source.
//
// The expected sequence is generated from the recurrence b[t] = b[t-14] ^
// b[t-15] of x^15 + x^14 + 1, with the 15 bits before t = 0 taken from the
// seed 0x1ACE (bit k of the seed is the bit produced k+1 steps earlier).
// Checks: the first 40000 bits match; the sequence repeats with period 32767
// and not with period 32767/7 or 32767/31 (the prime factors); a cycle with
// enable low holds the state; reset restarts the sequence.
module tb_prbs15;

  logic clk = 1'b0;
  logic reset, enable, bit_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  prbs15 u_dut (.*);

  localparam int N = 40000;
  bit exp_b[N];
  bit got_b[N];

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit hist(int t);
    logic [14:0] seed = 15'h1ACE;
    return (t < 0) ? seed[-t - 1] : exp_b[t];
  endfunction

  initial begin
    int bad, per_bad, p7, p31;
    bit held;
    for (int t = 0; t < N; t++) exp_b[t] = hist(t - 14) ^ hist(t - 15);
    enable = 1'b0;
    reset = 1'b1;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    enable = 1'b1;
    for (int t = 0; t < N; t++) begin
      #1 got_b[t] = bit_out;
      // one held cycle in the middle
      if (t == 1000) begin
        held = bit_out;
        enable = 1'b0;
        @(negedge clk);
        checks++;
        if (bit_out != held) begin failures++; $display("FAIL hold"); end
        enable = 1'b1;
        #1;
      end
      @(negedge clk);
    end
    bad = 0;
    foreach (exp_b[t]) if (exp_b[t] != got_b[t]) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %0d sequence bits differ", bad); end
    per_bad = 0; p7 = 0; p31 = 0;
    for (int t = 0; t < N - 32767; t++) if (got_b[t] != got_b[t + 32767]) per_bad++;
    for (int t = 0; t < 2000; t++) begin
      if (got_b[t] != got_b[t + 4681]) p7++;
      if (got_b[t] != got_b[t + 1057]) p31++;
    end
    checks++;
    if (per_bad != 0) begin failures++; $display("FAIL period 32767 broken at %0d bits", per_bad); end
    checks++;
    if (p7 == 0 || p31 == 0) begin failures++; $display("FAIL shorter period"); end
    // reset restarts the sequence
    reset = 1'b1; #1; reset = 1'b0;
    for (int t = 0; t < 30; t++) begin
      #1;
      checks++;
      if (bit_out != exp_b[t]) begin failures++; $display("FAIL restart bit %0d", t); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
