// tb_error_injector: self-checking testbench of the error injector.
//
// Two instances with the default seed run side by side over 300000 slots.
// Checks: both produce the same pattern (reproducible disturbances for every
// channel); every event is a run of exactly ev_len flipped slots, 1..4, with
// no new event starting inside a run; the event rate is close to one per 128
// slots; every length 1..4 occurs in roughly equal shares; a slot with enable
// low holds the pattern; reset restarts the same pattern.
module tb_error_injector;

  logic clk = 1'b0;
  logic reset, enable;
  logic flip_a, flip_b, start_a, start_b;
  logic [2:0] len_a, len_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  error_injector u_a (.clk, .reset, .enable, .flip(flip_a), .ev_start(start_a), .ev_len(len_a));
  error_injector u_b (.clk, .reset, .enable(1'b1), .flip(flip_b), .ev_start(start_b), .ev_len(len_b));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_range(string what, int got, int lo, int hi);
    checks++;
    if (got < lo || got > hi) begin
      failures++;
      $display("FAIL %s: got %0d outside %0d..%0d", what, got, lo, hi);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int SLOTS = 300000;
  bit pat[64];

  initial begin
    int events, run, want, mism, bad_runs, overlap;
    int by_len[5];
    enable = 1'b1;
    reset = 1'b1;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    events = 0; run = 0; want = 0; mism = 0; bad_runs = 0; overlap = 0;
    foreach (by_len[i]) by_len[i] = 0;
    for (int s = 0; s < SLOTS; s++) begin
      #1;
      if (s < 64) pat[s] = flip_a;
      if (flip_a != flip_b || start_a != start_b) mism++;
      if (start_a) begin
        // the previous event, if any, must have run to exactly its length
        if (want != 0 && run < want) overlap++;
        if (want != 0 && run > want) bad_runs++;
        events++;
        if (len_a >= 1 && len_a <= 4) by_len[len_a]++;
        else bad_runs++;
        want = len_a;
        run = 0;
      end
      if (flip_a) begin
        run++;
        if (want == 0 || run > want) bad_runs++;   // flip outside an event
      end else begin
        if (want != 0 && run != want) bad_runs++;
        want = 0; run = 0;
      end
      @(negedge clk);
    end
    check("identical instances", mism, 0);
    check("runs of ev_len flips", bad_runs, 0);
    check("no event inside a burst", overlap, 0);
    // one event per 128 slots, slightly fewer since no event starts inside a burst
    check_range("event count", events, SLOTS / 128 * 80 / 100, SLOTS / 128 * 110 / 100);
    for (int l = 1; l <= 4; l++) check_range($sformatf("share of length %0d", l), by_len[l], events / 4 * 70 / 100, events / 4 * 130 / 100);
    $display("events=%0d len1=%0d len2=%0d len3=%0d len4=%0d", events, by_len[1], by_len[2], by_len[3], by_len[4]);
    // hold with enable low
    begin
      logic f0, s0;
      f0 = flip_a; s0 = start_a;
      enable = 1'b0;
      repeat (5) @(negedge clk);
      #1;
      check("hold flip", flip_a, f0);
      check("hold start", start_a, s0);
      enable = 1'b1;
    end
    // reset restarts the same pattern
    reset = 1'b1; #1; reset = 1'b0;
    mism = 0;
    for (int s = 0; s < 64; s++) begin
      #1;
      if (flip_a != pat[s]) mism++;
      @(negedge clk);
    end
    check("restart pattern", mism, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
