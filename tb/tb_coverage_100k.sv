// tb_coverage_100k: the published coverage experiment on the full harness.
//
// The harness runs at its defaults (512-bit PRBS-15 payloads, seeds 0x1ACE
// and 0xC0DE, one error event per 128 bits) until every channel has seen at
// least 100000 corrupted frames, the number of injected cases of the
// experiment. Coverage is then 1 - undetected / corrupted per channel.
// Checks: no false alarm on clean frames; detected + undetected = corrupted;
// CRC-32 misses nothing; the miss counts are ordered CRC-8 >= CRC-16 >= CRC-32
// and stay within a few times the 2^-n aliasing bound; one frame takes
// exactly 512 + 32 clock slots.
module tb_coverage_100k;
  import crc_pkg::*;

  localparam int CASES = 100000;
  localparam int SLOT  = FRAME_BITS + MAX_CRC_BITS;

  logic clk = 1'b0;
  logic reset, run, busy;
  logic [2:0]  frame_done, frame_error, frame_corrupted, tx_crc_valid;
  logic [7:0]  crc8_out, crc8_tx;
  logic [15:0] crc16_out, crc16_tx;
  logic [31:0] crc32_out, crc32_tx;
  logic        payload_valid, payload_bit, flip;
  chan_stats_t stats [3];
  logic [31:0] single_events, burst_events;

  crc_compare_top u_dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  longint cycles = 0;
  always @(posedge clk) if (!reset && (run || busy)) cycles++;

  initial begin : watchdog
    repeat (120000 * SLOT) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real cov;
    run = 1'b0;
    reset = 1'b1;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    run = 1'b1;
    while (stats[0].corrupted < CASES || stats[1].corrupted < CASES || stats[2].corrupted < CASES)
      @(negedge clk);
    run = 1'b0;
    while (busy) @(negedge clk);
    repeat (4) @(negedge clk);
    check("cycles per frame", cycles, longint'(stats[2].frames) * SLOT);
    for (int c = 0; c < 3; c++) begin
      check($sformatf("ch%0d false alarms", c), longint'(stats[c].false_alarm), 0);
      check($sformatf("ch%0d detected+undetected", c),
            longint'(stats[c].detected) + longint'(stats[c].undetected), longint'(stats[c].corrupted));
      cov = 1.0 - real'(stats[c].undetected) / real'(stats[c].corrupted);
      $display("CRC-%0d: frames %0d corrupted %0d undetected %0d coverage %.6f",
               8 << c, stats[c].frames, stats[c].corrupted, stats[c].undetected, cov);
    end
    check("CRC-32 misses", longint'(stats[2].undetected), 0);
    check("CRC-8 misses >= CRC-16 misses", longint'(stats[0].undetected >= stats[1].undetected), 1);
    // 2^-8 of 100000 is about 390; allow up to three times the bound
    check("CRC-8 misses within 3 * 2^-8", longint'(stats[0].undetected <= 3 * CASES / 256), 1);
    check("CRC-8 misses some", longint'(stats[0].undetected > 0), 1);
    check("CRC-16 misses within 20", longint'(stats[1].undetected <= 20), 1);
    $display("events: single %0d burst %0d", single_events, burst_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
