// tb_crc_compare_top: end-to-end testbench of the CRC comparison harness at
// its default size (512-bit payloads, CRC-8/16/32, one error event per 128
// bits).
//
// The testbench records, slot by slot, the payload bits, and the flip pattern
// of the shared injector. For every frame it checks independently of the RTL:
//   - the payload equals the PRBS-15 sequence of x^15+x^14+1 from seed 0x1ACE;
//   - each encoder's appended remainder equals the long-division CRC;
//   - each checker's remainder equals the long-division remainder of that
//     channel's codeword with the recorded flips applied, error is set exactly
//     when it is non-zero, and `corrupted` says whether a flip hit the codeword;
//   - the result strobes come exactly payload + n + 1 cycles after the first
//     payload bit.
// At the end the per-channel counters must equal the testbench's own tallies,
// there must be no false alarm, and every mechanism must have occurred:
// single flips, bursts, clean frames, detected frames on every channel, an
// undetected frame on CRC-8, encoder back-pressure, and a stop of `run` that
// lets the frame in progress finish.
module tb_crc_compare_top;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  localparam int NFRAMES = 2000;
  localparam int SLOT    = FRAME_BITS + MAX_CRC_BITS;
  localparam int WIDTHS [3] = '{8, 16, 32};
  localparam logic [31:0] POLYS [3] = '{32'h07, 32'h8005, 32'h04C11DB7};
  localparam logic [31:0] SEEDS [3] = '{32'hFF, 32'hFFFF, 32'hFFFFFFFF};

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
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %h expected %h", what, got, exp);
      if (failures >= 1000) begin
        $display("too many failures, stopping");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  endtask

  // ---- independent PRBS-15 model ---------------------------------------
  logic [14:0] prbs_hist = 15'h1ACE;   // bit k: produced k+1 steps ago
  function automatic bit prbs_next(ref logic [14:0] h);
    bit b = h[13] ^ h[14];
    h = {h[13:0], b};
    return b;
  endfunction

  // ---- per-frame recording ---------------------------------------------
  int   cycle = 0;
  int   slot = 0;           // slot index within the current frame
  bit   in_frame = 0;
  bit   pay[$];
  bit   flips[$];           // flip of each slot of the frame
  int   frame_start;
  int   frames_seen [3] = '{0, 0, 0};
  bitq_t pay_q [$];         // payloads of frames awaiting results
  bitq_t flip_q [$];
  int    start_q [$];

  // own tallies
  int t_frames [3], t_corr [3], t_det [3], t_undet [3];
  int m_clean = 0, m_backpressure = 0;

  always @(posedge clk) begin
    cycle++;
    if (!reset) begin
      // back-pressure: an encoder refusing input while a frame is in progress
      if (busy && !payload_valid) m_backpressure++;
      if (payload_valid) begin
        automatic bit e = prbs_next(prbs_hist);
        if (!in_frame) begin
          in_frame = 1; slot = 0; pay.delete(); flips.delete(); frame_start = cycle;
        end
        check("payload PRBS-15 bit", {31'h0, payload_bit}, {31'h0, e});
        pay.push_back(payload_bit);
      end
      if (in_frame) begin
        flips.push_back(flip);
        slot++;
        if (slot == SLOT) begin
          pay_q.push_back(pay);
          flip_q.push_back(flips);
          start_q.push_back(frame_start);
          in_frame = 0;
        end
      end
      // encoder remainders
      if (tx_crc_valid[0]) check("tx crc8",  {24'h0, crc8_tx},  ref_crc(8,  POLYS[0], SEEDS[0], pay));
      if (tx_crc_valid[1]) check("tx crc16", {16'h0, crc16_tx}, ref_crc(16, POLYS[1], SEEDS[1], pay));
      if (tx_crc_valid[2]) check("tx crc32", crc32_tx,          ref_crc(32, POLYS[2], SEEDS[2], pay));
      // checker results
      for (int c = 0; c < 3; c++) begin
        if (frame_done[c]) begin
          automatic int    f = frames_seen[c];
          automatic int    n = WIDTHS[c];
          automatic bitq_t p, cw, fl;
          automatic logic [31:0] r, rx;
          automatic bit    hit = 0;
          automatic int    st;
          // the frame this result belongs to; for CRC-32 the slot record
          // completes in this very cycle, for the others it is still open
          if (f < pay_q.size() + frames_done_base) begin
            p  = pay_q[f - frames_done_base];
            fl = flip_q[f - frames_done_base];
            st = start_q[f - frames_done_base];
          end else begin
            p  = pay;
            fl = flips;
            st = frame_start;
          end
          r  = ref_crc(n, POLYS[c], SEEDS[c], p);
          cw = p;
          for (int i = n - 1; i >= 0; i--) cw.push_back(r[i]);
          for (int i = 0; i < cw.size(); i++) if (fl[i]) begin cw[i] = !cw[i]; hit = 1; end
          r  = ref_crc(n, POLYS[c], SEEDS[c], cw);
          rx = (c == 0) ? {24'h0, crc8_out} : (c == 1) ? {16'h0, crc16_out} : crc32_out;
          check($sformatf("crc%0d remainder frame %0d", n, f), rx, r);
          check($sformatf("crc%0d error frame %0d", n, f), {31'h0, frame_error[c]}, {31'h0, r != 0});
          check($sformatf("crc%0d corrupted frame %0d", n, f), {31'h0, frame_corrupted[c]}, {31'h0, hit});
          check($sformatf("crc%0d latency frame %0d", n, f), cycle - st, FRAME_BITS + n);
          t_frames[c]++;
          if (hit) begin
            t_corr[c]++;
            if (r != 0) t_det[c]++; else t_undet[c]++;
          end
          if (c == 2 && !hit) m_clean++;
          frames_seen[c]++;
        end
      end
      // drop frames every channel has reported
      while (pay_q.size() > 0 && frames_seen[0] > frames_done_base && frames_seen[1] > frames_done_base
             && frames_seen[2] > frames_done_base) begin
        void'(pay_q.pop_front()); void'(flip_q.pop_front()); void'(start_q.pop_front());
        frames_done_base++;
      end
    end
  end
  int frames_done_base = 0;

  initial begin : watchdog
    repeat (NFRAMES * SLOT + 20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int stop_ok;
    run = 1'b0;
    reset = 1'b1;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    run = 1'b1;
    // stop once in the middle of a frame, then resume
    while (frames_seen[2] < 3) @(negedge clk);
    repeat (100) @(negedge clk);
    run = 1'b0;
    while (busy) @(negedge clk);
    repeat (50) @(negedge clk);
    stop_ok = (frames_seen[2] == 4 && !busy) ? 1 : 0;
    check("run stop finishes the frame", stop_ok, 1);
    run = 1'b1;
    while (frames_seen[2] < NFRAMES - 1) @(negedge clk);
    run = 1'b0;
    while (busy) @(negedge clk);
    repeat (10) @(negedge clk);
    for (int c = 0; c < 3; c++) begin
      check($sformatf("ch%0d frames counter", c), stats[c].frames, t_frames[c]);
      check($sformatf("ch%0d corrupted counter", c), stats[c].corrupted, t_corr[c]);
      check($sformatf("ch%0d detected counter", c), stats[c].detected, t_det[c]);
      check($sformatf("ch%0d undetected counter", c), stats[c].undetected, t_undet[c]);
      check($sformatf("ch%0d false alarms", c), stats[c].false_alarm, 0);
      check($sformatf("ch%0d frames", c), t_frames[c], NFRAMES);
      check($sformatf("ch%0d detected happened", c), {31'h0, t_det[c] > 0}, 1);
      $display("CRC-%0d: frames %0d corrupted %0d detected %0d undetected %0d",
               WIDTHS[c], t_frames[c], t_corr[c], t_det[c], t_undet[c]);
    end
    $display("events: single %0d burst %0d, clean frames %0d, back-pressure cycles %0d",
             single_events, burst_events, m_clean, m_backpressure);
    check("single flips happened", {31'h0, single_events > 0}, 1);
    check("bursts happened", {31'h0, burst_events > 0}, 1);
    check("clean frames happened", {31'h0, m_clean > 0}, 1);
    check("back-pressure happened", {31'h0, m_backpressure > 0}, 1);
    check("CRC-8 miss happened", {31'h0, t_undet[0] > 0}, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
