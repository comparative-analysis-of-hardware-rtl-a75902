// tb_crc_encoder: self-checking testbench of the serial CRC encoder (CRC-16
// defaults: x^16+x^15+x^2+1, seed 0xFFFF).
//
// Random messages are offered with random idle cycles and back-to-back frames.
// A monitor collects the codeword stream; every codeword must equal the
// message followed by the long-division remainder, MSB first, and out_last
// must mark its final bit. crc_out must show the remainder when crc_valid is
// high, in_ready must be low for exactly 16 cycles after each message, and
// the codeword must take exactly message + 16 cycles when the sender never
// idles.
module tb_crc_encoder;
  import crc_ref_pkg::*;

  localparam int W = 16;
  logic clk = 1'b0;
  logic reset;
  logic in_valid, in_ready, in_data, in_last;
  logic out_valid, out_data, out_last, crc_valid;
  logic [W-1:0] crc_out;
  int checks = 0, failures = 0;

  bitq_t sent[$];      // messages in order
  bitq_t cur_rx;
  int    frames_rx = 0;
  int    busy_cycles = 0;
  int    cycle = 0;
  int    last_cycle = 0;
  int    first_cycle = 0;
  bit    fresh = 1'b1;

  always #5 clk = ~clk;

  crc_encoder u_dut (.*);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // monitor
  always @(posedge clk) begin
    cycle++;
    if (!reset) begin
      if (!in_ready) busy_cycles++;
      if (in_valid && in_ready) begin
        if (fresh) first_cycle = cycle;
        fresh = in_last;
      end
      if (crc_valid) begin
        check($sformatf("crc_out frame %0d", frames_rx), {16'h0, crc_out},
              ref_crc(W, 32'h8005, 32'hFFFF, sent[frames_rx]));
      end
      if (out_valid) begin
        cur_rx.push_back(out_data);
        if (out_last) begin
          automatic bitq_t exp = sent[frames_rx];
          automatic logic [31:0] r = ref_crc(W, 32'h8005, 32'hFFFF, exp);
          last_cycle = cycle;
          for (int i = W - 1; i >= 0; i--) exp.push_back(r[i]);
          check($sformatf("codeword length %0d", frames_rx), cur_rx.size(), exp.size());
          if (cur_rx.size() == exp.size()) begin
            automatic int bad = 0;
            foreach (exp[i]) if (exp[i] != cur_rx[i]) bad++;
            check($sformatf("codeword bits %0d", frames_rx), bad, 0);
          end
          cur_rx.delete();
          frames_rx++;
        end
      end
    end
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Inputs change at the falling edge; acceptance is sampled just before the
  // rising edge that takes the bit.
  task automatic send(bitq_t m, bit gaps);
    int i = 0;
    bit acc;
    while (i < m.size()) begin
      @(negedge clk);
      in_valid = gaps ? 1'($urandom % 4 != 0) : 1'b1;
      in_data  = m[i];
      in_last  = (i == m.size() - 1);
      #1;
      acc = in_valid && in_ready;
      @(posedge clk);
      if (acc) i++;
    end
    @(negedge clk);
    in_valid = 1'b0; in_last = 1'b0;
  endtask

  initial begin
    int len, t0, nframes;
    bitq_t m;
    in_valid = 0; in_data = 0; in_last = 0;
    reset = 1'b1;
    repeat (2) @(posedge clk);
    reset <= 1'b0;
    repeat (3) @(posedge clk);
    nframes = 40;
    for (int f = 0; f < nframes; f++) begin
      len = 1 + ($urandom % 200);
      m.delete();
      for (int i = 0; i < len; i++) m.push_back(1'($urandom));
      sent.push_back(m);
      t0 = busy_cycles;
      send(m, f % 2 == 1);
      // wait out the append phase
      while (!in_ready) @(negedge clk);
      check($sformatf("append cycles %0d", f), busy_cycles - t0, W);
    end
    // timing of one frame without gaps: 100 message bits + 16 appended
    m.delete();
    for (int i = 0; i < 100; i++) m.push_back(1'($urandom));
    sent.push_back(m);
    send(m, 1'b0);
    while (!in_ready) @(negedge clk);
    check("frame latency cycles", last_cycle - first_cycle + 1, 100 + W);
    nframes++;
    repeat (5) @(posedge clk);
    check("frames received", frames_rx, nframes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
