// tb_crc_checker: self-checking testbench of the serial CRC checker (CRC-16
// defaults: x^16+x^15+x^2+1, seed 0xFFFF).
//
// Codewords are built from random messages and their long-division remainder.
// Some are sent intact, some with one flipped bit, a 2..16-bit burst, or a few
// random flips. For each codeword the expected remainder is the long-division
// remainder of the received bits, which is zero for an intact codeword. The
// checker's done must come exactly one cycle after the last bit, with crc_out
// equal to that remainder and error set when it is non-zero. Single-bit
// errors, bursts no longer than 16 bits and odd-weight errors must always be
// flagged. Frames are sent back to back and with idle cycles.
module tb_crc_checker;
  import crc_ref_pkg::*;

  localparam int W = 16;
  logic clk = 1'b0;
  logic reset;
  logic valid, ready, data_in, last;
  logic done, error;
  logic [W-1:0] crc_out;
  int checks = 0, failures = 0;
  int cycle = 0;
  int last_cycle = -10;
  logic [31:0] exp_q[$];
  int kind_q[$];
  int n_done = 0, n_flagged = 0, n_clean = 0, n_odd = 0;

  always #5 clk = ~clk;

  crc_checker u_dut (.*);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  always @(posedge clk) begin
    cycle++;
    if (!reset) begin
      if (done) begin
        automatic logic [31:0] e = exp_q.pop_front();
        automatic int kind = kind_q.pop_front();
        check($sformatf("done latency %0d", n_done), cycle - last_cycle, 1);
        check($sformatf("remainder %0d", n_done), {16'h0, crc_out}, e);
        check($sformatf("error flag %0d", n_done), {31'h0, error}, {31'h0, e != 0});
        if (kind == 1 || kind == 2) check($sformatf("burst/single flagged %0d", n_done), {31'h0, error}, 1);
        // x^16+x^15+x^2+1 has the factor (x+1): every odd-weight error is caught
        if (kind == 4) check($sformatf("odd weight flagged %0d", n_done), {31'h0, error}, 1);
        if (kind == 0) n_clean++;
        if (error) n_flagged++;
        n_done++;
      end
      if (valid && last) last_cycle = cycle;
    end
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bitq_t m, cw;
    logic [31:0] r;
    int len, kind, pos, bl, nframes;
    valid = 0; data_in = 0; last = 0;
    reset = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    check("ready", {31'h0, ready}, 1);
    nframes = 120;
    for (int f = 0; f < nframes; f++) begin
      len = 1 + ($urandom % 150);
      m.delete();
      for (int i = 0; i < len; i++) m.push_back(1'($urandom));
      r = ref_crc(W, 32'h8005, 32'hFFFF, m);
      cw = m;
      for (int i = W - 1; i >= 0; i--) cw.push_back(r[i]);
      kind = f % 4;           // 0 clean, 1 single flip, 2 burst <= W, 3 random flips
      case (kind)
        1: begin pos = $urandom % cw.size(); cw[pos] = !cw[pos]; end
        2: begin
          bl = 2 + ($urandom % (W - 1));
          if (bl > cw.size()) bl = cw.size();
          pos = $urandom % (cw.size() - bl + 1);
          cw[pos] = !cw[pos];
          cw[pos + bl - 1] = !cw[pos + bl - 1];
          for (int i = pos + 1; i < pos + bl - 1; i++) cw[i] = cw[i] ^ 1'($urandom);
        end
        3: for (int j = 0; j < 2 + ($urandom % 5); j++) begin
          pos = $urandom % cw.size(); cw[pos] = !cw[pos];
        end
        default: ;
      endcase
      if (kind == 3) begin
        int wgt = 0;
        for (int i = 0; i < m.size(); i++) if (cw[i] != m[i]) wgt++;
        for (int i = 0; i < W; i++) if (cw[m.size() + i] != r[W - 1 - i]) wgt++;
        if (wgt % 2 == 1) kind = 4;
        if (kind == 4) n_odd++;
      end
      exp_q.push_back(ref_crc(W, 32'h8005, 32'hFFFF, cw));
      kind_q.push_back(kind);
      for (int i = 0; i < cw.size(); i++) begin
        valid = 1'b1; data_in = cw[i]; last = (i == cw.size() - 1);
        @(negedge clk);
        // occasional idle cycle inside odd frames
        if (f % 2 == 1 && ($urandom % 5 == 0)) begin
          valid = 1'b0; last = 1'b0; @(negedge clk);
        end
      end
      valid = 1'b0; last = 1'b0;
      if (f % 3 == 0) repeat (2) @(negedge clk);   // otherwise back to back
    end
    repeat (4) @(negedge clk);
    check("frames checked", n_done, nframes);
    check("clean frames seen", {31'h0, n_clean > 0}, 1);
    check("flagged frames seen", {31'h0, n_flagged > 0}, 1);
    check("odd-weight frames seen", {31'h0, n_odd > 0}, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
