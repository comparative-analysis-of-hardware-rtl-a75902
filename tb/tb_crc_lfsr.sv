// tb_crc_lfsr: self-checking testbench of the serial CRC register.
//
// Three instances (CRC-8, CRC-16, CRC-32, as in the published comparison) are
// fed the same bit stream. Checks: the reset value is the seed; the standard
// check string "123456789" gives 0xFB, 0xAEE7 and 0x0376E6E7 (the catalogued
// check values of these polynomials with all-ones seed, no reflection and no
// final XOR); random messages match the long-division model; a remainder fed
// back MSB first drives the register to zero; a cycle without valid holds the
// register; `clear` restarts from the seed; one bit is absorbed per clock.
module tb_crc_lfsr;
  import crc_ref_pkg::*;

  logic clk = 1'b0;
  logic reset;
  logic clear, valid, data_in;
  logic rdy8, rdy16, rdy32;
  logic [7:0]  c8;
  logic [15:0] c16;
  logic [31:0] c32;
  int checks = 0, failures = 0;
  int cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  crc_lfsr #(.WIDTH(8),  .POLY(8'h07),         .SEED(8'hFF))         u8  (.clk, .reset, .clear, .valid, .ready(rdy8),  .data_in, .crc_out(c8));
  crc_lfsr #(.WIDTH(16), .POLY(16'h8005),      .SEED(16'hFFFF))      u16 (.clk, .reset, .clear, .valid, .ready(rdy16), .data_in, .crc_out(c16));
  crc_lfsr #(.WIDTH(32), .POLY(32'h04C11DB7),  .SEED(32'hFFFFFFFF))  u32 (.clk, .reset, .clear, .valid, .ready(rdy32), .data_in, .crc_out(c32));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Send a message, starting from the seed (clear with the first bit).
  task automatic send(bitq_t m);
    for (int i = 0; i < m.size(); i++) begin
      clear   <= (i == 0);
      valid   <= 1'b1;
      data_in <= m[i];
      @(posedge clk);
    end
    clear <= 1'b0; valid <= 1'b0; data_in <= 1'b0;
    #1;
  endtask

  task automatic check_all(string what, bitq_t m);
    check({what, " crc8"},  {24'h0, c8},  ref_crc(8,  32'h07,       32'hFF,        m));
    check({what, " crc16"}, {16'h0, c16}, ref_crc(16, 32'h8005,     32'hFFFF,      m));
    check({what, " crc32"}, c32,          ref_crc(32, 32'h04C11DB7, 32'hFFFFFFFF,  m));
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bitq_t m;
    int c0;
    int len;
    logic [7:0] r8; logic [15:0] r16; logic [31:0] r32;
    clear = 0; valid = 0; data_in = 0;
    reset = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    check("reset crc8",  {24'h0, c8},  32'hFF);
    check("reset crc16", {16'h0, c16}, 32'hFFFF);
    check("reset crc32", c32,          32'hFFFFFFFF);
    check("ready low in reset", {31'h0, rdy8 | rdy16 | rdy32}, 32'h0);
    reset = 1'b0;
    @(posedge clk); #1;
    check("ready after reset", {29'h0, rdy8, rdy16, rdy32}, 32'h7);

    // catalogued check values
    m = str_bits("123456789");
    c0 = cycles;
    send(m);
    check("one bit per clock", cycles - c0, m.size());
    check("check string crc8",  {24'h0, c8},  32'hFB);
    check("check string crc16", {16'h0, c16}, 32'hAEE7);
    check("check string crc32", c32,          32'h0376E6E7);
    check_all("check string ref", m);

    // hold without valid
    r8 = c8; r16 = c16; r32 = c32;
    repeat (3) @(posedge clk);
    #1;
    check("hold crc8", {24'h0, c8}, {24'h0, r8});
    check("hold crc32", c32, r32);

    // clear alone reloads the seed
    clear <= 1'b1; @(posedge clk); clear <= 1'b0; #1;
    check("clear crc16", {16'h0, c16}, 32'hFFFF);

    // random messages against long division
    for (int t = 0; t < 60; t++) begin
      len = 1 + ($urandom % 300);
      m.delete();
      for (int i = 0; i < len; i++) m.push_back(1'($urandom));
      send(m);
      check_all($sformatf("random %0d len %0d", t, len), m);
      // feed the CRC-16 remainder back MSB first: register must end at zero
      r16 = c16;
      for (int i = 15; i >= 0; i--) begin
        valid <= 1'b1; data_in <= r16[i]; @(posedge clk);
      end
      valid <= 1'b0; #1;
      check($sformatf("codeword residue %0d", t), {16'h0, c16}, 32'h0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
