// crc_lfsr: bit-serial CRC division register (Galois LFSR), the one template
// shared by the CRC-8, CRC-16 and CRC-32 cores.
//
// Each accepted bit is processed MSB first: the feedback bit is the input bit
// XOR the register MSB; the register shifts left by one and, when the feedback
// is 1, is XORed with POLY. So every non-zero coefficient of the generator below
// x^n places an XOR tap in front of the stage it feeds, and the x^n term closes
// the feedback path from the MSB. After a message M of k bits the register holds
// (SEED * x^k + M(x) * x^n) mod G(x), i.e. the CRC with no final XOR and no bit
// reflection. Feeding the register its own MSB produces zero feedback, so the
// remainder shifts out unchanged; the encoder uses this to append it.
//
// Interface: asynchronous active-high reset loads SEED (as published). `clear`
// is this design's synchronous reload for the start of a new frame; when clear
// and valid are high together the bit is processed starting from SEED. `ready`
// is high whenever out of reset: one bit is absorbed per clock while valid is
// high. crc_out is the register itself, updated on the rising edge after the
// bit was presented (latency 1 clock).
module crc_lfsr #(
  parameter int unsigned          WIDTH = 16,
  parameter logic [WIDTH-1:0]     POLY  = 16'h8005,
  parameter logic [WIDTH-1:0]     SEED  = 16'hFFFF
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             clear,
  input  logic             valid,
  output logic             ready,
  input  logic             data_in,
  output logic [WIDTH-1:0] crc_out
);

  logic [WIDTH-1:0] crc_q;
  logic [WIDTH-1:0] base;
  logic [WIDTH-1:0] crc_d;
  logic             fb;
  logic             in_reset;

  always_comb begin
    base  = clear ? SEED : crc_q;
    fb    = data_in ^ base[WIDTH-1];
    crc_d = {base[WIDTH-2:0], 1'b0} ^ (fb ? POLY : '0);
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      crc_q <= SEED;
    end else if (valid) begin
      crc_q <= crc_d;
    end else if (clear) begin
      crc_q <= SEED;
    end
  end

  // ready drops only while reset is applied.
  always_ff @(posedge clk or posedge reset) begin
    if (reset) in_reset <= 1'b1;
    else       in_reset <= 1'b0;
  end

  assign ready   = ~in_reset;
  assign crc_out = crc_q;

endmodule
