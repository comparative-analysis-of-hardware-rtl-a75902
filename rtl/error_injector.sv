// error_injector: pseudo-random bit-flip pattern for the coverage experiment.
//
// For every bit slot (enable high) it says whether that bit of the channel is
// to be inverted. An event starts with probability 2^-RATE_LOG2 per slot
// (1/128 at the default, as published) whenever no burst is in progress. Each
// event is, with equal odds, a single-bit flip or a burst of 2, 3 or 4
// consecutive inverted bits (burst lengths as published). Flipping every bit of
// the burst, the equal odds and the random source are this design's choices.
//
// Random source: a 32-bit Galois LFSR, x^32 + x^22 + x^2 + x + 1, seeded with
// SEED (0xC0DE, as published), advanced 16 steps per slot so that successive
// slots draw fresh bits. Bits [RATE_LOG2-1:0] decide whether an event starts,
// the next two bits pick its length (0 -> 1 bit, 1..3 -> 2..4 bits).
//
// Timing: flip, ev_start and ev_len are combinational from the registers for
// the current slot; the state advances on the rising edge of each enabled
// cycle. Reset (asynchronous, active high) reloads SEED and ends any burst.
module error_injector #(
  parameter logic [31:0]  SEED      = 32'h0000_C0DE,
  parameter int unsigned  RATE_LOG2 = 7
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       enable,
  output logic       flip,      // invert the channel bit of this slot
  output logic       ev_start,  // a new event begins in this slot
  output logic [2:0] ev_len     // its length in bits, 1..4 (valid with ev_start)
);

  localparam logic [31:0] TAPS  = 32'h8020_0003; // x^32+x^22+x^2+x+1, reversed Galois form
  localparam int unsigned STEPS = 16;

  logic [31:0] rnd_q;
  logic [31:0] rnd_d;
  logic [1:0]  left_q;   // further bits of the burst still to flip
  logic        busy;

  always_comb begin
    rnd_d = rnd_q;
    for (int i = 0; i < STEPS; i++) begin
      rnd_d = rnd_d[0] ? ((rnd_d >> 1) ^ TAPS) : (rnd_d >> 1);
    end
  end

  assign busy     = (left_q != 2'd0);
  assign ev_start = ~busy & (rnd_q[RATE_LOG2-1:0] == '0);
  assign ev_len   = {1'b0, rnd_q[RATE_LOG2+1 -: 2]} + 3'd1;
  assign flip     = busy | ev_start;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      rnd_q  <= SEED;
      left_q <= 2'd0;
    end else if (enable) begin
      rnd_q <= rnd_d;
      if (ev_start)  left_q <= rnd_q[RATE_LOG2+1 -: 2];
      else if (busy) left_q <= left_q - 2'd1;
    end
  end

endmodule
