// prbs15: PRBS-15 test-payload source.
//
// A 15-bit Fibonacci LFSR with the ITU-T O.150 PRBS-15 polynomial
// x^15 + x^14 + 1: the new bit is state[14] XOR state[13], it is shifted in
// at the bottom and is also the output bit. The sequence repeats every
// 2^15 - 1 = 32767 bits. The register starts from SEED (0x1ACE, as published)
// on the asynchronous active-high reset and advances one step in each cycle
// with `enable` high; `bit_out` is the bit produced by that step, i.e. it is
// combinational from the state and is consumed in the same cycle. The source
// type (PRBS-15) and seed are published; the polynomial choice among the
// PRBS-15 variants and the interface are this design's.
module prbs15 #(
  parameter logic [14:0] SEED = 15'h1ACE
) (
  input  logic clk,
  input  logic reset,
  input  logic enable,
  output logic bit_out
);

  logic [14:0] state_q;

  assign bit_out = state_q[14] ^ state_q[13];

  always_ff @(posedge clk or posedge reset) begin
    if (reset)       state_q <= SEED;
    else if (enable) state_q <= {state_q[13:0], bit_out};
  end

endmodule
