// crc_pkg: constants shared by the serial CRC cores and the comparison harness.
//
// The three generator polynomials are written in the usual "normal" notation:
// bit k of the constant is the coefficient of x^k, and the leading x^n term is
// implicit. The seeds are all-ones registers of the matching width. Polynomials,
// seeds, frame length and the two pseudo-random seeds are the published
// configuration; the PRBS-15 taps and the 32-bit injector LFSR taps are this
// design's choice (standard maximal-length sequences).
package crc_pkg;

  // CRC-8: x^8 + x^2 + x + 1
  localparam logic [7:0]  CRC8_POLY   = 8'h07;
  localparam logic [7:0]  CRC8_SEED   = 8'hFF;
  // CRC-16: x^16 + x^15 + x^2 + 1
  localparam logic [15:0] CRC16_POLY  = 16'h8005;
  localparam logic [15:0] CRC16_SEED  = 16'hFFFF;
  // CRC-32: IEEE 802.3 generator
  localparam logic [31:0] CRC32_POLY  = 32'h04C1_1DB7;
  localparam logic [31:0] CRC32_SEED  = 32'hFFFF_FFFF;

  // Test payload: 512 bits per frame from a PRBS-15 source seeded with 0x1ACE.
  localparam int unsigned FRAME_BITS  = 512;
  localparam logic [14:0] PRBS_SEED   = 15'h1ACE;

  // Error injector seed.
  localparam logic [31:0] INJ_SEED    = 32'h0000_C0DE;

  // Widest CRC in the harness; every frame slot leaves room for its remainder.
  localparam int unsigned MAX_CRC_BITS = 32;

  // Per-channel outcome counters of the coverage experiment.
  typedef struct packed {
    logic [31:0] frames;       // codewords checked
    logic [31:0] corrupted;    // codewords with at least one flipped bit
    logic [31:0] detected;     // corrupted and flagged by the checker
    logic [31:0] undetected;   // corrupted but remainder equal to the golden one (zero)
    logic [31:0] false_alarm;  // clean but flagged (never expected)
  } chan_stats_t;

endpackage
