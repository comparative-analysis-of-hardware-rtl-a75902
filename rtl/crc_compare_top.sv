// crc_compare_top: side-by-side CRC-8 / CRC-16 / CRC-32 comparison harness.
//
// One PRBS-15 source produces FRAME_BITS-bit payloads (512 bits, seed 0x1ACE).
// The same payload bits go, MSB first, one bit per clock, to three serial
// channels that differ only in the generator polynomial and seed: CRC-8
// (x^8+x^2+x+1), CRC-16 (x^16+x^15+x^2+1) and CRC-32 (IEEE 802.3), all seeded
// with ones. Each channel appends its remainder, passes the codeword through
// a disturbed link and checks it. One error injector (seed 0xC0DE) drives all
// three links, indexed by bit slot, so every channel sees exactly the same
// flips at the same payload positions; the CRC field itself is disturbed too.
//
// Frame timing: each frame occupies FRAME_BITS + 32 clock slots. Payload bits
// are sent in slots 0..FRAME_BITS-1; the encoders then append their 8, 16 or
// 32 remainder bits, so the CRC-8 and CRC-16 links sit idle for the rest of
// the slot. A new frame starts at slot 0 while `run` is high and all three
// encoders are ready (they are not in the first cycle after reset); a frame in
// progress always completes. Per-channel counters (frames, corrupted,
// detected, undetected, false alarms) and injector event counters are
// outputs; coverage is 1 - undetected / corrupted.
//
// The polynomials, seeds, frame size, error rate and the shared-disturbance
// rule are published; the slot framing, the counters and the choice to
// disturb the CRC field as well as the payload are this design's.
module crc_compare_top
  import crc_pkg::*;
#(
  parameter int unsigned FRAME_LEN = FRAME_BITS,   // payload bits per frame
  parameter int unsigned RATE_LOG2 = 7             // one error event per 2^RATE_LOG2 bits
) (
  input  logic         clk,
  input  logic         reset,       // asynchronous, active high
  input  logic         run,         // keep starting frames
  output logic         busy,        // a frame is in progress
  // per-frame results, one strobe per channel (index 0: CRC-8, 1: CRC-16, 2: CRC-32)
  output logic [2:0]   frame_done,
  output logic [2:0]   frame_error,
  output logic [2:0]   frame_corrupted,
  output logic [7:0]   crc8_out,    // checker remainders
  output logic [15:0]  crc16_out,
  output logic [31:0]  crc32_out,
  output logic [7:0]   crc8_tx,     // remainders appended by the encoders
  output logic [15:0]  crc16_tx,
  output logic [31:0]  crc32_tx,
  output logic [2:0]   tx_crc_valid,
  // payload stream as sent (for observation)
  output logic         payload_valid,
  output logic         payload_bit,
  output logic         flip,        // injector output of the current slot
  // outcome counters
  output chan_stats_t  stats [3],
  output logic [31:0]  single_events,
  output logic [31:0]  burst_events
);

  localparam int unsigned SLOT = FRAME_LEN + MAX_CRC_BITS;
  localparam int unsigned SW   = $clog2(SLOT);

  logic [SW-1:0] slot_q;
  logic          active;
  logic          msg_valid, msg_last, msg_bit;
  logic [2:0]    msg_ready;
  logic          ev_start;
  logic [2:0]    ev_len;

  // ---- frame sequencer -------------------------------------------------
  // A frame starts only when all three encoders can take a payload bit.
  assign active    = (run & (&msg_ready)) | (slot_q != '0);
  assign msg_valid = active & (slot_q < SW'(FRAME_LEN));
  assign msg_last  = msg_valid & (slot_q == SW'(FRAME_LEN - 1));

  always_ff @(posedge clk or posedge reset) begin
    if (reset)       slot_q <= '0;
    else if (active) slot_q <= (slot_q == SW'(SLOT - 1)) ? '0 : slot_q + 1'b1;
  end

  assign busy = (slot_q != '0);

  prbs15 #(.SEED(PRBS_SEED)) u_prbs (
    .clk     (clk),
    .reset   (reset),
    .enable  (msg_valid),
    .bit_out (msg_bit)
  );

  error_injector #(.SEED(INJ_SEED), .RATE_LOG2(RATE_LOG2)) u_inj (
    .clk      (clk),
    .reset    (reset),
    .enable   (active),
    .flip     (flip),
    .ev_start (ev_start),
    .ev_len   (ev_len)
  );

  assign payload_valid = msg_valid;
  assign payload_bit   = msg_bit;

  // ---- the three channels ---------------------------------------------
  crc_channel #(.WIDTH(8), .POLY(CRC8_POLY), .SEED(CRC8_SEED)) u_ch8 (
    .clk (clk), .reset (reset),
    .msg_valid (msg_valid), .msg_ready (msg_ready[0]), .msg_data (msg_bit), .msg_last (msg_last),
    .flip (flip & active),
    .tx_crc (crc8_tx), .tx_crc_valid (tx_crc_valid[0]),
    .done (frame_done[0]), .error (frame_error[0]), .corrupted (frame_corrupted[0]),
    .rx_crc (crc8_out), .stats (stats[0])
  );

  crc_channel #(.WIDTH(16), .POLY(CRC16_POLY), .SEED(CRC16_SEED)) u_ch16 (
    .clk (clk), .reset (reset),
    .msg_valid (msg_valid), .msg_ready (msg_ready[1]), .msg_data (msg_bit), .msg_last (msg_last),
    .flip (flip & active),
    .tx_crc (crc16_tx), .tx_crc_valid (tx_crc_valid[1]),
    .done (frame_done[1]), .error (frame_error[1]), .corrupted (frame_corrupted[1]),
    .rx_crc (crc16_out), .stats (stats[1])
  );

  crc_channel #(.WIDTH(32), .POLY(CRC32_POLY), .SEED(CRC32_SEED)) u_ch32 (
    .clk (clk), .reset (reset),
    .msg_valid (msg_valid), .msg_ready (msg_ready[2]), .msg_data (msg_bit), .msg_last (msg_last),
    .flip (flip & active),
    .tx_crc (crc32_tx), .tx_crc_valid (tx_crc_valid[2]),
    .done (frame_done[2]), .error (frame_error[2]), .corrupted (frame_corrupted[2]),
    .rx_crc (crc32_out), .stats (stats[2])
  );

  // ---- injector event counters ----------------------------------------
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      single_events <= '0;
      burst_events  <= '0;
    end else if (active && ev_start) begin
      if (ev_len == 3'd1) single_events <= single_events + 32'd1;
      else                burst_events  <= burst_events + 32'd1;
    end
  end

  // Every encoder must be ready whenever a payload bit is offered: the slot
  // leaves room for the widest remainder.
  a_enc_ready: assert property (@(posedge clk) disable iff (reset) msg_valid |-> (&msg_ready));

endmodule
