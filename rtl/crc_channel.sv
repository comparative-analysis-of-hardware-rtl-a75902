// crc_channel: one CRC variant of the comparison harness, sender to receiver.
//
// The payload stream enters a crc_encoder, which appends the WIDTH-bit
// remainder. Between encoder and checker each codeword bit is XORed with the
// shared flip pattern of its bit slot (the disturbed channel). The crc_checker
// divides the received codeword and flags a non-zero remainder. The channel
// remembers whether any bit of the current codeword was flipped, and when the
// checker finishes it updates the outcome counters: a corrupted codeword whose
// remainder equals the golden remainder of an intact codeword (zero) counts as
// undetected. Counters reset asynchronously and saturate-free wrap at 2^32.
//
// Timing: codeword bits pass through combinationally; done/error/rx_crc come
// from the checker one cycle after the last codeword bit, and the counters are
// updated on the following rising edge. This wrapper is this design's way of
// putting the published encoder, disturbance and checker stages together.
module crc_channel
  import crc_pkg::*;
#(
  parameter int unsigned          WIDTH = 16,
  parameter logic [WIDTH-1:0]     POLY  = 16'h8005,
  parameter logic [WIDTH-1:0]     SEED  = 16'hFFFF
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             msg_valid,
  output logic             msg_ready,
  input  logic             msg_data,
  input  logic             msg_last,
  input  logic             flip,        // invert the codeword bit of this slot
  output logic [WIDTH-1:0] tx_crc,      // remainder appended by the encoder
  output logic             tx_crc_valid,
  output logic             done,        // codeword checked (one-cycle strobe)
  output logic             error,       // checker flagged the codeword
  output logic             corrupted,   // codeword had flipped bits (with done)
  output logic [WIDTH-1:0] rx_crc,      // checker remainder
  output chan_stats_t      stats
);

  logic cw_valid, cw_data, cw_last;
  logic rx_data;
  logic rx_ready;
  logic hit_q, corrupt_q;

  crc_encoder #(.WIDTH(WIDTH), .POLY(POLY), .SEED(SEED)) u_enc (
    .clk       (clk),
    .reset     (reset),
    .in_valid  (msg_valid),
    .in_ready  (msg_ready),
    .in_data   (msg_data),
    .in_last   (msg_last),
    .out_valid (cw_valid),
    .out_data  (cw_data),
    .out_last  (cw_last),
    .crc_valid (tx_crc_valid),
    .crc_out   (tx_crc)
  );

  assign rx_data = cw_data ^ flip;

  crc_checker #(.WIDTH(WIDTH), .POLY(POLY), .SEED(SEED)) u_chk (
    .clk     (clk),
    .reset   (reset),
    .valid   (cw_valid),
    .ready   (rx_ready),
    .data_in (rx_data),
    .last    (cw_last),
    .done    (done),
    .error   (error),
    .crc_out (rx_crc)
  );

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      hit_q     <= 1'b0;
      corrupt_q <= 1'b0;
    end else if (cw_valid) begin
      if (cw_last) begin
        hit_q     <= 1'b0;
        corrupt_q <= hit_q | flip;
      end else begin
        hit_q     <= hit_q | flip;
      end
    end
  end

  assign corrupted = corrupt_q;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      stats <= '0;
    end else if (done) begin
      stats.frames <= stats.frames + 32'd1;
      if (corrupt_q) begin
        stats.corrupted <= stats.corrupted + 32'd1;
        if (error) stats.detected   <= stats.detected + 32'd1;
        else       stats.undetected <= stats.undetected + 32'd1;
      end else if (error) begin
        stats.false_alarm <= stats.false_alarm + 32'd1;
      end
    end
  end

  // The checker of this harness never back-pressures the codeword stream.
  a_rx_ready: assert property (@(posedge clk) disable iff (reset) cw_valid |-> rx_ready);

endmodule
