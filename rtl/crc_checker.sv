// crc_checker: serial CRC checker, "remainder" stage of the serial CRC path.
//
// The received codeword (message followed by its WIDTH-bit remainder) arrives
// MSB first, one bit per valid cycle; last marks its final bit. A crc_lfsr
// divides the whole codeword by the generator, starting from SEED. Because the
// sender computed its remainder from the same SEED, an undisturbed codeword
// leaves zero in the register; anything else flags an error, as published
// ("a zero remainder indicates no detected error").
//
// Timing: in the cycle after the last bit, done is high for one cycle, crc_out
// holds the final remainder and error = (crc_out != 0). A new frame may start
// in that same cycle: its first bit is processed from SEED, so back-to-back
// frames need no gap. ready follows the LFSR (always high out of reset).
// Frame delimiting with `last`, and the one-cycle done strobe, are this
// design's choice.
module crc_checker #(
  parameter int unsigned          WIDTH = 16,
  parameter logic [WIDTH-1:0]     POLY  = 16'h8005,
  parameter logic [WIDTH-1:0]     SEED  = 16'hFFFF
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             valid,
  output logic             ready,
  input  logic             data_in,
  input  logic             last,
  output logic             done,
  output logic             error,
  output logic [WIDTH-1:0] crc_out
);

  logic first_q;   // next bit is the first of a codeword
  logic done_q;
  logic [WIDTH-1:0] rem;

  crc_lfsr #(.WIDTH(WIDTH), .POLY(POLY), .SEED(SEED)) u_lfsr (
    .clk     (clk),
    .reset   (reset),
    .clear   (first_q),
    .valid   (valid),
    .ready   (ready),
    .data_in (data_in),
    .crc_out (rem)
  );

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      first_q <= 1'b1;
      done_q  <= 1'b0;
    end else begin
      done_q <= valid & last;
      if (valid) first_q <= last;
    end
  end

  assign done    = done_q;
  assign error   = done_q & (rem != '0);
  assign crc_out = rem;

endmodule
