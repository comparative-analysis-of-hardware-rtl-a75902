// crc_encoder: serial CRC encoder, "append bits" stage of the serial CRC path.
//
// Message bits arrive MSB first on in_data with an in_valid/in_ready handshake;
// in_last marks the final message bit. Each accepted bit is passed straight to
// the output stream and also absorbed by a crc_lfsr. After the last message bit
// the encoder stops accepting input (in_ready low) for WIDTH cycles and shifts
// the remainder out MSB first, so the output is the codeword x^n M(x) + R(x).
// During those cycles the LFSR is fed its own MSB, which gives zero feedback:
// the register shifts the remainder out and is empty at the end of the frame.
// The first bit of the next message restarts the LFSR from SEED.
//
// Timing: the output is combinational from the input in the message phase
// (out_valid = in_valid & in_ready). The remainder R is on crc_out and
// crc_valid is high in the first append cycle; out_last marks the final
// remainder bit. The downstream side has no back-pressure: it takes one bit
// per cycle whenever out_valid is high. The appending function is published;
// the handshake details, the phase register and the frame restart are this
// design's choice.
module crc_encoder #(
  parameter int unsigned          WIDTH = 16,
  parameter logic [WIDTH-1:0]     POLY  = 16'h8005,
  parameter logic [WIDTH-1:0]     SEED  = 16'hFFFF
) (
  input  logic             clk,
  input  logic             reset,
  // message side
  input  logic             in_valid,
  output logic             in_ready,
  input  logic             in_data,
  input  logic             in_last,
  // codeword side
  output logic             out_valid,
  output logic             out_data,
  output logic             out_last,
  // remainder of the message just finished
  output logic             crc_valid,
  output logic [WIDTH-1:0] crc_out
);

  typedef enum logic {PH_MSG, PH_APPEND} phase_t;

  localparam int unsigned CW = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  phase_t          phase_q;
  logic [CW-1:0]   cnt_q;
  logic            first_q;     // next accepted message bit starts a frame
  logic            lfsr_ready;
  logic            lfsr_valid;
  logic            lfsr_bit;
  logic [WIDTH-1:0] lfsr_crc;

  crc_lfsr #(.WIDTH(WIDTH), .POLY(POLY), .SEED(SEED)) u_lfsr (
    .clk     (clk),
    .reset   (reset),
    .clear   (first_q & (phase_q == PH_MSG)),
    .valid   (lfsr_valid),
    .ready   (lfsr_ready),
    .data_in (lfsr_bit),
    .crc_out (lfsr_crc)
  );

  always_comb begin
    in_ready = (phase_q == PH_MSG) & lfsr_ready;
    if (phase_q == PH_MSG) begin
      out_valid = in_valid & in_ready;
      out_data  = in_data;
      out_last  = 1'b0;
    end else begin
      out_valid = 1'b1;
      out_data  = lfsr_crc[WIDTH-1];
      out_last  = (cnt_q == CW'(WIDTH-1));
    end
    lfsr_valid = out_valid;
    lfsr_bit   = out_data;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      phase_q <= PH_MSG;
      cnt_q   <= '0;
      first_q <= 1'b1;
    end else begin
      case (phase_q)
        PH_MSG: begin
          if (in_valid && in_ready) begin
            first_q <= 1'b0;
            if (in_last) begin
              phase_q <= PH_APPEND;
              cnt_q   <= '0;
            end
          end
        end
        PH_APPEND: begin
          if (cnt_q == CW'(WIDTH-1)) begin
            phase_q <= PH_MSG;
            first_q <= 1'b1;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        default: phase_q <= PH_MSG;
      endcase
    end
  end

  // In the first append cycle the register holds the full remainder.
  assign crc_valid = (phase_q == PH_APPEND) && (cnt_q == '0);
  assign crc_out   = lfsr_crc;

endmodule
