// crc15_can_checker: CRC-15 decoder of a CAN receiver.
//
// The received frame, from the start-of-frame bit through the data field
// and followed by the 15 received CRC bits, is streamed through the parallel
// CRC-15 engine (crc15_unfolded). Dividing a code word that arrived intact
// by the generator polynomial leaves no remainder, so the engine's final
// register is the syndrome: zero means no error. (The engine multiplies by
// x^15 before dividing, so the syndrome is the remainder of T(x)*x^15 for
// the received word T(x); it is zero exactly when T(x) is a multiple of
// P(x).) As the source design sets out
// for CAN, a zero syndrome drives the ACK slot dominant (0) and a non-zero
// one drives it recessive (1).
//
// Interface: the same beat stream as crc15_unfolded (UNFOLD bits per beat,
// earliest bit in the MSB, in_sof/in_last framing, zero padding in front
// when the length including the CRC is not a multiple of UNFOLD).
// Timing: result_valid is high in the third cycle after the cycle that
// presents the in_last beat (two in the engine, one to register the
// decision); the results hold until the
// next frame's result. Registering the decision is this design's choice.
module crc15_can_checker
  import crc_pkg::*;
#(
  parameter int unsigned UNFOLD    = 3,
  parameter int unsigned LOOKAHEAD = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic              in_sof,
  input  logic              in_last,
  input  logic [UNFOLD-1:0] in_bits,
  output logic              result_valid,
  output crc15_t            syndrome,
  output logic              crc_ok,
  output logic              ack_slot
);

  logic   rem_valid;
  crc15_t rem;

  crc15_unfolded #(
    .UNFOLD   (UNFOLD),
    .LOOKAHEAD(LOOKAHEAD),
    .WIDTH    (CAN_CRC_W),
    .POLY     (CAN_CRC_POLY)
  ) u_engine (
    .clk      (clk),
    .rst      (rst),
    .in_valid (in_valid),
    .in_sof   (in_sof),
    .in_last  (in_last),
    .in_bits  (in_bits),
    .out_valid(rem_valid),
    .out_crc  (rem)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      result_valid <= 1'b0;
      syndrome     <= '0;
      crc_ok       <= 1'b0;
      ack_slot     <= 1'b1;   // recessive while nothing has been checked
    end else begin
      result_valid <= rem_valid;
      if (rem_valid) begin
        syndrome <= rem;
        crc_ok   <= (rem == '0);
        ack_slot <= (rem != '0);
      end
    end
  end

endmodule
