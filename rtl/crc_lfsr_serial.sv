// crc_lfsr_serial: bit-serial CRC generator (the "original architecture").
//
// A WIDTH-stage shift register of D flip-flops L_0..L_(WIDTH-1). The incoming
// message bit is XORed with the last stage to form the feedback bit; the
// feedback enters L_0 directly (the x^0 term) and is XORed between stage
// i-1 and stage i wherever the polynomial has an x^i term. Shifting a
// message in most significant bit first leaves in the register the remainder
// of M(x)*x^WIDTH divided by P(x), so no zeros need to be appended, and
// shifting a code word {message, CRC} in leaves zero when no error occurred.
//
// The defaults give the CAN CRC-15 LFSR: 15 flip-flops, taps at x^14, x^10,
// x^8, x^7, x^4, x^3 and the XOR ahead of the first flip-flop, as the
// generating polynomial prescribes. POLY lists the polynomial without its
// x^WIDTH term. The clear input, the enable and a zero start value are
// choices of this design.
//
// Timing: one bit per clock while en is high; crc shows the register, so it
// reflects a bit one cycle after the edge that shifted it in. clear has
// priority over en. Reset is synchronous.
module crc_lfsr_serial #(
  parameter int unsigned      WIDTH = 15,
  parameter logic [WIDTH-1:0] POLY  = WIDTH'(15'h4599)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             en,
  input  logic             din,
  output logic [WIDTH-1:0] crc
);

  logic [WIDTH-1:0] lfsr_q;
  logic [WIDTH-1:0] lfsr_d;
  logic             fb;

  always_comb begin
    fb        = din ^ lfsr_q[WIDTH-1];
    lfsr_d[0] = fb;
    for (int i = 1; i < WIDTH; i++)
      lfsr_d[i] = lfsr_q[i-1] ^ (POLY[i] & fb);
  end

  always_ff @(posedge clk) begin
    if (rst || clear) lfsr_q <= '0;
    else if (en)      lfsr_q <= lfsr_d;
  end

  assign crc = lfsr_q;

endmodule
