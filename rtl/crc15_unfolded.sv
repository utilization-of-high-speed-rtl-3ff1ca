// crc15_unfolded: parallel CRC-15 engine for CAN, built from the bit-serial
// LFSR by unfolding, look-ahead pipelining and retiming.
//
// How it works. Let s be the 15-bit CRC register and M the one-bit LFSR
// step with a zero input. Unfolding by UNFOLD (3) takes UNFOLD message bits
// per clock:  s(k+1) = M^3 s(k) + N d(k),  where N d(k) is what the beat's
// bits add from a zero register. Look-ahead pipelining by LOOKAHEAD (4)
// rewrites the loop over four beats:
//     s(k+4) = M^12 s(k) + w(k+3),
//     w(k)   = N d(k) + M^3 N d(k-1) + M^6 N d(k-2) + M^9 N d(k-3),
// so the loop may hold four delays, which lowers its iteration bound.
// Retiming then moves three of those delays into the M^12 network, which
// splits it into four M^3 stages: a ring of LOOKAHEAD registers where
//     ring[0] <= M^3 ring[LOOKAHEAD-1] + w,   ring[i] <= M^3 ring[i-1].
// ring[0] holds s after every beat. w depends only on the last
// UNFOLD*LOOKAHEAD message bits, so it is a feed-forward term: it is
// computed from a sliding window of beats and registered (one pipeline
// stage outside the loop). The longest register-to-register path is the
// M^3 network plus the XOR with w into ring[0] (3 levels of 2-input XOR for
// the CAN polynomial); the other ring stages need 2. The source design
// fixes the unfolding factor, the pipeline level and the order of the
// transformations; the exact placement of the delays shown here (ring of
// M^3 stages, one registered w) is this design's choice.
//
// Interface. A frame is a stream of beats (in_valid high) of UNFOLD bits,
// bit UNFOLD-1 being the earliest bit of the beat. in_sof marks the first
// beat and restarts the register from zero; in_last marks the final beat.
// Beats may have idle cycles between them; all pipeline stages hold still
// during those cycles. A frame whose length is not a multiple of UNFOLD is
// padded with leading zeros in its first beat: with a zero start value,
// leading zeros do not change the CRC. Another frame may start on the cycle
// after in_last.
//
// Timing. out_valid is high in the second cycle after the cycle that
// presents the in_last beat (the edge ending that cycle loads w, the next
// one loads the ring and out_crc) and out_crc then holds
// the frame's CRC until the next frame ends. Throughput is UNFOLD bits per
// clock. Reset is synchronous.
module crc15_unfolded #(
  parameter int unsigned      UNFOLD    = 3,
  parameter int unsigned      LOOKAHEAD = 4,
  parameter int unsigned      WIDTH     = 15,
  parameter logic [WIDTH-1:0] POLY      = WIDTH'(15'h4599)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic              in_sof,
  input  logic              in_last,
  input  logic [UNFOLD-1:0] in_bits,
  output logic              out_valid,
  output logic [WIDTH-1:0]  out_crc
);

  localparam int unsigned WIN_W = UNFOLD * LOOKAHEAD;

  // One LFSR step with input bit b (the serial architecture's next state).
  function automatic logic [WIDTH-1:0] lfsr_step(input logic [WIDTH-1:0] s,
                                                 input logic b);
    logic             fb;
    logic [WIDTH-1:0] n;
    fb   = b ^ s[WIDTH-1];
    n    = s << 1;
    if (fb) n = n ^ POLY;
    return n;
  endfunction

  // M^UNFOLD: advance the register over UNFOLD zero bits.
  function automatic logic [WIDTH-1:0] adv_zero(input logic [WIDTH-1:0] s);
    logic [WIDTH-1:0] r;
    r = s;
    for (int i = 0; i < UNFOLD; i++) r = lfsr_step(r, 1'b0);
    return r;
  endfunction

  // Contribution of a window of message bits, from a zero register.
  function automatic logic [WIDTH-1:0] win_crc(input logic [WIN_W-1:0] bits);
    logic [WIDTH-1:0] r;
    r = '0;
    for (int i = WIN_W - 1; i >= 0; i--) r = lfsr_step(r, bits[i]);
    return r;
  endfunction

  // ---- feed-forward stage: sliding window of beats and the w register ----
  logic [WIN_W-1:0] win_q, win_d;
  logic [WIDTH-1:0] w_q;
  logic             w_valid_q, w_sof_q, w_last_q;

  always_comb begin
    win_d = in_sof ? WIN_W'(in_bits) : WIN_W'({win_q, in_bits});
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      win_q     <= '0;
      w_q       <= '0;
      w_valid_q <= 1'b0;
      w_sof_q   <= 1'b0;
      w_last_q  <= 1'b0;
    end else begin
      w_valid_q <= in_valid;
      if (in_valid) begin
        win_q    <= win_d;
        w_q      <= win_crc(win_d);
        w_sof_q  <= in_sof;
        w_last_q <= in_last;
      end
    end
  end

  // ---- the loop: LOOKAHEAD registers, one M^UNFOLD stage between each ----
  logic [WIDTH-1:0] ring_q [LOOKAHEAD];
  logic [WIDTH-1:0] ring_d [LOOKAHEAD];

  always_comb begin
    ring_d[0] = adv_zero(w_sof_q ? '0 : ring_q[LOOKAHEAD-1]) ^ w_q;
    for (int i = 1; i < LOOKAHEAD; i++)
      ring_d[i] = w_sof_q ? '0 : adv_zero(ring_q[i-1]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LOOKAHEAD; i++) ring_q[i] <= '0;
      out_valid <= 1'b0;
      out_crc   <= '0;
    end else begin
      out_valid <= w_valid_q && w_last_q;
      if (w_valid_q) begin
        for (int i = 0; i < LOOKAHEAD; i++) ring_q[i] <= ring_d[i];
        if (w_last_q) out_crc <= ring_d[0];
      end
    end
  end

endmodule
