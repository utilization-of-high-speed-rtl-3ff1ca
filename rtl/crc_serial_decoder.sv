// crc_serial_decoder: bit-serial CRC decoder (syndrome check) for a
// fixed-length code word.
//
// On a dec_en strobe the received code word {data, crc} is loaded and the
// LFSR is cleared; the whole word, DATA_W+CRC_W bits, is then shifted most
// significant bit first through a crc_lfsr_serial with the same polynomial
// as the encoder. A word that arrived intact is a multiple of P(x), so the
// register ends at zero; any non-zero value is the syndrome and flags an
// error. Because this LFSR form divides by P(x) after multiplying by
// x^CRC_W, the syndrome is the remainder of T(x)*x^CRC_W for the received
// word T(x); it is zero exactly when T(x) mod P(x) is, since x^CRC_W shares
// no factor with P(x). The data part is passed out as data_decod. Defaults follow the
// source design's example (12 data bits, 5-bit CRC, P(x) = x^5 + x^4 + x^2 + 1).
// The port names follow the source design; dec_en, busy and done are added by
// this design, which needs a strobe to know when a new word has arrived.
//
// Timing: dec_en is sampled while idle. The shifts take DATA_W+CRC_W clocks
// and one more registers the results: done rises DATA_W+CRC_W+1 clock
// edges after the edge that samples dec_en (high in the 19th cycle after
// the dec_en cycle at the defaults); data_decod and error then hold. Reset is
// synchronous.
module crc_serial_decoder
  import crc_pkg::*;
#(
  parameter int unsigned      DATA_W = 12,
  parameter int unsigned      CRC_W  = 5,
  parameter logic [CRC_W-1:0] POLY   = CRC_W'(5'h15)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    dec_en,
  input  logic [DATA_W+CRC_W-1:0] data_trans,
  output logic [DATA_W-1:0]       data_decod,
  output logic [CRC_W-1:0]        error,
  output logic                    busy,
  output logic                    done
);

  localparam int unsigned CODE_W = DATA_W + CRC_W;

  ser_state_e                  state_q;
  logic [DATA_W-1:0]           data_q;   // data part of the received word
  logic [CODE_W-1:0]           shift_q;  // bits still to check, MSB next
  logic [$clog2(CODE_W+1)-1:0] cnt_q;
  logic                        lfsr_clear, lfsr_en;
  logic [CRC_W-1:0]            lfsr_crc;

  assign lfsr_clear = (state_q == SER_IDLE) && dec_en;
  assign lfsr_en    = (state_q == SER_SHIFT);
  assign busy       = (state_q != SER_IDLE);

  crc_lfsr_serial #(
    .WIDTH(CRC_W),
    .POLY (POLY)
  ) u_lfsr (
    .clk  (clk),
    .rst  (rst),
    .clear(lfsr_clear),
    .en   (lfsr_en),
    .din  (shift_q[CODE_W-1]),
    .crc  (lfsr_crc)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q    <= SER_IDLE;
      data_q     <= '0;
      shift_q    <= '0;
      cnt_q      <= '0;
      data_decod <= '0;
      error      <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        SER_IDLE: if (dec_en) begin
          data_q  <= data_trans[CODE_W-1:CRC_W];
          shift_q <= data_trans;
          cnt_q   <= ($clog2(CODE_W+1))'(CODE_W);
          state_q <= SER_SHIFT;
        end
        SER_SHIFT: begin
          shift_q <= shift_q << 1;
          cnt_q   <= cnt_q - 1'b1;
          if (cnt_q == 1) state_q <= SER_FINISH;
        end
        SER_FINISH: begin
          data_decod <= data_q;
          error      <= lfsr_crc;
          done       <= 1'b1;
          state_q    <= SER_IDLE;
        end
        default: state_q <= SER_IDLE;
      endcase
    end
  end

endmodule
