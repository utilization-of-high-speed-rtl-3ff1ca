// crc_serial_encoder: bit-serial CRC encoder for a fixed-length data word.
//
// On a crc_en strobe the DATA_W-bit data word is loaded into a shift
// register and the LFSR is cleared. The word is then shifted, most
// significant bit first, one bit per clock into a crc_lfsr_serial. The
// LFSR form used divides M(x)*x^CRC_W by P(x) directly, so the remainder
// is ready after DATA_W shifts with no zeros appended. The code word for
// transmission is the data followed by the CRC:
//     data_trans = {data_in, crc_out}.
// Defaults follow the source design's example: a 12-bit word and the 5-bit
// polynomial P(x) = x^5 + x^4 + x^2 + 1 (POLY without its x^5 term). The
// port names follow the source design; busy and done are added by this design.
//
// Timing: crc_en is sampled while idle (it is ignored while busy). The
// shifts take DATA_W clocks and one more registers the results: done
// rises DATA_W+1 clock edges after the edge that samples crc_en, so with a
// 12-bit word it is high in the 14th cycle after the cycle presenting
// crc_en. data_trans and crc_out then hold until the next word is done. Reset is synchronous.
module crc_serial_encoder
  import crc_pkg::*;
#(
  parameter int unsigned      DATA_W = 12,
  parameter int unsigned      CRC_W  = 5,
  parameter logic [CRC_W-1:0] POLY   = CRC_W'(5'h15)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    crc_en,
  input  logic [DATA_W-1:0]       data_in,
  output logic [DATA_W+CRC_W-1:0] data_trans,
  output logic [CRC_W-1:0]        crc_out,
  output logic                    busy,
  output logic                    done
);

  ser_state_e                  state_q;
  logic [DATA_W-1:0]           data_q;   // word being encoded
  logic [DATA_W-1:0]           shift_q;  // bits still to send, MSB next
  logic [$clog2(DATA_W+1)-1:0] cnt_q;
  logic                        lfsr_clear, lfsr_en;
  logic [CRC_W-1:0]            lfsr_crc;

  assign lfsr_clear = (state_q == SER_IDLE) && crc_en;
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
    .din  (shift_q[DATA_W-1]),
    .crc  (lfsr_crc)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q    <= SER_IDLE;
      data_q     <= '0;
      shift_q    <= '0;
      cnt_q      <= '0;
      data_trans <= '0;
      crc_out    <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        SER_IDLE: if (crc_en) begin
          data_q  <= data_in;
          shift_q <= data_in;
          cnt_q   <= ($clog2(DATA_W+1))'(DATA_W);
          state_q <= SER_SHIFT;
        end
        SER_SHIFT: begin
          shift_q <= shift_q << 1;
          cnt_q   <= cnt_q - 1'b1;
          if (cnt_q == 1) state_q <= SER_FINISH;
        end
        SER_FINISH: begin
          crc_out    <= lfsr_crc;
          data_trans <= {data_q, lfsr_crc};
          done       <= 1'b1;
          state_q    <= SER_IDLE;
        end
        default: state_q <= SER_IDLE;
      endcase
    end
  end

endmodule
