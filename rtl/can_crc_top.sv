// can_crc_top: CRC encoder and decoder pair for the Controller Area Network.
//
// Two designs stand side by side, each with its own ports:
//
//  1. The CAN CRC-15 path (the proposed high-speed design). The transmit
//     encoder is a parallel CRC-15 engine (crc15_unfolded: 3 bits per clock,
//     4-level look-ahead pipelined and retimed) that returns the 15-bit CRC
//     sequence of a frame, SOF through the data field. The receive decoder
//     (crc15_can_checker) runs a received frame plus its CRC through a
//     second engine and gives the syndrome and the ACK slot level: dominant
//     (0) for a zero syndrome, recessive (1) otherwise. Transmit and receive
//     are independent streams, so a node can check one frame while it
//     encodes another; the bus between them (bit stuffing, serialisation)
//     is outside this design.
//
//  2. The serial 12-bit / 5-bit link. crc_serial_encoder turns data_in into
//     the 17-bit code word data_trans; the word passes through a modelled
//     channel that XORs chan_err into it, and crc_serial_decoder, started by
//     the encoder's done pulse, returns data_decod and the syndrome
//     dec_error. chan_err = 0 gives an error-free transfer.
//
// Timing: see the sub-modules. CRC-15 results appear in the 2nd (tx) and
// 3rd (rx) cycle after the cycle of the last beat, at 3 bits per clock; the
// serial link's enc_done comes 14 cycles after crc_en and dec_done 19
// cycles after enc_done. All resets are synchronous and active high.
module can_crc_top
  import crc_pkg::*;
#(
  parameter int unsigned UNFOLD    = 3,
  parameter int unsigned LOOKAHEAD = 4
) (
  input  logic                               clk,
  input  logic                               rst,
  // CAN CRC-15 transmit encoder
  input  logic                               tx_valid,
  input  logic                               tx_sof,
  input  logic                               tx_last,
  input  logic [UNFOLD-1:0]                  tx_bits,
  output logic                               tx_crc_valid,
  output crc15_t                             tx_crc,
  // CAN CRC-15 receive decoder
  input  logic                               rx_valid,
  input  logic                               rx_sof,
  input  logic                               rx_last,
  input  logic [UNFOLD-1:0]                  rx_bits,
  output logic                               rx_result_valid,
  output crc15_t                             rx_syndrome,
  output logic                               rx_crc_ok,
  output logic                               rx_ack_slot,
  // serial 12-bit / 5-bit link
  input  logic                               crc_en,
  input  logic [DEMO_DATA_W-1:0]             data_in,
  input  logic [DEMO_DATA_W+DEMO_CRC_W-1:0]  chan_err,
  output logic [DEMO_DATA_W+DEMO_CRC_W-1:0]  data_trans,
  output logic [DEMO_CRC_W-1:0]              crc_out,
  output logic                               enc_done,
  output logic [DEMO_DATA_W-1:0]             data_decod,
  output logic [DEMO_CRC_W-1:0]              dec_error,
  output logic                               dec_done,
  output logic                               link_busy
);

  // ---------------- CAN CRC-15 ----------------
  crc15_unfolded #(
    .UNFOLD   (UNFOLD),
    .LOOKAHEAD(LOOKAHEAD),
    .WIDTH    (CAN_CRC_W),
    .POLY     (CAN_CRC_POLY)
  ) u_tx_crc (
    .clk      (clk),
    .rst      (rst),
    .in_valid (tx_valid),
    .in_sof   (tx_sof),
    .in_last  (tx_last),
    .in_bits  (tx_bits),
    .out_valid(tx_crc_valid),
    .out_crc  (tx_crc)
  );

  crc15_can_checker #(
    .UNFOLD   (UNFOLD),
    .LOOKAHEAD(LOOKAHEAD)
  ) u_rx_check (
    .clk         (clk),
    .rst         (rst),
    .in_valid    (rx_valid),
    .in_sof      (rx_sof),
    .in_last     (rx_last),
    .in_bits     (rx_bits),
    .result_valid(rx_result_valid),
    .syndrome    (rx_syndrome),
    .crc_ok      (rx_crc_ok),
    .ack_slot    (rx_ack_slot)
  );

  // ---------------- serial link ----------------
  logic                              enc_busy, dec_busy;
  logic [DEMO_DATA_W+DEMO_CRC_W-1:0] rx_word;

  assign rx_word   = data_trans ^ chan_err;
  assign link_busy = enc_busy || dec_busy;

  crc_serial_encoder #(
    .DATA_W(DEMO_DATA_W),
    .CRC_W (DEMO_CRC_W),
    .POLY  (DEMO_CRC_POLY)
  ) u_enc (
    .clk       (clk),
    .rst       (rst),
    .crc_en    (crc_en),
    .data_in   (data_in),
    .data_trans(data_trans),
    .crc_out   (crc_out),
    .busy      (enc_busy),
    .done      (enc_done)
  );

  crc_serial_decoder #(
    .DATA_W(DEMO_DATA_W),
    .CRC_W (DEMO_CRC_W),
    .POLY  (DEMO_CRC_POLY)
  ) u_dec (
    .clk       (clk),
    .rst       (rst),
    .dec_en    (enc_done),
    .data_trans(rx_word),
    .data_decod(data_decod),
    .error     (dec_error),
    .busy      (dec_busy),
    .done      (dec_done)
  );

  // The decoder takes longer than the encoder; a new word handed over while
  // it is still busy would be dropped.
  assert property (@(posedge clk) disable iff (rst) enc_done |-> !dec_busy)
    else $error("serial decoder busy when a new code word arrived");

endmodule
