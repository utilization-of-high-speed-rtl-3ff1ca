// crc_pkg: constants and types shared by the CRC-15 (CAN) units and the
// serial CRC encoder/decoder pair.
//
// CAN_CRC_POLY is the CAN generator polynomial
//   P(x) = x^15 + x^14 + x^10 + x^8 + x^7 + x^4 + x^3 + 1
// written without its leading x^15 term (binary 1100010110011001 with the
// top bit dropped), which is the form the LFSR taps use.
// DEMO_CRC_POLY is the small polynomial x^5 + x^4 + x^2 + 1 of the serial
// 12-bit encoder/decoder example, again without the leading term.
// The CRC register starts from zero for every frame (CAN practice).
package crc_pkg;

  localparam int unsigned    CAN_CRC_W    = 15;
  localparam logic [14:0]    CAN_CRC_POLY = 15'h4599;

  localparam int unsigned    DEMO_DATA_W   = 12;
  localparam int unsigned    DEMO_CRC_W    = 5;
  localparam logic [4:0]     DEMO_CRC_POLY = 5'h15;

  typedef logic [CAN_CRC_W-1:0] crc15_t;

  // States of the bit-serial encoder and decoder controllers.
  typedef enum logic [1:0] {
    SER_IDLE   = 2'd0,   // waiting for a start strobe
    SER_SHIFT  = 2'd1,   // one bit per clock into the LFSR
    SER_FINISH = 2'd2    // register the results, pulse done
  } ser_state_e;

endpackage
