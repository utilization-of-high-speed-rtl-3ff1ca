// crc_ref_pkg: reference arithmetic for the CRC testbenches.
//
// Works by plain polynomial long division over GF(2) on a bit vector, which
// is a different computation from the shift-register form used by the
// hardware: the remainder of a message M(x) times x^w divided by the full
// generator polynomial (including its x^w term) is the CRC; the remainder
// of a whole code word is its syndrome.
package crc_ref_pkg;

  localparam int unsigned MAXB = 512;
  typedef logic [MAXB-1:0] bitvec_t;

  // Remainder of v (len bits, bit len-1 is the highest power) modulo the
  // generator fullpoly of degree w.
  function automatic logic [31:0] poly_mod(input bitvec_t v, input int len,
                                           input int w,
                                           input logic [32:0] fullpoly);
    bitvec_t r;
    r = v;
    for (int i = len - 1; i >= w; i--)
      if (r[i]) r = r ^ (bitvec_t'(fullpoly) << (i - w));
    return 32'(r & ((bitvec_t'(1) << w) - 1));
  endfunction

  // CRC of a message of len bits: remainder of M(x) * x^w.
  function automatic logic [31:0] crc_of(input bitvec_t msg, input int len,
                                         input int w,
                                         input logic [32:0] fullpoly);
    return poly_mod(msg << w, len + w, w, fullpoly);
  endfunction

  // CAN CRC-15 generator, all 16 coefficients (binary 1100010110011001).
  localparam logic [32:0] CAN_P = 33'h0C599;
  // x^5 + x^4 + x^2 + 1 (binary 110101).
  localparam logic [32:0] DEMO_P = 33'h35;
  // x^4 + x^2 + 1 (binary 10101).
  localparam logic [32:0] TUTOR_P = 33'h15;

  // Random message of len bits.
  function automatic bitvec_t rand_msg(input int len);
    bitvec_t m;
    m = '0;
    for (int i = 0; i < len; i++) m[i] = 1'($urandom);
    return m;
  endfunction

endpackage
