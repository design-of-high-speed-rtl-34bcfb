// bcd_pkg: types and constants shared by the BCD multiplier.
//
// A BCD digit is a 4-bit code 0..9. The multiplier takes two 4-digit (16-bit)
// BCD operands and returns an 8-digit (32-bit) BCD product. The binary
// datapath between the converters is 16 bits per operand and 32 bits for the
// product, as in the block diagram of the design. pow10() gives the constants
// 10^k that the binary-to-BCD converter subtracts, and bitlen() their bit
// length, which the leading-one test compares against.
package bcd_pkg;

  localparam int unsigned OP_DIGITS   = 4;               // digits per operand
  localparam int unsigned OP_BITS     = 4 * OP_DIGITS;   // 16
  localparam int unsigned PROD_DIGITS = 2 * OP_DIGITS;   // 8
  localparam int unsigned PROD_BITS   = 4 * PROD_DIGITS; // 32

  typedef logic [3:0] bcd_digit_t;

  // 10^k as a 32-bit constant (k = 0..9).
  function automatic logic [31:0] pow10(input int unsigned k);
    logic [31:0] v;
    v = 32'd1;
    for (int unsigned i = 0; i < k; i++) v = v * 32'd10;
    return v;
  endfunction

  // Number of bits up to and including the leading one (0 for zero).
  function automatic int unsigned bitlen(input logic [31:0] v);
    int unsigned n;
    n = 0;
    for (int unsigned i = 0; i < 32; i++) if (v[i]) n = i + 1;
    return n;
  endfunction

endpackage
