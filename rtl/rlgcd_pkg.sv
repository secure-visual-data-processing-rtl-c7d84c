// rlgcd_pkg: types and constants shared by the reversible-logic image
// cipher. A pixel is an 8-bit word (one grey level, or one colour channel);
// the key stream comes from an 8-bit maximal-length LFSR. The pixel width
// follows the design description; the LFSR polynomial and seed are this
// design's own choice, since only "an LFSR" is specified.
package rlgcd_pkg;

  // Width of one pixel / one colour channel.
  localparam int unsigned PIXEL_W = 8;

  typedef logic [PIXEL_W-1:0] pixel_t;

  // Fibonacci LFSR, shift towards the MSB, feedback = XOR of the state bits
  // selected by this mask (bits 7,5,4,3: x^8 + x^6 + x^5 + x^4 + 1,
  // a primitive polynomial, so the key stream repeats every 255 pixels).
  localparam pixel_t LFSR_TAPS = 8'hB8;

  // State loaded at reset. Encryptor and decryptor must share it: it is
  // the secret of this symmetric scheme. Must be non-zero.
  localparam pixel_t LFSR_SEED = 8'hA5;

endpackage
