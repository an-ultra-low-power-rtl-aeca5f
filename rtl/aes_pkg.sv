// aes_pkg: types, sizes and GF(2^8) helpers shared by the byte-serial
// AES-128 encryption core.
//
// The core works on one byte per clock cycle. A 16-byte block is held in
// column-major order (byte index 4*column + row, as in FIPS-197), the key is
// 128 bits, and an encryption takes ten rounds of sixteen cycles each, the
// last of which overlaps with unloading. The cycle plan below is this
// design's own; the 8-bit counter split (round index in the upper nibble,
// byte step in the lower) is the one the controller is built around.
package aes_pkg;

  typedef logic [7:0] byte_t;

  localparam int unsigned KEY_BYTES = 16;  // 128-bit key

  // multiply by x (i.e. by 2) in GF(2^8) modulo x^8 + x^4 + x^3 + x + 1
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // multiply by 3 = x + 1
  function automatic byte_t mul3(input byte_t a);
    return xtime(a) ^ a;
  endfunction

endpackage
