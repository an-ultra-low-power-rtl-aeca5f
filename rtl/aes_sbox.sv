// aes_sbox: AES SubBytes for one byte, computed in a tower field.
//
// The multiplicative inverse is not looked up in a 256-entry table. The byte
// is mapped by a linear change of basis from GF(2^8) (polynomial
// x^8+x^4+x^3+x+1) into the composite field GF(((2^2)^2)^2), inverted there
// with a handful of GF(2^4) and GF(2^2) multiplications, and mapped back. The
// back-mapping is merged with the linear part of the AES affine transform,
// so only the constant 0x63 is added afterwards.
//
// Tower used here (this design's choice of field polynomials):
//   GF(2^2) = GF(2)[z]   / (z^2 + z + 1)
//   GF(2^4) = GF(2^2)[y] / (y^2 + y + phi),    phi    = {10}  (= z)
//   GF(2^8) = GF(2^4)[x] / (x^2 + x + lambda), lambda = {1100}
// The basis change sends the AES element 'x' to the tower element 0x42, a
// root of the AES polynomial. Row i of TO_TOWER (and of FROM_TOWER_AFF)
// holds the mask of input bits whose parity gives output bit i.
// Inverse in a quadratic extension with t^2 = t + c:
//   (a1 t + a0)^-1 = (a1 d) t + (a0 + a1) d,  d = (a1^2 c + a1 a0 + a0^2)^-1
// and 0 maps to 0, as AES requires.
//
// Purely combinational: one byte in, its S-box value out, in the same cycle.
// The document prescribes a composite-field S-box; the polynomials, the
// isomorphism and the merged output matrix are this design's own.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);

  // bit i of the result = parity(in & MASK[i]); element 0 is listed first
  localparam byte_t TO_TOWER [8] = '{
    8'b0111_0001, 8'b1001_0110, 8'b1001_0000, 8'b0001_0100,
    8'b0111_0000, 8'b0000_1100, 8'b1101_1110, 8'b1010_0000
  };  // TO_TOWER[0] drives bit 0 ... TO_TOWER[7] drives bit 7
  localparam byte_t FROM_TOWER_AFF [8] = '{
    8'b1111_1011, 8'b1111_0101, 8'b0111_1001, 8'b0011_1011,
    8'b0011_1111, 8'b0101_0100, 8'b0011_0000, 8'b0011_1100
  };

  function automatic byte_t lin_map(input byte_t x, input byte_t m [8]);
    byte_t r;
    for (int i = 0; i < 8; i++) r[i] = ^(x & m[i]);
    return r;
  endfunction

  // GF(2^2) multiply, z^2 = z + 1
  function automatic logic [1:0] gf2_mul(input logic [1:0] a, input logic [1:0] b);
    logic hh;
    hh = a[1] & b[1];
    return {hh ^ (a[1] & b[0]) ^ (a[0] & b[1]), hh ^ (a[0] & b[0])};
  endfunction

  // GF(2^4) multiply, y^2 = y + phi
  function automatic logic [3:0] gf4_mul(input logic [3:0] a, input logic [3:0] b);
    logic [1:0] hh;
    hh = gf2_mul(a[3:2], b[3:2]);
    return {hh ^ gf2_mul(a[3:2], b[1:0]) ^ gf2_mul(a[1:0], b[3:2]),
            gf2_mul(hh, 2'b10) ^ gf2_mul(a[1:0], b[1:0])};
  endfunction

  // GF(2^2) inverse is squaring: (b1,b0) -> (b1, b1^b0)
  function automatic logic [1:0] gf2_inv(input logic [1:0] a);
    return {a[1], a[1] ^ a[0]};
  endfunction

  function automatic logic [3:0] gf4_inv(input logic [3:0] a);
    logic [1:0] d, di;
    d  = gf2_mul(gf2_mul(a[3:2], a[3:2]), 2'b10) ^ gf2_mul(a[3:2], a[1:0])
       ^ gf2_mul(a[1:0], a[1:0]);
    di = gf2_inv(d);
    return {gf2_mul(a[3:2], di), gf2_mul(a[1:0] ^ a[3:2], di)};
  endfunction

  logic [7:0] t;        // input in the tower basis
  logic [3:0] d, di;    // norm and its inverse in GF(2^4)
  logic [7:0] t_inv;    // inverse in the tower basis

  always_comb begin
    t     = lin_map(in_byte, TO_TOWER);
    d     = gf4_mul(gf4_mul(t[7:4], t[7:4]), 4'b1100) ^ gf4_mul(t[7:4], t[3:0])
          ^ gf4_mul(t[3:0], t[3:0]);
    di    = gf4_inv(d);
    t_inv = {gf4_mul(t[7:4], di), gf4_mul(t[3:0] ^ t[7:4], di)};
    out_byte = lin_map(t_inv, FROM_TOWER_AFF) ^ 8'h63;
  end

endmodule
