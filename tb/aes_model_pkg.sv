// aes_model_pkg: plain reference model of AES-128 encryption for the
// testbenches, written straight from the FIPS-197 definitions and sharing
// nothing with the RTL. The S-box is computed as the GF(2^8) inverse found
// by exhaustive search followed by the affine map; the key schedule and the
// rounds work on whole 16-byte arrays in column-major order.
package aes_model_pkg;

  typedef logic [7:0] byte_t;
  typedef byte_t block_t [16];

  function automatic byte_t gmul(input byte_t a, input byte_t b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= {8'h00, a} << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h011b << (i - 8);
    return p[7:0];
  endfunction

  function automatic byte_t sbox(input byte_t a);
    byte_t inv, r;
    inv = 8'h00;
    for (int y = 1; y < 256; y++) if (gmul(a, 8'(y)) == 8'h01) inv = 8'(y);
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  // round keys 0..10, 16 bytes each
  function automatic void expand_key(input block_t key, output block_t rk [11]);
    byte_t rc;
    rc = 8'h01;
    rk[0] = key;
    for (int r = 1; r <= 10; r++) begin
      for (int j = 0; j < 4; j++)
        rk[r][j] = rk[r-1][j] ^ sbox(rk[r-1][12 + (j+1)%4]) ^ ((j == 0) ? rc : 8'h00);
      for (int j = 4; j < 16; j++) rk[r][j] = rk[r-1][j] ^ rk[r][j-4];
      rc = gmul(rc, 8'h02);
    end
  endfunction

  function automatic block_t encrypt(input block_t pt, input block_t key);
    block_t rk [11];
    block_t s, t;
    expand_key(key, rk);
    for (int k = 0; k < 16; k++) s[k] = pt[k] ^ rk[0][k];
    for (int r = 1; r <= 10; r++) begin
      for (int c = 0; c < 4; c++)          // SubBytes + ShiftRows
        for (int i = 0; i < 4; i++) t[4*c+i] = sbox(s[4*((c+i)%4)+i]);
      if (r != 10)
        for (int c = 0; c < 4; c++)        // MixColumns
          for (int i = 0; i < 4; i++)
            s[4*c+i] = gmul(t[4*c+i], 8'h02) ^ gmul(t[4*c+(i+1)%4], 8'h03)
                     ^ t[4*c+(i+2)%4] ^ t[4*c+(i+3)%4];
      else s = t;
      for (int k = 0; k < 16; k++) s[k] ^= rk[r][k];
    end
    return s;
  endfunction

endpackage
