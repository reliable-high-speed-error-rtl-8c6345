// Shared types and byte-level functions for the AES-128 encryption core.
//
// Byte order follows FIPS-197: a 128-bit block is sixteen bytes, byte 0 in
// bits [127:120]; byte 4*c + r is row r of column c of the 4x4 state. Field
// arithmetic is in GF(2^8) modulo x^8 + x^4 + x^3 + x + 1.
package aes_pkg;

  localparam int unsigned NR = 10;  // rounds for a 128-bit key

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf256_mul(byte_t a, byte_t b);
    byte_t r = '0, p = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= p;
      p = xtime(p);
    end
    return r;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0).
  function automatic byte_t gf256_inv(byte_t a);
    byte_t p = a, r = 8'h01;
    for (int i = 1; i < 8; i++) begin
      p = gf256_mul(p, p);
      r = gf256_mul(r, p);
    end
    return r;
  endfunction

  // SubBytes: inverse followed by the affine map b ^ rotl(b,1..4) ^ 0x63.
  function automatic byte_t sbox_fn(byte_t a);
    byte_t b = gf256_inv(a);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^
           {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  function automatic byte_t get_byte(block_t s, int unsigned i);
    return s[127 - 8*i -: 8];
  endfunction

  function automatic block_t shift_rows(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(4*c + row) -: 8] = get_byte(s, 4*((c + row) % 4) + row);
    return r;
  endfunction

  function automatic word_t mix_column(word_t w);
    byte_t s0, s1, s2, s3;
    {s0, s1, s2, s3} = w;
    return {xtime(s0) ^ xtime(s1) ^ s1 ^ s2 ^ s3,
            s0 ^ xtime(s1) ^ xtime(s2) ^ s2 ^ s3,
            s0 ^ s1 ^ xtime(s2) ^ xtime(s3) ^ s3,
            xtime(s0) ^ s0 ^ s1 ^ s2 ^ xtime(s3)};
  endfunction

  function automatic block_t mix_columns(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      r[127 - 32*c -: 32] = mix_column(s[127 - 32*c -: 32]);
    return r;
  endfunction

endpackage
