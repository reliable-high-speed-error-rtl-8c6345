// AES SubBytes substitution box, one byte, combinational.
//
// Computes the FIPS-197 S-box from its definition instead of storing a
// 256-entry table: the multiplicative inverse in GF(2^8) (as a^254, with 0
// mapped to 0) followed by the affine transformation with constant 0x63.
// Zero latency; out follows in.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t in,
  output byte_t out
);
  assign out = sbox_fn(in);
endmodule
