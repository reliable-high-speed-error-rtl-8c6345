// One step of the AES-128 key expansion, combinational.
//
// From round key i (words w0..w3, w0 in bits [127:96]) and the round
// constant rcon it forms round key i+1:
//   tmp = SubWord(RotWord(w3)) ^ {rcon, 24'h0}
//   w4 = w0 ^ tmp, w5 = w1 ^ w4, w6 = w2 ^ w5, w7 = w3 ^ w6.
// The four S-boxes are aes_sbox instances. Computing the keys one step at a
// time lets the encryption core expand the key on the fly instead of storing
// all eleven round keys.
module aes_key_step
  import aes_pkg::*;
(
  input  block_t rk_in,
  input  byte_t  rcon,
  output block_t rk_out
);
  word_t w0, w1, w2, w3, rot, sub, w4, w5, w6, w7;

  assign {w0, w1, w2, w3} = rk_in;
  assign rot = {w3[23:0], w3[31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_sub
    aes_sbox u_sbox (.in(rot[8*i +: 8]), .out(sub[8*i +: 8]));
  end

  assign w4 = w0 ^ sub ^ {rcon, 24'h0};
  assign w5 = w1 ^ w4;
  assign w6 = w2 ^ w5;
  assign w7 = w3 ^ w6;
  assign rk_out = {w4, w5, w6, w7};
endmodule
