// One AES encryption round, combinational.
//
// out = AddRoundKey(MixColumns(ShiftRows(SubBytes(in))), rk); when final is
// high MixColumns is skipped, as in the last of the ten rounds. SubBytes uses
// sixteen aes_sbox instances. The encryption core applies this block once per
// clock cycle.
module aes_round
  import aes_pkg::*;
(
  input  block_t in,
  input  block_t rk,
  input  logic   final_round,
  output block_t out
);
  block_t sb, sr;

  for (genvar i = 0; i < 16; i++) begin : g_sub
    aes_sbox u_sbox (.in(in[8*i +: 8]), .out(sb[8*i +: 8]));
  end

  always_comb begin
    sr  = shift_rows(sb);
    out = (final_round ? sr : mix_columns(sr)) ^ rk;
  end
endmodule
