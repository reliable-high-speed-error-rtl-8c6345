// AES-128 encryption core, iterative: one round per clock cycle.
//
// A 128-bit plaintext and a 128-bit key give a 128-bit ciphertext. When start
// is sampled high while the core is idle, the state register loads
// plaintext ^ key (the initial AddRoundKey) and the key register loads key.
// On each of the next ten cycles aes_key_step forms the next round key and
// aes_round applies one round to the state (the tenth without MixColumns).
// done is high for one cycle after the tenth round, and ciphertext then holds
// the result until the next start. Latency: 11 rising edges from the edge
// that samples start to the one that raises done; a new block can start in
// the cycle done is high. start is ignored while busy.
// Reset (rst_n low, asynchronous) returns the core to idle and clears its
// registers. The ten-round structure, the initial key addition and the
// 128-bit sizes follow the AES standard; the one-round-per-cycle schedule and
// the start/busy/done handshake are this design's choices.
module aes128_encrypt
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t plaintext,
  input  block_t key,
  output logic   busy,
  output logic   done,
  output block_t ciphertext
);
  block_t state_q, rk_q, rk_next, round_out;
  byte_t  rcon_q;
  logic [3:0] round_q;   // 1..10 while busy

  aes_key_step u_key (.rk_in(rk_q), .rcon(rcon_q), .rk_out(rk_next));
  aes_round    u_round (.in(state_q), .rk(rk_next),
                        .final_round(round_q == 4'(NR)), .out(round_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      rk_q    <= '0;
      rcon_q  <= 8'h01;
      round_q <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        state_q <= round_out;
        rk_q    <= rk_next;
        rcon_q  <= xtime(rcon_q);
        round_q <= round_q + 4'd1;
        if (round_q == 4'(NR)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else if (start) begin
        state_q <= plaintext ^ key;
        rk_q    <= key;
        rcon_q  <= 8'h01;
        round_q <= 4'd1;
        busy    <= 1'b1;
      end
    end
  end

  assign ciphertext = state_q;

  // The round counter stays within 1..10 while a block is in flight (busy is
  // low throughout reset, so the check needs no reset qualifier).
  a_round_range: assert property (@(posedge clk)
                                  busy |-> (round_q >= 4'd1 && round_q <= 4'(NR)));
endmodule
