// Self-checking testbench for aes_key_step.
//
// Expands the FIPS-197 Appendix A.1 key 2b7e1516 28aed2a6 abf71588 09cf4f3c
// ten times through the block, with round constants 01, 02, ... 36 formed
// here, and checks round keys 1, 2 and 10 against the published expansion.
// Every step is also compared with a word-level reference model written here,
// whose S-box is computed by inverse search and the affine map.
module tb_aes_key_step;
  logic [127:0] rk_in, rk_out;
  logic [7:0]   rcon;
  int checks = 0, failures = 0;

  aes_key_step dut (.rk_in(rk_in), .rcon(rcon), .rk_out(rk_out));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] mul(logic [7:0] a, logic [7:0] b);
    logic [14:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 15'(a) << i;
    for (int i = 14; i >= 8; i--) if (p[i]) p ^= 15'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] sb(logic [7:0] a);
    logic [7:0] inv = '0, r;
    for (int v = 1; v < 256; v++) if (mul(a, 8'(v)) == 8'h01) inv = 8'(v);
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  function automatic logic [127:0] ref_step(logic [127:0] k, logic [7:0] rc);
    logic [31:0] w [8];
    logic [31:0] t;
    for (int i = 0; i < 4; i++) w[i] = k[127 - 32*i -: 32];
    t = {sb(w[3][23:16]) ^ rc, sb(w[3][15:8]), sb(w[3][7:0]), sb(w[3][31:24])};
    for (int i = 4; i < 8; i++) w[i] = w[i-4] ^ ((i == 4) ? t : w[i-1]);
    return {w[4], w[5], w[6], w[7]};
  endfunction

  initial begin
    logic [127:0] k;
    logic [7:0]   rc;
    k  = 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c;
    rc = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      rk_in = k; rcon = rc; #1;
      checks++;
      if (rk_out !== ref_step(k, rc)) begin failures++; $display("round %0d: %h", r, rk_out); end
      if (r == 1) begin
        checks++;
        if (rk_out !== 128'ha0fafe17_88542cb1_23a33939_2a6c7605) failures++;
      end
      if (r == 2) begin
        checks++;
        if (rk_out !== 128'hf2c295f2_7a96b943_5935807a_7359f67f) failures++;
      end
      if (r == 10) begin
        checks++;
        if (rk_out !== 128'hd014f9a8_c9ee2589_e13f0cc8_b6630ca6) failures++;
        checks++;
        if (rc !== 8'h36) failures++;
      end
      k  = rk_out;
      rc = mul(rc, 8'h02);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
