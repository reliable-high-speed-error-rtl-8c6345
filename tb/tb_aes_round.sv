// Self-checking testbench for aes_round.
//
// Uses the intermediate values of the FIPS-197 Appendix B example: the state
// after the initial key addition with round key 1 must give the start of
// round 2, and the start of round 10 with round key 10 and final_round set
// must give the ciphertext. Random states are also compared with a reference
// round written here from the standard's definitions.
module tb_aes_round;
  logic [127:0] in, rk, out;
  logic         final_round;
  int checks = 0, failures = 0;

  aes_round dut (.in(in), .rk(rk), .final_round(final_round), .out(out));

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

  function automatic logic [127:0] ref_round(logic [127:0] s, logic [127:0] k, bit fin);
    logic [7:0] st [4][4], t [4][4];
    logic [127:0] r;
    for (int c = 0; c < 4; c++)
      for (int rw = 0; rw < 4; rw++) st[rw][c] = sb(s[127 - 8*(4*c+rw) -: 8]);
    for (int c = 0; c < 4; c++)
      for (int rw = 0; rw < 4; rw++) t[rw][c] = st[rw][(c+rw)%4];
    for (int c = 0; c < 4; c++)
      for (int rw = 0; rw < 4; rw++)
        if (fin) st[rw][c] = t[rw][c];
        else st[rw][c] = mul(8'h02, t[rw][c]) ^ mul(8'h03, t[(rw+1)%4][c]) ^
                         t[(rw+2)%4][c] ^ t[(rw+3)%4][c];
    for (int c = 0; c < 4; c++)
      for (int rw = 0; rw < 4; rw++) r[127 - 8*(4*c+rw) -: 8] = st[rw][c];
    return r ^ k;
  endfunction

  task automatic check(logic [127:0] i, logic [127:0] k, bit f, logic [127:0] e);
    in = i; rk = k; final_round = f; #1; checks++;
    if (out !== e) begin failures++; $display("round(%h)=%h exp %h", i, out, e); end
  endtask

  initial begin
    check(128'h193de3be_a0f4e22b_9ac68d2a_e9f84808, 128'ha0fafe17_88542cb1_23a33939_2a6c7605,
          1'b0, 128'ha49c7ff2_689f352b_6b5bea43_026a5049);
    check(128'heb40f21e_592e3884_8ba113e7_1bc342d2, 128'hd014f9a8_c9ee2589_e13f0cc8_b6630ca6,
          1'b1, 128'h3925841d_02dc09fb_dc118597_196a0b32);
    for (int n = 0; n < 50; n++) begin
      logic [127:0] s, k;
      bit f;
      s = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      f = 1'($urandom);
      check(s, k, f, ref_round(s, k, f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
