// End-to-end testbench for crypto_ed_top at its default parameters.
//
// S-box side: all eight S-boxes are driven with all 512 inputs (each box with
// a different offset) and compared with a reference inverse in GF(2^9) found
// by search; then faults are injected one box at a time and the top-level
// alarm must rise, while a fault in a dropped output bit must leave the
// output and the alarm untouched. AES side: two FIPS-197 examples are
// encrypted, one start is issued while busy and must be ignored, and a second
// block is started in the cycle done is high. Each of these mechanisms is
// counted, and one that never happened counts as a failure.
module tb_crypto_ed_top;
  import pom_sbox_pkg::*;
  import aes_pkg::*;

  localparam int NB = 8;

  logic clk = 0, rst_n;
  gf512_t        sbox_x   [NB];
  pom_fi_t       sbox_fi  [NB];
  logic [NO-1:0] sbox_y   [NB];
  logic [NS-1:0] sbox_err [NB];
  logic          alarm;
  logic          aes_start, aes_busy, aes_done;
  block_t        aes_plaintext, aes_key, aes_ciphertext;

  int checks = 0, failures = 0, cyc = 0;
  int n_sbox = 0, n_detect = 0, n_quiet = 0, n_enc = 0, n_ignored = 0, n_b2b = 0;

  crypto_ed_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic gf512_t pmul(gf512_t a, gf512_t b);
    logic [16:0] p = '0;
    for (int i = 0; i < 9; i++) if (b[i]) p ^= 17'(a) << i;
    for (int i = 16; i >= 9; i--) if (p[i]) p ^= 17'h203 << (i - 9);
    return p[8:0];
  endfunction

  gf512_t ref_inv [512];

  task automatic run_block(block_t p, block_t k, block_t e, bit poke_busy);
    int t0;
    @(negedge clk);
    aes_plaintext = p; aes_key = k; aes_start = 1'b1;
    @(posedge clk); t0 = cyc;
    @(negedge clk);
    if (poke_busy) begin
      aes_plaintext = ~p;            // ignored: the core is busy
      if (aes_busy) n_ignored++;
    end else aes_start = 1'b0;
    @(negedge clk) aes_start = 1'b0;
    while (!aes_done) @(posedge clk);
    checks++;
    if (cyc - t0 != 11) begin failures++; $display("AES latency %0d", cyc - t0); end
    checks++;
    if (aes_ciphertext !== e) begin failures++; $display("AES ct %h", aes_ciphertext); end
    else n_enc++;
  endtask

  initial begin
    rst_n = 1'b0; aes_start = 1'b0; aes_plaintext = '0; aes_key = '0;
    for (int b = 0; b < NB; b++) begin sbox_x[b] = '0; sbox_fi[b] = '0; end
    for (int v = 0; v < 512; v++) begin
      ref_inv[v] = '0;
      for (int w = 1; w < 512; w++) if (pmul(9'(v), 9'(w)) == 9'd1) ref_inv[v] = 9'(w);
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // S-boxes, fault free
    for (int v = 0; v < 512; v++) begin
      for (int b = 0; b < NB; b++) sbox_x[b] = 9'(v + 61 * b);
      #1;
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (sbox_y[b] !== ref_inv[sbox_x[b]][7:1] || sbox_err[b] !== '0) failures++;
        else n_sbox++;
      end
      checks++; if (alarm !== 1'b0) failures++;
    end

    // fault injection, one box at a time
    for (int b = 0; b < NB; b++) begin
      sbox_fi[b] = '0;
      sbox_fi[b].d = 3'(1 << (b % 3));       // one bit of the norm D
      #1; checks++;
      if (alarm !== 1'b1 || sbox_err[b][SIG_D] !== 1'b1) failures++; else n_detect++;
      sbox_fi[b] = '0;
      sbox_fi[b].y = 9'h100;                 // dropped MSB of the inverse
      #1; checks++;
      if (alarm !== 1'b0 || sbox_y[b] !== ref_inv[sbox_x[b]][7:1]) failures++; else n_quiet++;
      sbox_fi[b] = '0;
    end

    // AES
    run_block(128'h3243f6a8_885a308d_313198a2_e0370734, 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c,
              128'h3925841d_02dc09fb_dc118597_196a0b32, 1'b1);
    // back-to-back: start while done is high
    aes_plaintext = 128'h00112233_44556677_8899aabb_ccddeeff;
    aes_key       = 128'h00010203_04050607_08090a0b_0c0d0e0f;
    aes_start     = 1'b1;
    if (aes_done) n_b2b++;
    @(posedge clk);
    @(negedge clk) aes_start = 1'b0;
    checks++; if (aes_busy !== 1'b1) failures++;
    while (!aes_done) @(posedge clk);
    checks++;
    if (aes_ciphertext !== 128'h69c4e0d8_6a7b0430_d8cdb780_70b4c55a) failures++; else n_enc++;

    $display("sbox lookups ok=%0d detected faults=%0d quiet dropped-bit faults=%0d", n_sbox, n_detect, n_quiet);
    $display("aes blocks ok=%0d ignored starts=%0d back-to-back starts=%0d", n_enc, n_ignored, n_b2b);
    checks++; if (n_sbox == 0)    failures++;
    checks++; if (n_detect == 0)  failures++;
    checks++; if (n_quiet == 0)   failures++;
    checks++; if (n_enc < 2)      failures++;
    checks++; if (n_ignored == 0) failures++;
    checks++; if (n_b2b == 0)     failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
