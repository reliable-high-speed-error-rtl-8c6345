// Self-checking testbench for aes128_encrypt.
//
// Encrypts the FIPS-197 examples (Appendix B and Appendix C.1) and checks the
// ciphertexts, the latency (done exactly 11 rising edges after the edge that
// samples start), that start is ignored while busy, back-to-back operation
// (a new start in the cycle done is high), and that reset in mid-operation
// returns the core to idle.
module tb_aes128_encrypt;
  logic clk = 0, rst_n, start, busy, done;
  logic [127:0] pt, key, ct;
  int checks = 0, failures = 0, cyc = 0;

  aes128_encrypt dut (.clk(clk), .rst_n(rst_n), .start(start), .plaintext(pt),
                      .key(key), .busy(busy), .done(done), .ciphertext(ct));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic encrypt(logic [127:0] p, logic [127:0] k, logic [127:0] exp_ct);
    int t0;
    @(negedge clk);
    pt = p; key = k; start = 1'b1;
    @(posedge clk); t0 = cyc;
    @(negedge clk);
    start = 1'b1; pt = ~p;           // must be ignored while busy
    @(negedge clk); start = 1'b0;
    while (!done) @(posedge clk);
    checks++;
    if (cyc - t0 != 11) begin failures++; $display("latency %0d", cyc - t0); end
    checks++;
    if (ct !== exp_ct) begin failures++; $display("ct=%h exp %h", ct, exp_ct); end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; pt = '0; key = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    checks++; if (busy !== 1'b0 || done !== 1'b0) failures++;

    encrypt(128'h3243f6a8_885a308d_313198a2_e0370734, 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c,
            128'h3925841d_02dc09fb_dc118597_196a0b32);
    encrypt(128'h00112233_44556677_8899aabb_ccddeeff, 128'h00010203_04050607_08090a0b_0c0d0e0f,
            128'h69c4e0d8_6a7b0430_d8cdb780_70b4c55a);

    // back-to-back: start again while done is high
    @(negedge clk);
    checks++; if (done !== 1'b0) failures++;   // done lasts one cycle
    pt = 128'h3243f6a8_885a308d_313198a2_e0370734;
    key = 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c;
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) @(posedge clk);
    @(negedge clk);
    checks++; if (done !== 1'b0) failures++;
    pt = 128'h00112233_44556677_8899aabb_ccddeeff;
    key = 128'h00010203_04050607_08090a0b_0c0d0e0f;
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) @(posedge clk);
    checks++; if (ct !== 128'h69c4e0d8_6a7b0430_d8cdb780_70b4c55a) failures++;
    // the ciphertext is held after done
    repeat (3) @(posedge clk);
    checks++; if (ct !== 128'h69c4e0d8_6a7b0430_d8cdb780_70b4c55a || busy) failures++;

    // reset in mid-operation
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    checks++; if (busy !== 1'b0 || done !== 1'b0) failures++;
    rst_n = 1'b1;
    encrypt(128'h00112233_44556677_8899aabb_ccddeeff, 128'h00010203_04050607_08090a0b_0c0d0e0f,
            128'h69c4e0d8_6a7b0430_d8cdb780_70b4c55a);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
