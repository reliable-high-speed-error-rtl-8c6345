// Self-checking testbench for aes_sbox.
//
// For all 256 inputs the output is compared with a reference built here
// independently: the inverse is found by searching for the byte whose
// shift-and-add product with the input is 1, then the affine map is applied
// bit by bit. Known FIPS-197 table entries are also checked, and the 256
// outputs must form a permutation.
module tb_aes_sbox;
  logic [7:0] in, out;
  int checks = 0, failures = 0;
  bit seen [256];

  aes_sbox dut (.in(in), .out(out));

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

  function automatic logic [7:0] ref_sbox(logic [7:0] a);
    logic [7:0] inv = '0, r;
    for (int v = 1; v < 256; v++) if (mul(a, 8'(v)) == 8'h01) inv = 8'(v);
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  task automatic expect_val(logic [7:0] a, logic [7:0] e);
    in = a; #1; checks++;
    if (out !== e) begin failures++; $display("S(%h)=%h exp %h", a, out, e); end
  endtask

  initial begin
    expect_val(8'h00, 8'h63); expect_val(8'h01, 8'h7c); expect_val(8'h53, 8'hed);
    expect_val(8'hff, 8'h16); expect_val(8'h10, 8'hca); expect_val(8'hc9, 8'hdd);
    for (int v = 0; v < 256; v++) begin
      in = 8'(v); #1; checks++;
      if (out !== ref_sbox(8'(v))) begin failures++; $display("S(%h)=%h", in, out); end
      seen[out] = 1'b1;
    end
    for (int v = 0; v < 256; v++) begin checks++; if (!seen[v]) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
