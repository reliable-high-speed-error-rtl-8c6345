// Self-checking testbench for pom_sbox_ed.
//
// 1. All 512 inputs, no faults: the 7-bit output must equal bits 7..1 of the
//    inverse in GF(2^9) mod x^9+x+1, found here by exhaustive search with a
//    plain polynomial multiplier (no composite field involved), and no
//    signature may fire.
// 2. Single-bit faults: for random inputs, one bit of one intermediate value
//    is flipped through the fault-injection port. Every flip must raise the
//    signature that guards that value, except flips of the two dropped output
//    bits, which must change nothing and raise no alarm.
// 3. Random multi-bit faults are injected and the fraction detected among
//    those that corrupt the output is reported (not checked).
module tb_pom_sbox_ed;
  import pom_sbox_pkg::*;

  gf512_t        x;
  pom_fi_t       fi;
  logic [NO-1:0] y;
  logic [NS-1:0] err;
  logic          alarm;
  int checks = 0, failures = 0;

  pom_sbox_ed dut (.x(x), .fi(fi), .y(y), .err(err), .alarm(alarm));

  initial begin
    #1_000_000;
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

  // field sizes and the signature that must catch each
  localparam int NF = 15;
  localparam int FW [NF] = '{9, 3,3,3,3, 3, 3,3, 3, 3,3,3,3, 9, 9};
  localparam sig_e FS [NF] = '{SIG_A, SIG_B00, SIG_B00, SIG_B00, SIG_B00,
                              SIG_B1, SIG_B3, SIG_B, SIG_B3, SIG_D, SIG_D,
                              SIG_D, SIG_D, SIG_B, SIG_Y};

  function automatic pom_fi_t mk_fault(int f, gf512_t m);
    pom_fi_t r = '0;
    case (f)
      0: r.a = m;      1: r.b00 = m[2:0]; 2: r.b2 = m[2:0]; 3: r.b0 = m[2:0];
      4: r.g = m[2:0]; 5: r.b1 = m[2:0];  6: r.c00 = m[2:0]; 7: r.c02 = m[2:0];
      8: r.b3 = m[2:0]; 9: r.t = m[2:0];  10: r.e = m[2:0];  11: r.d = m[2:0];
      12: r.di = m[2:0]; 13: r.b = m;     default: r.y = m;
    endcase
    return r;
  endfunction

  initial begin
    int det, harmful;
    fi = '0;
    for (int v = 0; v < 512; v++) begin
      ref_inv[v] = '0;
      for (int w = 1; w < 512; w++)
        if (pmul(9'(v), 9'(w)) == 9'd1) ref_inv[v] = 9'(w);
    end
    // a few hand values of the inverse
    checks++; if (ref_inv[2] != 9'h101) failures++;
    checks++; if (ref_inv[9'h100] != 9'h1ff) failures++;

    // 1. fault-free exhaustive run
    for (int v = 0; v < 512; v++) begin
      x = 9'(v); #1;
      checks++;
      if (y !== ref_inv[v][7:1] || alarm !== 1'b0) begin
        failures++;
        if (failures < 10) $display("x=%h y=%h exp=%h err=%b", x, y, ref_inv[v][7:1], err);
      end
    end

    // 2. single-bit faults in every intermediate value
    for (int n = 0; n < 40; n++) begin
      x = 9'($urandom_range(511));
      for (int f = 0; f < NF; f++)
        for (int b = 0; b < FW[f]; b++) begin
          fi = mk_fault(f, 9'(1) << b); #1;
          checks++;
          if (f == NF - 1 && (b == 0 || b == 8)) begin
            if (alarm !== 1'b0 || y !== ref_inv[x][7:1]) failures++;
          end else if (err[FS[f]] !== 1'b1) begin
            failures++;
            if (failures < 10) $display("missed fault f=%0d bit=%0d x=%h err=%b", f, b, x, err);
          end
        end
      fi = '0;
    end

    // 3. random multi-bit faults: report coverage of output-corrupting faults
    det = 0; harmful = 0;
    for (int n = 0; n < 4000; n++) begin
      x  = 9'($urandom_range(511));
      fi = mk_fault($urandom_range(NF - 1), 9'($urandom_range(511)));
      #1;
      if (y !== ref_inv[x][7:1]) begin
        harmful++;
        if (alarm) det++;
      end
    end
    fi = '0;
    $display("multi-bit faults: %0d of %0d output errors detected", det, harmful);
    checks++;
    if (harmful == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
