// Error-coverage and false-alarm experiment for pom_sbox_ed.
//
// Three instances are built with different signature selections: all seven
// signatures, only the output signature, and the forward-matrix plus norm
// signatures. Faults are injected through the fault-injection port under
// three models:
//   flip1  - one bit of one intermediate value inverted (transient fault)
//   stuck1 - one bit of one intermediate value stuck at 0 or 1 (permanent)
//   multi  - a random multi-bit mask on one intermediate value
// For each model and each configuration the testbench counts faults that
// corrupt the 7-bit output, how many of those are detected, and false alarms
// (alarm raised while the output is correct). Checked: with all signatures,
// flip1 and stuck1 faults that corrupt the output are all detected; with only
// the output signature, no fault confined to the two dropped bits raises an
// alarm. The other figures are printed.
module tb_pom_coverage;
  import pom_sbox_pkg::*;

  localparam int NC = 3;
  localparam logic [NS-1:0] CFG [NC] = '{7'h7F, 7'h40, 7'h11};

  gf512_t        x;
  pom_fi_t       fi;
  logic [NO-1:0] y   [NC];
  logic [NS-1:0] err [NC];
  logic          alarm [NC];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    pom_sbox_ed #(.SIG_EN(CFG[c])) dut (.x(x), .fi(fi), .y(y[c]), .err(err[c]), .alarm(alarm[c]));
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NF = 15;
  localparam int FW [NF] = '{9, 3,3,3,3, 3, 3,3, 3, 3,3,3,3, 9, 9};

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

  // fault-free value of intermediate f in the first instance
  function automatic gf512_t golden(int f);
    case (f)
      0: return g_cfg[0].dut.a_w;   1: return 9'(g_cfg[0].dut.b00);
      2: return 9'(g_cfg[0].dut.b2v); 3: return 9'(g_cfg[0].dut.b0v);
      4: return 9'(g_cfg[0].dut.g);   5: return 9'(g_cfg[0].dut.b1v);
      6: return 9'(g_cfg[0].dut.c00); 7: return 9'(g_cfg[0].dut.c02);
      8: return 9'(g_cfg[0].dut.b3v); 9: return 9'(g_cfg[0].dut.t);
      10: return 9'(g_cfg[0].dut.e);  11: return 9'(g_cfg[0].dut.d);
      12: return 9'(g_cfg[0].dut.di); 13: return g_cfg[0].dut.b_w;
      default: return g_cfg[0].dut.y_w;
    endcase
  endfunction

  int harmful [3][NC], detected [3][NC], false_al [3][NC];
  string model_name [3] = '{"flip1", "stuck1", "multi"};
  logic [NO-1:0] y_ok;

  task automatic apply(int model, pom_fi_t f);
    fi = f; #1;
    for (int c = 0; c < NC; c++) begin
      if (y[c] !== y_ok) begin
        harmful[model][c]++;
        if (alarm[c]) detected[model][c]++;
      end else if (alarm[c]) false_al[model][c]++;
    end
  endtask

  initial begin
    int quiet_ok;
    gf512_t gv, m;
    fi = '0;
    for (int v = 0; v < 512; v++) begin
      x = 9'(v); fi = '0; #1;
      y_ok = y[0];
      for (int f = 0; f < NF; f++) begin
        gv = golden(f);
        for (int b = 0; b < FW[f]; b++) begin
          apply(0, mk_fault(f, 9'(1) << b));
          for (int s = 0; s < 2; s++) begin
            m = (gv[b] != 1'(s)) ? (9'(1) << b) : 9'(0);
            apply(1, mk_fault(f, m));
          end
        end
        fi = '0; #1;
      end
      for (int n = 0; n < 8; n++) apply(2, mk_fault($urandom_range(NF - 1), 9'($urandom_range(511))));
      fi = '0;
    end

    for (int md = 0; md < 3; md++)
      for (int c = 0; c < NC; c++)
        $display("%-6s SIG_EN=%b: output errors %0d, detected %0d (%0d%%), false alarms %0d",
                 model_name[md], CFG[c], harmful[md][c], detected[md][c],
                 harmful[md][c] ? 100 * detected[md][c] / harmful[md][c] : 0, false_al[md][c]);

    for (int md = 0; md < 2; md++) begin
      checks++;
      if (harmful[md][0] == 0 || detected[md][0] != harmful[md][0]) failures++;
    end

    // dropped-bit faults with the output signature only: never an alarm
    quiet_ok = 1;
    for (int v = 0; v < 512; v += 7) begin
      x = 9'(v);
      fi = mk_fault(14, 9'h101); #1;
      checks++;
      if (alarm[1] !== 1'b0 || alarm[0] !== 1'b0) begin failures++; quiet_ok = 0; end
    end
    fi = '0;
    $display("dropped-bit faults silent: %0d", quiet_ok);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
