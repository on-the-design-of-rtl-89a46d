// tb_modular_adder_moduli: runs the modular adder exhaustively for the five
// moduli of the architecture's delay, area and power comparison (29, 41, 97,
// 211, 453; n = 5..9), the worked example modulus 19, and edge cases of the
// construction: the smallest modulus 3, powers of two (16, 256, where M = 0
// and every cell is an HA), moduli 2^n + 1 (17, 257) and 2^n - 1 (31, 255).
// Each modulus runs in its own modadd_checker; every operand pair below the
// modulus is checked against (X + Y) mod m.
module tb_modular_adder_moduli;
  localparam int NMOD = 12;
  localparam int unsigned MODS [NMOD] = '{29, 41, 97, 211, 453, 19, 3, 16, 256, 17, 257, 31};

  logic [NMOD-1:0] done;
  int chk [NMOD];
  int fail [NMOD];
  int selb [NMOD];

  for (genvar k = 0; k < NMOD; k++) begin : g_mod
    modadd_checker #(.MOD(MODS[k])) u_chk (
      .done    (done[k]),
      .checks  (chk[k]),
      .failures(fail[k]),
      .n_sel_b (selb[k])
    );
  end

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  initial begin
    int checks;
    int failures;
    checks = 0;
    failures = 0;
    wait (&done);
    for (int k = 0; k < NMOD; k++) begin
      $display("m=%0d: %0d pairs, %0d failures, Adder B chosen %0d times",
               MODS[k], chk[k], fail[k], selb[k]);
      checks += chk[k];
      failures += fail[k];
      checks++;
      if (selb[k] == 0 || selb[k] == chk[k]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
