// tb_adder_d: exhaustive check of Adder D at its default width (n = 5).
// For every pair of vectors S, C: d must be the low 5 bits of S + 2C, and
// w2n must be 1 exactly when S + 2C >= 2^5. (The OR that forms w2n equals
// bit 5 OR bit 6 of S + 2C, which is that comparison, for any S and C.)
// It also counts how often c_{n-1} and the (n-1)-bit adder's carry out are
// each 1, and checks that both cases occur.
module tb_adder_d;
  localparam int N = 5;
  int checks = 0;
  int failures = 0;
  int n_cmsb = 0;
  int n_cout = 0;

  logic [N-1:0] s, c, d;
  logic         w2n;

  adder_d u_dut (.s(s), .c(c), .d(d), .w2n(w2n));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << N); a++) begin
      for (int b = 0; b < (1 << N); b++) begin
        int total;
        s = N'(a);
        c = N'(b);
        total = a + 2 * b;
        #1;
        if (c[N-1]) n_cmsb++;
        if ((a >> 1) + (b & ((1 << (N - 1)) - 1)) >= (1 << (N - 1))) n_cout++;
        checks++;
        if (d != N'(total)) begin
          failures++;
          $display("s=%0d c=%0d: d=%0d", a, b, d);
        end
        checks++;
        if (w2n != (total >= (1 << N))) begin
          failures++;
          $display("s=%0d c=%0d: w2n=%0d", a, b, w2n);
        end
      end
    end
    checks++;
    if (n_cmsb == 0 || n_cout == 0) failures++;
    $display("c_msb set %0d times, cout set %0d times", n_cmsb, n_cout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
