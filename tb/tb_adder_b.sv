// tb_adder_b: checks Adder B at its defaults (n = 5, M = 13, modulus 19) for
// every pair of operands below 19: d must equal (X + Y + 13) mod 32 and w2n
// must be 1 exactly when X + Y >= 19. The CSA vectors brought out must satisfy
// S + 2C = X + Y + 13.
module tb_adder_b;
  localparam int N = 5;
  localparam int MODV = 19;
  localparam int MV = (1 << N) - MODV;
  int checks = 0;
  int failures = 0;
  int n_sel = 0;

  logic [N-1:0] x, y, d, s, c;
  logic         w2n;

  adder_b u_dut (.x(x), .y(y), .d(d), .w2n(w2n), .s(s), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < MODV; a++) begin
      for (int b = 0; b < MODV; b++) begin
        x = N'(a);
        y = N'(b);
        #1;
        if (w2n) n_sel++;
        checks++;
        if (d != N'(a + b + MV)) begin
          failures++;
          $display("x=%0d y=%0d: d=%0d", a, b, d);
        end
        checks++;
        if (int'(s) + 2 * int'(c) != a + b + MV) begin
          failures++;
          $display("x=%0d y=%0d: s=%0d c=%0d", a, b, s, c);
        end
        checks++;
        if (w2n != (a + b >= MODV)) begin
          failures++;
          $display("x=%0d y=%0d: w2n=%0d", a, b, w2n);
        end
      end
    end
    $display("w2n set for %0d of %0d pairs", n_sel, MODV * MODV);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
