// tb_csa_stage: exhaustive check of the carry-save row at its defaults
// (n = 5, M = 13, the modulo-19 row). For every pair of 5-bit operands
// S + 2C must equal X + Y + 13, and S, C must match the bitwise cell
// equations worked out from the bits of M (01101b).
module tb_csa_stage;
  localparam int N = 5;
  localparam int MV = 13;
  int checks = 0;
  int failures = 0;
  logic [N-1:0] x, y, s, c;
  logic [N-1:0] mbits;

  csa_stage u_dut (.x(x), .y(y), .s(s), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mbits = N'(MV);
    for (int a = 0; a < (1 << N); a++) begin
      for (int b = 0; b < (1 << N); b++) begin
        x = N'(a);
        y = N'(b);
        #1;
        checks++;
        if (int'(s) + 2 * int'(c) != a + b + MV) begin
          failures++;
          $display("x=%0d y=%0d: s=%0d c=%0d", a, b, s, c);
        end
        checks++;
        if (s != ((x ^ y) ^ mbits) || c != ((x & y) | (mbits & (x | y)))) begin
          failures++;
          $display("x=%0d y=%0d: bitwise mismatch s=%b c=%b", a, b, s, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
