// tb_adder_a: checks Adder A, which reuses the CSA vectors, for every pair of
// operands at its defaults (n = 5, M = 13) and at n = 6, M = 23 (modulus 41).
// The S and C inputs are worked out here from the cell equations
// (s = x ^ y ^ M, c = majority(x, y, M)); {cout, sum} must equal X + Y.
module tb_adder_a;
  int checks = 0;
  int failures = 0;

  logic [4:0] x5, y5, s5, c5, sum5;
  logic       co5;
  logic [5:0] x6, y6, s6, c6, sum6;
  logic       co6;

  localparam logic [4:0] M5 = 5'd13;
  localparam logic [5:0] M6 = 6'd23;

  adder_a                      u_n5 (.x(x5), .y(y5), .s(s5), .c(c5), .sum(sum5), .cout(co5));
  adder_a #(.N(6), .M(M6))     u_n6 (.x(x6), .y(y6), .s(s6), .c(c6), .sum(sum6), .cout(co6));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++) begin
      for (int b = 0; b < 64; b++) begin
        x6 = 6'(a);
        y6 = 6'(b);
        s6 = x6 ^ y6 ^ M6;
        c6 = (x6 & y6) | (M6 & (x6 | y6));
        x5 = 5'(a);
        y5 = 5'(b);
        s5 = x5 ^ y5 ^ M5;
        c5 = (x5 & y5) | (M5 & (x5 | y5));
        #1;
        checks++;
        if ({co6, sum6} != 7'(a + b)) begin
          failures++;
          $display("n=6 %0d+%0d -> %0d", a, b, {co6, sum6});
        end
        if (a < 32 && b < 32) begin
          checks++;
          if ({co5, sum5} != 6'(a + b)) begin
            failures++;
            $display("n=5 %0d+%0d -> %0d", a, b, {co5, sum5});
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
