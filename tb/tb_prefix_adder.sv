// tb_prefix_adder: exhaustive check of the binary adder at its default width
// (5 bits) and at 1, 4 and 8 bits: {cout, sum} must equal a + b.
module tb_prefix_adder;
  int checks = 0;
  int failures = 0;

  logic [4:0] a5, b5, s5;
  logic       co5;
  logic [0:0] a1, b1, s1;
  logic       co1;
  logic [3:0] a4, b4, s4;
  logic       co4;
  logic [7:0] a8, b8, s8;
  logic       co8;

  prefix_adder            u_w5 (.a(a5), .b(b5), .sum(s5), .cout(co5));
  prefix_adder #(.W(1))   u_w1 (.a(a1), .b(b1), .sum(s1), .cout(co1));
  prefix_adder #(.W(4))   u_w4 (.a(a4), .b(b4), .sum(s4), .cout(co4));
  prefix_adder #(.W(8))   u_w8 (.a(a8), .b(b8), .sum(s8), .cout(co8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        a8 = 8'(a); b8 = 8'(b);
        a5 = 5'(a); b5 = 5'(b);
        a4 = 4'(a); b4 = 4'(b);
        a1 = 1'(a); b1 = 1'(b);
        #1;
        checks++;
        if ({co8, s8} != 9'(a + b)) begin
          failures++;
          $display("W=8 %0d+%0d -> %0d", a, b, {co8, s8});
        end
        if (a < 32 && b < 32) begin
          checks++;
          if ({co5, s5} != 6'(a + b)) begin
            failures++;
            $display("W=5 %0d+%0d -> %0d", a, b, {co5, s5});
          end
        end
        if (a < 16 && b < 16) begin
          checks++;
          if ({co4, s4} != 5'(a + b)) begin
            failures++;
            $display("W=4 %0d+%0d -> %0d", a, b, {co4, s4});
          end
        end
        if (a < 2 && b < 2) begin
          checks++;
          if ({co1, s1} != 2'(a + b)) begin
            failures++;
            $display("W=1 %0d+%0d -> %0d", a, b, {co1, s1});
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
