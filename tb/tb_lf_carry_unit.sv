// tb_lf_carry_unit: checks the prefix carry unit against a ripple recurrence
// G[i:0] = g_i | (p_i & G[i-1:0]). The default width (4) is run exhaustively
// over all g, p; widths 9 (not a power of two) and 16 get random vectors.
module tb_lf_carry_unit;
  int checks = 0;
  int failures = 0;

  logic [3:0]  g4, p4, gg4;
  logic [8:0]  g9, p9, gg9;
  logic [15:0] g16, p16, gg16;

  lf_carry_unit                u_w4  (.g(g4),  .p(p4),  .gg(gg4));
  lf_carry_unit #(.W(9))       u_w9  (.g(g9),  .p(p9),  .gg(gg9));
  lf_carry_unit #(.W(16))      u_w16 (.g(g16), .p(p16), .gg(gg16));

  function automatic logic [31:0] ripple(input logic [31:0] g, input logic [31:0] p, input int w);
    logic [31:0] r;
    logic        carry;
    r = '0;
    carry = 1'b0;
    for (int i = 0; i < w; i++) begin
      carry = g[i] | (p[i] & carry);
      r[i] = carry;
    end
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    g9 = '0; p9 = '0; g16 = '0; p16 = '0;
    for (int v = 0; v < 256; v++) begin
      g4 = v[3:0];
      p4 = v[7:4];
      #1;
      checks++;
      if (32'(gg4) != ripple(32'(g4), 32'(p4), 4)) begin
        failures++;
        $display("W=4 g=%b p=%b gg=%b", g4, p4, gg4);
      end
    end
    for (int v = 0; v < 2000; v++) begin
      g9 = 9'($urandom);
      p9 = 9'($urandom);
      g16 = 16'($urandom) & 16'($urandom);
      p16 = 16'($urandom) | 16'($urandom);
      #1;
      checks++;
      if (32'(gg9) != ripple(32'(g9), 32'(p9), 9)) begin
        failures++;
        $display("W=9 g=%b p=%b gg=%b", g9, p9, gg9);
      end
      checks++;
      if (32'(gg16) != ripple(32'(g16), 32'(p16), 16)) begin
        failures++;
        $display("W=16 g=%b p=%b gg=%b", g16, p16, gg16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
