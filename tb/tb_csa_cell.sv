// tb_csa_cell: exhaustive check of both cell kinds. For the HA cell
// (MBIT = 0) s + 2c must equal x + y; for the HA* cell (MBIT = 1) it must
// equal x + y + 1. All four input pairs are applied to both cells.
module tb_csa_cell;
  int checks = 0;
  int failures = 0;
  logic x, y;
  logic s0, c0, s1, c1;

  csa_cell #(.MBIT(1'b0)) u_ha   (.x(x), .y(y), .s(s0), .c(c0));
  csa_cell #(.MBIT(1'b1)) u_hast (.x(x), .y(y), .s(s1), .c(c1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      x = v[1];
      y = v[0];
      #1;
      checks++;
      if (int'(s0) + 2 * int'(c0) != int'(x) + int'(y)) begin
        failures++;
        $display("HA x=%0d y=%0d: s=%0d c=%0d", x, y, s0, c0);
      end
      checks++;
      if (int'(s1) + 2 * int'(c1) != int'(x) + int'(y) + 1) begin
        failures++;
        $display("HA* x=%0d y=%0d: s=%0d c=%0d", x, y, s1, c1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
