// modadd_checker: test helper that instantiates one modular adder for modulus
// MOD and applies every operand pair X, Y in [0, MOD), comparing r with
// (X + Y) mod MOD. When all pairs are done it raises done and leaves its
// counts on checks and failures. It also reports how often each output
// multiplexer input was chosen.
module modadd_checker #(
  parameter int unsigned MOD = 19
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_sel_b
);
  localparam int unsigned N = $clog2(MOD);

  logic [N-1:0] x, y, r;

  modular_adder #(.MOD(MOD)) u_dut (.x(x), .y(y), .r(r));

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    n_sel_b = 0;
    for (int unsigned a = 0; a < MOD; a++) begin
      for (int unsigned b = 0; b < MOD; b++) begin
        x = N'(a);
        y = N'(b);
        #1;
        if (u_dut.sel_b) n_sel_b++;
        checks++;
        if (32'(r) != (a + b) % MOD) begin
          failures++;
          if (failures < 10)
            $display("m=%0d x=%0d y=%0d: r=%0d expected %0d", MOD, a, b, r, (a + b) % MOD);
        end
      end
    end
    done = 1'b1;
  end
endmodule
