// adder_a: n-bit binary adder computing X + Y, with its propagate and
// generate signals taken from the carry-save row of Adder B where possible.
//
// The CSA cell at bit i already holds half of Adder A's bit-level work:
//   * where bit i of M is 0 (HA cell): s_i = x_i ^ y_i is the propagate p_i and
//     c_i = x_i & y_i is the generate g_i, so both are reused as they are;
//   * where bit i of M is 1 (HA* cell): s_i = ~(x_i ^ y_i) is the complement of
//     p_i, so p_i = ~s_i, while the generate x_i & y_i is formed here.
// The carries come from a Ladner-Fischer prefix unit and sum_i = p_i ^ carry_i
// with no carry into bit 0. Reusing the CSA outputs is the area saving that
// the architecture points out; doing it inside this module, with M as a
// parameter, is this design's choice.
//
// Lint reports some bits of x, y and c as unused: which ones depends on M,
// and that is the point of the sharing, not an oversight.
//
// Interface: x, y operands; s, c the CSA vectors for the same operands and the
// same M; sum (N bits) = X + Y mod 2^N; cout carry out. Combinational.
module adder_a #(
  parameter int unsigned N = 5,
  parameter logic [N-1:0] M = 13  // 2^N - modulus; default is modulus 19
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] s,
  input  logic [N-1:0] c,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N-1:0] g;
  logic [N-1:0] p;
  logic [N-1:0] gg;

  for (genvar i = 0; i < N; i++) begin : g_pg
    if (M[i]) begin : g_from_ha_star
      assign p[i] = ~s[i];
      assign g[i] = x[i] & y[i];
    end else begin : g_from_ha
      assign p[i] = s[i];
      assign g[i] = c[i];
    end
  end

  lf_carry_unit #(.W(N)) u_carry (
    .g (g),
    .p (p),
    .gg(gg)
  );

  assign sum  = p ^ {gg[N-2:0], 1'b0};
  assign cout = gg[N-1];

endmodule
