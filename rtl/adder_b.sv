// adder_b: three-operand adder computing X + Y + M, where M = 2^n - m is the
// two's complement of the modulus.
//
// A carry-save row (csa_stage) reduces X, Y and the constant M to two vectors
// S and C; adder_d adds them. The output bit of weight 2^n is 1 exactly when
// X + Y >= m, and its low n bits are then |X + Y - m| = |X + Y|_m. This split
// into a CSA stage and Adder D is the architecture's.
// The CSA vectors are also brought out, because Adder A reuses them as its
// propagate and generate signals.
//
// Interface: x, y operands below m; d low N bits of X + Y + M; w2n the bit of
// weight 2^N (valid for operands below m, see adder_d); s, c the CSA sum and
// carry vectors (X + Y + M = S + 2C). Combinational.
module adder_b #(
  parameter int unsigned N = 5,
  parameter logic [N-1:0] M = 13  // 2^N - modulus; default is modulus 19
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] d,
  output logic         w2n,
  output logic [N-1:0] s,
  output logic [N-1:0] c
);

  csa_stage #(.N(N), .M(M)) u_csa (
    .x(x),
    .y(y),
    .s(s),
    .c(c)
  );

  adder_d #(.N(N)) u_adder_d (
    .s  (s),
    .c  (c),
    .d  (d),
    .w2n(w2n)
  );

endmodule
