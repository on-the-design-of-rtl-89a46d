// csa_stage: carry-save reduction of X + Y + M into a sum vector S and a carry
// vector C, with X + Y + M = S + 2*C.
//
// M = 2^n - m is a constant, so the stage is a row of n two-input cells: an HA
// cell where the bit of M is 0 and an HA* cell where it is 1 (see csa_cell).
// With the defaults (n = 5, M = 13 = 01101b, i.e. modulus 19) the row is, from
// bit 4 down to bit 0: HA, HA*, HA*, HA, HA*, as in the modulo-19 example of
// the architecture. Both vectors are n bits wide; c_i has weight 2^(i+1).
//
// Interface: x, y operands; s, c the two output vectors. Combinational.
module csa_stage #(
  parameter int unsigned N = 5,
  parameter logic [N-1:0] M = 13  // 2^N - modulus
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] s,
  output logic [N-1:0] c
);

  for (genvar i = 0; i < N; i++) begin : g_cell
    csa_cell #(.MBIT(M[i])) u_cell (
      .x(x[i]),
      .y(y[i]),
      .s(s[i]),
      .c(c[i])
    );
  end

endmodule
