// csa_cell: one bit position of the carry-save stage that adds the constant M
// to X + Y.
//
// At bit i the three operand bits are x_i, y_i and the constant bit M_i, so the
// full adder that would normally sit there collapses into a two-input cell:
//   * M_i = 0 (HA cell):  x + y     = 2*(x AND y) + (x XOR y)
//   * M_i = 1 (HA* cell): x + y + 1 = 2*(x OR y)  + (x XNOR y)
// The constant bit is a parameter, so each instance is one of the two cells.
// The HA / HA* split per bit of M is the architecture's; the gate equations are
// derived here from the arithmetic identities above.
//
// Interface: x, y operand bits; s sum bit (weight 2^i); c carry bit
// (weight 2^(i+1)). Purely combinational, no clock.
module csa_cell #(
  parameter bit MBIT = 1'b0  // bit of M at this position: 0 = HA, 1 = HA*
) (
  input  logic x,
  input  logic y,
  output logic s,
  output logic c
);

  if (MBIT) begin : g_ha_star
    assign s = ~(x ^ y);
    assign c = x | y;
  end else begin : g_ha
    assign s = x ^ y;
    assign c = x & y;
  end

endmodule
