// prefix_adder: W-bit binary adder built on a Ladner-Fischer carry unit.
//
// It forms g_i = a_i & b_i and p_i = a_i ^ b_i, computes every carry in
// parallel with lf_carry_unit and produces sum_i = p_i ^ carry_i, where the
// carry into bit 0 is zero. The modular adder uses it as the (n-1)-bit binary
// adder inside Adder D. The parallel-prefix Ladner-Fischer carry computation
// follows the architecture's evaluation; the absence of a carry input is this
// design's choice, since that use needs none.
//
// Interface: a, b operands (W bits); sum (W bits); cout carry out of the top
// bit. Combinational.
module prefix_adder #(
  parameter int unsigned W = 5
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W-1:0] g;
  logic [W-1:0] p;
  logic [W-1:0] gg;

  assign g = a & b;
  assign p = a ^ b;

  lf_carry_unit #(.W(W)) u_carry (
    .g (g),
    .p (p),
    .gg(gg)
  );

  if (W == 1) begin : g_one
    assign sum = p;
  end else begin : g_many
    assign sum = p ^ {gg[W-2:0], 1'b0};
  end
  assign cout = gg[W-1];

endmodule
