// adder_d: final adder of the three-operand Adder B. It adds the CSA vectors S
// and C, where c_i carries weight 2^(i+1), and returns the n low bits of
// S + 2*C together with the bit of weight 2^n.
//
// Bit 0 of the result is s_0 itself, since nothing of weight 1 is added to it.
// Bits n-1..1 come from an (n-1)-bit binary adder of s[n-1:1] and c[n-2:0].
// The bit of weight 2^n would be c_{n-1} XOR cout of that adder; because the
// operands X, Y of a modular adder are below m, c_{n-1} and cout are never 1
// together, so an OR gate replaces the XOR, as the architecture prescribes.
// That OR is only correct for operands below the modulus.
//
// Interface: s, c CSA vectors (N bits); d low N bits of S + 2C; w2n the bit of
// weight 2^N, used as the select of the output multiplexers. Combinational.
// N must be at least 2.
module adder_d #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0] s,
  input  logic [N-1:0] c,
  output logic [N-1:0] d,
  output logic         w2n
);

  logic [N-2:0] upper;
  logic         cout;

  prefix_adder #(.W(N - 1)) u_add (
    .a   (s[N-1:1]),
    .b   (c[N-2:0]),
    .sum (upper),
    .cout(cout)
  );

  assign d   = {upper, s[0]};
  assign w2n = c[N-1] | cout;

endmodule
