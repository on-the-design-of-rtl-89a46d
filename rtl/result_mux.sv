// result_mux: the row of n 2:1 multiplexers at the output of the modular adder.
//
// Input 0 is the Adder A result (X + Y), input 1 the Adder B result
// (X + Y - m modulo 2^n); sel is Adder B's output of weight 2^n, which is 1
// when X + Y >= m. The input numbering follows the architecture's figure.
//
// Interface: in0, in1 (N bits), sel; r (N bits). Combinational.
module result_mux #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0] in0,
  input  logic [N-1:0] in1,
  input  logic         sel,
  output logic [N-1:0] r
);

  always_comb begin
    if (sel) r = in1;
    else     r = in0;
  end

endmodule
