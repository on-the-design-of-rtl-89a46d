// modular_adder: single-cycle (purely combinational) modulo-m adder,
// R = |X + Y|_m for operands X, Y in [0, m), with n = ceil(log2 m) bits.
//
// Two additions run in parallel. Adder A forms X + Y, reusing the
// carry-save row's outputs as its propagate and generate bits. Adder B forms
// X + Y + M, where M = 2^n - m is the two's complement of the modulus, through
// a carry-save row (HA / HA* cells chosen by the bits of M) and a final adder
// whose top bit is an OR rather than an XOR. Adder B's bit of weight 2^n is 1
// exactly when X + Y >= m; it steers n 2:1 multiplexers to Adder B's low n bits
// (X + Y - m), otherwise to Adder A's sum. The critical path is therefore one
// (n-1)-bit adder, an OR gate and a multiplexer. Adder A's carry out is not
// needed: if X + Y reaches 2^n it is also >= m and Adder B is selected.
//
// The architecture is the one described for this adder; the Ladner-Fischer
// prefix carry units follow its evaluation. Defaults: modulus 19 (n = 5,
// M = 01101b), the worked example of the architecture. MOD must be at least 3;
// inputs at or above MOD give undefined results.
//
// Interface: x, y (N bits) operands; r (N bits) result. No clock or reset;
// the result is valid one combinational delay after the operands.
module modular_adder #(
  parameter int unsigned MOD = 19,
  parameter int unsigned N   = $clog2(MOD)
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] r
);

  localparam logic [N:0]   TWO_N = {1'b1, {N{1'b0}}};
  localparam logic [N-1:0] M     = N'(TWO_N - (N+1)'(MOD));

  if (MOD < 3 || MOD > (1 << N) || MOD <= (1 << (N - 1))) begin : g_bad_param
    $error("modular_adder: MOD must be at least 3 and N must equal ceil(log2(MOD))");
  end

  logic [N-1:0] sum_a;
  logic         cout_a;  // only checked below, see header
  logic [N-1:0] sum_b;
  logic         sel_b;
  logic [N-1:0] csa_s;
  logic [N-1:0] csa_c;

  adder_b #(.N(N), .M(M)) u_adder_b (
    .x  (x),
    .y  (y),
    .d  (sum_b),
    .w2n(sel_b),
    .s  (csa_s),
    .c  (csa_c)
  );

  adder_a #(.N(N), .M(M)) u_adder_a (
    .x   (x),
    .y   (y),
    .s   (csa_s),
    .c   (csa_c),
    .sum (sum_a),
    .cout(cout_a)
  );

  result_mux #(.N(N)) u_mux (
    .in0(sum_a),
    .in1(sum_b),
    .sel(sel_b),
    .r  (r)
  );

  // A carry out of Adder A means X + Y >= 2^n > m, so Adder B must be chosen.
  always_comb begin
    if (cout_a) assert (sel_b) else $error("modular_adder: Adder A overflow without Adder B select");
  end

endmodule
