// tb_modular_adder: end-to-end test of the modular adder with every parameter
// at its default (modulus 19, 5-bit operands). All 19 x 19 operand pairs are
// applied; r must equal (X + Y) mod 19 in the same time step (the adder is
// combinational, zero clock cycles of latency).
//
// It also counts each mechanism of the architecture and fails if one never
// happens: the Adder A result selected, the Adder B result selected, the top
// carry-save carry c_{n-1} set, the carry out of Adder D's (n-1)-bit adder set,
// and Adder A overflowing past 2^n. The two inputs of Adder D's top OR gate
// must never be 1 together (that is what allows an OR in place of an XOR).
module tb_modular_adder;
  localparam int MODV = 19;
  localparam int N = 5;
  int checks = 0;
  int failures = 0;
  int n_sel_a = 0, n_sel_b = 0, n_cmsb = 0, n_cout = 0, n_ovf_a = 0;

  logic [N-1:0] x, y, r;

  modular_adder u_dut (.x(x), .y(y), .r(r));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < MODV; a++) begin
      for (int b = 0; b < MODV; b++) begin
        x = N'(a);
        y = N'(b);
        #1;
        if (u_dut.sel_b) n_sel_b++;
        else             n_sel_a++;
        if (u_dut.cout_a) n_ovf_a++;
        if (u_dut.u_adder_b.u_adder_d.c[N-1]) n_cmsb++;
        if (u_dut.u_adder_b.u_adder_d.cout) n_cout++;
        checks++;
        if (u_dut.u_adder_b.u_adder_d.c[N-1] && u_dut.u_adder_b.u_adder_d.cout) begin
          failures++;
          $display("x=%0d y=%0d: both inputs of the top OR are 1", a, b);
        end
        checks++;
        if (int'(r) != (a + b) % MODV) begin
          failures++;
          $display("x=%0d y=%0d: r=%0d expected %0d", a, b, r, (a + b) % MODV);
        end
      end
    end
    $display("select A %0d, select B %0d, c_msb %0d, adder D cout %0d, adder A overflow %0d",
             n_sel_a, n_sel_b, n_cmsb, n_cout, n_ovf_a);
    checks++;
    if (n_sel_a == 0) failures++;
    checks++;
    if (n_sel_b == 0) failures++;
    checks++;
    if (n_cmsb == 0) failures++;
    checks++;
    if (n_cout == 0) failures++;
    checks++;
    if (n_ovf_a == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
