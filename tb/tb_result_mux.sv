// tb_result_mux: random check of the output multiplexer row (5 bits): r must
// be in0 when sel is 0 and in1 when sel is 1.
module tb_result_mux;
  int checks = 0;
  int failures = 0;
  logic [4:0] in0, in1, r;
  logic       sel;

  result_mux u_dut (.in0(in0), .in1(in1), .sel(sel), .r(r));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      in0 = 5'($urandom);
      in1 = 5'($urandom);
      sel = i[0];
      #1;
      checks++;
      if (r != (sel ? in1 : in0)) begin
        failures++;
        $display("in0=%0d in1=%0d sel=%0d r=%0d", in0, in1, sel, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
