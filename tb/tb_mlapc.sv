// tb_mlapc: exhaustive check of the 6:3 compressor. Expected outputs:
// S0 = x2, S1 = x5, Cout = x4 | x6, and x1/x3 must have no effect. Also
// checks the error of the weighted sum S0 + 2*S1 + 4*Cout against the exact
// x2 + 2*(x4+x5+x6) of the inputs it keeps: 0 unless exactly one of x4, x6
// is 1, then +2.
module tb_mlapc;
  logic x1, x2, x3, x4, x5, x6, s0, s1, cout;
  int checks = 0, failures = 0;

  mlapc dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .x5(x5), .x6(x6),
             .s0(s0), .s1(s1), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int approx, exact;
  initial begin
    for (int v = 0; v < 64; v++) begin
      {x6, x5, x4, x3, x2, x1} = 6'(v);
      #1;
      checks++;
      if (s0 !== x2 || s1 !== x5 || cout !== (x4 | x6)) begin
        failures++;
        $display("FAIL inputs %06b -> s0 %b s1 %b cout %b", v[5:0], s0, s1, cout);
      end
      approx = int'(s0) + 2 * int'(s1) + 4 * int'(cout);
      exact  = int'(x2) + 2 * (int'(x4) + int'(x5) + int'(x6));
      checks++;
      if (approx - exact != ((x4 ^ x6) ? 2 : 0)) begin
        failures++;
        $display("FAIL error of %06b: %0d", v[5:0], approx - exact);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
