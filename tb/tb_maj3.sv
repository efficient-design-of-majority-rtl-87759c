// tb_maj3: exhaustive check of the majority gate against "at least two of
// three inputs are 1".
module tb_maj3;
  logic a, b, c, f;
  int checks = 0, failures = 0;

  maj3 dut (.a(a), .b(b), .c(c), .f(f));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (f !== (int'(a) + int'(b) + int'(c) >= 2)) begin
        failures++;
        $display("FAIL maj3(%b,%b,%b) = %b", a, b, c, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
