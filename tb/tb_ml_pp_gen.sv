// tb_ml_pp_gen: all 65536 operand pairs through the full 8x8 partial-product
// array (pp[i][j] must equal a[i] & b[j]) and through a masked array that
// builds only the products on the diagonal i == j (all others must read 0).
module tb_ml_pp_gen;
  localparam logic [63:0] DIAG = 64'h8040_2010_0804_0201;
  logic [7:0] a, b;
  logic [7:0][7:0] pp, pp_m;
  int checks = 0, failures = 0;

  ml_pp_gen dut (.a(a), .b(b), .pp(pp));
  ml_pp_gen #(.N(8), .USED(DIAG)) dut_m (.a(a), .b(b), .pp(pp_m));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0][7:0] exp_pp;
  initial begin
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      #1;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) exp_pp[i][j] = a[i] & b[j];
      checks++;
      if (pp !== exp_pp) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h", a, b);
      end
      checks++;
      if (pp_m !== (exp_pp & DIAG)) begin
        failures++;
        if (failures < 10) $display("FAIL masked a=%h b=%h", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
