// tb_mlafa_b: exhaustive check of mlafa_b. All 2^(2*2+1) inputs are compared with
// the block's logic equations restated in tb_ref_pkg; the summed error
// distance against a + b + cin must be 16, the maximum error 1, and the
// checksum of all results must match the software model.
module tb_mlafa_b;
  import tb_ref_pkg::*;
  logic [1:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  mlafa_b dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int d, ed, sum_ed = 0, max_ed = 0;
  int unsigned h = FNV_INIT;
  initial begin
    for (int c = 0; c < 2; c++)
      for (int vb = 0; vb < (1 << 2); vb++)
        for (int va = 0; va < (1 << 2); va++) begin
          a = 2'(va); b = 2'(vb); cin = 1'(c);
          #1;
          d = int'({cout, s});
          checks++;
          if ({cout, s} !== ref_mlafa_b(a, b, cin)) begin
            failures++;
            $display("FAIL a=%0d b=%0d cin=%0d -> %0d", va, vb, c, d);
          end
          ed = d - (va + vb + c);
          if (ed < 0) ed = -ed;
          sum_ed += ed;
          if (ed > max_ed) max_ed = ed;
          h = fnv(h, d);
        end
    checks++;
    if (sum_ed != 16 || max_ed != 1 || h != 32'h311422c1) begin
      failures++;
      $display("FAIL error sum %0d max %0d checksum %08h", sum_ed, max_ed, h);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
