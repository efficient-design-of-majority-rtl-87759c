// tb_mlam_ppr: the reduction tree alone, fed with the complete partial-product
// matrix of every operand pair (65536 cases). The tree's result
// p_low + 2^8 * (x_hi + y_hi + cin_hi) must match the software model of the
// reconstructed tree: summed error distance 118994280, maximum error 7690,
// 581 exact products, and the same result checksum. It also checks the two
// structural rules that hold for every input: product bit 3 is 0, and column
// 13 has no second-row bit. Selected products are compared one by one.
module tb_mlam_ppr;
  import tb_ref_pkg::*;
  logic [7:0][7:0] pp;
  logic [7:0] p_low;
  logic [6:0] x_hi, y_hi;
  logic cin_hi;
  int checks = 0, failures = 0;

  mlam_ppr dut (.pp(pp), .p_low(p_low), .x_hi(x_hi), .y_hi(y_hi), .cin_hi(cin_hi));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int unsigned md, input int unsigned mr, output int unsigned r);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) pp[i][j] = md[i] & mr[j];
    #1;
    r = int'(p_low) + ((int'(x_hi) + int'(y_hi) + int'(cin_hi)) << 8);
  endtask

  task automatic check_one(int unsigned md, int unsigned mr, int unsigned expected);
    int unsigned r;
    apply(md, mr, r);
    checks++;
    if (r != expected) begin
      failures++;
      $display("FAIL %0d x %0d -> %0d, expected %0d", md, mr, r, expected);
    end
  endtask

  int unsigned r, h = FNV_INIT;
  longint sum_ed = 0;
  int ed, max_ed = 0, exact = 0;
  initial begin
    for (int mr = 0; mr < 256; mr++)
      for (int md = 0; md < 256; md++) begin
        apply(md, mr, r);
        ed = int'(r) - md * mr;
        if (ed < 0) ed = -ed;
        sum_ed += longint'(ed);
        if (ed > max_ed) max_ed = ed;
        if (ed == 0) exact++;
        h = fnv(h, r);
        checks++;
        if (p_low[3] !== 1'b0 || y_hi[5] !== 1'b0) begin
          failures++;
          if (failures < 10) $display("FAIL structural rule at %0d x %0d", md, mr);
        end
      end
    checks++;
    if (sum_ed != 118994280 || max_ed != 7690 || exact != 581 || h != 32'hbf6e89c5) begin
      failures++;
      $display("FAIL error sum %0d max %0d exact %0d checksum %08h", sum_ed, max_ed, exact, h);
    end
    // individual products from the software model
    check_one(36, 129, 8192);
    check_one(13, 141, 2465);
    check_one(255, 255, 57335);
    check_one(200, 100, 23808);
    check_one(17, 34, 64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
