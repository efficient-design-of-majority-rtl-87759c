// tb_qca_approx_top: end-to-end test of the whole design at its default
// parameters. It runs every multiplier operand pair (65536) and every 8-bit
// adder input (2^17) through the top level and checks the results against the
// software-model totals (error sums, maximum errors, checksums). It also counts
// how often each mechanism of the design is exercised and fails if one never
// is:
//   exact products, products overestimated by the OR-based compressor carry,
//   products underestimated by discarded partial products, final-adder carry
//   into product bit 15, carries between MLAFA-a blocks (the only adder with a
//   carry chain), Cin passed straight to S0 by MLAFA-b, Cin ignored by MLAFA-I
//   and MLAFA-II (results identical for cin 0 and 1), adder carry out.
module tb_qca_approx_top;
  import tb_ref_pkg::*;
  logic [7:0]  md, mr, a, b;
  logic [15:0] product;
  logic        cin;
  logic [8:0]  sum_a, sum_b, sum_i, sum_ii;
  int checks = 0, failures = 0;

  qca_approx_top dut (.md(md), .mr(mr), .product(product), .a(a), .b(b), .cin(cin),
                      .sum_a(sum_a), .sum_b(sum_b), .sum_i(sum_i), .sum_ii(sum_ii));

  localparam int EXP_SUM [4] = '{4792320, 4986880, 3751928, 3182336};
  localparam int EXP_MAX [4] = '{85, 85, 85, 68};
  localparam int unsigned EXP_H   [4] = '{32'h26a3c1c5, 32'h0c4e01c5, 32'hb57f8dc5, 32'h1b71ddc5};

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_exact = 0, n_over = 0, n_under = 0, n_p15 = 0;
  int n_chain = 0, n_bpass = 0, n_cin_ignored = 0, n_cout = 0;

  task automatic expect_event(string what, int n);
    checks++;
    $display("%-40s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  int unsigned hm = FNV_INIT;
  int unsigned h [4] = '{FNV_INIT, FNV_INIT, FNV_INIT, FNV_INIT};
  int unsigned got [4];
  logic [8:0] i0, ii0;
  longint sum_ed_m = 0;
  int ed, max_m = 0;
  int sum_ed [4] = '{0, 0, 0, 0};
  int max_ed [4] = '{0, 0, 0, 0};
  initial begin

    a = '0; b = '0; cin = 1'b0;
    // ---- multiplier ----
    for (int y = 0; y < 256; y++)
      for (int x = 0; x < 256; x++) begin
        md = 8'(x); mr = 8'(y);
        #1;
        ed = int'(product) - x * y;
        if (ed == 0) n_exact++;
        else if (ed > 0) n_over++;
        else n_under++;
        if (product[15]) n_p15++;
        if (ed < 0) ed = -ed;
        sum_ed_m += longint'(ed);
        if (ed > max_m) max_m = ed;
        hm = fnv(hm, int'(product));
      end
    checks++;
    if (sum_ed_m != 118994280 || max_m != 7690 || hm != 32'hbf6e89c5) begin
      failures++;
      $display("FAIL multiplier: error sum %0d max %0d checksum %08h", sum_ed_m, max_m, hm);
    end
    $display("multiplier NMED %f MAE %0d", real'(sum_ed_m) / (65536.0 * 65025.0), max_m);

    // ---- adders ----
    md = '0; mr = '0;
    for (int c = 0; c < 2; c++)
      for (int vb = 0; vb < 256; vb++)
        for (int va = 0; va < 256; va++) begin
          a = 8'(va); b = 8'(vb); cin = 1'(c);
          #1;
          got = '{int'(sum_a), int'(sum_b), int'(sum_i), int'(sum_ii)};
          for (int k = 0; k < 4; k++) begin
            ed = int'(got[k]) - (va + vb + c);
            if (ed < 0) ed = -ed;
            sum_ed[k] += ed;
            if (ed > max_ed[k]) max_ed[k] = ed;
            h[k] = fnv(h[k], got[k]);
            if (got[k][8]) n_cout++;
          end
          if (dut.u_add_a.carry[3:1] != 3'b000) n_chain++;
          checks++;
          if (sum_b[0] !== cin) begin
            failures++;
            if (failures < 10) $display("FAIL MLAFA-b S0 is not Cin");
          end else if (c == 1) n_bpass++;
          if (c == 1) begin
            // compare with the same operands at cin = 0
            i0 = sum_i; ii0 = sum_ii;
            cin = 1'b0;
            #1;
            checks++;
            if (sum_i !== i0 || sum_ii !== ii0) begin
              failures++;
              if (failures < 10) $display("FAIL MLAFA-I/II result depends on Cin");
            end else n_cin_ignored++;
          end
        end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (sum_ed[k] != EXP_SUM[k] || max_ed[k] != EXP_MAX[k] || h[k] != EXP_H[k]) begin
        failures++;
        $display("FAIL adder %0d: error sum %0d max %0d checksum %08h", k, sum_ed[k], max_ed[k], h[k]);
      end
    end

    expect_event("exact products", n_exact);
    expect_event("products over (compressor OR carry)", n_over);
    expect_event("products under (discarded products)", n_under);
    expect_event("final-adder carry into bit 15", n_p15);
    expect_event("MLAFA-a inter-block carries", n_chain);
    expect_event("MLAFA-b Cin passed to S0", n_bpass);
    expect_event("MLAFA-I/II Cin ignored", n_cin_ignored);
    expect_event("adder carry out", n_cout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
