// tb_approx_adder_casc: exhaustive check of the 8-bit cascaded approximate
// adders, one instance per building block (the default instance is the
// MLAFA-I cascade). For every a, b, cin (2^17 cases) each result is compared
// with the building-block equations of tb_ref_pkg chained block by block, and
// the maximum error, summed error distance and result checksum are compared
// with the software model: MLAFA-a 85 / 4792320, MLAFA-b 85 / 4986880,
// MLAFA-I 85 / 3751928 (NMED 0.0560), MLAFA-II 68 / 3182336.
// A 16-bit MLAFA-I instance is checked on random operands.
module tb_approx_adder_casc;
  import qca_pkg::*;
  import tb_ref_pkg::*;

  logic [7:0]  a, b;
  logic        cin;
  logic [8:0]  sum_i, sum_a, sum_b, sum_ii;
  logic [15:0] a16, b16;
  logic [16:0] sum16;
  int checks = 0, failures = 0;

  approx_adder_casc dut (.a(a), .b(b), .cin(cin), .sum(sum_i));
  approx_adder_casc #(.KIND(KIND_MLAFA_A))  dut_a  (.a(a), .b(b), .cin(cin), .sum(sum_a));
  approx_adder_casc #(.KIND(KIND_MLAFA_B))  dut_b  (.a(a), .b(b), .cin(cin), .sum(sum_b));
  approx_adder_casc #(.KIND(KIND_MLAFA_II)) dut_ii (.a(a), .b(b), .cin(cin), .sum(sum_ii));
  approx_adder_casc #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .cin(cin), .sum(sum16));

  // reference cascade: kind 0..3 = a, b, I, II
  function automatic int unsigned ref_casc(int kind, int unsigned x, int unsigned y,
                                           bit c, int width);
    int unsigned r;
    bit [2:0] r2;
    bit [4:0] r4;
    r = 0;
    if (kind < 2) begin
      for (int k = 0; k < width / 2; k++) begin
        r2 = (kind == 0) ? ref_mlafa_a(2'(x >> (2*k)), 2'(y >> (2*k)), c)
                         : ref_mlafa_b(2'(x >> (2*k)), 2'(y >> (2*k)), c);
        r |= int'(r2[1:0]) << (2*k);
        c = r2[2];
      end
    end else begin
      for (int k = 0; k < width / 4; k++) begin
        r4 = (kind == 2) ? ref_mlafa_i(4'(x >> (4*k)), 4'(y >> (4*k)), c)
                         : ref_mlafa_ii(4'(x >> (4*k)), 4'(y >> (4*k)), c);
        r |= int'(r4[3:0]) << (4*k);
        c = r4[4];
      end
    end
    return r | (int'(c) << width);
  endfunction

  localparam int EXP_SUM [4] = '{4792320, 4986880, 3751928, 3182336};
  localparam int EXP_MAX [4] = '{85, 85, 85, 68};
  localparam int unsigned EXP_H   [4] = '{32'h26a3c1c5, 32'h0c4e01c5, 32'hb57f8dc5, 32'h1b71ddc5};

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned got [4];
  int sum_ed [4] = '{0, 0, 0, 0};
  int max_ed [4] = '{0, 0, 0, 0};
  int unsigned h [4] = '{FNV_INIT, FNV_INIT, FNV_INIT, FNV_INIT};
  int ed;
  initial begin
    for (int c = 0; c < 2; c++)
      for (int vb = 0; vb < 256; vb++)
        for (int va = 0; va < 256; va++) begin
          a = 8'(va); b = 8'(vb); cin = 1'(c);
          #1;
          got = '{int'(sum_a), int'(sum_b), int'(sum_i), int'(sum_ii)};
          for (int k = 0; k < 4; k++) begin
            checks++;
            if (got[k] != ref_casc(k, va, vb, 1'(c), 8)) begin
              failures++;
              if (failures < 10) $display("FAIL kind %0d a=%0d b=%0d cin=%0d -> %0d", k, va, vb, c, got[k]);
            end
            ed = int'(got[k]) - (va + vb + c);
            if (ed < 0) ed = -ed;
            sum_ed[k] += ed;
            if (ed > max_ed[k]) max_ed[k] = ed;
            h[k] = fnv(h[k], got[k]);
          end
        end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (sum_ed[k] != EXP_SUM[k] || max_ed[k] != EXP_MAX[k] || h[k] != EXP_H[k]) begin
        failures++;
        $display("FAIL kind %0d: error sum %0d max %0d checksum %08h", k, sum_ed[k], max_ed[k], h[k]);
      end
    end
    $display("8-bit MLAFA-I cascade: MAE %0d, NMED %f", max_ed[2],
             real'(sum_ed[2]) / (131072.0 * 511.0));
    // 16-bit cascade of MLAFA-I on random operands
    for (int n = 0; n < 20000; n++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); cin = 1'($urandom);
      #1;
      checks++;
      if (int'(sum16) != ref_casc(2, int'(a16), int'(b16), cin, 16)) begin
        failures++;
        if (failures < 10) $display("FAIL 16-bit %0d + %0d -> %0d", a16, b16, sum16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
