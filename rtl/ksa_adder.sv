// ksa_adder: W-bit Kogge-Stone parallel-prefix adder with carry in.
//
// Three parts:
//   pre-processing   p_i = a_i ^ b_i, g_i = a_i & b_i; the carry in is folded
//                    into bit 0 as g_0 | (p_0 & cin), so G_{i:0} is the carry
//                    out of bit i
//   prefix tree      ceil(log2 W) levels; at level l (span d = 2^l) bit i
//                    combines its group with that of bit i-d: a black cell
//                    (G and P) while the combined group does not reach bit 0,
//                    a gray cell (G only) when it first does, a buffer for
//                    bits below d
//   post-processing  s_i = p_i ^ C_{i-1}, with C_{-1} = cin
// The default W of 16 gives the 4-level, 16-bit tree. The approximate
// multiplier uses a 7-bit instance as its final adder. Combinational.
// The group-propagate bits produced by the last level are not needed by the
// sums; they are kept so every level has the same shape, and lint reports
// them as unused.
module ksa_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned L = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] p0, g0;

  // pre-processing
  assign p0 = a ^ b;
  always_comb begin
    g0    = a & b;
    g0[0] = (a[0] & b[0]) | (p0[0] & cin);
  end

  // prefix tree; g_lvl[l] holds the groups after level l: bit i covers
  // i : max(i-2^(l+1)+1, 0)
  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned D = 1 << l;
    logic [W-1:0] g_in, p_in, g_out, p_out;
    if (l == 0) begin : g_first
      assign g_in = g0;
      assign p_in = p0;
    end else begin : g_next
      assign g_in = g_lvl[l-1].g_out;
      assign p_in = g_lvl[l-1].p_out;
    end
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i < D) begin : g_buf
        assign g_out[i] = g_in[i];
        assign p_out[i] = p_in[i];
      end else if (i < 2 * D) begin : g_gray
        ksa_gray_cell u_gray (.g_hi(g_in[i]), .p_hi(p_in[i]), .g_lo(g_in[i-D]),
                              .g_out(g_out[i]));
        assign p_out[i] = p_in[i];   // group P is not needed past a gray cell
      end else begin : g_black
        ksa_black_cell u_black (.g_hi(g_in[i]), .p_hi(p_in[i]),
                                .g_lo(g_in[i-D]), .p_lo(p_in[i-D]),
                                .g_out(g_out[i]), .p_out(p_out[i]));
      end
    end
  end

  // carries: c[i] is the carry out of bit i
  logic [W-1:0] c;
  assign c = g_lvl[L-1].g_out;

  // post-processing
  assign sum[0] = p0[0] ^ cin;
  if (W > 1) begin : g_sum
    assign sum[W-1:1] = p0[W-1:1] ^ c[W-2:0];
  end
  assign cout = c[W-1];
endmodule
