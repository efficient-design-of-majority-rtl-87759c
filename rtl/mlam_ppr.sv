// mlam_ppr: partial-product reduction (PPR) tree of the approximate unsigned
// 8x8 multiplier, built from 13 approximate parallel 6:3 compressors (MLAPC)
// and 2 exact full adders in two Wallace-style stages.
//
// Partial products are arranged as a diamond: column k (weight 2^k) holds
// min(k+1, 15-k) products stacked in rows 1..8. Row r of column k holds
//   a[k-r+1] & b[r-1]   for k <= 7
//   a[8-r]   & b[k-8+r] for k >= 7.
// An MLAPC placed on columns (j+1, j) takes x1..x3 from rows of column j and
// x4..x6 from column j+1; it sends x2 to column j, x5 to column j+1 and
// x4|x6 to column j+2.
//
// Stage 1, rows 1-3: MLAPCs on column pairs (12,11) (10,9) (8,7) (6,5) (4,3).
//          rows 4-6: MLAPCs on (10,9) (8,7) (6,5).
// Stage 2: full adders on columns 13 and 11, MLAPCs on (9,8) (7,6) (5,4)
//          (3,2) and a second MLAPC on (7,6) that reads only column 7.
// Stage 3: columns 8..14 hold two rows plus a third bit in column 8; they go
//          to a 7-bit final adder (x_hi + y_hi + cin_hi). Columns 0..7 keep
//          one bit each, which is the product bit directly; the second bit of
//          columns 1, 4, 6 and 7 is dropped and no carry crosses into column 8.
// Products in MLAPC x1/x3 positions and products whose compressor outputs the
// next stage does not read are never used; mlam8 does not generate them.
// Bit 3 of the product is always 0 (the stage-2 compressor on (3,2) has no x5).
// Combinational.
module mlam_ppr (
  input  logic [7:0][7:0] pp,       // pp[i][j] = a[i] & b[j]
  output logic [7:0]      p_low,    // product bits 7..0
  output logic [6:0]      x_hi,     // first row of columns 14..8
  output logic [6:0]      y_hi,     // second row of columns 14..8
  output logic            cin_hi    // third bit of column 8
);
  // ---- diamond view of the partial products: dm[row][column] -------------
  logic dm [1:8][0:14];
  for (genvar r = 1; r <= 8; r++) begin : g_r
    for (genvar k = 0; k <= 14; k++) begin : g_k
      localparam int I = (k <= 7) ? k - r + 1 : 8 - r;
      localparam int J = k - I;
      if (I >= 0 && I <= 7 && J >= 0 && J <= 7) begin : g_pp
        assign dm[r][k] = pp[I][J];
      end else begin : g_empty
        assign dm[r][k] = 1'b0;
      end
    end
  end

  // ---- stage 1, rows 1-3: one MLAPC per column pair (u, u-1) --------------
  // t_s0[u] at column u-1, t_s1[u] at column u, t_co[u] at column u+1
  logic t_s0 [4:12];
  logic t_s1 [4:12];
  logic t_co [4:12];
  for (genvar u = 4; u <= 12; u += 2) begin : g_top
    mlapc u_c (.x1(dm[1][u-1]), .x2(dm[2][u-1]), .x3(dm[3][u-1]),
               .x4(dm[1][u]),   .x5(dm[2][u]),   .x6(dm[3][u]),
               .s0(t_s0[u]), .s1(t_s1[u]), .cout(t_co[u]));
  end

  // ---- stage 1, rows 4-6 ---------------------------------------------------
  logic m_s0 [6:10];
  logic m_s1 [6:10];
  logic m_co [6:10];
  // column 10 holds only two products, in rows 4 and 5; they take x4 and x6
  mlapc u_m10 (.x1(dm[4][9]), .x2(dm[5][9]), .x3(dm[6][9]),
               .x4(dm[4][10]), .x5(1'b0), .x6(dm[5][10]),
               .s0(m_s0[10]), .s1(m_s1[10]), .cout(m_co[10]));
  for (genvar u = 6; u <= 8; u += 2) begin : g_mid
    mlapc u_c (.x1(dm[4][u-1]), .x2(dm[5][u-1]), .x3(dm[6][u-1]),
               .x4(dm[4][u]),   .x5(dm[5][u]),   .x6(dm[6][u]),
               .s0(m_s0[u]), .s1(m_s1[u]), .cout(m_co[u]));
  end

  // ---- stage 2 --------------------------------------------------------------
  logic fa13_s, fa13_c, fa11_s, fa11_c;
  ml_full_adder u_fa13 (.a(dm[1][13]), .b(t_co[12]), .cin(dm[2][13]),
                        .sum(fa13_s), .cout(fa13_c));
  ml_full_adder u_fa11 (.a(t_s0[12]), .b(t_co[10]), .cin(dm[4][11]),
                        .sum(fa11_s), .cout(fa11_c));

  // (9,8): column 9 = {S0 of top (10,9), Cout of top (8,7), S0 of mid (10,9)}
  //        column 8 = S1 of mid (8,7); S1 of top (8,7) and row 7 of column 8
  //        would sit on x1/x3 and are not used
  logic q98_s0, q98_s1, q98_co;
  mlapc u_q98 (.x1(1'b0), .x2(m_s1[8]), .x3(1'b0),
               .x4(t_s0[10]), .x5(t_co[8]), .x6(m_s0[10]),
               .s0(q98_s0), .s1(q98_s1), .cout(q98_co));

  // (7,6): column 7 = {S0 of top (8,7), Cout of top (6,5), S0 of mid (8,7)}
  //        column 6 = S1 of mid (6,5)
  logic q76_s0, q76_s1, q76_co;
  mlapc u_q76 (.x1(1'b0), .x2(m_s1[6]), .x3(1'b0),
               .x4(t_s0[8]), .x5(t_co[6]), .x6(m_s0[8]),
               .s0(q76_s0), .s1(q76_s1), .cout(q76_co));

  // second compressor on column 7: rows 7 and 8 and Cout of mid (6,5)
  logic q7_s0, q7_s1, q7_co;
  mlapc u_q7 (.x1(1'b0), .x2(1'b0), .x3(1'b0),
              .x4(dm[7][7]), .x5(m_co[6]), .x6(dm[8][7]),
              .s0(q7_s0), .s1(q7_s1), .cout(q7_co));

  // (5,4): column 5 = {S0 of top (6,5), Cout of top (4,3), S0 of mid (6,5)}
  //        column 4 = S1 of top (4,3)
  logic q54_s0, q54_s1, q54_co;
  mlapc u_q54 (.x1(1'b0), .x2(t_s1[4]), .x3(1'b0),
               .x4(t_s0[6]), .x5(t_co[4]), .x6(m_s0[6]),
               .s0(q54_s0), .s1(q54_s1), .cout(q54_co));

  // (3,2): column 3 = {S0 of top (4,3), row 4 of column 3}, no x5
  //        column 2 = row 2 of column 2
  logic q32_s0, q32_s1, q32_co;
  mlapc u_q32 (.x1(1'b0), .x2(dm[2][2]), .x3(1'b0),
               .x4(t_s0[4]), .x5(1'b0), .x6(dm[4][3]),
               .s0(q32_s0), .s1(q32_s1), .cout(q32_co));

  // ---- stage 3: final rows ---------------------------------------------------
  // low columns keep one bit; the dropped second bits are
  // column 1: row 2, column 4: Cout of (3,2), column 6: S0 of (7,6),
  // column 7: S1 of (7,6)
  assign p_low = {q7_s1,       // 7: Cout of mid (6,5)
                  q54_co,      // 6
                  q54_s1,      // 5
                  q54_s0,      // 4
                  q32_s1,      // 3: always 0
                  q32_s0,      // 2
                  dm[1][1],    // 1
                  dm[1][0]};   // 0

  //               14          13       12         11          10         9          8
  assign x_hi  = {dm[1][14], fa13_s, t_s1[12], fa11_s,     t_s1[10], q98_s1,    q98_s0};
  assign y_hi  = {fa13_c,    1'b0,   fa11_c,   m_co[10],   q98_co,   m_co[8],   q76_co};
  assign cin_hi = q7_co;

  // Unread by design: x1/x3 compressor inputs never reach here; these
  // compressor outputs are the dropped bits listed above.
  logic unused_ok;
  assign unused_ok = &{1'b0, q76_s0, q76_s1, q32_co, q7_s0, m_s1[10]};
endmodule
