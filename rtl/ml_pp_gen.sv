// ml_pp_gen: partial-product generator for an unsigned N x N multiplier.
//
// Each partial product a_i * b_j is a majority gate with one input tied to
// constant 0, M(a_i, b_j, 0), i.e. an AND. pp[i][j] is placed at column i+j.
// USED has one bit per product, bit i*N+j: a product whose bit is 0 is not
// built and reads as 0, so a reduction tree that discards some inputs does
// not pay for them. Default: all N*N products. Combinational.
module ml_pp_gen #(
  parameter int unsigned       N    = 8,
  parameter logic [N*N-1:0]    USED = '1
) (
  input  logic [N-1:0]          a,
  input  logic [N-1:0]          b,
  output logic [N-1:0][N-1:0]   pp     // pp[i][j] = a[i] & b[j]
);
  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      if (USED[i*N+j]) begin : g_and
        maj3 u_and (.a(a[i]), .b(b[j]), .c(1'b0), .f(pp[i][j]));
      end else begin : g_none
        assign pp[i][j] = 1'b0;
      end
    end
  end
endmodule
