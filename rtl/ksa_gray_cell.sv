// ksa_gray_cell: Kogge-Stone prefix "gray" cell, used where the lower group
// reaches bit 0 so only the group generate (which is the carry) is needed:
// G = G_ik | (P_ik & G_k-1j). Combinational.
module ksa_gray_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  output logic g_out
);
  assign g_out = g_hi | (p_hi & g_lo);
endmodule
