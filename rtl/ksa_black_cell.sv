// ksa_black_cell: Kogge-Stone prefix "black" cell. Combines the group
// (generate, propagate) of bits i:k with that of bits k-1:j into the group
// i:j:  G = G_ik | (P_ik & G_k-1j),  P = P_ik & P_k-1j.  Combinational.
module ksa_black_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  input  logic p_lo,
  output logic g_out,
  output logic p_out
);
  assign g_out = g_hi | (p_hi & g_lo);
  assign p_out = p_hi & p_lo;
endmodule
