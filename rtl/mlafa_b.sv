// mlafa_b: MLAFA-b, a 2-bit approximate adder of four majority gates and two
// inverters whose carry out does not depend on the carry in.
//
//   Cout = M(a1, b0, b1)
//   S1   = M( M(0, a0, b0), ~Cout, M(a1, ~b0, b1) )
//   S0   = Cin
//
// Because Cin only feeds S0 (a wire), a cascade of MLAFA-b blocks has no carry
// chain: every block's outputs are two gate levels from the primary inputs.
// The error distance never exceeds 1 and sums to 16 over the 32 input
// combinations. Combinational. {cout, s} approximates a + b + cin.
module mlafa_b (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin,
  output logic [1:0] s,
  output logic       cout
);
  logic g_lo, m_hi, cout_n;

  maj3 u_cout (.a(a[1]), .b(b[0]),  .c(b[1]), .f(cout));
  assign cout_n = ~cout;
  maj3 u_and  (.a(1'b0), .b(a[0]),  .c(b[0]), .f(g_lo));
  maj3 u_mid  (.a(a[1]), .b(~b[0]), .c(b[1]), .f(m_hi));
  maj3 u_s1   (.a(g_lo), .b(cout_n),.c(m_hi), .f(s[1]));
  assign s[0] = cin;
endmodule
