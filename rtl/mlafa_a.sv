// mlafa_a: MLAFA-a, a 2-bit approximate adder of three majority gates and one
// inverter.
//
//   Cout = M(Cin, a1, b1)
//   S1   = M(~Cout, a0, b0)
//   S0   = M(~Cout, a1, b1)
//
// The design is derived from the exact 2-bit truth table by changing 16 of its
// 32 rows, each by exactly one unit, so the maximum error distance is 1 and the
// summed error distance over all inputs is 16. Cout depends on Cin, so a
// cascade of these blocks keeps a (one gate per block) carry chain.
// Combinational. {cout, s} approximates a + b + cin.
module mlafa_a (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin,
  output logic [1:0] s,
  output logic       cout
);
  logic cout_n;

  maj3 u_cout (.a(cin),    .b(a[1]), .c(b[1]), .f(cout));
  assign cout_n = ~cout;
  maj3 u_s1   (.a(cout_n), .b(a[0]), .c(b[0]), .f(s[1]));
  maj3 u_s0   (.a(cout_n), .b(a[1]), .c(b[1]), .f(s[0]));
endmodule
