// mlafa_ii: MLAFA-II, a 4-bit approximate adder of five majority gates and
// three inverters that ignores b0, a1 and Cin.
//
//   Cout  = M(b2, b3, a3)
//   S3    = M(~Cout, b3, M(b2, ~b3, a3))
//   S2=S0 = M(~b2, b1, a2)                (one node drives both sum bits)
//   S1    = M(~b2, a2, a0)
//
// It spends one gate and one inverter more than MLAFA-I for lower error.
// No output depends on Cin, so cascades have no carry chain. The cin port is
// kept for a uniform adder interface and is unused by design.
// Combinational. {cout, s} approximates a + b + cin.
module mlafa_ii (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,   // discarded by the design
  output logic [3:0] s,
  output logic       cout
);
  logic b2_n, b3_n, cout_n, m_inner, s20;

  assign b2_n = ~b[2];
  assign b3_n = ~b[3];
  maj3 u_cout  (.a(b[2]),  .b(b[3]), .c(a[3]),    .f(cout));
  assign cout_n = ~cout;
  maj3 u_inner (.a(b[2]),  .b(b3_n), .c(a[3]),    .f(m_inner));
  maj3 u_s3    (.a(cout_n),.b(b[3]), .c(m_inner), .f(s[3]));
  maj3 u_s20   (.a(b2_n),  .b(b[1]), .c(a[2]),    .f(s20));
  maj3 u_s1    (.a(b2_n),  .b(a[2]), .c(a[0]),    .f(s[1]));
  assign s[2] = s20;
  assign s[0] = s20;

  logic unused_ok;
  assign unused_ok = &{1'b0, cin, a[1], b[0]};
endmodule
