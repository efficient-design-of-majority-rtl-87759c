// mlafa_i: MLAFA-I, a 4-bit approximate adder of four majority gates and two
// inverters that ignores b0, b1, a0 and Cin.
//
//   Cout  = M(b2, b3, a3)
//   S3    = M(~Cout, b2, M(~b2, b3, a3))
//   S2=S1 = M(~b2, a1, a2)                (one node drives both sum bits)
//   S0    = M(~b2, b3, a3)
//
// No output depends on Cin, so cascaded blocks work in parallel with a logic
// depth of two majority gates regardless of width. Two of them in cascade give
// the 8-bit adder with a maximum error of 85. The cin port is kept so the
// block has the interface of a 4-bit adder; it is unused by design.
// Combinational. {cout, s} approximates a + b + cin.
module mlafa_i (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,   // discarded by the design
  output logic [3:0] s,
  output logic       cout
);
  logic b2_n, cout_n, m_inner, s21;

  assign b2_n = ~b[2];
  maj3 u_cout  (.a(b[2]),  .b(b[3]), .c(a[3]),    .f(cout));
  assign cout_n = ~cout;
  // M(~b2, b3, a3) is both the inner term of S3 and the S0 output
  maj3 u_inner (.a(b2_n),  .b(b[3]), .c(a[3]),    .f(m_inner));
  maj3 u_s3    (.a(cout_n),.b(b[2]), .c(m_inner), .f(s[3]));
  maj3 u_s21   (.a(b2_n),  .b(a[1]), .c(a[2]),    .f(s21));
  assign s[2] = s21;
  assign s[1] = s21;
  assign s[0] = m_inner;

  logic unused_ok;
  assign unused_ok = &{1'b0, cin, a[0], b[1:0]};
endmodule
