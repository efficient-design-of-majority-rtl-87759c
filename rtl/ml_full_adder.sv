// ml_full_adder: exact one-bit full adder made of two majority-gate half
// adders and one majority gate used as an OR.
//
// The first half adder adds A and B; the second adds its sum to Cin and
// produces the final sum. The two half-adder carries cannot both be 1, so the
// carry out is their OR, realised as M(c1, 1, c2). Combinational.
// This is the exact full adder used in the partial-product reduction of the
// approximate multiplier.
module ml_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic s1, c1, c2;

  ml_half_adder u_ha1 (.a(a),  .b(b),   .sum(s1),  .carry(c1));
  ml_half_adder u_ha2 (.a(s1), .b(cin), .sum(sum), .carry(c2));
  maj3          u_or  (.a(c1), .b(1'b1), .c(c2),   .f(cout));
endmodule
