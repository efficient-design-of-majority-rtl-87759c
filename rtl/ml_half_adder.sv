// ml_half_adder: exact half adder built only from majority gates and inverters.
//
//   Carry = M(A, B, 0)                          (an AND)
//   Sum   = M( M(A, ~B, 0), M(~A, B, 0), 1 )    (OR of the two AND terms = A xor B)
//
// Four majority gates and two inverters, as in the majority-gate half-adder
// schematic. Combinational; inputs a and b, outputs sum and carry.
module ml_half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  logic t_ab_n, t_an_b;

  maj3 u_and1 (.a(a),     .b(~b),    .c(1'b0), .f(t_ab_n));
  maj3 u_and2 (.a(~a),    .b(b),     .c(1'b0), .f(t_an_b));
  maj3 u_or   (.a(t_ab_n),.b(t_an_b),.c(1'b1), .f(sum));
  maj3 u_cy   (.a(a),     .b(b),     .c(1'b0), .f(carry));
endmodule
