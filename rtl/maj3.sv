// maj3: the three-input majority gate, F = M(A,B,C) = AB + AC + BC.
//
// It is the basic cell of quantum-dot cellular automata logic and of every
// other block in this library. Tying one input to 0 turns it into a two-input
// AND, tying it to 1 into a two-input OR. Purely combinational, no clock.
module maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic f
);
  assign f = (a & b) | (a & c) | (b & c);
endmodule
