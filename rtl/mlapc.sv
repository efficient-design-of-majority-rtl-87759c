// mlapc: approximate parallel 6:3 compressor (MLAPC) of a single majority gate.
//
// The six inputs are two columns of three partial-product bits: x1..x3 have
// weight 1 (column j) and x4..x6 weight 2 (column j+1). The three outputs have
// weights 1, 2 and 4:
//   S0   = x2                 (column j)
//   S1   = x5                 (column j+1)
//   Cout = M(x6, 1, x4)       (column j+2; an OR of x4 and x6)
// x1 and x3 are discarded, so the partial products that would drive them need
// not be generated; they are kept as ports only to show the compressor's
// shape. The compressor has no carry input and its carry goes to the next
// reduction stage, never sideways, so no erroneous carry ripples.
// Combinational.
module mlapc (
  input  logic x1,   // unused by design
  input  logic x2,
  input  logic x3,   // unused by design
  input  logic x4,
  input  logic x5,
  input  logic x6,
  output logic s0,
  output logic s1,
  output logic cout
);
  maj3 u_cout (.a(x6), .b(1'b1), .c(x4), .f(cout));
  assign s1 = x5;
  assign s0 = x2;

  logic unused_ok;
  assign unused_ok = &{1'b0, x1, x3};
endmodule
