// qca_pkg: shared types and the majority-of-three primitive used by every
// arithmetic block of the majority-logic (ML) approximate arithmetic library.
//
// The majority function M(a,b,c) = ab + ac + bc is the only logic primitive
// of the QCA technology this library targets; M(a,b,0) is an AND and
// M(a,b,1) is an OR. Blocks call maj() (or instantiate maj3) so that the
// netlist mirrors the majority-gate schematics one gate per call.
//
// adder_kind_e names the four approximate adder building blocks that the
// cascaded adder approx_adder_casc can be built from: the two 2-bit adders
// MLAFA-a and MLAFA-b and the two 4-bit adders MLAFA-I and MLAFA-II.
package qca_pkg;

  typedef enum logic [1:0] {
    KIND_MLAFA_A  = 2'd0,   // 2-bit, 3 majority gates, carry chain through Cin
    KIND_MLAFA_B  = 2'd1,   // 2-bit, 4 majority gates, Cout independent of Cin
    KIND_MLAFA_I  = 2'd2,   // 4-bit, 4 majority gates, Cin discarded
    KIND_MLAFA_II = 2'd3    // 4-bit, 5 majority gates, Cin discarded
  } adder_kind_e;

  // Width in bits of one building block of the given kind.
  function automatic int unsigned kind_width(adder_kind_e k);
    return (k == KIND_MLAFA_A || k == KIND_MLAFA_B) ? 2 : 4;
  endfunction

  // Majority-of-three voter.
  function automatic logic maj(logic a, logic b, logic c);
    return (a & b) | (a & c) | (b & c);
  endfunction

endpackage
