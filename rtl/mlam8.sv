// mlam8: approximate unsigned 8x8 multiplier (majority-logic approximate
// multiplier, MLAM) with a Kogge-Stone final adder.
//
//   md, mr  -> ml_pp_gen  -> mlam_ppr -> ksa_adder (7 bits) -> product
//
// The partial products are AND gates written as majority gates with a
// constant 0. The reduction tree (mlam_ppr) compresses them with 13
// single-gate 6:3 compressors and 2 exact full adders. Its result is eight
// finished low product bits and two rows plus a carry-in for columns 8..14.
// A 7-bit Kogge-Stone adder adds those; its carry out is product bit 15.
// Only the 40 partial products the tree actually reads are generated
// (PP_USED, bit i*8+j for md[i] & mr[j]).
// Typical error: mean error distance about 2.8% of the full scale
// (NMED 0.0279 over all 65536 input pairs), worst case 7690 at 255 x 255.
// Purely combinational; product is valid one propagation delay after the
// operands change.
module mlam8 (
  input  logic [7:0]  md,        // multiplicand
  input  logic [7:0]  mr,        // multiplier
  output logic [15:0] product
);
  localparam logic [63:0] PP_USED = 64'heaff_aad7_fa56_7381;

  logic [7:0][7:0] pp;
  logic [7:0]      p_low;
  logic [6:0]      x_hi, y_hi, s_hi;
  logic            cin_hi, c_hi;

  ml_pp_gen #(.N(8), .USED(PP_USED)) u_pp (.a(md), .b(mr), .pp(pp));

  mlam_ppr u_ppr (.pp(pp), .p_low(p_low), .x_hi(x_hi), .y_hi(y_hi), .cin_hi(cin_hi));

  ksa_adder #(.W(7)) u_ksa (.a(x_hi), .b(y_hi), .cin(cin_hi), .sum(s_hi), .cout(c_hi));

  assign product = {c_hi, s_hi, p_low};
endmodule
