// qca_approx_top: the majority-logic approximate arithmetic units side by side.
//
// Two independent datapaths share nothing but this wrapper:
//  * the approximate unsigned 8x8 multiplier (mlam8): md * mr -> product
//  * the four proposed approximate 8-bit adders, built by cascading the
//    2-bit MLAFA-a, 2-bit MLAFA-b, 4-bit MLAFA-I and 4-bit MLAFA-II blocks,
//    all adding the same a + b + cin. Each result has 9 bits (carry out on
//    top).
// ADD_W sets the adder width (8 by default, 16 is the other evaluated width;
// it must be a multiple of 4). Everything is combinational.
module qca_approx_top
  import qca_pkg::*;
#(
  parameter int unsigned ADD_W = 8
) (
  input  logic [7:0]       md,
  input  logic [7:0]       mr,
  output logic [15:0]      product,

  input  logic [ADD_W-1:0] a,
  input  logic [ADD_W-1:0] b,
  input  logic             cin,
  output logic [ADD_W:0]   sum_a,    // cascade of MLAFA-a
  output logic [ADD_W:0]   sum_b,    // cascade of MLAFA-b
  output logic [ADD_W:0]   sum_i,    // cascade of MLAFA-I
  output logic [ADD_W:0]   sum_ii    // cascade of MLAFA-II
);
  mlam8 u_mul (.md(md), .mr(mr), .product(product));

  approx_adder_casc #(.KIND(KIND_MLAFA_A),  .WIDTH(ADD_W)) u_add_a
    (.a(a), .b(b), .cin(cin), .sum(sum_a));
  approx_adder_casc #(.KIND(KIND_MLAFA_B),  .WIDTH(ADD_W)) u_add_b
    (.a(a), .b(b), .cin(cin), .sum(sum_b));
  approx_adder_casc #(.KIND(KIND_MLAFA_I),  .WIDTH(ADD_W)) u_add_i
    (.a(a), .b(b), .cin(cin), .sum(sum_i));
  approx_adder_casc #(.KIND(KIND_MLAFA_II), .WIDTH(ADD_W)) u_add_ii
    (.a(a), .b(b), .cin(cin), .sum(sum_ii));
endmodule
