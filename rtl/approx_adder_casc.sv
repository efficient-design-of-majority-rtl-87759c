// approx_adder_casc: WIDTH-bit approximate adder built by cascading identical
// 2-bit or 4-bit majority-logic approximate adders.
//
// Block k adds a[k*w +: w] and b[k*w +: w], takes block k-1's carry out as its
// carry in (block 0 takes cin) and the last carry out becomes sum[WIDTH].
// KIND picks the building block:
//   KIND_MLAFA_A  2-bit MLAFA-a  (carry chain of one gate per block)
//   KIND_MLAFA_B  2-bit MLAFA-b  (no carry chain)
//   KIND_MLAFA_I  4-bit MLAFA-I  (no carry chain; 8-bit MAE 85, NMED 0.0560)
//   KIND_MLAFA_II 4-bit MLAFA-II (no carry chain, more accurate than MLAFA-I)
// The default, two MLAFA-I blocks for an 8-bit adder, is the 8-bit adder used
// for pixel-wise image addition. WIDTH must be a multiple of the block width;
// 8 and 16 are the widths evaluated. Combinational, unsigned.
module approx_adder_casc
  import qca_pkg::*;
#(
  parameter adder_kind_e KIND  = KIND_MLAFA_I,
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH:0]   sum
);
  localparam int unsigned BW = kind_width(KIND);
  localparam int unsigned NB = WIDTH / BW;

  initial begin
    assert (WIDTH % BW == 0 && NB > 0)
      else $error("approx_adder_casc: WIDTH %0d is not a multiple of %0d", WIDTH, BW);
  end

  logic [NB:0] carry;
  assign carry[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    if (KIND == KIND_MLAFA_A) begin : g_a
      mlafa_a u_add (.a(a[k*BW +: BW]), .b(b[k*BW +: BW]), .cin(carry[k]),
                     .s(sum[k*BW +: BW]), .cout(carry[k+1]));
    end else if (KIND == KIND_MLAFA_B) begin : g_b
      mlafa_b u_add (.a(a[k*BW +: BW]), .b(b[k*BW +: BW]), .cin(carry[k]),
                     .s(sum[k*BW +: BW]), .cout(carry[k+1]));
    end else if (KIND == KIND_MLAFA_I) begin : g_i
      mlafa_i u_add (.a(a[k*BW +: BW]), .b(b[k*BW +: BW]), .cin(carry[k]),
                     .s(sum[k*BW +: BW]), .cout(carry[k+1]));
    end else begin : g_ii
      mlafa_ii u_add (.a(a[k*BW +: BW]), .b(b[k*BW +: BW]), .cin(carry[k]),
                      .s(sum[k*BW +: BW]), .cout(carry[k+1]));
    end
  end

  assign sum[WIDTH] = carry[NB];
endmodule
