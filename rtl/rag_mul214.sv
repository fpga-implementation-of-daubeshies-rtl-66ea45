// rag_mul214: constant multiplier y = 214*x that reuses the 33x partial
// product of rag_mul33 (the "reduced" in reduced adder graph).
//
//   99x  = (33x << 1) + 33x
//   107x = 99x + (x << 3)
//   214x = 107x << 1
// Two adders instead of a full multiplier. Purely combinational; inputs are
// the signed odd sample x and x33 = 33*x from rag_mul33, output is the
// 17-bit signed product (|214*x| <= 27392, exact). The order of the adders
// follows the published adder graph.
module rag_mul214
#(
  parameter int IN_W  = daub_pkg::DAUB_IN_W,
  parameter int ACC_W = daub_pkg::DAUB_ACC_W
) (
  input  logic signed [IN_W-1:0]  x,
  input  logic signed [ACC_W-1:0] x33,
  output logic signed [ACC_W-1:0] y
);
  logic signed [ACC_W-1:0] xs;
  logic signed [ACC_W-1:0] x99;
  logic signed [ACC_W-1:0] x107;

  always_comb begin
    xs   = ACC_W'(x);
    x99  = (x33 <<< 1) + x33;
    x107 = x99 + (xs <<< 3);
    y    = x107 <<< 1;
  end
endmodule
