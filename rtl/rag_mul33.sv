// rag_mul33: constant multiplier y = 33*x = (x << 5) + x (odd branch,
// delayed tap). Its result is also the shared partial product from which
// rag_mul214 builds 214x. Purely combinational, 17-bit signed result, exact
// for any 8-bit signed x. The single shift-and-add form is this design's
// choice; the published design gives only the gain and the width.
module rag_mul33
#(
  parameter int IN_W  = daub_pkg::DAUB_IN_W,
  parameter int ACC_W = daub_pkg::DAUB_ACC_W
) (
  input  logic signed [IN_W-1:0]  x,
  output logic signed [ACC_W-1:0] y
);
  logic signed [ACC_W-1:0] xs;

  always_comb begin
    xs = ACC_W'(x);
    y  = (xs <<< 5) + xs;
  end
endmodule
