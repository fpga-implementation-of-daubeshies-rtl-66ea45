// rag_mul57: constant multiplier y = 57*x built from shifts, one
// subtractor and one adder (even branch, delayed tap).
//
// First 7x = (x << 3) - x, then 57x = (7x << 3) + x. Purely combinational,
// 17-bit signed result, exact for any 8-bit signed x. The two-step
// subtract-then-add structure follows the published adder graph.
module rag_mul57
#(
  parameter int IN_W  = daub_pkg::DAUB_IN_W,
  parameter int ACC_W = daub_pkg::DAUB_ACC_W
) (
  input  logic signed [IN_W-1:0]  x,
  output logic signed [ACC_W-1:0] y
);
  logic signed [ACC_W-1:0] xs;
  logic signed [ACC_W-1:0] x7;

  always_comb begin
    xs = ACC_W'(x);
    x7 = (xs <<< 3) - xs;
    y  = (x7 <<< 3) + xs;
  end
endmodule
