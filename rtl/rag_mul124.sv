// rag_mul124: constant multiplier y = 124*x built from shifts and one
// subtractor (part of the reduced adder graph of the even branch).
//
// The input is sign-extended to the 17-bit product width, shifted five bits
// toward the MSB and the input subtracted, giving 31x; that result shifted
// left by two bits is 124x. Purely combinational; no precision is lost
// since |124*x| < 2^16 for any 8-bit signed x. The decomposition follows
// the published adder graph; the final shift of two bits is implied by the
// gain value (31*4 = 124).
module rag_mul124
#(
  parameter int IN_W  = daub_pkg::DAUB_IN_W,
  parameter int ACC_W = daub_pkg::DAUB_ACC_W
) (
  input  logic signed [IN_W-1:0]  x,
  output logic signed [ACC_W-1:0] y
);
  logic signed [ACC_W-1:0] xs;   // sign-extended input
  logic signed [ACC_W-1:0] x31;  // (x << 5) - x

  always_comb begin
    xs  = ACC_W'(x);
    x31 = (xs <<< 5) - xs;
    y   = x31 <<< 2;
  end
endmodule
