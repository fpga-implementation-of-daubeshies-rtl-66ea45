// daub_pkg: word widths and coefficients shared by the Daubechies-4
// polyphase decimator.
//
// The length-4 Daubechies low-pass filter
//   H(z) = [(1+sqrt3) + (3+sqrt3) z^-1 + (3-sqrt3) z^-2 + (1-sqrt3) z^-3] / (4 sqrt2)
// is quantized to 8 fractional bits, giving
//   H(z) = (124 + 214 z^-1 + 57 z^-2 - 33 z^-3) / 256.
// Split into two polyphase branches (decimation by 2):
//   even branch  H_even(z) = 124 + 57 z^-1   (acts on x[2m])
//   odd branch   H_odd(z)  = 214 - 33 z^-1   (acts on x[2m-1])
// The input and output are 8-bit two's complement and every internal
// product and sum is 17 bits, which holds the worst case
// (124+214+57+33)*128 = 54784 exactly. The widths and coefficient values
// follow the published design; the signed sample format is this design's
// reading of it.
package daub_pkg;

  localparam int DAUB_IN_W  = 8;   // input sample width
  localparam int DAUB_ACC_W = 17;  // width of products and sums
  localparam int DAUB_OUT_W = 8;   // decimated output width
  localparam int DAUB_FRAC  = 8;   // coefficient fraction bits (divide by 256)

  // quantized filter taps h[0..3], in units of 1/256
  localparam int H0 = 124;
  localparam int H1 = 214;
  localparam int H2 = 57;
  localparam int H3 = -33;

  typedef logic signed [DAUB_IN_W-1:0]  sample_t;
  typedef logic signed [DAUB_ACC_W-1:0] acc_t;
  typedef logic signed [DAUB_OUT_W-1:0] out_t;

  // state of the input-splitting FSM: which phase the next sample belongs to
  typedef enum logic {PH_EVEN = 1'b0, PH_ODD = 1'b1} phase_e;

endpackage
