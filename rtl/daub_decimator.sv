// daub_decimator: Daubechies-4 low-pass filter with decimation by two,
// built as a two-branch polyphase structure.
//
// Instead of filtering every input and discarding every second result, the
// input stream is split into even and odd samples (phase_fsm) and each
// half-rate stream is filtered by its own two-tap polyphase branch
// (polyphase_filter), so the arithmetic runs at the output rate. All
// coefficient multiplications are shift-and-add networks. The result is
//   y[2m] = (124 x[2m] + 214 x[2m-1] + 57 x[2m-2] - 33 x[2m-3]) / 256,
// the quantized Daubechies-4 filter sampled at even input indices. The
// divide by 256 is an arithmetic right shift by 8 bits whose result is
// clipped to 8 bits (out_shifter).
//
// Interface: one signed 8-bit sample x_in per cycle with in_valid high
// (in_valid may also be held low between samples); the first sample after
// reset is x[0]. out_valid is high for one cycle per two accepted samples,
// with y_out the 8-bit decimated sample, sat set when y_out was clipped,
// and y_full the exact 17-bit sum.
// Latency: if x[2m] is presented with in_valid in cycle c, y[2m] is on
// y_out with out_valid high in cycle c+2 (the edge ending cycle c stores
// the sample, the next edge stores the filter sum). Reset is asynchronous,
// active low, and starts the filter with an all-zero history.
//
// Following the published design: the polyphase split, the coefficient
// values, the shift-and-add multipliers, the transposed branches, the 8/17/8
// bit widths and the divide by 256. This design's own choices: the in_valid
// strobe, the reset, one register stage after the final adder, and clipping
// at the output. The FSM's phase_odd status output is not needed here and
// is left unconnected.
module daub_decimator
#(
  parameter int IN_W  = daub_pkg::DAUB_IN_W,
  parameter int ACC_W = daub_pkg::DAUB_ACC_W,
  parameter int OUT_W = daub_pkg::DAUB_OUT_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x_in,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y_out,
  output logic signed [ACC_W-1:0] y_full,
  output logic                    sat
);
  logic signed [IN_W-1:0] x_even, x_odd;
  logic                   filt_en;

  phase_fsm #(.IN_W(IN_W)) u_fsm (
    .clk, .rst_n, .in_valid, .x_in,
    .x_even, .x_odd, .phase_odd(), .filt_en
  );

  polyphase_filter #(.IN_W(IN_W), .ACC_W(ACC_W)) u_filt (
    .clk, .rst_n, .en(filt_en), .x_even, .x_odd,
    .y(y_full), .y_valid(out_valid)
  );

  out_shifter #(.ACC_W(ACC_W), .OUT_W(OUT_W)) u_shift (
    .y_full, .y_out, .sat
  );
endmodule
