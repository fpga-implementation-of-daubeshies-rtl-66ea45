// out_shifter: the divide-by-256 output stage of the decimator.
//
// The 17-bit filter sum is in units of 1/256 (the coefficients carry 8
// fraction bits). It is shifted right arithmetically by FRAC = 8 bits,
// which rounds toward minus infinity, and the quotient is limited to the
// OUT_W-bit signed range: a quotient above 127 gives 127, one below -128
// gives -128, and sat flags such a sample. Clipping is needed because the
// filter's DC gain is 362/256 (about sqrt 2), so a full-scale 8-bit input
// can produce a quotient of up to +-214. Purely combinational; the 8
// fraction bits of y_full are dropped by design and so go unread.
//
// The divide by 256 and the 8-bit result follow the published design;
// clipping, rather than keeping the low 8 bits of the quotient, is this
// design's reading of "limited to eight bits".
module out_shifter #(
  parameter int ACC_W = daub_pkg::DAUB_ACC_W,
  parameter int OUT_W = daub_pkg::DAUB_OUT_W
) (
  input  logic signed [ACC_W-1:0] y_full,
  output logic signed [OUT_W-1:0] y_out,
  output logic                    sat
);
  localparam int FRAC = daub_pkg::DAUB_FRAC;
  localparam int Q_W  = ACC_W - FRAC;          // width of the quotient

  localparam logic signed [Q_W-1:0] Q_MAX = Q_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [Q_W-1:0] Q_MIN = -Q_W'(1 << (OUT_W - 1));

  logic signed [Q_W-1:0] q;

  always_comb begin
    q = y_full[ACC_W-1:FRAC];                  // = y_full >>> FRAC
    if (q > Q_MAX) begin
      y_out = OUT_W'(Q_MAX);
      sat   = 1'b1;
    end else if (q < Q_MIN) begin
      y_out = OUT_W'(Q_MIN);
      sat   = 1'b1;
    end else begin
      y_out = q[OUT_W-1:0];
      sat   = 1'b0;
    end
  end
endmodule
