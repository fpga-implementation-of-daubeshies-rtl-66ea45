// polyphase_filter: the two transposed polyphase branches of the
// Daubechies-4 decimator and the adder that combines them.
//
//   even branch:  e = 124*x[2m]   + D(57*x_even)  = 124 x[2m]   + 57 x[2m-2]
//   odd branch:   o = 214*x[2m-1] - D(33*x_odd)   = 214 x[2m-1] - 33 x[2m-3]
//   y[2m] = e + o      (17-bit, units of 1/256)
// D() is a delayer clocked only when en is high, i.e. once per output
// sample, so it delays by one sample of the decimated rate. All four
// products come from shift-and-add constant multipliers; 214x reuses the
// 33x partial product.
//
// Timing: en is the half-rate strobe from phase_fsm. On an edge with en
// high, y loads the sum for the current (x_even, x_odd) pair and the two
// delayers load 57*x_even and 33*x_odd for the next output; y_valid is
// high for the following cycle. The branch structure follows the published
// design; registering the final sum is this design's choice.
module polyphase_filter
#(
  parameter int IN_W  = daub_pkg::DAUB_IN_W,
  parameter int ACC_W = daub_pkg::DAUB_ACC_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  x_even,
  input  logic signed [IN_W-1:0]  x_odd,
  output logic signed [ACC_W-1:0] y,
  output logic                    y_valid
);
  logic signed [ACC_W-1:0] p124, p57, p33, p214;
  logic        [ACC_W-1:0] d57, d33;   // delayed products (raw bits)
  logic signed [ACC_W-1:0] sum_even, sum_odd, sum;

  rag_mul124 #(.IN_W(IN_W), .ACC_W(ACC_W)) u_m124 (.x(x_even), .y(p124));
  rag_mul57  #(.IN_W(IN_W), .ACC_W(ACC_W)) u_m57  (.x(x_even), .y(p57));
  rag_mul33  #(.IN_W(IN_W), .ACC_W(ACC_W)) u_m33  (.x(x_odd),  .y(p33));
  rag_mul214 #(.IN_W(IN_W), .ACC_W(ACC_W)) u_m214 (.x(x_odd), .x33(p33), .y(p214));

  delayer #(.WIDTH(ACC_W)) u_d57 (.clk, .rst_n, .en, .d(p57), .q(d57));
  delayer #(.WIDTH(ACC_W)) u_d33 (.clk, .rst_n, .en, .d(p33), .q(d33));

  always_comb begin
    sum_even = p124 + $signed(d57);
    sum_odd  = p214 - $signed(d33);
    sum      = sum_even + sum_odd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= en;
      if (en) y <= sum;
    end
  end
endmodule
