// delayer: one-sample delay (z^-1 at the decimated rate) for the
// transposed polyphase branches.
//
// A WIDTH-bit register that loads d on a rising clock edge when en is high
// and holds otherwise, so q is d as it was at the previous enabled edge.
// Asynchronous active-low reset clears it to zero, which makes the filter
// start from an all-zero history. The 17-bit width follows the published
// design; the enable and the reset are this design's choices.
module delayer #(
  parameter int WIDTH = daub_pkg::DAUB_ACC_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end
endmodule
