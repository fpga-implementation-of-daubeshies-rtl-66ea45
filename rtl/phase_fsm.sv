// phase_fsm: control FSM and input splitter of the polyphase decimator.
//
// Two states, PH_EVEN and PH_ODD, name the phase of the next input sample.
// Each cycle with in_valid high the sample is written to x_even or x_odd
// and the state toggles; the first sample after reset is x[0], an even
// sample. After an even sample x[2m] is stored, filt_en pulses high for one
// cycle: at that point x_even = x[2m] and x_odd = x[2m-1], the pair the
// polyphase filter needs for output y[2m]. filt_en is therefore the
// half-rate clock enable of the filter stage.
//
// Timing: x_even/x_odd/filt_en change on the clock edge that accepts the
// sample. in_valid may be high every cycle (one input per clock, one
// output per two clocks) or less often. Splitting the stream into even and
// odd samples under an FSM follows the published design; the strobe
// interface, the state encoding and the reset behaviour are this design's.
module phase_fsm
  import daub_pkg::*;
#(
  parameter int IN_W = daub_pkg::DAUB_IN_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] x_in,
  output logic signed [IN_W-1:0] x_even,
  output logic signed [IN_W-1:0] x_odd,
  output logic                   phase_odd,
  output logic                   filt_en
);
  phase_e state, state_nxt;

  always_comb begin
    state_nxt = state;
    if (in_valid)
      state_nxt = (state == PH_EVEN) ? PH_ODD : PH_EVEN;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= PH_EVEN;
      x_even  <= '0;
      x_odd   <= '0;
      filt_en <= 1'b0;
    end else begin
      state   <= state_nxt;
      filt_en <= in_valid && (state == PH_EVEN);
      if (in_valid) begin
        if (state == PH_EVEN) x_even <= x_in;
        else                  x_odd  <= x_in;
      end
    end
  end

  assign phase_odd = (state == PH_ODD);

`ifndef SYNTHESIS
  // the filter enable only ever follows an accepted even sample
  a_en_after_even: assert property (@(posedge clk) disable iff (!rst_n)
    filt_en |-> $past(in_valid) && $past(state) == PH_EVEN);
`endif
endmodule
