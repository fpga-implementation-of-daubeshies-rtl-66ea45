// tb_phase_fsm: self-checking test of the even/odd splitting FSM.
// A random sample stream with random gaps in in_valid is applied. A
// reference model counts accepted samples: sample k goes to x_even when k
// is even, to x_odd when k is odd, and filt_en must pulse exactly in the
// cycle after each even sample is accepted.
module tb_phase_fsm;
  logic              clk = 0, rst_n = 0, in_valid = 0;
  logic signed [7:0] x_in = '0;
  logic signed [7:0] x_even, x_odd;
  logic              phase_odd, filt_en;
  int checks = 0, failures = 0, enables = 0, gaps = 0;
  int unsigned k = 0;
  logic signed [7:0] ref_even = '0, ref_odd = '0;
  logic              ref_en = 0;

  phase_fsm dut (.clk, .rst_n, .in_valid, .x_in, .x_even, .x_odd, .phase_odd, .filt_en);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      in_valid = ($urandom_range(0, 3) != 0);
      x_in     = 8'($urandom);
      #1;
      checks++;
      if (phase_odd != k[0]) begin failures++; $display("FAIL phase at %0d", i); end
      @(posedge clk);
      ref_en = 0;
      if (in_valid) begin
        if (k[0] == 1'b0) begin ref_even = x_in; ref_en = 1; end
        else ref_odd = x_in;
        k++;
      end else gaps++;
      #1;
      checks++;
      if (x_even != ref_even || x_odd != ref_odd || filt_en != ref_en) begin
        failures++;
        $display("FAIL cycle %0d even=%0d/%0d odd=%0d/%0d en=%b/%b", i,
                 x_even, ref_even, x_odd, ref_odd, filt_en, ref_en);
      end
      if (filt_en) enables++;
    end
    $display("enables=%0d gaps=%0d", enables, gaps);
    if (enables == 0 || gaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
