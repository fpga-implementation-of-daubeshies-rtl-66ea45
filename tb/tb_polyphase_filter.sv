// tb_polyphase_filter: self-checking test of the two polyphase branches.
// Random (x_even, x_odd) pairs are applied with a random enable. A
// reference keeps the previous enabled pair and computes
//   124*xe + 57*xe_prev + 214*xo - 33*xo_prev
// with integer arithmetic; y must equal it in the cycle after each enabled
// edge, y_valid must follow en by one cycle, and y must hold otherwise.
module tb_polyphase_filter;
  logic               clk = 0, rst_n = 0, en = 0;
  logic signed [7:0]  x_even = '0, x_odd = '0;
  logic signed [16:0] y;
  logic               y_valid;
  int checks = 0, failures = 0, updates = 0, holds = 0;
  int xe_prev = 0, xo_prev = 0, ref_y = 0;

  polyphase_filter dut (.clk, .rst_n, .en, .x_even, .x_odd, .y, .y_valid);

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
    for (int i = 0; i < 4000; i++) begin
      en     = ($urandom_range(0, 1) != 0);
      // extremes now and then, to exercise the full 17-bit range
      x_even = ($urandom_range(0, 7) == 0) ? (($urandom_range(0, 1) != 0) ? 8'sd127 : -8'sd128) : 8'($urandom);
      x_odd  = ($urandom_range(0, 7) == 0) ? (($urandom_range(0, 1) != 0) ? 8'sd127 : -8'sd128) : 8'($urandom);
      @(posedge clk);
      if (en) begin
        ref_y   = 124 * int'(x_even) + 57 * xe_prev + 214 * int'(x_odd) - 33 * xo_prev;
        xe_prev = int'(x_even);
        xo_prev = int'(x_odd);
        updates++;
      end else holds++;
      #1;
      checks++;
      if (int'(y) != ref_y || y_valid != en) begin
        failures++;
        $display("FAIL cycle %0d y=%0d expected %0d valid=%b", i, y, ref_y, y_valid);
      end
    end
    $display("updates=%0d holds=%0d", updates, holds);
    if (updates == 0 || holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
