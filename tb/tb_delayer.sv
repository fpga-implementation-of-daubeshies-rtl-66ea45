// tb_delayer: self-checking test of the enabled delay register.
// Random data with a random enable; a reference copy of the last value
// loaded while en was high is compared with q after every edge. Also
// checks the zero value after reset.
module tb_delayer;
  logic        clk = 0, rst_n = 0, en = 0;
  logic [16:0] d = '0, q;
  logic [16:0] ref_q;
  int checks = 0, failures = 0, loads = 0, holds = 0;

  delayer dut (.clk, .rst_n, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q != '0) begin failures++; $display("FAIL q not zero after reset"); end
    rst_n = 1;
    ref_q = '0;
    for (int i = 0; i < 2000; i++) begin
      en = ($urandom_range(0, 2) != 0);
      d  = 17'($urandom);
      @(posedge clk);
      if (en) begin ref_q = d; loads++; end else holds++;
      #1;
      checks++;
      if (q != ref_q) begin
        failures++;
        $display("FAIL cycle %0d q=%h expected %h", i, q, ref_q);
      end
    end
    if (loads == 0 || holds == 0) failures++;
    $display("loads=%0d holds=%0d", loads, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
