// tb_rag_mul124: exhaustive self-checking test of rag_mul124.
// Every signed 8-bit input is applied and the 17-bit product compared with
// x*124 computed by the simulator's own integer multiply.
module tb_rag_mul124;
  logic signed [7:0]  x;
  logic signed [16:0] y;
  int checks = 0, failures = 0;

  rag_mul124 dut (.x, .y);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v <= 127; v++) begin
      x = 8'(v);
      #1;
      checks++;
      if (int'(y) != v * 124) begin
        failures++;
        $display("FAIL x=%0d y=%0d expected %0d", v, y, v * 124);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
