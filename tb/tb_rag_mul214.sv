// tb_rag_mul214: exhaustive self-checking test of rag_mul214.
// For every signed 8-bit x the testbench supplies the partial product
// 33*x itself (computed arithmetically, not by rag_mul33) and checks that
// the 17-bit result equals 214*x.
module tb_rag_mul214;
  logic signed [7:0]  x;
  logic signed [16:0] x33;
  logic signed [16:0] y;
  int checks = 0, failures = 0;

  rag_mul214 dut (.x, .x33, .y);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v <= 127; v++) begin
      x   = 8'(v);
      x33 = 17'(v * 33);
      #1;
      checks++;
      if (int'(y) != v * 214) begin
        failures++;
        $display("FAIL x=%0d y=%0d expected %0d", v, y, v * 214);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
