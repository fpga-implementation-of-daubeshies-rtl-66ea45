// tb_rag_mul33: exhaustive self-checking test of rag_mul33.
// Every signed 8-bit input is applied and the 17-bit product compared with
// x*33 computed by the simulator's own integer multiply.
module tb_rag_mul33;
  logic signed [7:0]  x;
  logic signed [16:0] y;
  int checks = 0, failures = 0;

  rag_mul33 dut (.x, .y);

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
      if (int'(y) != v * 33) begin
        failures++;
        $display("FAIL x=%0d y=%0d expected %0d", v, y, v * 33);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
