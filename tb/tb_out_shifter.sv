// tb_out_shifter: self-checking test of the divide-by-256 output stage.
// Drives every 17-bit signed value in steps of 7 plus the extremes and
// compares y_out with floor(y_full / 256) clipped to [-128, 127], and sat
// with whether clipping took place, computed with integer arithmetic.
module tb_out_shifter;
  logic signed [16:0] y_full;
  logic signed [7:0]  y_out;
  logic               sat;
  int checks = 0, failures = 0, n_hi = 0, n_lo = 0;

  out_shifter dut (.y_full, .y_out, .sat);

  function automatic int floor_div256(int v);
    int q = v / 256;
    if (v < 0 && (v % 256) != 0) q = q - 1;
    return q;
  endfunction

  task automatic check(int v);
    int q, expv;
    bit exps;
    y_full = 17'(v);
    #1;
    q    = floor_div256(v);
    exps = (q > 127 || q < -128);
    expv = (q > 127) ? 127 : (q < -128) ? -128 : q;
    if (q > 127) n_hi++;
    if (q < -128) n_lo++;
    checks++;
    if (int'(y_out) != expv || sat != exps) begin
      failures++;
      $display("FAIL y_full=%0d y_out=%0d sat=%b expected %0d %b", v, y_out, sat, expv, exps);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -65536; v <= 65535; v += 7) check(v);
    check(-65536); check(65535); check(-1); check(0); check(255); check(256); check(-256); check(-257);
    check(32767); check(32768); check(-32768); check(-32769);
    if (n_hi == 0 || n_lo == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
