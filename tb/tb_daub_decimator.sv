// tb_daub_decimator: end-to-end self-checking test of the Daubechies-4
// polyphase decimator at its default sizes.
//
// A reference model keeps every accepted input sample x[k] and, for each
// even k, computes the undecimated FIR output
//   s = 124 x[k] + 214 x[k-1] + 57 x[k-2] - 33 x[k-3]   (x[<0] = 0)
// which must appear on y_full, with y_out = floor(s/256) clipped to 8 bits
// and sat set when clipping happened,
// exactly one cycle after the filter stage fires, i.e. the cycle after the
// one that follows the accepting clock edge (latency checked per output).
// Stimulus phases:
//   1. random samples in [-75, 75] with random gaps in in_valid,
//   2. random full-range samples (exercises 17-bit extremes and the 8-bit
//      output saturation),
//   3. a three-tone test signal (low, middle and high frequency) applied
//      back-to-back, one sample per clock,
//   4. single tones at a low and at a high frequency; the high tone must
//      come out strongly attenuated relative to the low one.
// Each mechanism (gap, back-to-back input, output, saturation, attenuation) is
// counted and a failure is counted for one that never happened.
module tb_daub_decimator;
  logic               clk = 0, rst_n = 0, in_valid = 0;
  logic signed [7:0]  x_in = '0;
  logic               out_valid;
  logic signed [7:0]  y_out;
  logic signed [16:0] y_full;
  logic               sat;

  daub_decimator dut (.clk, .rst_n, .in_valid, .x_in, .out_valid, .y_out, .y_full, .sat);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int hist[$];                 // accepted input samples
  int exp_s[$], exp_due[$];    // expected sums and the cycle they appear in
  int n_out = 0, n_gap = 0, n_b2b = 0, n_sat = 0, n_neg = 0;
  logic prev_valid = 0;

  // tone measurement
  bit   measuring = 0;
  int   peak = 0;

  function automatic int xk(int k);
    return (k < 0) ? 0 : hist[k];
  endfunction

  function automatic int clip8(int s);
    int q = s >>> 8;
    return (q > 127) ? 127 : (q < -128) ? -128 : q;
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model and output monitor, sampled just after each edge
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid) begin
      int k;
      k = hist.size();
      hist.push_back(int'(x_in));
      if (prev_valid) n_b2b++;
      if (k % 2 == 0) begin
        int s;
        s = 124 * xk(k) + 214 * xk(k-1) + 57 * xk(k-2) - 33 * xk(k-3);
        exp_s.push_back(s);
        exp_due.push_back(cyc + 2);
      end
    end else if (rst_n) n_gap++;
    prev_valid <= rst_n && in_valid;
    #1;
    if (out_valid) begin
      checks++;
      n_out++;
      if (exp_s.size() == 0) begin
        failures++;
        $display("FAIL unexpected output at cycle %0d", cyc);
      end else begin
        int s, due;
        s   = exp_s.pop_front();
        due = exp_due.pop_front();
        if (int'(y_full) != s || int'(y_out) != clip8(s) || sat != ((s >>> 8) != clip8(s)) || due != cyc) begin
          failures++;
          $display("FAIL cycle %0d: y_full=%0d/%0d y_out=%0d/%0d sat=%b due=%0d",
                   cyc, y_full, s, y_out, clip8(s), sat, due);
        end
        if ((s >>> 8) > 127 || (s >>> 8) < -128) n_sat++;
        if (s < 0) n_neg++;
        if (measuring && (int'(y_out) > peak)) peak = int'(y_out);
      end
    end
  end

  task automatic drive(int v, bit valid);
    @(posedge clk);
    #2;
    in_valid = valid;
    x_in     = 8'(v);
  endtask

  task automatic drain();
    drive(0, 0); drive(0, 0); drive(0, 0); drive(0, 0);
    checks++;
    if (exp_s.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", exp_s.size());
    end
  endtask

  // returns the peak 8-bit output for a tone of given amplitude and period
  task automatic tone(real amp, real period, int n, output int pk);
    peak = -1000;
    for (int i = 0; i < n; i++) begin
      measuring = (i > 40);   // skip the start-up transient
      drive($rtoi(amp * $sin(2.0 * 3.14159265358979 * i / period)), 1);
    end
    drain();
    measuring = 0;
    pk = peak;
  endtask

  initial begin
    int pk_low, pk_high;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;

    // 1. random moderate samples with gaps
    for (int i = 0; i < 4000; i++)
      drive($urandom_range(0, 150) - 75, $urandom_range(0, 3) != 0);
    // 2. random full-range samples, back to back
    for (int i = 0; i < 4000; i++)
      drive(int'($signed(8'($urandom))), 1);
    drain();

    // 3. three-tone test signal: periods of 64, 10 and 2.5 input samples
    if (hist.size() % 2 != 0) drive(0, 1);   // realign to the even phase
    drain();
    for (int i = 0; i < 2048; i++) begin
      real v;
      v = 25.0 * $sin(2.0 * 3.14159265358979 * i / 64.0)
        + 20.0 * $sin(2.0 * 3.14159265358979 * i / 10.0)
        + 20.0 * $sin(2.0 * 3.14159265358979 * i / 2.5);
      drive($rtoi(v), 1);
    end
    drain();

    // 4. attenuation of a high-frequency tone against a low-frequency one
    tone(60.0, 64.0, 512, pk_low);
    tone(60.0, 2.5, 512, pk_high);
    $display("tone peaks: low=%0d high=%0d", pk_low, pk_high);
    checks++;
    if (!(pk_high * 4 < pk_low)) begin
      failures++;
      $display("FAIL high tone not attenuated");
    end

    $display("outputs=%0d gaps=%0d back_to_back=%0d saturated=%0d negative=%0d",
             n_out, n_gap, n_b2b, n_sat, n_neg);
    if (n_out == 0 || n_gap == 0 || n_b2b == 0 || n_sat == 0 || n_neg == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
