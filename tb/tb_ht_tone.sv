// tb_ht_tone: frequency-response test of the Hilbert transformer at default sizes.
//
// Sine tones of amplitude 100 at frequencies k/200 of the sample rate are fed in, one
// tone at a time. After the filter has filled (60 samples), 200 samples of each output
// are projected on sin and cos of the tone to get its amplitude and phase.
// Checks per tone in the passband 0.05 fs .. 0.45 fs:
//   * y_out2 leads or lags y_out1 by 90 degrees, within 2 degrees;
//   * the gain |y_out2|/|y_out1| matches |H(f)| of the CSD coefficients, computed here
//     from the coefficient integers, within 0.25 dB, and lies within +-1.5 dB of unity.
// At 0 and fs/2 the anti-symmetric odd-length filter has a zero: a constant input
// and an alternating input must give an output within one LSB of 0 (plus the 16-bit
// internal truncation) once the filter is full.
module tb_ht_tone;
  localparam int NT = 31, NWIN = 200, SETTLE = 60;
  localparam int HH [8] = '{-2237, -1340, -1176, -385, -2689, 4610, 11475, 40877};
  localparam real PI = 3.14159265358979;
  localparam int KS [9] = '{10, 14, 20, 30, 40, 50, 70, 80, 89};

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [7:0] x_in, y_out1, y_out2;
  int checks = 0, failures = 0;
  int h [NT];

  ht_top dut (.clk, .rst_n, .x_in, .y_out1, .y_out2);

  always #5 clk = ~clk;

  function automatic real mag_h(input real f);
    real re, im;
    re = 0.0;
    im = 0.0;
    for (int p = 0; p < NT; p++) begin
      re += h[p] / 65536.0 * $cos(2.0 * PI * f * p);
      im -= h[p] / 65536.0 * $sin(2.0 * PI * f * p);
    end
    return $sqrt(re * re + im * im);
  endfunction

  task automatic tone(input int k);
    real f, s1, c1, s2, c2, a1, a2, ph1, ph2, dph, g_db, want_db;
    int n;
    f = k / 200.0;
    s1 = 0.0; c1 = 0.0; s2 = 0.0; c2 = 0.0;
    for (n = 0; n < SETTLE + NWIN; n++) begin
      @(negedge clk);
      x_in = 8'($rtoi(100.0 * $sin(2.0 * PI * f * n) + ((100.0 * $sin(2.0 * PI * f * n) >= 0.0) ? 0.5 : -0.5)));
      if (n >= SETTLE) begin
        s1 += y_out1 * $sin(2.0 * PI * f * n);
        c1 += y_out1 * $cos(2.0 * PI * f * n);
        s2 += y_out2 * $sin(2.0 * PI * f * n);
        c2 += y_out2 * $cos(2.0 * PI * f * n);
      end
    end
    a1 = $sqrt(s1 * s1 + c1 * c1);
    a2 = $sqrt(s2 * s2 + c2 * c2);
    ph1 = $atan2(c1, s1) * 180.0 / PI;
    ph2 = $atan2(c2, s2) * 180.0 / PI;
    dph = ph2 - ph1;
    while (dph > 180.0) dph -= 360.0;
    while (dph <= -180.0) dph += 360.0;
    g_db = 20.0 * $log10(a2 / a1);
    want_db = 20.0 * $log10(mag_h(f));
    $display("f=%0.3f fs: gain %0.2f dB (coefficients %0.2f dB), phase %0.1f deg", f, g_db, want_db, dph);
    checks += 3;
    if ((dph > 0.0 ? dph : -dph) < 88.0 || (dph > 0.0 ? dph : -dph) > 92.0) begin
      failures++;
      $display("FAIL phase at f=%0.3f: %0.1f deg", f, dph);
    end
    if (g_db - want_db > 0.25 || g_db - want_db < -0.25) begin
      failures++;
      $display("FAIL gain at f=%0.3f: %0.2f dB, want %0.2f dB", f, g_db, want_db);
    end
    if (g_db > 1.5 || g_db < -1.5) begin
      failures++;
      $display("FAIL gain at f=%0.3f outside +-1.5 dB: %0.2f dB", f, g_db);
    end
  endtask

  task automatic zero_test(input string name, input int a, input int b);
    for (int n = 0; n < 80; n++) begin
      @(negedge clk);
      x_in = 8'((n % 2 == 0) ? a : b);
      if (n >= 40) begin
        checks++;
        if (y_out2 > 8'sd1 || y_out2 < -8'sd2) begin
          failures++;
          $display("FAIL %s input: y_out2=%0d, want about 0", name, y_out2);
        end
      end
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      h[2*i]          = HH[i];
      h[NT - 1 - 2*i] = -HH[i];
      h[2*i + 1]      = 0;
    end
    h[15] = 0;
    x_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (KS[i]) tone(KS[i]);
    zero_test("constant", 100, 100);
    zero_test("alternating", 100, -100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
