// tb_ht_top_exact: end-to-end test of the Hilbert transformer core with the internal
// word widened to 25 bits (16 fraction bits), where no product bit is dropped and
// y_out2 must equal the clipped floor of the exact convolution bit for bit.
//
// The reference is the plain convolution of the input with the 31 CSD coefficients,
// written here as integers scaled by 2^16 (h(2i) for i = 0..7 below, h(30-k) = -h(k),
// odd taps zero), worked out from the CSD digit table independently of the design.
// With a sample presented in cycle n, the checks are:
//   y_out1 in cycle n+17 equals that sample (real part, delay 15 + 2 registers);
//   y_out2 in cycle c is exactly floor(sum_p h(p) x(c-2-p)) clipped to -128..127.
// Stimulus: two impulses (tap-by-tap response and latency), a pseudo-noise stream
// from a 15-bit LFSR (the kind of signal used to test the chip), and input patterns
// that drive the filter to its largest positive and negative results, so the output
// clipping acts both ways. Mechanisms counted, each must occur: clipping high and
// low, the vector merge adder selecting a carry-1 and a carry-0 block sum, and a
// non-zero vertical subexpression in the multiplier block.
module tb_ht_top_exact;
  localparam int NT = 31, LAT = 2, RE_LAT = 17;
  localparam int HH [8] = '{-2237, -1340, -1176, -385, -2689, 4610, 11475, 40877};

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [7:0] x_in, y_out1, y_out2;
  int checks = 0, failures = 0, exact = 0, compared = 0;
  int n_clip_hi = 0, n_clip_lo = 0, n_sel1 = 0, n_sel0 = 0, n_vert = 0;
  int h [NT];
  int xs [$];   // every presented input, index = cycle

  ht_top #(.INT_W(25)) dut (.clk, .rst_n, .x_in, .y_out1, .y_out2);

  always #5 clk = ~clk;

  function automatic int floor_div(input longint a, input longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q -= 1;
    return int'(q);
  endfunction

  function automatic int ref_y2(input int c);
    longint acc;
    int v;
    acc = 0;
    for (int p = 0; p < NT; p++)
      if (c - LAT - p >= 0) acc += longint'(h[p]) * xs[c - LAT - p];
    v = floor_div(acc, 65536);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  function automatic int ref_raw(input int c);
    longint acc;
    acc = 0;
    for (int p = 0; p < NT; p++)
      if (c - LAT - p >= 0) acc += longint'(h[p]) * xs[c - LAT - p];
    return floor_div(acc, 65536);
  endfunction

  // Present one input sample for the current cycle and check this cycle's outputs.
  task automatic step(input int x);
    int c, want1, want2, raw, d;
    @(negedge clk);
    x_in = 8'(x);
    xs.push_back(x);
    c = xs.size() - 1;
    want1 = (c >= RE_LAT) ? xs[c - RE_LAT] : 0;
    want2 = ref_y2(c);
    raw   = ref_raw(c);
    checks += 2;
    if (int'(y_out1) != want1) begin
      failures++;
      $display("FAIL cycle %0d: y_out1=%0d want %0d", c, y_out1, want1);
    end
    d = int'(y_out2) - want2;
    compared++;
    if (d == 0) exact++;
    if (d != 0) begin
      failures++;
      $display("FAIL cycle %0d: y_out2=%0d want %0d ", c, y_out2, want2);
    end
    if (raw > 127 && y_out2 == 8'sd127) n_clip_hi++;
    if (raw < -129 && y_out2 == -8'sd128) n_clip_lo++;
  endtask

  // Carry-select activity of the top block of the vector merge adder.
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_vma.bc[4]) n_sel1++; else n_sel0++;
      if (dut.u_mcm.wv != '0) n_vert++;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [14:0] lfsr;
    int t0;
    for (int i = 0; i < 8; i++) begin
      h[2*i]          = HH[i];
      h[NT - 1 - 2*i] = -HH[i];
      h[2*i + 1]      = 0;
    end
    h[15] = 0;
    x_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Impulses: the response must be the coefficient sequence, starting LAT cycles
    // after the sample, with its centre on y_out2 RE_LAT cycles after it.
    t0 = xs.size();
    step(127);
    repeat (40) step(0);
    step(-128);
    repeat (40) step(0);
    checks++;
    if (int'(y_out1) != 0 || xs[t0] != 127) failures++;

    // Pseudo-noise stream.
    lfsr = 15'h1;
    for (int n = 0; n < 3000; n++) begin
      lfsr = {lfsr[13:0], lfsr[14] ^ lfsr[13]};
      step(int'($signed(lfsr[7:0])));
    end

    // Largest positive and negative results: x(c-2-p) = +-127 * sign(h(p)).
    for (int r = 0; r < 4; r++) begin
      int s;
      s = (r % 2 == 0) ? 1 : -1;
      for (int j = 0; j < NT; j++) begin
        int p;
        p = NT - 1 - j;
        step(h[p] > 0 ? s * 127 : h[p] < 0 ? -s * 127 : 0);
      end
      repeat (4) step(0);
    end
    repeat (40) step(0);

    checks++;
    if (exact != compared) begin
      failures++;
      $display("FAIL only %0d of %0d outputs exact", exact, compared);
    end
    $display("mechanisms: clip_hi=%0d clip_lo=%0d select_carry1=%0d select_carry0=%0d vertical=%0d",
             n_clip_hi, n_clip_lo, n_sel1, n_sel0, n_vert);
    $display("outputs exact: %0d of %0d", exact, compared);
    checks += 5;
    if (n_clip_hi == 0) begin failures++; $display("FAIL clipping high never happened"); end
    if (n_clip_lo == 0) begin failures++; $display("FAIL clipping low never happened"); end
    if (n_sel1 == 0)    begin failures++; $display("FAIL carry-select carry 1 never happened"); end
    if (n_sel0 == 0)    begin failures++; $display("FAIL carry-select carry 0 never happened"); end
    if (n_vert == 0)    begin failures++; $display("FAIL vertical subexpression never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
