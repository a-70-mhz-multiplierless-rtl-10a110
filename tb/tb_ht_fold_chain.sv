// tb_ht_fold_chain: self-checking test of the folded carry-save accumulation chain.
//
// Random sum/carry words are applied to all 16 product inputs every cycle. The
// reference keeps the history of the applied values: the output pair must add up,
// modulo 2^16, to sum over tap positions p of the product applied at position p,
// p cycles earlier, where position 2i carries lo[i] and position 30-2i carries
// hi[i]. The first 30 cycles after reset also check that the chain starts empty.
module tb_ht_fold_chain;
  localparam int NC = 8, W = 16, DEPTH = 31;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] lo_s [NC], lo_c [NC], hi_s [NC], hi_c [NC];
  logic [W-1:0] y_s, y_c;
  // inj[n][p]: value applied at tap position p in cycle n (relative index).
  logic [W-1:0] hist [DEPTH][DEPTH];
  int checks = 0, failures = 0;

  ht_fold_chain dut (.clk, .rst_n, .lo_s, .lo_c, .hi_s, .hi_c, .y_s, .y_c);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (lo_s[i]) begin
      lo_s[i] = '0; lo_c[i] = '0; hi_s[i] = '0; hi_c[i] = '0;
    end
    foreach (hist[a, b]) hist[a][b] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      logic [W-1:0] want;
      @(negedge clk);
      for (int a = DEPTH - 1; a > 0; a--) hist[a] = hist[a-1];
      foreach (hist[0][p]) hist[0][p] = '0;
      foreach (lo_s[i]) begin
        lo_s[i] = W'($urandom); lo_c[i] = W'($urandom);
        hi_s[i] = W'($urandom); hi_c[i] = W'($urandom);
        if (n % 97 == 5) begin   // full-scale words now and then
          lo_s[i] = '1; lo_c[i] = '1; hi_s[i] = '1; hi_c[i] = '1;
        end
        hist[0][2*i]            = lo_s[i] + lo_c[i];
        hist[0][DEPTH - 1 - 2*i] = hi_s[i] + hi_c[i];
      end
      want = '0;
      for (int p = 0; p < DEPTH; p++) want += hist[p][p];
      #1;
      checks++;
      if (W'(y_s + y_c) !== want) begin
        failures++;
        $display("FAIL cycle %0d: y=%h want %h", n, W'(y_s + y_c), want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
