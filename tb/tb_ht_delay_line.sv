// tb_ht_delay_line: self-checking test of the real-part delay line.
// Feeds a random 8-bit stream and checks that q, in every clock cycle, equals the
// input presented exactly 15 cycles earlier (zero while the line still holds its
// reset values).
module tb_ht_delay_line;
  localparam int W = 8, DEPTH = 15;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] d, q;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  ht_delay_line #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    for (int i = 0; i < DEPTH; i++) hist.push_back('0);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      d = W'($urandom);
      @(posedge clk);
      hist.push_back(d);
      #1;
      // hist[DEPTH] is the input of this cycle; q now shows the next cycle's output,
      // the input of DEPTH - 1 cycles before this one.
      checks++;
      if (q !== hist[1]) begin
        failures++;
        $display("FAIL cycle %0d: q=%h, want %h", n, q, hist[1]);
      end
      void'(hist.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
