// tb_ht_mcm: self-checking test of the multiplierless multiplier block.
//
// Reference: the eight coefficients of the 31-tap filter as integers scaled by 2^16,
// h(0), h(2), ..., h(14) = -2237, -1340, -1176, -385, -2689, 4610, 11475, 40877,
// worked out by hand from the CSD digit table. An exact instance (INT_W = 25, 16
// fraction bits) must give lo = h*x and hi = -h*x bit for bit for every product
// that uses no vertical subexpression. Products that share a vertical term are
// checked as pairs, (h(2)+h(4))*x and (h(6)+h(8))*x, once the input has been held
// for three samples so that x[n] = x[n-2]. The default 16-bit instance must stay
// within a few internal LSBs of the exact product.
module tb_ht_mcm;
  localparam int NC = 8;
  localparam int HREF [NC] = '{-2237, -1340, -1176, -385, -2689, 4610, 11475, 40877};

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [7:0] x;
  logic [24:0] lo_s [NC], lo_c [NC], hi_s [NC], hi_c [NC];
  logic [15:0] qlo_s [NC], qlo_c [NC], qhi_s [NC], qhi_c [NC];
  int checks = 0, failures = 0;

  ht_mcm #(.IN_W(8), .INT_W(25)) dut (.clk, .rst_n, .x, .lo_s, .lo_c, .hi_s, .hi_c);
  ht_mcm dut16 (.clk, .rst_n, .x, .lo_s(qlo_s), .lo_c(qlo_c), .hi_s(qhi_s), .hi_c(qhi_c));

  always #5 clk = ~clk;

  function automatic longint v25(input logic [24:0] s, input logic [24:0] c);
    logic [24:0] t;
    t = s + c;
    return longint'(signed'(t));
  endfunction

  function automatic longint v16(input logic [15:0] s, input logic [15:0] c);
    logic [15:0] t;
    t = s + c;
    return longint'(signed'(t));
  endfunction

  task automatic expect_eq(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s x=%0d: got %0d want %0d", what, x, got, want);
    end
  endtask

  // Exact products of the non-vertical coefficients, every cycle.
  task automatic check_plain();
    foreach (HREF[i]) begin
      if (i == 0 || i >= 5) begin
        expect_eq($sformatf("lo[%0d]", i), v25(lo_s[i], lo_c[i]), longint'(HREF[i]) * x);
        expect_eq($sformatf("hi[%0d]", i), v25(hi_s[i], hi_c[i]), -longint'(HREF[i]) * x);
      end
    end
    // 16-bit internal word: 7 fraction bits, product truncated term by term.
    foreach (HREF[i]) begin
      longint exact, got;
      if (i == 0 || i >= 5) begin
        exact = longint'(HREF[i]) * x;            // scaled by 2^16
        got   = v16(qlo_s[i], qlo_c[i]) * 512;    // scaled by 2^16
        checks++;
        if (got > exact + 512 || got < exact - 6 * 512) begin
          failures++;
          $display("FAIL 16-bit lo[%0d] x=%0d: got %0d, exact %0d", i, x, got, exact);
        end
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Random input every cycle.
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      x = 8'($urandom);
      if (n == 0) x = 8'sh80;
      if (n == 1) x = 8'sh7f;
      #1 check_plain();
    end
    // Input held for three samples: vertical pairs.
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      x = 8'($urandom);
      if (n == 0) x = -8'sd128;
      repeat (2) @(negedge clk);
      #1;
      check_plain();
      expect_eq("lo[1]+lo[2]", v25(lo_s[1], lo_c[1]) + v25(lo_s[2], lo_c[2]),
                longint'(HREF[1] + HREF[2]) * x);
      expect_eq("lo[3]+lo[4]", v25(lo_s[3], lo_c[3]) + v25(lo_s[4], lo_c[4]),
                longint'(HREF[3] + HREF[4]) * x);
      expect_eq("hi[1]+hi[2]", v25(hi_s[1], hi_c[1]) + v25(hi_s[2], hi_c[2]),
                -longint'(HREF[1] + HREF[2]) * x);
      expect_eq("hi[3]+hi[4]", v25(hi_s[3], hi_c[3]) + v25(hi_s[4], hi_c[4]),
                -longint'(HREF[3] + HREF[4]) * x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
