// tb_ht_csa: self-checking test of the 3:2 carry-save adder.
// Drives random and corner words into a 16-bit and a 7-bit instance and checks that
// s is the bitwise sum and that s + cy equals a + b + c modulo 2^W.
module tb_ht_csa;
  logic [15:0] a, b, c, s, cy;
  logic [6:0]  a7, b7, c7, s7, cy7;
  int checks = 0, failures = 0;

  ht_csa #(.W(16)) dut   (.a(a),  .b(b),  .c(c),  .s(s),  .cy(cy));
  ht_csa #(.W(7))  dut7  (.a(a7), .b(b7), .c(c7), .s(s7), .cy(cy7));

  task automatic check16();
    logic [15:0] want;
    want = a + b + c;
    checks++;
    if (s !== (a ^ b ^ c) || 16'(s + cy) !== want) begin
      failures++;
      $display("FAIL W=16 a=%h b=%h c=%h s=%h cy=%h", a, b, c, s, cy);
    end
  endtask

  task automatic check7();
    logic [6:0] want;
    want = a7 + b7 + c7;
    checks++;
    if (s7 !== (a7 ^ b7 ^ c7) || 7'(s7 + cy7) !== want) begin
      failures++;
      $display("FAIL W=7 a=%h b=%h c=%h s=%h cy=%h", a7, b7, c7, s7, cy7);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '1; b = '1; c = '1; #1 check16();
    a = 16'h8000; b = 16'h8000; c = 16'h0001; #1 check16();
    for (int i = 0; i < 2000; i++) begin
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom);
      a7 = 7'($urandom); b7 = 7'($urandom); c7 = 7'($urandom);
      #1;
      check16();
      check7();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
