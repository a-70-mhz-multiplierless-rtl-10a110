// tb_ht_vma: self-checking test of the square-root carry-select vector merge adder.
// Random and corner operands, both carry-in values, at the default 16-bit width and
// at 13 and 3 bits (uneven last block); sum and carry out are compared with a+b+cin.
module tb_ht_vma;
  logic [15:0] a, b, sum;
  logic [12:0] a13, b13, sum13;
  logic [2:0]  a3, b3, sum3;
  logic        cin, cout, cout13, cout3;
  int checks = 0, failures = 0;

  ht_vma #(.W(16)) dut   (.a(a),   .b(b),   .cin(cin), .sum(sum),   .cout(cout));
  ht_vma #(.W(13)) dut13 (.a(a13), .b(b13), .cin(cin), .sum(sum13), .cout(cout13));
  ht_vma #(.W(3))  dut3  (.a(a3),  .b(b3),  .cin(cin), .sum(sum3),  .cout(cout3));

  task automatic check();
    logic [16:0] w16;
    logic [13:0] w13;
    logic [3:0]  w3;
    w16 = {1'b0, a} + {1'b0, b} + 17'(cin);
    w13 = {1'b0, a13} + {1'b0, b13} + 14'(cin);
    w3  = {1'b0, a3} + {1'b0, b3} + 4'(cin);
    checks += 3;
    if ({cout, sum} !== w16) begin
      failures++; $display("FAIL W=16 %h+%h+%b = %h, want %h", a, b, cin, {cout, sum}, w16);
    end
    if ({cout13, sum13} !== w13) begin
      failures++; $display("FAIL W=13 %h+%h+%b = %h, want %h", a13, b13, cin, {cout13, sum13}, w13);
    end
    if ({cout3, sum3} !== w3) begin
      failures++; $display("FAIL W=3 %h+%h+%b = %h, want %h", a3, b3, cin, {cout3, sum3}, w3);
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
    // Full carry ripple through every block.
    a = 16'hffff; b = 16'h0000; a13 = '1; b13 = '0; a3 = '1; b3 = '0; cin = 1'b1; #1 check();
    a = 16'h7fff; b = 16'h0001; cin = 1'b0; #1 check();
    for (int i = 0; i < 4000; i++) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      a13 = 13'($urandom); b13 = 13'($urandom); a3 = 3'($urandom); b3 = 3'($urandom);
      #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
