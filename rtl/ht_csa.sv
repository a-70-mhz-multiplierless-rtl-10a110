// ht_csa: 3:2 carry-save adder (a row of full adders with no carry chain).
//
// Three W-bit words a, b, c are reduced to a sum word s and a carry word cy so that
// a + b + c = s + cy modulo 2^W. The carry of bit i is placed at bit i+1 of cy and
// the carry out of the top bit is dropped, which keeps two's complement values
// correct as long as the true total fits in W bits. The delay is one full adder,
// whatever W is; this is what lets every tap of the filter add its product within
// a short clock period. Purely combinational.
module ht_csa #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  logic [W-2:0] maj;   // carries of bits 0..W-2; the top bit's carry leaves the word

  always_comb begin
    s   = a ^ b ^ c;
    maj = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]);
    cy  = {maj, 1'b0};
  end
endmodule
