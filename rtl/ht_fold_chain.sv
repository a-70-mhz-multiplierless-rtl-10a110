// ht_fold_chain: folded transposed-form accumulation chain in carry-save form.
//
// In the transposed form of y[n] = sum_p h(p) x[n-p], each tap position p adds its
// product to the partial sum arriving from position p+1, and a register sits between
// neighbouring positions: acc(p) = product(p) + acc(p+1) delayed one cycle, with
// y = acc(0). This chain has the 30 register stages of a 31-tap filter laid out as
// a fold: positions 30..16 carry the upper-half products hi[i] (position 30-2i),
// positions 14..0 the lower-half products lo[i] (position 2i), so each coefficient's
// product pair enters once in each half. Odd positions and the centre have zero
// coefficients and are plain register stages.
//
// Every partial sum is kept as a sum word and a carry word, so each stage is a pair
// of registers, and a stage that adds a product (itself a sum/carry pair) uses two
// 3:2 carry-save adders: no carry propagates anywhere in the chain. All arithmetic
// is modulo 2^INT_W. y_s/y_c are the combinational acc(0) pair; the vector merge
// adder outside turns them into one word. Reset (asynchronous, active low, this
// design's choice) clears every stage.
module ht_fold_chain
  import ht_pkg::*;
#(
  parameter int INT_W = INT_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [INT_W-1:0] lo_s [N_COEF],
  input  logic [INT_W-1:0] lo_c [N_COEF],
  input  logic [INT_W-1:0] hi_s [N_COEF],
  input  logic [INT_W-1:0] hi_c [N_COEF],
  output logic [INT_W-1:0] y_s,
  output logic [INT_W-1:0] y_c
);
  localparam int LAST = N_TAPS - 1;  // 30

  // r_*[p] holds acc(p) of the previous cycle, p = 1..LAST.
  logic [INT_W-1:0] r_s   [1:LAST];
  logic [INT_W-1:0] r_c   [1:LAST];
  logic [INT_W-1:0] acc_s [0:LAST];
  logic [INT_W-1:0] acc_c [0:LAST];

  for (genvar p = 0; p <= LAST; p++) begin : g_pos
    logic [INT_W-1:0] in_s, in_c;  // partial sum arriving from position p+1
    if (p == LAST) begin : g_first
      assign in_s = '0;
      assign in_c = '0;
    end else begin : g_link
      assign in_s = r_s[p+1];
      assign in_c = r_c[p+1];
    end
    if (p % 2 == 1) begin : g_pass
      assign acc_s[p] = in_s;
      assign acc_c[p] = in_c;
    end else begin : g_add
      logic [INT_W-1:0] ps, pc, s1, c1;
      if (p < LAST / 2) begin : g_lo
        assign ps = lo_s[p/2];
        assign pc = lo_c[p/2];
      end else begin : g_hi
        assign ps = hi_s[(LAST-p)/2];
        assign pc = hi_c[(LAST-p)/2];
      end
      ht_csa #(.W(INT_W)) u_csa0 (.a(in_s), .b(in_c), .c(ps), .s(s1), .cy(c1));
      ht_csa #(.W(INT_W)) u_csa1 (.a(s1), .b(c1), .c(pc), .s(acc_s[p]), .cy(acc_c[p]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 1; p <= LAST; p++) begin
        r_s[p] <= '0;
        r_c[p] <= '0;
      end
    end else begin
      for (int p = 1; p <= LAST; p++) begin
        r_s[p] <= acc_s[p];
        r_c[p] <= acc_c[p];
      end
    end
  end

  assign y_s = acc_s[0];
  assign y_c = acc_c[0];
endmodule
