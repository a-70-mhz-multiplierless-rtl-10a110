// ht_mcm: multiplierless multiple-constant multiplier (MCM) block.
//
// Forms, from one input sample x, every product the folded filter chain needs: for
// each distinct coefficient h(2i) one product for tap 2i (lo_*) and one for its
// anti-symmetric mirror tap 30-2i (hi_*). There is no multiplier. Three shared
// words are built once per sample from x:
//   X = x aligned to the internal fixed point (FRAC = INT_W - IO_W - 1 fraction bits),
//   A = X - X*2^-2            the horizontal subexpression, CSD pattern "10n",
//   V = X + X(two samples ago) the vertical subexpression, pattern "n0n" shared by
//                               two neighbouring non-zero taps.
// Each product is then a short list of arithmetic right shifts of X, A, V or their
// negations, chosen by the decomposition tables of ht_pkg, and the list is reduced
// by a chain of 3:2 carry-save adders to a sum word and a carry word. The products
// are left in that redundant form; the filter chain adds them as they are.
//
// Because a product and its mirror differ only in sign, hi_* is built from the
// negated words. A vertical pair of h(k) and h(k+2) enters as one V term at tap k
// in the lower half and, by the symmetry, at tap 28-k in the upper half, so that
// term rides on lo[k/2] and on hi[k/2 + 1].
//
// Timing: X and A are combinational from x; the two-sample delay for V is the only
// storage (two IO_W-bit registers, cleared by the asynchronous active-low reset).
// V spans twice the input range, so a negative V term is negated after its shift
// (every V term has a shift of at least one), which keeps it inside the word.
// Right shifts drop bits below the internal LSB (round toward minus infinity); with
// INT_W >= IO_W + 17 no bit is lost and every product is exact. The default
// INT_W = 16 is the published internal word; the exact width is used to test.
// The shift/add structure follows the published design; the particular choice of
// pairs is this design's own run of the published search (see ht_pkg).
module ht_mcm
  import ht_pkg::*;
#(
  parameter int IN_W  = IO_W,
  parameter int INT_W = INT_W_DEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  x,
  output logic        [INT_W-1:0] lo_s [N_COEF],
  output logic        [INT_W-1:0] lo_c [N_COEF],
  output logic        [INT_W-1:0] hi_s [N_COEF],
  output logic        [INT_W-1:0] hi_c [N_COEF]
);
  localparam int FRAC = INT_W - IN_W - 1;

  typedef logic signed [INT_W-1:0] word_t;

  logic signed [IN_W-1:0] x_d1, x_d2;
  word_t wx, wxn, wa, wan, wv;
  word_t lo_ops [N_COEF][MAX_TERMS];
  word_t hi_ops [N_COEF][MAX_TERMS];

  // Two-sample delay feeding the vertical subexpression.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_d1 <= '0;
      x_d2 <= '0;
    end else begin
      x_d1 <= x;
      x_d2 <= x_d1;
    end
  end

  // Shared subexpressions.
  always_comb begin
    wx  = word_t'(x) <<< FRAC;
    wxn = -wx;
    wa  = wx - (wx >>> 2);
    wan = (wx >>> 2) - wx;
    wv  = wx + (word_t'(x_d2) <<< FRAC);
  end

  // Term lists, in weight order, padded with zeros.
  always_comb begin
    for (int i = 0; i < N_COEF; i++) begin
      int nl, nh;
      nl = 0;
      nh = 0;
      for (int t = 0; t < MAX_TERMS; t++) begin
        lo_ops[i][t] = '0;
        hi_ops[i][t] = '0;
      end
      for (int c = 1; c <= CSD_BITS; c++) begin
        if (PLN_POS[i][c]) begin lo_ops[i][nl] = wx  >>> c; nl++; hi_ops[i][nh] = wxn >>> c; nh++; end
        if (PLN_NEG[i][c]) begin lo_ops[i][nl] = wxn >>> c; nl++; hi_ops[i][nh] = wx  >>> c; nh++; end
        if (HOR_POS[i][c]) begin lo_ops[i][nl] = wa  >>> c; nl++; hi_ops[i][nh] = wan >>> c; nh++; end
        if (HOR_NEG[i][c]) begin lo_ops[i][nl] = wan >>> c; nl++; hi_ops[i][nh] = wa  >>> c; nh++; end
        if (VER_POS[i][c]) begin lo_ops[i][nl] = wv  >>> c; nl++; end
        if (VER_NEG[i][c]) begin lo_ops[i][nl] = -(wv >>> c); nl++; end
        if (i > 0) begin
          if (VER_POS[i-1][c]) begin hi_ops[i][nh] = -(wv >>> c); nh++; end
          if (VER_NEG[i-1][c]) begin hi_ops[i][nh] = wv  >>> c; nh++; end
        end
      end
    end
  end

  // Carry-save reduction of each term list.
  for (genvar i = 0; i < N_COEF; i++) begin : g_coef
    if (split_value(i) != coef_value(i) || n_terms(i, 1'b1) > MAX_TERMS
        || n_terms(i, 1'b0) > MAX_TERMS) begin : g_bad_table
      $error("ht_mcm: decomposition of coefficient %0d does not match its CSD value", i);
    end

    // Linear carry-save chain: stage t folds term t into the running sum/carry pair.
    for (genvar t = 2; t < MAX_TERMS; t++) begin : g_red
      logic [INT_W-1:0] ls_i, lc_i, ls_o, lc_o, hs_i, hc_i, hs_o, hc_o;
      if (t == 2) begin : g_head
        assign ls_i = lo_ops[i][0];
        assign lc_i = lo_ops[i][1];
        assign hs_i = hi_ops[i][0];
        assign hc_i = hi_ops[i][1];
      end else begin : g_next
        assign ls_i = g_red[t-1].ls_o;
        assign lc_i = g_red[t-1].lc_o;
        assign hs_i = g_red[t-1].hs_o;
        assign hc_i = g_red[t-1].hc_o;
      end
      ht_csa #(.W(INT_W)) u_lo (.a(ls_i), .b(lc_i), .c(lo_ops[i][t]), .s(ls_o), .cy(lc_o));
      ht_csa #(.W(INT_W)) u_hi (.a(hs_i), .b(hc_i), .c(hi_ops[i][t]), .s(hs_o), .cy(hc_o));
    end

    assign lo_s[i] = g_red[MAX_TERMS-1].ls_o;
    assign lo_c[i] = g_red[MAX_TERMS-1].lc_o;
    assign hi_s[i] = g_red[MAX_TERMS-1].hs_o;
    assign hi_c[i] = g_red[MAX_TERMS-1].hc_o;
  end
endmodule
