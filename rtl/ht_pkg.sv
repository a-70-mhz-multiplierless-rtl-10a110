// ht_pkg: shared sizes, the canonic-signed-digit (CSD) coefficient set and its
// common-subexpression decomposition for the 31-tap FIR Hilbert transformer.
//
// The filter is anti-symmetric, h(30-k) = -h(k), and every odd-indexed tap is zero
// (h(1), h(3), ..., h(15)), so only eight coefficients h(0), h(2), ..., h(14) are
// distinct. Index i of every table below is coefficient h(2*i). A digit mask is
// written [1:16] so that a literal reads like the published CSD table, left to right
// from weight 2^-1 to weight 2^-16. The coefficient values follow that table; their
// integer values (times 2^16) are
//   h(0)..h(14) = -2237, -1340, -1176, -385, -2689, 4610, 11475, 40877.
//
// The multiplier block does not build each product digit by digit. The digits are
// split three ways, first horizontally and then vertically, as in the published
// subexpression search:
//   * horizontal pattern "10n": A = x - x*2^-2 is formed once. Digits +1 at 2^-j and
//     -1 at 2^-(j+2) of one coefficient become the single term A*2^-j (HOR_POS bit j),
//     and the mirror pattern "n01" becomes -A*2^-j (HOR_NEG bit j).
//   * vertical pattern "n0n": equal digits at the same weight in two neighbouring
//     non-zero taps h(k) and h(k+2). V = x[n] + x[n-2] is formed once and the pair
//     becomes one V term, marked in VER_POS/VER_NEG at its first tap k.
//   * every remaining digit is a single shifted copy of x (PLN_POS/PLN_NEG).
// Which pairs were picked is this design's own run of that search; the sum of the
// three parts of every coefficient equals the CSD value exactly.
package ht_pkg;

  localparam int N_TAPS    = 31;  // filter length
  localparam int N_COEF    = 8;   // distinct non-zero coefficients h(0), h(2), ..., h(14)
  localparam int CSD_BITS  = 16;  // digit weights 2^-1 ... 2^-16
  localparam int IO_W      = 8;   // input and output word
  localparam int INT_W_DEF = 16;  // internal word
  localparam int MAX_TERMS = 5;   // most terms any one tap product needs after CSE

  typedef logic [1:CSD_BITS] mask_t;

  // Full CSD coefficients (used by the decomposition check below and by testbenches).
  localparam mask_t CSD_POS [N_COEF] = '{
    16'b0000000001000100, 16'b0000000000000100, 16'b0000000000001000, 16'b0000000010000000,
    16'b0000000000000000, 16'b0001001000000010, 16'b0100000100010100, 16'b1010000000000001};
  localparam mask_t CSD_NEG [N_COEF] = '{
    16'b0000100100000001, 16'b0000010101000000, 16'b0000010010100000, 16'b0000001000000001,
    16'b0000101010000001, 16'b0000000000000000, 16'b0001010001000001, 16'b0000000001010100};

  // Decomposition: plain digits, horizontal A terms, vertical V terms.
  localparam mask_t PLN_POS [N_COEF] = '{
    16'b0000000000000000, 16'b0000000000000100, 16'b0000000000000000, 16'b0000000000000000,
    16'b0000000000000000, 16'b0001001000000010, 16'b0000000000000000, 16'b1010000000000000};
  localparam mask_t PLN_NEG [N_COEF] = '{
    16'b0000100000000000, 16'b0000000101000000, 16'b0000000010000000, 16'b0000000000000000,
    16'b0000101010000000, 16'b0000000000000000, 16'b0000000000000000, 16'b0000000001010000};
  localparam mask_t HOR_POS [N_COEF] = '{
    16'b0000000000000100, 16'b0000000000000000, 16'b0000000000000000, 16'b0000000000000000,
    16'b0000000000000000, 16'b0000000000000000, 16'b0100000000000100, 16'b0000000000000000};
  localparam mask_t HOR_NEG [N_COEF] = '{
    16'b0000000100000000, 16'b0000000000000000, 16'b0000000000100000, 16'b0000001000000000,
    16'b0000000000000000, 16'b0000000000000000, 16'b0000010001000000, 16'b0000000000000100};
  localparam mask_t VER_POS [N_COEF] = '{
    16'b0000000000000000, 16'b0000000000000000, 16'b0000000000000000, 16'b0000000000000000,
    16'b0000000000000000, 16'b0000000000000000, 16'b0000000000000000, 16'b0000000000000000};
  localparam mask_t VER_NEG [N_COEF] = '{
    16'b0000000000000000, 16'b0000010000000000, 16'b0000000000000000, 16'b0000000000000001,
    16'b0000000000000000, 16'b0000000000000000, 16'b0000000000000000, 16'b0000000000000000};

  // Integer value of a digit mask pair, scaled by 2^16.
  function automatic int mask_value(input mask_t p, input mask_t n);
    int v;
    v = 0;
    for (int c = 1; c <= CSD_BITS; c++) begin
      if (p[c]) v += 1 << (CSD_BITS - c);
      if (n[c]) v -= 1 << (CSD_BITS - c);
    end
    return v;
  endfunction

  // CSD value of h(2i), scaled by 2^16.
  function automatic int coef_value(input int i);
    return mask_value(CSD_POS[i], CSD_NEG[i]);
  endfunction

  // Value of h(2i) rebuilt from its decomposition, scaled by 2^16. A vertical pair
  // starting at h(2i-2) also contributes to h(2i).
  function automatic int split_value(input int i);
    int v;
    v = mask_value(PLN_POS[i], PLN_NEG[i]);
    for (int j = 1; j <= CSD_BITS - 2; j++) begin
      if (HOR_POS[i][j]) v += (1 << (CSD_BITS - j)) - (1 << (CSD_BITS - j - 2));
      if (HOR_NEG[i][j]) v -= (1 << (CSD_BITS - j)) - (1 << (CSD_BITS - j - 2));
    end
    v += mask_value(VER_POS[i], VER_NEG[i]);
    if (i > 0) v += mask_value(VER_POS[i-1], VER_NEG[i-1]);
    return v;
  endfunction

  // Number of terms in the product injected at tap 2i (lower = 1) or at its
  // mirror 30-2i (lower = 0).
  function automatic int n_terms(input int i, input bit lower);
    int n;
    n = $countones(PLN_POS[i]) + $countones(PLN_NEG[i])
      + $countones(HOR_POS[i]) + $countones(HOR_NEG[i]);
    if (lower) n += $countones(VER_POS[i]) + $countones(VER_NEG[i]);
    else if (i > 0) n += $countones(VER_POS[i-1]) + $countones(VER_NEG[i-1]);
    return n;
  endfunction

endpackage
