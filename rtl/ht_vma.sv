// ht_vma: vector merge adder, a square-root carry-select adder.
//
// Adds the final sum and carry words of the carry-save filter chain into one
// two's-complement word. The word is cut into blocks whose widths grow by one bit
// from the least significant end (2, 2, 3, 4, 5 for 16 bits), so that the ripple
// time inside a block roughly matches the time the block-select carry needs to
// arrive. The lowest block ripples from cin. Every higher block computes its sum
// twice, for a carry in of 0 and of 1, and the carry coming out of the block below
// selects one of them. Purely combinational.
//
// The choice of a square-root carry-select adder for this place follows the
// filter's published architecture; the block widths are this design's choice.
module ht_vma #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  // Width of block k: 2 for the first two blocks, then one more bit per block.
  function automatic int blk_w(input int k);
    return (k < 2) ? 2 : k + 1;
  endfunction

  // Low bit of block k.
  function automatic int blk_lo(input int k);
    int lo;
    lo = 0;
    for (int j = 0; j < k; j++) lo += blk_w(j);
    return lo;
  endfunction

  function automatic int n_blocks(input int width);
    int k;
    k = 0;
    while (blk_lo(k) < width) k++;
    return k;
  endfunction

  localparam int NB = n_blocks(W);

  logic [NB:0] bc;   // carry into block k

  assign bc[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    localparam int LO = blk_lo(k);
    localparam int BW = (blk_lo(k) + blk_w(k) > W) ? W - blk_lo(k) : blk_w(k);

    if (k == 0) begin : g_ripple
      logic [BW:0] r;
      assign r = {1'b0, a[LO +: BW]} + {1'b0, b[LO +: BW]} + {{BW{1'b0}}, bc[0]};
      assign sum[LO +: BW] = r[BW-1:0];
      assign bc[k+1]       = r[BW];
    end else begin : g_select
      logic [BW:0] r0, r1;
      assign r0 = {1'b0, a[LO +: BW]} + {1'b0, b[LO +: BW]};
      assign r1 = {1'b0, a[LO +: BW]} + {1'b0, b[LO +: BW]} + {{BW{1'b0}}, 1'b1};
      assign sum[LO +: BW] = bc[k] ? r1[BW-1:0] : r0[BW-1:0];
      assign bc[k+1]       = bc[k] ? r1[BW]     : r0[BW];
    end
  end

  assign cout = bc[NB];
endmodule
