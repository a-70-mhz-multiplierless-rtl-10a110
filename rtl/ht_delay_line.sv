// ht_delay_line: the real-part (in-phase) delay of the Hilbert transformer.
//
// A shift register of DEPTH W-bit stages: q is d delayed by exactly DEPTH clock
// cycles. With the default DEPTH = (31-1)/2 = 15 it delays the input by half the
// filter length, which lines the real output up with the centre tap of the
// anti-symmetric FIR filter that forms the imaginary output. The stage count and
// width are the published ones; the asynchronous active-low reset that clears
// every stage is this design's choice.
module ht_delay_line #(
  parameter int W     = 8,
  parameter int DEPTH = 15
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] stage [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else begin
      stage[0] <= d;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[DEPTH-1];
endmodule
