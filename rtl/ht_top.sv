// ht_top: 31-tap multiplierless FIR Hilbert transformer core.
//
// Turns a real 8-bit sample stream x_in into an analytic signal, one sample per
// clock: y_out1 is the real part (the input delayed to the filter's centre tap) and
// y_out2 the imaginary part (the input filtered by an anti-symmetric 31-tap FIR
// filter whose passband, 0.05 fs to 0.45 fs, has a 90-degree phase shift).
//
// Datapath, as in the published architecture: the registered input feeds the
// 15-stage real-part delay line and the multiplier block (ht_mcm), which forms all
// tap products from shifts and shared subexpressions in carry-save form. The folded
// transposed chain (ht_fold_chain) accumulates them in sum/carry register pairs, and
// the square-root carry-select vector merge adder (ht_vma) resolves the last pair.
//
// Interface: x_in, y_out1 and y_out2 are 8-bit two's complement. The filter result
// is kept with FRAC = INT_W - 9 fraction bits; y_out2 is its integer part (rounded
// toward minus infinity) clipped to -128..127. This design's own choices: the input
// and output registers, the output scaling and clipping, two's complement I/O, and
// the asynchronous active-low reset rst_n that clears all state.
//
// Timing: an input sample presented in cycle n (taken at the edge ending it) shows
// on y_out1 in cycle n+17, and its response through tap p shows on y_out2 in cycle
// n+2+p, so the centre tap (p = 15) lines up with y_out1. A new sample is accepted
// every cycle.
module ht_top
  import ht_pkg::*;
#(
  parameter int INT_W = INT_W_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [IO_W-1:0] x_in,
  output logic signed [IO_W-1:0] y_out1,
  output logic signed [IO_W-1:0] y_out2
);
  localparam int FRAC = INT_W - IO_W - 1;

  logic signed [IO_W-1:0] x_reg, re_q;
  logic [INT_W-1:0] lo_s [N_COEF], lo_c [N_COEF], hi_s [N_COEF], hi_c [N_COEF];
  logic [INT_W-1:0] acc_s, acc_c, y_full;
  logic             y_cout;
  logic signed [IO_W:0]   y_int;
  logic signed [IO_W-1:0] y_sat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x_reg <= '0;
    else        x_reg <= x_in;
  end

  ht_delay_line #(.W(IO_W), .DEPTH((N_TAPS - 1) / 2)) u_re (
    .clk, .rst_n, .d(x_reg), .q(re_q)
  );

  ht_mcm #(.IN_W(IO_W), .INT_W(INT_W)) u_mcm (
    .clk, .rst_n, .x(x_reg), .lo_s, .lo_c, .hi_s, .hi_c
  );

  ht_fold_chain #(.INT_W(INT_W)) u_chain (
    .clk, .rst_n, .lo_s, .lo_c, .hi_s, .hi_c, .y_s(acc_s), .y_c(acc_c)
  );

  ht_vma #(.W(INT_W)) u_vma (
    .a(acc_s), .b(acc_c), .cin(1'b0), .sum(y_full), .cout(y_cout)
  );

  // Integer part and clipping to the output word.
  always_comb begin
    y_int = y_full[INT_W-1:FRAC];
    if (y_int > (IO_W+1)'(2**(IO_W-1) - 1))  y_sat = {1'b0, {(IO_W-1){1'b1}}};
    else if (y_int < -(IO_W+1)'(2**(IO_W-1))) y_sat = {1'b1, {(IO_W-1){1'b0}}};
    else                                      y_sat = y_int[IO_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_out1 <= '0;
      y_out2 <= '0;
    end else begin
      y_out1 <= re_q;
      y_out2 <= y_sat;
    end
  end
endmodule
