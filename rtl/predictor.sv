// predictor: 1D polynomial predictor with its history buffer.
//
// Keeps the last ORDER converted inputs F[i-1] .. F[i-ORDER] in a shift
// register and extrapolates the next value with the Lagrange polynomial through
// them, p = sum_k (-1)^(k+1) * C(ORDER,k) * F[i-k]. ORDER = 1..6 gives the
// constant, linear, quadratic, cubic, quartic and quintic predictors; the
// default 4 is the cubic one (p = 4F1 - 6F2 + 4F3 - F4). All arithmetic is
// unsigned and wraps modulo 2^W; compressor and decompressor use identical
// arithmetic, so the wrap never loses information.
//
// Timing: p_out is combinational from the history registers. When push is
// high, f_in enters the history at the clock edge. Reset clears the history
// to zero (initial contents are this design's choice).
module predictor #(
  parameter int unsigned W     = 32,
  parameter int unsigned ORDER = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] f_in,
  output logic [W-1:0] p_out
);
  import bwc_pkg::*;

  logic [W-1:0] hist [ORDER];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < ORDER; k++) hist[k] <= '0;
    end else if (push) begin
      hist[0] <= f_in;
      for (int k = 1; k < ORDER; k++) hist[k] <= hist[k-1];
    end
  end

  always_comb begin
    logic [W-1:0] acc;
    acc = '0;
    for (int k = 1; k <= ORDER; k++) begin
      if (k % 2 == 1) acc = acc + W'(binom(ORDER, k)) * hist[k-1];
      else            acc = acc - W'(binom(ORDER, k)) * hist[k-1];
    end
    p_out = acc;
  end
endmodule
