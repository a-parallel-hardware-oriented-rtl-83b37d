// cmvp_row_sum -- the M adders with K = N/2 inputs each (matrix Sigma).
//
// Sigma = 1_{1 x N/2} (x) I_M collects, for every output row m, the N/2
// products p[0][m] .. p[K-1][m] that the multiplier array made for that row:
//   rsum[m] = sum_k p[k][m]
// Each adder is written as a plain sum, left to synthesis to build as a tree.
//
// Interface: p is K x M signed IN_W-bit words, rsum is M signed OUT_W-bit
// sums; OUT_W must be at least IN_W + clog2(K) for an exact result.
// Timing: purely combinational.
module cmvp_row_sum #(
  parameter int unsigned K     = 4,
  parameter int unsigned M     = 8,
  parameter int unsigned IN_W  = 34,
  parameter int unsigned OUT_W = 37
) (
  input  logic signed [IN_W-1:0]  p    [K][M],
  output logic signed [OUT_W-1:0] rsum [M]
);

  always_comb begin
    for (int m = 0; m < M; m++) begin
      rsum[m] = '0;
      for (int k = 0; k < K; k++)
        rsum[m] += OUT_W'(p[k][m]);
    end
  end

endmodule
