// cmvp_preadd -- bank of M*N/2 constant adders (pre-addition stage).
//
// Each of the N/2 inputs x_half[k] is broadcast to M lanes (the matrix P of
// the algorithm) and added to one column of the constant matrix:
//   ODD_A = 0:  sum[k][m] = a_{m,2k}   + x_half[k]   with x_half[k] = x_{2k+1}
//               (the vector S, the diagonal of D; the odd data elements)
//   ODD_A = 1:  sum[k][m] = a_{m,2k+1} + x_half[k]   with x_half[k] = x_{2k}
//               (the multiplicand vector A(1) + P X(1); the even elements)
// The grouping [k][m] follows the algorithm's super-vectors, whose element
// index is k*M + m.  Each adder has one input tied to a constant, so a
// synthesis tool reduces it to an incrementer-like "encoder".
//
// Interface: x_half is N/2 signed DATA_W-bit words; sum is N/2 x M signed
// words of pre_w(DATA_W, COEF_W) bits, wide enough that no sum overflows.
// Timing: purely combinational.  The algorithm fixes the adders; word widths
// and the sign-extension are this design's own choices.
module cmvp_preadd #(
  parameter int unsigned M      = 8,
  parameter int unsigned N      = 8,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned COEF_W = 16,
  parameter bit          ODD_A  = 1'b0,
  parameter logic [M*N*COEF_W-1:0] A_FLAT =
      (M*N*COEF_W)'(cmvp_pkg::demo_matrix(M, N, COEF_W))
) (
  input  logic signed [DATA_W-1:0]                          x_half [N/2],
  output logic signed [cmvp_pkg::pre_w(DATA_W, COEF_W)-1:0] sum    [N/2][M]
);

  localparam int PRE_W = cmvp_pkg::pre_w(DATA_W, COEF_W);

  for (genvar k = 0; k < N / 2; k++) begin : g_k
    for (genvar m = 0; m < M; m++) begin : g_m
      localparam int COL = 2 * k + (ODD_A ? 1 : 0);
      localparam logic signed [COEF_W-1:0] A_MK =
          A_FLAT[(m * N + COL) * COEF_W +: COEF_W];
      assign sum[k][m] = PRE_W'(A_MK) + PRE_W'(x_half[k]);
    end
  end

endmodule
