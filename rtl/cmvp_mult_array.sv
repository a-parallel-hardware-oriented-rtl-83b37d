// cmvp_mult_array -- the M*N/2 general two-input multipliers.
//
// Multiplies the pre-added vector A(1) + P X(1) element by element with the
// vector S, i.e. applies the diagonal matrix D = diag(s_0^(0) .. s_{M-1}^(N/2-1)):
//   p[k][m] = a[k][m] * s[k][m]
// These are the only data-by-data multipliers of the matrix product; with the
// N/2 multipliers of the xi unit they make the N(M+1)/2 of the design.
//
// Interface: a and s are K x M signed IN_W-bit words, p is K x M signed
// 2*IN_W-bit products (exact).  Timing: purely combinational.  The number
// and kind of multipliers follow the method; each is written as a plain '*'
// so that synthesis can map it onto an embedded multiplier block, and the
// full-width products are this design's choice.
module cmvp_mult_array #(
  parameter int unsigned K    = 4,
  parameter int unsigned M    = 8,
  parameter int unsigned IN_W = 17
) (
  input  logic signed [IN_W-1:0]   a [K][M],
  input  logic signed [IN_W-1:0]   s [K][M],
  output logic signed [2*IN_W-1:0] p [K][M]
);

  for (genvar k = 0; k < K; k++) begin : g_k
    for (genvar m = 0; m < M; m++) begin : g_m
      assign p[k][m] = (2*IN_W)'(a[k][m]) * (2*IN_W)'(s[k][m]);
    end
  end

endmodule
