// cmvp_xi_unit -- data correction term xi(N) of Winograd's inner product.
//
//   xi = sum_{k=0}^{N/2-1} x_{2k} * x_{2k+1}
//
// Built as the algorithm counts it: N/2 two-input multipliers feeding one
// adder with N/2 inputs.  The same xi is subtracted from every output y_m,
// so one unit serves all M rows.  The adder is written as a plain sum and
// left to synthesis to arrange as a tree; its structure is this design's
// choice.
//
// Interface: x is the full data vector, N signed DATA_W-bit words; xi is
// signed xi_w(DATA_W, N) bits and exact.  Timing: purely combinational.
module cmvp_xi_unit #(
  parameter int unsigned N      = 8,
  parameter int unsigned DATA_W = 16
) (
  input  logic signed [DATA_W-1:0]                      x [N],
  output logic signed [cmvp_pkg::xi_w(DATA_W, N)-1:0]   xi
);

  localparam int XI_W = cmvp_pkg::xi_w(DATA_W, N);

  logic signed [2*DATA_W-1:0] pair [N/2];

  for (genvar k = 0; k < N / 2; k++) begin : g_pair
    assign pair[k] = (2*DATA_W)'(x[2*k]) * (2*DATA_W)'(x[2*k+1]);
  end

  always_comb begin
    xi = '0;
    for (int k = 0; k < N / 2; k++)
      xi += XI_W'(pair[k]);
  end

endmodule
