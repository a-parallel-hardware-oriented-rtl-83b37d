// cmvp_correction -- final Winograd correction of each row sum.
//
//   y_m = rsum_m - c_m - xi,   c_m = sum_k a_{m,2k} * a_{m,2k+1}
//
// c_m depends only on the constant matrix, so it is computed once at
// elaboration from A_FLAT and each subtraction of c_m is an adder with a
// constant input (M of them).  xi is the same for all rows and is removed
// by M two-input adders.  Both terms are subtracted, following the
// inner-product formula; the matrix form of the algorithm writes the
// equivalent addition of -c_m and -xi.  The result is cut to Y_W bits,
// which is exact because the true y_m always fits Y_W.
//
// Interface: rsum is M signed ACC_W-bit row sums, xi the signed XI_W-bit
// data term, y is M signed Y_W-bit outputs.  Timing: purely combinational.
module cmvp_correction #(
  parameter int unsigned M      = 8,
  parameter int unsigned N      = 8,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned COEF_W = 16,
  parameter logic [M*N*COEF_W-1:0] A_FLAT =
      (M*N*COEF_W)'(cmvp_pkg::demo_matrix(M, N, COEF_W))
) (
  input  logic signed [cmvp_pkg::acc_w(DATA_W, COEF_W, N)-1:0] rsum [M],
  input  logic signed [cmvp_pkg::xi_w(DATA_W, N)-1:0]          xi,
  output logic signed [cmvp_pkg::y_w(DATA_W, COEF_W, N)-1:0]   y    [M]
);

  localparam int ACC_W = cmvp_pkg::acc_w(DATA_W, COEF_W, N);
  localparam int Y_W   = cmvp_pkg::y_w(DATA_W, COEF_W, N);

  // c_m of row m, computed from the constants at elaboration.
  function automatic logic signed [ACC_W-1:0] c_of_row(input int m);
    logic signed [COEF_W-1:0] ae, ao;
    logic signed [ACC_W-1:0]  acc;
    acc = '0;
    for (int k = 0; k < N / 2; k++) begin
      ae  = A_FLAT[(m * N + 2 * k) * COEF_W +: COEF_W];
      ao  = A_FLAT[(m * N + 2 * k + 1) * COEF_W +: COEF_W];
      acc += ACC_W'(ae) * ACC_W'(ao);
    end
    return acc;
  endfunction

  for (genvar m = 0; m < M; m++) begin : g_row
    localparam logic signed [ACC_W-1:0] C_M = c_of_row(m);
    assign y[m] = Y_W'(rsum[m] - C_M - ACC_W'(xi));
  end

endmodule
