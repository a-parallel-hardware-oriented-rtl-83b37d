// cmvp_winograd -- fully parallel constant matrix-vector multiplier Y = A X
// built on Winograd's inner product, using N(M+1)/2 two-input multipliers
// instead of the M*N of the direct method (36 instead of 64 for M = N = 8).
//
// Data flow (all of it in one combinational stage):
//   1. Split X into its even elements x_{2k} and odd elements x_{2k+1}.
//   2. Two banks of M*N/2 constant adders (cmvp_preadd):
//        s_m^(k) = a_{m,2k}   + x_{2k+1}      (vector S, diagonal of D)
//        t_m^(k) = a_{m,2k+1} + x_{2k}        (vector A(1) + P X(1))
//   3. M*N/2 multipliers form t_m^(k) * s_m^(k) (cmvp_mult_array).
//   4. M adders with N/2 inputs sum the products of each row (cmvp_row_sum).
//   5. In parallel, N/2 multipliers and one N/2-input adder form
//      xi = sum_k x_{2k} x_{2k+1} (cmvp_xi_unit).
//   6. y_m = row sum - c_m - xi, with the constants c_m fixed at elaboration
//      (cmvp_correction).
// The algorithm, the counts of multipliers and adders and the data flow are
// those of the method; the register stages, the valid handshake and all
// word widths are this design's choices.
//
// Interface: x is sampled when in_valid is high on a rising clk edge; the
// matching y appears with out_valid two cycles later (one register after the
// input, one after the arithmetic).  A new vector may be given on every
// cycle.  rst_n is an active-low synchronous reset that clears both valid
// flags and the data registers.  N must be even.  The matrix is the flat
// parameter A_FLAT (a_{m,n} at bit (m*N+n)*COEF_W, signed); by default it is
// a fixed pseudo-random demonstration matrix from cmvp_pkg.
module cmvp_winograd #(
  parameter int unsigned M      = 8,
  parameter int unsigned N      = 8,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned COEF_W = 16,
  parameter logic [M*N*COEF_W-1:0] A_FLAT =
      (M*N*COEF_W)'(cmvp_pkg::demo_matrix(M, N, COEF_W))
) (
  input  logic                                                clk,
  input  logic                                                rst_n,
  input  logic                                                in_valid,
  input  logic signed [DATA_W-1:0]                            x [N],
  output logic                                                out_valid,
  output logic signed [cmvp_pkg::y_w(DATA_W, COEF_W, N)-1:0]  y [M]
);

  localparam int K      = N / 2;
  localparam int PRE_W  = cmvp_pkg::pre_w(DATA_W, COEF_W);
  localparam int PROD_W = cmvp_pkg::prod_w(DATA_W, COEF_W);
  localparam int ACC_W  = cmvp_pkg::acc_w(DATA_W, COEF_W, N);
  localparam int XI_W   = cmvp_pkg::xi_w(DATA_W, N);
  localparam int Y_W    = cmvp_pkg::y_w(DATA_W, COEF_W, N);

  if (N % 2 != 0 || N < 2) begin : g_bad_n
    $error("cmvp_winograd: N must be even and at least 2");
  end

  // ---------------- input register ----------------
  logic                     v_q;
  logic signed [DATA_W-1:0] x_q [N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q <= 1'b0;
      for (int n = 0; n < N; n++) x_q[n] <= '0;
    end else begin
      v_q <= in_valid;
      if (in_valid) x_q <= x;
    end
  end

  // ---------------- even / odd split ----------------
  logic signed [DATA_W-1:0] x_even [K];
  logic signed [DATA_W-1:0] x_odd  [K];

  for (genvar k = 0; k < K; k++) begin : g_split
    assign x_even[k] = x_q[2*k];
    assign x_odd[k]  = x_q[2*k+1];
  end

  // ---------------- pre-addition banks ----------------
  logic signed [PRE_W-1:0] s_vec [K][M];   // a_{m,2k}   + x_{2k+1}
  logic signed [PRE_W-1:0] t_vec [K][M];   // a_{m,2k+1} + x_{2k}

  cmvp_preadd #(
    .M(M), .N(N), .DATA_W(DATA_W), .COEF_W(COEF_W), .ODD_A(1'b0), .A_FLAT(A_FLAT)
  ) u_preadd_s (
    .x_half (x_odd),
    .sum    (s_vec)
  );

  cmvp_preadd #(
    .M(M), .N(N), .DATA_W(DATA_W), .COEF_W(COEF_W), .ODD_A(1'b1), .A_FLAT(A_FLAT)
  ) u_preadd_t (
    .x_half (x_even),
    .sum    (t_vec)
  );

  // ---------------- M*N/2 multipliers ----------------
  logic signed [PROD_W-1:0] prod [K][M];

  cmvp_mult_array #(
    .K(K), .M(M), .IN_W(PRE_W)
  ) u_mult (
    .a (t_vec),
    .s (s_vec),
    .p (prod)
  );

  // ---------------- M row adders ----------------
  logic signed [ACC_W-1:0] rsum [M];

  cmvp_row_sum #(
    .K(K), .M(M), .IN_W(PROD_W), .OUT_W(ACC_W)
  ) u_rows (
    .p    (prod),
    .rsum (rsum)
  );

  // ---------------- xi(N) ----------------
  logic signed [XI_W-1:0] xi;

  cmvp_xi_unit #(
    .N(N), .DATA_W(DATA_W)
  ) u_xi (
    .x  (x_q),
    .xi (xi)
  );

  // ---------------- correction ----------------
  logic signed [Y_W-1:0] y_d [M];

  cmvp_correction #(
    .M(M), .N(N), .DATA_W(DATA_W), .COEF_W(COEF_W), .A_FLAT(A_FLAT)
  ) u_corr (
    .rsum (rsum),
    .xi   (xi),
    .y    (y_d)
  );

  // ---------------- output register ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int m = 0; m < M; m++) y[m] <= '0;
    end else begin
      out_valid <= v_q;
      if (v_q) y <= y_d;
    end
  end

endmodule
