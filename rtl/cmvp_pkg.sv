// cmvp_pkg -- shared sizing rules and constant helpers for the Winograd
// constant matrix-vector multiplier (CMVP).
//
// The multiplier computes Y = A X for an M x N matrix A of signed constants
// and a signed data vector X (N even), using Winograd's inner product
//   y_m = sum_k (a_{m,2k} + x_{2k+1}) (a_{m,2k+1} + x_{2k}) - c_m - xi
//   c_m = sum_k a_{m,2k} a_{m,2k+1}        (a constant, fixed at elaboration)
//   xi  = sum_k x_{2k} x_{2k+1}            (shared by all M outputs)
// with k = 0 .. N/2-1.
//
// The constant matrix travels between modules as one flat packed parameter:
// element a_{m,n} is the signed COEF_W-bit field at bit offset
// (m*N + n)*COEF_W.  The word widths below are this design's own choice
// (the algorithm fixes none): every stage is kept at full precision, and the
// result is cut to Y_W = DATA_W + COEF_W + clog2(N) bits, which always holds
// the exact product A X.  Because all stages use two's-complement arithmetic,
// the cut is exact even though c_m and xi are larger than y_m.
package cmvp_pkg;

  // Largest flat matrix the built-in demonstration matrix can fill.
  localparam int unsigned MAX_FLAT_W = 65536;

  // Width of a pre-addition a + x.
  function automatic int pre_w(input int data_w, input int coef_w);
    return ((data_w > coef_w) ? data_w : coef_w) + 1;
  endfunction

  // Width of one product of two pre-additions.
  function automatic int prod_w(input int data_w, input int coef_w);
    return 2 * pre_w(data_w, coef_w);
  endfunction

  // Width of a row sum of N/2 products and of the corrected result before
  // it is cut to y_w.
  function automatic int acc_w(input int data_w, input int coef_w, input int n);
    return prod_w(data_w, coef_w) + $clog2(n);
  endfunction

  // Width of xi = sum of N/2 products x_{2k} x_{2k+1}.
  function automatic int xi_w(input int data_w, input int n);
    return 2 * data_w + $clog2(n);
  endfunction

  // Width of an output element y_m: holds any exact sum of N products of a
  // DATA_W-bit and a COEF_W-bit signed number.
  function automatic int y_w(input int data_w, input int coef_w, input int n);
    return data_w + coef_w + $clog2(n);
  endfunction

  // Demonstration constant matrix used when no matrix is given: a fixed
  // pseudo-random signed pattern, the top COEF_W bits of
  // (m*N + n + 1) * 0x9E3779B1 (mod 2^32), so that every bit of every
  // coefficient is exercised.  Needs m_dim*n_dim*coef_w <= MAX_FLAT_W and
  // coef_w <= 32.
  function automatic logic [MAX_FLAT_W-1:0] demo_matrix(input int m_dim,
                                                        input int n_dim,
                                                        input int coef_w);
    logic [MAX_FLAT_W-1:0] flat;
    logic [31:0]           h;
    flat = MAX_FLAT_W'(0);
    for (int m = 0; m < m_dim; m++) begin
      for (int n = 0; n < n_dim; n++) begin
        h = 32'(m * n_dim + n + 1) * 32'h9E37_79B1;
        for (int b = 0; b < coef_w; b++)
          flat[(m * n_dim + n) * coef_w + b] = h[32 - coef_w + b];
      end
    end
    return flat;
  endfunction

endpackage
