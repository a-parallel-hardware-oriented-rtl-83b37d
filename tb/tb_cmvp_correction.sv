// tb_cmvp_correction -- self-checking test of the Winograd correction stage.
//
// Uses an 8 x 8 test matrix of its own.  The row sums are built here as the
// exact Winograd products sum_k (a_{m,2k} + x_{2k+1})(a_{m,2k+1} + x_{2k}) and
// xi as sum_k x_{2k} x_{2k+1} for random and extreme data; the stage's output
// must then equal the direct product sum_n a_{m,n} x_n.  A second set of
// checks feeds arbitrary row sums and xi and compares with rsum - c_m - xi,
// with c_m worked out here.  A watchdog ends the run if it hangs.
module tb_cmvp_correction;
  localparam int M = 8, N = 8, DW = 16, CW = 16;
  localparam int ACC_W = cmvp_pkg::acc_w(DW, CW, N);
  localparam int XI_W  = cmvp_pkg::xi_w(DW, N);
  localparam int Y_W   = cmvp_pkg::y_w(DW, CW, N);

  function automatic longint coef(input int m, input int n);
    return longint'(((53 * m + 29 * n + 1) * 1237) % 65536) - 32768;
  endfunction

  function automatic logic [M*N*CW-1:0] flat_matrix();
    logic [M*N*CW-1:0] f;
    f = '0;
    for (int m = 0; m < M; m++)
      for (int n = 0; n < N; n++)
        f[(m * N + n) * CW +: CW] = CW'(coef(m, n));
    return f;
  endfunction

  localparam logic [M*N*CW-1:0] A = flat_matrix();

  logic signed [ACC_W-1:0] rsum [M];
  logic signed [XI_W-1:0]  xi;
  logic signed [Y_W-1:0]   y [M];

  cmvp_correction #(.M(M), .N(N), .DATA_W(DW), .COEF_W(CW), .A_FLAT(A))
    dut (.rsum(rsum), .xi(xi), .y(y));

  int checks = 0, failures = 0;
  bit done = 0;
  longint x [N];

  initial begin
    // Part 1: whole-algorithm identity.
    for (int it = 0; it < 300; it++) begin
      for (int n = 0; n < N; n++)
        case (it)
          0:       x[n] = -32768;
          1:       x[n] = 32767;
          default: x[n] = longint'($signed(16'($urandom)));
        endcase
      begin
        automatic longint xs = 0;
        for (int k = 0; k < N / 2; k++) xs += x[2*k] * x[2*k+1];
        xi = XI_W'(xs);
      end
      for (int m = 0; m < M; m++) begin
        automatic longint r = 0;
        for (int k = 0; k < N / 2; k++)
          r += (coef(m, 2*k) + x[2*k+1]) * (coef(m, 2*k+1) + x[2*k]);
        rsum[m] = ACC_W'(r);
      end
      #1;
      for (int m = 0; m < M; m++) begin
        automatic longint e = 0;
        for (int n = 0; n < N; n++) e += coef(m, n) * x[n];
        checks++;
        if (longint'(y[m]) != e) begin
          failures++;
          $display("FAIL it=%0d m=%0d got %0d exp %0d", it, m, y[m], e);
        end
      end
    end
    // Part 2: arbitrary inputs, y = rsum - c_m - xi (mod 2^Y_W).
    for (int it = 0; it < 100; it++) begin
      xi = XI_W'({$urandom, $urandom});
      for (int m = 0; m < M; m++) rsum[m] = ACC_W'({$urandom, $urandom});
      #1;
      for (int m = 0; m < M; m++) begin
        automatic longint c = 0;
        logic [Y_W-1:0] e;
        for (int k = 0; k < N / 2; k++) c += coef(m, 2*k) * coef(m, 2*k+1);
        e = Y_W'(longint'(rsum[m]) - c - longint'(xi));
        checks++;
        if (y[m] != e) begin
          failures++;
          $display("FAIL part2 it=%0d m=%0d got %0h exp %0h", it, m, y[m], e);
        end
      end
    end
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    if (!done) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
