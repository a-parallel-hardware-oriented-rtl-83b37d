// tb_cmvp_preadd -- self-checking test of the constant pre-addition bank.
//
// Builds both banks of an 8 x 8 multiplier (ODD_A = 0 forms a_{m,2k} + x_{2k+1},
// ODD_A = 1 forms a_{m,2k+1} + x_{2k}) around a test matrix of its own, then
// drives random and extreme half-vectors and compares every lane with sums
// worked out here in 64-bit integers.  A watchdog ends the run if it hangs.
module tb_cmvp_preadd;
  localparam int M = 8, N = 8, K = N / 2, DW = 16, CW = 16;
  localparam int PRE_W = cmvp_pkg::pre_w(DW, CW);

  // Test matrix: a_{m,n} = ((37m + 11n + 5) * 977 mod 65536) - 32768.
  function automatic longint coef(input int m, input int n);
    return longint'(((37 * m + 11 * n + 5) * 977) % 65536) - 32768;
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

  logic signed [DW-1:0]    x_e [K], x_o [K];
  logic signed [PRE_W-1:0] s [K][M], t [K][M];

  cmvp_preadd #(.M(M), .N(N), .DATA_W(DW), .COEF_W(CW), .ODD_A(1'b0), .A_FLAT(A))
    dut_s (.x_half(x_o), .sum(s));
  cmvp_preadd #(.M(M), .N(N), .DATA_W(DW), .COEF_W(CW), .ODD_A(1'b1), .A_FLAT(A))
    dut_t (.x_half(x_e), .sum(t));

  int checks = 0, failures = 0;
  bit done = 0;

  task automatic check_all();
    for (int k = 0; k < K; k++)
      for (int m = 0; m < M; m++) begin
        longint es = coef(m, 2 * k) + longint'(x_o[k]);
        longint et = coef(m, 2 * k + 1) + longint'(x_e[k]);
        checks += 2;
        if (longint'(s[k][m]) != es) begin
          failures++;
          $display("FAIL s k=%0d m=%0d got %0d exp %0d", k, m, s[k][m], es);
        end
        if (longint'(t[k][m]) != et) begin
          failures++;
          $display("FAIL t k=%0d m=%0d got %0d exp %0d", k, m, t[k][m], et);
        end
      end
  endtask

  initial begin
    for (int it = 0; it < 200; it++) begin
      for (int k = 0; k < K; k++) begin
        case (it)
          0:       begin x_e[k] = 16'sh7FFF; x_o[k] = 16'sh7FFF; end
          1:       begin x_e[k] = 16'sh8000; x_o[k] = 16'sh8000; end
          2:       begin x_e[k] = '0;        x_o[k] = '0;        end
          default: begin x_e[k] = DW'($urandom); x_o[k] = DW'($urandom); end
        endcase
      end
      #1;
      check_all();
    end
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    #100000;
    if (!done) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
