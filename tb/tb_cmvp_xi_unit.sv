// tb_cmvp_xi_unit -- self-checking test of the xi(N) unit.
//
// For N = 8 and 16-bit data, drives random and extreme vectors and compares
// xi with sum_k x_{2k} x_{2k+1} worked out here in 64-bit integers.
// A watchdog ends the run if it hangs.
module tb_cmvp_xi_unit;
  localparam int N = 8, DW = 16;
  localparam int XI_W = cmvp_pkg::xi_w(DW, N);

  logic signed [DW-1:0]   x [N];
  logic signed [XI_W-1:0] xi;

  cmvp_xi_unit #(.N(N), .DATA_W(DW)) dut (.x(x), .xi(xi));

  int checks = 0, failures = 0;
  bit done = 0;

  initial begin
    for (int it = 0; it < 500; it++) begin
      for (int n = 0; n < N; n++)
        case (it)
          0:       x[n] = 16'sh8000;                         // largest xi
          1:       x[n] = (n % 2 == 1) ? 16'sh7FFF : 16'sh8000;   // most negative
          default: x[n] = DW'($urandom);
        endcase
      #1;
      begin
        automatic longint e = 0;
        for (int k = 0; k < N / 2; k++) e += longint'(x[2*k]) * longint'(x[2*k+1]);
        checks++;
        if (longint'(xi) != e) begin
          failures++;
          $display("FAIL it=%0d got %0d exp %0d", it, xi, e);
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
