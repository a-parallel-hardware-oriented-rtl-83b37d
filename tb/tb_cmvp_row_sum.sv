// tb_cmvp_row_sum -- self-checking test of the M row adders (matrix Sigma).
//
// Drives random and extreme 34-bit products into a 4 x 8 set and compares each
// row sum with the sum over k worked out here.  A watchdog ends the run if
// it hangs.
module tb_cmvp_row_sum;
  localparam int K = 4, M = 8, IW = 34, OW = 37;

  logic signed [IW-1:0] p [K][M];
  logic signed [OW-1:0] rsum [M];

  cmvp_row_sum #(.K(K), .M(M), .IN_W(IW), .OUT_W(OW)) dut (.p(p), .rsum(rsum));

  int checks = 0, failures = 0;
  bit done = 0;

  initial begin
    for (int it = 0; it < 300; it++) begin
      for (int k = 0; k < K; k++)
        for (int m = 0; m < M; m++)
          case (it)
            0:       p[k][m] = {1'b1, {(IW-1){1'b0}}};
            1:       p[k][m] = {1'b0, {(IW-1){1'b1}}};
            default: p[k][m] = IW'({$urandom, $urandom});
          endcase
      #1;
      for (int m = 0; m < M; m++) begin
        automatic longint e = 0;
        for (int k = 0; k < K; k++) e += longint'(p[k][m]);
        checks++;
        if (longint'(rsum[m]) != e) begin
          failures++;
          $display("FAIL it=%0d m=%0d got %0d exp %0d", it, m, rsum[m], e);
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
