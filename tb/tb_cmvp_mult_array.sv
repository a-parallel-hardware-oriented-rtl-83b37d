// tb_cmvp_mult_array -- self-checking test of the M*N/2 multiplier array.
//
// Drives random and extreme 17-bit operands into a 4 x 8 array and compares
// every product with a 64-bit product formed here.  A watchdog ends the run
// if it hangs.
module tb_cmvp_mult_array;
  localparam int K = 4, M = 8, W = 17;

  logic signed [W-1:0]   a [K][M], s [K][M];
  logic signed [2*W-1:0] p [K][M];

  cmvp_mult_array #(.K(K), .M(M), .IN_W(W)) dut (.a(a), .s(s), .p(p));

  int checks = 0, failures = 0;
  bit done = 0;

  function automatic logic signed [W-1:0] pick(input int it);
    case (it)
      0: return {1'b0, {(W-1){1'b1}}};
      1: return {1'b1, {(W-1){1'b0}}};
      2: return -1;
      default: return W'($urandom);
    endcase
  endfunction

  initial begin
    for (int it = 0; it < 300; it++) begin
      for (int k = 0; k < K; k++)
        for (int m = 0; m < M; m++) begin
          a[k][m] = pick(it);
          s[k][m] = (it < 3) ? pick(1) : pick(it);
        end
      #1;
      for (int k = 0; k < K; k++)
        for (int m = 0; m < M; m++) begin
          automatic longint e = longint'(a[k][m]) * longint'(s[k][m]);
          checks++;
          if (longint'(p[k][m]) != e) begin
            failures++;
            $display("FAIL k=%0d m=%0d %0d*%0d got %0d exp %0d", k, m,
                     a[k][m], s[k][m], p[k][m], e);
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
