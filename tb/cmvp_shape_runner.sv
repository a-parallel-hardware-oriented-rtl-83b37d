// cmvp_shape_runner -- test helper: drives one cmvp_winograd of a given shape
// with a matrix of its own and random vectors, one per cycle, and checks each
// result against the direct product y_m = sum_n a_{m,n} x_n and the two-cycle
// latency.  Reports its counts on checks/failures and raises done when it has
// sent NVEC vectors and seen every result.
module cmvp_shape_runner #(
  parameter int unsigned M      = 3,
  parameter int unsigned N      = 6,
  parameter int unsigned DATA_W = 12,
  parameter int unsigned COEF_W = 10,
  parameter int unsigned NVEC   = 200
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int Y_W = cmvp_pkg::y_w(DATA_W, COEF_W, N);

  // Test matrix: a_{m,n} = ((71m + 23n + 9) * 613 mod 2^COEF_W) - 2^(COEF_W-1).
  function automatic longint coef(input int m, input int n);
    return longint'(((71 * m + 23 * n + 9) * 613) % (1 << COEF_W)) - (1 << (COEF_W - 1));
  endfunction

  function automatic logic [M*N*COEF_W-1:0] flat_matrix();
    logic [M*N*COEF_W-1:0] f;
    f = '0;
    for (int m = 0; m < M; m++)
      for (int n = 0; n < N; n++)
        f[(m * N + n) * COEF_W +: COEF_W] = COEF_W'(coef(m, n));
    return f;
  endfunction

  logic                      in_valid, out_valid;
  logic signed [DATA_W-1:0]  x [N];
  logic signed [Y_W-1:0]     y [M];

  cmvp_winograd #(.M(M), .N(N), .DATA_W(DATA_W), .COEF_W(COEF_W), .A_FLAT(flat_matrix()))
    dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(out_valid), .y(y));

  // exp_*[0] describes the input being driven now, exp_*[2] the input the
  // DUT captured two edges ago, whose result is on its outputs now.
  longint exp_y [3][M];
  logic   exp_v [3];
  int     sent;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_valid <= 1'b0;
      sent     <= 0;
      checks   <= 0;
      failures <= 0;
      done     <= 1'b0;
      for (int i = 0; i < 3; i++) exp_v[i] <= 1'b0;
      for (int n = 0; n < N; n++) x[n] <= '0;
    end else begin
      automatic int c = 0, f = 0;
      automatic logic signed [DATA_W-1:0] nx [N];
      // Check the output against the input captured two edges ago.
      if (exp_v[2] != out_valid) begin
        c++; f++;
        $display("FAIL shape %0dx%0d: out_valid %0b, expected %0b", M, N, out_valid, exp_v[2]);
      end else if (out_valid) begin
        for (int m = 0; m < M; m++) begin
          c++;
          if (longint'(y[m]) != exp_y[2][m]) begin
            f++;
            $display("FAIL shape %0dx%0d m=%0d got %0d exp %0d", M, N, m, y[m], exp_y[2][m]);
          end
        end
      end
      // Next input.
      for (int n = 0; n < N; n++) nx[n] = DATA_W'($urandom);
      in_valid <= (sent < NVEC);
      x        <= nx;
      exp_v[2] <= exp_v[1];
      exp_y[2] <= exp_y[1];
      exp_v[1] <= exp_v[0];
      exp_y[1] <= exp_y[0];
      exp_v[0] <= (sent < NVEC);
      if (sent < NVEC) begin
        sent <= sent + 1;
        for (int m = 0; m < M; m++) begin
          automatic longint acc = 0;
          for (int n = 0; n < N; n++) acc += coef(m, n) * longint'(nx[n]);
          exp_y[0][m] <= acc;
        end
      end
      checks   <= checks + c;
      failures <= failures + f;
      done     <= (sent == NVEC) && !exp_v[0] && !exp_v[1] && !exp_v[2];
    end
  end
endmodule
